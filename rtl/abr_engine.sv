// abr_engine: ABR service engine for an ATM switch output port.
//
// Computes ABR congestion-control information without delaying cells: an
// explicit rate (ER) is recomputed every T period from the average queue
// length and the estimated number of queuing connections (QC), and is then
// only written into passing backward RM cells. Blocks and connections:
//   timer            -> cell_tick, t_tick (T), w_tick (W)
//   ql_average       sums the queue length once per cell time over T
//   er_engine        ER from QL_ave, QC and QC corrector (after each T sum)
//   qc_estimation    QC_i from forward RM cells (CCR, MCR), QC every W,
//                    corrected by increases of the total connection count
//   congestion_det.  EFCI / NI / CI from the current queue length
//   egress_cell      egress cells: RM decoding for QC_i, EFCI marking
//   ingress_cell     ingress cells: ER, NI, CI written into backward RM
//                    cells, CRC-10 regenerated
//   abr_regfile      host bus access to all parameters
// Both cell ports are 8-bit UTOPIA-style streams (valid/soc/data/ready)
// clocked by clk; each cell path has one cell time of buffering latency. The
// block structure follows the document; clocking, handshakes and register
// map are this design's.
module abr_engine
  import abr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // egress cell stream (forward RM cells, data cells)
  input  logic        eg_rx_valid,
  input  logic        eg_rx_soc,
  input  logic [7:0]  eg_rx_data,
  output logic        eg_rx_ready,
  input  logic        eg_tx_ready,
  output logic        eg_tx_valid,
  output logic        eg_tx_soc,
  output logic [7:0]  eg_tx_data,
  // ingress cell stream (backward RM cells)
  input  logic        in_rx_valid,
  input  logic        in_rx_soc,
  input  logic [7:0]  in_rx_data,
  output logic        in_rx_ready,
  input  logic        in_tx_ready,
  output logic        in_tx_valid,
  output logic        in_tx_soc,
  output logic [7:0]  in_tx_data,
  // port state
  input  logic [15:0] queue_len,
  input  logic [15:0] total_conn,
  // host bus
  input  logic        bus_we,
  input  logic [4:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // observation
  output fp32_t       er,
  output rate_t       er_rate,
  output fp32_t       qc,
  output logic        er_done,
  output logic        qc_done,
  output fp32_t       ql_ave,
  output abr_events_t ev
);
  abr_params_t prm;
  logic        cell_tick, t_tick, w_tick;
  logic [31:0] ql_sum, ql_cnt;
  logic        ql_valid;
  logic        efci, ni, ci;
  logic        rm_start, rm_end, crc_ok;
  rate_t       ccr, mcr;
  fp32_t       qc_corr, delta_er, qci;
  logic        er_busy, start_phase;
  logic        acc_ok, acc_drop, corrected, efci_marked;
  logic        brm_seen, brm_crc_ok, er_written;

  abr_regfile u_regs (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .er, .er_rate, .qc, .prm
  );

  abr_timer u_timer (
    .clk, .rst_n, .t_period(prm.t_period), .w_period(prm.w_period),
    .cell_tick, .t_tick, .w_tick
  );

  ql_average u_qlavg (
    .clk, .rst_n, .sample(cell_tick), .queue_len, .t_tick,
    .sum(ql_sum), .count(ql_cnt), .valid(ql_valid)
  );

  congestion_detector u_cong (
    .clk, .rst_n, .queue_len,
    .q_efci(prm.q_efci), .q_ni(prm.q_ni), .q_ci(prm.q_ci),
    .efci, .ni, .ci
  );

  egress_cell u_egress (
    .clk, .rst_n,
    .rx_valid(eg_rx_valid), .rx_soc(eg_rx_soc), .rx_data(eg_rx_data), .rx_ready(eg_rx_ready),
    .tx_ready(eg_tx_ready), .tx_valid(eg_tx_valid), .tx_soc(eg_tx_soc), .tx_data(eg_tx_data),
    .congestion(efci), .rm_start, .ccr, .mcr, .rm_end, .crc_ok, .efci_marked
  );

  qc_estimation u_qce (
    .clk, .rst_n, .rm_start, .ccr, .mcr, .rm_end, .crc_ok,
    .delta_er, .nrm_over_w(prm.nrm_over_w), .lambda(prm.lambda),
    .w_tick, .tc(total_conn),
    .qc, .qc_corr, .qci, .qc_done, .accepted(acc_ok), .dropped(acc_drop), .corrected
  );

  er_engine u_er (
    .clk, .rst_n, .start(ql_valid), .ql_sum, .ql_count(ql_cnt),
    .qc, .qc_corr, .prm,
    .busy(er_busy), .done(er_done), .er, .er_rate, .delta_er, .ql_ave, .start_phase
  );

  assign ev = '{qci_accepted: acc_ok, qci_dropped: acc_drop, qc_corrected: corrected,
                efci_marked: efci_marked, brm_seen: brm_seen,
                brm_crc_bad: brm_seen && !brm_crc_ok, er_written: er_written,
                er_busy: er_busy, start_phase: start_phase};

  ingress_cell u_ingress (
    .clk, .rst_n,
    .rx_valid(in_rx_valid), .rx_soc(in_rx_soc), .rx_data(in_rx_data), .rx_ready(in_rx_ready),
    .tx_ready(in_tx_ready), .tx_valid(in_tx_valid), .tx_soc(in_tx_soc), .tx_data(in_tx_data),
    .er_engine(er_rate), .ni, .ci,
    .rm_seen(brm_seen), .rm_crc_ok(brm_crc_ok), .er_written
  );
endmodule
