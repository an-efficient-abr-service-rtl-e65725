// qc_estimation: queuing connection (QC) estimation unit.
//
// Joins the QC_i accumulation part (qci_accum), fed by forward RM cells from
// the egress cell decoder, and the QC computation part (qc_compute), which
// every W period filters QC_i into QC, applies the QC corrector for new
// connections and limits QC to the total connection count. All connections
// of the ABR class are treated together; no per-connection state is kept.
// Outputs: qc and the running corrector qc_corr (both floating point) for the
// ER engine. Structure and formulas follow the document; see the two
// sub-modules for timing.
module qc_estimation
  import abr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rm_start,
  input  rate_t       ccr,
  input  rate_t       mcr,
  input  logic        rm_end,
  input  logic        crc_ok,
  input  fp32_t       delta_er,
  input  fp32_t       nrm_over_w,
  input  fp32_t       lambda,
  input  logic        w_tick,
  input  logic [15:0] tc,
  output fp32_t       qc,
  output fp32_t       qc_corr,
  output fp32_t       qci,
  output logic        qc_done,
  output logic        accepted,
  output logic        dropped,
  output logic        corrected
);
  qci_accum u_acc (
    .clk, .rst_n, .rm_start, .ccr, .mcr, .rm_end, .crc_ok,
    .delta_er, .nrm_over_w, .w_tick, .qci, .accepted, .dropped
  );
  qc_compute u_qc (
    .clk, .rst_n, .w_tick, .qci, .tc, .lambda,
    .qc, .corr_f(qc_corr), .done(qc_done), .corrected
  );
endmodule
