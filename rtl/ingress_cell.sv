// ingress_cell: ingress cell decoder and encoder (RM writer, CRC generator).
//
// Cells pass through a two-cell buffer (cell_buffer). While a cell arrives
// the decoder identifies a backward RM cell sent by the source (PTI = 110,
// DIR = 1, BN = 0), reads its ER and MCR and checks its CRC-10. When the
// last byte is in and the CRC is good, the cell's rewrite is decided and
// stored with its buffer half:
//   * the rate-format adder forms er_engine + MCR; if the cell's ER is larger,
//     that sum replaces the ER field;
//   * NI and CI are set when the queue-length detector says so (never cleared).
// As the cell leaves, the changed bytes are substituted and a CRC generator
// recomputes the CRC-10 over the outgoing payload and inserts it into the
// last 10 bits. A cell with a bad CRC, a data cell or any other RM cell is
// forwarded untouched. The ER + MCR rule, the NI/CI marking, the CRC
// regeneration and the cancellation on CRC error follow the document; the
// byte offsets follow the standard RM cell and the buffering is this
// design's. Latency is one cell time.
module ingress_cell
  import abr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic       rx_soc,
  input  logic [7:0] rx_data,
  output logic       rx_ready,
  input  logic       tx_ready,
  output logic       tx_valid,
  output logic       tx_soc,
  output logic [7:0] tx_data,
  input  rate_t      er_engine,   // ER prepared by the ER engine (rate format)
  input  logic       ni,          // no-increase condition
  input  logic       ci,          // congestion-indication condition
  output logic       rm_seen,     // pulse: a backward RM cell from the source fully received
  output logic       rm_crc_ok,   // its CRC verdict
  output logic       er_written   // pulse: its ER will be replaced
);
  typedef struct packed {
    logic  mod;
    logic  wr_er;
    rate_t er;
    logic  ni;
    logic  ci;
  } meta_t;

  logic       wr_en, wr_bank, wr_last, rd_bank, rd_fire;
  logic [5:0] wr_idx, rd_idx;
  logic [7:0] buf_data;
  logic       is_rm, bwd_src;
  logic [7:0] er_hi, mcr_hi;
  rate_t      rm_er, rm_mcr;
  logic [1:0] crc_hi;
  logic [9:0] chk_q, chk_nxt, gen_q, gen_nxt;
  meta_t      meta [2];
  meta_t      cur;
  rate_t      sum;
  logic       er_gt_sum;
  logic       good;

  cell_buffer u_buf (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_soc(rx_soc), .in_data(rx_data), .in_ready(rx_ready),
    .wr_en, .wr_idx, .wr_bank, .wr_last,
    .out_ready(tx_ready), .out_valid(tx_valid), .out_soc(tx_soc), .out_data(buf_data),
    .rd_idx, .rd_bank, .rd_fire
  );

  // CRC checker on the incoming cell
  crc10 u_chk (
    .clk, .rst_n,
    .clear(wr_en && wr_idx == 6'(IDX_PAYLOAD - 1)),
    .en(wr_en && wr_idx >= 6'(IDX_PAYLOAD) && wr_idx <= 6'(IDX_CRC_HI)),
    .six(wr_idx == 6'(IDX_CRC_HI)),
    .data(rx_data),
    .crc(chk_q), .nxt(chk_nxt)
  );

  // ER + MCR and the comparison with the cell's ER
  rate_alu u_add (
    .a(er_engine), .b(rm_mcr), .sub(1'b0), .c(rm_er),
    .res(sum), .c_gt_res(er_gt_sum)
  );

  assign good = wr_last && is_rm && bwd_src && (chk_q == {crc_hi, rx_data});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_rm <= 1'b0; bwd_src <= 1'b0; er_hi <= '0; mcr_hi <= '0; crc_hi <= '0;
      rm_er <= '0; rm_mcr <= '0; rm_seen <= 1'b0; rm_crc_ok <= 1'b0; er_written <= 1'b0;
      meta[0] <= '0; meta[1] <= '0;
    end else begin
      rm_seen    <= 1'b0;
      er_written <= 1'b0;
      if (wr_en) begin
        unique case (int'(wr_idx))
          IDX_PTI:     is_rm   <= (rx_data[3:1] == PTI_RM);
          IDX_MSGTYPE: bwd_src <= rx_data[MT_DIR] && !rx_data[MT_BN];
          IDX_ER:      er_hi   <= rx_data;
          IDX_ER + 1:  rm_er   <= {er_hi, rx_data};
          IDX_MCR:     mcr_hi  <= rx_data;
          IDX_MCR + 1: rm_mcr  <= {mcr_hi, rx_data};
          IDX_CRC_HI:  crc_hi  <= rx_data[1:0];
          IDX_CRC_LO: begin
            rm_seen    <= is_rm && bwd_src;
            rm_crc_ok  <= (chk_q == {crc_hi, rx_data});
            er_written <= good && er_gt_sum;
            meta[wr_bank] <= '{mod: good, wr_er: good && er_gt_sum, er: sum, ni: ni, ci: ci};
          end
          default: ;
        endcase
      end
    end
  end

  // RM writer on the outgoing cell
  assign cur = meta[rd_bank];
  logic [7:0] mod_byte;
  always_comb begin
    mod_byte = buf_data;
    if (cur.mod) begin
      unique case (int'(rd_idx))
        IDX_MSGTYPE: mod_byte = buf_data | {2'b00, cur.ci, cur.ni, 4'b0000};
        IDX_ER:      if (cur.wr_er) mod_byte = cur.er[15:8];
        IDX_ER + 1:  if (cur.wr_er) mod_byte = cur.er[7:0];
        default: ;
      endcase
    end
  end

  // CRC generator on the outgoing cell
  crc10 u_gen (
    .clk, .rst_n,
    .clear(rd_fire && rd_idx == 6'(IDX_PAYLOAD - 1)),
    .en(rd_fire && rd_idx >= 6'(IDX_PAYLOAD) && rd_idx <= 6'(IDX_CRC_HI)),
    .six(rd_idx == 6'(IDX_CRC_HI)),
    .data(mod_byte),
    .crc(gen_q), .nxt(gen_nxt)
  );

  always_comb begin
    tx_data = mod_byte;
    if (cur.mod && rd_idx == 6'(IDX_CRC_HI)) tx_data = {mod_byte[7:2], gen_nxt[9:8]};
    if (cur.mod && rd_idx == 6'(IDX_CRC_LO)) tx_data = gen_q[7:0];
  end
endmodule
