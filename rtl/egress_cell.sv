// egress_cell: egress cell decoder and encoder.
//
// Cells pass through a two-cell buffer (cell_buffer). While a cell arrives
// the decoder reads the PTI in header byte 3: PTI = 110 is an RM cell, any
// other value a data cell. For an RM cell it reads the message type (DIR, BN),
// CCR and MCR and runs the CRC-10 checker over the payload. A forward RM
// cell sent by the source (DIR = 0, BN = 0) raises rm_start for one cycle
// once its MCR has been read, with ccr/mcr valid, so the QC_i division can
// start early; when the last byte is in, rm_end pulses with crc_ok, which
// tells the QC_i accumulator to keep or drop the result. For a data cell the
// EFCI marker sets the EFCI bit (PTI bit 1, byte 3 bit 2) as the cell leaves
// if congestion (queue length above the EFCI threshold) was high when its
// header arrived. The payload is not changed, so no new CRC is needed. RM
// cells are forwarded unchanged. The document gives this structure (RM cell
// detector, CRC checker, EFCI marker, cell buffer) and the PTI/DIR/BN rules;
// byte offsets follow the standard RM cell layout and the buffering scheme
// is this design's choice.
module egress_cell
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
  input  logic       congestion,   // EFCI condition from the queue-length comparator
  output logic       rm_start,     // forward RM cell from the source: CCR/MCR valid
  output rate_t      ccr,
  output rate_t      mcr,
  output logic       rm_end,       // end of that cell, crc_ok valid
  output logic       crc_ok,
  output logic       efci_marked   // a data cell left with EFCI set by this unit
);
  logic       wr_en, wr_bank, wr_last, rd_bank, rd_fire;
  logic [5:0] wr_idx, rd_idx;
  logic [7:0] buf_data;
  logic       is_rm, fwd_src;
  logic [7:0] ccr_hi, mcr_hi;
  logic [1:0] crc_hi;
  logic [1:0] mark;
  logic [9:0] crc_q, crc_nxt;

  cell_buffer u_buf (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_soc(rx_soc), .in_data(rx_data), .in_ready(rx_ready),
    .wr_en, .wr_idx, .wr_bank, .wr_last,
    .out_ready(tx_ready), .out_valid(tx_valid), .out_soc(tx_soc), .out_data(buf_data),
    .rd_idx, .rd_bank, .rd_fire
  );

  crc10 u_crc (
    .clk, .rst_n,
    .clear(wr_en && wr_idx == 6'(IDX_PAYLOAD - 1)),
    .en(wr_en && wr_idx >= 6'(IDX_PAYLOAD) && wr_idx <= 6'(IDX_CRC_HI)),
    .six(wr_idx == 6'(IDX_CRC_HI)),
    .data(rx_data),
    .crc(crc_q), .nxt(crc_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_rm <= 1'b0; fwd_src <= 1'b0; ccr_hi <= '0; mcr_hi <= '0; crc_hi <= '0;
      ccr <= '0; mcr <= '0; rm_start <= 1'b0; rm_end <= 1'b0; crc_ok <= 1'b0;
      mark <= 2'b00;
    end else begin
      rm_start <= 1'b0;
      rm_end   <= 1'b0;
      if (wr_en) begin
        unique case (int'(wr_idx))
          IDX_PTI: begin
            is_rm          <= (rx_data[3:1] == PTI_RM);
            mark[wr_bank]  <= !rx_data[3] && congestion;
          end
          IDX_MSGTYPE: fwd_src <= !rx_data[MT_DIR] && !rx_data[MT_BN];
          IDX_CCR:     ccr_hi  <= rx_data;
          IDX_CCR + 1: ccr     <= {ccr_hi, rx_data};
          IDX_MCR:     mcr_hi  <= rx_data;
          IDX_MCR + 1: begin
            mcr      <= {mcr_hi, rx_data};
            rm_start <= is_rm && fwd_src;
          end
          IDX_CRC_HI:  crc_hi  <= rx_data[1:0];
          IDX_CRC_LO: begin
            rm_end <= is_rm && fwd_src;
            crc_ok <= (crc_q == {crc_hi, rx_data});
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    tx_data = buf_data;
    if (rd_idx == 6'(IDX_PTI) && mark[rd_bank]) tx_data = buf_data | 8'h04;
  end
  assign efci_marked = rd_fire && rd_idx == 6'(IDX_PTI) && mark[rd_bank];
endmodule
