// cell_buffer: UTOPIA-style cell interface with a two-cell (ping-pong) buffer.
//
// Cells arrive as 53 bytes on an 8-bit bus: in_soc marks the first byte,
// in_valid qualifies each byte and in_ready tells the sender a byte can be
// taken (low while both buffer halves hold complete cells). A byte is taken
// when in_valid && in_ready; in_soc restarts the byte count at 0. After the
// 53rd byte the half is marked full and writing moves to the other half.
// A full half is sent out byte by byte: out_valid/out_soc/out_data, a byte
// leaves when out_valid && out_ready. The write-side (wr_*) and read-side
// (rd_*) byte index and half are brought out so the cell decoder can read
// fields while a cell arrives and the cell encoder can replace bytes as it
// leaves. Holding a whole cell lets the encoder act on the CRC verdict, which
// is known only after the last byte. The document shows a cell buffer and a
// UTOPIA interface controller (Empty/Enable in, Enable/Clock/SOC out); the
// two-half buffer and the valid/ready form of the handshake are this
// design's. One cell time of latency results; one byte per clock each way.
module cell_buffer
  import abr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // receive side
  input  logic       in_valid,
  input  logic       in_soc,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       wr_en,      // a byte is taken this cycle
  output logic [5:0] wr_idx,     // its index in the cell
  output logic       wr_bank,    // the half it goes to
  output logic       wr_last,    // it is the last byte of the cell
  // transmit side
  input  logic       out_ready,
  output logic       out_valid,
  output logic       out_soc,
  output logic [7:0] out_data,
  output logic [5:0] rd_idx,
  output logic       rd_bank,
  output logic       rd_fire
);
  logic [7:0] mem [0:2*CELL_BYTES-1];
  logic [1:0] full;
  logic [5:0] wcnt, rcnt;
  logic       wb, rb;

  assign in_ready = !full[wb];
  assign wr_en    = in_valid && in_ready;
  assign wr_idx   = in_soc ? 6'd0 : wcnt;
  assign wr_bank  = wb;
  assign wr_last  = wr_en && (wr_idx == 6'(CELL_BYTES - 1));

  assign out_valid = full[rb];
  assign rd_idx    = rcnt;
  assign rd_bank   = rb;
  assign out_soc   = out_valid && (rcnt == 0);
  assign out_data  = mem[rb ? CELL_BYTES + int'(rcnt) : int'(rcnt)];
  assign rd_fire   = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wb ? CELL_BYTES + int'(wr_idx) : int'(wr_idx)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 2'b00; wcnt <= '0; rcnt <= '0; wb <= 1'b0; rb <= 1'b0;
    end else begin
      if (wr_en) begin
        if (wr_last) begin
          wcnt <= '0;
          wb   <= ~wb;
        end else begin
          wcnt <= wr_idx + 6'd1;
        end
      end
      if (rd_fire) begin
        if (rcnt == 6'(CELL_BYTES - 1)) begin
          rcnt <= '0;
          rb   <= ~rb;
        end else begin
          rcnt <= rcnt + 6'd1;
        end
      end
      // set and clear never hit the same half: writing goes to a half that is not full
      for (int h = 0; h < 2; h++) begin
        if (wr_last && wb == 1'(h)) full[h] <= 1'b1;
        else if (rd_fire && rcnt == 6'(CELL_BYTES - 1) && rb == 1'(h)) full[h] <= 1'b0;
      end
    end
  end

  // a byte is never written into a half that is waiting to be sent
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full[wb]);
endmodule
