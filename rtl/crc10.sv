// crc10: byte-serial CRC-10 register for the RM cell payload.
//
// The same unit serves as the CRC checker of the cell decoders and as the
// CRC generator of the ingress cell encoder. clear loads 0; each cycle with
// en high shifts in the 8 bits of data, or only its 6 most significant bits
// when six is high (the reserved bits in front of the CRC field). The
// register after the 46 payload bytes and the 6 reserved bits is the CRC-10
// (G = x^10+x^9+x^5+x^4+x+1) that belongs in the last 10 payload bits; the
// combinational output nxt shows the value after the current byte so a
// generator can insert it in the same cycle. The document names CRC-10 for
// RM cells; the bit order and the cleared start value follow common ATM OAM
// practice and are this design's assumption.
module crc10
  import abr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       six,
  input  logic [7:0] data,
  output logic [9:0] crc,
  output logic [9:0] nxt
);
  assign nxt = crc10_step(crc, data, six);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= nxt;
  end
endmodule
