// fp_add: combinational IEEE-754 single-precision adder/subtractor.
//
// y = a + b (sub = 0) or y = a - b (sub = 1). The operand of larger magnitude
// is kept, the other mantissa is shifted right by the exponent difference
// (three guard bits), the mantissas are added or subtracted and the sum is
// normalised with a leading-zero search. This is the shared "32 bit floating
// point adder" of the ER engine and of the QC estimation unit; the document
// names the unit, the algorithm and the simplifications are this design's:
// results are truncated (round toward zero), subnormal inputs and results are
// flushed to zero, an exponent overflow saturates to the largest finite value,
// and NaN/infinity are not handled (the engine's values are finite rates,
// queue lengths and coefficients). Purely combinational, no clock.
module fp_add
  import abr_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey, d;
  logic [23:0] ma, mb, mx, my;
  logic [27:0] ax, ay, s;
  logic [4:0]  lz;
  logic [9:0]  e_res;
  logic [27:0] n;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 0) ? 24'h0 : {1'b1, a[22:0]};
    mb = (eb == 0) ? 24'h0 : {1'b1, b[22:0]};
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    d  = ex - ey;
    ax = {1'b0, mx, 3'b000};
    ay = (d > 8'd26) ? 28'h0 : ({1'b0, my, 3'b000} >> d);
    s  = (sx == sy) ? ax + ay : ax - ay;
    lz = 5'd0;
    for (int i = 0; i <= 27; i++)
      if (s[i]) lz = 5'(27 - i);
    n     = s << lz;                           // leading one now in bit 27
    e_res = {2'b00, ex} + 10'd1 - {5'b0, lz};  // bit 27 weighs 2^(ex+1-127)
    y     = {sx, e_res[7:0], n[26:4]};
    if (ey == 0 && ex == 0) y = FP_ZERO;
    else if (s == 0) y = FP_ZERO;
    else if (e_res[9] || e_res == 0) y = FP_ZERO;   // underflow
    else if (e_res >= 10'd255) y = {sx, FP_MAX[30:0]};
  end
endmodule
