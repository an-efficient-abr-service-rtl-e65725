// rate_alu: 16-bit rate-format adder/subtractor with comparator.
//
// res = a + b (sub = 0) or a - b (sub = 1), both in ATM rate format, and
// c_gt_res = (c > res). The egress path uses it as the QC_i accumulation
// condition (CCR - MCR compared with delta*ER); the ingress path uses it to
// form ER(engine) + MCR and compare it with the ER of a backward RM cell.
// The document calls for a rate-format adder and comparator because they are
// smaller than 32-bit floating point units; how they work is this design's:
// operands are expanded to a fixed-point value with 9 fractional bits
// (1.m shifted left by e), added or subtracted exactly, and the result is
// renormalised to rate format with truncation. Negative differences and
// results below 1 cell/s give 0 (nz = 0); overflow saturates. Combinational.
module rate_alu
  import abr_pkg::*;
(
  input  rate_t a,
  input  rate_t b,
  input  logic  sub,
  input  rate_t c,
  output rate_t res,
  output logic  c_gt_res
);
  logic [41:0] fa, fb, fs;
  logic [5:0]  p;
  logic [41:0] nrm;
  logic [5:0]  e;

  always_comb begin
    fa = a[14] ? (42'({1'b1, a[8:0]}) << a[13:9]) : 42'h0;
    fb = b[14] ? (42'({1'b1, b[8:0]}) << b[13:9]) : 42'h0;
    if (sub) fs = (fa > fb) ? fa - fb : 42'h0;
    else     fs = fa + fb;
    p = 6'd0;
    for (int i = 0; i < 42; i++)
      if (fs[i]) p = 6'(i);
    nrm = fs << (6'd41 - p);          // leading one to bit 41
    e   = p - 6'd9;
    if (p < 6'd9 || fs == 0) res = 16'h0000;
    else if (p > 6'd40)      res = {2'b01, 5'd31, 9'h1FF};
    else                     res = {2'b01, e[4:0], nrm[40:32]};
    c_gt_res = rate_gt(c, res);
  end
endmodule
