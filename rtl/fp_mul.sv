// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// y = a * b. The 24x24-bit mantissa product is normalised by at most one
// place and truncated; exponents are added and re-biased. This is the shared
// "32 bit floating point multiplier" of the ER engine and of the QC
// computation module. The document names the unit only; this design flushes
// subnormals to zero, truncates, saturates overflow to the largest finite
// value and does not handle NaN/infinity. Purely combinational.
module fp_mul
  import abr_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic [47:0] p;
  logic [9:0]  e;
  logic        s;
  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127 + {9'b0, p[47]};
    if (p[47]) y = {s, e[7:0], p[46:24]};
    else       y = {s, e[7:0], p[45:23]};
    if (a[30:23] == 0 || b[30:23] == 0) y = FP_ZERO;
    else if (e[9] || e == 0) y = FP_ZERO;
    else if (e >= 10'd255) y = {s, FP_MAX[30:0]};
  end
endmodule
