// one_minus_lambda: computes 1 - lambda without a floating point adder.
//
// As the document describes, lambda's exponent is held constant, so 1 - lambda
// is formed by inverting the fraction field of lambda and normalising the
// result with a shifter. This design fixes lambda to [0.5, 1), i.e. an
// exponent field of 126: lambda = (2^23 + f) * 2^-24, so
// 1 - lambda = (2^23 - f) * 2^-24, approximated by ~f * 2^-24 (one unit in
// the last place low, the trivial error the document accepts). For other
// exponents the output is forced to 0 and bad_exp is raised. Combinational.
module one_minus_lambda
  import abr_pkg::*;
(
  input  fp32_t lambda,
  output fp32_t oml,
  output logic  bad_exp
);
  logic [22:0] inv;
  logic [4:0]  p;
  logic [22:0] nrm;

  always_comb begin
    inv = ~lambda[22:0];
    p   = 5'd0;
    for (int i = 0; i < 23; i++)
      if (inv[i]) p = 5'(i);
    nrm     = inv << (5'd22 - p);     // leading one to bit 22
    bad_exp = (lambda[30:23] != 8'd126) || lambda[31];
    // value = 1.nrm[21:0] * 2^(p-24)
    if (bad_exp || inv == 0) oml = FP_ZERO;
    else                     oml = {1'b0, 8'd103 + {3'b0, p}, nrm[21:0], 1'b0};
  end
endmodule
