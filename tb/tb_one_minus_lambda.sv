// tb_one_minus_lambda: checks 1 - lambda formed by inversion and shifting
// against real arithmetic for lambda in [0.5, 1): the result may be low by
// at most 2^-24 (the approximation accepted for this unit) and never high.
// Lambdas outside [0.5, 1) must raise bad_exp.
module tb_one_minus_lambda;
  import tb_pkg::*;
  logic [31:0] lambda, oml;
  logic        bad_exp;
  int checks = 0, failures = 0;

  one_minus_lambda dut (.lambda, .oml, .bad_exp);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v, err;
    for (int i = 0; i < 3000; i++) begin
      lambda = {9'b0_0111_1110, 23'($urandom >> $urandom_range(0, 22))};
      if (i == 0) lambda = 32'h3F40_0000;   // 0.75
      #1;
      ref_v = 1.0 - f2r(lambda);
      err = ref_v - f2r(oml);
      checks++;
      if (bad_exp || err < 0.0 || err > pow2(-24) * 1.0001) begin
        failures++; $display("FAIL lambda %h -> %h (%g), expected %g", lambda, oml, f2r(oml), ref_v);
      end
    end
    lambda = 32'h3F80_0000; #1; checks++;   // 1.0 is out of range
    if (!bad_exp) begin failures++; $display("FAIL bad_exp not set for 1.0"); end
    lambda = 32'h3E80_0000; #1; checks++;   // 0.25 is out of range
    if (!bad_exp || oml != 0) begin failures++; $display("FAIL bad_exp not set for 0.25"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
