// tb_fp_add: checks the floating point adder/subtractor against real
// arithmetic: directed cases (exact sums, cancellation to zero, zero
// operands, sign handling) and random operands of both signs over a wide
// exponent range. Truncation allows an error of a few units in the last
// place of the larger operand.
module tb_fp_add;
  import tb_pkg::*;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .sub, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exact(input logic [31:0] ia, input logic [31:0] ib, input logic is,
                       input logic [31:0] exp_y);
    a = ia; b = ib; sub = is; #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL exact %h %s %h = %h, expected %h", ia, is ? "-" : "+", ib, y, exp_y);
    end
  endtask

  task automatic approx(input logic [31:0] ia, input logic [31:0] ib, input logic is);
    real ra, rb, ref_v, tol;
    a = ia; b = ib; sub = is; #1;
    ra = f2r(ia); rb = f2r(ib);
    ref_v = is ? ra - rb : ra + rb;
    tol = (abs_r(ra) > abs_r(rb) ? abs_r(ra) : abs_r(rb)) * pow2(-21);
    checks++;
    if (abs_r(f2r(y) - ref_v) > tol) begin
      failures++;
      $display("FAIL %h %s %h = %h (%g), expected %g", ia, is ? "-" : "+", ib, y, f2r(y), ref_v);
    end
  endtask

  initial begin
    exact(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000);  // 1 + 1 = 2
    exact(32'h3FC0_0000, 32'h3FC0_0000, 1'b1, 32'h0000_0000);  // 1.5 - 1.5 = 0
    exact(32'h4040_0000, 32'h3F80_0000, 1'b1, 32'h4000_0000);  // 3 - 1 = 2
    exact(32'h3F80_0000, 32'h4040_0000, 1'b1, 32'hC000_0000);  // 1 - 3 = -2
    exact(32'h0000_0000, 32'h4120_0000, 1'b1, 32'hC120_0000);  // 0 - 10 = -10
    exact(32'h42C8_0000, 32'h0000_0000, 1'b0, 32'h42C8_0000);  // 100 + 0
    exact(32'h4120_0000, 32'hC0A0_0000, 1'b0, 32'h40A0_0000);  // 10 + -5 = 5
    exact(32'h4B80_0000, 32'h3F80_0000, 1'b0, 32'h4B80_0000);  // 2^24 + 1 truncates
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] ra, rb;
      ra = {1'($urandom), 8'(100 + $urandom_range(0, 60)), 23'($urandom)};
      rb = {1'($urandom), 8'(100 + $urandom_range(0, 60)), 23'($urandom)};
      if (i % 4 == 0) rb[30:23] = ra[30:23];             // close exponents: cancellation
      approx(ra, rb, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
