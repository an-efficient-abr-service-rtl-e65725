// tb_fp_mul: checks the floating point multiplier against real arithmetic:
// exact small products, zero operands, signs, and random operands with a
// relative error bound of a few units in the last place (truncation).
module tb_fp_mul;
  import tb_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exact(input logic [31:0] ia, input logic [31:0] ib, input logic [31:0] exp_y);
    a = ia; b = ib; #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL exact %h * %h = %h, expected %h", ia, ib, y, exp_y);
    end
  endtask

  initial begin
    exact(32'h4040_0000, 32'h4040_0000, 32'h4110_0000);  // 3 * 3 = 9
    exact(32'h3F00_0000, 32'hC100_0000, 32'hC080_0000);  // 0.5 * -8 = -4
    exact(32'h0000_0000, 32'h4100_0000, 32'h0000_0000);  // 0 * 8
    exact(32'h3FC0_0000, 32'h3FC0_0000, 32'h4010_0000);  // 1.5 * 1.5 = 2.25
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] ra, rb;
      real ref_v;
      ra = {1'($urandom), 8'(80 + $urandom_range(0, 90)), 23'($urandom)};
      rb = {1'($urandom), 8'(80 + $urandom_range(0, 90)), 23'($urandom)};
      a = ra; b = rb; #1;
      ref_v = f2r(ra) * f2r(rb);
      checks++;
      if (abs_r(f2r(y) - ref_v) > abs_r(ref_v) * pow2(-22)) begin
        failures++;
        $display("FAIL %h * %h = %h (%g), expected %g", ra, rb, y, f2r(y), ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
