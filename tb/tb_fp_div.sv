// tb_fp_div: checks the multi-cycle floating point divider: quotients of
// random operands against real division (a few units in the last place),
// exact cases, division by zero (largest finite value), and that done comes
// exactly 26 clocks after start, well inside one 53-clock cell time.
module tb_fp_div;
  import tb_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [31:0] a, b, q;
  logic        busy, done;
  int checks = 0, failures = 0;

  fp_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [31:0] ia, input logic [31:0] ib, output logic [31:0] res,
                        output int lat);
    @(negedge clk);
    a = ia; b = ib; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;   // counts clock edges after the one that samples start
    while (!done) begin @(negedge clk); lat++; end
    res = q;
  endtask

  initial begin
    logic [31:0] r;
    int lat;
    real ref_v;
    a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    divide(32'h4110_0000, 32'h4040_0000, r, lat);   // 9 / 3 = 3
    checks++; if (r !== 32'h4040_0000) begin failures++; $display("FAIL 9/3 = %h", r); end
    checks++; if (lat != 26) begin failures++; $display("FAIL latency %0d", lat); end
    divide(32'h3F80_0000, 32'h4080_0000, r, lat);   // 1 / 4 = 0.25
    checks++; if (r !== 32'h3E80_0000) begin failures++; $display("FAIL 1/4 = %h", r); end
    divide(32'hC0A0_0000, 32'h0000_0000, r, lat);   // -5 / 0
    checks++; if (r !== 32'hFF7F_FFFF) begin failures++; $display("FAIL -5/0 = %h", r); end
    divide(32'h0000_0000, 32'h4000_0000, r, lat);   // 0 / 2
    checks++; if (r !== 32'h0000_0000) begin failures++; $display("FAIL 0/2 = %h", r); end
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] ra, rb;
      ra = {1'($urandom), 8'(90 + $urandom_range(0, 70)), 23'($urandom)};
      rb = {1'($urandom), 8'(90 + $urandom_range(0, 70)), 23'($urandom)};
      divide(ra, rb, r, lat);
      ref_v = f2r(ra) / f2r(rb);
      checks++;
      if (abs_r(f2r(r) - ref_v) > abs_r(ref_v) * pow2(-22) || lat != 26) begin
        failures++;
        $display("FAIL %h / %h = %h (%g), expected %g, latency %0d", ra, rb, r, f2r(r), ref_v, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
