// tb_num_conv: checks the three number format converters against real
// arithmetic: integer -> float (truncated, never above the integer, within
// one unit in the last place), rate format -> float (exact, zero when nz=0)
// and float -> rate format (truncated mantissa, zero below 1, saturation).
module tb_num_conv;
  import tb_pkg::*;
  logic [31:0] int_in, int_fp, fp_in, rate_fp;
  logic [15:0] rate_in, fp_rate;
  int checks = 0, failures = 0;

  num_conv dut (.int_in, .rate_in, .fp_in, .int_fp, .rate_fp, .fp_rate);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    rate_in = 0; fp_in = 0; int_in = 0;
    // integer -> float
    for (int i = 0; i < 2000; i++) begin
      int_in = (i < 40) ? 32'(i) : ($urandom >> $urandom_range(0, 31));
      #1;
      v = real'(int_in);
      checks++;
      if (f2r(int_fp) > v || v - f2r(int_fp) > v * pow2(-23)) begin
        failures++; $display("FAIL int %0d -> %h", int_in, int_fp);
      end
    end
    // rate -> float
    for (int i = 0; i < 2000; i++) begin
      rate_in = 16'($urandom) & 16'h7FFF;
      #1;
      checks++;
      if (f2r(rate_fp) != rate2r(rate_in)) begin
        failures++; $display("FAIL rate %h -> %h", rate_in, rate_fp);
      end
    end
    // float -> rate
    fp_in = 32'h3F00_0000; #1; checks++;                      // 0.5 -> 0
    if (fp_rate !== 16'h0) begin failures++; $display("FAIL 0.5 -> %h", fp_rate); end
    fp_in = 32'hC2C8_0000; #1; checks++;                      // -100 -> 0
    if (fp_rate !== 16'h0) begin failures++; $display("FAIL -100 -> %h", fp_rate); end
    fp_in = 32'h5F80_0000; #1; checks++;                      // 2^64 -> saturate
    if (fp_rate !== 16'h7FFF) begin failures++; $display("FAIL 2^64 -> %h", fp_rate); end
    for (int i = 0; i < 2000; i++) begin
      fp_in = {1'b0, 8'(127 + $urandom_range(0, 31)), 23'($urandom)};
      #1;
      checks++;
      if (fp_rate !== r2rate(f2r(fp_in))) begin
        failures++; $display("FAIL fp %h -> %h expected %h", fp_in, fp_rate, r2rate(f2r(fp_in)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
