// tb_rate_alu: checks the rate-format adder/subtractor and comparator. The
// expected result is the exact real sum or difference truncated to rate
// format (0 for negative or sub-1 results); the comparator output is checked
// against the real values.
module tb_rate_alu;
  import tb_pkg::*;
  logic [15:0] a, b, c, res;
  logic        sub, c_gt_res;
  int checks = 0, failures = 0;

  rate_alu dut (.a, .b, .sub, .c, .res, .c_gt_res);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rnd_rate();
    logic [15:0] r;
    r = {2'b01, 5'($urandom_range(0, 24)), 9'($urandom)};
    if ($urandom_range(0, 15) == 0) r[14] = 1'b0;   // some zero rates
    return r;
  endfunction

  initial begin
    real va, vb, vr;
    logic [15:0] exp_r;
    for (int i = 0; i < 5000; i++) begin
      a = rnd_rate(); b = rnd_rate(); sub = 1'($urandom);
      if (i % 5 == 0) b = {b[15:14], a[13:9], b[8:0]};  // same exponent
      c = (i % 3 == 0) ? res : rnd_rate();
      #1;
      c = (i % 3 == 0) ? res : c;
      #1;
      va = rate2r(a); vb = rate2r(b);
      vr = sub ? va - vb : va + vb;
      exp_r = r2rate(vr);
      checks++;
      if (res !== exp_r) begin
        failures++; $display("FAIL %h %s %h = %h expected %h", a, sub ? "-" : "+", b, res, exp_r);
      end
      checks++;
      if (c_gt_res !== (rate2r(c) > rate2r(exp_r))) begin
        failures++; $display("FAIL compare %h > %h gave %b", c, res, c_gt_res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
