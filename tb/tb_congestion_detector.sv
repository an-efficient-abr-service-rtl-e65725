// tb_congestion_detector: drives random queue lengths and thresholds and
// checks that efci, ni and ci equal the three "queue above threshold"
// comparisons one clock later, including the equal-to-threshold boundary.
module tb_congestion_detector;
  logic        clk = 0, rst_n = 0;
  logic [15:0] queue_len = 0, q_efci = 0, q_ni = 0, q_ci = 0;
  logic        efci, ni, ci;
  int checks = 0, failures = 0;

  congestion_detector dut (.clk, .rst_n, .queue_len, .q_efci, .q_ni, .q_ci, .efci, .ni, .ci);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      q_efci = 16'($urandom_range(50, 300));
      q_ni   = 16'($urandom_range(50, 300));
      q_ci   = 16'($urandom_range(50, 300));
      q = 16'($urandom_range(0, 400));
      if (i % 7 == 0) q = q_ni;            // boundary: not above
      queue_len = q;
      @(negedge clk);
      checks++;
      if (efci !== (q > q_efci) || ni !== (q > q_ni) || ci !== (q > q_ci)) begin
        failures++;
        $display("FAIL q=%0d thr %0d/%0d/%0d -> efci %b ni %b ci %b", q, q_efci, q_ni, q_ci, efci, ni, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
