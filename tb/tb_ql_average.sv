// tb_ql_average: samples random queue lengths at random cell ticks and
// checks the sum and count delivered at every T tick (including a sample in
// the same cycle as the tick) against the testbench's own totals, and that
// valid pulses for one clock after each tick.
module tb_ql_average;
  logic        clk = 0, rst_n = 0, sample = 0, t_tick = 0;
  logic [15:0] queue_len = 0;
  logic [31:0] sum, count;
  logic        valid;
  int checks = 0, failures = 0;

  ql_average dut (.clk, .rst_n, .sample, .queue_len, .t_tick, .sum, .count, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    s = 0; n = 0;
    for (int p = 0; p < 60; p++) begin
      int len;
      len = $urandom_range(1, 400);
      for (int k = 0; k < len; k++) begin
        sample = ($urandom_range(0, 2) == 0) || (k == len - 1);
        queue_len = 16'($urandom);
        t_tick = (k == len - 1);
        if (sample) begin s += queue_len; n++; end
        @(negedge clk);
        checks++;
        if (valid !== t_tick) begin failures++; $display("FAIL valid %b at tick %b", valid, t_tick); end
        if (t_tick) begin
          checks++;
          if (sum !== 32'(s) || count !== 32'(n)) begin
            failures++; $display("FAIL period %0d: sum %0d count %0d expected %0d %0d", p, sum, count, s, n);
          end
          s = 0; n = 0;
        end
      end
    end
    sample = 0; t_tick = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
