// tb_qc_compute: drives W ticks with random QC_i values while the total
// connection count TC rises and falls between ticks, and compares QC with a
// real-arithmetic model: QC = (QC_prev + corrector)*lambda + QC_i*(1-lambda),
// limited to [0, TC], where the corrector is the sum of the increases of TC
// since the last tick. Also checks that corr_f shows the running corrector,
// that done comes 4 clocks after the tick, and that both the TC limit and
// the correction were exercised.
module tb_qc_compute;
  import abr_pkg::*;
  import tb_pkg::*;
  logic        clk = 0, rst_n = 0, w_tick = 0;
  fp32_t       qci = 0, lambda = 32'h3F40_0000, qc, corr_f;
  logic [15:0] tc = 0;
  logic        done, corrected;
  int checks = 0, failures = 0;

  qc_compute dut (.clk, .rst_n, .w_tick, .qci, .tc, .lambda, .qc, .corr_f, .done, .corrected);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m_qc, lam, corr, v;
    int  lat, n_lim = 0, n_corr = 0;
    m_qc = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      if (w % 50 == 0) lambda = {9'b0_0111_1110, 23'($urandom)};
      lam = f2r(lambda);
      corr = 0.0;
      for (int k = 0; k < 10; k++) begin
        logic [15:0] ntc;
        ntc = (w % 7 == 3) ? tc + 16'($urandom_range(0, 5)) : 16'($urandom_range(0, 60));
        if (w % 7 == 3 || w == 0) ntc = tc + 16'($urandom_range(1, 5));
        if (ntc > tc) corr += real'(ntc - tc);
        tc = ntc;
        repeat ($urandom_range(1, 4)) @(negedge clk);
        checks++;
        if (f2r(corr_f) != corr) begin failures++; $display("FAIL corrector %g expected %g", f2r(corr_f), corr); end
      end
      if (corr > 0.0) n_corr++;
      qci = r2f(real'($urandom_range(0, 6000)) / 100.0);
      @(negedge clk); w_tick = 1;
      @(negedge clk); w_tick = 0;
      lat = 0;   // clock edges after the one that samples w_tick
      while (!done) begin @(negedge clk); lat++; end
      v = (m_qc + corr) * lam + f2r(qci) * (1.0 - lam);
      if (v > real'(tc)) begin v = real'(tc); n_lim++; end
      checks++;
      if (abs_r(f2r(qc) - v) > 1e-5 * v + 1e-6) begin
        failures++; $display("FAIL W %0d: QC %g expected %g", w, f2r(qc), v);
      end
      checks++;
      if (lat != 4) begin failures++; $display("FAIL QC latency %0d", lat); end
      m_qc = f2r(qc);
    end
    checks++;
    if (n_lim == 0 || n_corr == 0) begin failures++; $display("FAIL coverage lim %0d corr %0d", n_lim, n_corr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
