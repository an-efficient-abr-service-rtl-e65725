// tb_er_engine: runs many T periods through the ER engine with random
// queue-length sums, counts, QC and QC corrector values and compares each
// result with a real-arithmetic model of the ER algorithm: QL_ave = sum/count,
// start-phase and A/B selection by the QL threshold, QC_temp floored at 1,
// ER = ER_pre - A/QC_temp*(QL_ave - QL_pre) - B/QC_temp*(QL_ave - q_T),
// limited to [0, link speed]; then delta*ER and the rate-format ER. ER_pre is
// taken from the engine's previous output so rounding cannot accumulate. The
// computation time must be about three divider latencies (78..92 clocks),
// and both limits and the end of the start phase must have been exercised.
module tb_er_engine;
  import abr_pkg::*;
  import tb_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [31:0] ql_sum = 0, ql_count = 0;
  fp32_t       qc = 0, qc_corr = 0, er, delta_er, ql_ave;
  rate_t       er_rate;
  logic        busy, done, start_phase;
  abr_params_t prm;
  int checks = 0, failures = 0;

  er_engine dut (.clk, .rst_n, .start, .ql_sum, .ql_count, .qc, .qc_corr, .prm,
                 .busy, .done, .er, .er_rate, .delta_er, .ql_ave, .start_phase);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m_a, m_b, m_erpre, m_qlpre, ql, qct, erv, lim, a0, b0, a1, b1, th, qt, dl;
    bit  m_start;
    int  lat, n_hi = 0, n_lo = 0, n_phase_end = 0;
    prm = '0;
    prm.a0 = 32'h44FA_0000; prm.b0 = 32'h4348_0000;   // 2000, 200
    prm.a1 = 32'h43FA_0000; prm.b1 = 32'h4248_0000;   // 500, 50
    prm.ql_th = 32'h4248_0000; prm.q_target = 32'h42C8_0000;  // 50, 100
    prm.link_speed = 32'h469C_4000;   // 20000, low so that the upper limit is reached prm.delta = 32'h3F66_6666;
    a0 = f2r(prm.a0); b0 = f2r(prm.b0); a1 = f2r(prm.a1); b1 = f2r(prm.b1);
    th = f2r(prm.ql_th); qt = f2r(prm.q_target); lim = f2r(prm.link_speed); dl = f2r(prm.delta);
    m_a = 0.0; m_b = 0.0; m_erpre = 0.0; m_qlpre = 0.0; m_start = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      ql_count = 32'($urandom_range(0, 400));
      if (p < 6) ql_sum = ql_count * 32'($urandom_range(0, 45));          // stay below threshold first
      else       ql_sum = ql_count * 32'($urandom_range(0, 300)) + 32'($urandom_range(0, 99));
      if (p % 17 == 5) begin ql_count = 300; ql_sum = 0; end                // sharp drop
      qc      = r2f(real'($urandom_range(0, 40)) + real'($urandom_range(0, 99)) / 100.0);
      qc_corr = r2f(real'($urandom_range(0, 3)));
      if (p % 11 == 0) qc = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      // model
      ql  = real'(ql_sum) / real'(ql_count == 0 ? 1 : ql_count);
      if (ql >= th) begin if (m_start) n_phase_end++; m_start = 0; end
      else begin m_a = (m_start ? a0 : a1); m_b = (m_start ? b0 : b1); end
      if (p < 6 && ql >= th) m_start = 0;
      qct = f2r(qc) + f2r(qc_corr);
      if (qct < 1.0) qct = 1.0;
      erv = m_erpre - m_a / qct * (ql - m_qlpre) - m_b / qct * (ql - qt);
      if (erv > lim) begin erv = lim; n_hi++; end
      if (erv < 0.0) begin erv = 0.0; n_lo++; end
      checks++;
      if (abs_r(f2r(ql_ave) - ql) > ql * pow2(-21)) begin
        failures++; $display("FAIL period %0d QL_ave %g expected %g", p, f2r(ql_ave), ql);
      end
      checks++;
      if (abs_r(f2r(er) - erv) > 1e-4 * (abs_r(erv) + abs_r(m_erpre)) + 1e-3) begin
        failures++; $display("FAIL period %0d ER %g expected %g", p, f2r(er), erv);
      end
      checks++;
      if (abs_r(f2r(delta_er) - dl * f2r(er)) > f2r(er) * pow2(-20) || er_rate !== r2rate(f2r(er))) begin
        failures++; $display("FAIL period %0d delta*ER %g / rate %h", p, f2r(delta_er), er_rate);
      end
      checks++;
      if (start_phase !== m_start) begin failures++; $display("FAIL period %0d start phase %b", p, start_phase); end
      checks++;
      if (lat < 78 || lat > 92) begin failures++; $display("FAIL latency %0d", lat); end
      m_erpre = f2r(er);
      m_qlpre = f2r(ql_ave);
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_phase_end != 1) begin
      failures++; $display("FAIL coverage: upper limit %0d lower limit %0d phase end %0d", n_hi, n_lo, n_phase_end);
    end
    $display("ER engine: latency %0d clocks, limits hit %0d/%0d", lat, n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
