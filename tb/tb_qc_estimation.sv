// tb_qc_estimation: end-to-end check of the QC estimation unit. Each W
// window carries RM cell events from a set of connections at known CCRs (so
// QC_i should count them), some with bad CRC, while the total connection
// count grows. After each W tick QC must match the real-arithmetic model
// QC = (QC_prev + corrector)*lambda + QC_i*(1-lambda), limited to TC, and
// qc_corr must return to zero. After every RM cell the running QC_i, the
// corrector and the accepted/dropped pulse counts are checked as well.
module tb_qc_estimation;
  import abr_pkg::*;
  import tb_pkg::*;
  logic        clk = 0, rst_n = 0, rm_start = 0, rm_end = 0, crc_ok = 0, w_tick = 0;
  rate_t       ccr = 0, mcr = 0;
  fp32_t       delta_er = 32'h4120_0000, nrm_over_w = 32'h4548_0000, lambda = 32'h3F40_0000;
  logic [15:0] tc = 0;
  fp32_t       qc, qc_corr, qci;
  logic        qc_done, accepted, dropped, corrected;
  int checks = 0, failures = 0;

  qc_estimation dut (.clk, .rst_n, .rm_start, .ccr, .mcr, .rm_end, .crc_ok, .delta_er,
                     .nrm_over_w, .lambda, .w_tick, .tc, .qc, .qc_corr, .qci, .qc_done,
                     .accepted, .dropped, .corrected);

  always #5 clk = ~clk;

  int n_acc = 0, n_drop = 0;
  always @(posedge clk) begin
    if (rst_n && accepted) n_acc++;
    if (rst_n && dropped)  n_drop++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m_qc, sum, corr, v, lam;
    int  n_bad = 0, n_acc_m = 0, n_drop_m = 0;
    m_qc = 0.0;
    lam = f2r(lambda);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      int ncells;
      sum = 0.0; corr = 0.0;
      if (w < 4) begin corr = 3.0; tc = tc + 3; end      // connections join
      ncells = $urandom_range(20, 60);
      for (int k = 0; k < ncells; k++) begin
        logic ok;
        ccr = {2'b01, 5'($urandom_range(14, 16)), 9'($urandom)};
        mcr = 16'h0;
        ok = ($urandom_range(0, 7) != 0);
        if (!ok) n_bad++;
        if (ok) n_acc_m++; else n_drop_m++;
        @(negedge clk); rm_start = 1;
        @(negedge clk); rm_start = 0;
        repeat (39) @(negedge clk);
        rm_end = 1; crc_ok = ok;
        @(negedge clk); rm_end = 0;
        repeat (12) @(negedge clk);
        if (ok) sum += f2r(nrm_over_w) / rate2r(ccr);
        // per cell: the running QC_i and the corrector seen by the ER engine
        checks++;
        if (abs_r(f2r(qci) - sum) > 1e-4 * sum + 1e-6) begin
          failures++; $display("FAIL W %0d cell %0d: QC_i %g expected %g", w, k, f2r(qci), sum);
        end
        checks++;
        if (f2r(qc_corr) != corr) begin
          failures++; $display("FAIL W %0d: corrector %g expected %g", w, f2r(qc_corr), corr);
        end
        checks++;
        if (n_acc != n_acc_m || n_drop != n_drop_m) begin
          failures++; $display("FAIL accepted/dropped %0d/%0d expected %0d/%0d", n_acc, n_drop, n_acc_m, n_drop_m);
        end
      end
      @(negedge clk); w_tick = 1;
      @(negedge clk); w_tick = 0;
      while (!qc_done) @(negedge clk);
      v = (m_qc + corr) * lam + sum * (1.0 - lam);
      if (v > real'(tc)) v = real'(tc);
      checks++;
      if (abs_r(f2r(qc) - v) > 1e-4 * v + 1e-6) begin
        failures++; $display("FAIL W %0d: QC %g expected %g", w, f2r(qc), v);
      end
      checks++;
      if (qc_corr !== 32'h0) begin failures++; $display("FAIL corrector not cleared"); end
      m_qc = f2r(qc);
    end
    checks++;
    if (n_bad == 0) begin failures++; $display("FAIL no bad CRC exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
