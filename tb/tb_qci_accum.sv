// tb_qci_accum: feeds forward RM cell events at the cell rate of the egress
// decoder (rm_start after the MCR byte, rm_end 40 clocks later with the CRC
// verdict, a new cell every 53 clocks) and compares the accumulated QC_i with
// a real-arithmetic sum of N_RM/W / CCR over the cells whose CRC is good and
// whose CCR - MCR (rate format) exceeds delta*ER. Checks that each result is
// added or dropped within one cell time, and that W ticks clear the sum.
module tb_qci_accum;
  import abr_pkg::*;
  import tb_pkg::*;
  logic  clk = 0, rst_n = 0, rm_start = 0, rm_end = 0, crc_ok = 0, w_tick = 0;
  rate_t ccr = 0, mcr = 0;
  fp32_t delta_er = 0, nrm_over_w = 0, qci;
  logic  accepted, dropped;
  int checks = 0, failures = 0;

  qci_accum dut (.clk, .rst_n, .rm_start, .ccr, .mcr, .rm_end, .crc_ok, .delta_er,
                 .nrm_over_w, .w_tick, .qci, .accepted, .dropped);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_acc = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (accepted) n_acc++;
    if (dropped) n_drop++;
  end

  initial begin
    real sum, ref_diff, ref_der;
    bit  cond, ok;
    int  exp_acc = 0, exp_drop = 0, acc0, drop0;
    nrm_over_w = 32'h4548_0000;     // 3200
    repeat (3) @(negedge clk);
    rst_n = 1;
    sum = 0.0;
    for (int w = 0; w < 20; w++) begin
      delta_er = r2f(real'($urandom_range(100, 20000)));
      for (int k = 0; k < 30; k++) begin
        ccr = {2'b01, 5'($urandom_range(6, 16)), 9'($urandom)};
        mcr = {2'b01, 5'($urandom_range(0, 12)), 9'($urandom)};
        ok  = ($urandom_range(0, 5) != 0);
        ref_diff = rate2r(r2rate(rate2r(ccr) - rate2r(mcr)));
        ref_der  = rate2r(r2rate(f2r(delta_er)));
        cond = ref_diff > ref_der;
        acc0 = n_acc; drop0 = n_drop;
        @(negedge clk); rm_start = 1;
        @(negedge clk); rm_start = 0;
        repeat (39) @(negedge clk);
        rm_end = 1; crc_ok = ok;
        @(negedge clk); rm_end = 0;
        repeat (12) @(negedge clk);
        if (ok && cond) begin sum += f2r(nrm_over_w) / rate2r(ccr); exp_acc++; end
        else exp_drop++;
        checks++;
        if (n_acc - acc0 + n_drop - drop0 != 1 || (n_acc - acc0 == 1) != (ok && cond)) begin
          failures++; $display("FAIL cell %0d/%0d: decision not made within a cell time", w, k);
        end
        checks++;
        if (abs_r(f2r(qci) - sum) > sum * 1e-5 + 1e-9) begin
          failures++; $display("FAIL QC_i %g expected %g", f2r(qci), sum);
        end
      end
      w_tick = 1;
      @(negedge clk); w_tick = 0;
      sum = 0.0;
      checks++;
      if (qci !== 32'h0) begin failures++; $display("FAIL QC_i not cleared by W tick"); end
    end
    checks++;
    if (exp_acc == 0 || exp_drop == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
