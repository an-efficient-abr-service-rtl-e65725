// tb_abr_regfile: checks the reset values of the parameter registers, that
// every writable register takes a write and reads it back (16-bit ones keep
// only the low half), that the read-only status words show the inputs and
// that the parameter record presents the written values.
module tb_abr_regfile;
  import abr_pkg::*;
  logic        clk = 0, rst_n = 0, bus_we = 0;
  logic [4:0]  bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  fp32_t       er = 32'h4700_0000, qc = 32'h4120_0000;
  rate_t       er_rate = 16'h5E00;
  abr_params_t prm;
  int checks = 0, failures = 0;

  abr_regfile dut (.clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
                   .er, .er_rate, .qc, .prm);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rst_vals [15] = '{32'h44FA_0000, 32'h4348_0000, 32'h43FA_0000, 32'h4248_0000,
                                 32'h4248_0000, 32'h42C8_0000, 32'h48AC_76E0, 32'h3F66_6666,
                                 32'h3F40_0000, 32'h4548_0000, 32'd200, 32'd150, 32'd300,
                                 32'd353, 32'd3532};

  initial begin
    logic [31:0] w [15];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 15; a++) begin
      bus_addr = 5'(a); #1;
      checks++;
      if (bus_rdata !== rst_vals[a]) begin failures++; $display("FAIL reset value %0d = %h", a, bus_rdata); end
    end
    for (int a = 0; a < 15; a++) begin
      w[a] = $urandom;
      @(negedge clk); bus_we = 1; bus_addr = 5'(a); bus_wdata = w[a];
      @(negedge clk); bus_we = 0;
      if (a >= 10) w[a] = {16'h0, w[a][15:0]};
    end
    for (int a = 0; a < 15; a++) begin
      bus_addr = 5'(a); #1;
      checks++;
      if (bus_rdata !== w[a]) begin failures++; $display("FAIL reg %0d = %h expected %h", a, bus_rdata, w[a]); end
    end
    checks++;
    if (prm.a0 !== w[0] || prm.lambda !== w[8] || prm.w_period !== w[14][15:0] || prm.q_ci !== w[12][15:0]) begin
      failures++; $display("FAIL parameter record");
    end
    bus_addr = 16; #1; checks++; if (bus_rdata !== er) begin failures++; $display("FAIL ER status"); end
    bus_addr = 17; #1; checks++; if (bus_rdata !== qc) begin failures++; $display("FAIL QC status"); end
    bus_addr = 18; #1; checks++; if (bus_rdata !== {16'h0, er_rate}) begin failures++; $display("FAIL ER rate status"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
