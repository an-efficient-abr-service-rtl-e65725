// tb_cell_buffer: sends random 53-byte cells with random idle gaps into the
// two-cell buffer while the receiver stalls at random, and checks that every
// cell comes out intact and in order with out_soc on its first byte, that
// the write/read byte indices match the byte positions, and that in_ready
// drops when both halves are full (back-pressure is seen at least once).
module tb_cell_buffer;
  import tb_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_soc = 0, out_ready = 0;
  logic [7:0] in_data = 0;
  logic       in_ready, wr_en, wr_bank, wr_last, out_valid, out_soc, rd_bank, rd_fire;
  logic [5:0] wr_idx, rd_idx;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int stalls_seen = 0;

  cell_buffer dut (.clk, .rst_n, .in_valid, .in_soc, .in_data, .in_ready, .wr_en, .wr_idx,
                   .wr_bank, .wr_last, .out_ready, .out_valid, .out_soc, .out_data,
                   .rd_idx, .rd_bank, .rd_fire);

  always #5 clk = ~clk;

  localparam int NCELLS = 60;
  logic [7:0] sent [NCELLS][53];
  bit         free_run = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender
  initial begin
    for (int c = 0; c < NCELLS; c++)
      for (int i = 0; i < 53; i++) sent[c][i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCELLS; c++) begin
      for (int i = 0; i < 53; i++) begin
        in_valid = 1; in_soc = (i == 0); in_data = sent[c][i];
        @(posedge clk);
        while (!in_ready) begin stalls_seen++; @(posedge clk); end
        checks++;
        if (wr_idx != 6'(i)) begin failures++; $display("FAIL wr_idx %0d at byte %0d", wr_idx, i); end
        @(negedge clk);
        if (!free_run && $urandom_range(0, 9) == 0) begin in_valid = 0; @(negedge clk); end
      end
    end
    in_valid = 0;
  end

  // receiver
  initial begin
    int c, i, run_start, run_len;
    c = 0; i = 0;
    @(posedge rst_n);
    while (c < NCELLS) begin
      @(negedge clk);
      free_run = (c >= NCELLS - 4);
      out_ready = free_run ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (c < 20) out_ready = out_ready && ($urandom_range(0, 2) == 0);  // slow receiver first
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== sent[c][i] || out_soc !== (i == 0) || rd_idx != 6'(i)) begin
          failures++;
          $display("FAIL cell %0d byte %0d: %h soc %b expected %h", c, i, out_data, out_soc, sent[c][i]);
        end
        i++;
        if (i == 53) begin i = 0; c++; end
      end
    end
    checks++;
    if (stalls_seen == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
