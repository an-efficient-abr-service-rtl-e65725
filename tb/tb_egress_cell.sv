// tb_egress_cell: sends a mix of cells through the egress decoder/encoder:
// data cells with and without congestion, forward RM cells from a source
// with good and bad CRC, backward RM cells and BECN (BN = 1) cells. Checks
// that rm_start fires only for forward source RM cells with the right CCR
// and MCR, that rm_end reports the CRC verdict, that data cells leave with
// EFCI set exactly when congestion was high, and that every other byte is
// forwarded unchanged.
module tb_egress_cell;
  import tb_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       rx_valid = 0, rx_soc = 0, tx_ready = 0, congestion = 0;
  logic [7:0] rx_data = 0;
  logic       rx_ready, tx_valid, tx_soc, rm_start, rm_end, crc_ok, efci_marked;
  logic [7:0] tx_data;
  logic [15:0] ccr, mcr;
  int checks = 0, failures = 0;

  egress_cell dut (.clk, .rst_n, .rx_valid, .rx_soc, .rx_data, .rx_ready, .tx_ready,
                   .tx_valid, .tx_soc, .tx_data, .congestion, .rm_start, .ccr, .mcr,
                   .rm_end, .crc_ok, .efci_marked);

  always #5 clk = ~clk;

  localparam int N = 80;
  cell_t in_c [N], exp_c [N];
  int    kind [N];          // 0 data, 1 fwd RM good, 2 fwd RM bad CRC, 3 bwd RM, 4 BECN
  logic  cong [N];
  logic [15:0] e_ccr [N], e_mcr [N];
  int starts_seen = 0, ends_seen = 0, marks_seen = 0, exp_starts = 0, exp_marks = 0;
  int start_ptr = 0, end_ptr = 0;
  int rm_list [$];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      logic [7:0] msg;
      kind[c] = $urandom_range(0, 4);
      cong[c] = 1'($urandom);
      e_ccr[c] = {2'b01, 5'($urandom_range(8, 20)), 9'($urandom)};
      e_mcr[c] = {2'b01, 5'($urandom_range(0, 8)), 9'($urandom)};
      msg = 8'h00;
      if (kind[c] == 3) msg[7] = 1'b1;
      if (kind[c] == 4) msg[6] = 1'b1;
      in_c[c] = make_cell(kind[c] == 0 ? 3'(2 * $urandom_range(0, 1)) : 3'b110, msg,
                          16'h7FFF, e_ccr[c], e_mcr[c], kind[c] == 2, c);
      exp_c[c] = in_c[c];
      if (kind[c] == 0 && cong[c]) begin exp_c[c][3][2] = 1'b1; exp_marks++; end
      if (kind[c] == 1 || kind[c] == 2) begin exp_starts++; rm_list.push_back(c); end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) begin
      congestion = cong[c];
      for (int i = 0; i < 53; i++) begin
        rx_valid = 1; rx_soc = (i == 0); rx_data = in_c[c][i];
        @(posedge clk);
        while (!rx_ready) @(posedge clk);
        @(negedge clk);
        if ($urandom_range(0, 15) == 0) begin rx_valid = 0; @(negedge clk); end
      end
    end
    rx_valid = 0;
  end

  // RM event monitor
  always @(posedge clk) if (rst_n) begin
    if (rm_start) begin
      int c;
      starts_seen++;
      checks++;
      c = (start_ptr < rm_list.size()) ? rm_list[start_ptr] : 0;
      if (start_ptr >= rm_list.size() || ccr !== e_ccr[c] || mcr !== e_mcr[c]) begin
        failures++; $display("FAIL rm_start %0d: ccr %h mcr %h", start_ptr, ccr, mcr);
      end
      start_ptr++;
    end
    if (rm_end) begin
      int c;
      ends_seen++;
      checks++;
      c = (end_ptr < rm_list.size()) ? rm_list[end_ptr] : 0;
      if (end_ptr >= rm_list.size() || crc_ok !== (kind[c] == 1)) begin
        failures++; $display("FAIL rm_end %0d: crc_ok %b", end_ptr, crc_ok);
      end
      end_ptr++;
    end
    if (efci_marked) marks_seen++;
  end

  // receiver
  initial begin
    int c, i;
    c = 0; i = 0;
    @(posedge rst_n);
    while (c < N) begin
      @(negedge clk);
      tx_ready = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        checks++;
        if (tx_data !== exp_c[c][i] || tx_soc !== (i == 0)) begin
          failures++;
          $display("FAIL cell %0d (kind %0d) byte %0d: %h expected %h", c, kind[c], i, tx_data, exp_c[c][i]);
        end
        i++;
        if (i == 53) begin i = 0; c++; end
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (starts_seen != exp_starts || ends_seen != exp_starts || marks_seen != exp_marks) begin
      failures++;
      $display("FAIL counts: starts %0d ends %0d (expected %0d), marks %0d (expected %0d)",
               starts_seen, ends_seen, exp_starts, marks_seen, exp_marks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
