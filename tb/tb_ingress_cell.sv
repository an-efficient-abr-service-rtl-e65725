// tb_ingress_cell: sends a mix of cells through the ingress decoder/encoder:
// backward RM cells from a source with good and bad CRC, forward RM cells,
// backward BECN cells and data cells, with the engine's ER and the NI/CI
// conditions changing from cell to cell. For a good backward RM cell the
// expected output has ER replaced by ER(engine) + MCR when the cell's ER is
// larger, NI/CI set as requested and a CRC-10 recomputed by the testbench's
// own long division; every other cell must leave unchanged.
module tb_ingress_cell;
  import tb_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       rx_valid = 0, rx_soc = 0, tx_ready = 0, ni = 0, ci = 0;
  logic [7:0] rx_data = 0;
  logic [15:0] er_engine = 0;
  logic       rx_ready, tx_valid, tx_soc, rm_seen, rm_crc_ok, er_written;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  ingress_cell dut (.clk, .rst_n, .rx_valid, .rx_soc, .rx_data, .rx_ready, .tx_ready,
                    .tx_valid, .tx_soc, .tx_data, .er_engine, .ni, .ci,
                    .rm_seen, .rm_crc_ok, .er_written);

  always #5 clk = ~clk;

  localparam int N = 80;
  cell_t in_c [N], exp_c [N];
  int    kind [N];
  logic [15:0] eng [N];
  logic  c_ni [N], c_ci [N];
  int seen = 0, exp_seen = 0, written = 0, exp_written = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      logic [7:0]  msg;
      logic [15:0] er_c, mcr_c, sum;
      logic [7:0]  p [48];
      logic [9:0]  crc;
      kind[c] = (c < 4) ? 1 : $urandom_range(0, 4);
      c_ni[c] = 1'($urandom); c_ci[c] = 1'($urandom);
      eng[c]  = {2'b01, 5'($urandom_range(10, 16)), 9'($urandom)};
      er_c    = {2'b01, 5'($urandom_range(8, 18)), 9'($urandom)};
      mcr_c   = {2'b01, 5'($urandom_range(0, 10)), 9'($urandom)};
      msg = 8'h80;
      if (kind[c] == 3) msg[7] = 1'b0;
      if (kind[c] == 4) msg[6] = 1'b1;
      in_c[c] = make_cell(kind[c] == 0 ? 3'b000 : 3'b110, msg, er_c, 16'h5000, mcr_c,
                          kind[c] == 2, c + 1000);
      exp_c[c] = in_c[c];
      if (kind[c] == 1 || kind[c] == 2 || kind[c] == 4) exp_seen += (kind[c] != 4);
      if (kind[c] == 1) begin
        sum = r2rate(rate2r(eng[c]) + rate2r(mcr_c));
        exp_c[c][6] = msg | {2'b00, c_ci[c], c_ni[c], 4'b0};
        if (rate2r(er_c) > rate2r(sum)) begin
          exp_c[c][7] = sum[15:8]; exp_c[c][8] = sum[7:0]; exp_written++;
        end
        for (int i = 0; i < 48; i++) p[i] = exp_c[c][5 + i];
        crc = crc10_ref(p);
        exp_c[c][51] = {exp_c[c][51][7:2], crc[9:8]};
        exp_c[c][52] = crc[7:0];
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) begin
      er_engine = eng[c]; ni = c_ni[c]; ci = c_ci[c];
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

  always @(posedge clk) if (rst_n) begin
    if (rm_seen) seen++;
    if (er_written) written++;
  end

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
        if (i == 53) begin
          if (kind[c] == 1) begin
            checks++;
            if (!crc_good(exp_c[c])) begin failures++; $display("FAIL reference CRC"); end
          end
          i = 0; c++;
        end
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (seen != exp_seen || written != exp_written || exp_written == 0) begin
      failures++;
      $display("FAIL counts: seen %0d (expected %0d), written %0d (expected %0d)",
               seen, exp_seen, written, exp_written);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
