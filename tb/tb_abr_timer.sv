// tb_abr_timer: runs the timer with a few T and W periods and checks that
// cell_tick comes every 53 clocks, t_tick every t_period cell ticks and
// w_tick every w_period cell ticks, each coinciding with a cell tick.
module tb_abr_timer;
  logic        clk = 0, rst_n = 0;
  logic [15:0] t_period = 5, w_period = 12;
  logic        cell_tick, t_tick, w_tick;
  int checks = 0, failures = 0;

  abr_timer dut (.clk, .rst_n, .t_period, .w_period, .cell_tick, .t_tick, .w_tick);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_cell, cyc, cells_t, cells_w, nt, nw;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 3; cfg++) begin
      t_period = 16'(3 + 4 * cfg); w_period = 16'(10 + 7 * cfg);
      // resynchronise: wait for a W tick under the new periods after a reset
      rst_n = 0; @(negedge clk); rst_n = 1;
      last_cell = -1; cyc = 0; cells_t = 0; cells_w = 0; nt = 0; nw = 0;
      while (nw < 4) begin
        @(negedge clk);
        cyc++;
        if (cell_tick) begin
          checks++;
          if (last_cell >= 0 && cyc - last_cell != 53) begin
            failures++; $display("FAIL cell tick spacing %0d", cyc - last_cell);
          end
          last_cell = cyc;
          cells_t++; cells_w++;
        end
        if ((t_tick || w_tick) && !cell_tick) begin failures++; $display("FAIL tick without cell tick"); end
        if (t_tick) begin
          checks++; nt++;
          if (cells_t != int'(t_period)) begin failures++; $display("FAIL T after %0d cells", cells_t); end
          cells_t = 0;
        end
        if (w_tick) begin
          checks++; nw++;
          if (cells_w != int'(w_period)) begin failures++; $display("FAIL W after %0d cells", cells_w); end
          cells_w = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
