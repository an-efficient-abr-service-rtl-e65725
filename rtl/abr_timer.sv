// abr_timer: timer that paces the periodic computations.
//
// A prescaler divides the clock by CELL_CLOCKS (53: one cell on an 8-bit
// UTOPIA bus) into cell_tick, the unit time of the engine. Two counters of
// cell ticks raise t_tick every t_period cells (starts an ER computation)
// and w_tick every w_period cells (QC estimation window). Each tick is one
// clock wide and coincides with a cell_tick. A period of 0 is treated as 1.
// The document states that a timer periodically enables the ER engine (T)
// and the QC estimation unit (W) and that T is a multiple of the cell time;
// the counter structure is this design's.
module abr_timer #(
  parameter int CELL_CLOCKS = 53
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] t_period,
  input  logic [15:0] w_period,
  output logic        cell_tick,
  output logic        t_tick,
  output logic        w_tick
);
  logic [$clog2(CELL_CLOCKS)-1:0] pre;
  logic [15:0] tc, wc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; tc <= '0; wc <= '0;
      cell_tick <= 1'b0; t_tick <= 1'b0; w_tick <= 1'b0;
    end else begin
      cell_tick <= 1'b0; t_tick <= 1'b0; w_tick <= 1'b0;
      if (pre == ($clog2(CELL_CLOCKS))'(CELL_CLOCKS - 1)) begin
        pre       <= '0;
        cell_tick <= 1'b1;
        if (tc + 16'd1 >= t_period) begin tc <= '0; t_tick <= 1'b1; end
        else tc <= tc + 16'd1;
        if (wc + 16'd1 >= w_period) begin wc <= '0; w_tick <= 1'b1; end
        else wc <= wc + 16'd1;
      end else begin
        pre <= pre + 1'b1;
      end
    end
  end
endmodule
