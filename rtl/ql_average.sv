// ql_average: queue length average unit.
//
// Once per cell time (sample) the current queue length is added to a 32-bit
// sum and a sample counter is incremented. On t_tick (every T period) the sum
// and count, including a sample taken in the same cycle, are copied to the
// outputs, valid pulses for one clock, and accumulation restarts from zero.
// The ER engine divides sum by count to get QL_ave, as the document's
// algorithm does ("sum of queue lengths / queue count"). The document only
// names this unit; sampling once per cell time and the widths are this
// design's choice. Both sums saturate instead of wrapping.
module ql_average (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample,
  input  logic [15:0] queue_len,
  input  logic        t_tick,
  output logic [31:0] sum,
  output logic [31:0] count,
  output logic        valid
);
  logic [31:0] acc, cnt, acc_n, cnt_n;

  always_comb begin
    acc_n = acc;
    cnt_n = cnt;
    if (sample) begin
      acc_n = (acc > 32'hFFFF_FFFF - 32'(queue_len)) ? 32'hFFFF_FFFF : acc + 32'(queue_len);
      cnt_n = (cnt == 32'hFFFF_FFFF) ? cnt : cnt + 32'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; cnt <= '0; sum <= '0; count <= '0; valid <= 1'b0;
    end else begin
      valid <= t_tick;
      if (t_tick) begin
        sum   <= acc_n;
        count <= cnt_n;
        acc   <= '0;
        cnt   <= '0;
      end else begin
        acc <= acc_n;
        cnt <= cnt_n;
      end
    end
  end
endmodule
