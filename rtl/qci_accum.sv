// qci_accum: QC_i accumulation (condition comparison and accumulator).
//
// Each forward RM cell from a source contributes (N_RM/W) / CCR to QC_i, so a
// connection that sends W*CCR/N_RM RM cells in a window W adds about 1: QC_i
// counts the connections that can queue at this port. A contribution is kept
// only if the cell's CRC is good and CCR - MCR > delta*ER (16-bit rate-format
// subtractor and comparator; delta*ER is converted from floating point).
// Timing, as in the document's pipeline: rm_start (CCR/MCR read, mid-cell)
// launches the floating point division at once and latches the condition;
// the quotient waits in a pipeline register until rm_end brings the CRC
// verdict, then the floating point adder adds it to the accumulator (or it is
// dropped). Division (26 clocks) and addition each fit in one cell time, so
// back-to-back RM cells are accepted. w_tick clears the accumulator; a sum
// completing in the same cycle starts the new window. qci always shows the
// running sum.
module qci_accum
  import abr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rm_start,
  input  rate_t ccr,
  input  rate_t mcr,
  input  logic  rm_end,
  input  logic  crc_ok,
  input  fp32_t delta_er,
  input  fp32_t nrm_over_w,
  input  logic  w_tick,
  output fp32_t qci,
  output logic  accepted,   // pulse: a contribution was added
  output logic  dropped     // pulse: a contribution was discarded
);
  rate_t diff, der_rate;
  logic  der_gt_diff;
  fp32_t ccr_f, div_q, qreg, sum;
  logic  div_busy, div_done, cond, q_ready, verdict, v_ok;

  num_conv u_conv (.int_in(32'd0), .rate_in(ccr), .fp_in(delta_er),
                   .int_fp(), .rate_fp(ccr_f), .fp_rate(der_rate));
  rate_alu u_cmp (.a(ccr), .b(mcr), .sub(1'b1), .c(der_rate),
                  .res(diff), .c_gt_res(der_gt_diff));
  fp_div u_div (.clk, .rst_n, .start(rm_start), .a(nrm_over_w), .b(ccr_f),
                .busy(div_busy), .done(div_done), .q(div_q));
  fp_add u_add (.a(qci), .b(qreg), .sub(1'b0), .y(sum));

  // CCR - MCR > delta*ER  <=>  diff > der_rate
  logic cond_now;
  assign cond_now = rate_gt(diff, der_rate);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qci <= FP_ZERO; qreg <= FP_ZERO; cond <= 1'b0; q_ready <= 1'b0;
      verdict <= 1'b0; v_ok <= 1'b0; accepted <= 1'b0; dropped <= 1'b0;
    end else begin
      accepted <= 1'b0;
      dropped  <= 1'b0;
      if (rm_start) cond <= cond_now;
      if (div_done) begin qreg <= div_q; q_ready <= 1'b1; end
      if (rm_end)   begin verdict <= 1'b1; v_ok <= crc_ok; end
      if (q_ready && verdict) begin
        q_ready <= 1'b0;
        verdict <= 1'b0;
        if (v_ok && cond) begin
          qci      <= w_tick ? qreg : sum;
          accepted <= 1'b1;
        end else begin
          if (w_tick) qci <= FP_ZERO;
          dropped <= 1'b1;
        end
      end else if (w_tick) begin
        qci <= FP_ZERO;
      end
    end
  end

  // a new RM cell never arrives while the previous division is running
  assert property (@(posedge clk) disable iff (!rst_n) rm_start |-> !div_busy);
  logic unused;
  assign unused = der_gt_diff;
endmodule
