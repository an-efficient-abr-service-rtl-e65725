// qc_compute: QC computation module with QC corrector.
//
// Every W period (w_tick) it low-pass filters the number of queuing
// connections:
//   QC_temp = QC_previous + QC_corrector
//   QC      = QC_temp * lambda + QC_i * (1 - lambda)
//   QC limited to [0, TC]
// and clears the corrector (the QC_i accumulator clears itself on the same
// tick). The corrector adds up every increase of the total connection count
// TC between ticks, because a new connection is assumed to queue; corr_f (the
// running corrector, as a float) is also given to the ER engine, which uses
// QC + corrector. As in the document, 1 - lambda comes from the inverter and
// shifter of one_minus_lambda, and one floating point adder and one
// multiplier are shared under a small FSM (no divider). Sequence after
// w_tick: add QC_temp and multiply QC_i*(1-lambda); multiply QC_temp*lambda;
// add; limit. done pulses 4 clocks after w_tick with the new qc. The
// corrector is kept as an integer and converted when used (design choice);
// QC starts at 0 after reset.
module qc_compute
  import abr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        w_tick,
  input  fp32_t       qci,
  input  logic [15:0] tc,
  input  fp32_t       lambda,
  output fp32_t       qc,
  output fp32_t       corr_f,
  output logic        done,
  output logic        corrected   // pulse: TC rose and the corrector grew
);
  typedef enum logic [2:0] { S_IDLE, S_S1, S_S2, S_S3, S_S4 } state_t;
  state_t st;

  logic [15:0] tc_prev;
  logic [31:0] corr, corr_s;
  fp32_t qci_s, qct, m2, mul_y_q, sum, oml, corr_sf, tc_f;
  fp32_t add_a, add_b, add_y, mul_a, mul_b, mul_y;
  logic  bad_lambda;

  one_minus_lambda u_oml (.lambda(lambda), .oml(oml), .bad_exp(bad_lambda));
  num_conv u_c1 (.int_in(corr_s), .rate_in(16'h0), .fp_in(FP_ZERO),
                 .int_fp(corr_sf), .rate_fp(), .fp_rate());
  num_conv u_c2 (.int_in({16'h0, tc}), .rate_in(16'h0), .fp_in(FP_ZERO),
                 .int_fp(tc_f), .rate_fp(), .fp_rate());
  num_conv u_c3 (.int_in(corr), .rate_in(16'h0), .fp_in(FP_ZERO),
                 .int_fp(corr_f), .rate_fp(), .fp_rate());
  fp_add u_add (.a(add_a), .b(add_b), .sub(1'b0), .y(add_y));
  fp_mul u_mul (.a(mul_a), .b(mul_b), .y(mul_y));

  always_comb begin
    add_a = qc;   add_b = corr_sf;
    mul_a = qci_s; mul_b = oml;
    unique case (st)
      S_S2: begin mul_a = qct; mul_b = lambda; end
      S_S3: begin add_a = m2;  add_b = mul_y_q; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; qc <= FP_ZERO; done <= 1'b0; corrected <= 1'b0;
      tc_prev <= '0; corr <= '0; corr_s <= '0; qci_s <= FP_ZERO;
      qct <= FP_ZERO; m2 <= FP_ZERO; sum <= FP_ZERO; mul_y_q <= FP_ZERO;
    end else begin
      done      <= 1'b0;
      corrected <= 1'b0;
      tc_prev   <= tc;
      // QC corrector
      if (w_tick) begin
        corr_s <= corr + ((tc > tc_prev) ? 32'(tc - tc_prev) : 32'd0);
        corr   <= '0;
        qci_s  <= qci;
      end else if (tc > tc_prev) begin
        corr <= corr + 32'(tc - tc_prev);
      end
      if (tc > tc_prev) corrected <= 1'b1;
      unique case (st)
        S_IDLE: if (w_tick) st <= S_S1;
        S_S1: begin qct <= add_y; m2 <= mul_y; st <= S_S2; end
        S_S2: begin mul_y_q <= mul_y; st <= S_S3; end
        S_S3: begin sum <= add_y; st <= S_S4; end
        S_S4: begin
          if (sum[31] || bad_lambda)  qc <= FP_ZERO;
          else if (fp_gt_pos(sum, tc_f)) qc <= tc_f;
          else                        qc <= sum;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
