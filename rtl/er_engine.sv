// er_engine: periodic Explicit Rate (ER) computation.
//
// Every T period (start pulse) the engine evaluates
//   QL_ave  = ql_sum / ql_count
//   if QL_ave < ql_th: (A,B) = start phase ? (A0,B0) : (A1,B1)
//   QC_temp = QC + QC_corrector                    (floored at 1.0)
//   ER = ER_pre - A/QC_temp*(QL_ave - QL_ave_pre) - B/QC_temp*(QL_ave - q_T)
//   ER limited to [0, link_speed]
// and then delta*ER for the QC estimation unit and the rate-format ER for
// the ingress RM writer. As in the document's architecture, there is one
// floating point adder, one multiplier and one divider; operand multiplexers
// in front of them and result registers behind them are steered by an FSM.
// Additions and multiplications are scheduled under the three divisions, so
// a computation takes about three divider latencies (89 clocks from start),
// after which done pulses and er / er_rate / delta_er update together.
// The start phase lasts from reset until QL_ave first reaches ql_th; A and B
// keep their previous values while QL_ave >= ql_th, as in the document's
// pseudo-code. Design choices: a count of 0 is taken as 1, QC_temp is floored
// at one connection to keep the divisions bounded, ER and QL_ave_pre start
// at 0, and a start while busy is ignored.
module er_engine
  import abr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] ql_sum,
  input  logic [31:0] ql_count,
  input  fp32_t       qc,
  input  fp32_t       qc_corr,
  input  abr_params_t prm,
  output logic        busy,
  output logic        done,
  output fp32_t       er,
  output rate_t       er_rate,
  output fp32_t       delta_er,
  output fp32_t       ql_ave,
  output logic        start_phase
);
  typedef enum logic [3:0] {
    S_IDLE, S_L1, S_W1, S_L2, S_W2, S_L3, S_W3, S_M2, S_A2, S_LIM, S_OUT
  } state_t;
  state_t st;

  logic [31:0] sum_r, cnt_r;
  fp32_t ql_pre, p2, qc_r, corr_r, qct, coef_a, coef_b, d1, d2, t1, p1, e1, e2, er_new;
  fp32_t add_a, add_b, add_y, mul_a, mul_b, mul_y, div_a, div_b, div_q;
  logic  add_sub, div_start, div_busy, div_done;
  fp32_t sum_f, cnt_f;
  rate_t er_new_rate;

  num_conv u_cs (.int_in(sum_r), .rate_in(16'h0), .fp_in(FP_ZERO),
                 .int_fp(sum_f), .rate_fp(), .fp_rate());
  num_conv u_cc (.int_in((cnt_r == 0) ? 32'd1 : cnt_r), .rate_in(16'h0), .fp_in(er_new),
                 .int_fp(cnt_f), .rate_fp(), .fp_rate(er_new_rate));

  fp_add u_add (.a(add_a), .b(add_b), .sub(add_sub), .y(add_y));
  fp_mul u_mul (.a(mul_a), .b(mul_b), .y(mul_y));
  fp_div u_div (.clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
                .busy(div_busy), .done(div_done), .q(div_q));

  // operand multiplexers
  always_comb begin
    add_a = qc_r;   add_b = corr_r; add_sub = 1'b0;
    mul_a = t1;     mul_b = d1;
    div_a = sum_f;  div_b = cnt_f;  div_start = 1'b0;
    unique case (st)
      S_L1, S_W1: begin add_a = qc_r; add_b = corr_r; add_sub = 1'b0;
                        div_start = (st == S_L1); end
      S_L2, S_W2: begin add_a = ql_ave; add_b = ql_pre; add_sub = 1'b1;
                        div_a = coef_a; div_b = qct; div_start = (st == S_L2); end
      S_L3, S_W3: begin add_a = ql_ave; add_b = prm.q_target; add_sub = 1'b1;
                        mul_a = t1; mul_b = d1;
                        div_a = coef_b; div_b = qct; div_start = (st == S_L3); end
      S_M2:       begin mul_a = div_q; mul_b = d2;
                        add_a = er; add_b = p1; add_sub = 1'b1; end
      S_A2:       begin add_a = e1; add_b = p2; add_sub = 1'b1; end
      S_OUT:      begin mul_a = prm.delta; mul_b = er_new; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      er <= FP_ZERO; er_rate <= '0; delta_er <= FP_ZERO; ql_ave <= FP_ZERO;
      ql_pre <= FP_ZERO; start_phase <= 1'b1;
      sum_r <= '0; cnt_r <= '0; qc_r <= FP_ZERO; corr_r <= FP_ZERO;
      qct <= FP_ONE; coef_a <= FP_ZERO; coef_b <= FP_ZERO;
      d1 <= FP_ZERO; d2 <= FP_ZERO; t1 <= FP_ZERO; p1 <= FP_ZERO; p2 <= FP_ZERO;
      e1 <= FP_ZERO; e2 <= FP_ZERO; er_new <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          sum_r <= ql_sum; cnt_r <= ql_count; qc_r <= qc; corr_r <= qc_corr;
          busy  <= 1'b1;
          st    <= S_L1;
        end
        S_L1: st <= S_W1;
        S_W1: begin
          qct <= (add_y[31] || !fp_gt_pos(add_y, FP_ONE)) ? FP_ONE : add_y;
          if (div_done) begin
            ql_ave <= div_q;
            if (!fp_gt_pos(prm.ql_th, div_q) && !div_q[31]) start_phase <= 1'b0;
            if (fp_gt_pos(prm.ql_th, div_q)) begin
              coef_a <= start_phase ? prm.a0 : prm.a1;
              coef_b <= start_phase ? prm.b0 : prm.b1;
            end
            st <= S_L2;
          end
        end
        S_L2: st <= S_W2;
        S_W2: begin
          d1 <= add_y;
          if (div_done) begin t1 <= div_q; st <= S_L3; end
        end
        S_L3: st <= S_W3;
        S_W3: begin
          d2 <= add_y;
          p1 <= mul_y;
          if (div_done) st <= S_M2;
        end
        S_M2: begin p2 <= mul_y; e1 <= add_y; st <= S_A2; end
        S_A2: begin e2 <= add_y; st <= S_LIM; end
        S_LIM: begin
          if (e2[31] || e2[30:23] == 0)           er_new <= FP_ZERO;
          else if (fp_gt_pos(e2, prm.link_speed)) er_new <= prm.link_speed;
          else                                    er_new <= e2;
          st <= S_OUT;
        end
        S_OUT: begin
          er       <= er_new;
          er_rate  <= er_new_rate;
          delta_er <= mul_y;
          ql_pre   <= ql_ave;
          busy     <= 1'b0;
          done     <= 1'b1;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
