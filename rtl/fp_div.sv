// fp_div: multi-cycle IEEE-754 single-precision divider.
//
// q = a / b. A pulse on start samples the operands; the mantissa quotient is
// formed by restoring division, one quotient bit per clock (25 bits), and
// done pulses for one cycle LATENCY = 26 clocks after start, with q held
// until the next start. busy is high in between; a start while busy is
// ignored. The document names this "32 bit floating point divider" and says
// a division completes within one cell time (53 clocks on an 8-bit UTOPIA
// bus), which this latency meets. Design choices: truncation, subnormals
// flushed to zero, division by zero returns the largest finite value with
// the quotient's sign, no NaN/infinity.
module fp_div
  import abr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t q
);
  localparam int LATENCY = 26;

  logic        sgn, zero_a, zero_b;
  logic [9:0]  e;
  logic [24:0] r;       // partial remainder
  logic [23:0] dv;      // divisor mantissa
  logic [24:0] quo;
  logic [4:0]  cnt;
  logic [24:0] r_sub;
  logic [9:0]  e_fin;

  assign r_sub = r - {1'b0, dv};

  always_comb begin
    e_fin = quo[24] ? e : e - 10'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= FP_ZERO;
      sgn <= 1'b0; zero_a <= 1'b0; zero_b <= 1'b0; e <= '0;
      r <= '0; dv <= '0; quo <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        sgn    <= a[31] ^ b[31];
        zero_a <= (a[30:23] == 0);
        zero_b <= (b[30:23] == 0);
        e      <= {2'b00, a[30:23]} - {2'b00, b[30:23]} + 10'd127;
        r      <= {1'b0, 1'b1, a[22:0]};
        dv     <= {1'b1, b[22:0]};
        quo    <= '0;
        cnt    <= 5'd25;
      end else if (busy && cnt != 0) begin
        if (!r_sub[24]) begin
          quo <= {quo[23:0], 1'b1};
          r   <= {r_sub[23:0], 1'b0};
        end else begin
          quo <= {quo[23:0], 1'b0};
          r   <= {r[23:0], 1'b0};
        end
        cnt <= cnt - 5'd1;
      end else if (busy) begin
        busy <= 1'b0;
        done <= 1'b1;
        if (zero_b)                         q <= {sgn, FP_MAX[30:0]};
        else if (zero_a)                    q <= FP_ZERO;
        else if (e_fin[9] || e_fin == 0)    q <= FP_ZERO;
        else if (e_fin >= 10'd255)          q <= {sgn, FP_MAX[30:0]};
        else if (quo[24])                   q <= {sgn, e_fin[7:0], quo[23:1]};
        else                                q <= {sgn, e_fin[7:0], quo[22:0]};
      end
    end
  end
endmodule
