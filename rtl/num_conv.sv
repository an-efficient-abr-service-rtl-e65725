// num_conv: number system converter between the engine's three formats.
//
// Three independent combinational converters:
//   int_fp  = unsigned 32-bit integer -> fp32 (queue-length sums and counts,
//             connection counts)
//   rate_fp = 16-bit ATM rate format  -> fp32 (CCR, MCR read from RM cells)
//   fp_rate = fp32 -> 16-bit ATM rate format (ER and delta*ER for the cells
//             and the rate-format comparators)
// The document places a number system converter in front of the ER engine
// registers and a floating point converter for CCR in the QC estimation
// unit, and defines the rate format as nz * 2^e * (1 + m/512) with a 5-bit
// exponent and 9-bit mantissa. The conversion details are this design's:
// int->fp and fp->rate truncate; fp->rate returns 0 (nz = 0) for values
// below 1 cell/s or negative values and saturates at e = 31, m = 511.
module num_conv
  import abr_pkg::*;
(
  input  logic [31:0] int_in,
  input  rate_t       rate_in,
  input  fp32_t       fp_in,
  output fp32_t       int_fp,
  output fp32_t       rate_fp,
  output rate_t       fp_rate
);
  logic [4:0]  msb;
  logic [31:0] sh;
  logic [7:0]  e8;

  always_comb begin
    // integer -> float
    msb = 5'd0;
    for (int i = 0; i < 32; i++)
      if (int_in[i]) msb = 5'(i);
    sh     = int_in << (5'd31 - msb);     // leading one to bit 31
    int_fp = (int_in == 0) ? FP_ZERO : {1'b0, 8'd127 + {3'b0, msb}, sh[30:8]};

    // rate -> float
    rate_fp = rate_in[14] ? {1'b0, 8'd127 + {3'b0, rate_in[13:9]}, rate_in[8:0], 14'h0}
                          : FP_ZERO;

    // float -> rate
    e8 = fp_in[30:23] - 8'd127;
    if (fp_in[31] || fp_in[30:23] < 8'd127) fp_rate = 16'h0000;
    else if (fp_in[30:23] > 8'd158)         fp_rate = {2'b01, 5'd31, 9'h1FF};
    else                                    fp_rate = {2'b01, e8[4:0], fp_in[22:14]};
  end
endmodule
