// abr_pkg: types, cell layout constants, parameter record and small helper
// functions shared by the ABR service engine.
//
// Numbers inside the engine are IEEE-754 single precision (fp32_t). Rates
// carried in RM cells use the 16-bit ATM rate format (rate_t):
//   bit 15 reserved (0), bit 14 nz, bits 13:9 exponent e, bits 8:0 mantissa m,
//   value = nz * 2^e * (1 + m/512) cells/s.
// Cells are 53 bytes as moved over an 8-bit UTOPIA bus: 4 header bytes, the
// HEC byte, then the 48-byte payload. The RM cell field offsets below follow
// the ATM Forum RM cell layout (0-based byte index within the 53 bytes).
// CRC-10 uses G(x) = x^10+x^9+x^5+x^4+x+1 over the payload bits that precede
// the CRC field (46 bytes plus 6 reserved bits), MSB first, register cleared.
package abr_pkg;

  typedef logic [31:0] fp32_t;
  typedef logic [15:0] rate_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_MAX  = 32'h7F7F_FFFF;  // largest finite value, used on overflow

  // cell layout
  localparam int CELL_BYTES   = 53;
  localparam int IDX_PTI      = 3;   // byte holding VCI[3:0], PTI[2:0], CLP
  localparam int IDX_PAYLOAD  = 5;
  localparam int IDX_MSGTYPE  = 6;   // DIR BN CI NI RA - - -
  localparam int IDX_ER       = 7;   // bytes 7,8
  localparam int IDX_CCR      = 9;   // bytes 9,10
  localparam int IDX_MCR      = 11;  // bytes 11,12
  localparam int IDX_CRC_HI   = 51;  // 6 reserved bits, CRC[9:8]
  localparam int IDX_CRC_LO   = 52;  // CRC[7:0]
  localparam logic [2:0] PTI_RM = 3'b110;
  localparam int MT_DIR = 7;
  localparam int MT_BN  = 6;
  localparam int MT_CI  = 5;
  localparam int MT_NI  = 4;

  localparam logic [9:0] CRC10_POLY = 10'h233;

  // Engine parameters, written through the register file.
  typedef struct packed {
    fp32_t       a0;          // ER coefficient A during system start
    fp32_t       b0;          // ER coefficient B during system start
    fp32_t       a1;          // ER coefficient A after start
    fp32_t       b1;          // ER coefficient B after start
    fp32_t       ql_th;       // queue threshold selecting A/B (g_TH)
    fp32_t       q_target;    // target queue length q_T
    fp32_t       link_speed;  // upper limit of ER (cells/s)
    fp32_t       delta;       // comparison margin for QC_i accumulation
    fp32_t       lambda;      // QC low-pass factor, 0.5 <= lambda < 1
    fp32_t       nrm_over_w;  // N_RM / W
    logic [15:0] q_efci;      // EFCI queue threshold (cells)
    logic [15:0] q_ni;        // NI queue threshold (cells)
    logic [15:0] q_ci;        // CI queue threshold (cells)
    logic [15:0] t_period;    // T in cell times
    logic [15:0] w_period;    // W in cell times
  } abr_params_t;

  // Event strobes brought out of the top for monitoring (one clock each).
  typedef struct packed {
    logic qci_accepted;   // a QC_i contribution was added
    logic qci_dropped;    // a forward RM cell failed the CRC or the rate condition
    logic qc_corrected;   // total connection count rose, QC corrector grew
    logic efci_marked;    // a data cell left with EFCI set
    logic brm_seen;       // a backward RM cell from a source was received
    logic brm_crc_bad;    // ... with a CRC error (left untouched)
    logic er_written;     // ... and its ER field is being lowered
    logic er_busy;        // ER engine computing
    logic start_phase;    // ER engine still using A0/B0
  } abr_events_t;

  // Process the n most significant bits of d (n = 6 or 8) through the CRC-10 register.
  function automatic logic [9:0] crc10_step(input logic [9:0] c, input logic [7:0] d,
                                            input logic six_bits);
    logic [9:0] r;
    logic       fb;
    r = c;
    for (int i = 7; i >= 0; i--) begin
      if (!(six_bits && i < 2)) begin
        fb = d[i] ^ r[9];
        r  = {r[8:0], 1'b0} ^ (fb ? CRC10_POLY : 10'h000);
      end
    end
    return r;
  endfunction

  // Magnitude compare of two rate-format values: a > b.
  function automatic logic rate_gt(input rate_t a, input rate_t b);
    logic [14:0] ka, kb;
    ka = a[14] ? a[14:0] : 15'h0;
    kb = b[14] ? b[14:0] : 15'h0;
    return ka > kb;
  endfunction

  // a > b for fp32 values that are both non-negative (flush-to-zero encoding).
  function automatic logic fp_gt_pos(input fp32_t a, input fp32_t b);
    return a[30:0] > b[30:0];
  endfunction

endpackage
