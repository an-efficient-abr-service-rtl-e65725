// tb_pkg: reference arithmetic shared by the testbenches.
//
// Conversions between IEEE-754 single-precision bit patterns, the 16-bit ATM
// rate format and real numbers, written independently of the RTL so that the
// testbenches can compute expected values, plus a bitwise CRC-10 over a cell
// payload and helpers to build 53-byte cells.
package tb_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real f2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * pow2(int'(f[30:23]) - 127);
    return f[31] ? -m : m;
  endfunction

  // real -> fp32 with truncation toward zero (normal numbers only)
  function automatic logic [31:0] r2f(input real x);
    real a, m;
    int  e;
    logic s;
    if (x == 0.0) return 32'h0;
    s = (x < 0.0);
    a = s ? -x : x;
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    m = (a / pow2(e) - 1.0) * 8388608.0;
    return {s, 8'(e + 127), 23'($rtoi(m))};
  endfunction

  function automatic real abs_r(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real rate2r(input logic [15:0] r);
    if (!r[14]) return 0.0;
    return pow2(int'(r[13:9])) * (1.0 + real'(r[8:0]) / 512.0);
  endfunction

  // real -> rate format, truncating; 0 below 1 cell/s; saturating
  function automatic logic [15:0] r2rate(input real x);
    int  e;
    real m;
    if (x < 1.0) return 16'h0;
    if (x >= pow2(32)) return {2'b01, 5'd31, 9'h1FF};
    e = 0;
    while (x >= pow2(e + 1)) e++;
    m = (x / pow2(e) - 1.0) * 512.0;
    return {2'b01, 5'(e), 9'($rtoi(m))};
  endfunction

  // CRC-10, G = x^10+x^9+x^5+x^4+x+1, over payload bytes 0..45 and the six
  // high bits of byte 46, by polynomial long division of M(x)*x^10.
  function automatic logic [9:0] crc10_ref(input logic [7:0] p [48]);
    logic [383:0] bits;
    logic [10:0]  rem;
    int           n;
    n = 0;
    for (int i = 0; i < 46; i++)
      for (int b = 7; b >= 0; b--) begin bits[383 - n] = p[i][b]; n++; end
    for (int b = 7; b >= 2; b--) begin bits[383 - n] = p[46][b]; n++; end
    for (int k = 0; k < 10; k++) begin bits[383 - n] = 1'b0; n++; end
    rem = '0;
    for (int i = 0; i < n; i++) begin
      rem = {rem[9:0], bits[383 - i]};
      if (rem[10]) rem = rem ^ 11'h633;
    end
    return rem[9:0];
  endfunction

  typedef logic [7:0] cell_t [53];

  // Build a cell: header byte 3 carries PTI; for an RM cell the message type,
  // ER, CCR, MCR are filled in and a CRC-10 (good or corrupted) appended.
  function automatic cell_t make_cell(input logic [2:0] pti, input logic [7:0] msg,
                                      input logic [15:0] er, input logic [15:0] ccr,
                                      input logic [15:0] mcr, input logic bad_crc,
                                      input int seed);
    cell_t c;
    logic [7:0] p [48];
    logic [9:0] crc;
    for (int i = 0; i < 53; i++) c[i] = 8'((seed * 37 + i * 11) ^ (i << 3));
    c[3] = {c[3][7:4], pti, 1'b0};
    if (pti == 3'b110) begin
      c[5]  = 8'h01;
      c[6]  = msg;
      c[7]  = er[15:8];  c[8]  = er[7:0];
      c[9]  = ccr[15:8]; c[10] = ccr[7:0];
      c[11] = mcr[15:8]; c[12] = mcr[7:0];
      for (int i = 0; i < 48; i++) p[i] = c[5 + i];
      crc = crc10_ref(p);
      if (bad_crc) crc = crc ^ 10'h001;
      c[51] = {c[51][7:2], crc[9:8]};
      c[52] = crc[7:0];
    end
    return c;
  endfunction

  typedef logic [53*8-1:0] cellp_t;   // a cell packed, byte 0 in the top bits

  function automatic cellp_t pack_cell(input cell_t c);
    cellp_t p;
    for (int i = 0; i < 53; i++) p[(52 - i) * 8 +: 8] = c[i];
    return p;
  endfunction

  function automatic cell_t unpack_cell(input cellp_t p);
    cell_t c;
    for (int i = 0; i < 53; i++) c[i] = p[(52 - i) * 8 +: 8];
    return c;
  endfunction

  function automatic logic crc_good(input cell_t c);
    logic [7:0] p [48];
    for (int i = 0; i < 48; i++) p[i] = c[5 + i];
    return crc10_ref(p) == {c[51][1:0], c[52]};
  endfunction

endpackage
