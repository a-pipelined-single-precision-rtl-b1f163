// lcu_pkg: constants, types and the coefficient-table generator shared by the
// log2 pipeline (lcu_top) and its coefficient ROM (lcu_coef_rom).
//
// How log2 is split up
//   x = 2^e * 1.m. When 1.m >= 1.5 the mantissa is halved and e incremented,
//   so x = 2^e' * t with t in [0.75, 1.5). With d = t - 1 in [-0.25, 0.5):
//       log2(x) = e' + d * g(d),     g(d) = log2(1 + d) / d,  g(0) = 1/ln 2.
//   g is smooth and lies in [1.17, 1.67), so approximating g (rather than
//   log2 itself) keeps the result's relative accuracy when x is close to 1.
//
// The table
//   u = d + 0.25 in [0, 0.75) is cut into SEGS = 384 segments of width
//   h = 2^-SEG_BITS. For segment i the parabola through g at the three sample
//   points u_i, u_i + h, u_i + 2h is stored as (y0, a, b) such that, with x the
//   position inside the segment scaled to [0, 1),
//       g ~= y0 + b*x + a*x^2,
//       a = (g2 - 2*g1 + g0) / 2,   b = (4*g1 - 3*g0 - g2) / 2.
//   Across the whole range a > 0 and b < 0, so the table holds a and -b as
//   unsigned numbers (fields A and B). All three fields have their LSB at
//   2^-G_FRAC. The samples are computed here, at elaboration time, with
//   integer arithmetic: log2 of an integer by repeated squaring with
//   LOG_FB fractional bits, then one division by d.
package lcu_pkg;

  // Single precision fields.
  localparam int unsigned EXP_W  = 8;
  localparam int unsigned BIAS   = 127;

  // Reduced argument u = d + 0.25, held with U_W fractional bits.
  localparam int unsigned U_W      = 24;
  // Segment index bits (h = 2^-SEG_BITS) and local position bits.
  localparam int unsigned SEG_BITS = 9;
  localparam int unsigned X_W      = U_W - SEG_BITS;        // 15
  localparam int unsigned SEGS     = 384;                   // 0.75 / h
  localparam int unsigned ROM_AW   = SEG_BITS;              // 512-word address space

  // Coefficient fields.
  localparam int unsigned G_FRAC = 30;                      // LSB weight 2^-30
  localparam int unsigned Y_W    = 31;                      // y0 < 2
  localparam int unsigned A_W    = 12;                      // a < 2^-18
  localparam int unsigned B_W    = 22;                      // -b < 2^-8
  localparam int unsigned COEF_W = Y_W + A_W + B_W;         // 65

  // |d| is at most 0.5 and has 24 fractional bits: 23 bits.
  localparam int unsigned D_W = 23;
  // Fractional bits of the product L = |d| * g.
  localparam int unsigned L_FRAC = (D_W + 1) + G_FRAC;      // 54
  localparam int unsigned L_W    = D_W + Y_W;               // 54
  // Magnitude |e'| + or - L: 8 integer bits, L_FRAC fractional bits.
  localparam int unsigned M_W    = EXP_W + L_FRAC;          // 62

  // Latency, in clock cycles, of each pipeline section of lcu_top and the
  // time (cycles after the input was applied) at which each section starts.
  localparam int unsigned LAT_PRE    = 5;                   // subnormal normalize
  localparam int unsigned LAT_UNPACK = 1;                   // classify, reduce
  localparam int unsigned LAT_ROM    = 3;                   // coefficient ROM
  localparam int unsigned LAT_SQ     = 2 * X_W - 1;         // x * x          29
  localparam int unsigned LAT_ABSD   = D_W;                 // |d|            23
  localparam int unsigned LAT_AX     = X_W + A_W - 1;       // a * x^2        26
  localparam int unsigned LAT_BX     = X_W + B_W - 1;       // b * x          36
  localparam int unsigned LAT_CSA    = 1;                   // 3:2 compressor
  localparam int unsigned LAT_G      = Y_W;                 // final g adder  31
  localparam int unsigned LAT_L      = D_W + Y_W - 1;       // |d| * g        53
  localparam int unsigned LAT_M      = M_W;                 // e' +/- L       62
  localparam int unsigned LAT_NORM   = $clog2(M_W);         // normalize       6
  localparam int unsigned LAT_RND    = 24;                  // round           24
  localparam int unsigned LAT_PACK   = 1;                   // specials, pack

  localparam int unsigned T_UNPACK = LAT_PRE;                                 // 5
  localparam int unsigned T_RED  = T_UNPACK + LAT_UNPACK;                     // 6
  localparam int unsigned T_COEF = T_RED + LAT_SQ;                            // 35
  localparam int unsigned T_CSA  = T_COEF + ((LAT_BX > LAT_AX) ? LAT_BX : LAT_AX); // 71
  localparam int unsigned T_G    = T_CSA + LAT_CSA;                           // 72
  localparam int unsigned T_L    = T_G + LAT_G;                               // 103
  localparam int unsigned T_M    = T_L + LAT_L;                               // 156
  localparam int unsigned T_NORM = T_M + LAT_M;                               // 218
  localparam int unsigned T_RND  = T_NORM + LAT_NORM;                         // 224
  localparam int unsigned T_PACK = T_RND + LAT_RND;                           // 248
  localparam int unsigned LCU_LATENCY = T_PACK + LAT_PACK;                    // 249

  typedef struct packed {
    logic [Y_W-1:0] y0;   // g at the segment start
    logic [A_W-1:0] a;    // quadratic coefficient, positive
    logic [B_W-1:0] b;    // minus the linear coefficient, positive
  } coef_t;

  typedef logic [COEF_W-1:0] coef_word_t;
  typedef coef_word_t coef_table_t [2**ROM_AW];

  // Operand class decided in the first stage and carried to the last.
  typedef enum logic [1:0] {
    CLS_NORMAL = 2'd0,   // finite positive normal number
    CLS_NAN    = 2'd1,   // NaN or negative input: result is quiet NaN
    CLS_NEGINF = 2'd2,   // zero or subnormal input: result is -inf
    CLS_POSINF = 2'd3    // +inf input: result is +inf
  } op_class_e;

  localparam logic [31:0] QNAN    = 32'h7FC0_0000;
  localparam logic [31:0] NEG_INF = 32'hFF80_0000;
  localparam logic [31:0] POS_INF = 32'h7F80_0000;

  // Precision of the elaboration-time log2 and g samples.
  localparam int unsigned LOG_FB = 46;
  // round(2^46 / ln 2): g(0), the limit of log2(1+d)/d at d = 0.
  localparam logic signed [63:0] G_AT_ZERO = 64'sd101520638258700;

  // log2(n / 2^SEG_BITS) in signed fixed point with LOG_FB fractional bits,
  // for 2^(SEG_BITS-2) < n < 2^(SEG_BITS+1).
  function automatic logic signed [63:0] log2_scaled(input int unsigned n);
    logic [127:0] z;
    int           p;
    logic signed [63:0] r;
    p = 0;
    while ((n >> (p + 1)) != 0) p++;
    z = 128'(n) << (LOG_FB - p);            // z = n / 2^p in [1, 2)
    r = 64'(p - int'(SEG_BITS)) <<< LOG_FB;
    for (int i = LOG_FB - 1; i >= 0; i--) begin
      z = (z * z) >> LOG_FB;
      if (z >= (128'd2 << LOG_FB)) begin
        z = z >> 1;
        r = r + (64'sd1 <<< i);
      end
    end
    return r;
  endfunction

  // g at sample k of the reduced argument, u = k * h, d = (k - SEGS/3) * h.
  function automatic logic signed [63:0] g_sample(input int unsigned k);
    int signed dk;
    dk = int'(k) - int'(SEGS / 3);
    if (dk == 0) return G_AT_ZERO;
    return (log2_scaled(k + SEGS) <<< SEG_BITS) / 64'(dk);
  endfunction

  // Round a LOG_FB-fraction value to G_FRAC fractional bits.
  function automatic logic signed [63:0] to_gfrac(input logic signed [63:0] v);
    return (v + (64'sd1 <<< (LOG_FB - G_FRAC - 1))) >>> (LOG_FB - G_FRAC);
  endfunction

  // The whole table; words past SEGS are zero.
  function automatic coef_table_t coef_table();
    coef_table_t t;
    logic signed [63:0] g0, g1, g2, a, b;
    coef_t c;
    for (int i = 0; i < 2**ROM_AW; i++) t[i] = '0;
    g1 = g_sample(0);
    g2 = g_sample(1);
    for (int unsigned i = 0; i < SEGS; i++) begin
      g0 = g1;
      g1 = g2;
      g2 = g_sample(i + 2);
      a  = to_gfrac((g0 - 2 * g1 + g2) >>> 1);
      b  = to_gfrac((3 * g0 - 4 * g1 + g2) >>> 1);
      c.y0 = Y_W'(to_gfrac(g0));
      c.a  = A_W'(a);
      c.b  = B_W'(b);
      t[i] = c;
    end
    return t;
  endfunction

endpackage
