// lcu_top: pipelined single precision log2 unit. One IEEE-754 single
// precision operand enters per clock; its base-2 logarithm leaves
// LCU_LATENCY = 249 clocks later, also one per clock.
//
// Method (details and constants in lcu_pkg):
//   log2(x) = e' + d * g(d),  x = 2^e' * (1 + d),  d in [-0.25, 0.5),
// with g(d) = log2(1+d)/d taken from a 384-segment table of parabolas,
//   g ~= y0 - B*x + A*x^2   (x = position inside the segment, in [0, 1)).
// Using the exponent for the integer part and a table plus parabolic
// interpolation for the mantissa part is the method this unit is built on;
// centring the mantissa range on 1 and interpolating g instead of log2
// directly is this design's own choice, made so that results close to x = 1
// keep their relative accuracy.
//
// Every arithmetic step is built from the bit-level pipelined blocks:
// pipe_rca (one full adder per stage), pipe_csa_mult (one carry save row per
// stage plus a pipelined ripple final adder) and pipe_rom (decoder and AND-OR
// selection, three stages). Sections, with the cycle each one starts at:
//     0  classify; normalize subnormal significands (5)
//     5  unpack: e' = max(E,1) - 127 - shift (+1 if 1.m >= 1.5), u, |d| inputs
//     6  x*x (29) | ROM read (3) | |d| = 2^22 - m or 2m (23)
//    35  A*x^2 (26) | B*x (36)
//    71  3:2 carry save compression of y0, A*x^2 and -B*x
//    72  g = sum + carry + 1 (31)
//   103  L = |d| * g (53)
//   156  M = |e'| + L or |e'| - L (62): subtract when e' and d differ in sign
//   218  normalize M (6)
//   224  round to 24 bits, round half up (24)
//   248  select special results, pack, register y
// Operand bits that a section does not use travel beside it in pipe_delay
// chains. The small exponent arithmetic (exponent offset and shift count in
// the unpack stage, 134 - shift count and the rounding carry in the pack stage)
// is done within one stage rather than with a bit-level adder.
//
// Special operands: NaN or any negative nonzero input gives quiet NaN
// 0x7FC00000; +0 and -0 give -inf; +inf gives +inf; 1.0 gives +0. Positive
// subnormal inputs are normalized first and get their true logarithm
// (down to log2(2^-149) = -149).
//
// Interface: in_valid/x are sampled every rising edge of clk; out_valid/y
// follow LCU_LATENCY cycles later. There is no back-pressure: the pipeline
// never stalls. rst_n (asynchronous, active low) clears only the valid chain.
module lcu_top
  import lcu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] y
);

  if (LAT_ROM > LAT_SQ) begin : g_chk_rom
    $error("coefficient ROM must not be slower than the x*x multiplier");
  end

  // ---------------------------------------------------------------------
  // Pre-normalize (5 stages): subnormal mantissas are shifted up until the
  // leading one reaches the hidden-bit position; normal ones pass unshifted.
  // ---------------------------------------------------------------------
  logic               sgn_in;
  logic [EXP_W-1:0]   exp_in;
  logic [22:0]        man_in;
  op_class_e          cls_nx;

  assign sgn_in = x[31];
  assign exp_in = x[30:23];
  assign man_in = x[22:0];

  always_comb begin
    if (exp_in == '1 && man_in != '0)                  cls_nx = CLS_NAN;
    else if (sgn_in && (exp_in != '0 || man_in != '0)) cls_nx = CLS_NAN;
    else if (exp_in == '0 && man_in == '0)             cls_nx = CLS_NEGINF;
    else if (exp_in == '1)                             cls_nx = CLS_POSINF;
    else                                               cls_nx = CLS_NORMAL;
  end

  logic [23:0]        sig_n;
  logic [LAT_PRE-1:0] lz_n;
  op_class_e          cls_n;
  logic [EXP_W-1:0]   exp_n;

  pipe_normalize #(.WIDTH(24)) u_prenorm (
    .clk(clk), .d({exp_in != '0, man_in}), .q(sig_n), .lz(lz_n)
  );

  pipe_delay #(.WIDTH(2 + EXP_W), .DEPTH(LAT_PRE)) u_pre_dly (
    .clk(clk), .rst_n(1'b1), .d({cls_nx, exp_in}), .q({cls_n, exp_n})
  );

  // ---------------------------------------------------------------------
  // Unpack (1 stage): e' = max(E, 1) - 127 - shift (+1 if 1.m >= 1.5).
  // ---------------------------------------------------------------------
  logic               m22;
  logic [21:0]        mlo;
  logic signed [9:0]  e_adj;

  assign m22   = sig_n[22];
  assign mlo   = sig_n[21:0];
  assign e_adj = $signed({2'b00, (exp_n == '0) ? EXP_W'(1) : exp_n}) - 10'sd127
               - $signed({5'b0, lz_n}) + $signed({9'b0, m22});

  op_class_e        cls_1;
  logic             esign_1, dneg_1, dci_1;
  logic [EXP_W-1:0] eabs_1;
  logic [U_W-1:0]   u_1;
  logic [D_W-1:0]   dop_1;

  always_ff @(posedge clk) begin
    cls_1   <= cls_n;
    esign_1 <= e_adj[9];
    eabs_1  <= e_adj[9] ? EXP_W'(-e_adj) : EXP_W'(e_adj);
    dneg_1  <= m22;
    // u = d + 0.25 with 24 fractional bits: m - 2^22 when the mantissa was
    // halved, 2m + 2^22 otherwise.
    u_1     <= m22 ? {2'b00, mlo} : {mlo[21], ~mlo[21], mlo[20:0], 1'b0};
    // |d| = 2^22 - m[21:0] = ~m[21:0] + 1 when halved, 2m otherwise.
    dop_1   <= m22 ? {1'b0, ~mlo} : {mlo, 1'b0};
    dci_1   <= m22;
  end

  logic [SEG_BITS-1:0] seg_1;
  logic [X_W-1:0]      xl_1;
  assign seg_1 = u_1[U_W-1 -: SEG_BITS];
  assign xl_1  = u_1[X_W-1:0];

  // ---------------------------------------------------------------------
  // x^2, ROM read and |d|, in parallel
  // ---------------------------------------------------------------------
  logic [2*X_W-1:0] xsq_p;
  coef_t            coef_rom, coef_c;
  logic [X_W-1:0]   xl_c;
  logic [D_W-1:0]   absd_s;
  logic             absd_co;

  pipe_csa_mult #(.AW(X_W), .BW(X_W)) u_xsq (
    .clk(clk), .a(xl_1), .b(xl_1), .p(xsq_p)
  );

  lcu_coef_rom u_coef (
    .clk(clk), .seg(seg_1), .coef(coef_rom)
  );

  pipe_delay #(.WIDTH(COEF_W), .DEPTH(LAT_SQ - LAT_ROM)) u_coef_dly (
    .clk(clk), .rst_n(1'b1), .d(coef_rom), .q(coef_c)
  );

  pipe_delay #(.WIDTH(X_W), .DEPTH(LAT_SQ)) u_xl_dly (
    .clk(clk), .rst_n(1'b1), .d(xl_1), .q(xl_c)
  );

  pipe_rca #(.WIDTH(D_W)) u_absd (
    .clk(clk), .a(dop_1), .b('0), .ci(dci_1), .s(absd_s), .co(absd_co)
  );

  // ---------------------------------------------------------------------
  // A*x^2 and B*x
  // ---------------------------------------------------------------------
  logic [X_W-1:0]     xsq_c;
  logic [A_W+X_W-1:0] ax_p, ax_c;
  logic [B_W+X_W-1:0] bx_p;
  logic [Y_W-1:0]     y0_c;

  assign xsq_c = xsq_p[2*X_W-1 -: X_W];   // x^2 truncated to X_W bits

  pipe_csa_mult #(.AW(A_W), .BW(X_W)) u_ax (
    .clk(clk), .a(coef_c.a), .b(xsq_c), .p(ax_p)
  );

  pipe_csa_mult #(.AW(B_W), .BW(X_W)) u_bx (
    .clk(clk), .a(coef_c.b), .b(xl_c), .p(bx_p)
  );

  pipe_delay #(.WIDTH(A_W + X_W), .DEPTH(T_CSA - T_COEF - LAT_AX)) u_ax_dly (
    .clk(clk), .rst_n(1'b1), .d(ax_p), .q(ax_c)
  );

  pipe_delay #(.WIDTH(Y_W), .DEPTH(T_CSA - T_COEF)) u_y0_dly (
    .clk(clk), .rst_n(1'b1), .d(coef_c.y0), .q(y0_c)
  );

  // ---------------------------------------------------------------------
  // g = y0 + (A*x^2 >> 15) - (B*x >> 15): one carry save row, then a
  // pipelined adder with carry-in 1 completing the two's complement of B*x.
  // ---------------------------------------------------------------------
  logic [Y_W-1:0] op_ax, op_nbx, csa_s, csa_c;
  logic [Y_W-1:0] csa_s_q, csa_c_q;

  assign op_ax  = Y_W'(ax_c[A_W+X_W-1:X_W]);
  assign op_nbx = ~Y_W'(bx_p[B_W+X_W-1:X_W]);

  for (genvar i = 0; i < Y_W; i++) begin : g_csa
    full_adder u_fa (
      .a (y0_c[i]),
      .b (op_ax[i]),
      .ci(op_nbx[i]),
      .s (csa_s[i]),
      .co(csa_c[i])
    );
  end

  always_ff @(posedge clk) begin
    csa_s_q <= csa_s;
    csa_c_q <= csa_c;
  end

  logic [Y_W-1:0] g_s;
  logic           g_co;

  pipe_rca #(.WIDTH(Y_W)) u_gadd (
    .clk(clk), .a(csa_s_q), .b({csa_c_q[Y_W-2:0], 1'b0}), .ci(1'b1),
    .s(g_s), .co(g_co)
  );

  // ---------------------------------------------------------------------
  // L = |d| * g
  // ---------------------------------------------------------------------
  logic [D_W-1:0] absd_c;
  logic [L_W-1:0] l_p;

  pipe_delay #(.WIDTH(D_W), .DEPTH(T_L - T_RED - LAT_ABSD)) u_absd_dly (
    .clk(clk), .rst_n(1'b1), .d(absd_s), .q(absd_c)
  );

  pipe_csa_mult #(.AW(Y_W), .BW(D_W)) u_lmul (
    .clk(clk), .a(g_s), .b(absd_c), .p(l_p)
  );

  // ---------------------------------------------------------------------
  // M = |e'| +/- L
  // ---------------------------------------------------------------------
  typedef struct packed {
    op_class_e        cls;
    logic             esign;
    logic             dneg;
    logic [EXP_W-1:0] eabs;
  } ctl_t;

  ctl_t ctl_1, ctl_m;
  assign ctl_1 = '{cls: cls_1, esign: esign_1, dneg: dneg_1, eabs: eabs_1};

  pipe_delay #(.WIDTH($bits(ctl_t)), .DEPTH(T_M - T_RED)) u_ctl_dly (
    .clk(clk), .rst_n(1'b1), .d(ctl_1), .q(ctl_m)
  );

  logic           e_nz, do_sub, rsign_m;
  logic [M_W-1:0] m_a, m_b, m_s;
  logic           m_co;

  assign e_nz    = (ctl_m.eabs != '0);
  assign do_sub  = e_nz && (ctl_m.esign != ctl_m.dneg);
  assign rsign_m = e_nz ? ctl_m.esign : ctl_m.dneg;
  assign m_a     = {ctl_m.eabs, {L_FRAC{1'b0}}};
  assign m_b     = do_sub ? ~M_W'(l_p) : M_W'(l_p);

  pipe_rca #(.WIDTH(M_W)) u_madd (
    .clk(clk), .a(m_a), .b(m_b), .ci(do_sub), .s(m_s), .co(m_co)
  );

  typedef struct packed {
    op_class_e cls;
    logic      rsign;
  } ctl2_t;

  ctl2_t ctl2_m, ctl2_n;
  assign ctl2_m = '{cls: ctl_m.cls, rsign: rsign_m};

  pipe_delay #(.WIDTH($bits(ctl2_t)), .DEPTH(T_PACK - T_M)) u_ctl2_dly (
    .clk(clk), .rst_n(1'b1), .d(ctl2_m), .q(ctl2_n)
  );

  // ---------------------------------------------------------------------
  // Normalize and round
  // ---------------------------------------------------------------------
  logic [M_W-1:0]      n_v;
  logic [LAT_NORM-1:0] n_lz, lz_p;
  logic                nz_p;

  pipe_normalize #(.WIDTH(M_W)) u_norm (
    .clk(clk), .d(m_s), .q(n_v), .lz(n_lz)
  );

  logic [23:0] r_s;
  logic        r_co;

  pipe_rca #(.WIDTH(24)) u_round (
    .clk(clk), .a(n_v[M_W-1 -: 24]), .b('0), .ci(n_v[M_W-25]),
    .s(r_s), .co(r_co)
  );

  pipe_delay #(.WIDTH(LAT_NORM + 1), .DEPTH(LAT_RND)) u_lz_dly (
    .clk(clk), .rst_n(1'b1), .d({n_v[M_W-1], n_lz}), .q({nz_p, lz_p})
  );

  // ---------------------------------------------------------------------
  // Pack
  // ---------------------------------------------------------------------
  // Biased exponent: the leading one at bit p of M (value M / 2^54) means
  // 2^(p-54); p = 61 - lz, so the biased exponent is 134 - lz (+1 when the
  // rounding carried out of the mantissa).
  localparam int unsigned EXP_TOP = BIAS + (M_W - 1) - L_FRAC;   // 134

  logic [EXP_W-1:0] exp_p;
  assign exp_p = EXP_W'(EXP_TOP) - EXP_W'(lz_p) + EXP_W'(r_co);

  always_ff @(posedge clk) begin
    unique case (ctl2_n.cls)
      CLS_NAN:    y <= QNAN;
      CLS_NEGINF: y <= NEG_INF;
      CLS_POSINF: y <= POS_INF;
      default:    y <= nz_p ? {ctl2_n.rsign, exp_p, r_co ? 23'd0 : r_s[22:0]}
                            : 32'd0;
    endcase
  end

  pipe_delay #(.WIDTH(1), .DEPTH(LCU_LATENCY), .RESET(1'b1)) u_valid (
    .clk(clk), .rst_n(rst_n), .d(in_valid), .q(out_valid)
  );

endmodule
