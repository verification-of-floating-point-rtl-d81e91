// fp_adder: pipelined IEEE floating-point adder/subtractor (double precision by
// default) in the style of the SNAP adder: alignment and massive normalization
// shifts are mutually exclusive, and rounding is a selection among A+C, A+C+1
// and A+C+2 produced by one mantissa adder.
//
// Datapath. The exponent subtractor and MuxAbs give |Ex-Ey|; the mantissa of
// the larger-exponent operand becomes A and the other one is aligned into C
// (unshifted, shifted by one, or by the right shifter with guard/round/sticky).
// A true subtraction uses the complement of C. After the adder one of four
// normalization cases applies: right shift by one (addition carry), none, left
// shift by one (far subtraction), or a massive left shift predicted by the LZA
// and corrected by the fine adjust (close subtraction, |Ex-Ey| <= 1).
//
// COMPARE = 0 builds the variant with a ones complementer that repairs a
// negative difference when Ex = Ey. COMPARE = 1 builds the variant with a
// mantissa comparator in the swap control, so A >= C always and the ones
// complementer is left out.
//
// Interface and timing. x, y, sub and rm are sampled with in_valid on a rising
// clk edge; z and the flags appear with out_valid exactly three edges later
// (three register stages: after alignment, after the mantissa adder, at the
// output). One operation can start every cycle. rst_n (asynchronous, active
// low) clears only the valid bits. rm: 0 nearest-even, 1 toward zero, 2 toward
// +inf, 3 toward -inf.
//
// Following the document: the block structure, the three-cycle latency,
// double precision with all four rounding modes, operands handled as normal
// numbers only and denormal results truncated to zero, and the NaN/infinity
// table. This design's own choices: edge-triggered registers in place of
// two-phase latches and where the stages are cut, denormal operands read as
// zeros, the rounding-mode encoding, the flags, and the exact-zero sign.
module fp_adder
  import fpa_pkg::*;
#(
  parameter int unsigned NE      = 11,
  parameter int unsigned NM      = 53,
  parameter bit          COMPARE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NE+NM-1:0] x,
  input  logic [NE+NM-1:0] y,
  input  logic             sub,
  input  rmode_e           rm,
  output logic             out_valid,
  output logic [NE+NM-1:0] z,
  output logic             invalid,
  output logic             overflow,
  output logic             underflow
);
  localparam int unsigned FW = NM - 1;       // stored fraction bits
  localparam int unsigned W  = NM + 1;       // close-path width (one guard bit)
  localparam int unsigned LW = $clog2(W + 1);
  localparam int unsigned OW = LW + 2;

  // ---------------------------------------------------------------- stage 1
  logic             sx, sy;
  logic [NE-1:0]    ex, ey, el;
  logic [NM-1:0]    mx, my, a, b, q;
  logic [NE:0]      diff;
  logic [NE-1:0]    absd;
  logic             x_lt_y, x_eq_y, swap, h;
  logic             rg, rr, rs;
  logic [NE+NM-1:0] y_eff, sp_z;
  logic             sp, sp_inv;

  always_comb begin
    sx    = x[NE+FW];
    sy    = y[NE+FW] ^ sub;
    ex    = x[NE+FW-1:FW];
    ey    = y[NE+FW-1:FW];
    // denormal operands are read as zeros
    mx    = (ex != '0) ? {1'b1, x[FW-1:0]} : '0;
    my    = (ey != '0) ? {1'b1, y[FW-1:0]} : '0;
    y_eff = {sy, y[NE+FW-1:0]};
  end

  fpa_exp_sub    #(.NE(NE)) u_exp_sub (.ex, .ey, .diff, .x_lt_y, .x_eq_y);
  fpa_mux_abs    #(.NE(NE)) u_mux_abs (.diff, .absd);
  fpa_exp_select #(.NE(NE)) u_exp_sel (.ex, .ey, .x_lt_y, .el);

  if (COMPARE) begin : g_cmp
    fpa_compare #(.NM(NM)) u_compare (.mx, .my, .x_eq_y, .x_lt_y, .h);
  end else begin : g_nocmp
    assign h = x_lt_y;
  end
  assign swap = h;

  fpa_swap    #(.NM(NM))          u_swap   (.mx, .my, .swap, .a, .b);
  fpa_rshift  #(.NE(NE), .NM(NM)) u_rshift (.b, .shamt(absd), .q, .g(rg), .r(rr), .s(rs));
  fpa_special #(.NE(NE), .NM(NM)) u_special (.x, .y(y_eff), .special(sp), .z(sp_z), .invalid(sp_inv));

  typedef struct packed {
    logic [NM-1:0]    a, b, q;
    logic [2:0]       qgrs;
    logic [NE-1:0]    absd, el;
    logic             eff_sub, sx, sy, swap;
    rmode_e           rm;
    logic             sp, sp_inv;
    logic [NE+NM-1:0] sp_z;
  } st1_t;
  st1_t r1;
  logic v1, v2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;

  always_ff @(posedge clk) begin
    r1.a       <= a;
    r1.b       <= b;
    r1.q       <= q;
    r1.qgrs    <= {rg, rr, rs};
    r1.absd    <= absd;
    r1.el      <= el;
    r1.eff_sub <= sx ^ sy;
    r1.sx      <= sx;
    r1.sy      <= sy;
    r1.swap    <= swap;
    r1.rm      <= rm;
    r1.sp      <= sp;
    r1.sp_inv  <= sp_inv;
    r1.sp_z    <= sp_z;
  end

  // ---------------------------------------------------------------- stage 2
  csel_e         csel;
  norm_e         norm;
  logic [NM-1:0] c, mag;
  logic [2:0]    cgrs, low;
  logic [NM+1:0] s0, s1, s2, base, bnext, rsel;
  logic          c_low, shift_in, rnd_r1, rnd_none, rnd_l1;
  logic          neg, exact_zero, sign;
  logic [W-1:0]  lza_f;
  logic [LW-1:0] lz;
  logic [NM:0]   cand_r1, cand_none, cand_l1;

  fpa_c_mux      #(.NM(NM)) u_c_mux (.b(r1.b), .q(r1.q), .q_grs(r1.qgrs), .sel(csel), .c, .grs(cgrs));
  fpa_mant_adder #(.NM(NM)) u_adder (.a(r1.a), .c, .eff_sub(r1.eff_sub), .s0, .s1, .s2);
  fpa_lza        #(.W(W))   u_lza   (.a({r1.a, 1'b0}), .c({c, cgrs[2]}), .f(lza_f));
  fpa_encode     #(.W(W), .LW(LW)) u_encode (.f(lza_f), .lz);

  always_comb begin
    // A < C can only happen with equal exponents in the variant without comparator
    neg        = !COMPARE && r1.eff_sub && (csel == CSEL_UNSH) && !s0[NM];
    // A = C with equal exponents: A + not(C) is all ones without carry
    exact_zero = r1.eff_sub && (csel == CSEL_UNSH) && !s0[NM] && (&s0[NM-1:0]);
  end

  fpa_sign_select u_sign (.sx(r1.sx), .sy(r1.sy), .swap(r1.swap), .neg, .eff_sub(r1.eff_sub),
                          .exact_zero, .rm(r1.rm), .sign);
  fpa_grs #(.NM(NM)) u_grs (.eff_sub(r1.eff_sub), .grs_in(cgrs), .rm(r1.rm), .sign, .s0, .s1,
                            .c_low, .low, .shift_in, .base, .rnd_r1, .rnd_none, .rnd_l1);
  fpa_path_select #(.NE(NE)) u_path (.absd(r1.absd), .eff_sub(r1.eff_sub),
                            .s0_carry(s0[NM]), .s1_carry(s1[NM]), .base_msb(base[NM-1]),
                            .rnd_none, .csel, .norm);

  if (!COMPARE) begin : g_ones
    fpa_ones_compl #(.NM(NM)) u_ones (.s0(s0[NM-1:0]), .base(base[NM-1:0]), .neg, .mag);
  end else begin : g_noones
    assign mag = base[NM-1:0];
  end

  always_comb begin
    bnext     = c_low ? s2 : s1;
    rsel      = rnd_none ? bnext : base;
    cand_r1   = rnd_r1 ? s2[NM+1:1] : s0[NM+1:1];
    cand_none = r1.eff_sub ? {1'b0, rsel[NM-1:0]} : rsel[NM:0];
    cand_l1   = (rnd_l1 && low[2]) ? {bnext[NM-1:0], 1'b0}
                                   : {1'b0, base[NM-2:0], low[2] | rnd_l1};
  end

  typedef struct packed {
    norm_e            norm;
    logic [NM:0]      cand_r1, cand_none, cand_l1;
    logic [W-1:0]     v;
    logic [LW-1:0]    lz;
    logic             exact_zero, sign;
    rmode_e           rm;
    logic [NE-1:0]    el;
    logic             sp, sp_inv;
    logic [NE+NM-1:0] sp_z;
  } st2_t;
  st2_t r2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;

  always_ff @(posedge clk) begin
    r2.norm       <= norm;
    r2.cand_r1    <= cand_r1;
    r2.cand_none  <= cand_none;
    r2.cand_l1    <= cand_l1;
    r2.v          <= {mag, shift_in};
    r2.lz         <= lz;
    r2.exact_zero <= exact_zero;
    r2.sign       <= sign;
    r2.rm         <= r1.rm;
    r2.el         <= r1.el;
    r2.sp         <= r1.sp;
    r2.sp_inv     <= r1.sp_inv;
    r2.sp_z       <= r1.sp_z;
  end

  // ---------------------------------------------------------------- stage 3
  logic [W-1:0]     vs, vn;
  logic             adj;
  logic [OW-1:0]    off;
  logic [NE-1:0]    e0, e1;
  logic             ovf0, ovf1, unf0, unf1;
  logic [NE+NM-1:0] z_d;
  logic             inv_d, ovf_d, unf_d;

  fpa_lshift      #(.W(W), .LW(LW)) u_lshift (.v(r2.v), .lz(r2.lz), .q(vs));
  fpa_fine_adjust #(.W(W))          u_fine   (.v(vs), .q(vn), .adj);
  fpa_exp_offset  #(.LW(LW), .OW(OW)) u_eoff (.norm(r2.norm), .lz(r2.lz), .adj, .off);
  fpa_exp_adjust  #(.NE(NE), .OW(OW)) u_eadj (.el(r2.el), .off, .e0, .e1, .ovf0, .ovf1, .unf0, .unf1);
  fpa_result_mux  #(.NE(NE), .NM(NM)) u_rmux (
    .norm(r2.norm), .cand_r1(r2.cand_r1), .cand_none(r2.cand_none), .cand_l1(r2.cand_l1),
    .cand_close({1'b0, vn[W-1:1]}), .exact_zero(r2.exact_zero), .sign(r2.sign), .rm(r2.rm),
    .e0, .e1, .ovf0, .ovf1, .unf0, .unf1,
    .special(r2.sp), .special_z(r2.sp_z), .special_inv(r2.sp_inv),
    .z(z_d), .invalid(inv_d), .overflow(ovf_d), .underflow(unf_d));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;

  always_ff @(posedge clk) begin
    z         <= z_d;
    invalid   <= inv_d;
    overflow  <= ovf_d;
    underflow <= unf_d;
  end
endmodule
