// fma_top: double-precision (IEEE 754 binary64) fused multiply-add
//   W = A + (-1)^op * (B * C), rounded once, four rounding modes.
//
// Reduced-latency organisation after Lang and Bruguera: the normalization
// is moved in front of the addition so that addition and rounding can be
// merged into one add/round step.
//   1. booth_multiplier forms B*C in carry-save form while align_control
//      computes the alignment and addend_align inverts/shifts A (sticky st1).
//   2. addend_csa adds the aligned addend to the two product words (one 3:2
//      CSA).  Its two output words feed three parallel paths:
//        sign_detect  - is the sum negative? (comp)
//        lza_logic + lza_encoder - normalization amount, MSB first
//        adder_anticipation - half adders and bit p/g, complemented if comp
//   3. norm_shifter shifts p/g left (coarse 54, then S1..S7).
//   4. add_round adds and rounds (carry/sticky of the low part, dual adder,
//      two rounding paths, LSB correction).
//   5. fma_exceptions handles special operands, packs the result and sets
//      the flags.
// The three parallel paths take their inputs from one shared CSA instead of
// each reducing the three words itself; this follows the description.
// The unit is purely combinational (no clock, no registers), as in the
// description; results are valid one propagation delay after the inputs.
// Rounding modes: 2'b11 nearest-even, 2'b01 toward +inf, 2'b10 toward -inf,
// 2'b00 toward zero.
module fma_top
  import fma_pkg::*;
(
  input  logic [63:0] a,          // addend
  input  logic [63:0] b,          // multiplicand
  input  logic [63:0] c,          // multiplier
  input  logic        op,         // 0: A + B*C, 1: A - B*C
  input  logic [1:0]  rnd_mode,   // see rnd_mode_e
  output logic [63:0] w,
  output fp_flags_t   flags
);
  fp64_t fa, fb, fc, fw;
  rnd_mode_e mode;
  assign fa   = a;
  assign fb   = b;
  assign fc   = c;
  assign mode = rnd_mode_e'(rnd_mode);
  assign w    = fw;

  // significands with hidden bit (0 for zero / subnormal)
  logic [MW-1:0] ma, mb, mc;
  logic a_zero;
  assign ma = {fa.exp != '0, fa.frac};
  assign mb = {fb.exp != '0, fb.frac};
  assign mc = {fc.exp != '0, fc.frac};
  assign a_zero = (fa.exp == '0) && (fa.frac == '0);

  // ---- multiplier ---------------------------------------------------------
  logic [PW-1:0] ps, pc;
  booth_multiplier u_mul (.mb(mb), .mc(mc), .ps(ps), .pc(pc));

  // ---- exponent / alignment control ---------------------------------------
  logic [SHW-1:0] sh;
  logic eq_exp, d_pos, pre, lim_en;
  logic signed [XW-1:0] e_base, e_no;
  logic [LSW-1:0] lim_pos;
  align_control u_ctl (
    .ea(fa.exp), .eb(fb.exp), .ec(fc.exp), .sh(sh), .eq_exp(eq_exp),
    .d_pos(d_pos), .pre(pre), .e_base(e_base), .lim_en(lim_en), .lim_pos(lim_pos)
  );

  // ---- signs ----------------------------------------------------------------
  logic eff_sub, comp, sw;
  sign_processing u_sgn (
    .sa(fa.sign), .sb(fb.sign), .sc(fc.sign), .op(op), .a_zero(a_zero),
    .comp(comp), .eff_sub(eff_sub), .sw(sw)
  );

  // ---- addend alignment and CSA --------------------------------------------
  logic [AW-1:0] as_w;
  logic st1;
  addend_align u_align (.ma(ma), .sub(eff_sub), .sh(sh), .as_o(as_w), .st1(st1));

  logic [FW-1:0] s, cw;
  addend_csa u_csa (
    .ps(ps), .pc(pc), .as_i(as_w), .sub(eff_sub), .inj(eff_sub & ~st1),
    .s(s), .c(cw)
  );

  // ---- three parallel paths --------------------------------------------------
  sign_detect u_sd (
    .s(s), .c(cw), .eq_exp(eq_exp), .d_pos(d_pos), .sub(eff_sub), .comp(comp)
  );

  // LZA window: 108 bits starting one position above the addend position,
  // or 54 positions lower when the coarse shift is taken
  logic [LZW-1:0] la, lb, f;
  assign la = pre ? s[LZW-1:0]  : s[FW-2 -: LZW];
  assign lb = pre ? cw[LZW-1:0] : cw[FW-2 -: LZW];
  lza_logic #(.W(LZW)) u_lza (.a(la), .b(lb), .f(f));

  logic [LSW-1:0] shamt;
  lza_encoder u_enc (.f(f), .lim_en(lim_en), .lim_pos(lim_pos), .shamt(shamt));

  logic [FW-1:0] pv, gv;
  adder_anticipation u_ant (.s(s), .c(cw), .comp(comp), .cin(comp & ~st1), .p(pv), .y(gv));

  // ---- normalization and add/round ------------------------------------------
  logic [FW-1:0] pn, gn;
  norm_shifter u_norm (.p_i(pv), .g_i(gv), .pre(pre), .shamt(shamt), .p_o(pn), .g_o(gn));

  logic [FRW-1:0] frac;
  logic [1:0] adj;
  logic hidden, inexact, tiny;
  add_round u_ar (
    .p(pn), .y(gn), .st1(st1), .mode(mode), .sign(sw),
    .frac(frac), .adj(adj), .hidden(hidden), .inexact(inexact), .tiny(tiny)
  );

  assign e_no = e_base - XW'(shamt);

  fma_exceptions u_exc (
    .a(fa), .b(fb), .c(fc), .op(op), .mode(mode),
    .sw(sw), .e_no(e_no), .adj(adj), .frac(frac), .hidden(hidden),
    .inexact(inexact), .tiny(tiny), .w(fw), .flags(flags)
  );
endmodule
