// fma_basic_top: double-precision fused multiply-add in the basic
// (IBM RS/6000 style) organisation, the reference point against which the
// reduced-latency unit (fma_top) is compared.
//   W = A + (-1)^op * (B * C), rounded once, four rounding modes.
//
// The upper part is shared with fma_top: booth_multiplier, align_control,
// addend_align and addend_csa produce the same two 163-bit words.  The
// lower part then works one step after the other:
//   basic_cpa          - adds the two words; its top bit is the sign
//   basic_complementer - magnitude of a negative result
//   lza_logic/lza_encoder - leading zero anticipation from the CSA words,
//                        in parallel with the adder (amount may be one short)
//   basic_normalizer   - left shift (54 pre-shift, 64..1) and a one-bit
//                        correction stage
//   basic_rounder      - round bit / sticky rounding and post-normalization
//   fma_exceptions     - special operands, packing and flags (shared)
// Same ports and same results as fma_top; only the internal organisation
// (and therefore the delay) differs.  Purely combinational.
// The eq_exp and d_pos outputs of align_control are left unconnected on
// purpose (lint reports the empty pins): they only feed the sign detector,
// which this organisation replaces by the sign bit of the adder.
// Rounding modes: 2'b11 nearest-even, 2'b01 toward +inf, 2'b10 toward -inf,
// 2'b00 toward zero.
module fma_basic_top
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

  logic [MW-1:0] ma, mb, mc;
  logic a_zero;
  assign ma = {fa.exp != '0, fa.frac};
  assign mb = {fb.exp != '0, fb.frac};
  assign mc = {fc.exp != '0, fc.frac};
  assign a_zero = (fa.exp == '0) && (fa.frac == '0);

  // ---- upper part (shared with the reduced-latency unit) -------------------
  logic [PW-1:0] ps, pc;
  booth_multiplier u_mul (.mb(mb), .mc(mc), .ps(ps), .pc(pc));

  logic [SHW-1:0] sh;
  logic pre, lim_en;
  logic signed [XW-1:0] e_base, e_no;
  logic [LSW-1:0] lim_pos;
  align_control u_ctl (
    .ea(fa.exp), .eb(fb.exp), .ec(fc.exp), .sh(sh), .eq_exp(),
    .d_pos(), .pre(pre), .e_base(e_base), .lim_en(lim_en), .lim_pos(lim_pos)
  );

  logic eff_sub, neg, sw;
  sign_processing u_sgn (
    .sa(fa.sign), .sb(fb.sign), .sc(fc.sign), .op(op), .a_zero(a_zero),
    .comp(neg), .eff_sub(eff_sub), .sw(sw)
  );

  logic [AW-1:0] as_w;
  logic st1;
  addend_align u_align (.ma(ma), .sub(eff_sub), .sh(sh), .as_o(as_w), .st1(st1));

  logic [FW-1:0] s, cw;
  addend_csa u_csa (
    .ps(ps), .pc(pc), .as_i(as_w), .sub(eff_sub), .inj(eff_sub & ~st1),
    .s(s), .c(cw)
  );

  // ---- lower part: CPA, complementer, normalizer, rounder ------------------
  logic [FW-1:0] sum, mag, n;
  basic_cpa          u_cpa  (.s(s), .c(cw), .sum(sum), .neg(neg));
  basic_complementer u_cmp  (.sum(sum), .neg(neg), .st1(st1), .mag(mag));

  logic [LZW-1:0] la, lb, f;
  assign la = pre ? s[LZW-1:0]  : s[FW-2 -: LZW];
  assign lb = pre ? cw[LZW-1:0] : cw[FW-2 -: LZW];
  lza_logic #(.W(LZW)) u_lza (.a(la), .b(lb), .f(f));

  logic [LSW-1:0] shamt;
  lza_encoder u_enc (.f(f), .lim_en(lim_en), .lim_pos(lim_pos), .shamt(shamt));

  logic corr;
  basic_normalizer u_norm (.mag(mag), .pre(pre), .shamt(shamt), .n(n), .corr(corr));

  logic [FRW-1:0] frac;
  logic [1:0] adj;
  logic hidden, inexact, tiny;
  basic_rounder u_rnd (
    .n(n), .st1(st1), .mode(mode), .sign(sw),
    .frac(frac), .adj(adj), .hidden(hidden), .inexact(inexact), .tiny(tiny)
  );

  assign e_no = e_base - XW'(shamt) - XW'(corr);

  fma_exceptions u_exc (
    .a(fa), .b(fb), .c(fc), .op(op), .mode(mode),
    .sw(sw), .e_no(e_no), .adj(adj), .frac(frac), .hidden(hidden),
    .inexact(inexact), .tiny(tiny), .w(fw), .flags(flags)
  );
endmodule
