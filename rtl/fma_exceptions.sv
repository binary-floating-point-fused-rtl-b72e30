// fma_exceptions: special operands, result packing and IEEE 754 flags.
//
// Special operands bypass the datapath:
//   NaN operand            -> that NaN made quiet (A, then B, then C)
//   inf * 0, or inf - inf  -> invalid, default NaN FFF8_0000_0000_0000
//   signalling NaN          -> invalid as well
//   infinite product or A   -> infinity of that sign
//   B*C = 0                 -> A itself; if A is also 0, a zero whose sign is
//                              the common sign, else +0 (-0 when rounding
//                              toward -infinity)
// Otherwise the rounded datapath result is packed: exponent = e_no + adj; a
// result read in the lowest position without its integer bit is subnormal
// (exponent field 0).  An exponent of 2047 or more overflows to infinity or
// to the largest finite number, depending on mode and sign.  An exact zero
// from cancellation is +0 (-0 toward -infinity).  Underflow is raised for a
// tiny (before rounding) and inexact result.  Combinational.
module fma_exceptions
  import fma_pkg::*;
(
  input  fp64_t                a,
  input  fp64_t                b,
  input  fp64_t                c,
  input  logic                 op,
  input  rnd_mode_e            mode,
  // rounded datapath result
  input  logic                 sw,
  input  logic signed [XW-1:0] e_no,
  input  logic [1:0]           adj,
  input  logic [FRW-1:0]       frac,
  input  logic                 hidden,
  input  logic                 inexact,
  input  logic                 tiny,
  output fp64_t                w,
  output fp_flags_t            flags
);
  function automatic logic is_nan(logic [62:0] x);
    return (x[62:52] == '1) && (x[51:0] != '0);
  endfunction
  function automatic logic is_inf(logic [62:0] x);
    return (x[62:52] == '1) && (x[51:0] == '0);
  endfunction
  function automatic logic is_zero(logic [62:0] x);
    return (x[62:52] == '0) && (x[51:0] == '0);
  endfunction
  function automatic fp64_t quiet(fp64_t x);
    fp64_t q = x;
    q.frac[FRW-1] = 1'b1;
    return q;
  endfunction

  logic sp, any_nan, any_snan, inv_mul, p_inf, p_zero, inf_diff, away;
  logic signed [XW-1:0] e_fin;

  always_comb begin
    sp       = b.sign ^ c.sign ^ op;
    any_nan  = is_nan(a[62:0]) || is_nan(b[62:0]) || is_nan(c[62:0]);
    any_snan = (is_nan(a[62:0]) && !a.frac[FRW-1]) || (is_nan(b[62:0]) && !b.frac[FRW-1])
            || (is_nan(c[62:0]) && !c.frac[FRW-1]);
    inv_mul  = (is_inf(b[62:0]) && is_zero(c[62:0])) || (is_inf(c[62:0]) && is_zero(b[62:0]));
    p_inf    = is_inf(b[62:0]) || is_inf(c[62:0]);
    p_zero   = is_zero(b[62:0]) || is_zero(c[62:0]);
    inf_diff = p_inf && is_inf(a[62:0]) && (a.sign != sp);
    away     = (mode == RND_RN) || (mode == RND_RP && !sw) || (mode == RND_RM && sw);
    e_fin    = e_no + XW'(adj);

    flags = '0;
    w     = '0;
    if (any_nan) begin
      flags.invalid = any_snan || inv_mul;
      w = is_nan(a[62:0]) ? quiet(a) : (is_nan(b[62:0]) ? quiet(b) : quiet(c));
    end else if (inv_mul || inf_diff) begin
      flags.invalid = 1'b1;
      w = DEFAULT_NAN;
    end else if (p_inf) begin
      w = '{sign: sp, exp: '1, frac: '0};
    end else if (is_inf(a[62:0])) begin
      w = a;
    end else if (p_zero) begin
      if (is_zero(a[62:0])) w = '{sign: (a.sign == sp) ? a.sign : (mode == RND_RM), exp: '0, frac: '0};
      else            w = a;
    end else begin
      flags.inexact   = inexact;
      flags.underflow = tiny && inexact;
      if (adj == 2'd0 && !hidden && frac == '0) begin
        // zero magnitude: exact cancellation, or a tiny result rounded to 0
        w = '{sign: inexact ? sw : (mode == RND_RM), exp: '0, frac: '0};
      end else if (e_fin >= XW'(2047)) begin
        flags.overflow = 1'b1;
        flags.inexact  = 1'b1;
        w = away ? '{sign: sw, exp: '1, frac: '0}
                 : '{sign: sw, exp: EW'(2046), frac: '1};
      end else begin
        w = '{sign: sw, exp: (adj == 2'd0 && !hidden) ? '0 : EW'(e_fin), frac: frac};
      end
    end
  end
endmodule
