// fma_ref_pkg: bit-exact reference model of binary64 fused multiply-add for
// the testbenches, written independently of the RTL datapath.
// The exact value of A + (-1)^op*B*C is formed as a 4400-bit integer whose
// bit 0 weighs 2^-2200 (every finite operand and product fits), its leading
// one is searched, and it is rounded once in the requested mode.
// Conventions (the same choices as the RTL): tininess before rounding,
// underflow = tiny & inexact, default NaN FFF8000000000000 for invalid
// operations, NaN operands returned quiet in the order A, B, C.
package fma_ref_pkg;

  localparam int N   = 4400;
  localparam int OFF = 2200;

  typedef logic [N-1:0] wide_t;

  function automatic logic is_nan(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] != 0;
  endfunction
  function automatic logic is_inf(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] == 0;
  endfunction
  function automatic logic is_zero(logic [63:0] x);
    return x[62:0] == 0;
  endfunction

  // flags = {invalid, overflow, underflow, inexact}
  function automatic void fma_ref(input logic [63:0] a, b, c, input logic op,
                                  input logic [1:0] mode,
                                  output logic [63:0] w, output logic [3:0] flags);
    logic sa, sb, sc, sp, sign, tiny, rbit, sbit, inc, inexact;
    logic [52:0] ma, mb, mc;
    logic [105:0] mp;
    int ea, eb, ec, ia, ip, msb, lsb, eu, biased;
    wide_t va, vp, mag, rest;
    logic [53:0] mant;
    flags = 4'b0;
    sa = a[63]; sb = b[63]; sc = c[63]; sp = sb ^ sc ^ op;
    if (is_nan(a) || is_nan(b) || is_nan(c)) begin
      flags[3] = (is_nan(a) && !a[51]) || (is_nan(b) && !b[51]) || (is_nan(c) && !c[51])
              || (is_inf(b) && is_zero(c)) || (is_inf(c) && is_zero(b));
      w = is_nan(a) ? (a | 64'h0008_0000_0000_0000) :
          is_nan(b) ? (b | 64'h0008_0000_0000_0000) : (c | 64'h0008_0000_0000_0000);
      return;
    end
    if ((is_inf(b) && is_zero(c)) || (is_inf(c) && is_zero(b)) ||
        ((is_inf(b) || is_inf(c)) && is_inf(a) && sa != sp)) begin
      flags[3] = 1'b1; w = 64'hFFF8_0000_0000_0000; return;
    end
    if (is_inf(b) || is_inf(c)) begin w = {sp, 11'h7FF, 52'h0}; return; end
    if (is_inf(a)) begin w = a; return; end
    if (is_zero(b) || is_zero(c)) begin
      if (is_zero(a)) w = {(sa == sp) ? sa : (mode == 2'b10), 63'h0};
      else            w = a;
      return;
    end
    ma = {a[62:52] != 0, a[51:0]}; mb = {b[62:52] != 0, b[51:0]}; mc = {c[62:52] != 0, c[51:0]};
    ea = (a[62:52] == 0) ? 1 : int'(a[62:52]);
    eb = (b[62:52] == 0) ? 1 : int'(b[62:52]);
    ec = (c[62:52] == 0) ? 1 : int'(c[62:52]);
    mp = 106'(mb) * 106'(mc);
    ia = ea - 1075 + OFF;
    ip = eb - 1075 + ec - 1075 + OFF;
    va = wide_t'(ma) << ia;
    vp = wide_t'(mp) << ip;
    if (sa == sp) begin mag = va + vp; sign = sa; end
    else if (vp >= va) begin mag = vp - va; sign = sp; end
    else begin mag = va - vp; sign = sa; end
    if (mag == 0) begin w = {mode == 2'b10, 63'h0}; return; end
    msb = 0;
    for (int i = N-1; i >= 0; i--) if (mag[i]) begin msb = i; break; end
    eu   = msb - OFF;
    tiny = eu < -1022;
    lsb  = tiny ? (-1074 + OFF) : (msb - 52);
    mant = 54'(mag >> lsb);
    rbit = mag[lsb-1];
    rest = mag << (N - (lsb - 1));
    sbit = rest != 0;
    inexact = rbit | sbit;
    case (mode)
      2'b11: inc = rbit & (sbit | mant[0]);
      2'b01: inc = !sign & inexact;
      2'b10: inc = sign & inexact;
      default: inc = 1'b0;
    endcase
    mant = mant + 54'(inc);
    if (mant[53]) begin mant = mant >> 1; eu = eu + 1; end
    flags[0] = inexact;
    flags[1] = tiny & inexact;
    if (tiny && !mant[52]) begin
      w = {sign, 11'h0, mant[51:0]};
    end else begin
      biased = tiny ? 1 : eu + 1023;
      if (biased >= 2047) begin
        flags[2] = 1'b1; flags[0] = 1'b1;
        if (mode == 2'b11 || (mode == 2'b01 && !sign) || (mode == 2'b10 && sign))
          w = {sign, 11'h7FF, 52'h0};
        else
          w = {sign, 11'h7FE, {52{1'b1}}};
      end else begin
        w = {sign, 11'(biased), mant[51:0]};
      end
    end
  endfunction

endpackage
