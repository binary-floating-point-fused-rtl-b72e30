// align_control: exponent path of the FMA.
//
// From the three biased exponents (a zero field counts as 1, the exponent of
// subnormal numbers) it derives
//   ep     = Eb + Ec - BIAS + 56: exponent of frame position 0 when the
//            product sets the scale (the addend is placed 56 positions above
//            the product, two more than its 53 bits)
//   e0     = max(ep, Ea, 2): exponent actually given to position 0.  Ea wins
//            when d = Ea-(Eb+Ec-BIAS) >= 56 (no left shift is needed, the
//            product then only feeds the sticky bit); the floor of 2 keeps
//            the subnormal rounding position inside the frame
//   sh     = e0 - Ea, limited to 161: right shift of the addend, equal to
//            max(0, 56-d) in the normal range
//   eq_exp = E of eq. 4-3: d in {0,1} (sh = 55 or 56); it is also raised when
//            any operand has a zero exponent field, because then d no longer
//            tells which of A and B*C is larger
//   d_pos  = d >= 2 (sh <= 54): the sum is certainly negative in a subtraction
//   pre    = the 54-bit coarse normalization shift can be taken (d <= 1 and
//            the exponent stays at or above the subnormal limit)
//   e_base = exponent of the normalized result before the LZA count is
//            subtracted (no-LZA-error position)
//   lim_en/lim_pos = LZA window position beyond which normalization would
//            take the exponent below 1; a 1 is forced there into the LZA
//            string so that the result becomes subnormal instead.
// The shift amount rule follows the description; the floor, the limit and
// the widened E condition are this design's own handling of subnormals.
// Combinational.
module align_control
  import fma_pkg::*;
(
  input  logic [EW-1:0]         ea,
  input  logic [EW-1:0]         eb,
  input  logic [EW-1:0]         ec,
  output logic [SHW-1:0]        sh,
  output logic                  eq_exp,
  output logic                  d_pos,
  output logic                  pre,
  output logic signed [XW-1:0]  e_base,
  output logic                  lim_en,
  output logic [LSW-1:0]        lim_pos
);
  logic signed [XW-1:0] xa, xb, xc, ep, e0, shr, slim;
  logic any_den;

  always_comb begin
    xa = (ea == '0) ? XW'(1) : XW'(ea);
    xb = (eb == '0) ? XW'(1) : XW'(eb);
    xc = (ec == '0) ? XW'(1) : XW'(ec);
    any_den = (ea == '0) || (eb == '0) || (ec == '0);
    ep  = xb + xc - XW'(BIAS) + XW'(56);
    e0  = (ep > xa) ? ep : xa;
    if (e0 < XW'(2)) e0 = XW'(2);
    shr = e0 - xa;
    sh  = (shr > XW'(MAXSH)) ? SHW'(MAXSH) : SHW'(shr);
    eq_exp = (shr == XW'(55)) || (shr == XW'(56)) || any_den;
    d_pos  = (shr <= XW'(54));
    pre    = (shr >= XW'(55)) && (e0 >= XW'(56));
    e_base = pre ? (e0 - XW'(PRE)) : e0;
    slim   = e_base - XW'(1);
    lim_en = (slim < XW'(LZW));
    lim_pos = LSW'(slim);
  end
endmodule
