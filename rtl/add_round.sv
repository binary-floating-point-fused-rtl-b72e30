// add_round: combined final addition and rounding of the normalized
// carry-save result (YZ-style rounding as in the description, section 4.2.3).
//
// Inputs: the two words p, y of the normalized sum (value p + y; y holds
// the generates at the weight of their carries and the two's complement
// +1), the addend sticky st1, the rounding mode and the sign.
// After normalization the leading one is at bit 161 ("ovf" case, LZA exact)
// or at bit 160 ("no ovf", LZA one short); below 160 only for a subnormal
// result.  Rounding position: no-ovf path LSB 108 / round bit 107, ovf path
// LSB 109 / round bit 108.  Rounding may carry one position up; a carry out
// of the ovf path would put the leading one at bit 162 (adj = 2).  That case
// is kept for safety but was never reached in testing: all-ones results
// that round up are always anticipated one short by the LZA.
//
//  * low part, bits 106..0: carry c_lo into bit 107 (carry tree) and sticky
//    st2 from the carry-save form without an adder (eqs. 4-5, 4-6):
//    t(i) = p(i) ^ y(i) ^ (p(i-1) | y(i-1)), the (i-1) term 0 at bit 0,
//    st2 = OR of t (all t zero exactly when the low sum is zero)
//  * round decision (eqs. 4-8, 4-9): RN, RI (round away from zero: +inf for
//    a positive, -inf for a negative result), RZ; Rd = RN | RI, Rd1 = RI & st
//  * bits 110..107 (Z group): base = group + c_lo; for each path Rd and Rd1
//    are added at its round bit, Zn = base + Rd + Rd1n, Zo = base + 2(Rd+Rd1o)
//  * bits 162..111: dual adder Y0 = sum, Y1 = sum + 1
//  * select decision: O = unrounded result in ovf position; Z = O ? Zo : Zn;
//    inc = carry out of Z; Y = inc ? Y1 : Y0; rounded = {Y, Z}
//  * LSB correction: round-to-nearest is done as nearest-up; on a tie
//    (R = 1, sticky = 0) the LSB of the chosen path is forced to 0
//  * the rounded value is read at 162 (adj 2), 161 (adj 1) or 160 (adj 0).
// O is taken here from the group carry and Y0/Y1 directly (a functional
// equivalent of the description's select equation).  Combinational.
module add_round
  import fma_pkg::*;
(
  input  logic [FW-1:0]  p,
  input  logic [FW-1:0]  y,
  input  logic           st1,      // addend sticky
  input  rnd_mode_e      mode,
  input  logic           sign,     // sign of the result
  output logic [FRW-1:0] frac,     // rounded fraction
  output logic [1:0]     adj,      // exponent adjustment: 0, 1 or 2
  output logic           hidden,   // integer bit of the result when adj = 0
  output logic           inexact,
  output logic           tiny      // unrounded result below the normal range
);
  localparam int unsigned LO  = 107;          // low part width, bits 106..0
  localparam int unsigned TW  = FW - LO - 4;  // 52-bit dual adder

  // ---- low part: carry and sticky --------------------------------------
  logic [LO:0]   lo_sum;
  logic          c_lo, st2;
  logic [LO-2:0] h;
  logic [LO-1:0] t;
  assign lo_sum = {1'b0, p[LO-1:0]} + {1'b0, y[LO-1:0]};
  assign c_lo   = lo_sum[LO];
  assign h      = p[LO-2:0] | y[LO-2:0];
  assign t      = p[LO-1:0] ^ y[LO-1:0] ^ {h[LO-2:0], 1'b0};
  assign st2    = |t;

  // ---- Z group and dual adder -------------------------------------------
  logic [5:0]    base;
  logic [TW-1:0] y0, y1, yu, yr;
  assign base = 6'(p[LO+3:LO]) + 6'(y[LO+3:LO]) + 6'(c_lo);
  assign y0   = p[FW-1:LO+4] + y[FW-1:LO+4];
  assign y1   = y0 + 1'b1;

  // ---- round decision ---------------------------------------------------
  logic rn, ri, rd, rd1n, rd1o, st_n, st_o;
  assign rn   = (mode == RND_RN);
  assign ri   = (~sign & (mode == RND_RP)) | (sign & (mode == RND_RM));
  assign st_n = st1 | st2;
  assign st_o = st_n | base[0];
  assign rd   = rn | ri;
  assign rd1n = ri & st_n;
  assign rd1o = ri & st_o;

  // ---- select decision ----------------------------------------------------
  logic       o, inc, tie;
  logic [5:0] zn, zo, z;
  logic [TW+3:0] r;
  assign yu  = base[4] ? y1 : y0;                 // unrounded top part
  assign o   = yu[TW-1] | yu[TW-2];
  assign zn  = base + 6'(rd) + 6'(rd1n);
  assign zo  = base + {4'(rd) + 4'(rd1o), 1'b0};
  assign z   = o ? zo : zn;
  assign inc = z[4];
  assign yr  = inc ? y1 : y0;
  assign tie = o ? (base[1] & ~st_o) : (base[0] & ~st_n);

  // ---- LSB correction -----------------------------------------------------
  always_comb begin
    r = {yr, z[3:0]};
    if (rn && tie) begin
      if (o) r[2] = 1'b0;
      else   r[1] = 1'b0;
    end
  end

  // ---- result extraction --------------------------------------------------
  always_comb begin
    hidden = 1'b1;
    if (r[TW+3]) begin
      adj  = 2'd2;
      frac = r[TW+2 -: FRW];
    end else if (r[TW+2]) begin
      adj  = 2'd1;
      frac = r[TW+1 -: FRW];
    end else begin
      adj    = 2'd0;
      frac   = r[TW -: FRW];
      hidden = r[TW+1];
    end
  end

  assign inexact = o ? (base[1] | st_o) : (base[0] | st_n);
  assign tiny    = ~yu[TW-1] & ~yu[TW-2] & ~yu[TW-3];

  // the half-adder row limits the Z group to a single carry
  always_comb assert (base < 6'd32 && z < 6'd32) else $error("add_round: Z group overflow");
endmodule
