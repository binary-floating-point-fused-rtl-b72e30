// adder_anticipation: the part of the dual adder that is moved in front of
// the normalization shifter (half-adder row plus bit propagate/generate).
//
// A row of half adders turns the CSA words s, c into hs = s ^ c and
// hc = (s & c) << 1.  The row is duplicated for inverted inputs, used when
// comp = 1 to form the two's complement -(s + c) = ~s + ~c + 2: the HA sum is
// the same for inverted inputs, so only the carry is recomputed as
// (~s & ~c) << 1, and the first of the two +1 goes into its free bit 0.
// From the selected HA outputs the bit propagate p = hs ^ hc and generate
// g = hs & hc are formed.  The generate word is output already moved to the
// weight of the carry it produces, y = {g, cin}: its free bit 0 takes the
// second +1 (cin = comp & ~st1, see fma_top) before the normalization shift,
// so that this +1 travels with the data through the shifter.  Then
//   p + y == hs + hc + cin   (mod 2^163).
// Combinational.
module adder_anticipation
  import fma_pkg::*;
(
  input  logic [FW-1:0] s,
  input  logic [FW-1:0] c,
  input  logic          comp,
  input  logic          cin,
  output logic [FW-1:0] p,
  output logic [FW-1:0] y
);
  logic [FW-1:0] hs, hc_pos, hc_neg, hc;
  logic [FW-2:0] g;
  assign hs     = s ^ c;
  assign hc_pos = {s[FW-2:0] & c[FW-2:0], 1'b0};
  assign hc_neg = {~s[FW-2:0] & ~c[FW-2:0], 1'b1};
  assign hc     = comp ? hc_neg : hc_pos;
  assign p      = hs ^ hc;
  assign g      = hs[FW-2:0] & hc[FW-2:0];
  assign y      = {g[FW-2:0], cin};
endmodule
