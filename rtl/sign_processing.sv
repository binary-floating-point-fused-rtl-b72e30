// sign_processing: effective operation and sign of the result.
//   sbc     = sb ^ sc                       sign of B*C
//   eff_sub = op ^ sa ^ sbc                 A and (-1)^op*B*C differ in sign
//   sw      = comp ? sa : sbc ^ op          comp = 1: |A| > |B*C|
// op = 1 negates the product (W = A - B*C).  When A is zero the operation is
// forced to an addition so that the addend path contributes nothing and no
// complement is taken (this design's choice; the zero-addend case is not
// discussed in the description).  Combinational.
module sign_processing (
  input  logic sa,
  input  logic sb,
  input  logic sc,
  input  logic op,
  input  logic a_zero,
  input  logic comp,
  output logic eff_sub,
  output logic sw
);
  logic sbc;
  assign sbc     = sb ^ sc;
  assign eff_sub = (op ^ sa ^ sbc) & ~a_zero;
  assign sw      = comp ? sa : (sbc ^ op);
endmodule
