// addend_align: inversion and alignment of the addend significand.
//
// The 53-bit significand is placed at the top of a 161-bit word; for an
// effective subtraction it is inverted and the 108 bits below it are filled
// with ones (one's complement of the whole word).  The word is then shifted
// right by sh (0..161) in eight stages of 128, 64, 32, 16, 8, 4, 2 and 1
// positions, most significant stage first.  Each stage shifts in ones when
// sub = 1 and zeros otherwise, and reports whether any bit it shifts out
// differs from the fill value; the OR of the reports of the active stages is
// st1, the sticky bit of the addend.  The +1 that completes the two's
// complement is not added here (addend_csa adds it when st1 = 0).
// Structure and shift range follow the description; combinational.
module addend_align
  import fma_pkg::*;
(
  input  logic [MW-1:0]  ma,      // addend significand (hidden bit included)
  input  logic           sub,     // effective subtraction
  input  logic [SHW-1:0] sh,      // right shift amount, 0..161
  output logic [AW-1:0]  as_o,    // aligned (and possibly inverted) addend
  output logic           st1      // some nonzero addend bit was shifted out
);
  logic [AW-1:0] stage [SHW+1];
  logic [SHW-1:0] st;

  // bit invert: {~A, ones} or {A, zeros}
  assign stage[0] = sub ? {~ma, {(AW-MW){1'b1}}} : {ma, {(AW-MW){1'b0}}};

  for (genvar k = 0; k < SHW; k++) begin : g_stage
    localparam int unsigned AMT = 1 << (SHW - 1 - k);   // 128 first
    logic [AW-1:0] shifted;
    logic [AMT-1:0] outb;
    assign shifted = sub ? ~((~stage[k]) >> AMT) : (stage[k] >> AMT);
    assign outb    = stage[k][AMT-1:0];
    assign st[k]   = sh[SHW-1-k] & (sub ? ~&outb : |outb);
    assign stage[k+1] = sh[SHW-1-k] ? shifted : stage[k];
  end

  assign as_o = stage[SHW];
  assign st1  = |st;
endmodule
