// addend_csa: 3:2 carry-save addition of the aligned addend and the product.
//
// Inputs are the product words ps/pc (PW = 108 bits) and the aligned addend
// (161 bits), which is sign-extended by two bits into the 163-bit frame.
// The low PW bits go through a row of full adders.  Above them the product
// contributes only its sign extension: when one of the product words has its
// top bit set, ps + pc overflowed 2^108 and the extension is all ones,
// otherwise all zeros.  There the CSA reduces to two multiplexers, as in the
// description: sum = A or ~A, carry = 0 or A, chosen by that bit.
// The carry word is shifted left by one; its free bit 0 receives inj, the +1
// that completes the two's complement of the addend (sub and no addend bit
// shifted out).  Result: s + c == aligned addend + product + inj (mod 2^FW).
// Combinational.
module addend_csa
  import fma_pkg::*;
(
  input  logic [PW-1:0] ps,
  input  logic [PW-1:0] pc,
  input  logic [AW-1:0] as_i,
  input  logic          sub,
  input  logic          inj,
  output logic [FW-1:0] s,
  output logic [FW-1:0] c
);
  logic [FW-1:0] af;
  logic [FW-2:0] maj;
  logic          wrap;

  assign af   = {{(FW-AW){sub}}, as_i};
  assign wrap = ps[PW-1] | pc[PW-1];

  assign s[PW-1:0]   = af[PW-1:0] ^ ps ^ pc;
  assign maj[PW-1:0] = (af[PW-1:0] & ps) | (af[PW-1:0] & pc) | (ps & pc);

  assign s[FW-1:PW]   = wrap ? ~af[FW-1:PW] : af[FW-1:PW];
  assign maj[FW-2:PW] = wrap ?  af[FW-2:PW] : '0;

  assign c = {maj[FW-2:0], inj};
endmodule
