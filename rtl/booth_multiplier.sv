// booth_multiplier: 53 x 53 significand multiplier of the FMA, result kept
// in carry-save form.  booth_ppgen recodes C in radix 4 and forms 27 partial
// products of B; csa_tree reduces them to a sum word ps and a carry word pc.
//   ps + pc == mb * mc  (mod 2^PW)
// Because the product is below 2^106 and the words are PW = 108 bits wide,
// ps + pc is either the product or the product + 2^108; the second case is
// recognised by bit 107 of either word (see addend_csa).
// Combinational; no carry-propagate adder is used.
module booth_multiplier
  import fma_pkg::*;
#(
  parameter int unsigned N = MW,
  parameter int unsigned W = PW
) (
  input  logic [N-1:0] mb,
  input  logic [N-1:0] mc,
  output logic [W-1:0] ps,
  output logic [W-1:0] pc
);
  localparam int unsigned NP = (N + 2) / 2;
  logic [W-1:0] pp [NP];

  booth_ppgen #(.N(N), .NP(NP), .W(W)) u_ppgen (.b(mb), .c(mc), .pp(pp));
  csa_tree    #(.N(NP), .W(W))         u_tree  (.in(pp), .sum(ps), .carry(pc));
endmodule
