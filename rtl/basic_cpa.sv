// basic_cpa: carry propagate adder of the basic (IBM RS/6000 style) FMA.
//
// Adds the sum and carry words of the 3:2 CSA into one 163-bit two's
// complement result.  The top bit of the result is its sign (neg); the
// complementer uses it to form the magnitude.  In the basic organisation
// this adder, not a separate sign detector, decides the sign of the result.
// Interface: s, c (163 bits) -> sum (163 bits), neg.  Combinational.
// The adder is written as a behavioural '+' (the description does not fix
// the adder structure; synthesis picks one).
module basic_cpa
  import fma_pkg::*;
(
  input  logic [FW-1:0] s,
  input  logic [FW-1:0] c,
  output logic [FW-1:0] sum,
  output logic          neg
);
  assign sum = s + c;
  assign neg = sum[FW-1];
endmodule
