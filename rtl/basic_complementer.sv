// basic_complementer: magnitude of the CPA result in the basic FMA.
//
// A negative CPA result (neg = 1) is turned into its magnitude.  The
// effective-subtraction +1 was only injected into the CSA when no addend
// bit was lost in the alignment (st1 = 0), so:
//   st1 = 0: the CPA result is exact        -> magnitude = ~sum + 1
//   st1 = 1: the true value lies between sum and sum + 1 (the addend tail
//            is missing), so its magnitude lies between ~sum and ~sum + 1
//            -> magnitude = ~sum, with the sticky bit marking the rest.
// A positive result passes unchanged.
// Interface: sum, neg, st1 -> mag (163 bits, top bit always 0).
// Combinational.  The description places a complementer after the CPA;
// the st1 rule above is this design's own choice.
module basic_complementer
  import fma_pkg::*;
(
  input  logic [FW-1:0] sum,
  input  logic          neg,
  input  logic          st1,
  output logic [FW-1:0] mag
);
  logic inc;
  assign inc = ~st1;
  assign mag = neg ? (~sum + FW'(inc)) : sum;
endmodule
