// booth_ppgen: radix-4 (modified Booth) recoding of the multiplier C and
// generation of the partial products of the multiplicand B.
//
// Each digit j = 0..NP-1 looks at C bits 2j+1, 2j, 2j-1 (C[-1] = 0, bits
// above the significand are 0) and selects 0, +-B or +-2B.  A negative
// partial product is the bitwise inverse of |digit|*B, sign extended over
// the full PW-bit word; the +1 that completes its two's complement is placed
// in the free bit 2j of the next partial product (the last digit is never
// negative because C's top recoding group is {0, c52, c51}).  All rows are
// PW-bit two's-complement words, so their sum is B*C mod 2^PW.
// Digit encoding follows the usual Booth table: 000/111 -> 0, 001/010 -> +B,
// 011 -> +2B, 100 -> -2B, 101/110 -> -B.  Combinational.
module booth_ppgen
  import fma_pkg::*;
#(
  parameter int unsigned N   = MW,          // operand width
  parameter int unsigned NP  = (N + 2) / 2, // number of partial products
  parameter int unsigned W   = PW           // partial product width
) (
  input  logic [N-1:0] b,                   // multiplicand
  input  logic [N-1:0] c,                   // multiplier (recoded)
  output logic [W-1:0] pp [NP]
);
  // C padded with a 0 below bit 0 and zeros above the top
  logic [2*NP:0] cx;
  assign cx = {{(2*NP-N){1'b0}}, c, 1'b0};

  logic [NP-1:0] neg, one, two;

  for (genvar j = 0; j < NP; j++) begin : g_digit
    logic [2:0]   grp;
    logic [W-1:0] mag, row;
    assign grp    = cx[2*j +: 3];
    assign one[j] = grp[1] ^ grp[0];
    assign two[j] = (grp == 3'b011) || (grp == 3'b100);
    assign neg[j] = grp[2] & ~(grp[1] & grp[0]);
    assign mag    = one[j] ? W'(b) : (two[j] ? (W'(b) << 1) : '0);
    assign row    = neg[j] ? ~mag : mag;
    if (j == 0) begin : g_first
      assign pp[j] = row;
    end else begin : g_next
      // row shifted by 2j; the +1 of the previous negative digit at bit 2j-2
      logic [W-1:0] inj;
      assign inj   = W'(neg[j-1]) << (2*j - 2);
      assign pp[j] = (row << (2*j)) | inj;
    end
  end
endmodule
