// csa_row: one row of 3:2 carry-save adders (full adders side by side).
// Three W-bit words in, a sum word and a carry word out with
// sum + carry == a + b + c (mod 2^W).  The carry word is already shifted one
// place to the left, its bit 0 is 0.  Purely combinational.
module csa_row #(
  parameter int unsigned W = 108
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-2:0] maj;
  assign sum   = a ^ b ^ c;
  assign maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign carry = {maj[W-2:0], 1'b0};
endmodule
