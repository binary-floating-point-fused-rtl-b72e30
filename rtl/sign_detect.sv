// sign_detect: sign detection of the CSA output (eq. 4-4).
//
// In an effective subtraction exactly one of the two CSA words is negative
// (their sign bits are 10 or 01).  The magnitude of the positive word is
// compared with the one's complement (magnitude - 1) of the negative word in
// a tree comparator, which avoids a carry-propagate adder.  The sum is
// negative when the negative word wins or when the two are equal:
//   comp = ((GT & s_msb | LT & c_msb | ~GT & ~LT) & E | d_pos & ~E) & sub
// E marks the cases where the exponents do not decide (d = 0 or 1, or a
// subnormal operand); otherwise d >= 2 means negative, d < 0 positive.
// The description compares 109 bits; here the comparator spans the whole
// 163-bit frame so that subnormal operands, whose significant bits can lie
// anywhere in the frame, are covered too.  Combinational.
module sign_detect
  import fma_pkg::*;
#(
  parameter int unsigned CW = FW              // compared width
) (
  input  logic [FW-1:0] s,
  input  logic [FW-1:0] c,
  input  logic          eq_exp,
  input  logic          d_pos,
  input  logic          sub,
  output logic          comp
);
  logic [CW-1:0] xm, ym;
  logic gt, lt, s_msb, c_msb;

  assign s_msb = s[FW-1];
  assign c_msb = c[FW-1];
  assign xm = s_msb ? ~s[CW-1:0] : s[CW-1:0];
  assign ym = c_msb ? ~c[CW-1:0] : c[CW-1:0];

  tree_comparator #(.W(CW)) u_cmp (.x(xm), .y(ym), .gt(gt), .lt(lt));

  assign comp = (((gt & s_msb) | (lt & c_msb) | (~gt & ~lt)) & eq_exp
                 | (d_pos & ~eq_exp)) & sub;
endmodule
