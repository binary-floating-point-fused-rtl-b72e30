// lza_logic: leading-zero anticipation string of a two-word sum (eqs. 3-1,
// 3-2).  With t = a^b, g = a&b, z = ~a&~b and positions counted from the
// most significant bit (bit W-1 here is position 0):
//   f(0) = ~t(0) & t(1)
//   f(i) = t(i-1) & (g(i)&~z(i+1) | z(i)&~g(i+1))
//        | ~t(i-1) & (z(i)&~z(i+1) | g(i)&~g(i+1))          i > 0
// with g and z taken as 0 below the least significant bit.  The first 1 of
// f marks the leading digit of a + b: the first 1 of the sum (for a
// negative sum, the first 0) is at that position or one below it, the
// one-position error that add_round absorbs.  Works on two's-complement
// words of either sign; the top position must be a sign position.
// Combinational.
module lza_logic #(
  parameter int unsigned W = 108
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] f
);
  logic [W-1:0] t;
  logic [W-2:0] g, z;           // bit W-1 of g and z is never needed
  logic [W-2:0] gl, zl;         // g, z with a 0 appended below bit 0

  assign t  = a ^ b;
  assign g  = a[W-2:0] & b[W-2:0];
  assign z  = ~a[W-2:0] & ~b[W-2:0];
  assign gl = {g[W-3:0], 1'b0};
  assign zl = {z[W-3:0], 1'b0};

  assign f[W-1] = ~t[W-1] & t[W-2];
  for (genvar k = 0; k < W-1; k++) begin : g_f
    // gl[k] / zl[k] are g / z one position less significant than bit k
    assign f[k] = ( t[k+1] & ((g[k] & ~zl[k]) | (z[k] & ~gl[k])))
                | (~t[k+1] & ((z[k] & ~zl[k]) | (g[k] & ~gl[k])));
  end
endmodule
