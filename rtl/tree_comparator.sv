// tree_comparator: binary-tree magnitude comparator of two unsigned words.
// Stage 1 compares 2-bit pairs (eq. 4-1) into greater-than / less-than
// flags; each further stage merges neighbouring flag pairs (eq. 4-2),
// the more significant pair deciding unless it is equal.  gt = x > y,
// lt = x < y, both 0 when equal.  The width is padded with zeros to a
// power of two.  Combinational, log2(W) levels.
module tree_comparator #(
  parameter int unsigned W = 163
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         gt,
  output logic         lt
);
  localparam int unsigned LV = $clog2(W);        // levels after pairing
  localparam int unsigned WP = 1 << LV;          // padded width
  localparam int unsigned NPAIR = WP / 2;

  logic [WP-1:0] xp, yp;
  assign xp = WP'(x);
  assign yp = WP'(y);

  logic [NPAIR-1:0] g [LV];
  logic [NPAIR-1:0] l [LV];

  for (genvar i = 0; i < NPAIR; i++) begin : g_pair
    logic x1, x0, y1, y0;
    assign {x1, x0} = xp[2*i +: 2];
    assign {y1, y0} = yp[2*i +: 2];
    assign g[0][i] = (x1 & ~y1) | (x1 & x0 & ~y0) | (x0 & ~y1 & ~y0);
    assign l[0][i] = (~x1 & y1) | (~x1 & ~x0 & y0) | (~x0 & y1 & y0);
  end

  for (genvar j = 1; j < LV; j++) begin : g_lvl
    localparam int unsigned NN = NPAIR >> j;
    for (genvar i = 0; i < NN; i++) begin : g_node
      assign g[j][i] = g[j-1][2*i+1] | (g[j-1][2*i] & ~l[j-1][2*i+1]);
      assign l[j][i] = l[j-1][2*i+1] | (~g[j-1][2*i+1] & l[j-1][2*i]);
    end
    for (genvar i = NN; i < NPAIR; i++) begin : g_pad
      assign g[j][i] = 1'b0;
      assign l[j][i] = 1'b0;
    end
  end

  assign gt = g[LV-1][0];
  assign lt = l[LV-1][0];
endmodule
