// norm_shifter: normalization left shift of the propagate/generate vectors.
//
// Stage 0 is the coarse 54-bit shift, taken when pre = 1 (d <= 1: the top 54
// positions of the frame then hold only sign extension, so this shift can be
// done before the LZA has produced anything).  The following seven stages
// shift by 64, 32, 16, 8, 4, 2, 1 under control of the LZA encoder bits
// S1..S7, coarsest first, so each stage can start as soon as its bit is
// known.  p and g are shifted alike; zeros enter from the right.
// Shift amounts 0..54+127.  Combinational.
module norm_shifter
  import fma_pkg::*;
(
  input  logic [FW-1:0]  p_i,
  input  logic [FW-1:0]  g_i,
  input  logic           pre,
  input  logic [LSW-1:0] shamt,       // shamt[LSW-1] = S1 (64)
  output logic [FW-1:0]  p_o,
  output logic [FW-1:0]  g_o
);
  logic [FW-1:0] ps [LSW+2];
  logic [FW-1:0] gs [LSW+2];

  assign ps[0] = p_i;
  assign gs[0] = g_i;
  assign ps[1] = pre ? (ps[0] << PRE) : ps[0];
  assign gs[1] = pre ? (gs[0] << PRE) : gs[0];

  for (genvar k = 0; k < LSW; k++) begin : g_stage
    localparam int unsigned AMT = 1 << (LSW - 1 - k);
    assign ps[k+2] = shamt[LSW-1-k] ? (ps[k+1] << AMT) : ps[k+1];
    assign gs[k+2] = shamt[LSW-1-k] ? (gs[k+1] << AMT) : gs[k+1];
  end

  assign p_o = ps[LSW+1];
  assign g_o = gs[LSW+1];
endmodule
