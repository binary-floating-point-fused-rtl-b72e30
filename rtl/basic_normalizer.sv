// basic_normalizer: normalization shifter of the basic FMA.
//
// Shifts the magnitude left, coarsest stage first: the 54-bit pre-shift
// (pre = 1, the top 54 frame positions hold no data), then 64, 32, 16, 8,
// 4, 2, 1 under the leading zero anticipator amount shamt, and finally a
// correction stage.  The anticipated amount may be one too small, leaving
// the leading one at bit 160 instead of 161; the last stage then shifts by
// one more and reports corr = 1 (the exponent is reduced by one).  When
// the amount was capped for a subnormal result the leading one lies below
// bit 160 and no correction is made.
// Interface: mag, pre, shamt -> n (163 bits), corr.  Combinational.
// The stage order and the correction in the last stage follow the
// description; the test on bits 161/160 is this design's own choice.
module basic_normalizer
  import fma_pkg::*;
(
  input  logic [FW-1:0]  mag,
  input  logic           pre,
  input  logic [LSW-1:0] shamt,       // shamt[LSW-1]: shift by 64
  output logic [FW-1:0]  n,
  output logic           corr
);
  logic [FW-1:0] st [LSW+2];

  assign st[0] = mag;
  assign st[1] = pre ? (st[0] << PRE) : st[0];
  for (genvar k = 0; k < LSW; k++) begin : g_stage
    localparam int unsigned AMT = 1 << (LSW - 1 - k);
    assign st[k+2] = shamt[LSW-1-k] ? (st[k+1] << AMT) : st[k+1];
  end

  assign corr = ~st[LSW+1][FW-1] & ~st[LSW+1][FW-2] & st[LSW+1][FW-3];
  assign n    = corr ? (st[LSW+1] << 1) : st[LSW+1];
endmodule
