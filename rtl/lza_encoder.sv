// lza_encoder: normalization shift amount from the LZA string, produced
// most significant bit first so the shifter can start on S1 (Lang/Bruguera
// encoding, Figure 4-3 of the description generalised to 128 positions).
//
// Position 0 is bit W-1 of f.  S1 (weight 64) says that positions 0..63 hold
// no 1; S2 (32) checks positions 0..31 or 64..95 depending on S1; and so on:
// bit Sk checks, for every aligned block of 2^(8-k) positions, whether its
// first half is empty (a NOR gate per block), and the bits already known
// select the block through a tree of 2:1 multiplexers.  Positions W..127 are
// empty.  The result is the index of the first 1 (127 if there is none).
// lim_en / lim_pos add a 1 at position lim_pos before encoding; this caps the
// shift where the exponent would fall below the subnormal limit (this
// design's addition for subnormal results).  Combinational.
module lza_encoder
  import fma_pkg::*;
#(
  parameter int unsigned W  = LZW,
  parameter int unsigned SW = LSW
) (
  input  logic [W-1:0]  f,
  input  logic          lim_en,
  input  logic [SW-1:0] lim_pos,
  output logic [SW-1:0] shamt          // shamt[SW-1] = S1 ... shamt[0] = S7
);
  localparam int unsigned NP = 1 << SW;   // 128 positions

  logic [NP-2:0] fr;                      // fr[i] = position i
  always_comb begin
    fr = '0;
    for (int i = 0; i < W; i++) fr[i] = f[W-1-i];
    if (lim_en) fr[lim_pos] = 1'b1;
  end

  for (genvar k = 0; k < SW; k++) begin : g_bit
    localparam int unsigned HALF = 1 << k;            // size of checked half
    localparam int unsigned NB   = NP >> (k + 1);     // number of blocks
    logic [NB-1:0] empty;
    for (genvar m = 0; m < NB; m++) begin : g_nor
      assign empty[m] = ~|fr[m*2*HALF +: HALF];
    end
    if (k == SW - 1) begin : g_top
      assign shamt[k] = empty[0];
    end else begin : g_sel
      // block chosen by the already computed, more significant bits
      logic [SW-2-k:0] blk;
      assign blk      = shamt[SW-1:k+1];
      assign shamt[k] = empty[blk];
    end
  end
endmodule
