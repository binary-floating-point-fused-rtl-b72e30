// basic_rounder: rounding and post-normalization of the basic FMA.
//
// Input is the normalized magnitude n: leading one at bit 161 for a normal
// result (bit 162 is allowed for safety), at or below bit 160 for a
// subnormal or zero result.  The 53 bits from the leading position down are
// the significand; the next bit is the round bit R, and the OR of all lower
// bits and the addend sticky st1 is the sticky bit S.
//   round up:  nearest-even  R & (S | LSB)
//              toward +inf / -inf (away from zero for this sign)  R | S
//              toward zero  never
// The incremented significand may carry into a new position; it is then
// post-normalized (adj one higher, fraction zero).
// Interface: same result outputs as add_round (frac, adj, hidden, inexact,
// tiny), so both architectures share the exception/packing block:
//   adj 1 = leading one at bit 161, adj 0 = read at bit 160 (hidden may be 0).
// Combinational.  The rounder itself follows the description; the output
// encoding is this design's own choice.
module basic_rounder
  import fma_pkg::*;
(
  input  logic [FW-1:0]  n,
  input  logic           st1,
  input  rnd_mode_e      mode,
  input  logic           sign,
  output logic [FRW-1:0] frac,
  output logic [1:0]     adj,
  output logic           hidden,
  output logic           inexact,
  output logic           tiny
);
  logic [1:0]  pos;
  logic [FW-1:0] sn;
  logic [MW-1:0] m;
  logic [MW:0]   mr;
  logic r, s, up, ri;

  // read position: bit 162, 161 or 160; sn has the significand at 160..108
  assign pos = n[FW-1] ? 2'd2 : (n[FW-2] ? 2'd1 : 2'd0);
  assign sn  = n >> pos;
  assign m   = sn[FW-3 -: MW];
  assign r   = sn[FW-3-MW];
  assign s   = st1 | (|sn[FW-4-MW:0]) | (pos[1] & n[1]) | (|pos & n[0]);

  assign ri = (~sign & (mode == RND_RP)) | (sign & (mode == RND_RM));
  always_comb begin
    unique case (1'b1)
      mode == RND_RN: up = r & (s | m[0]);
      ri:             up = r | s;
      default:        up = 1'b0;
    endcase
  end

  assign mr = {1'b0, m} + (MW+1)'(up);
  always_comb begin
    if (mr[MW]) begin
      adj    = pos + 2'd1;
      frac   = '0;
      hidden = 1'b1;
    end else begin
      adj    = pos;
      frac   = mr[FRW-1:0];
      hidden = mr[FRW];
    end
  end

  assign inexact = r | s;
  assign tiny    = ~n[FW-1] & ~n[FW-2] & ~n[FW-3];

  always_comb assert (!(pos == 2'd2 && mr[MW])) else $error("basic_rounder: adj overflow");
endmodule
