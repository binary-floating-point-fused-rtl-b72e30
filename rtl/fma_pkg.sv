// fma_pkg: widths, encodings and small types shared by the double-precision
// fused multiply-add (FMA) unit W = A + (-1)^op * (B * C).
//
// Bit frame used throughout the datapath.  The wide vectors after the
// multiplier are 163 bits, index FW-1 = 162 down to 0.  Bit 160 is where the
// leading bit of the addend sits when it is not shifted ("position 0" of the
// design description, which counts from the most significant end); bits 162
// and 161 are two sign-extension positions above it; bits 105..0 hold the
// 106-bit product.  Position k of the description is bit 160-k here.
// After normalization the leading one of the result is at bit 161 (no LZA
// error) or 160 (LZA error of one), lower only for subnormal results.
// Not every constant is used by every module, so a lint run on a single
// module reports some of them as unused; all are used in the full unit.
package fma_pkg;

  // IEEE 754 binary64
  localparam int unsigned EW   = 11;          // exponent field
  localparam int unsigned FRW  = 52;          // fraction field
  localparam int unsigned MW   = FRW + 1;     // significand with hidden bit
  localparam int unsigned BIAS = 1023;

  // Datapath widths
  localparam int unsigned PW   = 108;           // product carry-save width
  localparam int unsigned AW   = 161;           // alignment shifter width
  localparam int unsigned FW   = AW + 2;        // 163-bit frame
  localparam int unsigned LZW  = 108;           // LZA window / fine shift range
  localparam int unsigned PRE  = 54;            // coarse normalization shift
  localparam int unsigned XW   = 14;            // signed internal exponent
  localparam int unsigned SHW  = 8;             // alignment shift amount width
  localparam int unsigned LSW  = 7;             // LZA shift amount width (S1..S7)
  localparam int unsigned MAXSH = AW;           // 161: addend fully shifted out

  // Rounding mode r[0] r[1] (eq. 4-8 of the description)
  typedef enum logic [1:0] {
    RND_RZ = 2'b00,   // toward zero
    RND_RP = 2'b01,   // toward +infinity
    RND_RM = 2'b10,   // toward -infinity
    RND_RN = 2'b11    // to nearest, ties to even
  } rnd_mode_e;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

  typedef struct packed {
    logic           sign;
    logic [EW-1:0]  exp;
    logic [FRW-1:0] frac;
  } fp64_t;

  // Default NaN returned for an invalid operation (value used in the
  // description's test-vector example).
  localparam logic [63:0] DEFAULT_NAN = 64'hFFF8_0000_0000_0000;

endpackage
