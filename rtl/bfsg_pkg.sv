// bfsg_pkg: constants of the bit-fixing BIST example configuration.
//
// The default configuration is the small worked example of the scheme: a
// 5-stage LFSR (r = 5) feeding a 12-bit scan chain (m = 12) for a test length
// of 12 patterns (L = 12), with a 2-bit Sequence ID Register (n = 2).
//
// Bit conventions used throughout the RTL:
//  * LFSR states are written leftmost stage first, as a Verilog literal, so
//    5'b01011 is the state "01011". The rightmost stage (bit 0) is the serial
//    output; a shift moves every stage one place right and loads the feedback
//    into the leftmost stage (bit R-1).
//  * A scan pattern is also written as a literal: bit 0 (rightmost) is the
//    first bit shifted into the chain, bit M-1 the last. Counter state "cnt-j"
//    shifts bit j-1 of the pattern.
//  * Per-Sequence-ID tables are packed arrays indexed [id][position].
//
// The LFSR feedback (x^5 + x^2 + 1) is the polynomial that reproduces the
// example pattern table; the decoding implicants and fixed positions are the
// ones of the example's generation logic. The signature register width and
// polynomial are this design's own choice.
package bfsg_pkg;

  localparam int unsigned EX_R = 5;   // LFSR stages
  localparam int unsigned EX_M = 12;  // scan chain length
  localparam int unsigned EX_N = 2;   // Sequence ID Register bits
  localparam int unsigned EX_L = 12;  // test length in patterns

  // o[k+5] = o[k] ^ o[k+2]: feedback from the output stage and the stage two
  // places to its left.
  localparam logic [EX_R-1:0] EX_TAPS = 5'b00101;
  localparam logic [EX_R-1:0] EX_SEED = 5'b01011;

  // Selection logic: Sequence ID bit i is set when (state & MASK[i]) == VAL[i].
  //   id0: first two stages both 0 (implicant 00XXX)
  //   id1: third and fourth stages both 1 (implicant XX11X)
  localparam logic [EX_N-1:0][EX_R-1:0] EX_SEL_MASK = {5'b00110, 5'b11000};
  localparam logic [EX_N-1:0][EX_R-1:0] EX_SEL_VAL  = {5'b00110, 5'b00000};

  // Generation logic: bit j-1 of FIX0[i] / FIX1[i] set means "when Sequence ID
  // bit i is active, fix the j-th shifted bit to 0 / 1".
  //   id0: cnt-1 -> 0, cnt-10 -> 1;  id1: cnt-2 -> 0
  localparam logic [EX_N-1:0][EX_M-1:0] EX_FIX0 = {12'b0000_0000_0010, 12'b0000_0000_0001};
  localparam logic [EX_N-1:0][EX_M-1:0] EX_FIX1 = {12'b0000_0000_0000, 12'b0010_0000_0000};

  // Serial signature register (own choice: CRC-CCITT polynomial).
  localparam int unsigned   SIG_W    = 16;
  localparam logic [15:0]   SIG_POLY = 16'h1021;

endpackage
