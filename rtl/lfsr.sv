// lfsr: R-stage pseudo-random bit source for test-per-scan BIST.
//
// An external-XOR shift register. The serial output is the rightmost stage
// (state[0]); on each cycle with `shift` high every stage moves one place
// right and the leftmost stage (state[R-1]) loads the XOR of the stages
// selected by TAPS. With the defaults (x^5 + x^2 + 1, seed 01011) the output
// cut into 12-bit slices gives exactly the twelve scan patterns of the
// example configuration. The register holds while `shift` is low, so between
// patterns `state` is the starting state of the next pattern, which the
// selection logic decodes.
//
// Interface: clk, rst_n (async, loads SEED), shift, state, sout.
// Timing: sout is combinational from the register; one bit per shift cycle.
// The feedback polynomial is derived from the example's pattern table; the
// reset-to-seed behaviour is this design's choice.
module lfsr #(
  parameter int unsigned     R    = bfsg_pkg::EX_R,
  parameter logic [R-1:0]    TAPS = bfsg_pkg::EX_TAPS,
  parameter logic [R-1:0]    SEED = bfsg_pkg::EX_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  output logic [R-1:0] state,
  output logic         sout
);

  logic fb;

  assign fb   = ^(state & TAPS);
  assign sout = state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= SEED;
    else if (shift) state <= {fb, state[R-1:1]};
  end

  initial assert (SEED != '0) else $error("lfsr: all-zero seed locks the LFSR");

endmodule
