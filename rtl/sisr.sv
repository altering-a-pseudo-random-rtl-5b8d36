// sisr: serial-input signature register.
//
// Compacts the scan-out stream of the circuit under test into a W-bit
// signature. It is an internal-XOR LFSR (polynomial POLY, x^W term implied):
// each enabled cycle the register shifts one place left and, when the bit
// shifted out XOR the input bit is 1, is XORed with POLY. This is the same
// recurrence as a bitwise CRC with zero initial value.
//
// Interface: clk, rst_n (async clear), clr (sync clear at session start),
// en, din, sig. Timing: one bit per enabled cycle.
// Width and polynomial are this design's choice (CRC-CCITT).
module sisr #(
  parameter int unsigned  W    = bfsg_pkg::SIG_W,
  parameter logic [W-1:0] POLY = W'(bfsg_pkg::SIG_POLY)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] sig
);

  logic fb;

  assign fb = sig[W-1] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= {sig[W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

endmodule
