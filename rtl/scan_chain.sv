// scan_chain: M-cell mux-D scan chain of the circuit under test.
//
// In a shift cycle every cell takes its left neighbour, the leftmost cell
// (q[M-1]) takes the scan-in bit, and the rightmost cell (q[0]) drives the
// scan-out. After M shifts the first bit shifted in sits in q[0], so q read as
// a literal is the pattern in the order it is written in the example tables.
// In a capture cycle all cells load the circuit's response d in parallel.
// Shift has priority over capture; with neither the chain holds.
//
// Interface: clk, rst_n (async clear), shift, capture, si, d, q, so.
// Timing: one bit per shift cycle; q drives the circuit under test.
// The cell order and the clear on reset are this design's choices.
module scan_chain #(
  parameter int unsigned M = bfsg_pkg::EX_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         capture,
  input  logic         si,
  input  logic [M-1:0] d,
  output logic [M-1:0] q,
  output logic         so
);

  assign so = q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (shift)   q <= {si, q[M-1:1]};
    else if (capture) q <= d;
  end

endmodule
