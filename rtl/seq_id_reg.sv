// seq_id_reg: Sequence ID Register.
//
// Holds the identifier of the bit-fixing sequence used for the pattern being
// shifted. It is loaded from the selection logic in the capture state, right
// before the first bit of a pattern is shifted, and then holds for the M
// shift cycles. With N bits one of 2^N bit-fixing sequences can be chosen per
// pattern; each bit acts independently on the fixing controls.
//
// Interface: clk, rst_n (async clear: no fixing), load, d, q.
// Timing: q changes on the clock edge that ends the capture state.
module seq_id_reg #(
  parameter int unsigned N = bfsg_pkg::EX_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
