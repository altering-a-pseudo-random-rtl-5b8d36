// seq_gen: Bit-Fixing Sequence Generation Logic.
//
// Turns the Sequence ID Register and the bit counter into the fix-to-0 and
// fix-to-1 controls. For every active Sequence ID bit i, counter state
// "cnt-j" (j = 1..M) raises fix0 if bit j-1 of FIX0[i] is set and fix1 if
// bit j-1 of FIX1[i] is set; the contributions of all active bits are ORed.
// In the capture state (cnt = 0) and the unused counter codes no control is
// raised. This is the two-level sum of counter-state decodes that a logic
// optimiser would factor; the table form leaves that to synthesis.
//
// Defaults: id0 fixes the 1st shifted bit to 0 and the 10th to 1, id1 fixes
// the 2nd shifted bit to 0.
// Interface: seq_id, cnt, fix0, fix1. Purely combinational.
module seq_gen #(
  parameter int unsigned            M    = bfsg_pkg::EX_M,
  parameter int unsigned            N    = bfsg_pkg::EX_N,
  parameter logic [N-1:0][M-1:0]    FIX0 = bfsg_pkg::EX_FIX0,
  parameter logic [N-1:0][M-1:0]    FIX1 = bfsg_pkg::EX_FIX1,
  localparam int unsigned           CW   = $clog2(M + 1)
) (
  input  logic [N-1:0]  seq_id,
  input  logic [CW-1:0] cnt,
  output logic          fix0,
  output logic          fix1
);

  logic [M-1:0] pos;  // one-hot decode of the shift state

  always_comb begin
    for (int j = 0; j < M; j++) pos[j] = (cnt == CW'(j + 1));
    fix0 = 1'b0;
    fix1 = 1'b0;
    for (int i = 0; i < N; i++) begin
      fix0 |= seq_id[i] & |(pos & FIX0[i]);
      fix1 |= seq_id[i] & |(pos & FIX1[i]);
    end
  end

endmodule
