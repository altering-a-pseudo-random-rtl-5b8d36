// seq_select: Bit-Fixing Sequence Selection Logic.
//
// Decodes the LFSR starting state of the next pattern into the Sequence ID
// bits. Each Sequence ID bit i is one AND gate over the literals of an
// implicant of F', the complement of the set of starting states whose
// patterns detect faults for the first time: id_next[i] = 1 when every stage
// named in SEL_MASK[i] equals the value in SEL_VAL[i]. Choosing implicants of
// F' means a pattern that already drops faults is never altered.
//
// Defaults: id0 = 00XXX, id1 = XX11X (leftmost stage first).
// Interface: state (LFSR, leftmost stage = bit R-1), id_next. Purely
// combinational.
module seq_select #(
  parameter int unsigned              R        = bfsg_pkg::EX_R,
  parameter int unsigned              N        = bfsg_pkg::EX_N,
  parameter logic [N-1:0][R-1:0]      SEL_MASK = bfsg_pkg::EX_SEL_MASK,
  parameter logic [N-1:0][R-1:0]      SEL_VAL  = bfsg_pkg::EX_SEL_VAL
) (
  input  logic [R-1:0] state,
  output logic [N-1:0] id_next
);

  always_comb begin
    for (int i = 0; i < N; i++)
      id_next[i] = ((state ^ SEL_VAL[i]) & SEL_MASK[i]) == '0;
  end

endmodule
