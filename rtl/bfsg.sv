// bfsg: bit-fixing sequence generator.
//
// Produces the serial bit stream that is shifted into the scan chain: a
// pseudo-random LFSR sequence in which selected bits of selected patterns are
// forced to 0 or 1 so that deterministic test cubes for random-pattern-
// resistant faults appear in the scan chain, while patterns that already
// detect faults pass unaltered.
//
// Structure (all parts are separate modules):
//   mod_counter  Mod-(M+1) counter: capture state 0, shift states 1..M
//   lfsr         pseudo-random source, shifts in states 1..M, holds in 0
//   seq_select   decodes the LFSR starting state into Sequence ID bits
//   seq_id_reg   loaded in the capture state, holds during the M shifts
//   seq_gen      counter state x Sequence ID -> fix-to-0 / fix-to-1
//   bit_fix      AND/OR gates at the LFSR serial output
// Because the LFSR holds during the capture state, its state there is the
// starting state of the next pattern, and the decoding and register load
// happen in that same cycle; the pattern is then shifted with its sequence
// fixed. The LFSR does not advance in the capture state, so consecutive
// patterns are consecutive M-bit slices of the LFSR sequence.
//
// Interface: clk, rst_n, en (run); scan_bit is valid whenever shift is high
// (en and a shift state) and is combinational from registers. cnt,
// lfsr_state, seq_id, fix0, fix1 are brought out for observation.
// Timing: one pattern every M+1 enabled cycles.
module bfsg #(
  parameter int unsigned           R        = bfsg_pkg::EX_R,
  parameter int unsigned           M        = bfsg_pkg::EX_M,
  parameter int unsigned           N        = bfsg_pkg::EX_N,
  parameter logic [R-1:0]          TAPS     = bfsg_pkg::EX_TAPS,
  parameter logic [R-1:0]          SEED     = bfsg_pkg::EX_SEED,
  parameter logic [N-1:0][R-1:0]   SEL_MASK = bfsg_pkg::EX_SEL_MASK,
  parameter logic [N-1:0][R-1:0]   SEL_VAL  = bfsg_pkg::EX_SEL_VAL,
  parameter logic [N-1:0][M-1:0]   FIX0     = bfsg_pkg::EX_FIX0,
  parameter logic [N-1:0][M-1:0]   FIX1     = bfsg_pkg::EX_FIX1,
  localparam int unsigned          CW       = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic          scan_bit,
  output logic          shift,
  output logic          capture,
  output logic [CW-1:0] cnt,
  output logic [R-1:0]  lfsr_state,
  output logic [N-1:0]  seq_id,
  output logic          fix0,
  output logic          fix1
);

  logic          lfsr_out;
  logic [N-1:0]  id_next;
  logic          cnt_zero;

  assign capture = en & cnt_zero;
  assign shift   = en & ~cnt_zero;

  mod_counter #(.M(M)) u_cnt (
    .clk, .rst_n, .en, .cnt, .capture(cnt_zero)
  );

  lfsr #(.R(R), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .shift, .state(lfsr_state), .sout(lfsr_out)
  );

  seq_select #(.R(R), .N(N), .SEL_MASK(SEL_MASK), .SEL_VAL(SEL_VAL)) u_sel (
    .state(lfsr_state), .id_next
  );

  seq_id_reg #(.N(N)) u_id (
    .clk, .rst_n, .load(capture), .d(id_next), .q(seq_id)
  );

  seq_gen #(.M(M), .N(N), .FIX0(FIX0), .FIX1(FIX1)) u_gen (
    .seq_id, .cnt, .fix0, .fix1
  );

  bit_fix u_fix (
    .din(lfsr_out), .fix0, .fix1, .dout(scan_bit)
  );

  // The generation logic must never ask for both values of one bit.
  a_fix_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(fix0 && fix1))
    else $error("bfsg: fix-to-0 and fix-to-1 active together");

endmodule
