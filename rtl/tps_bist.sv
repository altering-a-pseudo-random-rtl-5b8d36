// tps_bist: test-per-scan BIST with a bit-fixing sequence generator.
//
// A scan-based self-test in which the pseudo-random bits shifted into the
// scan chain are altered on the fly so that deterministic test cubes for
// random-pattern-resistant faults are embedded among the pseudo-random
// patterns. No pattern data is stored: a few AND terms on the LFSR state pick,
// per pattern, which bit-fixing sequence to use, and a decode of the bit
// counter forces the chosen bits. The test runs as one phase of L patterns.
//
//   bfsg       -> scan_bit -> scan_chain.si
//   scan_chain.q            -> cut_in      (pattern applied to the circuit)
//   cut_resp   -> scan_chain.d (captured in the capture state)
//   scan_chain.so           -> sisr        (response compaction)
//   bist_ctrl  sequences the session on the generator's bit counter
//
// The circuit under test itself is outside this module: cut_in drives its
// scanned inputs and flip-flop values, cut_resp returns the values its
// flip-flops/outputs would capture, and cut_capture marks the cycle in which
// it is clocked in normal mode.
//
// Interface: clk, rst_n (async), start (pulse), busy, done, signature (valid
// with done); the other outputs are observation points.
// Timing: (L+1)*(M+1) cycles from start to done; cut_resp is sampled in the
// cut_capture cycle and must be a function of cut_in.
// Defaults are the 5-stage LFSR / 12-cell chain / 12-pattern example; the
// signature register and the session controller are this design's own.
module tps_bist #(
  parameter int unsigned           R        = bfsg_pkg::EX_R,
  parameter int unsigned           M        = bfsg_pkg::EX_M,
  parameter int unsigned           N        = bfsg_pkg::EX_N,
  parameter int unsigned           L        = bfsg_pkg::EX_L,
  parameter int unsigned           SIG_W    = bfsg_pkg::SIG_W,
  parameter logic [R-1:0]          TAPS     = bfsg_pkg::EX_TAPS,
  parameter logic [R-1:0]          SEED     = bfsg_pkg::EX_SEED,
  parameter logic [N-1:0][R-1:0]   SEL_MASK = bfsg_pkg::EX_SEL_MASK,
  parameter logic [N-1:0][R-1:0]   SEL_VAL  = bfsg_pkg::EX_SEL_VAL,
  parameter logic [N-1:0][M-1:0]   FIX0     = bfsg_pkg::EX_FIX0,
  parameter logic [N-1:0][M-1:0]   FIX1     = bfsg_pkg::EX_FIX1,
  parameter logic [SIG_W-1:0]      SIG_POLY = SIG_W'(bfsg_pkg::SIG_POLY)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [M-1:0]     cut_in,
  input  logic [M-1:0]     cut_resp,
  output logic             cut_capture,
  output logic [SIG_W-1:0] signature,
  output logic             scan_in_bit,
  output logic [R-1:0]     lfsr_state,
  output logic [N-1:0]     seq_id,
  output logic             fix0,
  output logic             fix1
);

  localparam int unsigned CW = $clog2(M + 1);

  logic          run, shift, gen_capture, sig_clr, sig_en, scan_out;
  logic [CW-1:0] cnt;

  bist_ctrl #(.M(M), .L(L)) u_ctrl (
    .clk, .rst_n, .start, .cnt, .run, .apply(cut_capture),
    .sig_clr, .sig_en, .busy, .done
  );

  bfsg #(
    .R(R), .M(M), .N(N), .TAPS(TAPS), .SEED(SEED),
    .SEL_MASK(SEL_MASK), .SEL_VAL(SEL_VAL), .FIX0(FIX0), .FIX1(FIX1)
  ) u_gen (
    .clk, .rst_n, .en(run), .scan_bit(scan_in_bit), .shift,
    .capture(gen_capture), .cnt, .lfsr_state, .seq_id, .fix0, .fix1
  );

  scan_chain #(.M(M)) u_chain (
    .clk, .rst_n, .shift, .capture(cut_capture), .si(scan_in_bit),
    .d(cut_resp), .q(cut_in), .so(scan_out)
  );

  // The circuit is only clocked while the generator sits in its capture state.
  a_capture_aligned: assert property (@(posedge clk) disable iff (!rst_n) cut_capture |-> gen_capture)
    else $error("tps_bist: capture outside the counter's capture state");

  sisr #(.W(SIG_W), .POLY(SIG_POLY)) u_sig (
    .clk, .rst_n, .clr(sig_clr), .en(sig_en), .din(scan_out), .sig(signature)
  );

endmodule
