// bist_ctrl: session control of the test-per-scan BIST.
//
// One BIST session applies L patterns in a single phase. It is organised in
// L+1 rounds of M+1 cycles, following the Mod-(M+1) bit counter:
//   round 0      : capture state idle, pattern 1 shifted in
//   round k=1..L : capture state applies pattern k (the circuit's response is
//                  loaded into the scan chain), then the response is shifted
//                  out into the signature register while pattern k+1 is
//                  shifted in (the one shifted in round L is not applied)
// After round L the controller stops the generator and raises done, which
// stays high until reset. A session takes (L+1)*(M+1) cycles after start.
//
// Interface: clk, rst_n, start (pulse, taken when idle), cnt (bit counter
// state from the generator), run (generator enable), apply (capture the
// circuit's response), sig_clr, sig_en (compact scan-out), busy, done.
// The round structure and the one-session-per-reset rule are this design's
// choices; the document fixes only the test length and the counter.
module bist_ctrl #(
  parameter int unsigned M  = bfsg_pkg::EX_M,
  parameter int unsigned L  = bfsg_pkg::EX_L,
  localparam int unsigned CW = $clog2(M + 1),
  localparam int unsigned PW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] cnt,
  output logic          run,
  output logic          apply,
  output logic          sig_clr,
  output logic          sig_en,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;

  state_e        state;
  logic [PW-1:0] round;

  assign run     = (state == RUN);
  assign busy    = run;
  assign done    = (state == DONE);
  assign apply   = run && (cnt == '0) && (round != '0);
  assign sig_en  = run && (cnt != '0) && (round != '0);
  assign sig_clr = (state == IDLE) && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      round <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= RUN;
          round <= '0;
        end
        RUN: if (cnt == CW'(M)) begin
          if (round == PW'(L)) state <= DONE;
          else                 round <= round + 1'b1;
        end
        DONE: ;
        default: state <= IDLE;
      endcase
    end
  end

  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt <= CW'(M))
    else $error("bist_ctrl: bit counter out of range");

endmodule
