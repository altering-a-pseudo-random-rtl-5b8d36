// mod_counter: Mod-(M+1) bit counter of the test-per-scan BIST controller.
//
// Counts the bits shifted into an M-cell scan chain. State 0 is the capture
// state (the "(m+1)-th" state): the scan chain is full, the pattern is
// applied and the response captured, and the LFSR holds the starting state of
// the next pattern. States 1..M are the shift states "cnt-1" .. "cnt-M": in
// state j the j-th bit of the next pattern is shifted in. The counter wraps
// from M back to 0.
//
// Interface: clk, rst_n (async, to state 0), en (advance), cnt, capture.
// Timing: one state per enabled cycle, so a pattern takes M+1 cycles.
// Encoding of the capture state as 0 is this design's choice.
module mod_counter #(
  parameter int unsigned M  = bfsg_pkg::EX_M,
  localparam int unsigned CW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [CW-1:0] cnt,
  output logic          capture
);

  assign capture = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= (cnt == CW'(M)) ? '0 : cnt + 1'b1;
  end

endmodule
