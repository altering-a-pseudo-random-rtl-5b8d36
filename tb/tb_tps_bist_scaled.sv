// tb_tps_bist_scaled: the test-per-scan BIST at the size of a published
// benchmark configuration: a 34-cell scan chain, a 14-stage LFSR, 3 Sequence
// ID bits and a test length of 10,000 patterns.
//
// The selection implicants and fixed positions of that configuration depend
// on the circuit's test cubes and are not reproduced; this testbench uses
// placeholder tables of the same shape (three implicants, including two that
// overlap so that several ID bits act on one pattern, and a handful of fixed
// bits). The LFSR polynomial is x^14+x^13+x^12+x^2+1 (maximal length,
// period 16383). Every applied pattern is compared with an independent
// software model of the LFSR, selection and fixing; the final signature is
// compared with a CRC of the modelled responses, and the session length with
// (L+1)*(M+1) cycles.
module tb_tps_bist_scaled;
  localparam int R = 14, M = 34, N = 3, L = 10000;
  localparam logic [R-1:0] TAPS = 14'h3005;
  localparam logic [R-1:0] SEED = 14'h0001;
  // id0: stages 13..11 = 000; id1: stage 12 = 0 and stage 10 = 1 (overlaps
  // id0); id2: stages 7..4 = 1010
  localparam logic [N-1:0][R-1:0] SEL_MASK = {14'b00_0000_1111_0000, 14'b01_0100_0000_0000, 14'b11_1000_0000_0000};
  localparam logic [N-1:0][R-1:0] SEL_VAL  = {14'b00_0000_1010_0000, 14'b00_0100_0000_0000, 14'b00_0000_0000_0000};
  localparam logic [N-1:0][M-1:0] FIX0 = {34'h0_0000_0104, 34'h0_8000_0001, 34'h0_0001_0000};
  localparam logic [N-1:0][M-1:0] FIX1 = {34'h2_0000_0000, 34'h0_0010_0000, 34'h0_0000_0820};

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, cut_capture, scan_in_bit, fix0, fix1;
  logic [M-1:0] cut_in, cut_resp;
  logic [15:0] signature;
  logic [R-1:0] lfsr_state;
  logic [N-1:0] seq_id;
  int checks = 0, failures = 0, mismatches = 0;
  int n_capture = 0, n_altered = 0, n_multi = 0, cycles = 0;
  logic [15:0] exp_sig;
  logic [R-1:0] model;  // software LFSR, advanced one pattern at a time

  tps_bist #(
    .R(R), .M(M), .N(N), .L(L), .TAPS(TAPS), .SEED(SEED),
    .SEL_MASK(SEL_MASK), .SEL_VAL(SEL_VAL), .FIX0(FIX0), .FIX1(FIX1)
  ) dut (
    .clk, .rst_n, .start, .busy, .done, .cut_in, .cut_resp, .cut_capture,
    .signature, .scan_in_bit, .lfsr_state, .seq_id, .fix0, .fix1
  );

  function automatic logic [M-1:0] cut_fn(logic [M-1:0] p);
    return {p[M-2:0], ^p} ^ 34'h2_5A5A_1234;
  endfunction
  assign cut_resp = cut_fn(cut_in);

  function automatic logic [15:0] crc_step(logic [15:0] c, logic b);
    logic top = c[15] ^ b;
    c = c << 1;
    if (top) c ^= 16'h1021;
    return c;
  endfunction

  // expected next pattern from the software model; advances the model
  function automatic logic [M-1:0] next_pattern(ref logic [R-1:0] s, output int active);
    logic [M-1:0] p;
    logic [N-1:0] id;
    active = 0;
    for (int i = 0; i < N; i++) begin
      id[i] = 1'b1;
      for (int b = 0; b < R; b++)
        if (SEL_MASK[i][b] && s[b] != SEL_VAL[i][b]) id[i] = 1'b0;
      if (id[i]) active++;
    end
    for (int j = 0; j < M; j++) begin
      logic bit_out = s[0];
      logic fb = 1'b0;
      for (int b = 0; b < R; b++) if (TAPS[b]) fb ^= s[b];
      s = {fb, s[R-1:1]};
      for (int i = 0; i < N; i++) if (id[i]) begin
        if (FIX0[i][j]) bit_out = 1'b0;
        if (FIX1[i][j]) bit_out = 1'b1;
      end
      p[j] = bit_out;
    end
    return p;
  endfunction

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat ((L + 3) * (M + 1) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (cut_capture) begin
      automatic int active;
      automatic logic [M-1:0] exp_p = next_pattern(model, active);
      if (cut_in !== exp_p) begin
        mismatches++;
        if (mismatches < 5) $display("FAIL pattern %0d: %h vs %h", n_capture, cut_in, exp_p);
      end
      if (active > 0) n_altered++;
      if (active > 1) n_multi++;
      for (int j = 0; j < M; j++) exp_sig = crc_step(exp_sig, cut_fn(exp_p)[j]);
      n_capture++;
    end
  end

  initial begin
    model   = SEED;
    exp_sig = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    check(mismatches == 0, $sformatf("%0d applied patterns differ from the model", mismatches));
    check(n_capture == L, $sformatf("%0d captures", n_capture));
    check(cycles == (L + 1) * (M + 1), $sformatf("session took %0d cycles", cycles));
    check(signature == exp_sig, $sformatf("signature %h vs %h", signature, exp_sig));
    check(n_altered > 0, "some patterns selected for fixing");
    check(n_multi > 0, "some patterns with several ID bits active");
    check(n_altered < L, "some patterns left alone");
    $display("patterns=%0d selected=%0d multi=%0d", n_capture, n_altered, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
