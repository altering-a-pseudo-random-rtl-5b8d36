// tb_tps_bist: end-to-end run of the test-per-scan BIST at its default size
// (5-stage LFSR, 12-cell scan chain, 12 patterns).
//
// A small behavioural stand-in for the circuit under test returns a fixed
// function of the applied pattern. The testbench checks every applied pattern
// against the reference altered patterns, that fault-dropping patterns reach
// the circuit unaltered, that three of the four test cubes reach it, the
// session length (L+1)*(M+1) cycles, and the final signature against a CRC
// of the expected scan-out stream. It counts each mechanism (capture,
// selection by each Sequence ID bit, fix-to-0, fix-to-1, unaltered pattern,
// embedded cube, completion) and fails any that never happened.
module tb_tps_bist;
  import bfsg_example_ref::*;
  localparam int M = 12, L = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, cut_capture, scan_in_bit, fix0, fix1;
  logic [M-1:0] cut_in, cut_resp;
  logic [15:0] signature;
  logic [4:0] lfsr_state;
  logic [1:0] seq_id;
  int checks = 0, failures = 0;

  int n_capture = 0, n_sel0 = 0, n_sel1 = 0, n_fix0 = 0, n_fix1 = 0;
  int n_unaltered = 0, n_cubes = 0, n_done = 0, cycles = 0;

  tps_bist dut (
    .clk, .rst_n, .start, .busy, .done, .cut_in, .cut_resp, .cut_capture,
    .signature, .scan_in_bit, .lfsr_state, .seq_id, .fix0, .fix1
  );

  // stand-in circuit under test: rotate, invert a few bits, add parity
  function automatic logic [M-1:0] cut_fn(logic [M-1:0] p);
    return {p[M-2:0], ^p} ^ 12'h5A3;
  endfunction
  assign cut_resp = cut_fn(cut_in);

  function automatic logic [15:0] crc_step(logic [15:0] c, logic b);
    logic top = c[15] ^ b;
    c = c << 1;
    if (top) c ^= 16'h1021;
    return c;
  endfunction

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe the session
  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (busy && n_capture < L) begin
      if (fix0) n_fix0++;
      if (fix1) n_fix1++;
    end
    if (cut_capture) begin
      automatic int k = n_capture;
      check(cut_in == ALT[k], $sformatf("applied pattern %0d: %b vs %b", k, cut_in, ALT[k]));
      if (DROPS[k]) check(cut_in == PAT[k], $sformatf("fault-dropping pattern %0d altered", k));
      if (cut_in == PAT[k]) n_unaltered++;
      for (int c = 0; c < 4; c++)
        if (CUBE_AT[c] == k && cube_hit(cut_in, c)) n_cubes++;
      if (seq_id[0]) n_sel0++;
      if (seq_id[1]) n_sel1++;
      n_capture++;
    end
  end

  initial begin
    logic [15:0] exp_sig;
    logic [M-1:0] r;
    exp_sig = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    n_done++;
    @(negedge clk);
    // scan-out order: cell 0 first, so bit 0 of each response leads
    for (int k = 0; k < L; k++) begin
      r = cut_fn(ALT[k]);
      for (int j = 0; j < M; j++) exp_sig = crc_step(exp_sig, r[j]);
    end
    check(signature == exp_sig, $sformatf("signature %h vs %h", signature, exp_sig));
    check(cycles == (L + 1) * (M + 1), $sformatf("session took %0d cycles", cycles));
    check(n_capture == L, $sformatf("%0d captures", n_capture));
    check(n_sel0 == 4, $sformatf("id0 selected %0d patterns", n_sel0));
    check(n_sel1 == 1, $sformatf("id1 selected %0d patterns", n_sel1));
    check(n_fix0 == 5, $sformatf("%0d fix-to-0 cycles", n_fix0));
    check(n_fix1 == 4, $sformatf("%0d fix-to-1 cycles", n_fix1));
    check(n_unaltered == 7, $sformatf("%0d unaltered patterns", n_unaltered));
    check(n_cubes == 3, $sformatf("%0d cubes embedded", n_cubes));
    // every mechanism must have happened at least once
    check(n_capture > 0 && n_sel0 > 0 && n_sel1 > 0 && n_fix0 > 0 && n_fix1 > 0 &&
          n_unaltered > 0 && n_cubes > 0 && n_done > 0, "every mechanism exercised");
    $display("mechanisms: capture=%0d sel_id0=%0d sel_id1=%0d fix0=%0d fix1=%0d unaltered=%0d cubes=%0d done=%0d",
             n_capture, n_sel0, n_sel1, n_fix0, n_fix1, n_unaltered, n_cubes, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
