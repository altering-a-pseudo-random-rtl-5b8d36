// tb_bist_ctrl: drives the controller with a model of the Mod-13 counter and
// checks the session: L = 12 captures, each in counter state 0 of rounds
// 1..12, L*M compaction cycles, done exactly (L+1)*(M+1) cycles after start,
// done sticky and start ignored afterwards.
module tb_bist_ctrl;
  localparam int M = 12, L = 12;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] cnt;
  logic run, apply, sig_clr, sig_en, busy, done;
  int checks = 0, failures = 0;
  int applies = 0, sig_cycles = 0, run_cycles = 0, clears = 0;

  bist_ctrl #(.M(M), .L(L)) dut (.clk, .rst_n, .start, .cnt, .run, .apply, .sig_clr, .sig_en, .busy, .done);

  // counter model: advances while the controller runs
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   cnt <= '0;
    else if (run) cnt <= (cnt == 4'(M)) ? '0 : cnt + 1'b1;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (run) run_cycles++;
    if (apply) begin
      applies++;
      if (cnt != 0) begin failures++; $display("FAIL apply outside capture state"); end
    end
    if (sig_en) sig_cycles++;
    if (sig_clr) clears++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    // round 0 must not apply anything
    repeat (M + 1) begin
      check(!apply && !sig_en, "nothing applied or compacted in round 0");
      @(negedge clk);
    end
    wait (done);
    @(negedge clk);
    check(run_cycles == (L + 1) * (M + 1), $sformatf("session length %0d", run_cycles));
    check(applies == L, $sformatf("captures %0d", applies));
    check(sig_cycles == L * M, $sformatf("compaction cycles %0d", sig_cycles));
    check(clears == 1, "one clear");
    start = 1;
    repeat (5) @(negedge clk);
    start = 0;
    check(done && !busy && run_cycles == (L + 1) * (M + 1), "done is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
