// tb_bfsg: runs the bit-fixing sequence generator of the example for twelve
// patterns and checks, per pattern: the LFSR starting state, the Sequence ID
// decoded from it, the serial bits against the altered patterns of the
// reference, that fault-dropping patterns are unaltered, which test cubes are
// embedded, and one pattern per M+1 cycles.
module tb_bfsg;
  import bfsg_example_ref::*;
  localparam int M = 12;
  logic clk = 0, rst_n = 0, en = 0;
  logic scan_bit, shift, capture, fix0, fix1;
  logic [3:0] cnt;
  logic [4:0] lfsr_state;
  logic [1:0] seq_id;
  int checks = 0, failures = 0;
  int cyc = 0;

  always @(posedge clk) cyc++;

  bfsg dut (.clk, .rst_n, .en, .scan_bit, .shift, .capture, .cnt, .lfsr_state, .seq_id, .fix0, .fix1);

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

  initial begin
    logic [11:0] got;
    int t0, t1, embedded, fixed_bits;
    embedded = 0; fixed_bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    #1;
    for (int k = 0; k < NPAT; k++) begin
      // capture state: starting state visible, Sequence ID loads at the edge
      check(capture && cnt == 0, $sformatf("capture state before pattern %0d", k));
      check(lfsr_state == START[k], $sformatf("start %0d: %b vs %b", k, lfsr_state, START[k]));
      if (k == 0) t0 = cyc;
      if (k == 1) t1 = cyc;
      @(negedge clk);
      check(seq_id == {START[k][2] & START[k][1], ~START[k][4] & ~START[k][3]},
            $sformatf("seq id %b for start %b", seq_id, START[k]));
      for (int j = 0; j < M; j++) begin
        check(shift && cnt == 4'(j + 1), "shift state");
        got[j] = scan_bit;
        if (fix0 || fix1) fixed_bits++;
        @(negedge clk);
      end
      check(got == ALT[k], $sformatf("pattern %0d: %b vs %b", k, got, ALT[k]));
      if (DROPS[k]) check(got == PAT[k], $sformatf("fault-dropping pattern %0d altered", k));
      for (int c = 0; c < 4; c++)
        if (CUBE_AT[c] == k) begin
          check(cube_hit(got, c), $sformatf("cube %0d in pattern %0d", c, k));
          if (cube_hit(got, c)) embedded++;
        end
    end
    check(t1 - t0 == M + 1, $sformatf("pattern period %0d", t1 - t0));
    check(embedded == 3, $sformatf("embedded %0d cubes", embedded));
    // 4 patterns with id0 (2 fixed bits each) + 1 with id1 (1 fixed bit)
    check(fixed_bits == 9, $sformatf("fix controls active in %0d cycles", fixed_bits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
