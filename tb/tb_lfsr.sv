// tb_lfsr: checks the LFSR against the example's pattern table.
// Shifts out twelve 12-bit slices, compares the starting state of each and
// the serial bits with the reference table, and checks that the register
// holds while shift is low.
module tb_lfsr;
  import bfsg_example_ref::*;

  logic clk = 0, rst_n = 0, shift = 0;
  logic [4:0] state;
  logic sout;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .shift, .state, .sout);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] got;
    logic [4:0]  held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NPAT; k++) begin
      @(negedge clk);
      check(state == START[k], $sformatf("start state %0d: %b vs %b", k, state, START[k]));
      // a few idle cycles between patterns must not move the LFSR
      held = state;
      shift = 0;
      repeat (1 + k % 3) @(negedge clk);
      check(state == held, $sformatf("hold before pattern %0d", k));
      for (int j = 0; j < 12; j++) begin
        shift = 1;
        got[j] = sout;
        @(negedge clk);
      end
      shift = 0;
      check(got == PAT[k], $sformatf("pattern %0d: %b vs %b", k, got, PAT[k]));
    end
    // period of a primitive degree-5 polynomial is 31
    begin
      logic [4:0] s0;
      int period = 0;
      s0 = state;
      shift = 1;
      do begin @(negedge clk); period++; end while (state != s0 && period < 100);
      shift = 0;
      check(period == 31, $sformatf("period %0d", period));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
