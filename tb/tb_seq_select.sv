// tb_seq_select: exhaustive check of the example selection logic over all 32
// LFSR states: id0 when the two leftmost stages are 0, id1 when the third and
// fourth stages are 1. Also checks that no pattern which drops faults in the
// example is selected.
module tb_seq_select;
  import bfsg_example_ref::*;
  logic [4:0] state;
  logic [1:0] id_next;
  int checks = 0, failures = 0;

  seq_select dut (.state, .id_next);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      state = 5'(s);
      #1;
      check(id_next[0] == (state[4] == 1'b0 && state[3] == 1'b0), $sformatf("id0 for %b", state));
      check(id_next[1] == (state[2] == 1'b1 && state[1] == 1'b1), $sformatf("id1 for %b", state));
    end
    for (int k = 0; k < NPAT; k++) begin
      state = START[k];
      #1;
      if (DROPS[k]) check(id_next == 2'b00, $sformatf("fault-dropping pattern %0d selected", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
