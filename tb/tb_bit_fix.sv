// tb_bit_fix: truth table of the fixing gates (the case with both controls
// high does not occur in a correct generator and is not tested).
module tb_bit_fix;
  logic din, fix0, fix1, dout;
  int checks = 0, failures = 0;

  bit_fix dut (.din, .fix0, .fix1, .dout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      din = 1'(i);
      fix0 = 0; fix1 = 0; #1 check(dout == din, "pass");
      fix0 = 1; fix1 = 0; #1 check(dout == 1'b0, "fix-to-0");
      fix0 = 0; fix1 = 1; #1 check(dout == 1'b1, "fix-to-1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
