// tb_sisr: the 16-bit signature register with x^16+x^12+x^5+1 and zero start
// is a bitwise CRC-16/XMODEM; feeding "123456789" MSB first must give the
// published check value 0x31C3. Also checks hold with en low and clear.
module tb_sisr;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, din = 0;
  logic [15:0] sig;
  int checks = 0, failures = 0;
  byte msg [9] = '{"1", "2", "3", "4", "5", "6", "7", "8", "9"};

  sisr dut (.clk, .rst_n, .clr, .en, .din, .sig);

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
    logic [15:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 9; b++)
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk);
        en = 1; din = msg[b][i];
        // idle cycles in between must not change the signature
        if (i == 3) begin
          @(negedge clk);
          en = 0; held = sig;
          @(negedge clk);
          check(sig == held, "hold");
        end
      end
    @(negedge clk);
    en = 0;
    check(sig == 16'h31C3, $sformatf("CRC check value %h", sig));
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(sig == 16'h0000, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
