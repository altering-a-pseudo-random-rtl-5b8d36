// tb_mod_counter: checks the Mod-(M+1) counter (M = 12) under a random
// enable: it must step 0,1,..,12,0,.. on enabled cycles only, flag state 0 as
// the capture state, and wrap every 13 enabled cycles.
module tb_mod_counter;
  localparam int M = 12;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] cnt;
  logic capture;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0, en_cycles = 0;

  mod_counter #(.M(M)) dut (.clk, .rst_n, .en, .cnt, .capture);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(cnt == 4'(model), $sformatf("cnt %0d vs %0d", cnt, model));
      check(capture == (model == 0), "capture flag");
      en = (i < 200) ? 1'b1 : 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en) begin
        en_cycles++;
        if (model == M) begin model = 0; wraps++; end
        else model++;
      end
    end
    check(wraps == en_cycles / (M + 1), $sformatf("wraps %0d for %0d cycles", wraps, en_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
