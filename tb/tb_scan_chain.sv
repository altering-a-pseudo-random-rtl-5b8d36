// tb_scan_chain: random shift/capture sequence against a queue model of a
// 12-cell chain; checks q, scan-out and shift-over-capture priority.
module tb_scan_chain;
  localparam int M = 12;
  logic clk = 0, rst_n = 0, shift = 0, capture = 0, si = 0, so;
  logic [M-1:0] d, q, model;
  int checks = 0, failures = 0;

  scan_chain #(.M(M)) dut (.clk, .rst_n, .shift, .capture, .si, .d, .q, .so);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      check(q == model, $sformatf("q %h vs %h", q, model));
      check(so == model[0], "scan out");
      shift   = 1'($urandom_range(0, 3) != 0);
      capture = 1'($urandom_range(0, 3) == 0);
      si      = 1'($urandom);
      d       = M'($urandom);
      @(posedge clk);
      // the first bit shifted ends in cell 0 after M shifts
      if (shift)        model = {si, model[M-1:1]};
      else if (capture) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
