// tb_seq_id_reg: random load/hold test of the Sequence ID Register.
module tb_seq_id_reg;
  logic clk = 0, rst_n = 0, load = 0;
  logic [1:0] d, q, model;
  int checks = 0, failures = 0;

  seq_id_reg #(.N(2)) dut (.clk, .rst_n, .load, .d, .q);

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
    d = '0;
    repeat (2) @(posedge clk);
    #1 check(q == 2'b00, "reset value");
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = 1'($urandom_range(0, 3) == 0);
      d    = 2'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1 check(q == model, $sformatf("q %b vs %b", q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
