// tb_seq_gen: exhaustive check of the example generation logic over all
// Sequence ID values and all counter codes: id0 gives fix-to-0 in cnt-1 and
// fix-to-1 in cnt-10, id1 gives fix-to-0 in cnt-2, nothing else.
module tb_seq_gen;
  logic [1:0] seq_id;
  logic [3:0] cnt;
  logic fix0, fix1;
  int checks = 0, failures = 0;

  seq_gen dut (.seq_id, .cnt, .fix0, .fix1);

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
    for (int i = 0; i < 4; i++)
      for (int c = 0; c < 16; c++) begin
        seq_id = 2'(i);
        cnt    = 4'(c);
        #1;
        check(fix0 == ((seq_id[0] && c == 1) || (seq_id[1] && c == 2)), $sformatf("fix0 id=%b cnt=%0d", seq_id, c));
        check(fix1 == (seq_id[0] && c == 10), $sformatf("fix1 id=%b cnt=%0d", seq_id, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
