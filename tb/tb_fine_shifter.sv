// Test of the fine shifter: pass, left by one, and right by one with the
// lost bit kept in the sticky position.
module tb_fine_shifter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [27:0] din, dout, exp_v;
  logic        l, r;
  fine_shifter dut (.din(din), .left(l), .right(r), .dout(dout));
  initial begin
    for (int i = 0; i < 3000; i++) begin
      din = 28'($urandom); l = (i % 3 == 1); r = (i % 3 == 2);
      if (i % 7 == 0) din[1:0] = 2'($urandom);
      @(posedge clk);
      exp_v = l ? din * 2 : (r ? ((din / 2) | 28'(din[0])) : din);
      check(dout == exp_v, $sformatf("din=%h l=%0d r=%0d dout=%h", din, l, r, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
