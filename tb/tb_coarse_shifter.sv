// Test of the coarse (barrel) shifter: every shift amount 0..27 with random
// data against the << operator.
module tb_coarse_shifter;
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
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [27:0] din, dout;
  logic [4:0]  sh;
  coarse_shifter dut (.din(din), .sh(sh), .dout(dout));
  initial begin
    for (int i = 0; i < 5000; i++) begin
      din = 28'($urandom); sh = 5'(i % 28);
      @(posedge clk);
      check(dout == din << sh, $sformatf("%h << %0d = %h", din, sh, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
