// Test of the significand swap: with sw clear the operands pass straight,
// with sw set they cross.
module tb_swap;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] mx, my, ma, mb;
  logic        sw;
  swap dut (.mx(mx), .my(my), .sw(sw), .ma(ma), .mb(mb));
  initial begin
    for (int i = 0; i < 1000; i++) begin
      mx = 24'($urandom); my = 24'($urandom); sw = 1'($urandom);
      @(posedge clk);
      check(sw ? (ma == my && mb == mx) : (ma == mx && mb == my), "swap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
