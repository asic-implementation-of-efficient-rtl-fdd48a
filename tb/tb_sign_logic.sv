// Exhaustive test of the result-sign logic over its five inputs.
module tb_sign_logic;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic sx, sy, sw, eop, zero, sz;
  sign_logic dut (.sx(sx), .sy(sy), .swap(sw), .eop(eop), .zero(zero), .sz(sz));
  initial begin
    for (int i = 0; i < 32; i++) begin
      {sx, sy, sw, zero} = 4'(i);
      eop = sx ^ sy;
      @(posedge clk);
      check(sz == ((eop && zero) ? 1'b0 : (sw ? sy : sx)), $sformatf("case %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
