// Exhaustive test of the 4-bit ripple carry adder, with carry-in (default)
// and in the carry-in-0 form with a half adder at bit 0.
module tb_rca;
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

  logic [3:0] a, b, s1, s0;
  logic       cin, c1, c0;
  rca dut (.a(a), .b(b), .cin(cin), .sum(s1), .cout(c1));
  rca #(.WIDTH(4), .HAS_CIN(1'b0)) dut0 (.a(a), .b(b), .cin(cin), .sum(s0), .cout(c0));
  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(posedge clk);
      check({c1, s1} == 5'(a + b + cin), $sformatf("%0d+%0d+%0d", a, b, cin));
      check({c0, s0} == 5'(a + b), $sformatf("%0d+%0d (no cin)", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
