// Exhaustive test of one carry select adder group (RCA, 5-bit BEC, 10:5 mux):
// {cout, sum} must equal a + b + cin for all 512 input combinations.
module tb_csla_bec_group;
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

  logic [3:0] a, b, s;
  logic       cin, c;
  csla_bec_group dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(c));
  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(posedge clk);
      check({c, s} == 5'(a + b + cin), $sformatf("%0d+%0d+%0d -> %0d", a, b, cin, {c, s}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
