// Test of the exponent difference and larger-exponent mux against a
// magnitude comparison done on the joined exponent and fraction fields.
module tb_exp_diff;
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

  logic [7:0]  ex, ey, d, eb;
  logic [22:0] mx, my;
  logic        sw;
  exp_diff dut (.ex(ex), .ey(ey), .mx(mx), .my(my), .swap(sw), .d(d), .e_big(eb));
  initial begin
    for (int i = 0; i < 5000; i++) begin
      ex = 8'($urandom); ey = (i % 4 == 0) ? ex : 8'($urandom);
      mx = 23'($urandom); my = (i % 16 == 0) ? mx : 23'($urandom);
      @(posedge clk);
      check(sw == (ey > ex || (ey == ex && my > mx)), "swap");
      check(int'(d) == ((ex > ey) ? int'(ex) - int'(ey) : int'(ey) - int'(ex)), "d");
      check(eb == ((ex > ey) ? ex : ey), "e_big");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
