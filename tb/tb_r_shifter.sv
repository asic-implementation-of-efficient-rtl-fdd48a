// Test of the alignment shifter: for every shift 0..40 the top 26 bits must
// be the exact shifted significand with guard and round, and the sticky bit
// the OR of all bits below the round bit.
module tb_r_shifter;
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

  logic [23:0] m;
  logic [7:0]  d;
  logic [26:0] q;
  r_shifter dut (.m(m), .d(d), .q(q));
  initial begin
    logic [99:0] ex;
    logic st;
    for (int i = 0; i < 5000; i++) begin
      m = {1'b1, 23'($urandom)};
      if (i % 5 == 0) m[10:0] = '0;
      d = (i % 50 == 0) ? 8'($urandom) : 8'(i % 41);
      @(posedge clk);
      ex = {m, 76'b0} >> d;             // 24 + 2 bits kept at [99:74]
      st = |ex[73:0] || (d > 8'd74);
      check(q == {ex[99:74], st}, $sformatf("m=%h d=%0d q=%h", m, d, q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
