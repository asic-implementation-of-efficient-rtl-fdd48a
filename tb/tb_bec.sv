// Exhaustive test of the 5-bit binary to excess-1 converter: x must equal
// b + 1 modulo 32 for all 32 inputs (the 4-bit function table extended).
module tb_bec;
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

  logic [4:0] b, x;
  bec #(.WIDTH(5)) dut (.b(b), .x(x));
  initial begin
    for (int i = 0; i < 32; i++) begin
      b = 5'(i);
      @(posedge clk);
      check(int'(x) == (i + 1) % 32, $sformatf("b=%0d x=%0d", i, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
