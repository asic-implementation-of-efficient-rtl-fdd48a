// Test of the special-operand unit with hand-worked cases: NaN operands,
// inf - inf, infinities passing through, zeros (including -0 + -0 and
// subnormals read as zero) and ordinary operands that are not special.
module tb_special_cases;
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

  import fp_add_pkg::*;
  fp32_t x, y, z;
  logic  sp, nan;
  special_cases dut (.x(x), .y(y), .special(sp), .z(z), .nan(nan));
  task automatic one(logic [31:0] a, logic [31:0] b, logic esp, logic [31:0] ez, logic enan);
    x = a; y = b;
    @(posedge clk);
    check(sp == esp && (!esp || (z == ez && nan == enan)), $sformatf("%h %h -> sp=%0d z=%h", a, b, sp, z));
  endtask
  initial begin
    one(32'h7FC0_0000, 32'h3F80_0000, 1, 32'h7FC0_0000, 1);
    one(32'h3F80_0000, 32'hFF80_0001, 1, 32'h7FC0_0000, 1);
    one(32'h7F80_0000, 32'hFF80_0000, 1, 32'h7FC0_0000, 1);
    one(32'h7F80_0000, 32'h7F80_0000, 1, 32'h7F80_0000, 0);
    one(32'h4000_0000, 32'hFF80_0000, 1, 32'hFF80_0000, 0);
    one(32'hFF80_0000, 32'h0000_0000, 1, 32'hFF80_0000, 0);
    one(32'h8000_0000, 32'h8000_0000, 1, 32'h8000_0000, 0);
    one(32'h8000_0000, 32'h0000_0000, 1, 32'h0000_0000, 0);
    one(32'h0000_0005, 32'h8000_0000, 1, 32'h0000_0000, 0);
    one(32'h0000_0000, 32'hC120_0000, 1, 32'hC120_0000, 0);
    one(32'h4120_0000, 32'h0000_0003, 1, 32'h4120_0000, 0);
    one(32'h4120_0000, 32'hC120_0000, 0, 32'h0, 0);
    one(32'h0080_0000, 32'h7F7F_FFFF, 0, 32'h0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
