// Test of the exponent update: e_big + ovf + ovf_rnd - shift computed in
// integers, with overflow at 255 and underflow at 0 or below.
module tb_exp_update;
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

  logic [7:0] eb, ez;
  logic       ovf, ovr, of, uf;
  logic [4:0] sh;
  exp_update dut (.e_big(eb), .ovf(ovf), .shift(sh), .ovf_rnd(ovr), .ez(ez), .overflow(of), .underflow(uf));
  initial begin
    int e;
    for (int i = 0; i < 5000; i++) begin
      eb = 8'($urandom_range(254, 1)); ovf = 1'($urandom); ovr = 1'($urandom);
      sh = ovf ? 5'd0 : 5'($urandom_range(27));
      if (i % 3 == 0) eb = 8'($urandom_range(30, 1));
      @(posedge clk);
      e = int'(eb) + int'(ovf) + int'(ovr) - int'(sh);
      check(of == (e >= 255) && uf == (e <= 0) && (e <= 0 || e >= 255 || int'(ez) == e),
            $sformatf("eb=%0d ovf=%0d ovr=%0d sh=%0d ez=%0d", eb, ovf, ovr, sh, ez));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
