// Test of round to nearest even on random normalised significands, with
// ties forced often. The expected value is worked out from the kept bits and
// the discarded fraction compared with one half.
module tb_round_rne;
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

  logic [26:0] m;
  logic [22:0] frac;
  logic        ovr, inx;
  int n_ovf = 0;
  round_rne dut (.m(m), .frac(frac), .ovf_rnd(ovr), .inexact(inx));
  initial begin
    int unsigned kept, rem;
    for (int i = 0; i < 5000; i++) begin
      m = {1'b1, 26'($urandom)};
      if (i % 4 == 0) m[1:0] = 2'b00;
      if (i % 9 == 0) m[25:3] = '1;
      @(posedge clk);
      kept = m[26:3]; rem = m[2:0];
      if (rem > 4 || (rem == 4 && kept[0])) kept++;
      check(ovr == (kept == (1 << 24)) && frac == 23'(kept) && inx == (rem != 0),
            $sformatf("m=%h frac=%h ovf=%0d", m, frac, ovr));
      if (ovr) n_ovf++;
    end
    check(n_ovf > 0, "rounding overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
