// Test of the significand add/subtract and normalise block. Random aligned
// significands (larger first, hidden bit set in ma) are added or subtracted;
// the testbench normalises the exact result by searching for its leading
// one and compares mant, shift, ovf and is_zero. LZA corrections, addition
// overflow and long normalisations must each occur.
module tb_addsub_norm;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 27;
  logic [W-1:0] ma, mb, mant;
  logic         eop, ovf, is_zero, lerr;
  logic [4:0]   shift;
  int n_err = 0, n_ovf = 0, n_long = 0;
  addsub_norm dut (.ma(ma), .mb(mb), .eop(eop), .mant(mant), .ovf(ovf), .shift(shift),
                   .is_zero(is_zero), .lza_err(lerr));
  initial begin
    logic [W:0] r, en;
    int lead, exp_sh;
    for (int i = 0; i < 30000; i++) begin
      ma = {1'b1, 26'($urandom)};
      case (i % 3)
        0: mb = W'($urandom) >> $urandom_range(26);
        1: mb = ma ^ W'($urandom_range(1 << $urandom_range(25)));
        default: mb = {1'b1, 26'($urandom)};
      endcase
      if (mb > ma) mb = ma;
      eop = 1'($urandom);
      @(posedge clk);
      r = eop ? (W+1)'(ma) - (W+1)'(mb) : (W+1)'(ma) + (W+1)'(mb);
      if (r == 0) begin
        check(is_zero, "zero result");
        continue;
      end
      lead = 0;
      for (int j = 0; j <= W; j++) if (r[j]) lead = j;
      if (lead == W) begin
        en = (r >> 1) | (W+1)'(r[0]);
        check(ovf && shift == 0 && mant == en[W-1:0], $sformatf("add ovf %h+%h", ma, mb));
        n_ovf++;
      end else begin
        exp_sh = W - 1 - lead;
        en = r << exp_sh;
        check(!ovf && int'(shift) == exp_sh && mant == en[W-1:0] && !is_zero,
              $sformatf("%h %s %h: mant=%h sh=%0d exp %h sh=%0d", ma, eop ? "-" : "+", mb, mant, shift, en[W-1:0], exp_sh));
        if (exp_sh > 8) n_long++;
      end
      if (lerr) n_err++;
    end
    check(n_err > 0 && n_ovf > 0 && n_long > 0, "all mechanisms seen");
    $display("lza_err=%0d ovf=%0d long=%0d", n_err, n_ovf, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
