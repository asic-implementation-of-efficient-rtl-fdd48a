// Test of the carry-select error detector. For random a > b the testbench
// forms the propagate term and the per-bit carries of a + ~b + 1 itself, then
// points the one-hot input either at the true leading one of a - b (err must
// be 0) or one place above it (err must be 1), as an LZA may do.
module tb_carry_select_ed;
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
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 27;
  logic [W-1:0] oh, t, cv;
  logic         err;
  carry_select_ed dut (.onehot(oh), .t(t), .carry(cv), .err(err));

  initial begin
    logic [W-1:0] a, b, nb;
    logic k;
    int p, wrong;
    for (int i = 0; i < 20000; i++) begin
      a = W'($urandom); b = W'($urandom);
      if (i % 2) b = a ^ W'($urandom_range(1023));
      if (a == b) continue;
      if (a < b) begin nb = a; a = b; b = nb; end
      nb = ~b;
      t = a ^ nb;
      k = 1'b1;
      for (int j = 0; j < W; j++) begin
        cv[j] = k;
        k = (a[j] & nb[j]) | (k & t[j]);
      end
      p = 0;
      for (int j = 0; j < W; j++) if (((a - b) >> j) & 1) p = j;
      wrong = (p < W - 1) ? int'($urandom_range(1)) : 0;
      oh = W'(1) << (p + wrong);
      @(posedge clk);
      check(err == 1'(wrong), $sformatf("a=%h b=%h p=%0d wrong=%0d err=%0d", a, b, p, wrong, err));
    end
    oh = '0; t = '1; cv = '0;
    @(posedge clk);
    check(err == 1'b0, "no position, no error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
