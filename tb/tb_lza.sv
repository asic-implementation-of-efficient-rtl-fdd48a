// Test of the leading zero anticipator on random 27-bit a >= b. The
// predicted count must equal the true leading-zero count of a - b or be one
// short, the one-hot output must mark bit WIDTH-1-lz, and a == b must give
// the count WIDTH. Both exact and one-short predictions must occur. An 8-bit
// instance is also checked exhaustively over every pair a >= b.
module tb_lza;
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
  logic [W-1:0] a, b, f, oh;
  logic [4:0]   lz;
  int n_exact = 0, n_short = 0;
  lza dut (.a(a), .b(b), .f(f), .onehot(oh), .lz(lz));
  logic [7:0] a8, b8, f8, oh8;
  logic [3:0] lz8;
  lza #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .f(f8), .onehot(oh8), .lz(lz8));

  function automatic int true_lz(logic [W-1:0] v);
    for (int i = W - 1; i >= 0; i--) if (v[i]) return W - 1 - i;
    return W;
  endfunction

  task automatic one(logic [W-1:0] x, logic [W-1:0] y);
    int t;
    if (x < y) begin a = y; b = x; end else begin a = x; b = y; end
    @(posedge clk);
    t = true_lz(a - b);
    if (a == b) check(int'(lz) == W && oh == '0, "equal operands");
    else begin
      check(int'(lz) == t || int'(lz) == t - 1, $sformatf("a=%h b=%h lz=%0d true=%0d", a, b, lz, t));
      check(oh == (W'(1) << (W - 1 - int'(lz))), "one-hot position");
      if (int'(lz) == t) n_exact++; else n_short++;
    end
  endtask

  initial begin
    logic [W-1:0] x;
    one(27'h400_0000, 27'h3FF_FFFF);
    one(27'h555_5555, 27'h555_5555);
    for (int i = 0; i < 30000; i++) begin
      x = W'($urandom);
      case (i % 3)
        0: one(x, W'($urandom));
        1: one(x, x ^ W'($urandom_range(255)));                     // deep cancellation
        default: one(x, x - W'($urandom_range(1 << $urandom_range(20))));
      endcase
    end
    for (int x8 = 0; x8 < 256; x8++)
      for (int y8 = 0; y8 <= x8; y8++) begin
        int t8;
        a8 = 8'(x8); b8 = 8'(y8);
        #1;
        t8 = 8;
        for (int j = 0; j < 8; j++) if (((x8 - y8) >> j) & 1) t8 = 7 - j;
        check((x8 == y8) ? (lz8 == 4'd8 && oh8 == 0)
                         : ((int'(lz8) == t8 || int'(lz8) == t8 - 1) && oh8 == (8'd1 << (7 - int'(lz8)))),
              $sformatf("8-bit a=%0d b=%0d lz=%0d", x8, y8, lz8));
      end
    check(n_exact > 0 && n_short > 0, "both prediction outcomes seen");
    $display("exact=%0d one_short=%0d", n_exact, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
