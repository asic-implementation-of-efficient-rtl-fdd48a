// Test of the modified carry select adder at its 16-bit default and at the
// 28-bit size used by the floating-point unit. Sum and carry-out are compared
// with integer addition; the per-bit carry output with a bit-serial ripple.
// Corner operands make every group-select carry (C3, C7, C11) ripple.
module tb_csla_bec;
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

  logic [15:0] a, b, s, cv;
  logic        cin, c;
  logic [27:0] a2, b2, s2, cv2;
  logic        c2;
  csla_bec dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(c), .carry(cv));
  csla_bec #(.WIDTH(28)) dut28 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(c2), .carry(cv2));

  function automatic logic [27:0] ripple(logic [27:0] x, logic [27:0] y, logic ci, int w);
    logic [27:0] cc = '0;
    logic k = ci;
    for (int i = 0; i < w; i++) begin
      cc[i] = k;
      k = (x[i] & y[i]) | (k & (x[i] ^ y[i]));
    end
    return cc;
  endfunction

  task automatic one(logic [27:0] x, logic [27:0] y, logic ci);
    a = x[15:0]; b = y[15:0]; a2 = x; b2 = y; cin = ci;
    @(posedge clk);
    check({c, s} == 17'(a + b + 16'(cin)), $sformatf("16b %h+%h+%0d", a, b, cin));
    check(cv == ripple(28'(a), 28'(b), cin, 16)[15:0], "16b carry vector");
    check({c2, s2} == 29'(29'(a2) + 29'(b2) + 29'(cin)), $sformatf("28b %h+%h+%0d", a2, b2, cin));
    check(cv2 == ripple(a2, b2, cin, 28), "28b carry vector");
  endtask

  initial begin
    one('0, '0, 1'b0);
    one('1, '0, 1'b1);
    one(28'h0FF_FFFF, 28'h000_0001, 1'b0);
    one(28'hFFF_FFFF, 28'hFFF_FFFF, 1'b1);
    one(28'h000_000F, 28'h000_0001, 1'b0);
    for (int i = 0; i < 20000; i++) one(28'($urandom), 28'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
