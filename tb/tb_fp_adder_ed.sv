// End-to-end test of the single-precision error-detecting adder at its
// default (and only) configuration. Directed vectors cover the special
// operands, exact cancellation, rounding carry-out, exponent overflow and
// underflow; random vectors are drawn with exponent differences of 0..2
// (deep cancellation, where the LZA error shows), small, and large
// (alignment beyond the sticky bit). Every result and flag is compared with
// the wide-integer reference model. Each datapath mechanism is counted and
// must occur at least once. One vector is applied per clock cycle.
module tb_fp_adder_ed;
  import fp_add_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 200000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp32_t     x, y, z;
  logic      sub, lza_err;
  fp_flags_t flags;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_lza_err, n_add_ovf, n_rnd_ovf, n_exp_ovf, n_exp_unf, n_nan, n_inf_pass,
      n_zero_op, n_cancel, n_sticky, n_swap, n_big_shift, n_inexact;

  fp_adder_ed dut (.x(x), .y(y), .sub(sub), .z(z), .flags(flags), .lza_err(lza_err));

  task automatic apply(logic [31:0] a, logic [31:0] b, logic s);
    ref_result_t r;
    x = a; y = b; sub = s;
    @(posedge clk);
    r = ref_add(a, b, s);
    checks++;
    if (z !== r.z || flags !== r.flags) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %h %s %h: got %h flags %b, expected %h flags %b",
                 a, s ? "-" : "+", b, z, flags, r.z, r.flags);
    end
    if (!dut.sp) begin
      if (lza_err)                       n_lza_err++;
      if (dut.ovf)                       n_add_ovf++;
      if (dut.ovf_rnd)                   n_rnd_ovf++;
      if (dut.sw)                        n_swap++;
      if (dut.d > 8'd26)                 n_sticky++;
      if (dut.eop && dut.shift > 5'd10)  n_big_shift++;
      if (dut.is_zero)                   n_cancel++;
      if (flags.overflow)                n_exp_ovf++;
      if (flags.underflow)               n_exp_unf++;
      if (flags.inexact)                 n_inexact++;
    end else begin
      if (flags.nan)                     n_nan++;
      else if (z.exp == 8'hFF)           n_inf_pass++;
      else                               n_zero_op++;
    end
  endtask

  function automatic logic [31:0] rnd_fp(int emin, int emax);
    int e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  initial begin : watchdog
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b;
    int ea;
    // directed
    apply(32'h3F80_0000, 32'h3F80_0000, 1'b0);  // 1 + 1 = 2
    apply(32'h3F80_0000, 32'h3F80_0000, 1'b1);  // 1 - 1 = +0
    apply(32'h4040_0000, 32'h3F80_0000, 1'b1);  // 3 - 1 = 2
    apply(32'h3F80_0000, 32'h3380_0000, 1'b0);  // 1 + 2^-24: tie, stays 1
    apply(32'h3FFF_FFFF, 32'h3380_0000, 1'b0);  // rounding carries out
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);  // overflow to infinity
    apply(32'h0080_0001, 32'h0080_0000, 1'b1);  // underflow, flushed
    apply(32'h7F80_0000, 32'hFF80_0000, 1'b0);  // inf - inf = NaN
    apply(32'h7FC0_0001, 32'h3F80_0000, 1'b0);  // NaN operand
    apply(32'h7F80_0000, 32'h3F80_0000, 1'b1);  // inf passes
    apply(32'h0000_0000, 32'h4120_0000, 1'b1);  // 0 - 10
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);  // -0 + -0 = -0
    apply(32'h0000_0001, 32'h0000_0002, 1'b0);  // subnormals read as zero
    apply(32'h4B80_0000, 32'h3F80_0000, 1'b1);  // 2^24 - 1
    apply(32'h3F80_0000, 32'h4B80_0000, 1'b1);  // 1 - 2^24 (swap)
    // random
    for (int i = 0; i < NRAND; i++) begin
      case (i % 8)
        0, 1, 2: begin  // close exponents: cancellation
          a  = rnd_fp(1, 254);
          ea = int'(a[30:23]) + int'($urandom_range(2)) - 1;
          if (ea < 1) ea = 1;
          if (ea > 254) ea = 254;
          b  = {1'($urandom), 8'(ea), 23'($urandom)};
          if (i % 8 == 2) b[22:0] = a[22:0] ^ 23'(1 << $urandom_range(22));
        end
        3: begin a = rnd_fp(100, 154); b = rnd_fp(100, 154); end
        4: begin a = rnd_fp(1, 254); b = rnd_fp(1, 254); end
        5: begin a = rnd_fp(240, 254); b = rnd_fp(240, 254); end
        6: begin a = rnd_fp(1, 12); b = rnd_fp(1, 12); end
        default: begin
          a = $urandom; b = $urandom;   // any encoding, specials included
          if ($urandom_range(3) == 0) b[30:23] = ($urandom_range(1) == 0) ? 8'h00 : 8'hFF;
        end
      endcase
      apply(a, b, 1'($urandom));
    end

    $display("mechanisms: lza_err=%0d add_ovf=%0d rnd_ovf=%0d exp_ovf=%0d exp_unf=%0d nan=%0d inf=%0d zero_op=%0d cancel=%0d sticky_only=%0d swap=%0d long_norm=%0d inexact=%0d",
             n_lza_err, n_add_ovf, n_rnd_ovf, n_exp_ovf, n_exp_unf, n_nan, n_inf_pass,
             n_zero_op, n_cancel, n_sticky, n_swap, n_big_shift, n_inexact);
    if (n_lza_err == 0)   begin failures++; $display("never: LZA error correction"); end
    if (n_add_ovf == 0)   begin failures++; $display("never: addition overflow"); end
    if (n_rnd_ovf == 0)   begin failures++; $display("never: rounding overflow"); end
    if (n_exp_ovf == 0)   begin failures++; $display("never: exponent overflow"); end
    if (n_exp_unf == 0)   begin failures++; $display("never: exponent underflow"); end
    if (n_nan == 0)       begin failures++; $display("never: NaN"); end
    if (n_inf_pass == 0)  begin failures++; $display("never: infinity operand"); end
    if (n_zero_op == 0)   begin failures++; $display("never: zero operand"); end
    if (n_cancel == 0)    begin failures++; $display("never: exact cancellation"); end
    if (n_sticky == 0)    begin failures++; $display("never: alignment into sticky"); end
    if (n_swap == 0)      begin failures++; $display("never: operand swap"); end
    if (n_big_shift == 0) begin failures++; $display("never: long normalisation"); end
    if (n_inexact == 0)   begin failures++; $display("never: inexact"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
