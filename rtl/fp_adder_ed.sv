// Single-precision (IEEE 754 binary32) floating-point adder/subtractor with
// an area-lean significand adder and LZA error detection.
//
// Datapath, in order: special_cases catches NaN, infinity and zero operands;
// exp_diff forms d = |ex - ey|, the swap decision sgn(d) and the larger
// exponent; swap orders the significands; r_shifter aligns the smaller one
// with guard, round and sticky bits; addsub_norm adds or subtracts them in a
// carry select adder with binary to excess-1 converters, predicts the
// normalisation shift with an LZA, detects the LZA's one-place error from
// the adder carry at the predicted leading digit and normalises through a
// coarse and a fine shifter; round_rne rounds to nearest even; exp_update
// and sign_logic form the result exponent and sign. This block chain and
// the normaliser inside addsub_norm follow the source design.
//
// Interface: x, y operands; sub = 1 computes x - y. z is the result and
// flags = {nan, overflow, underflow, inexact, zero}. lza_err shows that
// the LZA prediction was one short and the fine shifter corrected it. The unit is purely
// combinational: z is valid one propagation delay after x, y and sub.
// Subnormal operands are read as zero and results below the normal range are
// flushed to signed zero with underflow set; these, the rounding mode, the
// combinational timing and the NaN encoding are this design's choices.
module fp_adder_ed
  import fp_add_pkg::*;
(
  input  fp32_t     x,
  input  fp32_t     y,
  input  logic      sub,
  output fp32_t     z,
  output fp_flags_t flags,
  output logic      lza_err
);
  fp32_t             ye, sp_z;
  logic              sp, sp_nan;
  logic              sw, eop;
  logic [EXP_W-1:0]  d, e_big, ez;
  logic [MANT_W-1:0] ma, mb;
  logic [SIG_W-1:0]  mb_al, mant;
  logic              ovf, is_zero, ovf_rnd, inexact, ovfl, unfl, sz;
  logic [SH_W-1:0]   shift;
  logic [FRAC_W-1:0] frac;

  assign ye  = '{sign: y.sign ^ sub, exp: y.exp, frac: y.frac};
  assign eop = x.sign ^ ye.sign;

  special_cases u_special (.x(x), .y(ye), .special(sp), .z(sp_z), .nan(sp_nan));

  exp_diff u_expdiff (.ex(x.exp), .ey(y.exp), .mx(x.frac), .my(y.frac),
                      .swap(sw), .d(d), .e_big(e_big));

  swap u_swap (.mx({1'b1, x.frac}), .my({1'b1, y.frac}), .sw(sw), .ma(ma), .mb(mb));

  r_shifter u_rsh (.m(mb), .d(d), .q(mb_al));

  addsub_norm #(.W(SIG_W)) u_addsub (
    .ma({ma, 3'b000}), .mb(mb_al), .eop(eop), .mant(mant), .ovf(ovf),
    .shift(shift), .is_zero(is_zero), .lza_err(lza_err));

  round_rne u_round (.m(mant), .frac(frac), .ovf_rnd(ovf_rnd), .inexact(inexact));

  exp_update u_expupd (.e_big(e_big), .ovf(ovf), .shift(shift), .ovf_rnd(ovf_rnd),
                       .ez(ez), .overflow(ovfl), .underflow(unfl));

  sign_logic u_sign (.sx(x.sign), .sy(ye.sign), .swap(sw), .eop(eop), .zero(is_zero), .sz(sz));

  always_comb begin
    flags = '0;
    if (sp) begin
      z          = sp_z;
      flags.nan  = sp_nan;
      flags.zero = (sp_z.exp == '0);
    end else if (is_zero) begin
      z          = '{sign: sz, exp: '0, frac: '0};
      flags.zero = 1'b1;
    end else if (ovfl) begin
      z              = '{sign: sz, exp: '1, frac: '0};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else if (unfl) begin
      z               = '{sign: sz, exp: '0, frac: '0};
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
      flags.zero      = 1'b1;
    end else begin
      z             = '{sign: sz, exp: ez, frac: frac};
      flags.inexact = inexact;
    end
  end
endmodule
