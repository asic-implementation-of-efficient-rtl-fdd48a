// Exponent difference and larger-exponent multiplexer. swap (sgn(d)) is set
// when Y is larger in magnitude than X. It compares the exponents and, when
// they are equal, the fractions, so that the later subtraction of the
// smaller significand never goes negative. d = |ex - ey| drives the
// alignment shifter; e_big is the exponent of the result before update.
// The block set follows the source design; the fraction compare inside
// sgn(d) is this design's addition.
// Combinational.
module exp_diff
  import fp_add_pkg::*;
(
  input  logic [EXP_W-1:0]  ex,
  input  logic [EXP_W-1:0]  ey,
  input  logic [FRAC_W-1:0] mx,
  input  logic [FRAC_W-1:0] my,
  output logic              swap,
  output logic [EXP_W-1:0]  d,
  output logic [EXP_W-1:0]  e_big
);
  always_comb begin
    swap  = {ey, my} > {ex, mx};
    d     = swap ? ey - ex : ex - ey;
    e_big = swap ? ey : ex;
  end
endmodule
