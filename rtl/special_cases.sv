// Special-operand handling. y arrives with its sign already inverted for a
// subtraction. An exponent field of 0 counts as zero (subnormal inputs are
// flushed), 255 as infinity or NaN. NaN operands and inf - inf give the quiet
// NaN 0x7FC00000; an infinity operand otherwise passes through; two zeros give
// +0 unless both are -0; one zero operand passes the other through. special
// tells the datapath to use z. The flagged cases follow the source design;
// the exact IEEE 754 rules and the NaN encoding are this design's choice.
// Combinational.
module special_cases
  import fp_add_pkg::*;
(
  input  fp32_t x,
  input  fp32_t y,
  output logic  special,
  output fp32_t z,
  output logic  nan
);
  logic xz, yz, xi, yi, xn, yn;
  always_comb begin
    xz = (x.exp == '0);
    yz = (y.exp == '0);
    xi = (x.exp == '1) && (x.frac == '0);
    yi = (y.exp == '1) && (y.frac == '0);
    xn = (x.exp == '1) && (x.frac != '0);
    yn = (y.exp == '1) && (y.frac != '0);
    special = 1'b1;
    nan     = 1'b0;
    z       = x;
    if (xn || yn || (xi && yi && (x.sign != y.sign))) begin
      z   = fp32_t'(QNAN);
      nan = 1'b1;
    end else if (xi)       z = x;
    else if (yi)           z = y;
    else if (xz && yz)     z = '{sign: x.sign & y.sign, exp: '0, frac: '0};
    else if (xz)           z = y;
    else if (yz)           z = x;
    else                   special = 1'b0;
  end
endmodule
