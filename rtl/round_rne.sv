// Rounding to nearest, ties to even. Input is the normalised significand
// {1, f[22:0], G, R, S}. The significand is incremented when G is set and
// any of R, S or the last kept bit is set. ovf_rnd reports that the
// increment carried out of the hidden bit (the result is then 1.0 x 2 and the
// exponent must grow by one); frac is 0 in that case. inexact = G | R | S.
// The rounding mode is this design's choice. Combinational.
module round_rne
  import fp_add_pkg::*;
(
  input  logic [SIG_W-1:0]  m,
  output logic [FRAC_W-1:0] frac,
  output logic              ovf_rnd,
  output logic              inexact
);
  logic             lsb, g, rs, up;
  logic [MANT_W:0]  inc;
  always_comb begin
    lsb     = m[3];
    g       = m[2];
    rs      = m[1] | m[0];
    up      = g & (rs | lsb);
    inc     = {1'b0, m[SIG_W-1:3]} + (MANT_W+1)'(up);
    ovf_rnd = inc[MANT_W];
    frac    = inc[FRAC_W-1:0];
    inexact = g | rs;
  end
endmodule
