// Exponent update: ez = e_big + ovf - shift + ovf_rnd, worked out in a
// signed width wide enough for every case. overflow is set when the biased
// exponent reaches 255 (the result becomes infinity); underflow when it falls
// to 0 or below (the result is flushed to zero, subnormals are not produced).
// The flush-to-zero treatment is this design's choice. Combinational.
module exp_update
  import fp_add_pkg::*;
(
  input  logic [EXP_W-1:0] e_big,
  input  logic             ovf,
  input  logic [SH_W-1:0]  shift,
  input  logic             ovf_rnd,
  output logic [EXP_W-1:0] ez,
  output logic             overflow,
  output logic             underflow
);
  logic signed [EXP_W+1:0] e;
  always_comb begin
    e = $signed({2'b00, e_big}) + $signed({{(EXP_W+1){1'b0}}, ovf})
      + $signed({{(EXP_W+1){1'b0}}, ovf_rnd}) - $signed({{(EXP_W+2-SH_W){1'b0}}, shift});
    overflow  = e >= 255;
    underflow = e <= 0;
    ez        = e[EXP_W-1:0];
  end
endmodule
