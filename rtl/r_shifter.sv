// Alignment right shifter: shifts the smaller significand right by the
// exponent difference d and appends guard, round and sticky bits. The sticky
// bit is the OR of every bit shifted below the round position. For d above
// SIG_W-1 the whole significand ends up in the sticky bit. The guard, round
// and sticky format is this design's choice. Combinational.
module r_shifter
  import fp_add_pkg::*;
(
  input  logic [MANT_W-1:0] m,
  input  logic [EXP_W-1:0]  d,
  output logic [SIG_W-1:0]  q
);
  localparam int unsigned XW = MANT_W + SIG_W;   // room for every lost bit
  logic [XW-1:0] wide;
  always_comb begin
    wide = {m, {SIG_W{1'b0}}} >> d;
    if (d > EXP_W'(SIG_W - 1))
      q = {{(SIG_W-1){1'b0}}, |m};
    else
      q = {wide[XW-1 -: SIG_W-1], |wide[XW-SIG_W:0]};
  end
endmodule
