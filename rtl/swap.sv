// Significand swap: puts the larger-magnitude significand on ma and the
// other on mb when sw (sgn(d)) is set, as in the source design.
// Combinational.
module swap
  import fp_add_pkg::*;
(
  input  logic [MANT_W-1:0] mx,
  input  logic [MANT_W-1:0] my,
  input  logic              sw,
  output logic [MANT_W-1:0] ma,
  output logic [MANT_W-1:0] mb
);
  always_comb begin
    ma = sw ? my : mx;
    mb = sw ? mx : my;
  end
endmodule
