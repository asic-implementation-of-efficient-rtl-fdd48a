// Fine shifter: one-place correction after the coarse shifter. left moves the
// value up one place (the LZA predicted one leading zero too few); right
// moves it down one place when an effective addition carried out, OR-ing the
// bit that falls off into bit 0 so that it stays a sticky bit. The two
// controls are never set together (left only for subtraction, right only for
// addition); if they were, left wins. The one-place LZA correction follows
// the source design; folding the addition overflow right shift into the same
// shifter is this design's choice. Combinational.
module fine_shifter #(
  parameter int unsigned WIDTH = 28
) (
  input  logic [WIDTH-1:0] din,
  input  logic             left,
  input  logic             right,
  output logic [WIDTH-1:0] dout
);
  always_comb begin
    if (left)       dout = {din[WIDTH-2:0], 1'b0};
    else if (right) dout = {1'b0, din[WIDTH-1:2], din[1] | din[0]};
    else            dout = din;
  end
endmodule
