// Coarse normalisation shifter: logarithmic left barrel shifter that moves
// the adder output by the LZA's predicted leading-zero count. Stage k shifts
// by 2^k when bit k of sh is set; zeros enter at the bottom. The shifter's
// role follows the source design; its logarithmic structure is this design's
// choice. Combinational.
module coarse_shifter #(
  parameter int unsigned WIDTH = 28,
  localparam int unsigned SW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SW-1:0]    sh,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] stage [SW+1];
  always_comb begin
    stage[0] = din;
    for (int k = 0; k < SW; k++)
      stage[k+1] = sh[k] ? (stage[k] << (1 << k)) : stage[k];
    dout = stage[SW];
  end
endmodule
