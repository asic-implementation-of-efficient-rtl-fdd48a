// WIDTH-bit 2:1 multiplexer: y = sel ? d1 : d0. With WIDTH = 5 this is the
// "10:5" multiplexer of the source design that closes each carry select adder group. Combinational.
module mux2w #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
