// Binary to excess-1 converter: x = b + 1 (mod 2^WIDTH) without an adder.
// Bit 0 is inverted; bit i is b[i] XOR the AND of all lower bits, the AND
// terms being formed as a chain (x1 = b1^b0, x2 = b2^(b1&b0), ...), as in the
// 4-bit converter of the source design. The carry select adder uses WIDTH = 5:
// the four sum bits of a group plus its carry. Combinational.
module bec #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  logic [WIDTH-1:0] all_ones;   // all_ones[i] = &b[i:0]

  assign all_ones[0] = b[0];
  assign x[0]        = ~b[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    assign all_ones[i] = all_ones[i-1] & b[i];
    assign x[i]        = b[i] ^ all_ones[i-1];
  end
endmodule
