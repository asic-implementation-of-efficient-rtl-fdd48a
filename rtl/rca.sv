// Ripple carry adder of WIDTH bits built from one-bit adder cells.
// With HAS_CIN = 1 every bit is a full adder and cin enters bit 0 (the first
// group of the carry select adder). With HAS_CIN = 0 the carry-in is fixed at
// 0, bit 0 is a half adder and cin is unused: the "3 full adders and 1 half
// adder" RCA of the upper groups. Both forms follow the source design.
// Combinational.
module rca #(
  parameter int unsigned WIDTH   = 4,
  parameter bit          HAS_CIN = 1'b1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  if (HAS_CIN) begin : g_cin
    assign c[0] = cin;
    full_adder u_fa0 (.a(a[0]), .b(b[0]), .cin(c[0]), .sum(sum[0]), .cout(c[1]));
  end else begin : g_nocin
    assign c[0] = 1'b0;
    half_adder u_ha0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .cout(c[1]));
  end

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];
endmodule
