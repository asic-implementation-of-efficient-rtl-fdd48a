// Carry select adder with binary to excess-1 converters (modified CSLA).
// Bits 3:0 are a 4-bit RCA that takes cin. Every further 4-bit group is a
// csla_bec_group: an RCA with carry-in 0, a 5-bit BEC for carry-in 1 and a
// 10:5 multiplexer chosen by the previous group's carry (C3, C7, C11 ... in
// a 16-bit adder). The source design describes it at 16 bits (WIDTH default);
// the floating-point adder uses 28 bits. WIDTH must be a multiple of 4.
// Besides sum and cout the adder reports carry[i], the carry into bit i
// (recovered as sum ^ a ^ b), which the LZA error detection selects from.
// Combinational.
module csla_bec #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] carry
);
  localparam int unsigned NG = WIDTH / 4;
  logic [NG:0] gc;   // gc[g] = carry into group g

  assign gc[0] = cin;

  rca #(.WIDTH(4), .HAS_CIN(1'b1)) u_g0 (
    .a(a[3:0]), .b(b[3:0]), .cin(gc[0]), .sum(sum[3:0]), .cout(gc[1]));

  for (genvar g = 1; g < NG; g++) begin : g_grp
    csla_bec_group u_grp (
      .a(a[4*g +: 4]), .b(b[4*g +: 4]), .cin(gc[g]), .sum(sum[4*g +: 4]), .cout(gc[g+1]));
  end

  assign cout  = gc[NG];
  assign carry = sum ^ a ^ b;

  initial assert (WIDTH % 4 == 0 && WIDTH >= 4)
    else $error("csla_bec: WIDTH must be a positive multiple of 4");
endmodule
