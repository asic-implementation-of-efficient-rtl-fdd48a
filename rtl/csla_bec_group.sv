// One 4-bit group of the carry select adder with a binary to excess-1
// converter (BEC). A single RCA adds a and b with carry-in 0 (3 full adders,
// 1 half adder). Its 5-bit result {carry, sum} feeds a 5-bit BEC, which gives
// the result for carry-in 1 (the same sum plus one). The 10:5 multiplexer,
// steered by the carry coming from the group below, picks one of the two.
// This replaces the second RCA of a regular carry select adder. The structure
// follows the source design. Combinational.
module csla_bec_group (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [3:0] s0;
  logic       c0;
  logic [4:0] r1;

  rca #(.WIDTH(4), .HAS_CIN(1'b0)) u_rca (.a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0));
  bec #(.WIDTH(5)) u_bec (.b({c0, s0}), .x(r1));
  mux2w #(.WIDTH(5)) u_mux (.d0({c0, s0}), .d1(r1), .sel(cin), .y({cout, sum}));
endmodule
