// LZA error detection by carry selection. The LZA points (one-hot) at the
// predicted leading digit p of the difference; the carry select adder reports
// the carry into every bit. The sum bit at p is t[p] ^ carry[p], where t is the
// propagate term of the subtraction (a ^ ~b). If that bit is 0 the true
// leading one is at p-1 and err asks the fine shifter for one more left shift.
// Selection is an AND-OR over the one-hot position, so it needs no encoded
// shift amount. With no predicted position (a == b) err is 0. Checking the
// carry at the leading digit follows the source design; the one-hot AND-OR
// form of the selection is this design's. Combinational.
module carry_select_ed #(
  parameter int unsigned WIDTH = 27
) (
  input  logic [WIDTH-1:0] onehot,
  input  logic [WIDTH-1:0] t,
  input  logic [WIDTH-1:0] carry,
  output logic             err
);
  logic c_sel, t_sel;
  always_comb begin
    c_sel = |(onehot & carry);
    t_sel = |(onehot & t);
    err   = (|onehot) & ~(t_sel ^ c_sel);
  end
endmodule
