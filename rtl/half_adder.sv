// One-bit half adder (the 6-gate basic block of the carry select adder).
// Basic cell of the source design. Combinational: sum = a ^ b, cout = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end
endmodule
