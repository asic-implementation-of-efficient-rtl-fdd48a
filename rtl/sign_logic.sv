// Result sign. The result takes the sign of the larger-magnitude operand:
// sx, or sy (already inverted for a subtraction) when the operands were
// swapped. An exact cancellation (eop with a zero difference) gives +0, as
// IEEE 754 requires under round to nearest; the inputs follow the source
// design, the cancellation rule is this design's. Combinational.
module sign_logic (
  input  logic sx,
  input  logic sy,
  input  logic swap,
  input  logic eop,
  input  logic zero,
  output logic sz
);
  always_comb sz = (eop & zero) ? 1'b0 : (swap ? sy : sx);
endmodule
