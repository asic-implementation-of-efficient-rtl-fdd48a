// Leading zero anticipator for a - b with a >= b (both WIDTH-bit magnitudes).
// It works from the operands only, in parallel with the adder. Each bit pair
// is classed as g (a=1,b=0), s (a=0,b=1) or e (equal). The indicator string
//   f[i] = ~s[i-1] & ( e[i+1] & g[i]  |  ~e[i+1] & s[i] )
// (taking e[WIDTH] = 1, s[-1] = 0) has its leading one at the position p that
// closes the prefix e..e g s..s of the digit string a - b. The true leading one
// of the difference is at p or at p-1, so the count below is exact or one
// short: carry_select_ed flags the second case. A leading-one detector turns
// f into a one-hot position and a leading-zero count (WIDTH when a == b).
// The source design names the LZA without giving its logic; this indicator
// and detector are this design's choice. Combinational.
module lza #(
  parameter int unsigned WIDTH = 27,
  localparam int unsigned CW   = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] f,
  output logic [WIDTH-1:0] onehot,
  output logic [CW-1:0]    lz
);
  logic [WIDTH-1:0] g, s, e;
  logic [WIDTH:0]   e_up;    // e_up[i] = e[i], e_up[WIDTH] = 1
  logic [WIDTH:0]   s_dn;    // s_dn[i+1] = s[i], s_dn[0] = 0
  logic [WIDTH:0]   seen;    // seen[i] = some f above bit i-1 is set

  always_comb begin
    g = a & ~b;
    s = ~a & b;
    e = ~(a ^ b);
    e_up = {1'b1, e};
    s_dn = {s, 1'b0};
    for (int i = 0; i < WIDTH; i++)
      f[i] = ~s_dn[i] & ((e_up[i+1] & g[i]) | (~e_up[i+1] & s[i]));

    seen[WIDTH] = 1'b0;
    lz = CW'(WIDTH);
    for (int i = WIDTH - 1; i >= 0; i--) begin
      onehot[i] = f[i] & ~seen[i+1];
      seen[i]   = seen[i+1] | f[i];
      if (onehot[i]) lz = CW'(WIDTH - 1 - i);
    end
  end
endmodule
