// Significand add/subtract and normalisation with LZA error detection.
// Inputs are the aligned significands {1.f, G, R, S}, the larger first, so an
// effective subtraction never goes negative. The (W+1)-bit modified carry
// select adder (csla_bec) forms ma + mb, or ma + ~mb + 1 when eop = 1. In
// parallel the LZA predicts the leading-zero count of ma - mb and carry_select_ed
// picks the adder's carry at the predicted leading digit to tell whether the
// prediction is one short. The coarse shifter applies the prediction and the
// fine shifter the one-place correction, or a right shift by one when an
// addition carries out (ovf). The arrangement follows the source design;
// the widths and the ordered-operand convention are this design's. Output mant has its leading one at bit W-1
// unless the result is zero. shift is the total left shift (0 for addition).
// Combinational.
module addsub_norm #(
  parameter int unsigned W  = 27,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  ma,
  input  logic [W-1:0]  mb,
  input  logic          eop,
  output logic [W-1:0]  mant,
  output logic          ovf,
  output logic [CW-1:0] shift,
  output logic          is_zero,
  output logic          lza_err
);
  localparam int unsigned AW = ((W + 1 + 3) / 4) * 4;  // adder width, multiple of 4
  localparam int unsigned SW = $clog2(AW);

  logic [AW-1:0] opa, opb, sum, carry, coarse, fine;
  logic          cout;
  logic [W-1:0]  f, onehot, t;
  logic [CW-1:0] lz;
  logic          err;

  assign opa = AW'(ma);
  assign opb = eop ? ~AW'(mb) : AW'(mb);

  csla_bec #(.WIDTH(AW)) u_csla (
    .a(opa), .b(opb), .cin(eop), .sum(sum), .cout(cout), .carry(carry));

  lza #(.WIDTH(W)) u_lza (.a(ma), .b(mb), .f(f), .onehot(onehot), .lz(lz));

  assign t = ma ^ ~mb;
  carry_select_ed #(.WIDTH(W)) u_ed (
    .onehot(onehot), .t(t), .carry(carry[W-1:0]), .err(err));

  coarse_shifter #(.WIDTH(AW)) u_coarse (
    .din(sum), .sh(eop ? SW'(lz) : '0), .dout(coarse));

  assign ovf     = ~eop & sum[W];
  assign lza_err = eop & err;

  fine_shifter #(.WIDTH(AW)) u_fine (
    .din(coarse), .left(lza_err), .right(ovf), .dout(fine));

  assign mant    = fine[W-1:0];
  assign shift   = eop ? lz + CW'(err) : '0;
  assign is_zero = (sum[W:0] == '0);

  // An effective subtraction of ordered operands never borrows.
  always_comb assert (!(eop && sum[W])) else $error("addsub_norm: negative difference");
endmodule
