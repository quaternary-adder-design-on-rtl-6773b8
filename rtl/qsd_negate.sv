// qsd_negate: optional digit-wise negation of a QSD number.
//
// A QSD number is negated by negating each of its digits, since every digit
// range is symmetric (-3..3). With neg set this block turns B into -B, so the
// adder that follows computes A - B with the same carry-free addition:
// subtraction needs no borrow chain either.
//
// Interface: din holds N_DIGITS digits, dout the same digits negated when
// neg is 1 and unchanged when neg is 0. Purely combinational. Negation of
// digits for subtraction follows the design; the neg select is this design's
// choice of control.
module qsd_negate
  import qsd_pkg::*;
#(
  parameter int unsigned N_DIGITS = 32
) (
  input  logic                      neg,
  input  qsd_digit_t [N_DIGITS-1:0] din,
  output qsd_digit_t [N_DIGITS-1:0] dout
);

  always_comb begin
    for (int i = 0; i < N_DIGITS; i++) begin
      dout[i] = neg ? -din[i] : din[i];
    end
  end

endmodule
