// qsd_second_step_adder: second step of carry-free QSD addition for one digit.
//
// Adds the carry coming from the next lower digit (-1..1) to this digit's
// intermediate sum (-2..2). Because of the limits the first step keeps, the
// result lies in -3..3 and is a single QSD digit: this step never produces a
// carry, so no carry chain forms across the word.
//
// Interface: isum is a 3-bit two's complement intermediate sum, cin a 2-bit
// two's complement carry, s the 3-bit two's complement result digit.
// Purely combinational, no clock. The step follows the adder's definition;
// realising it as a 3-bit two's complement add is this design's choice.
module qsd_second_step_adder
  import qsd_pkg::*;
(
  input  qsd_digit_t isum,
  input  qsd_carry_t cin,
  output qsd_digit_t s
);

  // Sign-extend the carry to digit width; the result cannot overflow 3 bits
  // for the allowed input ranges.
  assign s = isum + qsd_digit_t'(cin);

endmodule
