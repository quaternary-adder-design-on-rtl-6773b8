// qsd_carry_sum_gen: first step of carry-free QSD addition for one digit.
//
// The two operand digits a and b (each -3..3) add up to a value from -6 to 6.
// That value is recoded as a two-digit QSD number (carry, isum) with
//   a + b = 4*carry + isum,   carry in -1..1,   isum in -2..2.
// The limits on both are what makes the second step carry-free: a carry of
// at most 1 added to an intermediate sum of at most 2 always fits in one
// digit. Where several two-digit codes exist for a value, the one obeying
// these limits is chosen:
//   -6 -> (-1,-2)  -5 -> (-1,-1)  -4 -> (-1, 0)  -3 -> (-1, 1)
//   -2 -> ( 0,-2)  -1 -> ( 0,-1)   0 -> ( 0, 0)   1 -> ( 0, 1)   2 -> ( 0, 2)
//    3 -> ( 1,-1)   4 -> ( 1, 0)   5 -> ( 1, 1)   6 -> ( 1, 2)
// This coding table follows the adder's definition; building it as a small
// adder followed by a case lookup is this design's choice.
//
// Interface: a, b are 3-bit two's complement digits; carry is a 2-bit two's
// complement carry to the next higher digit; isum is the 3-bit intermediate
// sum kept by this digit. Purely combinational, no clock.
module qsd_carry_sum_gen
  import qsd_pkg::*;
(
  input  qsd_digit_t a,
  input  qsd_digit_t b,
  output qsd_carry_t carry,
  output qsd_digit_t isum
);

  logic signed [3:0] total;  // -6 .. 6

  always_comb begin
    total = 4'(a) + 4'(b);
    unique case (total)
      -4'sd6: begin carry = -2'sd1; isum = -3'sd2; end
      -4'sd5: begin carry = -2'sd1; isum = -3'sd1; end
      -4'sd4: begin carry = -2'sd1; isum =  3'sd0; end
      -4'sd3: begin carry = -2'sd1; isum =  3'sd1; end
      -4'sd2: begin carry =  2'sd0; isum = -3'sd2; end
      -4'sd1: begin carry =  2'sd0; isum = -3'sd1; end
       4'sd0: begin carry =  2'sd0; isum =  3'sd0; end
       4'sd1: begin carry =  2'sd0; isum =  3'sd1; end
       4'sd2: begin carry =  2'sd0; isum =  3'sd2; end
       4'sd3: begin carry =  2'sd1; isum = -3'sd1; end
       4'sd4: begin carry =  2'sd1; isum =  3'sd0; end
       4'sd5: begin carry =  2'sd1; isum =  3'sd1; end
       4'sd6: begin carry =  2'sd1; isum =  3'sd2; end
      // -8, -7 and 7 need an operand code of -4, which is not a QSD digit.
      default: begin carry = 2'sd0; isum = 3'sd0; end
    endcase
  end

endmodule
