// qsd_adder: N_DIGITS-digit carry-free quaternary signed digit adder.
//
// Every digit position has a carry/sum generator (first step) that splits
// a[i] + b[i] into a carry and an intermediate sum. Positions 1..N_DIGITS-1
// each have a second step adder that adds the carry of the position below to
// their own intermediate sum. Position 0 has no carry coming in, so its
// intermediate sum is its result digit, and the carry of the top position
// becomes one extra result digit. That is N_DIGITS generators and
// N_DIGITS-1 second step adders, as the adder is defined; the delay is two
// digit-steps whatever N_DIGITS is.
//
// Interface: a, b hold N_DIGITS QSD digits, least significant at index 0.
// s holds N_DIGITS+1 digits with value sum(s[i]*4^i) = value(a) + value(b).
// Purely combinational, no clock. Bringing the top carry out as an extra
// digit, rather than dropping it, is this design's choice.
module qsd_adder
  import qsd_pkg::*;
#(
  parameter int unsigned N_DIGITS = 32
) (
  input  qsd_digit_t [N_DIGITS-1:0] a,
  input  qsd_digit_t [N_DIGITS-1:0] b,
  output qsd_digit_t [N_DIGITS:0]   s
);

  qsd_carry_t [N_DIGITS-1:0] carry;
  qsd_digit_t [N_DIGITS-1:0] isum;

  for (genvar i = 0; i < N_DIGITS; i++) begin : g_digit
    qsd_carry_sum_gen u_gen (
      .a    (a[i]),
      .b    (b[i]),
      .carry(carry[i]),
      .isum (isum[i])
    );

    if (i == 0) begin : g_lsd
      assign s[0] = isum[0];
    end else begin : g_step2
      qsd_second_step_adder u_step2 (
        .isum(isum[i]),
        .cin (carry[i-1]),
        .s   (s[i])
      );
    end
  end

  assign s[N_DIGITS] = qsd_digit_t'(carry[N_DIGITS-1]);

endmodule
