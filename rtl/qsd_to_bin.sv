// qsd_to_bin: converts N_DIGITS QSD digits back to two's complement binary.
//
// The value is D = sum(x_i * 4^i). Each digit is split into a non-negative
// part and a non-positive part: positive digits go, as 2-bit fields, into a
// plain binary word P, the magnitudes of negative digits into a word M. Both
// words are formed by wiring alone, and D = P - M takes one binary
// subtraction. This is the only carry-propagating step of the whole design.
//
// Interface: digits holds N_DIGITS digits, least significant at index 0;
// bin is the OUT_W-bit two's complement result. The default
// OUT_W = 2*N_DIGITS + 1 holds any digit string exactly, since
// |D| <= 4^N_DIGITS - 1. A smaller OUT_W keeps the low bits, which is exact
// when the value fits; the dropped high bits of the internal difference are
// then unused, which lint tools report. Purely combinational. The conversion
// formula follows the design; the positive/negative split is this design's
// choice.
module qsd_to_bin
  import qsd_pkg::*;
#(
  parameter int unsigned N_DIGITS = 33,
  parameter int unsigned OUT_W    = 2 * N_DIGITS + 1
) (
  input  qsd_digit_t [N_DIGITS-1:0] digits,
  output logic [OUT_W-1:0]          bin
);

  localparam int unsigned FULL_W = 2 * N_DIGITS + 1;

  logic [2*N_DIGITS-1:0] pos_part;
  logic [2*N_DIGITS-1:0] neg_part;
  logic [FULL_W-1:0]     full;

  always_comb begin
    for (int i = 0; i < N_DIGITS; i++) begin
      if (digits[i][2]) begin
        pos_part[2*i +: 2] = 2'b00;
        neg_part[2*i +: 2] = 2'(-digits[i]);
      end else begin
        pos_part[2*i +: 2] = digits[i][1:0];
        neg_part[2*i +: 2] = 2'b00;
      end
    end
    full = {1'b0, pos_part} - {1'b0, neg_part};
  end

  if (OUT_W <= FULL_W) begin : g_trunc
    assign bin = full[OUT_W-1:0];
  end else begin : g_ext
    assign bin = {{(OUT_W-FULL_W){full[FULL_W-1]}}, full};
  end

endmodule
