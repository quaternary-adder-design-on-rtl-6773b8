// quaternary_adder_top: binary adder/subtractor built on carry-free QSD
// addition.
//
// Two WIDTH-bit two's complement operands are converted to WIDTH/2 quaternary
// signed digits each. For subtraction the digits of B are negated. The
// carry-free QSD adder then forms WIDTH/2+1 result digits in a delay that does
// not grow with WIDTH, and a final converter turns the digits back into a
// WIDTH+1-bit two's complement sum, which always holds A+B or A-B exactly.
//
//   a --> to QSD (wiring) ----------------------\
//                                                qsd_adder --> qsd_to_bin --> result
//   b --> to QSD (wiring) --> qsd_negate(sub) --/        \--> qsd_result
//
// The conversion of the operands into QSD digits is done here by wiring:
// each bit pair is a digit, the top pair read as signed (-2..1), so no gates
// are needed (this mapping is this design's choice).
//
// Interface: sub = 0 adds, sub = 1 subtracts. qsd_result exposes the QSD
// digits of the result (least significant at index 0) for users who keep
// working in QSD form. Purely combinational, no clock or reset. The chain
// of conversion, QSD addition and back-conversion follows the design; the
// sub control and the WIDTH+1-bit result width are this design's choices.
module quaternary_adder_top
  import qsd_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]           a,
  input  logic [WIDTH-1:0]           b,
  input  logic                       sub,
  output logic [WIDTH:0]             result,
  output qsd_digit_t [WIDTH/2:0]     qsd_result
);

  localparam int unsigned N_DIGITS = WIDTH / 2;

  if (WIDTH % 2 != 0 || WIDTH < 2) begin : g_bad_width
    $error("quaternary_adder_top: WIDTH must be even and at least 2");
  end

  qsd_digit_t [N_DIGITS-1:0] a_qsd;
  qsd_digit_t [N_DIGITS-1:0] b_qsd;
  qsd_digit_t [N_DIGITS-1:0] b_op;

  // Binary to QSD conversion needs no logic: below the top bit pair every
  // pair of bits is already a digit 0..3 (weight 4^i), and the top pair,
  // which carries the two's complement sign weight, is a signed digit -2..1.
  for (genvar i = 0; i < N_DIGITS; i++) begin : g_to_qsd
    if (i == N_DIGITS - 1) begin : g_top
      assign a_qsd[i] = {a[2*i+1], a[2*i+1 -: 2]};
      assign b_qsd[i] = {b[2*i+1], b[2*i+1 -: 2]};
    end else begin : g_low
      assign a_qsd[i] = {1'b0, a[2*i+1 -: 2]};
      assign b_qsd[i] = {1'b0, b[2*i+1 -: 2]};
    end
  end

  qsd_negate #(.N_DIGITS(N_DIGITS)) u_neg (
    .neg (sub),
    .din (b_qsd),
    .dout(b_op)
  );

  qsd_adder #(.N_DIGITS(N_DIGITS)) u_add (
    .a(a_qsd),
    .b(b_op),
    .s(qsd_result)
  );

  qsd_to_bin #(.N_DIGITS(N_DIGITS + 1), .OUT_W(WIDTH + 1)) u_conv_out (
    .digits(qsd_result),
    .bin   (result)
  );

endmodule
