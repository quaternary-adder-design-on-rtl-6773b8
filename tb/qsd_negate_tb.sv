// qsd_negate_tb: checks digit-wise negation with the neg select.
//
// Random digit strings are applied with neg = 0 (output must equal input)
// and neg = 1 (every output digit must be the negative of its input digit,
// still a valid QSD digit).
module qsd_negate_tb;
  import qsd_pkg::*;

  localparam int unsigned N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               neg;
  qsd_digit_t [N-1:0] din, dout;
  int checks = 0, failures = 0;

  qsd_negate dut (.neg(neg), .din(din), .dout(dout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < N; i++) din[i] = qsd_digit_t'(int'($urandom_range(6)) - 3);
      neg = t[0];
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(dout[i]) != (neg ? -int'(din[i]) : int'(din[i]))) begin
          failures++;
          $display("FAIL neg=%0b digit %0d: in %0d out %0d", neg, i, din[i], dout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
