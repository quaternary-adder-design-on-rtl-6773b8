// qsd_second_step_adder_tb: exhaustive check of the second-step digit adder.
//
// Every carry (-1..1) is combined with every intermediate sum (-2..2). The
// result must equal their integer sum and lie within one QSD digit (-3..3),
// and its 3-bit code must be the two's complement code of that value
// (e.g. -3 -> 3'b101, 3 -> 3'b011).
module qsd_second_step_adder_tb;
  import qsd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t isum, s;
  qsd_carry_t cin;
  int checks = 0, failures = 0;

  qsd_second_step_adder dut (.isum(isum), .cin(cin), .s(s));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int c = -1; c <= 1; c++) begin
      for (int i = -2; i <= 2; i++) begin
        cin  = qsd_carry_t'(c);
        isum = qsd_digit_t'(i);
        @(posedge clk);
        e = c + i;
        checks++;
        if (int'(s) != e || e < -3 || e > 3) begin
          failures++;
          $display("FAIL cin=%0d isum=%0d s=%0d expected %0d", c, i, s, e);
        end
        checks++;
        if (s[2] != (e < 0) || s[1:0] != 2'(e)) begin
          failures++;
          $display("FAIL code of %0d is %b", e, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
