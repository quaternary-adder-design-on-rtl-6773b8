// qsd_carry_sum_gen_tb: exhaustive check of the first-step carry/sum generator.
//
// All 49 pairs of QSD digits (-3..3) are applied. For each, the testbench
// checks that carry is in -1..1, that the intermediate sum is in -2..2, that
// 4*carry + isum equals a + b, and that the carry is the one the coding rule
// picks: +1 for sums of 3 and above, -1 for -3 and below, else 0. A few
// table entries are also checked literally.
module qsd_carry_sum_gen_tb;
  import qsd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t a, b, isum;
  qsd_carry_t carry;
  int checks = 0, failures = 0;

  qsd_carry_sum_gen dut (.a(a), .b(b), .carry(carry), .isum(isum));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d carry=%0d isum=%0d", what, a, b, carry, isum);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, c_exp;
    for (int ia = -3; ia <= 3; ia++) begin
      for (int ib = -3; ib <= 3; ib++) begin
        a = qsd_digit_t'(ia);
        b = qsd_digit_t'(ib);
        @(posedge clk);
        s = ia + ib;
        c_exp = (s >= 3) ? 1 : (s <= -3) ? -1 : 0;
        check(int'(carry) == c_exp, "carry choice");
        check(int'(isum) >= -2 && int'(isum) <= 2, "isum range");
        check(4 * int'(carry) + int'(isum) == s, "value");
      end
    end
    // Literal table entries: 6 -> 1 2, -6 -> -1 -2, 3 -> 1 -1, -2 -> 0 -2.
    a = 3'sd3;  b = 3'sd3;  @(posedge clk); check(carry == 2'sd1 && isum == 3'sd2, "6");
    a = -3'sd3; b = -3'sd3; @(posedge clk); check(carry == -2'sd1 && isum == -3'sd2, "-6");
    a = 3'sd1;  b = 3'sd2;  @(posedge clk); check(carry == 2'sd1 && isum == -3'sd1, "3");
    a = -3'sd1; b = -3'sd1; @(posedge clk); check(carry == 2'sd0 && isum == -3'sd2, "-2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
