// qsd_adder_tb: random and corner checks of the N_DIGITS-digit QSD adder.
//
// Operands are random digit strings with every digit in -3..3, plus the all
// +3 and all -3 extremes. The testbench computes the value of each operand
// and of the result as sum(d_i * 4^i) and checks value(s) = value(a) +
// value(b), and that every result digit is a valid QSD digit (-3..3). It
// runs at the default size of 32 digits.
module qsd_adder_tb;
  import qsd_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned VW = 2 * N + 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t [N-1:0] a, b;
  qsd_digit_t [N:0]   s;
  int checks = 0, failures = 0;
  int carry_out_seen = 0;

  qsd_adder dut (.a(a), .b(b), .s(s));

  function automatic logic signed [VW-1:0] val_n(input qsd_digit_t [N-1:0] d);
    logic signed [VW-1:0] v = '0;
    for (int i = N - 1; i >= 0; i--) v = v * 4 + VW'(d[i]);
    return v;
  endfunction

  function automatic logic signed [VW-1:0] val_n1(input qsd_digit_t [N:0] d);
    logic signed [VW-1:0] v = '0;
    for (int i = N; i >= 0; i--) v = v * 4 + VW'(d[i]);
    return v;
  endfunction

  function automatic qsd_digit_t rand_digit();
    return qsd_digit_t'(int'($urandom_range(6)) - 3);
  endfunction

  task automatic check_now();
    bit digits_ok = 1'b1;
    @(posedge clk);
    for (int i = 0; i <= N; i++) if (s[i] == 3'b100) digits_ok = 1'b0;
    checks++;
    if (!digits_ok) begin
      failures++;
      $display("FAIL invalid digit code in result");
    end
    checks++;
    if (val_n1(s) != val_n(a) + val_n(b)) begin
      failures++;
      $display("FAIL value: a=%0d b=%0d s=%0d", val_n(a), val_n(b), val_n1(s));
    end
    if (s[N] != 3'sd0) carry_out_seen++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin a[i] = 3'sd3;  b[i] = 3'sd3;  end
    check_now();
    for (int i = 0; i < N; i++) begin a[i] = -3'sd3; b[i] = -3'sd3; end
    check_now();
    for (int i = 0; i < N; i++) begin a[i] = 3'sd3;  b[i] = -3'sd3; end
    check_now();
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) begin a[i] = rand_digit(); b[i] = rand_digit(); end
      check_now();
    end
    checks++;
    if (carry_out_seen == 0) begin
      failures++;
      $display("FAIL no nonzero top carry digit was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
