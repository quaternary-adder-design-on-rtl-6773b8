// qsd_to_bin_tb: checks QSD to binary conversion at the default 33 digits.
//
// Random digit strings (every digit -3..3) and the extremes (all +3, all -3,
// alternating signs) are applied. The expected binary value sum(d_i * 4^i) is
// computed here by Horner's rule and compared with the 67-bit output.
module qsd_to_bin_tb;
  import qsd_pkg::*;

  localparam int unsigned N = 33;
  localparam int unsigned W = 2 * N + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  qsd_digit_t [N-1:0] digits;
  logic [W-1:0]       bin;
  int checks = 0, failures = 0;

  qsd_to_bin dut (.digits(digits), .bin(bin));

  function automatic logic signed [W-1:0] value(input qsd_digit_t [N-1:0] d);
    logic signed [W-1:0] v = '0;
    for (int i = N - 1; i >= 0; i--) v = v * 4 + W'(d[i]);
    return v;
  endfunction

  task automatic check_now();
    @(posedge clk);
    checks++;
    if (bin != value(digits)) begin
      failures++;
      $display("FAIL got %h expected %h", bin, value(digits));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) digits[i] = 3'sd3;
    check_now();
    for (int i = 0; i < N; i++) digits[i] = -3'sd3;
    check_now();
    for (int i = 0; i < N; i++) digits[i] = i[0] ? -3'sd2 : 3'sd1;
    check_now();
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) digits[i] = qsd_digit_t'(int'($urandom_range(6)) - 3);
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
