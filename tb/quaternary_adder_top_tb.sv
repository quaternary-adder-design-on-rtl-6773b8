// quaternary_adder_top_tb: end-to-end test of the binary adder/subtractor at
// its default width (64-bit operands, 65-bit result).
//
// Random operands and corner operands (extremes of the signed range, 0, -1)
// are added and subtracted. The expected result is formed here with ordinary
// 65-bit two's complement arithmetic, independent of any QSD logic, and the
// QSD digit output must carry the same value, as must the QSD digits the
// operands are converted to inside the top. The test counts how often each
// mechanism of the design was exercised and fails if one never was:
//   - addition (sub = 0) and subtraction (sub = 1, digits of B negated),
//   - a positive and a negative first-step carry inside the word,
//   - a nonzero top result digit (the carry out of the last digit),
//   - a result outside the 64-bit signed range (needs the 65th bit).
module quaternary_adder_top_tb;
  import qsd_pkg::*;

  localparam int unsigned W = 64;
  localparam int unsigned N = W / 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]     a, b;
  logic             sub;
  logic [W:0]       result;
  qsd_digit_t [N:0] qsd_result;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_pos_carry = 0, n_neg_carry = 0;
  int n_top_digit = 0, n_wide = 0;

  quaternary_adder_top dut (
    .a(a), .b(b), .sub(sub), .result(result), .qsd_result(qsd_result)
  );

  function automatic logic signed [W+7:0] qsd_value(input qsd_digit_t [N:0] d);
    logic signed [W+7:0] v = '0;
    for (int i = N; i >= 0; i--) v = v * 4 + (W+8)'(d[i]);
    return v;
  endfunction

  function automatic logic signed [W+7:0] qsd_value_n(input qsd_digit_t [N-1:0] d);
    logic signed [W+7:0] v = '0;
    for (int i = N - 1; i >= 0; i--) v = v * 4 + (W+8)'(d[i]);
    return v;
  endfunction

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic s);
    logic signed [W:0] expected;
    bit pos_c = 1'b0, neg_c = 1'b0;
    a = x; b = y; sub = s;
    @(posedge clk);
    expected = s ? ($signed({x[W-1], x}) - $signed({y[W-1], y}))
                 : ($signed({x[W-1], x}) + $signed({y[W-1], y}));
    checks++;
    if (result != expected) begin
      failures++;
      $display("FAIL %s a=%h b=%h result=%h expected=%h", s ? "sub" : "add", x, y, result, expected);
    end
    checks++;
    if (qsd_value(qsd_result) != (W+8)'(expected)) begin
      failures++;
      $display("FAIL qsd digits of a=%h b=%h sub=%0b do not hold the result", x, y, s);
    end
    checks++;
    if (qsd_value_n(dut.a_qsd) != (W+8)'($signed(x)) || qsd_value_n(dut.b_qsd) != (W+8)'($signed(y))) begin
      failures++;
      $display("FAIL operand digits of a=%h b=%h do not hold the operand values", x, y);
    end
    if (s) n_sub++; else n_add++;
    for (int i = 0; i < N; i++) begin
      if (dut.u_add.carry[i] == 2'sd1)  pos_c = 1'b1;
      if (dut.u_add.carry[i] == -2'sd1) neg_c = 1'b1;
    end
    if (pos_c) n_pos_carry++;
    if (neg_c) n_neg_carry++;
    if (qsd_result[N] != 3'sd0) n_top_digit++;
    if (result[W] != result[W-1]) n_wide++;
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("mechanism %-28s seen %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners[6];
    corners[0] = '0;
    corners[1] = '1;
    corners[2] = {1'b1, {(W-1){1'b0}}};
    corners[3] = {1'b0, {(W-1){1'b1}}};
    corners[4] = 64'h0000_0000_0000_0001;
    corners[5] = 64'hAAAA_AAAA_AAAA_AAAA;
    foreach (corners[i]) foreach (corners[j]) begin
      apply(corners[i], corners[j], 1'b0);
      apply(corners[i], corners[j], 1'b1);
    end
    for (int t = 0; t < 10000; t++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    need(n_add, "addition");
    need(n_sub, "subtraction");
    need(n_pos_carry, "positive intermediate carry");
    need(n_neg_carry, "negative intermediate carry");
    need(n_top_digit, "nonzero top result digit");
    need(n_wide, "result beyond 64-bit range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
