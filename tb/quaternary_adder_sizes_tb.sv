// quaternary_adder_sizes_tb: runs the adder/subtractor at the other operand
// widths of interest, 4, 8, 16, 32 and 128 bits, next to the 64-bit default
// covered by quaternary_adder_top_tb.
//
// One top instance per width is generated. For each, random operands and the
// signed-range extremes are added and subtracted, and the WIDTH+1-bit result
// is compared with ordinary two's complement arithmetic, and the QSD result
// digits must have the same value. Every instance must
// also produce a result outside the WIDTH-bit range at least once, so that the
// extra carry digit is exercised at every size. Each instance reports its
// own counts; the final line sums them.
module quaternary_adder_sizes_tb;
  import qsd_pkg::*;

  localparam int NW = 5;
  localparam int WIDTHS[NW] = '{4, 8, 16, 32, 128};
  localparam int OPS = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks[NW];
  int failures[NW];
  bit done[NW];

  initial begin
    automatic int c = 0, f = 1;
    repeat (50000) @(posedge clk);
    foreach (checks[i]) begin c += checks[i]; f += failures[i]; end
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WIDTHS[k];

    logic [W-1:0]         a, b;
    logic                 sub;
    logic [W:0]           result;
    qsd_digit_t [W/2:0]   qsd_result;

    quaternary_adder_top #(.WIDTH(W)) dut (
      .a(a), .b(b), .sub(sub), .result(result), .qsd_result(qsd_result)
    );

    function automatic logic [W-1:0] rand_word();
      logic [W-1:0] v;
      for (int i = 0; i < W; i++) v[i] = 1'($urandom);
      return v;
    endfunction

    function automatic logic signed [W+3:0] qsd_value(input qsd_digit_t [W/2:0] d);
      logic signed [W+3:0] v = '0;
      for (int i = W / 2; i >= 0; i--) v = v * 4 + (W+4)'(d[i]);
      return v;
    endfunction

    initial begin
      logic signed [W:0] expected;
      automatic int wide = 0;
      checks[k] = 0;
      failures[k] = 0;
      done[k] = 1'b0;
      for (int t = 0; t < OPS; t++) begin
        case (t)
          0: begin a = {1'b1, {(W-1){1'b0}}}; b = {1'b1, {(W-1){1'b0}}}; end
          1: begin a = {1'b0, {(W-1){1'b1}}}; b = {1'b0, {(W-1){1'b1}}}; end
          2: begin a = {1'b0, {(W-1){1'b1}}}; b = {1'b1, {(W-1){1'b0}}}; end
          default: begin a = rand_word(); b = rand_word(); end
        endcase
        sub = (t < 3) ? t[0] : 1'($urandom);
        @(posedge clk);
        expected = sub ? ($signed({a[W-1], a}) - $signed({b[W-1], b}))
                       : ($signed({a[W-1], a}) + $signed({b[W-1], b}));
        checks[k]++;
        if (result != expected) begin
          failures[k]++;
          $display("FAIL W=%0d sub=%0b a=%h b=%h result=%h expected=%h",
                   W, sub, a, b, result, expected);
        end
        checks[k]++;
        if (qsd_value(qsd_result) != (W+4)'(expected)) begin
          failures[k]++;
          $display("FAIL W=%0d: QSD digits do not hold the result", W);
        end
        if (result[W] != result[W-1]) wide++;
      end
      checks[k]++;
      if (wide == 0) begin
        failures[k]++;
        $display("FAIL W=%0d: no result needed the extra bit", W);
      end
      $display("width %0d: %0d checks, %0d failures, %0d results beyond %0d bits",
               W, checks[k], failures[k], wide, W);
      done[k] = 1'b1;
    end
  end

  initial begin
    automatic int c = 0, f = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    foreach (checks[i]) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
