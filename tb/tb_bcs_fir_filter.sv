// tb_bcs_fir_filter: end-to-end test of the BCS FIR filter with 10 taps and
// a coefficient set chosen so that every mechanism is used: all eight odd
// BCS terms, all four digit shifts, zero digits, negative coefficients
// (the two's complement unit), output wrap-around and a reset in the middle
// of a stream. Checks the impulse response and its 2-clock latency, then
// compares every output with a plain multiply-accumulate reference.
module tb_bcs_fir_filter;
  import bcs_pkg::*;

  localparam int IN_W = 8, COEF_W = 8, TAPS = 10, OUT_W = 16;
  localparam logic signed [COEF_W-1:0] H [TAPS] =
    '{3, -5, 7, 9, -11, 13, 15, 8, -108, 90};

  logic                    clk = 0, rst = 1;
  logic signed [IN_W-1:0]  fir_in = '0;
  logic signed [OUT_W-1:0] fir_tap_out;

  int checks = 0, failures = 0;
  int mx [TAPS];
  int my;
  int term_used [8], shift_used [4];
  int zero_digits = 0, neg_active = 0, wraps = 0, resets = 0, outputs = 0;

  bcs_fir_filter #(.IN_W(IN_W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(OUT_W),
                   .COEFS(H)) dut (
    .clk(clk), .rst(rst), .fir_in(fir_in), .fir_tap_out(fir_tap_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count which datapath mechanisms are exercised, from the design's own
  // coded coefficients and delay line, once per clock.
  always @(negedge clk) if (!rst) begin
    for (int i = 0; i < TAPS; i++)
      for (int j = 0; j < 2; j++)
        if (dut.coded[i][j].zero) zero_digits++;
        else if (dut.x_n[i] != 0) begin
          term_used[dut.coded[i][j].term]++;
          shift_used[dut.coded[i][j].shift]++;
        end
    if (dut.neg_sum != 0) neg_active++;
  end

  task automatic model_reset();
    for (int i = 0; i < TAPS; i++) mx[i] = 0;
    my = 0;
  endtask

  // One clock: apply s, then step the reference and compare.
  task automatic step(input int s);
    int acc;
    fir_in = IN_W'(s);
    @(posedge clk); #1;
    if (rst) begin
      model_reset();
    end else begin
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += int'(H[i]) * mx[i];
      if (acc > 32767 || acc < -32768) wraps++;
      my = int'($signed(OUT_W'(acc)));
      for (int i = TAPS - 1; i > 0; i--) mx[i] = mx[i-1];
      mx[0] = int'($signed(IN_W'(s)));
      outputs++;
    end
    checks++;
    if (int'(fir_tap_out) != my) begin
      failures++;
      if (failures < 20) $display("t=%0t out=%0d want %0d", $time, fir_tap_out, my);
    end
  endtask

  initial begin
    model_reset();
    step(0); step(0);
    rst = 0;
    // Impulse: h_i must appear on the output exactly i+2 clocks after it.
    step(1);
    checks++;
    if (fir_tap_out != 0) begin failures++; $display("output before latency"); end
    for (int i = 0; i < TAPS + 2; i++) begin
      step(0);
      if (i < TAPS) begin
        checks++;
        if (int'(fir_tap_out) != int'(H[i])) begin
          failures++;
          $display("impulse tap %0d: got %0d want %0d", i, fir_tap_out, H[i]);
        end
      end
    end
    // Random stream.
    for (int n = 0; n < 1500; n++) step($signed(IN_W'($urandom)));
    // Extreme inputs, signs matching the coefficients, to force wrap.
    // x[n-i] = -128 where h_i > 0 and 127 where h_i < 0 drives the sum
    // below -32768.
    for (int k = 0; k < TAPS; k++) step((H[TAPS-1-k] < 0) ? 127 : -128);
    step(0);
    for (int n = 0; n < 40; n++) step((n % 2) ? 127 : -128);
    // Reset in the middle of a stream.
    rst = 1; resets++;
    step(77);
    rst = 0;
    checks++;
    if (fir_tap_out != 0) begin failures++; $display("reset did not clear output"); end
    for (int n = 0; n < 300; n++) step($signed(IN_W'($urandom)));

    for (int k = 0; k < 8; k++) begin
      checks++;
      if (term_used[k] == 0) begin failures++; $display("BCS term %0d never used", 2 * k + 1); end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (shift_used[s] == 0) begin failures++; $display("shift %0d never used", s); end
    end
    checks++; if (zero_digits == 0) begin failures++; $display("no zero digit"); end
    checks++; if (neg_active == 0) begin failures++; $display("negative path unused"); end
    checks++; if (wraps == 0)      begin failures++; $display("no output wrap"); end
    checks++; if (resets == 0)     begin failures++; $display("no reset"); end
    $display("mechanisms: outputs=%0d zero_digits=%0d neg_active=%0d wraps=%0d resets=%0d",
             outputs, zero_digits, neg_active, wraps, resets);
    for (int k = 0; k < 8; k++) $display("  term %0d used %0d times", 2 * k + 1, term_used[k]);
    for (int s = 0; s < 4; s++) $display("  shift %0d used %0d times", s, shift_used[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
