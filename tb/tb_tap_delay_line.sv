// tb_tap_delay_line: feeds random samples into the delay line and checks
// after every clock that x_n[k] equals the sample given k+1 clocks earlier;
// also checks that reset clears every stage.
module tb_tap_delay_line;
  localparam int TAPS = 8;
  localparam int W    = 8;

  logic                clk = 0, rst = 1;
  logic signed [W-1:0] sample_in = '0;
  logic signed [W-1:0] x_n [TAPS];
  logic signed [W-1:0] hist [TAPS];
  int checks = 0, failures = 0;

  tap_delay_line #(.TAPS(TAPS), .W(W)) dut (
    .clk(clk), .rst(rst), .sample_in(sample_in), .x_n(x_n));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    sample_in = 8'sh55;
    @(posedge clk); #1;
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (x_n[k] !== '0) begin failures++; $display("reset: x_n[%0d]=%0d", k, x_n[k]); end
    end
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      sample_in = W'($urandom);
      @(posedge clk); #1;
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = sample_in;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (x_n[k] !== hist[k]) begin
          failures++;
          $display("n=%0d x_n[%0d]=%0d want %0d", n, k, x_n[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
