// tb_bcs_fir_filter_full: the filter at its default size (10 taps,
// coefficients 2,3,4,5,5,4,3,2,0,0, 8-bit input, 16-bit output). Replays the
// step-input run of the filter's reference simulation: the input is held at
// 5 and the tap products must be 10,15,20,25,25,20,15,10,0,0 while the output
// climbs 10,25,45,70,95,115,130,140 and settles at 140, starting exactly
// 2 clocks after the first sample. Then checks a random stream against a
// multiply-accumulate reference.
module tb_bcs_fir_filter_full;
  logic              clk = 0, rst = 1;
  logic signed [7:0]  fir_in = '0;
  logic signed [15:0] fir_tap_out;

  localparam int T = 10;
  localparam int H [T] = '{2, 3, 4, 5, 5, 4, 3, 2, 0, 0};
  localparam int STEP_OUT [8] = '{10, 25, 45, 70, 95, 115, 130, 140};
  localparam int MUL_OUT  [T] = '{10, 15, 20, 25, 25, 20, 15, 10, 0, 0};

  int checks = 0, failures = 0;
  int mx [T];
  int my;

  bcs_fir_filter dut (.clk(clk), .rst(rst), .fir_in(fir_in), .fir_tap_out(fir_tap_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int s);
    int acc;
    fir_in = 8'(s);
    @(posedge clk); #1;
    acc = 0;
    for (int i = 0; i < T; i++) acc += H[i] * mx[i];
    my = int'($signed(16'(acc)));
    for (int i = T - 1; i > 0; i--) mx[i] = mx[i-1];
    mx[0] = int'($signed(8'(s)));
    checks++;
    if (int'(fir_tap_out) != my) begin
      failures++;
      if (failures < 20) $display("t=%0t out=%0d want %0d", $time, fir_tap_out, my);
    end
  endtask

  initial begin
    for (int i = 0; i < T; i++) mx[i] = 0;
    my = 0;
    fir_in = 8'sd5;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    // Step input of 5, as in the reference run.
    step(5);
    checks++;
    if (fir_tap_out != 0) begin failures++; $display("output before 2-clock latency"); end
    for (int n = 0; n < 12; n++) begin
      step(5);
      checks++;
      if (int'(fir_tap_out) != STEP_OUT[(n < 8) ? n : 7]) begin
        failures++;
        $display("step cycle %0d: out=%0d want %0d", n, fir_tap_out, STEP_OUT[(n < 8) ? n : 7]);
      end
    end
    for (int i = 0; i < T; i++) begin
      checks++;
      if (int'(dut.mul_out[i]) != MUL_OUT[i]) begin
        failures++;
        $display("tap %0d product %0d want %0d", i, dut.mul_out[i], MUL_OUT[i]);
      end
    end
    for (int n = 0; n < 2000; n++) step($signed(8'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
