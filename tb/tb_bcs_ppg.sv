// tb_bcs_ppg: for every 8-bit input x, drives the shifted copies x*2**s,
// 3x and 5x, and checks that term[k] = (2k+1)*x for all eight BCS terms.
module tb_bcs_ppg;
  localparam int W  = 8;
  localparam int PW = W + 4;

  logic signed [PW-1:0] sh   [4];
  logic signed [PW-1:0] cs11, cs101;
  logic signed [PW-1:0] term [8];
  int checks = 0, failures = 0;

  bcs_ppg #(.W(W)) dut (.sh(sh), .cs11(cs11), .cs101(cs101), .term(term));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      for (int s = 0; s < 4; s++) sh[s] = PW'(v * (1 << s));
      cs11  = PW'(3 * v);
      cs101 = PW'(5 * v);
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(term[k]) != (2 * k + 1) * v) begin
          failures++;
          $display("x=%0d term[%0d]=%0d want %0d", v, k, term[k], (2 * k + 1) * v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
