// tb_pre_shifter: checks sh[s] = x * 2**s, cs11 = 3x and cs101 = 5x for
// every 8-bit input.
module tb_pre_shifter;
  localparam int W  = 8;
  localparam int PW = W + 4;

  logic signed [W-1:0]  x;
  logic signed [PW-1:0] sh [4];
  logic signed [PW-1:0] cs11, cs101;
  int checks = 0, failures = 0;

  pre_shifter #(.W(W)) dut (.x(x), .sh(sh), .cs11(cs11), .cs101(cs101));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = W'(v);
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(sh[s]) != v * (1 << s)) begin
          failures++;
          $display("x=%0d sh[%0d]=%0d", v, s, sh[s]);
        end
      end
      checks++;
      if (int'(cs11) != 3 * v || int'(cs101) != 5 * v) begin
        failures++;
        $display("x=%0d cs11=%0d cs101=%0d", v, cs11, cs101);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
