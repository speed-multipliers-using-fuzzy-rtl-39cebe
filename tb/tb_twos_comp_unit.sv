// tb_twos_comp_unit: checks y = pos_sum - neg_sum (mod 2**W) for random and
// corner-case operands.
module tb_twos_comp_unit;
  localparam int W = 19;

  logic signed [W-1:0] pos_sum, neg_sum, y;
  int checks = 0, failures = 0;

  twos_comp_unit #(.W(W)) dut (.pos_sum(pos_sum), .neg_sum(neg_sum), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic signed [W-1:0] want;
      pos_sum = (n == 0) ? '0 : W'($urandom);
      neg_sum = (n == 1) ? '0 : (n == 2) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
      #1;
      want = W'(longint'(pos_sum) - longint'(neg_sum));
      checks++;
      if (y !== want) begin
        failures++;
        $display("pos=%0d neg=%0d y=%0d want %0d", pos_sum, neg_sum, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
