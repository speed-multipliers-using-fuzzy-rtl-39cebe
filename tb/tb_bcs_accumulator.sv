// tb_bcs_accumulator: random tap products and coefficient signs, including
// all-positive, all-negative and extreme products; checks both sums.
module tb_bcs_accumulator;
  localparam int TAPS   = 10;
  localparam int PROD_W = 16;
  localparam int ACC_W  = PROD_W + 4;

  logic signed [PROD_W-1:0] prod [TAPS];
  logic                     neg  [TAPS];
  logic signed [ACC_W-1:0]  pos_sum, neg_sum;
  int checks = 0, failures = 0;

  bcs_accumulator #(.TAPS(TAPS), .PROD_W(PROD_W)) dut (
    .prod(prod), .neg(neg), .pos_sum(pos_sum), .neg_sum(neg_sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint ep, en;
      ep = 0;
      en = 0;
      for (int i = 0; i < TAPS; i++) begin
        case (n % 4)
          0: prod[i] = PROD_W'($urandom);
          1: prod[i] = 16'sh7fff;
          2: prod[i] = 16'sh8000;
          default: prod[i] = PROD_W'($urandom_range(0, 255));
        endcase
        neg[i] = (n == 1) ? 1'b0 : (n == 2) ? 1'b1 : 1'($urandom);
        if (neg[i]) en += prod[i];
        else        ep += prod[i];
      end
      #1;
      checks++;
      if (longint'(pos_sum) != ep || longint'(neg_sum) != en) begin
        failures++;
        $display("n=%0d pos=%0d/%0d neg=%0d/%0d", n, pos_sum, ep, neg_sum, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
