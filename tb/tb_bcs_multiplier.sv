// tb_bcs_multiplier: multiplies every 8-bit input by every 8-bit
// coefficient magnitude 0..255 (coded with the reference coding) and
// checks prod = magnitude * x exactly.
module tb_bcs_multiplier;
  import bcs_pkg::*;
  import bcs_ref_pkg::*;

  localparam int W    = 8;
  localparam int NDIG = 2;
  localparam int PROD_W = W + 4 * NDIG;

  logic signed [W-1:0]      x;
  bcs_digit_t               digits [NDIG];
  logic signed [PROD_W-1:0] prod;
  int checks = 0, failures = 0;

  bcs_multiplier #(.W(W), .NDIG(NDIG)) dut (.x(x), .digits(digits), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      for (int j = 0; j < NDIG; j++) begin
        ref_digit_t r;
        r = ref_encode((m >> (4 * j)) & 15);
        digits[j].zero  = r.zero;
        digits[j].term  = TERM_IDX_W'(r.term);
        digits[j].shift = SHIFT_W'(r.shift);
      end
      for (int v = -128; v < 128; v++) begin
        x = W'(v);
        #1;
        checks++;
        if (int'(prod) != m * v) begin
          failures++;
          if (failures < 10) $display("x=%0d m=%0d prod=%0d want %0d", v, m, prod, m * v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
