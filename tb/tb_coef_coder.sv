// tb_coef_coder: runs every 8-bit coefficient through coef_coder and checks
// the sign flag and each coded digit (zero flag, odd term, shift) against
// a search-based reference coding of the magnitude.
module tb_coef_coder;
  import bcs_pkg::*;
  import bcs_ref_pkg::*;

  localparam int COEF_W = 8;
  localparam int NDIG   = 2;

  logic signed [COEF_W-1:0] coef;
  logic                     neg;
  bcs_digit_t               digits [NDIG];
  int checks = 0, failures = 0;

  coef_coder #(.COEF_W(COEF_W)) dut (.coef(coef), .neg(neg), .digits(digits));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      int mag;
      coef = COEF_W'(v);
      #1;
      mag = (v < 0) ? -v : v;
      checks++;
      if (neg !== (v < 0)) begin
        failures++;
        $display("coef %0d: neg=%0b", v, neg);
      end
      for (int j = 0; j < NDIG; j++) begin
        ref_digit_t r;
        r = ref_encode((mag >> (4 * j)) & 15);
        checks++;
        if (digits[j].zero !== r.zero ||
            (!r.zero && (int'(digits[j].term) != r.term ||
                         int'(digits[j].shift) != r.shift))) begin
          failures++;
          $display("coef %0d digit %0d: got z=%0b t=%0d s=%0d want z=%0b t=%0d s=%0d",
                   v, j, digits[j].zero, digits[j].term, digits[j].shift,
                   r.zero, r.term, r.shift);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
