// tb_bcs_mux: for random inputs x and every 4-bit digit d, drives the eight
// terms (2k+1)*x and the reference code of d, and checks pp = d*x. Also
// checks that a code flagged zero gives 0 whatever its other fields hold.
module tb_bcs_mux;
  import bcs_pkg::*;
  import bcs_ref_pkg::*;

  localparam int W  = 8;
  localparam int PW = W + 4;

  logic signed [PW-1:0] term [NUM_TERMS];
  bcs_digit_t           code;
  logic signed [PW-1:0] pp;
  int checks = 0, failures = 0;

  bcs_mux #(.W(W)) dut (.term(term), .code(code), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int v;
      v = (n < 256) ? n - 128 : $signed(W'($urandom));
      for (int k = 0; k < NUM_TERMS; k++) term[k] = PW'((2 * k + 1) * v);
      for (int d = 0; d < 16; d++) begin
        ref_digit_t r;
        r = ref_encode(d);
        code.zero  = r.zero;
        code.term  = TERM_IDX_W'(r.term);
        code.shift = SHIFT_W'(r.shift);
        #1;
        checks++;
        if (int'(pp) != d * v) begin
          failures++;
          $display("x=%0d d=%0d pp=%0d want %0d", v, d, pp, d * v);
        end
      end
      code = bcs_digit_t'($urandom);
      code.zero = 1'b1;
      #1;
      checks++;
      if (pp !== '0) begin failures++; $display("zero digit gave %0d", pp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
