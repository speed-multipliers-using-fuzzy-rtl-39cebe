// bcs_mux: the multiplexer that turns one coded coefficient digit into its
// partial product. It first picks the odd term named by the digit out of
// the eight terms of bcs_ppg, then a 4:1 multiplexer picks that term shifted
// by 0, 1, 2 or 3 places. A zero digit gives 0.
//
// Interface: term[k] = (2k+1)*x; code is a bcs_digit_t; pp = digit * x,
// W+4 bits, two's complement (a digit is at most 15, so it fits).
// Timing: purely combinational.
// The 4:1 multiplexer follows the filter's description; putting a term
// selector in front of it is this design's reading of how the 4:1
// multiplexer is fed.
module bcs_mux
  import bcs_pkg::*;
#(
  parameter int W = 8,
  localparam int PW = W + TERM_GROW
) (
  input  logic signed [PW-1:0] term [NUM_TERMS],
  input  bcs_digit_t           code,
  output logic signed [PW-1:0] pp
);

  logic signed [PW-1:0] t;

  always_comb begin
    t = term[code.term];
    unique case (code.shift)
      2'd0: pp = t;
      2'd1: pp = t <<< 1;
      2'd2: pp = t <<< 2;
      2'd3: pp = t <<< 3;
    endcase
    if (code.zero) pp = '0;
  end

endmodule
