// pre_shifter: prepares one input sample for the BCS partial product
// generator. It forms the shifted copies x, 2x, 4x and 8x, sign extended to
// W+4 bits so that no later sum (up to 15x) overflows, and from them the
// two base common subexpressions of the BCS terms:
//   cs11  = x + 2x = 3x    (binary term 11)
//   cs101 = x + 4x = 5x    (binary term 101)
// Every longer term is one more addition of a shifted copy to x, cs11 or
// cs101, which bcs_ppg does.
//
// Interface: x is a W-bit two's-complement sample; sh[s] = x << s;
// cs11 = 3x; cs101 = 5x.
// Timing: purely combinational, one adder deep.
// Shifting the input ahead of the multiplexer, and building terms 11 and
// 101 once for reuse, follow the filter's description; doing both
// additions here, and the choice of the four shifts 0..3, are this
// design's own.
module pre_shifter
  import bcs_pkg::*;
#(
  parameter int W = 8,
  localparam int PW = W + TERM_GROW
) (
  input  logic signed [W-1:0]  x,
  output logic signed [PW-1:0] sh [4],
  output logic signed [PW-1:0] cs11,
  output logic signed [PW-1:0] cs101
);

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      sh[s] = PW'(x) <<< s;
    end
    cs11  = sh[0] + sh[1];
    cs101 = sh[0] + sh[2];
  end

endmodule
