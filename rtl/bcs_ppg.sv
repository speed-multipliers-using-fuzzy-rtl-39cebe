// bcs_ppg: the BCS partial product generator. From the shifted copies of a
// sample x and the two base subexpressions 3x ([11]) and 5x ([101]) made by
// pre_shifter, it builds the eight odd multiples that any 4-bit coefficient
// digit needs: 1x, 3x, 5x, 7x, 9x, 11x, 13x and 15x (binary terms 1, 11,
// 101, 111, 1001, 1011, 1101, 1111). Common subexpressions are reused:
//   7x  = 3x + 4x        (reuses [11])
//   9x  = x  + 8x
//   11x = 3x + 8x        (reuses [11])
//   13x = 5x + 8x        (reuses [101])
//   15x = 7x + 8x
// so, with the two adders of pre_shifter, seven adders make all terms.
//
// Interface: sh[s] = x << s, cs11 = 3x, cs101 = 5x (from pre_shifter);
// term[k] = (2k+1)*x, W+4 bits, two's complement.
// Timing: purely combinational, at most two adders deep (15x).
// The set of terms and the reuse of [11] and [101] follow the filter's
// description; the particular adder tree is this design's own.
module bcs_ppg
  import bcs_pkg::*;
#(
  parameter int W = 8,
  localparam int PW = W + TERM_GROW
) (
  input  logic signed [PW-1:0] sh    [4],
  input  logic signed [PW-1:0] cs11,
  input  logic signed [PW-1:0] cs101,
  output logic signed [PW-1:0] term  [NUM_TERMS]
);

  logic signed [PW-1:0] t7;

  always_comb begin
    t7 = cs11 + sh[2];
    term[0] = sh[0];
    term[1] = cs11;
    term[2] = cs101;
    term[3] = t7;
    term[4] = sh[0] + sh[3];
    term[5] = cs11 + sh[3];
    term[6] = cs101 + sh[3];
    term[7] = t7 + sh[3];
  end

endmodule
