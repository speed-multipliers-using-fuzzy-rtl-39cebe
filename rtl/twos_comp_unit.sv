// twos_comp_unit: applies the coefficient signs after accumulation. It
// takes the two's complement of the sum that belongs to negative
// coefficients (invert every bit, add one) and adds it to the sum of the
// positive ones, so y = pos_sum - neg_sum.
//
// Interface: pos_sum, neg_sum and y are W-bit two's-complement values; y
// wraps modulo 2**W (the accumulator is sized so it does not).
// Timing: purely combinational, one adder with carry-in 1.
// Placing a two's complement unit after the accumulator follows the
// filter's block diagram; what exactly it negates is this design's choice.
module twos_comp_unit #(
  parameter int W = 19
) (
  input  logic signed [W-1:0] pos_sum,
  input  logic signed [W-1:0] neg_sum,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] neg_inv;

  always_comb begin
    neg_inv = ~neg_sum;
    y       = pos_sum + neg_inv + W'(1);
  end

endmodule
