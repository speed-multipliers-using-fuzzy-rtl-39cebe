// coef_coder: the "coded coefficients" unit. Turns one signed filter
// coefficient into the form the multiplier datapath uses: a sign flag and
// the magnitude cut into 4-bit BCS digits, each coded as (odd term, shift,
// zero) by bcs_pkg::encode_digit.
//
// Interface: coef is a COEF_W-bit two's-complement coefficient; neg is 1 for
// a negative coefficient; digits[j] codes magnitude bits [4j+3:4j]. The
// magnitude is COEF_W bits wide, so -2**(COEF_W-1) is also coded exactly.
// Timing: purely combinational. In the filter the coefficients are
// constants, so this logic folds away at synthesis.
// The sign/magnitude split and the 4-bit digit size are this design's
// reading of the coefficient coding; the widths are its own choice.
module coef_coder
  import bcs_pkg::*;
#(
  parameter int COEF_W = 8,
  localparam int NDIG  = (COEF_W + DIGIT_W - 1) / DIGIT_W
) (
  input  logic signed [COEF_W-1:0] coef,
  output logic                     neg,
  output bcs_digit_t               digits [NDIG]
);

  logic [NDIG*DIGIT_W-1:0] mag;

  always_comb begin
    neg = coef[COEF_W-1];
    mag = '0;
    mag[COEF_W-1:0] = neg ? COEF_W'(-coef) : COEF_W'(coef);
    for (int j = 0; j < NDIG; j++) begin
      digits[j] = encode_digit(mag[j*DIGIT_W +: DIGIT_W]);
    end
  end

endmodule
