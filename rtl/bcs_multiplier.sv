// bcs_multiplier: one sub filter (tap) of the BCS FIR filter. It multiplies
// a sample x by the magnitude of a coded constant coefficient without a
// multiplier: pre_shifter makes x, 2x, 4x, 8x, 3x and 5x; bcs_ppg adds
// them into the eight odd terms 1x..15x; one bcs_mux per coefficient digit picks
// digit*x; the digit products are added with their digit weights 16**j.
//
// Interface: x is a W-bit two's-complement sample; digits are the coded
// magnitude digits from coef_coder; prod = |coef| * x, two's complement,
// W + 4*NDIG bits wide (exact, never overflows). The coefficient sign is
// not applied here: the filter applies it after accumulation.
// Timing: purely combinational.
// The pre-shift / partial product / multiplexer chain follows the filter's
// description; the digit-weighted final adder is this design's own.
module bcs_multiplier
  import bcs_pkg::*;
#(
  parameter int W    = 8,
  parameter int NDIG = 2,
  localparam int PW     = W + TERM_GROW,
  localparam int PROD_W = W + NDIG * DIGIT_W
) (
  input  logic signed [W-1:0]      x,
  input  bcs_digit_t               digits [NDIG],
  output logic signed [PROD_W-1:0] prod
);

  logic signed [PW-1:0] sh   [4];
  logic signed [PW-1:0] cs11, cs101;
  logic signed [PW-1:0] term [NUM_TERMS];
  logic signed [PW-1:0] pp   [NDIG];

  pre_shifter #(.W(W)) u_pre_shifter (
    .x     (x),
    .sh    (sh),
    .cs11  (cs11),
    .cs101 (cs101)
  );

  bcs_ppg #(.W(W)) u_ppg (
    .sh    (sh),
    .cs11  (cs11),
    .cs101 (cs101),
    .term  (term)
  );

  for (genvar j = 0; j < NDIG; j++) begin : g_digit
    bcs_mux #(.W(W)) u_mux (
      .term (term),
      .code (digits[j]),
      .pp   (pp[j])
    );
  end

  always_comb begin
    prod = '0;
    for (int j = 0; j < NDIG; j++) begin
      prod = prod + (PROD_W'(pp[j]) <<< (DIGIT_W * j));
    end
  end

endmodule
