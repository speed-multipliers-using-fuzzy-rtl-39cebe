// bcs_fir_filter: a direct-form constant-coefficient FIR filter whose tap
// multipliers use Binary Common Subexpressions (BCS) instead of hardware
// multipliers.
//
// Each sample enters a delay line (tap_delay_line). Every tap i multiplies
// x[n-i] by the magnitude of its constant coefficient h_i with
// bcs_multiplier: shifted copies of the sample are added into the eight odd
// terms 1x..15x, and for every 4-bit digit of |h_i| a multiplexer picks the
// right term and shift. coef_coder turns each coefficient into its sign and
// coded digits; since the coefficients are parameters this folds to
// constants. bcs_accumulator adds the tap products, kept apart by
// coefficient sign, and twos_comp_unit subtracts the negative part. The
// result is registered:
//   fir_tap_out = sum_{i=0}^{TAPS-1} h_i * x[n-i]   (mod 2**OUT_W)
//
// Interface: clk; rst (synchronous, active high; clears the delay line and
// the output); fir_in, one IN_W-bit two's-complement sample per clock;
// fir_tap_out, the OUT_W-bit two's-complement filter output.
// Timing: one sample per clock. A sample on fir_in at clock edge t is in
// x[n] after edge t and first counts in fir_tap_out after edge t+1, so the
// input-to-output latency is 2 clocks.
// The block chain, the 10 taps, the 8-bit input and the coefficients
// 2,3,4,5,5,4,3,2 of taps 0..7 follow the reference design; the 16-bit
// output matches its pin count. The coefficients of taps 8 and 9 are not
// given there; they are 0 here, which keeps the reference step response
// (input 5 settles at output 140). The sign handling, the output register,
// the reset and wrap-around on overflow are this design's own choices: the
// top bits of the accumulator result y are dropped on purpose, so the
// output is the exact sum modulo 2**OUT_W.
module bcs_fir_filter
  import bcs_pkg::*;
#(
  parameter int IN_W   = 8,
  parameter int COEF_W = 8,
  parameter int TAPS   = 10,
  parameter int OUT_W  = 16,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = '{2, 3, 4, 5, 5, 4, 3, 2, 0, 0},
  localparam int NDIG   = (COEF_W + DIGIT_W - 1) / DIGIT_W,
  localparam int PROD_W = IN_W + NDIG * DIGIT_W,
  localparam int ACC_W  = PROD_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  fir_in,
  output logic signed [OUT_W-1:0] fir_tap_out
);

  logic signed [IN_W-1:0]   x_n      [TAPS];
  logic                     coef_neg [TAPS];
  bcs_digit_t               coded    [TAPS][NDIG];
  logic signed [PROD_W-1:0] mul_out  [TAPS];
  logic signed [ACC_W-1:0]  pos_sum, neg_sum, y;

  tap_delay_line #(.TAPS(TAPS), .W(IN_W)) u_delay (
    .clk       (clk),
    .rst       (rst),
    .sample_in (fir_in),
    .x_n       (x_n)
  );

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    coef_coder #(.COEF_W(COEF_W)) u_coder (
      .coef   (COEFS[i]),
      .neg    (coef_neg[i]),
      .digits (coded[i])
    );

    bcs_multiplier #(.W(IN_W), .NDIG(NDIG)) u_sub_filter (
      .x      (x_n[i]),
      .digits (coded[i]),
      .prod   (mul_out[i])
    );
  end

  bcs_accumulator #(.TAPS(TAPS), .PROD_W(PROD_W)) u_acc (
    .prod    (mul_out),
    .neg     (coef_neg),
    .pos_sum (pos_sum),
    .neg_sum (neg_sum)
  );

  twos_comp_unit #(.W(ACC_W)) u_twos (
    .pos_sum (pos_sum),
    .neg_sum (neg_sum),
    .y       (y)
  );

  always_ff @(posedge clk) begin
    if (rst) fir_tap_out <= '0;
    else     fir_tap_out <= OUT_W'(y);
  end

endmodule
