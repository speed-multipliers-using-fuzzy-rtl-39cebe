// bcs_accumulator: adds the outputs of all sub filters. Products of taps
// whose coefficient is positive go into pos_sum, products of taps whose
// coefficient is negative (their magnitudes times x) go into neg_sum; the
// two's complement unit then forms pos_sum - neg_sum.
//
// Interface: prod[i] = |h_i| * x[n-i] (two's complement, PROD_W bits);
// neg[i] is the sign of h_i; both sums are ACC_W = PROD_W + clog2(TAPS)
// bits, wide enough never to overflow.
// Timing: purely combinational; all taps are summed in the same clock.
// Summing every sub filter in one step follows the filter's description;
// splitting the sum by coefficient sign is this design's reading of how
// the later two's complement unit uses the coded coefficients.
module bcs_accumulator #(
  parameter int TAPS   = 8,
  parameter int PROD_W = 16,
  localparam int ACC_W = PROD_W + $clog2(TAPS)
) (
  input  logic signed [PROD_W-1:0] prod [TAPS],
  input  logic                     neg  [TAPS],
  output logic signed [ACC_W-1:0]  pos_sum,
  output logic signed [ACC_W-1:0]  neg_sum
);

  always_comb begin
    pos_sum = '0;
    neg_sum = '0;
    for (int i = 0; i < TAPS; i++) begin
      if (neg[i]) neg_sum = neg_sum + ACC_W'(prod[i]);
      else        pos_sum = pos_sum + ACC_W'(prod[i]);
    end
  end

endmodule
