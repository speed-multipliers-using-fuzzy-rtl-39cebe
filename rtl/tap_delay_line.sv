// tap_delay_line: the input-sample delay line of the direct-form FIR filter.
// On every rising clock edge the new sample enters x_n[0] and each stored
// sample moves one place on, so x_n[k] holds the sample that entered k+1
// clocks ago, i.e. x[n-k] for the filter.
//
// Interface: sample_in is taken every clock (one sample per clock, no
// handshake); x_n[0..TAPS-1] are the register outputs. rst is synchronous
// and active high and clears every stage to zero.
// Timing: one clock from sample_in to x_n[0], k+1 clocks to x_n[k].
// One new sample per clock and the tap naming follow the filter's
// simulation; the reset style is this design's own choice.
module tap_delay_line #(
  parameter int TAPS = 8,
  parameter int W    = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] sample_in,
  output logic signed [W-1:0] x_n [TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) x_n[k] <= '0;
    end else begin
      x_n[0] <= sample_in;
      for (int k = 1; k < TAPS; k++) x_n[k] <= x_n[k-1];
    end
  end

endmodule
