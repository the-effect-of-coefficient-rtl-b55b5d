// fir_delay_line -- tapped delay line of the symmetric FIR filter (one of I or Q).
//
// A shift register of N samples, W bits each. When en is high at a rising clock edge
// the new sample din enters taps[0] and every other element moves up by one
// (taps[k] <= taps[k-1]); the oldest sample falls out of taps[N-1]. With en low the
// line holds, so a gap in the input stream does not disturb the filter state.
//
// Interface: taps[k] holds x(n-k), the sample taken k accepted samples ago.
// Timing: taps are registered; a sample accepted at edge t is on taps[0] after it.
// Reset (rst_n low, asynchronous) clears the whole line to zero; that is this
// design's choice, which gives a defined start-up transient.
module fir_delay_line #(
  parameter int unsigned N = 125,  // number of taps (FILTER_TAP)
  parameter int unsigned W = 16    // sample width (INPUT_WIDTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int unsigned k = 1; k < N; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
