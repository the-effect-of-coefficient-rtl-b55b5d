// fir_preadd -- symmetric pre-adder of the FIR filter.
//
// Because the impulse response is symmetric (b[k] = b[N-1-k]), taps that share a
// coefficient are added before multiplication: sum[k] = taps[k] + taps[N-1-k] for
// k < (N-1)/2, and the middle tap taps[(N-1)/2] is passed on alone. This halves the
// number of multipliers. Each sum is one bit wider than a sample so it cannot overflow.
//
// Interface: N must be odd (odd symmetry, as the filter requires). Outputs are
// (N+1)/2 signed sums of W+1 bits.
// Timing: all sums are registered together, one clock cycle, every cycle.
// Reset (asynchronous, active low) clears the sums.
module fir_preadd #(
  parameter int unsigned N = 125,  // number of taps, odd
  parameter int unsigned W = 16    // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] taps [N],
  output logic signed [W:0]   sum  [(N+1)/2]
);

  localparam int unsigned H   = (N + 1) / 2;  // number of outputs
  localparam int unsigned MID = (N - 1) / 2;  // index of the middle tap

  if (N % 2 != 1) begin : g_check_odd
    $error("fir_preadd: N must be odd");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < H; k++) sum[k] <= '0;
    end else begin
      for (int unsigned k = 0; k < MID; k++)
        sum[k] <= (W+1)'(taps[k]) + (W+1)'(taps[N-1-k]);
      sum[MID] <= (W+1)'(taps[MID]);
    end
  end

endmodule
