// fir_round -- output rounding of the FIR filter.
//
// Turns the full-precision sum into an output sample: adds half an output LSB
// (2^(SHIFT-1)) and drops the SHIFT least significant bits with an arithmetic shift.
// That is round half up: ties go towards plus infinity (-2.5 -> -2, +2.5 -> +3).
// The low OUT_W bits of the result form the output; the filter's gain keeps normal
// signals in range, and a result outside it wraps (there is no saturation).
//
// Interface: IN_W-bit signed sum in, OUT_W-bit signed sample out; SHIFT >= 1.
// Timing: registered, one clock cycle. Reset (asynchronous, active low) clears it.
module fir_round #(
  parameter int unsigned IN_W  = 54,  // width of the full-precision sum
  parameter int unsigned SHIFT = 31,  // bits removed, COEFF_WIDTH + MAX_MULT
  parameter int unsigned OUT_W = 16   // output sample width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  if (SHIFT < 1 || SHIFT >= IN_W) begin : g_check_shift
    $error("fir_round: SHIFT must be 1 .. IN_W-1");
  end

  localparam logic signed [IN_W:0] HALF = (IN_W+1)'(1) <<< (SHIFT - 1);

  logic signed [IN_W:0] biased;   // sum plus half an output LSB, one bit wider
  logic signed [IN_W:0] shifted;

  always_comb begin
    biased  = (IN_W+1)'(din) + HALF;
    shifted = biased >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= shifted[OUT_W-1:0];
  end

endmodule
