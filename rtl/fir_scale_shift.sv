// fir_scale_shift -- per-coefficient power-of-two realignment (dynamic quantization).
//
// Each coefficient word was scaled up by 2^S[k] before quantization so that it uses all
// its bits. This stage restores a common weight: product k is shifted left by
// MAX_MULT - S[k], where MAX_MULT is the largest scaling factor of the set. After the
// shift every lane carries the weight 2^(COEFF_WIDTH-1+MAX_MULT) and the lanes can be
// summed directly. The shift amounts are constants, so each shift is only wiring.
//
// Interface: HALF_TAPS lanes in (IN_W bits) and out (IN_W + MAX_MULT bits).
// Timing: registered, one clock cycle, every cycle. Reset (asynchronous, active low)
// clears the outputs. Elaboration stops if some S[k] exceeds MAX_MULT.
module fir_scale_shift
  import fir_coeff_pkg::*;
#(
  parameter int unsigned IN_W     = 33,  // product width
  parameter int unsigned MAX_MULT = 15,  // highest scaling factor
  parameter coeff_set_t  SCALES   = dyn_scale_set()
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic signed [IN_W-1:0]          p [HALF_TAPS],
  output logic signed [IN_W+MAX_MULT-1:0] s [HALF_TAPS]
);

  localparam int unsigned OUT_W = IN_W + MAX_MULT;

  for (genvar k = 0; k < HALF_TAPS; k++) begin : g_lane
    if (SCALES[k] < 0 || SCALES[k] > int'(MAX_MULT)) begin : g_bad_scale
      $error("fir_scale_shift: scaling factor outside 0..MAX_MULT");
    end
    localparam int unsigned SH = MAX_MULT - SCALES[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) s[k] <= '0;
      else        s[k] <= OUT_W'(p[k]) <<< SH;
    end
  end

endmodule
