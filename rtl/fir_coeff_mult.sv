// fir_coeff_mult -- coefficient multipliers of the FIR filter.
//
// One signed multiplier per unique coefficient: p[k] = a[k] * c[k], where c[k] is the
// COEFF_WIDTH-bit dynamically quantized coefficient word (see fir_coeff_pkg). The
// coefficients are constants fixed at elaboration, so synthesis can reduce each
// multiplier to constant-multiplication logic. Products have the full width
// IN_W + COEFF_WIDTH, so nothing is lost.
//
// Interface: HALF_TAPS inputs and outputs (63 for the 125-tap filter).
// Timing: all products are registered in one clock cycle, every cycle.
// Reset (asynchronous, active low) clears the products.
module fir_coeff_mult
  import fir_coeff_pkg::*;
#(
  parameter int unsigned IN_W        = 17,  // pre-adder width, INPUT_WIDTH + 1
  parameter int unsigned COEFF_WIDTH = 16,  // coefficient word width
  parameter coeff_set_t  COEFFS      = dyn_coeff_set(COEFF_WIDTH)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic signed [IN_W-1:0]          a [HALF_TAPS],
  output logic signed [IN_W+COEFF_WIDTH-1:0] p [HALF_TAPS]
);

  for (genvar k = 0; k < HALF_TAPS; k++) begin : g_lane
    localparam logic signed [COEFF_WIDTH-1:0] C = COEFF_WIDTH'(COEFFS[k]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) p[k] <= '0;
      else        p[k] <= (IN_W+COEFF_WIDTH)'(a[k]) * (IN_W+COEFF_WIDTH)'(C);
    end
  end

endmodule
