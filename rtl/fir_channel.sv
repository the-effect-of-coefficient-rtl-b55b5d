// fir_channel -- one real-valued datapath of the dynamic-quantization FIR filter.
//
// The filter runs two of these, one for the in-phase and one for the quadrature
// samples. Each is a fully parallel direct-form symmetric FIR:
//   delay line (FILTER_TAP samples) -> pre-adders (63 sums) -> multipliers by the
//   upscaled coefficient words -> left shifts by MAX_MULT - S[k] -> three-level
//   4-input adder tree -> round half up and drop COEFF_WIDTH + MAX_MULT bits.
// The output is therefore y(n) / 2 rounded, with y(n) = sum_k b[k] x(n-k): a
// DC-gain-one design gives half-scale output, which leaves headroom for the overshoot
// of the filter. The drop of COEFF_WIDTH + MAX_MULT bits (rather than one bit less) is
// what reproduces the published output samples.
//
// Interface: din is accepted when data_en is high; its filtered sample appears on
// dout after the seventh following edge (a sample taken at edge t shows after edge
// t+7): eight register stages counting the delay line.
// Timing: one sample per clock at most; every stage after the delay line registers
// every cycle, so samples may arrive with gaps. Reset: asynchronous, active low,
// clears every register.
module fir_channel
  import fir_coeff_pkg::*;
#(
  parameter int unsigned FILTER_TAP   = 125,
  parameter int unsigned INPUT_WIDTH  = 16,
  parameter int unsigned COEFF_WIDTH  = 16,
  parameter int unsigned OUTPUT_WIDTH = 16,
  parameter int unsigned MAX_MULT     = 15
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           data_en,
  input  logic signed [INPUT_WIDTH-1:0]  din,
  output logic signed [OUTPUT_WIDTH-1:0] dout
);

  localparam int unsigned ADD_W  = INPUT_WIDTH + 1;              // pre-adder sums
  localparam int unsigned PROD_W = ADD_W + COEFF_WIDTH;          // products
  localparam int unsigned SHFT_W = PROD_W + MAX_MULT;            // realigned products
  localparam int unsigned SUM_W  = SHFT_W + 6;                   // tree result
  localparam int unsigned M      = COEFF_WIDTH + MAX_MULT;       // bits dropped at the end

  if (FILTER_TAP != SET_TAPS) begin : g_check_taps
    $error("fir_channel: the stored coefficient set has 125 taps");
  end
  if (max_scale() > int'(MAX_MULT)) begin : g_check_max_mult
    $error("fir_channel: MAX_MULT is below the largest scaling factor");
  end

  logic signed [INPUT_WIDTH-1:0] delay_line [FILTER_TAP];
  logic signed [ADD_W-1:0]       add_r      [HALF_TAPS];
  logic signed [PROD_W-1:0]      p_mult     [HALF_TAPS];
  logic signed [SHFT_W-1:0]      s_mult     [HALF_TAPS];
  logic signed [SUM_W-1:0]       res_sum;

  fir_delay_line #(.N(FILTER_TAP), .W(INPUT_WIDTH)) u_delay (
    .clk, .rst_n, .en(data_en), .din, .taps(delay_line)
  );

  fir_preadd #(.N(FILTER_TAP), .W(INPUT_WIDTH)) u_preadd (
    .clk, .rst_n, .taps(delay_line), .sum(add_r)
  );

  fir_coeff_mult #(
    .IN_W(ADD_W), .COEFF_WIDTH(COEFF_WIDTH), .COEFFS(dyn_coeff_set(COEFF_WIDTH))
  ) u_mult (
    .clk, .rst_n, .a(add_r), .p(p_mult)
  );

  fir_scale_shift #(
    .IN_W(PROD_W), .MAX_MULT(MAX_MULT), .SCALES(dyn_scale_set())
  ) u_shift (
    .clk, .rst_n, .p(p_mult), .s(s_mult)
  );

  fir_adder_tree #(.N(HALF_TAPS), .W(SHFT_W)) u_tree (
    .clk, .rst_n, .lanes(s_mult), .total(res_sum)
  );

  fir_round #(.IN_W(SUM_W), .SHIFT(M), .OUT_W(OUTPUT_WIDTH)) u_round (
    .clk, .rst_n, .din(res_sum), .dout
  );

endmodule
