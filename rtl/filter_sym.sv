// filter_sym -- dynamic-quantization symmetric FIR low-pass filter for I/Q samples.
//
// A 125-tap equiripple low-pass filter (96 kHz sampling, 20 kHz passband edge, 22 kHz
// stopband edge) applied to a complex stream: the in-phase and quadrature parts go
// through two identical real datapaths (fir_channel) with the same coefficients.
// The coefficients are stored "dynamically quantized": each is scaled by its own
// power of two 2^S so its word carries no redundant sign bits, and the datapath
// shifts each product back by MAX_MULT - S before the adder tree. At a given word
// width this keeps far more coefficient precision than plain fixed-point rounding.
//
// Interface:
//   data_en    high for one cycle per new sample on data_i / data_q (one per clock at
//              most; gaps are allowed, the filter is single rate).
//   dout_valid high for one cycle when dout_i / dout_q hold the filtered sample.
//   dout = round_half_up(y / 2) with y = sum_k b[k] x(n-k), OUTPUT_WIDTH bits.
// Timing: a sample accepted at rising edge t gives dout_valid and dout after edge
// t + PIPE_STAGES - 1, i.e. eight register stages (delay line, pre-add, multiply,
// shift, three adder levels, rounding). Reset rst_n is asynchronous and active low.
//
// The parameter set, port list, stage order, register widths and the 4-input adder
// tree follow the published block description. Choices of this design: the
// coefficient set is chosen by COEFF_WIDTH (16, 12 or 8 bits give the three published
// variants) instead of by a coefficient file name; the valid pipeline; reset of all
// registers; no output saturation.
module filter_sym #(
  parameter int unsigned FILTER_TAP   = 125,  // number of taps, odd
  parameter int unsigned INPUT_WIDTH  = 16,
  parameter int unsigned COEFF_WIDTH  = 16,   // 16, 12 or 8 in the published variants
  parameter int unsigned OUTPUT_WIDTH = 16,
  parameter int unsigned MAX_MULT     = 15    // highest scaling factor S
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           data_en,
  input  logic signed [INPUT_WIDTH-1:0]  data_i,
  input  logic signed [INPUT_WIDTH-1:0]  data_q,
  output logic                           dout_valid,
  output logic signed [OUTPUT_WIDTH-1:0] dout_i,
  output logic signed [OUTPUT_WIDTH-1:0] dout_q
);

  // Register stages from the input to the output, the delay line included.
  localparam int unsigned PIPE_STAGES = 8;

  fir_channel #(
    .FILTER_TAP(FILTER_TAP), .INPUT_WIDTH(INPUT_WIDTH), .COEFF_WIDTH(COEFF_WIDTH),
    .OUTPUT_WIDTH(OUTPUT_WIDTH), .MAX_MULT(MAX_MULT)
  ) u_chan_i (
    .clk, .rst_n, .data_en, .din(data_i), .dout(dout_i)
  );

  fir_channel #(
    .FILTER_TAP(FILTER_TAP), .INPUT_WIDTH(INPUT_WIDTH), .COEFF_WIDTH(COEFF_WIDTH),
    .OUTPUT_WIDTH(OUTPUT_WIDTH), .MAX_MULT(MAX_MULT)
  ) u_chan_q (
    .clk, .rst_n, .data_en, .din(data_q), .dout(dout_q)
  );

  // data_en travels alongside the samples and becomes dout_valid.
  logic [PIPE_STAGES-1:0] valid_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_pipe <= '0;
    else        valid_pipe <= {valid_pipe[PIPE_STAGES-2:0], data_en};
  end

  assign dout_valid = valid_pipe[PIPE_STAGES-1];

  // Every accepted sample produces dout_valid exactly PIPE_STAGES edges later, and
  // no dout_valid appears without one. A reset aborts the samples in flight.
  a_valid_follows_en : assert property (
    @(posedge clk) disable iff (!rst_n) data_en |-> ##PIPE_STAGES dout_valid
  );
  a_no_spurious_valid : assert property (
    @(posedge clk) disable iff (!rst_n) !data_en |-> ##PIPE_STAGES !dout_valid
  );

endmodule
