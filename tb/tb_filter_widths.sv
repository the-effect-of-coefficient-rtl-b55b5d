// tb_filter_widths -- the filter with 16-, 12- and 8-bit dynamically quantized
// coefficients, side by side.
//
// Three filter_sym instances differ only in COEFF_WIDTH and get the same I/Q stream.
//  1. Bit exactness: each output is compared with a direct-form reference for its
//     own coefficient words.
//  2. Quantization error: each output is compared with the output of the same filter
//     with double-precision coefficients, y/2 before any rounding; the mean absolute
//     error (in output LSBs) must grow from 16 to 12 to 8 bits, and stay below 1 LSB
//     at 16 bits (only output rounding left).
//  3. Stopband attenuation: a unit impulse is fed in and the full-precision adder-tree
//     result of each instance is sampled, which gives the hardware's exact impulse
//     response. Its magnitude response is evaluated on a 1024-point grid from 22 kHz
//     to 48 kHz. The worst-case stopband attenuation is printed and checked against
//     the value expected for the stored coefficient set (79.8, 70.0, 47.5 dB,
//     +-0.3 dB), and must be higher for more bits.
module tb_filter_widths;
  import fir_coeff_pkg::*;

  localparam int unsigned N = 125;
  localparam int unsigned LAT = 8;
  localparam real PI = 3.14159265358979323846;
  localparam int  NW = 3;
  localparam int  WIDTHS [NW] = '{16, 12, 8};
  localparam real EXP_ATT [NW] = '{79.8, 70.0, 47.5};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic data_en = 1'b0;
  logic signed [15:0] data_i = '0, data_q = '0;
  logic               dv [NW];
  logic signed [15:0] oi [NW], oq [NW];
  logic signed [53:0] sum16;
  logic signed [49:0] sum12;
  logic signed [45:0] sum8;

  int checks = 0, failures = 0;
  int cycle = 0;
  longint hist_i [N], hist_q [N];
  int  exp_i [NW][int], exp_q [NW][int];
  real ref_i [int], ref_q [int];
  real err_sum [NW];
  int  err_n = 0;
  real att [NW];

  filter_sym #(.COEFF_WIDTH(16)) dut16 (.clk, .rst_n, .data_en, .data_i, .data_q,
                                        .dout_valid(dv[0]), .dout_i(oi[0]), .dout_q(oq[0]));
  filter_sym #(.COEFF_WIDTH(12)) dut12 (.clk, .rst_n, .data_en, .data_i, .data_q,
                                        .dout_valid(dv[1]), .dout_i(oi[1]), .dout_q(oq[1]));
  filter_sym #(.COEFF_WIDTH(8))  dut8  (.clk, .rst_n, .data_en, .data_i, .data_q,
                                        .dout_valid(dv[2]), .dout_i(oi[2]), .dout_q(oq[2]));

  assign sum16 = dut16.u_chan_i.res_sum;
  assign sum12 = dut12.u_chan_i.res_sum;
  assign sum8  = dut8.u_chan_i.res_sum;

  always #5 clk = ~clk;

  function automatic int fixed_model(const ref longint h [N], input int cw);
    longint acc;
    int m, msh;
    acc = 0;
    msh = cw + 15;
    for (int k = 0; k < int'(N); k++) begin
      m = (k < 63) ? k : int'(N) - 1 - k;
      acc += h[k] * longint'(dyn_coeff(m, cw)) * (longint'(1) <<< (15 - dyn_scale(m)));
    end
    return int'($signed(16'((acc + (longint'(1) <<< (msh - 1))) >>> msh)));
  endfunction

  function automatic real float_model(const ref longint h [N]);
    real acc;
    acc = 0.0;
    for (int k = 0; k < int'(N); k++) acc += real'(h[k]) * B_FLOAT[(k < 63) ? k : int'(N) - 1 - k];
    return acc / 2.0;
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL cycle %0d: %s", cycle, msg);
    end
  endtask

  task automatic step(bit en, int xi, int xq);
    @(negedge clk);
    data_en = en;
    data_i  = 16'(xi);
    data_q  = 16'(xq);
    @(posedge clk);
    cycle++;
    if (en) begin
      for (int k = int'(N) - 1; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
      hist_i[0] = longint'(xi);
      hist_q[0] = longint'(xq);
      for (int w = 0; w < NW; w++) begin
        exp_i[w][cycle + int'(LAT) - 1] = fixed_model(hist_i, WIDTHS[w]);
        exp_q[w][cycle + int'(LAT) - 1] = fixed_model(hist_q, WIDTHS[w]);
      end
      ref_i[cycle + int'(LAT) - 1] = float_model(hist_i);
      ref_q[cycle + int'(LAT) - 1] = float_model(hist_q);
    end
    #1;
    if (ref_i.exists(cycle)) begin
      err_n++;
      for (int w = 0; w < NW; w++) begin
        check(dv[w] == 1'b1, $sformatf("width %0d: dout_valid missing", WIDTHS[w]));
        check(int'(oi[w]) == exp_i[w][cycle], $sformatf("width %0d: dout_i=%0d expected %0d", WIDTHS[w], oi[w], exp_i[w][cycle]));
        check(int'(oq[w]) == exp_q[w][cycle], $sformatf("width %0d: dout_q=%0d expected %0d", WIDTHS[w], oq[w], exp_q[w][cycle]));
        err_sum[w] += rabs(real'(oi[w]) - ref_i[cycle]) + rabs(real'(oq[w]) - ref_q[cycle]);
        exp_i[w].delete(cycle);
        exp_q[w].delete(cycle);
      end
      ref_i.delete(cycle);
      ref_q.delete(cycle);
    end
  endtask

  initial begin
    real h [NW][N];
    for (int k = 0; k < int'(N); k++) begin hist_i[k] = 0; hist_q[k] = 0; end
    for (int w = 0; w < NW; w++) err_sum[w] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1 and 2: random stream at about half scale, with some gaps.
    for (int t = 0; t < 1500; t++)
      step($urandom_range(0, 7) != 0, int'($signed(16'($urandom))) / 2, int'($signed(16'($urandom))) / 2);
    for (int w = 0; w < NW; w++)
      $display("width %0d: mean |error| against double precision = %f LSB", WIDTHS[w], err_sum[w] / (2.0 * err_n));
    check(err_sum[0] / (2.0 * err_n) < 1.0, "16-bit error not below 1 LSB");
    check(err_sum[0] <= err_sum[1] && err_sum[1] <= err_sum[2], "error does not grow as the width shrinks");

    // 3: impulse response from the full-precision sums.
    repeat (N + LAT) step(1'b1, 0, 0);
    step(1'b1, 1, 0);
    // The first tap of the response is on the adder-tree output after 6 more edges.
    repeat (int'(LAT) - 3) step(1'b1, 0, 0);
    for (int k = 0; k < int'(N); k++) begin
      step(1'b1, 0, 0);
      h[0][k] = real'(sum16) / (2.0 ** (16 - 1 + 15));
      h[1][k] = real'(sum12) / (2.0 ** (12 - 1 + 15));
      h[2][k] = real'(sum8)  / (2.0 ** (8 - 1 + 15));
    end
    for (int w = 0; w < NW; w++) begin
      real hmax, dsum;
      dsum = 0.0;
      for (int k = 0; k < int'(N); k++) dsum += h[w][k];
      check(rabs(dsum - 1.0) < 0.06, $sformatf("width %0d: DC gain %f", WIDTHS[w], dsum));
      hmax = 0.0;
      for (int f = 0; f <= 1024; f++) begin
        real om, re, im, mag;
        om = 2.0 * PI * (22000.0 + (48000.0 - 22000.0) * f / 1024.0) / 96000.0;
        re = 0.0;
        im = 0.0;
        for (int k = 0; k < int'(N); k++) begin
          re += h[w][k] * $cos(om * k);
          im -= h[w][k] * $sin(om * k);
        end
        mag = $sqrt(re * re + im * im);
        if (mag > hmax) hmax = mag;
      end
      att[w] = -20.0 * $log10(hmax);
      $display("width %0d: stopband attenuation %f dB, DC gain %f", WIDTHS[w], att[w], dsum);
      check(rabs(att[w] - EXP_ATT[w]) < 0.3, $sformatf("width %0d: attenuation %f dB", WIDTHS[w], att[w]));
    end
    check(att[0] > att[1] && att[1] > att[2], "attenuation does not fall as the width shrinks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
