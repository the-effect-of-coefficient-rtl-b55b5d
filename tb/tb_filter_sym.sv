// tb_filter_sym -- end-to-end test of the I/Q filter at its default parameters.
//
// Reference: a 125-tap direct-form convolution per channel with the mirrored
// coefficient words and scaling factors, rounded half up after dropping 31 bits.
// The test runs, in order:
//   1. the published I and Q input samples, one per clock, checking the first nine
//      published output samples of each channel exactly;
//   2. a random stream with random gaps in data_en and back-to-back bursts;
//   3. an asynchronous reset in the middle of the stream, after which the pipeline
//      must be empty (no dout_valid) and the filter must restart from zero history;
//   4. a full-scale impulse on I and a full-scale negative step on Q.
// Every cycle it checks that dout_valid is high exactly 8 cycles after a cycle in which
// data_en was high (the latency of the eight register stages) and that dout_i/dout_q
// then equal the reference. Counted mechanisms -- gaps, back-to-back samples, reset in
// flight, outputs of both signs -- must each occur, or a failure is counted.
module tb_filter_sym;
  import fir_coeff_pkg::*;

  localparam int unsigned N = 125;
  localparam int unsigned LAT = 8;   // cycles from the data_en cycle to the dout_valid cycle

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic data_en = 1'b0;
  logic signed [15:0] data_i = '0, data_q = '0;
  logic dout_valid;
  logic signed [15:0] dout_i, dout_q;

  int checks = 0, failures = 0;
  int cycle = 0;
  longint hist_i [N], hist_q [N];
  int exp_i [int], exp_q [int];
  int n_gap = 0, n_b2b = 0, n_reset = 0, n_pos = 0, n_neg = 0, n_valid = 0;
  bit last_en = 1'b0;
  int pub_i [$], pub_q [$];

  localparam int PUB_IN_I  [16] = '{-22688, 30264, 24658, -745, -6090, -24473, 27881, -32402,
                                    -20553, -11530, -29479, -23296, 15032, -1161, -10613, -17251};
  localparam int PUB_IN_Q  [16] = '{-5770, -31766, 16428, -28697, -4477, 2804, 7219, -4179,
                                    -27455, -14159, -27969, 15072, -10068, 9975, -1196, -7694};
  localparam int PUB_OUT_I [9]  = '{-7, -24, -27, 25, 133, 210, 145, -51, -224};
  localparam int PUB_OUT_Q [9]  = '{-2, -18, -61, -123, -174, -173, -117, -37, 12};

  filter_sym dut (.*);

  always #5 clk = ~clk;

  function automatic int model(const ref longint h [N]);
    longint acc;
    int m;
    acc = 0;
    for (int k = 0; k < int'(N); k++) begin
      m = (k < 63) ? k : int'(N) - 1 - k;
      acc += h[k] * longint'(dyn_coeff(m, 16)) * (longint'(1) <<< (15 - dyn_scale(m)));
    end
    return int'($signed(16'((acc + (longint'(1) <<< 30)) >>> 31)));
  endfunction

  task automatic clear_history();
    for (int k = 0; k < int'(N); k++) begin hist_i[k] = 0; hist_q[k] = 0; end
    exp_i.delete();
    exp_q.delete();
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL cycle %0d: %s", cycle, msg);
    end
  endtask

  // One clock cycle. Inputs change at the falling edge; outputs are checked just
  // after the rising edge that ends the cycle.
  task automatic step(bit en, int xi, int xq);
    @(negedge clk);
    data_en = en;
    data_i  = 16'(xi);
    data_q  = 16'(xq);
    if (en && last_en) n_b2b++;
    if (en && !last_en && cycle > 0) n_gap++;
    last_en = en;
    @(posedge clk);
    cycle++;
    if (en) begin
      for (int k = int'(N) - 1; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
      hist_i[0] = longint'(xi);
      hist_q[0] = longint'(xq);
      exp_i[cycle + int'(LAT) - 1] = model(hist_i);
      exp_q[cycle + int'(LAT) - 1] = model(hist_q);
    end
    #1;
    check(dout_valid == exp_i.exists(cycle), $sformatf("dout_valid=%0b", dout_valid));
    if (exp_i.exists(cycle)) begin
      n_valid++;
      if (dout_i > 0) n_pos++;
      if (dout_i < 0) n_neg++;
      check(int'(dout_i) == exp_i[cycle], $sformatf("dout_i=%0d expected %0d", dout_i, exp_i[cycle]));
      check(int'(dout_q) == exp_q[cycle], $sformatf("dout_q=%0d expected %0d", dout_q, exp_q[cycle]));
      exp_i.delete(cycle);
      exp_q.delete(cycle);
    end
  endtask

  function automatic int rnd16();
    return int'($signed(16'($urandom)));
  endfunction

  initial begin
    clear_history();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Published samples; the published outputs are the first valid outputs.
    fork
      begin
        for (int i = 0; i < 16; i++) step(1'b1, PUB_IN_I[i], PUB_IN_Q[i]);
      end
      begin
        while (pub_i.size() < 9) begin
          @(posedge clk);
          #2 if (dout_valid) begin pub_i.push_back(int'(dout_i)); pub_q.push_back(int'(dout_q)); end
        end
      end
    join
    for (int i = 0; i < 9; i++) begin
      check(pub_i[i] == PUB_OUT_I[i], $sformatf("published I output %0d: %0d expected %0d", i, pub_i[i], PUB_OUT_I[i]));
      check(pub_q[i] == PUB_OUT_Q[i], $sformatf("published Q output %0d: %0d expected %0d", i, pub_q[i], PUB_OUT_Q[i]));
    end

    // 2. Random stream: bursts of back-to-back samples separated by gaps.
    for (int burst = 0; burst < 40; burst++) begin
      repeat ($urandom_range(1, 40)) step(1'b1, rnd16(), rnd16());
      repeat ($urandom_range(1, 4)) step(1'b0, rnd16(), rnd16());
    end

    // 3. Reset while samples are in flight.
    repeat (5) step(1'b1, rnd16(), rnd16());
    @(negedge clk);
    #2 rst_n = 1'b0;
    #1 check(dout_valid == 1'b0, "dout_valid not cleared by asynchronous reset");
    n_reset++;
    clear_history();
    @(posedge clk);
    #1 rst_n = 1'b1;
    data_en = 1'b0;
    last_en = 1'b0;
    repeat (int'(LAT) + 2) step(1'b0, 0, 0);
    repeat (300) step($urandom_range(0, 4) != 0, rnd16(), rnd16());

    // 4. Impulse on I, negative full-scale step on Q.
    repeat (N) step(1'b1, 0, 0);
    step(1'b1, 32767, -32768);
    repeat (N + LAT) step(1'b1, 0, -32768);

    check(n_gap > 0,   "no gap in data_en happened");
    check(n_b2b > 0,   "no back-to-back samples happened");
    check(n_reset > 0, "no reset in flight happened");
    check(n_pos > 0 && n_neg > 0, "outputs of both signs did not occur");
    $display("coverage: valid=%0d gaps=%0d back_to_back=%0d resets=%0d pos=%0d neg=%0d",
             n_valid, n_gap, n_b2b, n_reset, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
