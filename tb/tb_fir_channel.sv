// tb_fir_channel -- self-checking test of one real filter datapath.
//
// Reference: a plain 125-tap direct-form convolution (no pre-adders, no tree) with
// the coefficient words c[k] and scaling factors S[k] mirrored over all taps:
//   y = round_half_up( sum_k x(n-k) * c[k] * 2^(15 - S[k]) / 2^31 ), 16 bits.
// Part 1 feeds the published in-phase input samples and checks the first nine
// published output samples exactly. Part 2 streams random samples with random gaps
// in data_en and checks every output against the reference, 7 edges after the sample
// edge. Part 3 applies a full-scale impulse and checks the impulse response.
module tb_fir_channel;
  import fir_coeff_pkg::*;

  localparam int unsigned N = 125;
  localparam int unsigned LAT = 7;   // edges from the sample edge to the output edge

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic data_en = 1'b0;
  logic signed [15:0] din = '0;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;
  int cycle = 0;
  longint hist [N];          // model delay line
  int     exp_at [int];      // cycle -> expected output

  localparam int PUB_IN [16]  = '{-22688, 30264, 24658, -745, -6090, -24473, 27881, -32402,
                                  -20553, -11530, -29479, -23296, 15032, -1161, -10613, -17251};
  localparam int PUB_OUT [9]  = '{-7, -24, -27, 25, 133, 210, 145, -51, -224};

  fir_channel dut (.clk, .rst_n, .data_en, .din, .dout);

  always #5 clk = ~clk;

  function automatic int model_out();
    longint acc;
    int m;
    acc = 0;
    for (int k = 0; k < int'(N); k++) begin
      m = (k < 63) ? k : int'(N) - 1 - k;
      acc += hist[k] * longint'(dyn_coeff(m, 16)) * (longint'(1) <<< (15 - dyn_scale(m)));
    end
    return int'(16'((acc + (longint'(1) <<< 30)) >>> 31));
  endfunction

  // Applies one clock cycle; when en, the sample enters and its output is scheduled.
  task automatic step(bit en, int x);
    @(negedge clk);
    data_en = en;
    din = 16'(x);
    @(posedge clk);
    cycle++;
    if (en) begin
      for (int k = int'(N) - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(x);
      exp_at[cycle + int'(LAT)] = model_out();
    end
    #1;
    if (exp_at.exists(cycle)) begin
      checks++;
      if (int'(dout) != exp_at[cycle]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d dout=%0d expected %0d", cycle, dout, exp_at[cycle]);
      end
      exp_at.delete(cycle);
    end
  endtask

  initial begin
    int outs [$];
    for (int k = 0; k < int'(N); k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Part 1: published samples, one per clock.
    fork
      begin
        for (int i = 0; i < 16; i++) step(1'b1, PUB_IN[i]);
        repeat (LAT) step(1'b0, 0);
      end
      begin
        // Output of the first sample shows after its edge + LAT.
        @(posedge clk); // first sample edge
        repeat (LAT) @(posedge clk);
        for (int i = 0; i < 9; i++) begin
          #2 outs.push_back(int'(dout));
          @(posedge clk);
        end
      end
    join
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (outs[i] != PUB_OUT[i]) begin
        failures++;
        $display("FAIL published output %0d: %0d expected %0d", i, outs[i], PUB_OUT[i]);
      end
    end
    // Part 2: random stream with gaps.
    for (int t = 0; t < 1500; t++) step($urandom_range(0, 3) != 0, int'($signed(16'($urandom))));
    // Part 3: flush, then an impulse of 32767.
    repeat (N) step(1'b1, 0);
    step(1'b1, 32767);
    repeat (N + LAT) step(1'b1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
