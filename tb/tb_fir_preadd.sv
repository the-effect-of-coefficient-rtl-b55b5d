// tb_fir_preadd -- self-checking test of the symmetric pre-adder.
//
// Applies random and extreme tap vectors and checks, one clock later, that
// sum[k] = taps[k] + taps[N-1-k] for the outer pairs and sum[62] = taps[62], with the
// one-bit growth (no overflow at the extremes). A watchdog stops a hung run.
module tb_fir_preadd;
  localparam int unsigned N = 125;
  localparam int unsigned W = 16;
  localparam int unsigned H = (N + 1) / 2;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic signed [W-1:0] taps [N];
  logic signed [W:0]   sum  [H];
  int checks = 0, failures = 0;

  fir_preadd #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < N; k++) taps[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        case (t % 4)
          0:       taps[k] = W'($urandom);
          1:       taps[k] = -(2 ** (W - 1));           // most negative
          2:       taps[k] = (2 ** (W - 1)) - 1;        // most positive
          default: taps[k] = W'($urandom_range(0, 7)) - 4;
        endcase
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < H; k++) begin
        int expect_v;
        expect_v = (k == H - 1) ? int'(taps[k]) : int'(taps[k]) + int'(taps[N-1-k]);
        checks++;
        if (int'(sum[k]) != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d sum=%0d expected %0d", t, k, sum[k], expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
