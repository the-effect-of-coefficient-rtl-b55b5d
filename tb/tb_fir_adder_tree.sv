// tb_fir_adder_tree -- self-checking test of the three-level pipelined adder tree.
//
// A new random lane vector (with some all-extreme vectors) enters every clock; the
// expected sum of all 63 lanes is queued; the vector captured at edge t must show on
// total right after edge t+2 (three register levels),
// which checks both the arithmetic and the three-cycle latency at full throughput.
module tb_fir_adder_tree;
  localparam int unsigned N = 63;
  localparam int unsigned W = 48;
  localparam int unsigned LAT = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] lanes [N];
  logic signed [W+5:0] total;
  int checks = 0, failures = 0;
  longint expq [$];

  fir_adder_tree #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < N; k++) lanes[k] = '0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (total != 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int t = 0; t < 400 + LAT; t++) begin
      longint e;
      @(negedge clk);
      e = 0;
      for (int k = 0; k < N; k++) begin
        case (t % 5)
          0:       lanes[k] = -(longint'(1) <<< (W - 1));
          1:       lanes[k] = (longint'(1) <<< (W - 1)) - 1;
          default: lanes[k] = W'({$urandom, $urandom});
        endcase
        e += longint'(lanes[k]);
      end
      expq.push_back(e);
      @(posedge clk);
      #1;
      if (t >= int'(LAT) - 1) begin
        longint want;
        want = expq.pop_front();
        checks++;
        if (longint'(total) != want) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d total=%0d expected %0d", t, total, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
