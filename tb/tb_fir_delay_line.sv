// tb_fir_delay_line -- self-checking test of the tapped delay line.
//
// Drives random samples with a random enable (about 70 % busy) and keeps its own
// model of the line as an array that shifts only on enable. After every edge all
// taps are compared with the model. Also checks the asynchronous reset clears the
// line. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_fir_delay_line;
  localparam int unsigned N = 125;
  localparam int unsigned W = 16;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                en = 1'b0;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] taps [N];
  logic signed [W-1:0] model [N];
  int checks = 0, failures = 0;
  int shifts = 0, holds = 0;

  fir_delay_line #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(string what);
    int bad = 0;
    for (int k = 0; k < N; k++) if (taps[k] !== model[k]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d taps differ, taps[0]=%0d model[0]=%0d", what, bad, taps[0], model[0]);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) model[k] = '0;
    repeat (2) @(posedge clk);
    #1 compare("after reset");
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 9) < 7);
      din = W'($urandom);
      @(posedge clk);
      if (en) begin
        for (int k = N - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
        shifts++;
      end else holds++;
      #1 compare("run");
    end
    // Asynchronous reset in mid-cycle.
    #2 rst_n = 1'b0;
    #1 for (int k = 0; k < N; k++) model[k] = '0;
    compare("async reset");
    checks++;
    if (shifts < 100 || holds < 50) begin
      failures++;
      $display("FAIL coverage: shifts=%0d holds=%0d", shifts, holds);
    end
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
