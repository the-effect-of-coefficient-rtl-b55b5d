// tb_fir_round -- self-checking test of the round-half-up output stage.
//
// Works at a small size (IN_W 8, SHIFT 4, OUT_W 4) where values are easy to read:
// exhaustively over all 256 inputs, the output must be floor(x / 16 + 1/2) taken
// modulo 16, with the ties +2.5 -> +3 and -2.5 -> -2 checked by name. A second
// instance at the filter's own sizes (54 -> 16 bits, 31 bits dropped) gets random
// sums. Every check is made one clock after the input is applied.
module tb_fir_round;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [7:0]  din_s = '0;
  logic signed [3:0]  dout_s;
  logic signed [53:0] din_f = '0;
  logic signed [15:0] dout_f;
  int checks = 0, failures = 0;

  fir_round #(.IN_W(8),  .SHIFT(4),  .OUT_W(4))  dut_s (.clk, .rst_n, .din(din_s), .dout(dout_s));
  fir_round #(.IN_W(54), .SHIFT(31), .OUT_W(16)) dut_f (.clk, .rst_n, .din(din_f), .dout(dout_f));

  always #5 clk = ~clk;

  // Reference: floor division of (x + 2^(sh-1)) by 2^sh, written without shifts.
  function automatic longint ref_round(longint x, int sh);
    longint d, q;
    d = longint'(1) <<< sh;
    q = (x + d / 2) / d;
    if ((x + d / 2) < 0 && ((x + d / 2) % d) != 0) q = q - 1;
    return q;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int x = -128; x < 128; x++) begin
      longint r;
      @(negedge clk);
      din_s = 8'(x);
      @(posedge clk);
      #1;
      r = ref_round(x, 4);
      check(dout_s == 4'(r), $sformatf("x=%0d out=%0d expected %0d", x, dout_s, 4'(r)));
      if (x == 40)  check(dout_s == 4'sd3,  "+2.5 must round to +3");
      if (x == -40) check(dout_s == -4'sd2, "-2.5 must round to -2");
    end
    for (int t = 0; t < 500; t++) begin
      longint x, r;
      @(negedge clk);
      // Sums of the size the filter produces for full-scale input (about 2^47).
      x = longint'($signed({$urandom, $urandom})) >>> 16;
      if (t % 7 == 0) x = (x & ~((longint'(1) <<< 31) - 1)) | (longint'(1) <<< 30);  // exact tie
      din_f = 54'(x);
      @(posedge clk);
      #1;
      r = ref_round(x, 31);
      check(dout_f == 16'(r), $sformatf("x=%0d out=%0d expected %0d", x, dout_f, 16'(r)));
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
