// tb_fir_coeff_mult -- self-checking test of the coefficient multipliers.
//
// Two instances: the default 16-bit coefficient set and the 12-bit set.
//  * With every input at +1 the products are the coefficient words themselves. They
//    are checked against published words: 16-bit words of b[0..15] within 1 %, the
//    12-bit words of b[0..7] and b[62] within 3 LSB, and every word must have its
//    magnitude in [2^(W-2), 2^(W-1)) -- no redundant sign bits, the point of dynamic
//    quantization.
//  * Random and extreme inputs are then checked against a * c one clock later.
module tb_fir_coeff_mult;
  import fir_coeff_pkg::*;

  localparam int unsigned IN_W = 17;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [IN_W-1:0]    a   [HALF_TAPS];
  logic signed [IN_W+15:0]   p16 [HALF_TAPS];
  logic signed [IN_W+11:0]   p12 [HALF_TAPS];
  int checks = 0, failures = 0;

  // Published 16-bit words of b[0..15] and 12-bit words of b[0..7].
  localparam int REF16 [16] = '{19550, 24457, 28961, 21306, 18950, 24690, -30557, -20636,
                                -29685, 32180, 21733, -17460, -29537, 32438, 30313, 25249};
  localparam int REF12 [8]  = '{1222, 1529, 1810, 1332, 1184, 1543, -1910, -1290};

  fir_coeff_mult #(.IN_W(IN_W), .COEFF_WIDTH(16)) dut16 (.clk, .rst_n, .a, .p(p16));
  fir_coeff_mult #(.IN_W(IN_W), .COEFF_WIDTH(12)) dut12 (.clk, .rst_n, .a, .p(p12));

  always #5 clk = ~clk;

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int k = 0; k < HALF_TAPS; k++) a[k] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int k = 0; k < 16; k++)
      check(iabs(int'(p16[k]) - REF16[k]) * 100 <= iabs(REF16[k]),
            $sformatf("16-bit word %0d = %0d, published %0d", k, p16[k], REF16[k]));
    for (int k = 0; k < 8; k++)
      check(iabs(int'(p12[k]) - REF12[k]) <= 3,
            $sformatf("12-bit word %0d = %0d, published %0d", k, p12[k], REF12[k]));
    check(iabs(int'(p12[62]) - 1759) <= 3, $sformatf("12-bit middle word %0d", p12[62]));
    for (int k = 0; k < HALF_TAPS; k++) begin
      check(iabs(int'(p16[k])) >= 2**14 && iabs(int'(p16[k])) < 2**15,
            $sformatf("16-bit word %0d = %0d not normalised", k, p16[k]));
      check(iabs(int'(p12[k])) >= 2**10 && iabs(int'(p12[k])) < 2**11,
            $sformatf("12-bit word %0d = %0d not normalised", k, p12[k]));
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int k = 0; k < HALF_TAPS; k++)
        a[k] = (t == 0) ? -(2**16) : (t == 1) ? (2**16) - 1 : IN_W'($urandom);
      @(posedge clk);
      #1;
      for (int k = 0; k < HALF_TAPS; k++) begin
        longint e16, e12;
        e16 = longint'(a[k]) * longint'(dyn_coeff(k, 16));
        e12 = longint'(a[k]) * longint'(dyn_coeff(k, 12));
        check(longint'(p16[k]) == e16, $sformatf("t=%0d lane %0d p16=%0d expected %0d", t, k, p16[k], e16));
        check(longint'(p12[k]) == e12, $sformatf("t=%0d lane %0d p12=%0d expected %0d", t, k, p12[k], e12));
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
