// tb_fir_scale_shift -- self-checking test of the per-coefficient realignment shifts.
//
// With every product at +1 the outputs are 2^(MAX_MULT - S[k]); the scaling factors
// S[k] this reveals are checked against the published ones for b[0..15] and the middle
// tap, and their maximum must be MAX_MULT = 15. Random and extreme products are then
// checked against p * 2^(MAX_MULT - S[k]) one clock later.
module tb_fir_scale_shift;
  import fir_coeff_pkg::*;

  localparam int unsigned IN_W = 33;
  localparam int unsigned MAX_MULT = 15;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [IN_W-1:0]          p [HALF_TAPS];
  logic signed [IN_W+MAX_MULT-1:0] s [HALF_TAPS];
  int checks = 0, failures = 0;
  int shift_of [HALF_TAPS];

  localparam int REF_S [16] = '{10, 8, 7, 6, 6, 8, 8, 7, 11, 8, 8, 8, 8, 12, 8, 9};

  fir_scale_shift #(.IN_W(IN_W), .MAX_MULT(MAX_MULT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int smax;
    for (int k = 0; k < HALF_TAPS; k++) p[k] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    smax = 0;
    for (int k = 0; k < HALF_TAPS; k++) begin
      shift_of[k] = -1;
      for (int b = 0; b <= int'(MAX_MULT); b++) if (s[k] == (longint'(1) <<< b)) shift_of[k] = b;
      check(shift_of[k] >= 0, $sformatf("lane %0d output %0d is not a power of two", k, s[k]));
      if (int'(MAX_MULT) - shift_of[k] > smax) smax = int'(MAX_MULT) - shift_of[k];
    end
    for (int k = 0; k < 16; k++)
      check(int'(MAX_MULT) - shift_of[k] == REF_S[k],
            $sformatf("lane %0d scale %0d, published %0d", k, int'(MAX_MULT) - shift_of[k], REF_S[k]));
    check(int'(MAX_MULT) - shift_of[62] == 1, "middle tap scale is not 1");
    check(smax == int'(MAX_MULT), $sformatf("largest scale %0d is not MAX_MULT", smax));
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int k = 0; k < HALF_TAPS; k++)
        p[k] = (t == 0) ? -(longint'(1) <<< (IN_W - 1)) : IN_W'({$urandom, $urandom});
      @(posedge clk);
      #1;
      for (int k = 0; k < HALF_TAPS; k++) begin
        longint e;
        e = longint'(p[k]) * (longint'(1) <<< (int'(MAX_MULT) - dyn_scale(k)));
        check(longint'(s[k]) == e, $sformatf("t=%0d lane %0d s=%0d expected %0d", t, k, s[k], e));
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
