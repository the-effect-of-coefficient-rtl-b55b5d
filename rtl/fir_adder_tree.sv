// fir_adder_tree -- pipelined summation tree of the FIR filter.
//
// Adding all N lanes in one cycle would make a long carry path, so the sum is built
// in three registered levels of 4-input adders:
//   level 1: lanes 4j .. 4j+3 -> r1[j], ceil(N/4) sums   (16 for N = 63; the last
//            group holds only three lanes)
//   level 2: r1[4j .. 4j+3]   -> r2[j], ceil(N/16) sums  (4 for N = 63)
//   level 3: r2[0 .. 3]       -> total
// Every level grows the width by two bits, so the result is exact.
//
// Interface: N lanes (1 .. 64) of W bits in; one W+6 bit sum out.
// Timing: three clock cycles of latency, a new sum every cycle. Reset (asynchronous,
// active low) clears all levels.
module fir_adder_tree #(
  parameter int unsigned N = 63,  // number of lanes, at most 64
  parameter int unsigned W = 48   // lane width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] lanes [N],
  output logic signed [W+5:0] total
);

  localparam int unsigned N1 = (N + 3) / 4;   // level-1 sums
  localparam int unsigned N2 = (N1 + 3) / 4;  // level-2 sums, at most 4

  if (N < 1 || N > 64) begin : g_check_n
    $error("fir_adder_tree: N must be 1 .. 64");
  end

  logic signed [W+1:0] r1 [N1], r1_d [N1];
  logic signed [W+3:0] r2 [N2], r2_d [N2];
  logic signed [W+5:0] total_d;

  // Combinational group sums feeding each level's registers.
  always_comb begin
    for (int unsigned j = 0; j < N1; j++) begin
      r1_d[j] = '0;
      for (int unsigned i = 4*j; i < 4*j + 4 && i < N; i++) r1_d[j] += (W+2)'(lanes[i]);
    end
    for (int unsigned j = 0; j < N2; j++) begin
      r2_d[j] = '0;
      for (int unsigned i = 4*j; i < 4*j + 4 && i < N1; i++) r2_d[j] += (W+4)'(r1[i]);
    end
    total_d = '0;
    for (int unsigned i = 0; i < N2; i++) total_d += (W+6)'(r2[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < N1; j++) r1[j] <= '0;
      for (int unsigned j = 0; j < N2; j++) r2[j] <= '0;
      total <= '0;
    end else begin
      r1    <= r1_d;
      r2    <= r2_d;
      total <= total_d;
    end
  end

endmodule
