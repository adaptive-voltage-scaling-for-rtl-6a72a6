`timescale 1ps/1ps
// cshm_precompute: the pre-computer of a computation-sharing multiplier
// (CSHM) with 2-bit decomposition.
//
// With 2-bit decomposition every coefficient is cut into 2-bit groups, and
// the only "alphabets" the groups need are 01 and 11. The pre-computer
// therefore forms the two products 1*x and 3*x = (x << 1) + x once per input
// sample; every select-adder fed by this input reuses them. Purely
// combinational, no clock. Outputs are two bits wider than the input so that
// 3*x never overflows.
module cshm_precompute #(
  parameter int unsigned W = 9          // input width (butterfly output width)
) (
  input  logic signed [W-1:0] x,
  output logic signed [W+1:0] x1,       // 1 * x
  output logic signed [W+1:0] x3        // 3 * x
);
  always_comb begin
    x1 = (W+2)'(x);
    x3 = ((W+2)'(x) <<< 1) + (W+2)'(x);
  end
endmodule
