`timescale 1ps/1ps
// dct_1d: 8-point one-dimensional DCT built from computation-sharing
// multipliers, pipelined in two stages.
//
//   z_k = c(k)/2 * sum_{i=0..7} x_i * cos((2i+1) k pi / 16),
//   c(0) = 1/sqrt(2), c(k) = 1 otherwise,
// computed as an even half (z0, z2, z4, z6 from the sums x_j + x_{7-j}) and
// an odd half (z1, z3, z5, z7 from the differences x_j - x_{7-j}), each a
// 4x4 constant-matrix product realised with pre-computers and select-adders
// (no multipliers).
//
// Pipeline: stage 1 registers the butterfly sums/differences and the
// coefficient mode; stage 2 registers the eight products-and-sums. One 8-sample
// vector is accepted every clock and its result appears two clocks later with
// out_valid. Outputs are exact and scaled by 2^7: z_real = z / 128, where the
// coefficients are the selected 8-bit set (not the ideal cosines).
//
// coef_mode selects the coefficient set per vector: the original 8-bit
// quantisation (normal quality) or one of the two reduced sets (Type1,
// Type2) for the low-power mode. The two-stage split follows the design; where
// the cut is placed (after the butterfly) is this implementation's choice.
// Reset is synchronous and active high and clears only the valid pipeline.
module dct_1d
  import avs_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ZW     = DATA_W + 1 + COEF_W + 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [8],
  input  coef_mode_e               coef_mode,
  output logic                     out_valid,
  output logic signed [ZW-1:0]     z [8]
);
  localparam int unsigned SW = DATA_W + 1;

  // Stage 1: butterfly
  logic signed [SW-1:0] s_q [4];
  logic signed [SW-1:0] t_q [4];
  coef_mode_e           mode_q;
  coef_set_t            coefs_q;
  logic                 v1_q;

  always_ff @(posedge clk) begin
    for (int j = 0; j < 4; j++) begin
      s_q[j] <= SW'(x[j]) + SW'(x[7-j]);
      t_q[j] <= SW'(x[j]) - SW'(x[7-j]);
    end
    mode_q <= coef_mode;
  end

  // The mode, not the decoded set, is registered: any register value,
  // including an unused code, decodes to a legal coefficient set.
  always_comb coefs_q = coef_set(mode_q);

  // Stage 2: CSHM constant-matrix products
  logic signed [ZW-1:0] ze [4];
  logic signed [ZW-1:0] zo [4];

  dct_even #(.SW(SW), .ZW(ZW)) u_even (.s(s_q), .coefs(coefs_q), .z(ze));
  dct_odd  #(.SW(SW), .ZW(ZW)) u_odd  (.t(t_q), .coefs(coefs_q), .z(zo));

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      z[2*k]   <= ze[k];
      z[2*k+1] <= zo[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end
endmodule
