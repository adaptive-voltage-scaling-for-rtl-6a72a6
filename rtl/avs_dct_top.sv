`timescale 1ps/1ps
// avs_dct_top: a DCT unit whose supply voltage is chosen by an adaptive
// voltage scaling (AVS) loop so that it is just high enough for the clock
// frequency it is run at.
//
// Blocks: VVG1 (behavioural model) supplies the ring-oscillator replica of
// the DCT critical path inside the reference circuit; the controller lowers
// VVG1 one level every two reference cycles, starting from the top, until
// the reference circuit reports that the replica is slower than the
// operating clock (or the lowest level has passed); the selector then sets
// VVG2 (behavioural model) to the lowest level that met timing, and VVG2
// supplies the DCT. The DCT unit itself is synchronous logic clocked by the
// same operating clock ref_clk; the supply it gets is visible on vout_mv.
//
// Interface: ref_clk is the operating clock (also the AVS reference), reset
// is active high and restarts the search, vvg_enable powers both VVGs. The
// DCT takes one 8-sample vector per cycle (in_valid, x, coef_mode) and
// returns it two cycles later (out_valid, z, scaled by 2^7). pre_sel, ctrl,
// slow, lock and sel expose the loop; vref_mv and vout_mv are the two VVG
// outputs in millivolts, vco_out the ring-oscillator output.
module avs_dct_top
  import avs_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ZW     = DATA_W + 1 + COEF_W + 4
) (
  input  logic                     ref_clk,
  input  logic                     reset,
  input  logic                     vvg_enable,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [8],
  input  coef_mode_e               coef_mode,
  output logic                     out_valid,
  output logic signed [ZW-1:0]     z [8],
  output level_code_t              pre_sel,
  output logic                     ctrl,
  output logic                     slow,
  output logic                     lock,
  output level_code_t              sel,
  output mv_t                      vref_mv,
  output mv_t                      vout_mv,
  output logic                     vco_out
);
  vvg u_vvg1 (
    .enable (vvg_enable),
    .sel    (pre_sel),
    .vout_mv(vref_mv)
  );

  reference_circuit u_ref (
    .vref_mv(vref_mv),
    .freq   (ref_clk),
    .ctrl   (ctrl),
    .rst    (reset),
    .slow   (slow),
    .vco_out(vco_out)
  );

  avs_controller u_ctl (
    .ref_clk(ref_clk),
    .reset  (reset),
    .slow   (slow),
    .pre_sel(pre_sel),
    .ctrl   (ctrl),
    .lock   (lock),
    .sel    (sel)
  );

  vvg u_vvg2 (
    .enable (vvg_enable),
    .sel    (sel),
    .vout_mv(vout_mv)
  );

  dct_1d #(.DATA_W(DATA_W), .ZW(ZW)) u_dct (
    .clk      (ref_clk),
    .rst      (reset),
    .in_valid (in_valid),
    .x        (x),
    .coef_mode(coef_mode),
    .out_valid(out_valid),
    .z        (z)
  );
endmodule
