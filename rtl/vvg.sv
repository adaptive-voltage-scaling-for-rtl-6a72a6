// vvg: BEHAVIOURAL MODEL of the on-chip variable voltage generator (VVG).
// The real part is analog: a supply-independent reference generator whose
// load resistor is five parallel transistors switched by a 5-bit select,
// followed by a differential voltage follower and a large nMOS output driver.
// This model keeps only its logic-visible behaviour.
//
// Function: the one-cold select word picks one of five regulated voltages,
// 1.17, 1.10, 1.00, 0.90 and 0.80 V (bit 4 low = highest). The all-ones word
// (no level applied yet, as during reset) gives the 1.2 V starting supply.
// With enable low the output is 0 V. The output is reported in millivolts and
// follows a change of select or enable after SETTLE_PS picoseconds (an
// assumed settling time; the analog design gives none).
//
// Used twice in the system: VVG1 supplies the ring oscillator during the
// search, VVG2 supplies the DCT unit with the level finally chosen.
`timescale 1ps/1ps
module vvg
  import avs_pkg::*;
#(
  parameter int unsigned SETTLE_PS = 200
) (
  input  logic        enable,
  input  level_code_t sel,
  output mv_t         vout_mv
);
  mv_t target;

  always_comb target = enable ? level_mv(sel) : '0;

  initial vout_mv = '0;
  always @(target) vout_mv <= #(SETTLE_PS) target;
endmodule
