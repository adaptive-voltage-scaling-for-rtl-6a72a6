`timescale 1ps/1ps
// avs_controller: the AVS controller, control logic plus selector.
//
// slow comes from the reference circuit. The control logic produces the
// one-cold pre_sel word for VVG1, the measurement window ctrl for the
// reference circuit and lock; the selector turns the locked search into the
// sel word for VVG2. All state is clocked by the reference (operating)
// clock. Timing: lock at most 2*NUM_LEVELS+1 reference cycles after reset
// falls, sel one cycle after lock.
module avs_controller
  import avs_pkg::*;
(
  input  logic        ref_clk,
  input  logic        reset,
  input  logic        slow,
  output level_code_t pre_sel,
  output logic        ctrl,
  output logic        lock,
  output level_code_t sel
);
  control_logic u_ctl (
    .ref_clk(ref_clk),
    .reset  (reset),
    .slow   (slow),
    .pre_sel(pre_sel),
    .lock   (lock),
    .ctrl   (ctrl)
  );

  selector u_sel (
    .ref_clk(ref_clk),
    .reset  (reset),
    .pre_sel(pre_sel),
    .lock   (lock),
    .slow   (slow),
    .sel    (sel)
  );
endmodule
