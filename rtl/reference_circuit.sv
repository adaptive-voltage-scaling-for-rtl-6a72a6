`timescale 1ps/1ps
// reference_circuit: critical-path emulator of the AVS loop. The ring
// oscillator (a behavioural model of an analog part) runs from the regulated
// voltage and its output is compared by the frequency detector with the
// operating frequency. slow = 1 means the circuit would not meet the
// operating frequency at this voltage.
//
// Interface: vref_mv is the regulated supply from VVG1 in millivolts, freq the
// operating clock, ctrl the measurement window (one reference cycle, starting
// at a rising edge of freq). slow is valid from the falling edge of freq
// inside the window and holds until the next window.
module reference_circuit
  import avs_pkg::*;
(
  input  mv_t  vref_mv,
  input  logic freq,
  input  logic ctrl,
  input  logic rst,
  output logic slow,
  output logic vco_out
);
  ring_osc u_ring (
    .ctrl   (ctrl),
    .vdd_mv (vref_mv),
    .vco_out(vco_out)
  );

  freq_detector u_fd (
    .freq   (freq),
    .vco_out(vco_out),
    .ctrl   (ctrl),
    .rst    (rst),
    .slow   (slow)
  );
endmodule
