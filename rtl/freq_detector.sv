`timescale 1ps/1ps
// freq_detector: half-cycle frequency detector. It tells, within half a
// reference cycle, whether the ring oscillator is slower than the operating
// (reference) frequency.
//
// How it works: ctrl rises together with a rising edge of the reference
// clock `freq` and releases the ring oscillator. A first flip-flop, clocked by
// the inverted oscillator output, captures a 1 on the oscillator's first
// falling edge, i.e. one oscillator half period after ctrl rose; `a` is its
// inverted output, so a = 0 once the oscillator has completed its half
// period. A second flip-flop samples `a` on the falling edge of the reference
// clock (clocked by the inverted reference, gated by ctrl). If the oscillator
// has not yet completed its half period at that moment it is slower than the
// reference and `slow` becomes 1; otherwise 0. While ctrl is low the first
// flip-flop is held clear, ready for the next measurement.
//
// The inverted oscillator clock, the inverted (and in silicon, delay-matched)
// reference clock and the flip-flop that outputs `slow` follow the design.
// Gating the sampling clock with ctrl, clearing the first flip-flop with ctrl
// low and the active-high reset of `slow` are this implementation's choices.
// `slow` holds its value until the next measurement.
module freq_detector (
  input  logic freq,      // operating (reference) clock
  input  logic vco_out,   // ring-oscillator output
  input  logic ctrl,      // measurement window, high for one reference cycle
  input  logic rst,       // active-high reset of slow
  output logic slow
);
  logic vco_n;
  logic sample_clk;
  logic seen_half;
  logic a;

  assign vco_n      = ~vco_out;
  assign sample_clk = ~freq & ctrl;

  always_ff @(posedge vco_n or negedge ctrl) begin
    if (!ctrl) seen_half <= 1'b0;
    else       seen_half <= 1'b1;
  end

  assign a = ~seen_half;

  always_ff @(posedge sample_clk or posedge rst) begin
    if (rst) slow <= 1'b0;
    else     slow <= a;
  end
endmodule
