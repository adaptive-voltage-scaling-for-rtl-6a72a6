// ring_osc: BEHAVIOURAL MODEL of the critical-path replica ring oscillator.
// The real part is a ring of delay elements (each two inverters) closed
// through a NAND gate whose other input is ctrl, powered by the regulated
// voltage from VVG1. Its delay is tuned so that the oscillation period at
// each supply level equals the DCT's critical-path delay at that level.
//
// Behaviour: while ctrl is low the NAND holds the ring and vco_out rests high.
// The model is the NAND followed by one transport delay of half a period.
// When ctrl rises, vco_out falls one half period later and then toggles every
// half period until ctrl falls again. The half period is chosen from the
// supply voltage vdd_mv: the nearest of the five levels, with the DCT maximum
// frequencies 435, 399, 350, 300 and 222 MHz from 1.17 V down to 0.80 V. A
// supply below 0.70 V stops the oscillator (vco_out stays high).
`timescale 1ps/1ps
module ring_osc
  import avs_pkg::*;
(
  input  logic ctrl,
  input  mv_t  vdd_mv,
  output logic vco_out
);
  localparam int unsigned DEAD_MV = 700;

  // Half period in ps for a given supply; 0 means no oscillation.
  function automatic int unsigned half_period(input mv_t mv);
    int unsigned best, h;
    h    = 0;
    best = 32'hFFFF_FFFF;
    if (mv >= mv_t'(DEAD_MV))
      for (int unsigned k = 0; k < NUM_LEVELS; k++) begin
        int unsigned gap;
        gap = (mv > LEVEL_MV[k]) ? int'(mv) - int'(LEVEL_MV[k]) : int'(LEVEL_MV[k]) - int'(mv);
        if (gap < best) begin
          best = gap;
          h    = LEVEL_HALF_PS[k];
        end
      end
    return h;
  endfunction

  int unsigned half_ps;
  always_comb half_ps = half_period(vdd_mv);

  // NAND stage; the delay elements are lumped into one transport delay of
  // half a period from the NAND output to vco_out.
  logic nand_out;

  always_comb nand_out = ~(ctrl & vco_out);

  initial vco_out = 1'b1;

  // A dead supply (half_ps = 0) forces the output high.
  logic dead;

  always_comb dead = (half_ps == 0);

  always @(nand_out or dead) vco_out <= #(half_ps) (nand_out | dead);
endmodule
