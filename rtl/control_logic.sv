`timescale 1ps/1ps
// control_logic: walks the VVG1 select word down through the voltage levels
// and locks it when the reference circuit reports "slow".
//
// A chain of 2*NUM_LEVELS+1 flip-flops (FF, Q4a, Q4b, Q3a, Q3b, ... Q0a, Q0b
// for five levels) is clocked by the reference clock. While reset is high a
// 0 enters the chain; once reset falls a 1 enters and travels one flop per
// cycle. Level k is active while its "a" flop holds 1 and the next level's
// "a" flop still holds 0, so each level lasts two reference cycles and
// pre_sel is one-cold: bit 4 low first (highest voltage), bit 0 low last.
// The first cycle of a level lets VVG1 settle; in the second (its "b" flop is
// set) ctrl is high and the reference circuit measures. At the end of that
// cycle the MDFF, which holds lock and feeds it back to its select input,
// sets lock if slow was reported, or if the lowest level has been measured.
// Once locked the chain stops, pre_sel stays on the level that failed (or the
// lowest one) and ctrl stays low. Worst case: lock 2*NUM_LEVELS+1 reference
// cycles after reset falls.
//
// The chain, the two cycles per level and the MDFF follow the design. Using
// the first cycle of a level to settle and the second to measure, freezing
// the chain on lock and forcing lock after the lowest level are this
// implementation's reading of how the parts fit together.
module control_logic
  import avs_pkg::*;
(
  input  logic        ref_clk,
  input  logic        reset,     // active high, synchronous
  input  logic        slow,
  output level_code_t pre_sel,
  output logic        lock,
  output logic        ctrl
);
  localparam int unsigned CHAIN = 2 * NUM_LEVELS + 1;

  logic [CHAIN-1:0]      chain;       // chain[0] = FF, then a/b pairs from the top level
  logic [NUM_LEVELS-1:0] qa, qb;      // index = level (0 = highest voltage)
  logic [NUM_LEVELS-1:0] active, measure;
  logic                  lock_d0;
  logic                  advance;

  always_comb begin
    for (int unsigned k = 0; k < NUM_LEVELS; k++) begin
      qa[k] = chain[2*k+1];
      qb[k] = chain[2*k+2];
    end
    for (int unsigned k = 0; k < NUM_LEVELS; k++) begin
      active[k]  = qa[k] & ((k == NUM_LEVELS-1) ? 1'b1 : ~qa[(k+1) % NUM_LEVELS]);
      measure[k] = active[k] & qb[k];
      pre_sel[NUM_LEVELS-1-k] = ~active[k];
    end
    ctrl    = (|measure) & ~lock;
    lock_d0 = ctrl & (slow | measure[NUM_LEVELS-1]);
    advance = ~lock & ~lock_d0;
  end

  always_ff @(posedge ref_clk) begin
    if (reset)        chain <= '0;
    else if (advance) chain <= {chain[CHAIN-2:0], ~reset};
  end

  mdff u_lock (
    .clk(ref_clk),
    .rst(reset),
    .d0 (lock_d0),
    .d1 (1'b1),
    .s0 (lock),
    .q  (lock)
  );

  // pre_sel is all ones or exactly one bit low.
  always_ff @(posedge ref_clk)
    if (!reset) assert (pre_sel == '1 || $onehot(~pre_sel))
      else $error("pre_sel %b is not one-cold", pre_sel);
endmodule
