`timescale 1ps/1ps
// selector: chooses the select word for VVG2 (the DCT supply) once the
// search has locked.
//
// While lock is low the selector remembers the pre_sel word of the previous
// level and drives sel to the highest level, so the DCT runs at full voltage
// during the search. When lock rises it loads sel once:
//   * the previous level, when the search stopped because the current level
//     was too slow (the previous one was the last that met timing);
//   * the current level, when the search stopped at the highest level (there
//     is no higher one) or because the lowest level still met timing.
// sel then holds until reset. One reference cycle from lock to sel.
//
// The choice of previous versus current level and the two exceptions follow
// the design. Taking `slow` as an input to tell the two lock causes apart at
// the lowest level, and driving the highest level before lock, are this
// implementation's choices.
module selector
  import avs_pkg::*;
(
  input  logic        ref_clk,
  input  logic        reset,
  input  level_code_t pre_sel,
  input  logic        lock,
  input  logic        slow,
  output level_code_t sel
);
  level_code_t cur_q, prev_q;
  logic        lock_q;

  always_ff @(posedge ref_clk) begin
    if (reset) begin
      cur_q  <= '1;
      prev_q <= '1;
      lock_q <= 1'b0;
      sel    <= level_code(0);
    end else begin
      lock_q <= lock;
      if (!lock) begin
        cur_q <= pre_sel;
        if (pre_sel != cur_q) prev_q <= cur_q;
      end
      if (lock && !lock_q) begin
        if (slow && prev_q != '1) sel <= prev_q;
        else                      sel <= pre_sel;
      end
    end
  end
endmodule
