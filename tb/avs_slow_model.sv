`timescale 1ps/1ps
// avs_slow_model: stands in for the reference circuit in the controller
// testbenches. During a measurement window (ctrl high) it reports slow = 1 on
// the falling clock edge when the level being measured is at or below
// fail_level (levels counted 0 = highest voltage). fail_level = 5 means every
// level meets timing. slow holds between windows and is cleared by reset.
module avs_slow_model (
  input  logic       clk,
  input  logic       reset,
  input  logic       ctrl,
  input  logic [4:0] pre_sel,
  input  int         fail_level,
  output logic       slow
);
  function automatic int level_of(input logic [4:0] code);
    for (int k = 0; k < 5; k++) if (code == ~(5'b10000 >> k)) return k;
    return -1;
  endfunction

  always @(negedge clk) begin
    if (reset) slow <= 1'b0;
    else if (ctrl) slow <= (level_of(pre_sel) >= fail_level);
  end
endmodule
