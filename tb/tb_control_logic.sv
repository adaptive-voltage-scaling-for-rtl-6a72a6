`timescale 1ps/1ps
// tb_control_logic: for every position of the first too-slow level (and for
// none), checks cycle by cycle after reset: the one-cold pre_sel walk from
// bit 4 down, two reference cycles per level; ctrl high in the second cycle
// of each level; lock set at the end of the failing (or lowest) level's
// measurement, pre_sel frozen and ctrl low afterwards.
module tb_control_logic;
  logic clk = 0, reset = 1, slow, lock, ctrl;
  logic [4:0] pre_sel;
  int fail_level = 5;
  int checks = 0, failures = 0;

  control_logic dut (.ref_clk(clk), .reset(reset), .slow(slow), .pre_sel(pre_sel),
                     .lock(lock), .ctrl(ctrl));
  avs_slow_model u_slow (.clk(clk), .reset(reset), .ctrl(ctrl), .pre_sel(pre_sel),
                         .fail_level(fail_level), .slow(slow));

  always #1000 clk = ~clk;

  initial begin
    for (int f = 0; f <= 5; f++) begin
      int lk;
      fail_level = f;
      lk = (f < 4) ? f : 4;          // level at which the search stops
      reset = 1;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (pre_sel !== 5'b11111 || lock !== 1'b0 || ctrl !== 1'b0) begin
        failures++; $display("FAIL reset state %b %b %b", pre_sel, lock, ctrl);
      end
      reset = 0;
      for (int c = 1; c <= 20; c++) begin
        logic [4:0] e_pre;
        logic e_lock, e_ctrl;
        int lvl;
        @(posedge clk); #1;
        e_lock = (c >= 4 + 2 * lk);
        lvl = (c < 2) ? -1 : ((c - 2) / 2 < lk ? (c - 2) / 2 : lk);
        e_pre = (lvl < 0) ? 5'b11111 : ~(5'b10000 >> lvl);
        e_ctrl = !e_lock && c >= 3 && ((c - 3) % 2 == 0);
        checks++;
        if (pre_sel !== e_pre || lock !== e_lock || ctrl !== e_ctrl) begin
          failures++;
          $display("FAIL f=%0d cycle %0d: pre_sel=%b lock=%b ctrl=%b expected %b %b %b",
                   f, c, pre_sel, lock, ctrl, e_pre, e_lock, e_ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
