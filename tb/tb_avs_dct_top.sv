`timescale 1ps/1ps
// tb_avs_dct_top: end-to-end test of the AVS-controlled DCT at its default
// parameters. For each operating frequency (the five DCT operating points
// 435, 399, 350, 300 and 222 MHz, plus 500 MHz, faster than the top level
// allows, and 150 MHz, slower than the bottom level needs) it resets the
// system, lets the loop search and lock, and checks:
//   * the lock time (at most 12 reference cycles after reset falls: one for
//     the entry flop, two per level, one for the lock flop);
//   * the chosen level: the lowest voltage whose DCT maximum frequency is at
//     least the operating frequency (the top level if none is);
//   * that VVG2 then delivers that voltage to the DCT;
//   * DCT results, streamed back to back in all three coefficient modes,
//     against a direct matrix product, with a latency of two clocks.
// It counts how often each mechanism occurred (lock on slow with fall-back to
// the previous level, the highest-level exception, the lowest-level
// exception, each coefficient mode) and fails if one never did.
module tb_avs_dct_top;
  import avs_pkg::*;
  import dct_ref_pkg::*;
  localparam int DATA_W = 8, ZW = DATA_W + 1 + COEF_W + 4;

  logic clk = 0, reset = 1, vvg_enable = 1, in_valid = 0;
  logic signed [DATA_W-1:0] x [8];
  coef_mode_e coef_mode = COEF_ORIG;
  logic out_valid, ctrl, slow, lock, vco_out;
  logic signed [ZW-1:0] z [8];
  level_code_t pre_sel, sel;
  mv_t vref_mv, vout_mv;
  int ref_half = 1150;
  int checks = 0, failures = 0;

  // operating points: frequency (MHz) and clock half period (ps, rounded up)
  int f_list [7]    = '{435, 399, 350, 300, 222, 500, 150};
  int half_list [7] = '{1150, 1254, 1429, 1667, 2253, 1000, 3334};
  // DCT maximum frequency per level, 1.17 V .. 0.80 V
  int fmax [5]      = '{435, 399, 350, 300, 222};
  int mv_of [5]     = '{1170, 1100, 1000, 900, 800};

  int n_fallback = 0, n_top_exc = 0, n_bottom_exc = 0, n_mode [3] = '{0, 0, 0}, n_ctrl = 0;

  avs_dct_top dut (
    .ref_clk(clk), .reset(reset), .vvg_enable(vvg_enable), .in_valid(in_valid), .x(x),
    .coef_mode(coef_mode), .out_valid(out_valid), .z(z), .pre_sel(pre_sel), .ctrl(ctrl),
    .slow(slow), .lock(lock), .sel(sel), .vref_mv(vref_mv), .vout_mv(vout_mv), .vco_out(vco_out)
  );

  always #(ref_half) clk = ~clk;
  always @(posedge ctrl) n_ctrl++;

  // scoreboard of expected DCT outputs, keyed by clock count
  int cycle = 0;
  int exp_z [int][8];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset && lock) begin
      if (out_valid !== exp_z.exists(cycle)) begin
        failures++;
        $display("FAIL out_valid=%b at cycle %0d", out_valid, cycle);
      end
      if (out_valid && exp_z.exists(cycle))
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(z[k]) != exp_z[cycle][k]) begin
            failures++;
            $display("FAIL z%0d=%0d expected %0d", k, z[k], exp_z[cycle][k]);
          end
        end
    end
  end

  function automatic int level_of(input level_code_t c);
    for (int k = 0; k < 5; k++) if (c == ~(5'b10000 >> k)) return k;
    return -1;
  endfunction

  initial begin
    for (int p = 0; p < 7; p++) begin
      int want, cyc, got;
      ref_half = half_list[p];
      reset = 1;
      in_valid = 0;
      repeat (3) @(posedge clk);
      #1 reset = 0;
      cyc = 0;
      while (!lock && cyc < 50) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (!lock || cyc > 1 + 2 * 5 + 1) begin
        failures++; $display("FAIL %0d MHz: lock after %0d cycles", f_list[p], cyc);
      end
      repeat (2) @(posedge clk);
      #1;
      // expected: lowest level whose maximum frequency still covers the clock
      want = 0;
      for (int k = 0; k < 5; k++) if (fmax[k] >= f_list[p]) want = k;
      got = level_of(sel);
      checks++;
      if (got != want) begin
        failures++; $display("FAIL %0d MHz: level %0d expected %0d", f_list[p], got, want);
      end
      checks++;
      if (int'(vout_mv) != mv_of[want]) begin
        failures++; $display("FAIL %0d MHz: DCT supply %0d mV expected %0d", f_list[p], vout_mv, mv_of[want]);
      end
      $display("%0d MHz: locked after %0d cycles, DCT supply %0d mV", f_list[p], cyc, vout_mv);
      if (fmax[0] < f_list[p]) n_top_exc++;
      else if (fmax[4] >= f_list[p]) n_bottom_exc++;
      else if (want > 0 || level_of(pre_sel) == want + 1) n_fallback++;

      // stream DCT vectors back to back, then a gap
      for (int n = 0; n < 24; n++) begin
        int xv [8];
        int mode;
        mode = (n + p) % 3;
        in_valid = (n % 8 != 7);
        coef_mode = coef_mode_e'(mode);
        for (int i = 0; i < 8; i++) begin
          xv[i] = int'($urandom_range(0, 255)) - 128;
          x[i] = DATA_W'(xv[i]);
        end
        if (in_valid) begin
          for (int k = 0; k < 8; k++) exp_z[cycle + 2][k] = dct_ref(mode, k, xv);
          n_mode[mode]++;
        end
        @(posedge clk); #1;
      end
      in_valid = 0;
      repeat (4) @(posedge clk);
      #1;
    end
    checks += 5;
    if (n_fallback == 0)   begin failures++; $display("FAIL no lock with fall-back to the previous level"); end
    if (n_top_exc == 0)    begin failures++; $display("FAIL highest-level exception never hit"); end
    if (n_bottom_exc == 0) begin failures++; $display("FAIL lowest-level exception never hit"); end
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) begin failures++; $display("FAIL a coefficient mode unused"); end
    if (n_ctrl == 0)       begin failures++; $display("FAIL no measurement window"); end
    $display("mechanisms: fallback=%0d top_exception=%0d bottom_exception=%0d modes=%0d/%0d/%0d windows=%0d",
             n_fallback, n_top_exc, n_bottom_exc, n_mode[0], n_mode[1], n_mode[2], n_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
