`timescale 1ps/1ps
// tb_vvg: applies every one-cold select word, the all-ones word, an invalid
// word and enable low, and checks the output voltage and that it changes
// only after the settling time.
module tb_vvg;
  import avs_pkg::*;
  localparam int SETTLE = 200;
  logic enable = 0;
  level_code_t sel = '1;
  mv_t vout_mv;
  int checks = 0, failures = 0;

  vvg #(.SETTLE_PS(SETTLE)) dut (.enable(enable), .sel(sel), .vout_mv(vout_mv));

  task automatic apply(input logic en, input level_code_t s, input int exp_mv);
    int prev_mv;
    #1000;
    prev_mv = int'(vout_mv);
    enable = en;
    sel = s;
    #(SETTLE / 2);
    checks++;
    if (int'(vout_mv) != prev_mv) begin failures++; $display("FAIL changed before settling"); end
    #(SETTLE);
    checks++;
    if (int'(vout_mv) != exp_mv) begin
      failures++;
      $display("FAIL en=%b sel=%b vout=%0d expected %0d", en, s, vout_mv, exp_mv);
    end
  endtask

  initial begin
    #1;
    apply(1, 5'b11111, 1200);
    apply(1, 5'b01111, 1170);
    apply(1, 5'b10111, 1100);
    apply(1, 5'b11011, 1000);
    apply(1, 5'b11101, 900);
    apply(1, 5'b11110, 800);
    apply(1, 5'b01110, 0);
    apply(0, 5'b01111, 0);
    apply(1, 5'b11101, 900);
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
