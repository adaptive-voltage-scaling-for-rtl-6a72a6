`timescale 1ps/1ps
// tb_ring_osc: for each supply level, enables the oscillator and measures
// the delay from ctrl rising to the first falling edge of vco_out and the
// following periods; checks that it rests high with ctrl low and that a
// supply under 0.7 V does not oscillate.
module tb_ring_osc;
  import avs_pkg::*;
  logic ctrl = 0;
  mv_t vdd_mv = 12'd1170;
  logic vco_out;
  int checks = 0, failures = 0;
  // expected half periods in ps: 1e6 / (2 * f_MHz) with 435, 399, 350, 300, 222 MHz
  int mv_list [5]   = '{1170, 1100, 1000, 900, 800};
  int half_list [5] = '{1149, 1253, 1428, 1666, 2252};

  ring_osc dut (.ctrl(ctrl), .vdd_mv(vdd_mv), .vco_out(vco_out));

  initial begin
    time t0, t1, t2;
    for (int n = 0; n < 5; n++) begin
      vdd_mv = mv_t'(mv_list[n]);
      #5000;
      checks++;
      if (vco_out !== 1'b1) begin failures++; $display("FAIL not resting high"); end
      ctrl = 1;
      t0 = $time;
      @(negedge vco_out); t1 = $time;
      @(negedge vco_out); t2 = $time;
      checks += 2;
      if (t1 - t0 != half_list[n]) begin
        failures++; $display("FAIL level %0d first half %0t expected %0d", n, t1 - t0, half_list[n]);
      end
      if (t2 - t1 != 2 * half_list[n]) begin
        failures++; $display("FAIL level %0d period %0t", n, t2 - t1);
      end
      ctrl = 0;
    end
    // dead supply
    vdd_mv = 12'd300;
    #100;
    ctrl = 1;
    #20000;
    checks++;
    if (vco_out !== 1'b1) begin failures++; $display("FAIL oscillates at 0.3 V"); end
    ctrl = 0;
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
