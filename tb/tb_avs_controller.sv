`timescale 1ps/1ps
// tb_avs_controller: closes the loop with a stand-in for the reference circuit
// that reports slow from a chosen level down, and checks the final sel and the
// lock time: the search must lock within 2*5+1 reference cycles of reset
// falling and sel must name the lowest level that still met timing (the
// highest level if none did).
module tb_avs_controller;
  logic clk = 0, reset = 1, slow, ctrl, lock;
  logic [4:0] pre_sel, sel;
  int fail_level = 5;
  int checks = 0, failures = 0;

  avs_controller dut (.ref_clk(clk), .reset(reset), .slow(slow), .pre_sel(pre_sel),
                      .ctrl(ctrl), .lock(lock), .sel(sel));
  avs_slow_model u_slow (.clk(clk), .reset(reset), .ctrl(ctrl), .pre_sel(pre_sel),
                         .fail_level(fail_level), .slow(slow));

  always #1000 clk = ~clk;

  initial begin
    repeat (3) begin
      for (int f = 0; f <= 5; f++) begin
        int cyc, want;
        fail_level = f;
        reset = 1;
        repeat (2) @(posedge clk);
        #1 reset = 0;
        cyc = 0;
        while (!lock && cyc < 40) begin @(posedge clk); #1; cyc++; end
        checks++;
        if (cyc > 2 * 5 + 1 + 1) begin failures++; $display("FAIL f=%0d lock after %0d cycles", f, cyc); end
        @(posedge clk); #1;
        want = (f == 0) ? 0 : (f >= 5 ? 4 : f - 1);
        checks++;
        if (sel !== ~(5'b10000 >> want)) begin
          failures++;
          $display("FAIL f=%0d sel=%b expected level %0d", f, sel, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
