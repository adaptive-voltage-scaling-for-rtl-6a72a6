`timescale 1ps/1ps
// tb_selector: replays the pre_sel/lock/slow sequences the control logic
// produces for a search that stops at each level, with slow set or clear, and
// checks sel: highest level before lock; on lock the previous level when the
// current one was too slow, the same level at the highest level or when the
// lowest level still met timing; sel then holds.
module tb_selector;
  logic clk = 0, reset = 1, lock = 0, slow = 0;
  logic [4:0] pre_sel = 5'b11111, sel;
  int checks = 0, failures = 0;

  selector dut (.ref_clk(clk), .reset(reset), .pre_sel(pre_sel), .lock(lock),
                .slow(slow), .sel(sel));

  always #1000 clk = ~clk;

  function automatic logic [4:0] code(input int k);
    return ~(5'b10000 >> k);
  endfunction

  initial begin
    for (int stop = 0; stop < 5; stop++)
      for (int s = 0; s < 2; s++) begin
        logic [4:0] exp;
        reset = 1; lock = 0; slow = 0; pre_sel = 5'b11111;
        repeat (2) @(posedge clk);
        #1 reset = 0;
        @(posedge clk); #1;
        for (int k = 0; k <= stop; k++) begin
          pre_sel = code(k);
          @(posedge clk); #1;
          checks++;
          if (sel !== 5'b01111) begin failures++; $display("FAIL sel before lock %b", sel); end
          if (k == stop) slow = s[0];
          @(posedge clk); #1;
        end
        lock = 1;
        exp = (s == 1 && stop > 0) ? code(stop - 1) : code(stop);
        @(posedge clk); #1;
        @(posedge clk); #1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL stop=%0d slow=%0d sel=%b expected %b", stop, s, sel, exp);
        end
        // disturb the inputs: sel must hold
        slow = ~slow;
        repeat (3) @(posedge clk);
        #1;
        checks++;
        if (sel !== exp) begin failures++; $display("FAIL sel did not hold"); end
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
