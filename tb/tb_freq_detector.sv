`timescale 1ps/1ps
// tb_freq_detector: generates a reference clock and an oscillator-like signal
// (resting high, first falling edge a chosen time after ctrl rises) and
// checks that slow is 1 exactly when that time exceeds the reference high
// phase, that slow is ready by the reference falling edge, and that it holds
// after the window.
module tb_freq_detector;
  localparam int REF_HALF = 1500;
  logic freq = 0, vco_out = 1, ctrl = 0, rst = 0, slow;
  int checks = 0, failures = 0;
  int vco_half;

  freq_detector dut (.freq(freq), .vco_out(vco_out), .ctrl(ctrl), .rst(rst), .slow(slow));

  always #(REF_HALF) freq = ~freq;

  // oscillator stand-in
  always begin
    if (!ctrl) begin vco_out = 1; @(posedge ctrl); end
    else begin #(vco_half); if (ctrl) vco_out = ~vco_out; end
  end

  task automatic measure(input int h);
    logic exp;
    vco_half = h;
    exp = (h > REF_HALF);
    @(posedge freq);
    ctrl <= 1;
    @(negedge freq); #10;
    checks++;
    if (slow !== exp) begin failures++; $display("FAIL half=%0d slow=%b", h, slow); end
    @(posedge freq);
    ctrl <= 0;
    repeat (2) @(posedge freq);
    checks++;
    if (slow !== exp) begin failures++; $display("FAIL slow not held, half=%0d", h); end
  endtask

  initial begin
    #1 rst = 1;
    repeat (2) @(posedge freq);
    checks++;
    if (slow !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    measure(1000); measure(2000); measure(1400); measure(1600);
    measure(400); measure(2900); measure(1499); measure(1501);
    repeat (20) measure(int'($urandom_range(300, 2900)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
