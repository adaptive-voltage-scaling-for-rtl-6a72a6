`timescale 1ps/1ps
// tb_mdff: random D0/D1/S0 patterns; after each clock edge Q must equal D0
// when S0 was 0 and D1 when S0 was 1; reset must clear Q.
module tb_mdff;
  logic clk = 0, rst = 1, d0 = 0, d1 = 0, s0 = 0, q;
  int checks = 0, failures = 0;

  mdff dut (.clk(clk), .rst(rst), .d0(d0), .d1(d1), .s0(s0), .q(q));

  always #5 clk = ~clk;

  initial begin
    logic exp;
    @(posedge clk); #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    repeat (300) begin
      {d0, d1, s0} = 3'($urandom);
      exp = s0 ? d1 : d0;
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL d0=%b d1=%b s0=%b q=%b", d0, d1, s0, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
