`timescale 1ps/1ps
// tb_cshm_select_adder: checks the select-adder product against x * coef for
// every coefficient whose top 2-bit group is 00 (all 64 of them) and random
// operands, including the seven DCT coefficients of each set.
module tb_cshm_select_adder;
  localparam int W = 11, CW = 8;
  logic signed [W-1:0]    x1, x3;
  logic        [CW-1:0]   coef;
  logic signed [W+CW-1:0] prod;
  int checks = 0, failures = 0;

  cshm_select_adder #(.W(W), .CW(CW)) dut (.x1(x1), .x3(x3), .coef(coef), .prod(prod));

  task automatic check(input int x, input int c);
    x1 = W'(x);
    x3 = W'(3 * x);
    coef = CW'(c);
    #1;
    checks++;
    if (int'(prod) != x * c) begin
      failures++;
      $display("FAIL x=%0d coef=%0d prod=%0d expected %0d", x, c, prod, x * c);
    end
  endtask

  initial begin
    for (int c = 0; c < 64; c++) begin
      check(1, c); check(-1, c); check(255, c); check(-256, c);
      repeat (20) check(int'($urandom_range(0, 511)) - 256, c);
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
