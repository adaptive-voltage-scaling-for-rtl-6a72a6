`timescale 1ps/1ps
// tb_cshm_precompute: drives random and corner inputs into the CSHM
// pre-computer and checks 1x and 3x against plain integer arithmetic.
module tb_cshm_precompute;
  localparam int W = 9;
  logic signed [W-1:0] x;
  logic signed [W+1:0] x1, x3;
  int checks = 0, failures = 0;

  cshm_precompute #(.W(W)) dut (.x(x), .x1(x1), .x3(x3));

  task automatic check(input int v);
    x = W'(v);
    #1;
    checks++;
    if (int'(x1) != v || int'(x3) != 3 * v) begin
      failures++;
      $display("FAIL x=%0d x1=%0d x3=%0d", v, x1, x3);
    end
  endtask

  initial begin
    check(0); check(1); check(-1); check(255); check(-256);
    repeat (500) check(int'($urandom_range(0, 511)) - 256);
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
