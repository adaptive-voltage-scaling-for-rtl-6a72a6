`timescale 1ps/1ps
// tb_dct_1d: streams random 8-sample vectors into the pipelined DCT, one per
// clock with gaps, switching the coefficient set per vector. Each result must
// appear exactly two clocks after its input, equal the direct matrix product
// with the same integer coefficients, and (original set) lie within the
// coefficient-quantisation error of the ideal floating-point DCT.
module tb_dct_1d;
  import avs_pkg::*;
  import dct_ref_pkg::*;
  localparam int DATA_W = 8, ZW = DATA_W + 1 + COEF_W + 4, LAT = 2;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] x [8];
  coef_mode_e coef_mode = COEF_ORIG;
  logic signed [ZW-1:0] z [8];
  int checks = 0, failures = 0;

  dct_1d #(.DATA_W(DATA_W)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
                                 .coef_mode(coef_mode), .out_valid(out_valid), .z(z));

  always #500 clk = ~clk;

  // expected results, indexed by the cycle in which they must appear
  int exp_z [int][8];
  int exp_mode [int];
  int cycle = 0;
  int sent = 0, got = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      checks++;
      if (out_valid !== exp_z.exists(cycle)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d", cycle, out_valid);
      end
      if (out_valid && exp_z.exists(cycle)) begin
        got++;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(z[k]) != exp_z[cycle][k]) begin
            failures++;
            $display("FAIL cycle %0d z%0d=%0d expected %0d", cycle, k, z[k], exp_z[cycle][k]);
          end
        end
      end
    end
  end

  function automatic real ideal(input int k, input int xv [8]);
    real acc = 0.0, ck;
    ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int i = 0; i < 8; i++) acc += xv[i] * $cos((2 * i + 1) * k * 3.14159265358979 / 16.0);
    return ck / 2.0 * acc;
  endfunction

  initial begin
    int xv [8];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      // drive before the next edge, the edge after it is cycle+1
      if (n % 7 == 6) begin
        in_valid = 0;
      end else begin
        int mode = (n / 5) % 3;
        in_valid = 1;
        coef_mode = coef_mode_e'(mode);
        for (int i = 0; i < 8; i++) begin
          xv[i] = (n == 0) ? 127 : (n == 1) ? -128 : int'($urandom_range(0, 255)) - 128;
          x[i] = DATA_W'(xv[i]);
        end
        for (int k = 0; k < 8; k++) exp_z[cycle + LAT][k] = dct_ref(mode, k, xv);
        exp_mode[cycle + LAT] = mode;
        sent++;
        if (mode == 0)
          for (int k = 0; k < 8; k++) begin
            real err = real'(dct_ref(0, k, xv)) / 128.0 - ideal(k, xv);
            checks++;
            if (err > 6.0 || err < -6.0) begin
              failures++;
              $display("FAIL quantisation error %f on z%0d", err, k);
            end
          end
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (got != sent) begin
      failures++;
      $display("FAIL %0d results for %0d inputs", got, sent);
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
