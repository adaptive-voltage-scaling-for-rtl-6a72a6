`timescale 1ps/1ps
// tb_dct_even: feeds random butterfly sums into the even half and compares
// z0, z2, z4, z6 with the direct 8-point DCT of a vector that has those sums
// (x[j] = s[j], x[7-j] = 0), for all three coefficient sets.
module tb_dct_even;
  import avs_pkg::*;
  import dct_ref_pkg::*;
  localparam int SW = 9, ZW = SW + COEF_W + 4;
  logic signed [SW-1:0] s [4];
  coef_set_t coefs;
  logic signed [ZW-1:0] z [4];
  int checks = 0, failures = 0;

  dct_even #(.SW(SW), .ZW(ZW)) dut (.s(s), .coefs(coefs), .z(z));

  initial begin
    int xv [8];
    for (int n = 0; n < 600; n++) begin
      int mode = n % 3;
      for (int j = 0; j < 4; j++) begin
        xv[j] = (n < 3) ? 255 : int'($urandom_range(0, 511)) - 256;
        xv[7-j] = 0;
        s[j] = SW'(xv[j]);
      end
      coefs = coef_set(coef_mode_e'(mode));
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(z[k]) != dct_ref(mode, 2 * k, xv)) begin
          failures++;
          $display("FAIL mode %0d z%0d = %0d expected %0d", mode, 2*k, z[k], dct_ref(mode, 2*k, xv));
        end
      end
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
