`timescale 1ps/1ps
// tb_reference_circuit: for each operating frequency of the DCT table and
// each supply level, runs one measurement window and checks slow against the
// rule "the circuit at this level is slower than the operating clock", with
// the DCT maximum frequencies 435/399/350/300/222 MHz at 1.17..0.80 V.
module tb_reference_circuit;
  import avs_pkg::*;
  logic freq = 0, ctrl = 0, rst = 1, slow, vco_out;
  mv_t vref_mv = 12'd1170;
  int ref_half = 1150;
  int checks = 0, failures = 0;
  int mv_list [5]   = '{1170, 1100, 1000, 900, 800};
  int fmax [5]      = '{435, 399, 350, 300, 222};
  // operating clock half periods in ps, rounded up: 1e6 / (2 * f)
  int ref_list [7]  = '{1150, 1254, 1429, 1667, 2253, 1000, 3334};
  int fref_list [7] = '{435, 399, 350, 300, 222, 500, 150};

  reference_circuit dut (.vref_mv(vref_mv), .freq(freq), .ctrl(ctrl), .rst(rst),
                         .slow(slow), .vco_out(vco_out));

  always #(ref_half) freq = ~freq;

  initial begin
    repeat (2) @(posedge freq);
    rst = 0;
    for (int r = 0; r < 7; r++) begin
      ref_half = ref_list[r];
      for (int l = 0; l < 5; l++) begin
        logic exp;
        vref_mv = mv_t'(mv_list[l]);
        // slower if its maximum frequency is below the operating frequency
        exp = fmax[l] < fref_list[r];
        @(posedge freq);
        ctrl <= 1;
        @(posedge freq);
        ctrl <= 0;
        checks++;
        if (slow !== exp) begin
          failures++;
          $display("FAIL fref=%0d MHz level %0d mV: slow=%b", fref_list[r], mv_list[l], slow);
        end
        @(posedge freq);
      end
    end
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
