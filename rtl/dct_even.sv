`timescale 1ps/1ps
// dct_even: even half of the 8-point DCT, z0, z2, z4 and z6.
//
// Input s[j] = x[j] + x[7-j] (j = 0..3), the butterfly sums. The even outputs
// are written column by column,
//   [z0 z2 z4 z6] = s0*[d  b  d  f] + s1*[d  f -d -b]
//                 + s2*[d -f -d  b] + s3*[d -b  d -f],
// so each input needs only the three products d*s, b*s and f*s. Each input
// gets one pre-computer (1x, 3x) and three select-adders; the products are
// then summed with the signs above. Products are exact integers scaled by
// 2^7 (the coefficients have 7 fraction bits). Combinational; the caller
// supplies the pipeline registers.
module dct_even
  import avs_pkg::*;
#(
  parameter int unsigned SW = 9,            // width of s[j]
  parameter int unsigned ZW = SW + COEF_W + 4
) (
  input  logic signed [SW-1:0] s [4],
  input  coef_set_t            coefs,
  output logic signed [ZW-1:0] z [4]        // z0, z2, z4, z6
);
  localparam int unsigned PW = SW + 2 + COEF_W;

  logic signed [SW+1:0] x1 [4];
  logic signed [SW+1:0] x3 [4];
  logic signed [PW-1:0] pd [4];
  logic signed [PW-1:0] pb [4];
  logic signed [PW-1:0] pf [4];

  for (genvar j = 0; j < 4; j++) begin : g_col
    cshm_precompute #(.W(SW)) u_pre (.x(s[j]), .x1(x1[j]), .x3(x3[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_d (.x1(x1[j]), .x3(x3[j]), .coef(coefs.d), .prod(pd[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_b (.x1(x1[j]), .x3(x3[j]), .coef(coefs.b), .prod(pb[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_f (.x1(x1[j]), .x3(x3[j]), .coef(coefs.f), .prod(pf[j]));
  end

  always_comb begin
    z[0] = ZW'(pd[0]) + ZW'(pd[1]) + ZW'(pd[2]) + ZW'(pd[3]);
    z[1] = ZW'(pb[0]) + ZW'(pf[1]) - ZW'(pf[2]) - ZW'(pb[3]);
    z[2] = ZW'(pd[0]) - ZW'(pd[1]) - ZW'(pd[2]) + ZW'(pd[3]);
    z[3] = ZW'(pf[0]) - ZW'(pb[1]) + ZW'(pb[2]) - ZW'(pf[3]);
  end
endmodule
