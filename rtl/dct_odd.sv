`timescale 1ps/1ps
// dct_odd: odd half of the 8-point DCT, z1, z3, z5 and z7.
//
// Input t[j] = x[j] - x[7-j] (j = 0..3), the butterfly differences. The odd
// outputs are written column by column,
//   [z1 z3 z5 z7] = t0*[a  c  e  g] + t1*[c -g -a -e]
//                 + t2*[e -a  g  c] + t3*[g -e  c -a],
// so every input is multiplied by all four of a, c, e and g. Each input gets
// one pre-computer (1x, 3x) and four select-adders; the products are then
// summed with the signs above. Results are exact integers scaled by 2^7.
// Combinational; the caller supplies the pipeline registers.
module dct_odd
  import avs_pkg::*;
#(
  parameter int unsigned SW = 9,            // width of t[j]
  parameter int unsigned ZW = SW + COEF_W + 4
) (
  input  logic signed [SW-1:0] t [4],
  input  coef_set_t            coefs,
  output logic signed [ZW-1:0] z [4]        // z1, z3, z5, z7
);
  localparam int unsigned PW = SW + 2 + COEF_W;

  logic signed [SW+1:0] x1 [4];
  logic signed [SW+1:0] x3 [4];
  logic signed [PW-1:0] pa [4];
  logic signed [PW-1:0] pc [4];
  logic signed [PW-1:0] pe [4];
  logic signed [PW-1:0] pg [4];

  for (genvar j = 0; j < 4; j++) begin : g_col
    cshm_precompute #(.W(SW)) u_pre (.x(t[j]), .x1(x1[j]), .x3(x3[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_a (.x1(x1[j]), .x3(x3[j]), .coef(coefs.a), .prod(pa[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_c (.x1(x1[j]), .x3(x3[j]), .coef(coefs.c), .prod(pc[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_e (.x1(x1[j]), .x3(x3[j]), .coef(coefs.e), .prod(pe[j]));
    cshm_select_adder #(.W(SW+2), .CW(COEF_W)) u_g (.x1(x1[j]), .x3(x3[j]), .coef(coefs.g), .prod(pg[j]));
  end

  always_comb begin
    z[0] = ZW'(pa[0]) + ZW'(pc[1]) + ZW'(pe[2]) + ZW'(pg[3]);
    z[1] = ZW'(pc[0]) - ZW'(pg[1]) - ZW'(pa[2]) - ZW'(pe[3]);
    z[2] = ZW'(pe[0]) - ZW'(pa[1]) + ZW'(pg[2]) + ZW'(pc[3]);
    z[3] = ZW'(pg[0]) - ZW'(pe[1]) + ZW'(pc[2]) - ZW'(pa[3]);
  end
endmodule
