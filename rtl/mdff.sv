`timescale 1ps/1ps
// mdff: multiple-input D flip-flop. On the rising clock edge Q takes D0 when
// S0 is 0 and D1 when S0 is 1, i.e. a flip-flop with a 2:1 multiplexer in
// front of D. The synchronous active-high reset to 0 is this
// implementation's addition; the design does not say how the cell is reset.
module mdff (
  input  logic clk,
  input  logic rst,
  input  logic d0,
  input  logic d1,
  input  logic s0,
  output logic q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= 1'b0;
    else if (s0) q <= d1;
    else         q <= d0;
  end
endmodule
