`timescale 1ps/1ps
// cshm_select_adder: multiplies a pre-computed operand by an unsigned
// coefficient without a multiplier (the "select-adder" of the CSHM scheme).
//
// The coefficient is split into 2-bit groups. For each group a shifter strips
// trailing zeros and reports which alphabet the remainder is (01 -> 1x,
// 11 -> 3x) and how far it shifted; the group 10 is the alphabet 01 shifted by
// one. A multiplexer picks 0, 1x or 3x from the pre-computer, an inverse
// shifter (I-shifter) restores the stripped zeros, and the group results are
// added after being shifted left by 2*group. The product is exact:
// prod = x * coef.
//
// ACTIVE_GROUPS sets how many low-order groups get hardware. All DCT
// coefficients have 00 in their top group, so the default builds three of
// the four groups; the assertion below flags a coefficient that would need
// the omitted group. Combinational, no clock.
module cshm_select_adder #(
  parameter int unsigned W             = 11,  // width of the pre-computed operands
  parameter int unsigned CW            = 8,   // coefficient width
  parameter int unsigned ACTIVE_GROUPS = 3    // 2-bit groups that get a mux/shifter
) (
  input  logic signed [W-1:0]    x1,      // 1 * x
  input  logic signed [W-1:0]    x3,      // 3 * x
  input  logic        [CW-1:0]   coef,
  output logic signed [W+CW-1:0] prod
);
  localparam int unsigned PW = W + CW;

  typedef enum logic [1:0] {ALPHA_NONE, ALPHA_1X, ALPHA_3X} alpha_e;

  typedef struct packed {
    alpha_e alpha;     // multiplexer select
    logic   ishift;    // zeros to restore (0 or 1)
  } shifter_t;

  // Shifter: decode one 2-bit group.
  function automatic shifter_t decode_group(input logic [1:0] g);
    shifter_t s;
    unique case (g)
      2'b00: s = '{alpha: ALPHA_NONE, ishift: 1'b0};
      2'b01: s = '{alpha: ALPHA_1X,   ishift: 1'b0};
      2'b10: s = '{alpha: ALPHA_1X,   ishift: 1'b1};
      default: s = '{alpha: ALPHA_3X, ishift: 1'b0};
    endcase
    return s;
  endfunction

  shifter_t             dec  [ACTIVE_GROUPS];
  logic signed [PW-1:0] term [ACTIVE_GROUPS];

  always_comb begin
    prod = '0;
    for (int unsigned i = 0; i < ACTIVE_GROUPS; i++) begin
      dec[i] = decode_group(coef[2*i +: 2]);
      // Multiplexer
      unique case (dec[i].alpha)
        ALPHA_1X: term[i] = PW'(x1);
        ALPHA_3X: term[i] = PW'(x3);
        default:  term[i] = '0;
      endcase
      // I-shifter, then placement of the group
      term[i] = (term[i] <<< dec[i].ishift) <<< (2*i);
      prod    = prod + term[i];
    end
  end

  if (ACTIVE_GROUPS * 2 < CW) begin : g_unused_groups
    always_comb
      assert (coef[CW-1:2*ACTIVE_GROUPS] == '0)
        else $error("coefficient %b needs a select-adder group that is not built", coef);
  end
endmodule
