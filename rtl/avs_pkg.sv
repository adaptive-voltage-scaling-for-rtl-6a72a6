`timescale 1ps/1ps
// avs_pkg: types and constants shared by the adaptive-voltage-scaling (AVS)
// loop and the CSHM-based 8-point DCT.
//
// Voltage levels. Each variable voltage generator (VVG) is steered by a 5-bit
// one-cold select word: exactly one bit is 0 and its position picks the level.
// Bit 4 low selects the highest level (1.17 V), bit 0 low the lowest (0.80 V).
// The five voltages and the order in which the controller visits them (from
// the top down) follow the design; the one-cold encoding is read off the
// pre_sel waveform of the control logic (one bit low at a time, bit 4 first).
// The all-ones word seen during reset is mapped to the 1.2 V starting supply.
//
// Ring-oscillator timing. The oscillator is a replica of the DCT critical
// path, so its frequency at each level is the DCT's maximum clock frequency
// at that level: 435, 399, 350, 300 and 222 MHz. The half periods below are
// 1e6 / (2 * f_MHz) picoseconds, rounded down.
//
// DCT coefficients. Seven 8-bit unsigned coefficients a..g with 7 fraction
// bits (value = code / 128). Three sets are provided: the original 8-bit
// quantisation and the two reduced-complexity sets (Type1, Type2) whose last
// two bits were adjusted so that the lowest select-adder becomes cheaper.
// Naming follows the coefficient tables: a = cos(pi/16)/2, b = cos(pi/8)/2,
// c = cos(3pi/16)/2, d = cos(pi/4)/2, e = cos(5pi/16)/2, f = cos(3pi/8)/2,
// g = cos(7pi/16)/2.
package avs_pkg;

  localparam int unsigned NUM_LEVELS = 5;
  localparam int unsigned COEF_W     = 8;
  localparam int unsigned COEF_FRAC  = 7;

  typedef logic [NUM_LEVELS-1:0] level_code_t;  // one-cold level select
  typedef logic [11:0]           mv_t;          // voltage in millivolts

  // Level index 0 = highest voltage, NUM_LEVELS-1 = lowest.
  localparam mv_t LEVEL_MV [NUM_LEVELS] = '{12'd1170, 12'd1100, 12'd1000, 12'd900, 12'd800};
  localparam mv_t START_MV = 12'd1200;   // supply before the first level is applied

  // DCT maximum frequency (MHz) and ring-oscillator half period (ps) per level.
  localparam int unsigned LEVEL_FMAX_MHZ [NUM_LEVELS] = '{435, 399, 350, 300, 222};
  localparam int unsigned LEVEL_HALF_PS  [NUM_LEVELS] = '{1149, 1253, 1428, 1666, 2252};

  // One-cold select word for a level index.
  function automatic level_code_t level_code(input int unsigned idx);
    level_code_t c;
    c = '1;
    c[NUM_LEVELS-1-idx] = 1'b0;
    return c;
  endfunction

  // Voltage selected by a one-cold word; the all-ones word gives START_MV and
  // any other pattern (more than one bit low) gives 0 V.
  function automatic mv_t level_mv(input level_code_t code);
    mv_t v;
    v = (code == '1) ? START_MV : '0;
    for (int unsigned k = 0; k < NUM_LEVELS; k++)
      if (code == level_code(k)) v = LEVEL_MV[k];
    return v;
  endfunction

  typedef enum logic [1:0] {
    COEF_ORIG  = 2'd0,   // 8-bit quantised coefficients
    COEF_TYPE1 = 2'd1,   // last two bits forced to 00 (even) / 11 (odd)
    COEF_TYPE2 = 2'd2    // last two bits forced to 00 for all
  } coef_mode_e;

  typedef logic [COEF_W-1:0] coef_t;

  typedef struct packed {
    coef_t a, b, c, d, e, f, g;
  } coef_set_t;

  function automatic coef_set_t coef_set(input coef_mode_e mode);
    coef_set_t s;
    unique case (mode)
      COEF_TYPE1: s = '{a: 8'b0011_1111, b: 8'b0011_1100, c: 8'b0011_0011, d: 8'b0010_1100,
                        e: 8'b0010_0011, f: 8'b0001_1000, g: 8'b0000_1011};
      COEF_TYPE2: s = '{a: 8'b0011_1100, b: 8'b0011_1000, c: 8'b0011_0100, d: 8'b0010_1100,
                        e: 8'b0010_0100, f: 8'b0001_1000, g: 8'b0000_1100};
      default:    s = '{a: 8'b0011_1111, b: 8'b0011_1011, c: 8'b0011_0101, d: 8'b0010_1101,
                        e: 8'b0010_0100, f: 8'b0001_1000, g: 8'b0000_1100};
    endcase
    return s;
  endfunction

endpackage
