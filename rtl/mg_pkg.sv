// mg_pkg: types and constants shared by the medium-grain fabric RTL.
//
// The fabric is built from 4-bit cells ("digits"). Word-level modules that
// were mapped onto groups of cells share the number formats collected here:
//  * complex samples of the FFT: 16-bit real and 16-bit imaginary, Q15;
//  * the hybrid floating-point format: 28-bit two's-complement significand
//    read as a fraction in [-1,1) and a 10-bit two's-complement exponent whose
//    two LSBs are always zero, so value = (sig / 2^27) * 2^exp;
//  * CORDIC angles: 24-bit binary angle, 2^23 units = pi radians.
// The two tables below are small and are given with their formula.
package mg_pkg;

  localparam int unsigned DIGIT_W = 4;
  typedef logic [DIGIT_W-1:0] digit_t;

  // Complex sample, Q15 parts.
  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  // Hybrid floating-point number.
  localparam int unsigned FP_SIG_W = 28;
  localparam int unsigned FP_EXP_W = 10;
  typedef struct packed {
    logic signed [FP_SIG_W-1:0] sig;
    logic signed [FP_EXP_W-1:0] exp;
  } hfp_t;

  // Local mesh directions around a cell (Fig. 3: eight neighbours).
  typedef enum logic [2:0] {
    DIR_N = 3'd0, DIR_NE = 3'd1, DIR_E = 3'd2, DIR_SE = 3'd3,
    DIR_S = 3'd4, DIR_SW = 3'd5, DIR_W = 3'd6, DIR_NW = 3'd7
  } dir_e;

  // Source of one cell operand in the local crossbar.
  typedef enum logic [3:0] {
    SRC_N = 4'd0, SRC_NE = 4'd1, SRC_E = 4'd2, SRC_SE = 4'd3,
    SRC_S = 4'd4, SRC_SW = 4'd5, SRC_W = 4'd6, SRC_NW = 4'd7,
    SRC_GLB = 4'd8, SRC_CONST = 4'd9, SRC_ZERO = 4'd10
  } src_e;

  // What the cell drives onto an outgoing local bus.
  typedef enum logic [1:0] {
    OUT_OFF = 2'd0, OUT_LO = 2'd1, OUT_HI = 2'd2
  } out_e;

  // CORDIC arctangent constants: CORDIC_ATAN[i] = round(atan(2^-i) * 2^23 / pi).
  localparam logic signed [23:0] CORDIC_ATAN [16] = '{
    24'sd2097152, 24'sd1238021, 24'sd654136, 24'sd332050,
    24'sd166669,  24'sd83416,   24'sd41718,  24'sd20860,
    24'sd10430,   24'sd5215,    24'sd2608,   24'sd1304,
    24'sd652,     24'sd326,     24'sd163,    24'sd81
  };

  // Quarter-wave sine table: SINE_Q[k] = round(32767 * sin(2*pi*k/256)), k = 0..64.
  localparam logic [15:0] SINE_Q [65] = '{
        0,   804,  1608,  2410,  3212,  4011,  4808,  5602,  6393,  7179,
     7962,  8739,  9512, 10278, 11039, 11793, 12539, 13279, 14010, 14732,
    15446, 16151, 16846, 17530, 18204, 18868, 19519, 20159, 20787, 21403,
    22005, 22594, 23170, 23731, 24279, 24811, 25329, 25832, 26319, 26790,
    27245, 27683, 28105, 28510, 28898, 29268, 29621, 29956, 30273, 30571,
    30852, 31113, 31356, 31580, 31785, 31971, 32137, 32285, 32412, 32521,
    32609, 32678, 32728, 32757, 32767
  };

endpackage
