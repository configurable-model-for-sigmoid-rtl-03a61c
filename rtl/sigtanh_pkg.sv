// Shared types and constants of the configurable Sigmoid/Tanh unit.
//
// Number formats:
//   fp32_t - IEEE-754 single precision (the unit's input and output format).
//   fix_t  - 10-bit fixed point "(3,6)": one sign bit, then a 9-bit magnitude
//            made of 3 integer and 6 fraction bits. Sign-magnitude, so the range
//            is symmetric, -7.984375 .. +7.984375 in steps of 1/64, and the
//            1024 codes {sign, magnitude} address the Sigmoid table directly.
// The pipeline latencies of the stages are collected here so that the top can
// align side-band signals (valid, mode) with the data.
package sigtanh_pkg;

  localparam int FP_W   = 32;
  localparam int FRAC_W = 6;                 // fraction bits of fix_t
  localparam int INT_W  = 3;                 // integer bits of fix_t
  localparam int MAG_W  = INT_W + FRAC_W;    // 9-bit magnitude
  localparam int FIX_W  = MAG_W + 1;         // 10 bits with the sign
  localparam int LUT_DEPTH = 1 << FIX_W;     // 1024 entries

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } fix_t;

  typedef enum logic {
    MODE_SIGMOID = 1'b0,
    MODE_TANH    = 1'b1
  } mode_e;

  localparam fp32_t FP_ZERO      = 32'h0000_0000;
  localparam fp32_t FP_ONE       = 32'h3F80_0000;
  localparam fp32_t FP_MINUS_ONE = 32'hBF80_0000;

  localparam logic [MAG_W-1:0] MAG_MAX = '1;  // 511 = 7.984375

  // Stage latencies in clock cycles.
  localparam int F2X_LAT = 1;   // float -> fixed conversion
  localparam int MUX_LAT = 1;   // shift + mode multiplexer
  localparam int LUT_LAT = 1;   // Sigmoid table read
  localparam int ADD_LAT = 3;   // floating-point adder (also used for -1)
  localparam int SIG_LAT  = F2X_LAT + MUX_LAT + LUT_LAT;   // Sigmoid value ready
  localparam int CORE_LAT = SIG_LAT + 2 * ADD_LAT;         // Tanh value ready

endpackage
