// prbg_pkg: constants shared by the two pipelined chaotic bit generators.
//
// The defaults are the 64-bit configurations: a 64-bit logistic-map generator whose
// feedback loop is 13 clocks deep (so 13 trajectories run interleaved), and a 64-bit
// FDNR jerk-oscillator generator whose loop is 4 clocks deep. The loop depths and the
// Euler step h = 2^-4 come from the published design; the FDNR number format (8 integer
// bits including the sign) is this implementation's choice.
package prbg_pkg;

  // Logistic-map generator
  localparam int unsigned LOG_P_ARITH_DEFAULT    = 64;
  localparam int unsigned LOG_PIPE_DEPTH_DEFAULT = 13;

  // FDNR oscillator generator
  localparam int unsigned OSC_P_ARITH_DEFAULT    = 64;
  localparam int unsigned OSC_INT_BITS_DEFAULT   = 8;   // sign + 7 integer bits
  localparam int unsigned OSC_H_SHIFT_DEFAULT    = 4;   // h = 2^-4
  localparam int unsigned OSC_PIPE_DEPTH         = 4;   // fixed by the datapath structure
  localparam int unsigned OSC_BETA1_SHIFT        = 2;   // beta1 = 4 = 2^2, beta2 = 0

endpackage
