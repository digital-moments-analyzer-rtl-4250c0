// spc_pkg: constants and types shared by the moments analyser.
//
// The analyser quantises the rectified input with an 8-bit converter. The first
// moment uses all eight bits (n = 256 levels); the three higher moments use the
// six most significant bits (n = 64 levels). An accumulator for moment k with
// l-bit levels is l*k bits wide, so its carry-out is worth n^k. Display counters
// are decimal, seven digits, enough for the largest sample size of 10^6.
//
// The widths are the published ones; the type names are this design's own.
package spc_pkg;

  localparam int unsigned ADC_BITS  = 8;            // converter bits, first moment
  localparam int unsigned LVL_BITS  = 6;            // level bits for k = 2, 3, 4
  localparam int unsigned DISP_DIGITS = 7;          // decimal display digits
  localparam int unsigned ACC1_BITS = ADC_BITS;     // l*k for k = 1
  localparam int unsigned ACC2_BITS = 2 * LVL_BITS; // k = 2
  localparam int unsigned ACC3_BITS = 3 * LVL_BITS; // k = 3
  localparam int unsigned ACC4_BITS = 4 * LVL_BITS; // k = 4
  localparam int unsigned PROB_BITS = 4;            // probability comparator width

  typedef logic [3:0] bcd_digit_t;

  // Operating mode of the analyser (mode control).
  typedef enum logic {
    MODE_MOMENTS = 1'b0,  // four moments accumulated
    MODE_PROB    = 1'b1   // above-level probability counted
  } spc_mode_e;

  // Timing mode (timing control).
  typedef enum logic {
    TIME_ONE_CYCLE = 1'b0, // sample between two negative-going zero crossings
    TIME_FIXED     = 1'b1  // sample a preset number of 10^3..10^6 samples
  } timing_mode_e;

  // Operation of the counter-equation unit.
  typedef enum logic [1:0] {
    SD_SQRT   = 2'd0,  // x -> sqrt(N)
    SD_SQUARE = 2'd1,  // S -> M^2
    SD_SIGMA  = 2'd2   // x -> sqrt(N - M^2): square M first, then root
  } sd_mode_e;

endpackage
