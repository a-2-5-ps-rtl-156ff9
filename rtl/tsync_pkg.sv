`timescale 1ps/1fs
// tsync_pkg: types and constants shared by the multichannel time
// synchronisation design (TDC-measured skew, phase-interpolator correction).
//
// A phase-interpolator (PI) step command carries a weight W_pi of 1..15 and a
// direction. One unit of W_pi moves a transceiver's serial clock by
// 1/(64*D_txout) UI; with a 400 ps UI and D_txout = 2 that is 3.125 ps.
// The 4-bit weight and the 1..15 range follow the document; packing the
// direction beside it as a fifth bit is this design's choice.
package tsync_pkg;

  // Largest and smallest step weight a PI accepts.
  localparam int unsigned W_PI_MIN = 1;
  localparam int unsigned W_PI_MAX = 15;

  // Fraction bits of averaged TDC codes and of skew targets (Q.8 taps).
  localparam int unsigned CODE_FRAC = 8;

  // One PI step command.
  typedef struct packed {
    logic       delay;  // 1: move the slave clock later, 0: move it earlier
    logic [3:0] w;      // step weight W_pi, 1..15
  } pi_step_t;

  // States of the skew-locking controller.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_SELECT,
    ST_SETTLE,
    ST_MEASURE,
    ST_DECIDE
  } ctrl_state_t;

endpackage
