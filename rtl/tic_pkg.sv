// Shared constants and types of the 3-channel time-interval counter.
//
// A timestamp is a fixed-point number of reference clock periods: the upper
// PCNT_W bits are the period count N-1, the lower FINE_W bits the fraction of
// the period (T0 = 2 ns split into 2^11 steps of 0.977 ps). The 11-bit fine
// resolution, the 3 channels and the 2 ns reference period follow the
// published design; the 32-bit period count and the 8-bit interpolator code
// (codes 0..255) are this design's choices.
package tic_pkg;
  localparam int unsigned NCH    = 3;   // measurement channels
  localparam int unsigned CODE_W = 8;   // interpolator code number width
  localparam int unsigned FINE_W = 11;  // fine-time fraction bits per period

  // Calibration state reported by each channel.
  typedef enum logic [2:0] {
    CAL_IDLE  = 3'd0,  // measuring (or waiting)
    CAL_CLEAR = 3'd1,  // clearing the bin width memory
    CAL_COUNT = 3'd2,  // bin width evaluation: counting calibrator codes
    CAL_SUM   = 3'd3,  // transfer function evaluation: accumulate and write
    CAL_DONE  = 3'd4   // one-cycle completion state
  } cal_state_e;
endpackage
