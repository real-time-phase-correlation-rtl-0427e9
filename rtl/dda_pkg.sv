// dda_pkg: types and constants shared by the Discrete Distance Approximation
// (DDA) phase-synchronization processor.
//
// The counter mode and the source of the last marker event are the state of
// the dT finite state machine (dt_fsm). The configuration record holds the
// run-time thresholds of the alarm block; it is loaded serially through
// param_loader. The threshold and count widths are this design's choice.
package dda_pkg;

  // Sample and index width: the chip's input and output words are 10 bits.
  localparam int unsigned SAMPLE_W = 10;
  // Width of the alarm hold counters (samples the condition must persist).
  localparam int unsigned HOLD_W   = 8;

  // State of the up/down counter that measures dT_n.
  typedef enum logic [1:0] {
    CNT_FROZEN = 2'd0,
    CNT_UP     = 2'd1,
    CNT_DOWN   = 2'd2
  } cnt_mode_e;

  // Which signal produced the most recent marker event.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_S1   = 2'd1,
    SRC_S2   = 2'd2,
    SRC_BOTH = 2'd3
  } ev_src_e;

  // Run-time configuration of the alarm block.
  typedef struct packed {
    logic [SAMPLE_W-1:0] t_rise;  // rise threshold on the smoothed index
    logic [SAMPLE_W-1:0] t_fall;  // fall threshold on the smoothed index
    logic [HOLD_W-1:0]   n_rise;  // samples above t_rise before alarm_rise
    logic [HOLD_W-1:0]   n_fall;  // samples below t_fall before alarm_fall
  } dda_cfg_t;

  localparam int unsigned CFG_W = $bits(dda_cfg_t);

endpackage
