// algo_pkg: state encodings shared by the controllers and their testbenches.
//
// Each algorithm-to-hardware design in this library is an ASMD-style
// controller driving a small datapath. The controllers keep their state in
// the enumerated types below so that testbenches can name states directly.
// The state names of the mean, sorting and Start-loop controllers follow the
// ASMD charts they implement; the extra sorting state (SORT_COMPARE), the
// binary-search states and all binary encodings are this design's own.
package algo_pkg;

  // Arithmetic mean controller (modified ASMD chart).
  typedef enum logic [2:0] {
    MEAN_IDLE      = 3'd0,
    MEAN_SUM       = 3'd1,
    MEAN_DIV_START = 3'd2,
    MEAN_DIV       = 3'd3,
    MEAN_DONE      = 3'd4
  } mean_state_t;

  // Sorting controller.
  typedef enum logic [2:0] {
    SORT_IDLE    = 3'd0,
    SORT_OUTER   = 3'd1,
    SORT_INNER   = 3'd2,
    SORT_COMPARE = 3'd3,
    SORT_SWAP    = 3'd4,
    SORT_CHECK   = 3'd5,
    SORT_DONE    = 3'd6
  } sort_state_t;

  // Binary search controller.
  typedef enum logic [1:0] {
    BS_IDLE    = 2'd0,
    BS_MID     = 2'd1,
    BS_COMPARE = 2'd2,
    BS_DONE    = 2'd3
  } bs_state_t;

  // Start-loop counter.
  typedef enum logic [1:0] {
    SLC_IDLE = 2'd0,
    SLC_INCR = 2'd1,
    SLC_DONE = 2'd2
  } slc_state_t;

  // Sequential divider.
  typedef enum logic [1:0] {
    DIV_IDLE = 2'd0,
    DIV_BUSY = 2'd1,
    DIV_DONE = 2'd2
  } div_state_t;

endpackage
