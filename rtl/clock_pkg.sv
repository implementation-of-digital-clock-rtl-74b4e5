// Shared types and constants of the digital clock with stopwatch.
//
// time_t holds the time of day in plain binary, with the field widths of the
// seconds/minutes/hours counters (6, 6 and 5 bits). The limits of a day
// (60 s, 60 min, 24 h) and of the stopwatch (0..59 s) are the
// document's. The encodings of mode_e and sw_state_e are this design's own
// choice.
package clock_pkg;

  localparam int unsigned SECS_PER_MIN  = 60;
  localparam int unsigned MINS_PER_HOUR = 60;
  localparam int unsigned HOURS_PER_DAY = 24;

  typedef logic [3:0] bcd_t;

  typedef struct packed {
    logic [4:0] hours;    // 0..23
    logic [5:0] minutes;  // 0..59
    logic [5:0] seconds;  // 0..59
  } time_t;

  // Select line of the output multiplexer ("Control" with "Switch").
  typedef enum logic {
    MODE_CLOCK     = 1'b0,
    MODE_STOPWATCH = 1'b1
  } mode_e;

  // Stopwatch controller states.
  typedef enum logic [1:0] {
    SW_STOPPED = 2'd0,
    SW_RUNNING = 2'd1,
    SW_PAUSED  = 2'd2
  } sw_state_e;

endpackage
