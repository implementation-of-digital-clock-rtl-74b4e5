// Digital clock: time-of-day counter (hours:minutes:seconds).
//
// Three counters are chained: on each one-second tick the seconds count up;
// when they pass 59 they return to 0 and carry into the minutes, which carry
// into the hours the same way. After 23:59:59 the clock returns to 00:00:00
// and pulses day_wrap. The limits, the chaining by carries and the reset to
// zero follow the document, as do the binary field widths (seconds[5:0],
// minutes[5:0], hours[4:0]).
//
// Time setting: min_up/min_dn and hr_up/hr_dn step the minutes or the hours
// by one, wrapping within 0..59 and 0..23 and without carrying into the other
// field. The document says only that minutes and hours can be changed with
// switches by incrementing and decrementing; the one-cycle step pulses, the
// wrap without carry and the fact that the seconds are left alone are this
// design's choices. When a tick and a step fall in the same cycle, the tick is
// applied first and the step to its result, so no second is lost.
//
// Timing: now is registered and changes the cycle after tick or a step pulse.
// rst is synchronous and active high.
module digital_clock
  import clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,
  input  logic  min_up,
  input  logic  min_dn,
  input  logic  hr_up,
  input  logic  hr_dn,
  output time_t now,
  output logic  day_wrap
);

  localparam logic [5:0] SEC_LAST  = 6'(SECS_PER_MIN - 1);
  localparam logic [5:0] MIN_LAST  = 6'(MINS_PER_HOUR - 1);
  localparam logic [4:0] HOUR_LAST = 5'(HOURS_PER_DAY - 1);

  time_t cur, nxt;
  logic  sec_carry, min_carry;

  always_comb begin
    nxt       = cur;
    sec_carry = tick && (cur.seconds == SEC_LAST);
    min_carry = sec_carry && (cur.minutes == MIN_LAST);
    day_wrap  = min_carry && (cur.hours == HOUR_LAST);

    // counting
    if (tick)      nxt.seconds = sec_carry ? '0 : cur.seconds + 1'b1;
    if (sec_carry) nxt.minutes = min_carry ? '0 : cur.minutes + 1'b1;
    if (min_carry) nxt.hours   = day_wrap  ? '0 : cur.hours   + 1'b1;

    // time setting, applied to the counted value
    if (min_up)      nxt.minutes = (nxt.minutes == MIN_LAST)  ? '0       : nxt.minutes + 1'b1;
    else if (min_dn) nxt.minutes = (nxt.minutes == '0)        ? MIN_LAST : nxt.minutes - 1'b1;
    if (hr_up)       nxt.hours   = (nxt.hours   == HOUR_LAST) ? '0       : nxt.hours   + 1'b1;
    else if (hr_dn)  nxt.hours   = (nxt.hours   == '0)        ? HOUR_LAST : nxt.hours  - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) cur <= '0;
    else     cur <= nxt;
  end

  assign now = cur;

  // The counters never leave their ranges.
  always_ff @(posedge clk)
    if (!rst) assert (cur.seconds <= SEC_LAST && cur.minutes <= MIN_LAST && cur.hours <= HOUR_LAST)
      else $error("digital_clock: time out of range");

endmodule
