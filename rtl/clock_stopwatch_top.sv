// Digital clock with stopwatch: top level.
//
// One board clock (100 MHz by default) runs everything. clock_divider makes a
// one-second tick that both the digital clock (hours:minutes:seconds, wrapping
// after 23:59:59) and the stopwatch (0..59 s, with Start, Pause and Stop)
// count. display_mux, the "Control" block, picks one of the two by mode_sw
// and converts it to decimal digits, and seven_seg_display shows the lowest
// NUM_DIGITS of them on a multiplexed common-anode seven-segment display:
// with the default two digits, the seconds of the clock or of the stopwatch.
// This structure follows the document's block diagram.
//
// Board inputs pass through two-flop synchronizers (this design's addition).
// The stopwatch controls and mode_sw act as levels; each rising edge of a
// time-setting input steps the minutes or hours once. reset is synchronous
// and active high; it sets the clock to 00:00:00 and stops and clears the
// stopwatch. The binary counter values are also brought out, as are the
// stopwatch state, so the design can be observed without the display.
//
// The clock's day_wrap and the stopwatch's wrap pulses are not needed at this
// level and are left unused here (they are what the block tests observe).
//
// Timing: a stopwatch control or mode change reaches the counters two cycles
// after the pin changes (synchronizer); a time-setting step lands three cycles
// after it; the display pins follow the counters one cycle later, and show
// each digit for CLK_FREQ_HZ/DIGIT_HZ cycles.
module clock_stopwatch_top
  import clock_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned DIGIT_HZ    = 1_000,
  parameter int unsigned NUM_DIGITS  = 2
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  mode_sw,
  input  logic                  sw_start,
  input  logic                  sw_pause,
  input  logic                  sw_stop,
  input  logic                  set_min_up,
  input  logic                  set_min_dn,
  input  logic                  set_hr_up,
  input  logic                  set_hr_dn,
  output logic [6:0]            seg_n,
  output logic [NUM_DIGITS-1:0] an_n,
  output logic [4:0]            hours,
  output logic [5:0]            minutes,
  output logic [5:0]            seconds,
  output logic [5:0]            sw_seconds,
  output logic                  sw_running
);

  initial assert (NUM_DIGITS >= 1 && NUM_DIGITS <= 6) else $error("clock_stopwatch_top: NUM_DIGITS must be 1..6");

  // ---- board inputs into the clock domain ----
  logic mode_l, start_l, pause_l, stop_l;
  logic min_up_p, min_dn_p, hr_up_p, hr_dn_p;
  logic unused_rise_mode, unused_rise_start, unused_rise_pause, unused_rise_stop;
  logic unused_l_mu, unused_l_md, unused_l_hu, unused_l_hd;

  sync_rise u_s_mode  (.clk, .rst(reset), .in(mode_sw),    .level(mode_l),      .rise(unused_rise_mode));
  sync_rise u_s_start (.clk, .rst(reset), .in(sw_start),   .level(start_l),     .rise(unused_rise_start));
  sync_rise u_s_pause (.clk, .rst(reset), .in(sw_pause),   .level(pause_l),     .rise(unused_rise_pause));
  sync_rise u_s_stop  (.clk, .rst(reset), .in(sw_stop),    .level(stop_l),      .rise(unused_rise_stop));
  sync_rise u_s_mu    (.clk, .rst(reset), .in(set_min_up), .level(unused_l_mu), .rise(min_up_p));
  sync_rise u_s_md    (.clk, .rst(reset), .in(set_min_dn), .level(unused_l_md), .rise(min_dn_p));
  sync_rise u_s_hu    (.clk, .rst(reset), .in(set_hr_up),  .level(unused_l_hu), .rise(hr_up_p));
  sync_rise u_s_hd    (.clk, .rst(reset), .in(set_hr_dn),  .level(unused_l_hd), .rise(hr_dn_p));

  // ---- one-second base count ----
  logic tick_1s;

  clock_divider #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .TICK_HZ(1)) u_div (
    .clk, .rst(reset), .tick(tick_1s)
  );

  // ---- digital clock ----
  time_t now;
  logic  day_wrap;

  digital_clock u_clock (
    .clk, .rst(reset), .tick(tick_1s),
    .min_up(min_up_p), .min_dn(min_dn_p), .hr_up(hr_up_p), .hr_dn(hr_dn_p),
    .now, .day_wrap
  );

  // ---- stopwatch ----
  logic [5:0] sw_count;
  sw_state_e  sw_state;
  logic       sw_wrap;

  stopwatch #(.MAX_COUNT(59)) u_sw (
    .clk, .rst(reset), .tick(tick_1s),
    .start(start_l), .pause(pause_l), .stop(stop_l),
    .count(sw_count), .state(sw_state), .wrap(sw_wrap)
  );

  // ---- Control: output multiplexer ----
  bcd_t all_digits [6];

  display_mux u_mux (
    .mode(mode_e'(mode_l)), .clk_time(now), .sw_count, .digits(all_digits)
  );

  // ---- seven-segment display ----
  bcd_t shown [NUM_DIGITS];
  always_comb
    for (int i = 0; i < NUM_DIGITS; i++) shown[i] = all_digits[i];

  seven_seg_display #(
    .CLK_FREQ_HZ(CLK_FREQ_HZ), .DIGIT_HZ(DIGIT_HZ), .NUM_DIGITS(NUM_DIGITS)
  ) u_disp (
    .clk, .rst(reset), .digits(shown), .seg_n, .an_n
  );

  assign hours      = now.hours;
  assign minutes    = now.minutes;
  assign seconds    = now.seconds;
  assign sw_seconds = sw_count;
  assign sw_running = (sw_state == SW_RUNNING);

endmodule
