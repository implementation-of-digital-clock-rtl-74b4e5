// End-to-end testbench for clock_stopwatch_top.
//
// Two instances share all inputs: one with the default two-digit display and
// one with six digits (HH MM SS), both at a reduced clock so that one second
// is 16 cycles and each digit is lit for one cycle. The test runs for more
// than a simulated day. Inputs change only in the cycle after a one-second
// tick; a model advances the time of day and the stopwatch once per second
// and applies the controls, and just before the next tick the testbench
// compares the binary outputs and the digits decoded from the segment and
// digit-enable pins (recorded over a full scan) with the model.
//
// Mechanisms that must each happen at least once: seconds, minutes, hours
// and day roll-over of the clock, stopwatch start, pause, resume, stop and
// 59 -> 00 wrap, switching the display both ways, each of the four
// time-setting steps, and a reset in mid-run. The rate is checked too: the
// clock's seconds change exactly every CLK_FREQ_HZ cycles.
module tb_clock_stopwatch_top;
  localparam int F = 16;   // cycles per second in this test

  logic clk = 1'b0, reset = 1'b1;
  logic mode_sw = 0, sw_start = 0, sw_pause = 0, sw_stop = 0;
  logic set_min_up = 0, set_min_dn = 0, set_hr_up = 0, set_hr_dn = 0;

  logic [6:0] seg_n, seg6_n;
  logic [1:0] an_n;
  logic [5:0] an6_n;
  logic [4:0] hours, hours6;
  logic [5:0] minutes, seconds, sw_seconds, minutes6, seconds6, sw_seconds6;
  logic       sw_running, sw_running6;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_stopwatch_top #(.CLK_FREQ_HZ(F), .DIGIT_HZ(F)) dut (
    .clk, .reset, .mode_sw, .sw_start, .sw_pause, .sw_stop,
    .set_min_up, .set_min_dn, .set_hr_up, .set_hr_dn,
    .seg_n, .an_n, .hours, .minutes, .seconds, .sw_seconds, .sw_running);

  clock_stopwatch_top #(.CLK_FREQ_HZ(F), .DIGIT_HZ(F), .NUM_DIGITS(6)) dut6 (
    .clk, .reset, .mode_sw, .sw_start, .sw_pause, .sw_stop,
    .set_min_up, .set_min_dn, .set_hr_up, .set_hr_dn,
    .seg_n(seg6_n), .an_n(an6_n), .hours(hours6), .minutes(minutes6), .seconds(seconds6),
    .sw_seconds(sw_seconds6), .sw_running(sw_running6));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---- decoding the display pins ----
  localparam logic [6:0] LIT [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
  function automatic int decode(logic [6:0] s_n);
    for (int d = 0; d < 10; d++) if (~s_n == LIT[d]) return d;
    return -1;
  endfunction

  int seen2 [2];
  int seen6 [6];
  bit recording = 0;
  always @(posedge clk) if (recording) begin
    #1;
    for (int i = 0; i < 2; i++) if (an_n  == ~(2'b1 << i)) seen2[i] = decode(seg_n);
    for (int i = 0; i < 6; i++) if (an6_n == ~(6'b1 << i)) seen6[i] = decode(seg6_n);
    check($countones(~an_n) == 1 && $countones(~an6_n) == 1, "exactly one digit enabled");
  end

  // ---- model ----
  int m_t = 0;          // clock, seconds since midnight
  int m_sw_state = 0;   // 0 stopped, 1 running, 2 paused
  int m_sw = 0;
  bit m_mode = 0;

  // coverage counters
  int n_sec = 0, n_min = 0, n_hour = 0, n_day = 0;
  int n_start = 0, n_pause = 0, n_resume = 0, n_stop = 0, n_swwrap = 0;
  int n_to_sw = 0, n_to_clk = 0, n_mu = 0, n_md = 0, n_hu = 0, n_hd = 0, n_reset = 0;

  function automatic void model_tick();
    n_sec++;
    if (m_t % 60 == 59) n_min++;
    if (m_t % 3600 == 3599) n_hour++;
    if (m_t == 86399) n_day++;
    m_t = (m_t + 1) % 86400;
    if (m_sw_state == 1) begin
      if (m_sw == 59) n_swwrap++;
      m_sw = (m_sw + 1) % 60;
    end
  endfunction

  function automatic void model_controls(bit st, bit pa, bit sp);
    case (m_sw_state)
      0: begin m_sw = 0; if (st && !pa && !sp) begin m_sw_state = 1; n_start++; end end
      1: if (sp) begin m_sw_state = 0; m_sw = 0; n_stop++; end
         else if (pa) begin m_sw_state = 2; n_pause++; end
      default: if (sp) begin m_sw_state = 0; m_sw = 0; n_stop++; end
               else if (st && !pa) begin m_sw_state = 1; n_resume++; end
    endcase
  endfunction

  function automatic void model_steps(bit mu, bit md, bit hu, bit hd);
    int h = m_t / 3600, m = (m_t / 60) % 60, s = m_t % 60;
    if (mu) begin m = (m + 1) % 60; n_mu++; end
    else if (md) begin m = (m + 59) % 60; n_md++; end
    if (hu) begin h = (h + 1) % 24; n_hu++; end
    else if (hd) begin h = (h + 23) % 24; n_hd++; end
    m_t = h * 3600 + m * 60 + s;
  endfunction

  function automatic int dig(int v, int pos);  // pos 0 = ones, 1 = tens
    return pos == 0 ? v % 10 : v / 10;
  endfunction

  task automatic compare(string when);
    int h, m, s, exp6 [6];
    h = m_t / 3600; m = (m_t / 60) % 60; s = m_t % 60;
    check(hours == 5'(h) && minutes == 6'(m) && seconds == 6'(s),
          $sformatf("%s: clock %0d:%0d:%0d expected %0d:%0d:%0d", when, hours, minutes, seconds, h, m, s));
    check(sw_seconds == 6'(m_sw) && sw_running == (m_sw_state == 1),
          $sformatf("%s: stopwatch %0d/%0b expected %0d/%0d", when, sw_seconds, sw_running, m_sw, m_sw_state));
    check(hours6 == hours && minutes6 == minutes && seconds6 == seconds && sw_seconds6 == sw_seconds,
          "six-digit instance agrees");
    if (m_mode) begin h = 0; m = 0; s = m_sw; end
    exp6 = '{dig(s, 0), dig(s, 1), dig(m, 0), dig(m, 1), dig(h, 0), dig(h, 1)};
    check(seen2[0] == exp6[0] && seen2[1] == exp6[1],
          $sformatf("%s: 2-digit display %0d%0d expected %0d%0d", when, seen2[1], seen2[0], exp6[1], exp6[0]));
    check(seen6 == exp6, $sformatf("%s: 6-digit display %0d%0d:%0d%0d:%0d%0d", when,
          seen6[5], seen6[4], seen6[3], seen6[2], seen6[1], seen6[0]));
  endtask

  // One second of operation. Called right after the clock edge on which the
  // counters took the tick (edge 16k+15 after reset release); drives the
  // inputs, records a full display scan and checks just before the next tick.
  task automatic one_second(bit md_new, bit st, bit pa, bit sp, bit mu, bit mdn, bit hu, bit hd);
    @(posedge clk);  // edge 16k+16
    if (md_new != m_mode) begin if (md_new) n_to_sw++; else n_to_clk++; end
    mode_sw <= md_new; sw_start <= st; sw_pause <= pa; sw_stop <= sp;
    set_min_up <= mu; set_min_dn <= mdn; set_hr_up <= hu; set_hr_dn <= hd;
    m_mode = md_new;
    model_controls(st, pa, sp);
    model_steps(mu, mdn, hu, hd);
    repeat (4) @(posedge clk);  // edge 16k+20
    {set_min_up, set_min_dn, set_hr_up, set_hr_dn} <= '0;
    // the second's controls are applied repeatedly while held; the model's
    // state machine is idempotent for held levels
    model_controls(st, pa, sp);
    recording = 1;
    repeat (10) @(posedge clk); // edge 16k+30
    #2;
    recording = 0;
    compare("before tick");
    // rate: nothing may have changed yet, the tick comes at the next edge
    @(posedge clk);  // edge 16k+31
    model_tick();
    #2;
    check(seconds == 6'(m_t % 60), $sformatf("tick on edge 16k+15, seconds=%0d expected %0d", seconds, m_t % 60));
  endtask

  task automatic do_reset();
    reset <= 1'b1;
    {mode_sw, sw_start, sw_pause, sw_stop} <= '0;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    m_t = 0; m_sw_state = 0; m_sw = 0; m_mode = 0;
    repeat (15) @(posedge clk);  // edge 14 after release
    recording = 1;
    #2;
    @(posedge clk);              // edge 15: first tick
    model_tick();
    #2;
    check(seconds == 1, "first tick 16 cycles after reset release");
  endtask

  initial begin
    foreach (seen2[i]) seen2[i] = -1;
    foreach (seen6[i]) seen6[i] = -1;
    repeat (2) @(posedge clk);
    do_reset();
    // stopwatch: start, count past 59, pause, resume, stop; shown and hidden
    one_second(1, 1, 0, 0, 0, 0, 0, 0);
    repeat (65) one_second(1, 1, 0, 0, 0, 0, 0, 0);
    repeat (3) one_second(1, 0, 1, 0, 0, 0, 0, 0);
    repeat (3) one_second(0, 1, 0, 0, 0, 0, 0, 0);
    repeat (2) one_second(1, 0, 0, 1, 0, 0, 0, 0);
    // time setting, each direction
    one_second(0, 0, 0, 0, 1, 0, 0, 0);
    one_second(0, 0, 0, 0, 0, 1, 0, 0);
    one_second(0, 0, 0, 0, 0, 1, 0, 0);
    one_second(0, 0, 0, 0, 0, 0, 1, 0);
    one_second(0, 0, 0, 0, 0, 0, 0, 1);
    one_second(0, 0, 0, 0, 0, 0, 0, 1);
    // reset in mid-run
    n_reset++;
    do_reset();
    // a day and a bit of random operation
    for (int k = 0; k < 87000; k++) begin
      automatic int r = $urandom_range(0, 99);
      automatic bit md = m_mode, st = sw_start, pa = sw_pause, sp = sw_stop;
      if (r < 3) md = !md;
      if (r >= 10 && r < 13) begin st = 1; pa = 0; sp = 0; end
      if (r == 13) begin st = 0; pa = 1; sp = 0; end
      if (r == 14) begin st = 0; pa = 0; sp = 1; end
      if (r == 15) begin st = 0; pa = 0; sp = 0; end
      one_second(md, st, pa, sp, r == 20, r == 21, r == 22, r == 23);
    end
    $display("coverage: sec=%0d min=%0d hour=%0d day=%0d start=%0d pause=%0d resume=%0d stop=%0d swwrap=%0d",
             n_sec, n_min, n_hour, n_day, n_start, n_pause, n_resume, n_stop, n_swwrap);
    $display("coverage: to_sw=%0d to_clk=%0d min_up=%0d min_dn=%0d hr_up=%0d hr_dn=%0d reset=%0d",
             n_to_sw, n_to_clk, n_mu, n_md, n_hu, n_hd, n_reset);
    check(n_sec > 0 && n_min > 0 && n_hour > 0 && n_day > 0, "clock roll-overs all happened");
    check(n_start > 0 && n_pause > 0 && n_resume > 0 && n_stop > 0 && n_swwrap > 0, "stopwatch mechanisms all happened");
    check(n_to_sw > 0 && n_to_clk > 0, "display switched both ways");
    check(n_mu > 0 && n_md > 0 && n_hu > 0 && n_hd > 0 && n_reset > 0, "time setting and reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
