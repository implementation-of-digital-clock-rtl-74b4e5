// Self-checking testbench for digital_clock.
// A reference model keeps the time as a number of seconds since midnight.
// The test ticks through more than one full day (86,400 s plus some), with
// random gaps between ticks, then mixes in random time-setting steps,
// including steps in the same cycle as a tick. After every cycle the
// counters are compared with the model. It also checks day_wrap and that
// reset returns the clock to 00:00:00.
module tb_digital_clock;
  import clock_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  logic  tick = 0, min_up = 0, min_dn = 0, hr_up = 0, hr_dn = 0;
  time_t now;
  logic  day_wrap;
  int    checks = 0, failures = 0;
  int    ref_s = 0;       // model: seconds since midnight
  int    wraps_seen = 0;

  always #5 clk = ~clk;

  digital_clock dut (.clk, .rst, .tick, .min_up, .min_dn, .hr_up, .hr_dn, .now, .day_wrap);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int model_step(int s, bit t, bit mu, bit md, bit hu, bit hd);
    int h, m, sec;
    if (t) s = (s + 1) % 86400;
    h = s / 3600; m = (s / 60) % 60; sec = s % 60;
    if (mu)      m = (m + 1) % 60;
    else if (md) m = (m + 59) % 60;
    if (hu)      h = (h + 1) % 24;
    else if (hd) h = (h + 23) % 24;
    return h * 3600 + m * 60 + sec;
  endfunction

  task automatic cycle(bit t, bit mu, bit md, bit hu, bit hd);
    bit exp_wrap;
    tick <= t; min_up <= mu; min_dn <= md; hr_up <= hu; hr_dn <= hd;
    exp_wrap = t && (ref_s == 86399);
    #1;
    check(day_wrap == exp_wrap, $sformatf("day_wrap at %0d", ref_s));
    if (day_wrap) wraps_seen++;
    @(posedge clk);
    ref_s = model_step(ref_s, t, mu, md, hu, hd);
    #1;
    check(now.hours == 5'(ref_s / 3600) && now.minutes == 6'((ref_s / 60) % 60) &&
          now.seconds == 6'(ref_s % 60),
          $sformatf("time %0d:%0d:%0d expected %0d", now.hours, now.minutes, now.seconds, ref_s));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(now == '0, "reset value");
    // a bit more than one day of plain counting, with idle gaps
    for (int i = 0; i < 86400 + 200; i++) begin
      cycle(1'b1, 0, 0, 0, 0);
      if ($urandom_range(0, 15) == 0) cycle(1'b0, 0, 0, 0, 0);
    end
    check(wraps_seen == 1, $sformatf("day wraps seen %0d", wraps_seen));
    // random time setting, ticks included
    for (int i = 0; i < 20000; i++) begin
      bit t  = ($urandom_range(0, 3) == 0);
      bit mu = ($urandom_range(0, 5) == 0);
      bit md = !mu && ($urandom_range(0, 5) == 0);
      bit hu = ($urandom_range(0, 5) == 0);
      bit hd = !hu && ($urandom_range(0, 5) == 0);
      cycle(t, mu, md, hu, hd);
    end
    // directed wraps of the setting steps
    ref_s = 0; rst <= 1'b1; @(posedge clk); rst <= 1'b0; #1;
    check(now == '0, "reset mid-run");
    cycle(0, 0, 1, 0, 1);  // 00:00 -> 23:59
    check(now.hours == 23 && now.minutes == 59, "down-step wrap");
    cycle(0, 1, 0, 1, 0);  // back to 00:00
    check(now.hours == 0 && now.minutes == 0, "up-step wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
