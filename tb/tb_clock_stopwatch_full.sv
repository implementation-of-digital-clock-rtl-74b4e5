// Full-size testbench for clock_stopwatch_top at its default parameters
// (100 MHz clock, 1 Hz tick, two display digits, 1 ms per digit).
//
// Three simulated seconds (300 million clock cycles): it checks that the
// first tick lands exactly 100,000,000 cycles after reset is released, that
// the display then shows the clock's seconds "01", that switching to the
// stopwatch and starting it gives "01" one second later while the clock
// reads 2, and that pause holds the stopwatch while the clock goes on.
module tb_clock_stopwatch_full;
  localparam int unsigned F = 100_000_000;

  logic clk = 1'b0, reset = 1'b1;
  logic mode_sw = 0, sw_start = 0, sw_pause = 0, sw_stop = 0;
  logic [6:0] seg_n;
  logic [1:0] an_n;
  logic [4:0] hours;
  logic [5:0] minutes, seconds, sw_seconds;
  logic       sw_running;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_stopwatch_top dut (
    .clk, .reset, .mode_sw, .sw_start, .sw_pause, .sw_stop,
    .set_min_up(1'b0), .set_min_dn(1'b0), .set_hr_up(1'b0), .set_hr_dn(1'b0),
    .seg_n, .an_n, .hours, .minutes, .seconds, .sw_seconds, .sw_running);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  localparam logic [6:0] LIT [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  // Sample the display once in each of the next two digit periods.
  task automatic check_display(int tens, int ones, string what);
    int got [2];
    got = '{-1, -1};
    for (int k = 0; k < 2; k++) begin
      repeat (100_000) @(posedge clk);
      #1;
      for (int i = 0; i < 2; i++)
        if (an_n == ~(2'b1 << i))
          for (int d = 0; d < 10; d++) if (~seg_n == LIT[d]) got[i] = d;
    end
    check(got[1] == tens && got[0] == ones,
          $sformatf("%s: display %0d%0d expected %0d%0d", what, got[1], got[0], tens, ones));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    // edges after release are numbered from 0; the tick is taken on edge F-1
    repeat (F - 1) @(posedge clk);  // edge F-2
    #1 check(seconds == 0, "no tick before 100,000,000 cycles");
    @(posedge clk);                 // edge F-1
    #1 check(seconds == 1 && minutes == 0 && hours == 0, "first tick after exactly 100,000,000 cycles");
    check_display(0, 1, "clock seconds");
    // stopwatch: show it and start it
    mode_sw  <= 1'b1;
    sw_start <= 1'b1;
    repeat (5) @(posedge clk);
    #1 check(sw_running && sw_seconds == 0, "stopwatch started");
    check_display(0, 0, "stopwatch at 00");
    // wait until past the second tick (taken on edge 2F-1)
    repeat (F - 200_000 - 10) @(posedge clk);
    #1 check(seconds == 2 && sw_seconds == 1, "second tick reaches clock and stopwatch");
    check_display(0, 1, "stopwatch at 01");
    // pause, then the third tick: clock advances, stopwatch holds
    sw_start <= 1'b0;
    sw_pause <= 1'b1;
    repeat (F) @(posedge clk);
    #1 check(seconds == 3 && sw_seconds == 1 && !sw_running, "pause holds the stopwatch");
    mode_sw <= 1'b0;
    check_display(0, 3, "back to the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * F) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
