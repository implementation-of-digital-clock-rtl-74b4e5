// Self-checking testbench for display_mux.
// Applies every seconds/minutes/hours value and every stopwatch count in
// both modes and checks the six decimal digits against tens/ones worked out
// in the testbench by repeated subtraction.
module tb_display_mux;
  import clock_pkg::*;
  mode_e      mode;
  time_t      clk_time;
  logic [5:0] sw_count;
  bcd_t       digits [6];
  int checks = 0, failures = 0;

  display_mux dut (.mode, .clk_time, .sw_count, .digits);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int tens_of(int v);
    int t = 0;
    while (v >= 10) begin v -= 10; t++; end
    return t;
  endfunction

  task automatic expect_digits(int h, int m, int s, string what);
    check(digits[0] == 4'(s - 10 * tens_of(s)) && digits[1] == 4'(tens_of(s)) &&
          digits[2] == 4'(m - 10 * tens_of(m)) && digits[3] == 4'(tens_of(m)) &&
          digits[4] == 4'(h - 10 * tens_of(h)) && digits[5] == 4'(tens_of(h)),
          $sformatf("%s %0d:%0d:%0d -> %0d%0d %0d%0d %0d%0d", what, h, m, s,
                    digits[5], digits[4], digits[3], digits[2], digits[1], digits[0]));
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic int h = i % 24, m = (i * 7) % 60, s = i % 60, c = (i * 13) % 60;
      clk_time = '{hours: 5'(h), minutes: 6'(m), seconds: 6'(s)};
      sw_count = 6'(c);
      mode = MODE_CLOCK;
      #1 expect_digits(h, m, s, "clock");
      mode = MODE_STOPWATCH;
      #1 expect_digits(0, 0, c, "stopwatch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
