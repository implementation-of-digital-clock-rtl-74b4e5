// Self-checking testbench for seven_seg_display.
// Uses a four-digit instance with 5 clock cycles per digit. Every cycle it
// checks that exactly one digit enable is low, that the enabled digit moves
// on every 5 cycles in the order 0,1,2,3,0,..., and that the segment lines
// carry the pattern of that digit, taken from a segment table written out
// in the testbench (lit segments per digit, gfedcba). The digits change
// randomly during the run. A two-digit instance at the default
// CLK_FREQ_HZ/DIGIT_HZ is checked for its 100,000-cycle digit period.
module tb_seven_seg_display;
  import clock_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  bcd_t digits [4];
  logic [6:0] seg_n, seg2_n;
  logic [3:0] an_n;
  logic [1:0] an2_n;
  int checks = 0, failures = 0;

  // lit segments, bit 0 = a
  localparam logic [6:0] LIT [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  always #5 clk = ~clk;

  seven_seg_display #(.CLK_FREQ_HZ(5000), .DIGIT_HZ(1000), .NUM_DIGITS(4)) dut
    (.clk, .rst, .digits, .seg_n, .an_n);

  bcd_t digits2 [2];
  assign digits2[0] = 4'd3;
  assign digits2[1] = 4'd7;
  seven_seg_display dut2 (.clk, .rst, .digits(digits2), .seg_n(seg2_n), .an_n(an2_n));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int exp_idx;
    bcd_t held [4];
    foreach (digits[i]) digits[i] = 4'(i);
    held = digits;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // after release: digit 0 is shown after clock edges 0..4, digit 1 after 5..9, ...
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk);
      #1;
      if (c >= 1) begin
        exp_idx = (c / 5) % 4;
        check(an_n == ~(4'b1 << exp_idx), $sformatf("cycle %0d an_n=%b expected digit %0d", c, an_n, exp_idx));
        check(seg_n == ~LIT[held[exp_idx]], $sformatf("cycle %0d seg_n=%b digit value %0d", c, seg_n, held[exp_idx]));
      end
      if ($urandom_range(0, 6) == 0) digits[$urandom_range(0, 3)] = 4'($urandom_range(0, 9));
      held = digits;
    end
    // default-sized instance: digit 0 for 100,000 cycles, then digit 1
    rst <= 1'b1; @(posedge clk); rst <= 1'b0;
    for (int c = 0; c < 200100; c++) begin
      @(posedge clk);
      #1;
      if (c == 50 || c == 99_999) check(an2_n == 2'b10 && seg2_n == ~LIT[3], $sformatf("default digit 0 at %0d", c));
      if (c == 100_001 || c == 199_999) check(an2_n == 2'b01 && seg2_n == ~LIT[7], $sformatf("default digit 1 at %0d", c));
      if (c == 200_001) check(an2_n == 2'b10, "default wrap to digit 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
