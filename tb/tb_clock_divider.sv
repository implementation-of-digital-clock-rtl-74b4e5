// Self-checking testbench for clock_divider.
// Runs the divider at a reduced ratio (CLK_FREQ_HZ = 10, TICK_HZ = 1) and at
// a second ratio (37), and checks that the tick is one cycle wide, that the
// first tick comes DIV cycles after reset and that ticks repeat every DIV
// cycles; reset in mid-count must restart the period.
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic tick_a, tick_b;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.CLK_FREQ_HZ(10), .TICK_HZ(1)) dut_a (.clk, .rst, .tick(tick_a));
  clock_divider #(.CLK_FREQ_HZ(74), .TICK_HZ(2)) dut_b (.clk, .rst, .tick(tick_b));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;  // cycles since reset released
  always @(posedge clk) begin
    if (rst) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      // reference: tick on cycles DIV-1, 2*DIV-1, ... after release
      check(tick_a == ((cyc % 10) == 9), $sformatf("tick_a at cycle %0d", cyc));
      check(tick_b == ((cyc % 37) == 36), $sformatf("tick_b at cycle %0d", cyc));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (200) @(posedge clk);
    // reset in the middle of a period
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (123) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
