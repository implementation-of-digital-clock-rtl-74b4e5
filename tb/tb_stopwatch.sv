// Self-checking testbench for stopwatch.
// A reference model of the Start/Pause/Stop controller and the 0..59 counter
// runs beside the block. Directed phases check start, counting, the wrap
// from 59 to 00, pause holding the count, resuming and stop clearing it;
// then random control levels and ticks are applied for many cycles. Count,
// state and wrap are compared every cycle, and each behaviour is counted and
// must have happened.
module tb_stopwatch;
  import clock_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic       tick = 0, start = 0, pause = 0, stop = 0;
  logic [5:0] count;
  sw_state_e  state;
  logic       wrap;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_pause = 0, n_resume = 0, n_stop = 0;

  // model
  int m_state = 0;   // 0 stopped, 1 running, 2 paused
  int m_cnt   = 0;

  always #5 clk = ~clk;

  stopwatch dut (.clk, .rst, .tick, .start, .pause, .stop, .count, .state, .wrap);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic cycle(bit t, bit s, bit p, bit k);
    bit exp_wrap;
    tick <= t; start <= s; pause <= p; stop <= k;
    exp_wrap = (m_state == 1) && t && (m_cnt == 59);
    #1;
    check(wrap == exp_wrap, $sformatf("wrap, model count %0d", m_cnt));
    @(posedge clk);
    // model update
    case (m_state)
      0: begin m_cnt = 0; if (s && !k && !p) m_state = 1; end
      1: begin
        if (t) begin m_cnt = (m_cnt == 59) ? 0 : m_cnt + 1; if (m_cnt == 0) n_wrap++; end
        if (k) begin m_state = 0; m_cnt = 0; n_stop++; end
        else if (p) begin m_state = 2; n_pause++; end
      end
      default: begin
        if (k) begin m_state = 0; m_cnt = 0; n_stop++; end
        else if (s && !p) begin m_state = 1; n_resume++; end
      end
    endcase
    #1;
    check(count == 6'(m_cnt), $sformatf("count %0d expected %0d", count, m_cnt));
    check(int'(state) == m_state, $sformatf("state %0d expected %0d", state, m_state));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    #1 check(count == 0 && state == SW_STOPPED, "reset state");
    // ticks while stopped do nothing
    repeat (5) cycle(1, 0, 0, 0);
    check(count == 0, "no count while stopped");
    // start, count 70 seconds (through the wrap)
    cycle(0, 1, 0, 0);
    repeat (70) cycle(1, 0, 0, 0);
    check(count == 10, "count after 70 s");
    // pause holds
    cycle(0, 0, 1, 0);
    repeat (5) cycle(1, 0, 0, 0);
    check(count == 10 && state == SW_PAUSED, "pause holds");
    // resume
    cycle(0, 1, 0, 0);
    repeat (3) cycle(1, 0, 0, 0);
    check(count == 13, "resume continues");
    // stop clears
    cycle(0, 0, 0, 1);
    check(count == 0 && state == SW_STOPPED, "stop clears");
    // random
    for (int i = 0; i < 50000; i++)
      cycle(1'($urandom_range(0, 1)), $urandom_range(0, 7) == 0, $urandom_range(0, 15) == 0,
            $urandom_range(0, 63) == 0);
    // long runs to reach further wraps
    cycle(0, 0, 0, 1);
    cycle(0, 1, 0, 0);
    repeat (130) cycle(1, 0, 0, 0);
    check(n_wrap >= 2 && n_pause > 0 && n_resume > 0 && n_stop > 0,
          $sformatf("coverage wrap=%0d pause=%0d resume=%0d stop=%0d", n_wrap, n_pause, n_resume, n_stop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
