// Stopwatch: counts elapsed seconds from 00 to 59 and then wraps to 00.
//
// A small controller with three states decides whether the seconds counter
// advances on the shared one-second tick:
//   SW_STOPPED  count held at 00;       start -> SW_RUNNING
//   SW_RUNNING  count += 1 per tick;    pause -> SW_PAUSED, stop -> SW_STOPPED
//   SW_PAUSED   count held;             start -> SW_RUNNING, stop -> SW_STOPPED
// Stop clears the count. The three controls (Start, Pause, Stop), the 0..59
// range with the return to 00 and the use of the common one-second pulse are
// the document's. The document names the controls but not their exact
// effect; the state set above, stop clearing the count, and the priority
// stop > pause > start when several are high are this design's choices. The
// controls are levels (switches): the state changes in the cycle after a
// control is seen high.
//
// Because the tick is shared with the clock, the first second after start may
// be shorter than a full second. wrap pulses when the count passes 59 -> 00.
// rst is synchronous, active high, and leaves the stopwatch stopped at 00.
module stopwatch
  import clock_pkg::*;
#(
  parameter int unsigned MAX_COUNT = 59
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       start,
  input  logic       pause,
  input  logic       stop,
  output logic [5:0] count,
  output sw_state_e  state,
  output logic       wrap
);

  localparam logic [5:0] LAST = 6'(MAX_COUNT);

  sw_state_e  st, st_nxt;
  logic [5:0] cnt, cnt_nxt;

  always_comb begin
    st_nxt  = st;
    cnt_nxt = cnt;
    wrap    = 1'b0;
    unique case (st)
      SW_STOPPED: begin
        cnt_nxt = '0;
        if (start && !stop && !pause) st_nxt = SW_RUNNING;
      end
      SW_RUNNING: begin
        if (tick) begin
          wrap    = (cnt == LAST);
          cnt_nxt = wrap ? '0 : cnt + 1'b1;
        end
        if (stop) begin
          st_nxt  = SW_STOPPED;
          cnt_nxt = '0;
        end else if (pause) begin
          st_nxt  = SW_PAUSED;
        end
      end
      SW_PAUSED: begin
        if (stop) begin
          st_nxt  = SW_STOPPED;
          cnt_nxt = '0;
        end else if (start && !pause) begin
          st_nxt  = SW_RUNNING;
        end
      end
      default: begin
        st_nxt  = SW_STOPPED;
        cnt_nxt = '0;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= SW_STOPPED;
      cnt <= '0;
    end else begin
      st  <= st_nxt;
      cnt <= cnt_nxt;
    end
  end

  assign count = cnt;
  assign state = st;

  always_ff @(posedge clk)
    if (!rst) assert (cnt <= LAST) else $error("stopwatch: count out of range");

endmodule
