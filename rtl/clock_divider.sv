// Frequency divider: turns the board clock into a one-second tick.
//
// A counter runs from 0 to CLK_FREQ_HZ/TICK_HZ - 1 and restarts; tick is high
// for exactly one clock cycle when the counter is at its last value, so the
// tick repeats every CLK_FREQ_HZ/TICK_HZ cycles (100,000,000 by default, a
// 100 MHz clock divided down to 1 Hz as the document specifies). The first
// tick after reset comes CLK_FREQ_HZ/TICK_HZ cycles after reset is released.
//
// The tick is a clock enable in the single clock domain, not a derived clock:
// every register of the design runs on clk. That, and the synchronous
// active-high reset, are this design's choices.
module clock_divider #(
  parameter int unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned TICK_HZ     = 1
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned DIV = CLK_FREQ_HZ / TICK_HZ;
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);

  logic [CW-1:0] cnt;

  initial assert (DIV >= 2) else $error("clock_divider: CLK_FREQ_HZ/TICK_HZ must be at least 2");

  always_ff @(posedge clk) begin
    if (rst)              cnt <= '0;
    else if (cnt == LAST) cnt <= '0;
    else                  cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == LAST);

endmodule
