// Time-multiplexed driver for a common-anode seven-segment display.
//
// The seven segment lines are shared by all digits, so the digits are lit one
// at a time: a prescaler counts CLK_FREQ_HZ/DIGIT_HZ clock cycles, then a
// digit index advances to the next digit (0, 1, ..., NUM_DIGITS-1, 0, ...).
// For the selected digit the matching an_n line is pulled low and seg_n
// carries that digit's pattern. At the defaults each digit is lit for 1 ms,
// so the two digits of the display refresh at 500 Hz, far above what the eye
// can follow. The shared segment lines, the switching between digits and the
// common-anode display are the document's; the digit period (DIGIT_HZ) and
// the one-hot active-low digit enables are this design's choices (a board
// with a single digit-select pin, such as a two-digit Pmod display, uses
// an_n[0] as that pin, with the polarity its schematic needs).
//
// Interface: digits[0] is the rightmost digit. seg_n and an_n are registered
// and change together, one cycle after the digit index moves. rst is
// synchronous and active high; it selects digit 0.
module seven_seg_display
  import clock_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned DIGIT_HZ    = 1_000,
  parameter int unsigned NUM_DIGITS  = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  bcd_t                  digits [NUM_DIGITS],
  output logic [6:0]            seg_n,
  output logic [NUM_DIGITS-1:0] an_n
);

  localparam int unsigned DIV = CLK_FREQ_HZ / DIGIT_HZ;
  localparam int unsigned PW  = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned IW  = (NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 1;
  localparam logic [PW-1:0] PLAST = PW'(DIV - 1);
  localparam logic [IW-1:0] ILAST = IW'(NUM_DIGITS - 1);

  initial assert (DIV >= 1 && NUM_DIGITS >= 1) else $error("seven_seg_display: bad parameters");

  logic [PW-1:0] pre;
  logic [IW-1:0] idx;
  logic [6:0]    seg_cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0;
      idx <= '0;
    end else if (pre == PLAST) begin
      pre <= '0;
      idx <= (idx == ILAST) ? '0 : idx + 1'b1;
    end else begin
      pre <= pre + 1'b1;
    end
  end

  seg7_decoder u_dec (.digit(digits[idx]), .seg_n(seg_cur));

  always_ff @(posedge clk) begin
    if (rst) begin
      seg_n <= '1;
      an_n  <= '1;
    end else begin
      seg_n <= seg_cur;
      an_n  <= ~(NUM_DIGITS'(1) << idx);
    end
  end

endmodule
