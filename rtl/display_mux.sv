// Output multiplexer ("Control" in the block diagram) with decimal conversion.
//
// The Switch select line chooses what the display shows: in MODE_CLOCK the
// digital clock's time as HH MM SS, in MODE_STOPWATCH the stopwatch count in
// the SS positions with the other four digits at 0. The multiplexing of the
// two outputs by a switch is the document's; the six-digit BCD format and
// the zeros in the stopwatch's unused positions are this design's choices.
//
// Interface: digits[0] is the ones of the seconds, digits[1] their tens,
// digits[2..3] the minutes and digits[4..5] the hours. Purely combinational.
module display_mux
  import clock_pkg::*;
(
  input  mode_e      mode,
  input  time_t      clk_time,
  input  logic [5:0] sw_count,
  output bcd_t       digits [6]
);

  time_t shown;

  always_comb begin
    if (mode == MODE_STOPWATCH) begin
      shown         = '0;
      shown.seconds = sw_count;
    end else begin
      shown = clk_time;
    end
  end

  bin_to_bcd u_sec (.value({1'b0, shown.seconds}), .tens(digits[1]), .ones(digits[0]));
  bin_to_bcd u_min (.value({1'b0, shown.minutes}), .tens(digits[3]), .ones(digits[2]));
  bin_to_bcd u_hr  (.value({2'b0, shown.hours}),   .tens(digits[5]), .ones(digits[4]));

endmodule
