// BCD digit to seven-segment pattern for a common-anode display.
//
// Bit 0 of seg_n is segment a, bit 6 segment g (a top, then clockwise b, c,
// d, e, f, and g in the middle). A common-anode display lights a segment
// when its cathode is pulled low, so the outputs are active low. Codes 10..15
// blank the digit. Purely combinational.
module seg7_decoder
  import clock_pkg::*;
(
  input  bcd_t       digit,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, gfedcba

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b011_1111;
      4'd1:    seg = 7'b000_0110;
      4'd2:    seg = 7'b101_1011;
      4'd3:    seg = 7'b100_1111;
      4'd4:    seg = 7'b110_0110;
      4'd5:    seg = 7'b110_1101;
      4'd6:    seg = 7'b111_1101;
      4'd7:    seg = 7'b000_0111;
      4'd8:    seg = 7'b111_1111;
      4'd9:    seg = 7'b110_1111;
      default: seg = 7'b000_0000;
    endcase
    seg_n = ~seg;
  end

endmodule
