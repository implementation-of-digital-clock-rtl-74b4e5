// Binary to two-digit BCD for values 0..99 (used for 0..59 and 0..23).
//
// Purely combinational: tens = value / 10, ones = value % 10, both constant
// divisions that synthesis reduces to small logic. Inputs of 100 and above
// are outside the design's ranges; their tens digit saturates at 9.
module bin_to_bcd
  import clock_pkg::*;
(
  input  logic [6:0] value,
  output bcd_t       tens,
  output bcd_t       ones
);

  logic [6:0] t;

  always_comb begin
    t    = value / 7'd10;
    tens = (t > 7'd9) ? 4'd9 : t[3:0];
    ones = 4'(value % 7'd10);
  end

endmodule
