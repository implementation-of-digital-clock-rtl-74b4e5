// Two-flop synchronizer for a board switch or button, with a rising-edge pulse.
//
// level is the input after two flip-flops on clk; rise is high for one cycle
// when level goes from 0 to 1. The document does not discuss how the board
// inputs reach the clock domain: synchronizing them is this design's own
// addition, and contact bounce is not filtered.
module sync_rise (
  input  logic clk,
  input  logic rst,
  input  logic in,
  output logic level,
  output logic rise
);

  logic s1, s2, s3;

  always_ff @(posedge clk) begin
    if (rst) {s1, s2, s3} <= '0;
    else     {s1, s2, s3} <= {in, s1, s2};
  end

  assign level = s2;
  assign rise  = s2 & ~s3;

endmodule
