// pos_comparator: ball-position equality test for one axis.
//
// Compares the current pixel coordinate with the ball's screen coordinate,
// ignoring bit 0 of both (the low bits are tied to ground on the original
// comparators), so the ball's motion-detection spot is two pixels wide on
// each axis, four pixels in all. With MASK_LEFT_EDGE set (the column
// comparator) the output is also forced low while pixel[7:1] is zero, to
// ignore the unreliable first columns of a line. Purely combinational.
module pos_comparator #(
  parameter bit MASK_LEFT_EDGE = 1'b0
) (
  input  logic [7:0] pixel,  // current pixel column or row
  input  logic [7:0] ball,   // ball screen x or y
  output logic       equal
);

  always_comb begin
    equal = (pixel[7:1] == ball[7:1]);
    if (MASK_LEFT_EDGE && pixel[7:1] == 7'd0) equal = 1'b0;
  end

endmodule
