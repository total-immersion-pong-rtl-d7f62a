// tip_pkg: constants shared by the motion-tracking pong design.
//
// The numbers are the ones the original board used: 180 columns and about
// 250 rows per field on the screen, a pixel cycle of eight system clocks,
// the ball restarting at logical x = 0x09A (screen column 90) and the
// motion test using bit 5 of the eight-bit frame difference (a threshold
// of 32 grey levels). The phase names of the pixel cycle are this design's
// own labels for the eight counts of the controller's three-bit counter.
package tip_pkg;

  // Pixel cycle: one pixel every eight system clocks.
  localparam int unsigned PIXEL_CLOCKS = 8;

  // Column counter reports "full" after this column.
  localparam int unsigned COL_LIMIT = 180;
  // Row counter reports "full" after this row of a field.
  localparam int unsigned ROW_LIMIT = 250;

  // Bit of the difference stream used as the motion flag.
  localparam int unsigned DIFF_BIT = 5;

  // Logical x position of a served ball (segment 2, screen column 90).
  localparam logic [8:0] X_SERVE = 9'h09A;
  // Logical y position of a served ball, without its direction bit.
  localparam logic [7:0] Y_SERVE = 8'h80;

  // Distance the logical x jumps on a bounce: x <= ~x + BOUNCE_OFFSET.
  localparam logic [8:0] BOUNCE_OFFSET = 9'd64;

  // Segment codes of the logical x position (bits 7:6).
  localparam logic [1:0] SEG_LOSE   = 2'b00;
  localparam logic [1:0] SEG_BOUNCE = 2'b11;

endpackage
