// overlay_prom: 32K x 8 lookup table of the ball image.
//
// Address layout (as wired to the original 28F256 PROM):
//   addr[14:13]  animation frame
//   addr[12:5]   row offset   rowdiff = bally - row - 1 (mod 256)
//   addr[4:0]    column offset byte, coldiff[7:3], coldiff = ballx - col - 1
// The byte returned holds eight horizontally adjacent pixels, bit 7 being
// the pixel with the largest coldiff (leftmost); a 1 lights the pixel.
//
// The contents are computed from the 16 x 32 frames in cube_sprites_pkg so
// that the image is centred on the ball. With dy = row - bally = ~rowdiff and
// dx = col - ballx = ~coldiff, image row dy + 16 is shown for
// -16 <= dy <= 15, the right image byte for dx = 0..7 and the left byte for
// dx = -8..-1; every other address reads 0. The table is read-only and
// combinational, like the PROM; building it from the frames instead of a
// programming file is this design's choice.
module overlay_prom
  import cube_sprites_pkg::*;
(
  input  logic [14:0] addr,
  output logic [7:0]  data
);

  logic [1:0]  frame;
  logic [7:0]  dy;
  logic [4:0]  dxb;
  logic [15:0] line;

  always_comb begin
    frame = addr[14:13];
    dy    = ~addr[12:5];
    dxb   = ~addr[4:0];
    data  = 8'h00;
    line  = 16'h0000;
    if (dy < 8'd16 || dy >= 8'd240) begin
      line = CUBE[frame][5'(dy + 8'd16)];
      if (dxb == 5'd0)       data = line[7:0];
      else if (dxb == 5'd31) data = line[15:8];
    end
  end

endmodule
