// overlay_offset: pixel-to-ball offsets for the bitmap overlay.
//
// The current line number is taken off the shared DRAM address bus at the
// start of each line: while CBLANK is low the bus carries the row address
// {line, odd/even}, and bits 8:1 are latched when /RAS rises (the line-start
// precharge). While CBLANK is high the bus carries {column, 0}, so bits 8:1
// are the current column. Each offset is formed the way the original adders
// did it, ball + ~pixel = ball - pixel - 1 (mod 256):
//   coldiff = ballx + ~column,   rowdiff = bally + ~line.
// So the pixel under the ball centre gives 0xFF, and the offset counts down
// as the pixel moves right or down. The latch follows the original (a
// 74LS377 clocked by /RAS, enabled by CBLANK low); the edge detection on the
// system clock is this design's.
module overlay_offset (
  input  logic       clk,
  input  logic       cblank,
  input  logic       ras_n,
  input  logic [8:0] addr,     // shared DRAM address bus
  input  logic [7:0] ballx,
  input  logic [7:0] bally,
  output logic [7:0] row,      // latched line number
  output logic [7:0] coldiff,
  output logic [7:0] rowdiff
);

  logic ras_n_q;

  always_ff @(posedge clk) begin
    ras_n_q <= ras_n;
    if (!cblank && ras_n && !ras_n_q) row <= addr[8:1];
  end

  always_comb begin
    coldiff = ballx + ~addr[8:1];
    rowdiff = bally + ~row;
  end

endmodule
