// overlay_output: animation counter, pixel select and XOR of the overlay.
//
// A four-bit counter advances on every falling edge of the ODD/EVEN field
// flag (once per frame, 30 times a second); its top two bits choose the
// animation frame, so each frame is shown for 8 video frames and the cube
// turns once in about half a second. The PROM address is
// {frame, rowdiff, coldiff[7:3]} (13 of its 15 bits are plain wires from
// the offset inputs); coldiff[2:0] selects one bit of the PROM
// byte (an 8-to-1 multiplexer) and that bit is XORed into all eight bits of
// the difference stream: where the image is lit the output is the inverted
// difference (near white), elsewhere the difference itself. Apart from the
// counter the path is combinational, as on the original board. Clearing
// the counter on reset is this design's choice (the original never clears
// it); the edge detection on the system clock is too.
module overlay_output (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        oddeven,
  input  logic [7:0]  coldiff,
  input  logic [7:0]  rowdiff,
  input  logic [7:0]  prom_data,
  input  logic [7:0]  difference,
  output logic [14:0] prom_addr,
  output logic        overlay_bit,
  output logic [7:0]  video_out,
  output logic [3:0]  anim_count
);

  logic oddeven_q;

  always_ff @(posedge clk) begin
    oddeven_q <= oddeven;
    if (!rst_n)                     anim_count <= '0;
    else if (oddeven_q && !oddeven) anim_count <= anim_count + 4'd1;
  end

  always_comb begin
    prom_addr   = {anim_count[3:2], rowdiff, coldiff[7:3]};
    overlay_bit = prom_data[coldiff[2:0]];
    video_out   = difference ^ {8{overlay_bit}};
  end

endmodule
