// diff_clkgen: clock divider and /RAS delay of the differencer controller.
//
// sync_clk is the system clock divided by two (a toggle flip-flop); it clocks
// the sync generator (28.636 MHz / 2 = 14.318 MHz, the standard NTSC rate).
// ras_n is HDRIVE inverted and delayed by one system clock: it goes high
// (DRAM precharge) for the line-start pulse and is low for the rest of the
// line, so the DRAM stays in one page for a whole line (fast-page mode).
// hdrive_rise is a one-clock pulse after HDRIVE rises; it replaces the
// original's use of HDRIVE as the row counter's clock. Both flip-flops follow
// the original board; the edge pulse is this design's.
module diff_clkgen (
  input  logic clk,
  input  logic rst_n,
  input  logic hdrive,
  output logic sync_clk,
  output logic ras_n,
  output logic hdrive_rise
);

  logic hdrive_q;

  always_ff @(posedge clk) begin
    if (!rst_n) sync_clk <= 1'b0;
    else        sync_clk <= !sync_clk;
  end

  always_ff @(posedge clk) begin
    ras_n    <= !hdrive;
    hdrive_q <= hdrive;
  end

  assign hdrive_rise = hdrive && !hdrive_q;

endmodule
