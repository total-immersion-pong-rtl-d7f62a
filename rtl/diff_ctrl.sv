// diff_ctrl: pixel-cycle controller of the frame differencer.
//
// A three-bit phase counter divides the system clock into pixel cycles of
// eight clocks. HDRIVE low (the line-start pulse of the sync generator)
// loads phase 1; during blanking (CBLANK low) the counter waits at phase 7,
// so the first active clock after blanking starts a pixel at phase 0.
// Every strobe is decoded from the phase and registered, so each one is
// asserted in the clock that follows the decoded phase:
//
//   decoded phase   strobe (active low)
//   0..6            dram_cas_n low  (released for one clock at phase 7)
//   1..3            dram_oe_n low   (old pixel read from the frame store)
//   2               old_en_n low    (latch old pixel; advance column counter)
//   4..7            a2d_n_oe low    (ADC drives the bus; also the ADC clock)
//   6               dram_we_n low   (new pixel written back)
//   7               final_en_n low  (latch the absolute difference)
//
// Strobes are only produced while CBLANK is high and neither the row nor the
// column counter has passed the end of the picture; otherwise all are high.
// The phase table and the gating follow the original PAL equations; the
// single-clock synchronous form is this design's. The original also drove a
// /RAS output that went unused; it is left out here (the DRAM /RAS comes
// from diff_clkgen).
module diff_ctrl (
  input  logic       clk,
  input  logic       hdrive,      // line drive from the sync generator, low at line start
  input  logic       cblank,      // high during the visible part of a line
  input  logic       row_n_full,  // low once the row counter passed its limit
  input  logic       col_n_full,  // low once the column counter passed its limit
  output logic       dram_cas_n,
  output logic       dram_oe_n,
  output logic       dram_we_n,
  output logic       a2d_n_oe,    // ADC output enable and ADC clock
  output logic       old_en_n,    // old-value latch enable and column count enable
  output logic       final_en_n,  // difference register enable
  output logic [2:0] phase        // pixel-cycle phase counter
);

  always_ff @(posedge clk) begin
    if (!hdrive)      phase <= 3'd1;
    else if (!cblank) phase <= 3'd7;
    else              phase <= phase + 3'd1;
  end

  always_ff @(posedge clk) begin
    if (cblank && row_n_full && col_n_full) begin
      dram_cas_n <= (phase == 3'd7);
      dram_oe_n  <= !(phase inside {3'd1, 3'd2, 3'd3});
      old_en_n   <= (phase != 3'd2);
      a2d_n_oe   <= !(phase inside {3'd4, 3'd5, 3'd6, 3'd7});
      dram_we_n  <= (phase != 3'd6);
      final_en_n <= (phase != 3'd7);
    end else begin
      dram_cas_n <= 1'b1;
      dram_oe_n  <= 1'b1;
      old_en_n   <= 1'b1;
      a2d_n_oe   <= 1'b1;
      dram_we_n  <= 1'b1;
      final_en_n <= 1'b1;
    end
  end

endmodule
