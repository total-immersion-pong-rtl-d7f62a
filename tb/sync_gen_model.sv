// sync_gen_model: behavioural timing model of the video sync generator.
//
// Produces HDRIVE, VDRIVE, CBLANK and ODD/EVEN on the system clock with
// NTSC-like proportions: a line of LINE_CLKS system clocks (63.5 us at
// 28.636 MHz), HDRIVE low for the first HDRIVE_CLKS, CBLANK high from
// BLANK_CLKS to BLANK_CLKS + ACTIVE_CLKS, fields of 263 and 262 lines with
// VDRIVE low for the first VDRIVE_LINES lines and CBLANK held low for the
// first VBLANK_LINES lines. ODD/EVEN flips at the start of every field.
// Testbench-only model; not synthesizable intent.
module sync_gen_model #(
  parameter int LINE_CLKS    = 1820,
  parameter int HDRIVE_CLKS  = 134,
  parameter int BLANK_CLKS   = 300,
  parameter int ACTIVE_CLKS  = 1480,
  parameter int VDRIVE_LINES = 9,
  parameter int VBLANK_LINES = 20
) (
  input  logic clk,
  output logic hdrive,
  output logic vdrive,
  output logic cblank,
  output logic oddeven,
  output int   field,
  output int   line
);
  int hpos = 0;
  initial begin
    oddeven = 0; field = 0; line = 0;
  end

  always @(posedge clk) begin
    int lines_in_field;
    lines_in_field = oddeven ? 262 : 263;
    if (hpos == LINE_CLKS - 1) begin
      hpos <= 0;
      if (line == lines_in_field - 1) begin
        line <= 0; field <= field + 1; oddeven <= !oddeven;
      end else line <= line + 1;
    end else hpos <= hpos + 1;
  end

  always_comb begin
    hdrive = !(hpos < HDRIVE_CLKS);
    vdrive = !(line < VDRIVE_LINES);
    cblank = (line >= VBLANK_LINES) && (hpos >= BLANK_CLKS) && (hpos < BLANK_CLKS + ACTIVE_CLKS);
  end
endmodule
