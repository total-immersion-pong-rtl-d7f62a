// row_counter: line counter of the frame differencer.
//
// An eight-bit count of the lines of a field. In the original board it is
// clocked by HDRIVE; here it runs on the system clock and acts on the clock
// after HDRIVE rises (hdrive_rise, detected by the caller). At that moment a
// low VDRIVE clears the count, otherwise the count advances. n_full is set
// by the clear and falls at the line edge where the count equals LIMIT
// (250). The nine-bit row address is the count with the ODD/EVEN field flag
// as its low bit, so the two interlaced fields of a frame land on even and
// odd DRAM rows and a whole frame is stored.
module row_counter
  import tip_pkg::*;
#(
  parameter int unsigned LIMIT = ROW_LIMIT
) (
  input  logic       clk,
  input  logic       hdrive_rise, // one-clock pulse after HDRIVE rises
  input  logic       vdrive,      // field drive, low at the start of a field
  input  logic       oddeven,     // field flag from the sync generator
  output logic [7:0] count,       // line number within the field
  output logic [8:0] row_addr,    // {count, oddeven}
  output logic       n_full       // low once the count passed LIMIT
);

  always_ff @(posedge clk) begin
    if (hdrive_rise) begin
      if (!vdrive) begin
        count  <= '0;
        n_full <= 1'b1;
      end else begin
        count <= count + 8'd1;
        if (count == 8'(LIMIT)) n_full <= 1'b0;
      end
    end
  end

  assign row_addr = {count, oddeven};

endmodule
