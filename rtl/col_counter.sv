// col_counter: column (pixel) counter of the frame differencer.
//
// A nine-bit counter, cleared on every clock while CBLANK is low (it is
// wired to both the clear and the output enable of the original part) and
// advanced by one on each clock in which cnt_en_n is low; the controller
// pulls cnt_en_n low for one clock per pixel. n_full is registered: it is
// set high by the clear and falls in the clock after the count equals
// COL_LIMIT (180), which tells the controller the line is done.
// The count is an output; the address-bus multiplexing (the original's
// tri-state output enable) is done where the bus is formed.
module col_counter
  import tip_pkg::*;
#(
  parameter int unsigned LIMIT = COL_LIMIT
) (
  input  logic       clk,
  input  logic       clr_n,     // clear (CBLANK)
  input  logic       cnt_en_n,  // count enable, active low
  output logic [8:0] count,
  output logic       n_full     // low once the count passed LIMIT
);

  always_ff @(posedge clk) begin
    if (!clr_n)          count <= '0;
    else if (!cnt_en_n)  count <= count + 9'd1;

    if (!clr_n)                        n_full <= 1'b1;
    else if (count == 9'(LIMIT))       n_full <= 1'b0;
  end

endmodule
