// absdiff_datapath: absolute value of the frame difference of one pixel.
//
// The old pixel (read from the frame store) is inverted and registered when
// old_en_n is low. An eight-bit adder adds it to the new pixel on the bus:
//   new + ~old = new - old - 1 + 256.
// If the carry out is set (new > old) the low eight bits plus one give
// new - old; if it is clear (new <= old) their inversion gives old - new.
// The result is registered when final_en_n is low, and the register is
// forced to zero on every clock while CBLANK is low so the output stream is
// black during blanking. All of this follows the original datapath; it takes
// one adder and an incrementer, with no subtractor or comparator.
module absdiff_datapath (
  input  logic       clk,
  input  logic       cblank,      // low during blanking: clear the output
  input  logic       old_en_n,    // latch the old pixel from the bus
  input  logic       final_en_n,  // latch the difference
  input  logic [7:0] data_bus,    // old pixel when old_en_n, new pixel otherwise
  output logic [7:0] difference
);

  logic [7:0] old_inv;
  logic [8:0] dsum;
  logic [7:0] absval;

  always_ff @(posedge clk) begin
    if (!old_en_n) old_inv <= ~data_bus;
  end

  always_comb begin
    dsum   = {1'b0, data_bus} + {1'b0, old_inv};
    absval = dsum[8] ? dsum[7:0] + 8'd1 : ~dsum[7:0];
  end

  always_ff @(posedge clk) begin
    if (!cblank)          difference <= '0;
    else if (!final_en_n) difference <= absval;
  end

endmodule
