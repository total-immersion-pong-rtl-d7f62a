// dram_model: behavioural model of the 256K x 8 fast-page-mode frame store
// (two 256K x 4 DRAMs side by side), sampled on the system clock.
//
// The row address is taken when /RAS falls and the column address when /CAS
// falls; while /OE is low the word at {row, column} is driven on rdata
// (0 otherwise); when /WE falls with /CAS low, wdata is written there.
// For checking, each write also reports the word it overwrote.
// Testbench-only model.
module dram_model (
  input  logic       clk,
  input  logic [8:0] addr,
  input  logic       ras_n,
  input  logic       cas_n,
  input  logic       oe_n,
  input  logic       we_n,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic [8:0] row,
  output logic [8:0] col,
  output logic       wrote,      // one-clock pulse per write
  output logic [7:0] old_word,   // word overwritten by that write
  output logic [7:0] new_word
);
  logic [7:0] mem [512][512];
  logic ras_q = 1, cas_q = 1, we_q = 1;

  initial begin
    for (int r = 0; r < 512; r++)
      for (int c = 0; c < 512; c++) mem[r][c] = 8'h00;
    row = 0; col = 0; wrote = 0;
  end

  always @(posedge clk) begin
    ras_q <= ras_n; cas_q <= cas_n; we_q <= we_n;
    wrote <= 1'b0;
    if (ras_q && !ras_n) row <= addr;
    if (cas_q && !cas_n) col <= addr;
    if (we_q && !we_n && !cas_n) begin
      old_word <= mem[row][col];
      new_word <= wdata;
      mem[row][col] <= wdata;
      wrote <= 1'b1;
    end
  end

  assign rdata = oe_n ? 8'h00 : mem[row][col];
endmodule
