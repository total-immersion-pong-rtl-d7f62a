// tip_top: motion-controlled ("total immersion") pong, digital part.
//
// Two players stand in front of a camera; the game bounces a ball off
// anything that moves. The digitised camera picture is compared, pixel by
// pixel, with the same pixel one frame earlier (kept in an external DRAM);
// the absolute difference is the output picture, so moving things show up
// bright. When the ball's position coincides with a bright difference pixel
// while the ball is near a player's edge, the ball bounces. A small image
// of a turning cube is XORed into the output at the ball position.
//
// Blocks (all on the one system clock, nominally 28.636 MHz):
//   diff_clkgen      sync-generator clock (clk/2), DRAM /RAS, HDRIVE edge
//   row_counter      line counter -> DRAM row address {line, odd/even}
//   col_counter      pixel counter -> DRAM column address {column, 0}
//   diff_ctrl        eight-clock pixel cycle: DRAM read, ADC read, write back
//   absdiff_datapath |new - old| with one adder, blanked to 0
//   pos_comparator   x2, ball spot versus current pixel
//   pong_rules       ball state, bounce, lose, win outputs
//   score_counter    four-bit scores of both players
//   overlay_offset   ball - pixel offsets, latched line number
//   overlay_prom     cube image table
//   overlay_output   animation counter, pixel select, XOR into the stream
//
// External parts are reached through ports: the sync generator (hdrive,
// vdrive, cblank, oddeven in; sync_clk out), the ADC (adc_data in; a2d_clk
// out, which is both its clock and its output enable), two 256K x 4 DRAMs
// used as one 256K x 8 frame store (multiplexed nine-bit address,
// /RAS, /CAS, /OE, /WE, write and read data), the DAC (video_out) and the
// score displays and LEDs.
//
// The board's shared tri-state address and data buses become multiplexers
// here: the address bus carries the row address while CBLANK is low and the
// column address while it is high (as the two counters' output enables did);
// the data bus carries DRAM read data while /OE is low, the ADC output while
// the ADC is enabled, and 0 otherwise. dram_wdata is the data bus.
// The rules block is stepped on the rising edge of the ADC clock, once per
// active pixel, as in the original where that signal clocked the CPLD.
//
// Some block outputs are left open here on purpose: the line count, the
// controller phase, the selected overlay bit and the logical ball position
// are for observation in simulation, and column count bit 8 is not wired
// to the address bus, as on the original board.
module tip_top
  import tip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,        // game reset switch, active low
  // sync generator
  input  logic        hdrive,
  input  logic        vdrive,
  input  logic        cblank,
  input  logic        oddeven,
  output logic        sync_clk,
  // ADC
  input  logic [7:0]  adc_data,
  output logic        a2d_clk,
  // frame store DRAM
  output logic [8:0]  dram_addr,
  output logic        dram_ras_n,
  output logic        dram_cas_n,
  output logic        dram_oe_n,
  output logic        dram_we_n,
  output logic [7:0]  dram_wdata,
  input  logic [7:0]  dram_rdata,
  // video out to the DAC
  output logic [7:0]  video_out,
  // game state
  output logic        win1,
  output logic        win2,
  output logic [3:0]  score1,
  output logic [3:0]  score2,
  output logic [7:0]  ballx,
  output logic [7:0]  bally,
  output logic [7:0]  difference,
  output logic        reverse,
  output logic        vrandomize,
  output logic [1:0]  vx,
  output logic [1:0]  vy,
  output logic [3:0]  anim_count
);

  logic       hdrive_rise;
  logic [7:0] line_count;
  logic [8:0] row_addr;
  logic       row_n_full;
  logic [8:0] col_count;
  logic       col_n_full;
  logic       old_en_n, final_en_n, a2d_n_oe;
  logic [2:0] phase;
  logic [7:0] data_bus;
  logic       a2d_q, tick, diff_strobe;
  logic       col_eq, row_eq;
  logic [7:0] row_latched, coldiff, rowdiff;
  logic [14:0] prom_addr;
  logic [7:0] prom_data;
  logic       overlay_bit;
  logic [8:0] x_logical, y_logical;

  // ---------------- frame differencer ----------------
  diff_clkgen u_clkgen (
    .clk, .rst_n, .hdrive,
    .sync_clk, .ras_n(dram_ras_n), .hdrive_rise
  );

  row_counter u_row (
    .clk, .hdrive_rise, .vdrive, .oddeven,
    .count(line_count), .row_addr, .n_full(row_n_full)
  );

  col_counter u_col (
    .clk, .clr_n(cblank), .cnt_en_n(old_en_n),
    .count(col_count), .n_full(col_n_full)
  );

  diff_ctrl u_ctrl (
    .clk, .hdrive, .cblank, .row_n_full, .col_n_full,
    .dram_cas_n, .dram_oe_n, .dram_we_n, .a2d_n_oe,
    .old_en_n, .final_en_n, .phase
  );

  // Shared address bus: row address in blanking, {column, 0} otherwise.
  assign dram_addr = cblank ? {col_count[7:0], 1'b0} : row_addr;

  // Shared data bus.
  always_comb begin
    if (!dram_oe_n)     data_bus = dram_rdata;
    else if (!a2d_n_oe) data_bus = adc_data;
    else                data_bus = 8'h00;
  end
  assign dram_wdata = data_bus;
  assign a2d_clk    = a2d_n_oe;

  absdiff_datapath u_absdiff (
    .clk, .cblank, .old_en_n, .final_en_n, .data_bus, .difference
  );

  // ---------------- pong rules ----------------
  always_ff @(posedge clk) a2d_q <= a2d_n_oe;
  assign tick        = a2d_n_oe && !a2d_q;
  assign diff_strobe = !a2d_n_oe && a2d_q;

  pos_comparator #(.MASK_LEFT_EDGE(1'b1)) u_col_cmp (
    .pixel(dram_addr[8:1]), .ball(ballx), .equal(col_eq)
  );

  pos_comparator #(.MASK_LEFT_EDGE(1'b0)) u_row_cmp (
    .pixel(row_latched), .ball(bally), .equal(row_eq)
  );

  pong_rules u_pong (
    .clk, .rst_n, .tick, .diff_strobe, .oddeven,
    .random_in(adc_data[0]),
    .col_eq_ballx(col_eq), .row_eq_bally(row_eq),
    .diff(difference[DIFF_BIT]),
    .ballx, .bally, .win1, .win2, .reverse, .vrandomize,
    .x_logical, .y_logical, .vx, .vy
  );

  score_counter u_score (
    .clk, .rst_n, .win1, .win2, .score1, .score2
  );

  // ---------------- bitmap overlay ----------------
  overlay_offset u_offset (
    .clk, .cblank, .ras_n(dram_ras_n), .addr(dram_addr),
    .ballx, .bally, .row(row_latched), .coldiff, .rowdiff
  );

  overlay_prom u_prom (
    .addr(prom_addr), .data(prom_data)
  );

  overlay_output u_out (
    .clk, .rst_n, .oddeven, .coldiff, .rowdiff, .prom_data, .difference,
    .prom_addr, .overlay_bit, .video_out, .anim_count
  );

endmodule
