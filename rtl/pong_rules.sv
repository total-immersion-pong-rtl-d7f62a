// pong_rules: ball state machine of the motion-controlled pong game.
//
// The ball is kept as two nine-bit "logical" accumulators that only ever
// count upwards; the direction of travel is folded into the top bits:
//
//  * y: bit 8 is the vertical direction. The screen row is y[7:0] XORed
//    with y[8], so when y[7:0] wraps past 0xFF the screen row turns around,
//    which is the bounce off the top and bottom edge.
//  * x: bits 8:6 split the range into eight segments. In segments 0..3
//    (x[8]=0, ball moving right) the screen column is x[7:0]-64; in
//    segments 4..7 (x[8]=1, moving left) it is ~x[7:0]. Segments 3 and 7
//    are bounce segments, 0 and 4 are lose segments.
//
// Once per field (on each change of ODD/EVEN) x advances by vx and y by vy.
// When the two position comparators and the motion bit of the difference
// stream are all true on one pixel, and the ball is in a bounce segment or
// at rest (vx = 0), the hit is recorded: at the next field change x jumps to
// ~x + 64 (the same screen column, opposite direction, out of the bounce
// segment), vx and vy take random values and y's direction is flipped when
// a third random bit is set. When x reaches a lose segment (or on reset),
// win1/win2 report which side scored, the ball is placed at rest at the
// centre with a random direction, and it waits for a hit.
//
// Random bits come from the low bit of the ADC output, shifted into two
// small registers; the vx register only accepts a new bit when its value
// would stay non-zero, so a moving ball never has vx = 0.
//
// Timing: the state advances on clocks with tick high (the rising edge of
// the ADC clock, once per active pixel). The motion bit is sampled on
// clocks with diff_strobe high (the falling edge of the ADC clock) and used
// at the next tick, as the original did with the opposite clock edge.
// random_in is sampled every tick, and a shift step alternates between the
// vx and vy registers.
//
// Follows the original CPLD design. The screen mapping of x follows the
// written description and the x-encoding diagram (x-64 for x[8]=0); the
// printed program listing has the two cases swapped, which only mirrors the
// field left to right. Resetting the random registers is this design's
// choice so that simulation starts from a known state.
module pong_rules
  import tip_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,        // game reset, active low
  input  logic       tick,         // one pixel step
  input  logic       diff_strobe,  // sample the motion bit
  input  logic       oddeven,      // field flag; each change is one game step
  input  logic       random_in,    // noise bit (ADC output bit 0)
  input  logic       col_eq_ballx, // pixel column matches ball x
  input  logic       row_eq_bally, // pixel row matches ball y
  input  logic       diff,         // motion bit of the difference stream
  output logic [7:0] ballx,        // ball screen column
  output logic [7:0] bally,        // ball screen row
  output logic       win1,         // ball left through segment 4 (right side)
  output logic       win2,         // ball left through segment 0 (left side)
  output logic       reverse,      // bounce pending for the next field
  output logic       vrandomize,   // velocity randomisation pending
  output logic [8:0] x_logical,
  output logic [8:0] y_logical,
  output logic [1:0] vx,
  output logic [1:0] vy
);

  logic       latched_diff;
  logic       old_oddeven;
  logic       phase2;
  logic [1:0] random_vx;
  logic [2:0] random_vy;
  logic [8:0] x, y;

  assign x_logical = x;
  assign y_logical = y;

  // Logical to screen coordinates.
  assign ballx = x[8] ? ~x[7:0] : x[7:0] - 8'd64;
  assign bally = y[7:0] ^ {8{y[8]}};

  always_ff @(posedge clk) begin
    if (diff_strobe) latched_diff <= diff;
  end

  // Random bit accumulators.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase2    <= 1'b0;
      random_vx <= 2'b01;
      random_vy <= 3'b000;
    end else if (tick) begin
      phase2 <= !phase2;
      if (!phase2) begin
        if (random_vx[0] || random_in) random_vx <= {random_vx[0], random_in};
      end else begin
        random_vy <= {random_vy[1:0], random_in};
      end
    end
  end

  // Ball state.
  always_ff @(posedge clk) begin
    if (!rst_n || (tick && x[7:6] == SEG_LOSE)) begin
      win1        <= x[8];
      win2        <= !x[8];
      x           <= X_SERVE;
      reverse     <= random_vy[1];
      vrandomize  <= 1'b0;
      y           <= {random_vy[0], Y_SERVE};
      old_oddeven <= !oddeven;
      vx          <= 2'b00;
      vy          <= 2'b00;
    end else if (tick) begin
      old_oddeven <= oddeven;
      if (old_oddeven != oddeven) begin
        if (reverse) x <= ~x + BOUNCE_OFFSET;
        else         x <= x + {7'd0, vx};
        if (vrandomize) begin
          if (random_vy[2]) y <= ~y;
          vx <= random_vx;
          vy <= random_vy[1:0];
        end else begin
          y <= y + {7'd0, vy};
        end
        reverse    <= 1'b0;
        vrandomize <= 1'b0;
      end else if (col_eq_ballx && row_eq_bally && latched_diff) begin
        if (vx == 2'b00 || x[7:6] == SEG_BOUNCE) begin
          win1       <= 1'b0;
          win2       <= 1'b0;
          reverse    <= 1'b1;
          vrandomize <= 1'b1;
        end
      end
    end
  end

endmodule
