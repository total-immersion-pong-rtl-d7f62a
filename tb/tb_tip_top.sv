// tb_tip_top: end-to-end run of the whole game at full size.
//
// A sync-generator model makes NTSC-like line and field timing, a DRAM
// model holds the previous frame, and the testbench plays the camera: a
// flat grey picture with a noisy low bit, plus (in "play" phases) a square
// of pixels around the ball that flips between dark and bright from frame
// to frame, i.e. a player moving at the ball. In "miss" phases there is no
// motion, so the ball runs off the screen.
//
// Checked on every pixel: the difference stream equals |new - old| for the
// word the DRAM model overwrote; the output equals the difference XORed with
// the cube image pixel expected at the pixel's offset from the ball; the
// difference is zero in blanking; the scores count the win edges. Rates:
// every visible line stores 179 pixels, and the animation image changes
// every 8 fields. Bus rules, every clock: the DRAM and the ADC never drive
// the data bus together, and a write happens only with /CAS low while the
// ADC drives the bus. Each
// mechanism must occur at least once: serve hit, bounce in a bounce
// segment, wall bounce, loss, score change, animation frame change, column
// and row "full", and the overlay actually drawn. The run stops once three
// bounces, a loss and a wall bounce have been seen after field 20, or after
// 600 fields, or as soon as 1000 failures have been counted. The top is used at its defaults; the sync timing and the
// camera picture are this testbench's own.
module tb_tip_top;
  import cube_sprites_pkg::*;

  logic clk = 0;
  logic rst_n;
  logic hdrive, vdrive, cblank, oddeven, sync_clk;
  logic [7:0] adc_data;
  logic a2d_clk;
  logic [8:0] dram_addr;
  logic dram_ras_n, dram_cas_n, dram_oe_n, dram_we_n;
  logic [7:0] dram_wdata, dram_rdata, video_out;
  logic win1, win2;
  logic [3:0] score1, score2;
  logic [7:0] ballx, bally, difference;
  logic reverse, vrandomize;
  logic [1:0] vx, vy;
  logic [3:0] anim_count;
  int field, line;

  logic [8:0] mrow, mcol;
  logic wrote;
  logic [7:0] old_word, new_word;

  int checks = 0, failures = 0;

  tip_top dut (.*);

  sync_gen_model u_sync (.clk, .hdrive, .vdrive, .cblank, .oddeven, .field, .line);

  dram_model u_dram (
    .clk, .addr(dram_addr), .ras_n(dram_ras_n), .cas_n(dram_cas_n), .oe_n(dram_oe_n),
    .we_n(dram_we_n), .wdata(dram_wdata), .rdata(dram_rdata),
    .row(mrow), .col(mcol), .wrote, .old_word, .new_word
  );

  always #5 clk = ~clk;

  localparam int MAX_FIELDS = 600;
  // The column counter's flag falls one clock after the count reaches 180,
  // which is during the 180th pixel and before its write: 179 pixels of
  // each line are stored and differenced.
  localparam int PIXELS_PER_LINE = 179;
  localparam int ANIM_FIELDS = 8;

  initial begin
    repeat (MAX_FIELDS * 480000 + 1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- camera ----------------
  bit play = 1;
  int bx_snap, by_snap;
  logic a2d_q = 1;
  always @(posedge clk) begin
    a2d_q <= a2d_clk;
    if (a2d_q && !a2d_clk) begin
      int r, c;
      logic [7:0] v;
      r = int'(mrow[8:1]);
      c = int'(dram_addr[8:1]);
      v = 8'h40 | 8'($urandom_range(0, 1));
      if (play && c >= bx_snap - 6 && c <= bx_snap + 6 && r >= by_snap - 6 && r <= by_snap + 6)
        v = ((field / 2) % 2 != 0) ? 8'h60 : 8'h00;
      adc_data <= v;
    end
  end

  // ball position is frozen per field for the camera
  logic oe_q;
  always @(posedge clk) begin
    oe_q <= oddeven;
    if (oe_q != oddeven) begin bx_snap = int'(ballx); by_snap = int'(bally); end
  end

  // ---------------- checks ----------------
  bit wrote_q;
  logic [7:0] exp_diff_q;
  int n_serve = 0, n_bounce = 0, n_loss = 0, n_score = 0, n_anim = 0;
  int n_colfull = 0, n_rowfull = 0, n_drawn = 0, n_diffchk = 0, n_wall = 0;
  logic rev_q = 0, w1_q = 0, w2_q = 0, cf_q = 1, rf_q = 1;
  logic [1:0] anim_q = 0;
  int e1 = 0, e2 = 0;
  int last_by = 128, last_dir = 0;

  function automatic bit cube_pixel(int f, int dx, int dy);
    if (dx < -8 || dx > 7 || dy < -16 || dy > 15) return 0;
    return CUBE[f][dy + 16][15 - (dx + 8)];
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // difference pipeline
      if (wrote_q) begin
        int e;
        e = (new_word > old_word) ? int'(new_word) - int'(old_word) : int'(old_word) - int'(new_word);
        checks++; n_diffchk++;
        if (difference !== 8'(e)) begin
          failures++;
          if (failures < 10) $display("diff %0d exp %0d (old %0d new %0d) field %0d line %0d",
                                      difference, e, old_word, new_word, field, line);
        end
      end
      wrote_q <= wrote;
      // bus rules: one driver on the data bus at a time; a write only
      // inside a column access and while the ADC drives the new pixel
      checks++;
      if ((!dram_oe_n && !a2d_clk) || (!dram_we_n && (dram_cas_n || a2d_clk))) begin
        failures++;
        if (failures < 10) $display("bus rule broken: oe %b a2d %b we %b cas %b",
                                    dram_oe_n, a2d_clk, dram_we_n, dram_cas_n);
      end
      // overlay
      if (cblank) begin
        bit b;
        int dx, dy;
        // offsets wrap modulo 256, as the eight-bit adders do
        dx = int'(signed'(8'(dram_addr[8:1] - ballx)));
        dy = int'(signed'(8'(dut.u_offset.row - bally)));
        b = cube_pixel(int'(anim_count[3:2]), dx, dy);
        checks++;
        if (video_out !== (b ? ~difference : difference)) begin
          failures++;
          if (failures < 10) $display("overlay wrong dx %0d dy %0d", dx, dy);
        end
        if (b) n_drawn++;
      end
      // mechanisms
      if (reverse && !rev_q) begin
        if (vx == 0) n_serve++; else n_bounce++;
      end
      if (win1 && !w1_q) begin n_loss++; e1 = (e1 + 1) % 16; end
      if (win2 && !w2_q) begin n_loss++; e2 = (e2 + 1) % 16; end
      if (anim_count[3:2] != anim_q) n_anim++;
      if (!dut.u_col.n_full && cf_q) n_colfull++;
      if (!dut.u_row.n_full && rf_q) n_rowfull++;
    end
    rev_q <= reverse; w1_q <= win1; w2_q <= win2; anim_q <= anim_count[3:2];
    cf_q <= dut.u_col.n_full; rf_q <= dut.u_row.n_full;
  end

  // pixel rate: frame-store writes per visible line
  int line_writes = 0, n_lines_checked = 0;
  always @(posedge clk) if (wrote) line_writes++;

  // animation rate: one image change every 8 fields (4 counts of a
  // once-per-frame counter)
  int last_anim_field = -1, n_anim_rate = 0;
  always @(posedge clk) if (rst_n && anim_count[3:2] != anim_q) begin
    if (last_anim_field >= 0) begin
      checks++; n_anim_rate++;
      if (field - last_anim_field != ANIM_FIELDS) begin
        failures++;
        if (failures < 10) $display("animation step after %0d fields", field - last_anim_field);
      end
    end
    last_anim_field = field;
  end

  always @(negedge hdrive) begin
    if (rst_n && field > 1 && line_writes != 0) begin
      checks++; n_lines_checked++;
      if (line_writes != PIXELS_PER_LINE) begin
        failures++;
        if (failures < 10) $display("%0d pixels in line %0d", line_writes, line);
      end
    end
    line_writes = 0;
  end

  // blanking zero check and scores, once per line start
  always @(negedge hdrive) if (rst_n && field > 1) begin
    checks++;
    if (difference !== 8'h00) begin failures++; $display("difference not blanked"); end
    checks++;
    if (score1 !== 4'(e1) || score2 !== 4'(e2)) begin
      failures++;
      if (failures < 10) $display("score %0d %0d exp %0d %0d", score1, score2, e1, e2);
    end
  end

  // wall bounces: the vertical direction of bally reverses without a hit
  always @(posedge oddeven or negedge oddeven) if (rst_n) begin
    int d;
    d = (int'(bally) > last_by) ? 1 : (int'(bally) < last_by) ? -1 : 0;
    if (d != 0 && last_dir != 0 && d != last_dir && !vrandomize && vy != 0 &&
        (bally < 8 || bally > 247)) n_wall++;
    if (d != 0) last_dir = d;
    last_by = int'(bally);
  end

  initial begin
    int losses_at_miss;
    rst_n = 0;
    repeat (20) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // two frames to fill the frame store, then play
    play = 1;
    while (field < MAX_FIELDS) begin
      @(posedge oddeven or negedge oddeven);
      // switch to a miss phase after three bounces, back to play after a loss
      if (play && n_bounce >= 3 * (n_loss + 1)) begin
        play = 0; losses_at_miss = n_loss;
      end else if (!play && n_loss > losses_at_miss) play = 1;
      if (n_bounce >= 3 && n_loss >= 1 && n_wall >= 1 && field > 20) break;
      if (failures >= 1000) break;  // clearly broken: stop early
    end
    $display("fields %0d: serve hits %0d, bounces %0d, losses %0d, wall bounces %0d, anim changes %0d",
             field, n_serve, n_bounce, n_loss, n_wall, n_anim);
    $display("col full %0d, row full %0d, overlay pixels %0d, difference checks %0d, scores %0d:%0d",
             n_colfull, n_rowfull, n_drawn, n_diffchk, score1, score2);
    checks += 8;  // one per mechanism below
    if (n_serve == 0)   begin failures++; $display("no serve hit"); end
    if (n_bounce == 0)  begin failures++; $display("no bounce"); end
    if (n_loss == 0)    begin failures++; $display("no loss"); end
    if (e1 + e2 == 0)   begin failures++; $display("no score"); end
    if (n_anim == 0)    begin failures++; $display("no animation"); end
    if (n_colfull == 0 || n_rowfull == 0) begin failures++; $display("counters never full"); end
    if (n_drawn == 0)   begin failures++; $display("overlay never drawn"); end
    if (n_diffchk == 0) begin failures++; $display("no pixel differenced"); end
    checks++;
    if (n_wall == 0)    begin failures++; $display("no wall bounce"); end
    checks += 2;
    if (n_lines_checked == 0) begin failures++; $display("no line checked"); end
    if (n_anim_rate == 0)     begin failures++; $display("animation rate never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
