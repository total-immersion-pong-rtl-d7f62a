// tb_pong_rules: checks the ball state machine against a reference model.
//
// The model keeps the ball as two positions in 0..511 and works out the
// screen position the way the encoding is described: x below 256 is
// travelling right and shown at x - 64, x from 256 up is travelling left
// and shown at 511 - x; likewise y below 256 falls and is shown at y, and y
// from 256 rises and is shown at 511 - y. Hits, bounces, losses and the
// random velocity pick are modelled step by step from the rules. Stimulus:
// a pixel tick every four clocks, field flips every 40 ticks, a random
// noise bit, and phases with frequent and with no motion at the ball.
// Each kind of event (serve hit, bounce in a bounce segment, loss at each
// side, wall bounce, ball movement) must happen at least once.
module tb_pong_rules;
  logic clk = 0;
  logic rst_n, tick, diff_strobe, oddeven, random_in, col_eq_ballx, row_eq_bally, diff;
  logic [7:0] ballx, bally;
  logic win1, win2, reverse, vrandomize;
  logic [8:0] x_logical, y_logical;
  logic [1:0] vx, vy;
  int checks = 0, failures = 0;

  pong_rules dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int mx, my, mvx, mvy, mrvx, mrvy;
  bit mrev, mvr, mw1, mw2, mold, mph, mldiff;
  int n_serve_hit = 0, n_bounce = 0, n_lose1 = 0, n_lose2 = 0, n_wall = 0, n_move = 0;

  function automatic int scr_x(int x);
    return (x < 256) ? (x - 64) & 255 : 511 - x;
  endfunction
  function automatic int scr_y(int y);
    return (y < 256) ? y : 511 - y;
  endfunction

  // Model one clock edge given the inputs sampled at it.
  task automatic model_edge(bit rst, bit tk, bit ds, bit oe, bit rin, bit ce, bit re, bit df);
    int nrvx = mrvx, nrvy = mrvy;
    bit nph = mph;
    int seg = (mx / 64) % 4;
    if (ds) mldiff_next = df;
    if (rst) begin
      nph = 0; nrvx = 1; nrvy = 0;
    end else if (tk) begin
      nph = !mph;
      if (!mph) begin
        if ((mrvx & 1) != 0 || rin) nrvx = ((mrvx & 1) << 1) | int'(rin);
      end else nrvy = ((mrvy << 1) & 6) | int'(rin);
    end
    if (rst || (tk && seg == 0)) begin
      if (!rst) begin if (mx >= 256) n_lose1++; else n_lose2++; end
      mw1 = mx >= 256; mw2 = mx < 256;
      mx = 'h09A; mrev = ((mrvy >> 1) & 1) != 0; mvr = 0;
      my = ((mrvy & 1) << 8) | 'h80; mold = !oe; mvx = 0; mvy = 0;
    end else if (tk) begin
      if (mold != oe) begin
        int oldy = my;
        if (mrev) mx = (511 - mx + 64) % 512;
        else begin mx = (mx + mvx) % 512; if (mvx != 0) n_move++; end
        if (mvr) begin
          if ((mrvy & 4) != 0) my = 511 - my;
          mvx = mrvx; mvy = mrvy & 3;
        end else begin
          my = (my + mvy) % 512;
          if ((oldy < 256) != (my < 256)) n_wall++;
        end
        mrev = 0; mvr = 0;
      end else if (ce && re && mldiff) begin
        if (mvx == 0 || seg == 3) begin
          if (mvx == 0) n_serve_hit++; else n_bounce++;
          mw1 = 0; mw2 = 0; mrev = 1; mvr = 1;
        end
      end
      mold = oe;
    end
    mrvx = nrvx; mrvy = nrvy; mph = nph;
    mldiff = mldiff_next;
  endtask
  bit mldiff_next;

  task automatic compare();
    checks++;
    if (x_logical !== 9'(mx) || y_logical !== 9'(my) || vx !== 2'(mvx) || vy !== 2'(mvy) ||
        reverse !== mrev || vrandomize !== mvr || win1 !== mw1 || win2 !== mw2 ||
        ballx !== 8'(scr_x(mx)) || bally !== 8'(scr_y(my))) begin
      failures++;
      if (failures < 10)
        $display("mismatch t=%0t: x %h/%h y %h/%h v %0d%0d/%0d%0d rev %b/%b vr %b/%b win %b%b/%b%b bx %h by %h",
          $time, x_logical, mx, y_logical, my, vx, vy, mvx, mvy, reverse, mrev, vrandomize, mvr,
          win1, win2, mw1, mw2, ballx, bally);
    end
  endtask

  int hit_pct = 30;
  int cyc = 0;
  initial begin
    rst_n = 0; tick = 0; diff_strobe = 0; oddeven = 0; random_in = 0;
    col_eq_ballx = 0; row_eq_bally = 0; diff = 0;
    mldiff = 0; mldiff_next = 0; mx = 0; my = 0; mrvx = 1; mrvy = 0; mph = 0;
    for (int i = 0; i < 400000; i++) begin
      @(negedge clk);
      cyc++;
      rst_n = !(i < 3 || i == 200000);
      tick = (i % 4) == 0;
      diff_strobe = (i % 4) == 2;
      if (i % 160 == 0) oddeven = !oddeven;
      random_in = 1'($urandom);
      // phases: lots of motion, then none (the ball is lost), repeated
      hit_pct = ((i / 25000) % 2 == 0) ? 40 : 0;
      col_eq_ballx = ($urandom_range(0, 99) < 70);
      row_eq_bally = ($urandom_range(0, 99) < 70);
      diff = ($urandom_range(0, 99) < hit_pct);
      @(posedge clk);
      model_edge(!rst_n, tick, diff_strobe, oddeven, random_in, col_eq_ballx, row_eq_bally, diff);
      #1;
      if (i >= 3) compare();
    end
    $display("serve hits %0d bounces %0d losses %0d/%0d wall bounces %0d moves %0d",
             n_serve_hit, n_bounce, n_lose1, n_lose2, n_wall, n_move);
    checks += 6;
    if (n_serve_hit == 0) begin failures++; $display("no serve hit"); end
    if (n_bounce == 0)    begin failures++; $display("no bounce"); end
    if (n_lose1 == 0)     begin failures++; $display("no loss on the right"); end
    if (n_lose2 == 0)     begin failures++; $display("no loss on the left"); end
    if (n_wall == 0)      begin failures++; $display("no wall bounce"); end
    if (n_move == 0)      begin failures++; $display("ball never moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
