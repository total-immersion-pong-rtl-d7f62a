// tb_col_counter: checks the column counter's clear, count enable and the
// timing of its registered "full" flag (low from the clock after the count
// reaches 180, and set again by the clear).
//
// Stimulus: lines of 170, 190 and 210 pixels with one count enable every
// eight clocks (as the pixel cycle gives it), each followed by a few clocks
// of clear with random count enables. A counter model predicts count and
// n_full after every clock edge. The limit of 180 is the original's; the
// stimulus is this testbench's own.
module tb_col_counter;
  logic clk = 0;
  logic clr_n, cnt_en_n;
  logic [8:0] count;
  logic n_full;
  int checks = 0, failures = 0;
  int exp_count;
  bit exp_full;

  col_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (count !== 9'(exp_count) || n_full !== exp_full) begin
      failures++;
      if (failures < 10) $display("count %0d/%0d full %b/%b", count, exp_count, n_full, exp_full);
    end
  endtask

  // One clock: apply inputs at negedge, predict, check after the edge.
  task automatic step(bit clr, bit en);
    @(negedge clk);
    clr_n = clr; cnt_en_n = !en;
    @(posedge clk); #1;
    if (!clr) begin exp_full = 1; end
    else if (exp_count == 180) exp_full = 0;
    if (!clr) exp_count = 0;
    else if (en) exp_count = (exp_count + 1) % 512;
    check();
  endtask

  int seen_full = 0;
  initial begin
    exp_count = 0; exp_full = 1;
    step(0, 0);
    // a line: one count every 8 clocks, past the limit
    for (int line = 0; line < 3; line++) begin
      for (int p = 0; p < 8 * (170 + 20 * line); p++) begin
        step(1, (p % 8) == 3);
        if (!n_full) seen_full++;
      end
      repeat (5) step(0, 1'($urandom_range(0, 1)));
    end
    // random enables
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 99) != 0, 1'($urandom_range(0, 1)));
    checks++;
    if (seen_full == 0) begin failures++; $display("full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
