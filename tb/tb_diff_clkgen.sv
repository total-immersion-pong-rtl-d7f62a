// tb_diff_clkgen: checks the divide-by-two sync clock, the one-clock delayed
// inverted HDRIVE used as /RAS, and the HDRIVE rising-edge pulse.
//
// HDRIVE is a random level sequence changed between clock edges. After each
// edge: sync_clk must have toggled (from its reset value) and ras_n must be
// the HDRIVE sampled at that edge, inverted. Between edges: hdrive_rise
// must be high exactly while HDRIVE is high but was low at the last edge.
module tb_diff_clkgen;
  logic clk = 0;
  logic rst_n, hdrive;
  logic sync_clk, ras_n, hdrive_rise;
  int checks = 0, failures = 0;
  bit prev_h, exp_sync;

  diff_clkgen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int toggles = 0;
    rst_n = 0; hdrive = 1;
    @(negedge clk); @(negedge clk);
    rst_n = 1; prev_h = 1; exp_sync = 1;  // one edge passes before the loop
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      hdrive = ($urandom_range(0, 9) != 0) ? prev_h ^ ($urandom_range(0, 7) == 0) : !prev_h;
      #1;
      checks++;
      if (hdrive_rise !== (hdrive && !prev_h)) begin
        failures++; $display("edge pulse wrong at %0d", i);
      end
      @(posedge clk); #1;
      exp_sync = !exp_sync;
      checks++;
      if (ras_n !== !hdrive || sync_clk !== exp_sync) begin
        failures++; $display("ras/sync wrong at %0d", i);
      end
      prev_h = hdrive;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
