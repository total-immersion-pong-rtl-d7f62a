// tb_score_counter: drives random win levels and short resets for 20000
// clocks. A model checked every clock expects each rising edge of a win
// signal to add one (mod 16) to that player's score one clock later, and a
// reset to clear both from one clock after rst_n falls until one clock after
// it rises. The score must also wrap past 15 at least once.
module tb_score_counter;
  logic clk = 0;
  logic rst_n, win1, win2;
  logic [3:0] score1, score2;
  int checks = 0, failures = 0;
  int e1, e2;
  bit p1, p2, clr_m;

  score_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int wraps = 0;
    rst_n = 0; win1 = 0; win2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; e1 = 0; e2 = 0; p1 = 0; p2 = 0; clr_m = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 19) == 0) win1 = !win1;
      if ($urandom_range(0, 19) == 0) win2 = !win2;
      rst_n = !(i % 5000 > 4990);
      @(posedge clk);
      // model
      if (clr_m) begin e1 = 0; e2 = 0; end
      else begin
        if (win1 && !p1) begin e1 = (e1 + 1) % 16; if (e1 == 0) wraps++; end
        if (win2 && !p2) e2 = (e2 + 1) % 16;
      end
      clr_m = !rst_n;
      p1 = win1; p2 = win2;
      #1;
      checks++;
      if (score1 !== 4'(e1) || score2 !== 4'(e2)) begin
        failures++;
        if (failures < 10) $display("i %0d: scores %0d %0d exp %0d %0d", i, score1, score2, e1, e2);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("score never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
