// score_counter: the two players' four-bit score counters.
//
// Each counter advances by one, wrapping after 15, on the rising edge of its
// player's win signal (the original used 74LS393 ripple counters clocked by
// the inverted win signals, i.e. on the same edge). Edges of win1/win2 are
// detected on the system clock, so a count appears one clock after the edge.
// The game reset clears both through one flip-flop, so the clear starts one
// clock after rst_n falls and ends one clock after it rises. On the original
// board that flip-flop was clocked by the ADC clock, which stops during
// blanking; here it runs on every system clock so that a short reset is never
// lost (this design's choice).
module score_counter (
  input  logic       clk,
  input  logic       rst_n,  // game reset, active low
  input  logic       win1,
  input  logic       win2,
  output logic [3:0] score1,
  output logic [3:0] score2
);

  logic clr;
  logic win1_q, win2_q;

  always_ff @(posedge clk) begin
    clr <= !rst_n;
  end

  always_ff @(posedge clk) begin
    win1_q <= win1;
    win2_q <= win2;
    if (clr) begin
      score1 <= '0;
      score2 <= '0;
    end else begin
      if (win1 && !win1_q) score1 <= score1 + 4'd1;
      if (win2 && !win2_q) score2 <= score2 + 4'd1;
    end
  end

endmodule
