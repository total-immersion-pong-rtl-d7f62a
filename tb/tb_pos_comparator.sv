// tb_pos_comparator: exhaustive check of both comparator variants: equal
// when bits 7:1 match, and for the column variant never while pixel[7:1]
// is zero (the left screen edge).
//
// Both parameter settings are instantiated; all 65536 (pixel, ball) pairs
// are applied and the combinational output is checked after a short delay.
module tb_pos_comparator;
  logic [7:0] pixel, ball;
  logic eq_col, eq_row;
  int checks = 0, failures = 0;

  pos_comparator #(.MASK_LEFT_EDGE(1'b1)) u_col (.pixel, .ball, .equal(eq_col));
  pos_comparator #(.MASK_LEFT_EDGE(1'b0)) u_row (.pixel, .ball, .equal(eq_row));

  initial begin
    for (int p = 0; p < 256; p++)
      for (int b = 0; b < 256; b++) begin
        bit er, ec;
        pixel = 8'(p); ball = 8'(b);
        #1;
        er = (p / 2) == (b / 2);
        ec = er && (p >= 2);
        checks += 2;
        if (eq_row !== er) begin failures++; if (failures < 10) $display("row %0d %0d", p, b); end
        if (eq_col !== ec) begin failures++; if (failures < 10) $display("col %0d %0d", p, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
