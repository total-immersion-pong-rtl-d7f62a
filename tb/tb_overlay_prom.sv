// tb_overlay_prom: reads every pixel of every frame back through the
// overlay addressing: for a pixel dx columns right and dy rows below the
// ball (dx = -8..7, dy = -16..15) the offsets are ~dx and ~dy, the PROM
// address is {frame, ~dy, (~dx)[7:3]} and bit (~dx)[2:0] of the byte must
// be image pixel (row dy + 16, column dx + 8). A few pixels are also
// checked against literal values of the first frame, and every address
// outside the image must read zero.
module tb_overlay_prom;
  import cube_sprites_pkg::*;
  logic [14:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  overlay_prom dut (.*);

  initial begin
    automatic int lit = 0;
    for (int f = 0; f < 4; f++)
      for (int dy = -16; dy < 16; dy++)
        for (int dx = -8; dx < 8; dx++) begin
          logic [7:0] cd, rd;
          bit expv;
          cd = ~8'(dx); rd = ~8'(dy);
          addr = {2'(f), rd, cd[7:3]};
          #1;
          expv = CUBE[f][dy + 16][15 - (dx + 8)];
          if (expv) lit++;
          checks++;
          if (data[cd[2:0]] !== expv) begin
            failures++;
            if (failures < 10) $display("frame %0d dx %0d dy %0d: %b exp %b", f, dx, dy, data[cd[2:0]], expv);
          end
        end
    // literal spot checks, frame 0: top row 0000000110000000, row 7 11000000 00000011
    begin
      logic [15:0] r0, r7;
      for (int c = 0; c < 16; c++) begin
        logic [7:0] cd;
        cd = ~8'(c - 8);
        addr = {2'd0, ~8'(-16), cd[7:3]}; #1; r0[15 - c] = data[cd[2:0]];
        addr = {2'd0, ~8'(-9), cd[7:3]};  #1; r7[15 - c] = data[cd[2:0]];
      end
      checks++;
      if (r0 !== 16'b0000000110000000 || r7 !== 16'b1100000000000011) begin
        failures++; $display("frame 0 rows %b %b", r0, r7);
      end
    end
    // outside the image
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] rd;
      logic [4:0] cb;
      rd = 8'($urandom); cb = 5'($urandom);
      addr = {2'($urandom), rd, cb};
      #1;
      if (!((~rd) < 16 || (~rd) >= 240) || !(cb == 5'd31 || cb == 5'd0)) begin
        checks++;
        if (data !== 8'h00) begin failures++; if (failures < 10) $display("nonzero outside %h", addr); end
      end
    end
    checks++;
    if (lit < 200) begin failures++; $display("images nearly empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
