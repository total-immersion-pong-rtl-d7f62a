// tb_overlay_output: the animation counter must advance on each falling
// edge of ODD/EVEN; the PROM address must be {counter[3:2], rowdiff,
// coldiff[7:3]}; and the output must be the difference XORed with bit
// coldiff[2:0] of the PROM byte.
//
// ODD/EVEN, offsets, PROM bytes and the difference are random; the PROM is
// not instantiated, its byte is driven directly, so only this block's
// address wiring, bit select and XOR are checked, one clock at a time.
module tb_overlay_output;
  logic clk = 0;
  logic rst_n, oddeven;
  logic [7:0] coldiff, rowdiff, prom_data, difference, video_out;
  logic [14:0] prom_addr;
  logic overlay_bit;
  logic [3:0] anim_count;
  int checks = 0, failures = 0;

  overlay_output dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ecount = 0, wraps = 0, inverted = 0;
    automatic bit prev_oe = 0;
    rst_n = 0; oddeven = 0; coldiff = 0; rowdiff = 0; prom_data = 0; difference = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      bit b;
      @(negedge clk);
      if (i % 50 == 0) oddeven = !oddeven;
      coldiff = 8'($urandom); rowdiff = 8'($urandom);
      prom_data = 8'($urandom); difference = 8'($urandom);
      @(posedge clk);
      if (prev_oe && !oddeven) begin ecount = (ecount + 1) % 16; if (ecount == 0) wraps++; end
      prev_oe = oddeven;
      #1;
      b = prom_data[coldiff % 8];
      if (b) inverted++;
      checks++;
      if (anim_count !== 4'(ecount) || prom_addr !== {2'(ecount / 4), rowdiff, coldiff[7:3]} ||
          video_out !== (b ? ~difference : difference)) begin
        failures++;
        if (failures < 10) $display("i %0d count %0d/%0d addr %h out %h", i, anim_count, ecount, prom_addr, video_out);
      end
    end
    checks++;
    if (wraps == 0 || inverted == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
