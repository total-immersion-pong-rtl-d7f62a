// tb_absdiff_datapath: runs pixel cycles through the difference datapath:
// the old pixel is put on the bus with old_en_n low, then the new pixel with
// final_en_n low; the registered output must be |new - old| computed by the
// testbench. Exhaustive over all 65536 pairs, plus checks that blanking
// clears the output and that the output holds while final_en_n is high.
module tb_absdiff_datapath;
  logic clk = 0;
  logic cblank, old_en_n, final_en_n;
  logic [7:0] data_bus, difference;
  int checks = 0, failures = 0;

  absdiff_datapath dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pixel(int oldv, int newv);
    int e;
    @(negedge clk); data_bus = 8'(oldv); old_en_n = 0; final_en_n = 1;
    @(negedge clk); data_bus = 8'(newv); old_en_n = 1; final_en_n = 0;
    @(negedge clk); final_en_n = 1; data_bus = 8'($urandom);
    e = (newv > oldv) ? newv - oldv : oldv - newv;
    checks++;
    if (difference !== 8'(e)) begin
      failures++;
      if (failures < 10) $display("old %0d new %0d: got %0d exp %0d", oldv, newv, difference, e);
    end
  endtask

  initial begin
    cblank = 1; old_en_n = 1; final_en_n = 1; data_bus = 0;
    for (int o = 0; o < 256; o++)
      for (int n = 0; n < 256; n++) pixel(o, n);
    // blanking clears
    pixel(10, 200);
    @(negedge clk); cblank = 0;
    @(negedge clk); cblank = 1;
    checks++;
    if (difference !== 8'd0) begin failures++; $display("blanking did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
