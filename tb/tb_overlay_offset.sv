// tb_overlay_offset: the line number must be taken from address bits 8:1
// when /RAS rises during blanking (and not otherwise), and the offsets must
// equal ball - pixel - 1 modulo 256 for the column on the bus and the
// latched line.
//
// Stimulus is random CBLANK, /RAS, address and ball values, one set per
// clock; the expected line number is tracked by a model of the /RAS rising
// edge detected on the system clock (the line is registered at the clock edge that sees /RAS high after it
// was low, with CBLANK low).
module tb_overlay_offset;
  logic clk = 0;
  logic cblank, ras_n;
  logic [8:0] addr;
  logic [7:0] ballx, bally, row, coldiff, rowdiff;
  int checks = 0, failures = 0;
  int exp_row;
  bit prev_ras;

  overlay_offset dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int latches = 0;
    cblank = 0; ras_n = 1; addr = 9'h004; ballx = 0; bally = 0;
    repeat (2) @(negedge clk);
    ras_n = 0;
    @(negedge clk); ras_n = 1;
    @(negedge clk);
    exp_row = 2; prev_ras = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      cblank = ($urandom_range(0, 3) != 0);
      ras_n  = 1'($urandom);
      addr   = 9'($urandom);
      ballx  = 8'($urandom); bally = 8'($urandom);
      @(posedge clk);
      if (!cblank && ras_n && !prev_ras) begin exp_row = int'(addr[8:1]); latches++; end
      prev_ras = ras_n;
      #1;
      checks++;
      if (row !== 8'(exp_row) || coldiff !== 8'(int'(ballx) - int'(addr[8:1]) - 1) ||
          rowdiff !== 8'(int'(bally) - exp_row - 1)) begin
        failures++;
        if (failures < 10) $display("i %0d row %h/%h col %h row %h", i, row, exp_row, coldiff, rowdiff);
      end
    end
    checks++;
    if (latches == 0) begin failures++; $display("no latch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
