// tb_row_counter: checks the line counter: clear by VDRIVE at a line start,
// one count per line start, the row address {count, odd/even}, and the
// registered "full" flag falling at the line start where the count is 250.
//
// The line-start pulse hdrive_rise is driven directly, one clock in four;
// fields of 262 and 263 lines have VDRIVE low for their first three lines,
// and ODD/EVEN toggles per field. A model updates the expected count and
// flag at each pulse and all outputs are checked after every clock edge.
module tb_row_counter;
  logic clk = 0;
  logic hdrive_rise, vdrive, oddeven;
  logic [7:0] count;
  logic [8:0] row_addr;
  logic n_full;
  int checks = 0, failures = 0;
  int exp_count;
  bit exp_full;
  int full_seen = 0;

  row_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit rise, bit vd, bit oe);
    @(negedge clk);
    hdrive_rise = rise; vdrive = vd; oddeven = oe;
    @(posedge clk); #1;
    if (rise) begin
      if (!vd) begin exp_count = 0; exp_full = 1; end
      else begin
        if (exp_count == 250) exp_full = 0;
        exp_count = (exp_count + 1) % 256;
      end
    end
    checks++;
    if (count !== 8'(exp_count) || n_full !== exp_full || row_addr !== {8'(exp_count), oe}) begin
      failures++;
      if (failures < 10) $display("count %0d/%0d full %b/%b addr %h", count, exp_count, n_full, exp_full, row_addr);
    end
    if (!n_full) full_seen++;
  endtask

  initial begin
    automatic bit oe = 0;
    // first field start establishes the state
    step(1, 0, oe);
    exp_count = 0; exp_full = 1;
    for (int field = 0; field < 4; field++) begin
      for (int l = 0; l < 262 + (field % 2); l++) begin
        step(1, !(l < 3), oe);
        repeat (3) step(0, !(l < 3), oe);
      end
      oe = !oe;
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
