// tb_diff_ctrl: checks the pixel-cycle controller against a reference table.
//
// Drives line starts (HDRIVE low), blanking and active periods, and the two
// "full" flags. A reference phase counter and strobe table, written here as
// an expected-low-phase list per strobe, predicts every output one clock
// after its phase. Also checks that the pixel rate is one per eight clocks
// (difference-register strobes exactly eight clocks apart) and that all
// strobes stay high while blanked or once a counter is full.
module tb_diff_ctrl;
  logic clk = 0;
  logic hdrive, cblank, row_n_full, col_n_full;
  logic dram_cas_n, dram_oe_n, dram_we_n, a2d_n_oe, old_en_n, final_en_n;
  logic [2:0] phase;
  int checks = 0, failures = 0;

  diff_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_phase;
  logic [5:0] exp_n;   // {cas, oe, old, a2d, we, final}, active low
  bit gate;

  function automatic logic [5:0] table_for(int p);
    logic [5:0] r;
    r[5] = !(p != 7);
    r[4] = !(p >= 1 && p <= 3);
    r[3] = !(p == 2);
    r[2] = !(p >= 4);
    r[1] = !(p == 6);
    r[0] = !(p == 7);
    return ~r;  // r holds "asserted"; outputs are active low
  endfunction

  int last_final = -1, cyc = 0, gap_checks = 0;
  always @(posedge clk) begin
    cyc++;
    // Outputs now reflect phase/flags sampled at the previous edge.
    if (cyc > 2) begin
      checks++;
      if ({dram_cas_n, dram_oe_n, old_en_n, a2d_n_oe, dram_we_n, final_en_n} !== exp_n) begin
        failures++;
        if (failures < 10) $display("strobe mismatch cyc %0d: got %b exp %b", cyc,
          {dram_cas_n, dram_oe_n, old_en_n, a2d_n_oe, dram_we_n, final_en_n}, exp_n);
      end
      checks++;
      if (phase !== 3'(ref_phase)) begin
        failures++;
        if (failures < 10) $display("phase mismatch cyc %0d: %0d vs %0d", cyc, phase, ref_phase);
      end
    end
    if (!final_en_n) begin
      if (last_final >= 0) begin
        checks++; gap_checks++;
        if (cyc - last_final != 8) begin
          failures++; $display("pixel period %0d", cyc - last_final);
        end
      end
      last_final = cyc;
    end
    if (!cblank) last_final = -1;
    // reference model for the next edge
    gate = cblank && row_n_full && col_n_full;
    exp_n = gate ? ~table_for(ref_phase) : 6'b111111;
    if (!hdrive)      ref_phase = 1;
    else if (!cblank) ref_phase = 7;
    else              ref_phase = (ref_phase + 1) % 8;
  end

  task automatic line(int active, bit rf, bit cf);
    @(negedge clk); hdrive = 0; cblank = 0;
    repeat (3) @(negedge clk);
    hdrive = 1;
    repeat (5) @(negedge clk);
    row_n_full = rf; col_n_full = cf;
    cblank = 1;
    repeat (active) @(negedge clk);
    cblank = 0;
  endtask

  initial begin
    hdrive = 0; cblank = 0; row_n_full = 1; col_n_full = 1;
    repeat (4) @(negedge clk);
    hdrive = 1;
    line(200, 1, 1);
    line(97, 1, 1);
    line(64, 0, 1);
    line(64, 1, 0);
    line(123, 1, 1);
    repeat (5) @(negedge clk);
    if (gap_checks < 20) begin failures++; $display("too few pixel periods seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
