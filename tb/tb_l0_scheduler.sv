// Self-checking test of l0_scheduler: exact event counts in constant mode
// for every frequency step (the rate check), the average rate in random
// mode, the burst shape in burst mode, and no events when disabled.
module tb_l0_scheduler;
  timeunit 1ns; timeprecision 1ps;
  import roc_qa_pkg::*;
  logic clk = 0, rst = 1, enable = 0, bc_stb = 0, l0_stb;
  logic [3:0] freq_sel;
  l0_mode_e mode;
  logic [31:0] l0_count;
  int checks = 0, failures = 0;
  l0_scheduler #(.BURST_LEN(8)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int events, run, runs_ok, runs_bad;
  // one bunch crossing = one bc_stb every 8 cycles
  task automatic run_bcs(input int n);
    events = 0; run = 0; runs_ok = 0; runs_bad = 0;
    for (int i = 0; i < n; i++) begin
      bc_stb <= 1; @(posedge clk); bc_stb <= 0;
      #0.1; if (l0_stb) begin events++; run++; end
      else if (run != 0) begin if (run % 8 == 0) runs_ok++; else runs_bad++; run = 0; end
      repeat (7) @(posedge clk);
    end
  endtask

  initial begin
    freq_sel = 0; mode = L0_CONSTANT;
    repeat (3) @(posedge clk); rst <= 0;
    run_bcs(1000); checks++; if (events != 0) begin failures++; $display("FAIL events while disabled"); end
    enable <= 1;
    for (int f = 1; f <= 14; f++) begin
      freq_sel <= 4'(f); mode <= L0_CONSTANT;
      rst <= 1; @(posedge clk); rst <= 0;
      run_bcs(4000);   // 100 us: f x 10 events
      checks++;
      if (events != f * 10) begin failures++; $display("FAIL constant f=%0d events %0d", f, events); end
    end
    freq_sel <= 14; mode <= L0_RANDOM;
    run_bcs(40000);   // 1 ms at 1400 kHz: 1400 expected
    checks++;
    if (events < 1260 || events > 1540) begin failures++; $display("FAIL random events %0d", events); end
    freq_sel <= 10; mode <= L0_BURST;
    rst <= 1; @(posedge clk); rst <= 0;
    run_bcs(40010);   // 1 ms at 1000 kHz: 1000 events in bursts of 8
    checks++;
    if (events != 1000) begin failures++; $display("FAIL burst events %0d", events); end
    checks++;
    if (runs_bad != 0 || runs_ok == 0) begin failures++; $display("FAIL burst shape ok %0d bad %0d", runs_ok, runs_bad); end
    checks++;
    if (l0_count != 32'(events)) begin failures++; $display("FAIL l0_count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
