// Self-checking test of sroc_sync_checker: counters within the tolerance
// keep desync low, one counter falling behind by more than TOL sets it.
module tb_sroc_sync_checker;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, desync;
  logic [3:0][15:0] cnt;
  logic [15:0] max_skew;
  int checks = 0, failures = 0;
  sroc_sync_checker #(.N(4), .TOL(8)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt = '0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 1000; i++) begin
      for (int s = 0; s < 4; s++) cnt[s] = 16'(65000 + i * 3 - ($urandom % 8));  // wraps
      @(posedge clk); #0.1;
      checks++; if (desync) begin failures++; $display("FAIL desync within tolerance"); end
    end
    checks++; if (max_skew > 7 || max_skew == 0) begin failures++; $display("FAIL max_skew %0d", max_skew); end
    cnt[2] = cnt[0] - 16'd9;
    @(posedge clk); #0.1; @(posedge clk); #0.1;
    checks++; if (!desync || max_skew != 9) begin failures++; $display("FAIL desync not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
