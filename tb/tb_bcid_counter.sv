// Self-checking test of bcid_counter: wrap after 3564 bunch crossings,
// bunch counter reset, and the free-running time stamp.
module tb_bcid_counter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, bc_stb = 0, bcr = 0, orbit_start;
  logic [11:0] bcid;
  logic [15:0] bc_time;
  int checks = 0, failures = 0;
  bcid_counter dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_bcid, exp_time;
    repeat (3) @(posedge clk); rst <= 0;
    exp_bcid = 0; exp_time = 0;
    for (int n = 0; n < 9000; n++) begin
      bit s, r;
      s = ($urandom % 3) != 0;
      r = (n == 5000);
      bc_stb <= s; bcr <= r;
      @(posedge clk); #0.1;
      if (s) begin
        exp_time = (exp_time + 1) % 65536;
        exp_bcid = (r || exp_bcid == 3563) ? 0 : exp_bcid + 1;
      end
      checks++;
      if (bcid != 12'(exp_bcid) || bc_time != 16'(exp_time) || orbit_start != (exp_bcid == 0)) begin
        failures++; $display("FAIL n=%0d bcid %0d exp %0d", n, bcid, exp_bcid);
      end
    end
    bc_stb <= 0; bcr <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
