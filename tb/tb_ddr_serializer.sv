// Self-checking test of ddr_serializer: random 10-bit symbols loaded every
// 5 cycles must reappear bit for bit, MSB first, two bits per cycle.
module tb_ddr_serializer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, load = 0;
  logic [9:0] sym;
  logic [1:0] dq;
  int checks = 0, failures = 0;
  ddr_serializer #(.W(10)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] sent [$];
  initial begin
    logic [9:0] got, exp;
    sym = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      exp = 10'($urandom);
      sym <= exp; load <= 1'b1;
      @(posedge clk); load <= 1'b0;
      for (int c = 0; c < 5; c++) begin
        #0.1;
        got[9 - 2*c] = dq[1];
        got[8 - 2*c] = dq[0];
        if (c < 4) @(posedge clk);
      end
      checks++;
      if (got != exp) begin failures++; $display("FAIL sent %b got %b", exp, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
