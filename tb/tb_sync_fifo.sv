// Self-checking test of sync_fifo against a queue model: random pushes and
// pops, head value, empty/full/count, and the sticky overflow flag.
module tb_sync_fifo;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [7:0] din, dout;
  logic empty, full, overflow;
  logic [4:0] count;
  int checks = 0, failures = 0;
  sync_fifo #(.W(8), .DEPTH(16)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] q [$];
  bit ovf_model = 0;
  initial begin
    din = 0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #0.1;
    for (int n = 0; n < 4000; n++) begin
      bit p, o;
      p = ($urandom % 100) < (((n / 1000) % 2) != 0 ? 70 : 35);
      o = ($urandom % 100) < 50;
      chk(empty == (q.size() == 0) && full == (q.size() == 16) && count == 5'(q.size()), $sformatf("flags n=%0d cnt %0d model %0d", n, count, q.size()));
      if (q.size() > 0) chk(dout == q[0], "head");
      push <= p; pop <= o; din <= 8'($urandom);
      @(posedge clk); #0.1;
      begin
        bit was_full, was_empty;
        was_full = (q.size() == 16); was_empty = (q.size() == 0);
        if (p && was_full) ovf_model = 1;
        if (o && !was_empty) void'(q.pop_front());
        if (p && !was_full) q.push_back(din);
      end
    end
    push <= 0; pop <= 0;
    chk(ovf_model == overflow && ovf_model, "overflow seen and flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
