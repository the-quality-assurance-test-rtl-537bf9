// Self-checking test of comma_aligner. An 8b10b stream (idle commas, then
// counting data bytes) is shifted in two bits per cycle after a random
// number of junk bits, so the symbol boundary falls at any bit offset. The
// aligner must lock and then deliver exactly the encoded symbols. A stream
// with single commas separated by data must not lock.
module tb_comma_aligner;
  timeunit 1ns; timeprecision 1ps;
  import roc_qa_pkg::*;
  logic clk = 0, rst = 1, realign = 0;
  logic [1:0] din;
  logic [9:0] sym;
  logic sym_valid, locked;
  int checks = 0, failures = 0;
  comma_aligner dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bits [$];
  logic [9:0] codes [$];

  task automatic build(input int skew, input bit single_commas);
    logic rd; logic [10:0] e;
    bits.delete(); codes.delete(); rd = 0;
    for (int i = 0; i < skew; i++) bits.push_back(1'($urandom));
    for (int n = 0; n < 300; n++) begin
      logic [7:0] d; logic k;
      if (single_commas) begin k = (n % 2 == 0); d = k ? K28_5 : 8'(n); end
      else begin k = (n < 6); d = k ? K28_5 : 8'(n); end
      e = encode_8b10b(d, k, rd); rd = e[10];
      codes.push_back(e[9:0]);
      for (int b = 9; b >= 0; b--) bits.push_back(e[b]);
    end
  endtask

  task automatic run(input int skew, input bit expect_lock);
    int idx, matched, first;
    realign <= 1; @(posedge clk); realign <= 0;
    idx = 0; matched = 0; first = -1;
    while (bits.size() >= 2) begin
      din <= {bits[0], bits[1]};
      void'(bits.pop_front()); void'(bits.pop_front());
      @(posedge clk); #0.1;
      if (sym_valid) begin
        if (first < 0) begin
          for (int i = 0; i < codes.size(); i++) if (codes[i] == sym && i >= 1) begin first = i; break; end
          idx = first;
        end
        if (idx >= 0 && idx < codes.size() && sym == codes[idx]) matched++;
        else if (expect_lock) begin failures++; $display("FAIL skew %0d symbol %0d", skew, idx); end
        idx++;
      end
    end
    checks++;
    if (expect_lock && !(locked && matched > 250)) begin
      failures++; $display("FAIL skew %0d locked %0d matched %0d", skew, locked, matched);
    end
    if (!expect_lock && locked) begin failures++; $display("FAIL locked on single commas"); end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int s = 0; s < 20; s++) begin
      build(s, 0);
      run(s, 1);
    end
    build(3, 1);
    run(3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
