// Self-checking test of dec8b10b: known code words, every byte and K28.x
// symbol produced by the package encoder function in a continuous stream,
// then a code that is in no table and a word with the wrong disparity.
module tb_dec8b10b;
  timeunit 1ns; timeprecision 1ps;
  import roc_qa_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [9:0] din;
  logic valid, kout, code_err, disp_err;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  dec8b10b dut (.*);
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

  task automatic put(input logic [9:0] c);
    din <= c; en <= 1'b1;
    @(posedge clk); en <= 1'b0; @(posedge clk); #0.1;
  endtask

  logic rd;
  logic [10:0] e;
  initial begin
    din = 0;
    @(posedge clk); @(posedge clk); rst <= 0; @(posedge clk);
    put(10'b0011111010);
    chk(dout == 8'hBC && kout && !code_err && !disp_err, "K28.5 RD-");
    put(10'b0110001011); chk(dout == 8'h00 && !kout && !code_err && !disp_err, "D.0.0 RD+");
    put(10'b1010101010); chk(dout == 8'hB5 && !kout && !code_err && !disp_err, "D.21.5");
    rd = 1'b1; // after D.0.0 RD+ and neutral D.21.5 the disparity is positive
    for (int pass = 0; pass < 3; pass++)
      for (int b = 0; b < 264; b++) begin
        logic [7:0] d; logic k;
        if (b < 256) begin d = 8'(b); k = 0; end
        else begin d = {3'(b - 256), 5'd28}; k = 1; end
        e = encode_8b10b(d, k, rd);
        rd = e[10];
        put(e[9:0]);
        chk(dout == d && kout == k && !code_err && !disp_err, $sformatf("decode %02x k%0d", d, k));
      end
    put(rd ? K28_5_RDN : K28_5_RDP); chk(disp_err, "K28.5 with the wrong disparity");
    put(10'b0000000000); chk(code_err, "all-zero word is no code");
    put(10'b1111100000); chk(code_err, "11111 run is no code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
