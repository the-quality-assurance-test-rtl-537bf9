// Self-checking test of enc8b10b: known code words, then every data byte and
// the K28.x symbols in sequence, checking sub-block disparity, running
// disparity, run length (at most 5 equal bits) and that no two data bytes
// share a code word at the same disparity.
module tb_enc8b10b;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, en = 0, kin = 0, rd_o;
  logic [7:0] din;
  logic [9:0] dout;
  int checks = 0, failures = 0;
  enc8b10b dut (.*);
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

  task automatic send(input logic [7:0] d, input logic k);
    din <= d; kin <= k; en <= 1'b1;
    @(posedge clk); en <= 1'b0; #0.1;
  endtask

  logic [9:0] seen_n [256];
  logic [9:0] prev;
  logic       rd_model;
  int ones, run, maxrun;

  initial begin
    din = 0;
    @(posedge clk); @(posedge clk); rst <= 0; @(posedge clk);
    // known words (RD- start)
    send(8'h00, 0); chk(dout == 10'b1001110100, "D.0.0 RD-");
    send(8'hBC, 1); chk(dout == 10'b0011111010, "K28.5 RD-");
    send(8'h00, 0); chk(dout == 10'b0110001011, "D.0.0 RD+");
    send(8'hBC, 1); chk(dout == 10'b1100000101, "K28.5 RD+");
    send(8'hB5, 0); chk(dout == 10'b1010101010, "D.21.5");
    send(8'h4A, 0); chk(dout == 10'b0101010101, "D.10.2");
    send(8'h3C, 1); chk(dout == 10'b0011111001, "K28.1 RD-");
    send(8'h3C, 1); chk(dout == 10'b1100000110, "K28.1 RD+");
    // sweep all bytes twice (so that both disparities are visited)
    rd_model = rd_o; prev = dout; maxrun = 0; run = 1;
    for (int pass = 0; pass < 4; pass++) begin
      for (int b = 0; b < 264; b++) begin
        logic [7:0] d; logic k;
        if (b < 256) begin d = 8'(b); k = 0; end
        else begin d = {3'(b - 256), 5'd28}; k = 1; end
        send(d, k);
        ones = $countones(dout);
        chk(ones == 4 || ones == 5 || ones == 6, "disparity");
        chk($countones(dout[9:4]) inside {2, 3, 4} && $countones(dout[3:0]) inside {1, 2, 3}, "sub-block disparity");
        if (ones == 6) chk(rd_model == 1'b0, "+2 word only from RD-");
        if (ones == 4) chk(rd_model == 1'b1, "-2 word only from RD+");
        if (ones != 5) rd_model = ~rd_model;
        chk(rd_o == rd_model, "running disparity");
        for (int i = 9; i >= 0; i--) begin
          if ((i == 9 ? prev[0] : dout[i + 1]) == dout[i]) run++; else run = 1;
          if (run > maxrun) maxrun = run;
        end
        prev = dout;
        if (pass == 0 && b < 256) seen_n[b] = dout;
      end
    end
    chk(maxrun <= 5, "run length <= 5");
    for (int a = 0; a < 256; a++)
      for (int c = a + 1; c < 256; c++)
        if (seen_n[a] == seen_n[c]) chk(0, "duplicate code");
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
