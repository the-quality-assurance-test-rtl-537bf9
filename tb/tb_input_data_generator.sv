// Self-checking test of input_data_generator (channel 5). L0 events with
// known BCIDs are queued; every packet on the byte stream is parsed and
// checked: format, BCID order, length, hit content (recomputed here from the
// content formula), constant size, the share of empty packets, and the
// queue overflow flag when events come faster than packets can be sent.
module tb_input_data_generator;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, sym_stb = 0, l0_stb = 0;
  logic [11:0] l0_bcid;
  logic [1:0] empty_sel, size_sel;
  logic const_size, k_o, overflow;
  logic [7:0] byte_o;
  logic [31:0] pkt_count, empty_count;
  int checks = 0, failures = 0;
  input_data_generator #(.CH(5), .QDEPTH(16)) dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] ref_hit(int ch, int bcid, int idx);
    int v;
    v = (bcid & 255) ^ (((bcid >> 8) & 15) * 17) ^ ((idx * 29) & 255) ^ ((ch * 71) & 255);
    return 8'(v ^ 8'h5A);
  endfunction

  // symbol slot every 5 cycles
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sym_stb <= (cyc % 5 == 4);
  end

  // stream parser
  int st = 0, n, got, nempty = 0, npkt = 0, sizes_sum = 0;
  logic [11:0] bc, exp_q [$];
  bit size_const_ok = 1; int want_size = -1;
  bit parse_on = 1;
  always @(posedge clk) if (!rst && sym_stb && parse_on) begin
    #0.1;
    case (st)
      0: if (k_o && byte_o == 8'h1C) st = 1;
         else chk(k_o && byte_o == 8'hBC, "idle is K28.5");
      1: begin chk(!k_o && byte_o[7:4] == 0, "BCID high"); bc[11:8] = byte_o[3:0]; st = 2; end
      2: begin bc[7:0] = byte_o; st = 3;
           chk(exp_q.size() > 0 && exp_q[0] == bc, "BCID in event order");
           if (exp_q.size() > 0) void'(exp_q.pop_front());
         end
      3: begin n = byte_o; got = 0; st = (n == 0) ? 5 : 4;
           if (n == 0) nempty++;
           sizes_sum += n;
           if (want_size >= 0 && n != 0 && n != want_size) size_const_ok = 0;
         end
      4: begin chk(!k_o && byte_o == ref_hit(5, bc, got), "hit content"); got++;
           if (got == n) st = 5; end
      5: begin chk(k_o && byte_o == 8'h9C, "K28.4 after the hits"); npkt++; st = 0; end
    endcase
  end

  task automatic l0(input logic [11:0] b);
    l0_bcid <= b; l0_stb <= 1; exp_q.push_back(b);
    @(posedge clk); l0_stb <= 0;
  endtask

  initial begin
    empty_sel = 0; size_sel = 1; const_size = 0; l0_bcid = 0;
    repeat (3) @(posedge clk); rst <= 0;
    // random sizes, no empty packets: mean 4
    for (int i = 0; i < 400; i++) begin l0(12'(i * 7 + 3)); repeat (200) @(posedge clk); end
    repeat (500) @(posedge clk);
    chk(npkt == 400 && nempty == 0, "400 packets, none empty");
    chk(sizes_sum > 400 * 4 * 85 / 100 && sizes_sum < 400 * 4 * 115 / 100, $sformatf("mean size 4 (sum %0d)", sizes_sum));
    // 75 % empty, constant size 16
    npkt = 0; nempty = 0; sizes_sum = 0; empty_sel = 3; size_sel = 3; const_size = 1; want_size = 16;
    for (int i = 0; i < 400; i++) begin l0(12'(3563 - i)); repeat (200) @(posedge clk); end
    repeat (500) @(posedge clk);
    chk(npkt == 400, "400 more packets");
    chk(nempty > 260 && nempty < 340, $sformatf("about 75%% empty (%0d)", nempty));
    chk(size_const_ok, "constant size");
    chk(pkt_count == 800 && empty_count == 32'(nempty), "packet counters");
    chk(!overflow, "no overflow at low rate");
    // events back to back: the 16-deep queue must overflow
    empty_sel = 0;
    parse_on = 0;
    l0_stb <= 1; l0_bcid <= 12'd7;
    repeat (40) @(posedge clk);
    l0_stb <= 0; #0.1;
    chk(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
