// Self-checking test of oca_assembler. Packets in the checked format are
// built here (content from an independent copy of the content formula) and
// fed byte by byte with idle commas between them. Clean packets must raise
// no flag; then one packet each with a wrong parity bit, checksum, length,
// content byte, BCID, an unexpected packet, a stray control symbol and an
// encoding error must raise exactly its own flag.
module tb_oca_assembler;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, byte_valid = 0, k_i = 0, code_err = 0, disp_err = 0;
  logic exp_push = 0, ecr = 0;
  logic [7:0] byte_i;
  logic [11:0] exp_bcid;
  logic [7:0] err;
  logic [15:0] err_count, l1_count;
  logic [31:0] hit_count;
  int checks = 0, failures = 0;
  oca_assembler dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (err=%b)", what, err); end
  endtask

  function automatic logic [7:0] ref_hit(int ch, int bcid, int idx);
    int v;
    v = (bcid & 255) ^ (((bcid >> 8) & 15) * 17) ^ ((idx * 29) & 255) ^ ((ch * 71) & 255);
    return 8'(v ^ 8'h5A);
  endfunction

  task automatic put(input logic [7:0] b, input logic k, input bit cerr = 0);
    byte_i <= b; k_i <= k; code_err <= cerr; byte_valid <= 1;
    @(posedge clk); #0.1;
    byte_valid <= 0; code_err <= 0;
    @(posedge clk); #0.1;
  endtask

  int l1id = 0;
  // kind: 0 good, 1 parity, 2 checksum, 3 length, 4 content, 5 bcid,
  //       6 no trigger, 7 stray K, 8 encoding
  task automatic packet(input int kind, input int bcid, input int n0, input int n1);
    logic [7:0] b [$];
    logic [7:0] cs;
    int idx0 = 0, idx1 = 0;
    if (kind != 6) begin
      exp_bcid <= 12'(bcid); exp_push <= 1; @(posedge clk); #0.1; exp_push <= 0;
    end
    b.push_back(8'(l1id));
    b.push_back(8'(bcid >> 8));
    b.push_back(8'((kind == 5) ? bcid + 1 : bcid));
    b.push_back(8'(n0 + n1 + ((kind == 3) ? 1 : 0)));
    for (int i = 0; i < n0 + n1; i++) begin
      int ch; logic [7:0] d;
      ch = (i < n0) ? 2 : 3;
      d = ref_hit(ch, bcid, (i < n0) ? idx0 : idx1);
      if (i < n0) idx0++; else idx1++;
      if (kind == 4 && i == 1) d = d ^ 8'h10;
      b.push_back({(^d) ^ (kind == 1 && i == 0), 4'd0, 3'(ch)});
      if (kind == 4 && i == 1) b[b.size() - 1][7] = ^d;
      b.push_back(d);
    end
    cs = 0;
    foreach (b[i]) cs ^= b[i];
    b.push_back((kind == 2) ? ~cs : cs);
    put(8'hBC, 1);
    put(8'h1C, 1);
    foreach (b[i]) begin
      if (kind == 7 && i == 2) put(8'hFC, 1);
      else put(b[i], 0, (kind == 8 && i == 3));
    end
    put(8'h9C, 1);
    put(8'hBC, 1);
    if (kind != 6) l1id++;
  endtask

  initial begin
    byte_i = 0; exp_bcid = 0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk); #0.1;
    for (int i = 0; i < 50; i++) packet(0, $urandom % 3564, $urandom % 5, $urandom % 5);
    chk(err == 0 && err_count == 0, "clean packets give no error");
    chk(l1_count == 50, "50 packets counted");
    for (int kind = 1; kind <= 8; kind++) begin
      logic [7:0] want;
      rst <= 1; @(posedge clk); #0.1; rst <= 0; l1id = 0; @(posedge clk); #0.1;
      packet(0, 100, 2, 2);
      packet(kind, 200 + kind, 3, 2);
      case (kind)
        1: want = 8'b0000_0100;
        2: want = 8'b0000_1000;
        3: want = 8'b0001_0000;
        4: want = 8'b0010_0000;
        5: want = 8'b0100_0000;
        6: want = 8'b1000_0000;
        7: want = 8'b0000_0010;
        default: want = 8'b0000_0001;
      endcase
      chk((err & want) == want, $sformatf("kind %0d flagged", kind));
      chk((err & ~want) == 0 || kind == 6 || kind == 7 || kind == 3 || kind == 5,
          $sformatf("kind %0d raises only its own flag", kind));
    end
    // ECR restarts the L1ID count
    rst <= 1; @(posedge clk); #0.1; rst <= 0; l1id = 0; @(posedge clk); #0.1;
    packet(0, 5, 1, 1); packet(0, 6, 1, 1);
    ecr <= 1; @(posedge clk); #0.1; ecr <= 0; l1id = 0;
    packet(0, 7, 1, 1);
    chk(err == 0, "ECR restarts L1ID");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
