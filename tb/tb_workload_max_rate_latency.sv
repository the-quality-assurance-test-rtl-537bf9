// Workload test of qa_tester_top at its default parameters: the most
// demanding corner of the configurable ranges, L0 events at 1400 kHz with
// the maximum L1 latency of 300 us, first with random spacing and then with
// the fixed bursts (non-empty packets of mean size 4 hits, which keeps the
// output links below saturation). About 420 events
// wait for their L1A at any time, so the 512-entry latency FIFO must hold
// them without overflow. The test checks the peak FIFO occupancy, that every
// L0 event got exactly one L1A at the right latency, that every SROC checker
// saw one clean packet per trigger, and that no generator queue overflowed.
module tb_workload_max_rate_latency;
  timeunit 1ns; timeprecision 1ps;
  import roc_qa_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0][1:0] roc_in_dq;
  logic roc_ttc, roc_bc_clk;
  logic [3:0][1:0] roc_out_dq;
  logic [31:0] dut_ctrl;
  logic [31:0] s_axi_awaddr = 0, s_axi_wdata = 0, s_axi_araddr = 0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready, s_axi_bvalid, s_axi_bready = 1;
  logic s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 1;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [1:0] i2c_scl_oe, i2c_sda_oe, i2c_scl_i, i2c_sda_i, slv_sda_oe;
  int latency_bc = 300 * 40;
  bit corrupt = 0;
  int checks = 0, failures = 0;

  qa_tester_top dut (.*);
  roc_model roc (.clk, .rst, .in_dq(roc_in_dq), .ttc(roc_ttc), .bc_clk(roc_bc_clk),
    .out_dq(roc_out_dq), .latency_bc, .corrupt);
  i2c_slave_model #(.ADDR(10'h2A5)) i2c_pll (.clk, .scl(i2c_scl_i[0]), .sda(i2c_sda_i[0]), .sda_oe(slv_sda_oe[0]));
  i2c_slave_model #(.ADDR(10'h10F)) i2c_dig (.clk, .scl(i2c_scl_i[1]), .sda(i2c_sda_i[1]), .sda_oe(slv_sda_oe[1]));
  assign i2c_scl_i = ~i2c_scl_oe;
  assign i2c_sda_i = ~(i2c_sda_oe | slv_sda_oe);

  always #1 clk = ~clk;   // one period = one 320 MHz cycle

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int idx, input logic [31:0] d);
    s_axi_awaddr <= 32'(idx * 4); s_axi_wdata <= d;
    s_axi_awvalid <= 1; s_axi_wvalid <= 1;
    @(posedge clk iff (s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0; s_axi_wvalid <= 0;
    @(posedge clk iff s_axi_bvalid);
  endtask

  task automatic rd(input int idx, output logic [31:0] d);
    s_axi_araddr <= 32'(idx * 4); s_axi_arvalid <= 1;
    @(posedge clk iff s_axi_arready);
    s_axi_arvalid <= 0;
    @(posedge clk iff s_axi_rvalid);
    d = s_axi_rdata;
  endtask

  task automatic us(input int n);
    repeat (n * 320) @(posedge clk);
  endtask

  int peak = 0;
  always @(posedge clk) if (!rst && int'(dut.u_lat_fifo.count) > peak) peak = int'(dut.u_lat_fifo.count);

  task automatic run(input int mode, input int dur_us);
    wr(1, 32'(14 | (mode << 4) | (0 << 6) | (1 << 8)));
    wr(0, 32'h1);
    us(dur_us);
    wr(0, 32'h0);
  endtask

  initial begin
    logic [31:0] s, l0n, l1n;
    repeat (4) @(posedge clk); rst <= 0;
    us(1);
    wr(2, 32'd300);
    wr(0, 32'h2); wr(0, 32'h0);    // ECR
    us(1);
    run(0, 350);                   // random spacing
    run(2, 150);                   // bursts of 8
    us(320);
    rd(36, s);
    chk(s[3:0] == 4'hF, "all four output checkers aligned");
    chk(!s[4], "SROCs in step");
    chk(!s[5], "no generator queue overflow");
    chk(!s[6], "no latency FIFO overflow");
    chk(!s[7], "no late L1A");
    rd(46, l0n); rd(47, l1n); rd(48, s);
    $display("max SROC skew %0d", s);
    $display("L0 events %0d, L1A %0d, peak latency FIFO occupancy %0d", l0n, l1n, peak);
    chk(l0n == l1n && l0n > 600, "one L1A per L0 event");
    chk(peak >= 380 && peak <= 512, "latency FIFO held the events of 300 us at 1400 kHz");
    for (int k = 0; k < 4; k++) begin
      rd(38 + k, s);
      chk(s[7:0] == 0, $sformatf("SROC %0d no error flag (%b)", k, s[7:0]));
      chk(s[31:16] == l1n[15:0], $sformatf("SROC %0d one packet per L1A", k));
    end
    chk(roc.l1_unmatched == 0 && roc.l1_unsynced == 0 && roc.in_errors == 0,
        "every L1A matched its L0 event at 300 us");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
