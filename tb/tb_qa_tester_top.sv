// End-to-end test of qa_tester_top at its default parameters, with the
// device under test replaced by roc_model and its two configuration buses
// by I2C slave models. Through the AXI4-Lite register bank it
//  1. sends an ECR, sets the L1 latency to 20 us;
//  2. runs constant-rate (1400 kHz, constant size), random-rate (1400 kHz,
//     50 % empty, random size) and burst traffic (1000 kHz);
//  3. runs 100 kHz traffic with the maximum latency of 300 us;
//  4. lets every trigger drain and checks the status registers: all four
//     output checkers aligned, no error flag, one packet per L1A on every
//     SROC, as many L1A as L0 events, SROCs in step, no overflow;
//  5. writes and reads a register on each I2C bus;
//  6. has the model damage one hit and checks that the content error shows.
// Every mechanism is counted and must have happened at least once.
module tb_qa_tester_top;
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
  int latency_bc = 800;
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
    repeat (2000000) @(posedge clk);
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

  // mechanism counters
  int m_const = 0, m_random = 0, m_burst = 0, m_empty = 0, m_lat20 = 0, m_lat300 = 0;
  int m_i2c = 0, m_errdet = 0;

  task automatic traffic(input int mode, input int freq, input int empty, input int size,
                         input int cst, input int dur_us, inout int counter);
    logic [31:0] a, b;
    rd(46, a);
    wr(1, 32'(freq | (mode << 4) | (empty << 6) | (size << 8) | (cst << 10)));
    wr(0, 32'h1);
    us(dur_us);
    wr(0, 32'h0);
    rd(46, b);
    counter += int'(b - a);
  endtask

  task automatic i2c_rw(input int m, input logic [9:0] addr, input logic [7:0] sub, input logic [7:0] d);
    logic [31:0] st;
    wr(4 + 2 * m, {16'd0, d, sub});
    wr(3 + 2 * m, {21'd0, 1'b0, addr});
    wr(3 + 2 * m, {1'b1, 20'd0, 1'b0, addr});
    do rd(36, st); while (st[8 + 2 * m]);
    chk(!st[9 + 2 * m], $sformatf("I2C%0d write acknowledged", m));
    wr(3 + 2 * m, {21'd0, 1'b1, addr});
    wr(3 + 2 * m, {1'b1, 20'd0, 1'b1, addr});
    do rd(36, st); while (st[8 + 2 * m]);
    rd(37, st);
    chk(st[8 * m +: 8] == d, $sformatf("I2C%0d read back", m));
    if (st[8 * m +: 8] == d) m_i2c++;
  endtask

  initial begin
    logic [31:0] s, l0n, l1n;
    int e0;
    repeat (4) @(posedge clk); rst <= 0;
    us(1);
    wr(2, 32'd20);                 // latency 20 us
    wr(0, 32'h2); wr(0, 32'h0);    // ECR
    us(1);
    traffic(1, 14, 0, 1, 1, 40, m_const);
    traffic(0, 14, 2, 2, 0, 40, m_random);
    traffic(2, 10, 1, 0, 0, 40, m_burst);
    us(25);
    latency_bc = 300 * 40;
    wr(2, 32'd300);
    us(2);
    traffic(1, 1, 0, 0, 0, 40, m_lat300);
    us(310);
    m_lat20 = roc.n_l1a - m_lat300;
    m_empty = roc.in_empty;
    // status
    rd(36, s);
    chk(s[3:0] == 4'hF, "all four output checkers aligned");
    chk(!s[4], "SROCs in step");
    chk(!s[5] && !s[6], "no overflow");
    chk(!s[7], "no late L1A");
    rd(46, l0n); rd(47, l1n);
    chk(l0n == l1n && l0n > 0, $sformatf("one L1A per L0 event (%0d / %0d)", l0n, l1n));
    chk(int'(l1n) == roc.n_l1a, "device saw every L1A");
    for (int k = 0; k < 4; k++) begin
      rd(38 + k, s);
      chk(s[7:0] == 0, $sformatf("SROC %0d no error flag (%b)", k, s[7:0]));
      chk(s[31:16] == l1n[15:0], $sformatf("SROC %0d one packet per L1A (%0d)", k, s[31:16]));
    end
    chk(roc.l1_unmatched == 0 && roc.l1_unsynced == 0 && roc.in_errors == 0,
        "every L1A matched its L0 event at the configured latency");
    chk(roc.n_ecr == 1, "one ECR");
    chk(roc.n_bcr >= 5, "BCR every orbit");
    // I2C buses
    i2c_rw(0, 10'h2A5, 8'h12, 8'hC3);
    i2c_rw(1, 10'h10F, 8'h40, 8'h5E);
    // error detection
    wr(2, 32'd20); latency_bc = 800;
    corrupt = 1; @(posedge clk); corrupt = 0;
    traffic(1, 14, 0, 1, 1, 10, e0);
    us(30);
    rd(38, s);
    chk(s[ERR_CONTENT] == 1'b1, "damaged hit detected as content error");
    if (s[ERR_CONTENT]) m_errdet++;
    $display("mechanisms: constant=%0d random=%0d burst=%0d empty=%0d lat20=%0d lat300=%0d i2c=%0d errdet=%0d bcr=%0d",
             m_const, m_random, m_burst, m_empty, m_lat20, m_lat300, m_i2c, m_errdet, roc.n_bcr);
    chk(m_const > 0, "constant-rate events happened");
    chk(m_random > 0, "random-rate events happened");
    chk(m_burst > 0, "bursts happened");
    chk(m_empty > 0, "empty packets happened");
    chk(m_lat20 > 0 && m_lat300 > 0, "L1A at 20 us and 300 us latency happened");
    chk(m_i2c == 2, "I2C transactions happened");
    chk(m_errdet > 0, "error detection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
