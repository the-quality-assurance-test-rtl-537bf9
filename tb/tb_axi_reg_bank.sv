// Self-checking test of axi_reg_bank: random writes (with byte strobes) and
// reads of the 36 control registers against a model, reads of the 28
// status registers, writes to status registers ignored, and the AXI rule
// that a response stays valid until it is accepted (checked by assertions,
// with a slow ready on some transfers).
module tb_axi_reg_bank;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  logic [31:0] s_axi_awaddr, s_axi_wdata, s_axi_araddr, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready, s_axi_bvalid, s_axi_bready = 0;
  logic s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 0;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [35:0][31:0] ctrl;
  logic [27:0][31:0] status;
  int checks = 0, failures = 0;
  axi_reg_bank #(.N_REG(64), .N_CTRL(36)) dut (.*);
  always #1 clk = ~clk;

  a_bhold: assert property (@(posedge clk) disable iff (rst) s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid)
    else begin failures++; $display("FAIL bvalid dropped"); end
  a_rhold: assert property (@(posedge clk) disable iff (rst) s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata))
    else begin failures++; $display("FAIL rvalid dropped or rdata changed"); end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int idx, input logic [31:0] d, input logic [3:0] st, input int bdelay);
    s_axi_awaddr <= 32'(idx * 4); s_axi_wdata <= d; s_axi_wstrb <= st;
    s_axi_awvalid <= 1; s_axi_wvalid <= 1;
    @(posedge clk iff (s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0; s_axi_wvalid <= 0;
    repeat (bdelay) @(posedge clk);
    s_axi_bready <= 1;
    @(posedge clk iff s_axi_bvalid);
    chk(s_axi_bresp == 2'b00, "write response OKAY");
    s_axi_bready <= 0;
  endtask

  task automatic rd(input int idx, output logic [31:0] d, input int rdelay);
    s_axi_araddr <= 32'(idx * 4); s_axi_arvalid <= 1;
    @(posedge clk iff s_axi_arready);
    s_axi_arvalid <= 0;
    repeat (rdelay) @(posedge clk);
    s_axi_rready <= 1;
    @(posedge clk iff s_axi_rvalid);
    d = s_axi_rdata;
    s_axi_rready <= 0;
  endtask

  logic [31:0] model [36];
  initial begin
    logic [31:0] d, v;
    s_axi_awaddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0; s_axi_araddr = 0;
    for (int i = 0; i < 28; i++) status[i] = 32'hA5000000 + 32'(i);
    for (int i = 0; i < 36; i++) model[i] = 0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int idx; logic [3:0] st;
      idx = $urandom % 36; d = $urandom; st = 4'($urandom);
      wr(idx, d, st, $urandom % 3);
      for (int b = 0; b < 4; b++) if (st[b]) model[idx][8*b +: 8] = d[8*b +: 8];
      @(posedge clk);
      chk(ctrl[idx] == model[idx], "control output");
      idx = $urandom % 36;
      rd(idx, v, $urandom % 3);
      chk(v == model[idx], $sformatf("read ctrl %0d", idx));
    end
    for (int i = 36; i < 64; i++) begin
      rd(i, v, 0);
      chk(v == 32'hA5000000 + 32'(i - 36), $sformatf("read status %0d", i));
    end
    wr(40, 32'hFFFFFFFF, 4'hF, 0);
    rd(40, v, 0);
    chk(v == 32'hA5000004, "status register not writable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
