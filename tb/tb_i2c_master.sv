// Self-checking test of i2c_master against a 10-bit-address slave model:
// register writes followed by read-back, a read of a register the test did
// not write, a transaction to a wrong address (must report NACK), and the
// SCL period for the configured divider.
module tb_i2c_master;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, start = 0, rw = 0;
  logic [9:0] addr;
  logic [7:0] subaddr, wdata, rdata;
  logic nack, busy, done, scl_oe, sda_oe, scl_i, sda_i, s_sda_oe;
  int checks = 0, failures = 0;
  localparam int QDIV = 5;
  i2c_master #(.QDIV(QDIV)) dut (.*);
  i2c_slave_model #(.ADDR(10'h2A5)) slave (.clk, .scl(scl_i), .sda(sda_i), .sda_oe(s_sda_oe));
  assign scl_i = !scl_oe;
  assign sda_i = !(sda_oe || s_sda_oe);
  always #1 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t_rise [$];
  always @(posedge clk) if (scl_i && !slave.scl_p && busy) t_rise.push_back($time);

  task automatic xfer(input logic r, input logic [9:0] a, input logic [7:0] s, input logic [7:0] d);
    rw <= r; addr <= a; subaddr <= s; wdata <= d; start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk iff done); #0.1;
  endtask

  initial begin
    addr = 0; subaddr = 0; wdata = 0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      logic [7:0] s, d;
      s = 8'($urandom); d = 8'($urandom);
      xfer(0, 10'h2A5, s, d);
      chk(!nack, "write acknowledged");
      chk(slave.regs[s] == d, "slave register written");
      xfer(1, 10'h2A5, s, 8'h00);
      chk(!nack && rdata == d, $sformatf("read back %02x got %02x", d, rdata));
    end
    xfer(1, 10'h2A5, 8'd200, 8'h00);
    chk(rdata == 8'(200 * 3 + 1), "read of untouched register");
    xfer(0, 10'h1A5, 8'd3, 8'h55);
    chk(nack, "wrong address gives NACK");
    chk(slave.regs[3] != 8'h55, "wrong address writes nothing");
    // SCL period = 4 x QDIV clocks of 2 time units
    chk(t_rise.size() > 10 && (t_rise[5] - t_rise[4]) == 4 * QDIV * 2, $sformatf("SCL period %0d", t_rise[5] - t_rise[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
