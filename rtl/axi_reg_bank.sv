// Register bank on an AXI4-Lite slave port.
//
// N_REG 32-bit registers at word addresses 0 .. N_REG-1 (byte address
// = 4 x index). The first N_CTRL are read/write and drive the ctrl outputs
// (control of the stimuli generators and the device under test); the
// remaining N_REG-N_CTRL are read-only views of the status inputs (status and
// error flags of the device and of the checkers). Sizes 64/36/28 follow the
// test setup. A write takes the address and data channels together (both
// valid), honours wstrb, and answers OKAY one cycle later; writes to status
// registers are ignored. A read answers the cycle after the address is
// accepted. Control registers reset to zero.
module axi_reg_bank #(
  parameter int unsigned N_REG  = 64,
  parameter int unsigned N_CTRL = 36
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic [N_CTRL-1:0][31:0]       ctrl,
  input  logic [N_REG-N_CTRL-1:0][31:0] status
);
  localparam int unsigned AW = $clog2(N_REG);
  logic          wr_en;
  logic [AW-1:0] widx, ridx;

  assign widx = s_axi_awaddr[AW+1:2];
  assign ridx = s_axi_araddr[AW+1:2];
  assign wr_en = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_en;
  assign s_axi_wready  = wr_en;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0; s_axi_bvalid <= 1'b0; s_axi_rvalid <= 1'b0; s_axi_rdata <= '0;
    end else begin
      if (wr_en) begin
        s_axi_bvalid <= 1'b1;
        if (32'(widx) < N_CTRL)
          for (int b = 0; b < 4; b++)
            if (s_axi_wstrb[b]) ctrl[widx][8*b +: 8] <= s_axi_wdata[8*b +: 8];
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= (32'(ridx) < N_CTRL) ? ctrl[ridx] : status[32'(ridx) - N_CTRL];
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end
endmodule
