// Quality-assurance tester for the read-out-controller (ROC) ASIC.
//
// The tester surrounds the device under test with three parts:
//  * stimuli generators (SG): a bunch-crossing counter, an L0 event
//    scheduler, eight input data generators, each followed by an 8b10b
//    encoder and a 640 Mbps DDR serializer (one per ROC input), a TTC
//    latency FIFO holding every L0 event, and the TTC generator that sends
//    BCR/ECR/L1A commands on the 320 Mbps TTC line;
//  * four output-capture-and-analysis (OCA) chains, one per SROC output of
//    the device: comma aligner / de-serializer, 8b10b decoder and assembler
//    state machine, plus the check that the four SROCs stay in step;
//  * monitor and control (MC): the AXI4-Lite register bank through which a
//    processor configures the generators and reads the status, and two I2C
//    masters for the device's configuration buses.
// Every L1A sent is also handed to each OCA chain as the expected trigger.
// The device itself is outside: its pins are the roc_* ports.
//
// Clocking: one 320 MHz clock; symbol slots (every 5 cycles) and bunch
// crossings (every 8 cycles) are clock enables. roc_bc_clk is the 40 MHz
// bunch-crossing clock for the device, high in the first four cycles of a
// bunch crossing; the first bit of each TTC word is sent in that first cycle.
//
// Register map (word index; this design's choice):
//  ctrl 0 : [0] SG enable, [1] ECR request (rising edge), [2] OCA realign
//  ctrl 1 : [3:0] frequency (x100 kHz), [5:4] L0 mode, [7:6] empty share,
//           [9:8] mean size, [10] constant size
//  ctrl 2 : [8:0] L1 latency in us (20..300)
//  ctrl 3/5: I2C master 0/1 [9:0] address, [10] read, [31] start (rising edge)
//  ctrl 4/6: I2C master 0/1 [7:0] sub-address, [15:8] write data
//  ctrl 7 : driven out on dut_ctrl for the device's control pins
//  ctrl 8..35: spare
//  status 36: [3:0] OCA locked, [4] SROC desync, [5] generator queue overflow,
//           [6] latency FIFO overflow, [7] L1A late, [8]/[10] I2C0/1 busy,
//           [9]/[11] I2C0/1 NACK
//  status 37: [7:0] I2C0 read data, [15:8] I2C1 read data
//  status 38..41: SROC 0..3 [7:0] error flags, [31:16] L1 packet count
//  status 42..45: SROC 0..3 error count
//  status 46: L0 events, 47: L1A sent, 48: maximum SROC counter skew
//  status 49..63: zero
module qa_tester_top
  import roc_qa_pkg::*;
#(
  parameter int unsigned IN_CH    = 8,
  parameter int unsigned SROCS    = 4,
  parameter int unsigned I2C_QDIV = 200
) (
  input  logic        clk,
  input  logic        rst,
  // device under test
  output logic [IN_CH-1:0][1:0]   roc_in_dq,
  output logic                   roc_ttc,
  output logic                   roc_bc_clk,
  input  logic [SROCS-1:0][1:0] roc_out_dq,
  output logic [31:0]            dut_ctrl,
  // AXI4-Lite register bank port
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
  // I2C buses (open drain)
  output logic [1:0]  i2c_scl_oe,
  output logic [1:0]  i2c_sda_oe,
  input  logic [1:0]  i2c_scl_i,
  input  logic [1:0]  i2c_sda_i
);
  localparam int unsigned N_REG = 64, N_CTRL = 36;

  logic [N_CTRL-1:0][31:0]       ctrl;
  logic [N_REG-N_CTRL-1:0][31:0] status;

  axi_reg_bank #(.N_REG(N_REG), .N_CTRL(N_CTRL)) u_regs (.*);

  // ---------------- timing strobes
  logic [2:0] sym_cnt, bc_cnt;
  logic       sym_stb, sym_stb_d, bc_stb;
  always_ff @(posedge clk) begin
    if (rst) begin
      sym_cnt <= '0; bc_cnt <= '0; sym_stb_d <= 1'b0;
    end else begin
      sym_cnt   <= (sym_cnt == 3'(SYM_CYC - 1)) ? '0 : sym_cnt + 3'd1;
      bc_cnt    <= bc_cnt + 3'd1;
      sym_stb_d <= sym_stb;
    end
  end
  assign sym_stb    = (sym_cnt == 3'(SYM_CYC - 1));
  assign bc_stb     = (bc_cnt == 3'(BC_CYC - 1));
  assign roc_bc_clk = (bc_cnt < 3'd4);

  // ---------------- control fields
  logic       sg_en, ecr_req, realign;
  logic [3:0] freq_sel;
  l0_mode_e   l0_mode;
  logic [1:0] empty_sel, size_sel;
  logic       const_size;
  logic [8:0] latency_us;
  assign sg_en      = ctrl[0][0];
  assign ecr_req    = ctrl[0][1];
  assign realign    = ctrl[0][2];
  assign freq_sel   = ctrl[1][3:0];
  assign l0_mode    = l0_mode_e'(ctrl[1][5:4]);
  assign empty_sel  = ctrl[1][7:6];
  assign size_sel   = ctrl[1][9:8];
  assign const_size = ctrl[1][10];
  assign latency_us = ctrl[2][8:0];
  assign dut_ctrl   = ctrl[7];

  // ---------------- stimuli generators
  logic [11:0] bcid;
  logic [15:0] bc_time;
  logic        l0_stb, fifo_empty, fifo_pop, fifo_ovf, l1_stb, ecr_stb, l1_late;
  logic [11:0] l1_bcid;
  logic [31:0] l0_count, l1_count;
  l0_event_t   head;

  bcid_counter #(.ORBIT(ORBIT_BC)) u_bcid (
    .clk, .rst, .bc_stb, .bcr(1'b0), .bcid, .bc_time, .orbit_start());

  l0_scheduler u_l0 (
    .clk, .rst, .enable(sg_en), .bc_stb, .freq_sel, .mode(l0_mode),
    .l0_stb, .l0_count);

  sync_fifo #(.W($bits(l0_event_t)), .DEPTH(512)) u_lat_fifo (
    .clk, .rst, .push(l0_stb), .din({bcid, bc_time}), .pop(fifo_pop), .dout(head),
    .empty(fifo_empty), .full(), .count(), .overflow(fifo_ovf));

  ttc_generator u_ttc (
    .clk, .rst, .bc_stb, .bcid, .bc_time, .latency_us, .ecr_req, .head, .fifo_empty,
    .fifo_pop, .ttc_o(roc_ttc), .l1_stb, .l1_bcid, .ecr_stb, .late(l1_late), .l1_count);

  logic [IN_CH-1:0] gen_ovf;
  for (genvar c = 0; c < IN_CH; c++) begin : g_in
    logic [7:0] b;
    logic       k;
    logic [9:0] code;
    input_data_generator #(.CH(c)) u_gen (
      .clk, .rst, .sym_stb, .l0_stb, .l0_bcid(bcid), .empty_sel, .size_sel, .const_size,
      .byte_o(b), .k_o(k), .overflow(gen_ovf[c]), .pkt_count(), .empty_count());
    enc8b10b u_enc (.clk, .rst, .en(sym_stb), .din(b), .kin(k), .dout(code), .rd_o());
    ddr_serializer #(.W(10)) u_ser (.clk, .rst, .load(sym_stb_d), .sym(code), .dq(roc_in_dq[c]));
  end

  // ---------------- output capture and analysis
  logic [SROCS-1:0]        locked;
  logic [SROCS-1:0][7:0]   oca_err;
  logic [SROCS-1:0][15:0]  oca_err_cnt, oca_l1_cnt;
  logic                     desync;
  logic [15:0]              max_skew;
  for (genvar s = 0; s < SROCS; s++) begin : g_oca
    logic [9:0] sym;
    logic       sym_v, bv, k, cerr, derr;
    logic [7:0] b;
    comma_aligner u_align (.clk, .rst, .realign, .din(roc_out_dq[s]), .sym, .sym_valid(sym_v),
      .locked(locked[s]));
    dec8b10b u_dec (.clk, .rst, .en(sym_v), .din(sym), .valid(bv), .dout(b), .kout(k),
      .code_err(cerr), .disp_err(derr));
    oca_assembler u_asm (.clk, .rst, .byte_valid(bv), .byte_i(b), .k_i(k), .code_err(cerr),
      .disp_err(derr), .exp_push(l1_stb), .exp_bcid(l1_bcid), .ecr(ecr_stb),
      .err(oca_err[s]), .err_count(oca_err_cnt[s]), .l1_count(oca_l1_cnt[s]), .hit_count());
  end

  sroc_sync_checker #(.N(SROCS), .TOL(8)) u_sync (
    .clk, .rst, .cnt(oca_l1_cnt), .desync, .max_skew);

  // ---------------- I2C masters
  logic [1:0]      i2c_busy, i2c_nack;
  logic [1:0][7:0] i2c_rdata;
  logic [1:0]      i2c_go_d;
  for (genvar m = 0; m < 2; m++) begin : g_i2c
    logic go;
    assign go = ctrl[3 + 2*m][31];
    always_ff @(posedge clk) begin
      if (rst) i2c_go_d[m] <= 1'b0;
      else     i2c_go_d[m] <= go;
    end
    i2c_master #(.QDIV(I2C_QDIV)) u_i2c (
      .clk, .rst, .start(go && !i2c_go_d[m]), .rw(ctrl[3 + 2*m][10]),
      .addr(ctrl[3 + 2*m][9:0]), .subaddr(ctrl[4 + 2*m][7:0]), .wdata(ctrl[4 + 2*m][15:8]),
      .rdata(i2c_rdata[m]), .nack(i2c_nack[m]), .busy(i2c_busy[m]), .done(),
      .scl_oe(i2c_scl_oe[m]), .sda_oe(i2c_sda_oe[m]), .scl_i(i2c_scl_i[m]), .sda_i(i2c_sda_i[m]));
  end

  // ---------------- status registers
  always_comb begin
    status = '0;
    status[0] = {20'd0, i2c_nack[1], i2c_busy[1], i2c_nack[0], i2c_busy[0],
                 l1_late, fifo_ovf, |gen_ovf, desync, 4'(locked)};
    status[1] = {16'd0, i2c_rdata[1], i2c_rdata[0]};
    for (int s = 0; s < SROCS && s < 4; s++) begin
      status[2 + s] = {oca_l1_cnt[s], 8'd0, oca_err[s]};
      status[6 + s] = {16'd0, oca_err_cnt[s]};
    end
    status[10] = l0_count;
    status[11] = l1_count;
    status[12] = {16'd0, max_skew};
  end
endmodule
