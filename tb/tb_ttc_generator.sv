// Self-checking test of ttc_generator. A bunch-crossing model feeds bcid
// and the time stamp; L0 events are queued in a model FIFO. The serial TTC
// line is de-serialized here and every command word is checked: BCR exactly
// at BCID 0, one ECR after the request, and each L1A exactly the configured
// latency (in bunch crossings) after its L0 event, in order, for 20 us,
// 37 us and an out-of-range latency (clamped to 300 us).
module tb_ttc_generator;
  timeunit 1ns; timeprecision 1ps;
  import roc_qa_pkg::*;
  logic clk = 0, rst = 1, bc_stb = 0, ecr_req = 0, fifo_empty, fifo_pop, ttc_o;
  logic l1_stb, ecr_stb, late;
  logic [11:0] bcid = 0, l1_bcid;
  logic [15:0] bc_time = 0;
  logic [8:0] latency_us;
  logic [31:0] l1_count;
  l0_event_t head;
  int checks = 0, failures = 0;
  ttc_generator dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  l0_event_t q [$];
  assign fifo_empty = (q.size() == 0);
  assign head = fifo_empty ? '0 : q[0];

  // bunch crossing: 8 cycles, bc_stb in the last; words go out after it
  int cyc = 0, bit_i = 0, nbcr = 0, necr = 0, nl1 = 0, lat_bc = 0;
  logic [7:0] w;
  logic [11:0] word_bcid;
  int word_time;
  int l0_time [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bc_stb <= (cyc % 8 == 6);
    if (bc_stb) begin
      bc_time <= bc_time + 1;
      bcid <= (bcid == 3563) ? 0 : bcid + 1;
      if (fifo_pop) void'(q.pop_front());
      word_bcid <= bcid; word_time <= bc_time;
    end
  end
  // de-serialize: the word for the bunch crossing at bc_stb is on ttc_o
  // during the next 8 cycles
  int phase = -1;
  always @(posedge clk) begin
    if (phase >= 0) begin
      w = {w[6:0], ttc_o};
      if (phase == 7) begin
        if (w[TTC_BCR]) nbcr++;
        if (w[TTC_ECR]) necr++;
        chk(w[TTC_BCR] == (word_bcid == 0), "BCR exactly at BCID 0");
        if (w[TTC_L1A]) begin
          nl1++;
          chk(l0_time.size() > 0 && word_time - l0_time[0] == lat_bc,
              $sformatf("L1A latency %0d", l0_time.size() > 0 ? word_time - l0_time[0] : -1));
          if (l0_time.size() > 0) void'(l0_time.pop_front());
        end
      end
    end
    if (bc_stb) phase <= 0;
    else if (phase >= 0 && phase < 7) phase <= phase + 1;
    else phase <= -1;
  end

  task automatic push_l0();
    @(posedge clk iff bc_stb);
    @(posedge clk);
    q.push_back('{bcid: bcid, bc_time: bc_time});
    l0_time.push_back(bc_time);
  endtask

  task automatic scenario(input int lat_us, input int lat_exp_us, input int nev);
    latency_us = 9'(lat_us); lat_bc = lat_exp_us * 40;
    for (int i = 0; i < nev; i++) begin
      push_l0();
      repeat ($urandom % 400) @(posedge clk);
    end
    repeat (8 * (lat_bc + 40)) @(posedge clk);
    chk(l0_time.size() == 0, "every L0 event got its L1A");
  endtask

  initial begin
    latency_us = 20;
    repeat (3) @(posedge clk); rst <= 0;
    ecr_req <= 1; repeat (20) @(posedge clk); ecr_req <= 0;
    scenario(20, 20, 60);
    scenario(37, 37, 60);
    scenario(400, 300, 30);
    chk(nl1 == 150 && l1_count == 150, "150 L1A sent");
    chk(necr == 1, "one ECR");
    chk(nbcr >= 3, "BCR every orbit");
    chk(!late, "no late L1A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
