// Trigger, timing and control (TTC) stream generator.
//
// Once per bunch crossing (bc_stb) it assembles an 8-bit command word and
// sends it MSB first, one bit per 320 MHz clock, on ttc_o (320 Mbps):
//   BCR - at every orbit start (bcid == 0), so that the device's BCID
//         counter follows this firmware's counter;
//   ECR - once after a rising edge of ecr_req;
//   L1A - when the oldest L0 event in the latency FIFO is latency_us
//         microseconds (latency_us x 40 bunch crossings) old; the event is
//         then popped and reported on l1_stb/l1_bcid for the checkers.
// latency_us is clamped to 20 .. 300 us, the configurable range of the test
// setup. The bit positions in the command word (see roc_qa_pkg) are this
// design's choice. late is set if an L1A had to be sent after its time (two
// events due in one bunch crossing cannot happen, since at most one L0 event
// is generated per bunch crossing). The first bit of a word is on ttc_o in
// the cycle after bc_stb.
module ttc_generator
  import roc_qa_pkg::*;
#(
  parameter int unsigned LAT_MIN_US = 20,
  parameter int unsigned LAT_MAX_US = 300
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_stb,
  input  logic [11:0] bcid,
  input  logic [15:0] bc_time,
  input  logic [8:0]  latency_us,
  input  logic        ecr_req,
  input  l0_event_t   head,
  input  logic        fifo_empty,
  output logic        fifo_pop,
  output logic        ttc_o,
  output logic        l1_stb,
  output logic [11:0] l1_bcid,
  output logic        ecr_stb,
  output logic        late,
  output logic [31:0] l1_count
);
  logic [8:0]  lat_us;
  logic [15:0] lat_bc, age;
  logic [7:0]  word, sh;
  logic        ecr_req_d, ecr_pend, due;

  assign lat_us = (latency_us < 9'(LAT_MIN_US)) ? 9'(LAT_MIN_US) :
                  (latency_us > 9'(LAT_MAX_US)) ? 9'(LAT_MAX_US) : latency_us;
  assign lat_bc = 16'(lat_us) * 16'(BC_PER_US);
  assign age    = bc_time - head.bc_time;
  assign due    = !fifo_empty && (age >= lat_bc);
  assign fifo_pop = bc_stb && due;

  always_comb begin
    word = '0;
    word[TTC_BCR] = (bcid == '0);
    word[TTC_ECR] = ecr_pend;
    word[TTC_L1A] = due;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; ecr_req_d <= 1'b0; ecr_pend <= 1'b0;
      l1_stb <= 1'b0; l1_bcid <= '0; ecr_stb <= 1'b0; late <= 1'b0; l1_count <= '0;
    end else begin
      ecr_req_d <= ecr_req;
      l1_stb    <= 1'b0;
      ecr_stb   <= 1'b0;
      if (ecr_req && !ecr_req_d) ecr_pend <= 1'b1;
      if (bc_stb) begin
        sh <= word;
        if (ecr_pend) begin ecr_pend <= 1'b0; ecr_stb <= 1'b1; end
        if (due) begin
          l1_stb   <= 1'b1;
          l1_bcid  <= head.bcid;
          l1_count <= l1_count + 32'd1;
          if (age != lat_bc) late <= 1'b1;
        end
      end else begin
        sh <= sh << 1;
      end
    end
  end

  assign ttc_o = sh[7];
endmodule
