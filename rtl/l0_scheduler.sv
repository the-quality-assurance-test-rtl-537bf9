// Level-0 event scheduler of the stimuli generators.
//
// Once per bunch crossing (bc_stb) it decides whether an L0 event happens.
// The average rate is freq_sel x 100 kHz (freq_sel 1..14, i.e. 100 to
// 1400 kHz; 0 stops the events). Three modes:
//   L0_RANDOM   - an event with probability freq_sel/400 per bunch crossing,
//                 drawn from a 16-bit LFSR (threshold freq_sel*164/65536);
//   L0_CONSTANT - an event exactly every 400/freq_sel bunch crossings on
//                 average, from a phase accumulator (fixed spacing, for
//                 debugging);
//   L0_BURST    - the fixed worst case: BURST_LEN events in consecutive
//                 bunch crossings, bursts at freq_sel x 100 kHz / BURST_LEN.
// The rates and the three kinds of traffic follow the test setup; the LFSR,
// the accumulator and the burst shape are this design's choice. l0_stb is
// high for the clock cycle of bc_stb in which an event is decided.
module l0_scheduler
  import roc_qa_pkg::*;
#(
  parameter int unsigned BURST_LEN = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       bc_stb,
  input  logic [3:0] freq_sel,
  input  l0_mode_e   mode,
  output logic       l0_stb,
  output logic [31:0] l0_count
);
  logic [15:0] lfsr;
  logic [15:0] acc, acc_next;
  logic [7:0]  burst_left;
  logic [3:0]  fsel;
  logic        fire;
  logic [15:0] limit;

  assign fsel  = (freq_sel > 4'd14) ? 4'd14 : freq_sel;
  assign limit = (mode == L0_BURST) ? 16'(FREQ_DIV * BURST_LEN) : 16'(FREQ_DIV);
  assign acc_next = acc + {12'd0, fsel};

  always_comb begin
    fire = 1'b0;
    if (enable && fsel != 4'd0) begin
      unique case (mode)
        L0_RANDOM:   fire = (lfsr < 16'(fsel) * 16'd164);
        L0_CONSTANT: fire = (acc_next >= limit);
        L0_BURST:    fire = (burst_left != '0) || (acc_next >= limit);
        default:     fire = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr <= 16'hACE1; acc <= '0; burst_left <= '0;
      l0_stb <= 1'b0; l0_count <= '0;
    end else begin
      l0_stb <= 1'b0;
      if (bc_stb) begin
        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        if (enable && (mode == L0_CONSTANT || mode == L0_BURST))
          acc <= (acc_next >= limit) ? acc_next - limit : acc_next;
        if (mode == L0_BURST && burst_left != '0)
          burst_left <= burst_left - 8'd1;
        else if (mode == L0_BURST && fire)
          burst_left <= 8'(BURST_LEN - 1);
        else if (mode != L0_BURST)
          burst_left <= '0;
        l0_stb <= fire;
        if (fire) l0_count <= l0_count + 32'd1;
      end
    end
  end
endmodule
