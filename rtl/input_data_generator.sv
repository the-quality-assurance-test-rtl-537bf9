// Input data generator for one read-out-controller input channel.
//
// Every L0 event (l0_stb with its BCID) is queued; the generator then sends
// one packet per queued event, one byte per symbol slot (sym_stb, every 5
// cycles), to the 8b10b encoder. Between packets it sends K28.5 commas.
// Packet format (this design's own, the front-end format is not given):
//   K28.0 | 0000 BCID[11:8] | BCID[7:0] | N | hit_0 .. hit_N-1 | K28.4
// with hit_i = roc_qa_pkg::hit_content(CH, BCID, i), deterministic and
// different for every channel. N = 0 is an empty packet. Per event an LFSR
// decides whether the packet is empty (empty_sel: 0, 25, 50, 75 %) and its
// size (size_sel: mean 2, 4, 8, 16 hits, uniform over 1 .. 2*mean-1);
// const_size makes every non-empty packet exactly the mean size. The
// selectable empty fraction and size, the constant-size option and the
// deterministic content follow the test setup; the predefined values are
// this design's choice. The event queue holds QDEPTH events; overflow is
// sticky. byte_o/k_o change right after sym_stb and hold for the slot.
module input_data_generator
  import roc_qa_pkg::*;
#(
  parameter int unsigned CH     = 0,
  parameter int unsigned QDEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sym_stb,
  input  logic        l0_stb,
  input  logic [11:0] l0_bcid,
  input  logic [1:0]  empty_sel,
  input  logic [1:0]  size_sel,
  input  logic        const_size,
  output logic [7:0]  byte_o,
  output logic        k_o,
  output logic        overflow,
  output logic [31:0] pkt_count,
  output logic [31:0] empty_count
);
  typedef enum logic [2:0] {S_IDLE, S_BCH, S_BCL, S_LEN, S_HIT, S_EOP} state_e;
  state_e      st;
  logic [11:0] q_bcid, bcid;
  logic        q_empty, q_pop;
  logic [15:0] lfsr;
  logic [7:0]  n, idx, mean, rnd, size_r;
  logic        is_empty;

  sync_fifo #(.W(12), .DEPTH(QDEPTH)) u_q (
    .clk, .rst, .push(l0_stb), .din(l0_bcid), .pop(q_pop), .dout(q_bcid),
    .empty(q_empty), .full(), .count(), .overflow(overflow));

  always_comb begin
    mean     = 8'd2 << size_sel;
    rnd      = lfsr[7:0] & (2 * mean - 8'd1);
    size_r   = const_size ? mean : ((rnd == '0) ? mean : rnd);
    is_empty = (lfsr[15:14] < empty_sel);
    q_pop    = sym_stb && st == S_IDLE && !q_empty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; byte_o <= K28_5; k_o <= 1'b1;
      lfsr <= 16'h1F35 ^ 16'(CH * 16'h2B71); n <= '0; idx <= '0; bcid <= '0;
      pkt_count <= '0; empty_count <= '0;
    end else if (sym_stb) begin
      unique case (st)
        S_IDLE: begin
          if (!q_empty) begin
            byte_o <= K28_0; k_o <= 1'b1;
            bcid   <= q_bcid;
            n      <= is_empty ? 8'd0 : size_r;
            lfsr   <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]} ^ {8'd0, lfsr[15:8]};
            st     <= S_BCH;
          end else begin
            byte_o <= K28_5; k_o <= 1'b1;
          end
        end
        S_BCH: begin byte_o <= {4'd0, bcid[11:8]}; k_o <= 1'b0; st <= S_BCL; end
        S_BCL: begin byte_o <= bcid[7:0]; st <= S_LEN; end
        S_LEN: begin
          byte_o <= n; idx <= '0;
          st <= (n == '0) ? S_EOP : S_HIT;
        end
        S_HIT: begin
          byte_o <= hit_content(3'(CH), bcid, idx);
          idx    <= idx + 8'd1;
          if (idx + 8'd1 == n) st <= S_EOP;
        end
        S_EOP: begin
          byte_o <= K28_4; k_o <= 1'b1; st <= S_IDLE;
          pkt_count <= pkt_count + 32'd1;
          if (n == '0) empty_count <= empty_count + 32'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
