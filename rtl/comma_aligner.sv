// De-serializer and K28.5 comma aligner for one 640 Mbps DDR lane.
//
// Two bits arrive per clock (din[1] is the earlier one). They are shifted
// into an 11-bit history. Each cycle the two 10-bit windows that end at the
// newest and at the second-newest bit are compared with both disparities of
// K28.5. A comma at a given bit offset and clock phase (of the 5-cycle symbol
// period) followed by another one exactly one symbol (5 cycles) later at the
// same offset fixes the symbol boundary: locked rises and from then on every
// fifth cycle sym holds one aligned symbol with sym_valid high for one cycle.
// Lock is kept until reset or realign (this design's choice: the loss-of-lock
// rule is not specified).
module comma_aligner
  import roc_qa_pkg::*;
#(
  parameter int unsigned MIN_COMMAS = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       realign,
  input  logic [1:0] din,
  output logic [9:0] sym,
  output logic       sym_valid,
  output logic       locked
);
  logic [10:0] hist;
  logic [2:0]  ph, lock_ph, since;
  logic        lock_off, cand_off, cand_valid;
  logic [3:0]  ncomma;
  logic        hit0, hit1;
  logic [9:0]  w0, w1;

  assign w0   = hist[9:0];
  assign w1   = hist[10:1];
  assign hit0 = (w0 == K28_5_RDN) || (w0 == K28_5_RDP);
  assign hit1 = (w1 == K28_5_RDN) || (w1 == K28_5_RDP);

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '0; ph <= '0; lock_ph <= '0; since <= '0;
      lock_off <= 1'b0; cand_off <= 1'b0; cand_valid <= 1'b0;
      ncomma <= '0; locked <= 1'b0; sym <= '0; sym_valid <= 1'b0;
    end else begin
      hist <= {hist[8:0], din};
      ph   <= (ph == 3'(SYM_CYC - 1)) ? '0 : ph + 3'd1;
      if (since != 3'd7) since <= since + 3'd1;
      sym_valid <= 1'b0;
      if (realign) begin
        locked <= 1'b0; cand_valid <= 1'b0; ncomma <= '0;
      end else if (!locked) begin
        if (hit0 || hit1) begin
          if (cand_valid && since == 3'(SYM_CYC - 1) && cand_off == !hit0) begin
            if (ncomma + 4'd1 >= 4'(MIN_COMMAS)) begin
              locked   <= 1'b1;
              lock_ph  <= ph;
              lock_off <= !hit0;
            end
            ncomma <= ncomma + 4'd1;
          end else begin
            ncomma <= 4'd1;
          end
          cand_valid <= 1'b1;
          cand_off   <= !hit0;
          since      <= '0;
        end else if (since >= 3'(SYM_CYC - 1)) begin
          cand_valid <= 1'b0;
          ncomma     <= '0;
        end
      end else if (ph == lock_ph) begin
        sym       <= lock_off ? w1 : w0;
        sym_valid <= 1'b1;
      end
    end
  end
endmodule
