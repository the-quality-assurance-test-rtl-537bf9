// Synchronicity check of the sub-read-out (SROC) outputs.
//
// Every SROC sends one packet per L1 trigger, so the L1 event counters of
// the N output checkers must stay together. desync is set (sticky) when any
// counter differs from counter 0 by more than TOL, which allows for packets
// still in flight; the tolerance is this design's choice. max_skew reports
// the largest difference seen.
module sroc_sync_checker #(
  parameter int unsigned N   = 4,
  parameter int unsigned TOL = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0][15:0] cnt,
  output logic             desync,
  output logic [15:0]      max_skew
);
  logic [15:0] skew, d;

  always_comb begin
    skew = '0;
    d = '0;
    for (int i = 1; i < N; i++) begin
      d = cnt[i] - cnt[0];
      if (d[15]) d = -d;
      if (d > skew) skew = d;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      desync <= 1'b0; max_skew <= '0;
    end else begin
      if (skew > 16'(TOL)) desync <= 1'b1;
      if (skew > max_skew) max_skew <= skew;
    end
  end
endmodule
