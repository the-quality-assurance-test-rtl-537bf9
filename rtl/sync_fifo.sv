// Synchronous first-in first-out buffer.
//
// DEPTH words of W bits held in a memory array with separate read and write
// pointers. The head word is always visible on dout while empty is low
// (first-word fall-through); pop removes it. A push while full is dropped and
// sets the sticky overflow flag; a pop while empty is ignored. Used as the
// trigger latency FIFO between the L0 event source and the TTC generator
// (depth 512 here, enough for 300 us of 1400 kHz events), and as small event
// queues elsewhere.
module sync_fifo #(
  parameter int unsigned W     = 28,
  parameter int unsigned DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
      if (push && full) overflow <= 1'b1;
    end
  end
endmodule
