// 8b10b encoder with running disparity.
//
// Each cycle with en high, the byte din (or the control symbol when kin is
// set) is encoded with the standard 5b/6b and 3b/4b sub-block tables and the
// running disparity is updated. The 10-bit code appears on dout one cycle
// later as {a,b,c,d,e,i,f,g,h,j}, with bit 9 the first bit on the line.
// Running disparity starts negative after reset (this design's choice).
// The test setup encodes every generated input stream this way before it is
// serialized to 640 Mbps.
module enc8b10b
  import roc_qa_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] din,
  input  logic       kin,
  output logic [9:0] dout,
  output logic       rd_o      // running disparity after dout (1 = positive)
);
  logic [10:0] enc;

  always_comb enc = encode_8b10b(din, kin, rd_o);

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_o <= 1'b0;
      dout <= K28_5_RDN;
    end else if (en) begin
      rd_o <= enc[10];
      dout <= enc[9:0];
    end
  end
endmodule
