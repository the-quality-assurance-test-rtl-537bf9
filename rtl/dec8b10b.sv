// 8b10b decoder with code-violation and running-disparity checking.
//
// Each cycle with en high the 10-bit symbol din ({a..e,i,f..j}, bit 9 first
// on the line) is split into its 6-bit and 4-bit sub-blocks, which are looked
// up in the standard code tables. The byte, the control flag and two error
// flags are registered and appear one cycle later with valid. code_err is set
// for a sub-block that is in no table; disp_err for a sub-block whose
// disparity is not allowed by the current running disparity. The running
// disparity follows the received code, so one error does not cascade, and
// the first symbol after reset sets it without a disparity check (the
// transmitter's disparity is not known before that).
// Only K28.x and K23/27/29/30.7 are reported as control symbols.
module dec8b10b
  import roc_qa_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [9:0] din,
  output logic       valid,
  output logic [7:0] dout,
  output logic       kout,
  output logic       code_err,
  output logic       disp_err
);
  logic       rd, first;
  logic [5:0] c6, t6;
  logic [3:0] c4, c4n, t4;
  logic [4:0] x;
  logic [2:0] y;
  logic       found6, found4, k28, alt7, unbal6, unbal4, rd1, rd2, derr;

  always_comb begin
    c6 = din[9:4];
    c4 = din[3:0];
    x = '0; y = '0; t6 = '0; t4 = '0;
    found6 = 1'b0; found4 = 1'b0; alt7 = 1'b0;
    k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
    if (k28) begin
      x = 5'd28; found6 = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++) begin
        t6 = code6_rdn(5'(i));
        if (c6 == t6 || (c6 == ~t6 && ($countones(t6) != 3 || t6 == 6'b111000))) begin
          x = 5'(i); found6 = 1'b1;
        end
      end
    end
    unbal6 = ($countones(c6) != 3);
    rd1    = unbal6 ? ($countones(c6) > 3) : rd;
    // after 110000 a K28 neutral 4-bit sub-block is sent complemented
    c4n = (k28 && !rd1 && $countones(c4) == 2 && c4 != 4'b1100 && c4 != 4'b0011) ? ~c4 : c4;
    for (int j = 0; j < 9; j++) begin
      t4 = code4_rdn(4'(j));
      if (c4n == t4 || (c4n == ~t4 && ($countones(t4) != 2 || t4 == 4'b1100))) begin
        y = (j == 8) ? 3'd7 : 3'(j); found4 = 1'b1; alt7 = (j == 8);
      end
    end
    unbal4 = ($countones(c4) != 2);
    rd2    = unbal4 ? ($countones(c4) > 2) : rd1;
    derr = 1'b0;
    if (unbal6 && (($countones(c6) > 3) == rd)) derr = 1'b1;
    if (c6 == 6'b111000 && rd)  derr = 1'b1;
    if (c6 == 6'b000111 && !rd) derr = 1'b1;
    if (unbal4 && (($countones(c4) > 2) == rd1)) derr = 1'b1;
    if (c4 == 4'b1100 && rd1)  derr = 1'b1;
    if (c4 == 4'b0011 && !rd1) derr = 1'b1;
    if (unbal6 && $countones(c6) != 2 && $countones(c6) != 4) derr = 1'b1;
    if (unbal4 && $countones(c4) != 1 && $countones(c4) != 3) derr = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd <= 1'b0; first <= 1'b1; valid <= 1'b0;
      dout <= '0; kout <= 1'b0; code_err <= 1'b0; disp_err <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        rd       <= rd2;
        first    <= 1'b0;
        dout     <= {y, x};
        kout     <= k28 || (alt7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
        code_err <= !(found6 && found4);
        disp_err <= derr && !first;
      end
    end
  end
endmodule
