// Serializer for one 640 Mbps DDR lane.
//
// A W-bit symbol is taken when load is high and then shifted out most
// significant bit first, two bits per clock: dq[1] is the bit for the rising
// edge and dq[0] the bit for the falling edge of the 320 MHz clock, so a
// 10-bit 8b10b symbol lasts 5 cycles and load must come every W/2 cycles.
// dq is registered; the first two bits of a symbol appear the cycle after
// load. The DDR output register and the delay line that follow it in the
// FPGA are device primitives and are not part of this module.
module ddr_serializer #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] sym,
  output logic [1:0]   dq
);
  logic [W-1:0] sh;

  always_ff @(posedge clk) begin
    if (rst)       sh <= '0;
    else if (load) sh <= sym;
    else           sh <= sh << 2;
  end

  assign dq = sh[W-1 -: 2];
endmodule
