// Bunch-crossing identifier counter.
//
// Advances once per bunch crossing (bc_stb, 40 MHz) through 0 .. ORBIT-1 and
// wraps; bcr forces the next value to 0. bc_time is a free-running 16-bit
// count of bunch crossings used to time-stamp L0 events for the trigger
// latency. orbit_start is high while bcid is 0. The orbit length of 3564
// bunch crossings is the LHC value.
module bcid_counter #(
  parameter int unsigned ORBIT = 3564
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_stb,
  input  logic        bcr,
  output logic [11:0] bcid,
  output logic [15:0] bc_time,
  output logic        orbit_start
);
  always_ff @(posedge clk) begin
    if (rst) begin
      bcid <= '0; bc_time <= '0;
    end else if (bc_stb) begin
      bc_time <= bc_time + 16'd1;
      if (bcr || bcid == 12'(ORBIT - 1)) bcid <= '0;
      else                              bcid <= bcid + 12'd1;
    end
  end
  assign orbit_start = (bcid == '0);
endmodule
