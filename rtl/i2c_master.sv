// I2C master with 10-bit slave addressing.
//
// A pulse on start runs one register transaction on a dedicated bus:
//   write (rw = 0): S | 11110 A9 A8 0 | A7..A0 | subaddr | wdata | P
//   read  (rw = 1): S | 11110 A9 A8 0 | A7..A0 | subaddr |
//                   Sr | 11110 A9 A8 1 | rdata (master NACK) | P
// which is the 10-bit addressing sequence of the I2C standard; the one-byte
// sub-address and one data byte are this design's choice. Every bit takes
// four quarter periods of QDIV clocks (QDIV = 200 gives 400 kHz SCL at
// 320 MHz). The bus is open drain: scl_oe/sda_oe pull the line low, scl_i/
// sda_i are the line levels. SDA changes while SCL is low and is sampled in
// the third quarter with SCL high. A missing ACK from the slave sets nack
// for the transaction; the sequence still runs to its STOP. No clock
// stretching. busy is high from start until the STOP has been sent; done
// pulses at the end.
module i2c_master #(
  parameter int unsigned QDIV = 200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       rw,
  input  logic [9:0] addr,
  input  logic [7:0] subaddr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       nack,
  output logic       busy,
  output logic       done,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_i,
  input  logic       sda_i
);
  typedef enum logic [2:0] {OP_START, OP_RSTART, OP_WRITE, OP_READ, OP_STOP} op_e;

  logic [3:0]  step;
  logic [3:0]  bitn;     // 0..7 data bits, 8 acknowledge
  logic [1:0]  q;
  logic [$clog2(QDIV)-1:0] div;
  logic        rw_r;
  logic [9:0]  addr_r;
  logic [7:0]  sub_r, wd_r, rsh;
  op_e         op;
  logic [7:0]  obyte;
  logic        last_step, scl, sda;

  // transaction program
  always_comb begin
    op = OP_STOP; obyte = '0; last_step = 1'b0;
    unique case (step)
      4'd0: op = OP_START;
      4'd1: begin op = OP_WRITE; obyte = {5'b11110, addr_r[9:8], 1'b0}; end
      4'd2: begin op = OP_WRITE; obyte = addr_r[7:0]; end
      4'd3: begin op = OP_WRITE; obyte = sub_r; end
      4'd4: if (!rw_r) begin op = OP_WRITE; obyte = wd_r; end
            else op = OP_RSTART;
      4'd5: if (!rw_r) begin op = OP_STOP; last_step = 1'b1; end
            else begin op = OP_WRITE; obyte = {5'b11110, addr_r[9:8], 1'b1}; end
      4'd6: op = OP_READ;
      default: begin op = OP_STOP; last_step = 1'b1; end
    endcase
  end

  // line levels per operation and quarter
  always_comb begin
    scl = 1'b1; sda = 1'b1;
    if (busy) begin
      unique case (op)
        OP_START:  begin scl = (q != 2'd3); sda = (q < 2'd2); end
        OP_RSTART: begin scl = (q == 2'd1 || q == 2'd2); sda = (q < 2'd2); end
        OP_STOP:   begin scl = (q != 2'd0); sda = (q >= 2'd2); end
        OP_WRITE:  begin
          scl = (q == 2'd1 || q == 2'd2);
          sda = (bitn == 4'd8) ? 1'b1 : obyte[3'(7 - bitn)];
        end
        OP_READ:   begin
          scl = (q == 2'd1 || q == 2'd2);
          sda = 1'b1;          // release for data, then NACK the last byte
        end
        default: ;
      endcase
    end
  end

  assign scl_oe = !scl;
  assign sda_oe = !sda;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; nack <= 1'b0; rdata <= '0;
      step <= '0; bitn <= '0; q <= '0; div <= '0;
      rw_r <= 1'b0; addr_r <= '0; sub_r <= '0; wd_r <= '0; rsh <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; nack <= 1'b0; step <= '0; bitn <= '0; q <= '0; div <= '0;
          rw_r <= rw; addr_r <= addr; sub_r <= subaddr; wd_r <= wdata;
        end
      end else if (div != ($clog2(QDIV))'(QDIV - 1)) begin
        div <= div + 1'b1;
      end else begin
        div <= '0;
        // sample in the middle of SCL high
        if (q == 2'd2 && scl_i) begin
          if (op == OP_WRITE && bitn == 4'd8 && sda_i) nack <= 1'b1;
          if (op == OP_READ && bitn < 4'd8) rsh <= {rsh[6:0], sda_i};
        end
        q <= q + 2'd1;
        if (q == 2'd3) begin
          if ((op == OP_WRITE || op == OP_READ) && bitn != 4'd8) begin
            bitn <= bitn + 4'd1;
          end else begin
            bitn <= '0;
            if (op == OP_READ) rdata <= rsh;
            if (last_step) begin busy <= 1'b0; done <= 1'b1; end
            else step <= step + 4'd1;
          end
        end
      end
    end
  end
endmodule
