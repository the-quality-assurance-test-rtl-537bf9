// Behavioural model of an I2C slave with a 10-bit address and 256 byte
// registers, standing in for the configuration interface of the device
// under test. Protocol: S, 11110 A9 A8 0, A7..A0, sub-address, data bytes
// (written to consecutive registers); a repeated start followed by
// 11110 A9 A8 1 returns registers from the sub-address onwards. Lines are
// sampled with the system clock; sda_oe pulls SDA low. Not synthesizable.
module i2c_slave_model #(
  parameter logic [9:0] ADDR = 10'h2A5
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  typedef enum {IDLE, RX, ACK, TX, TXACK} st_e;
  st_e st = IDLE;
  logic [7:0] regs [256];
  logic [7:0] sh, sub;
  int bitn = 0, nbyte = 0;
  bit sel = 0, rd = 0, drop = 0;
  logic scl_p = 1, sda_p = 1;
  int writes = 0, reads = 0;

  initial begin
    sda_oe = 0;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 3 + 1);
  end

  always @(posedge clk) begin
    scl_p <= scl; sda_p <= sda;
    if (scl && scl_p && sda_p && !sda) begin          // (repeated) start
      st <= RX; bitn = 0; nbyte = 0; rd = 0; sda_oe <= 0; drop = 0;
    end else if (scl && scl_p && !sda_p && sda) begin  // stop
      st <= IDLE; sel = 0; sda_oe <= 0;
    end else if (scl && !scl_p) begin                  // rising SCL: sample
      if (st == RX) begin sh = {sh[6:0], sda}; bitn++; end
      if (st == TXACK) begin if (sda) drop = 1; end
    end else if (!scl && scl_p) begin                  // falling SCL: drive
      case (st)
        RX: if (bitn == 8) begin
          bit ack; ack = 0;
          if (nbyte == 0) begin
            if (sh[7:3] == 5'b11110 && sh[2:1] == ADDR[9:8]) begin
              if (!sh[0]) ack = 1;
              else if (sel) begin ack = 1; rd = 1; end
            end
          end else if (nbyte == 1 && !rd) begin
            sel = (sh == ADDR[7:0]); ack = sel;
          end else if (sel && nbyte == 2) begin
            sub = sh; ack = 1;
          end else if (sel) begin
            regs[sub] = sh; sub++; ack = 1; writes++;
          end
          nbyte++;
          sda_oe <= ack;
          st <= ack ? ACK : IDLE;
        end
        ACK: begin
          bitn = 0;
          if (rd) begin st <= TX; sh = regs[sub]; sub++; reads++; sda_oe <= !sh[7]; bitn = 1; end
          else begin st <= RX; sda_oe <= 0; end
        end
        TX: if (bitn == 8) begin sda_oe <= 0; st <= TXACK; end
            else begin sda_oe <= !sh[7 - bitn]; bitn++; end
        TXACK: if (drop) begin st <= IDLE; sda_oe <= 0; end
               else begin sh = regs[sub]; sub++; reads++; sda_oe <= !sh[7]; bitn = 1; st <= TX; end
        default: ;
      endcase
    end
  end
endmodule
