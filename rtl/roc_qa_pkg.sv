// Shared constants, types and helper functions of the read-out-controller
// test firmware.
//
// Timing: the whole firmware runs from one 320 MHz clock. A 10-bit 8b10b
// symbol occupies 5 cycles on a 640 Mbps DDR lane (2 bits per cycle) and a
// bunch crossing (BC, 40 MHz) lasts 8 cycles, during which the 320 Mbps
// trigger/timing (TTC) stream carries one 8-bit command word.
//
// Packet formats used between the generators, the device under test and the
// checkers are this design's own choice (see README): the number of inputs
// (8), outputs (4), register counts (64, 36, 28), the frequency and latency
// ranges follow the test setup it implements.
package roc_qa_pkg;

  localparam int unsigned N_IN        = 8;     // input data generators / ROC inputs
  localparam int unsigned N_SROC      = 4;     // ROC sub-read-out outputs
  localparam int unsigned SYM_CYC     = 5;     // 320 MHz cycles per 10-bit symbol
  localparam int unsigned BC_CYC      = 8;     // 320 MHz cycles per bunch crossing
  localparam int unsigned ORBIT_BC    = 3564;  // bunch crossings per LHC orbit
  localparam int unsigned BC_PER_US   = 40;
  localparam int unsigned FREQ_DIV    = 400;   // 40 MHz / 100 kHz step

  // 8b10b control characters used in this design (8-bit value, K flag set)
  localparam logic [7:0] K28_0 = 8'h1C;        // start of packet
  localparam logic [7:0] K28_4 = 8'h9C;        // end of packet
  localparam logic [7:0] K28_5 = 8'hBC;        // idle / comma
  localparam logic [9:0] K28_5_RDN = 10'b0011111010;
  localparam logic [9:0] K28_5_RDP = 10'b1100000101;

  // Bits of the 8-bit TTC command word sent each bunch crossing (MSB first)
  localparam int unsigned TTC_BCR = 7;         // bunch counter reset
  localparam int unsigned TTC_ECR = 6;         // event counter reset
  localparam int unsigned TTC_L1A = 5;         // level-1 accept

  typedef enum logic [1:0] {
    L0_RANDOM   = 2'd0,
    L0_CONSTANT = 2'd1,
    L0_BURST    = 2'd2
  } l0_mode_e;

  // Entry of the TTC latency FIFO: L0 event BCID and BC time stamp
  typedef struct packed {
    logic [11:0] bcid;
    logic [15:0] bc_time;
  } l0_event_t;

  // Checker error flag positions
  typedef enum int unsigned {
    ERR_ENCODING = 0,   // 8b10b code or disparity error
    ERR_SYNTAX   = 1,   // control symbol where data expected, or vice versa
    ERR_PARITY   = 2,
    ERR_CHECKSUM = 3,
    ERR_LENGTH   = 4,
    ERR_CONTENT  = 5,
    ERR_L1       = 6,   // L1ID or BCID does not match the trigger sent
    ERR_UNEXP    = 7    // packet with no trigger outstanding
  } err_bit_e;

  // Deterministic hit content: depends on the input channel, the BCID of the
  // L0 event and the index of the hit within the channel's packet.
  function automatic logic [7:0] hit_content(input logic [2:0] ch,
                                             input logic [11:0] bcid,
                                             input logic [7:0] idx);
    logic [7:0] v;
    v = bcid[7:0] ^ {bcid[11:8], bcid[11:8]} ^ (idx * 8'd29) ^ ({5'd0, ch} * 8'd71);
    return v ^ 8'h5A;
  endfunction

  // 8b10b 5b/6b sub-block (abcdei, a in bit 5) for RD- ; the RD+ code is the
  // complement when the code is unbalanced or 111000.
  function automatic logic [5:0] code6_rdn(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b sub-block (fghj, f in bit 3) for RD-; y = 8 selects the alternate
  // code A7. The RD+ code is the complement when unbalanced or 1100.
  function automatic logic [3:0] code4_rdn(input logic [3:0] y);
    case (y)
      4'd0: return 4'b1011;  4'd1: return 4'b1001;
      4'd2: return 4'b0101;  4'd3: return 4'b1100;
      4'd4: return 4'b1101;  4'd5: return 4'b1010;
      4'd6: return 4'b0110;  4'd7: return 4'b1110;
      default: return 4'b0111;
    endcase
  endfunction

  // Encode one byte (HGFEDCBA) or control symbol with running disparity rd
  // (0 = negative, 1 = positive). Returns {code[9:0]} and the new disparity.
  function automatic logic [10:0] encode_8b10b(input logic [7:0] d,
                                               input logic k,
                                               input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       k28, unbal6, unbal4, rd1, flip6, flip4, alt7;
    x   = d[4:0];
    y   = d[7:5];
    k28 = k && (x == 5'd28);
    c6  = k28 ? 6'b001111 : code6_rdn(x);
    unbal6 = ($countones(c6) != 3);
    flip6  = rd && (unbal6 || c6 == 6'b111000);
    c6  = c6 ^ {6{flip6}};
    rd1 = rd ^ unbal6;
    alt7 = (y == 3'd7) &&
           (k || (!rd1 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                 ( rd1 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    c4  = code4_rdn(alt7 ? 4'd8 : {1'b0, y});
    unbal4 = ($countones(c4) != 2);
    flip4  = (rd1 && (unbal4 || c4 == 4'b1100)) ||
             (k28 && !rd1 && !unbal4 && c4 != 4'b1100);
    c4  = c4 ^ {4{flip4}};
    return {rd1 ^ unbal4, c6, c4};
  endfunction

endpackage
