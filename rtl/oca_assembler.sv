// Assembler state machine of one output-capture-and-analysis (OCA) channel.
//
// It receives the decoded bytes of one sub-read-out (SROC) output of the
// device under test, one per byte_valid, and checks every packet:
//   K28.0 | L1ID | 0000 BCID[11:8] | BCID[7:0] | LEN |
//   LEN x ( {P, 0000, CH[2:0]} , DATA ) | CSUM | K28.4
// P is the even parity bit of DATA, CSUM the XOR of all bytes from L1ID to
// the last hit byte. Between packets only K28.5 is allowed. The checks are
// the ones the test setup names: encoding (code/disparity errors from the
// decoder), protocol syntax (a control symbol where data belongs or the
// reverse), parity, checksum, reported length (LEN against the hits before
// K28.4), expected content (DATA = hit_content(CH, BCID, running index of CH
// in the packet)) and the L1 trigger information (L1ID counts packets since
// reset or ECR; BCID must equal the BCID of the oldest L1A sent, which the
// TTC generator pushes in through exp_push/exp_bcid). The output packet
// format itself is this design's own. Errors set sticky bits in err (see
// err_bit_e) and count in err_count; l1_count counts checked packets.
module oca_assembler
  import roc_qa_pkg::*;
#(
  parameter int unsigned EXP_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        byte_valid,
  input  logic [7:0]  byte_i,
  input  logic        k_i,
  input  logic        code_err,
  input  logic        disp_err,
  input  logic        exp_push,
  input  logic [11:0] exp_bcid,
  input  logic        ecr,
  output logic [7:0]  err,
  output logic [15:0] err_count,
  output logic [15:0] l1_count,
  output logic [31:0] hit_count
);
  typedef enum logic [3:0] {
    A_IDLE, A_L1ID, A_BCH, A_BCL, A_LEN, A_HIT0, A_HIT1, A_CSUM, A_EOP
  } astate_e;

  astate_e     st;
  logic [7:0]  l1id_exp, l1id, len, nhit, csum, hdr0;
  logic [11:0] bcid;
  logic [7:0]  idx [8];
  logic [11:0] q_bcid;
  logic        q_empty, q_pop;
  logic [7:0]  e;            // errors found on this byte

  sync_fifo #(.W(12), .DEPTH(EXP_DEPTH)) u_exp (
    .clk, .rst, .push(exp_push), .din(exp_bcid), .pop(q_pop), .dout(q_bcid),
    .empty(q_empty), .full(), .count(), .overflow());

  assign q_pop = byte_valid && st == A_BCL && !k_i;

  always_comb begin
    e = '0;
    if (byte_valid) begin
      e[ERR_ENCODING] = code_err || disp_err;
      unique case (st)
        A_IDLE: e[ERR_SYNTAX] = !(k_i && (byte_i == K28_5 || byte_i == K28_0));
        A_HIT0: begin
          if (k_i && byte_i == K28_4) e[ERR_LENGTH] = 1'b1;
          else if (k_i)               e[ERR_SYNTAX] = 1'b1;
        end
        A_HIT1: begin
          if (k_i && byte_i == K28_4) e[ERR_LENGTH] = 1'b1;
          else if (k_i)               e[ERR_SYNTAX] = 1'b1;
          else begin
            e[ERR_PARITY]  = (hdr0[7] != ^byte_i);
            e[ERR_CONTENT] = (byte_i != hit_content(hdr0[2:0], bcid, idx[hdr0[2:0]]));
          end
        end
        A_CSUM: begin
          if (k_i && byte_i == K28_4) e[ERR_LENGTH] = 1'b1;
          else if (k_i)               e[ERR_SYNTAX] = 1'b1;
          else                        e[ERR_CHECKSUM] = (byte_i != csum);
        end
        A_EOP: begin
          if (!k_i)                 e[ERR_LENGTH] = 1'b1;
          else if (byte_i != K28_4) e[ERR_SYNTAX] = 1'b1;
        end
        A_BCL: begin
          if (k_i) e[ERR_SYNTAX] = 1'b1;
          else if (q_empty) e[ERR_UNEXP] = 1'b1;
          else e[ERR_L1] = (q_bcid != {bcid[11:8], byte_i}) || (l1id != l1id_exp);
        end
        default: e[ERR_SYNTAX] = k_i;   // A_L1ID, A_BCH, A_LEN
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= A_IDLE; l1id_exp <= '0; l1id <= '0; len <= '0; nhit <= '0; csum <= '0;
      hdr0 <= '0; bcid <= '0; err <= '0; err_count <= '0; l1_count <= '0; hit_count <= '0;
      for (int i = 0; i < 8; i++) idx[i] <= '0;
    end else begin
      if (ecr) l1id_exp <= '0;
      if (byte_valid) begin
        err <= err | e;
        if (e != '0) err_count <= err_count + 16'd1;
        if (st != A_IDLE && k_i && !(st == A_EOP && byte_i == K28_4)) begin
          // a control symbol inside a packet ends it; resynchronise
          st <= (byte_i == K28_0) ? A_L1ID : A_IDLE;
          csum <= '0;
          for (int i = 0; i < 8; i++) idx[i] <= '0;
        end else begin
          unique case (st)
            A_IDLE: if (k_i && byte_i == K28_0) begin
              st <= A_L1ID; csum <= '0;
              for (int i = 0; i < 8; i++) idx[i] <= '0;
            end
            A_L1ID: begin l1id <= byte_i; csum <= csum ^ byte_i; st <= A_BCH; end
            A_BCH:  begin bcid[11:8] <= byte_i[3:0]; csum <= csum ^ byte_i; st <= A_BCL; end
            A_BCL:  begin bcid[7:0] <= byte_i; csum <= csum ^ byte_i; st <= A_LEN; end
            A_LEN:  begin
              len <= byte_i; nhit <= '0; csum <= csum ^ byte_i;
              st <= (byte_i == '0) ? A_CSUM : A_HIT0;
            end
            A_HIT0: begin hdr0 <= byte_i; csum <= csum ^ byte_i; st <= A_HIT1; end
            A_HIT1: begin
              csum <= csum ^ byte_i;
              idx[hdr0[2:0]] <= idx[hdr0[2:0]] + 8'd1;
              nhit <= nhit + 8'd1;
              hit_count <= hit_count + 32'd1;
              st <= (nhit + 8'd1 == len) ? A_CSUM : A_HIT0;
            end
            A_CSUM: st <= A_EOP;
            A_EOP:  begin
              st <= A_IDLE;
              l1_count <= l1_count + 16'd1;
              l1id_exp <= l1id_exp + 8'd1;
            end
            default: st <= A_IDLE;
          endcase
        end
      end
    end
  end
endmodule
