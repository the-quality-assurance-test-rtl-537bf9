// Behavioural model of the read-out controller (the device under test), just
// detailed enough to close the loop around the tester. Not synthesizable.
//  * Each of the 8 input lanes is de-serialized, aligned and decoded with the
//    tester's own receive blocks; every input packet (SOP, BCID, N, hits,
//    EOP) is stored per channel.
//  * The TTC line is framed with the 40 MHz bunch-crossing clock (a word
//    starts in the cycle where bc_clk rises); BCR zeroes the local BCID,
//    ECR zeroes the L1 identifiers, L1A selects the stored event whose BCID
//    is the current BCID minus latency_bc.
//  * For each L1A every SROC k sends one packet with the hits of channels
//    2k and 2k+1 in the format checked by oca_assembler, 8b10b encoded and
//    sent two bits per clock; K28.5 when idle.
// Counters report what happened; `corrupt` damages one hit byte of the next
// SROC 0 packet so that the checker's content check can be exercised.
module roc_model
  import roc_qa_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [7:0][1:0]      in_dq,
  input  logic                 ttc,
  input  logic                 bc_clk,
  output logic [3:0][1:0]      out_dq,
  input  int                   latency_bc,
  input  bit                   corrupt
);
  // ---------------- input side
  logic [7:0][9:0] sym;
  logic [7:0]      sym_v, bv, k, cerr, derr, locked;
  logic [7:0][7:0] b;
  for (genvar c = 0; c < 8; c++) begin : g_rx
    comma_aligner u_al (.clk, .rst, .realign(1'b0), .din(in_dq[c]), .sym(sym[c]),
      .sym_valid(sym_v[c]), .locked(locked[c]));
    dec8b10b u_dec (.clk, .rst, .en(sym_v[c]), .din(sym[c]), .valid(bv[c]), .dout(b[c]),
      .kout(k[c]), .code_err(cerr[c]), .disp_err(derr[c]));
  end

  int ev_bcid [8][$];
  int ev_n    [8][$];
  int hits    [8][$];
  int pst [8], pbc [8], pn [8], pgot [8];
  int in_pkts = 0, in_empty = 0, in_errors = 0;

  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < 8; c++) if (bv[c]) begin
      if (cerr[c] || derr[c]) in_errors++;
      case (pst[c])
        0: if (k[c] && b[c] == K28_0) pst[c] = 1;
        1: begin pbc[c] = int'(b[c][3:0]) << 8; pst[c] = 2; end
        2: begin pbc[c] += int'(b[c]); pst[c] = 3; end
        3: begin pn[c] = int'(b[c]); pgot[c] = 0; pst[c] = (pn[c] == 0) ? 5 : 4; end
        4: begin hits[c].push_back(int'(b[c])); pgot[c]++; if (pgot[c] == pn[c]) pst[c] = 5; end
        default: begin
          if (!(k[c] && b[c] == K28_4)) in_errors++;
          ev_bcid[c].push_back(pbc[c]); ev_n[c].push_back(pn[c]);
          in_pkts++; if (pn[c] == 0) in_empty++;
          pst[c] = 0;
        end
      endcase
    end
  end

  // ---------------- TTC side and packet building
  int ph = 0, bcid = 0, l1id = 0;
  bit bcp = 0, synced = 0;
  logic [7:0] w = 0;
  int n_bcr = 0, n_ecr = 0, n_l1a = 0, l1_unmatched = 0, l1_unsynced = 0;
  logic [8:0] txq [4][$];     // {K flag, byte}
  bit corrupt_pend = 0;

  always @(posedge clk) if (!rst) begin
    if (corrupt) corrupt_pend = 1;
    if (bc_clk && !bcp) ph = 0; else ph++;
    bcp = bc_clk;
    w = {w[6:0], ttc};
    if (ph == 7) begin
      bcid = (bcid == ORBIT_BC - 1) ? 0 : bcid + 1;
      if (w[TTC_BCR]) begin bcid = 0; synced = 1; n_bcr++; end
      if (w[TTC_ECR]) begin l1id = 0; n_ecr++; end
      if (w[TTC_L1A]) begin
        int l0b;
        n_l1a++;
        if (!synced) l1_unsynced++;
        l0b = (bcid - latency_bc % ORBIT_BC + ORBIT_BC) % ORBIT_BC;
        for (int s = 0; s < 4; s++) begin
          logic [7:0] pk [$];
          logic [7:0] cs;
          int n;
          pk.delete();
          pk.push_back(8'(l1id));
          pk.push_back(8'(l0b >> 8));
          pk.push_back(8'(l0b));
          pk.push_back(8'd0);
          n = 0;
          for (int c = 2 * s; c < 2 * s + 2; c++) begin
            while (ev_bcid[c].size() > 0 && ev_bcid[c][0] != l0b) begin
              for (int i = 0; i < ev_n[c][0]; i++) void'(hits[c].pop_front());
              void'(ev_bcid[c].pop_front()); void'(ev_n[c].pop_front());
              l1_unmatched++;
            end
            if (ev_bcid[c].size() == 0) l1_unmatched++;
            else begin
              for (int i = 0; i < ev_n[c][0]; i++) begin
                logic [7:0] d;
                d = 8'(hits[c].pop_front());
                if (s == 0 && corrupt_pend) begin d = d ^ 8'h01; corrupt_pend = 0; end
                pk.push_back({^d, 4'd0, 3'(c)});
                pk.push_back(d);
                n++;
              end
              void'(ev_bcid[c].pop_front()); void'(ev_n[c].pop_front());
            end
          end
          pk[3] = 8'(n);
          cs = 0;
          foreach (pk[i]) cs ^= pk[i];
          pk.push_back(cs);
          txq[s].push_back({1'b1, K28_0});
          foreach (pk[i]) txq[s].push_back({1'b0, pk[i]});
          txq[s].push_back({1'b1, K28_4});
        end
        l1id++;
      end
    end
  end

  // ---------------- output serializers
  int         tph [4];
  logic [9:0] tsh [4];
  logic       trd [4];
  initial for (int s = 0; s < 4; s++) begin tph[s] = s; trd[s] = 0; tsh[s] = '0; end

  always @(posedge clk) begin
    for (int s = 0; s < 4; s++) begin
      if (tph[s] == 0) begin
        logic [8:0] kd; logic [10:0] e;
        kd = (txq[s].size() > 0) ? txq[s].pop_front() : {1'b1, K28_5};
        e = encode_8b10b(kd[7:0], kd[8], trd[s]);
        trd[s] = e[10];
        tsh[s] = e[9:0];
      end else begin
        tsh[s] = tsh[s] << 2;
      end
      out_dq[s] <= tsh[s][9:8];
      tph[s] = (tph[s] == 4) ? 0 : tph[s] + 1;
    end
  end
endmodule
