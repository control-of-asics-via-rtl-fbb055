// stsxyter_model: behavioural model of one STS-XYTER front-end ASIC's link
// behaviour, for system-level testbenches. Not synthesizable.
//
// Downlink: takes 4 bits per clock of the shared command e-link, finds
// K28.5 commas at any bit offset, decodes 8b/10b symbols and collects six-
// symbol frames. A frame with a good CRC-16 addressed to CHIP (or to the
// broadcast address 15) is executed on a 16-entry register file:
// WR_ADDR sets the address, WR_DATA writes, RD_DATA reads register
// payload[3:0]; writes and no-ops are answered with an Ack, reads with
// RDdata_ack, both on uplink link 0. With mute set, commands are executed
// but not answered; corrupt_crc makes the next answer carry a wrong CRC.
// Synchronisation: an SOS on the downlink puts the model in sync mode,
// where it sends SOS on every uplink; once it sees K28.1 it answers K28.1;
// on EOS it answers EOS until it sees a K28.5 again, then resumes.
// Uplink: N_LINKS links of 8 bits per clock, link l starting l bits late.
// In normal mode each link sends a three-comma sync frame every
// SYNC_EVERY frames, a TS_MSB frame whenever timestamp bits 13:8 change,
// hits with probability HIT_PCT percent per frame, otherwise dummy hits.
// The timestamp counts clocks from reset.
module stsxyter_model
  import sts_pkg::*;
#(
  parameter logic [3:0] CHIP       = 4'd0,
  parameter int         N_LINKS    = 5,
  parameter int         SYNC_EVERY = 50,
  parameter int         HIT_PCT    = 30
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] dl_in,
  input  logic       mute,
  input  logic       corrupt_crc,
  output logic [7:0] ul_out [N_LINKS],
  output int         hits_sent,
  output int         cmds_done
);
  typedef enum {M_NORMAL, M_SOS, M_K281, M_EOS} mstate_t;
  mstate_t     st;
  logic [19:0] dh;          // downlink bit history
  int          bc;
  bit          aligned;
  logic        drd;
  logic [7:0]  fb[6];
  int          fpos;
  logic [13:0] regs[16];
  logic [3:0]  wr_addr;
  logic [13:0] ts;
  logic [23:0] resp_q[$];
  bit          bad_next;

  // uplink state per link
  bit          ubits[N_LINKS][$];
  logic        urd[N_LINKS];
  int          ufr[N_LINKS];
  logic [5:0]  umsb[N_LINKS];

  function automatic logic [3:0] crc4(input logic [19:0] b);
    logic [3:0] c;
    logic       f;
    c = UL_CRC_INIT;
    for (int i = 19; i >= 0; i--) begin
      f = c[3] ^ b[i];
      c = {c[2:0], 1'b0};
      if (f) c = c ^ UL_CRC_POLY;
    end
    return c;
  endfunction

  function automatic logic [15:0] crc16(input logic [23:0] b);
    logic [15:0] c;
    logic        f;
    c = DL_CRC_INIT;
    for (int i = 23; i >= 0; i--) begin
      f = c[15] ^ b[i];
      c = {c[14:0], 1'b0};
      if (f) c = c ^ DL_CRC_POLY;
    end
    return c;
  endfunction

  // decode one symbol: {found, rd after, k, byte}
  function automatic logic [10:0] dec(input logic [9:0] c, input logic r);
    logic [10:0] e, res;
    res = '0;
    for (int i = 0; i < 512; i++) begin
      e = encode_8b10b(i[7:0], i[8], r);
      if (!res[10] && (!i[8] || is_valid_k(i[7:0])) && e[9:0] == c) res = {1'b1, e[10], i[8:0]};
    end
    if (!res[10])
      for (int i = 0; i < 512; i++) begin
        e = encode_8b10b(i[7:0], i[8], ~r);
        if (!res[10] && (!i[8] || is_valid_k(i[7:0])) && e[9:0] == c) res = {1'b1, e[10], i[8:0]};
      end
    return res;
  endfunction

  task automatic execute();
    logic [23:0] body, r;
    logic [3:0]  seq;
    logic [1:0]  rt;
    logic [13:0] pl;
    body = {fb[1], fb[2], fb[3]};
    if (crc16(body) != {fb[4], fb[5]}) return;
    if (fb[1][7:4] != CHIP && fb[1][7:4] != CHIP_BROADCAST) return;
    seq = fb[1][3:0];
    rt  = fb[2][7:6];
    pl  = {fb[2][5:0], fb[3]};
    cmds_done++;
    case (rt)
      2'd1: wr_addr = pl[3:0];
      2'd2: regs[wr_addr] = pl;
      default: ;
    endcase
    if (rt == 2'd3) r = {3'b101, regs[pl[3:0]], seq[2:0], 4'h0};
    else            r = {3'b100, 2'b01, seq, 1'b0, 4'h0, ts[7:2], 4'h0};
    r[3:0] = crc4(r[23:4]);
    if (bad_next) begin
      r[3:0]   = ~r[3:0];
      bad_next = 0;
    end
    if (!mute) resp_q.push_back(r);
  endtask

  task automatic dl_bit(input logic b);
    logic [10:0] d;
    dh = {dh[18:0], b};
    if (dh == SOS_SEQ) st = M_SOS;
    if (dh == EOS_SEQ && st != M_NORMAL) st = M_EOS;
    if ((dh[9:0] == K28_1_RDN || dh[9:0] == K28_1_RDP) && st == M_SOS) st = M_K281;
    bc++;
    if (dh[9:0] == K28_5_RDN || dh[9:0] == K28_5_RDP) begin
      aligned = 1;
      bc      = 0;
      drd     = (dh[9:0] == K28_5_RDN);   // RD after a comma flips
      fpos    = 1;
      if (st == M_EOS) begin
        st = M_NORMAL;
        for (int l = 0; l < N_LINKS; l++) ufr[l] = 0;   // sync frame first
      end
    end else if (bc == 10) begin
      bc = 0;
      if (aligned && st == M_NORMAL) begin
        d   = dec(dh[9:0], drd);
        drd = d[9];
        if (!d[10] || d[8]) fpos = 0;
        else if (fpos >= 1 && fpos <= 5) begin
          fb[fpos] = d[7:0];
          fpos++;
          if (fpos == 6) begin
            execute();
            fpos = 0;
          end
        end
      end
    end
  endtask

  task automatic put_sym(input int l, input logic [7:0] d, input logic kk);
    logic [10:0] e;
    e = encode_8b10b(d, kk, urd[l]);
    urd[l] = e[10];
    for (int i = 9; i >= 0; i--) ubits[l].push_back(e[i]);
  endtask

  task automatic put_frame(input int l, input logic [23:0] f);
    put_sym(l, f[23:16], 0);
    put_sym(l, f[15:8], 0);
    put_sym(l, f[7:0], 0);
  endtask

  task automatic refill(input int l);
    logic [23:0] f;
    case (st)
      M_SOS:  for (int i = 19; i >= 0; i--) ubits[l].push_back(SOS_SEQ[i]);
      M_EOS:  for (int i = 19; i >= 0; i--) ubits[l].push_back(EOS_SEQ[i]);
      M_K281: begin put_sym(l, K28_1, 1); put_sym(l, K28_1, 1); end
      default: begin
        ufr[l]++;
        if (ufr[l] % SYNC_EVERY == 1) begin
          repeat (3) put_sym(l, K28_5, 1);
        end else if (l == 0 && resp_q.size() > 0) begin
          put_frame(l, resp_q.pop_front());
        end else if (umsb[l] != ts[13:8]) begin
          umsb[l] = ts[13:8];
          f = {2'b11, ts[13:8], ts[13:8], ts[13:8], 4'h0};
          f[3:0] = crc4(f[23:4]);
          put_frame(l, f);
        end else if ($urandom_range(0, 99) < HIT_PCT) begin
          f = {1'b0, 7'($urandom), 5'($urandom_range(1, 31)), ts[9:0], 1'b0};
          put_frame(l, f);
          hits_sent++;
        end else begin
          put_frame(l, 24'h0);
        end
      end
    endcase
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st = M_NORMAL; dh = '0; bc = 0; aligned = 0; drd = 0; fpos = 0; wr_addr = '0;
      ts = '0; hits_sent = 0; cmds_done = 0; bad_next = 0;
      resp_q.delete();
      for (int i = 0; i < 16; i++) regs[i] = 14'(i * 3);
      for (int l = 0; l < N_LINKS; l++) begin
        ubits[l].delete();
        repeat (l) ubits[l].push_back(1'b0);
        urd[l]    = 0;
        ufr[l]    = 0;
        umsb[l]   = 6'h3F;
        ul_out[l] <= '0;
      end
    end else begin
      ts = ts + 1'b1;
      if (corrupt_crc) bad_next = 1;
      for (int i = 3; i >= 0; i--) dl_bit(dl_in[i]);
      for (int l = 0; l < N_LINKS; l++) begin
        logic [7:0] o;
        while (ubits[l].size() < 8) refill(l);
        for (int i = 7; i >= 0; i--) o[i] = ubits[l].pop_front();
        ul_out[l] <= o;
      end
    end
  end
endmodule
