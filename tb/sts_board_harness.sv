// sts_board_harness: one readout board in a given FEB configuration, for
// the workload testbench. It instantiates sts_gbtx_ctrl_top with N_FEB
// front-end boards of 8 ASICs and LPA uplink e-links per ASIC, and one
// stsxyter_model per ASIC. The model of ASIC a listens to the downlink
// e-link of FEB a/8 and drives uplink links a*LPA .. a*LPA+LPA-1, which
// is the link order the top expects (master, slave 1, slave 2 e-links in
// turn).
//
// When start rises it runs, on all FEBs at once: SOS until every uplink
// reports SOS, K28.1 until every uplink answers K28.1, EOS until every
// uplink answers EOS, then normal frames until every link is locked.
// Then each FEB sends, as one burst, a register write and read-back to
// each of its 8 chips (24 commands, more than the 8 that may be in
// flight), and checks every result and the read data. Hit timestamps
// are checked throughout as in the default-size test. finished rises when
// all FEBs are done; checks and failures count what was checked. The
// sequence and the checks are this testbench's own.
module sts_board_harness
  import sts_pkg::*;
#(
  parameter int N_FEB = 2,
  parameter int LPA   = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   hits,
  output int   stalls
);
  localparam int NA = N_FEB * 8;
  localparam int NL = NA * LPA;

  logic [79:0]  dl_gbt_data;
  logic [111:0] ul_gbt_data [3];
  logic     cmd_valid [N_FEB], cmd_ready [N_FEB], done_valid [N_FEB], unexpected [N_FEB],
            resp_overflow [N_FEB];
  cmd_t     cmd [N_FEB];
  done_t    done [N_FEB];
  tx_mode_t tx_mode [N_FEB];
  tx_mode_t mode_all = TX_FRAMES;
  logic     sync_clear = 0;
  logic     link_locked [NL], sos_ok [NL], sos_seen [NL], other_seen [NL], k281_seen [NL],
            eos_seen [NL], ul_valid [NL], ul_sync [NL], ul_frame_err [NL];
  uframe_t  ul_frame [NL];

  sts_gbtx_ctrl_top #(.N_FEB(N_FEB), .LINKS_PER_ASIC(LPA)) dut (
    .clk(clk), .rst_n(rst_n), .dl_gbt_data(dl_gbt_data), .ul_gbt_valid(1'b1),
    .ul_gbt_data(ul_gbt_data), .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd),
    .done_valid(done_valid), .done(done), .unexpected(unexpected),
    .resp_overflow(resp_overflow), .tx_mode(tx_mode), .sync_clear(sync_clear),
    .link_locked(link_locked), .sos_ok(sos_ok), .sos_seen(sos_seen), .other_seen(other_seen),
    .k281_seen(k281_seen), .eos_seen(eos_seen), .ul_valid(ul_valid), .ul_frame(ul_frame),
    .ul_sync(ul_sync), .ul_frame_err(ul_frame_err));

  always_comb foreach (tx_mode[f]) tx_mode[f] = mode_all;

  // ---- ASIC models
  logic [7:0] ul_link [NL];
  int         hits_sent [NA], cmds_done [NA];

  for (genvar a = 0; a < NA; a++) begin : g_asic
    logic [7:0] o [LPA];
    stsxyter_model #(.CHIP(4'(a % 8)), .N_LINKS(LPA)) u_asic (
      .clk(clk), .rst_n(rst_n), .dl_in(dl_gbt_data[4*(a/8) +: 4]), .mute(1'b0),
      .corrupt_crc(1'b0), .ul_out(o), .hits_sent(hits_sent[a]), .cmds_done(cmds_done[a]));
    for (genvar l = 0; l < LPA; l++) begin : g_l
      assign ul_link[a * LPA + l] = o[l];
    end
  end

  always_comb begin
    ul_gbt_data[0] = '0;
    ul_gbt_data[1] = '0;
    ul_gbt_data[2] = '0;
    for (int l = 0; l < NL; l++)
      if (l < 12)      ul_gbt_data[0][8*l +: 8] = ul_link[l];
      else if (l < 26) ul_gbt_data[1][8*(l-12) +: 8] = ul_link[l];
      else             ul_gbt_data[2][8*(l-26) +: 8] = ul_link[l];
  end

  int n_chk = 0, n_fail = 0;
  task automatic chk(input bit ok, input string what);
    n_chk++;
    if (!ok) begin
      n_fail++;
      $display("FAIL (%0d FEB x %0d links) %s at %0t", N_FEB, LPA, what, $time);
    end
  endtask

  // ---- hit timestamps and stalls
  int     n_hits = 0, n_ts_bad = 0, n_stall = 0, n_stray = 0;
  longint cyc = 0;
  bit     ts_check = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    foreach (cmd_valid[f]) if (cmd_valid[f] && !cmd_ready[f]) n_stall++;
    for (int l = 0; l < NL; l++)
      if (ul_valid[l] && ul_frame[l].kind == UF_HIT && ts_check) begin
        logic [13:0] age;
        n_hits++;
        age = 14'(cyc) - ul_frame[l].ts_full;
        if (age > 14'd200) n_ts_bad++;
      end
  end

  // ---- per-FEB command burst
  bit go = 0;
  bit feb_done [N_FEB];

  for (genvar f = 0; f < N_FEB; f++) begin : g_feb
    cmd_t        cq[$];
    result_t     exp_res[$];
    logic [13:0] exp_dat[$];
    int          n_done = 0;

    always @(posedge clk) begin
      if (!rst_n) cmd_valid[f] <= 0;
      else begin
        if (cmd_valid[f] && cmd_ready[f]) cmd_valid[f] <= 0;
        else if (!cmd_valid[f] && cq.size() > 0) begin
          cmd_valid[f] <= 1;
          cmd[f]       <= cq.pop_front();
        end
        if (done_valid[f]) begin
          n_done++;
          chk(exp_res.size() > 0, "a result was expected");
          if (exp_res.size() > 0) begin
            chk(done[f].result == exp_res[0], "result kind in order");
            if (exp_res[0] == RES_RDDATA) chk(done[f].data == exp_dat[0], "read-back data");
            void'(exp_res.pop_front());
            void'(exp_dat.pop_front());
          end
        end
        if (unexpected[f] || resp_overflow[f]) n_stray++;
      end
    end

    initial begin
      feb_done[f] = 0;
      wait (go);
      for (int c = 0; c < 8; c++) begin
        logic [13:0] v;
        v = 14'h0100 + 14'(f * 400 + c * 37);
        cq.push_back('{chip: 4'(c), rtype: REQ_WR_ADDR, payload: 14'(c + 1)});
        exp_res.push_back(RES_ACK);
        exp_dat.push_back('0);
        cq.push_back('{chip: 4'(c), rtype: REQ_WR_DATA, payload: v});
        exp_res.push_back(RES_ACK);
        exp_dat.push_back('0);
        cq.push_back('{chip: 4'(c), rtype: REQ_RD_DATA, payload: 14'(c + 1)});
        exp_res.push_back(RES_RDDATA);
        exp_dat.push_back(v);
      end
      wait (n_done == 24);
      $display("FEB %0d done at clock %0d", f, cyc);
      feb_done[f] = 1;
    end
  end

  function automatic bit all_set(input logic v [NL]);
    foreach (v[i]) if (!v[i]) return 0;
    return 1;
  endfunction

  function automatic bit febs_done();
    foreach (feb_done[f]) if (!feb_done[f]) return 0;
    return 1;
  endfunction

  task automatic wait_all(ref logic v [NL], input int max_clk, input string what);
    int n = 0;
    while (!all_set(v) && n < max_clk) begin
      @(posedge clk);
      n++;
    end
    chk(all_set(v), what);
  endtask

  task automatic clear_flags();
    sync_clear <= 1;
    @(posedge clk);
    sync_clear <= 0;
    @(posedge clk);
  endtask

  assign checks   = n_chk;
  assign failures = n_fail;
  assign hits     = n_hits;
  assign stalls   = n_stall;

  initial begin
    finished = 0;
    wait (start);
    @(posedge clk);
    mode_all = TX_SOS;
    wait_all(sos_ok, 500, "every uplink sends SOS");
    clear_flags();
    mode_all = TX_K281;
    wait_all(k281_seen, 500, "every uplink answers K28.1");
    clear_flags();
    mode_all = TX_EOS;
    wait_all(eos_seen, 500, "every uplink answers EOS");
    mode_all = TX_FRAMES;
    wait_all(link_locked, 2000, "every uplink locks");
    repeat (200) @(posedge clk);
    ts_check = 1;
    $display("(%0d FEB x %0d links) synchronised at clock %0d", N_FEB, LPA, cyc);
    go = 1;
    while (!febs_done()) @(posedge clk);
    repeat (100) @(posedge clk);
    for (int a = 0; a < NA; a++) chk(cmds_done[a] == 3, "each chip executed its commands");
    chk(n_stray == 0, "no stray or lost answers");
    chk(n_ts_bad == 0, "hit timestamps extended correctly");
    chk(n_hits > 0, "hits received");
    chk(n_stall > 0, "command ports stalled on a full window");
    finished = 1;
  end
endmodule
