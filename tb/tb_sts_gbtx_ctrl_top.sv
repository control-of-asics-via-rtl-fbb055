// tb_sts_gbtx_ctrl_top: end-to-end test of the readout-board controller at
// its default size (one FEB, 8 ASICs, 40 uplink e-links), against eight
// behavioural ASIC models.
//
// Sequence, as control software would run it:
//  1. SOS on the downlink until every uplink reports SOS;
//  2. K28.1 until every uplink has stopped sending SOS and sends K28.1;
//  3. EOS until every uplink answers EOS; then normal frames, and every
//     link must lock on the ASICs' commas.
//  4. For each chip, write a register and read it back, issued as one
//     burst so the in-flight limit stalls the command port.
//  5. A command to a muted chip times out; an answer with a corrupted CRC
//     is flagged by the receiver and its command times out; a broadcast
//     write completes without acknowledgement, and the chips' answers to
//     it are reported as unexpected.
// Throughout, hit frames are checked: their 14-bit extended timestamp must
// lie within 200 clocks before the current time. Each mechanism is
// counted and a mechanism that never happened is a failure.
module tb_sts_gbtx_ctrl_top;
  import sts_pkg::*;
  int checks = 0, failures = 0;
  localparam int NA = 8, LPA = 5, NL = NA * LPA;

  logic     clk = 0, rst_n = 0;
  logic [79:0]  dl_gbt_data;
  logic [111:0] ul_gbt_data [3];
  logic     cmd_valid [1], cmd_ready [1], done_valid [1], unexpected [1], resp_overflow [1];
  cmd_t     cmd [1];
  done_t    done [1];
  tx_mode_t tx_mode [1];
  logic     sync_clear = 0;
  logic     link_locked [NL], sos_ok [NL], sos_seen [NL], other_seen [NL], k281_seen [NL],
            eos_seen [NL], ul_valid [NL], ul_sync [NL], ul_frame_err [NL];
  uframe_t  ul_frame [NL];

  sts_gbtx_ctrl_top dut (
    .clk(clk), .rst_n(rst_n), .dl_gbt_data(dl_gbt_data), .ul_gbt_valid(1'b1),
    .ul_gbt_data(ul_gbt_data), .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd),
    .done_valid(done_valid), .done(done), .unexpected(unexpected),
    .resp_overflow(resp_overflow), .tx_mode(tx_mode), .sync_clear(sync_clear),
    .link_locked(link_locked), .sos_ok(sos_ok), .sos_seen(sos_seen), .other_seen(other_seen),
    .k281_seen(k281_seen), .eos_seen(eos_seen), .ul_valid(ul_valid), .ul_frame(ul_frame),
    .ul_sync(ul_sync), .ul_frame_err(ul_frame_err));

  always #5 clk = ~clk;

  // ---- ASIC models
  logic [7:0] ul_link [NL];
  logic       mute [NA], corrupt [NA];
  int         hits_sent [NA], cmds_done [NA];

  for (genvar a = 0; a < NA; a++) begin : g_asic
    logic [7:0] o [LPA];
    stsxyter_model #(.CHIP(4'(a)), .N_LINKS(LPA)) u_asic (
      .clk(clk), .rst_n(rst_n), .dl_in(dl_gbt_data[3:0]), .mute(mute[a]),
      .corrupt_crc(corrupt[a]), .ul_out(o), .hits_sent(hits_sent[a]),
      .cmds_done(cmds_done[a]));
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

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters
  int n_hits = 0, n_msb = 0, n_sync = 0, n_crcbad = 0, n_ack = 0, n_rd = 0, n_tmo = 0,
      n_noack = 0, n_unexp = 0, n_stall = 0, n_ts_bad = 0, n_ferr = 0;
  longint cyc = 0;
  bit     ts_check = 0;   // hits are checked once the links are synchronised

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (unexpected[0]) n_unexp++;
    if (cmd_valid[0] && !cmd_ready[0]) n_stall++;
    for (int l = 0; l < NL; l++) begin
      if (ul_sync[l]) n_sync++;
      if (ul_frame_err[l]) n_ferr++;
      if (ul_valid[l]) begin
        if (!ul_frame[l].crc_ok) n_crcbad++;
        if (ul_frame[l].kind == UF_TS_MSB) n_msb++;
        if (ul_frame[l].kind == UF_HIT && ts_check) begin
          logic [13:0] age;
          n_hits++;
          age = 14'(cyc) - ul_frame[l].ts_full;
          if (age > 14'd200) begin
            n_ts_bad++;
            if (n_ts_bad < 5) $display("hit ts %0d at clock %0d", ul_frame[l].ts_full, cyc);
          end
        end
      end
    end
  end

  // ---- command source and result checking
  cmd_t         cq[$];
  result_t      exp_res[$];
  logic [13:0]  exp_dat[$];
  int           n_issued = 0, n_done = 0;

  always @(posedge clk) begin
    if (!rst_n) cmd_valid[0] <= 0;
    else begin
      if (cmd_valid[0] && cmd_ready[0]) begin
        n_issued++;
        cmd_valid[0] <= 0;
      end else if (!cmd_valid[0] && cq.size() > 0) begin
        cmd_valid[0] <= 1;
        cmd[0]       <= cq.pop_front();
      end
      if (done_valid[0]) begin
        n_done++;
        case (done[0].result)
          RES_ACK:     n_ack++;
          RES_RDDATA:  n_rd++;
          RES_TIMEOUT: n_tmo++;
          default:     n_noack++;
        endcase
        chk(exp_res.size() > 0, "a result was expected");
        if (exp_res.size() > 0) begin
          chk(done[0].result == exp_res[0], "result kind in order");
          if (exp_res[0] == RES_RDDATA) chk(done[0].data == exp_dat[0], "read-back data");
          void'(exp_res.pop_front());
          void'(exp_dat.pop_front());
        end
      end
    end
  end

  task automatic push(input logic [3:0] chip, input req_t t, input logic [13:0] p,
                      input result_t r, input logic [13:0] d = '0);
    cq.push_back('{chip: chip, rtype: t, payload: p});
    exp_res.push_back(r);
    exp_dat.push_back(d);
  endtask

  function automatic bit all_set(input logic v [NL]);
    foreach (v[i]) if (!v[i]) return 0;
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

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_mode[0] = TX_FRAMES;
    foreach (mute[a]) begin mute[a] = 0; corrupt[a] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    // 1-3: link synchronisation
    tx_mode[0] = TX_SOS;
    wait_all(sos_ok, 500, "every uplink sends SOS");
    clear_flags();
    tx_mode[0] = TX_K281;
    wait_all(k281_seen, 500, "every uplink answers K28.1");
    repeat (10) @(posedge clk);
    chk(all_set(other_seen), "every uplink left SOS");
    foreach (sos_ok[i]) chk(!sos_ok[i], "SOS stopped");
    clear_flags();
    tx_mode[0] = TX_EOS;
    wait_all(eos_seen, 500, "every uplink answers EOS");
    tx_mode[0] = TX_FRAMES;
    wait_all(link_locked, 2000, "every uplink locks");
    repeat (200) @(posedge clk);
    ts_check = 1;
    // 4: write and read back on every chip, as one burst
    for (int a = 0; a < NA; a++) begin
      push(4'(a), REQ_WR_ADDR, 14'(a + 2), RES_ACK);
      push(4'(a), REQ_WR_DATA, 14'h1000 + 14'(a * 77), RES_ACK);
      push(4'(a), REQ_RD_DATA, 14'(a + 2), RES_RDDATA, 14'h1000 + 14'(a * 77));
    end
    wait (n_done == 24);
    // 5: timeout on a muted chip
    mute[7] = 1;
    push(4'd7, REQ_WR_ADDR, 14'd1, RES_TIMEOUT);
    wait (n_done == 25);
    mute[7] = 0;
    // corrupted answer
    @(posedge clk);
    corrupt[3] = 1;
    @(posedge clk);
    corrupt[3] = 0;
    push(4'd3, REQ_RD_DATA, 14'd5, RES_TIMEOUT);
    wait (n_done == 26);
    // broadcast
    push(CHIP_BROADCAST, REQ_WR_ADDR, 14'd4, RES_NOACK);
    wait (n_done == 27);
    repeat (300) @(posedge clk);
    // checks
    for (int a = 0; a < NA; a++) chk(cmds_done[a] >= 4, "each chip executed its commands");
    chk(n_issued == 27 && exp_res.size() == 0, "all commands completed");
    chk(n_ts_bad == 0, "hit timestamps extended correctly");
    chk(n_hits > 0, "hits received");
    chk(n_msb > 0, "TS_MSB frames received");
    chk(n_sync > 0, "sync frames received");
    chk(n_ack > 0 && n_rd > 0, "acks and read data");
    chk(n_stall > 0, "command port stalled on a full window");
    chk(n_tmo == 2, "two timeouts");
    chk(n_noack == 1, "broadcast completed");
    chk(n_unexp > 0, "unexpected answers to the broadcast");
    chk(n_crcbad > 0, "corrupted CRC detected");
    $display("hits=%0d ts_msb=%0d sync=%0d ack=%0d rd=%0d stall=%0d timeout=%0d noack=%0d unexp=%0d crcbad=%0d ferr=%0d clocks=%0d",
             n_hits, n_msb, n_sync, n_ack, n_rd, n_stall, n_tmo, n_noack, n_unexp, n_crcbad, n_ferr, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
