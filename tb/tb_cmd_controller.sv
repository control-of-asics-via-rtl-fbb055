// tb_cmd_controller: checks sequence numbering, frame contents, matching
// of Ack and RDdata_ack responses, the in-flight limit (stall), timeouts,
// broadcast completion and rejection of unexpected responses.
//
// A responder answers each sent command after a random delay, except
// commands whose payload has bit 13 set, which are left unanswered and
// must time out. Responses arrive out of order. Every command must be
// reported exactly once on done with the expected result and data.
module tb_cmd_controller;
  import sts_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int TMO = 300;

  logic        clk = 0, rst_n = 0;
  logic        cmd_valid = 0, cmd_ready, tx_valid, tx_ready = 0, resp_valid = 0;
  cmd_t        cmd = '0;
  logic [39:0] tx_frame;
  resp_t       resp = '0;
  logic        done_valid, unexpected, stall;
  done_t       done;

  cmd_controller #(.MAX_IN_FLIGHT(8), .TIMEOUT_CLKS(TMO)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_frame(tx_frame),
    .resp_valid(resp_valid), .resp(resp), .done_valid(done_valid), .done(done),
    .unexpected(unexpected), .stall(stall));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct { resp_t r; longint due; } pend_t;
  pend_t   pend[$];
  cmd_t    sent_cmd [16];
  result_t exp_res  [16];
  logic [13:0] exp_data [16];
  bit      open_s   [16];
  int      n_sent = 0, n_done = 0, n_stall = 0, n_tmo = 0, n_unexp = 0, n_noack = 0;
  logic [3:0] next_seq = 0;
  longint  cyc = 0;

  // command source: 120 commands with random gaps
  bit issue = 0, bogus = 0;
  int n_issued = 0, gap = 0;
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) begin
      n_issued++;
      cmd_valid <= 0;
      gap = $urandom_range(0, 3);
    end else if (issue && !cmd_valid && n_issued < 120) begin
      if (gap > 0) gap--;
      else begin
        cmd_valid   <= 1;
        cmd.chip    <= (n_issued % 17 == 5) ? CHIP_BROADCAST : 4'($urandom_range(0, 7));
        cmd.rtype   <= req_t'($urandom_range(1, 3));
        cmd.payload <= {(n_issued % 13 == 7), 13'($urandom)};
      end
    end
  end

  // tx side: accept a frame on about one clock in three
  always @(posedge clk) begin
    cyc++;
    tx_ready <= ($urandom_range(0, 2) == 0);
    if (rst_n && stall) n_stall++;
    if (rst_n && unexpected) n_unexp++;
    if (rst_n && tx_valid && tx_ready) begin
      logic [3:0] s;
      cmd_t       c;
      s = tx_frame[35:32];
      c = '{chip: tx_frame[39:36], rtype: req_t'(tx_frame[31:30]), payload: tx_frame[29:16]};
      chk(s == next_seq, "sequence numbers count up");
      chk(tx_frame[15:0] == crc_ref(128'(tx_frame[39:16]), 24, 16, 16'h1021, 16'hFFFF), "frame CRC");
      chk(!open_s[s], "sequence number not in use");
      next_seq = next_seq + 1;
      sent_cmd[s] = c;
      open_s[s]   = 1;
      n_sent++;
      if (c.chip == CHIP_BROADCAST) exp_res[s] = RES_NOACK;
      else if (c.payload[13]) exp_res[s] = RES_TIMEOUT;
      else begin
        pend_t p;
        p.r       = '0;
        p.r.chip  = c.chip;
        p.r.is_rd = (c.rtype == REQ_RD_DATA);
        p.r.seq   = p.r.is_rd ? {1'b0, s[2:0]} : s;
        p.r.status = 4'($urandom);
        p.r.ack   = 2'd1;
        p.r.data  = p.r.is_rd ? (c.payload ^ 14'h2AAA) : 14'h0;
        p.due     = cyc + $urandom_range(5, 120);
        exp_res[s]  = p.r.is_rd ? RES_RDDATA : RES_ACK;
        exp_data[s] = p.r.data;
        pend.push_back(p);
      end
    end
    // responder: one response per clock, the first that is due
    resp_valid <= 0;
    if (bogus) begin
      resp_valid <= 1;
      resp       <= '{chip: 4'd3, is_rd: 1'b0, seq: 4'd9, ack: 2'd1, cp: 1'b0,
                      status: 4'd0, data: 14'd0};
      bogus = 0;
    end
    foreach (pend[i]) if (pend[i].due <= cyc) begin
      resp_valid <= 1;
      resp       <= pend[i].r;
      pend.delete(i);
      break;
    end
    if (rst_n && done_valid) begin
      n_done++;
      chk(open_s[done.seq], "done for an open command");
      chk(done.result == exp_res[done.seq], "result kind");
      chk(done.cmd == sent_cmd[done.seq], "command echoed");
      if (done.result == RES_RDDATA) chk(done.data == exp_data[done.seq], "read data");
      if (done.result == RES_TIMEOUT) n_tmo++;
      if (done.result == RES_NOACK) n_noack++;
      open_s[done.seq] = 0;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    issue = 1;
    wait (n_issued == 120);
    // an Ack for a sequence number nobody waits for
    @(posedge clk);
    wait (pend.size() == 0);
    repeat (TMO + 20) @(posedge clk);
    bogus = 1;
    repeat (5) @(posedge clk);
    chk(n_done == 120 && n_sent == 120, "every command completed once");
    chk(n_stall > 0, "stall on full window");
    chk(n_tmo > 0, "timeouts");
    chk(n_noack > 0, "broadcast completed without ack");
    chk(n_unexp == 1, "unexpected response counted");
    $display("sent=%0d done=%0d stall_cycles=%0d timeouts=%0d broadcasts=%0d", n_sent, n_done, n_stall, n_tmo, n_noack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
