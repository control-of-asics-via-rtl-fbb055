// tb_dl_tx: drives the downlink transmitter through all four modes and
// checks the bit stream it produces.
//
// The stream is cut into 20-bit words (aligned to reset) and 10-bit
// symbols, decoded with the running disparity tracked here. Checks: idle
// words are K28.5 pairs, each frame is K28.5 followed by exactly the five
// bytes handed in, frames come out in order, back-to-back frames are taken
// every 15 clocks (60 bits at 4 bits per clock), no symbol has a code or
// disparity error, SOS/K28.1/EOS modes fill whole words with their
// pattern, and a frame in progress is finished before a mode change.
module tb_dl_tx;
  import sts_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  tx_mode_t    mode = TX_FRAMES;
  logic        frame_valid = 0, frame_ready, word_load;
  logic [39:0] frame = '0;
  logic [3:0]  dout;

  dl_tx dut (.clk(clk), .rst_n(rst_n), .mode(mode), .frame_valid(frame_valid),
             .frame_ready(frame_ready), .frame(frame), .dout(dout), .word_load(word_load));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- receiver model
  logic [19:0] wsh;
  int          nib = 0, words = 0;
  logic        rd = 0;
  logic [39:0] exp_q[$];
  logic [39:0] cur;
  int          fpos = -1;          // -1: outside a frame, else bytes received
  int          n_sos = 0, n_k281 = 0, n_eos = 0, n_idle = 0, n_frames = 0;

  // decode one symbol: {found, rd after it, k, byte}
  function automatic logic [10:0] lookup(input logic [9:0] c, input logic r);
    logic [10:0] e;
    logic [10:0] res;
    res = '0;
    for (int i = 0; i < 512; i++) begin
      e = encode_8b10b(i[7:0], i[8], r);
      if (!res[10] && (!i[8] || is_valid_k(i[7:0])) && e[9:0] == c)
        res = {1'b1, e[10], i[8:0]};
    end
    return res;
  endfunction

  task automatic symbol(input logic [9:0] c);
    logic [7:0]  d;
    logic        kk;
    logic [10:0] res;
    res = lookup(c, rd);
    chk(res[10], "symbol is a code word of the current disparity");
    rd = res[9];
    kk = res[8];
    d  = res[7:0];
    if (kk && d == K28_5) begin
      chk(fpos == -1 || fpos == 0, "comma only between frames");
      if (fpos == 0) n_idle++;
      fpos = 0;
    end else if (kk && d == K28_1) begin
      n_k281++;
    end else begin
      chk(!kk && fpos >= 0 && fpos < 5, "data byte inside a frame");
      cur  = {cur[31:0], d};
      fpos = fpos + 1;
      if (fpos == 5) begin
        chk(exp_q.size() > 0 && cur == exp_q[0], "frame contents");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_frames++;
        fpos = -1;
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    wsh = {wsh[15:0], dout};
    nib++;
    if (nib == 5) begin
      nib = 0;
      words++;
      if (wsh == SOS_SEQ) n_sos++;
      else if (wsh == EOS_SEQ) n_eos++;
      else begin
        symbol(wsh[19:10]);
        symbol(wsh[9:0]);
      end
    end
  end

  // ---- stimulus
  int accept_t[$];
  always @(posedge clk) if (rst_n && frame_valid && frame_ready) accept_t.push_back($time / 10);

  task automatic send(input logic [39:0] f);
    frame_valid <= 1;
    frame       <= f;
    do @(posedge clk); while (!frame_ready);
    exp_q.push_back(f);
    frame_valid <= 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30) @(posedge clk);
    // back-to-back frames
    fork
      begin
        for (int i = 0; i < 6; i++) begin
          frame_valid <= 1;
          frame       <= {8'h10 + 8'(i), 32'($urandom)};
          @(posedge clk);
          while (!frame_ready) @(posedge clk);
          exp_q.push_back(frame);
        end
        frame_valid <= 0;
      end
    join
    for (int i = 1; i < accept_t.size(); i++)
      chk(accept_t[i] - accept_t[i-1] == 15, "frame period is 15 clocks");
    repeat (40) @(posedge clk);
    // a frame, then a mode change while it is being sent
    send({8'hA5, 32'h12345678});
    mode <= TX_SOS;
    repeat (60) @(posedge clk);
    mode <= TX_K281;
    repeat (60) @(posedge clk);
    mode <= TX_EOS;
    repeat (60) @(posedge clk);
    mode <= TX_FRAMES;
    repeat (10) @(posedge clk);
    send({8'h5A, 32'hCAFEF00D});
    repeat (40) @(posedge clk);
    chk(exp_q.size() == 0, "all frames received");
    chk(n_frames == 8, "eight frames");
    chk(n_sos >= 10 && n_k281 >= 20 && n_eos >= 10, "sync patterns sent");
    chk(n_idle > 0, "idle commas");
    $display("frames=%0d sos=%0d k281=%0d eos=%0d idle=%0d", n_frames, n_sos, n_k281, n_eos, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
