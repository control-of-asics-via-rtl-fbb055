// tb_ul_aligner: feeds an 8b/10b stream, 8 bits per clock, starting at a
// random bit offset after junk, and checks that the aligner locks on the
// first K28.5, then delivers every following symbol in order with the
// right byte and K flag and no error. It then slips the stream by three
// bits and sends a sync frame: the aligner must move its boundary and
// deliver the following data correctly. Last, a run of invalid symbols
// must raise code errors and drop lock.
module tb_ul_aligner;
  import sts_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, din_valid = 0;
  logic [7:0] din = '0;
  logic       sym_valid, k, code_err, disp_err, comma, locked;
  logic [9:0] sym;
  logic [7:0] data;

  ul_aligner dut (.clk(clk), .rst_n(rst_n), .din_valid(din_valid), .din(din),
                  .sym_valid(sym_valid), .sym(sym), .data(data), .k(k),
                  .code_err(code_err), .disp_err(disp_err), .comma(comma), .locked(locked));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit       bits[$];
  logic     txrd = 0;
  logic [8:0] exp_q[$];   // {k, byte} expected once locked
  bit       expecting = 0;
  int       n_err = 0, n_sym = 0, n_err_aligned = 0;

  task automatic put_sym(input logic [7:0] d, input logic kk, input bit expect_it);
    logic [10:0] e;
    e = encode_8b10b(d, kk, txrd);
    txrd = e[10];
    for (int i = 9; i >= 0; i--) bits.push_back(e[i]);
    if (expect_it) exp_q.push_back({kk, d});
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (bits.size() >= 8) begin
        din_valid <= 1;
        for (int i = 7; i >= 0; i--) din[i] <= bits.pop_front();
      end else din_valid <= 0;
    end
  end

  bit arm = 0;
  always @(posedge clk) if (rst_n && sym_valid) begin
    n_sym++;
    if (arm && comma) begin
      expecting = 1;
      arm       = 0;
    end
    if (code_err) n_err++;
    if (code_err && expecting) n_err_aligned++;
    if (expecting) begin
      chk(exp_q.size() > 0, "symbol expected");
      if (exp_q.size() > 0) begin
        chk({k, data} == exp_q[0] && !code_err && !disp_err, "symbol matches");
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off;
    off = $urandom_range(1, 9);
    for (int i = 0; i < off; i++) bits.push_back(1'b1);
    repeat (3) put_sym(8'h4A, 0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    chk(!locked, "not locked before a comma");
    expecting = 1;
    repeat (3) put_sym(K28_5, 1, 1);
    for (int i = 0; i < 200; i++) put_sym(8'($urandom), 0, 1);
    put_sym(K28_5, 1, 1);
    for (int i = 0; i < 100; i++) put_sym(8'($urandom), 0, 1);
    repeat (2) put_sym(K28_5, 1, 1);   // padding so the last data leaves
    wait (bits.size() < 8);
    repeat (5) @(posedge clk);
    chk(locked, "locked");
    chk(exp_q.size() <= 2, "all symbols delivered");
    exp_q.delete();
    // slip three bits, then re-synchronise
    expecting = 0;
    repeat (3) bits.push_back(1'b0);
    repeat (3) put_sym(K28_5, 1, 0);
    for (int i = 0; i < 50; i++) put_sym(8'($urandom), 0, 1);
    wait (bits.size() < 8);
    exp_q.delete();
    arm = 1;
    repeat (3) put_sym(K28_5, 1, 1);
    for (int i = 0; i < 100; i++) put_sym(8'($urandom), 0, 1);
    repeat (2) put_sym(K28_5, 1, 1);   // padding so the last data leaves
    wait (bits.size() < 8);
    repeat (5) @(posedge clk);
    chk(exp_q.size() <= 2, "symbols after slip delivered");
    chk(n_err_aligned == 0, "no code errors while aligned");
    // garbage: all-ones symbols are invalid
    expecting = 0;
    repeat (12) for (int i = 0; i < 10; i++) bits.push_back(1'b1);
    wait (bits.size() < 8);
    repeat (5) @(posedge clk);
    chk(n_err >= 4, "code errors detected");
    chk(!locked, "lock lost");
    $display("symbols=%0d errors=%0d", n_sym, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
