// tb_sync_detector: checks the three synchronisation detectors.
// 1. 8b/10b data with commas: no SOS and no EOS detection.
// 2. SOS repeated with 10/10-bit runs and with runs of 9 and 11 bits
//    (one bit of skew): detected, sos_ok high; when data follows, sos_ok
//    falls and other_seen is set.
// 3. K28.1 pairs: detected. 4. EOS repeated: detected.
// 5. Runs of 8 or 12 bits are outside the tolerance: no SOS.
module tb_sync_detector;
  import sts_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, din_valid = 0, clear = 0;
  logic [7:0] din = '0;
  logic       sos_det, k281_det, eos_det, sos_ok, sos_seen, other_seen, k281_seen, eos_seen;

  sync_detector dut (.clk(clk), .rst_n(rst_n), .din_valid(din_valid), .din(din), .clear(clear),
                     .sos_det(sos_det), .k281_det(k281_det), .eos_det(eos_det), .sos_ok(sos_ok),
                     .sos_seen(sos_seen), .other_seen(other_seen), .k281_seen(k281_seen),
                     .eos_seen(eos_seen));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit   bits[$];
  logic txrd = 0;
  int   n_sos = 0, n_k = 0, n_eos = 0;

  always @(posedge clk) begin
    if (rst_n && bits.size() >= 8) begin
      din_valid <= 1;
      for (int i = 7; i >= 0; i--) din[i] <= bits.pop_front();
    end else din_valid <= 0;
    if (rst_n && sos_det) n_sos++;
    if (rst_n && k281_det) n_k++;
    if (rst_n && eos_det) n_eos++;
  end

  task automatic put_sym(input logic [7:0] d, input logic kk);
    logic [10:0] e;
    e = encode_8b10b(d, kk, txrd);
    txrd = e[10];
    for (int i = 9; i >= 0; i--) bits.push_back(e[i]);
  endtask

  task automatic put_runs(input int zeros, input int ones);
    repeat (zeros) bits.push_back(1'b0);
    repeat (ones) bits.push_back(1'b1);
  endtask

  task automatic drain();
    wait (bits.size() < 8);
    repeat (4) @(posedge clk);
  endtask

  task automatic reset_counts();
    n_sos = 0; n_k = 0; n_eos = 0;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. data
    for (int i = 0; i < 600; i++) put_sym((i % 50 == 0) ? K28_5 : 8'($urandom), i % 50 == 0);
    drain();
    chk(n_sos == 0 && n_eos == 0 && !sos_seen && !eos_seen, "no false SOS/EOS in data");
    // 2. SOS exact and with skewed runs
    reset_counts();
    repeat (10) put_runs(10, 10);
    drain();
    chk(n_sos >= 8 && sos_seen, "SOS detected");
    chk(sos_ok, "sos_ok while SOS arrives");
    reset_counts();
    put_runs(10, 10);
    put_runs(9, 11); put_runs(11, 9); put_runs(9, 9); put_runs(11, 11);
    put_runs(10, 10);
    drain();
    chk(n_sos >= 5, "skewed SOS detected");
    reset_counts();
    for (int i = 0; i < 60; i++) put_sym(8'($urandom), 0);
    drain();
    chk(!sos_ok && other_seen, "data after SOS reported");
    // 5. runs outside the tolerance
    reset_counts();
    repeat (4) put_runs(8, 8);
    repeat (4) put_runs(12, 12);
    drain();
    chk(n_sos == 0, "runs of 8 or 12 rejected");
    // 3. K28.1
    reset_counts();
    for (int i = 0; i < 20; i++) put_sym(K28_1, 1);
    drain();
    chk(n_k == 20 && k281_seen, "K28.1 detected");
    chk(n_eos == 0 && n_sos == 0, "K28.1 is not SOS or EOS");
    // 4. EOS
    reset_counts();
    repeat (8) for (int i = 19; i >= 0; i--) bits.push_back(EOS_SEQ[i]);
    drain();
    chk(n_eos == 8 && eos_seen, "EOS detected");
    chk(n_sos == 0, "EOS is not SOS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
