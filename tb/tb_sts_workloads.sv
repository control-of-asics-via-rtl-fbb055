// tb_sts_workloads: the two other ways of sharing the readout board's
// 40 uplink e-links, run end to end side by side. The default-size test
// covers 1 FEB with 5 e-links per ASIC. This one covers 2 FEBs with 2
// e-links per ASIC (32 uplinks) and 5 FEBs with 1 e-link per ASIC
// (40 uplinks, 5 downlinks). Each configuration is a sts_board_harness:
// link synchronisation on every FEB at once, then a 24-command
// write/read-back burst per FEB, with results, read data and hit
// timestamps checked. Passing means the design, built with that
// configuration's parameters, holds and runs it.
module tb_sts_workloads;
  logic clk = 0, rst_n = 0, start = 0;
  logic fin2, fin5;
  int   chk2, chk5, fail2, fail5, hits2, hits5, st2, st5;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sts_board_harness #(.N_FEB(2), .LPA(2)) u_feb2 (
    .clk(clk), .rst_n(rst_n), .start(start), .finished(fin2), .checks(chk2),
    .failures(fail2), .hits(hits2), .stalls(st2));
  sts_board_harness #(.N_FEB(5), .LPA(1)) u_feb5 (
    .clk(clk), .rst_n(rst_n), .start(start), .finished(fin5), .checks(chk5),
    .failures(fail5), .hits(hits5), .stalls(st5));

  initial begin
    #3000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk2 + chk5, fail2 + fail5 + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    start = 1;
    wait (fin2 && fin5);
    @(posedge clk);
    $display("2 FEB x 2 links: checks=%0d failures=%0d hits=%0d stalls=%0d", chk2, fail2, hits2, st2);
    $display("5 FEB x 1 link:  checks=%0d failures=%0d hits=%0d stalls=%0d", chk5, fail5, hits5, st5);
    checks   = chk2 + chk5;
    failures = fail2 + fail5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
