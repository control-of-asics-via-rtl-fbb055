// tb_dl_frame_builder: random commands; checks every field of the five
// frame bytes and the CRC-16 against the long-division reference.
module tb_dl_frame_builder;
  import sts_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  seq;
  cmd_t        cmd;
  logic [39:0] frame;

  dl_frame_builder dut (.seq(seq), .cmd(cmd), .frame(frame));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: seq=%h cmd=%h frame=%h", what, seq, cmd, frame);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] body;
    for (int i = 0; i < 300; i++) begin
      seq         = 4'($urandom);
      cmd.chip    = 4'($urandom);
      cmd.rtype   = req_t'($urandom_range(0, 3));
      cmd.payload = 14'($urandom);
      #1;
      chk(frame[39:36] == cmd.chip, "chip address in byte 1 bits 7:4");
      chk(frame[35:32] == seq, "sequence number in byte 1 bits 3:0");
      chk(frame[31:30] == cmd.rtype, "request type in byte 2 bits 7:6");
      chk(frame[29:24] == cmd.payload[13:8], "payload 13:8 in byte 2");
      chk(frame[23:16] == cmd.payload[7:0], "payload 7:0 in byte 3");
      body = {cmd.chip, seq, cmd.rtype, cmd.payload};
      chk(frame[15:0] == crc_ref(128'(body), 24, 16, 16'h1021, 16'hFFFF), "CRC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
