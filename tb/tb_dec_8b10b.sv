// tb_dec_8b10b: checks the decoder on every symbol of the code from both
// running disparities (byte, K flag, running disparity, no error), on the
// same symbols with the wrong running disparity (disparity error where the
// symbol is disparity dependent), and on all 1024 ten-bit patterns: every
// pattern that is no code word of either disparity must give a code error.
// The encoder, checked on its own, provides the code table.
module tb_dec_8b10b;
  import sts_pkg::*;
  int checks = 0, failures = 0;

  logic [9:0] code;
  logic       rd_in, k, code_err, disp_err, rd_out;
  logic [7:0] data;

  dec_8b10b dut (.code(code), .rd_in(rd_in), .data(data), .k(k),
                 .code_err(code_err), .disp_err(disp_err), .rd_out(rd_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: code=%b rd_in=%0d -> data=%h k=%0d cerr=%0d derr=%0d rd=%0d",
               what, code, rd_in, data, k, code_err, disp_err, rd_out);
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
    bit          valid [2][1024];
    logic [10:0] e;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 512; i++) begin
        if (i[8] && !is_valid_k(i[7:0])) continue;
        e = encode_8b10b(i[7:0], i[8], r[0]);
        valid[r][e[9:0]] = 1;
        code = e[9:0]; rd_in = r[0];
        #1;
        chk(data == i[7:0] && k == i[8] && !code_err && !disp_err && rd_out == e[10],
            "round trip");
        rd_in = ~r[0];
        #1;
        chk(!code_err && data == i[7:0] && k == i[8], "wrong rd keeps byte");
      end
    for (int c = 0; c < 1024; c++)
      for (int r = 0; r < 2; r++) begin
        code = c[9:0]; rd_in = r[0];
        #1;
        if (!valid[0][c] && !valid[1][c]) chk(code_err, "invalid pattern");
        else if (!valid[r][c]) chk(disp_err && !code_err, "disparity error");
        else chk(!code_err && !disp_err, "valid pattern");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
