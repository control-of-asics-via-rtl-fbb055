// tb_crc_comb: checks crc_comb against a long-division reference for the
// downlink CRC-16 (24 data bits) and the uplink CRC-4 (20 data bits), and
// against the published check value of CRC-16/CCITT-FALSE ("123456789"
// gives 0x29B1).
module tb_crc_comb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [23:0] d16;  logic [15:0] c16;
  logic [19:0] d4;   logic [3:0]  c4;
  logic [71:0] d72;  logic [15:0] c72;

  crc_comb #(.DATA_W(24), .CRC_W(16), .POLY(16'h1021), .INIT(16'hFFFF)) u16 (.data(d16), .crc(c16));
  crc_comb #(.DATA_W(20), .CRC_W(4),  .POLY(4'h3),     .INIT(4'h0))     u4  (.data(d4),  .crc(c4));
  crc_comb #(.DATA_W(72), .CRC_W(16), .POLY(16'h1021), .INIT(16'hFFFF)) u72 (.data(d72), .crc(c72));

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    d72 = "123456789";
    #1 chk(c72, 16'h29B1, "check value");
    for (int i = 0; i < 500; i++) begin
      d16 = 24'($urandom);
      d4  = 20'($urandom);
      #1;
      chk(c16, crc_ref(128'(d16), 24, 16, 16'h1021, 16'hFFFF), "crc16");
      chk({12'b0, c4}, crc_ref(128'(d4), 20, 4, 16'h3, 16'h0), "crc4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
