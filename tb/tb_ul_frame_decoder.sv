// tb_ul_frame_decoder: feeds decoded symbols and checks the frames.
// Bytes before the first comma are ignored; after a sync frame (three
// K28.5) random frames of every type are sent with correct CRC-4 and
// their fields are checked against the layout; TS_MSB updates the hit
// timestamp extension (checked against a reference, including hits whose
// TS<9:8> is one above or below the stored MSBs); a wrong CRC gives
// crc_ok = 0; a frame with a symbol error is dropped and counted.
module tb_ul_frame_decoder;
  import sts_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, sym_valid = 0, k = 0, sym_err = 0;
  logic [7:0] data = '0;
  logic       frame_valid, sync_frame, frame_err;
  uframe_t    frame;

  ul_frame_decoder dut (.clk(clk), .rst_n(rst_n), .sym_valid(sym_valid), .data(data), .k(k),
                        .sym_err(sym_err), .frame_valid(frame_valid), .frame(frame),
                        .sync_frame(sync_frame), .frame_err(frame_err));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t raw=%h kind=%0d", what, $time, last_f.raw, last_f.kind);
    end
  endtask

  int      n_frames = 0, n_sync = 0, n_err = 0;
  bit      got = 0;
  uframe_t last_f;
  always @(posedge clk) if (rst_n) begin
    if (frame_valid) begin
      n_frames++;
      got    = 1;
      last_f = frame;
    end
    if (sync_frame) n_sync++;
    if (frame_err) n_err++;
  end

  task automatic sym(input logic [7:0] d, input logic kk, input logic e = 0);
    sym_valid <= 1; data <= d; k <= kk; sym_err <= e;
    @(posedge clk);
    sym_valid <= 0;
    @(posedge clk);   // one idle clock between symbols, as from the aligner
  endtask

  function automatic logic [3:0] crc4(input logic [19:0] b);
    return 4'(crc_ref(128'(b), 20, 4, 16'h3, 16'h0));
  endfunction

  task automatic send(input logic [23:0] f, input logic bad_sym = 0);
    sym(f[23:16], 0);
    sym(f[15:8], 0, bad_sym);
    sym(f[7:0], 0);
  endtask

  task automatic expect_frame(input logic [23:0] f);
    @(posedge clk);
    chk(frame_valid && frame.raw == f, "frame delivered");
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] f;
    logic [5:0]  msb;
    logic [6:0]  ch;
    logic [4:0]  adc;
    logic [9:0]  ts;
    logic [13:0] rdv, exp_ts;
    logic [3:0]  sq, st;
    logic [1:0]  d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bytes before the first comma are not framed
    repeat (6) sym(8'h55, 0);
    chk(n_frames == 0, "nothing before the first comma");
    repeat (3) sym(K28_5, 1);
    @(negedge clk);
    chk(n_sync == 1, "sync frame counted");
    msb = 6'd0;
    for (int i = 0; i < 200; i++) begin
      case ($urandom_range(0, 3))
        0: begin   // TS_MSB
          msb = 6'($urandom);
          f = {2'b11, msb, msb, msb, 4'h0};
          f[3:0] = crc4(f[23:4]);
          got = 0;
    send(f);
          @(negedge clk);
          chk(got && last_f.kind == UF_TS_MSB && last_f.ts_msb == msb && last_f.crc_ok, "TS_MSB");
        end
        1: begin   // hit
          ch  = 7'($urandom);
          adc = 5'($urandom_range(1, 31));
          d   = 2'($urandom_range(0, 3));        // -2..+1 around the MSBs
          ts  = {msb[1:0] + d, 8'($urandom)};
          f   = {1'b0, ch, adc, ts, 1'($urandom)};
          got = 0;
    send(f);
          @(negedge clk);
          exp_ts = {msb + {{4{d[1]}}, d}, ts[7:0]};
          chk(got && last_f.kind == UF_HIT && last_f.channel == ch && last_f.adc == adc &&
              last_f.ts_lo == ts && last_f.em == f[0] && last_f.crc_ok, "hit fields");
          chk(last_f.ts_full == exp_ts, "hit timestamp extension");
        end
        2: begin   // register read data
          rdv = 14'($urandom);
          sq  = 4'($urandom_range(0, 7));
          f   = {3'b101, rdv, sq[2:0], 4'h0};
          f[3:0] = crc4(f[23:4]);
          got = 0;
    send(f);
          @(negedge clk);
          chk(got && last_f.kind == UF_RDDATA && last_f.rd_data == rdv &&
              last_f.seq == sq && last_f.crc_ok, "RDdata_ack fields");
        end
        default: begin  // ack
          sq = 4'($urandom);
          st = 4'($urandom);
          f  = {3'b100, 2'($urandom), sq, 1'($urandom), st, 6'($urandom), 4'h0};
          f[3:0] = crc4(f[23:4]);
          got = 0;
    send(f);
          @(negedge clk);
          chk(got && last_f.kind == UF_ACK && last_f.ack == f[20:19] && last_f.seq == sq &&
              last_f.cp == f[14] && last_f.status == st && last_f.ack_ts == f[9:4] && last_f.crc_ok,
              "Ack fields");
        end
      endcase
      @(posedge clk);
    end
    // dummy hit
    got = 0;
    send(24'h000000);
    @(negedge clk);
    chk(got && last_f.kind == UF_DUMMY, "dummy hit");
    @(posedge clk);
    // corrupted CRC
    f = {3'b100, 2'b01, 4'h5, 1'b0, 4'h3, 6'h11, 4'h0};
    f[3:0] = ~crc4(f[23:4]);
    got = 0;
    send(f);
    @(negedge clk);
    chk(got && last_f.kind == UF_ACK && !last_f.crc_ok, "bad CRC flagged");
    @(posedge clk);
    // symbol error: dropped
    n_err = 0;
    send(24'h123456, 1);
    repeat (2) @(posedge clk);
    chk(n_err == 1, "frame with symbol error dropped");
    chk(n_frames == 202, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
