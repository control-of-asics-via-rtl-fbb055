// ul_frame_decoder: assembles, classifies and checks uplink frames of one
// e-link.
//
// Uplink frames are three bytes (bit 23 first). The first bits form a
// prefix code that favours readout data:
//   0     hit: channel(22:16) ADC(15:11) TS<9:8>(10:9) TS<7:0>(8:1) EM(0);
//         ADC = 0 marks a dummy hit
//   11    TS_MSB: Timestamp<13:8> three times (21:16, 15:10, 9:4), CRC(3:0)
//   101   RDdata_ack: register content(20:7), sequence number LSBs(6:4),
//         CRC(3:0)
//   100   Ack: ACK code(20:19), sequence number(18:15), CP(14),
//         status(13:10), Timestamp<7:2> or 0 (9:4), CRC(3:0)
// The CRC-4 (x^4+x+1) covers bits 23:4. Framing: any K28.5 comma restarts
// the byte count, so the first data byte after a comma (a sync frame of
// three commas, or a single one after reset) is byte 0 of a frame. Bytes
// are not taken until a comma has been seen. A frame containing a symbol
// with a code or disparity error, or another K symbol, is dropped and
// counted in frame_err, and bytes are then ignored until the next comma.
//
// Hits get a 14-bit timestamp: the last valid TS_MSB value, corrected by
// the signed difference (-2..+1) between the hit's TS<9:8> and the low two
// bits of that value. A TS_MSB counts as valid when its CRC matches and
// its three copies agree. These two rules, the handling of other K symbols
// and the counters are this design's own; the layouts are the protocol's.
//
// Timing: frame_valid pulses one clock after the third byte's sym_valid.
module ul_frame_decoder
  import sts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sym_valid,
  input  logic [7:0] data,
  input  logic       k,
  input  logic       sym_err,     // code or disparity error on this symbol
  output logic       frame_valid,
  output uframe_t    frame,
  output logic       sync_frame,  // pulse: three K28.5 in a row
  output logic       frame_err    // pulse: a frame was dropped
);
  logic        framed;
  logic [1:0]  idx;
  logic [1:0]  commas;
  logic        bad;
  logic [15:0] bytes;
  logic [23:0] raw;
  logic [3:0]  crc;
  logic [5:0]  msb_q;
  uframe_t     f;

  assign raw  = {bytes, data};

  crc_comb #(
    .DATA_W(20), .CRC_W(UL_CRC_W), .POLY(UL_CRC_POLY), .INIT(UL_CRC_INIT)
  ) u_crc (
    .data(raw[23:4]),
    .crc (crc)
  );

  always_comb begin
    logic [1:0] d;
    f         = '0;
    f.raw     = raw;
    f.crc_ok  = 1'b1;
    f.channel = raw[22:16];
    f.adc     = raw[15:11];
    f.ts_lo   = raw[10:1];
    f.em      = raw[0];
    d         = raw[10:9] - msb_q[1:0];
    f.ts_full = {msb_q + {{4{d[1]}}, d}, raw[8:1]};
    if (!raw[23]) begin
      f.kind = (raw[15:11] == 5'd0) ? UF_DUMMY : UF_HIT;
    end else if (raw[22]) begin
      f.kind   = UF_TS_MSB;
      f.ts_msb = raw[21:16];
      f.crc_ok = (crc == raw[3:0]) && raw[21:16] == raw[15:10] && raw[21:16] == raw[9:4];
    end else if (raw[21]) begin
      f.kind    = UF_RDDATA;
      f.rd_data = raw[20:7];
      f.seq     = {1'b0, raw[6:4]};
      f.crc_ok  = (crc == raw[3:0]);
    end else begin
      f.kind   = UF_ACK;
      f.ack    = raw[20:19];
      f.seq    = raw[18:15];
      f.cp     = raw[14];
      f.status = raw[13:10];
      f.ack_ts = raw[9:4];
      f.crc_ok = (crc == raw[3:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      framed      <= 1'b0;
      idx         <= '0;
      commas      <= '0;
      bad         <= 1'b0;
      bytes       <= '0;
      msb_q       <= '0;
      frame_valid <= 1'b0;
      frame       <= '0;
      sync_frame  <= 1'b0;
      frame_err   <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      sync_frame  <= 1'b0;
      frame_err   <= 1'b0;
      if (sym_valid) begin
        if (k && data == K28_5 && !sym_err) begin
          framed <= 1'b1;
          if (idx != 2'd0) frame_err <= 1'b1;
          idx <= '0;
          bad <= 1'b0;
          if (commas == 2'd2) sync_frame <= 1'b1;
          commas <= (commas == 2'd2) ? 2'd0 : commas + 2'd1;
        end else begin
          commas <= '0;
          if (framed) begin
            bytes <= {bytes[7:0], data};
            if (idx == 2'd2) begin
              idx <= '0;
              bad <= 1'b0;
              if (bad || sym_err || k) begin
                frame_err <= 1'b1;
                framed    <= 1'b0;
              end else begin
                frame_valid <= 1'b1;
                frame       <= f;
                if (f.kind == UF_TS_MSB && f.crc_ok) msb_q <= f.ts_msb;
              end
            end else begin
              idx <= idx + 2'd1;
              if (sym_err || k) begin
                bad    <= 1'b1;
              end
            end
          end
        end
      end
    end
  end
endmodule
