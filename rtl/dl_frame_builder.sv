// dl_frame_builder: assembles the five data bytes of a downlink command
// frame.
//
// A downlink frame is six 8b/10b symbols; the first is always the K28.5
// comma and is added by the transmitter. This block produces the other
// five bytes, most significant first:
//   byte 1: chip address (7:4) and sequence number (3:0)
//   byte 2: request type (7:6) and payload bits 13:8 (5:0)
//   byte 3: payload bits 7:0
//   bytes 4-5: CRC-16 over bytes 1..3
// Field layout follows the protocol; the CRC polynomial (CCITT, x^16+x^12+
// x^5+1), the start value 0xFFFF and the choice of covered bytes are this
// design's own.
//
// Interface: seq and cmd in, frame[39:0] out (byte 1 in bits 39:32).
// Timing: purely combinational.
module dl_frame_builder
  import sts_pkg::*;
(
  input  logic [3:0]  seq,
  input  cmd_t        cmd,
  output logic [39:0] frame
);
  logic [23:0] body;
  logic [15:0] crc;

  assign body = {cmd.chip, seq, cmd.rtype, cmd.payload};

  crc_comb #(
    .DATA_W(24), .CRC_W(DL_CRC_W), .POLY(DL_CRC_POLY), .INIT(DL_CRC_INIT)
  ) u_crc (
    .data(body),
    .crc (crc)
  );

  assign frame = {body, crc};
endmodule
