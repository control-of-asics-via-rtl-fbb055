// crc_comb: combinational CRC over a parallel data word.
//
// Computes the CRC of DATA_W message bits, most significant bit first,
// with a non-reflected polynomial POLY (the x^CRC_W term implied) and
// start value INIT, by unrolling the bit-serial shift register. The link
// uses two instances: CRC_W = 16 over the 24 bits of a downlink frame's
// address, request and payload bytes, and CRC_W = 4 with x^4+x+1 over the
// first 20 bits of an uplink frame. The 4-bit polynomial is the protocol's;
// the 16-bit polynomial and both start values are this design's choice.
//
// Interface: data in, crc out. Timing: purely combinational.
module crc_comb #(
  parameter int                DATA_W = 24,
  parameter int                CRC_W  = 16,
  parameter logic [CRC_W-1:0]  POLY   = 16'h1021,
  parameter logic [CRC_W-1:0]  INIT   = 16'hFFFF
) (
  input  logic [DATA_W-1:0] data,
  output logic [CRC_W-1:0]  crc
);
  always_comb begin
    logic fb;
    crc = INIT;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb  = crc[CRC_W-1] ^ data[i];
      crc = {crc[CRC_W-2:0], 1'b0};
      if (fb) crc = crc ^ POLY;
    end
  end
endmodule
