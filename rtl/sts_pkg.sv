// sts_pkg: shared constants, types and the 8b/10b code tables of the
// STS-XYTER control and readout link.
//
// The link carries 8b/10b symbols. Downlink (FPGA -> ASIC) frames are six
// symbols long: a K28.5 comma, a byte with chip address and sequence number,
// a byte with request type and payload bits 13:8, payload bits 7:0, and a
// 16-bit CRC. Uplink (ASIC -> FPGA) frames are three symbols (24 bits) long
// and are typed by a prefix code: 0 = hit, 11 = timestamp MSBs, 101 = register
// read data, 100 = acknowledgement. The three types that carry a CRC use a
// 4-bit CRC with polynomial x^4+x+1. Link synchronisation uses two 20-bit
// patterns that are not 8b/10b code words: SOS (start of synchronisation)
// and EOS (end of synchronisation).
//
// Symbols are written abcdei_fghj with 'a' in bit 9; bit 9 goes on the wire
// first. The request-type encoding, the CRC-16 polynomial and the CRC initial
// values are this design's own choices; the frame layouts, the pattern
// values and the CRC-4 polynomial follow the protocol description.
package sts_pkg;

  // ---------------------------------------------------------------- symbols
  localparam logic [7:0]  K28_5 = 8'hBC;
  localparam logic [7:0]  K28_1 = 8'h3C;
  localparam logic [9:0]  K28_5_RDN = 10'b001111_1010;  // running disparity -
  localparam logic [9:0]  K28_5_RDP = 10'b110000_0101;  // running disparity +
  localparam logic [9:0]  K28_1_RDN = 10'b001111_1001;
  localparam logic [9:0]  K28_1_RDP = 10'b110000_0110;

  // 20-bit synchronisation patterns, bit 19 sent first.
  localparam logic [19:0] SOS_SEQ = 20'b00000_00000_11111_11111;
  localparam logic [19:0] EOS_SEQ = 20'b1100_1111_1100_0000_1100;

  // ---------------------------------------------------------------- CRCs
  localparam int          DL_CRC_W    = 16;
  localparam logic [15:0] DL_CRC_POLY = 16'h1021;   // x^16+x^12+x^5+1
  localparam logic [15:0] DL_CRC_INIT = 16'hFFFF;
  localparam int          UL_CRC_W    = 4;
  localparam logic [3:0]  UL_CRC_POLY = 4'h3;       // x^4+x+1
  localparam logic [3:0]  UL_CRC_INIT = 4'h0;

  // ---------------------------------------------------------------- downlink
  typedef enum logic [1:0] {
    REQ_NOP     = 2'd0,
    REQ_WR_ADDR = 2'd1,   // set register address for following writes
    REQ_WR_DATA = 2'd2,   // write payload to the address set before
    REQ_RD_DATA = 2'd3    // read the register whose address is the payload
  } req_t;

  localparam logic [3:0] CHIP_BROADCAST = 4'hF;

  typedef struct packed {
    logic [3:0]  chip;
    req_t        rtype;
    logic [13:0] payload;
  } cmd_t;

  typedef enum logic [1:0] {
    TX_FRAMES = 2'd0,     // normal command frames (K28.5 pairs when idle)
    TX_SOS    = 2'd1,     // repeat SOS
    TX_K281   = 2'd2,     // repeat K28.1 K28.1
    TX_EOS    = 2'd3      // repeat EOS
  } tx_mode_t;

  // ---------------------------------------------------------------- uplink
  typedef enum logic [2:0] {
    UF_DUMMY  = 3'd0,
    UF_HIT    = 3'd1,
    UF_TS_MSB = 3'd2,
    UF_RDDATA = 3'd3,
    UF_ACK    = 3'd4
  } uf_kind_t;

  typedef struct packed {
    uf_kind_t    kind;
    logic        crc_ok;     // 1 for hits (no CRC) or when the CRC matches
    logic [23:0] raw;        // the frame as received
    // hit fields
    logic [6:0]  channel;
    logic [4:0]  adc;
    logic [9:0]  ts_lo;      // hit timestamp bits 9:0 (9:8 overlap the MSBs)
    logic        em;
    logic [13:0] ts_full;    // hit timestamp extended with the last TS_MSB
    // TS_MSB field
    logic [5:0]  ts_msb;
    // RDdata_ack and Ack fields
    logic [13:0] rd_data;
    logic [3:0]  seq;        // RDdata_ack carries only bits 2:0
    logic [1:0]  ack;
    logic        cp;
    logic [3:0]  status;
    logic [5:0]  ack_ts;
  } uframe_t;

  // Response handed from the uplink receivers to the command controller.
  typedef struct packed {
    logic [3:0]  chip;
    logic        is_rd;      // 1: RDdata_ack, 0: Ack
    logic [3:0]  seq;        // for RDdata_ack only bits 2:0 are valid
    logic [1:0]  ack;
    logic        cp;
    logic [3:0]  status;
    logic [13:0] data;
  } resp_t;

  typedef enum logic [1:0] {
    RES_ACK     = 2'd0,
    RES_RDDATA  = 2'd1,
    RES_TIMEOUT = 2'd2,
    RES_NOACK   = 2'd3       // broadcast: sent, no acknowledgement expected
  } result_t;

  typedef struct packed {
    logic [3:0]  seq;
    cmd_t        cmd;
    result_t     result;
    logic [1:0]  ack;
    logic        cp;
    logic [3:0]  status;
    logic [13:0] data;
  } done_t;

  // ---------------------------------------------------------------- 8b/10b
  // 5b/6b code for running disparity -, and whether the RD+ code is its
  // complement (all unbalanced codes, plus D.07).
  function automatic logic [6:0] enc6_rdn(input logic [4:0] x);
    // {flip, abcdei}
    case (x)
      5'd0:  return {1'b1, 6'b100111};
      5'd1:  return {1'b1, 6'b011101};
      5'd2:  return {1'b1, 6'b101101};
      5'd3:  return {1'b0, 6'b110001};
      5'd4:  return {1'b1, 6'b110101};
      5'd5:  return {1'b0, 6'b101001};
      5'd6:  return {1'b0, 6'b011001};
      5'd7:  return {1'b1, 6'b111000};
      5'd8:  return {1'b1, 6'b111001};
      5'd9:  return {1'b0, 6'b100101};
      5'd10: return {1'b0, 6'b010101};
      5'd11: return {1'b0, 6'b110100};
      5'd12: return {1'b0, 6'b001101};
      5'd13: return {1'b0, 6'b101100};
      5'd14: return {1'b0, 6'b011100};
      5'd15: return {1'b1, 6'b010111};
      5'd16: return {1'b1, 6'b011011};
      5'd17: return {1'b0, 6'b100011};
      5'd18: return {1'b0, 6'b010011};
      5'd19: return {1'b0, 6'b110010};
      5'd20: return {1'b0, 6'b001011};
      5'd21: return {1'b0, 6'b101010};
      5'd22: return {1'b0, 6'b011010};
      5'd23: return {1'b1, 6'b111010};
      5'd24: return {1'b1, 6'b110011};
      5'd25: return {1'b0, 6'b100110};
      5'd26: return {1'b0, 6'b010110};
      5'd27: return {1'b1, 6'b110110};
      5'd28: return {1'b0, 6'b001110};
      5'd29: return {1'b1, 6'b101110};
      5'd30: return {1'b1, 6'b011110};
      default: return {1'b1, 6'b101011};
    endcase
  endfunction

  function automatic logic is_valid_k(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  function automatic int ones10(input logic [9:0] c);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(c[i]);
    return n;
  endfunction

  // Encode one byte. rd: 0 = RD-, 1 = RD+. Returns {rd_out, code}.
  // A K request for a byte that is not a valid K code is encoded as data.
  function automatic logic [10:0] encode_8b10b(input logic [7:0] d, input logic k,
                                               input logic rd);
    logic [6:0] t6;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6, flip4, kk, alt7;
    logic [4:0] x;
    logic [2:0] y;
    x  = d[4:0];
    y  = d[7:5];
    kk = k && is_valid_k(d);
    t6 = (kk && x == 5'd28) ? {1'b1, 6'b001111} : enc6_rdn(x);
    c6 = (t6[6] && rd) ? ~t6[5:0] : t6[5:0];
    // RD after the 6b sub-block flips only when the sub-block is unbalanced
    rd6 = (ones10({4'b0, c6}) == 3) ? rd : ~rd;
    alt7 = kk || (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                 ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    case (y)
      3'd0: begin c4 = 4'b1011; flip4 = 1'b1; end
      3'd1: begin c4 = kk ? 4'b0110 : 4'b1001; flip4 = kk; end
      3'd2: begin c4 = kk ? 4'b1010 : 4'b0101; flip4 = kk; end
      3'd3: begin c4 = 4'b1100; flip4 = 1'b1; end
      3'd4: begin c4 = 4'b1101; flip4 = 1'b1; end
      3'd5: begin c4 = kk ? 4'b0101 : 4'b1010; flip4 = kk; end
      3'd6: begin c4 = kk ? 4'b1001 : 4'b0110; flip4 = kk; end
      default: begin c4 = alt7 ? 4'b0111 : 4'b1110; flip4 = 1'b1; end
    endcase
    if (flip4 && rd6) c4 = ~c4;
    return {(ones10({6'b0, c4}) == 2) ? rd6 : ~rd6, c6, c4};
  endfunction

endpackage
