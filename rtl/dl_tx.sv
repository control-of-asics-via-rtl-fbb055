// dl_tx: downlink transmitter for one front-end e-link.
//
// The transmitter works in 20-bit words, i.e. pairs of 8b/10b symbols. A
// command frame (60 bits after encoding) is three words: {K28.5, byte 1},
// {byte 2, byte 3}, {CRC high, CRC low}. Because the frame length is a
// multiple of 20 bits, the 20-bit synchronisation patterns can be sent in
// the same word slots without breaking the framing. The mode input selects
// what fills the slots:
//   TX_FRAMES  command frames; K28.5 K28.5 when no frame is waiting
//   TX_SOS     the start-of-synchronisation pattern, repeated
//   TX_K281    K28.1 K28.1, repeated (clock-phase scan)
//   TX_EOS     the end-of-synchronisation pattern, repeated
// A frame in progress is always completed before a mode change takes
// effect. SOS and EOS are DC balanced and leave the running disparity
// unchanged. Idle commas and "finish the frame first" are this design's
// own choices; the word structure and patterns follow the protocol. Each
// word is encoded by two chained enc_8b10b instances.
//
// Output: BITS_PER_CLK bits per clock, dout[BITS_PER_CLK-1] first on the
// wire. With the 40 MHz GBT frame clock and a 160 Mb/s e-link this is 4
// bits per clock: a word takes 5 clocks and a frame 15 clocks.
// Handshake: frame_ready is high in the one cycle in which a waiting frame
// is taken (valid/ready); frame_start marks that cycle too.
module dl_tx
  import sts_pkg::*;
#(
  parameter int BITS_PER_CLK = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  tx_mode_t                mode,
  input  logic                    frame_valid,
  output logic                    frame_ready,
  input  logic [39:0]             frame,
  output logic [BITS_PER_CLK-1:0] dout,
  output logic                    word_load   // a new 20-bit word starts next cycle
);
  localparam int WORD_W = 20;
  localparam int NCLK   = WORD_W / BITS_PER_CLK;
  localparam int CNT_W  = (NCLK > 1) ? $clog2(NCLK) : 1;

  logic [WORD_W-1:0] sh, next_word;
  logic [CNT_W-1:0]  cnt;
  logic              rd, next_rd;
  logic [1:0]        part;           // 0: between frames, 1..2: next word of frame
  logic [31:0]       rest;           // bytes 2..5 of the frame in progress
  logic [10:0]       e_hi, e_lo;
  logic [7:0]        b_hi, b_lo;
  logic              k_hi, k_lo, use_enc;

  initial begin
    assert (WORD_W % BITS_PER_CLK == 0) else $error("BITS_PER_CLK must divide 20");
  end

  assign word_load   = (cnt == CNT_W'(NCLK - 1));
  assign frame_ready = word_load && part == 2'd0 && mode == TX_FRAMES;

  // two chained encoders: the first symbol's disparity feeds the second
  enc_8b10b u_enc_hi (.data(b_hi), .k(k_hi), .rd_in(rd),        .code(e_hi[9:0]), .rd_out(e_hi[10]));
  enc_8b10b u_enc_lo (.data(b_lo), .k(k_lo), .rd_in(e_hi[10]), .code(e_lo[9:0]), .rd_out(e_lo[10]));

  always_comb begin
    b_hi    = K28_5;
    b_lo    = K28_5;
    k_hi    = 1'b1;
    k_lo    = 1'b1;
    use_enc = 1'b1;
    if (part == 2'd1) begin
      {b_hi, b_lo} = rest[31:16];
      {k_hi, k_lo} = 2'b00;
    end else if (part == 2'd2) begin
      {b_hi, b_lo} = rest[15:0];
      {k_hi, k_lo} = 2'b00;
    end else begin
      unique case (mode)
        TX_FRAMES: if (frame_valid) begin
                     b_lo = frame[39:32];
                     k_lo = 1'b0;
                   end
        TX_K281:   begin b_hi = K28_1; b_lo = K28_1; end
        default:   use_enc = 1'b0;
      endcase
    end
    if (use_enc) begin
      next_word = {e_hi[9:0], e_lo[9:0]};
      next_rd   = e_lo[10];
    end else begin
      next_word = (mode == TX_SOS) ? SOS_SEQ : EOS_SEQ;
      next_rd   = rd;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= {K28_5_RDN, K28_5_RDP};
      cnt  <= '0;
      rd   <= 1'b0;
      part <= 2'd0;
      rest <= '0;
    end else begin
      if (word_load) begin
        cnt <= '0;
        sh  <= next_word;
        rd  <= next_rd;
        if (part == 2'd1)      part <= 2'd2;
        else if (part == 2'd2) part <= 2'd0;
        else if (frame_valid && frame_ready) begin
          part <= 2'd1;
          rest <= frame[31:0];
        end
      end else begin
        cnt <= cnt + 1'b1;
        sh  <= {sh[WORD_W-BITS_PER_CLK-1:0], {BITS_PER_CLK{1'b0}}};
      end
    end
  end

  assign dout = sh[WORD_W-1 -: BITS_PER_CLK];
endmodule
