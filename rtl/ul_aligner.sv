// ul_aligner: symbol alignment and 8b/10b decoding for one uplink e-link.
//
// The ASIC sends 8b/10b symbols with no separate framing signal; from time
// to time it sends a synchronisation frame of three K28.5 commas. The
// aligner watches every 10-bit window of the incoming bit stream for the
// K28.5 comma (either disparity). A comma fixes the symbol boundary; from
// then on a symbol is cut every 10 bits. Up to BITS_PER_CLK < 10 new bits
// arrive per clock, so at most one symbol completes per clock; if a comma
// appears off the current boundary, the comma wins and the boundary moves.
// The running disparity is reloaded from each comma's own polarity.
//
// locked rises on a comma and falls after LOSS_ERRS code errors with no
// comma in between (this loss rule and its count are this design's own).
//
// Input: din, BITS_PER_CLK bits per clock when din_valid, din[MSB] first
// (8 bits per 40 MHz clock for a 320 Mb/s e-link). Output: one decoded
// symbol per sym_valid pulse, two clocks after its last bit arrives.
module ul_aligner
  import sts_pkg::*;
#(
  parameter int BITS_PER_CLK = 8,
  parameter int LOSS_ERRS    = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    din_valid,
  input  logic [BITS_PER_CLK-1:0] din,
  output logic                    sym_valid,
  output logic [9:0]              sym,
  output logic [7:0]              data,
  output logic                    k,
  output logic                    code_err,
  output logic                    disp_err,
  output logic                    comma,     // this symbol is K28.5
  output logic                    locked
);
  localparam int HW = 9;                       // history bits kept
  localparam int SW = HW + BITS_PER_CLK;

  logic [HW-1:0] hist;
  logic [3:0]    bcnt, bcnt_n;
  logic          aligned, aligned_n;
  logic          emit, emit_comma;
  logic [9:0]    emit_sym, w;
  logic [SW-1:0] s;
  logic          sv_q, comma_q;
  logic [9:0]    sym_q;
  logic          rd, rd_dec, rd_out;
  logic [$clog2(LOSS_ERRS+1)-1:0] errs;

  initial begin
    assert (BITS_PER_CLK < 10) else $error("at most one symbol per clock is supported");
  end

  always_comb begin
    s          = {hist, din};
    bcnt_n     = bcnt;
    aligned_n  = aligned;
    emit       = 1'b0;
    emit_comma = 1'b0;
    emit_sym   = '0;
    for (int j = 0; j < BITS_PER_CLK; j++) begin
      w      = s[BITS_PER_CLK-1-j +: 10];
      bcnt_n = bcnt_n + 4'd1;
      if (w == K28_5_RDN || w == K28_5_RDP) begin
        emit       = 1'b1;
        emit_comma = 1'b1;
        emit_sym   = w;
        bcnt_n     = 4'd0;
        aligned_n  = 1'b1;
      end else if (bcnt_n == 4'd10) begin
        bcnt_n = 4'd0;
        if (aligned_n) begin
          emit       = 1'b1;
          emit_comma = 1'b0;
          emit_sym   = w;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist    <= '0;
      bcnt    <= '0;
      aligned <= 1'b0;
      sv_q    <= 1'b0;
      sym_q   <= '0;
      comma_q <= 1'b0;
    end else begin
      sv_q <= 1'b0;
      if (din_valid) begin
        hist    <= s[HW-1:0];
        bcnt    <= bcnt_n;
        aligned <= aligned_n;
        sv_q    <= emit;
        sym_q   <= emit_sym;
        comma_q <= emit_comma;
      end
    end
  end

  // a comma sets the running disparity it was sent with
  assign rd_dec = comma_q ? (sym_q == K28_5_RDP) : rd;

  dec_8b10b u_dec (
    .code    (sym_q),
    .rd_in   (rd_dec),
    .data    (data),
    .k       (k),
    .code_err(code_err),
    .disp_err(disp_err),
    .rd_out  (rd_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd     <= 1'b0;
      errs   <= '0;
      locked <= 1'b0;
    end else if (sv_q) begin
      rd <= rd_out;
      if (comma_q) begin
        errs   <= '0;
        locked <= 1'b1;
      end else if (code_err) begin
        if (errs == ($bits(errs))'(LOSS_ERRS - 1)) locked <= 1'b0;
        if (errs != ($bits(errs))'(LOSS_ERRS)) errs <= errs + 1'b1;
      end
    end
  end

  assign sym_valid = sv_q;
  assign sym       = sym_q;
  assign comma     = comma_q;
endmodule
