// sync_detector: detectors for the link-synchronisation sequences on one
// uplink e-link.
//
// Link synchronisation is run by software; the hardware only reports what
// arrives on each line, before any symbol alignment:
//  * SOS: ten 0s then ten 1s. Clock/data skew may add or drop one bit of a
//    run, so a 0-run of 9..11 bits followed by a 1-run of 9..11 bits counts.
//    8b/10b data never has runs longer than five, so this cannot be mimicked.
//    sos_ok stays high while SOS keeps arriving (at most SOS_HOLD_CLKS
//    clocks apart); when it drops, something other than SOS is arriving.
//  * K28.1: an exact 10-bit match, either disparity, at any bit offset.
//  * EOS: an exact 20-bit match of 1100_1111_1100_0000_1100 at any offset.
// Each detector gives a pulse and a sticky flag cleared by clear. The run
// tolerance and the patterns follow the protocol; the hold time and the
// sticky flags are this design's own.
//
// Input: din, BITS_PER_CLK bits per clock when din_valid, din[MSB] first.
// Timing: pulses and flags are registered, one clock after the last bit.
module sync_detector
  import sts_pkg::*;
#(
  parameter int BITS_PER_CLK  = 8,
  parameter int SOS_HOLD_CLKS = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    din_valid,
  input  logic [BITS_PER_CLK-1:0] din,
  input  logic                    clear,
  output logic                    sos_det,
  output logic                    k281_det,
  output logic                    eos_det,
  output logic                    sos_ok,
  output logic                    sos_seen,
  output logic                    other_seen,   // sos_ok fell since clear
  output logic                    k281_seen,
  output logic                    eos_seen
);
  localparam int HW = 19;
  localparam int SW = HW + BITS_PER_CLK;

  logic [HW-1:0] hist;
  logic [SW-1:0] s;
  logic          cur_val, cur_val_n;
  logic [3:0]    cur_len, cur_len_n, prev_len, prev_len_n;
  logic          sos_c, k281_c, eos_c;
  logic [$clog2(SOS_HOLD_CLKS+1)-1:0] hold;

  function automatic logic near_ten(input logic [3:0] n);
    return n >= 4'd9 && n <= 4'd11;
  endfunction

  always_comb begin
    s          = {hist, din};
    cur_val_n  = cur_val;
    cur_len_n  = cur_len;
    prev_len_n = prev_len;
    sos_c      = 1'b0;
    k281_c     = 1'b0;
    eos_c      = 1'b0;
    for (int j = 0; j < BITS_PER_CLK; j++) begin
      // run-length tracking for SOS
      if (din[BITS_PER_CLK-1-j] == cur_val_n) begin
        if (cur_len_n != 4'hF) cur_len_n = cur_len_n + 4'd1;
      end else begin
        if (cur_val_n && near_ten(cur_len_n) && near_ten(prev_len_n)) sos_c = 1'b1;
        prev_len_n = cur_len_n;
        cur_val_n  = din[BITS_PER_CLK-1-j];
        cur_len_n  = 4'd1;
      end
      // pattern windows ending at this bit
      if (s[BITS_PER_CLK-1-j +: 10] == K28_1_RDN || s[BITS_PER_CLK-1-j +: 10] == K28_1_RDP)
        k281_c = 1'b1;
      if (s[BITS_PER_CLK-1-j +: 20] == EOS_SEQ) eos_c = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist       <= '0;
      cur_val    <= 1'b0;
      cur_len    <= '0;
      prev_len   <= '0;
      sos_det    <= 1'b0;
      k281_det   <= 1'b0;
      eos_det    <= 1'b0;
      hold       <= '0;
      sos_ok     <= 1'b0;
      sos_seen   <= 1'b0;
      other_seen <= 1'b0;
      k281_seen  <= 1'b0;
      eos_seen   <= 1'b0;
    end else begin
      sos_det  <= 1'b0;
      k281_det <= 1'b0;
      eos_det  <= 1'b0;
      if (din_valid) begin
        hist     <= s[HW-1:0];
        cur_val  <= cur_val_n;
        cur_len  <= cur_len_n;
        prev_len <= prev_len_n;
        sos_det  <= sos_c;
        k281_det <= k281_c;
        eos_det  <= eos_c;
        if (sos_c) begin
          hold   <= ($bits(hold))'(SOS_HOLD_CLKS);
          sos_ok <= 1'b1;
        end else if (hold != '0) begin
          hold <= hold - 1'b1;
          if (hold == ($bits(hold))'(1)) sos_ok <= 1'b0;
        end
      end
      if (clear) begin
        sos_seen   <= 1'b0;
        other_seen <= 1'b0;
        k281_seen  <= 1'b0;
        eos_seen   <= 1'b0;
      end else begin
        if (din_valid && sos_c) sos_seen <= 1'b1;
        if (din_valid && k281_c) k281_seen <= 1'b1;
        if (din_valid && eos_c) eos_seen <= 1'b1;
        if (sos_ok && din_valid && !sos_c && hold == ($bits(hold))'(1)) other_seen <= 1'b1;
      end
    end
  end
endmodule
