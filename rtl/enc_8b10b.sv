// enc_8b10b: combinational 8b/10b encoder (IBM / Widmer-Franaszek code).
//
// Maps a byte plus a K (control) flag and the current running disparity to
// a 10-bit symbol and the running disparity that follows it. The 5b/6b and
// 3b/4b sub-block tables live in sts_pkg so that the decoder can re-encode
// for its own checks. Output bit 9 is code bit 'a', the first bit sent.
// A K request for a byte that is not one of the twelve K codes is encoded
// as data. The link protocol uses 8b/10b for DC balance on AC-coupled
// lines; the code itself is the standard one.
//
// Interface: data/k/rd_in in, code/rd_out out (rd: 0 = RD-, 1 = RD+).
// Timing: purely combinational; the caller holds the running disparity.
module enc_8b10b
  import sts_pkg::*;
(
  input  logic [7:0] data,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  always_comb begin
    {rd_out, code} = encode_8b10b(data, k, rd_in);
  end
endmodule
