// dec_8b10b: combinational 8b/10b decoder with error detection.
//
// The 6b and 4b sub-blocks are looked up separately, the K flag is derived
// from the 6b pattern (K28) or from the alternate x.7 sub-block on
// x = 23/27/29/30. The candidate byte is then re-encoded with the incoming
// running disparity and with its opposite: a match with the first is a
// clean symbol, a match only with the second is a disparity error (the
// symbol is still delivered), no match is a code error.
//
// Interface: code/rd_in in; data, k, code_err, disp_err, rd_out out.
// After a code error the running disparity is taken from the symbol's own
// weight. Timing: purely combinational.
module dec_8b10b
  import sts_pkg::*;
(
  input  logic [9:0] code,
  input  logic       rd_in,
  output logic [7:0] data,
  output logic       k,
  output logic       code_err,
  output logic       disp_err,
  output logic       rd_out
);
  logic [5:0]  c6;
  logic [3:0]  c4, c4d;
  logic [4:0]  x;
  logic [2:0]  y;
  logic        x_ok, y_ok;
  logic [10:0] re_a, re_b;
  logic [6:0]  t6;

  always_comb begin
    c6   = code[9:4];
    c4   = code[3:0];
    x    = '0;
    x_ok = 1'b0;
    k    = 1'b0;
    for (int i = 0; i < 32; i++) begin
      t6 = enc6_rdn(5'(i));
      if (c6 == t6[5:0] || (t6[6] && c6 == ~t6[5:0])) begin
        x    = 5'(i);
        x_ok = 1'b1;
      end
    end
    if (c6 == 6'b001111 || c6 == 6'b110000) begin
      x    = 5'd28;
      x_ok = 1'b1;
      k    = 1'b1;
    end
    // for K28 with the RD+ prefix the 4b sub-block is the complement of the
    // data-style mapping
    c4d = (c6 == 6'b110000) ? ~c4 : c4;
    y_ok = 1'b1;
    case (c4d)
      4'b1011, 4'b0100:                   y = 3'd0;
      4'b1001:                            y = 3'd1;
      4'b0101:                            y = 3'd2;
      4'b1100, 4'b0011:                   y = 3'd3;
      4'b1101, 4'b0010:                   y = 3'd4;
      4'b1010:                            y = 3'd5;
      4'b0110:                            y = 3'd6;
      4'b1110, 4'b0001, 4'b0111, 4'b1000: y = 3'd7;
      default: begin y = 3'd0; y_ok = 1'b0; end
    endcase
    if ((x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30) &&
        (c4 == 4'b0111 || c4 == 4'b1000) && x_ok)
      k = 1'b1;
    data = {y, x};
    re_a = encode_8b10b(data, k, rd_in);
    re_b = encode_8b10b(data, k, ~rd_in);
    code_err = 1'b0;
    disp_err = 1'b0;
    if (x_ok && y_ok && re_a[9:0] == code) begin
      rd_out = re_a[10];
    end else if (x_ok && y_ok && re_b[9:0] == code) begin
      disp_err = 1'b1;
      rd_out   = re_b[10];
    end else begin
      code_err = 1'b1;
      rd_out   = (ones10(code) > 5) ? 1'b1 : (ones10(code) < 5) ? 1'b0 : rd_in;
    end
  end
endmodule
