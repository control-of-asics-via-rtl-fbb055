// tb_ref_pkg: reference models shared by the testbenches.
//
// crc_ref computes a CRC by polynomial long division of (message * x^W)
// plus (init * x^N), independent of the shift-register form used in the
// design. The 8b/10b helpers give the weight and the longest run of a
// symbol, used to check the encoder against the code's rules rather than
// against its own tables.
package tb_ref_pkg;

  function automatic logic [15:0] crc_ref(input logic [127:0] msg, input int n,
                                          input int w, input logic [15:0] poly,
                                          input logic [15:0] init);
    logic [160:0] v;
    logic [16:0]  p;
    v = '0;
    for (int i = 0; i < n; i++) v[i + w] = msg[i];
    for (int i = 0; i < w; i++) v[n + i] = v[n + i] ^ init[i];
    p = {1'b1, 16'h0} >> (16 - w);
    p = p | 17'(poly & ((17'd1 << w) - 1));
    for (int i = n + w - 1; i >= w; i--)
      if (v[i]) for (int b = 0; b <= w; b++) v[i - w + b] ^= p[b];
    return 16'(v[15:0] & ((17'd1 << w) - 1));
  endfunction

  function automatic int weight10(input logic [9:0] c);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(c[i]);
    return n;
  endfunction

  function automatic int maxrun10(input logic [9:0] c);
    int r = 1, m = 1;
    for (int i = 8; i >= 0; i--) begin
      r = (c[i] == c[i+1]) ? r + 1 : 1;
      if (r > m) m = r;
    end
    return m;
  endfunction

endpackage
