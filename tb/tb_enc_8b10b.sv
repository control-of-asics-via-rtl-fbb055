// tb_enc_8b10b: checks the 8b/10b encoder for every data byte and every
// K code, from both running disparities, against the rules of the code:
// symbol weight 4..6, RD- never gives a weight-4 symbol and RD+ never a
// weight-6 one, the running disparity follows the weight, no run longer
// than five, all symbols of one disparity distinct, the comma sequence only
// in K28.1/5/7. It also checks a list of published code words.
module tb_enc_8b10b;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] data;
  logic       k, rd_in, rd_out;
  logic [9:0] code;

  enc_8b10b dut (.data(data), .k(k), .rd_in(rd_in), .code(code), .rd_out(rd_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: data=%h k=%0d rd=%0d code=%b rd_out=%0d", what, data, k, rd_in, code, rd_out);
    end
  endtask

  task automatic apply(input logic [7:0] d, input logic kk, input logic r);
    data = d; k = kk; rd_in = r;
    #1;
  endtask

  // published code words: {k, data, rd, code}
  typedef struct { bit k; logic [7:0] d; bit rd; logic [9:0] c; } known_t;
  known_t known[$] = '{
    '{0, 8'h00, 0, 10'b100111_0100}, '{0, 8'h00, 1, 10'b011000_1011},
    '{0, 8'hB5, 0, 10'b101010_1010}, '{0, 8'h4A, 0, 10'b010101_0101},
    '{0, 8'h03, 0, 10'b110001_1011}, '{0, 8'hF1, 0, 10'b100011_0111},
    '{0, 8'h07, 0, 10'b111000_1011}, '{0, 8'h07, 1, 10'b000111_0100},
    '{1, 8'hBC, 0, 10'b001111_1010}, '{1, 8'hBC, 1, 10'b110000_0101},
    '{1, 8'h3C, 0, 10'b001111_1001}, '{1, 8'h3C, 1, 10'b110000_0110},
    '{1, 8'hFC, 0, 10'b001111_1000}, '{1, 8'hF7, 0, 10'b111010_1000},
    '{0, 8'hFF, 0, 10'b101011_0001}, '{0, 8'hFF, 1, 10'b010100_1110}
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [2][1024];
    int w;
    foreach (known[i]) begin
      apply(known[i].d, known[i].k, known[i].rd);
      chk(code == known[i].c, "published code word");
    end
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 512; i++) begin
        logic kk;
        kk = i[8];
        if (kk && !(i[4:0] == 28 || (i[7:5] == 7 && (i[4:0] == 23 || i[4:0] == 27 ||
                                                     i[4:0] == 29 || i[4:0] == 30))))
          continue;
        apply(i[7:0], kk, r[0]);
        w = weight10(code);
        chk(w >= 4 && w <= 6, "weight");
        chk(r == 0 ? w >= 5 : w <= 5, "disparity direction");
        chk(rd_out == (w == 5 ? r[0] : (w == 6)), "running disparity");
        chk(maxrun10(code) <= 5, "run length");
        chk(!seen[r][code], "distinct");
        seen[r][code] = 1;
        if (!(kk && i[4:0] == 28 && (i[7:5] == 1 || i[7:5] == 5 || i[7:5] == 7)))
          chk(code[9:3] != 7'b0011111 && code[9:3] != 7'b1100000, "no stray comma");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
