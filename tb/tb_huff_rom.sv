// tb_huff_rom: checks the four Huffman ROMs against code words listed in the JPEG standard's
// example tables (T.81 Annex K, Tables K.3 to K.6), and checks for each table that exactly the
// valid symbols have a code (DC: sizes 0..11; AC: EOB, ZRL and run 0..15 x size 1..10), that
// the code is prefix-free and that no code is all ones.
module tb_huff_rom;
  import jpeg_pkg::*;

  logic [7:0] sym;
  hcode_t dl, dc, al, ac;
  huff_rom #(.TABLE(HT_DC_LUM)) u_dl (.sym, .code(dl));
  huff_rom #(.TABLE(HT_DC_CHR)) u_dc (.sym, .code(dc));
  huff_rom #(.TABLE(HT_AC_LUM)) u_al (.sym, .code(al));
  huff_rom #(.TABLE(HT_AC_CHR)) u_ac (.sym, .code(ac));

  int checks = 0, failures = 0;

  task automatic expect_code(input int t, input int s, input int code, input int len);
    hcode_t h;
    sym = 8'(s);
    #1;
    h = (t == 0) ? dl : (t == 1) ? dc : (t == 2) ? al : ac;
    checks++;
    if (h.code != 16'(code) || h.len != 5'(len)) begin
      failures++;
      $display("FAIL: table %0d symbol %02x: got %0h/%0d expected %0h/%0d", t, s, h.code, h.len, code, len);
    end
  endtask

  initial begin
    hcode_t tab [4][256];
    // DC luminance (K.3)
    expect_code(0, 0, 'b00, 2);        expect_code(0, 1, 'b010, 3);
    expect_code(0, 5, 'b110, 3);       expect_code(0, 6, 'b1110, 4);
    expect_code(0, 11, 'b111111110, 9);
    // DC chrominance (K.4)
    expect_code(1, 0, 'b00, 2);        expect_code(1, 2, 'b10, 2);
    expect_code(1, 3, 'b110, 3);       expect_code(1, 11, 'b11111111110, 11);
    // AC luminance (K.5)
    expect_code(2, 8'h00, 'b1010, 4);  expect_code(2, 8'h01, 'b00, 2);
    expect_code(2, 8'h03, 'b100, 3);   expect_code(2, 8'h04, 'b1011, 4);
    expect_code(2, 8'h11, 'b1100, 4);  expect_code(2, 8'h21, 'b11100, 5);
    expect_code(2, 8'hF0, 'b11111111001, 11);
    expect_code(2, 8'hFA, 'b1111111111111110, 16);
    // AC chrominance (K.6)
    expect_code(3, 8'h00, 'b00, 2);    expect_code(3, 8'h01, 'b01, 2);
    expect_code(3, 8'h02, 'b100, 3);   expect_code(3, 8'hF0, 'b1111111010, 10);
    expect_code(3, 8'hFA, 'b1111111111111110, 16);

    for (int s = 0; s < 256; s++) begin
      sym = 8'(s);
      #1;
      tab[0][s] = dl; tab[1][s] = dc; tab[2][s] = al; tab[3][s] = ac;
    end
    for (int t = 0; t < 4; t++) begin
      int n;
      n = 0;
      for (int s = 0; s < 256; s++) begin
        bit valid;
        if (t < 2) valid = (s <= 11);
        else valid = (s == 8'h00) || (s == 8'hF0) || ((s & 15) >= 1 && (s & 15) <= 10);
        checks++;
        if (valid != (tab[t][s].len != 0)) begin
          failures++; $display("FAIL: table %0d symbol %02x presence", t, s);
        end
        if (tab[t][s].len != 0) begin
          checks++;
          if (tab[t][s].code == 16'((1 << tab[t][s].len) - 1)) begin
            failures++; $display("FAIL: table %0d symbol %02x is all ones", t, s);
          end
          for (int u = 0; u < 256; u++)
            if (u != s && tab[t][u].len != 0 && tab[t][u].len >= tab[t][s].len) begin
              if ((tab[t][u].code >> (tab[t][u].len - tab[t][s].len)) == tab[t][s].code) begin
                n++;
                if (n < 5) $display("FAIL: table %0d: %02x is a prefix of %02x", t, s, u);
              end
            end
        end
      end
      checks++;
      if (n != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
