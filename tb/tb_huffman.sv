// tb_huffman: feeds the Huffman coder the run-length symbols of 120 random coefficient blocks
// (Y, Cb, Cr in turn; dense, sparse, long zero runs, all-zero), with random output back
// pressure, then byte-stuffs the collected bytes and decodes them with an independent JPEG
// scan decoder. Every coefficient must decode to the value that was sent, the stream must end
// in 1-padding, done must rise, and ZRL and EOB codes must both have been sent.
module tb_huffman;
  import jpeg_pkg::*;
  import tb_jpeg_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  rle_sym_t sym = '0;
  logic sym_empty = 1, sym_rd;
  logic byte_wr, byte_last, byte_full = 0, done, ev_zrl, ev_eob;
  logic [7:0] byte_data;
  always #5 clk = ~clk;

  huffman dut (.*);

  int checks = 0, failures = 0, n_zrl = 0, n_eob = 0, n_last = 0;
  rle_sym_t q [$];
  byte unsigned bytes [$];
  bit running = 0;

  always @(posedge clk) begin
    if (rst_n && sym_rd) void'(q.pop_front());
    if (rst_n && byte_wr) begin bytes.push_back(byte_data); if (byte_last) n_last++; end
    if (ev_zrl) n_zrl++;
    if (ev_eob) n_eob++;
    #1;
    sym_empty = !running || q.size() == 0;
    if (q.size() != 0) sym = q[0];
    byte_full = ($urandom_range(0, 3) == 0);
  end

  function automatic int nbits(int v);
    int a, n;
    a = (v < 0) ? -v : v;
    n = 0;
    while (a != 0) begin a = a >> 1; n++; end
    return n;
  endfunction

  int blocks [120][64];

  initial begin
    int pred [3];
    pred = '{0, 0, 0};
    for (int b = 0; b < 120; b++) begin
      int comp, run;
      comp = b % 3;
      for (int k = 0; k < 64; k++)
        case ((b / 3) % 5)
          0: blocks[b][k] = $urandom_range(0, 2046) - 1023;
          1: blocks[b][k] = ($urandom_range(0, 7) == 0) ? $urandom_range(0, 200) - 100 : 0;
          2: blocks[b][k] = (k == 0 || k == 40 || k == 63) ? -7 : 0;
          3: blocks[b][k] = 0;
          default: blocks[b][k] = (k < 20) ? $urandom_range(1, 3) : 0;
        endcase
      blocks[b][0] = $urandom_range(0, 2000) - 1000;
      q.push_back('{is_dc: 1, comp: comp_e'(comp), last_blk: 0, last_img: 0, run: 0,
                   size: 4'(nbits(blocks[b][0] - pred[comp])), amp: 12'(blocks[b][0] - pred[comp])});
      pred[comp] = blocks[b][0];
      run = 0;
      for (int k = 1; k < 64; k++) begin
        if (blocks[b][k] == 0) begin
          run++;
          if (k == 63) q.push_back('{is_dc: 0, comp: comp_e'(comp), last_blk: 1,
                                     last_img: (b == 119), run: 0, size: 0, amp: 0});
        end else begin
          q.push_back('{is_dc: 0, comp: comp_e'(comp), last_blk: (k == 63),
                       last_img: (k == 63) && (b == 119), run: 6'(run),
                       size: 4'(nbits(blocks[b][k])), amp: 12'(blocks[b][k])});
          run = 0;
        end
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    running = 1;
    wait (done);
    repeat (5) @(posedge clk);
    begin
      byte unsigned st [$];
      scan_decoder dec;
      foreach (bytes[i]) begin
        st.push_back(bytes[i]);
        if (bytes[i] == 8'hFF) st.push_back(8'h00);
      end
      dec = new(st);
      for (int b = 0; b < 120; b++) begin
        int got [64];
        dec.block(b % 3, got);
        for (int k = 0; k < 64; k++) begin
          checks++;
          if (got[k] != blocks[b][k] || dec.error) begin
            failures++;
            if (failures < 10) $display("FAIL: block %0d coef %0d got %0d sent %0d", b, k, got[k], blocks[b][k]);
          end
        end
      end
      checks++;
      if (!dec.check_end()) begin failures++; $display("FAIL: stream end / padding"); end
    end
    checks++;
    if (n_zrl == 0 || n_eob == 0 || n_last == 0) begin
      failures++; $display("FAIL: zrl %0d eob %0d last %0d", n_zrl, n_eob, n_last);
    end
    $display("%0d bytes, %0d ZRL, %0d EOB", bytes.size(), n_zrl, n_eob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
