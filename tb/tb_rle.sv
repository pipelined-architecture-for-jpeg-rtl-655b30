// tb_rle: sends blocks of quantized coefficients (zig-zag order) with their tags and checks
// the run-length symbols against a model written here: DC difference per component,
// (run, size, amplitude) for non-zero AC values, end-of-block when the block ends in zeros,
// and the block/image end flags. Blocks include all-zero, dense, trailing-non-zero and long
// zero runs (16 and more), with enable gaps; 'clear' restarts the DC predictors.
module tb_rle;
  import jpeg_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1, clear = 0, in_valid = 0;
  logic [5:0] in_pos = 0;
  logic signed [11:0] in_data = 0;
  blk_tag_t tag_data;
  logic tag_pop, sym_valid;
  rle_sym_t sym;
  always #5 clk = ~clk;

  rle dut (.*);

  int checks = 0, failures = 0, pops = 0;
  rle_sym_t exp_q [$];
  int pred [3];

  always @(posedge clk) if (rst_n && ce && tag_pop) pops++;

  always @(posedge clk) if (rst_n && ce && sym_valid) begin
    rle_sym_t e;
    e = exp_q.pop_front();
    checks++;
    if (sym !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: got dc%0d c%0d lb%0d li%0d r%0d s%0d a%0d expected dc%0d c%0d lb%0d li%0d r%0d s%0d a%0d", sym.is_dc, sym.comp, sym.last_blk, sym.last_img, sym.run, sym.size, sym.amp, e.is_dc, e.comp, e.last_blk, e.last_img, e.run, e.size, e.amp);
    end
  end

  function automatic int nbits(int v);
    int a, n;
    a = (v < 0) ? -v : v;
    n = 0;
    while (a != 0) begin a = a >> 1; n++; end
    return n;
  endfunction

  task automatic send_block(input int z [64], input comp_e comp, input bit last_img, input bit gaps);
    int run, d;
    rle_sym_t s;
    // model
    d = z[0] - pred[comp];
    if (d > 2047) d = 2047;
    if (d < -2047) d = -2047;
    pred[comp] = z[0];
    s = '{is_dc: 1, comp: comp, last_blk: 0, last_img: 0, run: 0, size: 4'(nbits(d)), amp: 12'(d)};
    exp_q.push_back(s);
    run = 0;
    for (int k = 1; k < 64; k++) begin
      if (z[k] == 0) begin
        run++;
        if (k == 63)
          exp_q.push_back('{is_dc: 0, comp: comp, last_blk: 1, last_img: last_img,
                            run: 0, size: 0, amp: 0});
      end else begin
        exp_q.push_back('{is_dc: 0, comp: comp, last_blk: (k == 63), last_img: (k == 63) && last_img,
                          run: 6'(run), size: 4'(nbits(z[k])), amp: 12'(z[k])});
        run = 0;
      end
    end
    // drive
    tag_data <= '{comp: comp, last_img: last_img};
    for (int k = 0; k < 64; k++) begin
      bit c;
      do begin
        c = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
        ce <= c; in_valid <= 1; in_pos <= 6'(k); in_data <= 12'(z[k]);
        @(posedge clk);
      end while (!c);
      if (gaps && $urandom_range(0, 3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
    end
  endtask

  initial begin
    int z [64];
    tag_data = '0;
    pred = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 200; b++) begin
      for (int k = 0; k < 64; k++) begin
        case (b % 6)
          0: z[k] = 0;                                               // all zero
          1: z[k] = $urandom_range(1, 2000) * (($urandom_range(0, 1) != 0) ? 1 : -1);
          2: z[k] = (k == 0 || k == 63) ? -1023 : 0;                 // run of 62
          3: z[k] = (k == 0 || k == 17 || k == 50) ? 5 : 0;          // runs of 16 and 32
          4: z[k] = ($urandom_range(0, 5) == 0) ? $urandom_range(0, 2046) - 1023 : 0;
          default: z[k] = (k < 3) ? 1023 : 0;
        endcase
      end
      if (b == 0) z[0] = 2047;
      if (b == 1) z[0] = -2048;                                      // DC difference saturates
      if (b == 100) begin                                            // new image
        in_valid <= 0; clear <= 1; @(posedge clk); clear <= 0;
        pred = '{0, 0, 0};
      end
      if (b == 1) begin
        // model saturation of the difference -2048 - 2047
        send_block_sat();
      end else
        send_block(z, comp_e'(b % 3), (b % 50) == 49, b > 60);
    end
    ce <= 1; in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d symbols missing", exp_q.size()); end
    checks++;
    if (pops != 200) begin failures++; $display("FAIL: %0d tag pops", pops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block 1: component Y after a DC of 2047 -> difference -4095 saturates to -2047
  task automatic send_block_sat();
    int z [64];
    for (int k = 0; k < 64; k++) z[k] = 0;
    z[0] = -2048;
    exp_q.push_back('{is_dc: 1, comp: COMP_Y, last_blk: 0, last_img: 0, run: 0, size: 11, amp: -12'sd2047});
    exp_q.push_back('{is_dc: 0, comp: COMP_Y, last_blk: 1, last_img: 0, run: 0, size: 0, amp: 0});
    pred[0] = -2048;
    tag_data <= '{comp: COMP_Y, last_img: 0};
    for (int k = 0; k < 64; k++) begin
      ce <= 1; in_valid <= 1; in_pos <= 6'(k); in_data <= 12'(z[k]);
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
