// tb_buf_fifo: the host side writes images in raster order while almost_full is low; the
// reader side waits for band_ready, reads every pixel pair of the band (in a scrambled order,
// with enable gaps), compares it with the pixels written, and releases the band. Checks that
// a band is never reported ready before its 8th line is complete, that the host is held off
// (almost_full) and never overruns (full never seen by a write), and that clear restarts the
// buffer for a second image of another width.
module tb_buf_fifo;
  localparam int MAXW = 32;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [15:0] img_width = MAXW;
  logic wr_en = 0;
  logic [23:0] wr_data = 0;
  logic almost_full, full;
  logic ce = 1, rd_en = 0;
  logic [2:0] rd_line = 0;
  logic [3:0] rd_pair = 0;
  logic [47:0] rd_data;
  logic band_ready, band_release = 0;
  always #5 clk = ~clk;

  buf_fifo #(.MAX_WIDTH(MAXW), .LINES(16), .AF_MARGIN(4)) dut (.*);

  int checks = 0, failures = 0, n_af = 0, lines_written = 0;

  function automatic logic [23:0] pix(int img, int x, int y);
    return 24'(img * 1000003 + y * 4099 + x * 17);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      checks++;
      if (full) begin failures++; $display("FAIL: write while full"); end
    end
  end

  task automatic write_image(input int img, input int w, input int h);
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        #1;
        while (almost_full) begin wr_en = 0; n_af++; @(posedge clk); #1; end
        wr_en = 1; wr_data = pix(img, x, y);
        @(posedge clk);
      end
      lines_written = y + 1;
    end
    #1 wr_en = 0;
  endtask

  task automatic read_image(input int img, input int w, input int h);
    for (int band = 0; band < h / 8; band++) begin
      @(posedge clk);
      #1;
      while (!band_ready) begin @(posedge clk); #1; end
      checks++;
      if (lines_written < 8 * (band + 1)) begin
        failures++; $display("FAIL: band %0d ready after %0d lines", band, lines_written);
      end
      repeat (300) @(posedge clk);   // a slow consumer lets the buffer fill up
      #1;
      for (int k = 0; k < 8 * w / 2; k++) begin
        int l, p;
        l = (k * 3) % 8; p = k / 8;
        ce = ($urandom_range(0, 3) != 0);
        rd_en = 1; rd_line = 3'(l); rd_pair = 4'(p);
        @(posedge clk);
        #1;
        if (ce) begin
          rd_en = 0; ce = 1;
          // data is registered: visible now
          checks++;
          if (rd_data != {pix(img, 2 * p + 1, 8 * band + l), pix(img, 2 * p, 8 * band + l)}) begin
            failures++;
            if (failures < 10) $display("FAIL: band %0d line %0d pair %0d", band, l, p);
          end
        end else begin
          k--;
        end
        rd_en = 0; ce = 1;
      end
      band_release = 1;
      @(posedge clk);
      #1 band_release = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      write_image(0, 32, 48);
      read_image(0, 32, 48);
    join
    @(posedge clk);
    #1 clear = 1; img_width = 16;
    @(posedge clk);
    #1 clear = 0; lines_written = 0;
    fork
      write_image(1, 16, 40);
      read_image(1, 16, 40);
    join
    checks++;
    if (n_af == 0) begin failures++; $display("FAIL: almost_full never held the host"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
