// tb_ctrl_sm: runs the controller over a 32 x 16 image (2 bands x 2 data units) with random
// enable gaps and with the line buffer's band_ready withheld at times, and checks every read
// request (line, pixel pair), the converter controls one enabled cycle later (component,
// pixel select), the block tags (component, last block of image), the band releases, busy, and
// that done waits for the back end to go idle. The expected order is built here from the data
// unit layout: Y1 = columns 0..7, Y2 = columns 8..15, Cb and Cr from pixel pairs.
module tb_ctrl_sm;
  import jpeg_pkg::*;

  localparam int W = 32, H = 16;
  logic clk = 0, rst_n = 0, start = 0, ce = 1, band_ready = 0, tag_full = 0, pipe_idle = 0;
  logic [15:0] img_width = W, img_height = H;
  logic rd_en, band_release, cc_valid, cc_pix_sel, tag_wr, clear, busy, done;
  logic [2:0] rd_line;
  logic [3:0] rd_pair;
  comp_e cc_comp;
  blk_tag_t tag_data;
  always #5 clk = ~clk;

  ctrl_sm #(.MAX_WIDTH(W)) dut (.*);

  typedef struct { int line, pair, comp, sel; } req_t;
  req_t exp_rd [$];
  req_t exp_cc [$];
  blk_tag_t exp_tag [$];
  int checks = 0, failures = 0, releases = 0, reads = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL: %s", s);
  endtask

  always @(posedge clk) if (rst_n && ce) begin
    if (cc_valid) begin
      req_t e;
      e = exp_cc.pop_front();
      checks++;
      if (int'(cc_comp) != e.comp || (e.comp == 0 && int'(cc_pix_sel) != e.sel))
        fail($sformatf("cc comp %0d sel %0d expected %0d %0d", cc_comp, cc_pix_sel, e.comp, e.sel));
    end
    if (rd_en) begin
      req_t e;
      e = exp_rd.pop_front();
      exp_cc.push_back(e);
      reads++;
      checks++;
      if (!band_ready) fail("read without band_ready");
      if (int'(rd_line) != e.line || int'(rd_pair) != e.pair)
        fail($sformatf("read %0d/%0d expected %0d/%0d", rd_line, rd_pair, e.line, e.pair));
      if (band_release) begin
        releases++;
        checks++;
        if (reads % 512 != 0) fail("band released early");
      end
    end
    if (tag_wr) begin
      blk_tag_t e;
      e = exp_tag.pop_front();
      checks++;
      if (tag_data != e) fail("tag");
    end
  end

  initial begin
    for (int by = 0; by < H / 8; by++)
      for (int du = 0; du < W / 16; du++)
        for (int b = 0; b < 4; b++) begin
          exp_tag.push_back('{comp: comp_e'((b < 2) ? 0 : b - 1),
                              last_img: (by == H / 8 - 1) && (du == W / 16 - 1) && b == 3});
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              req_t q;
              q.line = r;
              q.comp = (b < 2) ? 0 : b - 1;
              q.sel  = c % 2;
              q.pair = (b < 2) ? du * 8 + b * 4 + c / 2 : du * 8 + c;
              exp_rd.push_back(q);
            end
        end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 start = 1;
    @(posedge clk);
    #1 start = 0;
    checks++;
    if (!busy) fail("not busy after start");
    // band_ready comes and goes; ce has gaps
    while (exp_rd.size() != 0) begin
      ce = ($urandom_range(0, 4) != 0);
      band_ready = ($urandom_range(0, 9) != 0);
      @(posedge clk);
      #1;
    end
    ce = 1;
    repeat (20) @(posedge clk);
    #1 checks++;
    if (done || !busy) fail("done before the back end is idle");
    pipe_idle = 1;
    @(posedge clk);
    #1 checks++;
    if (!done || busy) fail("not done after idle");
    checks++;
    if (releases != H / 8 || exp_tag.size() != 0 || exp_cc.size() != 0)
      fail($sformatf("releases %0d tags left %0d", releases, exp_tag.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
