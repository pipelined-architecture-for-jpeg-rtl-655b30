// tb_jpeg_encoder: end-to-end test of the encoder core on a 32 x 24 image (reduced line buffer
// width), encoded twice in a row.
//
// The host model programs the standard luminance quantization table (quality 50), starts the
// core and writes pixels only while pix_almost_full is low. The output port is throttled with
// a random ready in the first run and the symbol and output FIFOs are cut to 16 entries, so back pressure travels from the byte port through the
// output FIFO, Huffman coder and symbol FIFO to the pipeline enable and the host. The collected
// bytes are decoded by an independent JPEG scan decoder and every quantized coefficient is
// compared with a floating-point reference (tolerance 1). Mechanisms that must occur at least
// once: pipeline stall, host back pressure, output back pressure, ZRL, end of block, 0xFF
// stuffing, line buffer band wrap-around, double-FIFO buffer switch.
module tb_jpeg_encoder;
  import jpeg_pkg::*;
  import tb_jpeg_ref_pkg::*;

  localparam int W = 32;
  localparam int H = 24;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [7:0]  hp_addr = '0;
  logic        hp_wr = 1'b0;
  logic [31:0] hp_wdata = '0;
  logic [31:0] hp_rdata;
  logic        pix_wr = 1'b0;
  logic [23:0] pix_data = '0;
  logic        pix_almost_full;
  logic        jpg_valid;
  logic [7:0]  jpg_data;
  logic        jpg_ready = 1'b1;
  logic        done;

  always #5 clk = ~clk;

  jpeg_encoder #(.MAX_WIDTH(W), .SYM_DEPTH(16), .OUT_DEPTH(16)) dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle++;

  int checks = 0, failures = 0;
  byte unsigned stream [$];
  bit  throttle = 1'b0;
  int  n_stall = 0, n_host_bp = 0, n_out_bp = 0, n_zrl = 0, n_eob = 0, n_stuff = 0;
  int  n_band_wrap = 0, n_switch = 0;

  always @(posedge clk) begin
    if (jpg_valid && jpg_ready) stream.push_back(jpg_data);
    if (dut.busy && !dut.ce) n_stall++;
    if (jpg_valid && !jpg_ready) n_out_bp++;
    if (dut.u_huff.ev_zrl) n_zrl++;
    if (dut.u_huff.ev_eob) n_eob++;
    if (dut.u_stuff.ev_stuff) n_stuff++;
    if (dut.band_release && dut.u_buf.rband == 1'b1) n_band_wrap++;
    if (dut.byte_wr && dut.byte_last) n_switch++;
    jpg_ready <= throttle ? ($urandom_range(0, 5) == 0) : 1'b1;
  end

  task automatic hp_write(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk);
    hp_addr <= a; hp_wdata <= d; hp_wr <= 1'b1;
    @(posedge clk);
    hp_wr <= 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(output int cycles);
    int x, y, t0;
    hp_write(8'h02, W);
    hp_write(8'h03, H);
    for (int n = 0; n < 64; n++) hp_write(8'h40 + 8'(ZZ[n]), QLUM[n]);
    stream.delete();
    hp_write(8'h00, 1);
    t0 = cycle;
    x = 0; y = 0;
    while (y < H) begin
      @(posedge clk);
      if (!pix_almost_full) begin
        pix_wr <= 1'b1; pix_data <= pixel(x, y);
        x++;
        if (x == W) begin x = 0; y++; end
      end else begin
        pix_wr <= 1'b0;
        n_host_bp++;
      end
    end
    @(posedge clk);
    pix_wr <= 1'b0;
    wait (done);
    cycles = cycle - t0;
  endtask

  task automatic check_stream();
    scan_decoder dec;
    int worst;
    dec = new(stream);
    worst = 0;
    for (int y0 = 0; y0 < H; y0 += 8)
      for (int x0 = 0; x0 < W; x0 += 16)
        for (int blk = 0; blk < 4; blk++) begin
          int s [64];
          real f [64];
          int got [64];
          block_samples(x0, y0, blk, s);
          fdct(s, f);
          dec.block((blk < 2) ? 0 : blk - 1, got);
          for (int n = 0; n < 64; n++) begin
            int ref_q, d;
            ref_q = round_div(f[n], QLUM[n]);
            d = got[ZZ[n]] - ref_q;
            if (d < 0) d = -d;
            if (d > worst) worst = d;
            check(d <= 1 && !dec.error, $sformatf("du(%0d,%0d) blk %0d coef %0d: got %0d ref %0d",
                                                   x0, y0, blk, n, got[ZZ[n]], ref_q));
          end
        end
    check(dec.check_end(), "stream does not end with 1-padding at the last byte");
    $display("stream %0d bytes, %0d stuffed zeros, worst coefficient error %0d",
             stream.size(), dec.stuffed, worst);
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    throttle = 1'b1;
    run_image(cyc);
    $display("image 1 (throttled output): %0d cycles", cyc);
    check_stream();
    throttle = 1'b0;
    repeat (5) @(posedge clk);
    run_image(cyc);
    $display("image 2: %0d cycles", cyc);
    check_stream();
    $display("events: stall=%0d host_bp=%0d out_bp=%0d zrl=%0d eob=%0d stuff=%0d band_wrap=%0d switch=%0d",
             n_stall, n_host_bp, n_out_bp, n_zrl, n_eob, n_stuff, n_band_wrap, n_switch);
    check(n_stall > 0,     "pipeline stall never happened");
    check(n_host_bp > 0,   "host back pressure never happened");
    check(n_out_bp > 0,    "output back pressure never happened");
    check(n_zrl > 0,       "no ZRL code was sent");
    check(n_eob > 0,       "no EOB code was sent");
    check(n_stuff > 0,     "no 0xFF byte was stuffed");
    check(n_band_wrap > 0, "line buffer never wrapped");
    check(n_switch > 0,    "double FIFO never switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
