// jpeg_encoder: fully pipelined baseline JPEG encoder core, 24-bit RGB in, entropy-coded bytes
// out.
//
// Chain: host pixel port -> buf_fifo (line buffer) -> colour_conv (RGB to YCbCr with 2:1
// horizontal chroma down sampling) -> dct_2d (level shift, row DCT, transpose, column DCT) ->
// zigzag -> quantizer (host-programmed table, pipelined divider) -> rle -> symbol double FIFO
// -> huffman (four code ROMs, bit packer) -> output double FIFO -> byte_stuffer -> byte port.
// ctrl_sm walks the image in 16x8 data units (Y1, Y2, Cb, Cr blocks) and host_if holds the
// control registers. Everything from the line-buffer read to the run-length encoder advances
// on one enable, ce, which drops only while the symbol FIFO the encoder writes is full; the
// Huffman coder and byte stuffer run on their own FIFO handshakes.
//
// Output is the entropy-coded scan (interleaved Y1 Y2 Cb Cr blocks per data unit, standard
// Annex K Huffman tables, one quantization table for all components) padded with ones to a
// byte boundary. Stream headers (JFIF/SOI/EOI markers) are not generated.
//
// Host side: program WIDTH, HEIGHT and the 64 quantization entries through hp_*, write 1 to
// CTRL, then write pixels (raster order) with pix_wr while pix_almost_full is low. done rises
// when the last byte has left jpg_data, and stays until the next start.
//
// The stages hand samples on as a stream with their block position attached; there are no
// per-stage start/ready handshakes or ping-pong buffers between quantizer and run-length coder.
// That streaming organisation is this design's choice. Some sub-block outputs are left unread
// here on purpose: the event strobes (ev_zrl, ev_eob, ev_stuff) and the double FIFOs' read-side
// last flags exist for observation and for the testbenches; the line buffer's full flag is used
// only by the assertion that the host never writes into a full buffer.
module jpeg_encoder
  import jpeg_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 640,   // widest image the line buffer holds
  parameter int unsigned BUF_LINES = 16,    // line buffer depth in lines (two 8-line bands)
  parameter int unsigned SYM_DEPTH = 64,    // entries per FIFO of the symbol double FIFO
  parameter int unsigned OUT_DEPTH = 128    // bytes per FIFO of the output double FIFO
) (
  input  logic        clk,
  input  logic        rst_n,
  // host programming port
  input  logic [7:0]  hp_addr,
  input  logic        hp_wr,
  input  logic [31:0] hp_wdata,
  output logic [31:0] hp_rdata,
  // host pixel port
  input  logic        pix_wr,
  input  logic [23:0] pix_data,
  output logic        pix_almost_full,
  // encoded byte output
  output logic        jpg_valid,
  output logic [7:0]  jpg_data,
  input  logic        jpg_ready,
  output logic        done
);

  localparam int unsigned PW = $clog2(MAX_WIDTH/2);

  // ---------------------------------------------------------------- host interface
  logic        start, busy, clear;
  logic [15:0] img_width, img_height;
  logic        qwr_en;
  logic [5:0]  qwr_addr;
  logic [7:0]  qwr_data;

  host_if u_hostif (
    .clk, .rst_n, .hp_addr, .hp_wr, .hp_wdata, .hp_rdata,
    .start, .img_width, .img_height, .qwr_en, .qwr_addr, .qwr_data, .busy, .done);

  // ---------------------------------------------------------------- line buffer + controller
  logic          ce;
  logic          band_ready, band_release, rd_en, buf_full;
  logic [2:0]    rd_line;
  logic [PW-1:0] rd_pair;
  logic [47:0]   rd_data;
  logic          cc_valid, cc_pix_sel;
  comp_e         cc_comp;
  logic          tag_wr, tag_full, tag_pop, tag_empty;
  blk_tag_t      tag_in, tag_head;
  logic          pipe_idle;

  buf_fifo #(.MAX_WIDTH(MAX_WIDTH), .LINES(BUF_LINES)) u_buf (
    .clk, .rst_n, .clear, .img_width,
    .wr_en(pix_wr), .wr_data(pix_data), .almost_full(pix_almost_full), .full(buf_full),
    .ce, .rd_en, .rd_line, .rd_pair, .rd_data, .band_ready, .band_release);

  ctrl_sm #(.MAX_WIDTH(MAX_WIDTH)) u_ctrl (
    .clk, .rst_n, .start, .img_width, .img_height, .ce,
    .band_ready, .rd_en, .rd_line, .rd_pair, .band_release,
    .cc_valid, .cc_comp, .cc_pix_sel,
    .tag_wr, .tag_data(tag_in), .tag_full,
    .pipe_idle, .clear, .busy, .done);

  sync_fifo #(.W($bits(blk_tag_t)), .DEPTH(8)) u_tags (
    .clk, .rst_n, .wr_en(tag_wr), .wr_data(tag_in), .full(tag_full),
    .rd_en(tag_pop), .rd_data(tag_head), .empty(tag_empty));

  // ---------------------------------------------------------------- pixel pipeline
  logic                     y_valid;
  logic [7:0]               y_sample;
  logic                     d_valid;
  logic signed [COEF_W-1:0] d_coef;
  logic                     z_valid;
  logic [5:0]               z_pos;
  logic [COEF_W-1:0]        z_coef;
  logic                     q_valid;
  logic [5:0]               q_pos;
  logic signed [COEF_W-1:0] q_coef;
  logic                     s_valid;
  rle_sym_t                 s_sym;

  colour_conv u_csc (
    .clk, .rst_n, .ce, .in_valid(cc_valid), .in_comp(cc_comp), .pix_sel(cc_pix_sel),
    .pix0(rd_data[23:0]), .pix1(rd_data[47:24]), .out_valid(y_valid), .out_sample(y_sample));

  dct_2d u_dct (
    .clk, .rst_n, .ce, .in_valid(y_valid), .in_sample(y_sample),
    .out_valid(d_valid), .out_coef(d_coef));

  zigzag #(.W(COEF_W)) u_zz (
    .clk, .rst_n, .ce, .in_valid(d_valid), .in_data(d_coef),
    .out_valid(z_valid), .out_pos(z_pos), .out_data(z_coef));

  quantizer u_quant (
    .clk, .rst_n, .ce, .in_valid(z_valid), .in_pos(z_pos), .in_data($signed(z_coef)),
    .out_valid(q_valid), .out_pos(q_pos), .out_data(q_coef),
    .qwr_en, .qwr_addr, .qwr_data);

  rle u_rle (
    .clk, .rst_n, .ce, .clear, .in_valid(q_valid), .in_pos(q_pos), .in_data(q_coef),
    .tag_data(tag_head), .tag_pop, .sym_valid(s_valid), .sym(s_sym));

  // ---------------------------------------------------------------- entropy back end
  logic     sym_full, sym_rd, sym_empty, sym_all_empty, sym_last;
  rle_sym_t sym_head;

  double_fifo #(.W($bits(rle_sym_t)), .DEPTH(SYM_DEPTH)) u_symfifo (
    .clk, .rst_n, .wr_en(s_valid && ce), .wr_data(s_sym), .wr_last(s_sym.last_blk),
    .full(sym_full), .rd_en(sym_rd), .rd_data(sym_head), .rd_last(sym_last),
    .empty(sym_empty), .all_empty(sym_all_empty));

  assign ce = !sym_full;

  logic       byte_wr, byte_last, byte_full, huff_done, ev_zrl, ev_eob;
  logic [7:0] byte_data;

  huffman u_huff (
    .clk, .rst_n, .clear, .sym(sym_head), .sym_empty, .sym_rd,
    .byte_wr, .byte_data, .byte_last, .byte_full, .done(huff_done), .ev_zrl, .ev_eob);

  logic       out_rd, out_empty, out_all_empty, out_last, stuff_idle, ev_stuff;
  logic [7:0] out_head;

  double_fifo #(.W(8), .DEPTH(OUT_DEPTH)) u_outfifo (
    .clk, .rst_n, .wr_en(byte_wr), .wr_data(byte_data), .wr_last(byte_last),
    .full(byte_full), .rd_en(out_rd), .rd_data(out_head), .rd_last(out_last),
    .empty(out_empty), .all_empty(out_all_empty));

  byte_stuffer u_stuff (
    .clk, .rst_n, .in_data(out_head), .in_empty(out_empty), .in_rd(out_rd),
    .out_valid(jpg_valid), .out_data(jpg_data), .out_ready(jpg_ready),
    .idle(stuff_idle), .ev_stuff);

  assign pipe_idle = huff_done && sym_all_empty && out_all_empty && stuff_idle;

  // the host must honour pix_almost_full: no pixel may be written into a full line buffer
  a_no_pixel_loss: assert property (@(posedge clk) disable iff (!rst_n) pix_wr |-> !buf_full);

  // a block's first coefficient must find its tag waiting
  a_tag_present: assert property (@(posedge clk) disable iff (!rst_n) tag_pop |-> !tag_empty);

endmodule
