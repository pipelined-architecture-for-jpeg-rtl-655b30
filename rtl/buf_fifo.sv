// buf_fifo: input line buffer (BUF_FIFO) between the host pixel port and the encoder pipeline.
//
// The host writes 24-bit RGB pixels in raster order, one per cycle, for as long as almost_full
// is low; when it rises the host must stop and wait for it to fall (the flow control the design
// specifies). Pixels are stored in pairs (48-bit words) so one read returns the two
// horizontally adjacent pixels the chroma down sampler averages. The buffer holds LINES image
// lines, i.e. LINES/8 bands of 8 lines; a complete band is what the encoder needs to cut 16x8
// data units. band_ready says at least one complete band is stored; the controller reads it
// in any order and then frees it with band_release, which returns its 8 lines to the writer.
// The line count (two bands, so the host can fill one band while the other is encoded) and the
// pair organisation are this design's choices.
//
// Interface: img_width (pixels, a multiple of 16, at most MAX_WIDTH) must be stable while an
// image is written; clear restarts the buffer for a new image. Read: rd_line 0..7 within the
// oldest band, rd_pair = x/2; rd_data = {pixel x+1, pixel x} one enabled (ce) cycle later.
// almost_full rises AF_MARGIN pixels before the buffer is full.
module buf_fifo #(
  parameter int unsigned MAX_WIDTH = 640,
  parameter int unsigned LINES     = 16,
  parameter int unsigned AF_MARGIN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [15:0] img_width,
  // host pixel port
  input  logic        wr_en,
  input  logic [23:0] wr_data,
  output logic        almost_full,
  output logic        full,
  // encoder read port
  input  logic        ce,
  input  logic        rd_en,
  input  logic [2:0]  rd_line,
  input  logic [$clog2(MAX_WIDTH/2)-1:0] rd_pair,
  output logic [47:0] rd_data,
  output logic        band_ready,
  input  logic        band_release
);

  localparam int unsigned HALF   = MAX_WIDTH / 2;
  localparam int unsigned NBANDS = LINES / 8;
  localparam int unsigned WORDS  = LINES * HALF;
  localparam int unsigned AW     = $clog2(WORDS);
  localparam int unsigned LW     = $clog2(LINES);
  localparam int unsigned BW     = (NBANDS > 1) ? $clog2(NBANDS) : 1;
  localparam int unsigned FW     = $clog2(LINES * MAX_WIDTH + 1);

  logic [47:0] mem [WORDS];

  logic [15:0]   wx;
  logic [LW-1:0] wline;
  logic [23:0]   hold;
  logic [BW-1:0] rband;
  logic [BW:0]   bands_full;
  logic [FW-1:0] fill, cap;
  logic          wr_ok, band_done;

  assign cap         = FW'(LINES) * FW'(img_width);
  assign full        = (fill >= cap);
  assign almost_full = (fill + FW'(AF_MARGIN) >= cap);
  assign band_ready  = (bands_full != '0);
  assign wr_ok       = wr_en && !full;
  assign band_done   = wr_ok && (wx == img_width - 16'd1) && (wline[2:0] == 3'd7);

  logic [AW-1:0] waddr, raddr;
  assign waddr = AW'(wline) * AW'(HALF) + AW'(wx >> 1);
  assign raddr = (AW'(rband) * AW'(8) + AW'(rd_line)) * AW'(HALF) + AW'(rd_pair);

  always_ff @(posedge clk) begin
    if (wr_ok && wx[0]) mem[waddr] <= {wr_data, hold};
    if (ce && rd_en)    rd_data    <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wx <= '0; wline <= '0; hold <= '0; rband <= '0; bands_full <= '0; fill <= '0;
    end else if (clear) begin
      wx <= '0; wline <= '0; rband <= '0; bands_full <= '0; fill <= '0;
    end else begin
      if (wr_ok) begin
        if (!wx[0]) hold <= wr_data;
        if (wx == img_width - 16'd1) begin
          wx    <= '0;
          wline <= (32'(wline) == LINES - 1) ? '0 : wline + LW'(1);
        end else begin
          wx <= wx + 16'd1;
        end
      end
      if (band_release)
        rband <= (32'(rband) == NBANDS - 1) ? '0 : rband + BW'(1);
      bands_full <= bands_full + (BW+1)'(band_done) - (BW+1)'(band_release);
      fill <= fill + FW'(wr_ok) - (band_release ? FW'(8) * FW'(img_width) : FW'(0));
    end
  end

  a_release_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                    band_release |-> band_ready);

endmodule
