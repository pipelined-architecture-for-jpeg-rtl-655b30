// huffman: Huffman encoder and variable-length bit packer.
//
// Takes run-length symbols from the symbol double FIFO, looks each one up in the DC or AC ROM
// of its colour class (luminance for Y, chrominance for Cb/Cr) and appends the code word
// followed by SIZE amplitude bits (the value itself if positive, value - 1 if negative, i.e.
// its one's complement, low SIZE bits) to a 64-bit bit buffer. A zero run of 16 or more before
// an AC coefficient is sent as one ZRL code (symbol 0xF0) per 16 zeros, one per cycle, before
// the coefficient's own code. Whole bytes leave the buffer MSB first, one per cycle, into the
// output double FIFO. After the image's last symbol the remaining bits are padded with ones to
// a byte boundary and 'done' is raised.
//
// A new symbol is accepted only when the buffer holds at most 37 bits, so the longest item
// (16-bit code + 11 amplitude bits) always fits. The byte written right after a block's last
// symbol was taken is marked 'last' so the output double FIFO changes buffer near block
// boundaries. 'clear' (start of image) resets the buffer and the done flag.
// Throughput: one symbol (or ZRL) per cycle in, one byte per cycle out.
module huffman
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  // run-length symbols (first-word-fall-through)
  input  rle_sym_t    sym,
  input  logic        sym_empty,
  output logic        sym_rd,
  // encoded bytes
  output logic        byte_wr,
  output logic [7:0]  byte_data,
  output logic        byte_last,
  input  logic        byte_full,
  output logic        done,
  // event counters for observation: ZRL codes and end-of-block codes sent
  output logic        ev_zrl,
  output logic        ev_eob
);

  hcode_t dc_lum, dc_chr, ac_lum, ac_chr;
  logic [7:0] dc_idx, ac_idx;
  logic [RUN_W-1:0] run_left;
  logic [1:0]       zrl_sent;

  assign run_left = sym.run - RUN_W'({zrl_sent, 4'd0});
  assign dc_idx   = {4'd0, sym.size};
  assign ac_idx   = (run_left >= RUN_W'(16)) ? 8'hF0 : {run_left[3:0], sym.size};

  huff_rom #(.TABLE(HT_DC_LUM)) u_dc_lum (.sym(dc_idx), .code(dc_lum));
  huff_rom #(.TABLE(HT_DC_CHR)) u_dc_chr (.sym(dc_idx), .code(dc_chr));
  huff_rom #(.TABLE(HT_AC_LUM)) u_ac_lum (.sym(ac_idx), .code(ac_lum));
  huff_rom #(.TABLE(HT_AC_CHR)) u_ac_chr (.sym(ac_idx), .code(ac_chr));

  // code selection (the ROM multiplexer) and amplitude bits
  hcode_t     hc;
  logic       is_zrl;
  logic [10:0] amp_bits;
  logic [26:0] item;
  logic [4:0]  item_len;
  always_comb begin
    logic chroma;
    chroma = (sym.comp != COMP_Y);
    is_zrl = !sym.is_dc && (run_left >= RUN_W'(16));
    if (sym.is_dc) hc = chroma ? dc_chr : dc_lum;
    else           hc = chroma ? ac_chr : ac_lum;
    amp_bits = 11'(sym.amp[COEF_W-1] ? sym.amp - COEF_W'(1) : sym.amp);
    amp_bits = amp_bits & ((11'd1 << sym.size) - 11'd1);
    if (is_zrl) begin
      item     = 27'(hc.code);
      item_len = hc.len;
    end else begin
      item     = (27'(hc.code) << sym.size) | 27'(amp_bits);
      item_len = hc.len + 5'(sym.size);
    end
  end

  logic [63:0] bbuf;
  logic [6:0]  bcnt;
  logic        blk_end, flushing;
  logic        take, emit, pad;

  assign take      = !sym_empty && !flushing && !done && (bcnt <= 7'd37);
  assign sym_rd    = take && !is_zrl;
  assign emit      = (bcnt >= 7'd8) && !byte_full;
  assign pad       = flushing && !take && (bcnt < 7'd8) && (bcnt != 7'd0);
  assign byte_wr   = emit;
  assign byte_data = 8'(bbuf >> (bcnt - 7'd8));
  assign byte_last = blk_end || (flushing && bcnt == 7'd8);
  assign ev_zrl    = take && is_zrl;
  assign ev_eob    = take && !sym.is_dc && sym.size == '0 && !is_zrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bbuf <= '0; bcnt <= '0; blk_end <= 1'b0; flushing <= 1'b0; done <= 1'b0; zrl_sent <= '0;
    end else if (clear) begin
      bbuf <= '0; bcnt <= '0; blk_end <= 1'b0; flushing <= 1'b0; done <= 1'b0; zrl_sent <= '0;
    end else begin
      logic [6:0] cnt_n;
      cnt_n = bcnt;
      if (emit) begin
        cnt_n   = cnt_n - 7'd8;
        blk_end <= 1'b0;
      end
      if (take) begin
        bbuf  <= (bbuf << item_len) | 64'(item);
        cnt_n = cnt_n + 7'(item_len);
        if (is_zrl) zrl_sent <= zrl_sent + 2'd1;
        else begin
          zrl_sent <= '0;
          if (sym.last_blk) blk_end  <= 1'b1;
          if (sym.last_img) flushing <= 1'b1;
        end
      end else if (pad) begin
        bbuf  <= (bbuf << (7'd8 - bcnt)) | ((64'd1 << (7'd8 - bcnt)) - 64'd1);
        cnt_n = 7'd8;
      end
      bcnt <= cnt_n;
      if (flushing && !take && bcnt == 7'd0) begin
        flushing <= 1'b0;
        done     <= 1'b1;
      end
    end
  end

  a_item_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                take |-> (32'(bcnt) + 32'(item_len) <= 64));

endmodule
