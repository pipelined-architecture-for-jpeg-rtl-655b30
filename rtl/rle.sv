// rle: run-length encoder for one 8x8 block of quantized coefficients in zig-zag order.
//
// Word 0 of a block is the DC coefficient; it is coded differentially against the previous DC
// of the same component (one predictor each for Y, Cb and Cr, cleared by 'clear' at the start
// of an image) and always has RUNLENGTH 0. Words 1..63 are AC coefficients: a zero only
// increments the zero run; a non-zero value produces the symbol (RUNLENGTH = zeros before it,
// SIZE = bits of |value|, AMPLITUDE = value). If the block ends on zeros an end-of-block symbol
// (RUNLENGTH 0, SIZE 0) is produced. So each input word gives at most one symbol and a block
// gives at most 64. The full run (0..62) is passed on; splitting runs of 16 or more into ZRL
// codes is left to the Huffman coder. DC differences are saturated to +-2047 (SIZE <= 11).
//
// The block's component and last-in-image flag are taken from tag_data (a FIFO head) when
// word 0 arrives, and tag_pop is pulsed then.
// Timing: one word per enabled cycle; the symbol for a word is registered (sym_valid) on the
// same enabled edge, so the latency is one enabled cycle.
module rle
  import jpeg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic [5:0]               in_pos,
  input  logic signed [COEF_W-1:0] in_data,
  input  blk_tag_t                 tag_data,
  output logic                     tag_pop,
  output logic                     sym_valid,
  output rle_sym_t                 sym
);

  logic signed [COEF_W-1:0] pred [3];
  logic [RUN_W-1:0]         run;
  blk_tag_t                 cur_tag;

  blk_tag_t                 tag;
  logic signed [COEF_W:0]   diff_w;
  logic signed [COEF_W-1:0] diff;
  assign tag    = (in_pos == 6'd0) ? tag_data : cur_tag;
  assign diff_w = (COEF_W+1)'(in_data) - (COEF_W+1)'(pred[tag.comp]);
  assign diff   = (diff_w >  (COEF_W+1)'(2047)) ? COEF_W'(2047)  :
                  (diff_w < -(COEF_W+1)'(2047)) ? -COEF_W'(2047) : COEF_W'(diff_w);

  assign tag_pop = ce && in_valid && (in_pos == 6'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 3; c++) pred[c] <= '0;
      run <= '0; cur_tag <= '0; sym_valid <= 1'b0; sym <= '0;
    end else begin
      if (clear) for (int c = 0; c < 3; c++) pred[c] <= '0;
      if (ce) begin
        sym_valid <= 1'b0;
        if (in_valid) begin
          sym.comp     <= tag.comp;
          sym.is_dc    <= (in_pos == 6'd0);
          sym.last_blk <= (in_pos == 6'd63);
          sym.last_img <= (in_pos == 6'd63) && tag.last_img;
          if (in_pos == 6'd0) begin
            cur_tag        <= tag_data;
            pred[tag.comp] <= in_data;
            run            <= '0;
            sym_valid      <= 1'b1;
            sym.run        <= '0;
            sym.size       <= size_of(diff);
            sym.amp        <= diff;
          end else if (in_data == '0) begin
            run <= run + RUN_W'(1);
            if (in_pos == 6'd63) begin      // trailing zeros: end of block
              sym_valid <= 1'b1;
              sym.run   <= '0;
              sym.size  <= '0;
              sym.amp   <= '0;
            end
          end else begin
            run       <= '0;
            sym_valid <= 1'b1;
            sym.run   <= run;
            sym.size  <= size_of(in_data);
            sym.amp   <= in_data;
          end
        end
      end
    end
  end

endmodule
