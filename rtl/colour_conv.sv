// colour_conv: RGB to YCbCr colour space converter with the chroma down sampler folded in.
//
// Each cycle it produces one 8-bit sample of ONE component, the component the block being
// fetched needs, so no unused Cb/Cr value is ever computed. The input is a horizontal pair of
// RGB pixels. For a Y sample one of the two pixels is converted; for a Cb or Cr sample the two
// pixels' R, G and B are summed first, so the result is the average of the pair (2:1 horizontal
// down sampling, which with the 16x8 data unit gives one 8x8 Cb and one 8x8 Cr block per two
// 8x8 Y blocks). Conversion follows Y = 0.299R + 0.587G + 0.114B, Cb = -0.1687R - 0.3313G +
// 0.5B + 128, Cr = 0.5R - 0.4187G - 0.0813B + 128, with constants of 14 fraction bits plus a
// sign bit as the design specifies. Rounding to nearest and clamping to 0..255 are this
// design's choices.
//
// Interface: pixels are {R[23:16], G[15:8], B[7:0]}; pix_sel picks pix1 (1) or pix0 (0) for Y.
// Timing: two register stages, both advanced only while ce is high; out_valid follows
// in_valid two enabled cycles later. Throughput one sample per enabled cycle.
module colour_conv
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        in_valid,
  input  comp_e       in_comp,
  input  logic        pix_sel,
  input  logic [23:0] pix0,
  input  logic [23:0] pix1,
  output logic        out_valid,
  output logic [7:0]  out_sample
);

  // stage 1: select / sum to 9-bit operands (twice the value for a single pixel)
  logic [8:0] r9, g9, b9;
  always_comb begin
    if (in_comp == COMP_Y) begin
      r9 = {(pix_sel ? pix1[23:16] : pix0[23:16]), 1'b0};
      g9 = {(pix_sel ? pix1[15:8]  : pix0[15:8]),  1'b0};
      b9 = {(pix_sel ? pix1[7:0]   : pix0[7:0]),   1'b0};
    end else begin
      r9 = 9'(pix0[23:16]) + 9'(pix1[23:16]);
      g9 = 9'(pix0[15:8])  + 9'(pix1[15:8]);
      b9 = 9'(pix0[7:0])   + 9'(pix1[7:0]);
    end
  end

  logic        s1_valid;
  logic [1:0]  s1_row;
  logic signed [26:0] s1_sum;
  logic [1:0] row;
  assign row = (in_comp == COMP_Y) ? 2'd0 : (in_comp == COMP_CB) ? 2'd1 : 2'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_row   <= '0;
      s1_sum   <= '0;
    end else if (ce) begin
      s1_valid <= in_valid;
      s1_row   <= row;
      s1_sum   <= 27'(CSC[row][0] * $signed({1'b0, r9}))
                + 27'(CSC[row][1] * $signed({1'b0, g9}))
                + 27'(CSC[row][2] * $signed({1'b0, b9}));
    end
  end

  // stage 2: add the chroma offset, round (operands carry one extra bit), clamp
  localparam int SHIFT = CSC_FRAC + 1;
  logic signed [27:0] s2_acc;
  logic signed [27:0] s2_int;
  always_comb begin
    s2_acc = 28'(s1_sum) + 28'(1 <<< (SHIFT - 1));
    if (s1_row != 2'd0) s2_acc = s2_acc + 28'(128 <<< SHIFT);
    s2_int = s2_acc >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else if (ce) begin
      out_valid  <= s1_valid;
      out_sample <= (s2_int < 0) ? 8'd0 : (s2_int > 255) ? 8'd255 : 8'(s2_int);
    end
  end

endmodule
