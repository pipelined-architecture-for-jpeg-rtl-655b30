// dct_2d: level-shifted 8x8 two-dimensional DCT by row-column decomposition.
//
// An 8-bit unsigned sample is level shifted to signed (-128..127) and passed through a first
// 8-point 1-D DCT along each row; the results, kept with two fraction bits, go through a
// ping-pong transpose buffer and a second 1-D DCT along each column. The output is the JPEG
// forward DCT F(u,v) = 1/4 C(u) C(v) sum sum f(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16),
// rounded to a 12-bit signed integer, as the design specifies (8-bit in, 12-bit out, level
// shift in the DCT core, row-column decomposition with a transpose buffer). The 1/4 scale
// and the two intermediate fraction bits are this design's choices.
//
// Order: input samples row by row (64 per block). Output is column by column: output sample n
// is F(u = n mod 8, v = n / 8); the zig-zag stage absorbs this transposition.
// Timing: one sample per enabled cycle in and out; a block's first output appears 19 enabled
// cycles after its last input sample.
module dct_2d
  import jpeg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     in_valid,
  input  logic [7:0]               in_sample,
  output logic                     out_valid,
  output logic signed [COEF_W-1:0] out_coef
);

  localparam int unsigned MID_W = 13;   // first-pass result, 2 fraction bits

  logic signed [7:0] shifted;
  assign shifted = $signed(in_sample ^ 8'h80);   // x - 128

  logic                    r_valid, t_valid;
  logic signed [MID_W-1:0] r_data,  t_data;

  dct_1d #(.IN_W(8), .OUT_W(MID_W), .SHIFT(DCT_FRAC - 2)) u_row (
    .clk, .rst_n, .ce, .in_valid, .in_data(shifted),
    .out_valid(r_valid), .out_data(r_data));

  transpose_buffer #(.W(MID_W)) u_tr (
    .clk, .rst_n, .ce, .in_valid(r_valid), .in_data(r_data),
    .out_valid(t_valid), .out_data(t_data));

  dct_1d #(.IN_W(MID_W), .OUT_W(COEF_W), .SHIFT(DCT_FRAC + 2)) u_col (
    .clk, .rst_n, .ce, .in_valid(t_valid), .in_data(t_data),
    .out_valid, .out_data(out_coef));

endmodule
