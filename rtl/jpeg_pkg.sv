// jpeg_pkg: types, constants and constant functions shared by the JPEG encoder core.
//
// Holds the zig-zag position table, the colour-conversion constants (14 fraction bits plus a
// sign bit, as the design specifies), the fixed-point 1-D DCT coefficient function, the JPEG
// size category function, and the standard baseline Huffman tables of ITU-T T.81 Annex K in
// their compact form (BITS counts and HUFFVAL symbol lists). The code words themselves are
// generated from BITS/HUFFVAL by the canonical procedure of T.81 Annex C (huff_build below),
// so no code table is stored. The choice of the Annex K tables is this design's: the encoder
// architecture has one DC and one AC ROM per luminance/chrominance but does not list contents.
package jpeg_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned PIX_W   = 8;    // one colour component sample
  localparam int unsigned COEF_W  = 12;   // 2-D DCT output / quantized coefficient
  localparam int unsigned QTAB_W  = 8;    // one quantization table entry
  localparam int unsigned RUN_W   = 6;    // full zero run before a coefficient (0..63)
  localparam int unsigned SIZE_W  = 4;    // JPEG size category (0..11)

  // colour component of an 8x8 block
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // per-block tag that travels beside the sample stream
  typedef struct packed {
    comp_e comp;        // which component this block holds
    logic  last_img;    // last block of the image
  } blk_tag_t;

  // one run-length symbol: RUNLENGTH, SIZE, AMPLITUDE; run = 0 and size = 0 on an AC symbol
  // is the end-of-block code. A run of 16 or more is split into ZRL codes by the Huffman coder.
  typedef struct packed {
    logic                     is_dc;
    comp_e                    comp;
    logic                     last_blk;   // last symbol of its block
    logic                     last_img;   // last symbol of the image
    logic [RUN_W-1:0]         run;
    logic [SIZE_W-1:0]        size;
    logic signed [COEF_W-1:0] amp;
  } rle_sym_t;

  // ---------------------------------------------------------------- zig-zag (Table I)
  // ZIGZAG[n] is the output (zig-zag) position of the sample at natural position n = 8*row+col.
  localparam logic [5:0] ZIGZAG [64] = '{
     0,  1,  5,  6, 14, 15, 27, 28,
     2,  4,  7, 13, 16, 26, 29, 42,
     3,  8, 12, 17, 25, 30, 41, 43,
     9, 11, 18, 24, 31, 40, 44, 53,
    10, 19, 23, 32, 39, 45, 52, 54,
    20, 22, 33, 38, 46, 51, 55, 60,
    21, 34, 37, 47, 50, 56, 59, 61,
    35, 36, 48, 49, 57, 58, 62, 63};

  // ---------------------------------------------------------------- colour conversion
  // round(k * 2^14), signed; each row sums to 2^14 (Y) or 0 (Cb, Cr)
  localparam int unsigned CSC_FRAC = 14;
  localparam logic signed [15:0] CSC [3][3] = '{
    '{16'sd4899,  16'sd9617,  16'sd1868},    // Y  =  0.299 R + 0.587 G + 0.114 B
    '{-16'sd2764, -16'sd5428, 16'sd8192},    // Cb = -0.1687 R - 0.3313 G + 0.5 B + 128
    '{16'sd8192,  -16'sd6860, -16'sd1332}};  // Cr =  0.5 R - 0.4187 G - 0.0813 B + 128

  // ---------------------------------------------------------------- DCT coefficients
  localparam int unsigned DCT_FRAC = 12;   // coefficient fraction bits
  // round(2^12 * 0.5 * cos(m*pi/16)) for m = 0..8; m = 0 entry unused (DC uses DCT_C0)
  localparam int DCT_COS [9] = '{2048, 2009, 1892, 1703, 1448, 1138, 784, 400, 0};
  localparam int DCT_C0 = 1448;            // round(2^12 * 0.5 / sqrt(2))

  // 2^12 * c(u)/2 * cos((2k+1) u pi / 16), c(0) = 1/sqrt(2), c(u>0) = 1
  function automatic int dct_coef(int u, int k);
    int m;
    bit neg;
    if (u == 0) return DCT_C0;
    m = ((2 * k + 1) * u) % 32;
    neg = 1'b0;
    if (m > 16) m = 32 - m;              // cos(2pi - a) = cos(a)
    if (m > 8) begin m = 16 - m; neg = 1'b1; end // cos(pi - a) = -cos(a)
    return neg ? -DCT_COS[m] : DCT_COS[m];
  endfunction

  // ---------------------------------------------------------------- size category (Table 2)
  // number of bits of |v|: 0 for 0, 1 for +-1, 2 for +-2..3, ..., 11 for +-1024..2047
  function automatic logic [SIZE_W-1:0] size_of(logic signed [COEF_W-1:0] v);
    logic [COEF_W-1:0] a;
    a = v[COEF_W-1] ? COEF_W'(-v) : COEF_W'(v);
    size_of = '0;
    for (int b = 0; b < COEF_W; b++)
      if (a[b]) size_of = SIZE_W'(b + 1);
  endfunction

  // ---------------------------------------------------------------- Huffman tables
  typedef enum logic [1:0] {HT_DC_LUM = 2'd0, HT_DC_CHR = 2'd1,
                            HT_AC_LUM = 2'd2, HT_AC_CHR = 2'd3} htab_e;

  // one code word: right-aligned code and its length (0 = symbol not in table)
  typedef struct packed {
    logic [15:0] code;
    logic [4:0]  len;
  } hcode_t;

  localparam logic [7:0] BITS_DC_LUM [16] = '{0, 1, 5, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [7:0] BITS_DC_CHR [16] = '{0, 3, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0};
  localparam logic [7:0] BITS_AC_LUM [16] = '{0, 2, 1, 3, 3, 2, 4, 3, 5, 5, 4, 4, 0, 0, 1, 125};
  localparam logic [7:0] BITS_AC_CHR [16] = '{0, 2, 1, 2, 4, 4, 3, 4, 7, 5, 4, 4, 0, 1, 2, 119};

  localparam logic [7:0] HUFFVAL_AC_LUM [162] = '{
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31, 8'h41, 8'h06, 8'h13, 8'h51, 8'h61, 8'h07,
    8'h22, 8'h71, 8'h14, 8'h32, 8'h81, 8'h91, 8'ha1, 8'h08, 8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52, 8'hd1, 8'hf0,
    8'h24, 8'h33, 8'h62, 8'h72, 8'h82, 8'h09, 8'h0a, 8'h16, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28,
    8'h29, 8'h2a, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48, 8'h49,
    8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69,
    8'h6a, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89,
    8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3, 8'ha4, 8'ha5, 8'ha6, 8'ha7,
    8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6, 8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5,
    8'hc6, 8'hc7, 8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he1, 8'he2,
    8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf1, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7, 8'hf8,
    8'hf9, 8'hfa};
  localparam logic [7:0] HUFFVAL_AC_CHR [162] = '{
    8'h00, 8'h01, 8'h02, 8'h03, 8'h11, 8'h04, 8'h05, 8'h21, 8'h31, 8'h06, 8'h12, 8'h41, 8'h51, 8'h07, 8'h61, 8'h71,
    8'h13, 8'h22, 8'h32, 8'h81, 8'h08, 8'h14, 8'h42, 8'h91, 8'ha1, 8'hb1, 8'hc1, 8'h09, 8'h23, 8'h33, 8'h52, 8'hf0,
    8'h15, 8'h62, 8'h72, 8'hd1, 8'h0a, 8'h16, 8'h24, 8'h34, 8'he1, 8'h25, 8'hf1, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h26,
    8'h27, 8'h28, 8'h29, 8'h2a, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48,
    8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68,
    8'h69, 8'h6a, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h82, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87,
    8'h88, 8'h89, 8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3, 8'ha4, 8'ha5,
    8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6, 8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3,
    8'hc4, 8'hc5, 8'hc6, 8'hc7, 8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda,
    8'he2, 8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7, 8'hf8,
    8'hf9, 8'hfa};

  function automatic logic [7:0] huffval(htab_e t, int i);
    case (t)
      HT_DC_LUM, HT_DC_CHR: return 8'(i);           // DC symbols are 0..11 in order
      HT_AC_LUM:            return HUFFVAL_AC_LUM[i];
      default:              return HUFFVAL_AC_CHR[i];
    endcase
  endfunction

  function automatic logic [7:0] bits_of(htab_e t, int l);
    case (t)
      HT_DC_LUM: return BITS_DC_LUM[l];
      HT_DC_CHR: return BITS_DC_CHR[l];
      HT_AC_LUM: return BITS_AC_LUM[l];
      default:   return BITS_AC_CHR[l];
    endcase
  endfunction

  // Canonical code assignment (T.81 Annex C): codes of one length are consecutive, and the
  // first code of length L+1 is (last code of length L + 1) << 1. Indexed by symbol value.
  typedef logic [$bits(hcode_t)-1:0] htable_t [256];   // packed hcode_t per symbol
  function automatic htable_t huff_build(htab_e t);
    htable_t tab;
    int code;
    int k;
    for (int s = 0; s < 256; s++) tab[s] = '0;
    code = 0;
    k = 0;
    for (int l = 0; l < 16; l++) begin
      for (int n = 0; n < int'(bits_of(t, l)); n++) begin
        tab[huffval(t, k)] = {16'(code), 5'(l + 1)};
        code++;
        k++;
      end
      code = code << 1;
    end
    return tab;
  endfunction

endpackage
