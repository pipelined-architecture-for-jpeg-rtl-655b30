// tb_jpeg_ref_pkg: reference models shared by the encoder testbenches.
//
// Everything here is computed independently of the RTL: colour conversion and the forward DCT
// in floating point, quantization with ordinary rounding, a test-image generator, and a
// baseline JPEG scan decoder (canonical Huffman decoding in the style of ITU-T T.81 F.2.2.3)
// that turns the encoder's byte stream back into quantized coefficients. Only the standard
// BITS/HUFFVAL lists are taken from jpeg_pkg, since they are data fixed by the JPEG standard.
package tb_jpeg_ref_pkg;
  import jpeg_pkg::*;

  // zig-zag table, natural position -> zig-zag index (independent copy)
  localparam int ZZ [64] = '{
     0,  1,  5,  6, 14, 15, 27, 28,  2,  4,  7, 13, 16, 26, 29, 42,
     3,  8, 12, 17, 25, 30, 41, 43,  9, 11, 18, 24, 31, 40, 44, 53,
    10, 19, 23, 32, 39, 45, 52, 54, 20, 22, 33, 38, 46, 51, 55, 60,
    21, 34, 37, 47, 50, 56, 59, 61, 35, 36, 48, 49, 57, 58, 62, 63};

  // standard luminance quantization table (quality 50), natural order
  localparam int QLUM [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,  12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,  14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,  24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,  72, 92, 95, 98, 112, 100, 103,  99};

  function automatic int clamp255(real v);
    int i;
    i = $rtoi(v + 0.5 + 1000.0) - 1000;   // round half up, also for negatives
    return (i < 0) ? 0 : (i > 255) ? 255 : i;
  endfunction

  // component sample (0 Y, 1 Cb, 2 Cr) of an RGB triple given as reals
  function automatic int csc(int comp, real r, real g, real b);
    case (comp)
      0:       return clamp255( 0.299  * r + 0.587  * g + 0.114  * b);
      1:       return clamp255(-0.1687 * r - 0.3313 * g + 0.5    * b + 128.0);
      default: return clamp255( 0.5    * r - 0.4187 * g - 0.0813 * b + 128.0);
    endcase
  endfunction

  // deterministic test image: different content per 16x8 data unit
  function automatic logic [23:0] pixel(int x, int y);
    int du, kind, h, r, g, b;
    du   = (x / 16) + 3 * (y / 8);
    kind = du % 5;
    h    = (x * 1103515245 + y * 12345 + 977) ^ (y * 2654435 + x * 97);
    case (kind)
      0: begin r = (h >> 8) & 255; g = (h >> 16) & 255; b = (h >> 4) & 255; end  // noise
      1: begin                                           // top horizontal frequency only
        r = 128 + $rtoi(100.0 * $cos((2.0 * (x % 8) + 1.0) * 7.0 * 3.14159265358979 / 16.0));
        g = r; b = r;
      end
      2: begin r = 200; g = 40; b = 90; end                                         // flat
      3: begin r = (x * 7) & 255; g = (y * 11) & 255; b = 255 - ((x + y) & 255); end  // ramp
      default: begin r = 255; g = 255; b = 255; end                                 // white
    endcase
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  // 8x8 block of integer samples for component 'comp' of data unit at (x0, y0);
  // blk 0/1: Y of the left/right half, 2: Cb, 3: Cr (chroma averaged over pixel pairs)
  function automatic void block_samples(int x0, int y0, int blk, output int s [64]);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        logic [23:0] p0, p1;
        if (blk < 2) begin
          p0 = pixel(x0 + 8 * blk + c, y0 + r);
          s[8*r+c] = csc(0, real'(p0[23:16]), real'(p0[15:8]), real'(p0[7:0]));
        end else begin
          p0 = pixel(x0 + 2 * c, y0 + r);
          p1 = pixel(x0 + 2 * c + 1, y0 + r);
          s[8*r+c] = csc(blk - 1, (real'(p0[23:16]) + real'(p1[23:16])) / 2.0,
                                  (real'(p0[15:8])  + real'(p1[15:8]))  / 2.0,
                                  (real'(p0[7:0])   + real'(p1[7:0]))   / 2.0);
        end
      end
  endfunction

  // floating-point JPEG forward DCT of level-shifted samples; F[8*u+v], u vertical
  function automatic void fdct(input int s [64], output real f [64]);
    real pi;
    pi = 3.14159265358979;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real acc, cu, cv;
        cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        acc = 0.0;
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++)
            acc += real'(s[8*x+y] - 128) * $cos((2.0*x + 1.0) * u * pi / 16.0)
                                         * $cos((2.0*y + 1.0) * v * pi / 16.0);
        f[8*u+v] = 0.25 * cu * cv * acc;
      end
  endfunction

  function automatic int round_div(real v, int q);
    real t;
    t = v / real'(q);
    return (t >= 0.0) ? $rtoi(t + 0.5) : -$rtoi(-t + 0.5);
  endfunction

  // ---------------------------------------------------------------- scan decoder
  class scan_decoder;
    byte unsigned data [$];
    int  pos;           // byte index
    int  bitpos;        // bits used in current byte (0..7)
    int  stuffed;       // 0x00 stuffing bytes seen
    bit  error;
    int  pred [3];

    function new(byte unsigned d [$]);
      data = d; pos = 0; bitpos = 0; stuffed = 0; error = 0;
      pred = '{0, 0, 0};
    endfunction

    function automatic int get_bit();
      int b;
      if (pos >= data.size()) begin error = 1; return 0; end
      b = (data[pos] >> (7 - bitpos)) & 1;
      bitpos++;
      if (bitpos == 8) begin
        bitpos = 0;
        if (data[pos] == 8'hFF) begin
          if (pos + 1 < data.size() && data[pos+1] == 8'h00) begin pos++; stuffed++; end
          else error = 1;
        end
        pos++;
      end
      return b;
    endfunction

    function automatic int get_bits(int n);
      int v;
      v = 0;
      for (int i = 0; i < n; i++) v = (v << 1) | get_bit();
      return v;
    endfunction

    // decode one symbol with table t (mincode/maxcode walk over code lengths)
    function automatic int decode(htab_e t);
      int code, k, first;
      code = 0; k = 0; first = 0;
      for (int l = 0; l < 16; l++) begin
        int n;
        code = (code << 1) | get_bit();
        n = int'(bits_of(t, l));
        if (code - first < n) return int'(huffval(t, k + code - first));
        k += n;
        first = (first + n) << 1;
      end
      error = 1;
      return 0;
    endfunction

    function automatic int extend(int v, int s);
      if (s == 0) return 0;
      return (v < (1 << (s - 1))) ? v - (1 << s) + 1 : v;
    endfunction

    // decode one block of component comp into zig-zag ordered coefficients
    function automatic void block(int comp, output int zz [64]);
      int s, k;
      htab_e dct, act;
      dct = (comp == 0) ? HT_DC_LUM : HT_DC_CHR;
      act = (comp == 0) ? HT_AC_LUM : HT_AC_CHR;
      for (int i = 0; i < 64; i++) zz[i] = 0;
      s = decode(dct);
      pred[comp] += extend(get_bits(s), s);
      zz[0] = pred[comp];
      k = 1;
      while (k < 64 && !error) begin
        int rs, r;
        rs = decode(act);
        r = rs >> 4; s = rs & 15;
        if (s == 0) begin
          if (r == 15) k += 16;
          else break;
        end else begin
          k += r;
          if (k > 63) begin error = 1; break; end
          zz[k] = extend(get_bits(s), s);
          k++;
        end
      end
    endfunction

    // after the last block: the rest of the current byte must be 1-padding and end the data
    function automatic bit check_end();
      while (bitpos != 0) if (get_bit() != 1) return 0;
      return (pos == data.size()) && !error;
    endfunction
  endclass

endpackage
