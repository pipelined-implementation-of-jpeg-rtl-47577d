// jpeg_pkg: types, constants and table-building functions shared by the
// JPEG baseline encoder.
//
// Holds the stream types passed between pipeline stages (the RLC symbol and
// the Huffman code word), the zig-zag order, the fixed-point DCT basis, the
// MCU layout for the two sampling modes, and the default quantisation and
// Huffman tables. The default tables are the example tables of the JPEG
// standard (ITU-T T.81 Annex K); the encoder uses them because no other
// values are specified for it. Huffman code words are not stored: they are
// derived at elaboration from the BITS/HUFFVAL lists with the canonical
// code construction of T.81 Annex C, so the DHT segment written into the
// header and the codes used for encoding always agree.
package jpeg_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned COEF_W   = 12;  // quantiser input / output width
  localparam int unsigned AMP_W    = 11;  // additional-bits field (size <= 11)
  localparam int unsigned CODE_W   = 27;  // longest Huffman code + amplitude
  localparam int unsigned DCT_CW   = 13;  // signed DCT basis word
  localparam int unsigned DCT_FRAC = 12;  // fraction bits of the DCT basis

  // Sampling mode of the luminance component. Chrominance is always H=V=1.
  typedef enum logic {
    MODE_422 = 1'b0,   // Y: H=2,V=1 -> MCU = Y0 Y1 Cb Cr        (16x8 pixels)
    MODE_420 = 1'b1    // Y: H=2,V=2 -> MCU = Y0 Y1 Y2 Y3 Cb Cr  (16x16 pixels)
  } samp_mode_e;

  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // Number of 8x8 blocks in one MCU.
  function automatic int unsigned mcu_blocks(samp_mode_e m);
    return (m == MODE_420) ? 6 : 4;
  endfunction

  // Component of the n-th block inside an MCU.
  function automatic comp_e comp_of_block(samp_mode_e m, logic [2:0] n);
    int unsigned ny;
    ny = (m == MODE_420) ? 4 : 2;
    if (n < 3'(ny))          return COMP_Y;
    else if (n == 3'(ny))    return COMP_CB;
    else                     return COMP_CR;
  endfunction

  // ---------------------------------------------------------------- RLC symbol
  // One entropy-coding event. zrl counts the ZRL (16 zeros) codes that must be
  // sent before the symbol itself. For DC, run is 0 and size is the category.
  // EOB is run=0,size=0 with is_dc=0.
  typedef struct packed {
    logic             is_dc;
    logic             chroma;   // selects the chrominance tables
    logic [1:0]       zrl;
    logic [3:0]       run;
    logic [3:0]       size;
    logic [AMP_W-1:0] amp;
    logic             eof;      // last symbol of the frame
  } rlc_sym_t;

  // One variable-length code word, right-aligned in bits.
  typedef struct packed {
    logic [4:0]        len;   // 1..27
    logic [CODE_W-1:0] bits;
    logic              eof;
  } vlc_t;

  typedef struct packed {
    logic [4:0]  len;   // code length, 0 = symbol not in table
    logic [15:0] code;
  } hcode_t;

  // ---------------------------------------------------------------- zig-zag
  // Natural (row-major) index of the coefficient at zig-zag position i,
  // produced by walking the anti-diagonals of the 8x8 block.
  function automatic logic [5:0] zigzag(int unsigned i);
    int unsigned r, c, k;
    r = 0; c = 0;
    for (k = 0; k < i; k++) begin
      if (((r + c) % 2) == 0) begin       // moving up-right
        if (c == 7)       r++;
        else if (r == 0)  c++;
        else begin r--; c++; end
      end else begin                       // moving down-left
        if (r == 7)       c++;
        else if (c == 0)  r++;
        else begin r++; c--; end
      end
    end
    return 6'(r * 8 + c);
  endfunction

  // The whole order as a table: ZIGZAG[i] = natural index at zig-zag position i.
  function automatic logic [63:0][5:0] zigzag_table();
    logic [63:0][5:0] t;
    for (int i = 0; i < 64; i++) t[i] = zigzag(i);
    return t;
  endfunction
  localparam logic [63:0][5:0] ZIGZAG = zigzag_table();

  // ---------------------------------------------------------------- DCT basis
  // round(2^12 * cos(m*pi/16) / 2) for m = 0..7; m = 0 entry replaced by the
  // k = 0 basis value round(2^12 / (2*sqrt(2))).
  localparam logic signed [DCT_CW-1:0] COS_HALF [8] =
    '{13'sd1448, 13'sd2009, 13'sd1892, 13'sd1703, 13'sd1448, 13'sd1138, 13'sd784, 13'sd400};

  // Basis C(k,n) = c(k)/2 * cos((2n+1) k pi / 16) scaled by 2^12,
  // c(0) = 1/sqrt(2), c(k>0) = 1.
  function automatic logic signed [DCT_CW-1:0] dct_coef(int unsigned k, int unsigned n);
    int unsigned m;
    if (k == 0) return COS_HALF[0];
    m = ((2 * n + 1) * k) % 32;
    if (m <= 8)       return (m == 8) ? '0 :  COS_HALF[m];
    else if (m < 16)  return -COS_HALF[16 - m];
    else if (m <= 24) return (m == 24) ? '0 : -COS_HALF[m - 16];
    else              return  COS_HALF[32 - m];
  endfunction

  // ---------------------------------------------------------------- quant tables
  // T.81 Table K.1 / K.2, natural (row-major) order.
  localparam logic [7:0] QT_LUMA [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99};

  // Chrominance: the first 4x4 corner differs from 99.
  localparam logic [7:0] QT_CHROMA_CORNER [16] = '{
    17, 18, 24, 47,
    18, 21, 26, 66,
    24, 26, 56, 99,
    47, 66, 99, 99};

  // Default table entry at zig-zag position zz.
  function automatic logic [7:0] qt_default(logic chroma, int unsigned zz);
    logic [5:0] nat;
    nat = ZIGZAG[zz[5:0]];
    if (!chroma) return QT_LUMA[nat];
    if (nat[5:3] < 4 && nat[2:0] < 4) return QT_CHROMA_CORNER[{nat[4:3], nat[1:0]}];
    return 8'd99;
  endfunction

  // ---------------------------------------------------------------- Huffman tables
  // T.81 Tables K.3 - K.6 as BITS (codes per length 1..16) and HUFFVAL.
  localparam logic [7:0] DC_LUMA_BITS   [16] = '{0, 1, 5, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0};
  localparam logic [7:0] DC_CHROMA_BITS [16] = '{0, 3, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0};
  // DC HUFFVAL is 0..11 for both tables.
  localparam logic [7:0] AC_LUMA_BITS   [16] = '{0, 2, 1, 3, 3, 2, 4, 3, 5, 5, 4, 4, 0, 0, 1, 8'h7d};
  localparam logic [7:0] AC_CHROMA_BITS [16] = '{0, 2, 1, 2, 4, 4, 3, 4, 7, 5, 4, 4, 0, 1, 2, 8'h77};

  localparam logic [7:0] AC_LUMA_VAL [162] = '{
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31, 8'h41, 8'h06,
    8'h13, 8'h51, 8'h61, 8'h07, 8'h22, 8'h71, 8'h14, 8'h32, 8'h81, 8'h91, 8'ha1, 8'h08,
    8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52, 8'hd1, 8'hf0, 8'h24, 8'h33, 8'h62, 8'h72,
    8'h82, 8'h09, 8'h0a, 8'h16, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28,
    8'h29, 8'h2a, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45,
    8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59,
    8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74, 8'h75,
    8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89,
    8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3,
    8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6,
    8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7, 8'hc8, 8'hc9,
    8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he1, 8'he2,
    8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf1, 8'hf2, 8'hf3, 8'hf4,
    8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa};

  localparam logic [7:0] AC_CHROMA_VAL [162] = '{
    8'h00, 8'h01, 8'h02, 8'h03, 8'h11, 8'h04, 8'h05, 8'h21, 8'h31, 8'h06, 8'h12, 8'h41,
    8'h51, 8'h07, 8'h61, 8'h71, 8'h13, 8'h22, 8'h32, 8'h81, 8'h08, 8'h14, 8'h42, 8'h91,
    8'ha1, 8'hb1, 8'hc1, 8'h09, 8'h23, 8'h33, 8'h52, 8'hf0, 8'h15, 8'h62, 8'h72, 8'hd1,
    8'h0a, 8'h16, 8'h24, 8'h34, 8'he1, 8'h25, 8'hf1, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h26,
    8'h27, 8'h28, 8'h29, 8'h2a, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44,
    8'h45, 8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58,
    8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74,
    8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h82, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87,
    8'h88, 8'h89, 8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a,
    8'ha2, 8'ha3, 8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4,
    8'hb5, 8'hb6, 8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7,
    8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda,
    8'he2, 8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf2, 8'hf3, 8'hf4,
    8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa};

  function automatic logic [7:0] bits_of(logic ac, logic chroma, int unsigned l);
    if (ac) return chroma ? AC_CHROMA_BITS[l] : AC_LUMA_BITS[l];
    return chroma ? DC_CHROMA_BITS[l] : DC_LUMA_BITS[l];
  endfunction

  function automatic logic [7:0] val_of(logic ac, logic chroma, int unsigned i);
    if (ac) return chroma ? AC_CHROMA_VAL[i] : AC_LUMA_VAL[i];
    return 8'(i);
  endfunction

  // Canonical Huffman code of symbol sym (T.81 Annex C): codes are assigned
  // in HUFFVAL order, incrementing by one within a length and shifting left by
  // one when moving to the next length.
  function automatic hcode_t huff_code(logic ac, logic chroma, logic [7:0] sym);
    hcode_t      h;
    int unsigned idx, l, j, nvals;
    logic [16:0] code;
    h = '0; idx = 0; code = '0;
    nvals = ac ? 162 : 12;
    for (l = 0; l < 16; l++) begin
      for (j = 0; j < int'(bits_of(ac, chroma, l)); j++) begin
        if (idx < nvals && val_of(ac, chroma, idx) == sym && h.len == 0) begin
          h.len  = 5'(l + 1);
          h.code = code[15:0];
        end
        code = code + 17'd1;
        idx  = idx + 1;
      end
      code = code << 1;
    end
    return h;
  endfunction

  // Size category: number of significant bits of |v|.
  function automatic logic [3:0] size_cat(logic signed [12:0] v);
    logic [12:0] a;
    logic [3:0]  s;
    a = v[12] ? 13'(-v) : 13'(v);
    s = 0;
    for (int i = 0; i < 13; i++) if (a[i]) s = 4'(i + 1);
    return s;
  endfunction

  // JFIF header length in bytes (SOI, APP0, DQT, SOF0, DHT, SOS).
  localparam int unsigned HDR_BYTES = 607;

endpackage
