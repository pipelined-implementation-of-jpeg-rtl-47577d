// huffman_table: Huffman code lookup for the DC and AC tables of the
// luminance and chrominance components.
//
// The four tables are the typical tables of the JPEG standard (Annex K.3).
// They are built at elaboration from the BITS/HUFFVAL lists held in jpeg_pkg
// by the canonical code construction, giving two 12-entry DC tables indexed
// by size category and two 256-entry AC tables indexed by (run << 4 | size);
// after synthesis they are plain ROMs. The same lists are written into the
// DHT header segment, so a decoder rebuilds exactly these codes.
//
// The document shows a Huffman table block and says DC and AC use different
// tables; the choice of the standard's typical tables, fixed in ROM, is this
// design's.
//
// Interface: ac, chroma, sym -> code (hcode_t: length 0 when the symbol has
// no code). Purely combinational.
module huffman_table
  import jpeg_pkg::*;
(
  input  logic       ac,
  input  logic       chroma,
  input  logic [7:0] sym,
  output hcode_t     code
);

  typedef hcode_t [255:0] ac_rom_t;
  typedef hcode_t [11:0]  dc_rom_t;

  function automatic ac_rom_t build_ac(logic c);
    ac_rom_t t;
    for (int s = 0; s < 256; s++) t[s] = huff_code(1'b1, c, 8'(s));
    return t;
  endfunction

  function automatic dc_rom_t build_dc(logic c);
    dc_rom_t t;
    for (int s = 0; s < 12; s++) t[s] = huff_code(1'b0, c, 8'(s));
    return t;
  endfunction

  localparam ac_rom_t AC_Y = build_ac(1'b0);
  localparam ac_rom_t AC_C = build_ac(1'b1);
  localparam dc_rom_t DC_Y = build_dc(1'b0);
  localparam dc_rom_t DC_C = build_dc(1'b1);

  always_comb begin
    if (ac)                 code = chroma ? AC_C[sym] : AC_Y[sym];
    else if (sym < 8'd12)   code = chroma ? DC_C[sym[3:0]] : DC_Y[sym[3:0]];
    else                    code = '0;
  end

endmodule
