// jpeg_encoder: pipelined JPEG baseline encoder for YCbCr 4:2:2 / 4:2:0
// colour images, producing a JFIF file as a stream of 32-bit words.
//
// Data path, one 8-bit sample per clock throughout:
//   line_buffer   raster Cb Y Cr Y stream -> 8x8 blocks in MCU order
//   dct_2d        level shift, row DCT, transpose memory, column DCT
//   zigzag_scan   second block memory, read in zig-zag order
//   quantizer     17-clock non-restoring divider, tables from quant_table
//   rlc           DC differences and AC zero runs -> symbols
//   sync_fifo     symbol FIFO (absorbs ZRL bursts and header time)
//   huffman_encoder + huffman_table  symbols -> code words
//   packer + jfif_header  header, bit packing, 0xFF stuffing, EOI, 32-bit words
// The order of the stages follows the document's block diagram; the symbol
// FIFO and all handshakes are this design's choices.
//
// Use: load quantisation tables if the defaults are not wanted (qt_we ...),
// set mode, width, height, pulse start for one clock, wait for hdr_sent, then
// stream 2*width*height samples on isp_valid/isp_data (each line Cb0 Y0 Cr0 Y1
// ...). The compressed file leaves on out_valid/out_data (first byte in bits
// 31:24); the word with out_last holds out_nbytes valid bytes; done pulses
// with it. width must be a multiple of 16 (at most MAX_WIDTH), height a
// multiple of 8 (4:2:2) or 16 (4:2:0).
// Error flags: err_overrun (a block or line memory was overwritten before it
// was read: input arrived faster than one sample per clock on average),
// fifo_overflow (the entropy stage fell behind; symbols were lost).
// Timing: the header (607 bytes) leaves in 607 clocks after start. A strip
// (one MCU row) starts through the block pipeline 2 clocks after its last
// sample arrives; from there the first quantised coefficient follows after
// 164 clocks (LIFO 4 + DCT 6, transpose 64, LIFO 4 + DCT 6, zig-zag memory
// 63, quantiser 17), and a strip is processed at one sample per clock. A
// frame takes about 2*width*height clocks plus one strip and the header.
module jpeg_encoder
  import jpeg_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 1024,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        start,
  input  samp_mode_e  mode,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  logic        qt_we,
  input  logic        qt_chroma,
  input  logic [5:0]  qt_addr,
  input  logic [7:0]  qt_data,
  // pixel stream from the image signal processor
  input  logic        isp_valid,
  input  logic [7:0]  isp_data,
  // compressed stream
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic [2:0]  out_nbytes,
  output logic        out_last,
  // status
  output logic        busy,
  output logic        hdr_sent,
  output logic        done,
  output logic        err_overrun,
  output logic        fifo_overflow,
  output logic [$clog2(FIFO_DEPTH):0] fifo_max_level
);

  // blocks per frame: 4 per 16x8 MCU (4:2:2) or 6 per 16x16 MCU (4:2:0)
  logic [31:0] npix;
  logic [15:0] total_blocks;
  assign npix         = 32'(width) * 32'(height);
  assign total_blocks = (mode == MODE_420) ? 16'((npix * 6) >> 8) : 16'(npix >> 5);

  // ---------------------------------------------------------------- front end
  logic       lb_v;
  logic [7:0] lb_pix;
  logic       lb_err, dct_err, zz_err;

  line_buffer #(.MAX_WIDTH(MAX_WIDTH)) u_lb (
    .clk, .rst_n, .start, .mode,
    .width      (width[$clog2(MAX_WIDTH):0]),
    .in_valid   (isp_valid), .in_data(isp_data),
    .out_valid  (lb_v),      .out_pixel(lb_pix),
    .err_overrun(lb_err)
  );

  logic                     dct_v;
  logic signed [COEF_W-1:0] dct_c;
  dct_2d u_dct (
    .clk, .rst_n,
    .in_valid (lb_v),  .in_pixel(lb_pix),
    .out_valid(dct_v), .out_coef(dct_c),
    .err_overrun(dct_err)
  );

  logic              zz_v;
  logic [COEF_W-1:0] zz_c;
  zigzag_scan #(.W(COEF_W)) u_zz (
    .clk, .rst_n,
    .in_valid (dct_v), .in_data(dct_c),
    .out_valid(zz_v),  .out_data(zz_c),
    .err_overrun(zz_err)
  );

  // ---------------------------------------------------------------- quantiser
  logic       qa_chroma, qb_chroma;
  logic [5:0] qa_addr, qb_addr;
  logic [7:0] qa_data, qb_data;

  quant_table u_qt (
    .clk, .rst_n,
    .wr_en(qt_we), .wr_chroma(qt_chroma), .wr_addr(qt_addr), .wr_data(qt_data),
    .a_chroma(qa_chroma), .a_addr(qa_addr), .a_data(qa_data),
    .b_chroma(qb_chroma), .b_addr(qb_addr), .b_data(qb_data)
  );

  logic                     q_v;
  logic signed [COEF_W-1:0] q_c;
  quantizer u_q (
    .clk, .rst_n, .start, .mode,
    .in_valid(zz_v), .in_coef(signed'(zz_c)),
    .qt_chroma(qa_chroma), .qt_addr(qa_addr), .qt_data(qa_data),
    .out_valid(q_v), .out_coef(q_c)
  );

  // ---------------------------------------------------------------- entropy coder
  logic     sym_v;
  rlc_sym_t sym;
  rlc u_rlc (
    .clk, .rst_n, .start, .mode, .total_blocks,
    .in_valid(q_v), .in_coef(q_c),
    .out_valid(sym_v), .out_sym(sym)
  );

  rlc_sym_t fifo_head;
  logic     fifo_empty, fifo_pop;
  logic     fifo_full_unused;
  logic [$clog2(FIFO_DEPTH):0] fifo_level_unused;

  sync_fifo #(.T(rlc_sym_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start),
    .push(sym_v), .din(sym),
    .pop(fifo_pop), .dout(fifo_head),
    .empty(fifo_empty), .full(fifo_full_unused), .level(fifo_level_unused),
    .max_level(fifo_max_level), .overflow(fifo_overflow)
  );

  logic huf_v, huf_rdy;
  vlc_t vlc;
  huffman_encoder u_huf (
    .clk, .rst_n,
    .in_valid(!fifo_empty), .in_sym(fifo_head), .in_ready(fifo_pop),
    .out_valid(huf_v), .out_vlc(vlc), .out_ready(huf_rdy)
  );

  // ---------------------------------------------------------------- packer
  logic [9:0] hdr_idx;
  logic [7:0] hdr_byte;
  jfif_header u_hdr (
    .idx(hdr_idx), .width, .height, .mode,
    .qt_chroma(qb_chroma), .qt_addr(qb_addr), .qt_data(qb_data),
    .hbyte(hdr_byte)
  );

  packer u_pack (
    .clk, .rst_n, .start, .busy, .hdr_sent, .done,
    .hdr_idx, .hdr_byte,
    .in_valid(huf_v), .in_vlc(vlc), .in_ready(huf_rdy),
    .out_valid, .out_data, .out_nbytes, .out_last
  );

  assign err_overrun = lb_err | dct_err | zz_err;

endmodule
