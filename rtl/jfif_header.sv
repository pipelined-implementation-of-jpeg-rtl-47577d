// jfif_header: byte generator for the JFIF header of one frame.
//
// Returns the header byte at position idx (0 .. HDR_BYTES-1 = 606):
//   0..1     SOI   FF D8
//   2..19    APP0  JFIF 1.01, no units, 1:1 density, no thumbnail
//   20..153  DQT   table 0 (luminance) and table 1 (chrominance), 8-bit,
//                  zig-zag order, read live from quant_table
//   154..172 SOF0  baseline, 8-bit, height, width, 3 components:
//                  Y (H=2,V=1 for 4:2:2 / H=2,V=2 for 4:2:0, table 0),
//                  Cb and Cr (H=1,V=1, table 1)
//   173..592 DHT   DC0, AC0, DC1, AC1 from the BITS/HUFFVAL lists
//   593..606 SOS   3 components (Y: tables 0/0, Cb, Cr: 1/1), Ss=0 Se=63 A=0
// Restart intervals and DNL are not used, so no DRI segment is written.
//
// The document requires the packer to put a JFIF-compliant header in front
// of the compressed data and names the frame structure (SOI, frame header,
// scan header, ECS, EOI); the segment list and order are this design's
// choices, their contents are fixed by the JPEG and JFIF formats.
//
// Interface: idx, width, height, mode; a read port (qt_chroma, qt_addr,
// qt_data) into quant_table; byte. Purely combinational.
module jfif_header
  import jpeg_pkg::*;
(
  input  logic [9:0]  idx,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  samp_mode_e  mode,
  output logic        qt_chroma,
  output logic [5:0]  qt_addr,
  input  logic [7:0]  qt_data,
  output logic [7:0]  hbyte
);

  localparam logic [7:0] APP0 [18] = '{
    8'hFF, 8'hE0, 8'h00, 8'h10, 8'h4A, 8'h46, 8'h49, 8'h46, 8'h00,
    8'h01, 8'h01, 8'h00, 8'h00, 8'h01, 8'h00, 8'h01, 8'h00, 8'h00};
  localparam logic [7:0] SOS [14] = '{
    8'hFF, 8'hDA, 8'h00, 8'h0C, 8'h03, 8'h01, 8'h00,
    8'h02, 8'h11, 8'h03, 8'h11, 8'h00, 8'h3F, 8'h00};

  // One DHT table body: class/id, 16 BITS, then HUFFVAL.
  function automatic logic [7:0] dht_byte(logic ac, logic chroma, int unsigned i);
    if (i == 0)  return {3'b000, ac, 3'b000, chroma};
    if (i <= 16) return bits_of(ac, chroma, i - 1);
    return val_of(ac, chroma, i - 17);
  endfunction

  localparam int unsigned DC_LEN = 1 + 16 + 12;
  localparam int unsigned AC_LEN = 1 + 16 + 162;

  // DQT body: bytes 25..88 are table 0, bytes 90..153 table 1
  assign qt_chroma = (idx > 10'd89);
  assign qt_addr   = 6'((idx > 10'd89) ? idx - 10'd90 : idx - 10'd25);

  // byte index as an integer, and the offset inside the DHT segment
  int unsigned i, j;
  assign i = int'(idx);
  assign j = int'(idx) - 173;

  always_comb begin
    hbyte     = 8'h00;
    if (i < 2) begin
      hbyte = (i == 0) ? 8'hFF : 8'hD8;
    end else if (i < 20) begin
      hbyte = APP0[i - 2];
    end else if (i < 154) begin
      unique case (i)
        20: hbyte = 8'hFF;
        21: hbyte = 8'hDB;
        22: hbyte = 8'h00;
        23: hbyte = 8'h84;            // length 132
        24: hbyte = 8'h00;            // Pq=0, Tq=0
        89: hbyte = 8'h01;            // Pq=0, Tq=1
        default: hbyte = qt_data;
      endcase
    end else if (i < 173) begin
      unique case (i - 154)
        0:  hbyte = 8'hFF;
        1:  hbyte = 8'hC0;
        2:  hbyte = 8'h00;
        3:  hbyte = 8'h11;            // length 17
        4:  hbyte = 8'h08;            // precision
        5:  hbyte = height[15:8];
        6:  hbyte = height[7:0];
        7:  hbyte = width[15:8];
        8:  hbyte = width[7:0];
        9:  hbyte = 8'h03;
        10: hbyte = 8'h01;
        11: hbyte = (mode == MODE_420) ? 8'h22 : 8'h21;
        12: hbyte = 8'h00;
        13: hbyte = 8'h02;
        14: hbyte = 8'h11;
        15: hbyte = 8'h01;
        16: hbyte = 8'h03;
        17: hbyte = 8'h11;
        default: hbyte = 8'h01;
      endcase
    end else if (i < 593) begin
      if (j < 4)                              hbyte = (j == 0) ? 8'hFF : (j == 1) ? 8'hC4 :
                                                      (j == 2) ? 8'h01 : 8'hA2;   // length 418
      else if (j < 4 + DC_LEN)                hbyte = dht_byte(1'b0, 1'b0, j - 4);
      else if (j < 4 + DC_LEN + AC_LEN)       hbyte = dht_byte(1'b1, 1'b0, j - 4 - DC_LEN);
      else if (j < 4 + 2 * DC_LEN + AC_LEN)   hbyte = dht_byte(1'b0, 1'b1, j - 4 - DC_LEN - AC_LEN);
      else                                    hbyte = dht_byte(1'b1, 1'b1, j - 4 - 2 * DC_LEN - AC_LEN);
    end else if (i < int'(HDR_BYTES)) begin
      hbyte = SOS[i - 593];
    end
  end

endmodule
