// line_buffer: turns the raster sample stream of the image signal processor
// into 8x8 blocks in interleaved MCU order.
//
// Input is YCbCr 4:2:2, one 8-bit sample per clock, each line ordered
// Cb0 Y0 Cr0 Y1 Cb1 Y2 Cr1 Y3 ... (2*width samples per line). Samples are
// sorted into separate Y, Cb and Cr memories. The memories hold two strips
// (ping-pong banks); a strip is one MCU row: 8 lines in 4:2:2 mode, 16 lines
// in 4:2:0 mode. In 4:2:0 mode only the chroma of even lines is kept, which
// halves the chroma vertically. As soon as a strip is complete it is read
// out, one sample per clock, MCU by MCU, and within an MCU block by block in
// the order of the document's interleaving figure: Y0 Y1 Cb Cr (4:2:2) or
// Y0 Y1 Y2 Y3 Cb Cr (4:2:0, Y blocks top-left, top-right, bottom-left,
// bottom-right), each block row by row. The next strip is written into the
// other bank meanwhile.
//
// The document gives the purpose (reorder the ISP stream and separate the
// components) and the MCU interleaving; the 8-bit sample order, the two
// banks and the vertical chroma decimation for 4:2:0 are this design's
// choices. Image width must be a multiple of 16 and at most MAX_WIDTH; the
// number of lines must be a multiple of the strip height.
//
// Interface: start (clears the counters at frame start), mode, width (pixels),
// in_valid/in_data; out_valid/out_pixel. err_overrun is set if a strip has to
// be written into a bank that has not been read out yet.
// Timing: the first sample of a strip leaves 2 clocks after the strip's last
// sample entered; a strip is then read in consecutive clocks.
module line_buffer
  import jpeg_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  samp_mode_e                   mode,
  input  logic [$clog2(MAX_WIDTH):0]   width,
  input  logic                         in_valid,
  input  logic [7:0]                   in_data,
  output logic                         out_valid,
  output logic [7:0]                   out_pixel,
  output logic                         err_overrun
);

  localparam int unsigned XW = $clog2(MAX_WIDTH);   // pixel index bits
  localparam int unsigned MW = XW - 4;              // MCU index bits

  logic [7:0] ymem [2 * 16 * MAX_WIDTH];
  logic [7:0] cbmem[2 * 8 * (MAX_WIDTH / 2)];
  logic [7:0] crmem[2 * 8 * (MAX_WIDTH / 2)];

  logic [3:0] strip_last;   // index of the last line of a strip
  assign strip_last = (mode == MODE_420) ? 4'd15 : 4'd7;

  // ---------------------------------------------------------------- write side
  logic [XW:0]  ws;         // sample index in the line
  logic [3:0]   wl;         // line in the strip
  logic         wb, rb;
  logic [1:0]   full;

  logic [XW-1:0] wx;
  logic [XW-2:0] wcx;
  logic [2:0]    wcl;
  assign wx  = ws[XW:1];
  assign wcx = ws[XW:2];
  assign wcl = (mode == MODE_420) ? wl[3:1] : wl[2:0];

  // ---------------------------------------------------------------- read side
  logic         rd_act;
  logic [MW-1:0] rm;        // MCU in the strip
  logic [2:0]   rblk;       // block in the MCU
  logic [2:0]   rr, rc;     // row and column in the block
  logic [MW-1:0] last_mcu;
  assign last_mcu = MW'((width >> 4) - 1'b1);

  comp_e         rcomp;
  logic [XW-1:0] rx;
  logic [3:0]    rl;
  logic [XW-2:0] rcx;
  always_comb begin
    rcomp = comp_of_block(mode, rblk);
    rx    = {rm, rblk[0], rc};
    rl    = {rblk[1], rr};
    rcx   = {rm, rc};
  end

  logic last_rd;
  assign last_rd = (rc == 3'd7) && (rr == 3'd7) &&
                   (rblk == 3'(mcu_blocks(mode) - 1)) && (rm == last_mcu);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0; wl <= '0; wb <= 1'b0; rb <= 1'b0; full <= '0;
      rd_act <= 1'b0; rm <= '0; rblk <= '0; rr <= '0; rc <= '0;
      out_valid <= 1'b0; out_pixel <= '0; err_overrun <= 1'b0;
    end else if (start) begin
      ws <= '0; wl <= '0; wb <= 1'b0; rb <= 1'b0; full <= '0;
      rd_act <= 1'b0; rm <= '0; rblk <= '0; rr <= '0; rc <= '0;
      out_valid <= 1'b0; err_overrun <= 1'b0;
    end else begin
      logic [1:0] full_n;
      full_n = full;
      // write: sort the sample by its position in the Cb Y Cr Y pattern
      if (in_valid) begin
        if (full[wb]) err_overrun <= 1'b1;
        unique case (ws[1:0])
          2'd0: if (mode == MODE_422 || !wl[0]) cbmem[{wb, wcl, wcx}] <= in_data;
          2'd2: if (mode == MODE_422 || !wl[0]) crmem[{wb, wcl, wcx}] <= in_data;
          default: ymem[{wb, wl, wx}] <= in_data;
        endcase
        if (ws == (XW+1)'(2 * width - 1)) begin
          ws <= '0;
          if (wl == strip_last) begin
            wl <= '0;
            full_n[wb] = 1'b1;
            wb <= ~wb;
          end else begin
            wl <= wl + 4'd1;
          end
        end else begin
          ws <= ws + 1'b1;
        end
      end
      // read: MCU order
      out_valid <= 1'b0;
      if (rd_act) begin
        out_valid <= 1'b1;
        unique case (rcomp)
          COMP_Y:  out_pixel <= ymem[{rb, rl, rx}];
          COMP_CB: out_pixel <= cbmem[{rb, rr, rcx}];
          default: out_pixel <= crmem[{rb, rr, rcx}];
        endcase
        rc <= rc + 3'd1;
        if (rc == 3'd7) begin
          rr <= rr + 3'd1;
          if (rr == 3'd7) begin
            if (rblk == 3'(mcu_blocks(mode) - 1)) begin
              rblk <= '0;
              rm   <= (rm == last_mcu) ? '0 : rm + 1'b1;
            end else begin
              rblk <= rblk + 3'd1;
            end
          end
        end
        if (last_rd) begin
          full_n[rb] = 1'b0;
          rb        <= ~rb;
          rd_act    <= full_n[~rb];
        end
      end else if (full_n[rb]) begin
        rd_act <= 1'b1;
      end
      full <= full_n;
    end
  end

endmodule
