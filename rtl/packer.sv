// packer: builds the output byte stream of a frame and delivers it as 32-bit
// words.
//
// On start it sends the HDR_BYTES header bytes supplied by jfif_header
// (driving hdr_idx). It then accepts variable-length code words (valid/ready)
// into a 64-bit bit buffer, MSB first, and takes one byte per clock out of
// the buffer whenever it holds 8 bits or more. Every 0xFF byte of entropy-
// coded data is followed by a stuffed 0x00 so that a decoder cannot mistake it
// for a marker. After the code word flagged eof, the remaining bits are padded
// with 1s to a byte boundary, and EOI (FF D9) closes the frame. Bytes are
// assembled big-endian into 32-bit words: the first byte of the stream is
// bits 31:24 of the first word. The last word carries last=1 and the number
// of valid bytes (1..4, from the top).
//
// Header insertion, 0xFF stuffing and the 32-bit aligned output follow the
// document; the one-byte-per-clock packing, the buffer size and the output
// format are this design's choices. A code word is accepted only while the
// bit buffer holds at most 32 bits, so it never overflows.
//
// Interface: start, busy, hdr_sent (header complete), done (one-clock pulse
// with the last word); hdr_idx/hdr_byte; in_valid/in_vlc/in_ready;
// out_valid, out_data, out_nbytes, out_last. The output cannot be stalled.
// Timing: one output byte per clock at most, i.e. a word every 4 clocks.
module packer
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        hdr_sent,
  output logic        done,
  output logic [9:0]  hdr_idx,
  input  logic [7:0]  hdr_byte,
  input  logic        in_valid,
  input  vlc_t        in_vlc,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic [2:0]  out_nbytes,
  output logic        out_last
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DATA, S_EOI1, S_EOI2, S_FLUSH} state_e;
  state_e state;

  logic [63:0] bb;
  logic [6:0]  nb;
  logic        stuff, eof_seen;
  logic [31:0] word;
  logic [1:0]  bcnt;

  assign busy     = (state != S_IDLE);
  assign hdr_sent = busy && (state != S_HDR);
  assign in_ready = (state == S_DATA) && !eof_seen && (nb <= 7'd32);

  // byte taken from the bit buffer this clock
  logic [7:0] data_byte, pad_byte;
  assign data_byte = 8'(bb >> (nb - 7'd8));
  assign pad_byte  = 8'(bb << (7'd8 - nb)) | 8'((9'd1 << (7'd8 - nb)) - 9'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bb <= '0; nb <= '0; stuff <= 1'b0; eof_seen <= 1'b0;
      word <= '0; bcnt <= '0; hdr_idx <= '0; done <= 1'b0;
      out_valid <= 1'b0; out_data <= '0; out_nbytes <= '0; out_last <= 1'b0;
    end else begin
      logic       emit;
      logic [7:0] eb;
      logic [6:0] nb_n;
      logic [63:0] bb_n;
      emit = 1'b0; eb = '0;
      nb_n = nb; bb_n = bb;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_HDR; hdr_idx <= '0; bcnt <= '0;
          bb_n = '0; nb_n = '0; stuff <= 1'b0; eof_seen <= 1'b0;
        end
        S_HDR: begin
          emit = 1'b1; eb = hdr_byte;
          hdr_idx <= hdr_idx + 10'd1;
          if (hdr_idx == 10'(HDR_BYTES - 1)) state <= S_DATA;
        end
        S_DATA: begin
          if (stuff) begin
            emit = 1'b1; eb = 8'h00; stuff <= 1'b0;
          end else if (nb >= 7'd8) begin
            emit = 1'b1; eb = data_byte; nb_n = nb - 7'd8;
            stuff <= (data_byte == 8'hFF);
          end else if (eof_seen && nb != 0) begin
            emit = 1'b1; eb = pad_byte; nb_n = '0;
            stuff <= (pad_byte == 8'hFF);
          end else if (eof_seen) begin
            state <= S_EOI1;
          end
          if (in_valid && in_ready) begin
            bb_n = (bb << in_vlc.len) | 64'(in_vlc.bits);
            nb_n = nb_n + 7'(in_vlc.len);
            if (in_vlc.eof) eof_seen <= 1'b1;
          end
        end
        S_EOI1: begin emit = 1'b1; eb = 8'hFF; state <= S_EOI2; end
        S_EOI2: begin
          emit = 1'b1; eb = 8'hD9;
          if (bcnt == 2'd3) begin
            out_last <= 1'b1; state <= S_IDLE; done <= 1'b1;
          end else begin
            state <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          out_valid  <= 1'b1;
          out_data   <= word;
          out_nbytes <= {1'b0, bcnt};
          out_last   <= 1'b1;
          bcnt       <= '0;
          state      <= S_IDLE;
          done       <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      bb <= bb_n;
      nb <= nb_n;

      // word assembly, big-endian
      if (emit) begin
        logic [31:0] w;
        w = word;
        w[8 * (3 - int'(bcnt)) +: 8] = eb;
        word <= w;
        bcnt <= bcnt + 2'd1;
        if (bcnt == 2'd3) begin
          out_valid  <= 1'b1;
          out_data   <= w;
          out_nbytes <= 3'd4;
        end
      end
    end
  end

endmodule
