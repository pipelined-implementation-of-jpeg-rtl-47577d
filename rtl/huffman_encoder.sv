// huffman_encoder: turns run-length symbols into variable-length code words.
//
// Reads rlc_sym_t entries from a FIFO head (valid/ready). For a symbol whose
// zrl field is n, it first emits n ZRL codes (AC symbol 0xF0), one per clock,
// and then the symbol's own code: the DC code for its size category, or the
// AC code for (run, size); EOB is AC symbol 0x00. The amplitude bits (size
// bits) are appended below the Huffman code, so each output word is
// {code, amplitude} right-aligned, at most 16 + 11 = 27 bits. With the
// standard tables the longest word is 26 bits (a 16-bit AC code with 10
// amplitude bits), so out_vlc.bits[26] stays 0 after synthesis; the width is
// kept for the general case. The entry is
// popped together with its last code word.
//
// The split of the entropy coder into RLC and Huffman encoder and the use of
// separate DC and AC tables follow the document; the ZRL expansion here and
// the valid/ready handshake are this design's choices.
//
// Interface: in_valid/in_sym/in_ready (pop), out_valid/out_vlc/out_ready.
// Timing: combinational from FIFO head to output; one code word per clock.
module huffman_encoder
  import jpeg_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  rlc_sym_t in_sym,
  output logic     in_ready,
  output logic     out_valid,
  output vlc_t     out_vlc,
  input  logic     out_ready
);

  logic [1:0] zdone;     // ZRL codes already sent for the head entry
  logic       send_zrl;
  assign send_zrl = (zdone != in_sym.zrl);

  logic [7:0] sym;
  always_comb begin
    if (send_zrl)          sym = 8'hF0;
    else if (in_sym.is_dc) sym = {4'd0, in_sym.size};
    else                   sym = {in_sym.run, in_sym.size};
  end

  hcode_t hc;
  huffman_table u_tab (
    .ac    (send_zrl || !in_sym.is_dc),
    .chroma(in_sym.chroma),
    .sym   (sym),
    .code  (hc)
  );

  always_comb begin
    logic [CODE_W-1:0] c;
    logic [3:0]        amp_len;
    amp_len       = send_zrl ? 4'd0 : in_sym.size;
    c             = CODE_W'(hc.code);
    c             = (c << amp_len) | CODE_W'(in_sym.amp & AMP_W'((1 << amp_len) - 1));
    out_vlc.len   = hc.len + 5'(amp_len);
    out_vlc.bits  = c;
    out_vlc.eof   = in_sym.eof && !send_zrl;
  end

  assign out_valid = in_valid;
  assign in_ready  = out_ready && !send_zrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       zdone <= '0;
    else if (in_valid && out_ready)   zdone <= send_zrl ? zdone + 2'd1 : 2'd0;
  end

endmodule
