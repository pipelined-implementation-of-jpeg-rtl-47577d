// tb_huffman_encoder: checks code-word generation, ZRL expansion and the
// valid/ready handshake of the Huffman encoder.
//
// Random symbols are drawn from DC categories 0..11 and a set of AC
// run/size pairs whose codes are typed below from the typical tables of the
// JPEG standard (Annex K.3), for both luminance and chrominance; AC symbols
// get 0..3 pending ZRLs and random amplitude bits, some symbols carry eof.
// The model expects, per symbol, one ZRL code (11111111001 luminance,
// 1111111010 chrominance) per pending ZRL and then {code, amplitude bits}
// with length code+size and eof only on that last word. The source offers
// symbols with random gaps and the sink stalls at random (out_ready low).
// Checks: every accepted word equals the model, the source is popped exactly
// once per symbol and only with its last word, and the encoder produces one
// word per clock when neither side stalls.
module tb_huffman_encoder;
  import jpeg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  rlc_sym_t in_sym;
  logic in_ready;
  logic out_valid;
  vlc_t out_vlc;
  logic out_ready = 0;

  huffman_encoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string DCY [12] = '{"00", "010", "011", "100", "101", "110", "1110", "11110", "111110",
                      "1111110", "11111110", "111111110"};
  string DCC [12] = '{"00", "01", "10", "110", "1110", "11110", "111110", "1111110",
                      "11111110", "111111110", "1111111110", "11111111110"};
  int    ACY_S [12] = '{8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h11, 8'h12, 8'h21, 8'h31, 8'hFA};
  string ACY_C [12] = '{"1010", "00", "01", "100", "1011", "11010", "1111000", "1100", "11011",
                        "11100", "111010", "1111111111111110"};
  int    ACC_S [6]  = '{8'h00, 8'h01, 8'h02, 8'h03, 8'h11, 8'hFA};
  string ACC_C [6]  = '{"00", "01", "100", "1010", "1011", "1111111111111110"};

  typedef struct { int len; longint bits; bit eof; } word_t;
  word_t exp_q[$];
  rlc_sym_t src[$];

  function automatic word_t w_of(string s, int amp, int sz, bit eof);
    word_t w;
    w.bits = 0;
    for (int i = 0; i < s.len(); i++) w.bits = (w.bits << 1) | (s[i] == "1");
    w.bits = (w.bits << sz) | amp;
    w.len = s.len() + sz;
    w.eof = eof;
    return w;
  endfunction

  // source offers the head of src[] with random gaps, sink stalls at random;
  // both change at the falling edge and the handshake is evaluated just
  // before the rising edge that completes it
  int pops = 0, nwords = 0, busy_clocks = 0;
  always @(negedge clk) if (rst_n) begin
    if (src.size() > 0 && (in_valid || $urandom_range(3) != 0)) begin
      in_valid = 1; in_sym = src[0];
    end else in_valid = 0;
    out_ready = ($urandom_range(4) != 0);
    #2;
    if (in_valid && out_ready) busy_clocks++;
    if (out_valid && out_ready) begin
      word_t e;
      checks++;
      e = exp_q.pop_front();
      if (int'(out_vlc.len) != e.len || out_vlc.bits != CODE_W'(e.bits) || out_vlc.eof != e.eof) begin
        failures++;
        if (failures < 10) $display("word %0d: got len %0d bits %0h eof %0d, expected len %0d bits %0h eof %0d",
                                    nwords, out_vlc.len, out_vlc.bits, out_vlc.eof, e.len, e.bits, e.eof);
      end
      nwords++;
    end
    if (in_valid && in_ready) begin
      void'(src.pop_front());
      pops++;
    end
  end

  initial begin
    int nsym;
    nsym = 600;
    for (int k = 0; k < nsym; k++) begin
      rlc_sym_t s;
      int sz, amp;
      bit ch;
      s = '0;
      ch = $urandom_range(1);
      s.chroma = ch;
      s.eof = (k % 50 == 49);
      if ($urandom_range(3) == 0) begin
        sz = $urandom_range(11);
        amp = $urandom & ((1 << sz) - 1);
        s.is_dc = 1; s.size = 4'(sz); s.amp = AMP_W'(amp);
        exp_q.push_back(w_of(ch ? DCC[sz] : DCY[sz], amp, sz, s.eof));
      end else begin
        int i, code_s;
        string c;
        if (ch) begin i = $urandom_range(5);  code_s = ACC_S[i]; c = ACC_C[i]; end
        else    begin i = $urandom_range(11); code_s = ACY_S[i]; c = ACY_C[i]; end
        sz = code_s & 15;
        amp = $urandom & ((1 << sz) - 1);
        s.run = 4'(code_s >> 4); s.size = 4'(sz); s.amp = AMP_W'(amp);
        if (sz != 0) s.zrl = 2'($urandom_range(3));
        for (int z = 0; z < int'(s.zrl); z++)
          exp_q.push_back(w_of(ch ? "1111111010" : "11111111001", 0, 0, 0));
        exp_q.push_back(w_of(c, amp, sz, s.eof));
      end
      src.push_back(s);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (src.size() == 0);
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    $display("symbols %0d, words %0d, handshake clocks %0d", pops, nwords, busy_clocks);
    checks += 3;
    if (pops != nsym)      begin failures++; $display("pops %0d", pops); end
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    if (busy_clocks != nwords) begin failures++; $display("idle clocks while both sides ready"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
