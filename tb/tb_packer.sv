// tb_packer: checks header insertion, bit packing, 0xFF stuffing, padding,
// EOI and the 32-bit word output of the packer.
//
// The header source is a model (byte i = (37*i) ^ 0x5A, which contains 0xFF
// bytes that must NOT be stuffed). Each frame then sends random code words
// of 1..27 bits with random gaps; a third of them are all ones so that many
// 0xFF data bytes appear. The last word carries eof. The model concatenates
// the code bits MSB first, cuts them into bytes, inserts 0x00 after every
// 0xFF, pads the last byte with 1s (stuffing it too if it becomes 0xFF) and
// appends FF D9. The received words are unpacked big-endian (out_nbytes
// valid bytes from the top on the last word) and compared byte by byte.
// Frames of different lengths are sent until every final word size (1..4
// bytes) has been seen. Timing checks: hdr_sent rises exactly 607 clocks
// after start (one header byte per clock), full words leave at most one per
// 4 clocks, done pulses once per frame in the clock of the last word, and no
// code word is accepted after eof.
module tb_packer;
  import jpeg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic busy, hdr_sent, done;
  logic [9:0] hdr_idx;
  logic [7:0] hdr_byte;
  logic in_valid = 0;
  vlc_t in_vlc = '0;
  logic in_ready;
  logic out_valid;
  logic [31:0] out_data;
  logic [2:0] out_nbytes;
  logic out_last;

  packer dut (.*);
  always #5 clk = ~clk;
  assign hdr_byte = 8'((37 * hdr_idx) ^ 8'h5A);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  byte unsigned got[$];
  int last_word_cyc = -100, close_words = 0, n_done = 0, last_cyc = -1, done_cyc = -1;
  int sizes_seen[5] = '{0, 0, 0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      if (!out_last && cyc - last_word_cyc < 4) close_words++;
      last_word_cyc = cyc;
      for (int i = 0; i < int'(out_nbytes); i++) got.push_back(out_data[31 - 8 * i -: 8]);
      if (out_last) begin last_cyc = cyc; sizes_seen[out_nbytes]++; end
    end
    if (done) begin n_done++; done_cyc = cyc; end
  end

  int accepted_after_eof = 0;
  bit eof_sent = 0;

  task automatic frame(int nwords, int last_len);
    byte unsigned expb[$];
    bit bits[$];
    int t0, n_stuffed;
    vlc_t words[$];
    for (int i = 0; i < 607; i++) expb.push_back(8'((37 * i) ^ 8'h5A));
    for (int k = 0; k < nwords; k++) begin
      vlc_t v;
      int l;
      l = (k == nwords - 1) ? last_len : $urandom_range(1, 27);
      v = '0;
      v.len = 5'(l);
      v.bits = ($urandom_range(2) == 0) ? CODE_W'((1 << l) - 1) : CODE_W'($urandom) & CODE_W'((1 << l) - 1);
      v.eof = (k == nwords - 1);
      words.push_back(v);
      for (int i = l - 1; i >= 0; i--) bits.push_back(v.bits[i]);
    end
    while (bits.size() % 8 != 0) bits.push_back(1'b1);
    n_stuffed = 0;
    for (int i = 0; i < bits.size(); i += 8) begin
      byte unsigned x;
      x = 0;
      for (int j = 0; j < 8; j++) x = (x << 1) | bits[i + j];
      expb.push_back(x);
      if (x == 8'hFF) begin expb.push_back(8'h00); n_stuffed++; end
    end
    expb.push_back(8'hFF); expb.push_back(8'hD9);

    got.delete(); eof_sent = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    while (!hdr_sent) @(negedge clk);
    chk(cyc - t0 == 607, $sformatf("header took %0d clocks", cyc - t0));
    foreach (words[k]) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_vlc = words[k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0; eof_sent = 1;
    // keep offering a word after eof: it must not be taken
    in_valid = 1; in_vlc = '{len: 5'd8, bits: 27'hAA, eof: 1'b0};
    while (!done) @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    chk(got.size() == expb.size(), $sformatf("frame of %0d words: %0d bytes, expected %0d",
                                             nwords, got.size(), expb.size()));
    for (int i = 0; i < got.size() && i < expb.size(); i++)
      chk(got[i] == expb[i], $sformatf("byte %0d: got %02h expected %02h", i, got[i], expb[i]));
    chk(done_cyc == last_cyc, "done with the last word");
    chk(!busy, "idle after the frame");
    $display("frame: %0d code words, %0d bytes, %0d stuffed, last word %0d bytes",
             nwords, got.size(), n_stuffed, expb.size() % 4 == 0 ? 4 : expb.size() % 4);
  endtask

  always @(posedge clk) if (eof_sent && in_valid && in_ready) accepted_after_eof++;

  int nframes;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(1000, 13);
    frame(2, 5);
    nframes = 2;
    while (nframes < 20 && (sizes_seen[1] == 0 || sizes_seen[2] == 0 ||
                            sizes_seen[3] == 0 || sizes_seen[4] == 0)) begin
      frame($urandom_range(1, 400), $urandom_range(1, 27));
      nframes++;
    end
    chk(n_done == nframes, "one done pulse per frame");
    chk(close_words == 0, "at most one word per 4 clocks");
    chk(accepted_after_eof == 0, "nothing accepted after eof");
    for (int s = 1; s <= 4; s++) chk(sizes_seen[s] > 0, $sformatf("final word of %0d bytes seen", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
