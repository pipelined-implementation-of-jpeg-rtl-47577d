// tb_huffman_table: checks the Huffman code ROMs.
//
// Part 1 compares entries with the code lengths and bit patterns printed in
// the typical tables of the JPEG standard (Annex K.3): all 12 DC categories
// of both tables, and EOB, ZRL and a set of run/size symbols of both AC
// tables. Part 2 checks the whole tables: exactly 12 DC and 162 AC symbols
// have a code, lengths are 1..16, no code is all ones, no code is a prefix
// of another, and symbols without a code (e.g. sizes 11..15 of an AC symbol)
// return length 0. The ROM is combinational, so there is no timing to check.
module tb_huffman_table;
  import jpeg_pkg::*;
  logic ac, chroma;
  logic [7:0] sym;
  hcode_t code;

  huffman_table dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic get(bit a, bit c, int s, output hcode_t h);
    ac = a; chroma = c; sym = 8'(s);
    #1;
    h = code;
  endtask

  task automatic expect_code(bit a, bit c, int s, string bits);
    hcode_t h;
    int v;
    get(a, c, s, h);
    v = 0;
    for (int i = 0; i < bits.len(); i++) v = (v << 1) | (bits[i] == "1");
    checks++;
    if (h.len != 5'(bits.len()) || h.code != 16'(v)) begin
      failures++;
      $display("table ac=%0d chroma=%0d symbol %02h: got len %0d code %0h, expected %s",
               a, c, s, h.len, h.code, bits);
    end
  endtask

  string DCY [12] = '{"00", "010", "011", "100", "101", "110", "1110", "11110", "111110",
                      "1111110", "11111110", "111111110"};
  string DCC [12] = '{"00", "01", "10", "110", "1110", "11110", "111110", "1111110",
                      "11111110", "111111110", "1111111110", "11111111110"};

  initial begin
    for (int s = 0; s < 12; s++) begin
      expect_code(0, 0, s, DCY[s]);
      expect_code(0, 1, s, DCC[s]);
    end
    // luminance AC
    expect_code(1, 0, 8'h00, "1010");
    expect_code(1, 0, 8'h01, "00");
    expect_code(1, 0, 8'h02, "01");
    expect_code(1, 0, 8'h03, "100");
    expect_code(1, 0, 8'h04, "1011");
    expect_code(1, 0, 8'h05, "11010");
    expect_code(1, 0, 8'h06, "1111000");
    expect_code(1, 0, 8'h11, "1100");
    expect_code(1, 0, 8'h12, "11011");
    expect_code(1, 0, 8'h21, "11100");
    expect_code(1, 0, 8'h31, "111010");
    expect_code(1, 0, 8'hF0, "11111111001");
    expect_code(1, 0, 8'hFA, "1111111111111110");
    // chrominance AC
    expect_code(1, 1, 8'h00, "00");
    expect_code(1, 1, 8'h01, "01");
    expect_code(1, 1, 8'h02, "100");
    expect_code(1, 1, 8'h03, "1010");
    expect_code(1, 1, 8'h11, "1011");
    expect_code(1, 1, 8'hF0, "1111111010");
    expect_code(1, 1, 8'hFA, "1111111111111110");

    // whole-table properties
    for (int a = 0; a < 2; a++)
      for (int c = 0; c < 2; c++) begin
        hcode_t t[256];
        int n, bad_len, ones, prefix, missing_ok;
        n = 0; bad_len = 0; ones = 0; prefix = 0; missing_ok = 1;
        for (int s = 0; s < 256; s++) begin
          get(a[0], c[0], s, t[s]);
          if (t[s].len != 0) begin
            n++;
            if (t[s].len > 16) bad_len++;
            if (t[s].code == 16'((1 << t[s].len) - 1)) ones++;
          end
        end
        for (int s = 0; s < 256; s++)
          for (int r = 0; r < 256; r++)
            if (s != r && t[s].len != 0 && t[r].len != 0 && t[s].len <= t[r].len &&
                (t[r].code >> (t[r].len - t[s].len)) == t[s].code) prefix++;
        if (a == 1)
          for (int r = 0; r < 16; r++)
            for (int s = 11; s < 16; s++) if (t[r * 16 + s].len != 0) missing_ok = 0;
        checks += 5;
        if (n != ((a == 1) ? 162 : 12)) begin failures++; $display("table %0d/%0d: %0d codes", a, c, n); end
        if (bad_len != 0) begin failures++; $display("table %0d/%0d: code longer than 16", a, c); end
        if (ones != 0)    begin failures++; $display("table %0d/%0d: all-ones code", a, c); end
        if (prefix != 0)  begin failures++; $display("table %0d/%0d: %0d prefix clashes", a, c, prefix); end
        if (!missing_ok)  begin failures++; $display("table %0d/%0d: code for size > 10", a, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
