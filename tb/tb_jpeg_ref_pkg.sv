// tb_jpeg_ref_pkg: reference model and stream checker for the encoder tests.
//
// - Test images: test_y/test_cb/test_cr give a deterministic smooth pattern
//   with a pseudo-random texture, so that blocks have DC steps, long zero
//   runs and scattered non-zero high-frequency terms.
// - ref_block: quantised coefficients of one 8x8 block in zig-zag order,
//   computed with a floating-point DCT and round-to-nearest division.
// - jpeg_checker: a small baseline JPEG decoder. It parses SOI, APP0, DQT,
//   SOF0, DHT, SOS and EOI from the byte stream, rebuilds the Huffman codes
//   from the DHT segment alone, removes stuffed zero bytes, decodes every
//   block back to quantised coefficients and compares them with ref_block.
//   It counts the events the tests must see (ZRL, EOB, stuffed bytes, pad
//   bits) and mismatches: a coefficient off by one is tolerated (fixed-point
//   DCT against floating point), anything more is a failure.
package tb_jpeg_ref_pkg;

  // natural index at zig-zag position i (T.81 Figure A.6)
  localparam int ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  function automatic int hash(int x, int y, int s);
    int unsigned h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663 ^ 32'(s) * 32'd83492791;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return int'(h >> 24);   // 0..255
  endfunction

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // luminance at pixel (x,y); chroma at chroma column cx of line y
  function automatic int test_y(int x, int y, int seed);
    return clip(40 + ((x * 3 + y * 2) % 160) + ((hash(x, y, seed) % 48) - 24) +
                ((((x / 8) + (y / 8)) % 3 == 0) ? 30 : 0));
  endfunction
  function automatic int test_cb(int cx, int y, int seed);
    return clip(128 + ((cx * 5 - y * 3) % 90) - 45 + (hash(cx, y, seed + 1) % 16) - 8);
  endfunction
  function automatic int test_cr(int cx, int y, int seed);
    return clip(100 + ((cx + y) % 70) + (hash(cx, y, seed + 2) % 12));
  endfunction

  typedef int blk_t [64];

  // Reference quantised block (zig-zag order) from 64 pixels (row-major).
  function automatic blk_t ref_block(blk_t pix, blk_t qt_zz);
    blk_t  o;
    real   f, cu, cv, s;
    int    q;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        s = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            s += real'(pix[y*8+x] - 128) * $cos((2*x+1) * u * 3.14159265358979 / 16.0)
                                         * $cos((2*y+1) * v * 3.14159265358979 / 16.0);
        cu = (u == 0) ? 0.70710678118655 : 1.0;
        cv = (v == 0) ? 0.70710678118655 : 1.0;
        f  = 0.25 * cu * cv * s;
        for (int i = 0; i < 64; i++) if (ZZ[i] == v*8+u) q = qt_zz[i];
        for (int i = 0; i < 64; i++) if (ZZ[i] == v*8+u) begin
          real r;
          r = f / real'(q);
          o[i] = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
        end
      end
    return o;
  endfunction

  class jpeg_checker;
    byte unsigned bytes[$];
    int checks, failures;
    // parsed
    int qt[2][64];
    int width, height, hy, vy;
    int bits_t[4][16];      // [class*2+id]
    int vals_t[4][$];
    int ecs_start, ecs_end;
    // statistics
    int n_zrl, n_eob, n_stuff, n_pad_bits, n_blocks, n_off1, n_exact;
    // bit reader
    int bp; int bitpos; int cur;

    function new();
      checks = 0; failures = 0; n_zrl = 0; n_eob = 0; n_stuff = 0;
      n_pad_bits = 0; n_blocks = 0; n_off1 = 0; n_exact = 0;
    endfunction

    function void check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 20) $display("FAIL: %s", what);
      end
    endfunction

    function int u16(int p);
      return (int'(bytes[p]) << 8) | int'(bytes[p+1]);
    endfunction

    // Parse the marker structure; returns 1 when it ends with EOI.
    function bit parse();
      int p, len, m;
      check(bytes.size() > 4 && bytes[0] == 8'hFF && bytes[1] == 8'hD8, "SOI");
      p = 2;
      forever begin
        if (p + 1 >= bytes.size()) begin check(0, "stream ends before SOS"); return 0; end
        check(bytes[p] == 8'hFF, $sformatf("marker expected at %0d", p));
        m = bytes[p+1];
        len = u16(p + 2);
        case (m)
          8'hE0: check(bytes[p+4] == "J" && bytes[p+5] == "F" && bytes[p+6] == "I" &&
                       bytes[p+7] == "F" && bytes[p+8] == 0, "APP0 JFIF id");
          8'hDB: begin
            int k;
            k = p + 4;
            while (k < p + 2 + len) begin
              int id;
              id = bytes[k] & 15;
              check((bytes[k] >> 4) == 0, "DQT 8-bit");
              for (int i = 0; i < 64; i++) qt[id][i] = bytes[k+1+i];
              k += 65;
            end
          end
          8'hC0: begin
            check(bytes[p+4] == 8, "SOF0 precision");
            height = u16(p + 5);
            width  = u16(p + 7);
            check(bytes[p+9] == 3, "SOF0 3 components");
            hy = bytes[p+11] >> 4; vy = bytes[p+11] & 15;
            check(bytes[p+14] == 8'h11 && bytes[p+17] == 8'h11, "SOF0 chroma 1x1");
            check(bytes[p+12] == 0 && bytes[p+15] == 1 && bytes[p+18] == 1, "SOF0 table ids");
          end
          8'hC4: begin
            int k;
            k = p + 4;
            while (k < p + 2 + len) begin
              int t, n;
              t = ((bytes[k] >> 4) & 1) * 2 + (bytes[k] & 1);
              n = 0;
              for (int i = 0; i < 16; i++) begin bits_t[t][i] = bytes[k+1+i]; n += bits_t[t][i]; end
              vals_t[t].delete();
              for (int i = 0; i < n; i++) vals_t[t].push_back(int'(bytes[k+17+i]));
              k += 17 + n;
            end
          end
          8'hDA: begin
            check(bytes[p+4] == 3, "SOS 3 components");
            ecs_start = p + 2 + len;
            // entropy data runs to the next marker other than FF00
            ecs_end = ecs_start;
            while (ecs_end + 1 < bytes.size() &&
                   !(bytes[ecs_end] == 8'hFF && bytes[ecs_end+1] != 8'h00)) ecs_end++;
            check(ecs_end + 2 == bytes.size() && bytes[ecs_end+1] == 8'hD9,
                  "EOI closes the stream");
            return 1;
          end
          default: check(0, $sformatf("unexpected marker FF%02x", m));
        endcase
        p += 2 + len;
      end
    endfunction

    function int get_bit();
      int b;
      if (bitpos == 0) begin
        if (bp >= ecs_end) begin cur = 8'hFF; end
        else begin
          cur = bytes[bp];
          if (cur == 8'hFF) begin
            check(bytes[bp+1] == 8'h00, "stuffed zero after FF");
            n_stuff++;
            bp++;
          end
          bp++;
        end
        bitpos = 8;
      end
      bitpos--;
      b = (cur >> bitpos) & 1;
      return b;
    endfunction

    function int receive(int s);
      int v;
      v = 0;
      for (int i = 0; i < s; i++) v = (v << 1) | get_bit();
      return v;
    endfunction

    function int extend(int v, int s);
      if (s == 0) return 0;
      return (v < (1 << (s - 1))) ? v - (1 << s) + 1 : v;
    endfunction

    // canonical decode with the table as transmitted
    function int decode(int t);
      int code, first, idx;
      code = 0; first = 0; idx = 0;
      for (int l = 0; l < 16; l++) begin
        code = (code << 1) | get_bit();
        if (code - first < bits_t[t][l]) return vals_t[t][idx + code - first];
        idx   += bits_t[t][l];
        first  = (first + bits_t[t][l]) << 1;
      end
      check(0, "undecodable Huffman code");
      return 0;
    endfunction

    // Decode all blocks and compare with the reference blocks (zig-zag).
    function void decode_and_compare(blk_t refs[$], bit chroma_of[$]);
      int pred[3];
      pred = '{0, 0, 0};
      bp = ecs_start; bitpos = 0;
      for (int n = 0; n < refs.size(); n++) begin
        blk_t c;
        int comp, t, k, s, rs, bad;
        comp = chroma_of[n];
        foreach (c[i]) c[i] = 0;
        t = comp ? 1 : 0;
        s = decode(t);
        // DC predictor per component: Y, Cb, Cr alternate in the checker's order
        begin
          int pc;
          pc = (n % (hy * vy + 2) < hy * vy) ? 0 : (n % (hy * vy + 2) == hy * vy) ? 1 : 2;
          pred[pc] += extend(receive(s), s);
          c[0] = pred[pc];
        end
        k = 1;
        while (k < 64) begin
          rs = decode(2 + t);
          if ((rs & 15) == 0) begin
            if ((rs >> 4) == 15) begin n_zrl++; k += 16; end
            else begin n_eob++; k = 64; end
          end else begin
            k += rs >> 4;
            if (k > 63) check(0, "run past end of block");
            else c[k] = extend(receive(rs & 15), rs & 15);
            k++;
          end
        end
        if (n == refs.size() - 1) begin
          // what is left must be 1-bit padding up to the byte boundary
          n_pad_bits = bitpos;
          while (bitpos > 0) check(get_bit() == 1, "padding bits are 1");
          check(bp == ecs_end, "entropy data fully consumed");
        end
        bad = 0;
        for (int i = 0; i < 64; i++) begin
          int d;
          d = c[i] - refs[n][i];
          if (d == 0) n_exact++;
          else if (d == 1 || d == -1) n_off1++;
          else begin
            bad++;
            if (failures < 20)
              $display("block %0d zz %0d: got %0d expected %0d", n, i, c[i], refs[n][i]);
          end
        end
        check(bad == 0, $sformatf("block %0d coefficients", n));
        n_blocks++;
      end
    endfunction
  endclass

endpackage
