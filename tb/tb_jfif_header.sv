// tb_jfif_header: checks the header byte generator.
//
// The testbench serves the table read port with a model table (entry i of
// table t is 1 + 64*t + i, so every byte position is distinct) and reads all
// 607 header bytes for several sizes and both sampling modes. It then walks
// the marker structure: SOI, APP0 with the JFIF identifier and version 1.01,
// DQT with both tables equal to the model, SOF0 with precision 8, the given
// height and width, 3 components with sampling factors 2x1 (4:2:2) or 2x2
// (4:2:0) for Y and 1x1 for Cb and Cr, DHT with four tables whose BITS sum to
// their value counts and whose DC luminance BITS and the first AC luminance
// values are those of the JPEG standard's typical tables, and SOS with three
// components and spectral range 0..63. Every segment length must match the
// distance to the next marker, and SOS must end exactly at byte 607. The
// generator is combinational, so there is no timing to check.
module tb_jfif_header;
  import jpeg_pkg::*;
  logic [9:0]  idx;
  logic [15:0] width, height;
  samp_mode_e  mode;
  logic        qt_chroma;
  logic [5:0]  qt_addr;
  logic [7:0]  qt_data;
  logic [7:0]  hbyte;

  jfif_header dut (.*);
  assign qt_data = 8'(1 + 64 * qt_chroma + qt_addr);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  localparam int DC_BITS [16] = '{0, 1, 5, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0};
  localparam int AC_FIRST [8] = '{8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12};

  task automatic run(int w, int h, samp_mode_e m);
    byte unsigned b[607];
    int p, len, seen;
    width = 16'(w); height = 16'(h); mode = m;
    for (int i = 0; i < 607; i++) begin
      idx = 10'(i);
      #1;
      b[i] = hbyte;
    end
    chk(b[0] == 8'hFF && b[1] == 8'hD8, "SOI");
    p = 2; seen = 0;
    while (p < 607) begin
      chk(b[p] == 8'hFF, $sformatf("marker at %0d", p));
      len = (b[p+2] << 8) | b[p+3];
      case (b[p+1])
        8'hE0: begin
          chk(len == 16 && b[p+4] == "J" && b[p+5] == "F" && b[p+6] == "I" && b[p+7] == "F" &&
              b[p+8] == 0 && b[p+9] == 1 && b[p+10] == 1, "APP0 JFIF 1.01");
          seen |= 1;
        end
        8'hDB: begin
          chk(len == 2 + 2 * 65, "DQT length");
          for (int t = 0; t < 2; t++) begin
            chk(b[p+4+65*t] == t, "DQT Pq/Tq");
            for (int i = 0; i < 64; i++)
              chk(b[p+5+65*t+i] == 1 + 64 * t + i, $sformatf("DQT table %0d entry %0d", t, i));
          end
          seen |= 2;
        end
        8'hC0: begin
          chk(len == 17 && b[p+4] == 8, "SOF0 length and precision");
          chk(((b[p+5] << 8) | b[p+6]) == h, "SOF0 height");
          chk(((b[p+7] << 8) | b[p+8]) == w, "SOF0 width");
          chk(b[p+9] == 3, "SOF0 components");
          chk(b[p+10] == 1 && b[p+11] == ((m == MODE_420) ? 8'h22 : 8'h21) && b[p+12] == 0,
              "SOF0 Y sampling and table");
          chk(b[p+13] == 2 && b[p+14] == 8'h11 && b[p+15] == 1, "SOF0 Cb");
          chk(b[p+16] == 3 && b[p+17] == 8'h11 && b[p+18] == 1, "SOF0 Cr");
          seen |= 4;
        end
        8'hC4: begin
          int k, nt;
          k = p + 4; nt = 0;
          while (k < p + 2 + len) begin
            int n, tc, th;
            tc = b[k] >> 4; th = b[k] & 15;
            n = 0;
            for (int i = 0; i < 16; i++) n += b[k+1+i];
            chk(n == ((tc == 1) ? 162 : 12), $sformatf("DHT %0d/%0d value count %0d", tc, th, n));
            if (tc == 0 && th == 0)
              for (int i = 0; i < 16; i++) chk(b[k+1+i] == DC_BITS[i], "DHT DC luminance BITS");
            if (tc == 1 && th == 0)
              for (int i = 0; i < 8; i++) chk(b[k+17+i] == AC_FIRST[i], "DHT AC luminance values");
            k += 17 + n; nt++;
          end
          chk(k == p + 2 + len && nt == 4, "DHT holds four tables");
          seen |= 8;
        end
        8'hDA: begin
          chk(len == 12 && b[p+4] == 3, "SOS length and components");
          chk(b[p+5] == 1 && b[p+6] == 8'h00 && b[p+7] == 2 && b[p+8] == 8'h11 &&
              b[p+9] == 3 && b[p+10] == 8'h11, "SOS table selectors");
          chk(b[p+11] == 0 && b[p+12] == 63 && b[p+13] == 0, "SOS spectral selection");
          chk(p + 2 + len == 607, "SOS ends the header");
          seen |= 16;
        end
        default: chk(0, $sformatf("unexpected marker %02h", b[p+1]));
      endcase
      p += 2 + len;
    end
    chk(seen == 31 && p == 607, "all segments present");
  endtask

  initial begin
    run(320, 240, MODE_422);
    run(1024, 768, MODE_420);
    run(16'h1230, 16'h0AB0, MODE_422);
    run(16, 16, MODE_420);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
