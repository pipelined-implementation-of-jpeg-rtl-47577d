// tb_jpeg_encoder_workloads: the larger frame sizes the encoder is specified
// for, at default parameters: VGA 640x480 and XGA 1024x768 in 4:2:2, and
// QVGA 320x240 in 4:2:0.
//
// Each frame streams in at one sample per clock with no blanking. The
// compressed file is decoded by tb_jpeg_ref_pkg::jpeg_checker and every block
// is compared with a floating-point reference (9,600 + 24,576 + 1,800
// blocks). Cycle checks per frame: the 164-clock pipeline latency from
// line-buffer output to quantiser output, and a frame time from the first
// input sample to the last output word between 2*W*H and 2*W*H + one strip
// + header + 1,000 clocks. For XGA the frame time must also allow more than
// 37 frames per second at 60 MHz (under 1,621,621 clocks).
module tb_jpeg_encoder_workloads;
  import jpeg_pkg::*;
  import tb_jpeg_ref_pkg::*;

  localparam int PIPE_LAT = 164;   // line-buffer output to quantiser output

  logic        clk = 0, rst_n = 0;
  logic        start = 0;
  samp_mode_e  mode = MODE_422;
  logic [15:0] width = 16, height = 8;
  logic        qt_we = 0, qt_chroma = 0;
  logic [5:0]  qt_addr = 0;
  logic [7:0]  qt_data = 0;
  logic        isp_valid = 0;
  logic [7:0]  isp_data = 0;
  logic        out_valid, out_last, busy, hdr_sent, done, err_overrun, fifo_overflow;
  logic [31:0] out_data;
  logic [2:0]  out_nbytes;
  logic [6:0]  fifo_max_level;

  jpeg_encoder dut (.*);

  int t_first = -1;
  always @(posedge clk) if (start) t_first <= -1; else if (isp_valid && t_first < 0) t_first <= cyc;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output collection
  byte unsigned stream[$];
  int n_partial = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < int'(out_nbytes); i++) stream.push_back(out_data[31 - 8*i -: 8]);
    if (out_last && out_nbytes != 4) n_partial++;
  end

  // latency probes
  int t_lb = -1, t_q = -1;
  always @(posedge clk) begin
    if (start) begin t_lb <= -1; t_q <= -1; end
    else begin
      if (dut.u_lb.out_valid && t_lb < 0) t_lb <= cyc;
      if (dut.u_q.out_valid  && t_q  < 0) t_q  <= cyc;
    end
  end
  int n_stall = 0;
  always @(posedge clk) if (rst_n && dut.huf_v && !dut.huf_rdy && dut.hdr_sent) n_stall++;

  // mechanism totals
  int tot_zrl = 0, tot_eob = 0, tot_stuff = 0, tot_pad = 0, max_fifo = 0;
  int modes_seen[2] = '{0, 0};

  function void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  task automatic run_frame(samp_mode_e m, int w, int h, int seed, bit custom);
    int qtab[2][64];
    blk_t refs[$];
    bit   chroma_of[$];
    jpeg_checker jc;
    int t0, nb, sh, mcus_w;

    // quantisation tables
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < 64; i++) begin
        if (custom) qtab[t][i] = 1 + (i % 4);
        else        qtab[t][i] = (t == 0) ? int'(QT_LUMA[ZZ[i]]) :
                                 ((ZZ[i] / 8 < 4 && ZZ[i] % 8 < 4) ?
                                  int'(QT_CHROMA_CORNER[(ZZ[i] / 8) * 4 + ZZ[i] % 8]) : 99);
      end
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        qt_we = 1; qt_chroma = t[0]; qt_addr = 6'(i); qt_data = 8'(qtab[t][i]);
      end
    @(negedge clk); qt_we = 0;

    stream.delete();
    mode = m; width = 16'(w); height = 16'(h);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    wait (hdr_sent);
    // raster input, Cb Y Cr Y per pixel pair, one sample per clock
    for (int y = 0; y < h; y++)
      for (int i = 0; i < 2 * w; i++) begin
        @(negedge clk);
        isp_valid = 1;
        case (i % 4)
          0: isp_data = 8'(test_cb(i / 4, y, seed));
          2: isp_data = 8'(test_cr(i / 4, y, seed));
          default: isp_data = 8'(test_y(i / 2, y, seed));
        endcase
      end
    @(negedge clk); isp_valid = 0;
    wait (done);
    repeat (2) @(negedge clk);
    $display("frame %0dx%0d mode %0d: %0d bytes, %0d clocks from start, latency lb->quant %0d",
             w, h, m, stream.size(), cyc - t0, t_q - t_lb);
    chk(t_q - t_lb == PIPE_LAT, $sformatf("pipeline latency %0d", t_q - t_lb));
    $display("frame time from first sample to end: %0d clocks", cyc - t_first);
    begin
      int ft, strip;
      ft = cyc - t_first;
      strip = 2 * w * ((m == MODE_420) ? 16 : 8);
      chk(ft >= 2 * w * h && ft <= 2 * w * h + strip + int'(HDR_BYTES) + 1000,
          $sformatf("frame time %0d clocks", ft));
      if (w == 1024 && h == 768) begin
        $display("XGA: %0d clocks per frame, %0d.%0d frames per second at 60 MHz",
                 ft, 60000000 / ft, (600000000 / ft) % 10);
        chk(ft < 1621621, "XGA over 37 frames per second at 60 MHz");
      end
    end
    chk(!err_overrun, "no overrun");
    chk(!fifo_overflow, "no FIFO overflow");

    // reference blocks in MCU order
    nb = (m == MODE_420) ? 6 : 4;
    sh = (m == MODE_420) ? 16 : 8;
    mcus_w = w / 16;
    for (int mcu = 0; mcu < (w / 16) * (h / sh); mcu++)
      for (int b = 0; b < nb; b++) begin
        blk_t pix, qz;
        int x0, y0, qsel;
        x0 = (mcu % mcus_w) * 16; y0 = (mcu / mcus_w) * sh;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            if (b < nb - 2)
              pix[r*8+c] = test_y(x0 + 8 * (b % 2) + c, y0 + 8 * (b / 2) + r, seed);
            else begin
              int ly;
              ly = y0 + ((m == MODE_420) ? 2 * r : r);
              pix[r*8+c] = (b == nb - 2) ? test_cb(x0 / 2 + c, ly, seed)
                                         : test_cr(x0 / 2 + c, ly, seed);
            end
          end
        qsel = (b < nb - 2) ? 0 : 1;
        for (int i = 0; i < 64; i++) qz[i] = qtab[qsel][i];
        refs.push_back(ref_block(pix, qz));
        chroma_of.push_back(qsel[0]);
      end

    jc = new();
    foreach (stream[i]) jc.bytes.push_back(stream[i]);
    if (jc.parse()) begin
      jc.check(jc.width == w && jc.height == h, "SOF0 size");
      jc.check(jc.hy == 2 && jc.vy == ((m == MODE_420) ? 2 : 1), "SOF0 sampling factors");
      for (int t = 0; t < 2; t++)
        for (int i = 0; i < 64; i++)
          jc.check(jc.qt[t][i] == qtab[t][i], $sformatf("DQT %0d[%0d]", t, i));
      jc.check(jc.bits_t[0][2] == 5 && jc.bits_t[2][15] == 8'h7d, "DHT BITS");
      jc.check(jc.ecs_start == int'(HDR_BYTES), "header length");
      jc.decode_and_compare(refs, chroma_of);
    end
    $display("  blocks %0d exact %0d off-by-one %0d ZRL %0d EOB %0d stuffed %0d pad %0d fifo max %0d",
             jc.n_blocks, jc.n_exact, jc.n_off1, jc.n_zrl, jc.n_eob, jc.n_stuff, jc.n_pad_bits,
             fifo_max_level);
    chk(jc.n_blocks == refs.size(), "all blocks decoded");
    checks += jc.checks; failures += jc.failures;
    tot_zrl += jc.n_zrl; tot_eob += jc.n_eob; tot_stuff += jc.n_stuff; tot_pad += jc.n_pad_bits;
    if (int'(fifo_max_level) > max_fifo) max_fifo = int'(fifo_max_level);
    modes_seen[m]++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(MODE_422, 640, 480, 11, 0);
    run_frame(MODE_422, 1024, 768, 12, 0);
    run_frame(MODE_420, 320, 240, 13, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
