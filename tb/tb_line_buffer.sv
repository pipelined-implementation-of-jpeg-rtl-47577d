// tb_line_buffer: checks the reordering of the raster sample stream into
// 8x8 blocks in MCU order.
//
// Frames of random samples are sent one per clock in the Cb Y Cr Y order of
// the input: 4:2:2 32x16, 4:2:0 48x32 and 4:2:2 at the largest width
// (MAX_WIDTH = 1024 pixels, one strip). The model builds the expected output:
// for each MCU, the Y blocks (left, right; in 4:2:0 then the lower left and
// lower right) followed by Cb and Cr, each block row by row; in 4:2:0 the
// chroma block rows come from the even lines of the 16-line strip. Every
// output sample is compared with the model. Timing checks: the first sample
// of each strip leaves 2 clocks after the strip's last input sample, each
// strip is read out in consecutive clocks, and err_overrun stays low when
// the input runs continuously.
module tb_line_buffer;
  import jpeg_pkg::*;
  localparam int MAXW = 1024;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  samp_mode_e mode = MODE_422;
  logic [$clog2(MAXW):0] width = 0;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic out_valid, err_overrun;
  logic [7:0] out_pixel;

  line_buffer #(.MAX_WIDTH(MAXW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int strip_end[$], strip_first[$];
  int strip_len;
  int nout = 0, gaps = 0, last_out = -1, mism = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (int'(out_pixel) != e) begin
      failures++;
      if (failures < 10) $display("output %0d: got %0d expected %0d", nout, out_pixel, e);
    end
    if (nout % strip_len == 0) strip_first.push_back(cyc);
    else if (cyc != last_out + 1) gaps++;
    last_out = cyc;
    nout++;
  end

  task automatic frame(samp_mode_e m, int w, int h);
    int Y[][], CB[][], CR[][];
    int sh, nb;
    sh = (m == MODE_420) ? 16 : 8;
    nb = (m == MODE_420) ? 6 : 4;
    Y = new[h]; CB = new[h]; CR = new[h];
    for (int y = 0; y < h; y++) begin
      Y[y] = new[w]; CB[y] = new[w / 2]; CR[y] = new[w / 2];
      foreach (Y[y][x])  Y[y][x]  = $urandom_range(255);
      foreach (CB[y][x]) CB[y][x] = $urandom_range(255);
      foreach (CR[y][x]) CR[y][x] = $urandom_range(255);
    end
    for (int s = 0; s < h / sh; s++)
      for (int mcu = 0; mcu < w / 16; mcu++)
        for (int b = 0; b < nb; b++)
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              int y0;
              y0 = s * sh;
              if (b < nb - 2)
                exp_q.push_back(Y[y0 + 8 * (b / 2) + r][mcu * 16 + 8 * (b % 2) + c]);
              else if (b == nb - 2)
                exp_q.push_back(CB[y0 + ((m == MODE_420) ? 2 * r : r)][mcu * 8 + c]);
              else
                exp_q.push_back(CR[y0 + ((m == MODE_420) ? 2 * r : r)][mcu * 8 + c]);
            end
    strip_len = (w / 16) * nb * 64;
    nout = 0; strip_first.delete(); strip_end.delete();
    @(negedge clk); mode = m; width = ($clog2(MAXW)+1)'(w); start = 1;
    @(negedge clk); start = 0;
    for (int y = 0; y < h; y++)
      for (int i = 0; i < 2 * w; i++) begin
        @(negedge clk);
        in_valid = 1;
        case (i % 4)
          0: in_data = 8'(CB[y][i / 4]);
          2: in_data = 8'(CR[y][i / 4]);
          default: in_data = 8'(Y[y][i / 2]);
        endcase
        if (y % sh == sh - 1 && i == 2 * w - 1) strip_end.push_back(cyc);
      end
    @(negedge clk); in_valid = 0;
    while (exp_q.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (strip_first.size() != h / sh) begin failures++; $display("strips out %0d", strip_first.size()); end
    for (int s = 0; s < strip_first.size(); s++) begin
      checks++;
      if (strip_first[s] - strip_end[s] != 2) begin
        failures++; $display("strip %0d starts %0d clocks after its last sample", s, strip_first[s] - strip_end[s]);
      end
    end
    $display("frame %0dx%0d mode %0d: %0d samples out", w, h, m, nout);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(MODE_422, 32, 16);
    frame(MODE_420, 48, 32);
    frame(MODE_422, MAXW, 8);
    checks += 2;
    if (gaps != 0)   begin failures++; $display("idle clocks inside a strip: %0d", gaps); end
    if (err_overrun) begin failures++; $display("unexpected overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
