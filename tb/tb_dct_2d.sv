// tb_dct_2d: checks the level shift and 2-D DCT against a floating-point
// reference.
//
// Sends 10 blocks back to back (random pixels, flat blocks at 0 and 255 to
// hit the extreme DC values, and a checkerboard for the largest AC term) and
// then 4 random blocks with idle clocks between them. Output word w of a
// block must equal F(v = w%8, u = w/8) =
// 1/4 C(u) C(v) sum sum (p(y,x) - 128) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
// within 1. Timing checks: the first coefficient of a block leaves 84 clocks
// after the block's first pixel went in (row DCT 10 + transpose 64 + column
// DCT 10), back-to-back blocks leave without idle clocks, and err_overrun
// stays low.
module tb_dct_2d;
  import jpeg_pkg::*;
  localparam int LAT = 84;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_pixel = 0;
  logic out_valid, err_overrun;
  logic signed [COEF_W-1:0] out_coef;

  dct_2d dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q[$];
  int t_in[$], t_out[$];
  int nout = 0, gaps = 0, last_out = -1;
  real maxerr = 0.0;

  always @(posedge clk) if (rst_n && out_valid) begin
    real e, d;
    e = exp_q.pop_front();
    d = real'(out_coef) - e;
    if (d < 0) d = -d;
    if (d > maxerr) maxerr = d;
    checks++;
    if (d > 1.0) begin
      failures++;
      if (failures < 10) $display("block %0d word %0d: got %0d expected %f", nout / 64, nout % 64,
                                  out_coef, e);
    end
    if (nout % 64 == 0) t_out.push_back(cyc);
    if (nout < 640 && last_out >= 0 && cyc != last_out + 1) gaps++;
    last_out = cyc;
    nout++;
  end

  task automatic send_block(int kind, bit gap_before);
    int p[64];
    for (int i = 0; i < 64; i++)
      case (kind)
        1: p[i] = 0;
        2: p[i] = 255;
        3: p[i] = (((i / 8) + (i % 8)) % 2) ? 255 : 0;
        default: p[i] = $urandom_range(255);
      endcase
    for (int w = 0; w < 64; w++) begin
      int u, v;
      real s;
      u = w / 8; v = w % 8;
      s = 0.0;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          s += real'(p[y*8+x] - 128) * $cos((2*x+1) * u * 3.14159265358979 / 16.0)
                                     * $cos((2*y+1) * v * 3.14159265358979 / 16.0);
      s = s * 0.25 * ((u == 0) ? 0.70710678118655 : 1.0) * ((v == 0) ? 0.70710678118655 : 1.0);
      exp_q.push_back(s);
    end
    if (gap_before) begin @(negedge clk); in_valid = 0; repeat ($urandom_range(30)) @(negedge clk); end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1; in_pixel = 8'(p[i]);
      if (i == 0) t_in.push_back(cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_block(0, 0); send_block(1, 0); send_block(2, 0); send_block(3, 0);
    repeat (6) send_block(0, 0);
    repeat (4) send_block(0, 1);
    @(negedge clk); in_valid = 0;
    repeat (300) @(negedge clk);
    $display("max error %f, first block latency %0d", maxerr, t_out[0] - t_in[0]);
    checks++;
    if (nout != 14 * 64) begin failures++; $display("outputs %0d, expected %0d", nout, 14 * 64); end
    for (int b = 0; b < t_out.size(); b++) begin
      checks++;
      if (t_out[b] - t_in[b] != LAT) begin
        failures++; $display("block %0d: first coefficient after %0d clocks", b, t_out[b] - t_in[b]);
      end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("idle clocks inside back-to-back output: %0d", gaps); end
    checks++;
    if (err_overrun) begin failures++; $display("unexpected overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
