// tb_quantizer: checks the pipelined divider, the rounding, the table
// selection and the 17-clock latency of the quantiser.
//
// The testbench models the table memory: luminance step at zig-zag position
// i is LQ[i], chrominance step CQ[i]; both include the corner steps 1, 2 and
// 255. Coefficients are random in -2047..2047 with extra extreme and exact
// half-way values. The expected output is sign(x) * floor((|x| + floor(q/2))
// / q), i.e. round to nearest with halves away from zero. The first frame
// uses 4:2:2 (blocks Y Y Cb Cr), then a start pulse and a 4:2:0 frame (Y Y Y
// Y Cb Cr); each checks that the table chosen for each block is right. The
// second half of each frame has random idle clocks. Timing: each output must
// appear exactly 17 clocks after its input.
module tb_quantizer;
  import jpeg_pkg::*;
  localparam int LAT = 17;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  samp_mode_e mode = MODE_422;
  logic in_valid = 0;
  logic signed [COEF_W-1:0] in_coef = 0;
  logic qt_chroma;
  logic [5:0] qt_addr;
  logic [7:0] qt_data;
  logic out_valid;
  logic signed [COEF_W-1:0] out_coef;

  quantizer dut (.*);
  always #5 clk = ~clk;

  int LQ [64], CQ [64];
  assign qt_data = 8'(qt_chroma ? CQ[qt_addr] : LQ[qt_addr]);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_v[$], exp_t[$];
  int nout = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e, t;
    e = exp_v.pop_front(); t = exp_t.pop_front();
    checks += 2;
    if (int'(out_coef) != e) begin
      failures++;
      if (failures < 10) $display("output %0d: got %0d expected %0d", nout, out_coef, e);
    end
    if (cyc - t != LAT) begin
      failures++;
      if (failures < 10) $display("output %0d: latency %0d", nout, cyc - t);
    end
    nout++;
  end

  task automatic frame(samp_mode_e m, int nblocks);
    @(negedge clk); in_valid = 0; mode = m; start = 1;
    @(negedge clk); start = 0;
    for (int b = 0; b < nblocks; b++)
      for (int i = 0; i < 64; i++) begin
        int x, q, mag, e;
        bit chroma;
        chroma = (b % ((m == MODE_420) ? 6 : 4)) >= ((m == MODE_420) ? 4 : 2);
        q = chroma ? CQ[i] : LQ[i];
        case ($urandom_range(9))
          0: x = 2047;
          1: x = -2047;
          2: x = (q / 2) * ($urandom_range(1) ? 1 : -1) + ((q % 2) ? 0 : q * $urandom_range(5));
          3: x = $urandom_range(20) - 10;
          default: x = $urandom_range(4094) - 2047;
        endcase
        if (x > 2047) x = 2047;
        mag = (x < 0) ? -x : x;
        e = (mag + q / 2) / q;
        if (x < 0) e = -e;
        if (b >= nblocks / 2 && $urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1; in_coef = COEF_W'(x);
        exp_v.push_back(e); exp_t.push_back(cyc);
      end
    @(negedge clk); in_valid = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      LQ[i] = $urandom_range(1, 255);
      CQ[i] = $urandom_range(1, 255);
    end
    LQ[0] = 1; LQ[1] = 2; LQ[2] = 255; LQ[3] = 3;
    CQ[0] = 255; CQ[1] = 1; CQ[2] = 2; CQ[5] = 128;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(MODE_422, 12);
    frame(MODE_420, 12);
    checks++;
    if (nout != 24 * 64 || exp_v.size() != 0) begin
      failures++; $display("outputs %0d, expected %0d", nout, 24 * 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
