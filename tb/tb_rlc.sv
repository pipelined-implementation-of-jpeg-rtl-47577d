// tb_rlc: checks the run-length coder against a symbol-level model.
//
// Blocks of quantised coefficients (zig-zag order) are built to cover all
// cases: random sparse blocks, blocks ending in a non-zero value (no EOB),
// all-zero AC blocks (EOB only), runs of exactly 16, 32 and 47 zeros before
// a value (ZRL counts 1..2, and 2 with run 15), runs of 16 zeros at the end
// of a block (pending ZRL dropped), extreme values and DC steps between
// blocks of the same component. The model computes, per block, the DC
// difference against the previous DC of the same component, its size and
// amplitude bits, then the AC symbols {zrl, run, size, amp} and an EOB when
// the block ends in zeros. Amplitude bits are v for v > 0 and the low `size`
// bits of v-1 for v < 0. One 4:2:2 frame (Y Y Cb Cr) and one 4:2:0 frame
// (Y Y Y Y Cb Cr) are coded, with random idle clocks in the second; the
// last symbol of each frame must carry eof and no other may. Symbol counts,
// ZRL and EOB totals are checked too.
module tb_rlc;
  import jpeg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  samp_mode_e mode = MODE_422;
  logic [15:0] total_blocks = 0;
  logic in_valid = 0;
  logic signed [COEF_W-1:0] in_coef = 0;
  logic out_valid;
  rlc_sym_t out_sym;

  rlc dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rlc_sym_t exp_q[$];
  int nsym = 0, n_zrl = 0, n_eob = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    rlc_sym_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected symbol %p", out_sym);
    end else begin
      e = exp_q.pop_front();
      if (out_sym !== e) begin
        failures++;
        if (failures < 10) $display("symbol %0d: got %p expected %p", nsym, out_sym, e);
      end
    end
    nsym++;
  end

  function automatic int sizeof_v(int v);
    int a, s;
    a = (v < 0) ? -v : v;
    s = 0;
    while (a > 0) begin s++; a >>= 1; end
    return s;
  endfunction

  function automatic rlc_sym_t mk(bit dc, bit chroma, int zrl, int run, int v);
    rlc_sym_t s;
    int sz;
    sz = sizeof_v(v);
    s = '0;
    s.is_dc = dc; s.chroma = chroma; s.zrl = 2'(zrl); s.run = 4'(run); s.size = 4'(sz);
    s.amp = AMP_W'(((v < 0) ? v - 1 : v) & ((1 << sz) - 1));
    return s;
  endfunction

  task automatic frame(samp_mode_e m, int nblocks, bit gaps);
    int pred[3];
    int nb, ny;
    pred = '{0, 0, 0};
    nb = (m == MODE_420) ? 6 : 4;
    ny = nb - 2;
    @(negedge clk); in_valid = 0; mode = m; total_blocks = 16'(nblocks); start = 1;
    @(negedge clk); start = 0;
    for (int b = 0; b < nblocks; b++) begin
      int c[64], comp, kind, run, zrl;
      bit chroma;
      comp = (b % nb < ny) ? 0 : (b % nb == ny) ? 1 : 2;
      chroma = (comp != 0);
      kind = b % 7;
      foreach (c[i]) c[i] = 0;
      c[0] = $urandom_range(2040) - 1024;
      case (kind)
        0: for (int i = 1; i < 64; i++) if ($urandom_range(3) == 0) c[i] = $urandom_range(200) - 100;
        1: begin for (int i = 1; i < 64; i++) c[i] = $urandom_range(2000) - 1000; c[63] = -1; end
        2: ;                                             // EOB only
        3: begin c[17] = 5; c[50] = -3; end              // 16 zeros: 1 ZRL + run 0
        4: begin c[48] = 1023; end                       // 47 zeros: 2 ZRL + run 15
        5: begin c[1] = -1023; c[2] = 1; c[3] = -2; c[40] = 7; end   // trailing zeros incl. 16-runs
        default: begin c[33] = -1; c[63] = 2; end        // 32 zeros: 2 ZRL + run 0, then run 29
      endcase
      // model
      exp_q.push_back(mk(1, chroma, 0, 0, c[0] - pred[comp]));
      pred[comp] = c[0];
      run = 0; zrl = 0;
      for (int i = 1; i < 64; i++) begin
        if (c[i] != 0) begin
          exp_q.push_back(mk(0, chroma, zrl, run, c[i]));
          n_zrl += zrl;
          run = 0; zrl = 0;
        end else if (i == 63) begin
          exp_q.push_back(mk(0, chroma, 0, 0, 0));
          n_eob++;
        end else if (run == 15) begin
          run = 0; zrl++;
        end else run++;
      end
      if (b == nblocks - 1) exp_q[$].eof = 1'b1;
      // drive
      for (int i = 0; i < 64; i++) begin
        if (gaps && $urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_coef = COEF_W'(c[i]);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d symbols missing", exp_q.size()); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(MODE_422, 16, 0);
    frame(MODE_420, 18, 1);
    $display("symbols %0d, ZRLs %0d, EOBs %0d", nsym, n_zrl, n_eob);
    checks++;
    if (n_zrl == 0 || n_eob == 0) begin failures++; $display("ZRL or EOB case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
