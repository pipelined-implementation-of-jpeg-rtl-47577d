// tb_quant_table: checks the reset contents, the write port and both read
// ports of the quantisation table memory.
//
// After reset, all 128 entries read through port A and port B must equal
// the example tables of the JPEG standard (Annex K, typed below in natural
// row-major order and mapped to zig-zag order here). Then random values are
// written to random entries and read back through both ports in the clock
// after the write, and a written 0 must read back as 1.
module tb_quant_table;
  import tb_jpeg_ref_pkg::ZZ;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_chroma = 0;
  logic [5:0] wr_addr = 0;
  logic [7:0] wr_data = 0;
  logic a_chroma = 0, b_chroma = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_data, b_data;

  quant_table dut (.*);
  always #5 clk = ~clk;

  localparam int LUMA [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,   24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,   72, 92, 95, 98,112,100,103, 99};
  localparam int CHROMA [64] = '{
    17, 18, 24, 47, 99, 99, 99, 99,   18, 21, 26, 66, 99, 99, 99, 99,
    24, 26, 56, 99, 99, 99, 99, 99,   47, 66, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,   99, 99, 99, 99, 99, 99, 99, 99,
    99, 99, 99, 99, 99, 99, 99, 99,   99, 99, 99, 99, 99, 99, 99, 99};

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endfunction

  int model [2][64];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      model[0][i] = LUMA[ZZ[i]];
      model[1][i] = CHROMA[ZZ[i]];
    end
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        a_chroma = t[0]; a_addr = 6'(i); b_chroma = t[0]; b_addr = 6'(63 - i);
        #1;
        chk(a_data == model[t][i], $sformatf("reset value %0d[%0d] port A: %0d", t, i, a_data));
        chk(b_data == model[t][63 - i], $sformatf("reset value %0d[%0d] port B", t, 63 - i));
      end
    for (int k = 0; k < 300; k++) begin
      int t, a, d;
      t = $urandom_range(1); a = $urandom_range(63);
      d = (k % 10 == 0) ? 0 : $urandom_range(255);
      @(negedge clk);
      wr_en = 1; wr_chroma = t[0]; wr_addr = 6'(a); wr_data = 8'(d);
      model[t][a] = (d == 0) ? 1 : d;
      @(negedge clk);
      wr_en = 0;
      a_chroma = t[0]; a_addr = 6'(a);
      b_chroma = ~t[0]; b_addr = 6'(a ^ 5);
      #1;
      chk(a_data == model[t][a], $sformatf("write %0d[%0d]=%0d read %0d", t, a, d, a_data));
      chk(b_data == model[1 - t][a ^ 5], "port B after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
