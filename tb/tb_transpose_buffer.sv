// tb_transpose_buffer: checks the ping-pong transpose memory.
//
// Writes 12 blocks of random words: the first 8 back to back (one word per
// clock, as the row DCT delivers them), the rest with random idle clocks in
// between. Every block must come out column by column: output word j of a
// block is input word (j%8)*8 + j/8. Timing checks: for back-to-back blocks
// the first word of a block leaves 64 clocks after the block's first word
// went in, and the output runs without idle clocks; err_overrun stays low.
module tb_transpose_buffer;
  localparam int W = 15;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [W-1:0] in_data = 0;
  logic out_valid, err_overrun;
  logic [W-1:0] out_data;

  transpose_buffer #(.START_AT(62), .W(W)) dut (.*);
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

  logic [W-1:0] blocks[$][64];
  int t_in[$], t_out[$];
  int nout = 0, gaps = 0, last_out = -1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int b, j;
    b = nout / 64; j = nout % 64;
    checks++;
    if (out_data !== blocks[b][(j % 8) * 8 + j / 8]) begin
      failures++;
      if (failures < 10) $display("block %0d word %0d: got %0h expected %0h", b, j, out_data,
                                  blocks[b][(j % 8) * 8 + j / 8]);
    end
    if (j == 0) t_out.push_back(cyc);
    if (b < 8 && last_out >= 0 && cyc != last_out + 1) gaps++;
    last_out = cyc;
    nout++;
  end

  task automatic send_block(bit with_gaps);
    logic [W-1:0] blk[64];
    foreach (blk[i]) blk[i] = W'($urandom);
    blocks.push_back(blk);
    for (int i = 0; i < 64; i++) begin
      if (with_gaps && $urandom_range(4) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_data = blk[i];
      if (i == 0) t_in.push_back(cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (8) send_block(0);
    @(negedge clk); in_valid = 0;
    repeat (100) @(negedge clk);
    repeat (4) send_block(1);
    @(negedge clk); in_valid = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (nout != 12 * 64) begin failures++; $display("outputs %0d, expected %0d", nout, 12 * 64); end
    for (int b = 0; b < 8 && b < t_out.size(); b++) begin
      checks++;
      if (t_out[b] - t_in[b] != 64) begin
        failures++; $display("block %0d: first word out after %0d clocks", b, t_out[b] - t_in[b]);
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
