// tb_dct_1d: checks the 8-point DCT against a floating-point reference.
//
// Sends 40 random 8-sample vectors back to back (one sample per clock) and
// then 10 more with random gaps. Each output is compared with
// round(2^3 * c(k)/2 * sum x[n] cos((2n+1)k pi/16)) within 2 LSB (the row
// DCT keeps 3 fraction bits). Timing: X[0] of a vector must leave 10 clocks
// after its x[0] was accepted (4-clock LIFO plus 6 clocks of DCT), and
// back-to-back vectors must come out without gaps.
module tb_dct_1d;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [7:0] in_data = 0;
  logic out_valid;
  logic signed [14:0] out_data;

  dct_1d #(.IN_W(8), .OUT_W(15), .SHIFT(9)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q[$];
  int  t_in[$], t_out[$];
  int  nout = 0, gaps = 0, last_out = -1;

  task automatic send_vec(bit with_gaps);
    int x[8];
    real s;
    for (int n = 0; n < 8; n++) x[n] = $signed($urandom_range(255)) - 128;
    for (int k = 0; k < 8; k++) begin
      s = 0.0;
      for (int n = 0; n < 8; n++) s += x[n] * $cos((2*n+1) * k * 3.14159265358979 / 16.0);
      s = s * 0.5 * ((k == 0) ? 0.70710678118655 : 1.0) * 8.0;
      exp_q.push_back(s);
    end
    for (int n = 0; n < 8; n++) begin
      if (with_gaps && ($urandom_range(3) == 0)) begin
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1; in_data = 8'(x[n]);
      if (n == 0) t_in.push_back(cyc);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    real e;
    e = exp_q.pop_front();
    checks++;
    if (real'(out_data) - e > 2.0 || e - real'(out_data) > 2.0) begin
      failures++;
      $display("out %0d: got %0d expected %f", nout, out_data, e);
    end
    if (nout % 8 == 0) t_out.push_back(cyc);
    if (nout < 320 && last_out >= 0 && cyc != last_out + 1) gaps++;
    last_out = cyc;
    nout++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (40) send_vec(0);
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    repeat (10) send_vec(1);
    @(negedge clk); in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (nout != 400) begin failures++; $display("outputs %0d, expected 400", nout); end
    for (int i = 0; i < t_out.size(); i++) begin
      checks++;
      if (t_out[i] - t_in[i] != 10 && i < 40) begin
        failures++; $display("vector %0d latency %0d", i, t_out[i] - t_in[i]);
      end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("gaps in back-to-back output: %0d", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
