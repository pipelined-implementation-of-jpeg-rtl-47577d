// dct_1d: 8-point forward DCT on a serial stream, one sample per clock.
//
// X[k] = c(k)/2 * sum_n x[n] cos((2n+1) k pi / 16), c(0)=1/sqrt(2).
// The first four samples of each 8-sample vector are pushed into a 4-deep
// LIFO. Each of the last four samples is paired with the LIFO entry popped at
// that moment, which is exactly the DCT butterfly partner: x4 meets x3, x5
// meets x2, x6 meets x1, x7 meets x0. The sum feeds four even-coefficient
// accumulators and the difference four odd-coefficient accumulators, each
// multiplying by a basis constant selected by the pair index, so each output
// needs four multiply-accumulate steps. When the last pair has been
// accumulated the eight results are rounded, scaled by 2^-SHIFT and sent out
// serially, X[0] first, one per clock.
//
// The LIFO front end follows the description of the 1-D DCT stage (a 4-clock
// LIFO before the DCT arithmetic); the multiply-accumulate arithmetic, the
// 13-bit basis with 12 fraction bits and the rounding are this design's own.
//
// Interface: in_valid/in_data (signed IN_W); vectors are counted in groups of
// eight valid samples, gaps are allowed. out_valid/out_data (signed OUT_W).
// Timing: X[0] leaves 10 clocks after x[0] was accepted (3 clocks after
// x[7], with back-to-back input); X[k] follows one
// clock later each. Throughput is one sample per clock; a new vector may
// start right after x[7], and its results follow the previous eight outputs
// without a gap as long as input vectors arrive at least 8 clocks apart.
module dct_1d
  import jpeg_pkg::*;
#(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 15,
  parameter int unsigned SHIFT = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned PW    = IN_W + 1;            // butterfly width
  localparam int unsigned ACC_W = PW + DCT_CW + 2;      // four products

  // ---------------------------------------------------------------- LIFO
  logic [2:0]             n_q;
  logic signed [IN_W-1:0] lifo [4];

  logic                   pair_v;
  logic [1:0]             pair_i;   // index n of the lower partner (3..0)
  logic signed [PW-1:0]   pair_s, pair_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q    <= '0;
      pair_v <= 1'b0;
      pair_i <= '0;
      pair_s <= '0;
      pair_d <= '0;
    end else begin
      pair_v <= 1'b0;
      if (in_valid) begin
        n_q <= n_q + 3'd1;
        if (!n_q[2]) begin
          lifo[n_q[1:0]] <= in_data;
        end else begin
          pair_v <= 1'b1;
          pair_i <= ~n_q[1:0];                       // 7-n for n=4..7
          pair_s <= PW'(lifo[~n_q[1:0]]) + PW'(in_data);
          pair_d <= PW'(lifo[~n_q[1:0]]) - PW'(in_data);
        end
      end
    end
  end

  // ---------------------------------------------------------------- MAC
  logic signed [ACC_W-1:0] acc [8];
  logic signed [ACC_W-1:0] prod [8];
  logic                    acc_done;

  // basis constants C(k, n) for the pair index n = 0..3, as a ROM
  typedef logic [7:0][3:0][DCT_CW-1:0] coef_rom_t;
  function automatic coef_rom_t coef_rom();
    coef_rom_t t;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 4; n++) t[k][n] = dct_coef(k, n);
    return t;
  endfunction
  localparam coef_rom_t CROM = coef_rom();

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (k % 2 == 0)
        prod[k] = ACC_W'(pair_s) * ACC_W'(signed'(CROM[k][pair_i]));
      else
        prod[k] = ACC_W'(pair_d) * ACC_W'(signed'(CROM[k][pair_i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_done <= 1'b0;
      for (int k = 0; k < 8; k++) acc[k] <= '0;
    end else begin
      acc_done <= 1'b0;
      if (pair_v) begin
        for (int k = 0; k < 8; k++)
          acc[k] <= (pair_i == 2'd3) ? prod[k] : acc[k] + prod[k];
        acc_done <= (pair_i == 2'd0);
      end
    end
  end

  // ---------------------------------------------------------------- output
  function automatic logic signed [OUT_W-1:0] scale(logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] r;
    r = (a + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (r > ACC_W'((1 <<< (OUT_W - 1)) - 1))  return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -ACC_W'(1 <<< (OUT_W - 1)))       return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  logic signed [OUT_W-1:0] res [8];
  logic [3:0]              out_cnt;   // outputs still to send

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_cnt   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < 8; k++) res[k] <= '0;
    end else begin
      if (acc_done) begin
        for (int k = 1; k < 8; k++) res[k-1] <= scale(acc[k]);
        out_data  <= scale(acc[0]);
        out_valid <= 1'b1;
        out_cnt   <= 4'd7;
      end else if (out_cnt != 0) begin
        for (int k = 1; k < 7; k++) res[k-1] <= res[k];
        out_data  <= res[0];
        out_valid <= 1'b1;
        out_cnt   <= out_cnt - 4'd1;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
