// quantizer: divides each DCT coefficient by its quantisation step, rounding
// to nearest, in a pipelined non-restoring divider.
//
// Coefficients arrive in zig-zag order, 64 per block. A block counter tracks
// the position inside the block and the block's place inside the MCU, which
// selects the luminance or chrominance table (4:2:2: Y Y Cb Cr, 4:2:0:
// Y Y Y Y Cb Cr). Input stage (combinational): sign and magnitude are split
// and half the step is added to the magnitude for rounding. Then DIV_STAGES
// registered stages of non-restoring division each produce one quotient bit,
// MSB first: the partial remainder is shifted left with the next dividend bit
// and the divisor is subtracted when the previous remainder was non-negative,
// added when it was negative; the quotient bit is 1 when the new remainder is
// non-negative. No restoring step is needed for the quotient. A final
// register restores the sign and saturates to 12 bits.
//
// The non-restoring algorithm and the 16-stage pipeline (17 clocks in all)
// follow the document; the rounding, the 16-bit dividend that gives one stage
// per bit and the table-selection counter are this design's choices.
//
// Interface: start (one-clock pulse at frame start, clears the counters),
// mode, in_valid/in_coef (signed 12), a table read port to quant_table,
// out_valid/out_coef (signed 12, quantised, still zig-zag order).
// Timing: latency DIV_STAGES+1 = 17 clocks, one coefficient per clock.
module quantizer
  import jpeg_pkg::*;
#(
  parameter int unsigned DIV_STAGES = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  samp_mode_e               mode,
  input  logic                     in_valid,
  input  logic signed [COEF_W-1:0] in_coef,
  output logic                     qt_chroma,
  output logic [5:0]               qt_addr,
  input  logic [7:0]               qt_data,
  output logic                     out_valid,
  output logic signed [COEF_W-1:0] out_coef
);

  localparam int unsigned RW = 11;   // partial remainder, |R| < 2*255

  typedef struct packed {
    logic                   v;
    logic                   neg;
    logic [7:0]             d;      // divisor
    logic [DIV_STAGES-1:0]  n;      // dividend bits not yet consumed (MSB first)
    logic [DIV_STAGES-1:0]  q;      // quotient bits so far
    logic signed [RW-1:0]   r;      // partial remainder
  } stage_t;

  // ---------------------------------------------------------------- position
  logic [5:0] pos;
  logic [2:0] blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0;
      blk <= '0;
    end else if (start) begin
      pos <= '0;
      blk <= '0;
    end else if (in_valid) begin
      pos <= pos + 6'd1;
      if (pos == 6'd63)
        blk <= (blk == 3'(mcu_blocks(mode) - 1)) ? 3'd0 : blk + 3'd1;
    end
  end

  assign qt_chroma = (comp_of_block(mode, blk) != COMP_Y);
  assign qt_addr   = pos;

  // ---------------------------------------------------------------- input stage
  stage_t s0;
  always_comb begin
    logic [COEF_W-1:0] mag;
    mag     = in_coef[COEF_W-1] ? COEF_W'(-in_coef) : COEF_W'(in_coef);
    s0      = '0;
    s0.v    = in_valid;
    s0.neg  = in_coef[COEF_W-1];
    s0.d    = qt_data;
    s0.n    = DIV_STAGES'(mag) + DIV_STAGES'(qt_data >> 1);
    s0.q    = '0;
    s0.r    = '0;
  end

  // ---------------------------------------------------------------- divider
  function automatic stage_t div_step(stage_t s);
    stage_t o;
    logic signed [RW-1:0] sh;
    o  = s;
    sh = (s.r <<< 1) | RW'(s.n[DIV_STAGES-1]);
    o.r = (s.r >= 0) ? sh - RW'(s.d) : sh + RW'(s.d);
    o.n = s.n << 1;
    o.q = {s.q[DIV_STAGES-2:0], (o.r >= 0)};
    return o;
  endfunction

  stage_t pipe [DIV_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIV_STAGES; i++) pipe[i] <= '0;
      out_valid <= 1'b0;
      out_coef  <= '0;
    end else begin
      pipe[0] <= div_step(s0);
      for (int i = 1; i < DIV_STAGES; i++) pipe[i] <= div_step(pipe[i-1]);
      // sign restore and saturation
      out_valid <= pipe[DIV_STAGES-1].v;
      begin
        logic [DIV_STAGES-1:0] qq;
        logic [COEF_W-1:0]     qs;
        qq = pipe[DIV_STAGES-1].q;
        qs = (qq > DIV_STAGES'(2**(COEF_W-1) - 1)) ? COEF_W'(2**(COEF_W-1) - 1) : COEF_W'(qq);
        out_coef <= pipe[DIV_STAGES-1].neg ? -signed'(qs) : signed'(qs);
      end
    end
  end

endmodule
