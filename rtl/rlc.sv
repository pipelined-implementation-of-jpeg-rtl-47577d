// rlc: run-length coder of the entropy encoder.
//
// Takes quantised coefficients in zig-zag order, 64 per block, and produces
// one symbol per coded event. The first coefficient of a block is the DC
// term: its difference from the previous DC of the same component (one
// predictor each for Y, Cb and Cr, cleared at frame start) is coded as a size
// category and amplitude bits. The other 63 are AC terms: zeros are counted;
// a non-zero value gives a symbol with the preceding run (0..15), its size
// and amplitude. Every 16 zeros without a non-zero value add one pending ZRL
// (run of 16), which travels in the zrl field of the next non-zero symbol; if
// the block ends in zeros the pending ZRLs are dropped and an EOB is sent.
// Amplitude bits are v for v > 0 and v-1 (ones' complement) for v < 0, in
// the low `size` bits. The symbol produced at position 63 of the frame's last
// block carries eof.
//
// DC differential coding and AC run-length coding follow the document; the
// symbol format with its zrl count, the block/component bookkeeping and the
// end-of-frame marking are this design's choices.
//
// Interface: start (frame start), mode, total_blocks (8x8 blocks per frame),
// in_valid/in_coef; out_valid/out_sym (rlc_sym_t).
// Timing: one register stage; at most one symbol per input coefficient.
module rlc
  import jpeg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  samp_mode_e               mode,
  input  logic [15:0]              total_blocks,
  input  logic                     in_valid,
  input  logic signed [COEF_W-1:0] in_coef,
  output logic                     out_valid,
  output rlc_sym_t                 out_sym
);

  logic [5:0]  pos;
  logic [2:0]  blk;           // block in the MCU
  logic [15:0] nblk;          // block in the frame
  logic [3:0]  run;
  logic [1:0]  zrl;
  logic signed [COEF_W-1:0] pred [3];

  comp_e comp;
  assign comp = comp_of_block(mode, blk);

  logic signed [12:0] val;    // DC difference or AC value
  always_comb begin
    if (pos == 6'd0) val = 13'(in_coef) - 13'(pred[comp]);
    else             val = 13'(in_coef);
  end

  logic [3:0]       sz;
  logic [AMP_W-1:0] amp;
  always_comb begin
    sz  = size_cat(val);
    amp = val[12] ? AMP_W'(val - 13'sd1) : AMP_W'(val);
    amp = amp & AMP_W'((1 << sz) - 1);
  end

  logic last_blk;
  assign last_blk = (nblk == total_blocks - 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; blk <= '0; nblk <= '0; run <= '0; zrl <= '0;
      for (int i = 0; i < 3; i++) pred[i] <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (start) begin
      pos <= '0; blk <= '0; nblk <= '0; run <= '0; zrl <= '0;
      for (int i = 0; i < 3; i++) pred[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pos <= pos + 6'd1;
        out_sym        <= '0;
        out_sym.chroma <= (comp != COMP_Y);
        out_sym.eof    <= last_blk && (pos == 6'd63);
        if (pos == 6'd0) begin
          // DC: differential coding
          pred[comp]     <= in_coef;
          out_valid      <= 1'b1;
          out_sym.is_dc  <= 1'b1;
          out_sym.size   <= sz;
          out_sym.amp    <= amp;
          run <= '0;
          zrl <= '0;
        end else if (in_coef != 0) begin
          out_valid   <= 1'b1;
          out_sym.zrl <= zrl;
          out_sym.run <= run;
          out_sym.size <= sz;
          out_sym.amp  <= amp;
          run <= '0;
          zrl <= '0;
        end else if (pos == 6'd63) begin
          out_valid <= 1'b1;                 // EOB: run=0, size=0
        end else if (run == 4'd15) begin
          run <= '0;
          zrl <= zrl + 2'd1;
        end else begin
          run <= run + 4'd1;
        end
        if (pos == 6'd63) begin
          blk  <= (blk == 3'(mcu_blocks(mode) - 1)) ? 3'd0 : blk + 3'd1;
          nblk <= last_blk ? 16'd0 : nblk + 16'd1;
        end
      end
    end
  end

endmodule
