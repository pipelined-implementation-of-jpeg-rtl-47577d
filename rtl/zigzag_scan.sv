// zigzag_scan: double-buffered 8x8 coefficient memory that reorders the
// column-DCT output into zig-zag order for the quantiser.
//
// The column DCT delivers a block column by column: the w-th word of a block
// is F(v,u) with u = w/8 (horizontal frequency) and v = w%8 (vertical
// frequency). It is written at natural address v*8+u. Once a bank holds all 64
// coefficients it is read at addresses ZIGZAG[0..63], one per clock, while the
// next block fills the other bank. The document describes this as the second
// transpose memory, read in zig-zag scan order, in front of the quantiser; the
// ping-pong banks are this design's choice.
//
// Interface: in_valid/in_data, out_valid/out_data (W bits), err_overrun as in
// transpose_buffer.
// Timing: read-out of a bank starts in the clock after word START_AT (61) is
// written. Words 62 and 63 (F(6,7), F(7,7)) are read at zig-zag steps 61 and
// 63, so they are in place as long as a block arrives in consecutive clocks,
// which the column DCT guarantees. The DC term then leaves 63 clocks after the
// block's first word came in, the figure the document gives for this memory,
// and a block leaves in 64 consecutive clocks.
module zigzag_scan
  import jpeg_pkg::*;
#(
  parameter int unsigned START_AT = 61,
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         err_overrun
);

  logic [W-1:0] mem [2][64];
  logic [1:0]   full;
  logic         wb, rb;
  logic [5:0]   wa, ra;
  logic         rd_act;

  // the writer is in the last words of bank b in this clock
  function automatic logic early(logic b);
    return in_valid && (wb == b) && (wa >= 6'(START_AT));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full        <= '0;
      wb          <= 1'b0;
      rb          <= 1'b0;
      wa          <= '0;
      ra          <= '0;
      rd_act      <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      err_overrun <= 1'b0;
    end else begin
      logic [1:0] full_n;
      full_n = full;
      // write side: column-major arrival, stored at natural address v*8+u
      if (in_valid) begin
        mem[wb][{wa[2:0], wa[5:3]}] <= in_data;
        if (full[wb]) err_overrun <= 1'b1;
        wa <= wa + 6'd1;
        if (wa == 6'd63) begin
          full_n[wb] = 1'b1;
          wb <= ~wb;
        end
      end
      // read side: a bank may be read once it is full or once its writer has
      // passed word START_AT (early start): zig-zag order
      out_valid <= 1'b0;
      if (rd_act) begin
        out_data  <= mem[rb][ZIGZAG[ra]];
        out_valid <= 1'b1;
        ra <= ra + 6'd1;
        if (ra == 6'd63) begin
          full_n[rb] = 1'b0;
          rb         <= ~rb;
          rd_act     <= full_n[~rb] || early(~rb);
        end
      end else if (full_n[rb] || early(rb)) begin
        rd_act <= 1'b1;
        ra     <= '0;
      end
      full <= full_n;
    end
  end

endmodule
