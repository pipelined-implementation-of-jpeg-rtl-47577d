// transpose_buffer: double-buffered 8x8 transpose memory between the row
// DCT and the column DCT.
//
// Two 64-word banks are used in ping-pong. Samples are written in arrival
// order (row by row: address r*8+u for the u-th result of row r). As soon as a
// bank holds a whole block it is read out column by column (addresses u,
// 8+u, ..., 56+u for column u), one word per clock, while the next block is
// written into the other bank. The document places a transpose memory between
// the two 1-D DCTs and shows it taking 64 clocks; the ping-pong organisation
// is this design's choice to keep the pipeline running at one sample per
// clock.
//
// Interface: in_valid/in_data, out_valid/out_data, W-bit words.
// Timing: read-out of a bank starts in the clock after word START_AT (62) of
// it is written, without waiting for the last word: in column order word 63
// is read last and word 62 at step 55, so both are in place in time. A block
// written in consecutive clocks therefore leaves 64 clocks after its first
// word came in, as in the document's timing (transpose array, 64 clocks), and
// is read in 64 consecutive clocks. The writer must
// not complete a third block while two are waiting (err_overrun is raised if
// it writes into a bank that still holds an unread block).
module transpose_buffer #(
  parameter int unsigned START_AT = 62,
  parameter int unsigned W = 15
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
      // write side
      if (in_valid) begin
        mem[wb][wa] <= in_data;
        if (full[wb]) err_overrun <= 1'b1;
        wa <= wa + 6'd1;
        if (wa == 6'd63) begin
          full_n[wb] = 1'b1;
          wb <= ~wb;
        end
      end
      // read side: a bank may be read once it is full or once its writer has
      // passed word START_AT (early start); column-major order
      out_valid <= 1'b0;
      if (rd_act) begin
        out_data  <= mem[rb][{ra[2:0], ra[5:3]}];
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
