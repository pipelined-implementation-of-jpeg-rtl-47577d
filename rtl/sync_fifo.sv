// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of type T in a circular array with read and write pointers and
// an occupancy count. The head word is presented combinationally (first-word
// fall-through). A push into a full FIFO is dropped and sets the sticky
// overflow flag. max_level records the highest occupancy seen since reset.
//
// Interface: push/din, pop/dout/empty, full, level, max_level, overflow.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  T                         din,
  input  logic                     pop,
  output T                         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   level,
  output logic [$clog2(DEPTH):0]   max_level,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  T            mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (level == 0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign dout  = mem[rp];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0; max_level <= '0; overflow <= 1'b0;
    end else if (clear) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) begin
        mem[wp] <= din;
        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (push && full) overflow <= 1'b1;
      if (do_pop) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (level > max_level) max_level <= level;
    end
  end

endmodule
