// quant_table: the two quantisation tables (luminance, chrominance).
//
// 2 x 64 entries of 8 bits, stored in zig-zag order, the order in which the
// quantiser consumes coefficients and in which a DQT segment lists them.
// Reset loads the example tables of the JPEG standard (Annex K, quality 50);
// software may overwrite any entry through the write port. A zero written to
// an entry is stored as 1, since a quantiser step of zero is not allowed.
// Two asynchronous read ports serve the quantiser and the header generator.
//
// The document shows a quantisation table feeding the quantiser and says
// applications may choose the values; its contents, the write port and the
// reset values are this design's choices.
module quant_table
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // write port
  input  logic       wr_en,
  input  logic       wr_chroma,
  input  logic [5:0] wr_addr,     // zig-zag position
  input  logic [7:0] wr_data,
  // read port A (quantiser)
  input  logic       a_chroma,
  input  logic [5:0] a_addr,
  output logic [7:0] a_data,
  // read port B (header)
  input  logic       b_chroma,
  input  logic [5:0] b_addr,
  output logic [7:0] b_data
);

  logic [7:0] tab [2][64];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < 2; t++)
        for (int i = 0; i < 64; i++)
          tab[t][i] <= qt_default(t[0], i);
    end else if (wr_en) begin
      tab[wr_chroma][wr_addr] <= (wr_data == 8'd0) ? 8'd1 : wr_data;
    end
  end

  assign a_data = tab[a_chroma][a_addr];
  assign b_data = tab[b_chroma][b_addr];

endmodule
