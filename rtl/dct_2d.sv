// dct_2d: level shifter and separable 8x8 forward DCT.
//
// Pixels arrive one per clock, 64 per block in row-major order. Each is level
// shifted to a signed value by subtracting 2^(P-1) = 128 (P = 8, baseline
// precision). A first 1-D DCT transforms each row; its results (3 fraction
// bits kept) are written row by row into a transpose memory and read back
// column by column into a second 1-D DCT, which produces the integer 2-D
// coefficients F(v,u) = 1/4 C(u) C(v) sum sum s(y,x) cos.. cos.. .
// This row-then-column structure with a transpose memory in between follows
// the document; the word widths and rounding are this design's own.
//
// Interface: in_valid/in_pixel (unsigned 8 bits). out_valid/out_coef (signed
// 12 bits), one block as 8 columns: word w = F(v = w%8, u = w/8).
// Timing: a block leaves in 64 consecutive clocks; its first coefficient
// leaves 84 clocks after its first pixel entered (row DCT 10, transpose 64,
// column DCT 10). err_overrun flags a transpose memory overrun.
module dct_2d
  import jpeg_pkg::*;
#(
  parameter int unsigned P = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [P-1:0]             in_pixel,
  output logic                     out_valid,
  output logic signed [COEF_W-1:0] out_coef,
  output logic                     err_overrun
);

  localparam int unsigned ROW_W = 15;   // row DCT output, 3 fraction bits
  localparam int unsigned FRAC  = 3;

  // level shifter
  logic signed [P-1:0] shifted;
  assign shifted = signed'(in_pixel ^ {1'b1, {(P-1){1'b0}}});   // pixel - 2^(P-1)

  logic                    row_v, tr_v;
  logic signed [ROW_W-1:0] row_d;
  logic [ROW_W-1:0]        tr_d;

  dct_1d #(.IN_W(P), .OUT_W(ROW_W), .SHIFT(DCT_FRAC - FRAC)) u_row (
    .clk, .rst_n,
    .in_valid (in_valid), .in_data (shifted),
    .out_valid(row_v),    .out_data(row_d)
  );

  transpose_buffer #(.W(ROW_W)) u_tr (
    .clk, .rst_n,
    .in_valid (row_v), .in_data (row_d),
    .out_valid(tr_v),  .out_data(tr_d),
    .err_overrun
  );

  dct_1d #(.IN_W(ROW_W), .OUT_W(COEF_W), .SHIFT(DCT_FRAC + FRAC)) u_col (
    .clk, .rst_n,
    .in_valid (tr_v),      .in_data (signed'(tr_d)),
    .out_valid(out_valid), .out_data(out_coef)
  );

endmodule
