// idct2d: 8x8 two-dimensional inverse DCT by column-row decomposition.
//
// Takes a coefficient block column by column, as dct2d delivers it. The
// first idct1d transforms each column (giving a column of C^T Z); the result
// is written into a pingpong_transpose memory and read back transposed, one
// row per read, and the second idct1d turns each row into a row of the
// reconstructed block X = C^T Z C. The paper says only that the DCT
// coefficients are fed to an IDCT that returns the spatial data; this
// structure mirrors dct2d and is this design's choice.
//
// Ports: in_valid/in_col: column c of a coefficient block, c = 0..7.
// out_ready: the consumer can take a row (one row is read per clock while it
// is high and a block is complete), out_valid/out_row: a reconstructed row,
// signed (clamping to the pixel range is left to the consumer).
// Timing: a row leaves 3 clocks after out_ready accepted it
// (1 memory read + 2 idct1d stages).
module idct2d
  import imgproc_pkg::*;
#(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned MID_W = 12,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_col [8],
  input  logic                    out_ready,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_row [8]
);
  logic signed [MID_W-1:0] c1 [8];
  logic signed [MID_W-1:0] tr [8];
  logic                    c1_valid, tr_valid;
  logic [1:0]              full;

  idct1d #(.IN_W(IN_W), .OUT_W(MID_W)) u_col (
    .clk, .rst_n, .in_valid, .z(in_col), .out_valid(c1_valid), .x(c1)
  );

  pingpong_transpose #(.W(MID_W)) u_tp (
    .clk, .rst_n, .wr_valid(c1_valid), .wr_vec(c1),
    .rd_ready(out_ready), .rd_valid(tr_valid), .rd_vec(tr), .full
  );

  idct1d #(.IN_W(MID_W), .OUT_W(OUT_W)) u_row (
    .clk, .rst_n, .in_valid(tr_valid), .z(tr), .out_valid, .x(out_row)
  );
endmodule
