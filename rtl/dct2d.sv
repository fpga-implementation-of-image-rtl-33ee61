// dct2d: 8x8 two-dimensional DCT by row-column decomposition.
//
// The first dct1d transforms each input row; its outputs are written row-wise
// into a pingpong_transpose memory. As soon as a bank holds all eight
// transformed rows it is read column-wise, one column per clock, and the
// second dct1d transforms each column, giving column c of the 2-D DCT
// coefficient block Z = C X C^T. While one bank is being read the next
// block's rows are written into the other bank. This is the paper's
// structure (1-D DCT, ping-pong memory, 1-D DCT).
//
// Ports: in_valid/in_row: one row of eight unsigned pixels of a block, rows
// in order 0..7. out_valid/out_col: column c of the coefficient block,
// out_col[k] = Z[k][c], columns in order 0..7 on eight consecutive clocks.
// Timing: rows may arrive on consecutive clocks only if the previous block
// has been read (at least 8 clocks per block of input after the first);
// the last column of a block leaves 2 + 1 + 8 + 2 = 13 clocks after its last
// row enters. Coefficient width OUT_W = 12 holds the full range of 8-bit
// pixels (DC at most 2040); widths are this design's choice.
module dct2d
  import imgproc_pkg::*;
#(
  parameter int unsigned MID_W = 12,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  pixel_t                  in_row [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_col [8]
);
  logic signed [PIX_W:0]      x0 [8];
  logic signed [MID_W-1:0]    r1 [8];
  logic signed [MID_W-1:0]    tc [8];
  logic                       r1_valid, tc_valid;
  logic [1:0]                 full;

  always_comb begin
    for (int i = 0; i < 8; i++) x0[i] = {1'b0, in_row[i]};
  end

  dct1d #(.IN_W(PIX_W + 1), .OUT_W(MID_W)) u_row (
    .clk, .rst_n, .in_valid, .x(x0), .out_valid(r1_valid), .z(r1)
  );

  pingpong_transpose #(.W(MID_W)) u_tp (
    .clk, .rst_n, .wr_valid(r1_valid), .wr_vec(r1),
    .rd_ready(1'b1), .rd_valid(tc_valid), .rd_vec(tc), .full
  );

  dct1d #(.IN_W(MID_W), .OUT_W(OUT_W)) u_col (
    .clk, .rst_n, .in_valid(tc_valid), .x(tc), .out_valid, .z(out_col)
  );
endmodule
