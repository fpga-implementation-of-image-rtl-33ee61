// window3x3: 3x3 neighbourhood generator for a raster pixel stream.
//
// Pixels arrive in raster order with their coordinates. Two line buffers keep
// the previous two rows; with each pixel at (x, y) the column
// {row y-2, row y-1, row y} at x is shifted into a 3x3 register window, whose
// centre is then pixel (x-1, y-1). The producer sends one extra column
// (x = width) and one extra row (y = height) so that every pixel of the image
// becomes a centre exactly once: a window is emitted for every input with
// x >= 1 and y >= 1, giving width*height windows. Centres on the image border
// are flagged (border = 1); their window contents are not meaningful and the
// filters treat them specially. The line-buffer scheme and the border rule
// are this design's choice; the paper names only a pipelined computation
// unit.
//
// Ports: in_valid, in_pix, in_x, in_y (coordinates in the extended scan,
// 0..width and 0..height), width, height (image size, >= 3).
// out_valid, win[r][c] (r = 0 top row, c = 0 left column), border.
// Timing: one pixel per clock, window registered, latency 1.
module window3x3
  import imgproc_pkg::*;
#(
  parameter int unsigned MAX_W = 256,
  parameter int unsigned XW    = $clog2(MAX_W + 1),
  parameter int unsigned YW    = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  pixel_t        in_pix,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [XW-1:0] width,
  input  logic [YW-1:0] height,
  output logic          out_valid,
  output pixel_t        win [3][3],
  output logic          border
);
  pixel_t lb1 [MAX_W+1];   // row y-1
  pixel_t lb2 [MAX_W+1];   // row y-2
  pixel_t up1, up2;

  assign up1 = lb1[in_x];
  assign up2 = lb2[in_x];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb1[in_x] <= in_pix;
      lb2[in_x] <= up1;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= up2;
      win[1][2] <= up1;
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      border    <= 1'b0;
    end else begin
      out_valid <= in_valid && (in_x != '0) && (in_y != '0);
      border    <= (in_x == XW'(1)) || (in_x == width) ||
                   (in_y == YW'(1)) || (in_y == height);
    end
  end
endmodule
