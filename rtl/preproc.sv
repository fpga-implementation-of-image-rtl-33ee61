// preproc: input image controller (pre-processing unit).
//
// Accepts the incoming image as a raster stream of 8-bit pixels and stores
// it in the on-chip RAM, pixel (x, y) at address y * MAX_W + x. A pixel
// flagged in_sof restarts the frame at (0, 0). After width*height pixels the
// frame is complete and `loaded` is set until the next in_sof. Noise
// injection and resizing of the picture happen before this unit, in host
// software, as in the paper; this unit only loads the frame. The stream
// format and the address layout are this design's choice.
//
// Ports: in_valid, in_pix, in_sof; width, height; RAM write port we, waddr,
// wdata; loaded. Timing: one pixel per clock, no back-pressure, RAM write in
// the same clock as the pixel is accepted.
module preproc
  import imgproc_pkg::*;
#(
  parameter int unsigned MAX_W = 256,
  parameter int unsigned MAX_H = 256,
  parameter int unsigned XW    = $clog2(MAX_W + 1),
  parameter int unsigned YW    = $clog2(MAX_H + 1),
  parameter int unsigned AW    = $clog2(MAX_W * MAX_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  pixel_t        in_pix,
  input  logic          in_sof,
  input  logic [XW-1:0] width,
  input  logic [YW-1:0] height,
  output logic          we,
  output logic [AW-1:0] waddr,
  output pixel_t        wdata,
  output logic          loaded
);
  logic [XW-1:0] x, cur_x;
  logic [YW-1:0] y, cur_y;
  logic          active;

  // Position of the current pixel: a start-of-frame pixel goes to (0, 0).
  assign cur_x = in_sof ? '0 : x;
  assign cur_y = in_sof ? '0 : y;
  assign we    = in_valid && (in_sof || active);
  assign waddr = AW'(cur_y) * AW'(MAX_W) + AW'(cur_x);
  assign wdata = in_pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x      <= '0;
      y      <= '0;
      active <= 1'b0;
      loaded <= 1'b0;
    end else if (we) begin
      if (in_sof) loaded <= 1'b0;
      if (cur_x == width - XW'(1)) begin
        x <= '0;
        y <= cur_y + YW'(1);
        if (cur_y == height - YW'(1)) begin
          active <= 1'b0;
          loaded <= 1'b1;
        end else begin
          active <= 1'b1;
        end
      end else begin
        x      <= cur_x + XW'(1);
        y      <= cur_y;
        active <= 1'b1;
      end
    end
  end
endmodule
