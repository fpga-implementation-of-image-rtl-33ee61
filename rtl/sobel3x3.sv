// sobel3x3: Sobel edge detector on a 3x3 window.
//
// Horizontal and vertical gradients use the standard Sobel kernels
//   Gx = (p02 + 2 p12 + p22) - (p00 + 2 p10 + p20)
//   Gy = (p20 + 2 p21 + p22) - (p00 + 2 p01 + p02)
// and the edge strength |Gx| + |Gy| is saturated to 255. Border centres give
// 0. The paper names a Sobel filter for edge detection without further
// detail: kernels, magnitude approximation, saturation and the border rule
// are this design's choice.
//
// Ports: in_valid, win[r][c], border; out_valid, out_pix.
// Timing: one window per clock, output registered, latency 1.
module sobel3x3
  import imgproc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t win [3][3],
  input  logic   border,
  output logic   out_valid,
  output pixel_t out_pix
);
  logic signed [11:0] gx, gy;
  logic        [11:0] mag;

  function automatic logic signed [11:0] px(input pixel_t p);
    return 12'($unsigned(p));
  endfunction

  always_comb begin
    gx = (px(win[0][2]) + (px(win[1][2]) <<< 1) + px(win[2][2]))
       - (px(win[0][0]) + (px(win[1][0]) <<< 1) + px(win[2][0]));
    gy = (px(win[2][0]) + (px(win[2][1]) <<< 1) + px(win[2][2]))
       - (px(win[0][0]) + (px(win[0][1]) <<< 1) + px(win[0][2]));
    mag = 12'(gx < 0 ? -gx : gx) + 12'(gy < 0 ? -gy : gy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pix <= border ? '0 : (mag > 12'd255 ? 8'd255 : mag[7:0]);
    end
  end
endmodule
