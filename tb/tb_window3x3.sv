// tb_window3x3: streams random images (extended scan: one extra column and
// row) through the window generator with random gaps. Each emitted window
// must hold the 3x3 neighbourhood of the next centre in raster order, the
// border flag must mark the image edge, and exactly width*height windows
// must appear per image, each one clock after the pixel completing it.
module tb_window3x3;
  import imgproc_pkg::*;
  localparam int MAXW = 16;
  logic clk = 0, rst_n = 1, in_valid = 0, out_valid, border;
  pixel_t in_pix, win [3][3];
  logic [4:0] in_x, width;
  logic [8:0] in_y, height;
  int checks = 0, failures = 0;
  int img [16][16];
  int cx = 0, cy = 0, nout = 0, W, H;

  window3x3 #(.MAX_W(MAXW), .XW(5), .YW(9)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_x, .in_y,
    .width, .height, .out_valid, .win, .border);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  always @(posedge clk) begin
    if (out_valid) begin
      bit eb;
      eb = (cx == 0) || (cx == W-1) || (cy == 0) || (cy == H-1);
      checks++;
      if (border != eb) begin failures++; $display("FAIL border at %0d,%0d", cx, cy); end
      if (!eb) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (int'(win[r][c]) != img[cy-1+r][cx-1+c]) begin
              failures++;
              if (failures < 10) $display("FAIL win %0d%0d at %0d,%0d", r, c, cx, cy);
            end
          end
      end else begin
        checks++;
        if (int'(win[1][1]) != img[cy][cx]) failures++;
      end
      nout++;
      cx++;
      if (cx == W) begin cx = 0; cy++; end
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      W = 3 + t * 4; H = 3 + t * 2 + (t == 3 ? 5 : 0);
      width = 5'(W); height = 9'(H);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = int'($urandom_range(0, 255));
      cx = 0; cy = 0; nout = 0;
      for (int y = 0; y <= H; y++)
        for (int x = 0; x <= W; x++) begin
          in_x = 5'(x); in_y = 9'(y);
          in_pix = pixel_t'(img[(y < H) ? y : H-1][(x < W) ? x : W-1]);
          in_valid = 1;
          @(posedge clk); #1;
          in_valid = 0;
          if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        end
      repeat (3) @(posedge clk); #1;
      checks++;
      if (nout != W * H) begin failures++; $display("FAIL %0d windows for %0dx%0d", nout, W, H); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
