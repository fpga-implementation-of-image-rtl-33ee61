// tb_proc_block: drives the processing module the way the controller does
// (one pixel per clock with random gaps) on random 16x16 images in each
// mode and compares the result stream with reference models: the median and
// Sobel of every pixel's neighbourhood in raster order, and the clamped
// DCT-then-IDCT reconstruction of every 8x8 block in block order. The DCT
// coefficient columns are checked too. Also checks that the clocks of the
// engines not in use never tick.
module tb_proc_block;
  import imgproc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 16, H = 16;
  logic clk = 0, rst_n = 1, active = 0, in_valid = 0, out_valid, coef_valid;
  mode_e mode;
  logic [4:0] width, height, in_x, in_y;
  pixel_t in_pix, out_pix;
  logic signed [11:0] coef_col [8];
  int checks = 0, failures = 0;
  int img [H][W];
  int exp_q [$], coef_q [$];
  int med_edges = 0, sob_edges = 0, dct_edges = 0;

  proc_block #(.MAX_W(W), .MAX_H(H), .XW(5), .YW(5)) dut (
    .clk, .rst_n, .active, .mode, .width, .height, .scan_en(1'b0),
    .in_valid, .in_pix, .in_x, .in_y, .out_valid, .out_pix, .coef_valid, .coef_col);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks
  always @(posedge dut.clk_med) med_edges++;
  always @(posedge dut.clk_sob) sob_edges++;
  always @(posedge dut.clk_dct) dct_edges++;

  always @(posedge clk) begin
    if (out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(out_pix) != e) begin
        failures++;
        if (failures < 10) $display("FAIL mode %0d got %0d exp %0d", mode, out_pix, e);
      end
    end
    if (coef_valid) begin
      for (int k = 0; k < 8; k++) begin
        int e;
        e = coef_q.pop_front();
        checks++;
        if (int'(coef_col[k]) != e) failures++;
      end
    end
  end

  task automatic send(input int x, input int y);
    in_x = 5'(x); in_y = 5'(y);
    in_pix = pixel_t'(img[(y < H) ? y : H-1][(x < W) ? x : W-1]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
  endtask

  task automatic run(input mode_e m);
    int v [9], blk [64], z [64], rec [64];
    mode = m;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = ($urandom_range(0, 9) == 0) ? 255 * int'($urandom_range(0, 1))
                                                : int'($urandom_range(60, 200));
    if (m == MODE_DCT) begin
      for (int by = 0; by < H/8; by++)
        for (int bx = 0; bx < W/8; bx++) begin
          for (int i = 0; i < 64; i++) blk[i] = img[by*8 + i/8][bx*8 + i%8];
          dct2(blk, z);
          idct2_pix(z, rec);
          for (int i = 0; i < 64; i++) exp_q.push_back(rec[i]);
          for (int c = 0; c < 8; c++) for (int k = 0; k < 8; k++) coef_q.push_back(z[k*8+c]);
        end
    end else begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (x == 0 || y == 0 || x == W-1 || y == H-1) begin
            exp_q.push_back(m == MODE_MEDIAN ? img[y][x] : 0);
          end else begin
            for (int i = 0; i < 9; i++) v[i] = img[y-1 + i/3][x-1 + i%3];
            exp_q.push_back(m == MODE_MEDIAN ? median9(v) : sobel9(v));
          end
        end
    end
    active = 1;
    @(posedge clk); #1;
    if (m == MODE_DCT) begin
      for (int by = 0; by < H/8; by++)
        for (int bx = 0; bx < W/8; bx++)
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) send(bx*8+c, by*8+r);
    end else begin
      for (int y = 0; y <= H; y++)
        for (int x = 0; x <= W; x++) send(x, y);
    end
    repeat (200) @(posedge clk);
    #1;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    active = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    width = 5'(W); height = 5'(H);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(MODE_MEDIAN);
    checks += 3;
    if (med_edges == 0 || sob_edges != 0 || dct_edges != 0) failures++;
    run(MODE_SOBEL);
    if (sob_edges == 0 || dct_edges != 0) failures++;
    run(MODE_DCT);
    if (dct_edges == 0) failures++;
    run(MODE_MEDIAN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
