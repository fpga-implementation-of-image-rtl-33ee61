// tb_top_harness: end-to-end test bench body for image_proc_top.
//
// Instantiates the processor with its default parameters and acts as the
// controlling processor (Avalon-MM master), the image source and the image
// sink. For each frame it programs the size, streams in a noisy random
// image (10 % salt-and-pepper impulses), starts the selected mode, collects
// width*height result pixels and compares them with reference models:
// 3x3 median and Sobel in raster order, DCT-then-IDCT reconstruction in 8x8
// block order, and every DCT coefficient column. Each run counts the
// mechanisms of the design and fails if one never happened: read stalls on
// a filling FIFO, output back-pressure, mode switches, gated-off engines,
// ping-pong memories written while read, border windows, and a frame load
// restarted by a new start of frame. When the DCT frame size differs from
// the filter frame size, a last Sobel frame runs at the DCT size. With out_ready held high the whole
// frame must take one clock per scanned pixel plus a short pipeline delay.
module tb_top_harness
  import imgproc_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int MW = 32,   // width of the median/Sobel frames
  parameter int MH = 24,
  parameter int DW = 32,   // width of the DCT frames (multiple of 8)
  parameter int DH = 24,
  parameter int BACKPRESSURE = 1
) ();
  logic clk = 0, rst_n = 1;
  logic [1:0] avs_address = 0;
  logic avs_read = 0, avs_write = 0, avs_readdatavalid;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic in_valid = 0, in_sof = 0, out_valid, out_last, out_ready = 1, coef_valid, busy, done;
  pixel_t in_pix, out_pix;
  logic signed [11:0] coef_col [8];

  image_proc_top dut (
    .clk, .rst_n, .scan_en(1'b0),
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata, .avs_readdatavalid,
    .in_valid, .in_pix, .in_sof, .out_valid, .out_pix, .out_last, .out_ready,
    .coef_valid, .coef_col, .busy, .done);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  int checks = 0, failures = 0;
  int img [];                  // img[y*w + x]
  int exp_q [$], coef_q [$];
  int n_out = 0, n_last = 0;
  longint cyc = 0;
  // mechanism counters
  int c_stall = 0, c_backpressure = 0, c_mode_switch = 0, c_gated = 0;
  int c_pp_overlap = 0, c_border = 0, c_restart = 0;
  mode_e last_mode = MODE_MEDIAN;
  bit first_frame = 1;

  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.stall) c_stall++;
    if (out_valid && !out_ready) c_backpressure++;
    if (busy && dut.u_proc.clk_dct == 1'b0 && dut.u_proc.clk_med == 1'b0 &&
        (dut.u_ctrl.run_mode == MODE_SOBEL)) c_gated++;
    if (dut.u_proc.u_dct.u_tp.wr_valid && dut.u_proc.u_dct.u_tp.rd_valid) c_pp_overlap++;
    if (dut.u_proc.win_valid && dut.u_proc.win_border) c_border++;
    if (coef_valid) begin
      for (int k = 0; k < 8; k++) begin
        int e;
        e = coef_q.pop_front();
        checks++;
        if (int'(coef_col[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL coef got %0d exp %0d", coef_col[k], e);
        end
      end
    end
    if (out_valid && out_ready) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(out_pix) != e) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d got %0d exp %0d", n_out, out_pix, e);
      end
      n_out++;
      if (out_last) n_last++;
    end
  end

  task automatic av_write(input logic [1:0] a, input int d);
    @(negedge clk);
    avs_address = a; avs_writedata = 32'(d); avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic av_read(input logic [1:0] a, output int d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = int'(avs_readdata);
    checks++;
    if (!avs_readdatavalid) failures++;
  endtask

  task automatic make_image(input int w, input int h);
    img = new[w * h];
    for (int i = 0; i < w * h; i++) begin
      // smooth gradient with texture and 10 % impulses
      int base;
      base = ((i % w) * 3 + (i / w) * 2 + int'($urandom_range(0, 40))) % 256;
      if ($urandom_range(0, 9) == 0) base = ($urandom_range(0, 1) == 1) ? 255 : 0;
      img[i] = base;
    end
  endtask

  task automatic load_image(input int w, input int h, input bit restart);
    int st;
    av_write(REG_WIDTH, w);
    av_write(REG_HEIGHT, h);
    if (restart) begin
      // a partial frame, abandoned by a new start of frame
      for (int i = 0; i < w; i++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); in_pix = 8'hAA;
      end
      c_restart++;
    end
    for (int i = 0; i < w * h; i++) begin
      @(negedge clk);
      in_valid = 1; in_sof = (i == 0); in_pix = pixel_t'(img[i]);
    end
    @(negedge clk);
    in_valid = 0; in_sof = 0;
    av_read(REG_STATUS, st);
    checks++;
    if (((st >> 2) & 1) != 1) begin failures++; $display("FAIL frame not loaded"); end
  endtask

  task automatic expect_results(input mode_e m, input int w, input int h);
    int v [9], blk [64], z [64], rec [64];
    exp_q = {}; coef_q = {};
    if (m == MODE_DCT) begin
      for (int by = 0; by < h/8; by++)
        for (int bx = 0; bx < w/8; bx++) begin
          for (int i = 0; i < 64; i++) blk[i] = img[(by*8 + i/8) * w + bx*8 + i%8];
          dct2(blk, z);
          idct2_pix(z, rec);
          for (int i = 0; i < 64; i++) exp_q.push_back(rec[i]);
          for (int c = 0; c < 8; c++) for (int k = 0; k < 8; k++) coef_q.push_back(z[k*8+c]);
        end
    end else begin
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          if (x == 0 || y == 0 || x == w-1 || y == h-1) begin
            exp_q.push_back(m == MODE_MEDIAN ? img[y*w + x] : 0);
          end else begin
            for (int i = 0; i < 9; i++) v[i] = img[(y-1 + i/3) * w + x-1 + i%3];
            exp_q.push_back(m == MODE_MEDIAN ? median9(v) : sobel9(v));
          end
        end
    end
  endtask

  task automatic run_frame(input mode_e m, input int w, input int h, input bit bp, input bit restart);
    int st, n0, l0;
    longint t0, t1;
    make_image(w, h);
    load_image(w, h, restart);
    expect_results(m, w, h);
    if (!first_frame && m != last_mode) c_mode_switch++;
    first_frame = 0;
    last_mode = m;
    n0 = n_out; l0 = n_last;
    if (bp) out_ready = 0;
    av_write(REG_CTRL, (int'(m) << 1) | 1);
    t0 = cyc;
    if (bp) begin
      // hold the sink off long enough to fill the FIFO, then throttle it
      repeat (700) @(negedge clk);
      while (n_last == l0) begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 2) != 0);
      end
      out_ready = 1;
    end else begin
      while (n_last == l0) @(posedge clk);
    end
    t1 = cyc;
    repeat (3) @(posedge clk);
    checks += 3;
    if (n_out - n0 != w * h) begin failures++; $display("FAIL %0d pixels out, exp %0d", n_out - n0, w*h); end
    if (exp_q.size() != 0 || coef_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    av_read(REG_STATUS, st);
    if ((st & 3) != 2) begin failures++; $display("FAIL status %0d", st); end
    if (!bp) begin
      // one clock per scanned pixel plus pipeline delay: a few clocks for
      // the window filters, the paced 64-pixel drain of the last block for
      // the DCT
      longint scan;
      scan = (m == MODE_DCT) ? w * h : (w + 1) * (h + 1);
      checks++;
      if (t1 - t0 > longint'(scan + ((m == MODE_DCT) ? 100 : 8))) begin
        failures++; $display("FAIL mode %0d took %0d clocks for %0d reads", m, t1 - t0, scan);
      end
    end
    $display("frame mode %0d %0dx%0d done in %0d clocks", m, w, h, t1 - t0);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %s: %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(MODE_MEDIAN, MW, MH, 0, 1);
    run_frame(MODE_DCT,    DW, DH, 0, 0);
    run_frame(MODE_SOBEL,  MW, MH, 0, 0);
    if (BACKPRESSURE != 0) begin
      run_frame(MODE_DCT,    DW, DH, 1, 0);
      run_frame(MODE_MEDIAN, MW, MH, 1, 0);
    end
    // edge detection on the larger frame size too, when the two differ
    if (DW != MW || DH != MH) run_frame(MODE_SOBEL, DW, DH, 0, 0);
    need("read stall", c_stall);
    need("output back-pressure", c_backpressure);
    need("mode switch", c_mode_switch);
    need("gated-off engine clocks", c_gated);
    need("ping-pong write during read", c_pp_overlap);
    need("border window", c_border);
    need("frame restart", c_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
