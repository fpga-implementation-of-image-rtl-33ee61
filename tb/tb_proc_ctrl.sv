// tb_proc_ctrl: runs the controller in each mode on a 12x10 image (16x16
// memory) with a random FIFO occupancy. Checks the RAM read address
// sequence (extended raster scan for the window filters, 8x8 block order for
// the DCT), that pix_valid/pix_x/pix_y follow each read by one clock, that
// reads stop exactly when the FIFO lacks MARGIN free entries, and the
// busy/done handshake with frame_done.
module tb_proc_ctrl;
  import imgproc_pkg::*;
  localparam int W = 16, H = 16;
  logic clk = 0, rst_n = 1, start = 0, frame_done = 0;
  mode_e mode;
  logic [4:0] width, height, pix_x;
  logic [4:0] pix_y;
  logic [6:0] fifo_count = 0;
  logic ram_re, pix_valid, stall, busy, done;
  logic [7:0] ram_raddr;
  mode_e run_mode;
  int checks = 0, failures = 0, stalls = 0;
  int exp_a [$], exp_x [$], exp_y [$];
  int last_x, last_y, last_re = 0;

  proc_ctrl #(.MAX_W(W), .MAX_H(H), .FIFO_DEPTH(64), .MARGIN(20), .XW(5), .YW(5), .AW(8), .FCW(7)) dut (
    .clk, .rst_n, .start, .mode, .width, .height, .fifo_count, .frame_done,
    .ram_re, .ram_raddr, .pix_valid, .pix_x, .pix_y, .stall, .run_mode, .busy, .done);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  always @(negedge clk) fifo_count = 7'($urandom_range(30, 50));

  always @(posedge clk) begin
    if (pix_valid) begin
      checks += 2;
      if (!last_re) failures++;
      if (int'(pix_x) != last_x || int'(pix_y) != last_y) failures++;
    end
    last_re = 0;
    if (busy && run_mode == mode) begin
      if (ram_re || stall) begin
        checks += 2;
        if (ram_re != (64 - int'(fifo_count) >= 20)) failures++;
        if (stall == ram_re) failures++;
      end
      if (stall) stalls++;
      if (ram_re) begin
        int a, x, y;
        a = exp_a.pop_front(); x = exp_x.pop_front(); y = exp_y.pop_front();
        checks++;
        if (int'(ram_raddr) != a) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d exp %0d", ram_raddr, a);
        end
        last_re = 1; last_x = x; last_y = y;
      end
    end
  end

  task automatic run(input mode_e m, input int iw, input int ih);
    width = 5'(iw); height = 5'(ih); mode = m;
    exp_a = {}; exp_x = {}; exp_y = {};
    if (m == MODE_DCT) begin
      for (int by = 0; by < ih / 8; by++)
        for (int bx = 0; bx < iw / 8; bx++)
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              exp_x.push_back(bx*8+c); exp_y.push_back(by*8+r);
              exp_a.push_back((by*8+r) * W + bx*8+c);
            end
    end else begin
      for (int y = 0; y <= ih; y++)
        for (int x = 0; x <= iw; x++) begin
          exp_x.push_back(x); exp_y.push_back(y);
          exp_a.push_back(((y < ih) ? y : ih-1) * W + ((x < iw) ? x : iw-1));
        end
    end
    start = 1; @(posedge clk); #1 start = 0;
    while (exp_a.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    #1;
    checks += 2;
    if (!busy || done) failures++;
    frame_done = 1; @(posedge clk); #1 frame_done = 0;
    if (busy || !done) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(MODE_MEDIAN, 12, 10);
    run(MODE_SOBEL, 5, 3);
    run(MODE_DCT, 16, 8);
    run(MODE_DCT, 8, 16);
    checks++;
    if (stalls == 0) failures++;
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
