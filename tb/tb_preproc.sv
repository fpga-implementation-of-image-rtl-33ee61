// tb_preproc: streams two frames of different sizes (with gaps and with a
// restart in the middle of a frame) and checks every RAM write address and
// datum, and when `loaded` rises.
module tb_preproc;
  import imgproc_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0, in_sof = 0, we, loaded;
  pixel_t in_pix, wdata;
  logic [4:0] width;
  logic [4:0] height;
  logic [7:0] waddr;
  int checks = 0, failures = 0;

  preproc #(.MAX_W(16), .MAX_H(16), .XW(5), .YW(5), .AW(8)) dut (
    .clk, .rst_n, .in_valid, .in_pix, .in_sof, .width, .height, .we, .waddr, .wdata, .loaded);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  task automatic frame(input int W, input int H, input int abort_at);
    width = 5'(W); height = 5'(H);
    for (int i = 0; i < W * H; i++) begin
      if (i == abort_at) return;
      in_valid = 1; in_sof = (i == 0); in_pix = 8'($urandom);
      #1;
      checks += 3;
      if (!we) failures++;
      if (int'(waddr) != (i / W) * 16 + (i % W)) begin
        failures++; $display("FAIL addr %0d exp %0d", waddr, (i / W) * 16 + (i % W));
      end
      if (wdata != in_pix) failures++;
      @(posedge clk); #1;
      in_valid = 0; in_sof = 0;
      checks++;
      if (loaded != (i == W * H - 1)) begin failures++; $display("FAIL loaded at %0d", i); end
      if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // pixels before any start of frame are ignored
    in_valid = 1; in_pix = 8'd7; #1;
    checks++; if (we) failures++;
    @(posedge clk); #1 in_valid = 0;
    frame(7, 5, 20);        // restarted after 20 pixels
    frame(7, 5, -1);
    frame(16, 3, -1);
    // after a complete frame, extra pixels are not written
    in_valid = 1; #1;
    checks++; if (we) failures++;
    @(posedge clk); #1 in_valid = 0;
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
