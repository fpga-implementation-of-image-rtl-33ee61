// tb_dct2d: random 8x8 pixel blocks (plus a flat white and a checkerboard
// block) through the 2-D DCT, rows sent back to back and with gaps. Every
// output column is compared with the reference row-column transform, and the
// last column of each block must leave 13 clocks after the block's last row.
module tb_dct2d;
  import tb_ref_pkg::*;
  import imgproc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  pixel_t in_row [8];
  logic out_valid;
  logic signed [11:0] out_col [8];
  int checks = 0, failures = 0;
  int exp_q [$];        // 64 per block, column-major (column c, then k)
  int last_in [$];
  int cyc = 0, col = 0;

  dct2d dut (.clk, .rst_n, .in_valid, .in_row, .out_valid, .out_col);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (out_valid) begin
      for (int k = 0; k < 8; k++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(out_col[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL col %0d k %0d got %0d exp %0d", col, k, out_col[k], e);
        end
      end
      col++;
      if (col == 8) begin
        int t0;
        t0 = last_in.pop_front();
        col = 0;
        checks++;
        if (cyc - t0 != 13) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      end
    end
  end

  task automatic send_block(input int x [64], input bit gaps);
    int y [64], z [64], v [8], o [8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = x[r*8+c];
      dct8(v, o);
      for (int c = 0; c < 8; c++) y[r*8+c] = o[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = y[r*8+c];
      dct8(v, o);
      for (int k = 0; k < 8; k++) exp_q.push_back(o[k]);
    end
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) in_row[c] = pixel_t'(x[r*8+c]);
      in_valid = 1;
      @(posedge clk); #1;
      if (r == 7) last_in.push_back(cyc);
      in_valid = 0;
      if (gaps) repeat (7) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int x [64];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 64; i++) x[i] = 255;
    send_block(x, 1);
    for (int i = 0; i < 64; i++) x[i] = (((i / 8) + (i % 8)) % 2) ? 255 : 0;
    send_block(x, 1);
    for (int b = 0; b < 30; b++) begin
      for (int i = 0; i < 64; i++) x[i] = int'($urandom_range(0, 255));
      send_block(x, (b % 3) != 0);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
