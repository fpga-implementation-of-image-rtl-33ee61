// tb_pingpong_transpose: writes blocks of rows and reads them back as
// columns, with reads throttled at random, while the next block is being
// written into the other bank. Every column word must be the transposed
// word of the written block, in block order.
module tb_pingpong_transpose;
  logic clk = 0, rst_n = 1;
  logic wr_valid = 0, rd_ready = 0, rd_valid;
  logic signed [11:0] wr_vec [8], rd_vec [8];
  logic [1:0] full;
  int checks = 0, failures = 0;
  int blk [$];          // written words, 64 per block, row-major
  int nblk_rd = 0, col = 0;
  int concurrent = 0;

  pingpong_transpose #(.W(12)) dut (.clk, .rst_n, .wr_valid, .wr_vec, .rd_ready,
                                    .rd_valid, .rd_vec, .full);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  always @(posedge clk) begin
    if (wr_valid && rd_ready && (full != 0)) concurrent++;
    if (rd_valid) begin
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (int'(rd_vec[r]) != blk[nblk_rd*64 + r*8 + col]) begin
          failures++;
          if (failures < 10) $display("FAIL blk %0d col %0d row %0d got %0d exp %0d",
                                      nblk_rd, col, r, rd_vec[r], blk[nblk_rd*64 + r*8 + col]);
        end
      end
      col = col + 1;
      if (col == 8) begin col = 0; nblk_rd++; end
    end
  end

  // reader: random throttling
  always @(negedge clk) rd_ready = ($urandom_range(0, 3) != 0);

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      for (int r = 0; r < 8; r++) begin
        // wait while the target bank is still full
        while (full[b % 2]) begin wr_valid = 0; @(posedge clk); #1; end
        for (int c = 0; c < 8; c++) begin
          int v;
          v = int'($urandom_range(0, 4095)) - 2048;
          wr_vec[c] = 12'(v);
          blk.push_back(v);
        end
        wr_valid = 1;
        @(posedge clk); #1;
        wr_valid = 0;
        if ($urandom_range(0, 1) == 1) begin @(posedge clk); #1; end
      end
    end
    wr_valid = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (nblk_rd != 20) begin failures++; $display("FAIL read %0d blocks", nblk_rd); end
    checks++;
    if (concurrent == 0) begin failures++; $display("FAIL never wrote and read together"); end
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
