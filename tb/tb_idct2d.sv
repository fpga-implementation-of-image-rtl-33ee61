// tb_idct2d: coefficient blocks of random pixel blocks (computed with the
// reference forward transform) are fed column by column into the 2-D IDCT,
// rows are requested with a random out_ready. Each reconstructed row is
// compared with the reference inverse transform, must leave 3 clocks after
// its request, and must be within 8 of the original pixels
// (the 8-bit basis d = 45/128 gives a DC gain of 0.989 per round trip).
module tb_idct2d;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, out_ready = 0, out_valid;
  logic signed [11:0] in_col [8], out_row [8];
  int checks = 0, failures = 0;
  int exp_q [$], pix_q [$], req_q [$];
  int cyc = 0, rows = 0;

  idct2d dut (.clk, .rst_n, .in_valid, .in_col, .out_ready, .out_valid, .out_row);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks
  always @(posedge clk) cyc++;

  // a request is accepted when out_ready is high and a block is complete
  always @(posedge clk) if (out_ready && dut.u_tp.full[dut.u_tp.rd_bank]) req_q.push_back(cyc);
  always @(negedge clk) out_ready = ($urandom_range(0, 2) == 0);

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (cyc - req_q.pop_front() != 3) begin failures++; $display("FAIL latency"); end
      for (int c = 0; c < 8; c++) begin
        int e, p;
        e = exp_q.pop_front();
        p = pix_q.pop_front();
        checks += 2;
        if (int'(out_row[c]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d c %0d got %0d exp %0d", rows, c, out_row[c], e);
        end
        if (int'(out_row[c]) - p > 8 || p - int'(out_row[c]) > 8) begin failures++; if (failures < 20) $display("FAIL err got %0d pix %0d", out_row[c], p); end
      end
      rows++;
    end
  end

  initial begin
    int x [64], y [64], z [64], w [64], v [8], o [8];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 24; b++) begin
      for (int i = 0; i < 64; i++) x[i] = int'($urandom_range(0, 255));
      if (b == 0) for (int i = 0; i < 64; i++) x[i] = 255;
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) v[c] = x[r*8+c];
        dct8(v, o);
        for (int c = 0; c < 8; c++) y[r*8+c] = o[c];
      end
      for (int c = 0; c < 8; c++) begin
        for (int r = 0; r < 8; r++) v[r] = y[r*8+c];
        dct8(v, o);
        for (int k = 0; k < 8; k++) z[k*8+c] = o[k];
      end
      // reference inverse: columns then rows
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 8; k++) v[k] = z[k*8+c];
        idct8(v, o);
        for (int r = 0; r < 8; r++) w[r*8+c] = o[r];
      end
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) v[c] = w[r*8+c];
        idct8(v, o);
        for (int c = 0; c < 8; c++) begin exp_q.push_back(o[c]); pix_q.push_back(x[r*8+c]); end
      end
      // wait for a free bank, then send 8 columns back to back
      while (dut.u_tp.full[b % 2]) @(posedge clk);
      #1;
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 8; k++) in_col[k] = 12'(z[k*8+c]);
        in_valid = 1;
        @(posedge clk); #1;
      end
      in_valid = 0;
      repeat (3) @(posedge clk);
      #1;
    end
    repeat (400) @(posedge clk);
    checks++;
    if (rows != 24*8) begin failures++; $display("FAIL rows %0d", rows); end
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
