// tb_median3x3: random windows, windows with salt-and-pepper impulses and
// windows full of ties; the output must equal the sorted middle value (or
// the centre pixel for border windows) one clock later.
module tb_median3x3;
  import tb_ref_pkg::*;
  import imgproc_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0, border = 0, out_valid;
  pixel_t win [3][3], out_pix;
  int checks = 0, failures = 0, exp_q [$];

  median3x3 dut (.clk, .rst_n, .in_valid, .win, .border, .out_valid, .out_pix);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  always @(posedge clk) begin
    if (out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(out_pix) != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", out_pix, e);
      end
    end
  end

  initial begin
    int v [9];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int kind;
      kind = t % 3;
      for (int i = 0; i < 9; i++) begin
        case (kind)
          0: v[i] = int'($urandom_range(0, 255));
          1: v[i] = ($urandom_range(0, 3) == 0) ? (($urandom_range(0, 1) == 1) ? 255 : 0)
                                                 : int'($urandom_range(90, 110));
          default: v[i] = int'($urandom_range(0, 2)) * 100;
        endcase
        win[i/3][i%3] = pixel_t'(v[i]);
      end
      border = ($urandom_range(0, 9) == 0);
      in_valid = 1;
      exp_q.push_back(border ? v[4] : median9(v));
      @(posedge clk); #1;
      in_valid = ($urandom_range(0, 1) == 1);
      if (!in_valid) begin @(posedge clk); #1; end
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
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
