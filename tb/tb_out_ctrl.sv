// tb_out_ctrl: a queue stands in for the FIFO; pixels must leave in order
// under random out_ready, out_last must mark pixel number total-1 and
// frame_done must pulse exactly once per frame.
module tb_out_ctrl;
  import imgproc_pkg::*;
  logic clk = 0, rst_n = 1, start = 0, fifo_empty, fifo_pop;
  logic out_valid, out_last, out_ready = 0, frame_done;
  pixel_t fifo_rdata, out_pix;
  logic [7:0] total;
  int checks = 0, failures = 0, q [$], sent = 0, dones = 0, exp_i = 0;
  int src [$];

  out_ctrl #(.CW(8)) dut (.clk, .rst_n, .start, .total, .fifo_empty, .fifo_rdata, .fifo_pop,
    .out_valid, .out_pix, .out_last, .out_ready, .frame_done);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = fifo_empty ? '0 : pixel_t'(q[0]);

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks += 2;
      if (int'(out_pix) != src[exp_i]) failures++;
      if (out_last != (sent == int'(total) - 1)) begin failures++; $display("FAIL last at %0d", sent); end
      exp_i++;
      sent++;
      void'(q.pop_front());
    end
    if (frame_done) dones++;
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  initial begin
    total = 8'd50;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      start = 1; @(posedge clk); #1 start = 0;
      sent = 0;
      for (int i = 0; i < 50; i++) begin
        int v;
        v = int'($urandom_range(0, 255));
        q.push_back(v); src.push_back(v);
        if ($urandom_range(0, 1) == 1) begin @(posedge clk); #1; end
      end
      while (q.size() != 0) @(posedge clk);
      #1;
      checks++;
      if (dones != f + 1) begin failures++; $display("FAIL dones %0d", dones); end
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
