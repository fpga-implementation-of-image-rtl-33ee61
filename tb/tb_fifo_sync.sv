// tb_fifo_sync: random pushes and pops against a queue model; checks data
// order, count, empty and full, including filling it completely.
module tb_fifo_sync;
  logic clk = 0, rst_n = 1, push = 0, pop = 0, empty, full;
  logic [7:0] wdata, rdata;
  logic [4:0] count;
  int checks = 0, failures = 0, q [$], saw_full = 0;

  fifo_sync #(.W(8), .DEPTH(16)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int phase;
      phase = (t / 500) % 2;   // alternately filling and draining
      push = !full && ($urandom_range(0, 3) < (phase ? 1 : 3));
      pop  = !empty && ($urandom_range(0, 3) < (phase ? 3 : 1));
      wdata = 8'($urandom);
      #1;
      checks += 3;
      if (int'(count) != q.size()) begin failures++; $display("FAIL count %0d exp %0d", count, q.size()); end
      if (empty != (q.size() == 0)) failures++;
      if (full != (q.size() == 16)) failures++;
      if (full) saw_full++;
      if (pop) begin
        checks++;
        if (int'(rdata) != q[0]) begin failures++; $display("FAIL data"); end
      end
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(int'(wdata));
      #1;
    end
    checks++;
    if (saw_full == 0) failures++;
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
