// tb_clock_gate: counts gated clock edges against the enable pattern
// (changed in both clock phases), checks that the gated clock never rises
// while disabled and that test_en forces it on.
module tb_clock_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  int checks = 0, failures = 0, gedges = 0, exp_edges = 0;
  logic en_at_fall;

  clock_gate dut (.clk, .en, .test_en, .gclk);
  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;
  // the enable seen at a rising edge is the one present while clk was low
  always @(negedge clk) #4 en_at_fall = en | test_en;
  always @(posedge clk) if (en_at_fall) exp_edges++;

  initial begin
    en_at_fall = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      #($urandom_range(1, 3)) en = ($urandom_range(0, 1) == 1);
      if (t > 300) test_en = 1;
      @(posedge clk);
      #1;
      // a change during the high phase must not produce an extra edge
      if ($urandom_range(0, 1) == 1) en = ~en;
      checks++;
      if (gclk != en_at_fall) failures++;
    end
    checks++;
    if (gedges != exp_edges) begin failures++; $display("FAIL edges %0d exp %0d", gedges, exp_edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
