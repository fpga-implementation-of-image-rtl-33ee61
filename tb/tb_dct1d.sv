// tb_dct1d: random and extreme vectors through the 1-D DCT; each output
// vector is compared with the matrix reference and must appear exactly two
// clocks after its input (one vector per clock).
module tb_dct1d;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic signed [8:0]  x [8];
  logic out_valid;
  logic signed [11:0] z [8];
  int checks = 0, failures = 0;
  int exp_q [$];  // eight entries per vector
  int cyc = 0, in_cyc [$];

  dct1d #(.IN_W(9), .OUT_W(12)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .z);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (out_valid) begin
      int e [8];
      for (int n = 0; n < 8; n++) e[n] = exp_q.pop_front();
      checks++;
      if (cyc - in_cyc.pop_front() != 2) begin
        failures++; $display("FAIL latency");
      end
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (int'(z[n]) != e[n]) begin
          failures++;
          if (failures < 10) $display("FAIL z%0d got %0d exp %0d", n, z[n], e[n]);
        end
      end
    end
  end

  task automatic send(input int v [8]);
    int e [8];
    for (int i = 0; i < 8; i++) x[i] = 9'(v[i]);
    in_valid = 1;
    dct8(v, e);
    for (int n = 0; n < 8; n++) exp_q.push_back(e[n]);
    in_cyc.push_back(cyc + 1);
    @(posedge clk); #1;
  endtask

  initial begin
    int v [8];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    v = '{255, 255, 255, 255, 255, 255, 255, 255}; send(v);
    v = '{255, 0, 255, 0, 255, 0, 255, 0};         send(v);
    v = '{-255, 255, -255, 255, 255, -255, 255, -255}; send(v);
    v = '{10, 20, 30, 40, 50, 60, 70, 80};         send(v);
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 8; i++) v[i] = int'($urandom_range(0, 510)) - 255;
      send(v);
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
