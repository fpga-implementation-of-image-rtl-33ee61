// tb_idct1d: random and extreme coefficient vectors through the 1-D IDCT,
// compared with the transposed-matrix reference; latency must be 2 clocks.
// Also checks that dct then idct returns a vector within 2 of the original.
module tb_idct1d;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic signed [11:0] z [8];
  logic out_valid;
  logic signed [11:0] x [8];
  int checks = 0, failures = 0;
  int exp_q [$];
  int cyc = 0, in_cyc [$];

  idct1d #(.IN_W(12), .OUT_W(12)) dut (.clk, .rst_n, .in_valid, .z, .out_valid, .x);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (cyc - in_cyc.pop_front() != 2) begin failures++; $display("FAIL latency"); end
      for (int m = 0; m < 8; m++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(x[m]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL x%0d got %0d exp %0d", m, x[m], e);
        end
      end
    end
  end

  task automatic send(input int v [8]);
    int e [8];
    for (int i = 0; i < 8; i++) z[i] = 12'(v[i]);
    in_valid = 1;
    idct8(v, e);
    for (int i = 0; i < 8; i++) exp_q.push_back(e[i]);
    in_cyc.push_back(cyc + 1);
    @(posedge clk); #1;
  endtask

  initial begin
    int v [8], zz [8], back [8];
    repeat (2) @(posedge clk); #1 rst_n = 1;
    v = '{717, 0, 0, 0, 0, 0, 0, 0}; send(v);
    v = '{-700, 600, -500, 400, -300, 200, -100, 50}; send(v);
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 8; i++) v[i] = int'($urandom_range(0, 1200)) - 600;
      send(v);
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    // round trip through the reference pair stays close
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 8; i++) v[i] = int'($urandom_range(0, 255));
      dct8(v, zz); idct8(zz, back);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (back[i] - v[i] > 3 || v[i] - back[i] > 3) failures++;
      end
    end
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
