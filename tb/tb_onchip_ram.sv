// tb_onchip_ram: writes random data to random addresses while reading
// others, checking every read one clock later against a model, including
// read-during-write of the same address (old data).
module tb_onchip_ram;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;
  int model [1024];
  int exp_v, pending = 0;

  onchip_ram #(.W(8), .DEPTH(1024)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 1024; a++) begin
      we = 1; waddr = 10'(a); wdata = 8'($urandom); model[a] = int'(wdata);
      @(posedge clk); #1;
    end
    for (int t = 0; t < 5000; t++) begin
      we = ($urandom_range(0, 1) == 1);
      waddr = 10'($urandom); wdata = 8'($urandom);
      re = ($urandom_range(0, 3) != 0);
      raddr = ($urandom_range(0, 7) == 0) ? waddr : 10'($urandom);
      if (re) exp_v = model[raddr];
      pending = re;
      @(posedge clk);
      if (we) model[waddr] = int'(wdata);
      #1;
      if (pending) begin
        checks++;
        if (int'(rdata) != exp_v) begin failures++; $display("FAIL rd %0d got %0d exp %0d", raddr, rdata, exp_v); end
      end
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
