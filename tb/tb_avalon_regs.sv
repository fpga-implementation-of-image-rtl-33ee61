// tb_avalon_regs: Avalon-MM writes and reads of every register: reset
// values, mode and size write-back, a one-clock start pulse, start ignored
// while busy, status bits, and readdatavalid one clock after read.
module tb_avalon_regs;
  import imgproc_pkg::*;
  logic clk = 0, rst_n = 1, read = 0, write = 0, readdatavalid, start;
  logic busy = 0, done = 0, loaded = 0;
  logic [1:0] address = 0;
  logic [31:0] writedata = 0, readdata;
  mode_e mode;
  logic [8:0] width, height;
  int checks = 0, failures = 0, starts = 0;

  avalon_regs dut (.clk, .rst_n, .address, .read, .write, .writedata, .readdata, .readdatavalid,
    .mode, .width, .height, .start, .busy, .done, .loaded);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge resets every register, also those on gated clocks
  always @(posedge clk) if (start) starts++;

  task automatic wr(input int a, input int d);
    address = 2'(a); writedata = 32'(d); write = 1;
    @(posedge clk); #1 write = 0;
  endtask

  task automatic rd(input int a, input int exp_v);
    address = 2'(a); read = 1;
    @(posedge clk); #1 read = 0;
    checks += 2;
    if (!readdatavalid) failures++;
    if (int'(readdata) != exp_v) begin failures++; $display("FAIL reg %0d got %0d exp %0d", a, readdata, exp_v); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    rd(1, 256); rd(2, 256); rd(0, 0);
    wr(1, 180); wr(2, 180);
    rd(1, 180); rd(2, 180);
    checks += 2;
    if (width != 9'd180 || height != 9'd180) failures++;
    wr(0, 32'b101);   // mode 2, start
    @(posedge clk); #1;
    checks += 2;
    if (mode != MODE_DCT) failures++;
    if (starts != 1) failures++;
    rd(0, 4);
    busy = 1;
    wr(0, 32'b011);   // start while busy: mode changes, no start
    @(posedge clk); #1;
    checks += 2;
    if (starts != 1) failures++;
    if (mode != MODE_SOBEL) failures++;
    busy = 0; done = 1; loaded = 1;
    rd(3, 6);
    busy = 1; done = 0; loaded = 0;
    rd(3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
