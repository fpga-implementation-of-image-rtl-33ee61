// onchip_ram: on-chip image memory.
//
// Simple dual-port RAM holding one 8-bit image: one write port used by the
// input image controller and one read port used by the processing
// controller. Pixel (x, y) lives at address y * MAX_W + x, so the address is
// the concatenation {y, x} when MAX_W is a power of two. Written as an array
// so that synthesis maps it onto block RAM. The paper names an on-chip
// RAM between pre-processing and the processing block; size and ports are
// this design's choice (256x256 pixels, the largest image the paper
// processes).
//
// Ports: we/waddr/wdata (write), re/raddr (read), rdata (registered).
// Timing: read latency 1; a read of the address being written returns the
// old contents.
module onchip_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
