// avalon_regs: Avalon-MM slave with the processor's control registers.
//
// The controlling soft processor reaches the image processor over the
// Avalon bus. Word addresses (imgproc_pkg):
//   0 CTRL   write: bit 0 = 1 starts a frame, bits 2:1 select the mode
//            (0 median, 1 Sobel, 2 DCT/IDCT); read: mode in bits 2:1
//   1 WIDTH  image width in pixels (reset MAX_W)
//   2 HEIGHT image height in pixels (reset MAX_H)
//   3 STATUS read only: bit 0 busy, bit 1 done, bit 2 frame loaded
// Changing the mode between frames is how the processing module is
// reconfigured. The paper names the Avalon bus only; the register map is
// this design's choice.
//
// Ports: Avalon-MM slave address, read, write, writedata, readdata,
// readdatavalid (fixed read latency 1, no wait states); register outputs
// mode, width, height, start (one-clock pulse); status inputs busy, done,
// loaded.
module avalon_regs
  import imgproc_pkg::*;
#(
  parameter int unsigned MAX_W = 256,
  parameter int unsigned MAX_H = 256,
  parameter int unsigned XW    = $clog2(MAX_W + 1),
  parameter int unsigned YW    = $clog2(MAX_H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    address,
  input  logic          read,
  input  logic          write,
  input  logic [31:0]   writedata,
  output logic [31:0]   readdata,
  output logic          readdatavalid,
  output mode_e         mode,
  output logic [XW-1:0] width,
  output logic [YW-1:0] height,
  output logic          start,
  input  logic          busy,
  input  logic          done,
  input  logic          loaded
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode          <= MODE_MEDIAN;
      width         <= XW'(MAX_W);
      height        <= YW'(MAX_H);
      start         <= 1'b0;
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      start         <= 1'b0;
      readdatavalid <= read;
      if (write) begin
        case (address)
          REG_CTRL: begin
            mode  <= mode_e'(writedata[2:1]);
            start <= writedata[0] && !busy;
          end
          REG_WIDTH:  width  <= writedata[XW-1:0];
          REG_HEIGHT: height <= writedata[YW-1:0];
          default: ;
        endcase
      end
      if (read) begin
        case (address)
          REG_CTRL:   readdata <= 32'({mode, 1'b0});
          REG_WIDTH:  readdata <= 32'(width);
          REG_HEIGHT: readdata <= 32'(height);
          default:    readdata <= 32'({loaded, done, busy});
        endcase
      end
    end
  end
endmodule
