// image_proc_top: reconfigurable image processor.
//
// An 8-bit grey image is streamed in, stored in on-chip RAM and then
// processed by one of three engines chosen by the controlling processor
// over an Avalon-MM register port: a 3x3 median filter (salt-and-pepper
// noise removal), a 3x3 Sobel edge detector, or an 8x8 2-D DCT followed by
// the inverse DCT (compression transform and reconstruction). Results leave
// through a FIFO and the output image controller as a pixel stream; the DCT
// coefficients are also brought out. Engines that are not in use have their
// clocks gated off.
//
// Data path:  in stream -> preproc -> onchip_ram -> proc_ctrl (read order,
// stall) -> proc_block (engines) -> fifo_sync -> out_ctrl -> out stream.
// The block set and their connection follow the paper's processor
// diagram; the soft processor itself is outside, on the avs_* port.
//
// Use: write WIDTH and HEIGHT, stream the frame in (in_sof on its first
// pixel) until STATUS.loaded, write CTRL with the mode and bit 0 set, then
// take width*height pixels from the output port (raster order for median
// and Sobel, 8x8 block order for the DCT mode). STATUS.done marks the end.
// Timing: one pixel per clock in and out; the output may be stalled with
// out_ready, which after the FIFO fills holds back the RAM reads.
module image_proc_top
  import imgproc_pkg::*;
#(
  parameter int unsigned MAX_W      = 256,
  parameter int unsigned MAX_H      = 256,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MARGIN     = 160,
  parameter int unsigned COEF_W     = 12,
  parameter int unsigned XW         = $clog2(MAX_W + 1),
  parameter int unsigned YW         = $clog2(MAX_H + 1),
  parameter int unsigned AW         = $clog2(MAX_W * MAX_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     scan_en,
  // Avalon-MM slave (from the controlling processor)
  input  logic [1:0]               avs_address,
  input  logic                     avs_read,
  input  logic                     avs_write,
  input  logic [31:0]              avs_writedata,
  output logic [31:0]              avs_readdata,
  output logic                     avs_readdatavalid,
  // input image stream
  input  logic                     in_valid,
  input  pixel_t                   in_pix,
  input  logic                     in_sof,
  // output image stream
  output logic                     out_valid,
  output pixel_t                   out_pix,
  output logic                     out_last,
  input  logic                     out_ready,
  // DCT coefficients, one column of an 8x8 block per clock
  output logic                     coef_valid,
  output logic signed [COEF_W-1:0] coef_col [8],
  // status
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned CW  = XW + YW;

  mode_e          mode, run_mode;
  logic [XW-1:0]  width, pix_x;
  logic [YW-1:0]  height, pix_y;
  logic           start, loaded, stall;
  logic           ram_we, ram_re;
  logic [AW-1:0]  ram_waddr, ram_raddr;
  pixel_t         ram_wdata, ram_rdata;
  logic           pix_valid;
  logic           res_valid;
  pixel_t         res_pix;
  logic           fifo_pop, fifo_empty, fifo_full;
  pixel_t         fifo_rdata;
  logic [FCW-1:0] fifo_count;
  logic           frame_done;

  avalon_regs #(.MAX_W(MAX_W), .MAX_H(MAX_H), .XW(XW), .YW(YW)) u_regs (
    .clk, .rst_n,
    .address(avs_address), .read(avs_read), .write(avs_write),
    .writedata(avs_writedata), .readdata(avs_readdata),
    .readdatavalid(avs_readdatavalid),
    .mode, .width, .height, .start, .busy, .done, .loaded
  );

  preproc #(.MAX_W(MAX_W), .MAX_H(MAX_H), .XW(XW), .YW(YW), .AW(AW)) u_pre (
    .clk, .rst_n, .in_valid, .in_pix, .in_sof, .width, .height,
    .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .loaded
  );

  onchip_ram #(.W(PIX_W), .DEPTH(MAX_W * MAX_H), .AW(AW)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  proc_ctrl #(
    .MAX_W(MAX_W), .MAX_H(MAX_H), .FIFO_DEPTH(FIFO_DEPTH), .MARGIN(MARGIN),
    .XW(XW), .YW(YW), .AW(AW), .FCW(FCW)
  ) u_ctrl (
    .clk, .rst_n, .start, .mode, .width, .height, .fifo_count, .frame_done,
    .ram_re, .ram_raddr, .pix_valid, .pix_x, .pix_y, .stall,
    .run_mode, .busy, .done
  );

  proc_block #(.MAX_W(MAX_W), .MAX_H(MAX_H), .COEF_W(COEF_W), .XW(XW), .YW(YW)) u_proc (
    .clk, .rst_n, .active(busy), .mode(run_mode), .width, .height, .scan_en,
    .in_valid(pix_valid), .in_pix(ram_rdata), .in_x(pix_x), .in_y(pix_y),
    .out_valid(res_valid), .out_pix(res_pix), .coef_valid, .coef_col
  );

  fifo_sync #(.W(PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(res_valid), .wdata(res_pix), .pop(fifo_pop),
    .rdata(fifo_rdata), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  out_ctrl #(.CW(CW)) u_out (
    .clk, .rst_n, .start, .total(CW'(width) * CW'(height)),
    .fifo_empty, .fifo_rdata, .fifo_pop,
    .out_valid, .out_pix, .out_last, .out_ready, .frame_done
  );
endmodule
