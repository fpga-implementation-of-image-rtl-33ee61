// proc_ctrl: processing controller (peripheral control circuit).
//
// On `start` it reads the stored image out of the on-chip RAM, one pixel per
// clock, in the order the selected engine needs:
//   median / Sobel: raster order over an extended scan of (width+1) x
//     (height+1) positions; the extra column and row repeat the last column
//     and row and only serve to push the final window centres out of the
//     3x3 window generator (window3x3);
//   DCT: 8x8 blocks, blocks left to right and top to bottom, rows of a block
//     top to bottom, pixels of a row left to right (width and height must be
//     multiples of 8).
// Each read is paired one clock later, after the RAM latency, with its
// coordinates on pix_valid/pix_x/pix_y. Reading stalls whenever the output
// FIFO has fewer than MARGIN free entries, which leaves room for every
// result already in flight. busy stays high until the output image
// controller reports the last pixel sent; done is then set until the next
// start. The read orders, the stall rule and the handshake are this design's
// choice; the paper says only that peripheral circuits control the
// processing.
//
// Ports: start, mode, width, height; fifo_count; frame_done; RAM read port
// ram_re/ram_raddr; pix_valid, pix_x, pix_y; stall (a read was due but held
// back this clock); run_mode (mode latched at start); busy, done.
module proc_ctrl
  import imgproc_pkg::*;
#(
  parameter int unsigned MAX_W      = 256,
  parameter int unsigned MAX_H      = 256,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MARGIN     = 160,
  parameter int unsigned XW         = $clog2(MAX_W + 1),
  parameter int unsigned YW         = $clog2(MAX_H + 1),
  parameter int unsigned AW         = $clog2(MAX_W * MAX_H),
  parameter int unsigned FCW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  mode_e          mode,
  input  logic [XW-1:0]  width,
  input  logic [YW-1:0]  height,
  input  logic [FCW-1:0] fifo_count,
  input  logic           frame_done,
  output logic           ram_re,
  output logic [AW-1:0]  ram_raddr,
  output logic           pix_valid,
  output logic [XW-1:0]  pix_x,
  output logic [YW-1:0]  pix_y,
  output logic           stall,
  output mode_e          run_mode,
  output logic           busy,
  output logic           done
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN} state_e;

  state_e        state;
  mode_e         mode_q;
  logic [XW-1:0] x, xr;       // scan position; xr: clamped to the image
  logic [YW-1:0] y, yr;
  logic          room, last;
  logic [XW-1:0] bx_lim;      // last block column index * 8
  logic [YW-1:0] by_lim;

  assign room   = (FCW'(FIFO_DEPTH) - fifo_count) >= FCW'(MARGIN);
  assign ram_re = (state == S_READ) && room;
  assign stall  = (state == S_READ) && !room;
  assign xr     = (x >= width)  ? width - XW'(1)  : x;
  assign yr     = (y >= height) ? height - YW'(1) : y;
  assign ram_raddr = AW'(yr) * AW'(MAX_W) + AW'(xr);
  assign bx_lim = width - XW'(8);
  assign run_mode = mode_q;
  assign by_lim = height - YW'(8);

  always_comb begin
    if (mode_q == MODE_DCT)
      last = (x == width - XW'(1)) && (y == height - YW'(1));
    else
      last = (x == width) && (y == height);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_q    <= MODE_MEDIAN;
      x         <= '0;
      y         <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      pix_valid <= 1'b0;
      pix_x     <= '0;
      pix_y     <= '0;
    end else begin
      pix_valid <= ram_re;
      if (ram_re) begin
        pix_x <= x;
        pix_y <= y;
      end
      case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_READ;
            mode_q <= mode;
            x      <= '0;
            y      <= '0;
            busy   <= 1'b1;
            done   <= 1'b0;
          end
        end
        S_READ: begin
          if (ram_re) begin
            if (last) begin
              state <= S_DRAIN;
            end else if (mode_q == MODE_DCT) begin
              // 8x8 block scan
              if (x[2:0] != 3'd7) begin
                x <= x + XW'(1);
              end else if (y[2:0] != 3'd7) begin
                x <= {x[XW-1:3], 3'd0};
                y <= y + YW'(1);
              end else if ({x[XW-1:3], 3'd0} != bx_lim) begin
                x <= x + XW'(1);
                y <= {y[YW-1:3], 3'd0};
              end else begin
                x <= '0;
                y <= y + YW'(1);
              end
            end else begin
              // extended raster scan
              if (x == width) begin
                x <= '0;
                y <= y + YW'(1);
              end else begin
                x <= x + XW'(1);
              end
            end
          end
        end
        default: begin  // S_DRAIN
          if (frame_done) begin
            state <= S_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  // by_lim documents the last block row; the scan ends via `last`.
  a_block_rows: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_READ && mode_q == MODE_DCT) |-> (y <= by_lim + YW'(7)))
    else $error("proc_ctrl: DCT scan left the image");
endmodule
