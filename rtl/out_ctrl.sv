// out_ctrl: output image controller.
//
// Moves result pixels from the FIFO synchronization unit to the output image
// port with a valid/ready handshake, counts them and marks the last pixel of
// the frame. frame_done pulses for one clock when that last pixel has been
// accepted. The paper shows an output image block; the handshake and the
// frame marking are this design's choice.
//
// Ports: fifo_empty, fifo_rdata (show-ahead), fifo_pop; total (pixels per
// frame); out_valid, out_pix, out_last, out_ready; frame_done.
// Timing: combinational from the FIFO head; one pixel per clock when
// out_ready is held high.
module out_ctrl
  import imgproc_pkg::*;
#(
  parameter int unsigned CW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] total,
  input  logic          fifo_empty,
  input  pixel_t        fifo_rdata,
  output logic          fifo_pop,
  output logic          out_valid,
  output pixel_t        out_pix,
  output logic          out_last,
  input  logic          out_ready,
  output logic          frame_done
);
  logic [CW-1:0] sent;

  assign out_valid  = !fifo_empty;
  assign out_pix    = fifo_rdata;
  assign out_last   = (sent == total - CW'(1));
  assign fifo_pop   = out_valid && out_ready;
  assign frame_done = fifo_pop && out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sent <= '0;
    else if (start)    sent <= '0;
    else if (fifo_pop) sent <= sent + CW'(1);
  end
endmodule
