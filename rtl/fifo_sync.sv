// fifo_sync: FIFO synchronization unit.
//
// A synchronous first-in first-out buffer that decouples the processing
// block, which produces results in bursts, from the output image port,
// which may be stalled by its consumer. Storage is a circular array with
// separate read and write pointers and an occupancy counter; `count` lets the
// producer stop early enough that in-flight results always fit.
// The paper names a FIFO used to synchronise the units; depth, width and
// the show-ahead read interface are this design's choice.
//
// Ports: push/wdata (write; ignored when full), pop/rdata (rdata shows the
// oldest entry while not empty; pop removes it), empty, full, count.
// Timing: a written word can be popped on the next clock.
module fifo_sync #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  wdata,
  input  logic          pop,
  output logic [W-1:0]  rdata,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + AW'(1);
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + AW'(1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("fifo_sync: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("fifo_sync: pop while empty");
endmodule
