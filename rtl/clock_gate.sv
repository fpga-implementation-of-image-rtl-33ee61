// clock_gate: gated clock unit for power reduction.
//
// Stops the clock of a processing engine while it has nothing to do, so its
// registers make no transitions. The enable is captured by a latch that is
// transparent while the clock is low, and the clock is ANDed with the latched
// enable; the enable may therefore change at any time during the high phase
// without producing a glitch on the gated clock. This is the usual
// latch-and-AND integrated clock gate; on an FPGA or in a standard-cell flow
// it would be replaced by the vendor's clock-gating cell. The latch is
// intentional and is the reason for the latch warning a linter reports here.
//
// Ports: clk (free-running clock), en (enable, sampled while clk is low),
// test_en (forces the clock on, for scan), gclk (gated clock).
// Timing: a change of en reaches gclk at the next rising edge of clk.
// The paper asks for gated clocks to disable idle blocks; the cell
// structure is this design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en | test_en;
  end

  assign gclk = clk & en_latched;
endmodule
