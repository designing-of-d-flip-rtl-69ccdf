// clk_gate: glitch-free clock gate, the generic form of an FPGA global clock
// buffer with clock enable.
//
// The enable is captured by a latch that is transparent while clk is low
// and closed while clk is high, and the gated clock is clk AND that latch.
// An enable change can therefore only take effect during the low phase, so
// the gated clock never carries a shortened pulse: it is either a full copy
// of a clk pulse or stays low for the whole cycle.
// The block diagram shows this part only as a clock buffer with enable; the
// latch-and-AND form is this design's choice of the usual way to build one.
//
// Interface: clk, ce in; gclk out.
// Timing: ce must be settled before the rising edge it is meant to pass or
// block; a rising edge of clk appears on gclk if ce was high just before it.
// The latch is intended: it is what makes the gate glitch-free.
module clk_gate (
  input  logic clk,
  input  logic ce,
  output logic gclk
);

  logic ce_lat;

  always_latch begin
    if (!clk) ce_lat = ce;
  end

  assign gclk = clk & ce_lat;

endmodule
