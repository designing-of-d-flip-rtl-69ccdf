// clock_enabler: clock enabler circuit of a clock-gated streaming element.
//
// Three parts in a chain, as in the block diagram:
//   controller  -> EN, from the output queue's full / almost-full flags,
//   flip-flop   -> S, a double edge triggered flip-flop that retimes EN,
//   clock gate  -> gclk, the free-running clock passed only while S is high.
// The retiming flip-flop is a double edge triggered one (detff), the
// flip-flop this design is built around: it copies EN on the falling edge
// after EN changed, half a cycle before the clock gate's latch closes, so a
// stop request blocks the very next rising edge.
//
// Interface: clk (free-running), rst (asynchronous, active high),
// f, af (flags of the queue the actor writes) in; gclk (actor clock) and
// en (the retimed enable S, for observation) out.
// Timing: a flag that rises just after rising edge t stops the gated clock
// from edge t+2 on (controller at t+1, S at the falling edge after it).
// After reset, gclk runs.
module clock_enabler (
  input  logic clk,
  input  logic rst,
  input  logic f,
  input  logic af,
  output logic gclk,
  output logic en
);

  logic en_ctrl;

  ce_controller u_ctrl (
    .clk (clk),
    .rst (rst),
    .f   (f),
    .af  (af),
    .en  (en_ctrl)
  );

  detff #(.WIDTH(1)) u_sff (
    .clk (clk),
    .d   (en_ctrl),
    .q   (en)
  );

  clk_gate u_gate (
    .clk  (clk),
    .ce   (en),
    .gclk (gclk)
  );

endmodule
