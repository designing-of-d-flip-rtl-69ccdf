// ce_controller: clock-enable controller of a clock-gated streaming element.
//
// It watches the full (F) and almost-full (AF) flags of the queue the actor
// writes into, and asks for the actor clock to stop while that queue cannot
// take more data. EN is a registered output on the free-running clock: it
// falls on the first clock edge after either flag rises and rises again on
// the first edge after both have fallen. Stopping on AF, not only on F,
// leaves room in the queue for the writes that still happen while the
// request travels through the enable flip-flop and the clock gate.
// Which flags it reads and its place in the circuit follow the block
// diagram; the rule EN = not (F or AF), the registered output and the
// reset value (enabled) are this design's own choices.
//
// Interface: clk, rst (asynchronous, active high), f, af in; en out.
// Timing: one clock cycle from a flag change to EN.
module ce_controller (
  input  logic clk,
  input  logic rst,
  input  logic f,
  input  logic af,
  output logic en
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) en <= 1'b1;
    else     en <= ~(f | af);
  end

endmodule
