// detff: double edge triggered D flip-flop.
//
// The output takes the value of D on every rising and every falling edge of
// clk, so a register built from it moves data at twice the rate of a single
// edge register on the same clock (or at the same rate on half the clock).
//
// Structure: two data paths of opposite clock phase feed a clock-selected
// output, as in the proposed circuit.
//   * Upper path: a level-sensitive latch that is transparent while clk is
//     low. When clk rises it closes, holding the D seen just before the
//     edge, and the output selects it for the whole high phase.
//   * Lower path: a latch transparent while clk is high. When clk falls it
//     closes and the output selects it for the whole low phase.
//   * Output: clk chooses the path whose latch is closed, which is what the
//     output pass transistors do in the circuit. The output is never taken
//     from a transparent latch, so D changes are not seen between edges.
// In the transistor circuit each path is an n-type pass transistor, an
// inverter with a keeper, and an output pass transistor, followed by a
// shared output inverter; the two inversions cancel, so Q equals D here.
// No reset: the circuit has none.
//
// Interface: clk, d[WIDTH-1:0] in; q[WIDTH-1:0] out. WIDTH > 1 gives a
// register of WIDTH identical bit cells sharing one clock.
// Timing: D must be stable around both clock edges; Q changes right after
// each edge, with no cycle of latency beyond the edge itself.
// Latches are intended: the two path latches are the storage of the cell.
module detff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] lat_rise;  // upper path, captures at the rising edge
  logic [WIDTH-1:0] lat_fall;  // lower path, captures at the falling edge

  always_latch begin
    if (!clk) lat_rise = d;
  end

  always_latch begin
    if (clk) lat_fall = d;
  end

  assign q = clk ? lat_rise : lat_fall;

endmodule
