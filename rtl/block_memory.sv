// block_memory: 32-bit dual-port SRAM of the de-blocking filter.
//
// One memory holds the left neighbour blocks (E1-E8) for the first
// horizontal filter unit; a second copy holds the top neighbour blocks
// (F1-F8) for the first vertical filter unit. Both ports can read or write
// any word in the same cycle, so data arriving from the input side can be
// stored through one port while a filter reads through the other.
// The 32-bit word and the two ports follow the document. The depth is this
// design's choice: eight neighbour blocks of 8x8 8-bit samples, four
// samples per word, give 8*64/4 = 128 words.
// If both ports write the same word in one cycle, port A wins.
//
// Interface: clk; per port X in {a, b}: en_X (port active), we_X (write),
// addr_X, wdata_X in; rdata_X out.
// Timing: synchronous read with one cycle of latency: rdata_X shows the
// word addressed on the previous active edge (the old word if that edge
// also wrote it, read-before-write). rdata_X holds while en_X is low.
module block_memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     en_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         wdata_a,
  output logic [WIDTH-1:0]         rdata_a,
  input  logic                     en_b,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [WIDTH-1:0]         wdata_b,
  output logic [WIDTH-1:0]         rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) rdata_a <= mem[addr_a];
    if (en_b) rdata_b <= mem[addr_b];
    if (en_b && we_b && !(en_a && we_a && addr_a == addr_b)) mem[addr_b] <= wdata_b;
    if (en_a && we_a) mem[addr_a] <= wdata_a;
  end

endmodule
