// stream_queue: FIFO queue between two actors of a clock-gated stream.
//
// The write side and the read side have clock pins of their own, because
// in a clock-gated streaming element one side runs on the free-running
// clock and the other on an actor's gated clock. Both clocks are meant to
// come from the same source clock, one of them through a clock gate, so
// their edges line up and the pointers are compared directly, without
// synchronisers; this queue is not for unrelated clocks.
//
// Storage is a DEPTH-word array. The write pointer lives in the write
// clock domain and the read pointer in the read clock domain; each has one
// extra bit so that full and empty can be told apart. The read data is the
// word at the head of the queue (first-word fall-through): rd_data is valid
// whenever empty is low, and rd_en pops it on the next read clock edge.
// Flags, all derived from the two pointers without registering:
//   full   (F)  : DEPTH words held,
//   afull  (AF) : at least AF_LEVEL words held,
//   empty       : no word held (not drawn in the block diagram, needed by
//                 any reader).
// Flag names F and AF and the separate clock pins follow the block
// diagram. Width, depth, the AF level and the empty flag are this design's
// own choices. A write while full or a read while empty is ignored.
//
// Interface: clk_w, wr_en, wr_data; clk_r, rd_en, rd_data; rst
// (asynchronous, active high, clears both pointers); full, afull, empty.
// Timing: a word written on a write clock edge can be read from the next
// read clock edge on; flags change right after the edge that moves a
// pointer.
module stream_queue #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned AF_LEVEL = DEPTH - 2
) (
  input  logic             rst,
  input  logic             clk_w,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             clk_r,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             afull,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic [AW:0]      level;

  assign level = wptr - rptr;
  assign full  = (level == (AW+1)'(DEPTH));
  assign afull = (level >= (AW+1)'(AF_LEVEL));
  assign empty = (level == '0);

  // Write side.
  always_ff @(posedge clk_w or posedge rst) begin
    if (rst) begin
      wptr <= '0;
    end else if (wr_en && !full) begin
      wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk_w) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_data;
  end

  // Read side.
  always_ff @(posedge clk_r or posedge rst) begin
    if (rst) begin
      rptr <= '0;
    end else if (rd_en && !empty) begin
      rptr <= rptr + 1'b1;
    end
  end

  assign rd_data = mem[rptr[AW-1:0]];

  initial begin
    assert (DEPTH == (1 << AW)) else $error("stream_queue: DEPTH must be a power of two");
    assert (AF_LEVEL >= 1 && AF_LEVEL <= DEPTH) else $error("stream_queue: AF_LEVEL out of range");
  end

endmodule
