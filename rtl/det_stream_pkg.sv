// det_stream_pkg: sizes and port bundles shared by the clock-gated streaming
// element and its testbenches.
//
// STREAM_W is the word carried by the queues, BM_W and BM_DEPTH the word
// and depth of a block memory, TR_N and TR_SW the block edge and sample
// width of the RAM transposer. The 32-bit memory word and the 8x8 block
// are the document's; the other numbers are this design's choices (see the
// modules that use them).
package det_stream_pkg;

  localparam int unsigned STREAM_W  = 32;
  localparam int unsigned Q_DEPTH   = 16;
  localparam int unsigned Q_AF      = Q_DEPTH - 2;
  localparam int unsigned BM_W      = 32;
  localparam int unsigned BM_DEPTH  = 128;
  localparam int unsigned BM_AW     = $clog2(BM_DEPTH);
  localparam int unsigned TR_N      = 8;
  localparam int unsigned TR_SW     = 8;

  // One access on one port of a block memory.
  typedef struct packed {
    logic             en;
    logic             we;
    logic [BM_AW-1:0] addr;
    logic [BM_W-1:0]  wdata;
  } bm_req_t;

endpackage
