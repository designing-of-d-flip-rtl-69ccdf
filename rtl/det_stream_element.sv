// det_stream_element: one clock-gated element of a dataflow stream, with
// the storage of a parallel de-blocking filter on its actor clock.
//
// The element sits between an upstream and a downstream element:
//
//   upstream --> input queue --> [actor] --> output queue --> downstream
//                                   ^
//                 clock enabler ----+ gated clock (gclk)
//
// The clock enabler watches the output queue's full and almost-full flags
// and stops gclk while the output queue cannot take more words, so the
// actor and its queue ports stop switching instead of spinning on a
// stalled stream. The input queue's flags go back upstream for the
// upstream element's own enabler. Everything on the actor side (read port
// of the input queue, write port of the output queue, the block memories
// and the transposer) runs on gclk.
//
// The actor itself, a de-blocking filter, is outside this module: its
// filter arithmetic is not specified, so its queue-side signals are ports
// (act_*), as are the ports of the two block memories (left and top
// neighbour blocks) and of the RAM transposer, which belong to it.
// The arrangement of queues, controller, enable flip-flop and clock buffer
// follows the block diagram of the streaming element; the upstream and
// downstream clock pins (up_clk, down_clk) stand for the neighbouring
// elements' gated clocks, which the diagram draws leaving the picture.
//
// Interface: see the port list. All *_clk inputs and clk must come from
// one source clock. rst is asynchronous, active high.
// Timing: see stream_queue, clock_enabler, block_memory, ram_transposer.
module det_stream_element
  import det_stream_pkg::*;
#(
  parameter int unsigned W        = STREAM_W,
  parameter int unsigned DEPTH    = Q_DEPTH,
  parameter int unsigned AF_LEVEL = Q_AF
) (
  input  logic                clk,
  input  logic                rst,
  // Upstream side: write port of the input queue.
  input  logic                up_clk,
  input  logic                in_wr_en,
  input  logic [W-1:0]        in_wr_data,
  output logic                in_full,
  output logic                in_afull,
  // Actor side, on gclk.
  output logic                gclk,
  output logic                gclk_en,
  input  logic                act_rd_en,
  output logic [W-1:0]        act_rd_data,
  output logic                act_rd_empty,
  input  logic                act_wr_en,
  input  logic [W-1:0]        act_wr_data,
  // Downstream side: read port of the output queue.
  input  logic                down_clk,
  input  logic                out_rd_en,
  output logic [W-1:0]        out_rd_data,
  output logic                out_empty,
  output logic                out_full,
  output logic                out_afull,
  // Block memories of the de-blocking filter: [0] left neighbours,
  // [1] top neighbours.
  input  bm_req_t             bm_req_a [2],
  input  bm_req_t             bm_req_b [2],
  output logic [BM_W-1:0]     bm_rdata_a [2],
  output logic [BM_W-1:0]     bm_rdata_b [2],
  // RAM transposer.
  input  logic                tr_in_valid,
  output logic                tr_in_ready,
  input  logic [TR_N*TR_SW-1:0] tr_in_row,
  output logic                tr_out_valid,
  input  logic                tr_out_ready,
  output logic [TR_N*TR_SW-1:0] tr_out_col
);

  stream_queue #(.WIDTH(W), .DEPTH(DEPTH), .AF_LEVEL(AF_LEVEL)) u_qin (
    .rst     (rst),
    .clk_w   (up_clk),
    .wr_en   (in_wr_en),
    .wr_data (in_wr_data),
    .clk_r   (gclk),
    .rd_en   (act_rd_en),
    .rd_data (act_rd_data),
    .full    (in_full),
    .afull   (in_afull),
    .empty   (act_rd_empty)
  );

  stream_queue #(.WIDTH(W), .DEPTH(DEPTH), .AF_LEVEL(AF_LEVEL)) u_qout (
    .rst     (rst),
    .clk_w   (gclk),
    .wr_en   (act_wr_en),
    .wr_data (act_wr_data),
    .clk_r   (down_clk),
    .rd_en   (out_rd_en),
    .rd_data (out_rd_data),
    .full    (out_full),
    .afull   (out_afull),
    .empty   (out_empty)
  );

  clock_enabler u_ce (
    .clk  (clk),
    .rst  (rst),
    .f    (out_full),
    .af   (out_afull),
    .gclk (gclk),
    .en   (gclk_en)
  );

  for (genvar m = 0; m < 2; m++) begin : g_bm
    block_memory #(.WIDTH(BM_W), .DEPTH(BM_DEPTH)) u_bm (
      .clk     (gclk),
      .en_a    (bm_req_a[m].en),
      .we_a    (bm_req_a[m].we),
      .addr_a  (bm_req_a[m].addr),
      .wdata_a (bm_req_a[m].wdata),
      .rdata_a (bm_rdata_a[m]),
      .en_b    (bm_req_b[m].en),
      .we_b    (bm_req_b[m].we),
      .addr_b  (bm_req_b[m].addr),
      .wdata_b (bm_req_b[m].wdata),
      .rdata_b (bm_rdata_b[m])
    );
  end

  ram_transposer #(.N(TR_N), .SW(TR_SW)) u_tr (
    .clk       (gclk),
    .rst       (rst),
    .in_valid  (tr_in_valid),
    .in_ready  (tr_in_ready),
    .in_row    (tr_in_row),
    .out_valid (tr_out_valid),
    .out_ready (tr_out_ready),
    .out_col   (tr_out_col)
  );

endmodule
