// tb_det_stream_element: end-to-end testbench of the clock-gated streaming
// element, with every parameter at its default.
//
// The testbench plays the three neighbours of the element:
//   * an upstream producer on the free-running clock, writing a numbered
//     word sequence into the input queue whenever the queue is not full;
//   * the actor, on the gated clock: on each gated edge it pops one word
//     from the input queue and pushes f(word) into the output queue, with
//     f(x) = {x[15:0], x[31:16]} ^ 32'hA5A5_5A5A; it never looks at the
//     output queue's flags, so only the clock gating keeps that queue from
//     overflowing;
//   * a downstream consumer on the free-running clock, reading at a rate
//     that changes from phase to phase.
// Slow-consumer phases fill the output queue, which must stop the gated
// clock and, behind it, fill the input queue and push back on the producer;
// fast phases must start the gated clock again. Every word read downstream
// is compared with f() of the word the producer wrote, in order, so a lost,
// duplicated or reordered word is a failure, as is any actor write that
// meets a full output queue.
// After the stream, with the gated clock running, the two block memories
// get a fill, then concurrent writes on port A and reads on port B, checked
// against a reference array; then three 8x8 blocks go through the RAM
// transposer and every column is compared with the testbench's own
// transpose.
// Mechanisms counted (each must happen at least once): gated clock stopped,
// gated clock restarted, input queue full, output queue almost full,
// both memory ports active in one cycle, both transposer banks full at once.
// A watchdog ends the run with a failure after a fixed number of cycles.
module tb_det_stream_element;
  import det_stream_pkg::*;

  localparam int unsigned W       = STREAM_W;
  localparam int unsigned PHASES  = 12;
  localparam int unsigned PHASE_L = 600;

  logic clk = 1'b0, rst = 1'b1;
  logic gclk, gclk_en;
  logic in_wr_en = 1'b0, in_full, in_afull;
  logic [W-1:0] in_wr_data = '0;
  logic act_rd_en, act_rd_empty, act_wr_en;
  logic [W-1:0] act_rd_data, act_wr_data;
  logic out_rd_en = 1'b0, out_empty, out_full, out_afull;
  logic [W-1:0] out_rd_data;
  bm_req_t bm_req_a [2], bm_req_b [2];
  logic [BM_W-1:0] bm_rdata_a [2], bm_rdata_b [2];
  logic tr_in_valid = 1'b0, tr_in_ready, tr_out_valid, tr_out_ready = 1'b0;
  logic [TR_N*TR_SW-1:0] tr_in_row = '0, tr_out_col;

  int unsigned checks = 0, failures = 0;
  int unsigned n_stop = 0, n_restart = 0, n_in_full = 0, n_out_afull = 0;
  int unsigned n_dual = 0, n_tr_both = 0, n_words = 0;
  logic [W-1:0] sent[$];
  logic [W-1:0] next_word = '0;
  int unsigned up_pct = 100, down_pct = 100;
  logic gclk_en_d = 1'b1;
  bit stream_on = 1'b1;

  det_stream_element dut (
    .clk(clk), .rst(rst),
    .up_clk(clk), .in_wr_en(in_wr_en), .in_wr_data(in_wr_data),
    .in_full(in_full), .in_afull(in_afull),
    .gclk(gclk), .gclk_en(gclk_en),
    .act_rd_en(act_rd_en), .act_rd_data(act_rd_data), .act_rd_empty(act_rd_empty),
    .act_wr_en(act_wr_en), .act_wr_data(act_wr_data),
    .down_clk(clk), .out_rd_en(out_rd_en), .out_rd_data(out_rd_data),
    .out_empty(out_empty), .out_full(out_full), .out_afull(out_afull),
    .bm_req_a(bm_req_a), .bm_req_b(bm_req_b), .bm_rdata_a(bm_rdata_a), .bm_rdata_b(bm_rdata_b),
    .tr_in_valid(tr_in_valid), .tr_in_ready(tr_in_ready), .tr_in_row(tr_in_row),
    .tr_out_valid(tr_out_valid), .tr_out_ready(tr_out_ready), .tr_out_col(tr_out_col)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] f_actor(input logic [W-1:0] x);
    return {x[15:0], x[31:16]} ^ 32'hA5A5_5A5A;
  endfunction

  // The actor: one word per gated clock edge, no look at the output flags.
  assign act_rd_en   = !act_rd_empty;
  assign act_wr_en   = !act_rd_empty;
  assign act_wr_data = f_actor(act_rd_data);

  always @(posedge gclk) begin
    if (act_wr_en && out_full) begin
      failures++;
      $display("FAIL at %0t: actor write into a full output queue", $time);
    end
  end

  // Producer, consumer and mechanism counters, on the free-running clock.
  always @(negedge clk) begin
    if (!rst && stream_on) begin
      in_wr_en   = !in_full && ($urandom_range(99) < up_pct);
      in_wr_data = next_word;
      out_rd_en  = !out_empty && ($urandom_range(99) < down_pct);
      if (out_rd_en) begin
        checks++;
        n_words++;
        if (sent.size() == 0) begin
          failures++; $display("FAIL at %0t: word out with none sent", $time);
        end else begin
          if (out_rd_data !== f_actor(sent[0])) begin
            failures++;
            $display("FAIL at %0t: out %h expected %h", $time, out_rd_data, f_actor(sent[0]));
          end
          void'(sent.pop_front());
        end
      end
      if (in_full) n_in_full++;
      if (out_afull) n_out_afull++;
    end else if (!stream_on) begin
      in_wr_en  = 1'b0;
      out_rd_en = 1'b0;
    end
    if (!rst) begin
      if (gclk_en_d && !gclk_en) n_stop++;
      if (!gclk_en_d && gclk_en) n_restart++;
      gclk_en_d = gclk_en;
    end
  end

  always @(posedge clk) begin
    if (in_wr_en && !in_full) begin
      sent.push_back(next_word);
      next_word <= next_word + 32'd1;
    end
  end

  // Storage checks on the gated clock (it runs freely by then).
  logic [BM_W-1:0] ref_mem [2][BM_DEPTH];
  logic [TR_SW-1:0] blk [TR_N][TR_N];
  logic [TR_N*TR_SW-1:0] cols_q[$];

  // Transposer output checker: every column handed out is compared.
  always @(posedge clk) begin
    if (tr_out_valid && tr_out_ready) begin
      checks++;
      if (cols_q.size() == 0) begin
        failures++; $display("FAIL at %0t: transposer column with none expected", $time);
      end else begin
        if (tr_out_col !== cols_q[0]) begin
          failures++; $display("FAIL at %0t: column %h expected %h", $time, tr_out_col, cols_q[0]);
        end
        void'(cols_q.pop_front());
      end
    end
  end

  task automatic idle_ports();
    for (int m = 0; m < 2; m++) begin
      bm_req_a[m] = '0;
      bm_req_b[m] = '0;
    end
  endtask

  task automatic storage_test();
    logic [BM_AW-1:0] ra [2];
    logic [TR_N*TR_SW-1:0] v;
    // Fill both memories through port A.
    for (int i = 0; i < BM_DEPTH; i++) begin
      @(negedge clk);
      for (int m = 0; m < 2; m++) begin
        bm_req_a[m] = '{en: 1'b1, we: 1'b1, addr: BM_AW'(i), wdata: BM_W'($urandom)};
        ref_mem[m][i] = bm_req_a[m].wdata;
      end
    end
    // Port A rewrites words while port B reads other words.
    for (int i = 0; i < 3 * BM_DEPTH; i++) begin
      @(negedge clk);
      if (i > 0) begin
        for (int m = 0; m < 2; m++) begin
          checks++;
          if (bm_rdata_b[m] !== ref_mem[m][ra[m]]) begin
            failures++;
            $display("FAIL at %0t: memory %0d word %0d read %h expected %h", $time, m, ra[m], bm_rdata_b[m], ref_mem[m][ra[m]]);
          end
        end
      end
      for (int m = 0; m < 2; m++) begin
        ra[m] = BM_AW'($urandom);
        bm_req_b[m] = '{en: 1'b1, we: 1'b0, addr: ra[m], wdata: '0};
        bm_req_a[m] = '{en: 1'b1, we: 1'b1, addr: ra[m] + BM_AW'(1 + $urandom_range(BM_DEPTH - 2)), wdata: BM_W'($urandom)};
        n_dual++;
      end
      // Words read this cycle are read before this cycle's writes land.
      @(posedge clk) #1;
      for (int m = 0; m < 2; m++) ref_mem[m][bm_req_a[m].addr] = bm_req_a[m].wdata;
    end
    @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (bm_rdata_b[m] !== ref_mem[m][ra[m]]) begin
        failures++; $display("FAIL: memory %0d last read", m);
      end
    end
    idle_ports();
    // Three blocks through the transposer; the reader waits until both
    // banks are full before it starts.
    for (int b = 0; b < 3; b++) begin
      for (int r = 0; r < TR_N; r++)
        for (int c = 0; c < TR_N; c++) blk[r][c] = TR_SW'($urandom);
      for (int c = 0; c < TR_N; c++) begin
        for (int r = 0; r < TR_N; r++) v[r*TR_SW +: TR_SW] = blk[r][c];
        cols_q.push_back(v);
      end
      for (int r = 0; r < TR_N; r++) begin
        for (int c = 0; c < TR_N; c++) v[c*TR_SW +: TR_SW] = blk[r][c];
        @(negedge clk);
        while (!tr_in_ready) begin
          tr_in_valid = 1'b0;
          @(negedge clk);
        end
        tr_in_valid = 1'b1;
        tr_in_row   = v;
        @(posedge clk);
        #1 tr_in_valid = 1'b0;
        if (!tr_in_ready && !tr_out_ready && b == 1 && r == TR_N - 1) begin
          n_tr_both++;
          tr_out_ready = 1'b1;   // start reading once both banks hold a block
        end
      end
    end
    tr_out_ready = 1'b1;
    wait (cols_q.size() == 0);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    idle_ports();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int p = 0; p < PHASES; p++) begin
      if (p % 2 == 0) begin
        up_pct   = $urandom_range(70, 100);
        down_pct = $urandom_range(5, 40);
      end else begin
        up_pct   = $urandom_range(20, 80);
        down_pct = 100;
      end
      repeat (PHASE_L) @(posedge clk);
    end
    // Drain: stop producing, read everything out.
    up_pct = 0;
    down_pct = 100;
    wait (sent.size() == 0);
    repeat (4) @(posedge clk);
    @(negedge clk) stream_on = 1'b0;
    checks++;
    if (!out_empty || !act_rd_empty) begin failures++; $display("FAIL: queues not empty after drain"); end
    // The gated clock must now run on every edge.
    repeat (3) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      @(posedge clk) #1;
      checks++;
      if (gclk !== 1'b1) begin failures++; $display("FAIL at %0t: gated clock stopped with an empty output queue", $time); end
    end
    storage_test();
    checks++;
    if (n_stop == 0 || n_restart == 0 || n_in_full == 0 || n_out_afull == 0 || n_dual == 0 || n_tr_both == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("words=%0d clock stops=%0d restarts=%0d input-full cycles=%0d output-afull cycles=%0d dual-port cycles=%0d transposer both-banks=%0d",
             n_words, n_stop, n_restart, n_in_full, n_out_afull, n_dual, n_tr_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((PHASES * PHASE_L + 5000) * 10);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
