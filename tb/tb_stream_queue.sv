// tb_stream_queue: self-checking testbench of the stream queue.
//
// Write and read clocks both come from one 10 ns source clock; the read
// clock passes through a testbench clock gate that drops random cycles, as
// an actor's gated clock would. Writes and reads are requested at random
// with changing rates, so the queue runs empty, fills up and sits at full.
// A reference model (a SystemVerilog queue) predicts every read word and
// the level, from which empty, full and almost-full are checked after each
// edge. A small depth (8, almost full at 6) makes full and almost full
// frequent. A watchdog ends the run with a failure after a fixed time.
module tb_stream_queue;

  localparam int unsigned W      = 16;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AF     = 6;
  localparam int unsigned CYCLES = 3000;

  logic         clk = 1'b0, rst = 1'b1;
  logic         rgate = 1'b1, rgate_lat = 1'b1, clk_r;
  logic         wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         full, afull, empty;
  logic [W-1:0] model[$];
  int unsigned  checks = 0, failures = 0;
  int unsigned  n_full = 0, n_afull = 0, n_empty = 0, n_gated = 0, n_rd = 0;
  int unsigned  wr_rate = 2, rd_rate = 2;
  logic         do_wr, do_rd;

  always #5 clk = ~clk;
  always_latch if (!clk) rgate_lat = rgate;
  assign clk_r = clk & rgate_lat;

  stream_queue #(.WIDTH(W), .DEPTH(DEPTH), .AF_LEVEL(AF)) dut (
    .rst(rst), .clk_w(clk), .wr_en(wr_en), .wr_data(wr_data),
    .clk_r(clk_r), .rd_en(rd_en), .rd_data(rd_data),
    .full(full), .afull(afull), .empty(empty)
  );

  task automatic check_flags();
    int unsigned lvl = model.size();
    checks += 3;
    if (empty !== (lvl == 0))      begin failures++; $display("FAIL at %0t: empty=%b level=%0d", $time, empty, lvl); end
    if (full  !== (lvl == DEPTH))  begin failures++; $display("FAIL at %0t: full=%b level=%0d", $time, full, lvl); end
    if (afull !== (lvl >= AF))     begin failures++; $display("FAIL at %0t: afull=%b level=%0d", $time, afull, lvl); end
    if (lvl > 0) begin
      checks++;
      if (rd_data !== model[0]) begin failures++; $display("FAIL at %0t: head %h expected %h", $time, rd_data, model[0]); end
    end
    if (full) n_full++;
    if (afull) n_afull++;
    if (empty) n_empty++;
  endtask

  initial begin
    #12 rst = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if (c % 200 == 0) begin
        wr_rate = $urandom_range(0, 4);
        rd_rate = $urandom_range(0, 4);
      end
      check_flags();
      wr_en   = ($urandom_range(4) < wr_rate + 1);
      rd_en   = ($urandom_range(4) < rd_rate + 1);
      rgate   = ($urandom_range(3) != 0);
      wr_data = W'($urandom);
      // Effect on the model at the coming rising edge.
      do_rd = rd_en && rgate && (model.size() > 0);
      do_wr = wr_en && (model.size() < DEPTH);
      if (!rgate) n_gated++;
      @(posedge clk);
      if (do_rd) begin void'(model.pop_front()); n_rd++; end
      if (do_wr) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_afull == 0 || n_empty == 0 || n_gated == 0 || n_rd == 0) begin
      failures++;
      $display("FAIL: a condition never occurred");
    end
    $display("cycles full=%0d afull=%0d empty=%0d gated=%0d reads=%0d", n_full, n_afull, n_empty, n_gated, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * CYCLES + 1000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
