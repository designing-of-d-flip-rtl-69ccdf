// tb_ram_transposer: self-checking testbench of the RAM transposer.
//
// Random 8x8 blocks of 8-bit samples are fed in row by row; for each block
// the testbench works out its eight columns itself and queues them as the
// expected output. The producer and the consumer each stall at random in
// the first part of the run. In the second part both are always ready, and
// the cycle count from the first row to the last column of 16 back-to-back
// blocks is checked against the ping-pong rate of one row in and one
// column out per clock: 16*8 beats plus the 8 cycles that fill the first
// bank.
// A watchdog ends the run with a failure after a fixed number of cycles.
module tb_ram_transposer;

  localparam int unsigned N  = 8;
  localparam int unsigned SW = 8;
  localparam int unsigned BLOCKS_RANDOM = 60;
  localparam int unsigned BLOCKS_STREAM = 16;

  logic            clk = 1'b0, rst = 1'b1;
  logic            in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [N*SW-1:0] in_row = '0, out_col;
  logic [N*SW-1:0] rows_q[$];   // rows still to be sent
  logic [N*SW-1:0] cols_q[$];   // columns expected
  logic [SW-1:0]   blk [N][N];
  int unsigned     checks = 0, failures = 0, cols_seen = 0;
  int unsigned     in_stall_pct = 30, out_stall_pct = 30;
  int unsigned     t_first = 0, t_last = 0, cycle = 0;
  int unsigned     both_full = 0;
  bit              streaming = 0;

  ram_transposer #(.N(N), .SW(SW)) dut (
    .clk(clk), .rst(rst),
    .in_valid(in_valid), .in_ready(in_ready), .in_row(in_row),
    .out_valid(out_valid), .out_ready(out_ready), .out_col(out_col)
  );

  always #5 clk = ~clk;

  task automatic make_block();
    logic [N*SW-1:0] v;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) blk[r][c] = SW'($urandom);
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) v[c*SW +: SW] = blk[r][c];
      rows_q.push_back(v);
    end
    for (int c = 0; c < N; c++) begin
      for (int r = 0; r < N; r++) v[r*SW +: SW] = blk[r][c];
      cols_q.push_back(v);
    end
  endtask

  // Drive on falling edges, observe the handshake at rising edges.
  always @(negedge clk) begin
    if (!rst) begin
      in_valid  <= (rows_q.size() > 0) && (streaming || $urandom_range(99) >= in_stall_pct);
      in_row    <= (rows_q.size() > 0) ? rows_q[0] : '0;
      out_ready <= streaming || ($urandom_range(99) >= out_stall_pct);
    end
  end

  always @(posedge clk) begin
    cycle++;
    if (!rst && dut.bank_full == 2'b11) both_full++;
    if (in_valid && in_ready) begin
      if (streaming && t_first == 0) t_first = cycle;
      void'(rows_q.pop_front());
    end
    if (out_valid && out_ready) begin
      checks++;
      cols_seen++;
      if (cols_q.size() == 0) begin
        failures++; $display("FAIL at %0t: unexpected column", $time);
      end else begin
        if (out_col !== cols_q[0]) begin
          failures++; $display("FAIL at %0t: column %h expected %h", $time, out_col, cols_q[0]);
        end
        void'(cols_q.pop_front());
      end
      if (streaming) t_last = cycle;
    end
  end

  initial begin
    #22 rst = 1'b0;
    for (int b = 0; b < BLOCKS_RANDOM; b++) begin
      if (b % 10 == 0) begin
        in_stall_pct  = $urandom_range(0, 70);
        out_stall_pct = $urandom_range(0, 70);
      end
      make_block();
      wait (rows_q.size() < 2 * N);
    end
    wait (cols_q.size() == 0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    streaming = 1;
    for (int b = 0; b < BLOCKS_STREAM; b++) make_block();
    wait (cols_q.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (t_last - t_first + 1 != BLOCKS_STREAM * N + N) begin
      failures++;
      $display("FAIL: streaming took %0d cycles, expected %0d", t_last - t_first + 1, BLOCKS_STREAM * N + N);
    end
    checks++;
    if (both_full == 0) begin failures++; $display("FAIL: both banks never full at once"); end
    checks++;
    if (cols_seen != (BLOCKS_RANDOM + BLOCKS_STREAM) * N) failures++;
    $display("columns=%0d stream cycles=%0d cycles with both banks full=%0d", cols_seen, t_last - t_first + 1, both_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
