// tb_detff: self-checking testbench of the double edge triggered flip-flop.
//
// A 4-bit instance is clocked with a 10 ns period. D changes only inside a
// clock phase, never at an edge: 2 ns after each edge to a new random value,
// and again 1.5 ns later. The expected Q after an edge is the D held just
// before that edge, taken from the testbench's own record. Q is checked
// 1 ns after the edge (it took the new value on this edge, rising or
// falling) and 4 ns after it (it ignored the D changes inside the phase).
// Then the clock is stopped, once high and once low, for 50 ns while D keeps
// changing: Q must hold its last value throughout, as the cell's feedback
// loops keep the output level whenever the clock is stopped.
// A watchdog ends the run with a failure if the loop does not finish.
module tb_detff;

  localparam int unsigned W     = 4;
  localparam int unsigned EDGES = 400;

  logic         clk = 1'b0;
  logic [W-1:0] d, q, expect_q;
  int unsigned  checks = 0, failures = 0;
  int unsigned  rise_seen = 0, fall_seen = 0;

  detff #(.WIDTH(W)) dut (.clk(clk), .d(d), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s at %0t: q=%h expected %h (clk=%b)", what, $time, q, expect_q, clk);
    end
  endtask

  initial begin
    d = W'($urandom);
    #5;
    for (int e = 0; e < EDGES; e++) begin
      expect_q = d;          // D is stable across the edge
      clk = ~clk;            // rising on even e, falling on odd e
      if (clk) rise_seen++; else fall_seen++;
      #1 check("after edge");
      #1 d = W'($urandom);
      #1.5 d = W'($urandom);
      #1 check("inside phase");
      #0.5;
    end
    // Clock stopped in each level: Q holds while D changes.
    for (int stop = 0; stop < 2; stop++) begin
      #1 expect_q = d;
      clk = ~clk;
      for (int t = 0; t < 50; t++) begin
        #1 d = W'($urandom);
        check("clock stopped");
      end
    end
    checks++;
    if (rise_seen == 0 || fall_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * EDGES + 2000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
