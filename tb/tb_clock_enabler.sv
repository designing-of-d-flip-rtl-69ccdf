// tb_clock_enabler: self-checking testbench of the clock enabler circuit.
//
// The free-running clock has a 10 ns period. F and AF are changed 1 ns after
// rising edges, as a queue's flags would be. The expected rule, worked out
// from the flag record: rising edge k+1 of the free-running clock appears
// on gclk exactly when F and AF were both low just before edge k (one edge
// through the controller, half a cycle through the double edge flip-flop,
// then the clock gate). After reset, gclk runs. Each rising edge is checked
// 1 ns later; gclk must also be low whenever clk is low.
// A watchdog ends the run with a failure after a fixed number of cycles.
module tb_clock_enabler;

  localparam int unsigned CYCLES = 600;

  logic clk = 1'b0, rst = 1'b1, f = 1'b0, af = 1'b0, gclk, en;
  logic flags_prev;   // F or AF just before the previous rising edge
  logic flags_now;
  int unsigned checks = 0, failures = 0, stops = 0, runs = 0;

  clock_enabler dut (.clk(clk), .rst(rst), .f(f), .af(af), .gclk(gclk), .en(en));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    flags_prev = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      // Runs of flag values, so both long stops and single-cycle blips occur.
      if ($urandom_range(3) == 0) begin
        f  = ($urandom_range(5) == 0);
        af = ($urandom_range(2) == 0);
      end
      #5;  // low phase
      checks++;
      if (gclk !== 1'b0 && clk == 1'b0) begin failures++; $display("FAIL at %0t: gclk high in low phase", $time); end
      #3;  // 1 ns before the next rising edge
      flags_now = f | af;
      @(posedge clk) #1;
      checks++;
      if (gclk !== ~flags_prev) begin
        failures++;
        $display("FAIL at %0t: gclk=%b expected %b", $time, gclk, ~flags_prev);
      end
      if (gclk) runs++; else stops++;
      flags_prev = flags_now;
    end
    checks++;
    if (runs == 0 || stops == 0) failures++;
    $display("gated edges passed=%0d stopped=%0d", runs, stops);
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
