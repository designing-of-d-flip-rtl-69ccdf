// tb_clk_gate: self-checking testbench of the glitch-free clock gate.
//
// CE is changed at random times in both clock phases, including while clk
// is high. Expected behaviour, worked out from the enable alone:
//   * while clk is low, gclk is low;
//   * a whole high phase of clk appears on gclk if CE was high at the end
//     of the preceding low phase, and none of it appears otherwise, whatever
//     CE does during the high phase.
// gclk is sampled every 0.5 ns, so any glitch or cut pulse is seen.
// A watchdog ends the run with a failure after a fixed time.
module tb_clk_gate;

  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0, ce = 1'b0, gclk;
  logic ce_at_rise;
  int unsigned checks = 0, failures = 0, passed = 0, blocked = 0;

  clk_gate dut (.clk(clk), .ce(ce), .gclk(gclk));

  // Random CE changes in both phases, always 0.25 ns off the 0.5 ns grid
  // of clock edges and samples, so no change coincides with an edge.
  initial begin
    #0.25;
    forever begin
      #($urandom_range(1, 13) * 0.5);
      ce = $urandom_range(1);
    end
  end

  initial begin
    for (int c = 0; c < CYCLES; c++) begin
      // Low phase: 10 samples, gclk must stay low.
      for (int s = 0; s < 10; s++) begin
        #0.5;
        checks++;
        if (gclk !== 1'b0) begin failures++; $display("FAIL at %0t: gclk high while clk low", $time); end
      end
      ce_at_rise = ce;
      clk = 1'b1;
      if (ce_at_rise) passed++; else blocked++;
      for (int s = 0; s < 10; s++) begin
        #0.5;
        checks++;
        if (gclk !== ce_at_rise) begin
          failures++;
          $display("FAIL at %0t: gclk=%b expected %b", $time, gclk, ce_at_rise);
        end
      end
      clk = 1'b0;
    end
    checks++;
    if (passed == 0 || blocked == 0) failures++;
    $display("pulses passed=%0d blocked=%0d", passed, blocked);
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
