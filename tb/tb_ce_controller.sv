// tb_ce_controller: self-checking testbench of the clock-enable controller.
//
// F and AF are driven with random values between clock edges. After each
// rising edge EN must equal NOT (F OR AF) as they were before that edge; while
// reset is held EN must be high (clock running).
// A watchdog ends the run with a failure after a fixed number of cycles.
module tb_ce_controller;

  localparam int unsigned CYCLES = 500;

  logic clk = 1'b0, rst = 1'b1, f = 1'b0, af = 1'b0, en;
  logic exp_en;
  int unsigned checks = 0, failures = 0;

  ce_controller dut (.clk(clk), .rst(rst), .f(f), .af(af), .en(en));

  always #5 clk = ~clk;

  initial begin
    f = 1'b1; af = 1'b1;
    #12;
    checks++;
    if (en !== 1'b1) begin failures++; $display("FAIL: en not high in reset"); end
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      f  = ($urandom_range(3) == 0);
      af = ($urandom_range(1) == 0);
      exp_en = ~(f | af);
      @(posedge clk) #1;
      checks++;
      if (en !== exp_en) begin
        failures++;
        $display("FAIL at %0t: f=%b af=%b en=%b expected %b", $time, f, af, en, exp_en);
      end
    end
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
