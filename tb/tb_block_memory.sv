// tb_block_memory: self-checking testbench of the dual-port block memory.
//
// Both ports issue random reads and writes every cycle. Addresses are drawn
// from the whole memory in some stretches and from four words in others,
// so that both ports often hit the same word. A reference array in the
// testbench predicts each read: the word as it was before the edge
// (read-before-write), with port A's write kept when both ports write the
// same word. Read data is checked one cycle after the read, and a port
// that is not enabled must hold its last read data.
// A watchdog ends the run with a failure after a fixed number of cycles.
module tb_block_memory;

  localparam int unsigned W      = 32;
  localparam int unsigned DEPTH  = 128;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned CYCLES = 4000;

  logic          clk = 1'b0;
  logic          en_a, we_a, en_b, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [W-1:0]  wdata_a, wdata_b, rdata_a, rdata_b;
  logic [W-1:0]  model [DEPTH];
  logic [W-1:0]  exp_a, exp_b;
  int unsigned   checks = 0, failures = 0, same_word = 0, both_active = 0;
  logic          narrow;

  block_memory #(.WIDTH(W), .DEPTH(DEPTH)) dut (
    .clk(clk),
    .en_a(en_a), .we_a(we_a), .addr_a(addr_a), .wdata_a(wdata_a), .rdata_a(rdata_a),
    .en_b(en_b), .we_b(we_b), .addr_b(addr_b), .wdata_b(wdata_b), .rdata_b(rdata_b)
  );

  always #5 clk = ~clk;

  initial begin
    // Fill the memory and the model through port A first.
    en_b = 1'b0; we_b = 1'b0; addr_b = '0; wdata_b = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en_a = 1'b1; we_a = 1'b1; addr_a = AW'(i); wdata_a = W'($urandom);
      model[i] = wdata_a;
    end
    @(negedge clk);
    en_a = 1'b1; we_a = 1'b0; en_b = 1'b1;
    @(negedge clk);
    exp_a = model[addr_a]; exp_b = model[addr_b];
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      checks += 2;
      if (rdata_a !== exp_a) begin failures++; $display("FAIL at %0t: port A read %h expected %h", $time, rdata_a, exp_a); end
      if (rdata_b !== exp_b) begin failures++; $display("FAIL at %0t: port B read %h expected %h", $time, rdata_b, exp_b); end
      narrow  = ((c / 250) % 2) == 1;
      en_a    = ($urandom_range(4) != 0);
      en_b    = ($urandom_range(4) != 0);
      we_a    = $urandom_range(1);
      we_b    = $urandom_range(1);
      addr_a  = narrow ? AW'($urandom_range(3)) : AW'($urandom);
      addr_b  = narrow ? AW'($urandom_range(3)) : AW'($urandom);
      wdata_a = W'($urandom);
      wdata_b = W'($urandom);
      // Expected read data after the coming edge, then the model's writes.
      if (en_a) exp_a = model[addr_a];
      if (en_b) exp_b = model[addr_b];
      if (en_a && en_b) both_active++;
      if (en_a && en_b && we_a && we_b && addr_a == addr_b) same_word++;
      if (en_b && we_b) model[addr_b] = wdata_b;
      if (en_a && we_a) model[addr_a] = wdata_a;
    end
    checks++;
    if (same_word == 0 || both_active == 0) failures++;
    $display("both ports active=%0d same-word writes=%0d", both_active, same_word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (CYCLES + DEPTH) + 1000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
