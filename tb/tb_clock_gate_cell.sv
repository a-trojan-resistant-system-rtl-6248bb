// tb_clock_gate_cell -- self-checking test of the clock gate.
//
// The enable is changed at random times, including in the middle of the
// clock's high phase.  The gated clock is sampled every nanosecond and
// compared with the ideal gated clock, whose enable is the value present at
// the last falling clock edge: no pulse may be cut short or added.  The number
// of gated rising edges is also counted against the expected count.
module tb_clock_gate_cell;
  logic clk = 1'b0, en = 1'b0, test_en = 1'b0, gclk;
  logic en_at_fall = 1'b0;
  int checks = 0, failures = 0;
  int edges = 0, exp_edges = 0;

  clock_gate_cell dut (.*);

  always #50 clk = ~clk;

  // ideal model: enable seen at the end of the low phase
  always @(posedge clk) if (en_at_fall || test_en) exp_edges++;
  always @(posedge gclk) edges++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // inputs change at times 5 mod 10, never on a clock edge (multiples of
    // 50); the outputs are sampled 4 units later
    #5;
    for (int t = 0; t < 20000; t++) begin
      if (t % 7 == 3 && $urandom_range(0, 1) == 1) en = ~en;
      if (t % 997 == 0) test_en = ($urandom_range(0, 3) == 0);
      #4;
      if (!clk) en_at_fall = en || test_en;
      checks++;
      if (gclk !== (clk && en_at_fall)) begin
        failures++;
        if (failures < 10) $display("FAIL at %0t: clk=%b gclk=%b", $time, clk, gclk);
      end
      #6;
    end
    checks++;
    if (edges != exp_edges || edges == 0) begin
      failures++;
      $display("FAIL edges %0d expected %0d", edges, exp_edges);
    end
    $display("gated edges=%0d", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
