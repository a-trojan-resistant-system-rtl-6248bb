// tb_trojan_irq_ctrl -- self-checking test of the interrupt controller.
//
// Random source pulses, enable masks and write-1-to-clear patterns are driven
// each cycle.  A reference model keeps its own pending register and predicts
// irq, the lowest enabled pending source and its handler vector.  A directed
// part checks that a detection pulse becomes an interrupt one cycle later and
// that a Trojan source wins over a simultaneous peripheral interrupt.
module tb_trojan_irq_ctrl;
  import trojan_bus_pkg::*;

  localparam int unsigned NSRC = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NSRC-1:0] src, enable, clr, pending;
  logic irq;
  logic [2:0] irq_id;
  logic [31:0] vector;

  int checks = 0, failures = 0;

  trojan_irq_ctrl #(.NSRC(NSRC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [NSRC-1:0] r_pend, act;
    int e_id;
    src = 0; enable = '1; clr = 0; r_pend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed: malicious wait and a peripheral interrupt in the same cycle
    @(negedge clk);
    check(!irq, "no interrupt after reset");
    src = 7'b0010100;  // source 2 (malicious wait) and source 4 (peripheral)
    #1 check(!irq, "interrupt not before the clock edge");
    @(negedge clk); src = 0;
    check(irq && irq_id == 3'd2 && vector == 32'h40 + 32'd8, "Trojan source has priority, vector");
    clr = 7'b0000100;
    @(negedge clk); clr = 0;
    check(irq && irq_id == 3'd4 && vector == 32'h40 + 32'd16, "peripheral next");
    clr = '1;
    @(negedge clk); clr = 0;
    check(!irq, "all cleared");
    // random
    r_pend = 0;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      src = ($urandom_range(0, 2) == 0) ? 7'(1 << $urandom_range(0, 6)) : 7'b0;
      if ($urandom_range(0, 19) == 0) enable = 7'($urandom);
      clr = ($urandom_range(0, 3) == 0) ? 7'($urandom) : 7'b0;
      #1;
      act = r_pend & enable;
      e_id = 0;
      for (int i = NSRC - 1; i >= 0; i--) if (act[i]) e_id = i;
      check(pending == r_pend, "pending");
      check(irq == (act != 0), "irq");
      if (act != 0) check(irq_id == 3'(e_id) && vector == 32'h40 + 32'(e_id) * 4, "id and vector");
      r_pend = (r_pend & ~clr) | src;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
