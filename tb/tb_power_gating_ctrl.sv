// tb_power_gating_ctrl -- self-checking test of the quarantine controller.
//
// A small behavioural model of the power switch fabric answers `pwr_en` with
// `pwr_ack` after a fixed number of cycles.  The test checks reset and clock
// gating requests on a powered block, the full power-down sequence (isolation
// and reset before the switch opens, clock stopped, status bit), the power-up
// sequence (isolation held until the supply is back and the block has seen a
// reset with its clock running), and the cycle counts of both sequences.  An
// invariant is checked every cycle: whenever the switch is open or the supply
// is not confirmed, the isolation clamps are on.
module tb_power_gating_ctrl;
  import trojan_bus_pkg::*;

  localparam int SW_DELAY = 3;  // switch fabric response, cycles

  logic clk = 1'b0, rst_n = 1'b0;
  logic rst_req, clkgate_req, pwrgate_req, pwr_ack;
  logic pwr_en, iso_en, blk_clk_en, blk_rst_n, powered_down;
  int checks = 0, failures = 0;

  power_gating_ctrl dut (.*);

  always #5 clk = ~clk;

  // power switch fabric model: supply follows pwr_en after SW_DELAY cycles
  logic [SW_DELAY-1:0] sw_pipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sw_pipe <= '1;
    else        sw_pipe <= {sw_pipe[SW_DELAY-2:0], pwr_en};
  assign pwr_ack = sw_pipe[SW_DELAY-1];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // invariant
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ((!pwr_en || !pwr_ack) && !iso_en) begin
      failures++;
      $display("FAIL block not isolated while unpowered at %0t", $time);
    end
  end

  initial begin
    int n;
    bit saw_reset_with_clock;
    rst_req = 0; clkgate_req = 0; pwrgate_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pwr_en && !iso_en && blk_clk_en && blk_rst_n && !powered_down, "normal operation");
    // reset request
    rst_req = 1; @(negedge clk);
    check(!blk_rst_n && blk_clk_en && !iso_en, "block held in reset");
    rst_req = 0; @(negedge clk);
    check(blk_rst_n, "reset released");
    // clock gating
    clkgate_req = 1; @(negedge clk);
    check(!blk_clk_en && blk_rst_n && pwr_en && !iso_en, "clock gated");
    clkgate_req = 0; @(negedge clk);
    check(blk_clk_en, "clock running again");
    // power down
    pwrgate_req = 1;
    n = 0;
    @(negedge clk);
    check(iso_en && !blk_clk_en && !blk_rst_n && pwr_en, "isolate before switching off");
    while (!powered_down && n < 50) begin @(negedge clk); n++; end
    check(n == SW_DELAY + 2, "power-down takes isolate + switch delay + one cycle");
    check(!pwr_en && iso_en && !blk_clk_en, "powered down state");
    repeat (5) @(negedge clk);
    check(powered_down, "stays down");
    // power up
    pwrgate_req = 0;
    n = 0;
    saw_reset_with_clock = 0;
    while (iso_en && n < 50) begin
      @(negedge clk); n++;
      if (blk_clk_en && !blk_rst_n) saw_reset_with_clock = 1;
    end
    check(n == SW_DELAY + 3, "power-up takes switch delay + restore");
    check(saw_reset_with_clock, "block reset with clock before release");
    check(pwr_en && blk_clk_en && blk_rst_n && !powered_down, "back in operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
