// tb_sec_csr -- self-checking test of the security register block.
//
// Checks the reset values, writes and reads back every read/write register
// with random data (truncated to each register's width), checks that the
// status inputs appear at their addresses, and that writing the mask and
// pending registers produces one-cycle clear pulses carrying the written bits
// without changing any stored configuration.
module tb_sec_csr;
  import trojan_bus_pkg::*;

  localparam int unsigned NM = 3, NS = 3, NIP = 6, NSRC = 7, AW = 32, CW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic csr_en, csr_we;
  logic [4:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  logic [AW-1:0] restr_start, restr_end, viol_addr;
  logic [CW-1:0] lock_thresh, wait_thresh;
  logic [NSRC-1:0] irq_enable, irq_clr, irq_pending;
  logic [NIP-1:0] ip_rst_req, ip_clkgate_req, ip_pwrgate_req, ip_powered_down;
  logic [NM-1:0] master_mask_clr, master_mask;
  logic [NS-1:0] slave_mask_clr, slave_mask;
  logic [1:0] viol_master, lock_master, wait_slave;
  logic irq;
  logic [2:0] irq_id;
  int checks = 0, failures = 0;

  sec_csr #(.NM(NM), .NS(NS), .NIP(NIP), .NSRC(NSRC), .AW(AW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    csr_en = 1; csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk);
    csr_en = 0; csr_we = 0;
  endtask

  // combinational read: present the address, let the mux settle
  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    csr_addr = a;
    #1;
    d = csr_rdata;
  endtask

  initial begin
    logic [31:0] d, q;
    int widths[15];
    csr_en = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    master_mask = 3'b101; slave_mask = 3'b010; viol_addr = 32'h2000_1234;
    viol_master = 2'd2; lock_master = 2'd1; wait_slave = 2'd0; irq_pending = 7'h45;
    irq = 1; irq_id = 3'd3; ip_powered_down = 6'b100001;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(restr_start == '1 && restr_end == '0, "reset: nothing restricted");
    check(lock_thresh == LOCK_THRESH_RST && wait_thresh == WAIT_THRESH_RST, "reset thresholds");
    check(irq_enable == '1 && ip_rst_req == 0 && ip_clkgate_req == 0 && ip_pwrgate_req == 0, "reset controls");
    // read/write registers
    widths = '{32, 32, 16, 16, 0, 0, 0, 0, 7, 0, 0, 6, 6, 6, 0};
    for (int rep = 0; rep < 20; rep++) begin
      for (int a = 0; a < 15; a++) begin
        if (widths[a] == 0) continue;
        d = $urandom;
        wr(5'(a), d);
        rd(5'(a), q); check(q == (widths[a] == 32 ? d : d & ((32'd1 << widths[a]) - 1)), "readback");
      end
    end
    wr(CSR_RESTR_START, 32'h3000_0000);
    wr(CSR_RESTR_END, 32'h3000_00FF);
    wr(CSR_LOCK_THRESH, 32'd100);
    wr(CSR_WAIT_THRESH, 32'd9);
    wr(CSR_IP_PWRGATE, 32'b000100);
    check(restr_start == 32'h3000_0000 && restr_end == 32'h3000_00FF, "range outputs");
    check(lock_thresh == 16'd100 && wait_thresh == 16'd9, "threshold outputs");
    check(ip_pwrgate_req == 6'b000100, "power gate request output");
    // status
    rd(CSR_MASTER_MASK, q); check(q == 32'b101, "master mask status");
    rd(CSR_SLAVE_MASK, q); check(q == 32'b010, "slave mask status");
    rd(CSR_VIOL_ADDR, q); check(q == 32'h2000_1234, "violation address");
    rd(CSR_VIOL_INFO, q); check(q == {8'd1, 8'd0, 8'd2, 8'd0}, "violation info");
    rd(CSR_IRQ_PENDING, q); check(q == 32'h45, "pending");
    rd(CSR_IRQ_VECTOR, q); check(q == {1'b1, 23'd0, 8'd3}, "vector status");
    rd(CSR_IP_STATUS, q); check(q == 32'b100001, "ip status");
    rd(5'd20, q); check(q == 0, "unused address");
    // clear pulses
    @(negedge clk);
    csr_en = 1; csr_we = 1; csr_addr = CSR_MASTER_MASK; csr_wdata = 32'b100;
    #1 check(master_mask_clr == 3'b100 && slave_mask_clr == 0 && irq_clr == 0, "master clear pulse");
    csr_addr = CSR_SLAVE_MASK; csr_wdata = 32'b011;
    #1 check(slave_mask_clr == 3'b011 && master_mask_clr == 0, "slave clear pulse");
    csr_addr = CSR_IRQ_PENDING; csr_wdata = 32'h41;
    #1 check(irq_clr == 7'h41, "pending clear pulse");
    csr_we = 0;
    #1 check(irq_clr == 0 && master_mask_clr == 0 && slave_mask_clr == 0, "no pulse on read");
    csr_en = 0;
    @(negedge clk);
    check(restr_start == 32'h3000_0000 && lock_thresh == 16'd100, "configuration unchanged by clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
