// tb_trojan_resistant_bus -- end-to-end test of the Trojan-resistant bus at
// its default size (3 masters, 3 slaves, 32-bit bus, reset thresholds).
//
// Behavioural models stand in for the IP around the bus:
//  * master 0 is the CPU: it configures the security registers, runs normal
//    transfers and services every interrupt (reads the vector and the captured
//    information, clears pending bits and masks, quarantines the culprit);
//  * master 1 is a DMA engine that first makes a legitimate locked burst and
//    then, as a Trojan, keeps LOCK asserted forever;
//  * master 2 is a Trojan I/O block that reads a restricted address;
//  * slave 0 is a memory with 4 wait states, slave 1 a zero-wait register
//    block that contains the restricted range, slave 2 a peripheral that, once
//    its Trojan is triggered, holds wait forever;
//  * every power domain has a switch that confirms pwr_en after 3 cycles.
// Memory contents are checked against a scoreboard, cycle counts against the
// wait states and thresholds, and each protection mechanism is counted; a
// mechanism that never happened counts as a failure.
module tb_trojan_resistant_bus;
  import trojan_bus_pkg::*;

  localparam int NM = NUM_MASTERS, NS = NUM_SLAVES, NIP = NM + NS, NEXT = NUM_EXT_IRQ;
  localparam int MEM_WAIT = 4;
  localparam int TIMEOUT = 300;

  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0;
  logic [NM-1:0] m_req, m_lock, m_trans, m_write, m_grant, m_ready;
  logic [NM-1:0][31:0] m_addr, m_wdata;
  logic [31:0] m_rdata, s_addr, s_wdata;
  logic m_err, m_master_lock, s_trans, s_write;
  logic [1:0] m_master_id;
  logic [NS-1:0] s_sel, s_wait;
  logic [NS-1:0][31:0] s_rdata;
  logic [NEXT-1:0] ext_irq;
  logic irq;
  logic [2:0] irq_id;
  logic [31:0] irq_vector;
  logic csr_en, csr_we;
  logic [4:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  logic [NIP-1:0] ip_rst_n, ip_clk, ip_pwr_en, ip_pwr_ack;

  trojan_resistant_bus dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_xfer = 0, n_wait_xfer = 0, n_contention = 0, n_lock_hold = 0, n_mal_lock = 0;
  int n_unauth = 0, n_mal_wait = 0, n_default = 0, n_refused = 0, n_diverted = 0;
  int n_irq = 0, n_rst = 0, n_clkgate = 0, n_pwrgate = 0, n_ext_irq = 0, n_mask_clear = 0;

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
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ slave models
  logic [31:0] mem0 [256];
  logic [31:0] regs1 [256];
  logic [31:0] ref0 [256];
  logic [31:0] ref1 [256];
  int          wcnt [NS];
  bit          trojan_slave_armed = 0;
  int          wait_of [NS];
  assign wait_of[0] = MEM_WAIT;
  assign wait_of[1] = 0;
  assign wait_of[2] = trojan_slave_armed ? 1_000_000 : 1;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_wait[s]  = s_sel[s] && s_trans && (wcnt[s] < wait_of[s]);
      s_rdata[s] = (s == 0) ? mem0[s_addr[9:2]] : (s == 1) ? regs1[s_addr[9:2]] : {16'h5A5A, s_addr[15:0]};
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      if (s_sel[s] && s_trans && s_wait[s]) wcnt[s] <= wcnt[s] + 1;
      else                                  wcnt[s] <= 0;
    end
    if (s_sel[0] && s_trans && !s_wait[0] && s_write) mem0[s_addr[9:2]] <= s_wdata;
    if (s_sel[1] && s_trans && !s_wait[1] && s_write) regs1[s_addr[9:2]] <= s_wdata;
  end

  // power switch fabric model
  logic [NIP-1:0] pw_d1, pw_d2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin pw_d1 <= '1; pw_d2 <= '1; ip_pwr_ack <= '1; end
    else begin pw_d1 <= ip_pwr_en; pw_d2 <= pw_d1; ip_pwr_ack <= pw_d2; end

  // ------------------------------------------------------------ CSR access
  task automatic csr_wr(input logic [4:0] a, input logic [31:0] d);
    csr_en = 1; csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk);
    csr_en = 0; csr_we = 0;
  endtask

  task automatic csr_rd(input logic [4:0] a, output logic [31:0] d);
    csr_en = 1; csr_we = 0; csr_addr = a;
    #1 d = csr_rdata;
    @(negedge clk);
    csr_en = 0;
  endtask

  // ------------------------------------------------------------ master driver
  // Called just after a falling edge; returns just after a falling edge.
  task automatic xfer(input int m, input logic [31:0] a, input bit wr, input logic [31:0] wd,
                      input bit lk, input bit keep,
                      output logic [31:0] rd, output bit err, output int cyc, output bit ok);
    int t;
    ok = 0; err = 0; rd = '0; cyc = 0; t = 0;
    m_req[m] = 1; m_lock[m] = lk;
    while (t < TIMEOUT) begin
      if (m_grant[m]) begin
        m_trans[m] = 1; m_addr[m] = a; m_write[m] = wr; m_wdata[m] = wd;
        #1;
        cyc++;
        if (m_ready[m]) begin
          rd = m_rdata; err = m_err; ok = 1;
          @(negedge clk);
          m_trans[m] = 0;
          if (!keep) begin m_req[m] = 0; m_lock[m] = 0; end
          return;
        end
      end
      @(negedge clk);
      t++;
    end
    m_trans[m] = 0; m_req[m] = 0; m_lock[m] = 0;
  endtask

  // CPU read/write with scoreboard
  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d, input int exp_cyc);
    logic [31:0] rd; bit err, ok; int cyc;
    xfer(0, a, 1, d, 0, 0, rd, err, cyc, ok);
    check(ok && !err, "CPU write completes");
    if (exp_cyc > 0) check(cyc == exp_cyc, "write cycle count");
    if (a[31:28] == 0) ref0[a[9:2]] = d;
    if (a[31:28] == 1) ref1[a[9:2]] = d;
    n_xfer++;
    if (cyc > 1) n_wait_xfer++;
  endtask

  task automatic cpu_read_check(input logic [31:0] a, input int exp_cyc);
    logic [31:0] rd; bit err, ok; int cyc;
    xfer(0, a, 0, 0, 0, 0, rd, err, cyc, ok);
    check(ok && !err, "CPU read completes");
    if (exp_cyc > 0) check(cyc == exp_cyc, "read cycle count");
    if (a[31:28] == 0) check(rd == ref0[a[9:2]], "memory read data");
    if (a[31:28] == 1) check(rd == ref1[a[9:2]], "register read data");
    n_xfer++;
    if (cyc > 1) n_wait_xfer++;
  endtask

  // interrupt service: returns the source id after clearing it
  task automatic isr_enter(input int exp_id, output logic [31:0] info);
    logic [31:0] v;
    check(irq, "interrupt raised");
    csr_rd(CSR_IRQ_VECTOR, v);
    check(v[31] && v[7:0] == 8'(exp_id), "interrupt source id");
    check(irq_vector == 32'h40 + 32'(exp_id) * 4, "handler vector");
    csr_rd(CSR_VIOL_INFO, info);
    csr_wr(CSR_IRQ_PENDING, 32'(1) << exp_id);
    n_irq++;
  endtask

  // ------------------------------------------------------------ test sequence
  initial begin
    logic [31:0] rd, info, v;
    bit err, ok;
    int cyc, locked_cycles, cpu_wait, edges;
    m_req = 0; m_lock = 0; m_trans = 0; m_write = 0; m_addr = '0; m_wdata = '0;
    ext_irq = 0; csr_en = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    for (int i = 0; i < 256; i++) begin mem0[i] = 0; regs1[i] = 0; ref0[i] = 0; ref1[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- configuration by the CPU
    csr_wr(CSR_RESTR_START, 32'h1000_0100);
    csr_wr(CSR_RESTR_END,   32'h1000_01FF);
    csr_rd(CSR_LOCK_THRESH, v);
    check(v == 32'(LOCK_THRESH_RST), "default lock threshold");

    // ---- normal traffic: memory with 4 wait states, zero-wait registers
    for (int i = 0; i < 8; i++) cpu_write(32'h0000_0000 + 32'(i) * 4, 32'hA000_0000 + 32'(i), MEM_WAIT + 1);
    for (int i = 0; i < 8; i++) cpu_write(32'h1000_0000 + 32'(i) * 4, 32'hB000_0000 + 32'(i), 1);
    for (int i = 0; i < 8; i++) cpu_read_check(32'h0000_0000 + 32'(i) * 4, MEM_WAIT + 1);
    for (int i = 0; i < 8; i++) cpu_read_check(32'h1000_0000 + 32'(i) * 4, 1);

    // ---- empty address region goes to the default slave
    xfer(0, 32'h7000_0000, 0, 0, 0, 0, rd, err, cyc, ok);
    check(ok && err && cyc == 1 && rd == 0, "empty region answered by default slave");
    check(!irq, "empty region is not a Trojan event");
    if (ok && err) n_default++;

    // ---- contention: CPU and DMA at once, both served
    fork
      begin
        logic [31:0] r; bit e, o; int c;
        xfer(0, 32'h1000_0040, 1, 32'h1111_1111, 0, 0, r, e, c, o);
        check(o && !e, "CPU served under contention");
      end
      begin
        logic [31:0] r; bit e, o; int c;
        xfer(1, 32'h0000_0080, 1, 32'h2222_2222, 0, 0, r, e, c, o);
        check(o && !e, "DMA served under contention");
      end
    join
    ref1[8'h10] = 32'h1111_1111; ref0[8'h20] = 32'h2222_2222;
    n_contention++;
    cpu_read_check(32'h1000_0040, 1);
    cpu_read_check(32'h0000_0080, MEM_WAIT + 1);

    // ---- legitimate locked DMA burst: CPU must wait for the whole burst
    fork
      begin
        logic [31:0] r; bit e, o; int c;
        for (int i = 0; i < 6; i++) begin
          xfer(1, 32'h0000_0100 + 32'(i) * 4, 1, 32'hD000_0000 + 32'(i), 1, i < 5, r, e, c, o);
          check(o && !e, "locked burst transfer");
          if (i < 5) check(m_master_lock, "MASTER LOCK shown during burst");
          ref0[8'(64 + i)] = 32'hD000_0000 + 32'(i);
        end
      end
      begin
        repeat (3) @(negedge clk);
        cpu_wait = 0;
        m_req[0] = 1;
        while (!m_grant[0] && cpu_wait < TIMEOUT) begin
          if (m_grant[1] && m_master_lock) n_lock_hold++;
          @(negedge clk); cpu_wait++;
        end
        m_req[0] = 0;
      end
    join
    check(n_lock_hold > 10 && !irq, "CPU held off by a legitimate lock, no alarm");
    for (int i = 0; i < 6; i++) cpu_read_check(32'h0000_0100 + 32'(i) * 4, MEM_WAIT + 1);
    @(negedge clk);

    // ---- Trojan DMA: keeps LOCK forever
    locked_cycles = 0;
    m_req[1] = 1; m_lock[1] = 1;
    while (!m_grant[1]) @(negedge clk);
    while (m_grant[1] && locked_cycles < 1000) begin
      m_trans[1] = 1; m_addr[1] = 32'h0000_0200; m_write[1] = 0;
      locked_cycles++;
      @(negedge clk);
    end
    m_trans[1] = 0;
    check(locked_cycles == int'(LOCK_THRESH_RST) + 1, "lock broken after threshold");
    if (irq) n_mal_lock++;
    isr_enter(IRQ_MAL_LOCK, info);
    check(info[31:24] == 8'd1, "ISR identifies the locking master");
    csr_rd(CSR_MASTER_MASK, v);
    check(v == 32'b010, "DMA in master mask register");
    // the CPU gets the bus although the Trojan still requests with LOCK
    cpu_read_check(32'h1000_0000, 1);
    repeat (10) begin
      check(!m_grant[1], "masked DMA refused");
      @(negedge clk);
    end
    n_refused++;
    // countermeasure: reset the DMA, then re-admit it
    m_req[1] = 0; m_lock[1] = 0;
    csr_wr(CSR_IP_RESET, 32'b000010);
    @(negedge clk);  // request register, then the controller's register
    check(ip_rst_n == 6'b111101, "DMA held in reset");
    csr_wr(CSR_IP_RESET, 32'b000000);
    @(negedge clk);
    check(ip_rst_n == 6'b111111, "DMA reset released");
    n_rst++;
    csr_wr(CSR_MASTER_MASK, 32'b010);
    csr_rd(CSR_MASTER_MASK, v);
    check(v == 0, "mask cleared by software");
    n_mask_clear++;
    xfer(1, 32'h0000_0300, 1, 32'hE000_0001, 0, 0, rd, err, cyc, ok);
    check(ok && !err, "re-admitted DMA works");
    ref0[8'hC0] = 32'hE000_0001;

    // ---- Trojan I/O master reads a restricted address
    xfer(2, 32'h1000_0180, 0, 0, 0, 0, rd, err, cyc, ok);
    check(ok && err && rd == 0, "restricted access answered by default slave");
    if (ok && err) n_unauth++;
    isr_enter(IRQ_UNAUTH, info);
    check(info[15:8] == 8'd2, "ISR identifies the offending master");
    csr_rd(CSR_VIOL_ADDR, v);
    check(v == 32'h1000_0180, "violating address captured");
    csr_rd(CSR_MASTER_MASK, v);
    check(v == 32'b100, "I/O master masked");
    xfer(2, 32'h1000_0000, 0, 0, 0, 0, rd, err, cyc, ok);
    check(!ok, "masked I/O master never granted");
    if (!ok) n_refused++;
    // countermeasure: stop its clock
    csr_wr(CSR_IP_CLKGATE, 32'b000100);
    @(negedge clk);
    edges = 0;
    fork
      begin repeat (10) @(negedge clk); end
      begin forever begin @(posedge ip_clk[2]); edges++; end end
    join_any
    disable fork;
    check(edges == 0, "I/O master clock stopped");
    if (edges == 0) n_clkgate++;
    csr_wr(CSR_IP_CLKGATE, 32'b000000);
    edges = 0;
    fork
      begin repeat (10) @(negedge clk); end
      begin forever begin @(posedge ip_clk[2]); edges++; end end
    join_any
    disable fork;
    check(edges >= 9, "I/O master clock running again");

    // ---- Trojan slave: holds wait forever once triggered
    cpu_read_check(32'h2000_0010, 2);
    trojan_slave_armed = 1;
    xfer(0, 32'h2000_0010, 0, 0, 0, 0, rd, err, cyc, ok);
    check(ok && err && cyc == int'(WAIT_THRESH_RST) + 1, "stuck wait cut off after threshold");
    if (ok && err) n_mal_wait++;
    isr_enter(IRQ_MAL_WAIT, info);
    check(info[23:16] == 8'd2, "ISR identifies the waiting slave");
    csr_rd(CSR_SLAVE_MASK, v);
    check(v == 32'b100, "slave in slave mask register");
    xfer(0, 32'h2000_0010, 0, 0, 0, 0, rd, err, cyc, ok);
    check(ok && err && cyc == 1, "masked slave diverted to default slave");
    if (ok && err && cyc == 1) n_diverted++;
    cpu_read_check(32'h0000_0004, MEM_WAIT + 1);
    // countermeasure: power the slave down, then bring it back
    csr_wr(CSR_IP_PWRGATE, 32'b100000);
    cyc = 0;
    while ((ip_pwr_en[5] || ip_pwr_ack[5]) && cyc < 50) begin @(negedge clk); cyc++; end
    @(negedge clk);
    csr_rd(CSR_IP_STATUS, v);
    check(v == 32'b100000 && !ip_pwr_en[5] && !ip_rst_n[5], "slave powered down");
    // with its mask cleared, the powered-down slave is seen through its
    // isolation clamps: no wait, read data zero, although the Trojan still waits
    csr_wr(CSR_SLAVE_MASK, 32'b100);
    n_mask_clear++;
    xfer(0, 32'h2000_0010, 0, 0, 0, 0, rd, err, cyc, ok);
    check(ok && !err && cyc == 1 && rd == 0, "outputs of powered-down slave clamped");
    if (v == 32'b100000 && ok && cyc == 1) n_pwrgate++;
    trojan_slave_armed = 0;  // a power cycle clears the Trojan's state
    csr_wr(CSR_IP_PWRGATE, 32'b000000);
    cyc = 0;
    while (!ip_rst_n[5] && cyc < 50) begin @(negedge clk); cyc++; end
    check(ip_pwr_en[5] && ip_rst_n[5] && cyc > 3, "slave powered again after the switch confirms");
    cpu_read_check(32'h2000_0010, 2);

    // ---- an ordinary peripheral interrupt
    ext_irq = 4'b0001;
    @(negedge clk);
    ext_irq = 0;
    isr_enter(NUM_TROJAN_IRQ, info);
    n_ext_irq++;
    check(!irq, "no interrupt left");

    // ---- mechanism coverage
    $display("transfers=%0d wait_transfers=%0d contention=%0d lock_hold_cycles=%0d mal_lock=%0d",
             n_xfer, n_wait_xfer, n_contention, n_lock_hold, n_mal_lock);
    $display("unauth=%0d mal_wait=%0d default=%0d refused=%0d diverted=%0d irqs=%0d",
             n_unauth, n_mal_wait, n_default, n_refused, n_diverted, n_irq);
    $display("reset=%0d clock_gate=%0d power_gate=%0d ext_irq=%0d mask_clear=%0d",
             n_rst, n_clkgate, n_pwrgate, n_ext_irq, n_mask_clear);
    check(n_xfer > 0, "normal transfers happened");
    check(n_wait_xfer > 0, "wait states happened");
    check(n_contention > 0, "contention happened");
    check(n_lock_hold > 0, "legitimate lock happened");
    check(n_mal_lock > 0, "malicious lock detected");
    check(n_unauth > 0, "unauthorized access detected");
    check(n_mal_wait > 0, "malicious wait detected");
    check(n_default > 0, "default slave answered");
    check(n_refused > 0, "masked master refused");
    check(n_diverted > 0, "masked slave diverted");
    check(n_irq >= 4, "interrupts serviced");
    check(n_rst > 0 && n_clkgate > 0 && n_pwrgate > 0, "reset, clock gating and power gating used");
    check(n_ext_irq > 0 && n_mask_clear > 0, "peripheral interrupt and mask clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
