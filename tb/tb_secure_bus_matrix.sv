// tb_secure_bus_matrix -- self-checking test of the secure bus matrix.
//
// Part 1 is directed and checks cycle counts: a slave that waits 4 cycles
// (a 200 MHz bus in front of a 50 MHz memory) completes on the 5th cycle
// without error; a slave stuck in wait is cut off on cycle wait_thresh+1 with
// mal_wait and an error response; a default-slave access completes at once
// with an error.  Part 2 drives random owners, transfers, selects and wait
// patterns and compares all outputs with a reference model of the
// multiplexers and the wait counter.
module tb_secure_bus_matrix;
  import trojan_bus_pkg::*;

  localparam int unsigned NM = 3, NS = 3, AW = 32, DW = 32, CW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] master_id;
  logic owner_valid;
  logic [NM-1:0] m_trans, m_write, m_ready;
  logic [NM-1:0][AW-1:0] m_addr;
  logic [NM-1:0][DW-1:0] m_wdata;
  logic [DW-1:0] m_rdata, bus_wdata;
  logic m_err, bus_trans, bus_write, default_sel, mal_wait, bus_busy;
  logic [AW-1:0] bus_addr;
  logic [NS-1:0] slave_sel, s_wait;
  logic [NS-1:0][DW-1:0] s_rdata;
  logic [CW-1:0] wait_thresh;

  int checks = 0, failures = 0;
  int n_mal_wait = 0, n_wait = 0, n_default = 0, n_done = 0;

  secure_bus_matrix #(.NM(NM), .NS(NS), .AW(AW), .DW(DW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  // Count cycles of one transfer from owner 1 to slave `s` with the slave
  // holding wait for `w` cycles; returns cycles until ready and the error flag.
  task automatic one_transfer(input int s, input int w, output int cyc, output bit err);
    cyc = 0; err = 0;
    @(negedge clk);
    master_id = 2'd1; owner_valid = 1;
    m_trans = 3'b010; m_addr[1] = 32'h1000_0040; m_write[1] = 0;
    slave_sel = (s >= 0) ? (3'b001 << s) : 3'b000;
    default_sel = (s < 0);
    s_rdata[s >= 0 ? s : 0] = 32'hCAFE_0000 + 32'(s);
    while (cyc < 1000) begin
      s_wait = (s >= 0 && cyc < w) ? (3'b001 << s) : 3'b000;
      #1;
      cyc++;
      if (m_ready[1]) begin
        err = m_err;
        if (s >= 0 && !err) check(m_rdata == 32'hCAFE_0000 + 32'(s), "read data of slave");
        break;
      end
      @(negedge clk);
    end
    m_trans = 0; slave_sel = 0; default_sel = 0; s_wait = 0;
  endtask

  logic [CW-1:0] r_cnt;
  logic          prev_busy;  // transfer still stretched at the last clock edge

  initial begin
    int cyc; bit err;
    master_id = 0; owner_valid = 0; m_trans = 0; m_addr = '0; m_write = 0; m_wdata = '0;
    slave_sel = 0; default_sel = 0; s_rdata = '0; s_wait = 0; wait_thresh = 16'd16;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    one_transfer(2, 4, cyc, err);
    check(cyc == 5 && !err, "4-cycle wait completes on 5th cycle");
    one_transfer(0, 16, cyc, err);
    check(cyc == 17 && !err, "wait of exactly wait_thresh cycles is allowed");
    one_transfer(0, 1000, cyc, err);
    check(cyc == 17 && err, "stuck wait cut off after wait_thresh cycles with error");
    one_transfer(-1, 0, cyc, err);
    check(cyc == 1 && err, "default slave answers at once with error");
    one_transfer(1, 0, cyc, err);
    check(cyc == 1 && !err, "zero-wait transfer");

    // random phase
    @(negedge clk);
    r_cnt = 0;
    prev_busy = 0;
    for (int it = 0; it < 20000; it++) begin
      logic e_trans, e_wr, e_wait, e_mal, e_done;
      logic [DW-1:0] e_rd;
      int s;
      if (it % 100 == 0) wait_thresh = 16'($urandom_range(0, 6));
      // keep owner and address while a transfer is stretched
      if (!prev_busy) begin
        master_id = 2'($urandom_range(0, 2));
        owner_valid = ($urandom_range(0, 7) != 0);
        m_trans = 3'($urandom);
        m_addr = {32'($urandom), 32'($urandom), 32'($urandom)};
        m_write = 3'($urandom);
        m_wdata = {32'($urandom), 32'($urandom), 32'($urandom)};
        s = $urandom_range(0, 3);
        slave_sel = (s < 3) ? (3'b001 << s) : 3'b000;
      end
      s_rdata = {32'($urandom), 32'($urandom), 32'($urandom)};
      s_wait = ($urandom_range(0, 9) == 0) ? 3'b111 : 3'($urandom);
      e_trans = owner_valid && m_trans[master_id];
      if (!e_trans) slave_sel = 0;
      default_sel = e_trans && (slave_sel == 0);
      #1;
      e_rd = '0; e_wait = 0;
      for (int k = 0; k < 3; k++) if (slave_sel[k]) begin e_rd = s_rdata[k]; e_wait = s_wait[k]; end
      e_mal = e_trans && e_wait && (r_cnt >= wait_thresh);
      e_done = e_trans && !(e_wait && !e_mal);
      check(bus_trans == e_trans && bus_addr == m_addr[master_id] &&
            bus_write == m_write[master_id] && bus_wdata == m_wdata[master_id], "forward mux");
      check(m_rdata == e_rd, "read mux");
      check(mal_wait == e_mal, "mal_wait");
      check(m_ready == (e_done ? (3'b001 << master_id) : 3'b000), "ready");
      check(m_err == (e_done && (default_sel || e_mal)), "err");
      check(bus_busy == (e_trans && e_wait && !e_mal), "busy");
      if (e_mal) n_mal_wait++;
      if (bus_busy) n_wait++;
      if (default_sel) n_default++;
      if (e_done) n_done++;
      r_cnt = (e_trans && e_wait && !e_mal) ? r_cnt + 1'b1 : '0;
      prev_busy = bus_busy;
      @(negedge clk);
    end
    check(n_mal_wait > 0 && n_wait > 0 && n_default > 0 && n_done > 0, "coverage");
    $display("mal_wait=%0d wait_cycles=%0d default=%0d done=%0d", n_mal_wait, n_wait, n_default, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
