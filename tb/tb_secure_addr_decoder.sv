// tb_secure_addr_decoder -- self-checking test of the secure address decoder.
//
// Random transfers (address regions inside and outside the populated slave
// space, some inside a random restricted range) are driven each cycle together
// with random malicious-wait pulses and mask clears.  A reference model in the
// testbench keeps its own copy of the slave mask and capture registers and
// predicts the selects, the default select, the unauthorized-access flag and
// every register after each clock edge.
module tb_secure_addr_decoder;
  import trojan_bus_pkg::*;

  localparam int unsigned NS = 3, NM = 3, AW = 32, RB = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic trans, mal_wait;
  logic [AW-1:0] addr, restr_start, restr_end;
  logic [1:0] master_id;
  logic [NS-1:0] slave_mask_clr, slave_sel, slave_mask;
  logic default_sel, unauth;
  logic [AW-1:0] viol_addr;
  logic [1:0] viol_master, wait_slave;

  int checks = 0, failures = 0;
  int n_unauth = 0, n_masked_div = 0, n_empty = 0, n_sel = 0;

  secure_addr_decoder #(.NS(NS), .NM(NM), .AW(AW), .RB(RB)) dut (.*);

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

  logic [NS-1:0] ref_mask;
  logic [AW-1:0] ref_vaddr;
  logic [1:0]    ref_vmaster, ref_wslave;

  initial begin
    logic [NS-1:0] e_sel;
    logic          e_unauth, e_def;
    int            reg_i;
    trans = 0; addr = 0; master_id = 0; restr_start = '1; restr_end = '0;
    mal_wait = 0; slave_mask_clr = 0;
    ref_mask = 0; ref_vaddr = 0; ref_vmaster = 0; ref_wslave = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      if (it % 500 == 0) begin
        // new restricted range inside region 1 or 2
        restr_start = {4'($urandom_range(1, 2)), 28'($urandom_range(0, 32'h0800_0000))};
        restr_end   = restr_start + 32'($urandom_range(0, 32'h0100_0000));
      end
      trans     = ($urandom_range(0, 9) != 0);
      reg_i     = ($urandom_range(0, 7) == 0) ? int'($urandom_range(3, 15)) : int'($urandom_range(0, 2));
      addr      = {4'(reg_i), 28'($urandom)};
      if ($urandom_range(0, 5) == 0) addr = restr_start + 32'($urandom_range(0, 16));
      master_id = 2'($urandom_range(0, 2));
      mal_wait  = ($urandom_range(0, 29) == 0);
      slave_mask_clr = ($urandom_range(0, 19) == 0) ? 3'($urandom) : 3'b000;
      #1;
      // reference decode
      e_unauth = trans && addr >= restr_start && addr <= restr_end;
      e_sel = '0;
      if (trans && !e_unauth && reg_i < NS && !ref_mask[reg_i]) e_sel[reg_i] = 1'b1;
      e_def = trans && (e_sel == 0);
      check(unauth == e_unauth, "unauth");
      check(slave_sel == e_sel, "slave_sel");
      check(default_sel == e_def, "default_sel");
      if (e_unauth) n_unauth++;
      if (trans && !e_unauth && reg_i < NS && ref_mask[reg_i]) n_masked_div++;
      if (trans && !e_unauth && reg_i >= NS) n_empty++;
      if (e_sel != 0) n_sel++;
      // reference registers
      if (e_unauth) begin ref_vaddr = addr; ref_vmaster = master_id; end
      if (mal_wait && e_sel != 0) ref_wslave = 2'(reg_i);
      ref_mask = (ref_mask & ~slave_mask_clr) | (mal_wait ? e_sel : 3'b000);
      @(posedge clk); #1;
      check(slave_mask == ref_mask, "slave_mask");
      check(viol_addr == ref_vaddr && viol_master == ref_vmaster, "violation capture");
      check(wait_slave == ref_wslave, "wait slave capture");
    end
    check(n_unauth > 0 && n_masked_div > 0 && n_empty > 0 && n_sel > 0, "coverage");
    $display("unauth=%0d masked_diverted=%0d empty=%0d selected=%0d", n_unauth, n_masked_div, n_empty, n_sel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
