// trojan_resistant_bus -- a shared SoC bus that detects, blocks and reports
// run-time Trojan behaviour of the masters and slaves attached to it.
//
// Three attacks are handled:
//  * a master locking the bus for too long -> secure_arbiter counts the lock
//    cycles, breaks the lock and masks the master;
//  * a master touching a restricted address range -> secure_addr_decoder
//    diverts the access to the default slave, the arbiter masks the master;
//  * a slave holding wait for too long -> secure_bus_matrix nullifies the
//    wait, the decoder masks the slave and diverts later accesses.
// Each detection is an interrupt source of trojan_irq_ctrl.  Through sec_csr
// the CPU programs the restricted range and the thresholds, reads what was
// caught, clears masks and pending bits, and quarantines any IP block with
// power_gating_ctrl: reset, clock gating (clock_gate_cell) or power gating
// with isolation_cell clamps on the block's bus outputs.
//
// Interface: NM master ports and NS slave ports of a non-pipelined bus (see
// trojan_bus_pkg); one power domain per IP, masters first (domain m) then
// slaves (domain NM+s), each with its own reset, gated clock, power-switch
// enable and acknowledge; the security register port of the CPU; NEXT
// ordinary interrupt inputs and the CPU interrupt request with its vector.
// Timing: a requesting master is granted on the next edge, drives its
// transfer while granted, and sees `m_ready` in the cycle the transfer ends.
module trojan_resistant_bus
  import trojan_bus_pkg::*;
#(
  parameter int unsigned NM   = NUM_MASTERS,
  parameter int unsigned NS   = NUM_SLAVES,
  parameter int unsigned AW   = ADDR_W,
  parameter int unsigned DW   = DATA_W,
  parameter int unsigned NEXT = NUM_EXT_IRQ,
  localparam int unsigned NIP  = NM + NS,
  localparam int unsigned NSRC = NUM_TROJAN_IRQ + NEXT,
  localparam int unsigned MIDW = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned IDW  = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  test_en,
  // master ports
  input  logic [NM-1:0]         m_req,
  input  logic [NM-1:0]         m_lock,
  input  logic [NM-1:0]         m_trans,
  input  logic [NM-1:0][AW-1:0] m_addr,
  input  logic [NM-1:0]         m_write,
  input  logic [NM-1:0][DW-1:0] m_wdata,
  output logic [NM-1:0]         m_grant,
  output logic [NM-1:0]         m_ready,
  output logic [DW-1:0]         m_rdata,
  output logic                  m_err,
  output logic [MIDW-1:0]       m_master_id,
  output logic                  m_master_lock,
  // slave ports
  output logic [NS-1:0]         s_sel,
  output logic                  s_trans,
  output logic [AW-1:0]         s_addr,
  output logic                  s_write,
  output logic [DW-1:0]         s_wdata,
  input  logic [NS-1:0][DW-1:0] s_rdata,
  input  logic [NS-1:0]         s_wait,
  // interrupts
  input  logic [NEXT-1:0]       ext_irq,
  output logic                  irq,
  output logic [IDW-1:0]        irq_id,
  output logic [31:0]           irq_vector,
  // security register port
  input  logic                  csr_en,
  input  logic                  csr_we,
  input  logic [4:0]            csr_addr,
  input  logic [31:0]           csr_wdata,
  output logic [31:0]           csr_rdata,
  // per-IP quarantine controls (power switching fabric and IP clocks/resets)
  output logic [NIP-1:0]        ip_rst_n,
  output logic [NIP-1:0]        ip_clk,
  output logic [NIP-1:0]        ip_pwr_en,
  input  logic [NIP-1:0]        ip_pwr_ack
);

  // Isolated master and slave outputs.
  logic [NM-1:0]         mi_req, mi_lock, mi_trans, mi_write;
  logic [NM-1:0][AW-1:0] mi_addr;
  logic [NM-1:0][DW-1:0] mi_wdata;
  logic [NS-1:0][DW-1:0] si_rdata;
  logic [NS-1:0]         si_wait;

  // Internal bus.
  logic [MIDW-1:0] master_id;
  logic            owner_valid, bus_busy, bus_trans;
  logic [AW-1:0]   bus_addr;
  logic            default_sel, unauth, mal_lock, mal_wait;

  // Configuration and status.
  logic [AW-1:0]   restr_start, restr_end;
  logic [CNT_W-1:0] lock_thresh, wait_thresh;
  logic [NSRC-1:0] irq_enable, irq_clr, irq_pending;
  logic [NIP-1:0]  ip_rst_req, ip_clkgate_req, ip_pwrgate_req, ip_iso, ip_clk_en, ip_off;
  logic [NM-1:0]   master_mask, master_mask_clr;
  logic [NS-1:0]   slave_mask, slave_mask_clr;
  logic [AW-1:0]   viol_addr;
  logic [MIDW-1:0] viol_master, lock_master;
  logic [((NS > 1) ? $clog2(NS) : 1)-1:0] wait_slave;

  // ---------------------------------------------------------------- isolation
  for (genvar m = 0; m < NM; m++) begin : g_miso
    isolation_cell #(.W(4 + AW + DW)) u_iso (
      .iso_en (ip_iso[m]),
      .in     ({m_req[m], m_lock[m], m_trans[m], m_write[m], m_addr[m], m_wdata[m]}),
      .out    ({mi_req[m], mi_lock[m], mi_trans[m], mi_write[m], mi_addr[m], mi_wdata[m]})
    );
  end
  for (genvar s = 0; s < NS; s++) begin : g_siso
    isolation_cell #(.W(1 + DW)) u_iso (
      .iso_en (ip_iso[NM + s]),
      .in     ({s_wait[s], s_rdata[s]}),
      .out    ({si_wait[s], si_rdata[s]})
    );
  end

  // ---------------------------------------------------------------- bus core
  secure_arbiter #(.NM(NM)) u_arb (
    .clk, .rst_n,
    .req             (mi_req),
    .lock            (mi_lock),
    .bus_busy,
    .unauth,
    .lock_thresh,
    .master_mask_clr,
    .grant           (m_grant),
    .master_id,
    .owner_valid,
    .master_lock     (m_master_lock),
    .mal_lock,
    .master_mask,
    .lock_master
  );

  secure_addr_decoder #(.NS(NS), .NM(NM), .AW(AW)) u_dec (
    .clk, .rst_n,
    .trans       (bus_trans),
    .addr        (bus_addr),
    .master_id,
    .restr_start,
    .restr_end,
    .mal_wait,
    .slave_mask_clr,
    .slave_sel   (s_sel),
    .default_sel,
    .unauth,
    .slave_mask,
    .viol_addr,
    .viol_master,
    .wait_slave
  );

  secure_bus_matrix #(.NM(NM), .NS(NS), .AW(AW), .DW(DW)) u_mtx (
    .clk, .rst_n,
    .master_id,
    .owner_valid,
    .m_trans     (mi_trans),
    .m_addr      (mi_addr),
    .m_write     (mi_write),
    .m_wdata     (mi_wdata),
    .m_ready,
    .m_rdata,
    .m_err,
    .bus_trans,
    .bus_addr,
    .bus_write   (s_write),
    .bus_wdata   (s_wdata),
    .slave_sel   (s_sel),
    .default_sel,
    .s_rdata     (si_rdata),
    .s_wait      (si_wait),
    .wait_thresh,
    .mal_wait,
    .bus_busy
  );

  assign m_master_id = master_id;
  assign s_trans     = bus_trans;
  assign s_addr      = bus_addr;

  // ---------------------------------------------------------------- interrupts
  logic [NSRC-1:0] irq_src;
  always_comb begin
    irq_src = '0;
    irq_src[IRQ_UNAUTH]   = unauth;
    irq_src[IRQ_MAL_LOCK] = mal_lock;
    irq_src[IRQ_MAL_WAIT] = mal_wait;
    irq_src[NSRC-1:NUM_TROJAN_IRQ] = ext_irq;
  end

  trojan_irq_ctrl #(.NSRC(NSRC)) u_irq (
    .clk, .rst_n,
    .src     (irq_src),
    .enable  (irq_enable),
    .clr     (irq_clr),
    .pending (irq_pending),
    .irq,
    .irq_id,
    .vector  (irq_vector)
  );

  // ---------------------------------------------------------------- registers
  sec_csr #(.NM(NM), .NS(NS), .NIP(NIP), .NSRC(NSRC), .AW(AW)) u_csr (
    .clk, .rst_n,
    .csr_en, .csr_we, .csr_addr, .csr_wdata, .csr_rdata,
    .restr_start, .restr_end, .lock_thresh, .wait_thresh,
    .irq_enable, .ip_rst_req, .ip_clkgate_req, .ip_pwrgate_req,
    .master_mask_clr, .slave_mask_clr, .irq_clr,
    .master_mask, .slave_mask, .viol_addr, .viol_master, .lock_master, .wait_slave,
    .irq_pending, .irq, .irq_id,
    .ip_powered_down (ip_off)
  );

  // ---------------------------------------------------------------- quarantine
  for (genvar i = 0; i < NIP; i++) begin : g_ip
    power_gating_ctrl u_pg (
      .clk, .rst_n,
      .rst_req      (ip_rst_req[i]),
      .clkgate_req  (ip_clkgate_req[i]),
      .pwrgate_req  (ip_pwrgate_req[i]),
      .pwr_ack      (ip_pwr_ack[i]),
      .pwr_en       (ip_pwr_en[i]),
      .iso_en       (ip_iso[i]),
      .blk_clk_en   (ip_clk_en[i]),
      .blk_rst_n    (ip_rst_n[i]),
      .powered_down (ip_off[i])
    );
    clock_gate_cell u_cg (
      .clk,
      .en      (ip_clk_en[i]),
      .test_en,
      .gclk    (ip_clk[i])
    );
  end

endmodule
