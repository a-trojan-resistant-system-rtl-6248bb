// sec_csr -- software-visible security registers of the Trojan-resistant bus.
//
// The embedded software configures the protection and services its interrupts
// through this register block.  It holds the Restricted Address Start/End
// registers, the malicious-lock and malicious-wait thresholds, the interrupt
// enable mask and the per-IP quarantine requests (reset, clock gating, power
// gating).  It reads back the malicious master and slave mask registers (kept
// in the arbiter and address decoder), the captured address and master of the
// last unauthorized access, the master caught locking and the slave caught
// waiting, and the interrupt pending bits and vector. Writing 1s to the mask
// or pending registers clears those bits (one-cycle pulses on the *_clr
// outputs).
//
// Interface: a single-cycle register port.  A write (`csr_en && csr_we`) takes
// effect on the rising clock edge; read data is combinational from `csr_addr`
// (word index, map in trojan_bus_pkg::csr_addr_e).  Unused addresses read 0.
// Reset state: no restricted range (start above end), thresholds from the
// package, every interrupt enabled, no quarantine.
//
// Which registers exist follows the published architecture (restricted range
// registers, programmable thresholds, mask registers, information for the
// service routine, reset/clock/power control of a Trojan block); the port, the
// map, the reset values and the write-1-to-clear rule are this design's
// choices.
module sec_csr
  import trojan_bus_pkg::*;
#(
  parameter int unsigned NM   = NUM_MASTERS,
  parameter int unsigned NS   = NUM_SLAVES,
  parameter int unsigned NIP  = NUM_MASTERS + NUM_SLAVES,
  parameter int unsigned NSRC = NUM_TROJAN_IRQ + NUM_EXT_IRQ,
  parameter int unsigned AW   = ADDR_W,
  parameter int unsigned CW   = CNT_W,
  localparam int unsigned MIDW = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned SIDW = (NS > 1) ? $clog2(NS) : 1,
  localparam int unsigned IDW  = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // register port
  input  logic            csr_en,
  input  logic            csr_we,
  input  logic [4:0]      csr_addr,
  input  logic [31:0]     csr_wdata,
  output logic [31:0]     csr_rdata,
  // configuration
  output logic [AW-1:0]   restr_start,
  output logic [AW-1:0]   restr_end,
  output logic [CW-1:0]   lock_thresh,
  output logic [CW-1:0]   wait_thresh,
  output logic [NSRC-1:0] irq_enable,
  output logic [NIP-1:0]  ip_rst_req,
  output logic [NIP-1:0]  ip_clkgate_req,
  output logic [NIP-1:0]  ip_pwrgate_req,
  // write-1-to-clear pulses
  output logic [NM-1:0]   master_mask_clr,
  output logic [NS-1:0]   slave_mask_clr,
  output logic [NSRC-1:0] irq_clr,
  // status
  input  logic [NM-1:0]   master_mask,
  input  logic [NS-1:0]   slave_mask,
  input  logic [AW-1:0]   viol_addr,
  input  logic [MIDW-1:0] viol_master,
  input  logic [MIDW-1:0] lock_master,
  input  logic [SIDW-1:0] wait_slave,
  input  logic [NSRC-1:0] irq_pending,
  input  logic            irq,
  input  logic [IDW-1:0]  irq_id,
  input  logic [NIP-1:0]  ip_powered_down
);

  logic wr;
  assign wr = csr_en && csr_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      restr_start    <= '1;
      restr_end      <= '0;
      lock_thresh    <= LOCK_THRESH_RST;
      wait_thresh    <= WAIT_THRESH_RST;
      irq_enable     <= '1;
      ip_rst_req     <= '0;
      ip_clkgate_req <= '0;
      ip_pwrgate_req <= '0;
    end else if (wr) begin
      unique case (csr_addr)
        CSR_RESTR_START: restr_start    <= AW'(csr_wdata);
        CSR_RESTR_END:   restr_end      <= AW'(csr_wdata);
        CSR_LOCK_THRESH: lock_thresh    <= CW'(csr_wdata);
        CSR_WAIT_THRESH: wait_thresh    <= CW'(csr_wdata);
        CSR_IRQ_ENABLE:  irq_enable     <= NSRC'(csr_wdata);
        CSR_IP_RESET:    ip_rst_req     <= NIP'(csr_wdata);
        CSR_IP_CLKGATE:  ip_clkgate_req <= NIP'(csr_wdata);
        CSR_IP_PWRGATE:  ip_pwrgate_req <= NIP'(csr_wdata);
        default: ;
      endcase
    end
  end

  always_comb begin
    master_mask_clr = '0;
    slave_mask_clr  = '0;
    irq_clr         = '0;
    if (wr && csr_addr == CSR_MASTER_MASK) master_mask_clr = NM'(csr_wdata);
    if (wr && csr_addr == CSR_SLAVE_MASK)  slave_mask_clr  = NS'(csr_wdata);
    if (wr && csr_addr == CSR_IRQ_PENDING) irq_clr         = NSRC'(csr_wdata);
  end

  always_comb begin
    csr_rdata = '0;
    unique case (csr_addr)
      CSR_RESTR_START: csr_rdata = 32'(restr_start);
      CSR_RESTR_END:   csr_rdata = 32'(restr_end);
      CSR_LOCK_THRESH: csr_rdata = 32'(lock_thresh);
      CSR_WAIT_THRESH: csr_rdata = 32'(wait_thresh);
      CSR_MASTER_MASK: csr_rdata = 32'(master_mask);
      CSR_SLAVE_MASK:  csr_rdata = 32'(slave_mask);
      CSR_VIOL_ADDR:   csr_rdata = 32'(viol_addr);
      CSR_VIOL_INFO:   csr_rdata = {8'(lock_master), 8'(wait_slave), 8'(viol_master), 8'h00};
      CSR_IRQ_ENABLE:  csr_rdata = 32'(irq_enable);
      CSR_IRQ_PENDING: csr_rdata = 32'(irq_pending);
      CSR_IRQ_VECTOR:  csr_rdata = {irq, 23'h0, 8'(irq_id)};
      CSR_IP_RESET:    csr_rdata = 32'(ip_rst_req);
      CSR_IP_CLKGATE:  csr_rdata = 32'(ip_clkgate_req);
      CSR_IP_PWRGATE:  csr_rdata = 32'(ip_pwrgate_req);
      CSR_IP_STATUS:   csr_rdata = 32'(ip_powered_down);
      default:         csr_rdata = '0;
    endcase
  end

endmodule
