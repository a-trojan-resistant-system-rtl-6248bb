// trojan_bus_pkg -- shared types and constants of the Trojan-resistant bus.
//
// The bus is a single-layer, non-pipelined shared bus in the style of AMBA AHB:
// one master owns the bus at a time (chosen by the arbiter), drives a transfer
// (trans/addr/write/wdata), the address decoder turns the upper address bits
// into one slave select, and the selected slave may stretch the transfer with
// a wait signal.  The transfer completes on the first cycle in which the
// (possibly nullified) wait is low.
//
// The default sizes (three masters, three slaves as in the conventional bus
// drawing the design starts from, 32-bit address and data as in AHB) and the
// CSR register map below are this design's choices.
package trojan_bus_pkg;

  // Default bus geometry.
  localparam int unsigned NUM_MASTERS = 3;
  localparam int unsigned NUM_SLAVES  = 3;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned DATA_W      = 32;
  // Number of address MSBs the decoder looks at: region r (r < NUM_SLAVES)
  // belongs to slave r, every other region is empty and goes to the default slave.
  localparam int unsigned REGION_BITS = 4;
  // Width of the lock and wait watchdog counters and thresholds.
  localparam int unsigned CNT_W       = 16;

  // Interrupt source numbering: the three Trojan detection signals come first
  // (highest priority), ordinary peripheral interrupts follow.
  localparam int unsigned IRQ_UNAUTH   = 0;  // Unauthorized Access Detection
  localparam int unsigned IRQ_MAL_LOCK = 1;  // Malicious Bus Lock Detection
  localparam int unsigned IRQ_MAL_WAIT = 2;  // Malicious Wait Detection
  localparam int unsigned NUM_TROJAN_IRQ = 3;
  localparam int unsigned NUM_EXT_IRQ  = 4;

  // Reset values of the software thresholds.
  localparam logic [CNT_W-1:0] LOCK_THRESH_RST = 16'd64;
  localparam logic [CNT_W-1:0] WAIT_THRESH_RST = 16'd16;

  // Security CSR word addresses (csr_addr is a word index).
  typedef enum logic [4:0] {
    CSR_RESTR_START  = 5'd0,   // Restricted Address Start Register
    CSR_RESTR_END    = 5'd1,   // Restricted Address End Register
    CSR_LOCK_THRESH  = 5'd2,   // malicious bus lock threshold (cycles)
    CSR_WAIT_THRESH  = 5'd3,   // malicious wait threshold (cycles)
    CSR_MASTER_MASK  = 5'd4,   // RO value / W1C: malicious master mask register
    CSR_SLAVE_MASK   = 5'd5,   // RO value / W1C: malicious slave mask register
    CSR_VIOL_ADDR    = 5'd6,   // RO: address of the last unauthorized access
    CSR_VIOL_INFO    = 5'd7,   // RO: {lock master, wait slave, access master} of last events
    CSR_IRQ_ENABLE   = 5'd8,   // interrupt enable mask
    CSR_IRQ_PENDING  = 5'd9,   // RO value / W1C: interrupt pending bits
    CSR_IRQ_VECTOR   = 5'd10,  // RO: {irq, vector id}
    CSR_IP_RESET     = 5'd11,  // per-IP reset request bits
    CSR_IP_CLKGATE   = 5'd12,  // per-IP clock-gating request bits
    CSR_IP_PWRGATE   = 5'd13,  // per-IP power-gating request bits
    CSR_IP_STATUS    = 5'd14   // RO: per-IP powered-down status bits
  } csr_addr_e;

  // Power-gating sequencer states.
  typedef enum logic [2:0] {
    PG_ON,        // powered, clocked, not isolated
    PG_ISOLATE,   // isolation clamps on, clock stopped
    PG_SWITCH_OFF,// power switch opened, waiting for the fabric to confirm
    PG_OFF,       // block powered down
    PG_SWITCH_ON, // power switch closed, waiting for the fabric to confirm
    PG_RESTORE    // block held in reset for one cycle with clock on, then release
  } pg_state_e;

endpackage
