// trojan_irq_ctrl -- interrupt controller with the Trojan detection signals
// as interrupt sources.
//
// Sources 0..2 are the Unauthorized Access, Malicious Bus Lock and Malicious
// Wait detection signals; sources 3.. are ordinary peripheral interrupts.
// Every source is level-sampled into a sticky pending bit on the rising clock
// edge; software clears a pending bit by writing 1 (`clr`).  A pending bit
// whose `enable` bit is set requests the CPU: `irq` is high and `irq_id` is
// the lowest-numbered such source (so the Trojan sources have the highest
// priority), and `vector` is the address of its handler, VEC_BASE + irq_id *
// VEC_STRIDE.  The outputs follow the pending register combinationally, one
// cycle after the source.
//
// Routing the detection signals into the interrupt controller and vectoring to
// a per-source handler follow the published architecture; the fixed priority,
// the sticky pending bits and the vector formula are this design's choices.
module trojan_irq_ctrl
  import trojan_bus_pkg::*;
#(
  parameter int unsigned NSRC       = NUM_TROJAN_IRQ + NUM_EXT_IRQ,
  parameter int unsigned VW         = 32,
  parameter logic [VW-1:0] VEC_BASE = 32'h0000_0040,
  parameter int unsigned VEC_STRIDE = 4,
  localparam int unsigned IDW = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src,
  input  logic [NSRC-1:0] enable,
  input  logic [NSRC-1:0] clr,
  output logic [NSRC-1:0] pending,
  output logic            irq,
  output logic [IDW-1:0]  irq_id,
  output logic [VW-1:0]   vector
);

  logic [NSRC-1:0] active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= (pending & ~clr) | src;
  end

  assign active = pending & enable;
  assign irq    = |active;

  always_comb begin
    irq_id = '0;
    for (int i = int'(NSRC) - 1; i >= 0; i--) begin
      if (active[i]) irq_id = IDW'(i);
    end
  end

  assign vector = VEC_BASE + VW'(irq_id) * VW'(VEC_STRIDE);

endmodule
