// secure_addr_decoder -- address decoder with restricted-range and
// malicious-slave protection.
//
// A conventional decoder looks at the REGION_BITS most significant address
// bits: region r < NUM_SLAVES selects slave r, every other region is empty and
// belongs to the default slave.  Two protections are added around it:
//
//  * Restricted range.  A comparator checks the bus address against the
//    Restricted Address Start/End registers (inclusive bounds, kept in the
//    security CSR block).  A transfer inside the range raises `unauth`
//    (Unauthorized Access Detection) in the same cycle, which removes every
//    real slave select so that only the default slave answers.  The address
//    and the master ID are captured for the interrupt service routine; the
//    arbiter uses `unauth` to put the master into its mask register.
//  * Malicious slave mask register.  When the bus matrix reports a malicious
//    wait (`mal_wait`), the slave selected in that cycle gets its mask bit set.
//    A masked slave is never selected again; its accesses are diverted to the
//    default slave.  Software clears bits with `slave_mask_clr` (write 1).
//
// Each real select is therefore the AND of three terms: decoded region, not
// unauthorized, not masked.  Decode and detection are combinational; the mask
// and capture registers update on the rising clock edge.  A start register
// above the end register restricts nothing (the reset state).  The decode-by-
// MSBs rule, the comparator and the two masks follow the published
// architecture; the inclusive bounds, the single range, the capture registers
// and clearing by software are this design's choices.
module secure_addr_decoder
  import trojan_bus_pkg::*;
#(
  parameter int unsigned NS  = NUM_SLAVES,
  parameter int unsigned NM  = NUM_MASTERS,
  parameter int unsigned AW  = ADDR_W,
  parameter int unsigned RB  = REGION_BITS,
  localparam int unsigned MIDW = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned SIDW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // current transfer, from the bus matrix
  input  logic            trans,
  input  logic [AW-1:0]   addr,
  input  logic [MIDW-1:0] master_id,
  // restricted address range registers
  input  logic [AW-1:0]   restr_start,
  input  logic [AW-1:0]   restr_end,
  // malicious wait from the bus matrix (latch enable of the slave mask)
  input  logic            mal_wait,
  input  logic [NS-1:0]   slave_mask_clr,
  // selects
  output logic [NS-1:0]   slave_sel,
  output logic            default_sel,
  output logic            unauth,
  // status for software
  output logic [NS-1:0]   slave_mask,
  output logic [AW-1:0]   viol_addr,
  output logic [MIDW-1:0] viol_master,
  output logic [SIDW-1:0] wait_slave
);

  logic [RB-1:0] region;
  logic [NS-1:0] decoded;
  logic [NS-1:0] mask_set;
  logic [SIDW-1:0] sel_idx;

  assign region = addr[AW-1 -: RB];
  assign unauth = trans && (addr >= restr_start) && (addr <= restr_end);

  always_comb begin
    sel_idx = '0;
    for (int unsigned s = 0; s < NS; s++) begin
      decoded[s]   = (region == RB'(s));
      slave_sel[s] = trans && decoded[s] && !unauth && !slave_mask[s];
      if (slave_sel[s]) sel_idx = SIDW'(s);
    end
    default_sel = trans && !(|slave_sel);
    mask_set    = mal_wait ? slave_sel : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slave_mask  <= '0;
      viol_addr   <= '0;
      viol_master <= '0;
      wait_slave  <= '0;
    end else begin
      slave_mask <= (slave_mask & ~slave_mask_clr) | mask_set;
      if (unauth) begin
        viol_addr   <= addr;
        viol_master <= master_id;
      end
      if (mal_wait && |slave_sel) wait_slave <= sel_idx;
    end
  end

  // At most one real slave is selected, and never together with the default slave.
  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({slave_sel, default_sel}));
  // A masked slave is never selected.
  a_masked_not_sel: assert property (@(posedge clk) disable iff (!rst_n)
    (slave_sel & slave_mask) == '0);

endmodule
