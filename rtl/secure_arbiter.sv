// secure_arbiter -- round-robin bus arbiter that detects and breaks
// malicious bus locking and shuts out known Trojan masters.
//
// Arbitration: the current owner is held in a register.  It keeps the bus
// while a transfer of it is being stretched by a slave (`bus_busy`) or while
// it asserts LOCK; otherwise the arbiter re-arbitrates every cycle, searching
// the (gated) requests round-robin starting after the current owner.  A new
// grant takes effect on the next clock edge: `grant`, `master_id` and
// `owner_valid` are register outputs.  `master_lock` (MASTER LOCK) tells all
// masters that the owner holds the bus locked.
//
// Protection: a counter counts the clock cycles for which the owner's LOCK is
// active during its tenure; it restarts when LOCK drops or ownership changes.
// When LOCK is still active after `lock_thresh` counted cycles, `mal_lock`
// (Malicious Bus Lock Detection) is raised for one cycle, the owner's bit is
// set in the malicious master mask register, and the lock is released in that
// very cycle, so the bus is re-arbitrated at once.  `unauth` from the address
// decoder also sets the mask bit of the current owner.  The mask register
// gates REQ and LOCK of every masked master (one two-input AND per signal), so
// a masked master is never granted again until software clears its bit with
// `master_mask_clr`.
//
// The counter, threshold, mask register and gating follow the published
// architecture.  The round-robin policy, the counter restart rule, the
// re-arbitration rule and clearing by software are this design's choices.
module secure_arbiter
  import trojan_bus_pkg::*;
#(
  parameter int unsigned NM = NUM_MASTERS,
  parameter int unsigned CW = CNT_W,
  localparam int unsigned MIDW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NM-1:0]   req,
  input  logic [NM-1:0]   lock,
  input  logic            bus_busy,       // owner's transfer is in a wait state
  input  logic            unauth,         // Unauthorized Access Detection
  input  logic [CW-1:0]   lock_thresh,
  input  logic [NM-1:0]   master_mask_clr,
  output logic [NM-1:0]   grant,
  output logic [MIDW-1:0] master_id,
  output logic            owner_valid,
  output logic            master_lock,
  output logic            mal_lock,       // Malicious Bus Lock Detection
  output logic [NM-1:0]   master_mask,
  output logic [MIDW-1:0] lock_master     // master caught by the last mal_lock
);

  logic [NM-1:0]   req_g, lock_g;
  logic            owner_lock;
  logic [CW-1:0]   lock_cnt;
  logic            hold;
  logic            found;
  logic [MIDW-1:0] next_id;
  logic [NM-1:0]   mask_set;

  // Gating of REQ and LOCK by the malicious master mask register.
  assign req_g = req & ~master_mask;
  assign lock_g = lock & ~master_mask;

  assign owner_lock = owner_valid && lock_g[master_id];
  assign mal_lock   = owner_lock && (lock_cnt >= lock_thresh);
  assign master_lock = owner_lock && !mal_lock;

  // The owner keeps the bus through a wait state, or while it legitimately locks.
  assign hold = owner_valid && (bus_busy || master_lock) && !unauth;

  // Round-robin search starting after the current owner.
  always_comb begin
    found   = 1'b0;
    next_id = master_id;
    for (int unsigned k = 1; k <= NM; k++) begin
      if (!found && req_g[(int'(master_id) + k) % NM] && !mask_set[(int'(master_id) + k) % NM]) begin
        found   = 1'b1;
        next_id = MIDW'((int'(master_id) + k) % NM);
      end
    end
  end

  always_comb begin
    mask_set = '0;
    if (owner_valid && (mal_lock || unauth)) mask_set[master_id] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master_id   <= '0;
      owner_valid <= 1'b0;
      lock_cnt    <= '0;
      master_mask <= '0;
      lock_master <= '0;
    end else begin
      master_mask <= (master_mask & ~master_mask_clr) | mask_set;
      if (mal_lock) lock_master <= master_id;
      if (!hold) begin
        owner_valid <= found;
        master_id   <= next_id;
      end
      // Lock-duration counter of the current tenure.
      if (hold && master_lock) lock_cnt <= lock_cnt + 1'b1;
      else                     lock_cnt <= '0;
    end
  end

  always_comb begin
    grant = '0;
    if (owner_valid) grant[master_id] = 1'b1;
  end

  // Only one master is ever granted, and a masked master is never granted
  // a new tenure.
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_no_masked_grant: assert property (@(posedge clk) disable iff (!rst_n)
    (owner_valid && !$stable(master_id)) |-> !master_mask[master_id]);

endmodule
