// power_gating_ctrl -- quarantine controls of one IP block: reset, clock
// gating and a power-gating sequencer with output isolation.
//
// Software (through the security CSRs) can take three actions against a block
// found to be a Trojan: hold it in reset (`rst_req`), stop its clock
// (`clkgate_req`) or power it down (`pwrgate_req`).  Reset and clock gating
// act directly while the block is powered.  Power gating runs a sequence so
// that the rest of the chip never sees the block's outputs float:
//
//   ON -> ISOLATE      clamps on, clock stopped, reset asserted (one cycle)
//      -> SWITCH_OFF   power switch opened; wait until the switch fabric
//                      reports the supply gone (`pwr_ack` low)
//      -> OFF          powered down (`powered_down` high)
//   OFF -> SWITCH_ON   when `pwrgate_req` drops: switch closed, wait for
//                      `pwr_ack` high
//      -> RESTORE      clock on with reset held for one cycle, clamps still on
//      -> ON           clamps released, reset follows `rst_req` again
//
// `pwr_en` drives the power switching fabric, `iso_en` the block's isolation
// cells, `blk_clk_en` its clock gate and `blk_rst_n` its reset.  All outputs
// are decoded from the registered state, so they change one cycle after the
// request.  Reset, clock gating, power gating through a controller and output
// isolation follow the published architecture; the ordering of the sequence
// and the acknowledge handshake with the switch fabric are this design's
// choices.
module power_gating_ctrl
  import trojan_bus_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rst_req,
  input  logic clkgate_req,
  input  logic pwrgate_req,
  input  logic pwr_ack,        // 1 = block supply is up (from the switch fabric)
  output logic pwr_en,
  output logic iso_en,
  output logic blk_clk_en,
  output logic blk_rst_n,
  output logic powered_down
);

  pg_state_e state, state_nx;
  logic      rst_req_q, clkgate_q;

  always_comb begin
    state_nx = state;
    unique case (state)
      PG_ON:         if (pwrgate_req) state_nx = PG_ISOLATE;
      PG_ISOLATE:    state_nx = PG_SWITCH_OFF;
      PG_SWITCH_OFF: if (!pwr_ack)    state_nx = PG_OFF;
      PG_OFF:        if (!pwrgate_req) state_nx = PG_SWITCH_ON;
      PG_SWITCH_ON:  if (pwr_ack)     state_nx = PG_RESTORE;
      PG_RESTORE:    state_nx = PG_ON;
      default:       state_nx = PG_ON;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= PG_ON;
      rst_req_q <= 1'b0;
      clkgate_q <= 1'b0;
    end else begin
      state     <= state_nx;
      rst_req_q <= rst_req;
      clkgate_q <= clkgate_req;
    end
  end

  always_comb begin
    pwr_en       = !(state inside {PG_SWITCH_OFF, PG_OFF});
    iso_en       = (state != PG_ON);
    blk_clk_en   = ((state == PG_ON) && !clkgate_q) || (state == PG_RESTORE);
    blk_rst_n    = (state == PG_ON) && !rst_req_q;
    powered_down = (state == PG_OFF);
  end

endmodule
