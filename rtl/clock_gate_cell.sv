// clock_gate_cell -- glitch-free clock gate used to halt a quarantined block.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so `gclk` only ever
// starts or stops with a whole high phase and never produces a runt pulse.
// `test_en` forces the clock on for scan.  The latch is the intended storage
// element of this cell (a standard integrated clock gate); a technology
// library cell would normally replace it.  Stopping the clock of a Trojan
// block follows the published architecture; the cell's structure is the usual
// one and is this design's choice.
module clock_gate_cell (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en || test_en;
  end

  assign gclk = clk && en_lat;

endmodule
