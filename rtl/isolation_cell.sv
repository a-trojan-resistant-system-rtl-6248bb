// isolation_cell -- output isolation clamp of a power-gated block.
//
// While `iso_en` is high, every bit of `out` is forced to the matching bit of
// CLAMP (tied to ground for 0, to supply for 1) instead of following the
// block's output `in`, so the logic that reads the block never sees a floating
// input once the block is powered down.  Purely combinational.  Clamping the
// outputs of a power-gated block follows the published architecture; the per-
// bit clamp value parameter is this design's choice (the bus ties every output
// low).
module isolation_cell #(
  parameter int unsigned W     = 1,
  parameter logic [W-1:0] CLAMP = '0
) (
  input  logic         iso_en,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);

  assign out = iso_en ? CLAMP : in;

endmodule
