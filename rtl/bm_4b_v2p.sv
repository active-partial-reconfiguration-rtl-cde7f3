// bm_4b_v2p: 4-bit bus macro, the only path by which signals cross the
// boundary between the reconfigurable region (left side) and the fixed region
// (right side). On the device each bit is one horizontal line with a tristate
// buffer on each side; a side drives the line when its T input is 0. Here the
// line is written as the logic the tristates reduce to (the design's synthesis
// flow converts tristates to logic): o = li where lt is 0, ri where rt is 0,
// and 0 where neither side drives (this idle value is this design's choice).
// Both sides driving one line is contention and is flagged by an assertion.
// Combinational, no clock.
module bm_4b_v2p #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] li,
  input  logic [W-1:0] lt,
  input  logic [W-1:0] ri,
  input  logic [W-1:0] rt,
  output logic [W-1:0] o
);

  always_comb o = (~lt & li) | (~rt & ri);

  // Never let both sides drive the same line.
  always_comb begin
    assert final ((~lt & ~rt) == '0)
      else $error("bm_4b_v2p: both sides drive line(s) %b", ~lt & ~rt);
  end

endmodule
