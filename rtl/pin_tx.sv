// pin_tx -- sends a W-bit per-slot word over W/2 pins in two halves.
//
// The lower half is driven in phases 0-2 of the slot and the upper half in
// phases 3-5 (upper bits zero-padded when W is odd), matching pin_rx, which
// captures the lower half at the middle of the slot and the upper half at
// its end. The word must be stable for the whole slot: the free-output
// vector of the scheduler chain is, and the top registers the cell addresses
// for one slot before sending them. Purely combinational. Halving the pins
// by sending half the bits on each edge of a slot-period clock follows the
// scheduler's pin speed-up; the phase split is this design's own.
module pin_tx
  import sgs_pkg::*;
#(
  parameter int unsigned W   = 128,
  localparam int unsigned W2 = (W + 1) / 2
) (
  input  phase_t        phase,
  input  logic [W-1:0]  word,
  output logic [W2-1:0] pins
);
  always_comb begin
    if (phase == PH_ARR_RD || phase == PH_ARR_WR || phase == PH_SCH_RD)
      pins = word[W2-1:0];
    else
      pins = W2'(word[W-1:W2]);
  end
endmodule
