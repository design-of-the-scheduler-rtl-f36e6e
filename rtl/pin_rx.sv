// pin_rx -- receives a W-bit per-slot word over W/2 pins in two halves.
//
// To halve the pins needed between devices, the word is sent as its lower
// half in the first half of the slot and its upper half in the second. The
// lower half is captured at the middle of the slot (clock edge ending phase
// 2, the falling edge of a slot-period clock) into `low_q`; the upper half
// is taken straight from the pins, so `word` = {pins, low_q} is complete in
// the last phase and is registered by the consumer at the slot end, just as
// a full-width input would be. Splitting the control word into halves read
// at the two edges of a slot-period clock follows the scheduler's pin
// speed-up; the phase chosen for the mid-slot edge is this design's own.
module pin_rx
  import sgs_pkg::*;
#(
  parameter int unsigned W = 128,
  localparam int unsigned W2 = (W + 1) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  phase_t        phase,
  input  logic [W2-1:0] pins,
  output logic [W-1:0]  word
);
  logic [W2-1:0] low_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) low_q <= '0;
    else if (phase == PH_SCH_RD) low_q <= pins;
  end

  assign word = {pins[W-W2-1:0], low_q};
endmodule
