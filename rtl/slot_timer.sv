// slot_timer -- the six-state machine that divides a time slot.
//
// Steps unconditionally through the six phases of sgs_pkg::phase_t, one
// per fast-clock cycle, so a time slot lasts six cycles. `slot_end` is high
// in the last phase: registers that change once per slot load on that
// cycle's clock edge. Reset starts at phase 0. The six states and the
// unconditional transitions follow the scheduler's pointer state machine.
module slot_timer
  import sgs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output phase_t phase,
  output logic   slot_end
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH_ARR_RD;
    else begin
      unique case (phase)
        PH_ARR_RD: phase <= PH_ARR_WR;
        PH_ARR_WR: phase <= PH_SCH_RD;
        PH_SCH_RD: phase <= PH_SCH_LL;
        PH_SCH_LL: phase <= PH_DEP_LL;
        PH_DEP_LL: phase <= PH_DEP_WR;
        default:   phase <= PH_ARR_RD;
      endcase
    end
  end

  assign slot_end = (phase == PH_DEP_WR);
endmodule
