// sgs_pkg -- the slot-phase type shared by the SGS scheduler modules.
//
// A time slot (one cell time) is divided into six cycles of the fast clock
// that drives the queue manager's pointer memories. The six-cycle slot
// follows the scheduler's block-RAM pointer variant, whose time slot is six
// cycles of the clock that manages the pointer updates.
// What each of the six cycles does is this design's own schedule: the
// arrival ("write") operation uses cycles 0-1, the schedule operation
// cycles 2-4 and the departure ("read") operation cycles 3-5.
package sgs_pkg;

  typedef enum logic [2:0] {
    PH_ARR_RD = 3'd0,  // arrival: read EQL link and tail pointer
    PH_ARR_WR = 3'd1,  // arrival: link the cell, update pointers
    PH_SCH_RD = 3'd2,  // schedule: read unscheduled and tail pointers
    PH_SCH_LL = 3'd3,  // schedule: read link; departure: read head/tail
    PH_DEP_LL = 3'd4,  // schedule: write unscheduled ptr; departure: read link
    PH_DEP_WR = 3'd5   // departure: update head ptr, return location to EQL
  } phase_t;

endpackage
