// input_module -- the scheduler of one switch input (one SGS pipeline stage).
//
// Holds the queue manager, its linked list memory, the output selector, the
// coder and the output memory of input INPUT_ID (1..N).
//
// Sequential greedy scheduling: the schedule of a future time slot T is
// built by the inputs one after another. In each slot this module receives
// `avail_in`, the outputs still free for its target slot (T = k + N + 3 - i
// when working in slot k), intersects it with its request vector (VOQs that
// hold unscheduled cells), lets the output selector take the lowest free
// requested output, and passes the remaining free outputs on `avail_out` to
// input i+1, which registers them at the end of the slot and works on the
// same T one slot later. Every input works every slot, so N future slots are
// scheduled in parallel.
//
// Timing: avail_in and the request vector are registered at the end of a
// slot (slot_end). The selector and coder are combinational from those
// registers; the queue manager samples the coded VOQ number two cycles
// later (cycle 2), so the selector has two cycles. avail_out is stable for
// the whole slot. The chosen VOQ number also enters the output memory at the
// end of the slot and leaves it N + 3 - i slots later, when the queue
// manager sends the head cell of that VOQ (rd_addr, xbar_out).
// `e` is the selector's enable bit: with e = 0 nothing is scheduled.
module input_module
  import sgs_pkg::*;
#(
  parameter int unsigned N        = 128,
  parameter int unsigned F        = 128,
  parameter int unsigned INPUT_ID = 1,
  localparam int unsigned VW = $clog2(N) + 1,
  localparam int unsigned AW = $clog2(F)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  phase_t        phase,
  input  logic          slot_end,
  input  logic          e,
  output logic          ready,

  input  logic [N-1:0]  avail_in,   // free outputs, from input i-1
  output logic [N-1:0]  avail_out,  // free outputs, to input i+1

  input  logic [VW-1:0] arr_voq,
  output logic [AW-1:0] wr_addr,
  output logic          wr_valid,
  output logic          arr_drop,
  output logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [VW-1:0] xbar_out,
  output logic [VW-1:0] sch_voq     // VOQ scheduled in this slot, 0 = none
);
  initial begin
    assert (INPUT_ID >= 1 && INPUT_ID <= N)
      else $fatal(1, "input_module: INPUT_ID must be in 1..N");
  end

  logic [N-1:0]  avail_r, req_r, req, d, q;
  logic          c_unused;
  logic [VW-1:0] dep_voq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avail_r <= '1;   // nothing reserved yet: every output free
      req_r   <= '0;
    end else if (slot_end) begin
      avail_r <= avail_in;
      req_r   <= req;
    end
  end

  assign d         = avail_r & req_r;
  assign avail_out = avail_r & ~q;

  output_selector #(.N(N)) u_sel (.e(e), .d(d), .q(q), .c(c_unused));
  coder #(.N(N)) u_coder (.a(q), .x(sch_voq));

  output_memory #(.DEPTH(N + 3 - INPUT_ID), .WIDTH(VW)) u_omem (
    .clk, .rst_n, .shift(slot_end), .din(sch_voq), .dout(dep_voq));

  logic          ll_we;
  logic [AW-1:0] ll_waddr, ll_wdata, ll_raddr, ll_rdata;

  sdp_ram #(.DEPTH(F), .WIDTH(AW)) u_llmem (
    .clk, .we(ll_we), .waddr(ll_waddr), .wdata(ll_wdata), .raddr(ll_raddr), .rdata(ll_rdata));

  queue_manager #(.N(N), .F(F)) u_qm (
    .clk, .rst_n, .phase, .slot_end, .ready,
    .arr_voq, .sch_voq, .dep_voq, .req,
    .wr_addr, .wr_valid, .arr_drop, .rd_addr, .rd_valid, .xbar_out,
    .ll_we, .ll_waddr, .ll_wdata, .ll_raddr, .ll_rdata);
endmodule
