// queue_manager -- virtual output queue bookkeeping of one input module.
//
// Cells of an input are kept in F data-memory locations. Each location
// belongs either to the empty queue list (EQL) or to the virtual queue list
// (VQL) of one of the N outputs; the linked list memory (an external
// sdp_ram, F words) holds for every location the address of the next one
// in its list. Each VQL has three pointers -- head, first unscheduled cell,
// tail -- kept in three N-word pointer memories (sdp_ram instances inside
// this module); the EQL has head and tail registers. Per-VQL "non-empty"
// and "has unscheduled cells" flags are registers; the latter form the
// request vector `req` that the output selector reads.
//
// Per time slot (six cycles, phase from slot_timer) three operations run:
//   arrival   (arr_voq != 0): the EQL head location is unlinked and appended
//             to the VQL; its address is returned on wr_addr so the cell can
//             be stored there. With no free location the cell is refused
//             (arr_drop).
//   schedule  (sch_voq != 0): the first-unscheduled pointer moves to the next
//             cell of that VQL, or becomes null if it was the tail.
//   departure (dep_voq != 0): the VQL head location is unlinked, returned on
//             rd_addr for reading the cell, and appended to the EQL.
// VOQ numbers are 1..N; 0 means "no operation".
//
// Cycle use (memories have a registered read, one cycle latency):
//   0 read EQL link, tail[arr]          1 write link/tail/head/unsched
//   2 read unsched[sch], tail[sch]      3 read link of unsched; head/tail[dep]
//   4 write unsched[sch]; read link of head[dep]
//   5 write head[dep]; link the freed location behind the EQL tail
// arr_voq is sampled in cycle 0, sch_voq in cycle 2, dep_voq in cycle 3.
// wr_addr/wr_valid/arr_drop change at the end of cycle 1, rd_addr/rd_valid/
// xbar_out at the end of cycle 4; all hold for one slot.
//
// After reset the module links all F locations into the EQL (location a
// points to a+1), one per cycle, then starts operating at the next slot
// boundary and raises `ready`.
//
// The three operations, the three VQL pointers, the two EQL pointers, the
// VQL pointers held in memories rather than registers, and the start-up EQL
// follow the scheduler's queue manager. The original clocks the pointer
// memories at twice the rate of the linked list memory; here one clock with
// six cycles per slot drives both. The null representation (flags instead
// of a null address), the order of the memory accesses within the slot, the
// refusal of arrivals to a full memory and the start-up sequence are this
// design's own.
module queue_manager
  import sgs_pkg::*;
#(
  parameter int unsigned N = 128,   // switch ports = VOQs per input
  parameter int unsigned F = 128,   // frame length = data memory locations
  localparam int unsigned VW  = $clog2(N) + 1,  // VOQ number width
  localparam int unsigned VIW = $clog2(N),      // VOQ index width
  localparam int unsigned AW  = $clog2(F),      // address width
  localparam int unsigned FCW = $clog2(F + 1)   // free-count width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  phase_t        phase,
  input  logic          slot_end,
  output logic          ready,

  input  logic [VW-1:0] arr_voq,   // arriving cell's VOQ number, 0 = none
  input  logic [VW-1:0] sch_voq,   // VOQ just scheduled by the selector
  input  logic [VW-1:0] dep_voq,   // VOQ whose head cell departs now
  output logic [N-1:0]  req,       // bit j: VOQ j+1 has unscheduled cells

  output logic [AW-1:0] wr_addr,   // where to store the arriving cell
  output logic          wr_valid,
  output logic          arr_drop,  // arrival refused: no free location
  output logic [AW-1:0] rd_addr,   // where to read the departing cell
  output logic          rd_valid,
  output logic [VW-1:0] xbar_out,  // output port served this slot, 0 = none

  // linked list memory
  output logic          ll_we,
  output logic [AW-1:0] ll_waddr,
  output logic [AW-1:0] ll_wdata,
  output logic [AW-1:0] ll_raddr,
  input  logic [AW-1:0] ll_rdata
);
  initial begin
    assert (F >= 2 && (F & (F - 1)) == 0)
      else $fatal(1, "queue_manager: F must be a power of two >= 2");
  end

  // ---------------------------------------------------------------- state
  logic [AW-1:0]  ehead, etail;
  logic [FCW-1:0] fcnt;            // free locations in the EQL
  logic [N-1:0]   ne;              // VQL non-empty
  logic [N-1:0]   r;               // VQL has unscheduled cells
  logic           active, init_done;
  logic [AW-1:0]  init_cnt;

  logic           arr_v, sch_v, sch_last, dep_v, dep_last;
  logic [VIW-1:0] va, vs, vd;
  logic [AW-1:0]  h_q;

  logic [VIW-1:0] arr_idx, sch_idx, dep_idx;
  assign arr_idx = VIW'(arr_voq - 1'b1);
  assign sch_idx = VIW'(sch_voq - 1'b1);
  assign dep_idx = VIW'(dep_voq - 1'b1);

  // ---------------------------------------------------- pointer memories
  logic          hd_we, us_we, tl_we;
  logic [VIW-1:0] hd_waddr, us_waddr, tl_waddr, hd_raddr, us_raddr, tl_raddr;
  logic [AW-1:0]  hd_wdata, us_wdata, tl_wdata, hd_rdata, us_rdata, tl_rdata;

  sdp_ram #(.DEPTH(N), .WIDTH(AW)) u_head (
    .clk, .we(hd_we), .waddr(hd_waddr), .wdata(hd_wdata), .raddr(hd_raddr), .rdata(hd_rdata));
  sdp_ram #(.DEPTH(N), .WIDTH(AW)) u_unsch (
    .clk, .we(us_we), .waddr(us_waddr), .wdata(us_wdata), .raddr(us_raddr), .rdata(us_rdata));
  sdp_ram #(.DEPTH(N), .WIDTH(AW)) u_tail (
    .clk, .we(tl_we), .waddr(tl_waddr), .wdata(tl_wdata), .raddr(tl_raddr), .rdata(tl_rdata));

  // ------------------------------------------------------ memory control
  always_comb begin
    ll_we    = 1'b0;
    ll_waddr = etail;
    ll_wdata = h_q;
    ll_raddr = ehead;
    hd_we = 1'b0;  hd_waddr = vd;  hd_wdata = ll_rdata;  hd_raddr = dep_idx;
    us_we = 1'b0;  us_waddr = vs;  us_wdata = ll_rdata;  us_raddr = sch_idx;
    tl_we = 1'b0;  tl_waddr = va;  tl_wdata = ehead;     tl_raddr = dep_idx;

    if (!active) begin
      ll_we    = !init_done;
      ll_waddr = init_cnt;
      ll_wdata = init_cnt + 1'b1;
    end else begin
      unique case (phase)
        PH_ARR_RD: begin
          ll_raddr = ehead;
          tl_raddr = arr_idx;
        end
        PH_ARR_WR: if (arr_v) begin
          ll_we    = ne[va];          // old tail -> new cell
          ll_waddr = tl_rdata;
          ll_wdata = ehead;
          tl_we    = 1'b1;
          hd_we    = !ne[va];
          hd_waddr = va;
          hd_wdata = ehead;
          us_we    = !r[va];
          us_waddr = va;
          us_wdata = ehead;
        end
        PH_SCH_RD: begin
          us_raddr = sch_idx;
          tl_raddr = sch_idx;
        end
        PH_SCH_LL: begin
          ll_raddr = us_rdata;
          hd_raddr = dep_idx;
          tl_raddr = dep_idx;
        end
        PH_DEP_LL: begin
          us_we    = sch_v && !sch_last;
          ll_raddr = hd_rdata;
        end
        PH_DEP_WR: if (dep_v) begin
          hd_we    = !dep_last;
          ll_we    = (fcnt != '0);    // old EQL tail -> freed location
          ll_waddr = etail;
          ll_wdata = h_q;
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------- state updates
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ehead     <= '0;
      etail     <= '0;
      fcnt      <= '0;
      ne        <= '0;
      r         <= '0;
      active    <= 1'b0;
      init_done <= 1'b0;
      init_cnt  <= '0;
      arr_v     <= 1'b0;
      sch_v     <= 1'b0;
      sch_last  <= 1'b0;
      dep_v     <= 1'b0;
      dep_last  <= 1'b0;
      va        <= '0;
      vs        <= '0;
      vd        <= '0;
      h_q       <= '0;
      wr_addr   <= '0;
      wr_valid  <= 1'b0;
      arr_drop  <= 1'b0;
      rd_addr   <= '0;
      rd_valid  <= 1'b0;
      xbar_out  <= '0;
    end else if (!active) begin
      if (!init_done) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == AW'(F - 1)) begin
          init_done <= 1'b1;
          ehead     <= '0;
          etail     <= AW'(F - 1);
          fcnt      <= FCW'(F);
        end
      end else if (slot_end) begin
        active <= 1'b1;
      end
    end else begin
      unique case (phase)
        PH_ARR_RD: begin
          arr_v <= (arr_voq != '0) && (fcnt != '0);
          va    <= arr_idx;
        end
        PH_ARR_WR: begin
          wr_valid <= arr_v;
          arr_drop <= !arr_v && (arr_voq != '0);
          if (arr_v) begin
            wr_addr <= ehead;
            ehead   <= ll_rdata;
            fcnt    <= fcnt - 1'b1;
            ne[va]  <= 1'b1;
            r[va]   <= 1'b1;
          end
        end
        PH_SCH_RD: begin
          sch_v <= (sch_voq != '0) && r[sch_idx];
          vs    <= sch_idx;
        end
        PH_SCH_LL: begin
          if (sch_v) begin
            sch_last <= (us_rdata == tl_rdata);
            if (us_rdata == tl_rdata) r[vs] <= 1'b0;
          end
          dep_v <= (dep_voq != '0) && ne[dep_idx];
          vd    <= dep_idx;
        end
        PH_DEP_LL: begin
          rd_valid <= dep_v;
          xbar_out <= dep_v ? VW'({1'b0, vd} + 1'b1) : '0;
          if (dep_v) begin
            rd_addr  <= hd_rdata;
            h_q      <= hd_rdata;
            dep_last <= (hd_rdata == tl_rdata);
            if (hd_rdata == tl_rdata) ne[vd] <= 1'b0;
          end
        end
        PH_DEP_WR: begin
          if (dep_v) begin
            if (fcnt == '0) ehead <= h_q;
            etail <= h_q;
            fcnt  <= fcnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign req   = r;
  assign ready = active;

  // A VQL with unscheduled cells is never empty; the free count never
  // exceeds the memory size.
  assert property (@(posedge clk) disable iff (!rst_n) (r & ~ne) == '0);
  assert property (@(posedge clk) disable iff (!rst_n) fcnt <= FCW'(F));
endmodule
