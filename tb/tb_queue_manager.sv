// tb_queue_manager -- checks the queue manager (with its linked list memory
// and slot timer) against a model of N FIFO queues of cell addresses.
//
// Each slot the bench picks an arriving VOQ, a VOQ to schedule (one that
// still holds unscheduled cells) and a VOQ to send from (one that holds
// scheduled cells). The model then requires that
//   - an arrival gets a location that is not in use, or is refused exactly
//     when all F locations are in use,
//   - a departure returns the oldest cell of that VOQ (FIFO order),
//   - the request vector equals "VOQ holds unscheduled cells",
//   - wr_addr is valid two cycles into the slot and rd_addr five cycles in.
// Load phases alternate between filling and draining so the memory runs
// full (refusals) and VOQs and the free list run empty.
module tb_queue_manager;
  import sgs_pkg::*;
  localparam int unsigned N = 8, F = 16;
  localparam int unsigned VW = $clog2(N) + 1, AW = $clog2(F);

  logic clk = 1'b0, rst_n = 1'b0;
  phase_t phase;
  logic slot_end, ready;
  logic [VW-1:0] arr_voq, sch_voq, dep_voq, xbar_out;
  logic [N-1:0]  req;
  logic [AW-1:0] wr_addr, rd_addr;
  logic wr_valid, arr_drop, rd_valid;
  logic ll_we;
  logic [AW-1:0] ll_waddr, ll_wdata, ll_raddr, ll_rdata;

  slot_timer u_t (.clk, .rst_n, .phase, .slot_end);
  sdp_ram #(.DEPTH(F), .WIDTH(AW)) u_ll (.clk, .we(ll_we), .waddr(ll_waddr),
    .wdata(ll_wdata), .raddr(ll_raddr), .rdata(ll_rdata));
  queue_manager #(.N(N), .F(F)) dut (.clk, .rst_n, .phase, .slot_end, .ready,
    .arr_voq, .sch_voq, .dep_voq, .req, .wr_addr, .wr_valid, .arr_drop,
    .rd_addr, .rd_valid, .xbar_out,
    .ll_we, .ll_waddr, .ll_wdata, .ll_raddr, .ll_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_arr = 0, n_drop = 0, n_sch = 0, n_dep = 0, n_emptied = 0, n_full = 0;
  int q[N][$];
  int nsched[N];
  bit used[F];
  int nused = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int va, vs, vd, cand[$], p_arr, p_dep;
    arr_voq = '0; sch_voq = '0; dep_voq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // start-up: linking F locations takes F cycles, then one slot boundary
    while (!ready) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (phase != PH_ARR_RD) fail("first active cycle is not phase 0");
    for (int s = 0; s < 3000; s++) begin
      // phase 0: drive this slot's operations
      p_arr = ((s / 300) % 2 == 0) ? 85 : 15;
      p_dep = ((s / 300) % 2 == 0) ? 30 : 90;
      va = ($urandom % 100 < p_arr) ? 1 + $urandom % N : 0;
      cand.delete();
      for (int v = 0; v < N; v++) if (q[v].size() > nsched[v]) cand.push_back(v + 1);
      vs = (cand.size() > 0 && $urandom % 100 < 70) ? cand[$urandom % cand.size()] : 0;
      cand.delete();
      for (int v = 0; v < N; v++) if (nsched[v] > 0) cand.push_back(v + 1);
      vd = (cand.size() > 0 && $urandom % 100 < p_dep) ? cand[$urandom % cand.size()] : 0;
      arr_voq = VW'(va); sch_voq = VW'(vs); dep_voq = VW'(vd);
      repeat (2) @(posedge clk);
      #1;
      // phase 2: arrival result must be visible
      if (va != 0) begin
        checks++;
        if (nused == F) begin
          n_drop++;
          if (!arr_drop || wr_valid) fail($sformatf("slot %0d: arrival to full memory not refused", s));
        end else begin
          n_arr++;
          if (!wr_valid || arr_drop) fail($sformatf("slot %0d: arrival not accepted", s));
          else if (used[wr_addr]) fail($sformatf("slot %0d: location %0d given twice", s, wr_addr));
          else begin
            used[wr_addr] = 1'b1;
            nused++;
            if (nused == F) n_full++;
            q[va-1].push_back(int'(wr_addr));
          end
        end
      end else begin
        checks++;
        if (wr_valid || arr_drop) fail($sformatf("slot %0d: spurious arrival result", s));
      end
      if (vs != 0) begin
        nsched[vs-1]++;
        n_sch++;
      end
      repeat (3) @(posedge clk);
      #1;
      // phase 5: departure result must be visible
      checks++;
      if (vd != 0) begin
        int exp_a;
        exp_a = q[vd-1].pop_front();
        nsched[vd-1]--;
        used[exp_a] = 1'b0;
        nused--;
        n_dep++;
        if (q[vd-1].size() == 0) n_emptied++;
        if (!rd_valid || int'(rd_addr) != exp_a || int'(xbar_out) != vd)
          fail($sformatf("slot %0d: departure VOQ %0d got addr %0d valid %b xbar %0d, expected %0d",
                         s, vd, rd_addr, rd_valid, xbar_out, exp_a));
      end else if (rd_valid || xbar_out != 0) fail($sformatf("slot %0d: spurious departure", s));
      @(posedge clk);
      #1;
      // next phase 0: request vector reflects this slot's operations
      for (int v = 0; v < N; v++) begin
        checks++;
        if (req[v] != (q[v].size() > nsched[v]))
          fail($sformatf("slot %0d: req[%0d]=%b, model %0d cells %0d scheduled", s, v, req[v], q[v].size(), nsched[v]));
      end
    end
    $display("arrivals=%0d refused=%0d schedules=%0d departures=%0d voq_emptied=%0d memory_full=%0d",
             n_arr, n_drop, n_sch, n_dep, n_emptied, n_full);
    checks++;
    if (n_arr == 0 || n_drop == 0 || n_sch == 0 || n_dep == 0 || n_emptied == 0 || n_full == 0)
      fail("a queue-manager situation never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
