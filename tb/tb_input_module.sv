// tb_input_module -- checks one SGS pipeline stage (input 3 of an 8-port
// switch, 16-cell memory) against a model.
//
// Each slot the bench drives a random set of free outputs and a random cell
// arrival. The model keeps, per VOQ, the FIFO of cell addresses and how many
// of them are scheduled. It requires that
//   - in slot k the module schedules the lowest-numbered output that was free
//     in the vector received in slot k-1 and for which the input held an
//     unscheduled cell at the end of slot k-1 (nothing when e = 0),
//   - avail_out is that free vector minus the chosen output,
//   - the cell scheduled in slot k leaves in slot k + N + 3 - i, from the
//     head of its VOQ, with xbar_out naming the output.
module tb_input_module;
  import sgs_pkg::*;
  localparam int unsigned N = 8, F = 16, ID = 3, DELAY = N + 3 - ID;
  localparam int unsigned VW = $clog2(N) + 1, AW = $clog2(F);
  localparam int SLOTS = 3000;

  logic clk = 1'b0, rst_n = 1'b0, e;
  phase_t phase;
  logic slot_end, ready;
  logic [N-1:0]  avail_in, avail_out;
  logic [VW-1:0] arr_voq, xbar_out, sch_voq;
  logic [AW-1:0] wr_addr, rd_addr;
  logic wr_valid, arr_drop, rd_valid;

  slot_timer u_t (.clk, .rst_n, .phase, .slot_end);
  input_module #(.N(N), .F(F), .INPUT_ID(ID)) dut (
    .clk, .rst_n, .phase, .slot_end, .e, .ready, .avail_in, .avail_out,
    .arr_voq, .wr_addr, .wr_valid, .arr_drop, .rd_addr, .rd_valid,
    .xbar_out, .sch_voq);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pick = 0, n_blocked = 0, n_dep = 0, n_drop = 0, n_disabled = 0;
  int q[N][$];
  int nsched[N];
  int nused = 0;
  int pick_hist[SLOTS];
  logic [N-1:0] prev_avail, prev_req;
  logic prev_e;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int va, exp_pick;
    logic [N-1:0] d;
    arr_voq = '0; avail_in = '0; e = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!ready) begin
      @(posedge clk);
      #1;
    end
    prev_avail = '0; prev_req = '0; prev_e = 1'b1;
    for (int s = 0; s < SLOTS; s++) begin
      // phase 0 of slot s
      avail_in = N'($urandom);
      if (s % 7 == 0) avail_in = '1;
      if ((s / 200) % 3 == 2) avail_in = '0;   // congested period: memory fills
      e = (s % 50) != 49;
      va = ($urandom % 100 < (((s / 200) % 3 == 2) ? 95 : 60)) ? 1 + $urandom % N : 0;
      arr_voq = VW'(va);
      repeat (2) @(posedge clk);
      #1;
      // phase 2: selection of this slot, from last slot's vectors
      d = prev_avail & prev_req;
      exp_pick = 0;
      if (e) for (int j = N - 1; j >= 0; j--) if (d[j]) exp_pick = j + 1;
      checks++;
      if (int'(sch_voq) != exp_pick) fail($sformatf("slot %0d: picked %0d expected %0d", s, sch_voq, exp_pick));
      checks++;
      if (avail_out !== (prev_avail & ~((exp_pick != 0) ? N'(1) << (exp_pick - 1) : N'(0))))
        fail($sformatf("slot %0d: avail_out %b", s, avail_out));
      if (!e) n_disabled++;
      else if (exp_pick != 0) n_pick++;
      else if (prev_req != 0) n_blocked++;
      pick_hist[s] = exp_pick;
      // arrival (happened in cycle 1)
      if (va != 0) begin
        checks++;
        if (nused == F) begin
          n_drop++;
          if (!arr_drop) fail($sformatf("slot %0d: arrival to full memory accepted", s));
        end else if (!wr_valid) fail($sformatf("slot %0d: arrival lost", s));
        else begin
          q[va-1].push_back(int'(wr_addr));
          nused++;
        end
      end
      if (exp_pick != 0) nsched[exp_pick-1]++;
      repeat (3) @(posedge clk);
      #1;
      // phase 5: departure of the cell scheduled DELAY slots ago
      checks++;
      if (s >= int'(DELAY) && pick_hist[s-DELAY] != 0) begin
        int v, exp_a;
        v = pick_hist[s-DELAY];
        exp_a = q[v-1].pop_front();
        nsched[v-1]--;
        nused--;
        n_dep++;
        if (!rd_valid || int'(rd_addr) != exp_a || int'(xbar_out) != v)
          fail($sformatf("slot %0d: departure from VOQ %0d: addr %0d valid %b xbar %0d, expected addr %0d",
                         s, v, rd_addr, rd_valid, xbar_out, exp_a));
      end else if (rd_valid) fail($sformatf("slot %0d: spurious departure", s));
      prev_avail = avail_in;
      for (int v = 0; v < N; v++) prev_req[v] = q[v].size() > nsched[v];
      @(posedge clk);
      #1;
    end
    $display("scheduled=%0d blocked=%0d disabled=%0d departures=%0d refused=%0d",
             n_pick, n_blocked, n_disabled, n_dep, n_drop);
    checks++;
    if (n_pick == 0 || n_blocked == 0 || n_disabled == 0 || n_dep == 0 || n_drop == 0)
      fail("an input-module situation never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
