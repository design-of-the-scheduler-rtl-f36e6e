// tb_sgs_scheduler -- end-to-end test of a complete 8-port SGS scheduler
// (all eight input modules on one device, 16 cells per input, pin speed-up
// on), against a cycle-free model of sequential greedy scheduling.
//
// Traffic: every input receives random cells, half of them for a "hot"
// output shared by all inputs, so inputs compete. Periods of heavy load
// overfill the 16-cell memories; one slot in forty has the selector
// disabled. The model follows the chain: input 1 sees every output free,
// input i sees in slot t what input i-1 left in slot t-1, and picks the
// lowest free output for which it held an unscheduled cell at the end of
// slot t-1. The bench checks for every input and slot
//   - the VOQ scheduled (sch_voq), the arrival result (store address over
//     the half-width address pins, or refusal),
//   - the departure N + 3 - i slots after scheduling: output (xbar_out) and
//     read address (FIFO head of that VOQ, over the half-width pins),
//   - the free-output vector leaving the last input (half-width pins),
//   - that no two inputs send to the same output in the same slot.
// It counts each mechanism (schedule, output taken by an earlier input,
// refusal, departure, queue emptied, selector disabled) and fails if one
// never happens.
module tb_sgs_scheduler;
  import sgs_pkg::*;
  localparam int unsigned N = 8, F = 16, NP = 8;
  localparam int unsigned VW = $clog2(N) + 1, AW = $clog2(F);
  localparam bit PS = 1'b1;
  localparam int unsigned CW = PS ? (N + 1) / 2 : N, APW = PS ? (AW + 1) / 2 : AW;
  localparam int SLOTS = 2500;

  logic clk = 1'b0, rst_n = 1'b0, e, ready, slot_end;
  logic [CW-1:0] avail_in, avail_out;
  logic [NP-1:0][VW-1:0]  arr_voq, xbar_out, sch_voq;
  logic [NP-1:0][APW-1:0] wr_addr, rd_addr;
  logic [NP-1:0] wr_valid, arr_drop, rd_valid;

  sgs_scheduler #(.N(N), .F(F), .NP(NP), .FIRST_INPUT(1), .PIN_SPEEDUP(PS)) dut (
    .clk, .rst_n, .e, .ready, .slot_end, .avail_in, .avail_out,
    .arr_voq, .wr_addr, .wr_valid, .arr_drop, .rd_addr, .rd_valid, .xbar_out, .sch_voq);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_arr = 0, n_drop = 0, n_pick = 0, n_taken = 0, n_dep = 0, n_empty = 0, n_dis = 0;

  // model state, per input
  int           q[NP][N][$];
  int           nsched[NP][N];
  int           nused[NP];
  logic [N-1:0] avail_m[NP];      // free vector each input works on
  logic [N-1:0] aout_m[NP];       // what it leaves for the next input
  logic [N-1:0] req_m[NP];
  int           pick_hist[NP][SLOTS];
  logic [N-1:0] served[SLOTS];

  // rebuild a word seen on the pins: lower half in phases 0-2, upper half
  // in phases 3-5 with the pin speed-up, the whole word otherwise
  function automatic logic [N-1:0] join_n(input logic [CW-1:0] lo, input logic [CW-1:0] hi);
    return PS ? (N'(hi) << CW) | N'(lo) : N'(hi);
  endfunction
  function automatic logic [AW-1:0] join_a(input logic [APW-1:0] lo, input logic [APW-1:0] hi);
    return PS ? AW'((AW'(hi) << APW) | AW'(lo)) : AW'(hi);
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int           arr_h[NP];
    logic [APW-1:0] wa_lo[NP], ra_lo[NP];
    logic [AW-1:0] wa, ra;
    logic [CW-1:0] aout_lo;
    logic [N-1:0] aout_seen, aout_prev;
    logic         e_prev;
    int           arr_prev[NP];
    int           hot;

    avail_in = '1;          // input 1: every output free
    arr_voq = '0;
    e = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!ready) begin
      @(posedge clk);
      #1;
    end
    for (int i = 0; i < NP; i++) begin
      avail_m[i] = '1; aout_m[i] = '1; req_m[i] = '0; nused[i] = 0; arr_prev[i] = 0;
    end
    e_prev = 1'b1;
    aout_prev = '1;
    for (int s = 0; s <= SLOTS; s++) begin
      // ---- phase 0: drive slot s
      hot = 1 + (s / 500) % N;
      for (int i = 0; i < NP; i++) begin
        int load;
        load = ((s / 250) % 2 == 1) ? 95 : 45;
        arr_h[i] = (s < SLOTS && $urandom % 100 < load)
                   ? (($urandom % 2 == 0) ? hot : 1 + $urandom % N) : 0;
        arr_voq[i] = VW'(arr_h[i]);
      end
      e = (s % 40) != 39;
      @(posedge clk);
      #1;
      // ---- phase 1: lower halves
      for (int i = 0; i < NP; i++) begin
        wa_lo[i] = wr_addr[i];
        ra_lo[i] = rd_addr[i];
      end
      aout_lo = avail_out;
      repeat (3) @(posedge clk);
      #1;
      // ---- phase 4: upper halves; results of slot s-1 are on the ports
      aout_seen = join_n(aout_lo, avail_out);
      if (s > 0) begin
        int t;
        logic [N-1:0] used_out;
        logic [N-1:0] aout_last[NP];
        t = s - 1;
        used_out = '0;
        aout_last = aout_m;
        for (int i = 0; i < NP; i++) begin
          int pick, delay;
          logic [N-1:0] d;
          // selection of slot t
          avail_m[i] = (i == 0) ? '1 : aout_last[i-1];
          d = avail_m[i] & req_m[i];
          pick = 0;
          if (e_prev) for (int j = N - 1; j >= 0; j--) if (d[j]) pick = j + 1;
          checks++;
          if (int'(sch_voq[i]) != pick)
            fail($sformatf("slot %0d input %0d: scheduled %0d, model %0d", t, i + 1, sch_voq[i], pick));
          if (!e_prev) n_dis++;
          else if (pick != 0) n_pick++;
          if (e_prev && (req_m[i] & ~avail_m[i]) != '0) n_taken++;
          pick_hist[i][t] = pick;
          if (pick != 0) nsched[i][pick-1]++;
          // arrival of slot t
          if (arr_prev[i] != 0) begin
            checks++;
            wa = join_a(wa_lo[i], wr_addr[i]);
            if (nused[i] == F) begin
              n_drop++;
              if (!arr_drop[i] || wr_valid[i]) fail($sformatf("slot %0d input %0d: overflow not refused", t, i + 1));
            end else if (!wr_valid[i]) begin
              fail($sformatf("slot %0d input %0d: arrival lost", t, i + 1));
            end else begin
              n_arr++;
              q[i][arr_prev[i]-1].push_back(int'(wa));
              nused[i]++;
            end
          end
          // departure of slot t
          delay = N + 3 - (i + 1);
          checks++;
          if (t >= delay && pick_hist[i][t-delay] != 0) begin
            int v, exp_a;
            v = pick_hist[i][t-delay];
            exp_a = q[i][v-1].pop_front();
            nsched[i][v-1]--;
            nused[i]--;
            n_dep++;
            if (q[i][v-1].size() == 0) n_empty++;
            ra = join_a(ra_lo[i], rd_addr[i]);
            if (!rd_valid[i] || int'(xbar_out[i]) != v || int'(ra) != exp_a)
              fail($sformatf("slot %0d input %0d: departure out %0d addr %0d valid %b, model out %0d addr %0d",
                             t, i + 1, xbar_out[i], ra, rd_valid[i], v, exp_a));
          end else if (rd_valid[i]) fail($sformatf("slot %0d input %0d: spurious departure", t, i + 1));
          if (rd_valid[i]) begin
            checks++;
            if (used_out[xbar_out[i]-1]) fail($sformatf("slot %0d: output %0d served twice", t, xbar_out[i]));
            used_out[xbar_out[i]-1] = 1'b1;
          end
          aout_m[i] = avail_m[i] & ~((pick != 0) ? N'(1) << (pick - 1) : N'(0));
          for (int v = 0; v < N; v++) req_m[i][v] = q[i][v].size() > nsched[i][v];
        end
        checks++;
        if (aout_prev !== aout_m[NP-1])
          fail($sformatf("slot %0d: free vector out %b, model %b", t, aout_prev, aout_m[NP-1]));
      end
      aout_prev = aout_seen;
      e_prev = e;
      for (int i = 0; i < NP; i++) arr_prev[i] = arr_h[i];
      repeat (2) @(posedge clk);
      #1;
    end
    $display("scheduled=%0d taken_by_earlier_input=%0d refused=%0d departures=%0d queues_emptied=%0d disabled=%0d stored=%0d",
             n_pick, n_taken, n_drop, n_dep, n_empty, n_dis, n_arr);
    checks++;
    if (n_pick == 0 || n_taken == 0 || n_drop == 0 || n_dep == 0 || n_empty == 0 || n_dis == 0 || n_arr == 0)
      fail("a scheduler mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
