// sgs_scheduler -- NP consecutive input modules of an N-port sequential
// greedy scheduler (SGS) on one device.
//
// The scheduler is a chain of N input modules, each passing the set of
// still-free outputs to the next; one device holds NP of them, inputs
// FIRST_INPUT .. FIRST_INPUT+NP-1. The free-output vector enters from the
// input before the first one (for input 1 the source drives all ones: every
// output is free for a fresh time slot) and leaves towards the input after
// the last one. Each module has its own cell-arrival, store-address and
// read-address signals towards its network processor. A single six-state
// slot timer paces all modules; a time slot is six clock cycles.
//
// Pin speed-up (PIN_SPEEDUP = 1): the N-bit free-output vectors and the
// cell addresses use half as many pins, each word crossing in two halves per
// slot (pin_rx / pin_tx): lower half in phases 0-2, upper half in phases
// 3-5. With PIN_SPEEDUP = 0 the ports are full width.
//
// Timing at the network-processor side: arr_voq is sampled in phase 0 of a
// slot. The results of slot k (store address of the arrival or refusal,
// read address and output of the departure, VOQ scheduled) are registered
// at the end of slot k and shown on the ports throughout slot k+1; with the
// pin speed-up the addresses show their lower half in phases 0-2 and their
// upper half in phases 3-5 of slot k+1.
//
// Defaults: N = 128 ports, F = N cells per frame, NP = 10 modules, pin
// speed-up on -- the largest configuration reported for a 128-port switch
// with the pointer memories in block RAM. Registering the results for one
// slot and the valid/refusal flags (which take no pins in the reported pin
// count) are this design's own.
module sgs_scheduler
  import sgs_pkg::*;
#(
  parameter int unsigned N           = 128,
  parameter int unsigned F           = 128,
  parameter int unsigned NP          = 10,
  parameter int unsigned FIRST_INPUT = 1,
  parameter bit          PIN_SPEEDUP = 1'b1,
  localparam int unsigned VW  = $clog2(N) + 1,
  localparam int unsigned AW  = $clog2(F),
  localparam int unsigned CW  = PIN_SPEEDUP ? (N + 1) / 2 : N,   // control pins
  localparam int unsigned APW = PIN_SPEEDUP ? (AW + 1) / 2 : AW  // address pins
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   e,            // selector enable
  output logic                   ready,        // all modules initialised
  output logic                   slot_end,     // last cycle of a time slot

  input  logic [CW-1:0]          avail_in,     // free outputs from previous input
  output logic [CW-1:0]          avail_out,    // free outputs to next input

  input  logic [NP-1:0][VW-1:0]  arr_voq,      // arriving cell's VOQ, 0 = none
  output logic [NP-1:0][APW-1:0] wr_addr,      // store address of last slot's arrival
  output logic [NP-1:0]          wr_valid,
  output logic [NP-1:0]          arr_drop,     // last slot's arrival refused
  output logic [NP-1:0][APW-1:0] rd_addr,      // read address of last slot's departure
  output logic [NP-1:0]          rd_valid,
  output logic [NP-1:0][VW-1:0]  xbar_out,     // output served last slot, 0 = none
  output logic [NP-1:0][VW-1:0]  sch_voq       // output reserved last slot, 0 = none
);
  initial begin
    assert (NP >= 1 && FIRST_INPUT >= 1 && FIRST_INPUT + NP - 1 <= N)
      else $fatal(1, "sgs_scheduler: inputs FIRST_INPUT..FIRST_INPUT+NP-1 must lie in 1..N");
  end

  phase_t             phase;
  logic [NP:0][N-1:0] chain;
  logic [NP-1:0]      rdy;

  slot_timer u_timer (.clk, .rst_n, .phase, .slot_end);

  assign ready = &rdy;

  if (PIN_SPEEDUP) begin : g_ps
    pin_rx #(.W(N)) u_rx (.clk, .rst_n, .phase, .pins(avail_in), .word(chain[0]));
    pin_tx #(.W(N)) u_tx (.phase,
                          .word(chain[NP]), .pins(avail_out));
  end else begin : g_nops
    assign chain[0]  = avail_in;
    assign avail_out = chain[NP];
  end

  for (genvar p = 0; p < NP; p++) begin : g_in
    logic [AW-1:0] wa, ra, wa_q, ra_q;
    logic          wv, dr, rv;
    logic [VW-1:0] xo, sv;

    input_module #(.N(N), .F(F), .INPUT_ID(FIRST_INPUT + p)) u_im (
      .clk, .rst_n, .phase, .slot_end, .e, .ready(rdy[p]),
      .avail_in(chain[p]), .avail_out(chain[p+1]),
      .arr_voq(arr_voq[p]), .wr_addr(wa), .wr_valid(wv), .arr_drop(dr),
      .rd_addr(ra), .rd_valid(rv), .xbar_out(xo), .sch_voq(sv));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wa_q        <= '0;
        ra_q        <= '0;
        wr_valid[p] <= 1'b0;
        arr_drop[p] <= 1'b0;
        rd_valid[p] <= 1'b0;
        xbar_out[p] <= '0;
        sch_voq[p]  <= '0;
      end else if (slot_end) begin
        wa_q        <= wa;
        ra_q        <= ra;
        wr_valid[p] <= wv;
        arr_drop[p] <= dr;
        rd_valid[p] <= rv;
        xbar_out[p] <= xo;
        sch_voq[p]  <= sv;
      end
    end

    if (PIN_SPEEDUP) begin : g_ps
      pin_tx #(.W(AW)) u_wtx (.phase,
                              .word(wa_q), .pins(wr_addr[p]));
      pin_tx #(.W(AW)) u_rtx (.phase,
                              .word(ra_q), .pins(rd_addr[p]));
    end else begin : g_nops
      assign wr_addr[p] = wa_q;
      assign rd_addr[p] = ra_q;
    end
  end
endmodule
