# Sequential greedy scheduler for an input-buffered packet switch

A switch with input buffers and a cross-bar needs a scheduler. In every cell
time (time slot) the scheduler decides which input sends to which output.
Sequential greedy scheduling (SGS) finds a *maximal* matching: one input after
another takes a free output for which it holds a cell. The result is cheap to
compute and still non-blocking with a cross-bar speed-up of two.

The catch is that the N choices of one slot form a chain. If every input had to
choose within a single cell time, each input would get only T_cell/N. This
design pipelines the chain instead. Input *i* works on the schedule of a slot
N + 3 - i slots in the future. It passes the outputs it left free to input
*i + 1*, which works on the same future slot one cell time later. Every input is
busy every slot, and N future slots are being scheduled at once. Each input
therefore gets a whole cell time for its choice. The price is a fixed pipeline
delay of about N slots, which is small beside a frame of F >> N cells.

This repository holds synthesizable SystemVerilog for the per-input scheduling
hardware:

- the output selector and coder that make the choice;
- the queue manager that keeps the per-output cell queues as linked lists;
- the linked list, pointer and output memories;
- the chain of input modules on one device, with half-width, double-rate pins
  between devices.

The default configuration is 10 input modules of a 128-port switch, with
128 cells of buffer per input (frame F = N). One time slot takes six clock
cycles.

## The scheduling chain

```
 avail (all 1s)   +-----------+  avail_out  +-----------+        +-----------+
 ---------------> | input 1   | ----------> | input 2   | -> ... | input NP  | --> next device
                  | (slot k+N+2)            | (same slot, one cell time later)
                  +-----------+             +-----------+        +-----------+
```

Each slot, input module *i* does the following:

1. At the end of the previous slot it registered two vectors. The first is
   `avail_in`: the outputs that are still free for its target slot
   T = k + N + 3 - i. The second is its own request vector: bit j is set when
   the input holds an unscheduled cell for output j+1.
2. `d = avail & req` feeds the **output selector**. The selector raises the one
   Q bit of the lowest-numbered set D bit. The **coder** turns that one-hot bit
   into a VOQ number from 1 to N, or 0 when nothing was chosen.
3. `avail_out = avail & ~q` goes to input *i + 1*. It is stable for the whole
   slot.
4. The queue manager marks the chosen cell as scheduled. The VOQ number enters
   the **output memory**, a delay line N + 3 - i slots long. When it comes out,
   in slot T, the queue manager sends the head cell of that VOQ. `xbar_out`
   then names the output this input is connected to in slot T.

Input 1 must receive all ones: every output is free in a fresh slot. Inputs
later in the chain see fewer free outputs. Priority is fixed: lower-numbered
outputs win.

Why N + 3 - i: input 1 decides in slot k, and input N decides in slot
k + N - 1. The output memory is at least three slots long, so the decision of
input N is read three slots later. That puts the common target slot at
k + N + 2.

## Output selector and coder

Both are built recursively, which keeps them shallow.

- `os_basic2` is the 2-port leaf: `Q1 = E&D1`, `Q2 = E&~D1&D2`, `C = D1|D2`.
  C ignores E, so a parent can see which half has requests.
- `output_selector #(N)` is two N/2-port selectors plus one leaf. The leaf gets
  the halves' C bits as its D1 and D2. Its Q1 and Q2 become the E inputs of the
  lower and upper halves. The depth is log2 N leaf stages.
- `coder #(N)` has a 4-to-3 leaf: X2 = A4, X1 = A3|A2, X0 = A3|A1. A 2k-input
  coder combines a lower coder c1 and an upper coder c2, each m bits wide:
  `x[m] = c2[m-1]`, `x[m-1] = c1[m-1] | |c2[m-2:0]`, `x[m-2:0] = c1 | c2`.
  The output has log2 N + 1 bits, because VOQ numbers run from 1 to N and 0
  means "none".

N must be a power of two.

## Queue manager: three list operations per slot

An input's cells live in F data-memory locations, and the data memory itself
is outside this design. Every location is on exactly one list: the **empty
queue list (EQL)** or the **virtual queue list (VQL)** of one output. The
linked list memory (`sdp_ram`, F words of log2 F bits) holds, for each
location, the next location in its list.

| list | pointers | kept in |
|------|----------|---------|
| VQL of each output | head, first unscheduled, tail | three N-word `sdp_ram` pointer memories |
| EQL | head, tail | registers, plus a count of free locations |

Flag registers stand in for null pointers. `ne[v]` says VQL v is non-empty.
`r[v]` says VQL v has unscheduled cells, and `r` is the request vector.

Each slot the queue manager can do three operations, with VOQ numbers as
inputs (0 means no operation):

- **arrival** (`arr_voq`): the EQL head location is appended to the VQL. Its
  address goes out on `wr_addr` so the cell can be stored there. If the VQL
  was empty, the location also becomes its head. If the VQL had no unscheduled
  cell, it also becomes the first-unscheduled cell. If no location is free,
  the cell is refused (`arr_drop`).
- **schedule** (the coder's output): if first-unscheduled equals the tail, the
  VQL has no unscheduled cells left. Otherwise first-unscheduled moves to the
  next link.
- **departure** (from the output memory): the VQL head location is unlinked
  and goes out on `rd_addr`, and is appended to the EQL. If it was also the
  tail, the VQL becomes empty.

After reset the module spends F cycles linking every location into the EQL, so
that location a points to a+1. At the next slot boundary it raises `ready`.

### The six-cycle slot

All memories have a registered read: data appears one cycle after the address.
The slot is six cycles (`slot_timer`, `sgs_pkg::phase_t`). The accesses are
ordered so that every read sees the writes of the operations before it. No
memory is read and written at the same address in the same cycle.

| phase | arrival | schedule | departure |
|-------|---------|----------|-----------|
| 0 | read link[EQL head], tail[v] | | |
| 1 | write link[old tail], tail, head, first-unsched; advance EQL head | | |
| 2 | | read first-unsched[v], tail[v] | |
| 3 | | compare; read link[first-unsched] | read head[v], tail[v] |
| 4 | | write first-unsched[v] | read link[head]; output rd_addr |
| 5 | | | write head[v]; link location behind EQL tail |

The queue manager samples `arr_voq` in phase 0, the scheduled VOQ in phase 2
and the departing VOQ in phase 3. The selector's inputs are registered at the
slot boundary, so the selector and coder have two cycles to settle. The
request and free-output vectors are registered at the end of phase 5, so they
include everything the slot did.

## Pin speed-up between devices

With many modules on one device, the pins run out before the logic does. The
two N-bit free-output vectors and the cell addresses therefore cross the pins
in two halves per slot (`PIN_SPEEDUP = 1`, the default):

- `pin_tx` drives the lower half in phases 0-2 and the upper half in
  phases 3-5.
- `pin_rx` captures the lower half at the edge that ends phase 2. It takes the
  upper half straight from the pins. The consumer registers the full word at
  the end of the slot.

This halves the control pins to N/2 in and N/2 out. Each address needs
ceil(log2 F / 2) pins. At the defaults the counted interface is

- 10 x 8 pins of arriving-cell VOQ numbers;
- 2 x 10 x 4 address pins;
- 2 x 64 control pins;
- a clock and a reset.

That is 290 pins. The status outputs (valid and refusal flags, `xbar_out`,
`sch_voq`) come on top of that. Chained devices keep exactly the same slot timing as
one device. With `PIN_SPEEDUP = 0` the ports are full width.

## Top level: `sgs_scheduler`

Parameters:

| name | default | meaning |
|------|---------|---------|
| `N` | 128 | switch ports (VOQs per input); power of two |
| `F` | 128 | cells per input = linked-list size; power of two |
| `NP` | 10 | input modules on this device |
| `FIRST_INPUT` | 1 | index of the first module in the global chain |
| `PIN_SPEEDUP` | 1 | half-width free-vector and address pins |

Ports, with VW = log2 N + 1 and AW = log2 F:

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | 6 cycles per slot; asynchronous active-low reset |
| `e` | in | 1 | selector enable; 0 schedules nothing |
| `ready`, `slot_end` | out | 1 | initialised; last cycle of each slot |
| `avail_in` / `avail_out` | in/out | N/2 (N) | free outputs from the previous / to the next input |
| `arr_voq` | in | NP x VW | arriving cell's output, 0 = none; hold for the slot |
| `wr_addr`, `wr_valid`, `arr_drop` | out | NP x AW/2, NP, NP | where to store last slot's arrival, or refused |
| `rd_addr`, `rd_valid` | out | NP x AW/2, NP | where to read last slot's departing cell |
| `xbar_out` | out | NP x VW | output this input was connected to last slot |
| `sch_voq` | out | NP x VW | output reserved last slot (for slot +N+3-i) |

The results of slot k are registered at its end and shown throughout slot
k+1. With the pin speed-up, an address shows its lower half in phases 0-2 and
its upper half in phases 3-5.

## Sizes

These configurations are reported for this architecture, with pointer
memories in block RAM. All except the 16-port ones use the pin speed-up:

| N | F | modules per device |
|---|---|---|
| 16, 32, 64, 128 | N | 12, 12, 12, 10 |
| 16, 32, 64, 128 | 8N | 12, 12, 12, 9 |
| 16, 32, 64, 128 | 16N | 12, 12, 9, 6 |

The defaults build the N = 128, F = N, 10-module row. The other rows need
`N`, `F`, `NP` and `PIN_SPEEDUP` set to match. The 16-port, F = 256,
12-module row with full-width pins is simulated end to end by
`tb_sgs_workload`. Each module holds these memories:

- the linked list: F x log2 F bits;
- three pointer memories: N x log2 F bits each;
- the output memory: (N + 3 - i) x (log2 N + 1) bits.

A frame F of at least 10 N keeps the bandwidth lost to the one-cell-per-frame
reservation granularity small. The time slot is 6 clock cycles, so a slot
below 100 ns needs a clock of at least 60 MHz.

## Design choices beyond the source architecture

The architecture fixes what each block does. The items below are choices made
in this RTL:

- **Single clock.** The original arrangement clocks the pointer memories at
  twice the rate of the linked list memory, and the pins on both edges of a
  slot-rate clock. Here one clock with six phases per slot drives everything.
  The linked list memory is used in five of the six phases.
- **Order of the memory accesses** within the slot, as in the table above.
- **Null pointers** are replaced by flag registers (`ne`, `r`) and a
  free-location count.
- **Full memory.** An arrival with no free location is refused and flagged.
  The source assumes admission control prevents this.
- **Start-up.** The EQL is built by an F-cycle walk after reset. The
  free-output registers reset to all ones.
- **Coder recursion.** The merge uses two sub-coders and OR gates. The source
  sketches a third sub-coder for the middle bit.
- **Output memory** is a register array. A block-RAM shift register gives the
  same behaviour.
- **Top-level outputs** are registered for one slot. Valid and refusal flags
  and `sch_voq` were added; they have no pins in the original pin budget.
- **Not included:**
  - rotating priorities for fairness, which were only suggested;
  - per-frame reservation (credit) accounting;
  - the network processor, the data memory and the cross-bar;
  - the alternative queue manager with four cycles per slot and pointers in
    registers.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|-----------|----------------|
| `tb_os_basic2` | all 8 input combinations |
| `tb_output_selector` | N = 128 and N = 4; one-hot, random and sparse vectors against "lowest set bit" |
| `tb_coder` | every one-hot input at N = 128, 8, 4, 2 |
| `tb_sdp_ram` | random traffic against an array model, one-cycle latency, old data on read-during-write |
| `tb_output_memory` | delay of exactly DEPTH shifts at depth 130 and 3 |
| `tb_slot_timer` | phase sequence, one `slot_end` every 6 cycles |
| `tb_pin_rx`, `tb_pin_tx` | half-word transfer at 128 and 7 bits |
| `tb_queue_manager` | N = 8, F = 16 against FIFO queue models: free-location use, FIFO departure order, request vector, refusal when full, output timing in the slot |
| `tb_input_module` | one stage against a model: the pick, `avail_out`, departure exactly N+3-i slots later from the VOQ head |
| `tb_sgs_scheduler` | a complete 8-port, 8-module chain with pin speed-up against a sequential-greedy model |
| `tb_sgs_full` | the top at its defaults (N = F = 128, 10 modules) with the same model |
| `tb_sgs_workload` | N = 16, F = 16N = 256, 12 modules, full-width pins, with the same model |
| `tb_sgs_two_devices` | the 8-port chain split over two devices of four modules, linked through the half-width pins |

`tb_sgs_scheduler` uses hot-spot traffic and checks every pick, store address,
read address, departure slot and the outgoing free vector. It also checks that
no output is served twice in one slot. It counts each situation:

- scheduling;
- an output already taken by an earlier input;
- a refusal when memory is full;
- a departure;
- a queue emptied;
- the selector disabled.

It fails if any of them never happens. `tb_sgs_full` runs 1500 slots until
every scheduled cell has left.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sgs_scheduler \
          rtl/sgs_pkg.sv tb/tb_sgs_scheduler.sv -o sim
./obj_dir/sim
```

Replace the top-module and file names to run another testbench. The package
must come first; Verilator finds the other modules through `-Irtl`. Lint a
module with `verilator --lint-only -Wall -Irtl rtl/sgs_pkg.sv rtl/<module>.sv`.

## Files

`rtl/`:

- `sgs_pkg.sv`: the phase type;
- `os_basic2.sv`, `output_selector.sv`, `coder.sv`: selection;
- `sdp_ram.sv`: the memories;
- `output_memory.sv`;
- `queue_manager.sv`;
- `slot_timer.sv`;
- `pin_rx.sv`, `pin_tx.sv`;
- `input_module.sv`;
- `sgs_scheduler.sv`: the top.

Each file opens with a description of its function, interface and timing.
