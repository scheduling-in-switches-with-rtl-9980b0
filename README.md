# A switch with small output buffers and independent credit schedulers

This is an N x N cell switch (32 x 32 by default) with only a few cells of
buffering per output. Each output has a Q-cell queue (Q = 12 by default). An
input may send a cell to an output only after holding a credit for one of that
queue's slots, so the small queues never overflow.

Credits are handed out by two sets of simple round-robin schedulers that never
consult each other:

* Per output, a **credit scheduler** grants credits to requesting inputs.
* Per input, a **grant scheduler** picks one of the grants waiting for that
  input.

Because nobody arbitrates the two stages jointly, several inputs can send to
the same output in the same cell time. The output queue absorbs that conflict:
it accepts up to Q cells per cell time through a crossbar with an output
speed-up of Q.

The credit return happens on the switch chip. It fires at the moment a grant
scheduler accepts a grant, not when the cell arrives. This is why Q can stay
small even when the line cards are far from the chip.

All logic is synchronous. One clock cycle is one cell time, and every module
uses a synchronous active-low reset `rst_n`.

## Blocks

| File | Role |
|---|---|
| `rtl/sbs_pkg.sv` | Default parameters and `req_window(P, SD)`, the minimum request window |
| `rtl/rr_arbiter.sv` | Round-robin pick with a pointer that moves one past the winner when the pick is used |
| `rtl/credit_scheduler.sv` | One per output: request counters, a credit counter, up to R grants per cell time |
| `rtl/grant_scheduler.sv` | One per input: grant counters, one accepted grant per cell time, credit return |
| `rtl/linecard.sv` | One per input: VOQs, request issue under a window, sends a cell on each grant |
| `rtl/crossbar.sv` | Routes up to N cells, packing up to S per output onto write lanes |
| `rtl/output_queue.sv` | A Q-deep queue per output with S write lanes, one departure per cell time, and cut-through |
| `rtl/link_delay.sv` | P-cell-time line for requests, grants and cells |
| `rtl/switch_core.sv` | The chip: N credit schedulers, N grant schedulers, crossbar, N output queues |
| `rtl/sbs_system.sv` | Top level: N line cards, 3N lines and the chip |

## The life of a cell

1. **Arrival.** A cell arrives at input i with destination o. The line card
   stores it in its VOQ o (virtual output queue).
2. **Request.** Every cell time, the line card sends at most one request. It
   picks round-robin among the VOQs that hold cells not yet requested.
3. **Credit grant.** The request increments counter i inside output o's credit
   scheduler. While the scheduler holds credits, it grants round-robin among
   inputs whose counters are non-zero, up to R grants per cell time. Each
   grant consumes one credit and decrements that input's request counter.
4. **Grant acceptance.** The grant increments counter o inside input i's grant
   scheduler. Each cell time, the grant scheduler accepts one non-zero counter,
   round-robin. In the same cell time it returns the credit to output o's
   credit scheduler over `ack`, and forwards the grant to the line card.
5. **Sending the cell.** The line card sends the head cell of VOQ o. The
   crossbar places it on one of output o's write lanes, and the output queue
   stores it. If the queue is empty, the cell cuts straight through to the
   output link.

### Why a credit can be returned before its cell arrives

Once a grant scheduler accepts a grant, the cell for that credit will arrive
exactly 2P + constant cell times later: the grant goes out, the cell comes
back, and nothing on the lines is lost or reordered.

A credit returned at that moment may lead to a new grant whose cell also
arrives 2P + constant cell times after *its* acceptance. That acceptance is
strictly later. So by the time the new cell enters, the queue has had at
least as many cell times to drain.

The queue therefore never holds more than Q cells. The credit loop is the
scheduler delay SD (1 or 2 cell times) rather than a round trip over the
lines. Each credit scheduler checks `credit <= Q` with an assertion, and each
output queue asserts that it never overflows. Every simulation, including the
P = 3 case, runs with these assertions on.

### The footnote rule for R > 1

When a credit scheduler hands out more than one credit per cell time (R > 1),
several grant schedulers can accept grants for the same output in one cell
time. Adding all of those credits back at once would allow a burst of cells
that the queue, draining one per cell time, cannot hold.

To prevent this, `credit_scheduler` puts returned credits into a pending count
(`ret_pend`). It moves at most one per cell time into the usable credit count.
With R = 1 at most one grant per output is outstanding per cell time, so
credits are added directly.

## Scheduler delay SD

The scheme describes SD only as the combined delay of the credit and grant
schedulers. In this design it maps onto registers like this:

* **Credit scheduler.** Always combinational from the registered request
  counters. A grant is visible in the same cell time it is made.
* **Grant scheduler, SD = 2.** Arbitrates over grant counters that were
  registered one cell time earlier.
* **Grant scheduler, SD = 1.** Also sees the grants arriving in the current
  cell time. This adds one combinational path from the credit schedulers'
  round-robin logic through the grant scheduler's.

In both cases the `ack` (credit return) is combinational. So a credit handed
out at cell time t can be granted again at t + SD.

At the defaults (SD = 2, P = 0), a lone cell takes **7 cell times** from being
offered at the input to leaving the output. In general it takes
**5 + SD + 3P**:

* 3P for the request line, the grant line and the cell line;
* the rest for the registers at the line card's VOQ write, its request output,
  the request counter, the grant counter (with SD = 2), the grant scheduler's
  output, the line card's cell register and the output register.

The system testbenches check this figure exactly.

## The request window in the line card

An input should not have to wait for a grant before asking again. It may keep
up to REQ_MAX requests outstanding per output. The window for output o goes
down on each request and up on each grant. A grant arriving in the current
cell time is counted at once, so a line card with a single busy flow can
request every cell time.

A lone flow runs at full rate only if the window covers one request/grant
round trip. That round trip is 2P + SD + 2 cell times, given by
`sbs_pkg::req_window`. `sbs_system` asserts at elaboration that REQ_MAX is at
least this value.

The default window is larger: REQ_MAX = VOQ_DEPTH = 64. Every stored cell may
then have a request in flight. With the minimum window of 4, a 32 x 32 switch
carried only about 0.88 of full load under unbalanced traffic (w = 0.5). With
a 64-cell window it carried 0.96 to 1.0.

A large window does not weaken the output-queue bound, which comes only from
the credits. What it changes is how many requests sit in the credit
schedulers' counters.

## Output queue and cut-through

`output_queue` has S = Q write lanes. The crossbar fills output o's lanes in
input-index order: the lowest-numbered sender goes to lane 0, the next to
lane 1, and so on. It does this by ranking the senders to each output. Lane k
takes the sender whose rank is k.

The queue is a circular buffer of DEPTH cells. When it is empty and at least
one cell arrives, lane 0 cuts through to the output register and the other
lanes are stored. `bypass` marks such a departure.

The space check counts the slot freed by a departure from storage in the same
cell time. With this, DEPTH = 1 and Q = 2 behaves like the two-cell scheme
with a one-cell buffer: one cell cuts through and one is stored. The
`tb_sbs_system` instance B runs exactly that configuration, with
OQ_DEPTH = 1 and Q = 2.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| N | 32 | ports |
| Q | 12 | credits per output; also crossbar speed-up S and output queue depth |
| R | 1 | credits a credit scheduler may grant per cell time (integer) |
| SD | 2 | scheduler delay, 1 or 2 |
| P | 0 | line delay, in cell times, between line cards and chip |
| CELL_W | 64 | cell payload bits |
| VOQ_DEPTH | 64 | cells per VOQ (a power of two) |
| OQ_DEPTH | Q | cells per output queue |
| REQ_MAX | VOQ_DEPTH | request window per output; must be ≥ 2P + SD + 2 |

The defaults give 32 output queues of 12 cells, which is 384 cell buffers on
the chip. Each line card holds 32 × 64 cells of 64 bits, which is 131,072
bits.

## Status outputs

The top level exposes one bit per port for each mechanism. The system
testbenches count every one of them:

| Signal | Meaning |
|---|---|
| `lc_win_stall` | A line card has an unrequested cell but its window is used up |
| `cs_starved` | A credit scheduler has requests but no credit |
| `gs_waiting` | A grant scheduler left a grant pending |
| `oq_multi` | More than one cell entered an output queue in one cell time |
| `oq_bypass` | A cell cut through an empty output queue |
| `oq_overflow` | An output queue overflowed; must stay 0 |
| `oq_occupancy` | Cells held in an output queue |

## Testbenches

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Randomness comes from
`$urandom`.

| Testbench | What it checks |
|---|---|
| `tb_rr_arbiter` | Winner and pointer against a reference model |
| `tb_link_delay` | Delay of 3 against a shift-register model |
| `tb_credit_scheduler` | R = 1 and R = 2 instances against a model: counters, credits, one-per-cell-time credit return |
| `tb_grant_scheduler` | SD = 2 and SD = 1 instances: grant latency, round-robin acceptance, `ack` in the same cell time |
| `tb_crossbar` | Lane packing and overflow flag for random patterns |
| `tb_output_queue` | Order, occupancy, bypass and full cases; S3/D3 and S2/D1 instances |
| `tb_linecard` | VOQ contents, request window and per-flow order, plus a full-rate single flow |
| `tb_switch_core` | N = 4, Q = 2 chip: request-to-grant latency SD + 1, full throughput under saturated uniform requests, round-robin fairness under a hot spot, complete drain |
| `tb_sbs_system` | Two reduced systems through `tb/sbs_harness.sv` (see below) |
| `tb_sbs_full` | Default 32 x 32 configuration with no parameter overrides: lone-cell latency of 7, load 0.9 for 1500 cell times, drain, event counts |
| `tb_workloads` | Default configuration: uniform load sweep (delay and throughput) and the unbalanced-traffic sweep |

The two `tb_sbs_system` systems are:

* **A:** 8 ports, Q = 4, R = 1, SD = 2, P = 0, window 4.
* **B:** 8 ports, Q = 2, R = 2, SD = 1, P = 3, one-cell output buffers.

Both run the same phases: lone-cell latency, load 0.6, load 1.0, unbalanced
traffic, a hot spot, and a drain. In every phase each delivered cell is
compared against the cell sent, and per-flow order is checked.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sbs_pkg.sv tb/tb_sbs_system.sv --top-module tb_sbs_system
./obj_dir/Vtb_sbs_system
```

## Measured behaviour at the defaults (N = 32, Q = 12, SD = 2, P = 0)

The figures below come from the testbenches. "Delay" is the time a cell waits
beyond the 7-cell-time empty-pipeline latency.

Uniform Bernoulli traffic:

| Offered load | 0.2 | 0.5 | 0.8 | 0.9 | 0.95 |
|---|---|---|---|---|---|
| Mean delay (cell times) | 0.15 | 0.85 | 3.5 | 7.6 | 13.3 |

At every load, the carried load matches the offered load.

Unbalanced traffic at full load, where a fraction w goes to the "own" output
and the rest is spread uniformly:

| w | 0 | 0.25 | 0.5 | 0.75 | 1 |
|---|---|---|---|---|---|
| Throughput | 0.985 | 0.962 | 0.969 | 0.981 | 1.000 |

With Q = 2, SD = 2 and saturated uniform requests, the chip keeps every output
busy every cell time.

## Where this design goes beyond, or differs from, the scheme as described

* **Which credit return.** The scheme has two variants:
  * The basic one returns a credit when the cell starts leaving the output
    queue.
  * The refined one returns it when the grant scheduler accepts the grant.

  Only the refined one is built, because it keeps the queue size independent
  of the line delay P.
* **Meaning of Q.** Q counts credits per output, which is the same as the
  number of grants that may be pending for that output. It also sets the
  crossbar speed-up and, by default, the output queue depth.
* **Round trip.** The scheme quotes a round trip of 2P + SD. This pipeline
  adds two more cell times at the line card: the request register and the VOQ
  read. That is why the minimum window is 2P + SD + 2.
* **Reference figures use SD = 1.** The scheme's delay and unbalanced-traffic
  figures are for SD = 1. The figures measured above use the default SD = 2.
  * At w = 0.25 the measured unbalanced throughput (0.962) is slightly below
    the 0.97 quoted for Q = 12.
  * At the other w values it is at or above 0.97.
* **SD mapping.** How SD maps to registers, the combinational credit return,
  and the fixed 5 + SD + 3P pipeline latency are this design's choices. The
  delay figures above include no propagation or scheduling latency beyond
  that fixed pipeline.
* **Integer R only.** R must be an integer, so R = 1.5 cannot be set. With
  R > 1, a credit scheduler grants at most one request per input per cell
  time.
* **Request rate.** The line card issues one request per cell time,
  round-robin over VOQs. The request window defaults to the VOQ depth rather
  than the minimum round trip.
* **Not specified by the scheme, chosen here:**
  * cell width;
  * VOQ depth;
  * the order in which simultaneous arrivals enter an output queue (input
    order);
  * the round-robin pointer rule (one past the winner, moved only when the
    pick is used);
  * `in_ready` back-pressure when a VOQ is full.
* **Not built:**
  * the comparison designs (iSLIP, a buffered crossbar with N² crosspoint
    buffers, and the variant that returns credits only when cells leave the
    output queue);
  * the bursty traffic models.
* **Simulated sizes.** N = 64 and 128, Q = 32 and P = 100 are reachable by
  parameters but were not simulated. P = 100 also needs a window of at least
  204, and so a VOQ depth of 256.
