# A CIOQ switch that behaves exactly like an output-queued switch

An output-queued (OQ) switch is the ideal packet switch. Every arriving cell
goes straight into a FIFO at its output, so no output ever idles while a cell
for it exists, and each cell's departure time can be predicted exactly. The
catch is speed: in an N x N OQ switch, the fabric and the output memories must
run N times faster than the line rate. An input-queued switch needs only line
rate, but cells then compete at their input for entry into the fabric, which
destroys that exact timing.

This RTL implements the middle ground: a **combined input and output queued
(CIOQ)** switch whose fabric runs only **S = 4** times faster than the lines.
Its cells still leave **in exactly the slot, and in exactly the order, that a
FIFO OQ switch would send them**, for any arrival pattern. Three things make
this work:

1. **Virtual output queues (VOQs).** Each input keeps one FIFO per output, so
   a cell never waits behind a cell for a different output.
2. **Urgency.** On arrival, each cell is stamped with the number of slots the
   OQ switch would hold it. The scheduler serves cells by this number.
3. **Most Urgent Cell First (MUCFA) scheduling.** The scheduler picks a new
   input-to-output matching S times per slot, always preferring the most
   urgent cells.

With a speedup of four, the cell the OQ switch sends in a given slot is always
at its output by the end of that slot. The switch reports any slot where this
fails, which can happen with a smaller speedup.

## Urgency, and how the switch knows it

The *urgency* of a cell is how many slots remain before the reference OQ
switch would send it. Equivalently, it is the number of cells ahead of it in
that switch's output FIFO. Cells that arrive in the same slot for the same
output join that FIFO in increasing input order, so the lower-numbered input
gets the smaller urgency.

The switch does not need the reference switch's cells to know this, only the
length of each of its output FIFOs. `ref_oq_stamper` keeps one counter per
output:

- an arriving cell for output j gets urgency = the current length of FIFO j,
  plus the number of cells for j already accepted this slot from
  lower-numbered inputs;
- at the end of each slot, every non-empty counter goes down by one.

Urgencies shrink by one every slot. Rather than update every stored cell, each
cell carries its **departure slot** `dep = now + urgency`, modulo 2^TW with
TW = log2(QMAX) + 2. Its urgency at any later slot is `dep - now`, compared as
a signed number. A negative urgency means the cell is already late, which only
happens after the switch has failed to keep up.

## One time slot

Time is divided into slots: one slot is the time between two cell arrivals on
a line. A slot is split into S phases. In each phase the fabric can take at
most one cell from each input and deliver at most one cell to each output. In
clock cycles, a slot runs as follows:

| cycles          | step   | what happens |
|-----------------|--------|--------------|
| 1               | ARRIVE | `slot_start` is high. Up to one cell per input is sampled, stamped, and written into its VOQ. `in_accept` shows which cells were taken. |
| ITERS (= N)     | MATCH  | MUCFA rounds, one per cycle, on the urgencies of the VOQ heads. |
| 1               | XFER   | The matched head cells cross the crossbar and are inserted into their output buffers. |
| repeat MATCH + XFER S times | | |
| 1               | DEPART | `slot_end` is high. Each output sends its head cell if that cell is due in this slot. |

A slot therefore takes 2 + S(N+1) cycles: 134 cycles at the default
N = 32, S = 4. Arrivals and departures take separate cycles, so within a slot
all arrivals come before any transfer, and every transfer comes before the
departures.

## The MUCFA matching (`mucfa_scheduler`)

In each phase, every output wants its most urgent waiting cell. An input
wanted by several outputs serves the one whose cell is most urgent; on equal
urgency, the lower output number wins. An output that loses tries its
next-most-urgent cell at another input. Matching stops when no unmatched
output still has a cell at an unmatched input.

Both sides rank the possible transfers (i, j) by the same key: urgency, then
output number, then input number. So there is exactly one matching that
neither side wants to change: the *stable matching*. It is the matching you
get by repeatedly taking the most urgent remaining transfer. The hardware
computes it in rounds, one per clock cycle:

- every unmatched output finds its best unmatched input;
- every unmatched input finds its best unmatched output;
- every pair that chose each other is matched and leaves the contest.

The most urgent remaining transfer is always such a pair, so each round that
can match anything does. N rounds are always enough. Unlike the general
Gale-Shapley procedure, no tentative match ever has to be undone.

Two effects of this matching deserve names, because the testbenches count
them:

- **Input contention:** an output's best cell waits because its input is
  sending a more urgent cell to another output.
- **Output contention:** an input's best cell waits because its output is
  taking a more urgent cell from another input.

Because of input contention, cells can reach an output out of urgency order.
For that reason the output buffers are kept sorted, not FIFO.

Worked example, with 3 ports and S = 2. At the start of a slot, the VOQ heads
have these urgencies (input, output):

- (1,1) = 1, (1,2) = 1, (1,3) = 3
- (2,2) = 3, (2,3) = 2
- (3,1) = 2, (3,3) = 0

Phase 1:

- Outputs 1 and 2 both want input 1 with urgency 1. Input 1 serves output 1,
  the lower number.
- Output 2 gets its cell of urgency 3 from input 2.
- Input 3 serves output 3.

Phase 2:

- Input 1 sends output 2 its cell of urgency 1, which lands ahead of the cell
  of urgency 3 already in output 2's buffer.
- Input 3 serves output 3 again. Input 2 loses output 3 to it.
- Output 1 idles.

`tb_mucfa_scheduler` replays both phases.

## Blocks

| module | role |
|--------|------|
| `cioq_pkg` | Default sizes, the width functions, and the slot-step enum. |
| `cioq_switch` | Top. Contains the slot sequencer and connects everything below. |
| `ref_oq_stamper` | Output-FIFO lengths of the reference OQ switch, the slot counter, and urgency stamping of arrivals. |
| `voq_bank` | The N VOQs of one input. It shows all N head cells to the scheduler. |
| `cell_fifo` | One VOQ: a circular FIFO with first-word fall-through. |
| `mucfa_scheduler` | The round-per-cycle MUCFA matching described above. |
| `crossbar` | Non-blocking N x N crosspoint fabric: one multiplexer per output. |
| `output_buffer` | One output's buffer, a shift register kept sorted by departure slot. It sends its head cell when the cell is due. |

A cell inside the switch is `{payload, dep}`: CELL_W + TW bits.

## Top-level interface (`cioq_switch`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | Clock, and asynchronous active-low reset. Reset empties every queue and sets the slot counter to 0. |
| `slot_start` | out | 1 | Arrival cycle of a slot. Inputs must be valid in this cycle. |
| `in_valid`, `in_dest`, `in_payload` | in | N, N x log2 N, N x CELL_W | One cell per input: present, destination output, contents. |
| `in_accept` | out | N | The cell was taken. Low means the reference FIFO of its output already holds QMAX cells. |
| `slot_end` | out | 1 | Departure cycle of a slot. |
| `out_valid`, `out_payload` | out | N, N x CELL_W | The cell leaving each output in this slot. |
| `out_miss` | out | N | The reference switch sends a cell now, but this output has no cell due now. |
| `out_late` | out | N | The cell leaving now was due in an earlier slot. |
| `overflow` | out | 1 | A cell found its output buffer full. |
| `now`, `phase`, `xfer` | out | | Slot counter, current phase, and transfer cycle. |

Parameters, with their defaults:

- `N` = 32: number of ports.
- `S` = 4: speedup.
- `CELL_W` = 32: cell payload width in bits.
- `QMAX` = 16: capacity of each reference output FIFO, each VOQ and each
  output buffer.
- `ITERS` = N: matching rounds per phase.

## Where this RTL departs from the algorithm as usually stated

- **Finite queues.** The algorithm assumes unbounded buffers. Here every
  queue holds QMAX cells. Admission follows the reference switch: a cell is
  refused when its reference output FIFO is full, and the same cell would
  then be refused by the reference too, so the two switches still see
  identical traffic. While the switch keeps pace with the reference, a VOQ or
  output buffer can never hold more than its reference FIFO, so QMAX is
  enough for them as well.
- **Failure is reported, not prevented.** With S >= 4, `out_miss` and
  `out_late` should never rise. With a smaller S they can. A late cell then
  leaves at the next departure cycle as the head of its buffer.
- **Clocking is this design's own.** The fixed 2 + S(N+1) cycle slot, the
  one-round-per-cycle matcher, the departure-slot encoding of urgency, the
  sorted shift register, the 32-bit payload and QMAX = 16 are choices made
  here. The algorithm leaves them open.
- **Not included.** Segmenting variable-length packets into cells and
  reassembling them is outside this core.

## Size and timing notes

Per output, the scheduler compares N urgencies twice per round, once from the
output's side and once from the input's side. That is about 2N^2 comparators
of TW bits, plus the N^2 subtractors that form the urgencies. The VOQ storage
is N^2 x QMAX x (CELL_W + TW) bits, about 620 kbit at the defaults. This is
the dominant memory. In a real implementation it would be N memories of N
logical queues each, not flip-flops.

A slot of 134 cycles at N = 32 is long. At a 10 Gbit/s line rate with 64-byte
cells, a slot lasts 51.2 ns. To reach that, a product would have to pipeline
or parallelise the matching rounds, or shorten the slot by stopping a phase
as soon as a round adds nothing.

## Verification

All testbenches are self-checking. Each ends with
`TB_RESULT checks=<n> failures=<m>`.

- `tb_cioq_switch`:
  - **Switch A:** 8 x 8, S = 4, QMAX = 32, 2000 slots of heavy random
    traffic. In some windows one output is overloaded; in others all inputs
    chase a destination that moves every slot. Every slot is compared with a
    FIFO output-queued reference (`tb/cioq_line_model.sv`): the same
    acceptances, the same cell on every output in the same slot, no miss,
    late or overflow flag, and the exact slot length.
  - **Input-thread invariant:** at the start of every slot the test reads
    the cells waiting at each input of switch A and sorts them by (urgency,
    output). At speedup 4, the cell at position p of this *input thread* must
    never have urgency p-1; this is the property behind the exact-mimicking
    guarantee.
  - **Switch B:** S = 1. It must report misses and late cells.
  - **Coverage:** the test counts input contention, output contention, later
    matching rounds, out-of-order inserts into output buffers, and refused
    arrivals. It fails if any of them never happened.
- `tb_cioq_switch_full`: the switch at its defaults (32 x 32, S = 4), 2000
  slots, checked against the same reference.
- Per-block tests:
  - `tb_mucfa_scheduler`: the worked example, plus random matrices against a
    greedy software model.
  - `tb_ref_oq_stamper`: urgency stamps and refusals against a FIFO-length
    model.
  - `tb_voq_bank`: against per-output software queues.
  - `tb_output_buffer`: against a sorted software list, including late and
    overflowing cells.
  - `tb_crossbar`: against random partial permutations.

To simulate with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_cioq_switch \
  -y rtl -y tb +libext+.sv rtl/cioq_pkg.sv tb/tb_cioq_switch.sv
./obj_dir/Vtb_cioq_switch
```

The same command with another `tb_*` name runs any other testbench.
