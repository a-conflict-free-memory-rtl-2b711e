# Conflict-free DRAM packet buffer for virtual output queues

A router line card at 160 Gb/s (OC3072) with 64-byte cells must take in one
cell and hand out one cell every 3.2 ns. It keeps Q = 512 virtual output
queues (VOQs), one per output port and class of service. DRAM is large enough
to hold them, but a DRAM bank needs about 51 ns between random accesses. The
classic answer is a hybrid buffer. Each queue's tail is collected in a small
fast SRAM (t-SRAM) and its head is prefetched into another (h-SRAM). The
DRAM sees only large blocks of B = 32 cells, so that one random access per
B slots is enough. Both SRAMs grow roughly as Q x B cells. At B = 32 they are
too large to be read in 3.2 ns.

This design takes that block size down to b = 4 cells without asking more of
the DRAM. It uses the DRAM's many banks (M = 256) instead of a single random
access per block:

* Banks are grouped so that the blocks of one queue rotate over B/b banks.
  B/b consecutive transfers of one queue therefore never hit a busy bank.
* A scheduler keeps a window of pending block requests. Every b slots it
  starts the oldest request whose bank is not still busy. Requests may thus
  reach the DRAM, and come back, out of order.
* The cost of that freedom is bounded and paid once. The arbiter's requests
  are delayed by the worst-case scheduling delay, and the h-SRAM gets
  b x Rmax cells of extra room. In exchange it can reorder what comes back.

With b = 4 the two SRAMs together hold 3941 cells (about 250 KB). A cell
requested by the arbiter comes out a fixed 3296 slots (10.5 us) later.

The architecture is the conflict-free DRAM system (CFDS) of *A Conflict-Free
Memory Banking Architecture for Fast VOQ Packet Buffers*. This RTL is an
independent implementation of it. Where that description gives no detail, the
choices are this implementation's own. They are listed in the last sections.

## Data flow

```
 line ──► tail_buffer ─────────── dram_wr_* ─────────►┐
          (t-SRAM, t-MMA)                              │   DRAM, M banks
                                                       │   (outside)
 arbiter ─► vmma ──rep──► dss ─── dram_rd_* ─────────►│
 req_*     (lookahead,    (RR, ORR, DSA)               │
            V-MMA)                                      │
             │ head                                     │
             ▼                                          │
          latency_sr ──► hsram ◄── dram_rdata_* ◄───────┘
                          │
                          └──► out_* (cell to the switch fabric)
```

One clock cycle is one slot. In each slot at most one cell arrives
(`in_valid`, `in_q`, `in_cell`) and the arbiter asks for at most one cell
(`req_valid`, `req_q`). The requested cell appears on `out_cell` exactly
`LA + LAT + 1` cycles after the request, where

* `LA = Q(b-1)+1` is the lookahead, 1537 slots by default, and
* `LAT = 2b(2Q/G-1)(B/b-1) + b + DRAM_LAT + 2` is the latency register,
  1736 + 4 + 16 + 2 = 1758 slots by default.

The arbiter may only ask for cells that are already in the buffer. It may ask
for cells that are still in the t-SRAM only once they have been written to
DRAM (see "Limits" below).

## Parameters and derived sizes

| parameter | default | meaning |
|---|---|---|
| `Q` | 512 | number of queues (power of two) |
| `M` | 256 | DRAM banks (power of two) |
| `B` | 32 | slots a bank stays busy after an access; the block size of a plain hybrid buffer |
| `BSMALL` | 4 | b, cells per DRAM transfer; B/b must be a power of two |
| `ORD_W` | 12 | width of a queue's block ordinal; each queue addresses 2^12 blocks of DRAM |
| `CELL_W` | 512 | cell width in bits (64 bytes) |
| `DRAM_LAT` | B/2 = 16 | slots from a DRAM read command to its first cell |
| `LA` | Q(b-1)+1 | lookahead length |
| `MDQF` | 0 | 1 = pick the most deficit queue when no queue is critical |

`B = 32` comes from B = 2RT/C, with line rate R = 160 Gb/s, random access
time T = 51.2 ns and cell size C = 512 bits. `DRAM_LAT = B/2` is the same T
expressed in slots.

Everything else follows from these values (package `cfds_pkg`):

| quantity | formula | default |
|---|---|---|
| groups | G = M/(B/b) | 32 groups of 8 banks |
| Requests Register | L = (2Q/G-1)(B/b-1)+1 | 218 |
| worst-case overtakes | Rmax = (2Q/G-1)(B/b-1) | 217 |
| latency register | 2b·Rmax (+ b + DRAM_LAT + 2) | 1736 (+22) |
| h-SRAM | Q(b-1) + b·Rmax cells | 2404 |
| t-SRAM | Q(b-1)+1 cells | 1537 |

The same formulas give the other block sizes the architecture was studied
with. At Q = 512, M = 256 and B = 32, the request-to-cell delay is:

| b | delay |
|---|---|
| 1 | 7895 slots |
| 2 | 4314 slots |
| 4 | 3296 slots |
| 8 | 4332 slots |
| 16 | 7940 slots |

b = 4 gives the shortest delay and nearly the smallest SRAMs, which is why it
is the default. All five configurations run in the end-to-end tests, and
each keeps its h-SRAM peak below the formula's size.

## Bank organisation (`bank_map`)

A block is named by its queue `q` and its ordinal `ord`, the block's position
in that queue counted from 0. The ordinal counts separately for the write side
and the read side, and both count in the same order. The mapping is:

* **group**: the low log2 G bits of `q`.
* **bank in group**: the low log2(B/b) bits of `ord`.
* **bank**: `{group, bank_in_group}`.
* **bank-local address**: `{q >> log2 G, ord >> log2(B/b)}`.

Each group therefore serves Q/G = 16 queues, and a queue's blocks visit its 8
banks in turn. The bank-local address is one field. Splitting it into DRAM
row and column bits is left to the DRAM controller.

## Virtual SRAM subsystem and ECQF (`vmma`)

The V-MMA behaves as if the h-SRAM were filled instantly. It keeps a
*virtual occupancy* per queue: cells requested from DRAM minus cells granted.
Every b slots it asks for one block of b cells. To choose the queue it looks
ahead at the arbiter's next LA requests, which are held in a shift register.
The rule is Earliest Critical Queue First (ECQF):

1. Walk the lookahead from oldest to newest.
2. Take one off a copy of the counter of each request's queue.
3. The first queue whose copy goes negative is *critical* and gets the block.

With LA = Q(b-1)+1 some queue is always critical once the lookahead is full.
No request then leaves the lookahead without a cell reserved for it.

Walking 1537 entries every 4 cycles is not hardware. `vmma` keeps the walk's
result instead:

* `s[q]` is the virtual occupancy minus the requests for `q` still in the
  lookahead. It is the counter at the end of the walk.
* Each lookahead entry carries an *uncovered* bit. It is set when the request
  enters and drives `s[q]` below zero. The uncovered entries of a queue are
  then always its newest `-s[q]` requests.
* The earliest critical queue is the queue of the oldest uncovered entry. One
  priority encoder over the lookahead finds it.
* Giving b cells to `q` adds b to `s[q]` and clears the oldest min(b, -s[q])
  uncovered entries of `q`. Clearing takes one entry per cycle, using the b
  cycles before the next decision.

This gives exactly the choice of the plain walk. `tb_vmma` checks that
against a reference that performs the walk. An entry that reaches the head
still uncovered is a virtual miss (`vmiss`). With the ECQF lookahead that
never happens.

When no queue is critical, an *empty request* goes out. It takes a scheduler
slot but moves no data. With `MDQF = 1` the queue with the lowest `s[q]` gets
the block instead, which is the option for lookaheads shorter than
Q(b-1)+1. The h-SRAM default size assumes the full ECQF lookahead.

## DRAM scheduler (`dss`)

Each decision of the V-MMA, real or empty, enters the tail of the
**Requests Register** (RR), L = 218 entries long. At entry it gets its
queue's next ordinal and its bank from `bank_map`. In the same cycle the
**DRAM Scheduler Algorithm** (DSA) removes one entry, and the younger entries
move up. The removed entry is the oldest one that is empty or whose bank is
not in the **Ongoing Requests Register** (ORR). The ORR holds the banks of
the last B/b − 1 = 7 transfers. A bank is busy for B slots, that is for B/b
decisions, so those banks are locked.

The chosen request goes out on `dram_rd_*` one cycle later. It carries the
h-SRAM descriptor number as its tag. The RR starts full of empty requests.
A request that never gets overtaken leaves after (L−1)·b slots. Its
worst-case extra wait is Rmax decisions. The RR size is what guarantees that
the DSA always finds an unlocked entry. If it ever found none, `err_overflow`
would pulse. An assertion checks that no transfer goes to a locked bank.
`ev_dsa_skip` pulses whenever the DSA takes an entry other than the head.
That is the event that produces out-of-order delivery.

## Latency register (`latency_sr`)

A request leaving the lookahead is not served at once. It first waits
2b·Rmax slots: the (L−1)·b slots a request spends in the RR, plus Rmax·b
slots of worst-case overtaking. By then the block that the V-MMA reserved for
it has surely arrived. On top of the scheme's 2b·Rmax, this implementation
adds b + DRAM_LAT + 2 slots of its own pipeline:

* b, because a decision enters the RR one decision before it can leave;
* the DRAM access time `DRAM_LAT`;
* one slot for the issue register and one for the SRAM write.

Shortening the register by even `DRAM_LAT` slots produces misses in the
end-to-end test.

## Head SRAM and reordering (`hsram`)

Blocks of one queue can come back in any order. Cells must still leave in
queue order. `hsram` orders them with descriptors:

* When the V-MMA decides to replenish a queue, a block descriptor is taken
  and linked at the end of that queue's descriptor chain. Chain order is
  therefore cell order.
* The descriptor number travels with the DRAM command as its tag.
* Each returning cell takes any free data cell. Its pointer is stored in
  slot `idx` of the descriptor.
* A read takes the next cell of the head descriptor of `rd_q` and frees the
  cell at once. After the last cell it also frees the descriptor.

Cells are allocated on arrival, not per block. The data SRAM therefore holds
exactly the cells that have arrived and not yet been read. That quantity is
what the size Q(b−1) + b·Rmax bounds. At the defaults it peaks at 2235 of
2404 cells in the full-size test. The reduced end-to-end test reaches its
full 26 cells and never more. Descriptors are a separate pool. A descriptor lives from the decision until
its block's last cell is read, which can be much longer than a cell stays.
The pool is sized (Q(b−1) + LA + LAT)/b + Q = 1720 at the defaults. That
covers the cells decided but not yet read plus one partly read block per
queue. This bound is this implementation's own.
If a cell is read before it has arrived,
`out_miss` is set. In correct operation that never happens.

## Tail buffer (`tail_buffer`)

Arriving cells are appended to a per-queue linked list in a shared pool of
Q(b−1)+1 cells. Whenever the write side is idle, the t-MMA takes a queue that
holds at least b cells, choosing round-robin. It sends that queue's b oldest
cells to DRAM, one per cycle (`dram_wr_*`, same mapping as the read side).
Cells then leave as fast as they arrive whenever any queue holds b cells, so
the pool never overflows. The pool is full only when every queue holds b−1
cells and one more arrives, and by then a queue is eligible. The t-MMA
decides in any idle cycle rather than on fixed b-slot boundaries. On fixed
boundaries, one arrival per slot can need one cell more than Q(b−1)+1.

## DRAM interface

The DRAM is outside the design. The interface expects the following:

* A read command `{bank, addr, tag}` at cycle t returns the block's b cells
  on `dram_rdata_*`, one per cycle, at t+DRAM_LAT … t+DRAM_LAT+b−1. The
  cells come in index order and carry the tag and the index.
* Read commands come at least b cycles apart, and a bank is never read twice
  within B cycles.
* Writes: one cell per cycle, b cycles per block, with bank, address and
  index.
* `dram_*_q` and `dram_*_ord` name the queue and ordinal of a transfer. They
  are for monitoring; a DRAM needs only bank and address.

`tb/dram_model.sv` is a behavioural model of such a DRAM. It counts bank
conflicts, overlapping returns, reads of unwritten cells and out-of-order
block reads.

## Events and errors on the top

* `ev_replenish`: a block was requested.
* `ev_critical`: a critical queue existed at a decision.
* `ev_empty_request`: an empty request was issued.
* `ev_dsa_skip`: the DSA overtook a request.
* `ev_tail_block`: a block write started.
* `err_vmiss`, `err_rr_overflow`, `err_hsram_full`, `err_tsram_full`: must
  never pulse.
* `hsram_cells_used`: current h-SRAM occupancy.

## Limits and departures from the published scheme

* **Write scheduling.** Block writes from the t-SRAM use the same bank
  mapping, but the DSS does not schedule them around reads. The published
  RR size counts Q write streams and Q read streams against the banks, but
  the way writes and reads share the banks is not spelled out. A real DRAM
  controller must interleave them, for example on a separate bank cycle.
  The testbench model checks bank conflicts among reads only.
* **Cells still in the t-SRAM** cannot be requested. There is no path from
  the t-SRAM straight to the h-SRAM. The test arbiter requests only cells
  already written to DRAM.
* **Pipeline slots.** The latency register is b + DRAM_LAT + 2 slots longer
  than the scheme's 2b·Rmax. The scheme does not count the DRAM access time.
* **Ordinals** wrap at 2^ORD_W blocks per queue. A queue may not hold more
  than that many blocks in DRAM.
* **Shorter lookaheads.** `LA` and `MDQF` allow a lookahead below
  Q(b−1)+1, but `NCELLS` is sized only for the full ECQF lookahead. For
  shorter lookaheads the h-SRAM size must be raised by hand. `LA` must be at
  least 1, so the zero-lookahead Most Deficit Queue First case is not
  covered.
* **Reset** is asynchronous and active low. The RR starts full of empty
  requests, and every counter and list starts empty.

## Simulating

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` at the end. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/cfds_pkg.sv tb/dram_model.sv tb/tb_cfds_buffer.sv --top-module tb_cfds_buffer
./obj_dir/Vtb_cfds_buffer
```

| testbench | what it runs |
|---|---|
| `tb_bank_map` | mapping against the field formulas; no two of B/b consecutive blocks share a bank |
| `tb_vmma` | incremental ECQF (and MDQF) against a reference that walks the lookahead |
| `tb_dss` | RR/ORR/DSA against a reference model; bank locks; the bound on overtakes |
| `tb_latency_sr` | exact delay |
| `tb_hsram` | blocks returned out of order, cell order per queue, occupancy |
| `tb_tail_buffer` | block formation, t-SRAM bound, mapping of writes |
| `tb_cfds_buffer` | whole buffer at Q=8, M=16, B=8, b=2 |
| `tb_cfds_full` | whole buffer at the defaults for 40 000 slots |
| `tb_cfds_workloads` | whole buffer at Q=512, M=256, B=32 with b = 1, 2, 8 and 16 side by side (harness `cfds_e2e_run`) |

`tb_cfds_buffer` checks every cell's value, order and exact exit slot. It
also checks that no bank is read twice within B slots and that no error flag
rises. It counts how often each mechanism happened (critical replenish,
empty request, DSA overtake, out-of-order block, t-MMA write) and fails if
one never did. In its second half only two queues of one group receive
traffic, which forces bank contention. `tb_cfds_full` runs the same checks
at the defaults. At 40 000 slots it takes a few seconds in Verilator.
`tb_cfds_workloads` runs the checks for the other block sizes in about half
a minute. It needs `-y tb` so that Verilator finds the harness.
