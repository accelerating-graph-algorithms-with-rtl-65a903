# Systolic array priority queue co-processor

Graph searches such as Dijkstra's shortest-path algorithm spend most of their
time in a priority queue. Each step takes out the vertex with the smallest
tentative distance and puts its neighbours back in. A binary heap in software
costs O(log n) per operation. It also makes many memory accesses per
operation, because the heap lives in RAM.

This design moves the queue into hardware. It is a linear array of N
identical processing elements (PEs). Each PE holds one queue element in
registers and talks only to its two neighbours. The array is always sorted,
and the smallest element sits in PE1. Both operations cost a constant 3 clock
cycles, however full the queue is:

- INSERT puts a new element in the queue.
- EXTRACT-MIN removes and returns the smallest element.

A host processor drives the queue as a co-processor through a 32-bit Avalon-MM
slave port.

Each queue element has two parts:

- a 32-bit **ID**, typically a vertex number or a pointer to the element's data;
- a 32-bit **priority**. It is compared unsigned, and the smallest value
  leaves first.

The default size is N = 200 elements. That is the size of the FPGA prototype
this architecture was published with.

```
            host (e.g. a soft CPU running Dijkstra)
                          |  Avalon-MM, 32 bit
              +-----------v-----------------------------------------+
              | pq_coprocessor                                      |
              |  +--------------+   cmd/res    +------------------+ |
              |  | pq_avalon_if |------------->| sapq             | |
              |  | (registers,  |<-------------|  PE1-PE2-...-PEN | |
              |  |  stalls)     |   status     +------------------+ |
              +-----------------------------------------------------+
```

## How the array keeps itself sorted

Only PE1 receives commands. An operation does its work at PE1 and then
ripples to the right, one PE per clock cycle. Each PE registers what it passes
on, so no signal reaches further than the next PE. There is no broadcast bus
and no global control: the array can be made as long as the logic allows.

An operation travels as one of three "waves" (`op_e` in `sapq_pkg`):

| wave arriving at a PE | PE empty | PE occupied |
|---|---|---|
| `INSERT x` | store x; the wave ends | if x.prio < held.prio: store x and send the old element on as `SHIFT`. Otherwise send x on as `INSERT` |
| `SHIFT y` | store y; the wave ends | store y and send the old element on as `SHIFT` |
| `EXTRACT` | nothing | copy the right neighbour's element. If that element was occupied, send `EXTRACT` on |

`INSERT` runs an insertion sort step by step. The new element moves right
until it meets a larger priority. From that point on, everything behind it
must move one place right. That is the job of `SHIFT`, which moves elements
without comparing them.

Keeping `SHIFT` separate from `INSERT` matters for equal priorities. A
displaced element has to land directly behind the element that displaced it.
If it were compared again, it could pass later elements of the same priority
and reverse their order. With the rules above, **elements of equal priority
leave in the order they were inserted**.

For `EXTRACT-MIN`, the controller reads PE1's element. Then the `EXTRACT`
wave pulls every element one place left.

**Why overlapping waves are safe.** A new operation enters PE1 only every 3
cycles, so every wave stays at least 3 PEs behind the wave before it. Take a
wave at PE i that reads its right neighbour (PE i+1). The earlier wave
finished with PE i+1 at least two cycles before. So the wave never reads a
value that an earlier, unfinished wave is still changing. For the same reason,
PE1 always holds the true minimum when the next command arrives, even while
older waves are still moving further down the array. Any spacing of two or
more cycles would be correct. The 3-cycle spacing follows from the pipeline
stages described in the next section.

The array keeps its elements packed towards PE1: a queue of k elements
occupies PE1 to PEk once all waves have finished. An assertion in `sapq`
checks that PE1 is occupied exactly when the count is non-zero.

**Cascading.** The link between the last PE of one chain and the first PE of
the next is the same as the link between any two PEs. `sapq_array` is such a
chain with both ends exposed. Two chains connect end to end, and the result
behaves exactly like one longer chain:

- the first chain's `r_op`/`r_elem` drive the second chain's `l_op`/`l_elem`;
- the second chain's `held` drives the first chain's `r_held`.

This allows a queue larger than one device, with only neighbour-to-neighbour
wiring between devices. `sapq` itself uses a single chain and ties its far
end empty.

## Operation timing (`sapq`)

Commands use a valid/ready handshake:

| cycle | what happens |
|---|---|
| A | `cmd_valid && cmd_ready`: the command is registered; `cmd_ready` drops |
| A+1 | the command acts on PE1; an EXTRACT-MIN samples PE1's element; `count` updates |
| A+2 | `done` pulses; `res` holds the extracted element |
| A+3 | `cmd_ready` is high again; the next command can be accepted |

That gives one 64-bit operation every 3 cycles. At the clock rates reported
for the original FPGA implementation, this is 5.12 Gbit/s at 240 MHz and
3.73 Gbit/s at 175 MHz. The wave itself reaches PEN about N cycles later,
hidden behind the following operations.

**Edge cases:**

- **Empty queue.** EXTRACT-MIN on an empty queue returns `res.valid = 0`.
- **Full queue.** INSERT into a full queue (count = N) is still carried out.
  Of the N+1 elements, the one with the largest priority is pushed out of PEN.
  It appears on `drop_valid`/`drop_elem` when the wave gets there, and `count`
  stays at N.
- **Reset.** `rst_n` is synchronous and active-low, and it empties every PE.

## The host's view (`pq_avalon_if`, `pq_coprocessor`)

The bus is 32 bits wide and an element is 64 bits. So an element is written in
two words, then issued with a command write, and read back in two words:

| addr | write | read |
|---|---|---|
| 0 | ID of the next INSERT | ID of the last EXTRACT-MIN |
| 1 | priority of the next INSERT | priority of the last EXTRACT-MIN |
| 2 | bit0 INSERT, bit1 EXTRACT-MIN (bit0 wins), bit2 clear overflow | bit0 empty, bit1 full, bit2 overflow (sticky), bit3 last EXTRACT-MIN returned an element |
| 3 | – | number of elements in the queue |

Reads have zero latency. Flow control uses `avs_waitrequest`:

- A command write waits while the queue is busy with the previous operation.
- Any read waits until the operation in progress has finished.

So whatever the host reads already includes every command it has issued. A
read issued right after a command gets 2 wait states, which is the 3-cycle
operation time. Writes to the ID and priority registers never wait. The
queue captures the staged values when it accepts the command, so the host can
prepare the next element at once.

Typical sequences:

```
INSERT:       write 0 <- id;  write 1 <- prio;  write 2 <- 1
EXTRACT-MIN:  write 2 <- 2;   read 1 -> prio;   read 0 -> id;  (read 2: bit3 = found)
```

`sapq`'s `done` output and the dropped element itself are not used by the
bus interface. The host sees an overflow only through the sticky status bit.

### Dijkstra without DECREASE-KEY

The queue has no DECREASE-KEY operation, which would mean finding and changing
an element already in the queue. The host runs Dijkstra's algorithm in a form
that does not need one:

1. When a vertex's distance improves, the host INSERTs the vertex again with
   the new distance.
2. When the host extracts an entry whose priority no longer equals that
   vertex's current distance, the entry is stale. The host discards it and
   extracts again.

The queue then holds more entries than vertices: up to |E|+1 in the worst
case. This is cheap, because the operation time does not depend on how full
the queue is. The end-to-end testbench runs exactly this loop over the bus.

If the host needs EXTRACT-MAX instead, it can store transformed priorities,
for example `~prio`.

## Files

| file | contents |
|---|---|
| `rtl/sapq_pkg.sv` | element struct, wave encoding, register map, `OP_CYCLES = 3` |
| `rtl/sapq_pe.sv` | one processing element (about 130 flip-flops, one 32-bit comparator) |
| `rtl/sapq_array.sv` | a chain of N PEs with both ends brought out (cascadable) |
| `rtl/sapq.sv` | command pipeline, count/empty/full, overflow output around one chain |
| `rtl/pq_avalon_if.sv` | Avalon-MM slave: staging registers, command decode, stalls, status |
| `rtl/pq_coprocessor.sv` | top: interface unit + queue, Avalon slave port only |
| `tb/tb_sapq_pe.sv` | one PE against a model of the table above, directed and random |
| `tb/tb_sapq_array.sv` | two cascaded 4-PE chains against a reference queue, operations 2 to 4 cycles apart |
| `tb/tb_sapq.sv` | an 8-PE array against a reference queue; back-to-back random commands, ties, overflow drops, empty extracts, exact cycle timing |
| `tb/tb_pq_avalon_if.sv` | the interface unit with the queue side modelled; decode, stalls, register map, overflow flag |
| `tb/tb_pq_coprocessor.sv` | full-size end-to-end test, see below |

At N = 200, the whole co-processor synthesizes to about 27,000 flip-flops. The
cost is roughly 135 flip-flops and one comparator per element, which is the
price of keeping every element in registers. Memory-based software queues do
not pay it.

## Simulating

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog that fails the
run if it hangs. With Verilator 5:

```
verilator --binary --timing --assert rtl/sapq_pkg.sv rtl/sapq_pe.sv rtl/sapq_array.sv rtl/sapq.sv \
          rtl/pq_avalon_if.sv rtl/pq_coprocessor.sv tb/tb_pq_coprocessor.sv \
          --top-module tb_pq_coprocessor -o sim && ./obj_dir/sim
```

Swap in a different testbench file and `--top-module` to run the others.
`tb_sapq_pe` needs only the package and `sapq_pe.sv`; `tb_sapq_array` adds
`sapq_array.sv`; `tb_sapq` adds `sapq.sv` to those. `tb_pq_avalon_if` needs
only the package and `pq_avalon_if.sv`. The end-to-end run builds in about
20 s and simulates in under a second.

`tb_pq_coprocessor` uses the default N = 200 and plays the host:

1. **Worst case.** It fills the queue with 200 random priorities and then
   extracts all 200 from the full queue, checking the order against a
   reference queue. These are the worst-case INSERT and EXTRACT-MIN situations
   used to benchmark this architecture.
2. **Limits.** It inserts into the full queue (the overflow flag must rise and
   the largest element must be lost). It also extracts from the empty queue.
3. **Dijkstra.** It runs the DECREASE-KEY-free Dijkstra loop on randomly
   generated 64-vertex graphs (about 250 edges) from several sources. The
   distances are compared with a plain O(V²) Dijkstra. Queue occupancy peaks
   at about 45 entries.

Every INSERT and EXTRACT-MIN is checked to complete in 3 cycles. The test
counts bus stalls, overflows, empty extracts, stale entries and inserts of
equal priority, and it fails if any of these never occurred.

To change the size, set `N` on `pq_coprocessor` (or `sapq`). The element widths
are `ID_W` and `PRIO_W` in `sapq_pkg`.

## Relation to the published architecture, and limits

Taken from the published architecture:

- the linear array of identical, neighbour-connected PEs with one element each;
- PE1 as the only port;
- INSERT and EXTRACT-MIN in 3 cycles each;
- 32-bit IDs and priorities;
- N = 200;
- no DECREASE-KEY;
- the split into an Avalon interface unit and the queue;
- the 32-bit bus.

The published description gives the PE's role but not its circuit. These
parts are this implementation's own:

- the INSERT/SHIFT/EXTRACT wave rules;
- how the 3 cycles are split into stages;
- the valid/ready handshake;
- the rule that equal priorities leave in arrival order;
- the overflow behaviour;
- reset;
- the register map and stall rules of the bus interface.

Not included:

- the host processor and the Avalon interconnect fabric, which are vendor
  components;
- a board-level link for cascading across devices. The chains can be
  cascaded (see above), but the top exposes only one chain and its controller.

A 64-bit system bus would let the host write an element in one transfer.
Only the 32-bit interface is provided.
