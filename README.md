# Circuit-switched Clos network with guaranteed-bandwidth arbiters

This RTL connects 16 processing elements of a multiprocessor system-on-chip
through a three-stage Clos network. Traffic is **circuit switched**. A source
first sets up a dedicated path to its destination. It then streams data over
that path at one word per cycle, with nothing dropped and nothing reordered.
Paths are chosen while the network runs (*dynamic path setup*), so any runtime
permutation of sources to destinations can be served.

When several circuits want the same switch output, a **programmable arbiter**
decides who goes first. Its main scheme is *guaranteed bandwidth* (GBW). Each
input has a programmable priority. The input that wins gives up one step of
priority. So every input that keeps asking is eventually served, and the
programmed priorities set how often each one is served. The arbiter can also
be switched to fixed priority or round robin.

Everything is synthesizable SystemVerilog-2017, with no vendor primitives.

## Topology: f(4,4,4)

```
 sources         stage 0            stage 1 (middle)      stage 2           destinations
 0000..0011 ->  switch 0  --\   /-- switch 0 --\   /--  switch 0  -> 0000..0011
 0100..0111 ->  switch 1  ---\ /--- switch 1 ---\ /---  switch 1  -> 0100..0111
 1000..1011 ->  switch 2  ---/ \--- switch 2 ---/ \---  switch 2  -> 1000..1011
 1100..1111 ->  switch 3  --/   \-- switch 3 --/   \--  switch 3  -> 1100..1111
```

There are twelve identical 4x4 switches.

- Output `p` of first-stage switch `i` feeds input `i` of middle switch `p`.
- Output `j` of middle switch `p` feeds input `p` of third-stage switch `j`.
- Ports on both sides are numbered `{switch, port}`. So destination `0110` is
  port 2 of third-stage switch 1.

The parameters `P`, `Q` and `R` of `clos_network` give the Clos triple
f(p,q,r):

- `Q` inputs on each of `R` first-stage switches;
- `P` middle switches.

All three must be powers of two. The default is 4, 4, 4.

Each stage routes a probe differently:

| stage  | how an input picks its output |
|--------|-------------------------------|
| first  | **any free output**: the lowest-numbered free one. Every middle switch reaches every destination, so this is where the path is chosen at run time. |
| middle | destination bits [3:2]: the number of the third-stage switch |
| third  | destination bits [1:0]: the port number |

## Setting up and using a circuit

Each link has three parts:

- a forward request line `req`;
- a forward 8-bit data bus;
- a backward answer line `ans`.

At the network edge these are `in_req/in_data/in_ans` for the sources and
`out_req/out_data/out_ans` for the destinations.

1. **Probe.** The source raises `in_req` and puts a probe on `in_data`.
   The probe's bits [3:0] are the destination port; bits [7:4] are free.
   Probes use the data wires, so they need no wires of their own. The source
   keeps the probe on the bus until it is answered.
2. **Path setup, stage by stage.** In each switch the input control (IC)
   reads the probe, checks which outputs are free, and asks the arbiter for
   one. The arbiter seizes an output for the winner. The request and probe
   then go on to the next stage. A probe that finds its output taken waits
   there. It keeps every link it already holds: this is *pipelined circuit
   switching*.
3. **Answer.** The destination raises `out_ans`. Each switch routes the
   answer back to the input that owns the circuit, and the source sees
   `in_ans` go high.
4. **Data.** The source sends one word per cycle. Words arrive 3 cycles
   later, in order.
5. **Teardown.** The source drops `in_req` for at least one cycle. Each
   switch frees the output as the low request passes.

A circuit never deadlocks. A waiting probe waits only for a link further
downstream, and the last links are freed by destinations that always answer.

Timing with no contention, measured from the cycle `in_req` rises. The
destination answers one cycle after it sees its request.

| event | cycle |
|-------|-------|
| probe granted in first stage | 0 |
| `out_req` and probe at the destination | 6 (2 per stage) |
| `in_ans` at the source | 10 |
| data word sent in cycle t appears on `out_data` | t + 3 |

## Guaranteed-bandwidth arbitration

Every switch output has its own arbiter (`gbw_arbiter`). That makes 48 in
the network. Each arbiter chooses among the four inputs of its switch.

```
 master_number, priority_value, write ─┐
 arbitrate ──────────────────> [mux + decrementer] ──addr/data/we──> [priority table, 4 x 4 bit]
                 current master ───^                                        │
                                                   request vector ──> [bitwise AND]
                                                                            │
                                         current master <── [parallel comparator]
```

- **Priority table.** There is one 4-bit priority per input.
- **Masking.** The table is ANDed bit by bit with the request vector.
- **Parallel comparator.** It compares every pair of entries at once. It
  returns the requesting input with the highest value, called the *current
  master*. On a tie the lower input number wins.
- **Arbitrate.** It is high while the output is free. In that cycle the
  current master is granted and the output is seized for it.
- **Mux and decrementer.** The table has one write port.
  - During programming it loads `priority_value` into entry
    `master_number`. No grant is given while a write is in progress.
  - After a grant it writes the current master's priority back, minus one.

The priority drops once per circuit granted, not once per cycle of a circuit.

**Worked example.** Priorities a, c, 6, 8 for inputs 0..3, all requesting
without a break:

| grant | 1 | 1 | 0 | 1 | 0 | 1 | 0 | 1 | 3 | ... |
|-------|---|---|---|---|---|---|---|---|---|-----|
| table after | a b 6 8 | a a 6 8 | 9 a 6 8 | 9 9 6 8 | 8 9 6 8 | 8 8 6 8 | 7 8 6 8 | 7 7 6 8 | 7 7 6 7 | |

The highest input sinks until it meets the next highest. From then on they
alternate, and lower ones join as the top values come down.

**Refill.** A requesting input with priority 0 can still win when nothing
higher is asking. Every arbiter keeps a shadow copy of the programmed
priorities. If the winner's priority is already 0, the whole table is
reloaded from that copy instead of being decremented. Without this, inputs
that had all reached 0 would be served in fixed order, and the low numbers
would starve the high ones. Over one refill period each input is served
about (programmed priority + 1) times. That share is the bandwidth the scheme
guarantees.

**Other schemes.** The `scheme` input is shared by all arbiters.

| value | scheme | behaviour |
|-------|--------|-----------|
| 0 | GBW | as above |
| 1 | fixed priority | the programmed priorities decide; they never change |
| 2 | round robin | the first requester after the last granted input |

**Programming.** While `program_priorities` is high, one table entry is
written per cycle.

- `arbiter_addr = {stage[1:0], switch[1:0], port[1:0]}`, with stage 0..2.
- `master_number` is the switch input.
- `priority_value` is the new priority.

Both the working table and its shadow copy are written. After reset all
priorities are 0, so an unprogrammed arbiter serves by lowest input number.

## Inside a switch

`clos_switch` has a control part and a data part.

**Input controls** (`input_control`, one per input). Each has three states:
idle, waiting and connected. An input asks only for an output that the
status bus shows free. A request that is not granted is retried every cycle.
The destination field is latched from the probe in the first cycle.

**Output controls** (`output_control`, one per output). Each holds a busy
bit and an owner. It forwards the owner's request, registered. It routes the
answer from the next stage back to the owner. It frees itself on the clock
edge where the owner's request is low, the same edge on which the input
control releases.

**Switch arbiter** (`switch_arbiter`). It holds one `gbw_arbiter` per
output and links them to the four buses:

| bus | from → to | carries |
|-----|-----------|---------|
| request | ICs → arbiter | valid bit and wanted output of each input |
| grant | arbiter → ICs | "you have it", plus the answer routed back |
| control | arbiter → OCs | seize this output for this input |
| status | OCs → ICs and arbiter | busy bits |

**Crossbar** (`crossbar`). There is one multiplexer per output, and its
output is registered. This is the one pipeline register per stage on the
data path.

## Files

| file | contents |
|------|----------|
| `rtl/clos_pkg.sv` | sizes, scheme and routing-mode enums, IC states |
| `rtl/clos_network.sv` | top: the f(P,Q,R) network and its programming decode |
| `rtl/clos_switch.sv` | one switch |
| `rtl/input_control.sv`, `rtl/output_control.sv` | IC and OC |
| `rtl/switch_arbiter.sv` | per-output arbiters and bus decoding |
| `rtl/gbw_arbiter.sv` | programmable GBW / fixed / round-robin arbiter |
| `rtl/parallel_comparator.sv` | all-pairs maximum finder |
| `rtl/crossbar.sv` | registered multiplexers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fig4_example.sv` | the four-sources-to-one-destination example with its original data values |

After coarse synthesis the full network has about 8,600 word-level cells and
2,464 flip-flops. It uses no memories.

## Simulating

Every testbench checks itself. Each prints one line
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if
something hangs. For example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl \
  rtl/clos_pkg.sv rtl/parallel_comparator.sv rtl/gbw_arbiter.sv \
  rtl/input_control.sv rtl/output_control.sv rtl/crossbar.sv \
  rtl/switch_arbiter.sv rtl/clos_switch.sv rtl/clos_network.sv \
  tb/tb_clos_network.sv --top-module tb_clos_network -o sim
./obj_dir/sim
```

For a unit test, list the package, the module and whatever it instantiates,
then swap the testbench and `--top-module`.

What the tests cover:

- **`tb_clos_network`** runs at default parameters. It programs all 48
  arbiters with a, c, 6, 8. It then checks:
  - the 6-cycle probe latency, the 10-cycle answer latency and the 3-cycle
    data latency;
  - four sources of switch 0 all sent to destination 0;
  - twelve circuits in a row from one source, which must refill a
    priority table;
  - 576 random circuits, 192 under each scheme.

  Every payload word is checked for destination, order, completeness and
  latency. The test counts programming writes, contention, blocked probes,
  table refills and use of each middle switch. It fails if any of these
  never happens.
- **`tb_fig4_example`** gives input port m of switch s the data word
  8'ha0 + 4m + s. Sources 0..3 each send their word to destination 0. The
  words must arrive as a4, a0, a8, ac:
  - the first stage spreads the four probes over the four middle switches,
    in the order 1, 0, 3, 2;
  - the third-stage arbiter then serves them by priority.
- **`tb_clos_switch`** checks one switch's latencies, a full permutation with
  no waiting, and the service order 1, 0, 3, 2 for four inputs contending
  for one output.
- The **unit testbenches** compare each block cycle by cycle with a
  reference model under random stimulus. `tb_gbw_arbiter` also checks the
  hand-worked grant sequence above.

## What follows the original description and what was chosen here

**Taken from the original design:**

- the f(4,4,4) Clos topology and its port numbering;
- the switch made of input controls, output controls, arbiter and crossbar,
  with request, grant, control and status buses;
- probes sent over the data path;
- pipelined circuit switching with dynamic path setup;
- the GBW arbiter's structure: priority table, mux and decrementer, masking
  with the request vector, parallel comparator, current-master feedback,
  and decrement of the winner;
- a programmable arbiter that supports several schemes;
- the widths: 8-bit data, 4-bit priorities, a 6-bit arbiter address, a 2-bit
  master number;
- the example priorities a, c, 6, 8.

**Chosen in this implementation**, where the original is silent:

- the request/answer handshake, the probe format and all latencies;
- the first stage taking the lowest-numbered free output;
- one arbiter per switch output, and the `{stage, switch, port}` address
  layout;
- lowest-number-wins on ties;
- refilling the table from a shadow copy when the winner is already at 0;
- one `scheme` input for the whole network, not one per arbiter;
- synchronous active-low reset, with all priorities cleared.

**Limits to be aware of:**

- The first stage does not look ahead. A probe can take a middle switch
  whose link to the destination's switch is busy, and then wait there while
  another middle switch was free. There is no backtracking and no
  rearrangement of existing circuits.
- A blocked probe holds its upstream links while it waits.
- Priorities are per switch output. A circuit crossing three switches is
  arbitrated, and decremented, up to three times.
