# BLAST on a banked-DRAM FPGA node

BLAST finds local similarities between two DNA sequences: it looks for short exact matches (k-mers
shared by both sequences, called *hits*) and extends each hit along its diagonal for as long as the
score stays within a drop limit of its best. The work is small per hit but touches a great deal
of memory. So this design does not build a pipeline of comparators. It restates BLAST as a few
passes over two indexed, packed arrays held in DRAM. Each pass is carried out by many small,
identical state machines, and each machine owns one port of a multi-port memory subsystem.

The memory subsystem is the other half of the design. It hides four DDR2 channels of eight banks
behind SRAM-like ports. It interleaves consecutive 4-word blocks across channels and banks, and
schedules requests so that idle banks never wait behind busy ones. It also performs the
*atomic increment* inside the memory controller. With that operation, dozens of state machines
can build a histogram in memory in parallel without locks. That is what makes the index
construction below work at full memory speed.

Everything is SystemVerilog (IEEE 1800-2017), written to be synthesizable. The DRAM storage is an
array inside the channel controller. It stands in for the off-chip DIMM, so on an FPGA it would be
replaced by the DIMM's pins. At the default size, a synthesized netlist holds 2^21 × 128 bits of it.

## The three steps

Inputs are two sequences, A and B. They are packed 2 bits per nucleotide (`S`), 32 symbols per
64-bit word. Symbol `n` of a word sits at bits `[n*S +: S]`.

**Step 1, index A.** Every k-mer of A (k = `K`, 11 by default) gets an entry in *index A*. There
are 4^K entries of two words each, addressed by the k-mer value. An entry points into *array A*, a
packed list of the positions where that k-mer occurs in A. Because the list is packed, each
k-mer's slot must be sized before the list is filled. Hence the four phases below.

**Step 2, index hits by diagonal.** The engine streams B and looks up each k-mer in index A. For
every position `j` in A that holds the same k-mer as position `i` in B, it forms the diagonal
`d = i - j + len_a` and adds the hit `{i, j}` to *index B* / *array B*, keyed by `d`. Index B has
`len_a + len_b` entries, one per diagonal; the `+ len_a` keeps `d` non-negative. Step 2 uses the
same four phases as step 1.

A hit whose predecessor `(i-1, j-1)` is also a hit only continues an exact match already being
recorded, so it is dropped. To detect this without reading A again, array A stores the symbol in
front of each k-mer occurrence. The sequence streamer supplies the symbol in front of the current
B k-mer. The hit is dropped when both exist and are equal.

**Step 3, extend.** Each diagonal of index B is handed to a free step-3 state machine. Diagonals are
independent, so no machine ever waits on another. For each hit, the machine scores symbol pairs
outward from the k-mer: first upstream, then downstream. A match scores +1 and a mismatch −3
(parameters `MATCH`, `MISMATCH`). Each direction stops when the running score falls `x_drop` below
the best seen, or at the end of either sequence. The segment is trimmed to the best point in each
direction. It is reported if `K + best_up + best_down >= min_score`. The report carries its start
in A, start in B, length and score.

## The four phases of an index build

| Phase | Engine phase number (step 1 / 2) | What happens | Circuit |
|---|---|---|---|
| 1 clear | 1 / 5 | every index pair is written with zero | `index_clear`: one address counter per port, port `p` takes pairs `p, p+N, …` |
| 2 histogram | 2 / 6 | for every k-mer (step 1) or hit (step 2), atomic-increment both words of its pair | streamer + a set of state machines |
| 3 pointers | 3 / 7 | running *exclusive* sum of the counts written back into both words | `index_scan`: read counter, FIFO, adder and accumulator, write counter |
| 4 fill | 4 / 8 | atomic-increment word 1 of the pair, which returns the slot; write the entry there | streamer + the same state machines |

After phase 3, word 0 of a pair is its first slot and word 1 its fill pointer. After phase 4, word
1 has advanced to the first slot of the next entry. So `[word0, word1)` is exactly the entry's
list. Step 3 reads it this way, and so can the host. Pointers are entry numbers relative to the
array base. An array-A entry is one word; an array-B entry is two words at
`array_b_base + 2*ptr`.

The fill phase depends on the atomic increment. Two machines filling the same k-mer each get a
different old value back, so they write different slots without any locking. The order of
positions within one list is therefore not fixed. Everything downstream treats a list as a set.

Data formats:

| Structure | Word 0 | Word 1 |
|---|---|---|
| index A / index B pair | first slot (relative) | fill pointer → end of list |
| array A entry (1 word) | `[31:0]` position in A, `[32 +: S]` symbol in front, `[48]` that symbol exists | — |
| array B entry (2 words) | `i`, position in B | `j`, position in A |

## The BLAST engine (`blast_engine`)

The engine is a phase sequencer (`phase` output: 1–4 step 1, 5–8 step 2, 9 step 3, 10 done) that
hands the memory ports to whichever circuit owns the current phase:

- **Phase 1:** `index_clear` drives all N ports.
- **Phases 2 and 4:** port 0 belongs to `seq_streamer`, which reads the sequence two words at a
  time into a shift register. It issues the k-mer at its head, with its position and front
  symbol, as a job. Ports 1 … N−1 each belong to one state machine of the active set (`step1_sm`
  or `step2_sm`). Jobs go to the lowest-numbered idle machine.
- **Phase 3:** `index_scan` runs two lanes. Even pairs are read through port 0 and written
  through port 1; odd pairs are read through port 2 and written through port 3. The engine
  therefore needs at least four ports.
- **Phase 9:** ports 1 … N−1 belong to `step3_sm` machines. A diagonal counter hands out
  diagonals 0 … len_a+len_b−1.

A phase ends when its source is exhausted and every machine and port is idle. The number of hits
recorded in array B is latched from the step-2 scan total and shown on `n_hits`.

`step1_sm` needs one atomic increment per k-mer in phase 2. In phase 4 it needs the increment,
waits for the returned slot, then writes the entry. `step2_sm` reads the index-A pair and then
walks the list one array-A word at a time. For each entry it either drops the hit or does step-1
style work on index B / array B. Each read waits for its result before the next access, so step 2
is latency-bound. The source design reports the same behaviour. `step3_sm` keeps one 2-word block
of each sequence as a cache and reads a new block only when the extension leaves it. Most random
hits stop within the first block.

## The memory subsystem (`mem_subsystem`)

```
 user port 0 ─► mem_vport ─┐                ┌─► chan_sched 0 ─► dram_ctrl 0 (8 banks)
 user port 1 ─► mem_vport ─┤   crossbar:    ├─► chan_sched 1 ─► dram_ctrl 1
     …                     ├── requests by ─┤        …
 user port N-1 ► mem_vport ┘   channel,     └─► chan_sched 3 ─► dram_ctrl 3
                               results back to their port
```

### User port

Each port has the same signals. The `mem_req_t` and `mem_rsp_t` structs in `blast_pkg` carry
them:

| Signal | Width | |
|---|---|---|
| Opcode | 3 | 0 NOP, 1 READ, 2 WRITE, 3 TEST_SET, 4 ATOMIC_INC |
| Addr | 48 | 64-bit-word address |
| Word_mask | 2 | which of the two 64-bit words of Din/Dout take part |
| Din / Dout | 128 | two words; Addr bit 0 is ignored, bit 1 selects the half of the 4-word burst |
| Busy | 1 | the port cannot take a request this cycle |
| Output_ready | 1 | one-cycle pulse: Dout holds the next result |

A request held on the port while Busy is low is taken at the clock edge. Each port queues exactly
one request. Busy is high while that request waits, and drops in the cycle it is issued, so a
port can issue every cycle. Reads, test-and-set and atomic increment return a result: the *old*
value of each masked word. Writes return nothing.

- Test-and-set writes 1 into each masked word that was 0.
- Atomic increment writes old+1.

The controller applies both between the read and write halves of one bank access.

**Ordering.** Results of one port arrive in request order. Different ports are independent.
Atomic accesses take longer than reads, so a port's read issued just after its atomic could
overtake it. To prevent this, a queued request may issue only if its result cannot come back
before the port's previous result.

**Latency.** On an idle system a read issued in cycle *t* has Output_ready in cycle *t*+8; an
atomic has it in *t*+10. With the one cycle of queueing this is 9 cycles from request to data.

### Address map

| Bits | Field |
|---|---|
| 1:0 | word within a 4-word (256-bit) burst block |
| 3:2 | channel |
| 6:4 | bank |
| `ROW_LSB + ROW_BITS - 1` : 7 | row / column inside the bank |
| 47:45 | memory type (local, shared global, …) — carried but not decoded here |

Consecutive blocks fall on consecutive channels, then banks. A stream of 4-word steps therefore
visits all 32 banks before returning to one.

### Channel scheduler (`chan_sched`)

All channels share one round-robin pointer that advances by one port every cycle. Each cycle, a
channel's scheduler scans the ports from that pointer and issues the first request that meets
three conditions:
- it is addressed to this channel;
- it may issue under the ordering rule;
- its bank is idle.

This is the greedy step: requests to busy banks are skipped so other banks stay busy.

Greedy skipping alone can starve a port. So each waiting request counts how many times another
port of its channel was served ahead of it. Once the count reaches `MAX_SKIP` (3), that request
gets priority: the channel issues nothing else until its bank is free. Among several starved
requests the first in round-robin order wins. With many ports starving on one bank, a single port
can therefore still be passed over more than `MAX_SKIP` times. `stat_forced` and `stat_skipped`
pulse per channel on priority grants and on skips.

### DRAM channel (`dram_ctrl`)

A channel issues at most one access per cycle. Each bank is busy for the access time:
- 8 cycles for a read or write: 3 RAS, 3 CAS and 2 data;
- 10 cycles for test-and-set or atomic increment. The write-back reuses the open row and only
  adds its 2 data cycles.

Eight banks of 8 cycles let one channel stream one access per cycle, so four channels give up to
4 accesses per cycle. The storage is one array per channel, `2^(ROW_BITS+4)` entries of 128 bits.
It is updated when the access issues; only the result is delayed. Because a bank serves one
access at a time, nothing can observe the difference. DDR2 commands, refresh and the pins
are not modelled.

Measured with eight ports reading 100 addresses each:

| Stride (words) | Accesses per cycle (of 4) |
|---|---|
| 4 (one block) | 3.21, including start-up and drain |
| 8 | 1.42, since only two channels are used |
| 128 | 0.12, since every access hits one bank |
| random, 200 reads per port | 1.29 |
| random, 200 atomic increments per port | 1.10, each also a write-back |

Random traffic is the weak spot. Each port queues only one request. A request to a busy bank
therefore holds its port. A request that has reached the skip bound holds its whole channel
until its bank frees. The source design's simulations report about two thirds of peak for random
traffic at eight ports; this implementation reaches about one third.

## The top (`blast_bce_top`)

`blast_bce_top` is the engine plus the memory subsystem. While the engine is idle, the host port
is user port 0. The host loads the packed sequences with WRITEs, sets the base addresses, lengths,
`x_drop` and `min_score`, and pulses `start`. During the run, the host port reports Busy. Results
stream out on `res_valid`/`res_ready`/`res` (type `result_t`) in no particular order. `done` rises
at the end and holds until the next `start`. Afterwards the host can read every index and array.

The host chooses the layout. Regions must not overlap:

| Region | Size (words) |
|---|---|
| index A | 2·4^K |
| array A | len_a |
| index B | 2·(len_a + len_b) |
| array B | 2 × number of hits |

Parameters and defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `NPORTS` | 8 | virtual ports (the source design allows 4–16) |
| `K` | 11 | k-mer length |
| `S` | 2 | bits per symbol |
| `MAX_SKIP` | 3 | skip bound of the scheduler |
| `ROW_BITS` | 17 | row bits per bank: 4·8·2^ROW_BITS·4 words = 128 MiB |
| `MATCH` / `MISMATCH` | +1 / −3 | extension scores |

`ROW_BITS = 17` is a simulation size. Real DIMMs of 0.5–2 GB per channel correspond to 21–23.

**Capacity.** With `w` = 8 bytes, the memory needed is about:

- index A: 16·4^K
- array A: 8·len_a
- index B: 16·(len_a+len_b)
- array B: 16·len_a·len_b/4^K (expected hits on random data)

At K = 11, index A alone is 64 MiB, half the default memory. Some example sizes:

| Search | Needs | Default 128 MiB |
|---|---|---|
| 26 M × 26 M nucleotides | ≈ 3.7 GB | needs about 4 GiB (`ROW_BITS = 22`) |
| 300 k query against a 10 M-symbol database piece | ≈ 250 MB | needs `ROW_BITS ≥ 18` |

**Run time.** A run is dominated by phase 3 of step 1 when K is large. It walks all 4^K pairs at
about one cycle per pair. Two neighbouring pairs share one burst block and therefore one bank, so
a single read stream would wait on that bank; the two lanes (even and odd pairs) hide it. A
3000 × 4000 run at K = 11 takes about 5.3 M cycles, 4.2 M of them in that phase.

**Memory efficiency.** Efficiency here is port grants divided by eight ports times the phase's
cycles, with an atomic counted as one access. Measured on the 3000 × 4000 run, against the
source's table:

| Phase | Step 1 built | Step 1 source | Step 2 built | Step 2 source |
|---|---|---|---|---|
| 1 clear | 100.0 % | 100 % | 99.1 % | 100 % |
| 2 histogram | 23.5 % | 88.83 % | 14.1 % | 41.49 % |
| 3 pointers | 50.0 % | 50 % | 49.8 % | 50 % |
| 4 fill | 20.5 % | 72.15 % | 14.1 % | 29.63 % |

Step 3 reaches 11.8 % against the source's 50.59 %. Phases 2 and 4 are held back by the streamer,
which issues one k-mer a cycle, and by each state machine waiting for its read before its next
access. Step 3 reads one sequence word at a time per machine.

## Where this design departs from the source design

- **Index pointers.** They are exclusive prefix sums relative to the array base. The source's
  pseudo-code writes an inclusive running sum of absolute addresses. Both give the same list
  bounds; the exclusive form is what step 3 reads directly.
- **Front symbol in array A.** The symbol in front of each occurrence is stored in the entry so
  that continued hits can be dropped without a sequence read. The source only states the rule:
  record a hit only if the pair before it is not a hit.
- **Extension order.** Step 3 finishes the upstream extension before starting downstream. It
  reports by a score threshold; no e-values are computed.
- **Port width.** Ports are 128 bits, following the port diagram. The prose mentions 256-bit
  accesses, and the source also allows 64- and 256-bit ports; only 128 is built. An access
  occupies its bank for the full burst time, so a 128-bit port is not penalised beyond that.
- **Pointer phase.** It runs as two lanes on four ports, even and odd pairs apart. The source
  describes one read counter and one write counter.
- **Efficiency.** Phases 2 and 4 and step 3 use memory less well than the source reports; see
  the table above.
- **Random-access throughput.** It is about half of what the source design reports; see the
  memory subsystem section. How long a bank stays busy is this design's reading: the full
  8-cycle access latency.
- **Not built.**
  - Port widths of one and four words; only two-word ports exist.
  - The memory-type field of the address.
  - Multiple FPGAs: partitioning a large database across nodes and merging results.
  - The inter-chip links and the embedded processors.

## Files

| File | Contents |
|---|---|
| `rtl/blast_pkg.sv` | widths, address fields, timing, request/response/result structs, opcodes |
| `rtl/blast_bce_top.sv` | top: engine + memory + host port |
| `rtl/blast_engine.sv` | phase sequencer, port routing, job dispatch |
| `rtl/seq_streamer.sv` | sequence reader and k-mer shift register |
| `rtl/index_clear.sv`, `rtl/index_scan.sv` | phases 1 and 3 |
| `rtl/step1_sm.sv`, `rtl/step2_sm.sv`, `rtl/step3_sm.sv` | the three state-machine kinds |
| `rtl/mem_subsystem.sv` | virtual ports, crossbar, schedulers, channels |
| `rtl/mem_vport.sv`, `rtl/chan_sched.sv`, `rtl/dram_ctrl.sv` | their parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_blast_full.sv` | the top at its default parameters, 3000 × 4000 symbols |
| `tb/tb_blast_body.svh`, `tb/tb_util.svh`, `tb/tb_host.svh` | shared testbench code |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. Each also has a
cycle-count watchdog that records a failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/blast_pkg.sv rtl/*.sv tb/tb_blast_bce_top.sv --top-module tb_blast_bce_top
./obj_dir/Vtb_blast_bce_top
```

Substitute any other testbench name. Memory is not cleared at start-up: the engine clears the
indexes it uses, and the testbenches write everything they later read.

What the testbenches check:

- **Unit benches.** Each drives its module against an independent model.
  - `tb_chan_sched` compares every grant with a reference scheduler.
  - `tb_dram_ctrl` checks bank timing and the atomic operations.
  - `tb_mem_vport` checks result order and the ordering rule.
  - `tb_mem_subsystem` runs random traffic on all ports against a shadow memory, plus shared
    atomic counters, idle latency and the stride table above.
  - The phase and state-machine benches check the exact memory contents they produce.
- **`tb_blast_bce_top` and `tb_blast_engine`.** These are end-to-end runs at reduced size:
  - k = 4 and 5;
  - 200 × 300 and 300 × 400 symbols;
  - 8 and 4 ports.

  B contains mutated copies of stretches of A. The benches check:
  - sampled index-A lists;
  - the hit count against a software count of first-of-run matches;
  - every reported segment against a software X-drop extension;
  - that every phase ran.

  They also count these mechanisms and fail if any never happens: skipped requests, forced
  grants, dropped continuation hits, X-drop stops, edge stops and result back-pressure.
- **`tb_blast_full`.** The same checks on the top with every parameter at its default. It takes
  about 5.3 M cycles, roughly half a minute of simulation.
