# SNAP: a sparse neural network inference processor in SystemVerilog

Pruned neural networks have mostly-zero weights, and ReLU makes most
activations zero too. Multiplying the zeros wastes energy, so this processor
keeps weights (W) and input activations (IA) compressed. Each non-zero value
is stored with its channel index. The hard part is then to find, quickly,
which W and which IA carry the same index, because only those pairs multiply.
A second problem follows: the products belong to output activations (OAs)
whose addresses look random, and a naive design would flood the output memory
with read-modify-writes.

The design answers the first problem with an **associative index matcher**.
This is a 32×32 comparator array that compares a window of 32 compressed
weights against a window of 32 compressed activations in one cycle. It
answers the second with a **two-level reduction**:

- Each processing element (PE) sums its products for one OA over all
  channels before anything leaves it. This is the *C-reduce*.
- A per-core reducer then adds together the finished sums of PEs that worked
  on the same OA. This is the *P-reduce*.

Only then does a value travel to the shared output buffer. The PE array can
be wired logically in two ways, *diagonal* and *row*, so that 3×3-style
convolutions, 1×1 convolutions and fully-connected layers all find PEs that
share an OA.

The default configuration has:

- 4 cores;
- 7×3 PEs per core;
- 3 multipliers per PE, so 252 16-bit multipliers in total;
- one 32×32 matcher per PE row.

## Data format

A compressed entry (`entry_t`) is `{idx[11:0], data[15:0]}`. A *window* is
up to 32 consecutive entries of a buffer, given as `{base, len}`. The W
entries of a window and the IA entries of a window must each carry distinct
indices, as in any compressed sparse vector. A pair is formed wherever a W
index equals an IA index.

What the index means is up to whoever lays out the data:

- For a 1×1 convolution or an FC layer it is the input channel.
- For a 3×3 kernel cut into 3×1 column slices, it can encode
  channel × kernel row.

Indices only have to be unique within one window pair. Large channel counts
are therefore handled by chunking and renumbering per chunk.

## Work units: jobs

The host writes *job descriptors* (`job_desc_t`) into the controller. A job
targets one core and names:

- one W window per PE column (3). The window is broadcast down that column's
  7 PEs.
- one IA window per PE (21). In diagonal mode only column 0's entry of each
  row is used, and it is broadcast along the row.
- an OA address (`tag`) per PE.
- a `last` bit per PE, meaning "this job finishes the channel sum for this
  OA".

One OA whose channels span more than 32 non-zeros is computed as a chain of
jobs with the same tag. Only the final job of the chain has `last=1`.

## Inside a core

```
 W buffer (private) ──► W windows   [3 banks][3 cols][32]  ─┐
 IA buffer (shared) ──► IA windows  [7 rows][3 banks][3][32]─┤
                                                             ▼
   per PE row:  matcher 32×32 ──► 3 sequence decoders ──► 3 PEs (3 MULTs each)
                                                             │ final psums
                                                             ▼
                                       core reducer (9 lanes, P-reduce)
                                                             │ 3 writeback ports
                                                             ▼
                                                     OA buffer (shared)
```

### Window loader and banks (`snap_core`)

A core has three banks of window registers. For each job, the loader reads
the W windows from the core's private W buffer and the IA windows from the
shared IA buffer. Both readers run at once, and each read returns 32
consecutive entries, so one read fills one window. A bank is marked full
once all its windows are in. After every PE in the core has taken its search
result out of that bank, the bank is free again. The three banks let the
loader fetch up to two jobs ahead of the compute.

### Associative index matcher (`aim`)

The matcher compares every W entry with every IA entry: 1024 12-bit
comparators, each gated by the valid bits of the two windows. A priority
encoder on each W row returns whether that weight has a partner and which IA
slot holds it. With distinct indices there is at most one partner. The
matcher is combinational.

Each PE row owns one matcher and shares it among its three PEs
(`pe_row`). A search takes one cycle. The scheduler serves PE 0, PE 1 and
PE 2 of the oldest full bank in turn, and a PE is served only when its
sequence decoder has room. Since a PE needs at least one cycle per job, one
matcher per three PEs keeps up as long as jobs have at least three pairs on
average.

### Sequence decoder (`seq_decoder`)

The decoder turns a 32-bit "has a partner" mask into multiplier work. It
holds two jobs: the *head* job being worked on and the *next* one. Each cycle
it takes the three lowest remaining mask bits and sends (W slot, IA slot)
pairs to the three multipliers.

If the head job has fewer than three pairs left, the spare multipliers take
pairs from the next job. Those lanes are flagged `lane_nxt`, because their
products belong to a different OA. The decoder always leaves at least one
pair of the next job for the following cycle, so at most one job ends per
cycle. A job with no pairs at all still takes one cycle, which lets its
`last` flag reach the PE.

A job with *h* pairs, run alone, takes max(1, ⌈h/3⌉) cycles. Back-to-back
jobs pack with no idle multipliers.

### PE and configurable adder tree (`pe`, `cfg_adder_tree`)

The three 16×16 products go through a two-adder tree controlled by two
"break" bits. The tree can produce any of these groupings:

- one sum of all three products;
- 1 + 2 or 2 + 1;
- three separate values.

The break bits mark where head-job lanes end and next-job lanes begin.

The PE keeps a 32-bit accumulator for the head job's OA:

- If the head job ends with `last=1`, the accumulator plus the head group is
  emitted as a final psum with the head job's tag. The accumulator then
  restarts with the next-job group.
- If the head job ends with `last=0`, the next job continues the same OA, so
  both groups are added.

The psum output is a valid/ready port. If the reducer stalls it, the PE stops
taking steps. An assertion checks that a step never arrives while the output
is blocked.

### Core reducer: P-reduce (`core_reducer`)

Every PE belongs to one reduction lane:

- **diagonal mode:** PE (i, j) is in lane i − j + 2, giving 9 lanes of 1 to 3
  PEs. With consecutive pixels on consecutive rows and consecutive kernel
  columns on consecutive PE columns, the PEs on one diagonal produce the same
  output pixel.
- **row mode:** lane = row (7 lanes of 3 PEs). The three PEs of a row work on
  different channel chunks of the same OA.

Each lane holds a small table of 4 entries, each `{addr, sum, count}`. Each
cycle a lane accepts one final psum, from the lowest-numbered waiting PE. The
psum either merges into the entry with the same address or takes a free
entry. An entry is *complete* when its count equals the number of PEs in the
lane, and complete entries leave through 3 writeback ports.

A lane's table can fill up with incomplete entries. This happens when
neighbouring PEs run far apart or the tags do not form diagonals. The lowest-numbered
incomplete entry is then written back early, as a partial value. A `flush`
input writes back every entry that is left.

Early and partial writebacks are always correct, because the OA buffer adds
every write into the stored word. The reduction only saves traffic. The
counters `n_in`, `n_out` and `n_evict` show how much it saved.

## Memories

- **IA buffer (`input_buffer`, shared):** 16384 entries. The 32 banks are
  word-interleaved, and the rotator `input_aligner` puts the 32 bank outputs
  back in window order. Four cores request through a round-robin arbiter. A
  read is granted each cycle, and its data appears the cycle after the grant.
- **W buffers (`input_buffer`, one per core):** 8192 entries each, built the
  same way with a single requester.
- **OA buffer (`oa_buffer`, shared):** 16384 32-bit words in 16 banks
  (address mod 16). It has 12 write ports, 3 per core, and each bank serves
  one write per cycle, chosen round robin. Every write *adds* to the stored
  word. `clr` zeroes the whole buffer in 1024 cycles, one row of 16 words per
  cycle. `n_conflict` counts writes that lost arbitration.
- **Output compressor (`output_compressor`):** the output path for each OA
  drained from the buffer:
  - ReLU;
  - arithmetic right shift by `shift`;
  - saturation to 16 bits;
  - zero values dropped, the rest emitted as `{channel, value}` entries;
  - at the end of each pixel, a `px_done` pulse with the number of non-zeros.

  This is the compressed form the next layer reads.

## Control (`snap_ctrl`)

The host loads the buffers and up to 64 descriptors, sets the pass
parameters, and pulses `start`. The parameters are:

- `mode`;
- `shift`;
- `n_desc`;
- `oa_base`, `n_pix` and `k_ch`: the OA region to drain, laid out channel
  first as `oa_base + pixel·k_ch + channel`.

The controller then runs these steps in order:

1. Clear the OA buffer.
2. Issue the descriptors in order. A descriptor waits until its core can take
   it.
3. Wait until every core is quiet: no window is loading, no bank is waiting,
   no PE is busy, and the reducer holds only incomplete entries.
4. Flush the reducers and wait for the writebacks to land.
5. Drain the OA region through the compressor.
6. Raise `done`.

`busy` is high from start until done.

## Top level (`snap_top`)

`snap_top` wires together the controller, the IA buffer, four W buffers, four
cores, the OA buffer and the compressor. Its host ports are:

- `ia_we/ia_waddr/ia_wdata`;
- `w_we/w_core/w_waddr/w_wdata`;
- `desc_we/desc_waddr/desc_wdata`.

Its result ports are `out_vld/out_entry` and `px_done/px_count`.

For observation it also brings out:

- the number of multipliers busy this cycle, over all cores;
- per-core counts of final psums, writebacks and early evictions;
- OA bank conflicts.

## What follows the published design and what does not

These parts follow it:

- the sizes: 4 cores, 7×3 PEs, 3 multipliers per PE, 16-bit data, and a 32×32
  matcher shared in time by a row of 3 PEs;
- compressed {index, value} storage;
- a priority-encoded match readout feeding a sequence decoder;
- a PE that keeps its psum until the channel sum is done;
- a configurable adder tree for products of different OAs;
- a per-core reducer over diagonal or row lanes;
- shared, banked IA and OA buffers and private W buffers;
- aligned fetch;
- output compression.

These parts are this design's own choices:

- the job descriptor format and the channel-first OA address layout;
- the two-deep decoder queue and its rule for filling spare lanes;
- the reducer's table size, its eviction policy and its flush;
- accumulate-on-write in the OA buffer;
- buffer sizes, bank counts, index width (12 bits) and accumulator width
  (32 bits);
- requantisation by shift and saturate;
- the host ports;
- the sequence of a pass.

How a whole network is tiled into passes is left to software.

Known departures and limits:

- **Fetch bandwidth:** the shared IA buffer serves one 32-entry read per
  cycle for all four cores. When all cores run short jobs, the IA reads limit
  throughput. A job needs 7 IA reads in diagonal mode and 21 in row mode.
  A dense job keeps a PE busy for 11 cycles (32 pairs, 3 per cycle). Four
  cores therefore want 28 reads per 11 cycles of compute, but get only 11.
  In the end-to-end test the mean is about 108 of 252 multipliers busy in
  cycles with work. The published chip reports about 75% utilisation.
- **Timing:** every datapath step is single-cycle, including the 16×16
  multiply with the adder tree and accumulate, and the OA buffer's
  read-add-write. The RTL is functionally complete but not pipelined for high
  clock rates.
- **OA buffer contention:** the published design reports that its two-level
  reduction removes access contention at the output buffer. Here, writes
  from different cores can still hit the same one of the 16 banks in the same
  cycle. The losing write waits one or more cycles, and `n_conflict` counts
  such waits (212 in the end-to-end test). The reduction does cut the number
  of writes, as the per-pass psum and writeback counts show.
- **Output path:** the compressed output leaves through ports. It is not
  written back into the IA buffer by the hardware.
- **Chip-level parts:** SRAM macros, clocking, voltage domains and I/O are not
  modelled. Memories are plain arrays.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a
model written independently in the testbench, has a watchdog, and ends with
`TB_RESULT checks=N failures=M`. The testbenches are:

| testbench | what it checks |
|---|---|
| `tb_aim` | random and directed windows against a nested-loop reference |
| `tb_cfg_adder_tree` | all break patterns against direct sums |
| `tb_seq_decoder` | pair order, next-job filling, job completion, the ⌈h/3⌉ step rate |
| `tb_pe` | psum values and tags against a reference accumulator, back-pressure |
| `tb_pe_row` | search order over banks/PEs, psums of a full PE row |
| `tb_core_reducer` | diagonal and row lanes (no evictions), random tags with evictions, flush; sums per address |
| `tb_input_aligner` | every rotation |
| `tb_input_buffer` | 4-way arbitration, fairness, one-cycle read latency, unaligned windows |
| `tb_oa_buffer` | accumulate, bank conflicts, clear timing, read port |
| `tb_output_compressor` | ReLU, shift, saturation, zero removal, pixel counts |
| `tb_snap_ctrl` | pass sequence, descriptor issue order, drain addresses |
| `tb_snap_core` | a core on random jobs in both modes against a software model |
| `tb_snap_top` | the whole processor at default sizes |
| `tb_snap_density` | a 3×3 convolution tile at 100%, 40% and 10% density, at default sizes |

`tb_snap_top` runs four passes on the full-size design:

- diagonal, dense;
- row mode with a positive bias, so that outputs saturate;
- diagonal with random tags, which forces evictions;
- a single core with dense windows, which makes the adder tree split
  products between two OAs.

It compares every compressed output against a reference computed in the
testbench. It also counts each mechanism and fails if any never happened:

- matcher hits;
- adder-tree splits;
- C-reduce and P-reduce;
- evictions and flushes of pending entries;
- OA bank conflicts and IA arbitration stalls;
- zero removal and saturation;
- both array modes.

`tb_snap_density` runs a 3×3 convolution tile on all four cores at the three
standard benchmark densities. It checks the outputs, and it checks that the
number of multiplies performed equals the number of matching pairs. It also
reports throughput over the compute span, which excludes the buffer clear
and the drain:

| W/IA density | effectual MACs | cycles | MACs/cycle | multipliers busy |
|---|---|---|---|---|
| 100% | 16128 | 156 | 103.4 | 41% |
| 40% | 5808 | 151 | 38.5 | 15% |
| 10% | 1414 | 147 | 9.6 | 3% |

In all three cases the shared IA buffer's one read per cycle sets the pace
(see the fetch bandwidth limit above). At 10% density a 32×32 search finds
only about three pairs, so the multipliers are mostly idle even when the
windows arrive in time.

To simulate with Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -Irtl rtl/snap_pkg.sv \
    $(ls rtl/*.sv | grep -v snap_pkg) tb/tb_snap_top.sv \
    --top-module tb_snap_top -o sim
./obj_dir/sim
```

The package must come first, and only once. Any other testbench works the same way, with
its name in place of `tb_snap_top`. The full-size run compiles in about a
minute and simulates in about 15 seconds. It prints the cycles of each pass,
the count of each mechanism and the mean number of busy multipliers.

## Changing the design

- Sizes and widths live in `rtl/snap_pkg.sv`. `PE_ROWS`, `PE_COLS`,
  `N_MULT` and `N_CORES` are used throughout.
- The lane mapping is `lane_of()` in the package. A different array
  configuration only needs a new mapping there and a mode value.
- The reducer table depth is a parameter of `core_reducer`, set from
  `snap_core`. Deeper tables mean fewer early evictions.
- `FETCH_N` must equal `AIM_N`, so that one buffer read fills one window.
