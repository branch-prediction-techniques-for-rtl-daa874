# Low-power branch prediction front end for a 4-issue VLIW core

A dynamic branch predictor makes a VLIW core faster. It also costs energy, because it is looked
up every time a fetch address is issued, and most fetched code holds no branch. This front end
looks up the predictor only when it is needed. The core already has a decompression buffer:
a small queue that turns compressed, variable-length bundles back into full issue slots. As a
fetched line is written into that queue, a tiny *branch detector* pre-decodes it. Only when the
line holds a branch does the detector switch the predictor on, for that one lookup, with the
branch's address. In every other cycle the predictor stays idle.

The RTL follows a published proposal built on an Lx-style core (4-issue, 32-bit syllables,
stop-bit-terminated bundles). It contains:

- the program counter and next-PC logic;
- the variable-length instruction (decompression) buffer;
- the branch detector and its activation register;
- a configurable predictor with four organisations: BHT, GAs, BTB with 1-bit state, and BTB
  with 2-bit counters.

The instruction cache and the core's back end are not part of the RTL. They appear as ports, and
the testbenches model them behaviourally.

```
            +--------------+   pc_d   +---------+  icache_addr   +-------------------+
  redirect->| next_pc_logic|--------->|program_ |--------------->| instruction cache |
  pred  --->|              |          |counter  |                |   (outside)       |
            +--------------+          +---------+                +-------------------+
                   ^                                                 | icache_line
                   | pred_taken / pred_target                        v
            +----------------+   act_q, br_pc_q   +---------+   +--------------------+
            |branch_predictor|<-------------------| branch_ |<--| instruction_buffer |--> bundle
            | BHT|GAs|BTB1|2 |   dec_target_q     | detector|   | (decompression)    |    to decode
            +----------------+                    +---------+   +--------------------+
                   ^ upd (resolved branches from the back end)         ^ trunc (cut after
                                                                       | predicted-taken bundle)
```

## Instruction format assumed

The branch detector has to recognise branches, so it depends on the instruction encoding. The
source gives no encoding, so this design fixes one in `rtl/lx_fe_pkg.sv`:

| bits  | meaning                                                               |
|-------|-----------------------------------------------------------------------|
| 31    | stop bit: last syllable of its bundle                                  |
| 30:28 | operation class; `3'b111` = branch                                     |
| 22:0  | branch displacement in syllables, signed, relative to the branch syllable |

A bundle is 1 to 4 consecutive syllables. A fetch line is 4 syllables (16 bytes), aligned, and
`PC[3:2]` is a syllable's slot in its line. An all-zero syllable is the NOP that fills unused
issue slots. To use a different encoding, change `is_branch`, `is_stop` and `branch_target` in
the package. Nothing else depends on the encoding.

## How a cycle works

The whole fetch stage is one cycle. The instruction cache is expected to answer in the same
cycle it receives the address (`icache_valid` low means a miss, and fetch then holds).

1. **Fetch.** `icache_addr = pc`. When the cache hits and the buffer has room, the buffer takes
   the line from slot `PC[3:2]` onward: the whole rest of the line, or only what fits. The PC
   advances by the number of syllables taken, so fetch may resume in the middle of a line.
2. **Detect.** In the same cycle the branch detector checks every syllable taken. It needs two
   logic levels: one class compare per syllable, then an OR across the line. Suppose a branch is
   found, its bundle's stop bit is among the syllables taken, and the buffer was not empty. The
   detector then loads its activation register with:
   - the branch PC;
   - the taken target decoded from the displacement;
   - the number of syllables of the line up to the end of the branch's bundle.
3. **Predict.** One cycle later the activation register drives the predictor. This is the only
   kind of cycle in which the predictor is looked up (`stat_pred_access`). If it predicts taken:
   - the PC loads the target;
   - the line being fetched in that cycle (the fall-through line) is dropped;
   - the buffer cuts the syllables behind the branch's bundle, which it received one cycle
     earlier.

   A correctly predicted taken branch therefore costs one fetch bubble. Without prediction it
   costs a back-end redirect.
4. **Issue.** The head of the buffer gives one complete bundle per cycle. The bundle is expanded
   to four slots, with NOPs in the unused slots, and is handed to decode when `bundle_ready` is
   high.

**The empty-buffer case.** When a line arrives at an empty buffer, its first bundle goes straight
to decode in the same cycle (`stat_buf_bypass`). Any branch in that line has then gone past the
detector. So the detector does not activate the predictor for that line (`stat_bd_inhibit`), and
such a branch is fetched as not taken. This effect grows as the buffer gets smaller. With a
one-long-instruction buffer, far more branches are seen while the buffer is empty (see the sweep
below; in the BHT run of `tb_lx_bp_frontend`, three quarters of all detections). This is the trade-off the original study measured: smaller buffers save energy but
predict fewer branches.

**Only the first branch of a line is predicted.** A later branch in the same line is fetched as
not taken.

## The decompression buffer

`instruction_buffer` is a circular queue of `DEPTH*4` syllables, each stored with its own address.

- **Variable-size elements.** Bundles are found by scanning up to four syllables from the head
  for a stop bit. A bundle that straddles two lines waits until its second part has arrived.
- **Partial acceptance.** The buffer takes a line as long as one syllable is free. This is what
  lets a one-entry buffer (4 syllables) work at all. Suppose a 3-syllable bundle straddles a line
  boundary: 2 of its syllables sit in the buffer, and a whole line would no longer fit. With
  whole-line writes the front end would deadlock.
- **Truncation** (`trunc_valid`, `trunc_keep`) applies to the line written in the previous cycle
  only. The front end guarantees that no line is written in that cycle.
- **Flush** on a back-end redirect empties the queue and wins over everything else.
- **Assertions** check the ordering rule and that a cut never reaches past the head.

## Predictor organisations

`branch_predictor` chooses one organisation at elaboration through `KIND`. All four use the same
request, response and update interface. Lookups are combinational in the activation cycle, and
training happens at the next clock edge after `upd.valid`.

| KIND    | module          | organisation | taken when | target from |
|---------|-----------------|--------------|------------|-------------|
| PK_BHT  | `bht_predictor` | 2-bit counters indexed by `PC[2 +: log2 ENTRIES]` | counter ≥ 2 | detector's decoded target |
| PK_GAS  | `gas_predictor` | 2-bit counters indexed by `{PC bits, global history}`; the history is `HIST_W` bits and shifts at resolution | counter ≥ 2 | detector's decoded target |
| PK_BTB1 | `btb_predictor`, `CNT_W=1` | tagged set-associative target buffer, last outcome per entry | hit and last outcome taken | BTB entry |
| PK_BTB2 | `btb_predictor`, `CNT_W=2` | same, with 2-bit counters | hit and counter ≥ 2 | BTB entry |

Notes on the BTBs:

- The BTB takes `ADDR_BITS` bits of the branch address. The low bits choose the set and the rest
  form the tag. A smaller `ADDR_BITS` means a narrower compare, which saves energy, and more
  aliasing. With `ADDR_BITS` equal to the index width there is no tag at all.
- Only taken branches are allocated, with a weakly-taken state. The victim is an invalid way,
  otherwise a per-set round-robin way.
- Counters reset to weakly not taken, and BTB entries reset to invalid.

The direction-only predictors need no target store. They are looked up after the detector has
pre-decoded the branch, so the target is already known.

## Interface of `lx_bp_frontend`

| port | dir | meaning |
|------|-----|---------|
| `icache_addr[31:0]`, `icache_req` | out | fetch address; buffer has room |
| `icache_valid`, `icache_line[127:0]` | in | same-cycle hit and aligned line, slot *i* in bits `32i+31:32i` |
| `bundle_valid`, `bundle_slots[127:0]`, `bundle_len[2:0]`, `bundle_pc[31:0]` | out | decompressed bundle for decode |
| `bundle_ready` | in | decode takes the bundle |
| `redirect_valid`, `redirect_pc` | in | one-cycle redirect on a misprediction: flush and refetch |
| `upd` (`pred_update_t`: valid, pc, taken, target) | in | resolved branch, for training |
| `stat_bd_detect`, `stat_pred_access`, `stat_bd_inhibit`, `stat_pred_taken`, `stat_buf_bypass` | out | one-cycle event strobes for energy and performance counting |

**Contract with the back end.** The back end keeps the address at which execution really
continues. A bundle whose `bundle_pc` differs from that address is on a wrong path. The back end
then raises `redirect_valid` with the right address for one cycle, and ignores bundles until the
right one arrives. No prediction tag travels with the bundles.

**Parameters** (defaults in brackets):

| parameter | meaning |
|-----------|---------|
| `PRED_KIND` [`PK_GAS`] | predictor organisation |
| `PRED_ENTRIES` [256] | predictor entries |
| `GAS_HIST_W` [4] | GAs history bits |
| `BTB_WAYS` [4] | BTB associativity |
| `BTB_ADDR_BITS` [28] | address bits the BTB uses |
| `BUF_DEPTH` [4] | buffer depth in long instructions; a power of two |
| `RESET_PC` [0] | reset address |

The original study evaluated 256-entry predictors and buffer depths of 1, 2, 4 and 8, and found
GAs the best organisation. The default depth of 4 is this design's choice from that range.

Synthesised with the defaults, the front end is about 600 flip-flops plus the buffer store (16 syllables with
their addresses, about 1 kbit). The 256-entry BTB alone is about 14,000 flip-flops, because its tables are written as
register arrays.

## Where this design departs from, or adds to, the source

The source supplies the block structure, the filter idea, the empty-buffer rule, the two-level
detector, the predictor organisations and their size ranges.

The following are this design's own choices:

- the instruction encoding;
- the same-cycle cache interface;
- partial line acceptance;
- truncation of the buffer on a taken prediction and the one-cycle bubble;
- predicting only the first branch of a line;
- the pre-decoded target for BHT and GAs;
- 2-bit counters;
- the GAs history width and its update at resolution time (not speculative);
- BTB allocation and replacement;
- reset values;
- the redirect and update interface to the back end.

The following are not included:

- the power models and energy figures of the study;
- the static not-taken reference predictor it compares against;
- the access-every-cycle variant without the detector;
- the instruction cache;
- the decode and execute pipeline.

Making the predictor organisation a run-time mode was not attempted. It is an elaboration
parameter, as in a design-space exploration.

## Verification

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N
failures=M`. The reference models in the testbenches are written independently of the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_next_pc_logic`, `tb_program_counter` | priority and sequential advance; reset and load |
| `tb_branch_detector` | random lines, entry slots and accepted counts against a slot-by-slot model: detect, inhibit, activation, branch PC, target, keep |
| `tb_instruction_buffer` | random lines against a syllable queue model: bundles, NOP fill, PCs, bypass, partial acceptance, truncation, flush |
| `tb_bht_predictor`, `tb_gas_predictor`, `tb_btb_predictor` | random lookups and updates against reference tables (BTB: 1-bit and 2-bit 2-way with short tags, plus a direct-mapped one with no tag) |
| `tb_branch_predictor` | hand-traced training sequence through all four organisations |
| `tb_lx_bp_frontend` | end to end: BHT/depth 1, GAs/2, BTB1/4, BTB2/8 |
| `tb_lx_bp_frontend_full` | end to end with every parameter at its default, 20,000 bundles |
| `tb_dse_sweep` | 34 configurations of the design space on one program |

The end-to-end tests use `tb/fe_env.sv`. It generates a random program of stop-bit bundles, and
about a quarter of the bundles end in a branch. Each branch has a fixed behaviour: always taken,
never taken, loop-like, alternating or pseudo-random. `fe_env` serves the program as an
instruction cache with random misses, and acts as a back end with random stalls. The back end
executes the correct path, checks every bundle against the program, trains the predictor and
redirects on wrong paths. It also checks that every predictor access comes exactly one cycle
after an uninhibited detection. Each test then requires every mechanism to have occurred: access,
taken prediction, inhibited detection, bypass, full buffer, cache miss, decode stall, redirect,
and a taken branch followed directly by its target.

An excerpt from `tb_dse_sweep` (4000 bundles, same program):

```
config                          cycles  access/100cyc  inhibited  taken_pred  redirects
GAs  entries 256 ... depth 1     7985       5.6          71         352         84
GAs  entries 256 ... depth 2     5359       9.6          16         359         80
GAs  entries 256 ... depth 4     4961      10.9          16         359         78
GAs  entries 256 ... depth 8     5011      11.8          17         365         81
```

In this excerpt, the predictor is on in about 6 to 12 % of cycles. A one-entry buffer inhibits
more detections and is much slower here. The likely reason is that a single entry cannot cover cache-miss
and stall bubbles. That effect depends on this testbench's miss and stall rates.

To run one test with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/lx_fe_pkg.sv \
          tb/tb_lx_bp_frontend_full.sv --top-module tb_lx_bp_frontend_full
./obj_dir/Vtb_lx_bp_frontend_full
```

Replace the testbench name to run another test. Once built, every test runs in seconds. The package must
come first on the command line. `-y rtl -y tb` lets Verilator find the other modules by file name.

## Files

- `rtl/lx_fe_pkg.sv`: types, encoding helpers, the predictor-kind enum and the update struct.
- `rtl/lx_bp_frontend.sv`: the top.
- `rtl/next_pc_logic.sv`, `rtl/program_counter.sv`, `rtl/instruction_buffer.sv`,
  `rtl/branch_detector.sv`, `rtl/branch_predictor.sv`, `rtl/bht_predictor.sv`,
  `rtl/gas_predictor.sv`, `rtl/btb_predictor.sv`: the blocks.
- `tb/fe_env.sv`, `tb/fe_run.sv`: test environment and sweep wrapper, not synthesisable.
