# Vote branch predictor

No single well-known branch direction predictor is best on every program.
A PC-indexed bimodal table handles branches that strongly lean one way. A
global-history scheme (gshare) catches branches whose direction depends on
recently executed branches. A per-branch history scheme (PAg) handles branches
that repeat their own pattern. This design runs three such predictors side by
side on every conditional branch and lets them vote. The prediction is
*taken* when two or more of them say taken, and *not-taken* otherwise. With
three voters there is never a tie.

The three components cost little because they do not have tables of their own.
All three index one shared **pattern history table (PHT)** of 2-bit saturating
counters. A component is only a way of turning a branch address, plus some
history, into a PHT index. In the default model the state is 8 bits of global
history, 9 bits of path history and a 4096 × 2-bit PHT: 8209 bits in all.

```
              pred_pc
      ┌──────────┼──────────┐
      ▼          ▼          ▼
  component0  component1  component2     (index function + history)
      │idx0       │idx1       │idx2
      └────────►  shared PHT  ◄────────┘  3 read ports, 3 update ports
                 │ctr0 │ctr1 │ctr2         (read one cycle later)
                 ▼     ▼     ▼
                  vote circuit (majority)
                        │
                    resp_taken
```

## The four models

`vote_predictor` has a `CFG` parameter that chooses which three components
fill the slots:

| CFG | components | history state | PHT | total bits |
|-----|------------|---------------|-----|-----------|
| `VOTE1` (default) | bimod, gshare, path-based | 8 (GHR) + 9 (path) | 4096 × 2 | 8209 |
| `VOTE2` | bimod, PAg, path-based | 2048 × 8 (BHT) + 9 | 4096 × 2 | 24585 |
| `VOTE3` | bimod, PAg, gshare | 2048 × 8 + 8 | 4096 × 2 | 24584 |
| `VOTE4` | PAg, gshare, path-based | 2048 × 8 + 8 + 9 | 4096 × 2 | 24593 |

`VOTE1` is the default because it is the cheapest by a factor of three. The
models that include PAg are somewhat more accurate on average. The PHT size is
a parameter (`PHT_ENTRIES`, a power of two). 2K to 16K entries are the range of
interest. At small sizes, three components crowd one table and collide more
often than a two-component scheme would.

## Component index functions

Every component starts from the branch address bits `a = pc[PC_SHIFT +: IDX_W]`,
with `PC_SHIFT = 2` and `IDX_W = log2(PHT_ENTRIES)` (12 by default). A history
narrower than `IDX_W` is zero-extended. A wider one is folded onto `IDX_W`
bits by XOR.

| kind | index | history kept | history update at branch resolution |
|------|-------|--------------|---------------------------------------|
| bimod (`PK_BIMOD`) | `a` | none | none |
| gshare (`PK_GSHARE`) | `a ^ ghr` | 8-bit global history register | shift in the direction |
| PAg (`PK_PAG`) | `a ^ bht[pc[PC_SHIFT +: 11]]` | 2048 × 8-bit branch history table | shift the direction into that branch's entry |
| path-based (`PK_PATH`) | `a ^ path` | 9-bit path register | shift in `next_pc[PC_SHIFT +: 3]` |

The PAg variant XORs the branch's history register with its address, where
the classic PAg concatenates a few address bits. This uses the whole table
instead of a corner of it.

The path register holds 3 address bits from each of the last three branch
destinations. A destination is the target if the branch was taken, and the
fall-through address if not. The 9-bit size is fixed. How those 9 bits are
built is this implementation's choice.

Every component is trained with every resolved branch. Counters move one
step toward the outcome and saturate at 0 and 3. Bit 1 of a counter is its
prediction.

## Interface and timing

```
cycle      t            t+1                       ...   resolve
pred_valid 1
pred_pc    PC
resp_valid              1
resp_*                  taken, comp_taken, idx
upd_valid                                              1
upd_*                                                  PC, taken, next_pc, idx (= resp_idx)
```

- **Lookup.** The lookup is `pred_valid` / `pred_pc`. The response comes
  exactly one cycle later, because the PHT read is synchronous like an SRAM.
  It carries the vote `resp_taken`, the three component directions
  `resp_comp_taken`, and the three PHT indices `resp_idx`. It also carries
  two flags from the vote circuit: `resp_unanimous`, and `resp_outvoted`,
  which marks the components the vote overruled. The predictor takes one
  lookup per cycle.
- **Update.** When the branch resolves, drive `upd_valid` with the branch's
  address, direction and actual next address. Also pass back the `resp_idx`
  it was predicted with. Returning the indices trains exactly the counters
  that made the prediction, even when the histories have moved on because
  other branches resolved in between. Histories are non-speculative: they
  change only on update.
- **Same-cycle lookup and update.** A lookup in the same cycle as an update
  sees the state before the update. A lookup in the next cycle sees the new
  state. If two components' update indices coincide, that counter still moves
  only one step.
- **Reset.** `rst_n` is asynchronous and active low. After reset, the PHT and
  the BHT clear one entry per cycle. `ready` rises after `PHT_ENTRIES` cycles
  (4096 by default). Until then, no lookup or update may be issued; assertions
  in the tables check this. Counters start weakly not-taken (1), and histories
  start at zero.

## Files

| file | contents |
|------|----------|
| `rtl/vp_pkg.sv` | component kinds, model enum, counter type and helpers, slot-to-kind mapping |
| `rtl/vote_predictor.sv` | top: three components, shared PHT, vote circuit, response register |
| `rtl/vp_component.sv` | one component slot; `KIND` selects bimod, gshare, PAg or path-based |
| `rtl/vp_bht.sv` | PAg branch history table |
| `rtl/vp_pht.sv` | shared PHT, 3 read + 3 update ports, initialisation sweep |
| `rtl/vp_vote3.sv` | majority vote with unanimity and outvoted flags |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the model sweep |
| `tb/vp_ref_pkg.sv` | reference model of the whole predictor and a synthetic branch stream |
| `tb/vp_e2e_harness.sv` | parameterised end-to-end driver used by `tb_vote_configs` |

## Verification

Each testbench compares the RTL with an independent model and prints
`TB_RESULT checks=N failures=M`:

- `tb_vp_vote3`: all eight vote patterns.
- `tb_vp_pht`: initialisation length and value. Then random three-port
  lookups and updates on a few entries, so counters saturate and update
  indices coincide.
- `tb_vp_bht`: initialisation, then random updates and reads.
- `tb_vp_component`: the four kinds against models of their index functions
  and histories.
- `tb_vote_predictor`: the top at its default parameters, running 20,000
  branches of a synthetic program. The program has a loop branch, an
  alternating branch, a branch correlated with the previous one, a 90 %
  taken random branch and a never-taken branch. Every response field is
  checked against the model, along with the one-cycle latency and the
  4096-cycle initialisation. The testbench also requires each mechanism to
  occur at least once:
  - a component is outvoted;
  - a vote is unanimous;
  - the vote corrects a wrong component;
  - two components share a PHT entry;
  - a lookup happens in the same cycle as an update;
  - a saturated counter is read;
  - an idle cycle occurs.
- `tb_vote_configs`: the same stream on `VOTE1` to `VOTE4` with 4096 entries,
  and on `VOTE1` with 2048, 8192 and 16384 entries.

The synthetic stream tests the logic. It does not reproduce accuracy figures
measured on real benchmark traces.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vp_pkg.sv tb/vp_ref_pkg.sv tb/tb_vote_predictor.sv \
    --top-module tb_vote_predictor -Mdir obj -o sim && obj/sim
```

Replace the testbench name to run another. The unit testbenches that do not
use the reference model do not need `tb/vp_ref_pkg.sv`. All simulations
finish in well under a second.

## Design choices beyond the basic scheme

The following are decisions of this implementation, not part of the scheme
itself. They are the places to look when adapting the design.

- **Single lookup per cycle with one cycle of latency.** A wide superscalar
  front end that needs several predictions per cycle would replicate the
  lookup ports or predict a whole fetch block. Neither is provided.
- **Non-speculative histories.** Histories change at resolution, not at
  prediction. A deep pipeline would normally update the global and path
  histories speculatively and repair them after a misprediction. That
  repair logic is not included.
- **Other choices:**
  - training all three components on every branch;
  - the weakly-not-taken initial value;
  - the address bits used (`PC_SHIFT = 2`, fixed-width instructions);
  - the BHT index taken from the low address bits;
  - the 3-bit-per-branch path history;
  - the sequential clearing after reset;
  - the unanimity and outvoted flags, which are for statistics and do not
    affect the prediction.
- **Not included.** The design does not contain the processor that issues
  lookups and resolves branches. It also does not contain the meta-table
  combining predictor, which is a different way of choosing between two
  components.
