# Path-based neural branch predictor with modulo path-history and bias-based filtering

A perceptron-style branch predictor predicts a conditional branch from the sign of a
dot product. The weight vector `w_0 .. w_h` is multiplied by the recent global branch
outcomes `x_1 .. x_h`, each taken as +1 for taken and −1 for not taken:

    y = w_0 + Σ_{i=1..h} w_i · x_i        predict taken  ⇔  y ≥ 0

The *path-based* variant picks each weight `w_i` with the address of the branch `i`
positions back in the path, not with the current branch's address. That choice lets the
dot product be built up ahead of time: each time a branch is seen, its weights are added
into partial sums for the branches that follow it. Only the last weight and the final
addition are then left on the critical path. The price is a pipeline as deep as the
history. With `h` stages you get `h` separately indexed SRAM arrays, `h` row decoders,
`h` inter-stage latches, and `h` partial sums to checkpoint for every branch in flight.

This RTL implements two changes that cut that cost without hurting accuracy:

* **Modulo path-history.** Weight `w_i` is selected by the branch `(i mod P)`
  positions back, with `P < h`. Only the last `P` branch addresses matter, so the
  pipeline has `P` stages and the `h` weights fit in `P` tables. Each row of a table
  holds the `⌈h/P⌉` weights that the same address selects. The outcome history stays
  `h` long.
* **Bias-based filtering (BBF).** The bias weights `w_0` sit in a separate, larger
  table of 5-bit weights, indexed gshare-style by the branch address XOR the global
  history. A saturated bias weight (+15 or −16) marks a strongly biased branch. For such
  a branch the bias sign alone is the prediction, and when that prediction is correct
  the whole update phase is skipped. This saves the write energy of `h + 1` weights.

The defaults are the 32 KB configuration: history `h = 42`, path `P = 3` (three weight
tables plus the bias table, instead of 43 arrays), 16K bias weights, and 14 eight-bit
weights per row.

## How the weights are interleaved

Number the tables `t = 1 .. P`. Weight `w_i` lives in table `t = ((i−1) mod P) + 1`,
in slot `m = (i − t) / P`:

| table | slots 0, 1, 2, … hold | row selected by |
|-------|-----------------------|-----------------|
| t = 1 | w_1, w_4, w_7, … w_40 | address of the branch 1 back |
| t = 2 | w_2, w_5, w_8, … w_41 | address of the branch 2 back |
| t = 3 = P | w_3, w_6, w_9, … w_42 | address of the branch being predicted |

(The table shows `h = 42`, `P = 3`.) When `h` is not a multiple of `P`, the last slot of
some tables is unused. It is masked off in the sums and never trained.

The rows are read when a branch `b` is fetched, at `b`'s own address:

* The row of table `t < P` serves branch `b + t`. Its slot 0 (`w_t`) multiplies `x_t` of
  that later branch, which is the outcome of `b` itself. Its slot `m ≥ 1` multiplies the
  outcome of the branch `mP` before `b`, which is already in the history. That row's
  contribution can therefore be computed as soon as `b` has been predicted. It is added
  to the partial sum of branch `b + t`.
* The row of table `P` serves `b` itself. Slot `m` multiplies the outcome of the branch
  `(m+1)P` before `b`. It is summed in the same cycle as the prediction, together with
  the bias weight and the partial sum that has arrived for `b`.

## The partial-sum pipeline

`pbnp_sum_pipeline` holds `P − 1` partial sums. `S[d]` is what has been gathered for the
branch `d` positions after the last predicted one. For each predicted branch:

    y       = bias + S[1] + c_own                 (c_own: table-P row · history)
    S'[d]   = S[d+1] + c_d(pred),   S'[P−1] = c_{P−1}(pred)

`c_d(pred)` is table `d`'s row times the history, with slot 0 signed by the prediction.
The same logic also forms the sums for the *opposite* direction, `alt_sums`. These go
into the branch's checkpoint, so recovery only has to load them back, with nothing to
recompute.

## Timing of a lookup

| cycle | what happens |
|-------|--------------|
| 1 | `lk_valid && lk_ready`. All `P` weight tables are read at `lk_pc[10:2]`. The bias table is read at `lk_pc[15:2] ^ ghr[13:0]`. The bias index already includes the prediction being made in the same cycle for the previous branch (forwarded). |
| 2 | `pr_valid`. The `P` row sums, the final adder, the filter decision and the pipeline shift run. The branch gets checkpoint tag `pr_tag`. `pr_sum` is `y`. |

One branch per cycle can be looked up. `lk_ready` is low:
* while the tables are being cleared after reset (`max(ROWS, BIAS_ENTRIES)` cycles,
  16384 by default, until `init_done`);
* while the checkpoint table is full, counting the branch in cycle 2;
* in the cycle of a training read;
* in a recovery cycle.

## Checkpoints and recovery

`pbnp_checkpoint_table` is a circular buffer of 32 entries, one for each branch in
flight. The entry number is the tag. An entry (133 bits at the defaults) holds:
* the opposite-direction partial sums (2 × 16 bits);
* the 42-bit history before the branch;
* the row indices of the branch and of its `P − 1` predecessors;
* the bias index, `y`, the prediction and the filter flag.

With `P` stages there are only `P − 1` partial sums to save, not `h`.

On a misprediction the processor asserts `rc_valid` with the tag and the real direction.
In that cycle the predictor:
* loads the partial sums from the entry;
* rebuilds the history as the saved history plus the real outcome;
* rebuilds the path as the branch plus its own predecessors;
* drops every younger entry, and any branch in cycle 2;
* ignores a lookup presented in that cycle.

Assertions check that `rc_taken` differs from the stored prediction. They also check that
a branch is never recovered in the cycle it commits.

## Update phase and where BBF saves work

Branches commit in program order with `up_valid`/`up_taken`. `up_ready` is low when
nothing is in flight. `pbnp_bbf` decides whether a branch is trained:

| branch at prediction | trained when |
|----------------------|--------------|
| filtered (bias saturated) | it mispredicted; a correct one skips the update entirely |
| not filtered | it mispredicted, or `|y| ≤ θ`, with θ = ⌊2.14(h+1)+20.58⌋ = 112 |

Training (`pbnp_update_unit`) is a read-modify-write:
* **Cycle 1:** the rows the branch used are read through the tables' only read port.
  These are table `t < P` at the index of the branch `t` back, table `P` at the branch's
  own index, and the bias entry. Lookups stall in this cycle.
* **Cycle 2:** every `w_i` moves one step towards agreement: +1 if `x_i` equals the
  outcome, −1 otherwise. The bias moves one step towards the outcome. Everything
  saturates, and all rows are written through the write port. `up_ready` is low.

A branch that is not trained retires in one cycle and touches no table. The activity
counters give the numbers BBF is meant to reduce:
* `cnt_trained`;
* `cnt_weights_written`, which is `h + 1` per training;
* `cnt_filter_skips`, the updates skipped because of filtering;
* `cnt_lookups`.

## Files

| file | block |
|------|-------|
| `rtl/pbnp_pkg.sv` | default sizes, `weights_per_row`, `train_threshold` |
| `rtl/pbnp_predictor.sv` | top: lookup stages, wiring, counters, recovery assertions |
| `rtl/pbnp_weight_table.sv` | one weight SRAM array (1 read, 1 write port, synchronous read) |
| `rtl/pbnp_bias_table.sv` | bias SRAM array with saturation flag |
| `rtl/pbnp_row_sum.sv` | signed sum of one row times ±1 outcomes |
| `rtl/pbnp_sum_pipeline.sv` | partial sums, final adder, opposite-direction sums |
| `rtl/pbnp_bbf.sv` | filter decision at lookup and at update |
| `rtl/pbnp_history.sv` | speculative global history and path (row indices) |
| `rtl/pbnp_checkpoint_table.sv` | per-branch checkpoints, tags, squash |
| `rtl/pbnp_update_unit.sv` | training read-modify-write and the table clearing after reset |

### Parameters of `pbnp_predictor`

| parameter | default | origin |
|-----------|---------|--------|
| `HIST_LEN` (h) | 42 | 32 KB configuration |
| `PATH_LEN` (P, ≥ 2) | 3 | 32 KB configuration |
| `BIAS_ENTRIES` | 16384 | 32 KB configuration |
| `BIAS_W` | 5 | as proposed for BBF |
| `WEIGHT_W` | 8 | chosen |
| `ROWS` | 512 | chosen: largest power of two within 32 KB (31744 B used) |
| `CKPT_ENTRIES` | 32 | chosen: about 25 branches are in flight with a 128-entry ROB, rounded up |
| `SUM_W` | 16 | chosen: cannot overflow for h = 42 |
| `THETA` | `train_threshold(h)` = 112 | chosen: usual path-based perceptron threshold |
| `PC_W`, `PC_LSB` | 32, 2 | chosen |

`ROWS`, `BIAS_ENTRIES` and `CKPT_ENTRIES` must be powers of two. The other published
sizes are parameter settings. They are run by `tb/tb_pbnp_configs.sv`:

| size | `HIST_LEN` | `PATH_LEN` | `BIAS_ENTRIES` | `ROWS` |
|------|-----------|-----------|----------------|--------|
| 2 KB | 17 | 4 | 1024 | 64 |
| 4 KB | 24 | 4 | 2048 | 64 |
| 8 KB | 29 | 4 | 4096 | 128 |
| 16 KB | 33 | 5 | 8192 | 256 |
| 64 KB | 42 | 3 | 32768 | 1024 |

`tb/tb_pbnp_sweeps.sv` runs the two design-space sweeps at the 8 KB history
length (h = 29, 128 rows).
* **Weights per table.** `PATH_LEN` = 29, 15, 10 and 4, giving one, two, three and eight
  weights per row. `PATH_LEN` = h is the classic organisation with one table per
  history position: the same RTL with a 28-sum pipeline.
* **Bias-table share.** `BIAS_ENTRIES` = 1024, 2048 and 4096 at `PATH_LEN` = 4.

## Verification

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line.

`tb_pbnp_predictor` runs the top at its default size. `tb_pbnp_configs` runs the five
other sizes side by side, and `tb_pbnp_sweeps` runs the six sweep points. All three use `tb_pbnp_core_model`, which has two parts.

**A processor model** drives a synthetic 24-branch program. Its branches are always
taken, never taken, loop exits, correlated with earlier outcomes, 90 % taken, or random.
Every fourth block of 1000 branches is a tight loop of biased branches. The model:
* fetches wrong-path branches after a misprediction and recovers a few cycles later;
* commits in order, at rates that vary between phases, so the checkpoint table also fills.

**A reference predictor** keeps the weights by logical position `i`, not by table and
slot, and evaluates the dot product directly. It samples weights when a request is
accepted and applies a training one cycle after the commit, as the hardware does. It
checks:
* every prediction's direction, filter flag, tag and `y`;
* the one-cycle latency;
* that a lookup stalls only for one of the reasons listed above;
* the clearing time;
* the in-flight count and the four counters.

Each mechanism must occur at least once: filtering, a skipped update, training, recovery,
a squash of wrong-path branches, a lookup killed in cycle 2, a training stall and a
checkpoint-full stall. The one exception is filtering at 2 KB. There the 17 weights carry
`|y|` past θ before any bias weight saturates, so that run does not require it.

The full-size run makes 22000 predictions and about 490 000 checks in under a second.

To simulate with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/pbnp_pkg.sv tb/tb_pbnp_predictor.sv --top-module tb_pbnp_predictor
    ./obj_dir/Vtb_pbnp_predictor

Any other testbench works the same way: substitute its name.

## Where this design goes beyond, or differs from, the published scheme

* **The index of `w_i`.** The scheme's formula is read as the address of branch
  `(i mod P)` back (`PC_{i mod P}`). Table `P`, holding `w_P, w_2P, …`, is therefore
  indexed by the current branch, and its row is summed in the prediction cycle. That
  makes the final adder wider than a single weight: 14 weights plus bias plus partial
  sum at the defaults.
* **Chosen here, not given by the scheme:** weight width, rows per table, index hashes,
  threshold, checkpoint depth, partial-sum width, reset clearing, the two-cycle lookup,
  the tag/recovery/commit interface and the counters.
* **Getting the old weights for training.** The scheme specifies one read and one write
  port per array but not how training obtains the old weights. Here training borrows the
  read port for one cycle and stalls lookup. A lookup that reads a row in the cycle it is
  being written gets the old row.
* **Training rule for filtered branches.** A filtered branch that mispredicts is trained
  in full (bias and all `h` weights); only a correct filtered branch skips the update.
  The scheme states only the second case.
* **Checkpoint size.** The published estimate is one 8-bit value per stage, `P + 1`
  values (32 bits at 32 KB). This design stores the `P − 1` partial sums at 16 bits (also
  32 bits), plus the history, indices and `y` that recovery and training need.
* **Not built.** The single-array variant with a pipelined update was mentioned as an
  option. Physical aspects are not modelled: row decoders, placing the checkpoint SRAM
  away from the predictor, power.
* **Not reproduced.** The published accuracy and update-activity figures come from
  SPECint traces, which are not part of this work. The synthetic program exercises the
  mechanisms; it does not reproduce those numbers.
