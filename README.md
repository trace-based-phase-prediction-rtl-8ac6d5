# Super-trace phase predictor for a Big/Little core

A core with two backends on one frontend can move a thread between a fast
out-of-order backend (Big) and an energy-efficient in-order backend (Little)
every few hundred instructions. A conventional controller decides by looking
back: it measures the last interval and assumes the next will behave the
same. At intervals of a few hundred instructions that assumption breaks
down, because neighbouring intervals differ widely in performance.

This controller decides by looking ahead instead. It cuts the retired
instruction stream into recurring code sequences called **super-traces**
and gives each one a 9-bit name. It learns which super-trace usually
follows which, and for each super-trace whether running it on Little costs
little enough performance to be worth it. When a super-trace ends, the
controller predicts the next one and moves execution to the backend that
suits it *before* it runs. A feedback loop keeps the overall slowdown
against an all-Big run close to a target (5% by default). It does this by
moving the loss threshold that decides what counts as "cheap enough on
Little".

All of it is synthesizable SystemVerilog. The stored state is 15,360 bits
(1.875 kB): two 512-row tables. The backends themselves are not part of
this design. They appear only as the retire-stream, performance-counter and
backend-select ports of the top module, `strace_controller`.

```
 retire stream ──► strace_index_gen ──ID, head tag──► next_strace_predictor ──predicted ID──► backend_pht ──► backend_sel
 (ret_count,        (Block 1)                          (Block 2)                               (Block 3)       switch_req
  br_pc/target)          │ ID of the finished super-trace                                          ▲
                         ▼                                                                         │ train
 perf counters ───► feedback_generator: perf_diff_estimator ─► comparator ◄─ perf_monitor (PI) ────┘
 (sample)           (Block 4)
```

## 1. Cutting the stream into super-traces (`strace_index_gen`)

A **backedge** is a taken branch, call or return whose target is below its
own PC. Loop closings are backedges. So is either the call or the return of
every function call. Backedge targets are points the program keeps coming
back to, which makes the code between them a natural unit that repeats.

Backedges come every ~50 instructions, which is too often to switch
backends. So the controller merges consecutive backedge-delimited pieces
until at least `MIN_LEN` instructions (300 by default) have retired. The
backedge that reaches the count closes the super-trace. The counter then
restarts at zero, and so does the list of backedge PCs. A super-trace
therefore always ends on a backedge and is at least `MIN_LEN` instructions
long. It has no upper length: if no backedge comes, the counter saturates
(20 bits) and waits.

The core reports, every cycle:

* `ret_count`: 0 to 3 retired instructions.
* `br_valid`, `br_pc` and `br_target`: at most one taken control transfer.

The taken transfer is counted as the last instruction of its retire group,
since a taken branch ends a fetch group.

## 2. Naming a super-trace (`strace_id_hash`)

Ideally a super-trace would be named by the concatenation of all its
backedge PCs. Instead the last 12 backedge PCs are folded into 9 bits. The
most recent backedges contribute the most bits, because they say most about
what comes next. Bits are counted above the 2-bit byte offset:

| backedge (1 = most recent) | bits used | position in its 9-bit word |
|---|---|---|
| BE1 | PC[10:2] | whole word |
| BE2 | PC[7:2] | low 6 bits, together with BE3 |
| BE3 | PC[4:2] | high 3 bits |
| BE4 .. BE12 | PC[4:2] each | three per word: {BE6,BE5,BE4}, {BE9,BE8,BE7}, {BE12,BE11,BE10} |

The result is:

```
ID = ({BE12,BE11,BE10} ^ {BE9,BE8,BE7}) ^ ({BE6,BE5,BE4} ^ {BE3,BE2}) ^ BE1
```

In each word the older backedge is in the upper bits. If a super-trace has
fewer than 12 backedges, the empty slots count as zero.

`strace_index_gen` registers the ID together with:

* `st_len`, the super-trace length in instructions.
* The **head tag**, bits [4:2] of the closing backedge's target. That
  target is the first instruction of the *next* super-trace, so the tag is
  already known when the prediction is made.

`st_valid` pulses one cycle after the closing backedge retires.

## 3. Predicting the next super-trace (`next_strace_predictor`)

This is the part of the design that needs the closest reading.

The table has 512 rows, one per ID. Each row holds two candidate
successors, and each candidate is 14 bits:

| field | bits | meaning |
|---|---|---|
| `id` | 9 | ID of a super-trace that has followed this one |
| `head` | 3 | head tag that super-trace started with |
| `conf` | 2 | saturating confidence |

**Lookup.** When super-trace *k* closes, row `ID(k)` is read. The head tag
of *k+1* picks the candidate:

* If only one candidate's `head` matches, it is the prediction.
* If both match, the one with the higher `conf` wins (way 0 on a tie).
* If neither matches, there is no prediction (`pred_hit = 0`) and the
  backend stays as it is.

The tag lets one row keep two successors that start at different places,
for example the two outcomes of a branch at the end of a loop.

**Training.** When *k+1* closes, its real ID is known. Row `ID(k)` is then
trained, using the tag that was used for the lookup:

* **The real successor is stored** (ID and tag match): its `conf` goes up
  by one, saturating at 3.
* **It is not stored:** the candidate with the lower `conf` (way 0 on a
  tie) is the victim.
  * If the victim's `conf` is above zero, it is only demoted by one.
  * If it is zero, the victim is deleted and the real successor is written
    in its place with `conf = 1`.

A successor that has been seen many times thus survives a few one-off
excursions before it is displaced.

**Timing.** Each closing takes four clock edges on a table with one read
and one write port:

1. Read the predecessor row.
2. Write it back trained. The `upd_*` event outputs pulse here.
3. Read the row of the new ID.
4. Present `pred_valid`, `pred_hit` and `pred_id`.

Writing before reading makes a super-trace that follows itself see its own
update. After reset both tables are swept to their start values, one row
per cycle. That takes 512 cycles (`ready` low), and closings during the
sweep are ignored.

## 4. Choosing the backend and learning from the result

**`backend_pht`** holds 512 two-bit saturating counters, indexed by the
*predicted* ID:

* Counter values 2 and 3 mean Little.
* Counter values 0 and 1 mean Big.
* Counters start at 1, weakly Big.

The lookup answers one cycle after `pred_valid`. `strace_controller` then
updates `backend_sel` and pulses `switch_req` if the backend changed. That
is seven edges after the closing backedge retired, so the core should drain
for that long. A backedge is a good place for this, because a mispredicted
backedge flushes the pipeline anyway.

**`feedback_generator`** trains the counter of the super-trace that just
finished, in four steps:

1. **Hold the ID.** It keeps the ID of the finished super-trace.
2. **Estimate (`perf_diff_estimator`).** The core reports that
   super-trace's cycle count and six metric counters:
   * instructions
   * L1D misses
   * L2 misses
   * branch mispredicts
   * an ILP estimate
   * an MLP or dependence estimate

   A linear model estimates the cycles it would have taken on the other
   backend:

   `est = bias + c0·cycles + Σ ci·metric[i]`

   The coefficients are signed Q8.8. There are two coefficient sets, one
   per direction (Big→Little and Little→Big), and both are configuration
   inputs. The model does one multiply-accumulate per cycle and finishes 8
   edges after the sample is accepted. Its outputs:
   * **local loss** = Little cycles − Big cycles (one observed, one
     estimated).
   * **suffered loss**: the local loss if the super-trace ran on Little,
     0 if it ran on Big.
   * **allowed loss**: `LOSS_PCT`% of the Big cycles.
3. **Compare.** If local loss < threshold, the PHT counter goes up
   (toward Little). Otherwise it goes down.
4. **Move the threshold (`perf_monitor`).** A proportional-integral law
   updates the threshold. With e = allowed − suffered for this super-trace,
   and slack the running sum of e:

   `threshold = e·2^-KP_SHIFT + slack·2^-KI_SHIFT`, clamped at 0.

   Running ahead of the target raises the threshold, so more code goes to
   Little. Falling behind lowers it. The comparison in step 3 uses the
   threshold from *before* this super-trace's own update.

## 5. Top-level interface (`strace_controller`)

| port | dir | width | meaning |
|---|---|---|---|
| `ret_count` | in | 2 | instructions retired this cycle |
| `br_valid`, `br_pc`, `br_target` | in | 1, 32, 32 | taken control transfer retired this cycle |
| `sample_valid`, `sample` | in | 1, `perf_sample_t` | counters of the super-trace that just closed: backend, cycles, `metric[6]` |
| `coef_b2l`, `coef_l2b` | in | `regr_coef_t` | regression coefficients |
| `ready` | out | 1 | tables initialised |
| `st_valid`, `st_id`, `st_len` | out | 1, 9, 20 | a super-trace closed |
| `backend_sel`, `switch_req` | out | 1, 1 | backend for the coming code (0 Big, 1 Little) and a pulse when it changes |
| `pred_valid`, `pred_hit`, `pred_id` | out | 1, 1, 9 | next-super-trace prediction |
| `threshold`, `slack` | out | 24, 32 | state of the loss controller |
| `evt_*` | out | 1 each | event pulses for counters: backedge, correct prediction, successor replaced or demoted, PHT trained toward Little or Big |

Handshake: the counters of a super-trace (`sample_valid`) must arrive in
the cycle of its `st_valid` or later, and before the next closing. Closings
must be at least five cycles apart. With `MIN_LEN` ≥ 300 they are always
far apart. Immediate assertions check both rules in simulation. Reset is
asynchronous and active low.

Parameters of the top:

| parameter | default |
|---|---|
| `MIN_LEN` | 300 |
| `LOSS_PCT` | 5 |
| `KP_SHIFT` | 0 |
| `KI_SHIFT` | 3 |

The table sizes and field widths are in `stp_pkg`.

## 6. What is specified and what was chosen here

**Taken from the design description:**

* The block structure and its wiring.
* The backedge definition and the 300-instruction minimum.
* The 12-backedge hash layout and the 9-bit IDs.
* The two-way successor table with 3-bit head tags and 2-bit confidence.
* The "demote, or delete at zero" replacement.
* The single-level PHT of 2-bit counters.
* A linear regression model and a PI-controlled threshold against a 5% loss
  target.
* The 1.875 kB storage budget, which this design meets exactly.

**Chosen here**, because the description does not fix them:

* **Backedge count.** The text quotes the last 15 backedges as the chosen
  history, but the published hash layout covers 12. The 12-backedge layout
  is implemented.
* **Hash bit selection.** Which PC bits feed each slice, and the slice
  order inside each 9-bit word.
* **History clearing.** The backedge history is cleared at every closing.
* **Successor table policy.** Ties go to way 0, a new successor starts with
  confidence 1, and a tag miss keeps the current backend.
* **PHT encoding.** The counter encoding and the weakly-Big start value.
* **Regression model.** The coefficients are not published, so they are
  inputs. The metric set and the Q8.8 format were also chosen here. The
  model works serially in 8 cycles; a published figure for an earlier model
  is 30 cycles.
* **PI loop.** Its gains, widths and start value. The published loop is
  "tuned" but its gains are not given.
* **Interfaces.** All handshakes, latencies, the reset-time table sweep,
  and the retire interface of up to three instructions and one taken
  transfer per cycle.

**Not included:**

* The Big and Little backends, the shared frontend and the caches.
* The performance counters that produce the metrics.
* Migration itself, meaning the register-file transfer and the drain.

The comparison predictors are also left out: 10- and 12-bit ID tables, and
local-history and global-history backend predictors.

## 7. Files

| file | content |
|---|---|
| `rtl/stp_pkg.sv` | widths, `backend_e`, table row and sample structs |
| `rtl/strace_id_hash.sv` | 12-backedge XOR fold |
| `rtl/strace_index_gen.sv` | backedge detection, super-trace closing |
| `rtl/next_strace_predictor.sv` | successor table |
| `rtl/backend_pht.sv` | Big/Little counters |
| `rtl/perf_diff_estimator.sv` | regression model |
| `rtl/perf_monitor.sv` | PI threshold |
| `rtl/feedback_generator.sv` | Block 4 |
| `rtl/strace_controller.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_core_model.sv` | controller plus behavioural core, for a chosen minimum length |
| `tb/tb_strace_granularity.sv` | length sweep: three `tb_core_model` instances |

## 8. Verification

Every testbench compares against a reference model written separately in
the testbench. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* **`tb_strace_id_hash`**: slice-placement reference, single-slot directed
  cases and 2000 random histories.
* **`tb_strace_index_gen`**: 6000 random retire groups with forward and
  backward branches, checked against a reference counter and history model
  (at `MIN_LEN` = 40). A second instance at the default checks that a
  super-trace closes at exactly 300 instructions.
* **`tb_next_strace_predictor`**: 4000 closings from a repeating ID pattern
  with 10% noise, against a reference table. It checks every prediction,
  every training step, the latencies and the 512-cycle clearing.
* **`tb_backend_pht`**: random lookups and training against a reference
  array, including same-row conflicts and saturation.
* **`tb_perf_diff_estimator`**: random samples and coefficients against a
  64-bit reference, including clamping and the 8-edge latency.
* **`tb_perf_monitor`**: the PI law against a reference, plus rise and fall
  to zero.
* **`tb_feedback_generator`**: end-to-end training direction, ID and
  latency, with samples in the closing cycle or later.
* **`tb_strace_controller`**: the whole controller at default parameters,
  driven by a behavioural two-backend stand-in that runs a program of six
  code regions (3000 super-traces, about 0.5M cycles, under 3 s).
  * Two regions cost almost the same on both backends, two are much slower
    on Little, and two are in between.
  * It checks every ID and length, and that `switch_req` matches changes of
    `backend_sel`.
  * It checks next-super-trace accuracy (at least 75% required; 99.9% of
    the predictions made were correct on this program).
  * Over the second half of the run, the memory-bound regions must run on
    Little more than half the time; they do so 94-96% of the time. The
    compute-bound regions must run on Big at least 90% of the time; they do
    so 92-95% of the time.
  * The total slowdown must stay within 6%; 4.9% is measured against the 5%
    target.
  * Every mechanism must occur at least once.
* **`tb_strace_granularity`**: the same kind of program run through three
  controllers side by side, with minimum lengths of 100, 1,000 and 10,000
  instructions (2000, 800 and 240 super-traces). Each region is four equal
  loop pieces, so the fourth backedge closes the super-trace. Costs scale
  with the length. Each instance checks IDs and lengths and requires:
  * at least 75% prediction accuracy (99.8%, 99.6% and 98.1% are measured);
  * memory-bound regions on Little more than half the time;
  * compute-bound regions on Big at least 85% of the time, since 8% of the
    region changes are random and cannot be foreseen;
  * a loss of at most 6% (4.3%, 4.7% and 4.3% are measured).

To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/stp_pkg.sv \
    tb/tb_strace_controller.sv --top-module tb_strace_controller -o sim
./obj_dir/sim
```

Replace `tb_strace_controller` with any other testbench name. The `-y tb`
is needed for `tb_strace_granularity`, which pulls in `tb_core_model`.
`+verilator+rand+reset+2 +verilator+seed+N` on the simulator's command line
starts every unreset register at a random value; the testbenches are meant
to pass that way.

## 9. Fit for the published evaluation

Evaluated configuration: SPEC CPU2006 programs, 100M instructions each,
300-instruction super-traces.

| item | size needed | this design |
|---|---|---|
| super-trace length | ≥ 300; a sweep from 100 to 1M | 20-bit length counter, saturating at 1,048,572 |
| cycle count per super-trace | — | 24-bit, far above what a 300-instruction super-trace needs |
| slack | about 1.7·10^7 cycles at IPC 0.3 | 32-bit |

Minimum lengths of 100, 1,000 and 10,000 instructions have been simulated
end to end (`tb_strace_granularity`). The 100K and 1M points use the same
logic with a larger `MIN_LEN`, but they were not simulated because of run
time.

IDs alias by design in the 512-row tables. Only the 9-bit table
configuration is built; the 10- and 12-bit sizes from the sensitivity study
would need a different hash.
