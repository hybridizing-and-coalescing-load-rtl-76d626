# St+Reg+L3pV: a coalesced-hybrid load value predictor

Loads are slow and frequent. A load value predictor guesses the value a load
will fetch, so that the instructions that depend on it can run before memory
answers; the load still performs its access, and a wrong guess is repaired by
the processor (by re-fetching or re-executing the dependent instructions).
Hybrid predictors, which combine several prediction methods, find more
predictable loads than any single method but usually need a lot of state.

This predictor combines three methods and makes them share almost all of
their state:

* **Last three partial values (L3pV).** Each line keeps the full 64-bit last
  value of a load, but only the low 16 bits of the second and third last
  values. The upper 48 bits of the recent values of one load are nearly always
  equal, so the older values borrow them from the last value. This halves the
  storage of a last-n-value predictor.
* **Stride (St), with no storage of its own.** The stride is the difference of
  the last two values, and both are already in the line, so the stride
  prediction is computed on the fly: `2*last - {last[63:16], pval2}`.
* **Register (Reg), with no storage of its own.** It predicts that the load's
  destination register already holds the value the load will fetch. The value
  comes from the register file.

That gives five candidate values per load. Each has its own confidence
estimator, and the most confident candidate is used if its confidence reaches
a threshold. With 1024 lines the whole predictor needs about 20 kB of line
state plus the counter tables.

## A predictor line

```
 btag    hist  hist  hist    hist  hist   last value   2nd pval  3rd pval
 8 + 1   10    10    10      10    10     64           16        16
 tag,    St    Reg   last    2nd   3rd
 miss
```

155 bits per line at the defaults. The line is selected by PC bits above the
two zero bits (and above the bank bits, see below). The tag is the next 8 PC
bits.

## Confidence: five SAg estimators

Each component has a 10-bit *outcome history* in the line: one bit per recent
update, 1 if that component's value would have been right. The newest outcome
enters at the MSB. The history indexes a table of 1024 saturating counters
(one table per component, shared by all lines). A counter counts:

* up by one after a correct outcome, stopping at `CTR_TOP`;
* down by `CTR_PEN` after a wrong one, stopping at zero.

A counter therefore learns how often the pattern of recent outcomes was
followed by a correct value. Two settings are given for the counters:

| setting | counter bits | top | threshold | penalty |
|---|---|---|---|---|
| re-execute recovery (default) | 4 | 15 | 8 | 4 |
| re-fetch recovery | 5 | 31 | 16 | 16 |

The re-fetch setting is much more cautious, because a wrong value costs a
pipeline flush there.

## Selection

All five components predict in parallel. The component with the largest
counter wins. Ties go to the earlier one in the order St, Reg, last value,
2nd value, 3rd value. A value is predicted only if the partial tag matches
and the winning counter is at or above `CTR_THR`. `COMP_EN` can forbid
components from being selected. A forbidden component still keeps its
history and counters, which makes the component studies (for example Reg+L3pV
without the stride) a parameter change.

## Updates and b-tags

When a load completes, the predictor is updated with the true value. Each
component's value is recomputed from the line and compared with the true
value. Then:

* each counter is adjusted at the index given by the component's current
  history, and the outcome is shifted into that history;
* the values age: 3rd <- 2nd, 2nd <- low 16 bits of last, last <- true value.

The b-tag keeps rarely executed loads from evicting frequent ones. Its extra
bit records whether the line's last update missed the tag.

| tag | miss bit | action |
|---|---|---|
| match | any | normal update, miss bit cleared |
| no match | 0 | nothing but setting the miss bit |
| no match | 1 | the line is taken over: new tag, miss bit cleared, normal update |

So a load gets a line only if it misses twice in a row. Predictions never
write the predictor.

## Pipeline and timing

A bank accepts one operation per cycle, a prediction or an update.
Predictions have priority. An operation moves through three steps:

| step | prediction | update |
|---|---|---|
| S0 | line read | line read |
| S1 | tag compare, stride adder, component values; the five counter tables are read at the five histories | same, plus compare with the true value; the new line (histories, values, b-tag) is written back |
| S2 | choose component; result on `res_*` | the five counters are written |

A prediction requested in cycle *t* is answered during cycle *t+2*.

The line array and the counter tables forward a write to a read of the same
entry in the same cycle. The line is written one cycle after it is read, and
the counters one cycle after they are read. With that forwarding, any mix of
back-to-back predictions and updates gives exactly the result of doing them
one at a time, in the order accepted. No other hazard logic is needed.

After reset every bank clears its line array and its counter tables, one
entry per cycle. `ready` is low meanwhile: 1024 cycles at the defaults (the
counter tables are the larger arrays).

## Banks and update queues

To serve up to four loads per cycle, the predictor is split into four
independent banks of 256 lines each. The banks never talk to each other.
Fetch blocks are four aligned 4-byte instructions, so the loads fetched
together always differ in PC bits [3:2]. Those bits choose the bank, and port
*b* of the top serves loads with PC[3:2] = *b* (an assertion checks this).

Updates do not compete with predictions directly. Each bank has a 16-entry
update queue. The queue hands the bank one update in each cycle in which that
bank has no prediction to serve. An update that arrives at a full queue is
dropped and flagged on `upd_dropped`: the predictor simply never learns that
outcome. Fullness is judged before the same cycle's pop.

## Top-level interface (`coalesced_hybrid_lvp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ready` | out | 1 | state cleared; requests are ignored before this |
| `pred_valid[b]`, `pred_req[b]` | in | 1, 128 | prediction request: `pc`, and `reg_val` (the destination register's current value) |
| `upd_valid[b]`, `upd_req[b]` | in | 1, 192 | update: `pc`, true `value`, and the `reg_val` seen at prediction time |
| `upd_dropped[b]` | out | 1 | this cycle's update was dropped (queue full) |
| `res_valid[b]` | out | 1 | result of the request made two cycles earlier |
| `res_predict[b]` | out | 1 | use the value (tag hit, confidence at or above threshold) |
| `res_value[b]` | out | 64 | predicted value |
| `res_comp[b]` | out | 3 | chosen component: 0 St, 1 Reg, 2 last, 3 and up the partial values |
| `res_cnt[b]` | out | 4 | confidence of the chosen component |
| `fifo_count[b]` | out | 5 | update queue occupancy |
| `evt[b]` | out | 6 | pulses: update done / hit / first miss / take-over, prediction done / taken |

The processor is not part of this design. It must give the register value to
the prediction, keep it with the load, and send it back with the update,
because the Reg component's outcome is judged against it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_BANKS` | 4 | banks (and ports); a power of two |
| `LINES` | 1024 | lines in all banks together (256 for the small, 4096 for the large configuration) |
| `FIFO_DEPTH` | 16 | update queue entries per bank |
| `TAG_W` | 8 | partial tag bits (plus the miss bit) |
| `HIST_W` | 10 | history bits; each counter table has 2^HIST_W entries |
| `NUM_PVALS` | 2 | partial value fields: 1 gives L2pV, 7 gives L8pV; at least 1, since the stride needs one |
| `PVAL_W` | 16 | bits per partial value |
| `CNT_W`, `CTR_TOP`, `CTR_THR`, `CTR_PEN` | 4, 15, 8, 4 | counter setting (re-execute) |
| `COMP_EN` | all ones | bit *c* allows component *c* to be selected |

## Where this RTL makes its own choices

* **Counter tables per bank.** Each bank has its own five full 1024-entry
  tables, because a 10-bit history needs 1024 counters. With four banks that
  is four times the counter state of a single predictor. Sharing one set of
  tables would need four read ports per table.
* **Default counters.** The re-execute setting is the default because it
  matches 4-bit counters. For re-fetch, set `CNT_W=5` and the rest of the
  second row of the table above.
* **Stride formula.** The stride value is `last + (last - second_last)`,
  computed as twice the last value minus the second last value.
* **Threshold.** A value is predicted at a counter equal to the threshold,
  not only above it.
* **B-tag details.** On a first miss, nothing but the miss bit changes. On a
  take-over, the normal update is applied to the old line contents: the
  histories and counters are not reset.
* **Pipeline split** (above), the reset clearing, the forwarding, the update
  ports (one per bank per cycle), and the queue's full/pop rule.
* **No valid bits on partial values.** A partial value joined to upper bits
  that do not belong to it is simply a wrong component. Its confidence
  counter learns this.
* Not included: the processor, its recovery from mispredictions (re-fetch or
  re-execute), and the memory system.

## Files

`rtl/` (one module or package per file):

| file | role |
|---|---|
| `lvp_pkg.sv` | request/update structs, component numbering, event bundle |
| `coalesced_hybrid_lvp.sv` | top: banks, queues, bank-port assertions |
| `lvp_bank.sv` | one bank: pipeline, line layout, update rules |
| `lvp_line_array.sv` | line storage with forwarding and reset clearing |
| `lvp_sag_counters.sv` | one confidence counter table |
| `lvp_btag_match.sv` | tag compare and b-tag rule |
| `lvp_stride_adder.sv` | stride value |
| `lvp_comp_values.sv` | the component values of a line (partial values joined to the last value's upper bits) |
| `lvp_select.sv` | maximum-confidence selection with tie order, threshold |
| `lvp_update_fifo.sv` | update queue with drop-when-full |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), and these
helpers:

* `lvp_ref_pkg.sv`: an untimed reference model of a bank, and synthetic load
  sites (constant, stride, two- and three-value cycles, register-held,
  random).
* `lvp_bank_harness.sv`: a bank plus its model.
* `tb_lvp_configs.sv`: runs nine other configurations side by side: re-fetch
  counters, L2pV, L8pV, 2- and 24-bit partial values, Reg+L3pV, stride only,
  and 64- and 1024-line banks.

`tb_coalesced_hybrid_lvp` runs the top at its default size. It checks every
result and every drop against the model. It also requires that each of the
following happens at least once: each of the five components supplies a
prediction, tag hits, first misses and take-overs occur, four predictions
arrive in one cycle, updates wait behind predictions, and updates are
dropped. Each testbench prints `TB_RESULT checks=N failures=M`.

To simulate, for example, the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lvp_pkg.sv tb/lvp_ref_pkg.sv tb/tb_coalesced_hybrid_lvp.sv \
    --top-module tb_coalesced_hybrid_lvp -o sim
./obj_dir/sim
```

Each testbench runs in well under a second. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/lvp_pkg.sv rtl/<module>.sv`.
