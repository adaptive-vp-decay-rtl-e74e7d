# Adaptive decay for value predictors

A value predictor (VP) guesses an instruction's result from its past results. That lets
dependent instructions issue before the result is known. Its tables sit next to the core,
are read almost every cycle and run hot, so they leak. Much of that leakage is wasted:
an untagged, direct-mapped VP entry serves one instruction for a while (its *live time*).
It then sits unused (its *dead time*) until another instruction that maps to the same
entry takes it over. This RTL switches such entries off with per-entry power gating
(gated-VDD). It decides *when* to switch them off with **Adaptive Value Prediction Decay
(AVPD)**:

* Each entry has a 2-bit local timer, driven by one global counter. An entry that has
  not been touched for one *decay interval* has its data cells switched off.
* The decay interval is one global, power-of-two value, and it adapts at run time. VP
  tables have no tags, so there is no way to measure how many mispredictions a too-early
  shut-off caused. AVPD measures this instead: after switching an entry's data off, it
  keeps that entry's local counter powered for one more *average live time* (about 400
  cycles). If the entry is looked up again in that window, the decay was premature.
  The fraction of decayed entries that come back (the *re-activation ratio*) moves the
  interval. Above an increasing threshold the interval is doubled. Below a decreasing
  threshold it is halved.

Losing a VP entry early is cheap: the next lookup just finds no prediction, which is what
a real change of owner would also have caused. A shut-off cache line, by contrast, always
costs a refill. This is why the interval can be pushed down to a few hundred cycles.

The design contains three such predictors side by side: a stride predictor (STP), a
finite-context-method predictor (FCM) and a differential FCM predictor (DFCM). Each has
its own decay unit, set to the threshold pair that suits it.

## Entry states

Every first-level (PC-indexed) entry is in one of three states:

| state | data cells | local counter | leaves when | to |
|---|---|---|---|---|
| enabled | on | on | a global tick finds the local counter saturated | partially disabled |
| partially disabled | off (contents lost) | on | the entry is looked up | enabled (counted as a *re-enable*) |
| | | | the live-time window closes first | disabled |
| disabled | off | off | the entry is looked up | enabled (not counted) |

A lookup always resets the entry's local counter. The counter is a 2-bit saturating
Gray-code counter (00→01→11→10). It advances on each overflow of the global counter (a
*tick*), and only while the counter is powered. Its "overflow" is a tick that arrives
while it already reads 10. The global counter wraps every *interval/4* cycles. An entry
therefore loses its data between 3/4 and 1 decay interval after its last lookup:
specifically, on the fourth tick after that lookup. Only one local-counter bit toggles
per step, and the counters are touched only once per global period. Both choices keep
the timers' own dynamic power small.

While data is off, the predictor holds the entry's contents at zero, including its valid
bit. A lookup of an off entry returns no prediction and turns the entry back on, empty.
The next write-back then trains it again. Write-backs to an entry whose data is off are
dropped. Write-backs do not count as accesses; only lookups keep an entry alive.

## How the interval adapts

`avpd_global_ctrl` holds the interval as `di_log2` and three counters:

* the **global decay counter**. It wraps after `2^(di_log2-2)` cycles and pulses `tick`.
* the **partially-disabled entries counter**. Each tick resets it and loads it with the
  number of entries that decayed at that tick. Decays happen only at ticks, so this is
  always one tick's batch. Many entries can decay in the same cycle, which is why
  `avpd_decay_array` counts them with a full population count.
* the **re-enabled entries counter**. Each tick resets it. It counts lookups that hit a
  partially disabled entry.

`LIVE_TIME` cycles after a tick (or at the next tick, if the global period is shorter),
the controller pulses `expire` once. In that cycle:

1. It compares `reen / pdis` with the thresholds, without a divider:
   `reen*100 >= INC_TH*pdis` doubles the interval, otherwise `reen*100 <= DEC_TH*pdis`
   halves it. The interval is bounded by `2^DI_LOG2_MIN` and `2^DI_LOG2_MAX`. If no entry
   decayed, there is nothing to judge and the interval stays.
2. Every entry still partially disabled becomes disabled. This is what turns off its
   local counter as well.

So each decayed entry gets one live time (or one global period, if that is shorter) to
prove that the decay was premature. The new interval takes effect at the next wrap of the
global counter. Because re-enables and decays are counted over the same window,
`reen <= pdis` always holds. An assertion in `avpd_decay_unit` checks this.

The thresholds set how eager the scheme is. With 0/100, the interval shrinks only when no
decayed entry came back, and grows only when all of them did (conservative). With 50/50,
it moves at almost every evaluation. The defaults are the pairs that worked best for each
predictor: 70/100 for FCM and DFCM, which tolerate short intervals, and 40/60 for STP,
whose accuracy suffers more from early decay. Both tests are inclusive, so that 0% and
100% can fire at all. If both tests hold at once, the interval grows.

## The three predictors

All three are direct-mapped and untagged. They are indexed by `pc[IDX_W+1:2]` and carry
64-bit values. Each is fully pipelined: a lookup in cycle *t* gives `pred_valid` /
`pred_value` in cycle *t+LATENCY* (5). A prediction is made only if the entry is powered
and has been trained (its valid bit is set).

* **`stp_predictor`**: each entry holds `{last, stride, valid}`. It predicts
  `last + stride`. A write-back sets `stride = result - last` and `last = result`.
* **`fcm_predictor`**: the first level holds a `HIST_W`-bit context hash per instruction.
  The second level (`2^HIST_W` values) holds the value that last followed each context.
  It predicts `L2[ctx]`. A write-back stores the result in `L2[ctx]` and moves the
  context on: `ctx' = (ctx << HSHIFT) ^ fold(result)`, where `fold` XORs the `HIST_W`-bit
  slices of the value.
* **`dfcm_predictor`**: the same two-level scheme applied to strides. The first level
  holds `{last, ctx, valid}` and the second level holds strides. It predicts
  `last + L2[ctx]`.

Only the PC-indexed first level is decayed. The second level of FCM/DFCM is shared by all
instructions through the hash, so it has no per-instruction generations. It stays
powered.

## Top level: `avpd_vp_top`

The top has one slot per predictor (`VP_STP`=0, `VP_FCM`=1, `VP_DFCM`=2 in `avpd_pkg`).
Its ports are arrays indexed by slot:

| port | dir | meaning |
|---|---|---|
| `lk_valid[s]`, `lk_pc[s]` | in | lookup (one per cycle per slot) |
| `pred_valid[s]`, `pred_value[s]` | out | prediction, `LATENCY` cycles after the lookup |
| `upd_valid[s]`, `upd_pc[s]`, `upd_value[s]` | in | write-back of the committed result |
| `data_on[s][i]`, `lc_on[s][i]` | out | power enables of entry *i*'s data cells and local counter, meant to drive its gated-VDD sleep transistors |
| `data_on_num[s]`, `lc_on_num[s]` | out | how many entries have data / counter powered: the leakage the table still has |
| `di_log2[s]` | out | current decay interval, log2 cycles |
| `ev_tick`, `ev_expire`, `ev_di_up`, `ev_di_down`, `ev_pdis_num`, `ev_reen_num` | out | event pulses and counts, for monitoring |

Reset (`rst_n`) is asynchronous and active low. It leaves every entry disabled and empty,
with the interval at `2^DI_LOG2_INIT`.

Module hierarchy:

```
avpd_vp_top
├── avpd_decay_unit ×3          (one per predictor, own thresholds)
│   ├── avpd_global_ctrl         global counter, event counters, adaptation
│   └── avpd_decay_array         N_ENTRIES × avpd_entry (+ popcounts)
│       └── avpd_entry           three-state controller
│           └── avpd_local_counter   2-bit Gray counter
├── stp_predictor
├── fcm_predictor
└── dfcm_predictor
avpd_pkg                         state enum, Gray codes, widths, fold()
```

## Parameters

| parameter | default | origin |
|---|---|---|
| `LIVE_TIME` | 400 | measured average live time of VP entries |
| `DI_LOG2_MIN` | 8 (256 cycles) | lower limit of the interval in the published evaluation |
| `DI_LOG2_MAX` | 18 (262144 cycles) | this design's choice (longest interval evaluated for the static scheme) |
| `DI_LOG2_INIT` | 9 (512 cycles) | this design's choice (the best fixed interval) |
| `STP_DEC_TH`/`STP_INC_TH` | 40/60 | best published pair for STP |
| `FCM_*`, `DFCM_*` | 70/100 | best published pair for FCM and DFCM |
| `LATENCY` | 5 | VP access latency used in the evaluation |
| `N_ENTRIES` | 1024 | this design's choice |
| `HIST_W`, `HSHIFT` | 10, 2 | this design's choice |

Sizes, counting the per-entry 2-bit counters, at these defaults:

| predictor | size | composition |
|---|---|---|
| FCM | about 9.6 KB | 1024×11 + 1024×64 bits |
| STP | 16.4 KB | 1024×129 bits |
| DFCM | 17.6 KB | 1024×75 + 1024×64 bits |

The published evaluation covers roughly 2.3 KB to 87 KB per predictor. Its entry formats
are not known, so other sizes are reached by changing `N_ENTRIES` and `HIST_W`.

## Interpretations and departures

These points are this design's reading, where the published description is silent or
loose:

* **Global period = interval/4.** The 2-bit local counter needs four ticks to overflow.
* **Counting windows.** Both event counters are reset by the global overflow. The ratio
  is evaluated one live time after it. "Not accessed within the average live time" is
  implemented with that same global `expire` pulse rather than a per-entry timer, which
  keeps the per-entry hardware at the 2-bit counter plus the 2-bit state.
* **Inclusive thresholds, increase wins ties, and no change when nothing decayed.**
* **Decay applies to the PC-indexed level only.** Only lookups count as accesses.
* **One lookup and one write-back per cycle per predictor.** A wide core would need more
  ports, and then `reen_num` would become a population count too.
* **No confidence estimation in the predictors.** Hash functions, index bits, the entry
  format and the behaviour of fresh entries are this design's choices.
* The gated-VDD sleep transistors are not modelled. Their effect is represented by the
  `data_on`/`lc_on` enables, and by forcing a switched-off entry's contents to zero.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_avpd_local_counter` | Gray sequence, saturation and overflow against a reference count |
| `tb_avpd_entry` | every transition and event pulse against a reference model; all four transitions must occur |
| `tb_avpd_decay_array` | 16 entries, random ticks/expiries/lookups against a per-entry model |
| `tb_avpd_global_ctrl` | tick/expire timing, interval up/down, counters, against a cycle model; reaches both interval limits |
| `tb_avpd_decay_unit` | whole mechanism against a reference model, plus the decay latency (between 3 and 4 global periods) |
| `tb_stp_predictor`, `tb_fcm_predictor`, `tb_dfcm_predictor` | every prediction against a table model, exact 5-cycle latency, behaviour of powered-off entries, accuracy on learnable sequences |
| `tb_avpd_vp_top` | end-to-end at reduced size: a synthetic program (hot loop, sweep, mix) drives all three slots; checks gating, latency, re-power, counts and interval steps; every mechanism must occur |
| `tb_avpd_vp_top_full` | the same program at the top's default parameters |

Compile and run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/avpd_pkg.sv tb/tb_avpd_vp_top.sv \
          --top-module tb_avpd_vp_top -o sim
./obj_dir/sim
```

The unit and reduced-size testbenches build and run in well under a minute each. With
every parameter at its default, `tb_avpd_vp_top_full` instantiates 3 × 1024 decayed
entries. Verilator then takes a few minutes to build it (use `-j`), and the run takes
about 1.5 minutes for its 45,000 cycles. The testbenches use only `$urandom`, and they
assume a two-state simulator with all state reset. The end-to-end test also prints, per predictor, how many lookups found their entry
powered and the mean fraction of powered entries. That fraction is the quantity that
leakage savings are computed from.

## Limits

* This is the control and storage logic only. Leakage energy itself, and the
  performance cost of early decay, need a power/performance model around it.
* The programs used in the tests are synthetic. No benchmark traces are included.
