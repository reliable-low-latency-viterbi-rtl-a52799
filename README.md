# Error-detecting compare-select-add units for look-ahead Viterbi decoders

A look-ahead Viterbi decoder merges several trellis steps into one. The
work then moves into a branch-metric precomputation stage built from many
copies of one small operation. Two competing path metrics are compared, the
survivor is kept, and it is extended by two branch metrics:

```
out_j = max(lam_p1, lam_p2) + lam_j
out_k = max(lam_p1, lam_p2) + lam_k        (all modulo 2^N)
```

There are two forms of this operation:

* **CSA** (compare-select-add) compares first, then adds.
* **PCSA** (precomputed CSA) forms all four sums while the comparison runs,
  then selects. It is faster but needs twice the adders.

A single stuck-at fault or upset in such a unit corrupts a path metric
without any sign, and the error spreads through the rest of the trellis.
This RTL adds *concurrent error detection* to both forms. Each unit raises an
error flag during normal operation, with no test mode. Two families of
protection are provided, and you can pick one per unit according to the area
and throughput you can spend:

| family | units | costs | detects |
|---|---|---|---|
| signatures (hardware redundancy) | `csa_sig`, `pcsa_sig` | parity bit per register, duplicated mux, self-checking adders | every activated single stuck-at fault in registers, muxes and adder rails |
| recomputing with encoded operands (time redundancy) | `csa_reco`, `pcsa_reco` | a second run per operand set, 0 to K extra datapath bits | about 99.2–100 % of result-corrupting faults (RESO and RERO), 87–98 % (modified RESO) |
| combined: both of the above | `csa_reco`, `pcsa_reco` with `SIG = 1` | recomputing plus a parity bit per pipeline word and duplicated muxes | 99.9–100 % of result-corrupting faults, in every mode |

Signature-protected memories (`sig_mem`) cover the decision and
survivor-path storage around these units.

The architecture follows the published scheme "Reliable Low-Latency Viterbi
Algorithm Architectures Benchmarked on ASIC and FPGA". Where that description
stops, the choices made here are called out below and in each file's header.

---

## 1. The protected operation

All units share one interface convention:

* `lam_p1` and `lam_p2` are the two path metrics entering a state. The
  subtractor computes `lam_p1 - lam_p2`, and its borrow selects `lam_p2` when
  it is the larger metric.
* `lam_j` and `lam_k` are the two branch metrics that extend the survivor.
* Metrics are `N` = 8 bits. They are unsigned and wrap modulo 2^N, so the
  adders' carry-outs are dropped.
* The **larger** metric survives. This is the convention for metrics where
  "more is better"; the source discards the path with the smaller metric.
  To use distance metrics, invert the select in one place per unit (`sel`).

## 2. Recomputing with encoded operands (`csa_reco`, `pcsa_reco`)

This is the subtle part of the design.

Each operand set goes through the same hardware twice:

1. The **1st run** uses the operands as they are.
2. The **2nd run** uses the operands *encoded*, so that every bit lands in a
   different physical bit slice than in the 1st run.

The 2nd-run result is decoded and compared with the 1st-run result. A
permanent fault in one slice therefore damages two *different* bits of the two
results, and they disagree.

### 2.1 The three encodings (`MODE`, type `vit_pkg::reco_mode_t`)

| MODE | 2nd-run encoding | datapath width P | compared on decode |
|---|---|---|---|
| `RESO` | shift left by K | N+K | `r2 >> K` against all N result bits |
| `RERO` | zero-extend to N+1, rotate left by K | N+1 | `r2` rotated right by K against all N+1 bits |
| `M_RESO` | shift left by K, top K bits lost | N | `r2[N-1:K]` against `r1[N-K-1:0]` |

K = 2 by default. That is the two extra bits of the published RESO variant.
The same K is used for the other two modes.

**RERO and the rotated carry chain.** Rotating the operands also rotates
the positions where the carry must enter and leave. `rr_adder` is an ordinary
ripple adder whose carry chain starts at slice 0 in the 1st run and at slice
K in the 2nd run. In the 2nd run the chain runs up to slice P-1, wraps to
slice 0 and ends at slice K-1. The extra bit is a zero guard placed above the
original MSB, which sits in slice K-1 after rotation. It absorbs the MSB's
carry, so the carry never reaches the original LSB. This handles the
interaction between MSB and LSB that makes naive rotation wrong.

The subtractor is the same adder with `~b` and carry-in 1. The inversion
commutes with rotation. The guard bit of the difference is the borrow. In
the 2nd run it is found in slice K-1.

**Modified RESO and the comparison.** When the top K bits are shifted out,
the subtractor no longer sees the full metrics. Its borrow in the 2nd run is
then meaningless: comparing `x<<K` with `y<<K` modulo 2^N does not order `x`
and `y`. So in `M_RESO` mode:

* the 2nd run **reuses the 1st-run select decision**, kept in a small buffer;
* the subtractor is still checked, by comparing its N-K surviving
  difference bits between the two runs.

This is this design's resolution, not part of the published scheme. Without
it the mode raises false alarms on about half of all operand sets.
Modified RESO is the cheapest mode (no extra bits), but it has the lowest
coverage (section 6).

### 2.2 Pipeline and run order

Each unit is split into two stages by one pipeline register:

```
            stage 1                         | stage 2
CSA :  encode -> subtract -> select mux     | 2 adders -> demux -> decode+compare -> out
PCSA:  encode -> subtract, 4 adders         | 2 select muxes -> demux -> decode+compare -> out
```

Stage 2 routes each result by its run flag:

* a 1st-run result goes into a G-deep buffer (`reco_fifo`);
* a 2nd-run result is decoded and compared with the buffer head.

`out_valid` pulses one clock after a 2nd run reaches stage 2, which is two
clocks after it entered stage 1. It comes with the 1st-run results and `err`.

`reco_sched` turns a valid/ready stream into runs:

| G | run order into stage 1 |
|---|---|
| 1 (default) | N1 E1 N2 E2 N3 E3 … |
| 2 | N1 N2 E1 E2 N3 N4 E3 E4 … |
| g | g normal runs, then their g reruns in the same order |

If the input pauses with fewer than G sets waiting, the waiting sets are rerun
at once. Either way both stages are busy every cycle, and a checked result
leaves every **two** cycles. Each stage holds about half the logic of the
unprotected unit, so the clock can be roughly twice as fast. Net throughput is
therefore close to the unprotected unit's. A larger G lengthens the time
between a run and its rerun, which helps against longer-lived transients,
and costs G-deep buffers.

Rules the units rely on are checked by assertions in `reco_fifo`: no rerun
without a buffered 1st run, and no overflow.

### 2.3 Combined scheme (`SIG = 1`)

Recomputing misses a fault when it happens to damage both runs in a way that
decodes to the same wrong value. The combined form adds the signature idea of
section 3 to the recomputing pipeline:

* every stage-1 data register stores a parity bit, formed from the word at
  its input and checked at its output;
* the select mux is duplicated and compared (CSA in stage 1; PCSA in stage 2,
  with the select bit registered twice).

A signature alarm in the 1st run is stored in the result buffer beside the
result. It is ORed into `err` when the rerun completes, so the timing and
interface do not change. The source evaluates this combination but does not
say which parts carry signatures; the choice above is this design's.

## 3. Signature-protected units (`csa_sig`, `pcsa_sig`)

Every register, both the four inputs and the two outputs, carries an L-bit
signature next to its data. The default is L = 1, a parity bit. The
previous stage delivers the input signatures. The output signatures are
generated when the outputs are loaded. All of the following checks feed one
OR gate that drives `csa_error` / `pcsa_error`:

* each register's content is re-checked against its signature;
* each select multiplexer is duplicated and XOR-compared with its copy (one in
  the CSA, two in the PCSA);
* every adder is a self-checking carry-select adder (section 4). Its two-rail
  error counts while an operation is in flight.

Timing is as follows. When `in_valid` is high the input registers load. One
clock later the output registers load and `out_valid` rises. The error flag
is combinational from the registers.

`sig_gen` computes the signature for any L. Bit i is the XOR of data bits j
with j mod L = i, so L = 2 is odd/even interleaved parity.

## 4. Self-checking carry-select adder (`sc_csel_adder`)

Two ripple adders run side by side: rail 0 with carry-in 0 and rail 1 with
carry-in 1. The real carry-in selects between them through W+1 multiplexers.
The rails check each other. With carry-in 1 instead of 0, sum bit i flips
exactly when every lower bit propagates. A lower bit passes the flipped carry
on only if its rail-0 sum bit is 1. This gives

```
d1 = S0[0],   di = d(i-1) & S0[i-1]          (W-2 AND gates)
~S1[i] predicted = S0[i] XNOR di              (W-1 XNOR gates; bit 0: S0[0])
```

Each pair `(S1[i], predicted ~S1[i])` is a two-rail code word. A cascade of
W-1 `two_rail_checker`s folds the pairs into `(z1, z2)`. Fault free, z1 ≠ z2,
and `err = (z1 == z2)`. The gate counts match the published adder. The exact
inputs of the AND chain are this design's derivation. A fault on either rail
never adds delay to the sum path.

## 5. Protected memories (`sig_mem`)

This is a 2^(AYW+AXW) × DW memory addressed by row `y` and column `x`:

* **Write** (synchronous): the signature of the word is computed and stored
  with it.
* **Read** (synchronous, one clock): the signature is recomputed and
  compared with the stored one.

A fault in the address decoder returns a wrong word that is still
self-consistent. To catch it, `REINF = 1` adds a separate one-bit array,
with its own decoding, that holds each word's parity.

The top instantiates two of them:

| instance | data | address | signature | stored word |
|---|---|---|---|---|
| `u_dec_mem` (branch-metric decisions) | 4 bit | 3-bit y, 4-bit x (128) | parity | 5 bit + 1 |
| `u_smu_mem` (survivor paths) | 4 bit | 3-bit y, 3-bit x (64) | interleaved parity | 6 bit + 1 |

Plain parity misses a burst of two adjacent flipped bits. Interleaved parity
catches it. `tb_sig_mem` shows both.

## 6. Measured fault coverage

`tb_fault_campaign` injects permanent stuck-at faults into the stage-1
pipeline registers of each recomputing unit. It uses 500,000 faulty operand
sets per fault class, with operands from the 16-bit LFSR `lfsr16`
(x^16 + x^13 + x^11 + 1). One set in eleven is fault free and must come out
exact and silent. The table gives the share of **result-corrupting** faults
that raised `err` (seed-dependent to about ±0.1 %):

| unit | 1-bit | 2-bit | 3-bit | 4-bit | 1–8 bits |
|---|---|---|---|---|---|
| CSA RESO | 100 | 99.21 | 99.34 | 99.53 | 99.69 |
| CSA RERO | 100 | 99.38 | 99.63 | 99.82 | 99.85 |
| CSA modified RESO | 87.69 | 93.52 | 96.74 | 98.29 | 97.57 |
| PCSA RESO | 100 | 99.47 | 99.20 | 99.06 | 99.24 |
| PCSA RERO | 100 | 99.59 | 99.39 | 99.34 | 99.51 |
| PCSA modified RESO | 87.40 | 89.79 | 91.65 | 93.23 | 94.36 |
| CSA combined RESO | 100 | 100 | 99.98 | 99.98 | 99.99 |
| CSA combined RERO | 100 | 100 | 99.98 | 99.98 | 100.00 |
| CSA combined modified RESO | 100 | 99.90 | 99.92 | 99.95 | 99.97 |
| PCSA combined RESO | 100 | 100 | 99.99 | 99.99 | 99.99 |
| PCSA combined RERO | 100 | 100 | 99.99 | 99.99 | 100.00 |
| PCSA combined modified RESO | 100 | 99.94 | 99.96 | 99.97 | 99.98 |

The published figures are 99.5–99.9 % for RESO and RERO, "slightly less"
for modified RESO, and 99.999 % for the combined schemes. They count
detections per 500,000 injections at sites that are not stated, so only the
trend is comparable.

`tb_sig_campaign` (registers and muxes) and `tb_sc_csel_adder` (adder rails)
confirm that the signature units flag **every** activated single stuck-at
fault and never flag a non-activated one.

## 7. Top level (`viterbi_ed_top`)

One operand stream drives all eight protected units side by side:

* `csa_sig` and `pcsa_sig`;
* `csa_reco` and `pcsa_reco` in each of RESO, RERO and modified RESO
  (output index 0, 1, 2).

A single `reco_sched` feeds all six recomputing units. The sig units take each
set when it is accepted. Because the scheduler needs the rerun slot,
`in_ready` is high every other cycle when G = 1.

With `bist_en`, the operands come from the LFSR, rotated by 0, 4, 8 and 12
bits. Their parities are generated internally. This is an on-chip
pattern-source option of this design.

All eight units compute the same function, so their outputs can also be
cross-checked. The two memories have their own ports (`dec_*`, `smu_*`).

Parameters are `N` = 8, `K` = 2, `L` = 1, `G` = 1 and `MDW` = 4.
`RSIG` = 1 builds the six recomputing units in their combined form
(section 2.3); the default is 0. The LFSR
feeds operands up to N = 36.

## 8. Where this departs from the published design

* **Metric width.** N = 8 is a choice; no width is given.
* **Survivor.** The larger metric survives (see section 1).
* **Combined scheme.** Which parts carry signatures is chosen here
  (section 2.3). The result is slightly below the published 99.999 %.
* **Not built: the first self-checking adder.** It is described only by its
  cell counts. The carry-select variant (section 4) is used instead.
* **Not built: the rest of the decoder.** The BMU, the SMU's traceback logic,
  the layered P1/P2 precomputation processors and the ACS loop around these
  units are outside this RTL.
* **Modified RESO select.** It reuses the 1st-run decision (section 2.1).
* **Encoding direction and amount.** Shifts and rotations go left. K = 2
  (the RESO width) is also used for RERO and modified RESO, whose amount is
  not given.
* **Pipeline depth.** There are two stages. The general n-stage schedule
  reduces to this.
* **Two-rail checker.** It is the standard AND-OR form. The checker tree is a
  linear cascade with the same checker count.
* **LFSR.** It uses the Fibonacci form with taps 16/13/11. That polynomial
  has four terms and is not primitive. From the seed 0xACE1 its period is
  10230 rather than 2^16-1.
  It is kept as specified because it only generates test patterns.
* **Decision memory size.** The source gives both 8 x 16 entries and "16
  entries" for its example. The 8 x 16 (128-entry) reading is built.
* **Fault sites.** The coverage campaign injects stuck-at faults into the
  stage-1 pipeline registers. The source does not say where it injects.
* **Reset.** It is asynchronous and active low. Memory arrays are not reset.

## 9. Simulating

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vit_pkg.sv tb/tb_viterbi_ed_top.sv --top-module tb_viterbi_ed_top
./obj_dir/Vtb_viterbi_ed_top
```

The same command works for any `tb/tb_*.sv`:

| testbench | what it shows |
|---|---|
| `tb_viterbi_ed_top` | all eight units at default parameters, 350 operand sets (300 from the stream, 50 from the LFSR), stalls, reruns, error detection of each family, memory traffic |
| `tb_csa_sig`, `tb_pcsa_sig` | results, latency, output parity, detection of input parity, register, mux and adder faults |
| `tb_csa_reco`, `tb_pcsa_reco` | all three modes, G = 1 and G = 2, results, latency, upset detection |
| `tb_reco_sched` | run orders for G = 1, 2, 3, throughput, pauses |
| `tb_sc_csel_adder` | exhaustive 8-bit addition, stuck-at campaign on both rails |
| `tb_two_rail_checker` | exhaustive |
| `tb_sig_mem` | the two example memory contents and their signatures; single-bit, burst and decoder faults |
| `tb_lfsr16` | seed, hold, load, recurrence |
| `tb_fault_campaign` | section 6 table, plain and combined units (about 90 s) |
| `tb_sig_campaign` | single stuck-at campaign on the signature units |

Fault injection in the testbenches writes registers hierarchically or uses
`force`. Verilator applies a `force` on a signal inside one instance of a
module to the other instances of that module too, so `force` is used only
where a module is instantiated once.

## 10. Files

* `rtl/vit_pkg.sv`: mode enum and width function.
* Units: `rtl/csa_sig.sv`, `rtl/pcsa_sig.sv`, `rtl/csa_reco.sv`,
  `rtl/pcsa_reco.sv`.
* Building blocks: `rr_adder`, `reco_enc`, `reco_cmp`, `reco_fifo`,
  `reco_sched`, `sc_csel_adder`, `two_rail_checker`, `sig_gen`, `sig_mem`,
  `lfsr16`.
* `rtl/viterbi_ed_top.sv`: the top level.
