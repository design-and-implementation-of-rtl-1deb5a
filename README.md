# Motion-artifact reduction for wearable ECG: an LMS filter without multipliers

When a patient moves, the electrodes of a wearable ECG recorder shift on the
skin. The resulting motion artifacts are as large as the ECG itself and share
its frequency band, so a fixed filter cannot remove them. This design removes
them with an adaptive LMS (least mean squares) filter. The goal is a small,
low-power filter core, so no multiplier is used anywhere. Every product is
read from a small look-up table (LUT) of multiples of one operand. The table
is made four times smaller than a plain product table by two encodings:

* **APC** (anti-symmetric product coding) stores only half the products.
* **OMS** (odd multiple storage) stores only the odd multiples and makes the
  even ones by shifting.

Together they reduce the table for a 5-bit operand to **9 words**.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It simulates with
plain Verilator 5.

## Signal flow of the adaptive filter

```
  x(n): ECG with motion artifact ──┬──► transversal filter w(n) ──► y(n): enhanced ECG
                                   │                                │
                                   │                      d(n) ──► Σ ──► e(n) = d(n) - y(n)
                                   │                                       │
                                   └──────► adaptive weight control ◄──────┘
                                            w(n+1) = w(n) + mu·x(n)·e(n)
```

* The primary input `x` is the recorded, artifact-laden ECG.
* The reference input `d` is the desired signal, an artifact-free ECG.
* The filter output `y(n) = Σ_{i=0}^{L-1} w_i(n)·x(n-i)` is the enhanced ECG.
* The LMS rule moves every weight along `x(n-i)·e(n)`. Over time this makes
  `y` follow `d`.

There are two kinds of multiplication, and both use APC-OMS tables:

| product | LUT holds multiples of | addressed by | tables |
|---|---|---|---|
| `w_i · x(n-i)` (filter) | weight `w_i` | sample `x(n-i)` | one per tap |
| `e(n) · x(n-i)` (update) | error `e(n)` | sample `x(n-i)` | one, shared by all taps |

## APC-OMS multiplication of a 5-bit digit

This is the core of the design and the part that takes most care to follow.
Let `A` be the fixed operand (a weight, or the error). Let `X = x4..x0` be a
5-bit unsigned digit. The product `X·A` lies in `0..31A`.

**Anti-symmetric coding.** Write every product around the midpoint 16A:

* For `x4 = 1`: `X·A = 16A + X'·A`, with `X' = X[3:0]`.
* For `x4 = 0`: `X·A = 16A - X'·A`, with `X'` the 4-bit two's complement of `X[3:0]`.

This leaves only the 16 values `X'·A`, `X' = 0..15`, to store.

**Odd multiple storage.** Each nonzero `X'` is an odd number times a power of
two. Only the odd multiples A, 3A, …, 15A are stored. The shift count is the
number of trailing zeros of `X'`, and the address comes from `X'` with those
zeros removed (`X''`):

```
s1 = ~(x0' | x1')              s0 = ~x0' & (x1' | ~x2')    shift = {s1,s0}
X'' = X' >> shift              d  = { ~x0'', x3'', x2'', x1'' }
```

Two inputs need special handling:

| X | X' | what happens | result |
|---|---|---|---|
| `10000` | `0000` | `RESET = x4 & ~(x3|x2|x1|x0)` clears the shifter output | 16A + 0 = 16A |
| `00000` | `0000` | address `1000` reads the ninth word, 2A; shift 3 gives 16A | 16A − 16A = 0 |

The table therefore holds exactly 9 words:

| address d | 0000 | 0001 | 0010 | 0011 | 0100 | 0101 | 0110 | 0111 | 1000 |
|---|---|---|---|---|---|---|---|---|---|
| word | A | 3A | 5A | 7A | 9A | 11A | 13A | 15A | 2A |

Three worked examples:

* `X = 00001`: `X' = 1111`, shift 0, address 0111 (15A); `16A − 15A = A`.
* `X = 01100`: `X' = 0100`, shift 2, address 0000 (A), shifted to 4A; `16A − 4A = 12A`.
* `X = 11010`: `X' = 1010`, shift 1, address 0010 (5A), shifted to 10A; `16A + 10A = 26A`.

`apc_oms_addr_gen` is tested against this arithmetic for all 32 digits.

**Wider, signed samples.** Samples are 16 bits and signed. `lut_multiplier`
first flips the sign bit, which turns the sample into the unsigned offset
value `u = x + 2^15`. It splits `u` into four 5-bit digits (20 bits, zero
padded). Each digit goes through its own `apc_oms_unit`, and all four units
read the same 9-word table. The product is then

```
x·A = Σ_k (u_k·A) << 5k  −  A << 15
```

All arithmetic is two's complement, so negative `A` works without extra
logic. A table word is `COEF_W + 5` bits wide, enough for ±31A.

## Configurable tables and the per-sample schedule

The weights change after every sample, so the tap tables must be refilled
each time. `apc_oms_lut` refills itself from a single `load` pulse. It writes
one word per clock from an accumulator that starts at A and adds 2A per
step (A, 3A, …, 15A), then writes 2A. A fill takes 9 cycles, and `ready`
stays low meanwhile. This costs one adder per table, with no multiplier.

`lms_core` handles one sample pair per pass of its sequencer:

| state | work | cycles |
|---|---|---|
| `S_IDLE` | wait for `in_valid`; shift `x` into the delay line, latch `d` | 1 |
| `S_FILTER` | register `y(n)`, `e(n)`; `out_valid` pulses in the next cycle | 1 |
| `S_ADAPT` | hand-off; error table fill (9); see ready (1); update all weights at once (1); pass `done` on | 1 + 11 + 1 |
| `S_WLOAD` | refill all tap tables in parallel with the new weights (9), then return | 9 + 1 |

From one accepted sample to the next, the core takes **25 clock cycles** with
adaptation on. With `adapt_en` low, the weights and tables stay fixed and a
sample takes **2 cycles**. A 360 Hz ECG stream therefore needs a clock of
only about 9 kHz. No clock frequency is prescribed.

## Number formats

| quantity | format | parameter |
|---|---|---|
| samples `x`, `d`, `y`, `e` | signed 16 bit | `DATA_W` |
| weights `w_i` | signed 16 bit, Q2.14 (range ±2) | `COEF_W`, `COEF_FRAC` |
| filter length | 8 taps | `TAPS` |
| step size | `w += (x·e) >>> 20`, i.e. mu = 2^-20 in integer units | `MU_SHIFT` |

* `y` is the full-precision sum shifted right by 14 (rounded toward −∞).
* `y`, `e` and each weight saturate to their width.
* Saturation is reported on `sat_flag` at the top level.

All these values are defaults in `rtl/mar_pkg.sv`, and every module takes
them as parameters. They are this design's choices. The published scheme
fixes only the 5-bit digit, the 9-word table and the shift range 0..3.

## Modules

| module | role |
|---|---|
| `mar_pkg` | widths, constants, state enums |
| `ecg_mar_top` | top: handshake from the ADC side, `enable`, 11-bit output counter, saturation flag |
| `lms_core` | error summer `e = d − y`, sequencer, `adapt_en` |
| `transversal_filter` | delay line; per tap an `apc_oms_lut` and a `lut_multiplier`; adder, scaling, saturation |
| `adaptive_weight_control` | shared error table; per tap a `lut_multiplier`; weight registers and update |
| `lut_multiplier` | signed 16×16 product from four APC-OMS digits |
| `apc_oms_unit` | one digit: address generator → table read → barrel shifter → add/sub |
| `apc_oms_addr_gen` | X' generation, address `d`, shift `s`, `RESET`, add/sub select |
| `apc_oms_lut` | 9-word configurable table with sequential fill and N read ports |
| `apc_oms_barrel_shifter` | `word << s`, cleared by `RESET` |
| `apc_oms_addsub` | `16A ± shifted word` |

## Top-level interface (`ecg_mar_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (weights and tables cleared) |
| `enable` | in | 1 | when low, no sample is accepted |
| `adapt_en` | in | 1 | when low, the weights are frozen |
| `adc_valid` / `adc_ready` | in / out | 1 | a sample pair is taken on a clock edge where both are high |
| `ecg_x`, `ecg_d` | in | 16 | primary (artifact-laden) and reference sample |
| `out_valid` | out | 1 | one-cycle pulse: `ecg_out`, `err_out` hold a new result |
| `ecg_out`, `err_out` | out | 16 | enhanced ECG `y(n)` and error `e(n)` |
| `weights` | out | 8×16 | current weights |
| `count` | out | 11 | number of results produced, wrapping |
| `sat_flag` | out | 1 | saturation in the result just produced, or in a weight update |

The analog side of the recorder is not part of this RTL: the electrodes, the
high-CMRR instrumentation amplifier and the ADC. Its samples enter through
`ecg_x` / `ecg_d`. The recorder also has a power-management unit and a memory
beside the filter core, but their functions are not specified, so they are
not modelled and have no ports here.

## Where this design fills in or departs from the published scheme

* **Shift selects.** The shift-select and address equations were re-derived
  so that they reproduce the published OMS table row by row.
  * The shift counts are trailing zeros (e.g. `1000 → 0001`).
  * `d3` is the complement of `x0''`.
  * `s0` has the form above. A simpler form, `s0 = ~(x0'|x1'|x2')`, gives
    wrong shifts for inputs such as `0010`.
* **RESET location.** RESET clears the barrel-shifter output. The block
  diagram draws the RESET line into the table instead. Both give the same
  product.
* **Wider operands.** Only 5-bit operands are defined in the source. The
  digit splitting and offset-binary sign handling for 16-bit samples are
  this design's own.
* **Update products.** The weight update also uses a table multiplier,
  through one shared table of error multiples.
* **Own choices.** The following are also this design's own: the sequential
  table fill, the valid/ready handshake, the 25-cycle schedule, `adapt_en`,
  saturation, reset values, and all widths and the step size.
* **Signal names.** `enable` and the 11-bit `count` follow the signal names
  of the reference simulation. Their behaviour here (gating input,
  counting results) is chosen.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/lms_ref_pkg.sv` is a plain-integer model of the filter (no tables). The
testbenches above `lut_multiplier` compare every output and every weight
against it bit for bit.

* `tb_apc_oms_addr_gen`: exhaustive over 32 digits. It also rebuilds `X·A`
  from address and shift.
* `tb_apc_oms_unit`, `tb_lut_multiplier`: all digits, or random and corner
  16-bit operands, against `x·a`.
* `tb_apc_oms_lut`: table contents and the 9-cycle fill, including a restart
  during a fill.
* `tb_transversal_filter`, `tb_adaptive_weight_control`: random weights,
  taps and errors; saturation; refill and update latencies.
* `tb_lms_core`: identifies an unknown 8-tap FIR. It checks the error
  reduction, the 25- and 2-cycle sample periods, random input gaps and
  frozen weights.
* `tb_ecg_mar_top`: runs with all default parameters. The input is 3600
  samples (10 s at 360 Hz) of a synthetic ECG (P, QRS, T), plus an artifact
  at half and quarter sample rate. The adapted filter must reduce the error
  to below a quarter of the artifact. The test counts and requires each of
  the following to occur: adaptation, frozen weights, `enable` stalls,
  busy back-pressure, saturation, the `RESET` and `2A<<3` digit paths, and
  counter wrap. The test does not use recorded patient data.

To run a testbench, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mar_pkg.sv tb/lms_ref_pkg.sv tb/tb_ecg_mar_top.sv \
    --top-module tb_ecg_mar_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_ecg_mar_top` with its name. Verilator
finds the other modules through `-Irtl -Itb`. Every testbench finishes in
well under a second.

To change the configuration, edit the defaults in `rtl/mar_pkg.sv`, or pass
parameters to `ecg_mar_top` (`L`, `X_W`, `A_W`, `FRAC`, `MU_SH`, `CNT_W`).
The 5-bit digit and the 9-word table are fixed by the encoding.
