# Variable-channel floating-point FastICA processor for EEG

This is a single-precision (IEEE-754 binary32) hardware engine for FastICA, or
independent component analysis. It separates 2 to 16 mixed EEG channels of 512
samples each into independent components. It also offers three simple EEG
utilities: re-referencing, synchronised (trial) averaging and moving averaging.

The design's main idea is how it whitens the data. Whitening usually takes an
eigenvalue decomposition of the covariance matrix, which needs a dedicated and
expensive unit. Here the centred channels are instead made orthonormal with
Gram-Schmidt and then scaled by sqrt(512). That needs only multiply-adds, one
inverse square root per vector and a power-of-two division.

The same Gram-Schmidt routine also orthonormalises the weight matrix W in every
FastICA iteration. This lets two small, identical processing units (PU1 and
PU2) do all the work:
- the centering,
- the fixed-point update of the weight vectors,
- whitening and orthonormalisation (PU1 only),
- the three EEG utilities.

At the default size, one 16-channel FastICA iteration takes 345,861 clock
cycles. At 100 MHz, the worst case of 511 iterations takes 1.77 s. That fits
the 2 s real-time window of 512 samples at 256 Hz.

## Block structure

```
             instr ──► fastica_ctrl ──(task, start/done)──► pu (PU1, HAS_GS=1) ──┐ port A
 din ─► fix2float ─┘        │  ▲                            pu (PU2, HAS_GS=0) ──┼ port B
 dout ◄──────────────────── │  └────────── port A when PU1 idle ─────────────────┤
                            ▼                                            data_mem (2 ports)
 pu = maa_unit + temp_mem + div_pow2 + pwl_lut + inv_sqrt (PU1 only) + task sequencer
```

| file | what it is |
|---|---|
| `rtl/fica_pkg.sv` | Shared types: FP32 word, instruction, PU task descriptor. Shared functions: FP32 multiply, add, rounding, int-to-float. |
| `rtl/fastica_top.sv` | Top level. Contains the controller, PU1, PU2, the data memory, and the port-A multiplexer. |
| `rtl/fastica_ctrl.sv` | Instruction decoder and sequencer. Handles LOAD and OUTPUT streaming and the FastICA iteration loop, and sends tasks to the PUs. |
| `rtl/pu.sv` | Processing unit. A vector-operation engine around one MAA (multiply-and-add) unit, plus the per-task sequences. |
| `rtl/maa_unit.sv` | `a*b + c` in FP32. Not fused: the product and the sum are each rounded. |
| `rtl/div_pow2.sv` | Divides by 2^λ by subtracting λ from the exponent. |
| `rtl/inv_sqrt.sv` | `x^-1/2`: the magic-constant initial estimate followed by 3 Newton-Raphson steps. |
| `rtl/pwl_lut.sv` | Piecewise-linear tanh. Returns slope α and offset β. |
| `rtl/temp_mem.sv` | Per-PU scratch memory. |
| `rtl/fix2float.sv` | Converts integers to FP32 for fixed-point LOAD. |
| `rtl/data_mem.sv` | Two-port memory for the signals and two weight banks. |

## Instructions

Instructions are 32 bits: `{op[31:29], p1[28:24], p2[23:15], p3[14:0]}`. Each
one runs to completion. `instr_ready` is high only while the processor is idle,
and `done` pulses once when the instruction ends.

| op | name | p1 | p2 | p3 | effect |
|---|---|---|---|---|---|
| 0 | LOAD | channels n | 511: fixed point, 0: FP32 | – | Reads n·M words from `din`, channel by channel. Fixed-point words are 32-bit two's-complement integers. |
| 1 | OUTPUT | channels n | 511: weights, 0: signals | – | Sends n·M signal words, or the n×n matrix W row by row, on `dout`. |
| 2 | FASTICA | n (2–16) | max. iterations (1–511) | threshold | Centering, whitening, then iterations until converged or the limit is reached. The whitened Z replaces the signals. |
| 3 | REREF | n | baseline channel | – | Sets x_i ← x_i − x_baseline for every channel except the baseline. |
| 4 | SYNAVG | trials h ∈ {2,4,8,16} | – | – | Channel 0 becomes the average of channels 0..h−1. |
| 5 | MOVAVG | window r ∈ {2,4,8,16} | target channel | – | Replaces the target channel with its r-point moving average. Samples before the first one count as zero. |

The FASTICA threshold is the top 15 bits of an FP32 number, so the value used is
`{p3, 17'b0}`. For example, `15'h1CC0` is 2^-12 ≈ 2.4e-4.

The data ports use valid/ready handshakes:
- LOAD takes one word per cycle.
- OUTPUT sends one word per two cycles, because each word needs a memory read.

After FASTICA, `converged` and `iter_count` report how the run ended.

The separated components are not computed on-chip, which follows the source
architecture. They are `Y = W·Z`, and the host forms them from the OUTPUT of W
and of Z.

## Memory map

The data memory has NCH·M + 2·NCH² words: 8704 at the defaults.

| address | contents |
|---|---|
| `c·M + j` | sample j of channel c. This region holds the input, then the centred signals, then the whitened Z. |
| `NCH·M + s·NCH² + i·NCH + c` | component c of weight vector w_i in bank s (s = 0 or 1) |

FastICA needs the old W and the new W at the same time: the update reads the
old one, and the convergence test compares the two. So there are two weight
banks. Iteration k reads bank `sel` and writes bank `~sel`, and the banks
alternate after each iteration. OUTPUT of the weights always reads the bank
written last.

Port A belongs to PU1 while PU1 is busy and to the controller otherwise. Port B
belongs to PU2. The controller only ever gives the two PUs tasks that touch
different channels, different weight vectors or different sample indices.

## Inside a processing unit

Each PU runs one task at a time from a descriptor (`pu_task_t`). Every task is
a chain of vector operations on one engine. For each element, the engine:
1. reads operand P from the data memory (1 cycle, optional);
2. reads operand Q from the data memory and operand T from the temporary memory (1 cycle);
3. computes `a*b + c` and writes the result (1 cycle).

The a, b and c operands are each chosen from P, Q, T, the scalar registers
ACC, K and K2, and the constants 0 and 1. The result goes to ACC, K, K2, the
temporary memory or the data memory.

An element therefore costs 2 cycles, or 3 when both operands come from the data
memory. The memory has a one-cycle read and one port per PU, and that is the
limit on throughput. Between vector operations the sequencer runs the scalar
steps: the PWL lookup, the division by 2^λ and the inverse square root.

| task | what the PU does | PU |
|---|---|---|
| CENTER c | Sum the channel, divide by 2^9, subtract the mean in place. | 1, 2 |
| UPDATE i | For each sample j: form y = w_i·z_j, look up α and β, form g = α·y + β, add z_j·g into n accumulators, and add α into Σα. Then write w_i⁺ = Σ z_j·g − (Σα)·w_i into the other bank. | 1, 2 |
| GS | Classical Gram-Schmidt over n vectors. Each vector has its projections onto the earlier (already normalised) vectors removed, then is scaled by `s/‖v‖` using inv_sqrt. s is √M for the signals (unit variance) and 1 for W. | 1 |
| CONV | Compute n − Σ_i \|w_old,i · w_new,i\| and compare it with the threshold. | 1 |
| REREF c | x_c(j) ← x_c(j) − x_base(j) | 1, 2 |
| SYNAVG j | y(j) = (Σ_trials x_t(j)) / 2^λ | 1, 2 |
| MOVAVG j | y(j) = (Σ_{k<r} x(j−k)) / 2^λ | 1, 2 |

The dot products of UPDATE use a copy of w_i kept in the temporary memory.
Therefore each sample needs only data-memory reads of z.

The division by M that belongs in the update is left out. It does not change
the direction, and the Gram-Schmidt step that follows normalises the vector
anyway.

PU2 has no inverse-square-root unit and no GS or CONV sequences (`HAS_GS = 0`),
and its temporary memory is 2·NCH+1 words instead of M.

### The FastICA sequence (controller)

1. Load W = identity into bank 0. The start vectors only need unit norm.
2. CENTER channels (0,1), (2,3), … on PU1 and PU2 in parallel.
3. GS of the n centred channels on PU1. This is the whitening step, and the
   result Z replaces the signals.
4. Each iteration then runs these steps:
   1. UPDATE w_(0,1), w_(2,3), … on PU1 and PU2.
   2. GS of the new bank on PU1.
   3. CONV on PU1.
   4. Swap the banks.
5. The run stops when CONV reports convergence or after p2 iterations.

Sign flips between iterations are not a problem because the test uses |w_old·w_new|.

### Nonlinearity

The nonlinearity is g = tanh, with g′ = 1 − tanh². Both come from one line
segment: g(u) ≈ αu + β and g′(u) ≈ α.

There are 16 segments of width 0.25 on |u| < 4. Each segment is the chord of
tanh across it:

```
α_s = (tanh(0.25(s+1)) − tanh(0.25s)) / 0.25
β_s = tanh(0.25s) − α_s · 0.25s
```

Beyond |u| = 4, α = 0 and β = ±1. The segment number comes directly from the
exponent and the top three mantissa bits, so there is no comparator chain.

### Arithmetic

- Multiplication and addition round to nearest even, and subnormals flush to zero.
- The MAA unit rounds twice, once after the product and once after the sum.
- inv_sqrt takes 14 cycles and is accurate to a few ulp.
- div_pow2 is exact unless the result underflows, in which case it flushes to signed zero.

## Timing

| operation (n = 16, M = 512) | cycles |
|---|---|
| LOAD | n·M (one word per cycle) |
| OUTPUT signals | 2·n·M |
| Preprocessing (centering + whitening) | 390,629 |
| One FastICA iteration (update + GS + CONV) | 345,861 |
| 511 iterations, worst case | 177.1 M (1.77 s at 100 MHz) |

The update dominates: about 2·(2n) cycles per sample per weight vector, with
two vectors in flight. REREF takes 3 cycles per sample. SYNAVG and MOVAVG take
about 2 cycles per summed term, plus a fixed overhead for each sample.

## Measured quality

The full-size test (`tb/tb_fastica_full.sv`) uses 16 artificial sources of
eight kinds (sinusoids, square, sawtooth, sparse spikes, uniform noise, and
others). They are randomly mixed, quantised to 12-bit integers, loaded as fixed
point, and separated with a threshold of 2^-12.

The run converged in 26 iterations. Each source was recovered with
|correlation| 0.972 on average and 0.833 at worst. The whitened signals had unit
covariance, and W came out orthonormal.

The 4-channel EEG-like test (alpha rhythm, eye blinks, muscle-like noise and
drift at 512 samples) converges in 6 iterations, taking 242 k cycles. Every
component, the blink included, is recovered with |correlation| > 0.99.

The reduced-size end-to-end test (4 channels, 256 samples) recovers each source
with |correlation| of at least 0.98 in 5 iterations.

## Where this design makes its own choices

The instruction set, its field widths and ranges, the PU contents, the PU1/PU2
split of the work, the Gram-Schmidt whitening and the use of 2^λ division
follow the source architecture. The following are this design's own choices:

- **Host interface.** Separate valid/ready ports for instructions, input data and output data.
- **Fixed-point input.** 32-bit integers, with no fraction bits (`fix2float` has a `FRAC` parameter).
- **Start value of W.** The identity matrix. This is deterministic and has no random source.
- **Convergence rule.** `n − Σ|w_old·w_new| < threshold`, with the threshold given as the top 15 bits of an FP32 number.
- **Second weight bank.** An extra bank holds the new W.
- **Nonlinearity tables.** The PWL segment layout and its table values.
- **inv_sqrt design.** Magic constant followed by Newton-Raphson.
- **Result locations.**
  - FASTICA leaves Z in place of the signals.
  - SYNAVG writes its result to channel 0.
  - MOVAVG works in place, from the last sample backwards.
  - REREF leaves the baseline channel unchanged.
- **MOVAVG start-up.** Zero padding at the start of the signal.
- **Element timing.** The vector-operation engine's element timing, and hence every cycle count above.
- **Data memory.** Written as one array with synchronous reads. On a synthesis target it should map to a two-port RAM macro.

Values outside the documented ranges are not trapped. This applies to p1 for
SYNAVG and MOVAVG outside {2,4,8,16}, and to FASTICA with n < 2, which is only
covered by an assertion. Checks on these are left to the host.

## Simulating

Every testbench is self-checking and ends with a
`TB_RESULT checks=… failures=…` line. Each also has a watchdog. Compile the
package first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fica_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_fastica_top.sv \
  --top-module tb_fastica_top -Mdir obj_top
./obj_top/Vtb_fastica_top
```

| testbench | what it covers |
|---|---|
| `tb_fastica_full` | Default size (16×512). One full FASTICA run, with quality and 1.85 s timing checks. Takes about 10 s. |
| `tb_fastica_workloads` | Default size. A 4-channel EEG-like recording with eye blinks (alpha rhythm, blinks, noise, drift), a 2-channel run, REREF over 16 channels, SYNAVG over 16 trials, a 16-point MOVAVG, and an iteration-limit stop. |
| `tb_fastica_top` | 4×256, every instruction end to end. Counts each mechanism: fixed and float LOAD, weight and signal OUTPUT, convergence and iteration-limit stops, baseline skip, moving-average start-up, odd channel count. |
| `tb_fastica_ctrl` | The controller alone, with stub PUs. Checks task order, bank alternation and the streaming ports. |
| `tb_pu` | One PU against a behavioural memory. Every task is checked against real-arithmetic models, along with the REREF latency. A second unit in the PU2 configuration runs the shared tasks on a copy of the memory, and the two must match bit for bit. |
| `tb_maa_unit`, `tb_div_pow2`, `tb_inv_sqrt`, `tb_pwl_lut`, `tb_fix2float`, `tb_temp_mem`, `tb_data_mem` | The arithmetic and memory blocks against independent models. `tb/tb_fp_pkg.sv` holds the real-number to FP32 conversions. |

To change the size, set `NCH` (at most 16, because of the 5-bit p1 field) and
`M` (a power of two) on `fastica_top`. The memory grows as NCH·M + 2·NCH². GS
uses √M as a constant, worked out at elaboration from log2(M).
