# Radix-4 turbo decoder for the CCSDS rate-1/3 code

This is a synthesizable SystemVerilog turbo decoder for the deep-space
telemetry turbo code standardised by CCSDS. The code uses two 16-state
recursive convolutional encoders:

- feedback polynomial 1 + D³ + D⁴;
- parity polynomial 1 + D + D³ + D⁴;
- the CCSDS block interleaver between them.

The default frame length is K = 1784 information bits.

The decoder combines four hardware ideas:

- **Radix-4 trellis processing.** Each clock cycle covers two trellis stages, so one pass over the frame takes about K/2 cycles instead of K.
- **Offset-add-compare-select (OACS) recursion.** The log-MAP correction term is not added inside the critical loop. It is kept as a 2-bit offset next to each state metric and added in the next step. The compare step uses a hybrid carry-save subtractor and a "generalized" look-up table that reads a signed difference directly.
- **Sliding-window schedule.** Three recursion units run in parallel: forward, backward, and a "dummy" backward unit that estimates window-border metrics. Four small single-port window buffers hold the input symbols, and only two windows of forward metrics need to be stored.
- **HDA2 early stopping.** Decoding stops as soon as both component decoders produce the same hard decision for every bit, which is checked from the second iteration on. Otherwise it stops after 8 iterations.

## Number formats

All soft values are two's complement in units of 0.25, i.e. two fraction bits.

| quantity | bits | format | notes |
|---|---|---|---|
| channel input (systematic, parity 1, parity 2) | 5 | 3.2 | range −4.0 … +3.75 |
| extrinsic / a-priori value | 6 | 4.2 | saturated |
| state metric | 10 | unsigned 8.2 | plus a 2-bit pending offset (OACS) |
| radix-4 branch metric | 9 | signed | |
| LLR datapath | 14 | signed | |

- Bit 1 is transmitted as +1. A decision is bit 1 when its LLR is ≥ 0.
- The channel reliability factor is fixed at Lc = 1.5, computed as 3y/2.
- The branch metric of one stage is (u·(Lc·ys + La) + p·Lc·yp)/2, where u, p ∈ {±1}. The halving is an arithmetic shift.
- Extrinsic output Le = LLR − (Lc·ys + La). During iterations 1–3 it is multiplied by 0.75, computed as e − e/4. From iteration 4 on it is not scaled.

### Metric normalization

State metrics are unsigned 10-bit values. If any candidate of any of the 16 nodes exceeds 960, every new metric of that step is reduced by 256. The 16 overflow flags are ORed to make this decision, so all states move together and their differences are preserved. A value that would fall below zero is clamped to 0. This only happens to states far below the best one, where the exact value no longer matters.

### Start values

| recursion | start value |
|---|---|
| forward recursion | state 0 at 256, all other states at 0 |
| backward recursions (dummy beta, and beta of the last window) | every state at 256 |

## The radix-4 OACS node (`acs_r4`, `hybrid_sub`, `glut`)

This node is the heart of the design and the part that is hardest to follow.

A radix-4 step merges four paths into each state. Path i arrives with:

- a stored metric value `a_i`;
- its pending correction `b_i` (0…3 quarter units) from the previous step;
- a branch metric `δ_i`.

The ideal new metric is max*(c0, c1, c2, c3), where c_i = a_i + b_i + δ_i.

The node works in five stages:

1. **One-stage carry-save adder.** Each c_i is reduced to a carry-save (sum, carry) pair. A normal adder also turns each pair into a binary candidate, which becomes the output value if that path wins.
2. **Hybrid subtraction.** `hybrid_sub` computes c0 − c1 and c2 − c3 directly from the carry-save pairs.
   - Two rows of full adders with inverted subtrahend inputs reduce four vectors to two.
   - The two "+1" terms of the two's-complement negations enter the second row.
   - A single carry-propagate adder finishes the subtraction.
   - The sign of each difference picks the winner of its pair.
3. **GLUT.** The value of each difference addresses a `glut`, which returns ln(1+e^−|x|) rounded to quarter units: 0.75 at 0, 0.5 for 0.25–0.75, 0.25 for 1.0–1.75, and 0 from 2.0 on.
   - It does not compute |x| first. A range detector looks at the sign and the bits above bit 2 to decide whether |x| < 2.0.
   - An 8-entry table uses the sign and the three low bits, which for negative x encode 8 − |x|.
4. **Four comparators.** Comparators (0–2, 0–3, 1–2, 1–3) decide between the two pair winners. This realises max*(w,x,y,z) ≈ max(max*(w,x), max*(y,z)).
5. **Output.** The node outputs the winning candidate as the new `a`, and the winning pair's correction as the new `b`.

The correction therefore stays off the critical path: it is added in the carry-save stage of the next step.

`sm_unit` holds 16 such nodes, their registers and the trellis wiring. The same module is used forward (node s reads the four states that reach s in two steps) and backward (node s reads the four states s reaches). The encoder state is {r1, r2, r3, r4}, with r1 the newest feedback bit. The trellis tables are computed at elaboration from the generator polynomials in `turbo_pkg`.

### Branch labels

`bmu_r4` uses a radix-2 label {xs⊕xp, xs}. With this label, label 0 is the negation of label 1 and label 2 is the negation of label 3. As a result, only 8 of the 16 radix-4 metrics need adders; the other 8 are negations.

## LLR unit (`lcu_r4`, `max_star`)

For each radix-4 step, the LLR unit builds all 64 path sums α(k−2, s′) + δ + β(k, s), using OACS values expanded to a + b. Then, for each of the two bits:

- two 32-input trees of `max_star` units combine the paths with that bit = 1 and the paths with that bit = 0;
- the two tree results are subtracted.

Both LLRs come out of one output register, one cycle after the inputs.

## Sliding-window schedule (`siso_r4`)

A component pass cuts the K/2 radix-4 steps into windows of W/2 = 16 steps (W = 32 trellis stages). For K = 1784 there are 56 windows, and the last one has 12 steps.

Phase p lasts 16 cycles. In phase p, window p streams in from the frame memory, last step first, two trellis stages per cycle. It is written to window buffer p mod 4, one of four small single-port memories of 16 words (one word per radix-4 step). Three units work on three different windows:

| unit | window | what it does |
|---|---|---|
| dummy beta | p | runs backward on the streaming symbols from a uniform start; its final value is the backward metric at the border between windows p − 1 and p |
| alpha | p − 1 | reads window buffer (p − 1) mod 4 from the far end (forward order), and writes each step's start metrics into the alpha RAM |
| beta | p − 2 | starts from the dummy unit's border value, reads window buffer (p − 2) mod 4 in the order it was written (backward), reads the alpha metrics of that window back in reverse, and feeds the LLR unit |

In each phase, each window buffer is either written or read by exactly one unit, never both. This is why single-port memories are enough.

The last window's beta starts from uniform metrics: the frame is decoded without its tail stages, so the final state is treated as unknown.

### Pass length and latency

- The branch metric units register their inputs, so the recursions and the LLR unit run one cycle behind the address and buffer stage.
- A pass takes (NWIN + 2)·W/2 + 3 cycles, which is 931 cycles at the defaults. For comparison, (K + 2W)/2 = 924.
- The LLRs of a window appear in reverse order, one radix-4 step per cycle.
- The unit requests the soft inputs of two trellis stages per cycle through `req_k`. It expects them on `sym` in the same cycle, so the caller can place the interleaver in the address path.

The alpha RAM holds one window: 16 words × (16 × 12 bits). Even windows store step i at address i, odd windows at address 15 − i. With that, the word beta reads in a given cycle is exactly the word alpha overwrites in that cycle. The read sees the old contents, so one window of space is enough.

## Iterations and interleaving (`turbo_decoder`)

The input buffer keeps the frame in natural order. A single extrinsic memory, also in natural order, carries the a-priori values between passes. Each iteration has two passes:

| pass | systematic and a-priori values | parity | extrinsic written to |
|---|---|---|---|
| pass 1 (natural trellis) | read at k | parity 1, read at k | k |
| pass 2 (interleaved trellis) | read at π(k) | parity 2, read at k | π(k) |

In pass 2, writing to π(k) de-interleaves the output for free.

The interleaver table π is built once after reset by `ccsds_perm_gen`, which takes K cycles. That generator evaluates the CCSDS formula incrementally, one address per cycle, with no multiplier or divider.

### Early stopping

- During pass 1, each hard decision is stored.
- During pass 2, `hda2_stop` compares each new decision with the stored one for the same bit.
- At the end of an iteration ≥ 2 with no difference, decoding stops. Decoding also stops at MAX_ITER = 8.
- The hard decisions of the final pass 2 are then sent out in natural order.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous reset, active high |
| enable | in | 1 | a loaded frame is decoded only if enable is high when loading ends |
| in_valid | in | 1 | a symbol triple is present |
| systematic, parity1, parity2 | in | 5 each | soft inputs, 3.2 two's complement |
| in_ready | out | 1 | the decoder accepts a new frame |
| iteration | out | 5 | iterations performed for the current/last frame |
| out_valid | out | 1 | decoder_out holds a decoded bit |
| decoder_out | out | 1 | decoded bit, natural order |

### Operation sequence

1. After reset, wait for `in_ready`. The interleaver table takes K cycles to build.
2. Send the K symbol triples on consecutive cycles with `in_valid` high.
3. Decoding takes about 2 × 935 cycles per iteration.
4. The K output bits then leave on consecutive cycles.

### Measured cycle counts

These are at the defaults, from the end of loading to the first output bit:

- 3733 cycles for 2 iterations;
- 14929 cycles for 8 iterations.

## How far it is verified

Every module has a self-checking testbench in `tb/` with a reference model written independently of the RTL:

| testbench | what it checks |
|---|---|
| `tb_glut` | exhaustive over all inputs |
| `tb_hybrid_sub` | against integer arithmetic |
| `tb_acs_r4` | against max* of the explicit candidates, including normalization and clamping |
| `tb_bmu_r4` | against real-valued branch metrics |
| `tb_sm_unit` | forward and backward, with the trellis derived from an encoder model |
| `tb_lcu_r4` | against the exact log-MAP LLR computed in floating point, within 1.0 |
| `tb_ccsds_perm_gen` | against the CCSDS formula for 1784 and 3568 bits |
| `tb_siso_r4` | a reduced frame with a short last window: correct decisions, exact extrinsic arithmetic, pass length |
| `tb_turbo_decoder` | the full-size core; see below |
| `tb_turbo_ber` | bit error rate and average iterations of the full-size core over a Gaussian channel (BPSK) at 0.0, 0.5, 1.0 and 1.5 dB Eb/N0 |
| `tb_turbo_lengths` | the core built for K = 3568, 7136 and 8920 (K2 = 446, 892, 1115): error-free decoding of noiseless and noisy frames, cycle counts |

`tb_turbo_decoder` runs the full-size core (K = 1784, W = 32, default parameters) with its own CCSDS turbo encoder model. It sends:

1. a noiseless frame;
2. two noisy frames;
3. a pure-noise frame.

It checks:

- the bit errors;
- the iteration count and the early stop;
- the cycle count;
- that normalization, scaled and unscaled passes, early stopping and the iteration limit each occurred.

Frames with a raw channel bit error rate of about 16% decode without errors in 2 iterations.

### Error-rate behaviour

With Gaussian noise and 6 frames per point, `tb_turbo_ber` typically gives:

| Eb/N0 | decoded BER | average iterations |
|---|---|---|
| 0.0 dB | 0.13–0.18 | about 8 |
| 0.5 dB | 0.02–0.05 | 5.5–6.2 |
| 1.0 dB | 0 | 3.3–3.8 |
| 1.5 dB | 0 | 2.8–3.2 |

Inputs use the 5-bit quantization, with ±1.0 mapped to ±4 units. These points show where the error rate falls steeply. They are too few frames to measure error rates below about 1e-5.

## Departures from the source architecture

- **Memories.** All memories are arrays with asynchronous reads (`mport_ram`), not SRAM macros. The frame buffer is read through two ports, one per trellis stage of a radix-4 step. The source instead splits it into odd and even halves.
- **Alpha RAM width.** The forward-metric memory holds one window, as in the source. The 2-bit offset is stored next to each metric, so it is 16 × 16 × 12 = 3072 bits, where the source lists 2560 bits of 10-bit metrics.
- **LLR tree.** The LLR unit's adder and max* tree is combinational. Its only register is at the output.
- **No tail.** Tail bits are not decoded, and the frame end is treated as an unknown state.
- **Iteration limit.** The iteration limit (8) and the choice to apply the 0.75 scaling in the first three iterations are settings of this design. The source gives the number of iterations for its simulations, but no separate hardware limit.
- **ENABLE and in_ready.** The meaning of `enable` and the `in_ready` output are this design's own.
- **One SISO only.** Only the single-SISO decoder is built. The source also describes fourteen SISO units working in parallel with a conflict-free memory mapping found by simulated annealing. That mapping is not reproduced here.
- **Conflicting source values.** Where the source gives two values, this design follows the one in its parameter table:
  - Lc = 1.5 rather than 1.75;
  - two fraction bits for extrinsic values rather than one;
  - normalization at 960/256 for 10-bit metrics rather than 480/128 for 9-bit metrics.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| turbo_decoder | K1, K2 | 8, 223 | CCSDS interleaver parameters, K = K1·K2 = 1784 |
| turbo_decoder | W | 32 | window length in trellis stages (even) |
| turbo_decoder | MAX_ITER | 8 | iteration limit |
| turbo_decoder | IW | 5 | width of the `iteration` output |

Other CCSDS lengths (3568, 7136, 8920) use K2 = 446, 892, 1115 with K1 = 8. All widths and constants are in `turbo_pkg.sv`.

## Simulating

Each testbench is a top-level module. For example:

```
verilator --binary --timing -Irtl -y rtl rtl/turbo_pkg.sv tb/tb_turbo_decoder.sv \
    --top-module tb_turbo_decoder -j 8
obj_dir/Vtb_turbo_decoder
```

- Replace the testbench name to run another one.
- Each testbench prints a final line `TB_RESULT checks=N failures=M`.
- The full-size decoder test takes under a minute of run time after compilation.
