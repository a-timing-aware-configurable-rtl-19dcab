# Timing-aware configurable adder (TACA) and a CNN accelerator built on it

When the supply voltage of a digital circuit is lowered, its gates slow
down and the longest path, in an adder the carry chain, stops meeting the
clock period. The usual answer is to lower the clock frequency. This design
keeps the frequency instead and shortens the carry chain when needed:

* Each full adder of a ripple-carry adder is an **accuracy-configurable full
  adder (ACFA)**. The ACFA can compute its carry-out without its carry-in,
  which cuts the carry chain at that bit. The result is then slightly wrong
  in 2 of the 8 input cases.
* A **timing-error detector (TEDC)** watches the sum bit in the middle of the
  chain. If that bit is still changing after the middle of the clock cycle,
  the full chain will miss the end of the cycle. The detector then switches
  the next ACFA to an approximate mode. The chain is now half as long, and
  the result is ready in time.

The result is an adder that stays exact while timing allows. Under voltage
overscaling it degrades into a slightly approximate adder with half the
carry delay. The repository holds the SystemVerilog for the ACFA, the
multi-bit ACFA adder with its configuration scheme, the TACA, and a CNN
accelerator whose 128 multiply-accumulate units use 16-bit TACAs.

## The ACFA cell (`rtl/acfa.sv`)

Two mode inputs, `em` and `sm`, select one of three modes:

| em | sm | mode | carry-out | wrong cases (A B Cin) | error |
|----|----|------|-----------|------------------------|-------|
| 1  | x  | exact (EM) | (A+B)Cin + AB | none | 0 |
| 0  | 1  | positive approximate (PAM) | A + B | 010, 100 | +1 (in units of this bit's weight) |
| 0  | 0  | negative approximate (NAM) | A · B | 011, 101 | −1 |

The sum is always built the way a mirror adder builds it,
`S = A·B·Cin + (A+B+Cin)·~Cout`, from whichever carry the cell produced.
This is why the errors are so small. A wrong carry-out of weight 2 is always
paired with a wrong sum of weight 1, so the value of the bit pair is off by
exactly one unit, never by two. In silicon the modes come from four
power-gating transistors added to the carry block of a mirror adder, with
internal enables `EN = ~em·sm` and `EP = em + sm`. Only the resulting logic
function is modelled here.

## Placing approximate bits: the improved configuration scheme (`rtl/ics_config.sv`)

The usual way to trade accuracy for delay in an n-bit approximate adder is
to make the k low bits approximate. That leaves a carry chain of n−k+1
stages. The improved configuration scheme (ICS) gets the same chain length
with far fewer approximate cells. It places single approximate bits at

    p = k−1, k−1−(n−k+1), k−1−2(n−k+1), ...   (p > 0; bit k−1 always)

and for k = n it makes every bit approximate. For k ≤ n/2+1 this is a single
bit, k−1. Examples for n = 16:

| k | approximate bits |
|---|------------------|
| 9 | 8 |
| 10 | 2, 9 |
| 12 | 1, 6, 11 |
| 14 | 1, 4, 7, 10, 13 |
| 15 | 2, 4, 6, 8, 10, 12, 14 |
| 16 | all |

`ics_config` turns a run-time level `k` into the `em`/`sm` masks of an
`acfa_adder`. The masks for every k are built into a table at elaboration,
by the function `ics_approx_mask` in `rtl/taca_pkg.sv`. The polarity input
makes all approximate bits positive or negative. The rule above reproduces
the published position table for 8- and 16-bit adders. A closed-form count
of approximate bits, floor(n/(n−k+1))−1, is sometimes given for this
scheme, but it disagrees with that table (for n = 8, k = 6 it gives one bit
where the table has two). This design follows the table.

## The timing-aware adder (`rtl/taca.sv`, `rtl/tedc.sv`)

```
            bits 0..t (first half)        bit t+1          bits t+2..n-1
 a,b ──► [ACFA]…[ACFA t] ──carry──► [ACFA t+1 : em = ~err] ──► [ACFA]…[ACFA] ──► result register
                    │ S_t                                                          (n+1 flip-flops)
                    ▼
              [TEDC] = result flip-flop of bit t, plus late-transition detection ──► err
```

* t = floor(n/2) − 1. For the 16-bit TACA the monitored bit is 7 and bit 8
  is the configurable one. Only bit t+1 can become approximate, so m = 1.
  This is the single-bit ICS configuration with the shortest chain.
* The design assumes a 50 % duty-cycle clock. S_t sits halfway along the
  carry chain, so it must settle by the falling clock edge if the whole sum
  is to settle by the next rising edge.
* `tedc` stores S_t on the rising edge, as the flip-flop it replaces would.
  It also samples S_t on the falling edge into a shadow bit. During the low
  phase of the clock, any difference between S_t and the shadow is a late
  transition. That raises the live error at once, while the same operation
  is still propagating. The live error switches bit t+1 to the approximate
  mode, so the upper half restarts from a carry that no longer depends on the
  late lower half. The comparison is also registered on the rising edge
  (`err_q`), so the next operation begins in the approximate mode. The
  adder goes back to the exact mode after one operation without a late
  transition.
* The low-phase window comes from a pair of flip-flops on opposite edges
  (`pos_t ^ neg_t`), not from the clock net itself. The window is therefore
  still open for every flip-flop sampling on the closing rising edge.
* `am_sm` selects the approximate polarity of bit t+1. In the negative mode
  an approximate result is either exact or low by 2^(t+1) (256 for 16 bits).
  The error occurs for 1/4 of random operands.
* Latency: with `en` high the sum appears on `sum_q` after one rising edge.
  `approx_q` tells whether that stored result was computed in the
  approximate mode.

The original detector is a nine-transistor error-tolerant flip-flop. The
double-sampling circuit here is a logic-level equivalent of its function. A
zero-delay RTL simulation never produces a late transition by itself, so the
testbenches create one. They change operands during the low clock phase
(`tb/taca_tb.sv`), or they force a detector's low-phase flag (the
accelerator testbenches).

## The CNN accelerator (`rtl/cnn_accel.sv`)

```
        AHB-Lite ──► ahb_slave ──► registers ─────────────► accel_ctrl (clear / feed / flush / drain)
                        │                                       │ addresses
                        ├──► input map buffer (8 banks x 512) ──┴─► rows of both arrays
                        ├──► weight buffer (16 banks x 512) ──────► columns: banks 0-7 array 0, 8-15 array 1
                        └──◄ output map buffer (128 x 16 bit + flag) ◄── drain mux ◄── PE sums
        128 TACA error signals ──► adaptive_cfg ──► vdd_up_req / freq_down_req, statistics
```

**Processing element (`pe.sv`).** A PE has input registers for an 8-bit
signed activation and weight, each with a valid bit. A signed multiplier
feeds a 16-bit TACA accumulator. The TACA's result register is the PE's
partial-sum register, so every PE carries one timing-error detector. The
input registers also forward the operands: activations go right, weights
go down. `am_seen` records that at least one accumulation since the last
clear was approximate.

**Arrays (`pe_array.sv`).** Two 8×8 output-stationary systolic arrays. PE
(r,c) accumulates A[r][k]·W[k][c] when row r receives A[r][k] at step k+r and
column c receives W[k][c] at step k+c. Both arrays get the same activation
rows. Array 0 takes weight columns 0–7 and array 1 columns 8–15. One run
therefore computes an 8×16 block `O[r][n] = Σ_k A[r][k]·W[n][k]` with
K ≤ 512. Convolutions are mapped onto this matrix product by the host:
one row of A per output position (im2col), one column of W per kernel. For
LeNet-5 the reductions are 25, 150, 400, 120 and 84, all within 512.

**Sequencer (`accel_ctrl.sv`).** It clears the sums for one cycle. It then
feeds for K+7 cycles: row bank r is read at address step−r and weight bank
n at step−(n mod 8), which produces the skew. A flush of 18 cycles follows,
then a drain of 128 cycles writes output word r·16+n. `done` rises
1 + K + 7 + 18 + 128 cycles after the edge that samples the start bit.

**Adaptive configuration unit (`adaptive_cfg.sv`).** It ORs the 128
timing-error signals into `timing_err` and counts them. When the count
exceeds the threshold register, the adaptive configuration alone no longer
absorbs the violations. The unit then raises `vdd_up_req` (to an external
voltage regulator) or `freq_down_req` (to an external clock generator); a
control bit picks which. Both are registered and follow the count cycle by
cycle. The unit also keeps statistics for the host.

**Register map.** 32-bit words. HADDR[17:16] selects the region, and
HADDR[15:2] is the word index inside it.

| region | word | access | meaning |
|--------|------|--------|---------|
| 0 | 0 CTRL | W | bit0 start (pulse), bit1 approximate polarity (1 = positive), bit2 action (0 voltage, 1 frequency) |
| 0 | 1 STATUS | R | bit0 busy, bit1 done |
| 0 | 2 KLEN | RW | reduction length K (1..512) |
| 0 | 3 THRESH | RW | error-count threshold (reset 64) |
| 0 | 4 EVENTS | R | cycles with any timing error (saturating) |
| 0 | 5 FLAGS | R | bit0 sticky any error, bit1 sticky over threshold, bits 23:8 peak count |
| 0 | 6 ERRCLR | W | clears EVENTS and FLAGS |
| 1 | bank·512 + k | RW | input map buffer, bits 7:0 |
| 2 | bank·512 + k | RW | weight buffer, bits 7:0 |
| 3 | r·16 + n | R | result, bits 15:0; bit 16 = computed in approximate mode |

Writes take no wait state and reads take one. Only word transfers are
accepted and HRESP is always OKAY. The buffers can be reached while a run
is in progress, but the results are only meaningful if the host leaves the
input and weight buffers alone until `done`.

## Top level (`rtl/taca_top.sv`)

The top holds the accelerator and, beside it, a standalone 16-bit ICS adder
(`ics_config` + `acfa_adder`). That adder is the accuracy-configurable
adder meant for image processing: addition, mean filtering and DCT
compression, with 8- or 16-bit width through `ICS_N`. Its level `ics_k` and
polarity `ics_pol` are inputs, and it is combinational. The top's other
ports are the AHB-Lite slave port, `timing_err`, `busy`, `done`, and the
two requests to the voltage regulator and the clock generator, which are not
part of the RTL.

## Accuracy of the approximate adders (`tb/ics_accuracy_tb.sv`, `tb/ics_image_tb.sv`)

`ics_accuracy_tb` measures the configurable adder with negative polarity
(NAM cells) on 100 000 random operand pairs per level k. It reports the mean
error distance (MED) and the mean relative error distance (MRED). It compares
two placements of the approximate cells: the ICS table, and the common scheme
that makes the k low bits approximate. It also adds two generated 512×512
8-bit test images at each k and prints the PSNR of the sum (peak 510).

What it shows, at n = 16:

| k  | ICS cells | MED ICS | MED common | MRED ICS | MRED common |
|----|-----------|---------|------------|----------|-------------|
| 9  | 1         | 63.8    | 64.1       | 0.00132  | 0.00134     |
| 13 | 3         | 1024    | 1027       | 0.0198   | 0.0201      |
| 15 | 7         | 4123    | 4105       | 0.0685   | 0.0694      |
| 16 | 16        | 8257    | 8257       | 0.1202   | 0.1202      |

* The ICS reaches the same level with far fewer approximate cells. Its MED
  is within sampling noise of the common scheme's.
* Its MRED is slightly lower for the upper levels.
* Where the ICS uses one approximate bit p = k − 1, the MED equals
  (2^p − 1)/4: that bit is wrong only when A ⊕ B = 1 and a carry arrives.
  The testbench checks this.
* On the generated images, the ICS PSNR is 0.5–1.4 dB below the common
  scheme's for k = 3…7. For example, at k = 5 it is 36.9 against 38.2 dB.

The ICS is meant to cut the carry chain into pieces about as short as the
common scheme does, while using fewer approximate cells. With NAM cells and
uniform operands, fewer cells buys little accuracy here. The low
approximate cells that the ICS drops rarely err, because an approximate
cell below them already lowers the chance of an incoming carry. The published accuracy comparisons are against other
approximate adder cells, which are not built here.

`ics_image_tb` runs two more image workloads through the ICS adders, on
generated images.

**3×3 mean filter.**
* A 512×512 image with Gaussian noise (σ = 0.02 of full scale) is filtered.
* Each output is a sum of nine pixels divided by nine.
* The low byte of the running sum goes through the 8-bit ICS adder. Its
  carry-out is counted exactly into the upper bits.
* The PSNR against the exactly filtered image falls from 54.7 dB at k = 2,
  to 36.0 dB at k = 5, to 13.9 dB at k = 8.

**4×4 DCT compression.**
* A 256×256 image is split into 4×4 blocks and transformed as O = C·I·Cᵀ.
  C is the orthonormal DCT matrix scaled by 64.
* The six lowest frequencies (37.5 %) are kept, and the block is rebuilt as
  Cᵀ·O′·C.
* All 192 additions per block use the 16-bit ICS adder in two's complement.
* The PSNR against the original is 43.3 dB with exact addition, 37.4 dB at
  k = 8, 25.2 dB at k = 10 and 13.8 dB at k = 12.
* Bit 9, approximate from k = 10, weighs 8 output units at this fixed-point
  scale. A scale that keeps more fraction bits would lose less.

## LeNet-5 on the accelerator (`tb/lenet_tb.sv`)

`lenet_tb` runs a complete LeNet-5 inference through the accelerator at its
default size.

| layer | operation | K | runs |
|-------|-----------|---|------|
| conv1 | 32×32×1 → 28×28×6 | 25 | 98 |
| conv2 | 14×14×6 → 10×10×16 | 150 | 13 |
| conv3 | 5×5×16 → 120 | 400 | 8 |
| fc4 | 120 → 84 | 120 | 6 |
| fc5 | 84 → 10 | 84 | 1 |

How it runs:
* The testbench acts as the host. It lowers each layer to 8×16 blocks and
  loads the banks over AHB, skipping words that have not changed.
* Between layers it applies ReLU, a shift and saturation to 0..127, with
  2×2 max pooling after conv1 and conv2.
* The input is a generated digit-shaped image and the weights are
  pseudo-random. Trained weights and the MNIST set are not included, so
  classification accuracy is not measured.
* Every output is checked bit for bit against a model of 16-bit wrapping
  accumulation.
* The whole inference takes 126 runs, 416 520 useful multiply-accumulates
  and about 80 000 bus writes.

The inference is then repeated with every detector reporting a late
transition in every cycle. This is the worst case of an overscaled supply.
Bit 8 of every accumulation is then approximate and the outputs still match
the model. With these untrained weights, however, the negative bias that
the approximation adds (up to 256 per accumulation) drives all class scores
to zero. In the intended operation, an adder switches to the approximate mode only
in cycles whose timing is actually late.
The small published accuracy loss (3 % to 11 %) comes from that setting,
with trained weights, and this test does not reproduce it.

## What follows the source and what was chosen here

Taken from the published design:
* the ACFA modes and their logic;
* the ICS rule (the position table);
* t = floor(n/2) − 1 and the single configurable bit t+1;
* TEDC detection in the negative clock phase;
* the 16-bit TACA in each PE;
* PEs made of input registers, a multiplier and the TACA, with the PEsum
  register holding the detector;
* two 8×8 PE arrays with input, weight and output buffers, an AHB bus and
  an adaptive configuration unit;
* OR-clustering of error signals with a threshold that triggers voltage or
  frequency action.

Choices of this design, where the source gives no detail:
* the detector circuit (double sampling) and how long its error lasts;
* the approximate polarity of the TACA (an input);
* 8-bit operands, and wrapping 16-bit accumulation;
* the output-stationary systolic dataflow and the sequencer;
* buffer sizes and banking;
* AHB-Lite with one read wait state, and the register map;
* the approximate-result flag and the error statistics.

Not modelled: delays, voltage and energy. Nothing here reproduces the
published delay, power or accuracy figures; they come from transistor-level
and gate-level simulation. Also not modelled: the external memory, the
voltage regulator and the clock generator. Only one TEDC per adder is
implemented. The extension with several detectors on a modulated
duty-cycle clock is not.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog. With
Verilator 5 (two-state, timing enabled), for example the end-to-end test at
full size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
    rtl/taca_pkg.sv rtl/taca_top.sv tb/taca_top_tb.sv --top-module taca_top_tb
./obj_dir/Vtaca_top_tb
```

Replace `taca_top_tb` with any other `*_tb` to test one block.
`tb/ahb_bfm.svh` holds the AHB master tasks that the accelerator
testbenches include.

What the end-to-end test (`taca_top_tb`, default parameters, K = 400, about
15 s) covers:
* all 17 levels of the ICS adder in both polarities, against a bit-level
  model;
* loading 9600 buffer words over AHB and reading some back;
* an exact run, checked word by word and for its exact latency;
* a run in which every PE sees a late transition in every cycle. All
  results must then match a model in which bit 8 of every accumulation is
  negative-approximate. The voltage request and the statistics must react;
* the same with positive polarity and the frequency request;
* a final exact run.

It counts how often each mechanism occurred and fails if one never did.
`cnn_accel_tb` repeats the accelerator part with K = 25. `taca_tb` tests the
detector path with operands that arrive late, at 16 and at 8 bits. `ics_accuracy_tb` (about 3 s) and `ics_image_tb` (about 5 s)
run the accuracy workloads described above. `lenet_tb` (about 50 s) runs
the LeNet-5 inference.
