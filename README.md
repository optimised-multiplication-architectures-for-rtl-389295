# Large-integer multipliers for FHE over the integers

Encryption in fully homomorphic encryption schemes over the integers (the
Coron–Naccache–Tibouchi variant of van Dijk et al.) is dominated by products of
very long integers: a public-key element of 150 thousand to 19 million bits times
a short random integer of about a thousand to ten thousand bits, followed by a
reduction modulo a large modulus. This RTL implements the two multipliers of the
architecture by Cao, Moore, O'Neill, Hanley and O'Sullivan, "Optimised
Multiplication Architectures for Accelerating Fully Homomorphic Encryption":

* a **low-latency integer-FFT multiplier** for general operands. It uses two
  serial number-theoretic transforms (NTTs) side by side, so that after the first
  block product it forms two block products per transform period.
* a **low-Hamming-weight (LHW) multiplier** for the case where one operand has
  only a few set bits (15 in the scheme). It never multiplies. Each product block
  is the sum of 15 shifted bit windows of the long operand, and one block is
  produced per clock.

`fhe_mult_top` puts both multipliers side by side with all their RAM ports
brought out. It runs one multiplication at a time. The operands and products
live in external RAMs that are not part of this RTL.

## Top level: `fhe_mult_top`

| Port group | Meaning |
|---|---|
| `start_fft`, `fft_nxb`, `fft_nyb`, `fft_done` | integer-FFT multiplication of `fft_nxb` x blocks by `fft_nyb` y blocks |
| `start_lhw`, `lhw_y_hw`, `lhw_nxb`, `lhw_nzb`, `lhw_done` | LHW multiplication: Hamming weight, x block count, product block count |
| `busy`, `start_refused` | one multiplier busy; a start was ignored |
| `fx_a_*`, `fx_b_*`, `fy_*`, `fz_*` | integer-FFT RAMs: two x read ports, one y read port, and a product RAM read port and write port |
| `ly_*`, `lx_*`, `lz_*` | LHW RAMs: set-bit index RAM, 2·HW x read ports, product write port |

Each RAM returns read data one clock after the address. A start is accepted
only when neither multiplier is busy. If both starts arrive on the same clock,
the FFT start wins. `start_refused` pulses for any start that is ignored, and an
assertion checks that the two multipliers are never busy together. The
published system calls the multipliers serially: LHW products for the
accumulation, then integer-FFT products for the modular reduction. The
sequencing of that reduction, a Barrett reduction, is left to whatever drives
this top.

## The integer-FFT multiplier (`lowlat_fft_mult`)

### Numbers, blocks and the transform field

Both operands are stored as arrays of `B`-bit digits (`B` = 28), one digit per
RAM word. A **block** is `k/2` digits (k = `K` = 256, so 3584 bits). A block is
zero-padded to k points and transformed, so that the cyclic product of two
blocks is their exact linear product as k coefficients.

All transform arithmetic is modulo the Solinas prime p = 2^64 − 2^32 + 1:

* `solinas_reduce` writes a 128-bit value as 2^96·a + 2^64·b + 2^32·c + d.
  It then forms 2^32·(b+c) − a − b + d, which lies in (−p, 2p), and picks
  t + p, t or t − p.
* The root of unity is ω = 7^((p−1)/k). `fhe_pkg` builds all twiddle tables at
  elaboration, so no table files are needed.
* A product coefficient is at most k/2·(2^B − 1)^2. This must stay below p for
  the result to be exact, which holds for k ≤ 512 at B = 28. Larger `K` needs a
  smaller `B`.

### Serial R2MDC transforms (`r2mdc_stage`, `ntt_r2mdc`)

Each transform is a radix-2, decimation-in-time, multi-path delay commutator
(R2MDC) pipeline. It has log2 k stages, each with one butterfly, and takes two
elements per clock (an *up* and a *dn* lane), so a k-point frame lasts k/2
clocks.

Each stage delays the dn lane, swaps lanes in a two-multiplexer commutator, and
delays the up lane again before the butterfly:

* The forward transform uses delays k/4, k/8, …, 1. It takes natural-order input
  and gives bit-reversed output.
* The inverse transform uses delays 1, 2, …, k/4. It takes bit-reversed input and
  gives natural-order output, so no reordering buffer is needed.
* The first stage of each transform has no delays. Its butterfly has twiddle 1
  and is a one-clock add/subtract.

The commutator phase comes from a counter restarted by each frame's `sof`. At
output clock τ of a stage with pair distance L, the two lanes hold array
positions 2L⌊τ/L⌋ + τ mod L and that position plus L:

* forward twiddles are ω^(L·bitrev(⌊τ/L⌋));
* inverse twiddles are ω^−((k/2L)·(τ mod L)).

A butterfly is a `mod_mult` (16 clocks) plus one add/subtract clock, which gives
N_F = 17 stages. A frame carries a tag (iteration kind, product position, empty
flag) through the whole pipeline, so control never has to count pipeline depths.

### Point-wise product and inverse scaling (`pointwise_mult`, `y_spectrum_ram`)

Two modular multipliers take the x spectrum times the y spectrum, then
multiply by 1/k with a one-clock halving chain (h ↦ h/2 mod p, log2 k times).
The total is N_PW = 15 clocks. The latency from the first input element to the
first inverse output is exactly

Δ0 = 2·(k/4 + k/8 + … + 1) + 2·N_F·(log2 k − 1) + 2 + N_PW

which is 509 clocks at the defaults.

### Iteration schedule (`lowlat_ctrl`)

The design has two transform paths, called *odd* and *even*. For each y block
Y_j, the controller issues frames as follows:

1. **First iteration.** The odd path transforms X_0 and the even path transforms
   Y_j. The spectrum of Y_j is multiplied into the odd path and also stored in
   `y_spectrum_ram` for reuse.
2. **Normal iterations n = 1 … ⌊nxb/2⌋.** The odd path transforms X_{2n−1} and
   the even path transforms X_{2n}. Both are multiplied by the stored Y_j
   spectrum. If X_{2n} does not exist, the frame is marked *absent* and the
   even product is treated as zero.

After the last y block, one **flush** frame empties the recovery buffer. In
total there are F = nyb·(⌊nxb/2⌋ + 1) + 1 frames.

Every frame carries the *half index* of its product position. A half is k/2
coefficients, which is one block's width in the product. For the first
iteration of y block j, that position is half j.

### Addition recovery: three thirds (`addition_recovery`)

A block product has k coefficients, that is two halves. In a normal iteration,
the odd product X_{2n−1}·Y_j and the even product X_{2n}·Y_j overlap by one
half. The frame therefore yields three thirds, each k/2 coefficients long:

* **right third:** the low half of the odd product plus the left third saved
  from the previous iteration;
* **middle third:** the high half of the odd product plus the low half of the
  even product;
* **left third:** the high half of the even product. It is buffered and added
  into the next frame's right third.

This module only adds coefficients (65-bit sums) and labels each output stream
with its product half. It does not propagate carries.

### Product accumulation: the carry chain (`product_accum`)

The accumulator works on the product RAM, which has 2B-bit words (two digits).
It reads the word, adds two coefficients, the running carry and the old word,
writes the low 2B bits back, and keeps the rest as the carry. It handles two
coefficients per clock, which matches the rate at which coefficients arrive
(two lanes).

A ping-pong bank of two half-frames decouples it from the stream, so it runs one
frame behind the recovery. A high-water mark records how far this
multiplication has written. Words above the mark are treated as zero instead of
read, so the product RAM never needs clearing.

### Latency

Measured latency, from `start` to `done`, is F·k/2 + Δ0 + k/2 + 5 clocks. For
the Toy parameter set (42 x blocks by 1 y block at k = 256) that is 3586 clocks.
The published design takes 3451 clocks for the same multiplication. Its
iteration count is (nxb − 1)/2 per y block, about one frame less, and it uses a
different adder arrangement.

## The low-Hamming-weight multiplier (`lhw_mult`)

### Encoded operand and windows

The sparse operand y is stored as its set-bit indices, one `IDXW`-bit word per
set bit (at most `HW` = 15 of them, each index < 2^12). The product is
z = Σ_i (x << e_i). Product block c (`NBLK` = 256 bits) is therefore the sum of
the windows x[c·NBLK − e_i + NBLK − 1 : c·NBLK − e_i], plus the carry from
block c − 1.

### Concatenation unit (`lhw_concat_unit`)

A window straddles at most two x blocks. Let lo = c·NBLK − e. The unit:

1. reads blocks ⌊lo/NBLK⌋ and ⌊lo/NBLK⌋ + 1;
2. concatenates them and shifts right by lo mod NBLK.

Blocks below 0 or at or above `nxb` read as zero. This supplies the zero
concatenation at the two ends of the product. `NBLK` is a power of two, so all
multiplication and division is bit selection. The unit has two clocks of
latency.

### Data processing unit and controller (`lhw_dpu`, `lhw_ctrl`)

`lhw_ctrl` is a four-state machine (IDLE, LOAD, RUN, DRAIN) that sequences
`lhw_dpu`:

* **LOAD:** reads the y_hw indices into a register array. Unused units are
  disabled and contribute zero.
* **RUN:** a counter issues product block addresses 0 … nzb−1, one per clock.
  Unit j sees the address j clocks later. A chain of HW registered adders sums
  the windows, one unit per adder stage. A final adder adds the carry of the
  previous block (clog2(HW)+1 bits), writes NBLK bits to the product RAM, and
  keeps the rest as the next carry.
* **DRAIN:** waits for the last block to be written.

The product RAM receives one block per clock. The first arrives HW + 4 clocks
after RUN starts.

Latency, from start to done, is (HW+5) + nzb + (HW+4) clocks. For the Toy set
(586 x blocks, 590 product blocks) that is 629 clocks. The published design
takes 617.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 256 | transform points k (power of two). Values up to 512 are exact at B = 28 |
| `B` | 28 | digit width b |
| `N_F` | 17 | butterfly pipeline depth, used for both transforms (multiplier latency N_F − 1) |
| `N_PW` | 15 | point-wise stage depth (multiplier N_PW − 1, plus the 1/k clock) |
| `AW` | 28 | digit address width. 2^28 digits of 28 bits is b·2^b bits per operand |
| `NBLK` | 256 | LHW block width (power of two) |
| `HW` | 15 | maximum Hamming weight of the sparse operand |
| `IDXW` | 12 | width of a set-bit index |
| `LXAW`, `LZAW` | 17 | LHW x and product block address widths (enough for 19.35 Mbit operands) |

Sizes the default build holds. Every row was simulated end to end and the clock
counts match the latency formulas above:

| Workload | Blocks | Clocks (this RTL) | Clocks (published) |
|---|---|---|---|
| FFT, Toy Type I: 150 kbit × 936 bit | 42 × 1 | 3586 | 3451 |
| FFT, Large Type I: 19.35 Mbit × 2556 bit | 5399 × 1 | 346370 | 346299 |
| FFT, Large Type II: 19.35 Mbit × 10251 bit | 5399 × 3 | 1037570 | 1037371 |
| LHW, Toy: 150 kbit, HW 15 | 590 product blocks | 629 | 617 |
| LHW, Large: 19.35 Mbit, HW 15 | 75596 product blocks | 75635 | 75623 |

## Where this RTL departs from the published design

* **Addition recovery and product accumulation.** The published design resolves
  carries in three b-bit adders, each with its own RAM ports, plus a fourth
  2b-bit adder. Here the three "thirds" are only added as coefficients, and one
  2b-bit accumulator does all the carry work. Only the 2b-bit product RAM ports
  are used. The result is the same and the RAM interface is narrower, but the
  internal timing differs.
* **Iteration count.** Each y block uses 1 + ⌊nxb/2⌋ frames, plus one flush frame
  at the end. This is about one frame per y block more than the published count.
* **Stored y spectrum.** The y spectrum is transformed once per y block, on the
  even path, and replayed from `y_spectrum_ram`. The published description does
  not say how the second block product obtains it.
* **Modular multiplier.** This is a generic pipelined 64×64 multiply followed by
  Solinas reduction. It is not a vendor DSP core.
* **Not built:** the final Barrett reduction modulo X0 and its sequencing, the
  off-chip RAMs, and the suggested faster-clock memory interface. Other transform
  sizes (k = 512 … 8192) are a parameter change. Above k = 512 they need a
  smaller `B` to stay exact.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The main ones are:

* **Arithmetic.** `tb_solinas_reduce`, `tb_mod_mult`, `tb_ntt_butterfly` and
  `tb_pointwise_mult` check against plain 128-bit remainders computed in the
  testbench. The reduction test includes boundary values such as 0, p − 1, p
  and 2^128 − 1.
* **Transforms.** `tb_r2mdc_stage` checks single stages pair by pair and checks
  their latency. `tb_ntt_r2mdc` compares the forward transform with a direct
  O(k²) transform, checks that the inverse returns k times the input, and checks
  both latencies.
* **Integer-FFT multiplier.** `tb_lowlat_fft_mult` (k = 8, b = 12) multiplies
  eight operand shapes, including all-ones operands. It compares each product
  with a wide multiplication and checks the latency formula.
* **LHW multiplier.** `tb_lhw_mult`, `tb_lhw_dpu`, `tb_lhw_concat_unit` and
  `tb_lhw_ctrl` do the same for the LHW path. The tests include index 0, the
  largest index and all-ones x.
* **Top at reduced size.** `tb_fhe_mult_top` runs both multipliers back to back,
  including refused starts and a start tie. It checks every product and latency,
  and counts first, normal, absent-block and flush iterations, refused starts,
  zero fill and block carries. A mechanism that never occurs counts as a
  failure.
* **Top at full size.** `tb_fhe_mult_full` runs the top with every parameter at
  its default. It does one Toy-size integer-FFT multiplication (150528 × 3584
  bits, 3586 clocks) and one Toy-size LHW multiplication (586 blocks, weight 15,
  629 clocks). Both are compared in full against schoolbook references, and
  both latencies are checked.

* **Published workload sizes.** `tb_fhe_mult_workloads` also runs at the
  default parameters. It covers the integer-FFT sizes Small Type I, Medium
  Type II, Large Type I and Large Type II, up to 19.35 Mbit × 10251 bit
  (1037570 clocks). It also runs the LHW Small, Medium and Large sizes, up to
  75596 product blocks. Every product is bit-exact and every clock count equals
  the formula. The run takes about a minute and a half.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/fhe_pkg.sv tb/tb_fhe_mult_top.sv --top-module tb_fhe_mult_top
./obj_dir/Vtb_fhe_mult_top
```

Lint (`verilator --lint-only -Wall`) reports only unused bits and signals, such as
the upper half of a shifter's concatenation, plus the reset used both
synchronously and as an assertion's disable. It reports no circuit warnings.

## Files

| File | Contents |
|---|---|
| `rtl/fhe_pkg.sv` | field type, p, modular helpers, bit reversal, iteration kinds |
| `rtl/solinas_reduce.sv`, `rtl/mod_mult.sv` | reduction mod p, pipelined modular multiplier |
| `rtl/ntt_butterfly.sv`, `rtl/r2mdc_stage.sv`, `rtl/ntt_r2mdc.sv` | serial R2MDC forward and inverse NTT |
| `rtl/pointwise_mult.sv`, `rtl/y_spectrum_ram.sv` | point-wise product with 1/k, stored y spectrum |
| `rtl/addition_recovery.sv`, `rtl/product_accum.sv` | thirds recovery, carry-resolving accumulation |
| `rtl/lowlat_ctrl.sv`, `rtl/lowlat_fft_mult.sv` | iteration controller and integer-FFT multiplier |
| `rtl/lhw_concat_unit.sv`, `rtl/lhw_dpu.sv`, `rtl/lhw_ctrl.sv`, `rtl/lhw_mult.sv` | LHW multiplier |
| `rtl/fhe_mult_top.sv` | both multipliers, serial scheduling |
