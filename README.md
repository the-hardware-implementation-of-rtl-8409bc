# Fast digital demodulators for PSK, DPSK, QAM and code-word keyed signals

These demodulators are built for an IF signal whose carrier frequency f0 can be
tens of megahertz. The signal is sampled at exactly four times f0, which gives
four samples per carrier period: s1, s2, s3, s4. Then the two differences

    d0 = s1 - s3        d1 = s2 - s4

are, up to a factor of two, the in-phase and quadrature components of the
carrier over that period. No multiplier, mixer or filter is needed to get them.
To collect a symbol's energy, these differences are summed over the last
N = 2^n periods:

    y0(i) = sum_{j=0}^{N-1} d0(i-j)        y1(i) = sum_{j=0}^{N-1} d1(i-j)

This running sum uses only n additions per period, not N. Stage k adds its
input to the same input delayed by 2^(k-1) periods. Stage 1 gives sums of two
differences, stage 2 sums of four, and so on. This front end is the *basic
algorithm*. Every demodulator here is the basic algorithm plus a small
decision stage.

The architecture comes from the published description by Chernoyarov,
Glushkov, Litvinenko, Faulgaber and Salnikova, "The Hardware Implementation
of the Multi-Position Signal Digital Demodulators". That description gives
the block diagrams, the formulas and a few sizes. Widths, handshakes, timing,
reset, the QAM synchronizer and the code tables are this design's own
choices. The section "What is given and what is chosen" lists them.

## The shared front end (`basic_processor`)

```
adc ─► ms4_shifter ─► quad_subtractor ─┬─► sliding_sum_tree ─► y0
       (MS4: s1..s4)   (SUB0, SUB1)     └─► sliding_sum_tree ─► y1
```

* `ms4_shifter`: the four-cell shifter. A 2-bit counter marks the period
  boundaries. The first sample after reset is s1 of period 0. `s_valid`
  pulses once every 4 clocks.
* `quad_subtractor`: forms d0 and d1 with one extra bit, so the result is exact.
* `sliding_sum_tree`: n registered stages. Stage k uses a `delay_line` of
  2^(k-1) words as its shift register and one adder. Each stage widens the
  word by one bit, so y is R + 1 + n bits and never overflows.
* `delay_line`: a shift register that advances once per strobe. It is built
  as a circular buffer with asynchronous read, so long lines map onto
  distributed RAM. Until it has been filled once, it outputs zero.

Timing: one (y0, y1) pair per carrier period, flagged by a one-cycle
`y_valid`. The pair for period i appears 2 + n clocks after the last sample
of that period. Everything runs on the 4·f0 sample clock `clk`, with a
synchronous active-low reset `rst_n`. Numbers are two's-complement.

For a carrier `A·cos(w0·t + phi)` held over the whole window,
y0 = 2NA·cos(phi) and y1 = -2NA·sin(phi). For a signal written as
`aI·cos + aQ·sin`, y0 = 2N·aI and y1 = 2N·aQ.

## The demodulators

`demod_top` holds all five side by side. Each has its own ADC port and its
own front end; they share only the clock and the reset.

| instance | module | signal | R | N | decision |
|---|---|---|---|---|---|
| `u_dpsk2` | `dpsk2_demod` | binary DPSK | 8 | 128 | 1 bit per symbol |
| `u_dpsk4` | `dpsk4_demod` | four-position DPSK | 8 | 128 | 2 bits per symbol |
| `u_qam` | `qam_demod` | square QAM, 4 positions | 12 | 64 | log2(positions) bits |
| `u_walsh` | `pit_demod` | 4 Walsh words of 4 elements | 12 | 64 | word index |
| `u_mseq` | `pit_demod` | 2 M-sequence words of 63 elements | 12 | 64 | word index |

R is the ADC width. N is the number of carrier periods per symbol, or per
code element.

### Binary DPSK (`dpsk2_demod`)

Two N-cell shifters keep the responses from one symbol earlier. Two quadratic
blocks (`quadratic_block`) compute the energy of the sum and of the difference:

    z0 = (y0 + y0(i-N))^2 + (y1 + y1(i-N))^2      phase held
    z1 = (y0 - y0(i-N))^2 + (y1 - y1(i-N))^2      phase reversed

A subtractor forms `z_diff = z0 - z1`. The comparator outputs `sym = 1` when
z1 > z0, i.e. when the phase reversed. The unknown carrier phase cancels, so
this is a noncoherent receiver. All widths are exact. For R = 8 and N = 128,
`z_diff` is 36 bits.

### Four-position DPSK (`dpsk4_demod`, `dpsk4_cu`)

The shifters are the same as above. The computing unit forms the real and
imaginary parts of the phase-difference product, and outputs their sum and
difference:

    z0 = y0·y0d + y1·y1d + y1·y0d - y0·y1d
    z1 = y0·y0d + y1·y1d - y1·y0d + y0·y1d

Two comparators give `sym = {z1 > 0, z0 > 0}`. For carrier phase steps of
0, 90, 180 and 270 degrees, the outputs are 11, 10, 00 and 01: a Gray
mapping. A step of 45 degrees would put z0 exactly on zero, so this unit
expects the 0/90/180/270 constellation.

### Symbol timing of DPSK and the code-word demodulators

These blocks do not recover symbol timing. They produce a decision every
carrier period (`*_valid`). A strobe (`sym_end` / `word_end`) marks periods
N-1, 2N-1, and so on after reset (K·N-1, 2K·N-1, ... for code words). If
symbols start with the first sample after reset, the window at those periods
spans exactly one symbol. Otherwise, an external timing loop has to pick the
right period out of the per-period decisions.

### QAM (`qam_demod`) and its synchronizer

This is the one receiver here that finds its own symbol timing and its own
decision thresholds. Reception is coherent. The carrier at the ADC is assumed
phase-locked to the sample clock, so y0 and y1 are directly the I and Q
amplitudes times 2N. Carrier recovery is outside this design.

```
y0, y1 ─┬─► threshold_device TD0 ─┐
        ├─► threshold_device TD1 ─┼─► qam_resolver (RS) ─► qam_decoder (DC) ─► code
        └─► qam_nsd (NSD) ── unit, sym_strobe ┘
```

**Symbol timing (`qam_nsd`).** The running sum covers exactly one symbol at
only one of the N period phases. At every other phase it mixes two symbols,
and on average its magnitude is smaller. The NSD counts the period phase
0..N-1. For each phase it keeps a leaky average of `e = |y0| + |y1|` in an
N-word memory:

    E += e - E / 2^AVG_SHIFT        (fixed point, AVG_SHIFT fraction bits)

On the first pass after reset, e is loaded directly. During each pass over
the N phases, the NSD tracks the phase with the largest E. At the end of the
pass it adopts that phase (`sync_phase`). `sym_strobe` is high together with
`y_valid` at that phase.

How fast it locks, and the margin it has, depend on the constellation. With
16 positions and N = 8, the aligned average is about 15 % above the next
phase. With 4 positions and N = 64, the margin is about 1/N. An error of one
period then costs only 1/N of the symbol energy, so decisions are still
right.

**Thresholds.** At each strobe, a second leaky average follows e. If all
levels are equally likely, it settles at L·A, where L is the number of levels
per axis and the levels are (2l - L + 1)·A. The threshold spacing is

    unit = 2A = 2 · average / L

`threshold_device` counts how many thresholds `j·unit`,
j = -(L/2-1) .. L/2-1, lie at or below y. The count is the level index
(0 = most negative). For 4 positions (L = 2), the only threshold is zero.

**Resolver and decoder.** `qam_resolver` latches the two level indices at the
strobe. `qam_decoder` Gray-codes each axis and packs them as
`code = {gray(I level), gray(Q level)}`. The code appears log2(N) + 4 clocks
after the last sample of the symbol.

About 60 symbols after reset, the averages have settled. Before that, codes
come out but can be wrong.

### Code words keyed in toto (`pit_demod`)

The transmitter sends one of M code words of K elements. Each element is N
carrier periods at phase phi or phi + 180 degrees, chosen by a_mk = ±1. The
carrier phase phi is unknown but constant over the word. The receiver chain
is:

1. **Correlators (`code_correlator`, one per channel).** Each correlator
   keeps y(i), y(i-N), ..., y(i-(K-1)N) in a chain of K-1 N-word delay lines.
   It forms, for every word m,

       u_m = sum_k a_mk · y(i - kN)

   with all M sums in parallel, once per period.
2. **Magnitude (`magnitude_unit`).** It computes
   `z_m = floor(sqrt(u0_m^2 + u1_m^2))` with an unrolled digit-by-digit
   square root. The result does not depend on phi.
3. **Maximum choice (`max_choice`).** It picks the word with the largest
   z_m. Ties go to the lowest index.

Element order: k = 0 is the element received last. A word is therefore
transmitted from a_m(K-1) down to a_m0.

The code tables are computed at elaboration by `demod_pkg::code_neg`:

* `WALSH`: a_mk = (-1)^popcount(m & k), i.e. Hadamard rows in natural order.
* `MSEQ`: word 0 is the maximal-length sequence from
  a[t+d] = a[t+c] xor a[t], started at 1,0,...,0. The trinomials used are
  x^4+x^3+1 (K = 15), x^5+x^3+1 (K = 31) and x^6+x^5+1 (K = 63). Word m is
  that sequence cyclically shifted by m·floor(K/2). A 1 stands for a_mk = -1.

The delay lines are the main storage cost. With the default sizes (K = 63,
N = 64, 19-bit responses), they hold 2 × 62 × 64 words.

## Parameters and widths

Every parameter is an `int unsigned` and has a default.

* `basic_processor #(R, N)`: y is R + 1 + log2(N) bits.
* `dpsk2_demod #(R = 8, N = 128)` and `dpsk4_demod #(R = 8, N = 128)`.
* `qam_demod #(R = 12, N = 64, POSITIONS = 4)`. POSITIONS must be L·L with
  L a power of two: 4, 16, 64, ...
* `qam_nsd #(..., AVG_SHIFT = 4)`: the averaging time constant is
  2^AVG_SHIFT strobes.
* `pit_demod #(R = 12, N = 64, M = 4, K = 4, CODE = WALSH)`. In `MSEQ` mode,
  K must be 2^d - 1 with d from 2 to 7.
* `demod_top` exposes the sizes of each instance: `DPSK_*`, `QPSK_*`,
  `QAM_*`, `WAL_*`, `MS_*`.

N must be a power of two, at least 2. No stage saturates or rounds: every sum
and product is widened to its exact size.

## What is given and what is chosen

Taken from the published description:

* the 4·f0 sampling;
* the four-cell shifter, the subtractors and the log2(N) sum tree;
* the binary DPSK structure: N-cell shifters, sum/difference, two quadratic
  blocks, subtractor, comparator;
* the 4-DPSK computing-unit formulas and the two comparators;
* the QAM block structure: TD0/TD1, NSD, resolver, decoder;
* the code-word receiver: two correlators, square-root magnitude, maximum
  choice;
* the sizes R = 8, N = 128 for binary DPSK;
* M = 4, N = 64, R = 12 for the Walsh receiver;
* K up to 63 and two words for the M-sequence receiver;
* four positions for QAM.

Chosen here:

* R = 8 and N = 128 for 4-DPSK.
* R = 12 and N = 64 for QAM and for the M-sequence receiver.
* K = 4 for the Walsh receiver.
* K = 63 as the default M-sequence length. 15 and 31 are also supported.
* The N-cell shifters in the 4-DPSK receiver. Its computing unit needs
  y(i-N), so they must be present, though they are not drawn explicitly.
* The comparator polarities and the 0/90/180/270 4-DPSK mapping.
* Symbol and word timing counted from reset.
* The whole inner working of the NSD, the threshold placement and the Gray
  bit mapping.
* The M-sequence polynomials and the choice of the second word as a cyclic
  shift.
* Registered stages with one-cycle valid strobes, synchronous reset and
  two's-complement numbers.

Not included:

* The ADC and the 4·f0 clock generator. They are analog; the design takes
  samples at the `*_adc` ports and runs on `clk`.
* Carrier recovery for the coherent QAM receiver.
* Symbol timing recovery for the DPSK and code-word receivers.
* The coherent PSK/DPSK variants, which are only referred to, not described.

The FPGA resource, clock-rate and power figures quoted for these receivers
depend on the FPGA family and are not reproduced here. Note that the logic
takes one sample per clock, so the clock must run at 4·f0. A 150 MHz carrier
therefore needs a 600 MHz clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=... failures=...` line and has a cycle watchdog.

* **Front end.** The testbenches check the period grid and strobe rate of
  `ms4_shifter`. They check every `sliding_sum_tree` and `basic_processor`
  output against a direct N-term sum, and check the latencies: log2(N)
  clocks, and 2 + log2(N) clocks.
* **Arithmetic units.** `quadratic_block`, `dpsk4_cu`, `magnitude_unit` and
  `threshold_device` are checked against integer references, including
  extreme values and inputs exactly on a threshold.
* **Binary DPSK.** Every per-period `z_diff` is checked against a reference
  computed from the samples, and every decided bit against the one sent.
* **4-DPSK.** All four phase steps are decoded with random carrier phase and
  noise.
* **Code words.** Correlator outputs are checked against hand-written Walsh
  and 7-element M-sequence tables. Whole-word decisions are checked for
  Walsh words and 15-element M-sequence words at random carrier phases.
* **M-sequence lengths.** `tb_mseq_lengths` runs the 15- and 31-element
  M-sequence receivers at N = 64 and R = 12. It checks every word decision
  and the word-end spacing.
* **QAM synchronizer.** It must find the symbol phase for several symbol
  offsets and form the threshold spacing within 15 %.
* **QAM receiver.** It must decode 16- and 4-position QAM after settling.
* **Whole design.** `tb_demod_top` runs all five receivers at their default
  sizes, in parallel (about 65,000 clocks). It checks every decision. It
  requires every mechanism to occur at least once: DPSK hold and reversal,
  all four 4-DPSK steps, all QAM codes with timing acquired away from the
  reset phase, all Walsh words, and both M-sequence words.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/demod_pkg.sv tb/tb_demod_top.sv --top-module tb_demod_top
./obj_dir/Vtb_demod_top
```

Replace `tb_demod_top` with any other testbench name. To lint a module on
its own:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/demod_pkg.sv rtl/pit_demod.sv
```

Each file in `rtl/` starts with a comment giving the module's function,
interface and timing.
