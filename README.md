# Minimum-phase conversion of a channel response by root reflection

A trellis equalizer with a reduced number of states, or with delayed decision
feedback, works well only if the channel's sampled impulse response is
*minimum phase*: all zeros of its z-transform lie inside the unit circle, so its
energy is concentrated in the first samples. A real multipath channel usually is
not. The usual remedy is an all-pass prefilter in front of the equalizer. It
moves every zero r outside the unit circle to 1/conj(r), its mirror image
inside the circle, and leaves the magnitude response unchanged.

This design computes the channel response the equalizer will see after that
prefilter. It takes the G complex samples y_0..y_g of the channel (g = G-1,
G = 10 by default). It finds the zeros outside the unit circle one at a time
with a Newton iteration built from two tiny transversal filters, and reflects
each zero as soon as it is found. The output is the minimum-phase response
F_m, with the same number of samples. The procedure is the classic one of
Clark and Hau for adapting such a prefilter. Here it is written as synthesizable
fixed-point SystemVerilog on a single clock.

## The algorithm in terms of the hardware

Write the channel as a polynomial in x = z^-1:

    Y(x) = y_0 + y_1 x + ... + y_g x^g.

A zero r of Y(z) with |r| > 1 is a root x = 1/r of Y(x). The design tracks
**beta = -1/r**, which has |beta| < 1, through an estimate called **lamda**.
A zero outside the circle is therefore found as a point lamda inside the unit
disc where Y(-lamda) = 0.

**One-tap feedback filter (`one_tap`).** The samples are run through
1/(1 + lamda z) in *reverse* order, last sample first:

    e'_h = y_h - lamda * e'_{h+1},   h = g, g-1, ..., 0,   e'_{g+1} = 0.

This is Horner's scheme, evaluated at x = -lamda. It has two useful results:

* e'_0 = Y(-lamda), the residual, which is zero exactly at a root;
* e'_1..e'_g are the coefficients of the quotient Q(x) in
  Y(x) = e'_0 + (x + lamda) Q(x).

**Derivative (`epsilon_computing`).** Differentiating that identity gives
Y'(-lamda) = Q(-lamda). So

    eps = sum_{h=1..g} e'_h (-lamda)^(h-1)

is the derivative. The block forms it with one multiply-accumulate per
sample, and updates the power of -lamda with one more complex multiply.

**Newton update (`lamda_computing`).** The update is

    lamda_new = lamda + c * e'_0 / eps.

With c = 1 this is exactly a Newton step for the root x = -lamda. A
constant c between 0 and 1 damps the step. The quotient e'_0/eps, called
*step*, also drives the convergence test.

**Search control (`first_part`).** The search starts from one of nine fixed
estimates (`lamda_lut`):

| # | starting lamda |
|---|----------------|
| 1 | 0.01 |
| 2 | 0.909 |
| 3 | -j0.909 |
| 4 | j0.909 |
| 5 | -0.909 |
| 6 | 0.643 - j0.643 |
| 7 | 0.643 + j0.643 |
| 8 | -0.643 - j0.643 |
| 9 | -0.643 + j0.643 |

It iterates until one of three things happens:

* **Converged**, when |step|^2 < d (d = 1e-10). The lamda that produced
  this iteration's error sequence is reported, together with that sequence.
* **Diverged**, when |lamda_new| > 1. The estimate is heading for a zero
  inside the circle, which needs no reflection. The search moves to the next
  starting point.
* **Iteration limit**, after 40 iterations without convergence. The search
  moves to the next starting point.

If all nine starting points fail, the search reports that no zero outside
the circle was found.

**Reflection (`find_conj`, `two_tap`).** At convergence Q(x) = Y(x)/(x + beta),
with the zero divided out. Its coefficients e'_h are fed in *forward* order
through the two-tap filter 1 + conj(lamda) z^-1. A zero is fed after e'_g. The
filter's first output (e'_0, which is nearly zero) is dropped, which advances
the sequence by one sample:

    F_h = e'_{h+1} + conj(lamda) e'_h,   h = 0..g,   e'_{g+1} = 0.

In polynomial terms F(x) = Q(x) (1 + conj(beta) x). The factor (x + beta) has
been replaced by (1 + conj(beta) x). The zero r = -1/beta moves to
-conj(beta) = 1/conj(r), and on the unit circle |F| = |Y|.

**Passes (`main_finding_root`).** F replaces the stored sequence and the
whole search runs again. A G-tap channel has at most g zeros. The top runs
at most N_PASSES = 10 passes, and stops at the first pass that finds nothing.
If every zero was outside the circle, the result is the conjugate time-reverse
of the input. `tb_full_size` prints such a case.

## Structure

    main_finding_root
    ├── first_part              search for one zero outside the circle
    │   ├── lamda_lut           nine starting points
    │   ├── one_tap             e'_h, reverse order, G clocks
    │   ├── epsilon_computing   eps, G-1 clocks
    │   └── lamda_computing     step and lamda_new
    │       └── cplx_divider    e'_0/eps, DW clocks
    ├── find_conj               conj(lamda)
    └── two_tap                 F, G+1 clocks

`mpf_pkg` holds the number format, the complex type `cplx_t` and the complex
arithmetic functions.

All blocks share one clock. Each stage hands over to the next with a one-cycle
strobe:

* `restart` goes to `one_tap` and `epsilon_computing`;
* one_tap done is `clock_3`, which starts `epsilon_computing`;
* epsilon done is `clock_4`, which starts `lamda_computing`;
* "root found" is `clock_1`, which goes to `find_conj`;
* `find_conj` passes it on as `clock_2`, which starts `two_tap`.

Each stage holds its result until it is started again. The next stage can
therefore read its inputs straight from the previous stage's registers, with
no extra buffering.

Timing at the defaults (G = 10, DW = 48):

| step | clocks |
|------|--------|
| one Newton iteration | 2G + DW + 7 = 75 |
| reflection (find_conj + two_tap) | G + 3 |
| a typical channel with 8 or 9 zeros outside | about 7,000 to 9,000 in total |

The worst case is bounded but large. A pass that finds nothing can take
9 × 40 × 75 ≈ 27,000 clocks. In practice a diverging start is abandoned after
a few iterations.

## Number format and accuracy

Every quantity is a complex pair of 48-bit two's-complement words with 24
fraction bits (Q23.24). The range is about ±8.4·10^6 and the resolution is
6·10^-8. `mpf_pkg::DW` and `mpf_pkg::FW` set the format.

* **Products and sums.** Products are computed at full width and truncated.
  Sums wrap.
* **Working range.** Intermediate values stay within range for channels
  whose taps are up to a few thousand in magnitude.
* **Accuracy.** The convergence threshold d = 1e-10 on |step|^2 pins each
  lamda to within about 1e-5. The output samples are accurate to about 2e-5
  of the largest tap. The testbenches check against exactly that bound.
* **Divider.** `cplx_divider` computes a·conj(b)/|b|^2 with two restoring
  dividers, one quotient bit per clock. A quotient that does not fit
  saturates, and so does division by zero. The resulting huge step is then
  rejected by the |lamda| > 1 test.

## Top-level interface (`main_finding_root`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `start` | in | one-clock pulse while idle; samples `y` |
| `y[G]` | in | channel samples y_0..y_g, `cplx_t` |
| `f[G]` | out | current sequence; after `done`, the minimum-phase response |
| `busy` | out | high from `start` until `done` |
| `done` | out | one-clock pulse at the end |
| `roots_found` | out | number of zeros reflected |
| `lamda_log[N_PASSES]` | out | the converged lamda (≈ beta = -1/r) of each reflected zero, in the order found |
| `ev_converged`, `ev_abort_mag`, `ev_abort_iter` | out | one-clock pulses: a search converged; a starting point was dropped because \|lamda\| > 1; one was dropped at the iteration limit |

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `G` | 10 | taps |
| `N_PASSES` | 10 | maximum number of passes |
| `MAX_ITER` | 40 | iterations per starting point |
| `C` | 1.0 | damping constant c, in (0, 1] |
| `D` | 1e-10 | convergence threshold on \|step\|^2 |

`C` and `D` are `real` parameters. They are converted to fixed point at
elaboration time.

## Where this design makes its own choices

The algorithm fixes the filter structures, the nine starting points and their
order, the tests, the 40-iteration limit and the pass loop. The following
points are choices of this design:

* **Fixed-point format.** Q23.24, with truncating products.
* **Damping constant.** The method allows any c in (0, 1]. The default is
  c = 1, a plain Newton step, so that most searches converge well inside
  40 iterations.
* **Handshakes.** Stages hand over with single-clock strobes on one clock.
  The sequence is exchanged as words on ports, not as text files.
  Concurrent assertions check that each stage reports only in the state that
  waits for it, and that no stage is restarted mid-pass.
* **Reported lamda.** At convergence the design reports the lamda that
  produced the current error sequence, not the updated one, so that the
  two-tap filter gets a matching pair.
* **Divergence test.** It is made on the updated estimate, |lamda_new|^2 > 1.
* **Pass count.** At most 10 passes, stopping early once a pass finds
  nothing. Further passes could not change the result.
* **Derivative formula.** The derivative uses the powers (-lamda)^(h-1) of
  the Newton derivation.
* **Divider.** The method (restoring, bit-serial) and its saturation are this
  design's own.
* **Added ports.** `start`/`busy`/`done`, `roots_found`, `lamda_log` and the
  event pulses are additions.

## Limits

* **Zeros that may be missed.** A zero outside the circle is found only if
  the Newton iteration reaches it from one of the nine starting points within
  40 iterations. Two kinds of zero can be missed this way:
  * zeros very close to the unit circle, where |lamda| ≈ 1 interacts with the
    divergence test;
  * tightly clustered zeros.
* **The filter itself is not built.** The all-pass prefilter M(z) that would
  filter the received signal is not part of this RTL. The design delivers the
  combined channel-plus-prefilter response that the equalizer needs. It never
  forms the prefilter's taps.
* **What is outside the design.** The equalizer and the channel itself are
  not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
real-valued arithmetic, not against the design's own fixed-point functions.
The shared helpers live in `tb/tb_cplx_pkg.sv`:

* building a channel from chosen zeros;
* its exact minimum-phase equivalent, obtained by replacing each outside zero
  r with 1/conj(r) and scaling the gain to keep the magnitude response;
* a Schur–Cohn test that all zeros of a sequence are inside the unit circle.

The testbenches:

| testbench | what it checks |
|-----------|----------------|
| `tb_lamda_lut` | the nine starting values and the fallback |
| `tb_one_tap` | the recursion; e'_0 = Y(-lamda); G-clock latency |
| `tb_epsilon_computing` | the derivative sum; abort by restart; G-1-clock latency |
| `tb_cplx_divider` | quotients over ten decades; saturation; DW-clock latency |
| `tb_lamda_computing` | update for c = 1 and c = 0.5; DW+2-clock latency |
| `tb_find_conj` | conjugate and strobe timing |
| `tb_two_tap` | the filter on random data; one exact root reflection |
| `tb_first_part` | one search per channel; see below |
| `tb_main_finding_root` | end to end; see below |
| `tb_full_size` | default parameters on two channel shapes; see below |

**`tb_first_part`** checks:

* the reported lamda is -1/r of an outside zero, to within 1e-5;
* the error sequence belongs to that lamda;
* a minimum-phase channel drops all nine starting points;
* one iteration takes 75 clocks;
* each of the three outcomes occurs at least once.

**`tb_main_finding_root`** runs the following channels:

* one with nine zeros outside;
* one with eight outside and one inside;
* one that is already minimum phase, which must pass through unchanged;
* six random channels.

Each channel runs on four copies of the design: the defaults, a 2-pass
limit, a 3-iteration limit, and damping c = 0.5. It checks:

* every output sample against the exact minimum-phase response;
* that the output is minimum phase;
* energy preservation;
* the zero count;
* the logged lamdas;
* that every mechanism (convergence, divergence drop, iteration-limit drop,
  pass limit, no-zero channel) occurs.

**`tb_full_size`** runs the defaults on a channel with all nine zeros outside
and on one with eight outside and one inside. It prints input and output.

To run one with Verilator, list the packages first:

    verilator --binary --timing --assert -Wall -Wno-fatal \
      rtl/mpf_pkg.sv tb/tb_cplx_pkg.sv \
      rtl/lamda_lut.sv rtl/one_tap.sv rtl/epsilon_computing.sv rtl/cplx_divider.sv \
      rtl/lamda_computing.sv rtl/first_part.sv rtl/find_conj.sv rtl/two_tap.sv \
      rtl/main_finding_root.sv tb/tb_full_size.sv --top-module tb_full_size
    ./obj_dir/Vtb_full_size

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Each runs in
well under a second of wall-clock time.
