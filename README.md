# Pipelined chaotic pseudo-random bit generators with XOR/rotate post-processing

This is SystemVerilog RTL for two pseudo-random bit generators built on chaotic systems in
fixed-point arithmetic:

* **logistic-map generator**: iterates x' = 4x(1 - x) in 64-bit arithmetic.
* **FDNR generator**: integrates a third-order chaotic oscillator, the jerk equation of a
  circuit with a frequency dependent negative resistance, using Euler's method in 64-bit
  arithmetic.

Two ideas make them fast.

1. **Interleaved trajectories.** A chaotic iteration is a feedback loop, so a pipelined
   datapath cannot speed up a single trajectory: the next value needs the previous one. Here
   the loop is pipelined anyway, and its M register stages are filled with M *independent*
   trajectories, each started from its own seed. Every clock, one trajectory completes an
   iteration, so the loop delivers one new word per clock instead of one every M clocks.
2. **Post-processing instead of bit rejection.** In the raw words of a chaotic map the sign
   and integer bits, and the most significant fraction bits, change rarely and are strongly
   biased. The usual fix throws those bits away. Instead, each output word here is the XOR of
   three successive raw words and the previous output word, each rotated by a different
   multiple of a quarter word:

       Q(i+1) = X(i)  ^  rotl(X(i-1), W/4)  ^  rotl(X(i-2), W/2)  ^  rotl(Q(i), 3W/4)

   The rotations move the well-mixed low bits of one word onto the weak high bits of the
   others, so every bit of Q can be used. In a pipelined generator the three successive words
   already sit in neighbouring pipeline registers. The post-processing therefore costs one
   W-bit register and one 4-input XOR per bit. It is not part of the feedback loop and does
   not limit the clock.

At the default sizes, the logistic generator produces 64 bits per clock and the FDNR generator
192 bits per clock (its X, Y and Z channels each give 64 post-processed bits). The
architecture follows P. Dąbal, *Pipelined Pseudo-Random Number Generator with the Efficient
Post-Processing Method*. That work reports 14.56 Gbps for the logistic version and 38.43 Gbps
for the FDNR version on a Xilinx Zynq-7020. This RTL is technology independent; its clock rate
has not been measured.

## Files

| file | contents |
|---|---|
| `rtl/prbg_pkg.sv` | default sizes and constants shared by the modules |
| `rtl/prbg_top.sv` | both generators side by side (top level) |
| `rtl/prng_log_pipelined.sv` | logistic generator = `logistic_core` + `pp_xor_rot` |
| `rtl/logistic_core.sv` | 13-deep loop computing (4x) - (4x·x), with seed mux |
| `rtl/pipe_square.sv` | pipelined squarer (upper half of x·x) |
| `rtl/prng_osc_pipelined.sv` | FDNR generator = `fdnr_core` + 3 × `pp_xor_rot` + output composer |
| `rtl/fdnr_core.sv` | 4-deep Euler datapath of the FDNR oscillator, with seed muxes |
| `rtl/pp_xor_rot.sv` | the post-processing unit |
| `rtl/delay_line.sv` | z^-N delay with all stages brought out |
| `tb/*.sv` | self-checking testbenches and bit-exact reference models (`prbg_ref_pkg`) |

## The interleaved loop and its stream order

Both cores share one structure. A state register sits behind a seed mux. The mux passes
either the loop result or an external seed:

    state <= init_sel ? seed : f(state from M clocks ago)

Consider the sequence of values that the state register takes, one per clock, and call it the
*stream*, with words w(0), w(1), .... Word n is the seed presented at that clock if the seed
select was high, and otherwise f(w(n - M)). So stream positions n, n + M, n + 2M, ... form one
trajectory, and M trajectories are interleaved word by word. Consequences:

* **Seeding:** hold the select high for M clocks and present M different seeds. Each
  trajectory slot takes the seed of the clock it passes the mux. A seed loaded at clock c
  reappears, iterated once, at clock c + M. Reloading in mid-run works the same way.
  Partial reloading also works: a single high clock replaces the seed of one slot.
* **Rate:** after seeding, a new word leaves each core on every clock.
* **Successive words come from different trajectories.** X(i), X(i-1) and X(i-2) in the
  post-processing equation are stream neighbours, so they come from three *different*
  trajectories. This is intended: it mixes independent chaotic sequences.

### Logistic core (`logistic_core`, M = 13)

    register X ──► pipe_square (11 stages) ──► <<2 ──┐
         │                                          ├─► subtract (reg) ──► seed mux ──► register X
         └────► delay line D (11 stages) ──► <<2 ──┘

The loop is 1 (register X) + 11 (squarer) + 1 (subtractor) = 13 clocks deep. Numbers are
unsigned fractions: a 64-bit word w stands for w / 2^64. The squarer keeps the upper 64 bits
of the 128-bit product. Each `<<2` drops the two top bits, so 4x - 4x^2 is computed modulo 1.
This is exact for every x except x = 1/2, whose true image 1.0 wraps to 0, a fixed point. Seeds
0 and 1/2 therefore lead to 0, and 1/4 and 3/4 to the other fixed point, 3/4. These seeds must
be avoided; random 64-bit seeds hit them with negligible probability. The squarer is written as one full multiplier followed by 11
registers, and a synthesis tool is expected to retime them into the multiplier.

The loop depth follows the original design. There, the same loop with a single seed has a
latency of 8 clocks at 48 bits and 13 clocks at 64 bits. `PIPE_DEPTH` sets it, and the squarer
latency is `PIPE_DEPTH - 2`.

### FDNR core (`fdnr_core`, M = 4)

The oscillator obeys  -X''' = X'' + B·X' + X.  With Y = X' and Z = X'', one Euler step of
size h = 1/16 is

    X' = X + h·Y
    Y' = Y + h·Z
    Z' = Z - h·(Z + B·Y + X),     B = 4 if Y >= 1, else 0.

Multiplying by h is an arithmetic shift right by 4. B·Y is a mux between Y<<2 and 0,
controlled by the comparison Y < 1. The datapath therefore holds no multiplier. The Z path
sets the loop depth:

| clock | Z channel | Y channel | X channel |
|---|---|---|---|
| 0 | registers X, Y, Z hold step t | | |
| 1 | Z + B·Y | Y delayed (pDelayS_2) | X delayed (pDelayS_3) |
| 2 | (Z + B·Y) + X(delayed 1) | Y delayed 2 | X delayed 2 |
| 3 | Z(delayed 2) - ((...) >>> 4) | Y(delayed 2) + Z(delayed 2) >>> 4 | X(delayed 2) + Y(delayed 2) >>> 4 |
| 4 | registers take step t + 1 (through the seed muxes) | | |

All three channels read the state of the same trajectory at the same step, so each of the 4
interleaved trajectories follows the Euler equations exactly. Numbers are signed two's
complement with 8 integer bits (sign included) and 56 fraction bits. The attractor spans about
X ∈ [-5, 2], Y ∈ [-3, 3] and Z ∈ [-3, 4]. The largest intermediate, Z + 4Y + X, stays near ±20,
well inside ±128. The testbenches confirm that the trajectories fill the attractor: X reaches
about -4.99 and 1.82.

## Post-processing (`pp_xor_rot`)

Each clock, the unit takes three successive stream words and its own register:

| input | taken from | rotation |
|---|---|---|
| `x0` = X(i) | the seed-mux output, i.e. the word the state register takes at this edge | 0 |
| `x1` = X(i-1) | the state register | W/4 |
| `x2` = X(i-2) | first stage of the delay line behind the state register | W/2 |
| `q` = Q(i) | its own output register | 3W/4 |

The delay lines exist anyway (D in the logistic core, pDelayS in the FDNR core), so no extra
storage is needed. Q updates on every clock. This includes the seeding clocks, so the seeds
are mixed into Q as well. After reset, Q and all pipeline registers are 0. Q therefore
changes from the first seeding clock on. For the first two words, X(i-1) and X(i-2) are still
the reset zeros; from the third seeding clock on, all three inputs are stream words.

The FDNR generator has one post-processing unit per channel. The composer concatenates their
outputs as `out_qxyz = {Qx, Qy, Qz}`, with Qx in the top 64 bits.

The effect can be seen in the `tb_prbg_top` output. Over 19,000 raw X words of the FDNR core,
the worst bit position is 1 in 71.6 % of words (bias 0.216). After post-processing the worst
position of Qx deviates from one half by only 0.008.

## Interfaces

`prbg_top` has one clock and one synchronous active-high reset. Beyond those, each generator
keeps its own ports:

| port | dir | width | meaning |
|---|---|---|---|
| `log_init_select` | in | 1 | logistic: 1 = load `log_init_x` into the loop this clock |
| `log_init_x` | in | 64 | logistic seed (unsigned fraction) |
| `log_out_q` | out | 64 | logistic output word, new every clock |
| `osc_init_sel` | in | 1 | FDNR: 1 = load the seed triple this clock |
| `osc_init_x/y/z` | in | 64 each | FDNR seed (signed, 8 integer bits incl. sign, 56 fraction bits) |
| `osc_out_qx/qy/qz` | out | 64 each | post-processed X, Y, Z channels |
| `osc_out_qxyz` | out | 192 | `{Qx, Qy, Qz}` |

Start-up: assert `rst` for at least one clock. Then hold `log_init_select` high for 13 clocks
with 13 different seeds, and `osc_init_sel` for 4 clocks with 4 different triples on or near
the attractor (|X|, |Y|, |Z| < 2 is safe). Then release both selects. The loops need no
handshake. Every clock after seeding delivers a word.

Parameters: `prng_log_pipelined` takes `P_ARITH` (word width) and `PIPE_DEPTH` (loop depth, at
least 3). `prng_osc_pipelined` takes `P_ARITH`, `INT_BITS` (integer bits including the sign, at
least 6) and `H_SHIFT` (log2 of 1/h). The published precisions (logistic 48/64 bits, FDNR
32/48/64 bits) are all exercised by `tb_prbg_precisions`. The published 48-bit logistic
version uses `PIPE_DEPTH = 8`.

## Where this RTL departs from, or goes beyond, the published design

The published design was built as block diagrams in a vendor tool and describes its
post-processing by an equation. These points are this implementation's own reading or choice:

* **Rotation, not shift.** The equation is written with `<<`. The method is described as
  bit rotation, and a plain shift would discard exactly the bits it is meant to spread, so
  rotation is used.
* **Which pipeline word gets which rotation.** The block diagrams feed the XOR from the mux
  output, the state register and a delay register, but the pairing of wires to rotation
  amounts could not be read reliably. Here the taps follow the equation: the newest word is
  unrotated, the next older word is rotated by W/4, the oldest by W/2.
* **The B switch.** The diagram has a comparator labelled "Y < 1" and a mux with a constant 0.
  B = 4 for Y ≥ 1 and B = 0 for Y < 1 was chosen because it reproduces the published attractor;
  the opposite assignment decays to the origin. The comparator reads Y of the same trajectory
  and step as the rest of the Z update.
* **Number formats** (unsigned fraction for the logistic map; 8 integer bits for FDNR) are not
  published and are this implementation's choice.
* **Multiplier pipelining.** The logistic diagram shows single-cycle blocks, but the published
  loop latency at 64 bits is 13 clocks. The squarer latency is set to 11 to match that latency,
  with registers placed after the multiplier for retiming.
* **Reset.** A synchronous active-high reset clears every register; no reset is described for
  the original.
* **One delay line for X.** The FDNR diagram has separate z^-1 and z^-2 delays of X; here
  one two-stage delay line supplies both.
* **Composer bit order** `{Qx, Qy, Qz}` is assumed.
* **Not built:** the non-pipelined and single-seed baseline variants used only for comparison,
  and the host processor that loaded seeds and collected bits on the evaluation board. Seeds
  and outputs are ports instead.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if something hangs. The reference models in `tb/prbg_ref_pkg.sv` are written
independently of the RTL. They use true multiplications on wider integers, bit-by-bit
rotation and explicit masking.

| testbench | what it checks |
|---|---|
| `tb_delay_line`, `tb_pipe_square`, `tb_pp_xor_rot` | the building blocks, word by word, including exact latency |
| `tb_logistic_core`, `tb_fdnr_core` | every register and tap of the cores against the stream model over thousands of iterations, with mid-run reseeding; both values of B; attractor bounds |
| `tb_prng_log_pipelined`, `tb_prng_osc_pipelined` | the post-processed outputs, the composer order, one new word per clock |
| `tb_prbg_top` | the whole design at default sizes, end to end. It counts every mechanism (seeding, reseeding, both B values, feedback in the post-processing, distinct trajectories, one word per clock) and fails if one never occurs. It also compares per-bit bias before and after post-processing. |
| `tb_prbg_precisions` | 48/64-bit logistic and 32/48/64-bit FDNR configurations |
| `tb_prbg_nist` | the statistical evaluation of the original work, in part: 128 sequences of 2^20 bits from each generator, significance 0.01. Four NIST SP800-22 tests are computed with true P-values: frequency, block frequency (blocks of 2^14 bits), cumulative sums (forward) and runs. Each test is judged as the suite prescribes. At least 124 of 128 sequences must pass, and the P-values must be uniform: with 10 bins, igamc(9/2, chi^2/2) >= 0.0001. Both generators pass all four. The raw FDNR X stream is run as a control and fails all four (0 of 128). |

The statistics testbench implements four of the fifteen NIST tests. The others (spectral,
template matching, Maurer, linear complexity, random excursions and so on) are not reproduced,
so the full statistical claims of the original work are not re-checked here. The
incomplete gamma and erfc functions the P-values need are in `tb/nist_math_pkg.sv`.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/prbg_pkg.sv tb/prbg_ref_pkg.sv tb/tb_prbg_top.sv --top-module tb_prbg_top
    ./obj_dir/Vtb_prbg_top

Replace `tb_prbg_top` with any other testbench name. Simulation is two-state; every register
the design reads is reset, so results do not depend on initial values. All testbenches run in
seconds at full size. `tb_prbg_nist`, the longest, simulates about 2.1 million clocks in a few seconds.

## Size

At default sizes the logistic generator holds about 1,600 flip-flop bits:

| part | bits |
|---|---|
| X register | 64 |
| delay line D | 11 × 64 |
| squarer pipeline | 11 × 64 |
| subtractor register | 64 |
| Q register | 64 |

It also has one 64 × 64 multiplier. The FDNR generator holds 3 × 64 state bits, 3 × 2 × 64
delay bits, 5 × 64 adder-stage bits and 3 × 64 Q bits. Its arithmetic is adders, shifters and
one comparator.
