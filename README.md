# DISCO: a digital stochastic computer in SystemVerilog

A stochastic computer does analogue-style computation with random pulse
trains. A value is carried on one wire as the probability that the wire is ON
at a clock edge. Arithmetic then needs almost no hardware: a NOT gate negates,
an XNOR gate multiplies, and a selector driven by a random bit adds. An
up/down counter integrates. Precision costs time, because a result has to be
averaged over many clocks, but the elements are tiny and every element works in
parallel.

This RTL describes such a machine as it was built in the mid-1970s. It has:

- a noise generator;
- 34 plug-in element slots and 30 fixed elements;
- an automatic patch panel, so the machine can be rewired from a host computer;
- a loader for integrator initial conditions;
- two special-purpose simulators that use the same stochastic technique: a
  four-state Markov chain simulator and a random walk simulator.

The top module is `disco_top`. Every module has a self-checking testbench in
`tb/`.

## Numbers on one wire

The machine uses the single-line bipolar code. A voltage E in the range
-V..+V is carried by a line that is ON with probability

    p = 1/2 + E / (2V)

So p = 0 is -V, p = 1/2 is zero and p = 1 is +V. All binary words are 12 bits
wide. A word N becomes a line through a comparator (`stoch_comparator`), which
is ON when N is greater than a fresh 12-bit random number. That gives
p = N / 4096. The comparison is strict, so the all-ones word gives
4095/4096 rather than exactly 1.

The random numbers come from `noise_source`, a maximal-length shift register
(63 stages, feedback from stages 63 and 62). An XOR of stages of such a
register is the same m-sequence at another delay. Each bit of each word is
the XOR of three stages P, P+D1 and P+D2, and no two bits anywhere share the
spacing pair (D1, D2). So no bit is a time-shifted copy of another.

This matters. If a word's bits were adjacent stages, each clock's random
number would be the previous one shifted by a place. A comparator's output
would then be correlated from clock to clock. In the Markov simulator that
error builds up over successive transitions: multi-step probabilities came
out up to 0.07 off.

The register length, taps, stage choice and seed are this design's choices;
the original does not give them. The default seed is dense because a seed with a single one
leaves the register in a long stretch with few ONs.

## Computing elements

| element | module | logic | result |
|---|---|---|---|
| inverter | `stoch_inverter` | NOT | -E |
| multiplier | `stoch_multiplier` | XNOR | E E' / V |
| squarer | `stoch_squarer` | XNOR of the input and itself 13 clocks earlier | E^2 / V |
| summer | `stoch_summer` | a random bit picks one input (AND, AND, OR) | (E + E') / 2 |
| integrator | `stoch_integrator` | up/down counter and comparator | E(0) + (1/(N tau)) ∫ (E1 + E2) dt |
| ADDIE | `noise_addie` | integrator with its inverted output as second input | counter tracks p(A) |
| S/A converter | `sa_converter` | first- or second-order low-pass filter | analogue p(A) |

The squarer needs a delay because a line XNORed with itself is always ON. The
original delays the copy by more than twelve clocks, the span of one 12-bit
random number drawn from consecutive noise lines. The squarer here uses a
13-stage delay. With this design's noise words, random numbers a clock
apart are already unrelated, so 13 clocks is ample.

### The integrator

The counter counts up when both inputs are ON, down when both are OFF, and
holds when they differ. Counter direction is E1 and enable is E1 XNOR E2. The
average rate is p1 + p2 - 1 states per clock, which is (E1 + E2) / 2V. The
counter is compared with the slot's random number to give the output line.

Three extra controls exist for the rest of the machine:

- **scale**: a 4-bit code {X1,X2,X3,X4} shortens the counter to 12, 11, 10, 9
  or 8 bits. The codes are 1111, 0111, 1011, 1101 and 1110. A shortened
  counter steps by 2, 4, 8 or 16, so its gain rises by that factor. The codes of
  all integrators form one serial chain (`scl_*` ports). Data goes in at the
  first integrator slot; the first bit sent ends up as X1 of the last
  integrator.
- **hold**: a high level stops the counter.
- **count_up**: forces both inputs ON. The initial-condition loader uses it.

The counter saturates at 0 and 4095; the original does not say what it does
there.

### Reading results

`noise_addie` converts a line to a number. It is an integrator whose second
input is its own inverted output. The counter then settles at 4096 p(A) with a
time constant of N = 4096 clocks. Its testbench measures 9419 clocks to come
within 10% of the final value and 12345 to come within 5%. The original quotes
9400 and 12300.

`sa_converter` models the analogue output filter. It computes the filter's
sampled response v(n) = v(n-1) (1 - K) + A(n) K in fixed point, with
K = 2^-12 and v scaled so that 2^24 means "always ON". `ORDER = 2` cascades two
such sections to give the critically damped second-order filter. This is a
model of an analogue part: it is synthesizable, but it is not the hardware.

## The automatic patch panel

The patch panel connects outputs to inputs. Each element input (an input node,
96 in all) takes exactly one element output (an output node, 64 in all). So
each input node needs only a 6-bit code and a 64-to-1 selector (`data_selector`).
The selector is built like the original: four 16-to-1 selectors share the low
four code bits, and a 4-to-1 stage picks one of them with the top two bits.
Code c selects output node c+1.

The 96 codes sit in one 576-bit serial shift register, loaded by the host.
Send input node 96's code first and input node 1's code last, each MSB first.

Node numbering (1-based):

| element | output node | input nodes |
|---|---|---|
| slot s (1..34) | s | 2s-1 (E1 / A), 2s (E2 / B) |
| fixed inverter i (1..8) | 34+i | 68+i |
| fixed multiplier m (1..10) | 42+m | 75+2m, 76+2m |
| fixed comparator c (1..12) | 52+c | none (binary input `fix_cmp_word`) |

The slot numbers and inverter 1 (input 69, output 35) match the original
sine-wave example. The rest of the numbering follows the same pattern and is
this design's choice. It uses all 96 inputs, whereas the original kept two
inputs free for external signals.

The panel registers the output nodes once before the selectors, so every patch
adds one clock of delay. This is not in the original. It stops a patched loop,
such as the sine-wave generator, from forming a combinational path.

Slot contents are fixed when the design is built, through the `SLOTS`
parameter, much as the original took plug-in cards. The default fill is:

| slots | element |
|---|---|
| 1-6 | ADDIEs |
| 7-10 | squarers |
| 11-20 | summers |
| 21-27, 29-31 | integrators |
| 28 | S/A converter |
| 32 | multiplier |
| 33 | inverter |
| 34 | comparator |

## Setting initial conditions

This is the subtlest part. `ic_loader` holds 40 twelve-bit words, one per
integrator position (position s is slot s; positions 35-40 are unused). At the
start of a run it sets the integrators without a parallel load: each
integrator counts up from zero in turn.

**WRITE.** Raise `ic_w`, then pulse `cm`. Send each word MSB first, one `ic_cc`
strobe per bit, position 1 first. After every 12 bits the word moves into a
40-word shift-register memory. After 40 words, position 1's word is at the
memory output.

**READ.** Lower `ic_w` and pulse `cm`. `cm` clears every integrator and ADDIE,
and then:

1. The count-up line rises. Every hold line is high except position 1's, so
   only integrator 1 counts. A dummy counter counts alongside it.
2. When the dummy counter *exceeds* the word at the memory output, three things
   happen in that clock:
   - the memory rotates to the next word;
   - the single low bit in the HOLD register moves to the next position;
   - the dummy counter clears.

   All hold lines are high during that clock, so the integrator stops one
   state above its word. The host should therefore write the wanted value
   minus one.
3. When the low bit reaches the HOLD register's extra 41st stage, all hold
   lines and the count-up line drop, and the integrators run.

Position k takes word(k) + 2 clocks, and the whole load takes
sum(word + 2) + 1 clocks. The memory recirculates, so a second READ loads the
same values again. A scaled integrator counts in its own step size while it
loads: word 199 loads 800 into an integrator scaled by four.

## Worked example: a sine-wave generator

Two integrators and an inverter in a loop solve x'' = -omega^2 x, with
omega = 2 / (N tau) and N = 4096. One period is pi N = 12868 clocks. The patch
is:

| from output node | to input nodes | meaning |
|---|---|---|
| 27 (integrator y) | 51, 52 (integrator x, slot 26) | x' = 2y / (N tau) |
| 35 (inverter 1) | 53, 54 (integrator y, slot 27) | y' = -2x / (N tau) |
| 26 (x) | 69 (inverter 1) | |
| 26 (x) | 55 (S/A converter, slot 28) | display |

The initial conditions are x(0) = 0 and y(0) = V/2, loaded as words 2047 and
3071, which become counts 2048 and 3072. Counter x then swings over
2048 ± 1024, a line probability of 0.25 to 0.75.

`tb_disco_top` runs this example and measures periods of 12.5k to 12.8k
clocks. Each counter takes a ±1 step every clock, so the amplitude random-walks
by a few hundred states over three periods. That is the normal behaviour of a
stochastic integrator loop, not a fault.

## Markov chain simulator

`markov_sim` estimates the probability of being in each of four states after n
transitions.

The state is {Q2,Q1} in two JK flip-flops: S1 = 00, S2 = 01, S3 = 10,
S4 = 11. The twelve fixed comparators give lines C1..C12, three per state. In
state S1 the transition lines are:

    P14 = C3
    P13 = C2.~C3
    P12 = C1.~C2.~C3

So at most one transition is taken, and none means the chain stays. States
S2-S4 work the same way with C4-C6, C7-C9 and C10-C12. To get a wanted row
P12, P13, P14, set the comparator words to:

    C3 = P14
    C2 = P13 / (1 - C3)
    C1 = P12 / ((1 - C2)(1 - C3))

A run works as follows:

1. A start, manual or every 10^4 clocks (`mk_auto`), loads the initial state
   from a two-bit memory.
2. `pulse_gen` lets exactly n clocks through (n is four BCD digits, 1..9999).
3. The final state is sampled into four flip-flops.

Each sample line then carries, one bit per run, a stochastic sequence of that
state's probability. S/A converters on the lines (`mk_analog`) show the
distribution. A run takes n + 2 clocks from start to sample. In continuous mode
the network steps every clock.

`tb_markov_examples` runs the original's two worked examples on the default
top, using 3000 runs per estimate:

- every comparator at 0.5;
- the taxicab-zone chain.

For the taxicab chain it gets these probabilities of being in zone 1:

| question | simulated | predicted |
|---|---|---|
| after 4 fares from zone 4 | 0.717 | 0.725 |
| after 2 fares from zone 1 | 0.745 | 0.752 |
| after 10 fares, by starting zone | 0.717-0.742 | 0.734 |

## Random walk simulator

`random_walk` is a four-digit BCD up/down counter, so it has 10,000 states.
Each step:

- goes up with probability P_U and down otherwise (comparator on `pu_word`);
- is skipped with probability P_H (comparator on `ph_word`).

The start state k is loaded in parallel.

A step that would pass 9999 or 0000 is blocked, which gives a reflecting
boundary. If that boundary's switch is set to absorbing, the blocked attempt
also latches the walk until the next load. The top digit's MSB tells which
boundary it is. This follows the original circuit description. As a result,
absorption happens on the attempt to leave the boundary, not on arrival there,
which effectively moves each boundary one state outward. For a 100-state walk
from k = 20 with p = 1/2 the ruin probability is 80/101 rather than 79/99.

The original's analysis and measurements assume the other rule: a walk ends
on entering 0 or a = 99. Its Table 7.1 durations fit that rule. The parameter
`ABSORB_ON_ENTRY` (`RW_ABSORB_ON_ENTRY` on the top) selects it.
`tb_rw_table71` reruns Table 7.1 on two 100-state tops, one with each rule.
It uses 2000 walks per case for p = 0.4 and 0.6, and 1000 for p = 0.5.

| p | k | simulated, absorb on entry | original: theory | original: measured |
|---|---|---|---|---|
| 0.4 | 25 | 125.5 | 125 | 125 |
| 0.4 | 50 | 248.7 | 250 | 246 |
| 0.4 | 75 | 373.6 | 375 | 372 |
| 0.6 | 25 | 374.0 | 370 | 370 |
| 0.6 | 50 | 243.1 | 245 | 247 |
| 0.6 | 75 | 121.2 | 120 | 118 |

With the circuit's rule, each p = 0.4 and 0.6 mean is about 5 steps longer.

The same testbench also solves Laplace's equation in one dimension, as the
original does with its ruin probabilities. The equation is d2u/dx2 = 0 with
u(-10) = +10 and u(10) = -10. With p = 1/2, the ruin probability q_k from
start k gives u = -10 + 20 q_k at x = -10 + 20k/99. Six starting points, 500
walks each, land within 0.5 of the exact line u = -x.

`disco_top` has three walks side by side for walks in up to three dimensions,
each with a seven-segment display (`bcd_7seg`, segments {g..a}, lit = 1).
`RW_DIGITS = 2` gives the 100-state walk used for the experiments in the
original; the default top has 10,000 states.

## Timing and reset conventions

- One master clock `clk` runs everything. Host clocks and switch actions are
  one-clock synchronous strobes.
- `rst_n` is an asynchronous active-low reset that sets every register.
- Integrator and ADDIE outputs are combinational from their counters and the
  noise. Everything is registered somewhere in each loop because the patch
  panel registers its inputs.

## Simulating

Any testbench runs with plain verilator. The package must come first:

    verilator --binary --timing --assert -Wno-fatal rtl/disco_pkg.sv tb/tb_disco_top.sv \
        -y rtl -y tb --top-module tb_disco_top -Mdir obj
    ./obj/Vtb_disco_top

Every testbench prints one line `TB_RESULT checks=N failures=M`.
`tb_disco_top` runs the whole machine at its default size in well under a
second. It does the following:

- loads the patch panel, scale chain and initial conditions;
- runs the sine wave for three periods;
- reads back, through the patch panel and ADDIEs, a comparator, a summer, a
  multiplier, a squarer and a comparator slot;
- runs 4000 Markov runs plus three automatic ones;
- drives the three random walks.

It prints how often each mechanism occurred.

| testbench | what it covers |
|---|---|
| `tb_noise_source` | period 127 of a 7-stage register, bit statistics, words are m-sequences and not shifted copies |
| `tb_stoch_comparator` | exhaustive 6-bit, random 12-bit, ON fraction |
| `tb_stoch_gates` | truth tables, squarer delay, arithmetic on random streams |
| `tb_stoch_integrator` | exact counting, hold, count-up, clear, saturation, all scale codes, drift rate |
| `tb_noise_addie` | settling times, tracking |
| `tb_sa_converter` | step responses of both orders, averaging |
| `tb_data_selector`, `tb_patch_panel` | every code; serial loading; one-clock latency |
| `tb_ic_loader` | 40 words, exact load time, one integrator at a time, recirculation |
| `tb_markov_network` | every state and input pattern; transition statistics |
| `tb_pulse_gen` | exact pulse counts 1..9999, restart, continuous mode |
| `tb_markov_sim` | deterministic chain, run timing, automatic runs, one- and two-step distributions |
| `tb_random_walk` | BCD stepping, hold, reflection, both absorption rules, gambler's-ruin statistics |
| `tb_bcd_7seg` | all codes |
| `tb_markov_examples` | both worked Markov examples on the default top |
| `tb_rw_table71` | Table 7.1 durations and ruin probabilities, both absorption rules; 1-D Laplace equation |

## Not included

- The host minicomputer and its programs. Its connections are the top's serial
  and word ports.
- The master clock oscillator.
- The proposals for further work: the universal stochastic module, the
  extended Markov simulator, three-dimensional boundary recording and walks
  with variable boundaries.
