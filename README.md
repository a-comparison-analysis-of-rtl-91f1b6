# Chaos-based random number generators in HUB fixed point and in posits

A chaotic map evaluated with finite precision always falls into a cycle
eventually. Often that cycle is much shorter than the 2^n states the word
allows. How fast this degradation happens depends on how numbers are rounded,
so the number format is itself a design choice. This RTL holds two generators
that each lean on an unusual format:

* **Bi-HUB.** A tent map and a Bernoulli map are coupled in both directions
  and computed in 32-bit *half-unit-biased* (HUB) fixed point. HUB rounds to
  nearest at the cost of a truncation. Its implicit half-ulp also keeps an
  all-zero seed from annulling the chaos. The generator produces one 32-bit
  word every second clock.
* **Posit sine generator.** A sine map `x' = eta*sin(pi*x)` is computed in
  posit<32,2>, with the sine replaced by a three-rule Sugeno fuzzy
  approximation that needs only multiplications and additions. An LFSR
  perturbs the 27 fraction-side bits, and a mask stirs the 5 top bits. The
  generator produces one 32-bit word every 9 clocks.

The two generators are independent. `chaos_prng_top` places them side by
side, and they share only the clock and reset.

## HUB fixed point, in the form used here

A 32-bit HUB word `b` has no sign bit and no integer bits. It stands for
`(b + 1/2) * 2^-32`: every word carries an implicit least significant `1`
that is never stored. Arithmetic follows one rule:

1. Append the implicit `1` to each operand (33 bits).
2. Compute in ordinary binary.
3. Truncate back to 32 explicit bits.

With HUB, step 3 rounds to the nearest value rather than down, so
round-to-nearest costs nothing. Negation is bit inversion. The value zero
cannot be written: the all-zero word means half an ulp. This is why a
generator seeded with all zeros still moves. In plain fixed point the same
seed would stay at zero for ever.

Three consequences shape the maps. Read these before changing the arithmetic:

* **1 − x** (`hub_tent_map`). The integer 1 cannot be represented, so the
  minuend is the HUB constant `1 + 1/2 ulp`. The subtraction adds the
  inverted operand on extended words and truncates. Done this way, the result
  is one ulp above the exact `1 - x`. This is intended behaviour, and the
  testbench allows for it.
* **mu** (`hub_tent_map`). The tent parameter has an implicit integer bit `1`
  and an implicit LSB, so its 32 explicit bits give `mu = 1 + (m + 1/2)
  2^-32`. That keeps mu in (1, 2), where the tent map is chaotic.
* **x2** (`hub_bernoulli_map`). The constant 2 cannot be represented either.
  Doubling is a left shift with the freed LSB set to `1`. The branch
  `2x - 1` only clears the integer bit, so both branches give
  `{x[30:0], 1}`. On its own this map reaches the fixed point `0xFFFFFFFF`
  within 32 steps.

The adder (`hub_adder`) is the same rule: the explicit result is
`a + b + 1`, and the carry out is dropped. The sum wraps modulo 1, so it
stays in the maps' domain [0, 1).

## The Bi-HUB loop (`bicoupled_prng`)

```
             +-----------------------------------------------+
             |                                               |
   x0 ──►[MUX]── s ──►[ tent(s, mu) ]──► t_q ──┬──►[ MBT ]──►(+)──► x_q ──► x_o
           ▲ sel = init_q                 reg  │              ▲      reg
           │  (flip-flop, D = 1)               └─►[Bernoulli]─┴─ b
           │                                         │
           │                      mu = 1.111 b[28:0] ┘ (to the tent map)
           └──────────────────────── x_q ◄──────────────────────┘
```

On every clock:

* `b = Bernoulli(t_q)`. The Bernoulli map reads the tent output.
* `mu` takes its low 29 explicit bits from `b`. Its top three explicit bits
  are fixed at `111`, so mu lies in [1.75, 2), where the tent map's Lyapunov
  exponent is large. Mu is therefore internal, not an input.
* `t_q <= Tent(s, mu)`. The MUX gives `s = x0` in the first cycle after
  reset and `s = x_q` afterwards. Its select is a flip-flop whose D input is
  tied high.
* `x_q <= MBT(t_q) + b`. MBT is the modified bit transformation. It reverses
  the low 16 bits and XORs them into the high 16, which spreads values
  towards a uniform distribution. The HUB adder then sums the two sub-states.

The loop holds two 32-bit registers, so the generator's state is 64 bits
even though each output is 32. With the coupling wired this way, the state
does not repeat within 2·10^6 clocks from x0 ≈ 0.71. The HUB tent map alone,
with mu ≈ 1.75, falls into a cycle of 50 074 steps after 90 112 steps. The
original measured period 20 013 and transient 41 279 with its own seed and
mu. The exact bit patterns it used are not known, and these numbers depend
on every bit. The Bernoulli map alone falls into a single value.

Timing. The first output is valid two clock edges after reset is released,
and later outputs follow every second clock. `valid_o` marks each one. The
registers themselves advance every clock, and a value needs two of them to
cross the loop. The 65 loop flip-flops are 2 × 32 data bits plus the MUX
select flip-flop. One more phase flip-flop, which toggles every clock,
drives `valid_o = init & ~phase`.

## The posit sine generator (`sine_prng`, `sugeno_sine_map`)

**Fuzzy sine.** On the sine map's domain, v = pi·x lies in [0, pi], and only
two fuzzy rules fire there. Their triangular memberships are
`w1 = 1 - v/pi` and `w2 = v/pi`. These always sum to 1, so no normalising
division is needed. The rule outputs are `z1 = (2/pi) v` and
`z2 = 2 - (2/pi) v`, which gives

    x' = eta * (w1*z1 + w2*z2)

Mathematically this equals `eta*4x(1-x)`, which is within 0.06 of
`eta*sin(pi x)`. The hardware still evaluates the rule form above, so each
intermediate value is rounded to posit<32,2>.

**Schedule.** `sugeno_sine_map` owns one posit multiplier and one posit
adder. It runs seven steps, one per clock:

| cycle | multiplier    | adder       |
|-------|---------------|-------------|
| 1     | a = pi·x      |             |
| 2     | w2 = a·(1/pi) |             |
| 3     | z1 = (2/pi)·a | w1 = 1 − w2 |
| 4     | p1 = w1·z1    | z2 = 2 − z1 |
| 5     | p2 = w2·z2    |             |
| 6     |               | s = p1 + p2 |
| 7     | y = eta·s     |             |

Subtraction adds the negated word, because posit negation is the two's
complement. `start_i` launches an iteration, and `done_o` rises 8 cycles
after the start cycle.

**Perturbation.** Let `v` be the new sine-map word and `out_prev` the
generator's previous output:

    low  = v[26:0] ^ lfsr[26:0]
    mask = out_prev[4:0] ^ v[4:0]
    out  = {v[31:27] ^ mask, low}
    x    = {v[31:27],        low}      (fed back)

For a positive posit below 1, bits 31..27 hold the sign and the start of the
regime. Feeding them back untouched keeps the state a positive posit in
(0, 1), inside the map's domain, however the 27 low bits are flipped. The
mask still makes the top five output bits vary from word to word. The LFSR
(`lfsr`) is a 32-bit Fibonacci register, x^32 + x^22 + x^2 + x + 1, stepped
once per iteration.

**Posit arithmetic** (`posit_pkg`, `posit_mul`, `posit_add`). Each unit:

1. Decodes both words to sign, scale = 4k + e, and a 28-bit significand.
2. Computes exactly in a wide field. The adder keeps a sticky bit.
3. Re-encodes with a single round-to-nearest-even on the posit bit string.
   Results saturate at minpos and maxpos, never rounding to 0 or NaR. NaR
   propagates.

## Interfaces

| module | ports | behaviour |
|---|---|---|
| `chaos_prng_top` | `clk`, `rst_n`; `bi_x0_i[31:0]` → `bi_x_o[31:0]`, `bi_valid_o`; `sine_x0_i`, `sine_eta_i` (posit) → `sine_out_o`, `sine_valid_o` | both generators side by side |
| `bicoupled_prng` | `x0_i` → `x_o`, `valid_o` | one word per 2 clocks; x0 used in the first cycle after reset |
| `sine_prng` | `x0_i`, `eta_i` → `out_o`, `valid_o` | one word per 9 clocks; x0 must be held until the first output |
| `sugeno_sine_map` | `start_i`, `x_i`, `eta_i` → `y_o`, `busy_o`, `done_o` | 8-cycle iteration; asserts that no start arrives while busy |
| `hub_tent_map`, `hub_bernoulli_map`, `modified_bt`, `hub_adder`, `posit_mul`, `posit_add` | — | combinational |
| `lfsr` | `step_i` → `q_o` | one shift per cycle with `step_i` high |

All reset is asynchronous and active low. Both generators run freely once
reset is released. To start again from a new seed, pulse reset. The
constants of the evaluation are in `posit_pkg`:

* `P_ETA_0962` is eta = 0.962 as a posit.
* `P_PI`, `P_INV_PI` and `P_TWO_OVER_PI` are pi, 1/pi and 2/pi rounded to
  nearest posit<32,2>.
* The Bi-HUB seed x0 ≈ 0.71 is `32'hB5C28F5C`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference models live in three
packages:

* `hub_ref_pkg` uses integer arithmetic on 2^-33 units.
* `posit_ref_pkg` uses real numbers with its own posit encoder.
* `sine_ref_pkg` runs the sine-map schedule on reals.

None of them reuses the RTL's bit slicing. The tests check the following:

* The map units are checked against those models on corner and random
  operands. The tent and Bernoulli maps are also checked against the
  real-valued maps within a stated ulp tolerance.
* `tb_bicoupled_prng` and `tb_sine_prng` compare every output and check the
  2- and 9-cycle rates. They also check that an all-zero Bi-HUB seed still
  produces non-zero output, that the posit state stays in (0, 1), and that
  the Bi-HUB state does not repeat within 2·10^4 iterations.
* `tb_chaos_prng_top` runs both generators end to end at default sizes. It
  counts each mechanism and fails if one never occurs:
  * the initial-condition MUX switching from x0 to feedback;
  * the coupled mu;
  * the all-zero seed;
  * MBT;
  * adder wrap-around;
  * the tent map's 1 − x branch;
  * the LFSR perturbation;
  * the MSB mask.
* `tb_bihub_workload` runs the following, in about 6 s:
  * a 10^6-iteration period search on the 64-bit state: no repeat;
  * the stand-alone tent map: period 50 074, transient 90 112;
  * the monobit frequency test on 100 sequences of 10^6 bits: 100/100 pass.
* `tb_sine_workload` runs the frequency test with eta = 0.962, in about
  25 s. The perturbed generator passes 98/100 sequences. The bare sine map
  passes 0/10 sequences, because its top bits hardly change.

The other statistical suites, the Lyapunov exponents and the histograms are
analyses of output sequences done in software. They are not reproduced here.

To simulate with Verilator, list the packages first. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/hub_pkg.sv rtl/posit_pkg.sv tb/hub_ref_pkg.sv tb/posit_ref_pkg.sv \
      tb/sine_ref_pkg.sv tb/tb_chaos_prng_top.sv --top-module tb_chaos_prng_top
    ./obj_dir/Vtb_chaos_prng_top

## How far this follows the original architecture

These parts follow the source design:

* the HUB format and its arithmetic rule;
* the tent and Bernoulli maps as HUB datapaths, with an MSB-driven branch
  MUX;
* mu built from 29 Bernoulli bits and the fixed `111`;
* the MBT equations;
* the initial-condition MUX driven by a flip-flop with D tied high;
* the 32-bit word;
* the two-cycle latency and 65 loop flip-flops;
* posit<32,2>;
* the three-rule fuzzy sine with its memberships and rule outputs;
* the 27-bit LFSR perturbation with feedback and the 5-bit mask without
  feedback.

These are choices made here. Treat them as such:

* **Bi-HUB wiring.** The exact connections of the coupled loop are this
  design's reading: the Bernoulli map is fed by the registered tent output,
  and the adder sums MBT(t) and the Bernoulli output. A version with a single
  32-bit state was tried first and cycled after about 5·10^4 iterations. The
  original reports no period within 10^6, which this wiring reproduces.
* **Bernoulli fixed point.** The shift-and-set-LSB doubling reaches
  `0xFFFFFFFF`, not a value just below 1/2 as the original's result suggests.
  The period (1) and the length of the transient (about 30) agree.
* **Overflow.** Overflow in the HUB adder and in the extreme corner of the
  tent product wraps modulo 1.
* **valid_o.** The Bi-HUB generator marks every second register update as a
  new output, matching the quoted throughput (Fmax·32/2).
* **Sine system in hardware.** The original implements the sine system in
  software. The hardware form here is new:
  * the operation order and the rounding after each operation;
  * multiplying by 1/pi instead of dividing by pi;
  * a shared multiplier and adder with a 9-cycle iteration;
  * the LFSR polynomial, seed and stepping.
  Outputs are therefore not bit-identical to the original software.
* **Not built.** These were used in the original only for comparison:
  * the standard fixed-point Bi-coupled variant;
  * the LFSR-perturbed Bi-coupled variant;
  * the IEEE-754 single-precision sine map;
  * the FPGA board and host measurement setup.

## Files

* `rtl/`:
  * packages `hub_pkg` and `posit_pkg`;
  * the HUB units, `bicoupled_prng`;
  * the posit units, `sugeno_sine_map`, `lfsr`, `sine_prng`;
  * `chaos_prng_top`.
* `tb/`:
  * one `tb_<module>.sv` per module;
  * the two workload benches;
  * the three reference packages.
