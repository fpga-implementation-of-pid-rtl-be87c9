# Self-tuning PID temperature controller with on-chip differential evolution

This RTL describes a heating controller whose PID coefficients are searched
for by the chip itself. A fixed-point PID controller drives a heater through a
PWM output and reads the temperature through an ADC. Next to it, a small
differential-evolution (DE) optimiser tries candidate coefficient sets
(Kp, Ti, Td). It scores each set by running a second copy of the same PID
datapath in closed loop against a plant model. The best set found is loaded
into the controller.

The architecture follows the FPGA design published by Hanhila, Mantere and
Alander ("FPGA-implementation of PID-controller by differential evolution
optimization"), which was written in VHDL. This is an independent
SystemVerilog description. That publication gives the block structure and a
few sizes, but not many of the details. Where the RTL had to choose, the
choice is stated below and in each file's header.

```
            +--------------------------- de_pid_top ----------------------------+
 buttons -->| user_interface --cmd--> controller_fsm --start--> de_optimizer    |
 switches   |      | set value           |   ^ best gains        |            |
            |      v                     |   +-------------------+            |
            |   pid_core <--gains--------+                                    |
 ADC ------>| adc_interface --mv--> pid_core --u--> pwm_generator ------------|--> heater
            +---------------------------------------------------------------------+

 de_optimizer:  rng_lfsr x4 -> rng_mixer -> random_module --draws--+
                ranking_module -> parent choice -> mutation_vector -> crossover_selection
                fitness_module (pid_core + plant model) -> selection -> next population
```

## The PID datapath (`pid_core`)

Each sample computes, in 36-bit two's complement:

```
e[n]  = ref - mv                                   (18 bits)
P[n]  = Kp * e[n]
I[n]  = I[n-1] + Ti*e[n] + Ti*e[n-1]               trapezoidal integrator
D[n]  = 2 * (Td*e[n] - Td*e[n-1]) - D[n-1]         bilinear (Tustin) derivative
u[n]  = sat18( (P + I + D) >>> FRAC )
```

The hardware blocks map one-to-one onto these terms:

* A subtractor.
* Three gain multipliers.
* An output register for P.
* A Delay and Adder forming `Ti*e[n] + Ti*e[n-1]`.
* Adder1 with its feedback register Delay1, the integrator.
* Delay2 and Sub forming the difference.
* Sub2 with Delay3, the derivative recursion.
* AdderB, the final sum.

Each block is a small module of its own. They are `pid_subtractor`, `pid_gain`,
`pid_delay`, `pid_addsub` and `pid_output_adder`. `pid_core` instantiates them
under the block names above.

The gains are 16-bit unsigned numbers, used as non-negative values with
`FRAC = 16` fraction bits, so each gain is in [0, 1). I and D saturate at the
36-bit limits, and u saturates to 18 bits signed.

The factor 2 in the derivative is controlled by `DERIV_SHIFT`. The default of
1 includes it. The original implementation lacked it and reported that as a
mistake; `DERIV_SHIFT = 0` reproduces that variant. The Tustin derivative
without a filter has its pole at -1. For a noisy error, its output therefore
alternates in sign from sample to sample. This is a property of the equation,
not a bug.

Timing: raise `en` for one clock per sample. The products are registered on
that clock, and the I, D and output registers one clock later. `u_valid`
pulses two clocks after `en`. Do not raise `en` again before then. `clear`
zeroes all state.

## The optimiser (`de_optimizer`)

This is the part that needs the most explanation.

**Population.** The population has NP = 4 individuals, each of three 16-bit
genes: `[0]` is Kp, `[1]` is Ti and `[2]` is Td. Each individual also carries
its own mutation factor F (8 bits, units of 1/128) and crossover rate CR
(8 bits, units of 1/256). These are the "self-adaptive" control parameters.
Costs are 32 bits, and lower is better.

**Sequence.** After `start`, the state machine runs these steps:

1. **Create the population.** Over four clocks it fills the population with
   random genes, using F = 0.5 and CR = 0.9.
2. **Score the population.** The fitness module computes each individual's
   cost.
3. **Run G generations** (default 50). For each target individual `i` the
   optimiser does the following:
   * **Rank.** `ranking_module` orders the four individuals by cost, in
     parallel, breaking ties by index. The three individuals other than `i`
     are listed best first.
   * **Choose parents by rank.** With four individuals, the three parents of
     DE/rand/1 are exactly those three others, and only their roles are
     chosen:
     * The base vector is the better-ranked of two uniform picks among the
       three. The best is chosen with probability 5/9, the middle one 3/9 and
       the worst 1/9.
     * The "+" side of the difference is the better of two picks among the
       remaining two, with probabilities 3/4 and 1/4.
     * The last one is the "-" side.

     This is a minimal hardware form of ranking-based mutation: good
     individuals steer the search more often.
   * **Self-adapt.** With probability 0.1, the trial gets a fresh F, uniform
     in [0.1, 1.0). Independently, with probability 0.1 it gets a fresh CR,
     uniform in [0, 1). Otherwise it inherits the target's values.
   * **Mutate.** `mutation_vector` computes `v = base + F*(a - b)`, clamped to
     0..65535.
   * **Cross over.** In `crossover_selection`, gene j comes from v when its
     8-bit draw is below CR or j equals `jrand`. At least one gene therefore
     always comes from the mutant.
   * **Score the trial** with the fitness module.
   * **Select.** The trial, with its F and CR, goes into the next population
     if its cost is lower than or equal to the target's. Ties favour the
     trial. Otherwise the target goes in.

   At the end of the generation, the next population becomes the current one.
   Replacement is generational, not in place.
4. **Finish.** `best` and `best_cost` take the lowest-cost individual, and
   `done` pulses.

Instead of random genes, individual 0 can start from given values. Set
`seed_en` together with `start`, and supply the values on `seed_genes`. In
the top level the seed is the gains currently in use, selected by the
`sw_seed` switch. The result of a seeded run is then never worse than those
gains, as far as the cost function can tell.

Because every slot only ever keeps a solution at least as good, the best cost
of the population never rises from one generation to the next.

**Random numbers.** Four 32-bit Galois LFSRs (`rng_lfsr`) start 0, 3, 7 and
12 clocks after reset, so they are out of step. `rng_mixer` passes them
through unchanged until the optimiser is busy. From then on, each of three
output words is one generator XOR two others rotated by 7 and 19 bits, plus
a free-running counter.

`random_module` cuts the three words into all the draws needed in one clock:
three initial genes, three crossover draws, `jrand`, four parent picks, two
regeneration flags, a new F and a new CR. Ranges of 0..2 use multiply-high
reduction, `(r8 * 3) >> 8`.

**Cost function (`fitness_module`).** The candidate gains drive an internal
`pid_core` in closed loop with a first-order plant model:

```
y[0] = 0,   y[n+1] = y[n] + ((u[n] - y[n]) >>> 2),   ref = 2000
cost = sum over n = 0..N_EVAL-1 of |2000 - y[n]|          (N_EVAL = 16)
```

This is the integral of absolute error (IAE) of a step response. It rewards
gains that reach 2000 quickly without overshoot or oscillation. The plant
stands in for the real process during optimisation. It is not the heater, so
gains that are optimal here are only a starting point for the real loop.

**Cycle count.** Each cost takes `2 + 3*N_EVAL` clocks, since one PID sample
takes three clocks. A full optimisation takes exactly
`210 + 213*G` clocks from the clock in which `start` is driven to `done`
(with N_EVAL = 16). For G = 50 that is 10860 clocks, or 217 µs at 50 MHz.
The original reports 3281 clock cycles for 50 generations. Its
evaluation evidently used far fewer clocks per candidate; how many is not
known.

**What to expect.** With only four individuals, results vary a lot from run to
run, as the original also observed. In twenty consecutive 50-generation runs
the best costs ranged from about 5700 to about 23000, with twenty different
gain sets. Good runs find Kp near 1 and Ti around 0.25. Running the
optimisation again with the seed switch on keeps the better result.

## Controller sequencing

* **`user_interface`.** Four buttons (set, start, stop, optimise) pass a
  two-flip-flop synchroniser. Each rising edge becomes a one-clock command,
  two clocks after the press. Buttons are assumed to be debounced
  externally. The set button loads the 16 switches into the set value, which
  is 2000 after reset. The `sw_seed` switch is synchronised the same way.
* **`controller_fsm`.** The states are STANDBY (0), OPTIMIZE (1), RUN (2) and
  SHUTDOWN (3).
  * In STANDBY, *optimise* starts the DE and *start* enters RUN, clearing
    the PID state.
  * OPTIMIZE ignores all commands until the optimiser finishes. It then loads
    the best gains and returns to STANDBY.
  * In RUN, *stop* goes through SHUTDOWN (one clock, PID cleared) to STANDBY.
    *optimise* turns the heater off and optimises.
  * After reset the gains are Kp = 0.5, Ti = 0.01 and Td = 0.
* **`adc_interface`.** Every `SAMPLE_DIV` clocks it pulses `adc_convst`. It
  then waits for `adc_drdy` and presents `adc_data` as `mv`, with a one-clock
  `mv_valid`. `mv_valid` is also the PID's sample strobe. The default
  SAMPLE_DIV of 100000 gives the original's 500 Hz at a 50 MHz clock. A
  conversion still busy when the next is due is dropped and counted in
  `adc_missed`.
* **`pwm_generator`.** A counter runs from 0 to period-1. The output is on
  while the duty value is greater than the counter.
  * The duty value is the PID output u. Negative values count as 0, and
    values above the period count as the period.
  * The duty value is taken at the last clock of each period.
  * By default the period equals the sample period (100000 clocks), so one
    unit of u is one clock of heating per sample.

## Number formats

| quantity | width | format |
|---|---|---|
| Kp, Ti, Td | 16 | unsigned, value / 65536 |
| ref, mv, set value | 16 | unsigned ADC counts |
| error e | 18 | signed |
| P, I, D, sums | 36 | signed, saturating |
| u | 18 | signed, saturating |
| F | 8 | unsigned, value / 128 |
| CR, crossover draws | 8 | unsigned, value / 256 |
| cost | 32 | unsigned |

## Departures from the original and how far to trust this RTL

These parts follow the original description:

* The block structure of the PID, and its widths: 16-bit gains, 18-bit error
  and output, 36-bit internal.
* NP = 4 individuals with 3 genes each.
* DE/rand/1/bin with ranking-based mutation, self-adaptive F and CR, and
  generational selection that favours the trial on ties.
* 50 generations and the reference 2000.
* Staggered starts of the random generators, and a mixer that starts with the
  optimisation.
* A PWM built from a counter and a comparator.
* The four controller modes.

These are this design's own choices:

* The fixed-point scale of the gains (FRAC = 16).
* The cost function (IAE of a step response of a model plant) and N_EVAL.
* The parent-choice scheme, the adaptation probabilities and ranges, and the
  initial F and CR.
* The LFSR kind and the mixing function.
* The ADC handshake, the FSM transitions, the button handling, and the PWM
  clamping and period.
* The derivative includes the factor 2.

The optimiser's clock count is about three times the original's: 10860
against 3281 for 50 generations.

The original's published execution times equal its clock count times the
sample period: 6.562 s at 2 ms for 50 generations. That implies one
optimiser step per control sample. Here the optimiser steps on every clock
against its internal plant model. Its run time therefore does not depend on
the sample rate: about 0.22 ms at 50 MHz for 50 generations.

The processor system that surrounded the original controller is not included:
a soft CPU, SDRAM and its PLL, a character LCD and an audio codec. None of it
is on the control path.

Three further testbenches run the original's workloads:

* `tb_table1_generations` runs optimisations of 25, 50 and 100 generations.
  It checks their clock counts, and prints them next to the published ones.
* `tb_fig5_runs` makes twenty optimisation runs. After each run it drives the
  PID with the run's best gains and a random error of up to 5 % of the
  reference 2000. It prints the P, I and D terms and the control output, and
  checks them against the model.
* `tb_sec3_test_runs` drives the random chain into the ranking module. First,
  with the mixer off, it checks that the generators start at their staggered
  delays and that the lanes copy them. Then it makes 24 runs of four
  individuals with three random parameters each. It ranks each run by the sum
  of the parameters and checks the result against its own sort. It also
  checks that no value repeats within a run.

Every block has a self-checking testbench that compares it against an
independent integer model or direct computation. The small PID building
blocks are tested through `tb_pid_core`. The top-level test runs with
every parameter at its default and does the following:

* Optimises twice, once from stand-by and once from run.
* Checks that the reported cost equals a software model's cost for the loaded
  gains.
* Closes the loop around a heater model for 30 samples.
* Checks every PID output and every PWM period's on-time.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Run from the folder that holds `rtl/` and `tb/`:

```sh
# one block, e.g. the PID datapath
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/de_pid_pkg.sv tb/tb_pid_core.sv --top-module tb_pid_core
./obj_dir/Vtb_pid_core

# whole design, all defaults (about 5 s)
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/de_pid_pkg.sv tb/tb_model_pkg.sv tb/tb_de_pid_top.sv --top-module tb_de_pid_top
./obj_dir/Vtb_de_pid_top
```

Verilator finds the other modules through `-I` by file name. Testbenches
that use the reference models need `tb/tb_model_pkg.sv` listed ahead of them.
These are `tb_fitness_module`, `tb_de_optimizer`, `tb_de_pid_top`,
`tb_table1_generations` and `tb_fig5_runs`.

## Changing it

The parameters of `de_pid_top` are:

| parameter | default |
|---|---|
| `G` | 50 |
| `N_EVAL` | 16 |
| `SAMPLE_DIV` | 100000 |
| `PWM_PERIOD` | 100000 |
| `PWM_W` | 17 |
| `ADC_W` | 16 |
| `FRAC` | 16 |
| `DERIV_SHIFT` | 1 |

Some constants live in `de_pid_pkg`:

* NP = 4 and D = 3 are fixed package constants. The parent-choice logic in
  `de_optimizer` assumes exactly four individuals.
* The gene width and the F, CR and cost widths are also there.

To optimise a different objective, replace `fitness_module`. Its interface is
`start` and `genes` in, `done` and `cost` out. The optimiser does not depend
on what the genes mean.

If `FRAC` changes, change the reference models in `tb/tb_model_pkg.sv` and
`tb/tb_pid_core.sv` too: both shift by 16.

## Files

| file | content |
|---|---|
| `rtl/de_pid_pkg.sv` | sizes, types, saturating adders |
| `rtl/pid_core.sv` | PID datapath |
| `rtl/pid_subtractor.sv`, `rtl/pid_gain.sv`, `rtl/pid_delay.sv`, `rtl/pid_addsub.sv`, `rtl/pid_output_adder.sv` | PID building blocks |
| `rtl/rng_lfsr.sv` | LFSR with start delay |
| `rtl/rng_mixer.sv` | random-word mixer |
| `rtl/random_module.sv` | random draws |
| `rtl/ranking_module.sv` | ranking |
| `rtl/mutation_vector.sv` | DE mutation |
| `rtl/crossover_selection.sv` | DE crossover and selection |
| `rtl/fitness_module.sv` | cost of a gain set |
| `rtl/de_optimizer.sv` | DE state machine and population |
| `rtl/user_interface.sv` | buttons and set value |
| `rtl/controller_fsm.sv` | controller modes |
| `rtl/adc_interface.sv` | sampling |
| `rtl/pwm_generator.sv` | heater drive |
| `rtl/de_pid_top.sv` | everything wired together |
| `tb/tb_*.sv` | one testbench per block, plus `tb_table1_generations`, `tb_fig5_runs` and `tb_sec3_test_runs` |
| `tb/tb_model_pkg.sv` | integer models of the PID and the cost |
