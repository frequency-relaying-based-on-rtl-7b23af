# GA frequency relay: a genetic algorithm in hardware

A frequency relay protects a power system against under- and over-frequency.
To do that it has to estimate the frequency of the voltage signal over and
over. This design treats that estimate as a curve fit. The last 15 samples of
the normalised voltage, u[n], u[n-1] .. u[n-14], are fitted by a pure sinusoid.
A genetic algorithm (GA) searches for the amplitude A, frequency f and phase
theta that minimise the absolute error

    e = sum_{k=0}^{14} | u[n-k] - A * sin(2*pi*f*k*T + theta) |,    T = 1.3 ms

and the frequency of the best candidate is the estimate. The GA runs once for
every new sample, and a whole run (30 candidates, 300 generations) must fit
inside one sampling interval. The design does this with three ideas. It breeds
several new candidates per clock in parallel copies of a pipelined "offspring
circuit". It reads every sine value from a table. It draws every random number
from a ROM that is read as an endless ring.

The architecture follows the method of "Frequency Relaying based on Genetic
Algorithm using FPGAs", an Altera Stratix II prototype fed by a PC over a
serial port. The operators, sizes and structure below come from that method.
The fixed-point formats, the pipeline, the serial framing and the other
details the method leaves open are this design's own. They are marked as such
in every file header and listed under "Departures and choices" below.

## The candidate and its cost

A candidate ("individual") is 44 bits, packed MSB to LSB as amplitude,
frequency and phase:

| field | bits | range | code to value (this design) |
|---|---|---|---|
| A | 8 | 0.75 .. 1.0 pu | 0.75 + code/1024 (max 0.999) |
| f | 24 | 58 .. 62 Hz | 58 + 4*code/2^24 |
| theta | 12 | 0 .. 2*pi | 2*pi*code/4096 |

Samples and sine values are signed 16-bit Q2.14 numbers, so 1.0 pu = 16384.
The cost is the error sum above as an unsigned 24-bit integer. Lower is
better: the cost ranks candidates in the same order as a "higher is better"
fitness.

`fitness_unit` computes the cost of one candidate per clock, with all 15
terms side by side. The phase is held in turns with 32 fraction bits, so a
whole period wraps away for free:

    step    = round(58*T*2^32) + ((f_code * round(4*T*2^32)) >> 24)   // f*T turns
    phase_k = k*step + (theta_code << 20)            (mod 2^32)
    sin_k   = SINE[phase_k[31:22]]                   // 1,024-point table
    err_k   = | u[n-k] - ((768 + a_code) * sin_k >>> 10) |

`k*step` is a multiply by a small constant, built from shifts and adds. Each
term needs one real multiplier for the amplitude, plus one multiplier for the
step: 16 multipliers per unit. The pipeline has four stages: step, table read,
error per term, and sum. The sine table `rtl/sine_lut.hex` holds
round(16384*sin(2*pi*i/1024)) for i = 0..1023.

## One GA run, clock by clock

This is the core of the design (`ga_core`, `ga_lane`, `population_mem`,
`random_rom`).

**Two populations.** `population_mem` holds two banks of 30 members, each
member being {candidate, cost}. Offspring are bred from the *current* bank and
written into the *next* one. When a generation is complete the banks swap
roles. They are built from registers, because every lane reads four members
per clock.

**Lanes.** P copies of `ga_lane` (P = 2 by default) each accept one offspring
slot per clock. A lane is a 7-clock pipeline:

| stage | work |
|---|---|
| L0 | slot issued; `random_rom` reads this lane's 96-bit random word |
| L1 | four members drawn: index = (r*30)>>8 for four 8-bit numbers r; two tournaments; parent 1 = lower cost of {a,b}, parent 2 = lower cost of {c,d} |
| L2 | per parameter: five-point crossover, then +/-1 mutation |
| F1..F4 | `fitness_unit` scores the child; written into the next bank at its slot |

**Five-point crossover** (`crossover`). For each of A, f and theta it forms
the mean m = (p1+p2)>>1 and the distance d = |p1-p2|. It then picks one of
m-d, p1, m, p2 or m+d, using floor(r*5/256) of an 8-bit random r (each point
has a chance of about 20 %). A and f are clamped to their code range; theta
wraps around the circle.

**Mutation** (`mutation`). Each parameter moves by +1 or -1 code step with
probability 26/256. A and f are clamped; theta wraps.

**Generation schedule.**
- *Initial population.* All 30 slots are issued, and each lane's child is the
  low 44 bits of its random word, scored by the same pipeline.
- *Breeding generation.* In its first clock, slot 0 of the next bank receives
  the best member of the current bank (elitism). Slots 1..29 are issued P per
  clock, 15 clocks at P = 2. The controller then waits until every lane is
  empty (8 clocks) and swaps the banks (1 clock).
- *Best member.* The best of the population being written is tracked as
  results arrive, so the elite is ready at the swap.
- *End of run.* After 300 breeding generations the best member is reported.

The cost of the elite therefore never rises. Clocks per run:
`1 + (ceil(30/P) + 9) + 300*(ceil(29/P) + 9)`, which is 7,225 at P = 2
(0.29 ms at 25 MHz), 11,440 at P = 1 and 5,118 at P = 4. A sample arrives
every 32,500 clocks at 25 MHz, so there is ample slack.

**Random numbers.** `random_rom` is a ring of 256 words of 96 bits,
`rtl/random_table.hex`, which holds a fixed-seed pseudo-random sequence. Each
word feeds one new candidate. It carries:
- four 8-bit tournament draws,
- three 8-bit crossover draws,
- three 8-bit mutation draws,
- three mutation sign bits.

The first run after reset starts at position `rng_start`. Every later run
carries on where the previous one stopped, so successive windows see
different numbers even though the table is short.

## Around the GA

- `uart_rx` is an 8N1 serial receiver with 217 clocks per bit (115,200 baud
  at 25 MHz), a two-flop synchroniser and mid-bit sampling. Bad stop bits are
  flagged.
- `sample_rx` pairs bytes into samples, low byte first. A lone byte is dropped
  after `GAP_CLKS` idle clocks, so the pairing recovers from a lost byte.
- `sample_window` is a 15-deep shift register, with `win[k] = u[n-k]`.
- `freq_relay_top` starts a GA run on every sample once the window is full.
  A sample that arrives while the GA is busy still enters the window, but it
  starts no run and pulses `overrun`. The result is reported as
  `est_freq_hz` (unsigned Q8.24 Hz), `est_best` and `est_cost`.
- `output_filter` smooths the estimate with a 2nd-order Butterworth low-pass
  at 5 Hz, sampled at the estimate rate (769 Hz). It uses direct form I on
  f - 60 Hz, with Q2.30 bilinear-transform coefficients
  (K = tan(pi*5/769.23), b0 = b2 = K^2/(1+sqrt2*K+K^2), b1 = 2*b0,
  a1 = 2(K^2-1)/(...), a2 = (1-sqrt2*K+K^2)/(...)). It starts at 60 Hz. A
  step settles in about 0.1 s, which is most of the estimation delay.

## Files

| file | role |
|---|---|
| `rtl/ga_pkg.sv` | candidate, member and random-word types; widths; phase constants |
| `rtl/freq_relay_top.sv` | top: serial in, window, GA, output filter |
| `rtl/ga_core.sv` | GA controller: schedule, elitism, best tracking, bank swap |
| `rtl/ga_lane.sv` | one offspring pipeline (selection, crossover, mutation, cost) |
| `rtl/population_mem.sv` | current/next population banks |
| `rtl/fitness_unit.sv` | cost function, all window terms in parallel |
| `rtl/tournament_select.sv`, `rtl/crossover.sv`, `rtl/mutation.sv` | GA operators |
| `rtl/sine_rom.sv` + `sine_lut.hex` | 1,024-point sine table |
| `rtl/random_rom.sv` + `random_table.hex` | circular random-number table |
| `rtl/uart_rx.sv`, `rtl/sample_rx.sv`, `rtl/sample_window.sv` | sample input path |
| `rtl/output_filter.sv` | 5 Hz Butterworth smoothing |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_frequency_cases.sv` | three disturbance-shaped frequency trajectories through the whole relay |
| `tb/tb_freq_relay_full.sv` | whole relay at default sizes, 25 MHz, real baud rate and sample spacing |
| `tb/ga_ref_pkg.sv` | reference models used by the testbenches |

Both `.hex` files are read by the path `rtl/<name>.hex`, so run simulations
from the repository root.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/ga_pkg.sv tb/ga_ref_pkg.sv tb/tb_ga_core.sv --top-module tb_ga_core -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. What the main testbenches
show:
- **`tb_ga_core`** runs three windows, including 1.0 pu / 60 Hz / 4.1888 rad.
  It checks that each result is within 0.2 % of the true frequency and that
  the reported cost matches the reference model. It also checks that the elite
  never worsens and that a run takes exactly 7,225 clocks.
- **`tb_freq_relay_top`** streams 200 samples over the serial line, with a
  step from 60 to 59.5 Hz. It forces one overrun, one framing error and one
  lost byte. It requires at least 90 % of the raw estimates, and every
  settled smoothed value, to be within 0.2 %.
- **`tb_frequency_cases`** streams three synthetic disturbances of 0.91 s
  each: a damped 1 Hz swing of 0.25 Hz after a load connection, a fall
  towards 59.4 Hz, and a rise towards 60.6 Hz. Every settled smoothed value
  must stay within 0.2 % of the true frequency over the last 0.1 s. The
  smoothed mean squared errors come out at 1.1e-3, 1.9e-3 and 1.2e-3 Hz^2.
  A fourth run adds a 2 % 3rd harmonic to the first case.
- **`tb_freq_relay_full`** uses all default parameters. Each of its four
  runs ends within 0.29 ms and is within 0.2 % of 60.4 Hz.

Every testbench run takes seconds.

## How far to trust it

Verified in simulation:
- each operator against an independent reference;
- the cost pipeline, bit-exact against a reference model of the equation
  above;
- the lane, bit-exact, in both modes;
- the controller's cycle count and elitism;
- convergence on clean sinusoids across the 58–62 Hz range;
- the serial path, including error cases;
- the filter, against a double-precision model.

Not verified:
- waveforms from real power-system disturbances; only synthetic frequency
  trajectories were used;
- noisy signals;
- synthesis timing at 25 MHz. The longest path is likely the 24x25-bit step
  multiply or the 15-term sum.

Harmonics bias the estimate. The fit spans only about one cycle, so a 2 %
3rd harmonic pushes about half of the raw estimates outside 0.2 %. The
smoothed estimate stays within 0.5 %.

A GA run sometimes ends in a poor optimum. In the end-to-end test this
happened in about 1 run in 170, and once the estimate was pinned at 58 Hz.
The 5 Hz filter absorbs such outliers, but a trip decision should use the
smoothed value.

## Departures and choices

- **Throughput.** The published timings (0.355 / 0.177 / 0.089 ms per
  window for p = 1 / 2 / 4) match about one offspring per lane per clock
  at 25 MHz with no gaps. This design stops for 9 clocks at every generation
  boundary, draining the pipeline so that selection only ever reads a
  finished population. As a result it is 30–130 % slower than those figures,
  though still far inside the 1.3 ms budget. Overlapping generations would
  remove the gap, at the cost of selecting from a partly written population.
- **Resources.** The published build reports about 400 kbit of memory in
  total. This design holds populations in registers and uses only the two
  small tables, so its memory footprint is far smaller. The multiplier count
  matches: 16 per lane.
- **Fitness sign.** Candidates are compared by cost (lower wins) rather than
  by a "higher is better" fitness; the order is the same.
- **Halving.** The mean in the crossover uses a right shift. Dividing by two
  is a shift toward the LSB.
- **Amplitude.** The amplitude code reaches 0.999 pu, not 1.0.
- **Left open by the method, chosen here.** The code-to-value maps; the
  sample and sine formats; the clamping and wrapping rules; the mutation rate
  (26/256); the random-word layout, table depth and contents; the reseeding
  across runs; re-initialising the population at random for every window;
  the serial framing and baud rate; the overrun rule.
- **Output filter placement.** The method mentions the 5 Hz Butterworth
  filter at the output without saying where it runs. Here it is in hardware.
- **Outside this design.** The 200 Hz anti-aliasing filter and the
  down-sampling by 13 belong to the sample source, not the relay, and are
  not built. The same holds for the PC, the A/D converters and the
  instrument transformers. There is no trip logic: the method compares
  frequency estimates with a commercial relay but does not describe its own
  trip thresholds.
