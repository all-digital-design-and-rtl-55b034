# All-digital PID controller (ADPID)

A PID controller for a plant whose output is measured by a pulse encoder,
built only from counters, an adder, a few flip-flops and gates. It has no
ADC, no DAC and no multiplier. The controller compares the encoder pulse
train with a reference pulse train that stands for the desired output, and
turns the mismatch into a PWM drive with a sign. Each of the three gains is
the ratio of two counting frequencies:

    K_P = f_P / f_A     K_I = f_I / f_A     K_D = f_D / f_A

f_P, f_I and f_D are the rates at which the error is counted. f_A is the
rate at which the weighted sum is counted back out as PWM. Changing a gain
therefore means changing a frequency, not a coefficient.

The RTL follows the controller architecture of H. H. Chin's MS thesis
(University of Kentucky, 2006). That architecture derives from a 1998 patent
application by B. Walcott and M. Marra, and it sums the three terms before
the output counter, so that only four counting frequencies are needed instead
of six. The default parameters are those of the thesis's case study: position
control of an inkjet-printer carriage.

## How one error pulse becomes a PWM burst

This is the core idea, and the part that is hardest to see from the code.

1. **Error pulse.** The error signal P is the XOR of the generated reference
   and the encoder output. While the plant runs at the reference rate, the
   two trains line up and P stays low. When the plant leads or lags, P goes
   high for a time equal to the phase difference.
2. **Measuring the pulse.** While P is high, three up/down counters count at
   their own rates:
   * C_P counts at f_P and restarts at every pulse, so it measures the
     length of the latest pulse.
   * C_I counts at f_I and never restarts, so it sums the signed error time.
   * C_D counts at f_D like C_P. It also keeps the previous pulse's count in
     a register R, and when the pulse ends it forms C_D-R, the change from
     one pulse to the next.

   The direction signal D chooses whether they count up (plant too slow) or
   down (plant too fast). The restarting counters begin at +1 or -1, not 0,
   so that a pulse counts from the moment it appears.
3. **Summing.** The combinational adder forms C_P + C_I + (C_D-R).
4. **Counting out.** When P falls, the sum is loaded into the combined
   counter C_A. C_A then counts towards zero at f_A. While C_A is nonzero,
   the PWM output (the OR of all C_A bits) is high. The PWM burst therefore
   lasts sum / f_A seconds. For the P term alone that is
   (T_err · f_P) / f_A = K_P · T_err: the error duration amplified by K_P.
   The sign of the sum sets the drive direction `pwm_dir`.

If the next error pulse ends before C_A reaches zero, the new sum replaces
the old one: the rest of the previous burst is dropped. This truncation is
inherent to the architecture. It is the main reason why this controller
tracks less smoothly than a continuous PID.

```
 ref_fword ─► freq_gen ─► ref_out ─┐
                                  ├─► error_detector ─► err (P), err_rise, err_fall
 enc_in ───────────────────────────┘          │
                         direction_detector ◄─┘   dir_cmp (external comparator)
                                  └─► dir_dig ──► mux(dir_digital) ─► dir (D)
 f_P ─► p_counter (C_P) ─┐
 f_I ─► i_counter (C_I) ─┼─► pid_adder ─► sum ─► combined_counter ─► ca ─► OR ─► pwm
 f_D ─► d_counter (C_D-R)┘                        ▲      f_A ─┘        MSB ─► pwm_dir
                    combined_ctrl (load, select) ─┘
 start/stop ─► jk_ff ─► clr (enables counters and combined_ctrl)
```

## Blocks

| Module | Role |
|---|---|
| `adpid_pkg` | FSM state type (`ST_A/B/C/D`), `hz_to_fword()` for frequency words |
| `freq_gen` | Phase accumulator: `wave` is a square wave (generated reference), `tick` a one-clock strobe (counting rate) |
| `error_detector` | Two-flop synchronisers, XOR, registered error with rise/fall strobes |
| `direction_detector` | Digital direction: compares the high-pulse widths of reference and encoder |
| `jk_ff` | JK flip-flop holding the controller enable `clr` (J = start, K = stop) |
| `updown_counter` | Loadable, saturating two's-complement up/down counter (all four counters) |
| `p_counter` | C_P: restart at ±1 on each error pulse, count at f_P while P is high |
| `i_counter` | C_I: ±1 at the first error only, then accumulate at f_I |
| `d_counter` | C_D, register R and held difference C_D-R |
| `pid_adder` | C_P + C_I + (C_D-R), W+2 bits, sign bit |
| `combined_ctrl` | Four-state load/select FSM of C_A |
| `combined_counter` | C_A, load multiplexer, count to zero at f_A, PWM = OR of bits, direction latch |
| `adpid_top` | Everything wired together; the five frequency sources |

### Direction of the error

XOR only says that the trains disagree, not which one is ahead. The
controller takes the direction from one of two sources, chosen at run time
by `dir_digital`:

* **`dir_cmp`** (`dir_digital = 0`): the output of an external analog
  comparator that compares the setpoint voltage with the plant's analog
  output. It should be 1 when the output is below the setpoint. This is the
  arrangement the thesis simulated.
* **`direction_detector`** (`dir_digital = 1`): all-digital. Two counters
  running at the same rate (the system clock) measure each high pulse of the
  reference and of the encoder. A longer encoder pulse means a lower encoder
  frequency, so `dir = 1`; a shorter one gives `dir = 0`; equal lengths keep
  the last value. The detector updates only after a pulse has ended, so it
  lags by up to one encoder period.

### The combined-counter FSM

States use the codes of the original state diagram. Any state goes to A when
`clr = 0`.

| State | Code | Next state (clr = 1) | Meaning |
|---|---|---|---|
| A | 00 | err ? B : A | idle, select = 0 |
| B | 01 | err ? B : C | error pulse in progress |
| C | 11 | D | pulse just ended, select = adder |
| D | 10 | err ? B : D | between pulses |

`load` is a one-clock strobe in two cases:

* on entering B from A: the first error after enabling. The select is still
  0, so C_A is cleared.
* on entering D from C: a pulse has ended, so C_A takes the sum.

Going from D back to B does not load, so C_A keeps counting through the next
error pulse. The original state diagram shows the load output asserted for
the whole of B and D. This RTL uses single-clock strobes, which is what the
accompanying description of the load signal asks for.

## Timing

* All logic is synchronous to one clock `clk` (default 1 MHz). Every
  counting frequency is a clock-enable strobe from a phase accumulator:
  `fword = f · 2^32 / f_clk`, with a resolution of 0.23 mHz and one clock of
  jitter.
* Inputs reach `err` three clocks after they change: two synchroniser
  stages, then the error register.
* C_P, C_I and C_D load their ±1 start value one clock after `err` rises.
  They step one clock after a rate tick that falls inside the pulse.
* C_D-R and R update in the clock after `err` falls. The sum is loaded into
  C_A two clocks after `err` falls (states C, then D), and `pwm` rises one
  clock later.
* A PWM burst lasts |sum| periods of f_A (±1 period of phase-accumulator
  jitter). It is cut short if the next error pulse ends first.

## Parameters of `adpid_top` (defaults = carriage case study)

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 1 000 000 | system clock frequency (this design's choice) |
| `PHASE_W` | 32 | phase-accumulator width (this design's choice) |
| `W` | 4 | width of C_P, C_I, C_D and C_A (4-bit counters as in the source design) |
| `F_P_HZ` | 15 000 | f_P |
| `F_I_HZ` | 10 | f_I |
| `F_D_HZ` | 10 | f_D |
| `F_A_HZ` | 5 000 | f_A, so K_P = 3, K_I = K_D = 0.002 |
| `DIR_CNT_W` | 16 | width of the pulse-width counters in the direction detector |
| `ALIGN_TICKS` | 0 | 1: restart the f_P, f_I, f_D clocks at each error edge (see below) |

A rate of 0 Hz switches that term off. The setpoint is the run-time input
`ref_fword`. For the case study, 1 V at 150 encoder pulses per volt gives a
150 Hz reference: `ref_fword = adpid_pkg::hz_to_fword(150, CLK_HZ, 32)`.

### Choosing the frequencies

This is the recipe the source design uses:

1. Design K_P, K_I and K_D with any classical method.
2. Set the frequency of the largest gain's term to 50–100 times the
   reference frequency.
3. Derive f_A from that term's gain.
4. Derive the other two frequencies from their gains.

For the case study: K_P = 300, K_I = K_D = 0.2, scaled by 1/100 to 3, 0.002
and 0.002 (the factor of 100 moves into the plant gain). Then
f_P = 100 · 150 Hz = 15 kHz, f_A = 15 kHz / 3 = 5 kHz, and
f_I = f_D = 0.002 · 5 kHz = 10 Hz.

## Ports of `adpid_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `start`, `stop` | in | 1 | J and K of the enable flip-flop |
| `ref_fword` | in | PHASE_W | setpoint as reference frequency word |
| `enc_in` | in | 1 | encoder pulse train (asynchronous) |
| `dir_cmp` | in | 1 | direction from an external comparator (1 = output below setpoint) |
| `dir_digital` | in | 1 | 1: use the built-in digital direction detector |
| `pwm`, `pwm_dir` | out | 1 | PWM magnitude; direction (1 = negative drive) |
| `ref_out`, `err`, `dir`, `clr` | out | 1 | generated reference, error P, direction D in use, enable |
| `cp`, `ci`, `cd`, `r` | out | W | term counters and register R |
| `cdr` | out | W+1 | C_D-R |
| `sum`, `sum_neg` | out | W+2, 1 | adder output and its sign |
| `ca`, `ca_state`, `ca_load` | out | W, 2, 1 | combined counter, its FSM state and load strobe |

The PWM still needs an external amplifier and H-bridge. In the case study
that stage has a gain of 3 on a 5 V PWM.

## Where this RTL departs from the source design

* **One clock and clock enables.** The source design used separate
  oscillators and TTL counters. Here every frequency is a strobe from a
  phase accumulator on one clock.
* **Load on the error edge.** The ±1 load of C_P and C_D, and the first
  load of C_I, are taken on the system clock in the first clock of the
  error. They do not wait for the next edge of the counter's own rate, as a
  synchronous load on a TTL counter clocked at f_P, f_I or f_D would. The
  later counts still follow the free-running rate clock unless
  `ALIGN_TICKS` is set.
* **Saturation.** Counters saturate at the ends of their range instead of
  wrapping. The adder is widened to W+2 bits, and its sum is limited to the
  range of C_A when loaded. The TTL parts wrap modulo 16, and the source
  describes saturated integrators. The exact wrap/saturation behaviour of its
  4-bit adder is not specified.
* **Sign of the derivative.** The difference is new count minus previous
  count (C_D − R).
* **PWM direction latched.** The adder MSB is captured when C_A loads, so the
  direction belongs to the burst being counted, not to the live adder output.
* **Enable.** What drives the enable flip-flop is not specified; here J and K
  are the `start` and `stop` inputs. While disabled, C_P, C_I, C_D and R are
  held at zero.
* **Improvements proposed for later.** The source suggests two.
  * Start the counting clocks in phase with each error edge. This is built
    as the option `ALIGN_TICKS`, described below. It is off by default,
    because the main design runs its counting clocks freely.
  * Swap the gain convention to K = f_A / f_Z. This is only a different
    choice of frequency parameters, so the RTL has no switch for it.

### Aligned counting clocks (`ALIGN_TICKS = 1`)

With free-running clocks, a 10 Hz integral clock ticks once every 100 ms.
Any error pulse that falls between two ticks is never counted. At the
case-study settings, only 2 of the 93 error pulses in the first 350 ms
change C_I.

With `ALIGN_TICKS = 1`, every rising edge of the error restarts the phase
of the f_P, f_I and f_D generators:

* the error edge acts as a counting edge: C_P and C_D load ±1, and C_I
  counts one step;
* later counts follow at whole periods of each frequency. The first f_P
  count lands 69 clocks after the first clock of the error: 67 clocks to
  the phase carry, plus the tick register and the counter register.

The integral then sees every error pulse. In the case-study loop, C_I
moves at every pulse except while it is saturated. The output still
settles at 1.00 V, but with a higher peak (1.14 V) and more ripple
(0.95–1.06 V) than with free-running clocks. This is because at the
default K_I one count per pulse is a large integral step.

## Limits to keep in mind

* With the default 4-bit counters and f_P = 15 kHz, an error pulse longer
  than about 0.4 ms saturates C_P at +7 or −8. Pulses can last up to 3.3 ms,
  half the reference period. Raise `W` for a more linear proportional term;
  the default reproduces the source design.
* At f_I = f_D = 10 Hz the integral and derivative counters tick once per
  100 ms. They change only when a tick falls inside an error pulse, so these
  terms act statistically, not on every pulse.
* A controller clocked much faster than the encoder sees a noisy `err` if
  the encoder edges bounce. The synchronisers do not filter glitches.

## Verification

Every testbench checks the design against values it works out itself and
prints `TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_freq_gen` | exact tick spacing and counts, square wave, restart, hold |
| `tb_error_detector` | XOR truth table and 3-clock latency, edge strobes, on random trains |
| `tb_direction_detector` | slow / fast / equal encoder pulses give 1 / 0 / hold |
| `tb_jk_ff` | JK truth table on random J/K |
| `tb_updown_counter` | random load/clear/count against a saturating model |
| `tb_p_counter`, `tb_i_counter`, `tb_d_counter` | cycle-by-cycle comparison with integer models, plus directed cases |
| `tb_pid_adder` | all 8192 input combinations for W = 4 |
| `tb_combined_ctrl` | every FSM transition, load strobes and select, random walk |
| `tb_combined_counter` | zero/sum loads, count-to-zero time, sign, limits, interruption |
| `tb_adpid_top` | whole controller at default parameters, about 1 s of operation (below) |
| `tb_adpid_closed_loop` | closed loop around a carriage model (below) |
| `tb_adpid_term_tests` | P-only, I-only and D-only gain tests (below) |
| `tb_adpid_aligned_ticks` | aligned against free-running counting clocks, both in closed loop |

**`tb_adpid_top`** runs these phases: slow encoder, fast encoder, stop and
restart, digital direction detector, then a very fast encoder. Every clock it
checks the error, every counter update, every C_A load and step, and the PWM
against scoreboards. It also requires each of these mechanisms to occur at
least once: counter restart and saturation, integral carry-over, positive and
negative derivative, zero and sum loads, count completion, a burst cut short
by the next load, sum limiting, both PWM directions, both count directions,
a digital-direction change, and the stop.

**`tb_adpid_closed_loop`** uses `carriage_plant_model`, a behavioural
model: plant 1947/(s(s+47.579)), encoder 150 pulses per volt, comparator on
the setpoint. With the default parameters, the output reaches 0.96 V at
160 ms and peaks at 1.08 V. Over the last 150 ms of a 350 ms run it averages
1.00 V with a ripple of about ±30 mV.

**`tb_adpid_term_tests`** reproduces the single-term tests with 8-bit
counters:

* P only, K_P = 1.5: the PWM burst lasts 1.5 times the error pulse.
* I only, K_I = 1: C_I grows by the error time at each pulse, until the
  bursts are cut short.
* D only, K_D = 1, on steadily growing error pulses: C_D-R equals the change
  in pulse length.

Running a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/adpid_pkg.sv tb/tb_adpid_top.sv --top-module tb_adpid_top -o sim
./obj_dir/sim
```

Replace `tb_adpid_top` with any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/adpid_pkg.sv rtl/adpid_top.sv`.
The only warnings are for intentionally unconnected outputs of the frequency
sources.
