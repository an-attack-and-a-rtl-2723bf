# Non-deterministic hardware timer trigger

A hardware trojan usually has a trigger that wakes its payload at a chosen moment.
The obvious trigger is a cycle counter. A counter must keep its state across
power-downs, so it needs non-volatile (NV) memory. NV cells survive only a limited
number of writes, about 10,000 for NAND Flash. The counter can therefore commit its
count only rarely. Between commits, the progress it has made exists only in volatile
flip-flops. Power-cycling the chip more often than that period erases the progress,
and the trigger never fires.

This RTL implements the alternative: a **non-deterministic timer**. It does not count
cycles. It runs a stream of independent random trials and counts only the
*successful* ones in NV memory. The only volatile state is the trial in progress.
With the default parameters that is 27,648 clock cycles, or 27.6 µs at 1 GHz. Even
so, the trigger time is predictable: 8,498 successes at probability 2^-27 give a
mean of one year with a standard deviation of about four days. The NV memory holds
a 14-bit count and is written at most 8,498 times.

The deterministic timer that this design is compared against is included alongside
it. It is a volatile cycle counter chained to an NV counter.

This is a security-research artefact. It shows why power cycling and pre-silicon
simulation are weak defences against such triggers. Under simulation it never fires
(see below).

## How the trigger time is controlled

Each trial takes `R` random bits and compares them with an `R`-bit key, so a trial
succeeds with probability p = 2^-R. The timer fires after `KTRIG` successes. The
number of trials until then is a sum of `KTRIG` independent geometric variables:

- mean `KTRIG * 2^R` trials
- standard deviation `sqrt(KTRIG) * 2^R` trials, i.e. `1/sqrt(KTRIG)` of the mean

`R` therefore sets the time scale, and `KTRIG` sets how sharp the trigger is. A large
`KTRIG` behaves almost like a deterministic timer. `KTRIG = 1` fires at a random,
geometrically distributed time. A trial consumes `R` bits, and each bit takes
`DECIM` cycles, so:

    trial length (volatile window) = DECIM * R cycles
    mean trigger time              = KTRIG * 2^R * DECIM * R cycles

| parameter | default | meaning |
|---|---|---|
| `N_RO` | 16 | ring oscillators in the TRNG |
| `DECIM` | 1024 | XOR decimation ratio, cycles per random bit |
| `R` | 27 | bits per trial, p = 2^-27 |
| `KTRIG` | 8498 | successes to trigger |
| `M` | 14 | NV count width |
| `KEY_MODE`, `KEY` | static, `27'h2a55a5a` | key choice (see below) |
| `TV` | 3,153,600,000,000 | deterministic timer: cycles per NV increment (52.56 min at 1 GHz) |
| `DK`, `DM` | 10000, 14 | deterministic timer: increments to trigger, NV width |

At 1 GHz the defaults give a mean of 3.15e16 cycles (365 days), a standard deviation
of 3.96 days, and a 27.6 µs volatile window. The deterministic timer with the same
10,000-write budget has to keep 52 minutes of progress in volatile state.

The defaults reproduce a one-year design example. The FPGA prototype this design is
based on was instead run at 50 MHz with a 24-hour mean. For a 16-minute spread
that needs `KTRIG` ≈ 8100 and `R` ≈ 15. For a 2.84-minute spread it needs
`KTRIG` ≈ 2.6e5, which needs `M = 18`. These values are derived from the reported
times; the prototype's own parameter values were not published.

## The random number generator (`trng`)

The entropy comes from ring oscillators, rings of three inverters running at about
625 MHz. Their edges jitter with thermal and phase noise.

1. **Sampling (`ro_sampler`).** Each ring is captured by one flip-flop on the system
   clock. There is deliberately no synchronizer. A clock edge that lands close to a
   jittering ring edge captures a truly random value, which may also be metastable.
2. **Combining.** The 16 sampled bits are XORed into one raw bit per cycle.
3. **Decimation (`decimator`).** A single toggle flip-flop XORs 1024 consecutive raw
   bits. It is read out and cleared every 1024 cycles. If any one of those 1024 bits
   is truly random, so is the output bit.

Output: `rand_valid` pulses once every `DECIM` cycles, and `rand_bit` holds the bit.
The first bit appears in the `DECIM`-th cycle after reset. Sixteen rings and 1024:1
decimation is the smallest configuration reported to pass the NIST SP 800-22
randomness suite. At 50 MHz it gives 48.8 kbit/s.

The rings (`ring_oscillator`) are **behavioural models**, not synthesizable logic.
On silicon they are plain inverter chains. `timer_top` instantiates them; the
synthesizable core `nd_timer` takes their outputs as its `ro` input. The model has
these parameters:

- `INV_DELAY_PS`: inverter delay, 267 ps, which gives a 1.602 ns period
- `JITTER_PS`: uniform noise added to every half period
- `PHASE_PS`: start offset of the ring

At the top level, ring `i` gets `RO_SPREAD_PS*i` of extra inverter delay to mimic
mismatch between rings.

## Why simulation never sees it fire

By default, mismatch, phase offset and jitter are all zero. This is exactly what a
logic simulator shows for the real circuit:

- the sixteen rings toggle in phase;
- every sampled bit equals every other;
- the XOR of an even number of equal bits is 0, so the TRNG emits only zeros;
- with any non-zero key, no trial ever succeeds.

The timer is therefore dormant in any amount of pre-silicon simulation. On silicon it
is live.

A dormant circuit can be flagged by tools that look for logic which never toggles in
simulation. `key_gen` offers two dynamic keys that make the comparator visibly active
in simulation while still never triggering:

- `KEY_FROM_COUNT`: the key is the low `R` bits of the NV count. It is zero only
  while the count is zero, so a simulation sees exactly one success.
- `KEY_STEP`: the key is a register. It advances by one after every trial while the
  count is below 5, or while the key itself is zero. At power-up it is loaded from
  the count. A simulation therefore sees at most 5 successes, however often it
  resets, and the timer fires only if `KTRIG` > 5.

In the field the TRNG output is independent of the key, so all three key modes give
the same trigger statistics. `KEY_STATIC` is the basic design.

## Trial and count (`bernoulli_trial`, `key_gen`, `nv_timer`, `nv_memory`)

`bernoulli_trial` shifts each random bit into a word, with the first bit ending up
most significant. On the `R`-th bit it compares the word, including that bit, with
the key. One cycle later it raises `trial_done`, and `match` carries the result in
that cycle. Trials never share bits.

`nv_timer` increments the count on `match`. The count is held in `nv_memory`, an
`M`-bit register with no connection to the power-on reset. `trigger` is
`count == KTRIG` and rises in the cycle after the last increment. The count then
stops, so the memory is written at most `KTRIG` times. `prog_clear` zeroes the count
once, when the part is prepared.

`nv_memory` is written as an ordinary register. On a real chip it would be a few
CMOS-compatible NV cells; the FPGA prototype also used ordinary memory in their
place. Write endurance is not modelled.

## Power cycling

`pwr_rst` is a synchronous, active-high power-on reset. It clears all volatile state:

- the decimator
- the partial trial
- the stepping key
- the deterministic timer's cycle counter

It does not touch the NV counts. In the non-deterministic timer a power cycle loses
at most the one trial in progress. In the deterministic timer (`volatile_timer` and
`d_timer`) it loses up to `TV` cycles of counting. Power-cycling faster than every
`TV` cycles freezes the deterministic timer completely. Its NV memory is written only
once every `TV` cycles, however often the chip is power-cycled during production
test, so that test cannot wear it out.

## Top level (`timer_top`)

`timer_top` holds the 16 rings plus `nd_timer`, and `d_timer` beside them. The two
timers share only `clk`, `pwr_rst` and `nv_clear`.

| port | direction | meaning |
|---|---|---|
| `nd_trigger` | out | non-deterministic trigger |
| `nd_count` | out | its NV success count |
| `nd_rand_bit`, `nd_rand_valid` | out | TRNG stream, for observation |
| `nd_trial_done`, `nd_match` | out | trial results, for observation |
| `d_trigger`, `d_count` | out | deterministic trigger and its NV count |
| `d_j` | out | deterministic timer's volatile cycle count |

## Files

`rtl/`:

- `nd_timer_pkg.sv`: key-mode enum and the stepping-key limit
- `ring_oscillator.sv`: behavioural ring model
- `ro_sampler.sv`, `decimator.sv`, `trng.sv`: the random number generator
- `key_gen.sv`, `bernoulli_trial.sv`, `nv_memory.sv`, `nv_timer.sv`: trials and count
- `nd_timer.sv`: synthesizable non-deterministic timer core
- `volatile_timer.sv`, `d_timer.sv`: deterministic timer
- `timer_top.sv`: top level

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_nd_timer` drives the ring inputs with random values. An independent model
  follows every random bit, trial and count. It also checks the dynamic-key modes
  with noise-free rings.
- `tb_timer_top` runs the whole top with noisy rings at reduced size: 32:1
  decimation, 4-bit trials, 6 successes, and `TV = 300`. Power cycles are applied at
  random. It checks that every mechanism occurs at least once: random ones and zeros,
  successes, a trial cut short, the count surviving a power cycle, both triggers, and
  lost deterministic periods.
- `tb_trigger_statistics` measures trigger-time statistics. It builds two groups of
  40 timers with the same mean, 256 trials. Group A uses `R = 2`, `KTRIG = 64`;
  group B uses `R = 6`, `KTRIG = 4`. It checks each group's sample mean and standard
  deviation against `KTRIG*2^R` and `sqrt(KTRIG*(1-2^-R))*2^R`. This is how the
  spread is traded against `KTRIG`.
- `tb_timer_top_full` uses the top at its defaults. It runs one complete
  27,648-cycle trial and checks the bit and trial timing and the all-zero output of
  noise-free rings.

Simulate with Verilator 5 (`--timing` is needed for the ring model and the testbench
clocks), from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/nd_timer_pkg.sv \
        tb/tb_timer_top.sv --top-module tb_timer_top -Mdir obj
    ./obj/Vtb_timer_top

Replace `tb_timer_top` with any other testbench name. Everything in `rtl/` except
`ring_oscillator.sv` (and `timer_top`, which contains it) is synthesizable. To
synthesize, connect `nd_timer.ro` to real rings.

## Limits and departures

- **Ring noise model.** The ring noise model is a simple stand-in: uniform jitter per
  half period. The reduced-size test judges the random stream only loosely, by the
  balance of ones and zeros. Real randomness quality can only be measured on silicon.
- **Choices made in this design.** The following are not fixed by the reference
  design:
  - the static key value;
  - the bit order within a trial;
  - the one-cycle result register;
  - saturation of the count at `KTRIG`;
  - the synchronous reset;
  - the `prog_clear` input;
  - loading the stepping key from the count at power-up.
- **Stepping-key limit.** The published dynamic-key example uses 8-bit keys. Here it
  is generalised to `R` bits.
- **Deterministic timer sizing.** `TV` is derived from 52 minutes at 1 GHz, and
  `DM = 14` holds 10,000. The reported prototype of the deterministic timer used a
  different, unexplained number of NV bits (104).
- **Not included.** NV write-endurance wear-out is not modelled, and no hardware is
  provided for 3D-IC wire-lifting obfuscation.
