# Counter-based high-frequency PWM generator with a look-ahead counter

A power converter's switch is driven by a pulse width modulated (PWM) signal
whose duty cycle sets the output voltage. Higher switching frequencies make
the converter's magnetics smaller. With a digital counter-based PWM
generator, the PWM frequency is the clock frequency divided by 2^N, where N
is the duty resolution in bits. For example, 8 bits at 500 kHz needs a
128 MHz clock. So the generator is only as fast as its N-bit counter.

The main idea of this design is a counter whose toggle enables come straight
from flip-flops, not from a decoder of the current count. Each higher bit is
told one clock in advance that it must toggle. A chain of 2-input AND gates
recognises, one clock before it happens, that the lower bits are about to
become all ones, and a flip-flop per bit stores that prediction. Around
this counter sit a duty-word register, an equality comparator and a set/reset
output stage. The result is a PWM output with:

- period `2^N` clocks, so `f_PWM = f_clock / 2^N`;
- duty cycle `D = data / 2^N`, from 0 to `(2^N-1)/2^N`, in steps of `1/2^N`
  (0.39 % at 8 bits, 0.78 % at 7 bits, 1.56 % at 6 bits);
- duty word updates applied only at a period boundary.

The width is the parameter `N` (default 8, must be at least 3).

## Structure

```
 data_in[N-1:0] ──► duty_register ──duty──► eq_comparator ◄──count── pwm_counter
                       ▲ load               (a == b)                   │ overflow
                       │                       │ match                 │
                       └───────────────────────┼───────────────────────┤
                                               ▼ r                     ▼ s
                                             rs_latch ───────────────► pwm_out
```

| module          | role |
|-----------------|------|
| `pwm_generator` | top level; wires the four blocks below |
| `pwm_counter`   | free-running N-bit counter with look-ahead carry; makes the `overflow` pulse |
| `duty_register` | N-bit register; takes `data_in` on the clock edge where `overflow` is high |
| `eq_comparator` | combinational `duty == count` |
| `rs_latch`      | clocked set/reset flip-flop; set by `overflow`, reset by `match`, reset wins |

All state is clocked by the single clock `clk`. `rst` is a synchronous,
active-high reset.

## The look-ahead counter

Bit `C(i)` of the count is a toggle flip-flop `T(i)` with an enable. A plain
synchronous binary counter toggles bit `i+1` when bits `i..0` are all ones.
That test is an (i+1)-input AND of the current count, and the widest one
limits the clock rate. `pwm_counter` instead works that condition out one
clock early and holds it in a flip-flop:

```
G(1)     = C(1) & ~C(0)        low bits read ...10, so they read ...11 next clock
G(i)     = C(i) & G(i-1)       2 <= i <= N-2
Q(i)     = G(i), one clock later      => Q(i) = 1  exactly when C(i..0) are all ones
EN(0)    = 1
EN(1)    = C(0)
EN(i+1)  = Q(i)                1 <= i <= N-2
G(N-1)   = C(N-1) & Q(N-2)     the count is all ones
overflow = G(N-1), one clock later    => high during the clock in which count == 0
```

Each gate `G(i)` is high two clocks before bit `i+1` changes. Flip-flop `Q(i)`
is high one clock before, and it feeds the toggle enable directly. The path
into each counter bit is therefore one XOR with a flip-flop-driven enable,
whatever N is. The decode now sits in front of the `Q` flip-flops instead.
There it is a ripple chain of 2-input gates, `G(1) → G(2) → … → G(N-2)`,
whose inputs all come from flip-flops. That chain is the longest
combinational path and grows by one AND per bit. This is one reason the
reachable clock rate rises as N shrinks.

This is the sequence for `N = 4`. Values are as seen during each clock. A
dot means 0.

| count | G1 | G2 | Q1 | Q2 | G3 | overflow |
|------:|:--:|:--:|:--:|:--:|:--:|:--------:|
|  0    | .  | .  | .  | .  | .  | 1 |
|  2    | 1  | .  | .  | .  | .  | . |
|  3    | .  | .  | 1  | .  | .  | . |
|  6    | 1  | 1  | .  | .  | .  | . |
|  7    | .  | .  | 1  | 1  | .  | . |
| 14    | 1  | 1  | .  | .  | .  | . |
| 15    | .  | .  | 1  | 1  | 1  | . |
|  0    | .  | .  | .  | .  | .  | 1 |

Rows that are all zero except for the count are left out. `pwm_counter`
exposes the `Q` taps on its `q` port for testing. It also checks two
invariants with immediate assertions on every clock: `overflow == (count == 0)`,
and each `Q(i)` equals a direct decode of `count[i:0]`.

Reset puts the counter in the state it has at count 0 while running: count
0, every `Q` 0, and `overflow` 1. The first clock after reset is therefore an
ordinary period start.

## One PWM period, cycle by cycle

Period `k` starts at the clock where `count == 0` and `overflow` is high. On
that clock edge:

- `duty_register` loads the word on `data_in`, called `W` below;
- `rs_latch` is set, unless the comparator fires in the same clock.

During that count-0 clock the register still holds the previous word, `P`.
The comparator therefore fires at count 0 only if `P == 0`.

| case                  | `pwm_out` high during            | high time |
|-----------------------|----------------------------------|-----------|
| `P != 0`, `W != 0`    | counts 1 … W                     | W clocks  |
| `P == 0`              | never (reset beats set at count 0) | 0       |
| `P != 0`, `W == 0`    | counts 1 … 2^N-1 and the next count 0 | 2^N clocks |

In steady state (`P == W`) every period is exact, including 0 % for a zero
word. Any change between two non-zero words is exact from the first period.
The zero word behaves differently because its comparison falls on the same
clock as the set. A change from a non-zero word to zero therefore gives one
full-high period before the output stays low. A change from zero to a
non-zero word gives one extra low period. A host that must avoid the
full-high period can step through a small non-zero word first.

`data_in` only needs to be stable around the rising clock edge at which
`overflow` is high. Changes at any other time have no effect until the next
period. The `overflow` output can serve as a "period started" strobe for the
host. For example, a microcontroller port can be updated right after it.

`pwm_out` comes straight from a flip-flop. The generator's output latency
from that clock's count is one clock. The output rises when the count reads
1 and falls when it reads `W+1`.

## Ports and parameters

`pwm_generator #(parameter int unsigned N = 8)`

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | PWM clock, `f_clock` |
| `rst`      | in  | 1     | synchronous reset, active high: count 0, duty word 0, output low |
| `data_in`  | in  | N     | duty word, sampled on the clock where `overflow` is high |
| `pwm_out`  | out | 1     | PWM output |
| `overflow` | out | 1     | one-clock pulse per period, during count 0 |
| `count`    | out | N     | counter value, for observation |

The submodules take the same `N`. `rs_latch` has no parameters.

## Frequencies

The RTL sets only the ratio between `f_clock` and `f_PWM`. The absolute
rate depends on the device that the RTL is mapped to.

| N | resolution | period (clocks) | 12 MHz clock | 50 MHz clock | 200 MHz clock |
|---|-----------:|----------------:|-------------:|-------------:|--------------:|
| 8 | 0.39 %     | 256             | 46.875 kHz   | 195.3125 kHz | 781.25 kHz    |
| 7 | 0.78 %     | 128             | 93.75 kHz    | 390.625 kHz  | 1.5625 MHz    |
| 6 | 1.56 %     | 64              | 187.5 kHz    | 781.25 kHz   | 3.125 MHz     |

Place-and-route results have been reported for this architecture on older
FPGA and CPLD families. They give clock rates of about 60–255 MHz: higher
for smaller N, because the carry chain is shorter. The top figure is about
4 MHz PWM at 6 bits from a 255 MHz clock. Those rates were not reproduced
here. The testbench `tb_pwm_workloads` only checks the period arithmetic at
those clock rates. At `N = 8` the design synthesises to 24 flip-flops and
about ten small gates:

- 8 counter bits;
- 7 look-ahead flip-flops, including `overflow`;
- 8 register bits;
- 1 output bit.

## Design choices and departures

- **Clocked set/reset stage.** The output stage is a clocked SR flip-flop,
  not a level-sensitive latch. This keeps `pwm_out` glitch-free and the
  whole design synchronous. When set and reset arrive together, reset wins.
  That gives 0 % duty for a zero word; a set-priority stage would give 100 %.
- **Zero-word transitions.** These follow from the set and the load
  sharing one clock (see the table above). The structure was kept as it is
  rather than adding a second strobe.
- **Middle of the carry chain.** For `3 <= i <= N-2` the carry gates
  continue the pattern of the second stage, `G(i) = C(i) & G(i-1)`. The
  first stage `G(1)` and the last stage `G(N-1)` are specific and are
  implemented as given above.
- **Reset.** The source architecture has no reset; the synchronous reset is
  an addition.
- **Extra ports.** `overflow` and `count` are brought out for the host and
  for test. The counter's `q` taps are not connected at the top. This
  leaves one deliberate empty pin in `pwm_generator`, which a linter
  reports.
- **Not included.** The clock source and the controlling processor are not
  part of this RTL:
  - The clock is an external PLL clock multiplier, or the FPGA's own
    DLL/PLL, that provides `f_clock`.
  - The processor writes `data_in`.

## Verification

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_pwm_counter`   | 8-, 5- and 3-bit counters against an integer reference: count, every `Q(i)`, the `overflow` position, and 2^N-clock spacing; a mid-count reset |
| `tb_duty_register` | random data and load pulses against a reference copy; reset |
| `tb_eq_comparator` | exhaustive at 4 bits; at 8 bits every equal pair, every one-bit difference, and random pairs |
| `tb_rs_latch`      | all four set/reset combinations, then random ones; reset priority |
| `tb_pwm_generator` | the top at its default `N = 8` (see below) |
| `tb_pwm_workloads` | 8-, 7- and 6-bit generators at 12 MHz and 50 MHz with the demonstration duty words, and at 15 reported maximum clock rates; measures frequency and duty in simulated time |

`tb_pwm_generator` sweeps every word 0…255, then held zero and full-scale
words, then random words. Each word is changed at a random point inside a
period. For every period it checks:

- the spacing is 256 clocks;
- the high time matches the table above;
- the edges fall on the expected counts.

It also counts how often each mechanism happens, and fails if one never
does:

- register loads;
- sets and comparator resets;
- the zero-word set/reset collision;
- mid-period word changes;
- the full-scale word;
- the full-high period on a change to zero.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_pwm_generator.sv \
          --top-module tb_pwm_generator -o sim
./obj_dir/sim
```

Replace the file and module names to run another testbench. The RTL files
are found through `-Irtl`. Every RTL module is also
synthesizable on its own as a top, with all parameters defaulted.
