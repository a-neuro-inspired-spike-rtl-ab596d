# Spike-based PID speed controller for DC motors

This is a closed-loop DC-motor speed controller in which every signal is a
stream of spikes. It has no multipliers, no sampled numeric data path and no
processor. A quantity is the *rate* of a spike stream. Each processing stage
is a few counters and comparators that take spike streams in and give spike
streams out:

- subtraction and addition (Hold & Fire),
- integration (Integrate & Generate),
- differentiation (Temporal Derivative).

The controller's output spikes are widened to a fixed length and drive an
H-bridge directly. This is pulse-frequency modulation (PFM): the motor's
mean voltage is `pulse width × spike rate × supply voltage`. There is no PWM
period, so the controller adds no sampling delay. One controller is small,
so many can run side by side on one FPGA without sharing anything. The top
level here runs four of them, as on a four-motor robot board. They are
configured over SPI, and every internal spike stream is copied onto an
Address-Event-Representation (AER) bus so that an external monitor can
record it.

Everything is SystemVerilog-2017 in `rtl/`, with self-checking testbenches
in `tb/`. The default clock is 50 MHz.

## Spike streams

A stream is a packed struct `spike_t {p, n}` (see `rtl/spike_pkg.sv`). Each
field is a one-clock pulse: `p` carries a positive spike and `n` a negative
one. No block drives both in the same cycle. The value a stream carries is
its signed rate: positive spikes per second minus negative spikes per
second. A rate can be at most one spike per clock (50 Mspikes/s).

`spike_neg()` swaps `p` and `n`, which negates the stream. Feeding a
negated stream into the subtracting input of a Hold & Fire turns it into an
adder.

## Building blocks

### RB-SSG: number to spike rate (`rb_ssg`)

This block converts a signed N-bit word `x` into a stream of rate

    rate = F_CLK · |x| / (2^(N-1) · (gen_fd + 1))

A divider produces an enable once every `gen_fd + 1` clocks. Each enable
advances an (N−1)-bit counter. The block fires when `|x|` is greater than
the counter value *read with its bits reversed*. Over one full counter cycle
the reversed value takes every value once, so there are exactly `|x|` spikes
per `2^(N-1)` enables. Bit reversal spreads those spikes evenly: for
example, `x = 2^(N-2)` fires on every second enable. The sign of `x` selects
the output wire. With N = 16, `gen_fd = 0` and `x = 100`, the rate is
152.59 kspikes/s, the reference rate used in the motor experiments.

The most negative input saturates to magnitude `2^(N-1)−1`. Output latency
is one cycle after the enable.

### SH&F, Hold & Fire: subtraction (`spike_hf`)

The output rate is `rate(u) − rate(y)`. The block classes each input spike
by its effect on the result. `u.p` and `y.n` count as +1; `u.n` and `y.p`
count as −1. The block holds at most a small signed count of spikes, and the
rules are:

| held | new spike | action |
|---|---|---|
| none | ±1 | hold it |
| +1 | +1 | fire +1, hold the new one |
| +1 | −1 | cancel both; nothing fires |
| any | none for `HOLD` cycles | fire the held spike |

The last rule is the hold time. The default is 500 cycles, which is 10 µs at
50 MHz. Without that rule a slow stream would never get out. The rule also
means a held spike leaves at most `HOLD` cycles late, so the hold time sets
the timing jitter at low rates.

Spikes that arrive in the same cycle are summed first. The held count runs
from −2 to +2, so no spike is lost when two inputs and a held spike all
agree; the extra spike fires on the next cycle. The hold timer restarts at
every input spike. Spikes are conserved: after the block goes quiet, the
signed output total equals `Σu − Σy` exactly.

### SI&G, Integrate & Generate (`spike_ig`)

An N-bit signed up/down counter counts `+1` for each `p` and `−1` for each
`n`, and feeds an N-bit RB-SSG. The output rate is therefore
`k_I · ∫ rate_in dt`, with `k_I = F_CLK / (2^(N-1)(gen_fd+1))` per second.
The counter saturates instead of wrapping. `clr` empties it and silences the
output; the controller uses this to hold the integral path at rest.

### STD, Temporal Derivative (`spike_td`)

An SH&F subtracts, from the input, the SI&G integral of the block's own
output. The loop settles where the integral of the output matches the
input, so the output is the input's derivative seen through a first-order
high-pass filter:

    STD(s) = s / (s + k_I),   k_STD = 1/k_I = 2^(N-1)(gen_fd+1)/F_CLK

A larger `k_STD` gives more derivative gain and a lower corner frequency.
The two cannot be set independently. After a rate step of R spikes/cycle,
the block emits about `R · 2^(N-1)(gen_fd+1)` spikes in total and then goes
quiet.

### SE, Spikes Expansor: PFM driver (`spike_expansor`)

Every input spike loads a down counter with `spikes_width`. While the
counter is not zero the pulse is high, so each spike becomes a pulse of
exactly `spikes_width` clocks. A one-bit register records the sign of the
last spike, and the pulse goes to `pfm_p` or `pfm_n` accordingly. A spike
that arrives during a pulse restarts the full width. At high rates this
stretches the output toward a constant high level (saturation), and a spike
of the other sign switches the side. An assertion checks that both sides
are never high together. The static gain per spike is
`T_CLK · spikes_width · V_supply`, so the spike width sets the loop gain.

### QSR: encoder to spikes (`qsr`)

The QSR fires one spike for every edge of encoder line A or B, which is four
spikes per encoder line period. Forward rotation (A leads B; the states go
00 → 10 → 11 → 01) gives positive spikes, and reverse rotation gives
negative ones. A four-state machine remembers the last (A, B) pair:

- an edge on A is forward when the new A differs from B;
- an edge on B is forward when the new B equals A.

A step in which both lines change together is invalid and fires nothing.
The inputs pass through two-flop synchronizers. The spike appears three
clocks after the encoder edge.

## The controller

```
 ref_speed ─► RB-SSG ──►(+)H&F ──error──┬──────────────────────────►(+)H&F ─► SE ─► pfm_p/pfm_n ─► H-bridge ─► motor
                          (−)           ├─► SI&G ──►(+)H&F ──────────►(+)
                           ▲            └─► STD  ──►(+) (SI&G+STD)
                           └──── QSR ◄── encoder A/B ◄──────────────────────────────────────────────── motor
```

`spid_channel` is one control loop. `spike_pid` is the part between the
error and the SE: the error (proportional path), its SI&G (integral path)
and its STD (derivative path), combined by two SH&F adders. To first order
the transfer function from error rate to motor voltage is

    (1 + k_I/s + s/(s + k_I')) · k_SE,    k_SE = T_CLK · spikes_width · V_supply

- The spike width scales all three terms together.
- The SI&G and STD widths and dividers set the integral and derivative
  gains.
- The STD's integral constant also sets its corner frequency.

`ig_en` and `td_en` hold the SI&G or the STD at rest. This gives P, PI or
PID control at run time. A P loop keeps a steady-state error: with loop gain
g the speed settles at g/(1+g) of the reference. The integral path removes
that error.

The seven internal streams are brought out for monitoring, in the order of
`mon_sig_e`: reference, motor speed, error, SI&G, STD, SI&G+STD, and
SI&G+STD+error.

### Latency

| path | latency |
|---|---|
| RB-SSG enable to spike | 1 cycle |
| SH&F, when a spike fires at once | 1 cycle |
| SH&F, when a spike is held | up to `HOLD` cycles |
| proportional path, error to SE input | 2 SH&F stages |
| SE | pulse starts the cycle after the spike |
| QSR | 3 cycles from encoder edge to spike |

## Board level: `spid_top`

`spid_top` holds `NUM_MOTORS` channels (four by default), an SPI register
file and an AER monitor port.

### SPI registers (`spi_config`)

The SPI port uses mode 0, MSB first, with one 24-bit frame per access while
`cs_n` is low:

| bits | meaning |
|---|---|
| 23 | 1 = write, 0 = read |
| 22:19 | channel |
| 18:16 | register |
| 15:0 | write data, or read data returned on MISO |

| reg | contents | reset |
|---|---|---|
| 0 | `ref_speed`, signed reference word | 0 |
| 1 | `ref_fd`, reference RB-SSG divider | 0 |
| 2 | `ig_fd`, SI&G divider | 20 |
| 3 | `td_fd`, divider of the SI&G inside the STD | 20 |
| 4 | `spikes_width`, in clocks | 200 (4 µs) |
| 5 | bit 0 `ig_en`, bit 1 `td_en` | both 1 |

SCK is sampled with the system clock through synchronizers, so SCK must be
slower than clk/8. A write takes effect a few clocks after the 24th rising
edge of SCK. A frame cut short by `cs_n` writes nothing.

### AER monitor port (`aer_monitor`)

Every spike on a monitored line becomes one event, with

    address = motor · 16 + stream · 2 + sign      (sign 0 = positive)

so one controller uses addresses 0–13, and 14 and 15 are unused. The bus is
16 bits wide; at four motors, bits 15:6 are always zero.

Each line has a small pending counter (`PEND_W` = 2 bits, so up to three
events wait per line). A line can fire again before its first event has
gone out. The PID output adder, for example, can fire on two cycles close
together. A rotating-priority arbiter chooses the next pending line after
the last one sent. The handshake is four-phase with
active-low signals:

1. The port puts the address on the bus and pulls `req_n` low.
2. The receiver pulls `ack_n` low.
3. The port releases `req_n`.
4. The receiver releases `ack_n`.

`ack_n` is synchronized, so an event takes at least about four clocks plus
the receiver's delay. A spike that arrives while its line's counter is full
is lost and counted in `aer_drop_count`, which saturates. Spike rates in
normal closed-loop operation are far below the port's capacity. One PID
loop after a step produces about 0.4 Mevents/s, and a receiver limited to
5 Mevents/s takes all of them.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_MOTORS` | 4 | top | control channels |
| `IG_N` | 16 | top, channel, pid | SI&G counter / generator bits |
| `TD_N` | 16 | top, channel, pid | bits of the SI&G inside the STD |
| `HOLD` | 500 | all SH&F | hold time in clocks (10 µs at 50 MHz) |
| `N` | 16 | rb_ssg | generator width; the reference generator is always 16 bits |
| `FD_W`, `SW_W` | 16 | rb_ssg, spike_ig, spike_expansor | divider and spike-width register widths |
| `NLINES`, `ADDR_W` | 64, 16 | aer_monitor | monitored lines and bus width |
| `PEND_W` | 2 | aer_monitor | bits of each line's pending-event counter |

Widths of 14 to 18 bits for `IG_N` and `TD_N` are typical choices. The
dividers and the spike width are run-time registers, not parameters.

## What is fixed and what is chosen

The following come from the controller's original description:

- the structure of each block;
- the SH&F rules;
- the 10 µs hold time;
- the 16-bit reference;
- the rate and gain formulas;
- the four-motor board;
- the order and address pairs of the monitored streams.

The following are this design's own choices:

- **Reset:** synchronous, active high.
- **Spike encoding:** the `{p, n}` encoding.
- **SH&F:**
  - a held spike fires at the end of the hold time, rather than being
    dropped (the time-out rule is this design's reading of the block);
  - same-cycle inputs are summed, with a held count of −2..+2;
  - the hold timer restarts at every input spike.
- **Saturation:** integrators saturate, and the most negative RB-SSG input
  saturates to the largest magnitude.
- **QSR:** the synchronizers, and ignoring invalid double steps.
- **Mode enables:** P/PI/PID are selected by synchronous clears.
- **SPI:** the whole interface (frame, register map, reset values).
- **AER port:** the arbiter, the pending counters with drop counting, the
  handshake polarity, the 16-bit address and the motor field in the
  address.

## Verification

Each block has a self-checking testbench, `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rb_ssg` | exactly \|x\| spikes per window of `2^(N-1)(gen_fd+1)` clocks, for several values and dividers; the 152.59 kspikes/s reference point; saturation; perfectly regular spacing at half scale |
| `tb_spike_hf` | every hold/fire/cancel rule; the hold-time fire, within ±2 cycles of `HOLD`; conservation of signed spikes on random trains |
| `tb_spike_ig` | counter follows the signed input; output equals the count per window; saturation; `clr` |
| `tb_spike_td` | step response: total output ≈ `R·2^(N-1)(gen_fd+1)`; output dies away; symmetric step down; `clr` |
| `tb_spike_expansor` | exact pulse width; restart on a new spike; sign switch; duty cycle |
| `tb_qsr` | one spike per edge with the right sign; invalid steps; latency |
| `tb_spike_pid` | P mode passes the error unchanged; SI&G gain; conservation through both adders in PI and PID |
| `tb_aer_monitor` | per-address delivery; handshake order and address stability; every spike delivered or counted as dropped |
| `tb_spi_config` | reset values; write and read-back of every register; aborted frames |
| `tb_spid_channel` | closed loop with a motor model: P settles near 8/9 of the reference, PI and PID within 3 %, and a reversed reference |
| `tb_spid_top` | four closed loops at default sizes, configured over SPI (P, PI, PID, and PID with reverse direction) |

Six more testbenches repeat, in simulation, the experiments that
characterise the controller:

| testbench | experiment | result |
|---|---|---|
| `tb_hf_sweep` | SH&F fed by two RB-SSGs, both inputs swept over −1.5…+1.5 Mspikes/s (25 points) | output count equals `U − Y` exactly at every point; the inter-spike spread is printed per point |
| `tb_ig_td_response` | SI&G under a ±1 Mspikes/s sawtooth; STD under a ±0.5 Mspikes/s square wave, both 16-bit | SI&G output within 2 % of `k_I ∫`; STD emits `Δrate · 2^15` spikes per edge (within 6 %) and settles |
| `tb_open_loop` | SE driven at 152.59 kspikes/s with widths 4.0–9.4 µs, then a rate × width sweep | duty 0.61 → 0.96 as the width grows from 4.0 to 9.4 µs; it is not proportional to the width because overlapping pulses merge, and it saturates at 1 for high rate × width |
| `tb_pid_sizes` | `spike_pid` with SI&G / STD widths 14/14, 14/16, 16/14, 16/16 and 18/18 | at every size: P passes the error exactly; the SI&G emits exactly 100 spikes per 2^(N−1) cycles for a count of 100; a 0.01 spikes/cycle step makes the STD emit 0.01 · 2^(N−1) spikes (82, 328, 1311) within one spike, and the same back when the step is removed; both adders conserve spikes |
| `tb_aer_capture` | the full design with motor 0 in PID after a step, monitored by a receiver that takes at most one event per 10 clocks (5 Mevents/s) | no event dropped at a mean of about 0.43 Mevents/s; events per address equal the spikes on each monitor line; the speed rebuilt from addresses 2/3 equals the encoder edges, and the reference from addresses 0/1 equals 100 / 2^15 spikes per cycle |
| `tb_closed_loop` | P with 10.1 µs and 8.2 µs spikes at 190.73 kspikes/s; PI (SI&G 16 bit, divider 20) and PID (SI&G divider 18, STD divider 20) at 152.59 kspikes/s with 4 µs spikes; then a step to zero | P settles at 95.4 % and 94.4 % of the reference (model: g/(1+g) = 95.3 % and 94.3 %); PI and PID settle within 0.3 % of the reference (peaks 100.3 % and 100.6 %); a second channel built with an 18-bit STD (SI&G 16 bit / divider 18, STD 18 bit / divider 20) also settles within 0.3 %; the motor stops after the step |

With the first-order motor model the PI and PID responses show no overshoot.
A real motor has a second-order response and a much longer time constant,
so overshoot and settling times must be judged on the hardware.

`tb_spid_top` runs at the default sizes. It checks each motor's speed
against the reference rate worked out from its settings. It overloads the
AER port with a slow receiver and checks that every offered spike is either
received or counted as dropped. It then switches motor 0 from P to PID over
SPI. In one run the four motors settled at 88 % (P; the model predicts
8/9), 99 %, 100 % and 100 % of their references. It also counts, and
requires, these events:

- SE saturation;
- SH&F immediate fire, cancel and hold-time fire;
- AER drops;
- mode switch;
- negative drive.

For each block, a deliberately broken copy was checked to make sure its
testbench fails.

The closed-loop tests use `tb/dc_motor_model.sv`, a behavioural model of
the H-bridge, the motor and a quadrature encoder. The model is a first-order
motor whose speed, counted in encoder edges per clock, approaches
`0.04 × drive`: 2 Medges/s at full drive, which is a 500 kHz encoder line
rate. Its time constant is 20 000 clocks (0.4 ms). This is far shorter than
a real motor's mechanical time constant, so that simulations take seconds.
The model's loop gain is therefore `0.04 × spikes_width`. The controller's
own numbers (rates, widths, hold time) are all at their real values.

### Running the tests

With Verilator 5, from the directory that holds `rtl/` and `tb/`, for
example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/spike_pkg.sv tb/tb_spid_top.sv --top-module tb_spid_top -o sim
    ./obj_dir/sim

Use the same command with any other `tb_*` module. `spike_pkg.sv` must come
first. Every testbench finishes in seconds; `tb_spid_top` simulates about
1.1 million clocks of the full four-motor design.

## Limits

- The motor, encoder, H-bridge, microcontroller and AER monitor board are
  outside the FPGA and are not described here. Only the behavioural motor
  model exists, for testing.
- FPGA resource use and maximum clock frequency are not characterised.
- The controller is reactive. Its gains must be tuned for a real motor
  through the spike width, the generator widths and the dividers. There is
  no built-in tuning method.
- The reference enters only through the SPI register and the internal
  RB-SSG. There is no AER input port: a reference stream coming from another
  spiking system would need an AER receiver feeding the error SH&F, which is
  not built.
- The analog sensor values the board's microcontroller can pass on (such as
  a motor current) are not used by the controller and have no register.
