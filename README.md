# All-digital data demodulator for an MLS receiver

A microwave landing system (MLS) ground station sends short data packets of
32 to 64 bits. They are DPSK-modulated at 15.625 kb/s (64 us per bit) on the
same carrier as the angle-guidance scan. In the airborne receiver, the
carrier reaches the digital part as a hard-limited (one-bit) IF signal near
5 MHz, with up to ±25 kHz of frequency uncertainty and an input SNR that may
be as low as about 5 dB. This design recovers the data bytes from that
one-bit signal using nothing but counters and flip-flops. It has no
multipliers, no ADC and no analogue loop filter. The heart of the design is
a second-order all-digital phase-locked loop (ADPLL) with one-bit datapaths.
It locks onto the carrier and, through a remodulation trick, gives the
demodulated data bit directly. One shared up/down counter then serves in
turn as lock detector, bit-edge detector and integrate-and-dump data filter.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, uses one
clock, and is checked with Verilator 5 and the slang front end of Yosys.

## Signal path

```
 if_in ──► mixer ──► ADPLL + remodulator ──► u_d ──► data_filter ──► level ──► dpsk_decoder ──► barker_detect
 (~5 MHz)  (DFF at    (locks to ~230 kHz,            (lock / edge /   trigger        │                 │
            5.23 MHz)  P = rate count)               integrate-dump)     │            ▼                 ▼
                                                          ▲              ▼         shift_register   demod_controller
                                                          └── mode ── data_clock_sync ─► d_clk     (ACQ/SYNC/TRACK)
                                                                                  bit_counter ─► INT
```

| module | role |
|---|---|
| `mls_pkg` | shared enums (`rx_state_e`, `filt_mode_e`) and loop constants |
| `freq_divider` | clock-enable ticks: 17 MHz (÷4), 5.23 MHz (÷13), 4 MHz (÷17), 2 MHz (÷34), 1 MHz (÷68) from 68 MHz |
| `mixer` | one D flip-flop sampling the IF at 5.23 MHz, which folds 5 MHz down to about 230 kHz |
| `adpll_demod` | the loop: `remodulator`, `k_counter`, `rate_controller`, `rate_multiplier`, `add_del`, `n_counter` |
| `data_filter` | the shared counter with its three roles |
| `data_clock_sync` | local bit clock, retimed by edge triggers |
| `dpsk_decoder` | differential decoding (XOR with the previous bit) |
| `barker_detect` | finds the frame-sync code 11101 |
| `demod_controller` | receiver mode, loop bandwidth, filter role and filter clock |
| `bit_counter` | raises `int_o` after every 8th data bit |
| `shift_register` | 8-bit output register `b` (b0 = first bit of the byte) |
| `mls_demod_top` | wires everything together |

## Clocking

Everything is clocked by a single 68 MHz `clk`. The slower rates are
one-cycle enable pulses from `freq_divider`, not derived clocks, so the whole
design is one clock domain and timing analysis is trivial. The loop runs at
f_c = 17 MHz. The data filter's three roles use 1 MHz, 4 MHz and 2 MHz
ticks. The IF input is assumed to be synchronous to `clk`. If it is not, put a
synchroniser in front of `if_in`.

## The ADPLL

### Frequency synthesis: rate multiplier, add/delete and N-counter

The loop oscillator is made of counters. On every f_c tick the
`rate_multiplier` adds the rate count P to an accumulator modulo Q = 1024
and emits a pulse when the accumulator wraps. That gives P·f_c/Q pulses per
second, evenly spread. `add_del` toggles its output on each pulse, and
`n_counter` divides the result by N = 32 into two square waves, `out_i` and
`out_q`, with `out_q` leading by 90°. The loop frequency is therefore

    f = P · f_c / (2 · N · Q) = P · 17 MHz / 65536

so P = 887 gives 230.1 kHz. P is kept inside 790..983 (204.9..255.0 kHz), the
±25 kHz capture range. The limits keep the loop from wandering off to a
subharmonic when no carrier is present, for example between packets.

### Two paths: proportional and integral

The phase detector output drives the `k_counter`, which is really two
divide-by-K counters. One counts while the detector says "lag" and emits a
*carry* every K counts. The other counts on "lead" and emits a *borrow*.
Each carry or borrow does two things:

* **Proportional path.** `add_del` inserts one extra step (carry) or
  swallows one (borrow) in the pulse stream it passes to the N-counter. This
  moves the output phase by one f_c period at once.
* **Integral path.** `rate_controller` increments or decrements P by one,
  which changes the frequency permanently.

Together these give a second-order loop. Its bandwidth is set by K.
K = 64 in tracking gives a damping factor of about 0.5 and a noise
bandwidth near 9 kHz, narrow enough for a low bit-error rate. For fast
acquisition the controller shortens K to 8 until lock is declared.

`add_del` can only insert a step in an f_c slot where the rate multiplier
does not pulse. Pending requests are therefore kept as a small signed count
(saturating at ±3), and a carry and a borrow that are both pending cancel.
At the highest P, free slots still occur at least every 25 f_c ticks, while
the K-counter needs at least K ticks to issue a request. So no request waits
for long and none is lost.

### Remodulation: a phase detector that ignores the data

A DPSK carrier flips phase by 180° on every 1 bit. An XOR phase detector
would then pull the loop half a cycle on every transition. `remodulator`
removes the modulation before the phase comparison:

1. `u_d = u_i ^ out_i`. The input is multiplied by the in-phase reference.
   When the loop is locked in quadrature this is the *demodulated data*.
2. `u_s` is `u_d` sampled at each rising edge of `out_q`. This is a clean,
   one-bit estimate of the current data bit.
3. `u_2 = u_s ^ out_q` is the quadrature reference re-modulated with that
   data estimate.
4. `cb = u_i ^ u_2` is the phase-detector output that drives the K-counter.
   The data's 180° flips appear in both u_i and u_2 and cancel out.

`u_d` is the demodulator output. It is a noisy one-bit stream at the f_c
rate, and all of the data filtering below works on it.

## One counter, three jobs (`data_filter`)

The controller sets the counter's role (`filt_mode_e`) and tick rate. It
pulses `reset_1` to load the start value whenever the role changes.

| mode | tick | range | start | output |
|---|---|---|---|---|
| `FM_LOCK` (acquisition) | 1 MHz | 0..255 | 128 | `lock` once the count reaches ≥ 225 or ≤ 31 |
| `FM_EDGE` (synchronisation) | 4 MHz | 0..31 | 31 or 0, on the side the lock count was | `trigger` when the count crosses 16 |
| `FM_DUMP` (tracking) | 2 MHz | 0..255 | 128, and reloaded at every `d_clk` | `level` = count ≥ 128 at the dump |

The counter counts up on `u_d` = 1 and down on `u_d` = 0, saturating at the
ends.

* **Lock.** Once the loop has locked, u_d is constant (the carrier preamble
  carries no data), so the count runs steadily to one threshold. That takes
  at least 97 µs. An unlocked loop gives a beat note, and the count wanders
  around 128.
* **Edge detection.** During the five Barker-code bits, each data
  transition drives the count from one end to the other. Crossing the
  midpoint produces a trigger 16 ticks (4 µs) after a clean transition, and
  later when noise makes the counter lose ground.
* **Integrate and dump.** In tracking the counter integrates u_d over one
  bit (128 ticks) and is reset to 128 at each bit-clock edge. The sign of the
  integral is the filtered bit.

In edge mode, `level` is the side of 16 the count was on *before* the latest
tick. At a trigger it therefore still gives the bit that has just ended.
This matters because the data clock may close that bit on the trigger
itself.

## Bit timing (`data_clock_sync`)

The bit clock is a down-counter on the 4 MHz tick with 256 ticks per bit. It
emits `d_clk` at zero and reloads. A trigger loads 256 − 1 − 16 instead. This
schedules the next edge 64 µs after the *actual* transition, because the
16-tick compensation cancels the edge detector's nominal 4 µs delay. In
noise the detector delay spreads by a few microseconds. Its spread is what
sets the synchronisation error.

One rule is added for noise: a trigger that arrives while the edge
scheduled by the previous trigger is still due within 64 ticks (16 µs)
issues that edge at once, as well as reloading. Without the rule, a late
trigger silently cancels the pending edge and one bit is lost.

Every trigger during synchronisation retimes the clock. The last Barker
transition therefore sets the bit phase. There is no acceptance window, so a
burst of noise triggers in the middle of a Barker bit also retimes it. At
input SNRs of 3 dB and below, this is what causes most lost packets (see
Results). Triggers are ignored in tracking, where the clock free-runs.

## Receiver modes (`demod_controller`)

```
 ST_ACQ ──lock──► ST_SYNC ──Barker found──► ST_TRACK
   ▲                                            │
   └──────────────── restart (any mode) ────────┘
```

| state | K | filter role / tick | notes |
|---|---|---|---|
| `ST_ACQ` | 8 (wide loop) | lock detector, 1 MHz | |
| `ST_SYNC` | 64 | edge detector, 4 MHz | Barker detector fed with decoded bits |
| `ST_TRACK` | 64 | integrate and dump, 2 MHz | bit counter enabled, `reset_2` clears it on entry |

Each transition pulses `reset_1`, which reloads the filter counter. `lock`
and `barker` are ignored in that cycle, because they still reflect the old
count.

## Processor interface and timing

| port | dir | meaning |
|---|---|---|
| `clk` | in | 68 MHz |
| `rst_n` | in | synchronous active-low reset |
| `if_in` | in | hard-limited IF (about 5 MHz; the mixer product must lie in 205..255 kHz) |
| `restart` | in | one-cycle pulse: back to acquisition, for example at the start of each packet |
| `b[7:0]` | out | last 8 decoded bits; `b[0]` is the first bit received of the byte |
| `d_clk` | out | one-cycle pulse per bit (every 64 µs) |
| `int_o` | out | one-cycle pulse after every 8th data bit following the Barker code; read `b` then |
| `lock`, `state`, `p_count`, `integrator` | out | observation: lock flag, mode, rate count P, shared filter counter |

A decoded bit appears in `b` two `clk` cycles after its `d_clk`. `int_o`
comes in the same cycle as the byte's last bit enters `b`. The first byte
after the Barker code is bits 1–8 after the code.

## What follows the source design and what does not

Taken from the source design:

* the architecture (mixer flip-flop, rate-multiplier ADPLL with a
  remodulation branch, one shared filter counter, DPSK decoding, Barker
  detection, bit counter, shift register);
* the numbers f_c = 17 MHz, N = 32, Q = 1024, K = 64 in tracking, 230 kHz
  ±25 kHz, the lock thresholds 225/31 with a start at 128, the edge counter
  range 0..31 with its trigger at 16, the 8-bit integrate-and-dump at
  2 MHz, and the Barker code 11101.

This design's own choices, where the source is silent:

* enable ticks instead of divided clocks;
* the reset;
* K = 8 for acquisition;
* the P limits 790/983, derived from 205/255 kHz;
* the add/delete request counter;
* triggers in both crossing directions;
* the edge-counter start value;
* the 16-tick trigger compensation;
* the late-trigger rule and the held edge-mode level;
* the exact `int_o` and `b` timing.

In one place the source disagrees with itself: a block diagram labels the
filter's tracking clock 0.5 MHz, while the text gives 2 MHz. The text is
followed.

Not included, because they are outside this block or not specified in
enough detail:

* the RF/IF front end and limiter;
* the angle-measurement ADC;
* the software that processes angle and data words;
* the data-validation unit that checks the decoded words.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The
end-to-end tests are:

* **`tb_mls_demod_top`** runs the top at its default parameters (full
  size).
  * It sends three packets: 13 carrier bits, the Barker code, then data
    bits. Their mixer products are about 211, 251 and 231 kHz. The second packet
    also has random level errors near the IF edges (edge jitter). Every byte is checked against the sent data at `int_o`.
  * It then restarts the receiver and drives carriers outside the capture
    range, to push P to both limits.
  * It counts carries, borrows, lock, triggers, Barker detection, tracking,
    K switching, interrupts, P limits and restarts, and fails if any of them
    never happened.
* **`tb_ber_workload`** measures the bit-error rate in noise.
  * The noise is band-limited Gaussian: two independent generators, each
    through a second-order 75 kHz Butterworth low-pass, modulated in
    quadrature onto the carrier, and hard-limited.
  * The carrier offset is random within ±25 kHz.
  * It runs 40 packets of 80 data bits at each of 5, 4, 3 and 2 dB.
  * A byte that never arrives counts as 8 bit errors.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl \
    rtl/mls_pkg.sv tb/tb_mls_demod_top.sv --top-module tb_mls_demod_top
./obj_dir/Vtb_mls_demod_top
```

### Results

| input SNR | 5 dB | 4 dB | 3 dB | 2 dB |
|---|---|---|---|---|
| bit errors / 3200 (`tb_ber_workload`) | 0 | 0 | 188 | 187 |
| packets received / 40 | 40 | 40 | 37 | 36 |
| bit errors in the received packets | 0 / 3200 | 0 / 3200 | 0 / 2960 | 1 / 2880 |
| reference BER of the original floating-point study | < 1e-5 | 2.4e-5 | 1e-4 | 4e-3 |

At 4 and 5 dB no errors were seen in 3200 bits. This is consistent with the
reference, but 3200 bits cannot confirm rates below about 1e-3. Below 4 dB
nearly all errors come from whole packets lost at synchronisation (the
mid-bit noise triggers described above). Within the packets that were
received, the filtered bits are about as good as the reference: 1 error in
2880 bits at 2 dB. The reference figures were obtained with a modelled clock
timing error rather than a simulated synchronisation, so they do not include
such losses. The testbench's pass bounds are set from these measurements,
not from the reference rates.
