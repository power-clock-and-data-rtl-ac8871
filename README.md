# Clock and configuration-data recovery for a wirelessly powered neural implant

A fully implanted neural recording chip has no wires through the skin. All it
receives is one 2.64 MHz inductive power carrier. The carrier powers the chip,
and its frequency gives the chip its clock. Slow configuration data rides on it
as amplitude modulation: which electrode the ADC digitizes, the spike-detection
threshold, and which amplifiers are powered.

This RTL is the digital half of that receiver. It divides the carrier into the
chip's clocks and turns the demodulated data line into a configuration word. The
word is held in about a hundred registers spread across the chip. The analog
half (rectifier, bandgap, regulator, Schmitt trigger and AM demodulator) is not
part of the RTL. Its two digital outputs are the top module's inputs.

```
 carrier_sq ──► clock_recovery ──► clk_1m32 (1.32 MHz)
                    │
                    └──────────► clk_330k (330 kHz) ──► clock of everything below
 demod_data ──► edge_dt_counter ──sample, rx_bit──► header_bitcount ──shift, update──► shift_load_chain ──► cfg[94:0]
                                      └───────────────── rx_bit ───────────────────────────►┘
```

## The bit code: one rising edge, one sample

Each bit is a single high pulse. What the bit is depends only on how long the
pulse lasts:

* A pulse shorter than Δt is a **0**.
* A pulse longer than Δt is a **1**.
* The low time between pulses does not matter.

The receiver waits for a rising edge. It then counts Δt and samples the line
once. The low time between pulses is free, so the transmitter can tune it to
centre the demodulator's envelope average. This compensates for a comparator
offset without changing the code. Each bit brings its own timing reference, so
bits cannot drift against one another. The sample falls far from the falling
edge, so a glitch there usually has no effect.

`edge_dt_counter` implements this with one "armed" flip-flop and a 5-bit
counter, all clocked at 330 kHz:

1. The asynchronous `demod_data` passes through a two-flip-flop synchronizer
   (`data_sync`, brought out of the top as `rx_bit`).
2. If `data_sync` rises while the flip-flop is clear, the flip-flop is set.
   Setting it releases the counter, which starts counting on that same clock
   edge.
3. While the flip-flop is set, further rising edges are ignored. A glitch on
   the leading edge of a pulse therefore cannot restart the count.
4. The counter's top bit rises at a count of 16 clocks, which is
   16 / 330 kHz = 48.5 µs. That bit is the one-clock `sample` pulse, and
   `rx_bit` during that pulse is the recovered bit. On the next clock, the
   sample pulse clears the flip-flop and the counter.

Exact timing, counted in clk_330k rising edges:

| event | edge |
|---|---|
| `demod_data` first seen high | 0 |
| `data_sync` high | 1 |
| armed flip-flop set, counter = 1 | 2 |
| level that becomes the bit (`rx_bit` during `sample`) | 16 |
| `sample` high for one clock | 17 |
| flip-flop and counter cleared | 18 |
| earliest edge at which a new pulse can be first seen | 17 |

In real time, a pulse must stay high for about 16–17 clocks (48.5–51.5 µs,
depending on where the edge falls between clocks) to read as 1. It must be low
again by 16 clocks to read as 0. `sample` rises 17–18 clocks (51.5–54.6 µs)
after the rising edge of the data. Rising edges must be at least 18 clocks
(54.6 µs) apart, so the fastest possible rate is about 18 kbit/s. The link was
designed for about 10 kbit/s, and its transmitter reached 6.5 kbit/s.

**Known behaviour kept on purpose:** once a sample is taken, the detector is
armed again at once. Suppose a long pulse (a 1) bounces low and high after its
falling edge. The bounce is then a new rising edge. It triggers another Δt count
and an extra sample, usually a 0, which inserts a spurious bit into the frame.
The original silicon does the same. This RTL reproduces it because no corrected
circuit has been published. Transmitters should keep trailing edges clean. The
end-to-end testbench includes this case and expects the extra bit.

## Framing: a header of four ones, then 128 bits

`header_bitcount` turns the stream of samples into frames.

* **Waiting for a header.** Every sample shifts the recovered bit into a 4-bit
  header register. When all four stages hold 1 (the 4-input NAND goes low), the
  header has been found. The found signal passes through two delay flip-flops
  and becomes `header_found`.
* **Receiving the frame.** While `header_found` is high:
  * the header register no longer shifts, so it is blind to the data;
  * each sample becomes a `shift` pulse for the configuration chain;
  * an 8-bit bit counter, held in reset until now, counts the shifts.
* **Ending the frame.** The counter's top bit rises at 128 shifts. One delay
  flip-flop later it becomes the one-clock `update` pulse. `update` loads the
  working registers and clears the header register. Two clocks later
  `header_found` falls, and the bit counter returns to reset.

Detecting the end of the frame needs no decoder: it is just the top bit of the
counter. The price is that the frame length is a power of two (128). The chip
has only 95 configuration cells, so the first 33 bits of each frame are spacer
bits. They drop out of the far end of the chain.

Timing: if the fourth header 1 is shifted at clock edge k, `header_found` is
high from edge k+2. If bit 128 is shifted at edge j, `update` is high from edge
j+1 to edge j+2, and `header_found` falls at edge j+4. Samples are always at
least 18 clocks apart, so none is lost to these delays.

## Shift-load registers

Each configuration bit has two flip-flops (`shift_load_cell`):

* a **shift stage** in a serial chain, enabled by `shift`;
* a **working stage**, loaded from the shift stage by `update`.

The chip's logic reads only the working stages. They stay constant while a new
frame shifts through, and they all change together on the clock edge that ends
`update`. Cells can be placed wherever their bit is used; only the serial link
and two enables run between them.

Bit order: data enters cell 0. After a frame of bits b[0] (first) … b[127]
(last), `cfg[i] = b[127 − i]`. Bits b[0]…b[32] are the spacer bits. The
meaning of each field (channel select, threshold, amplifier enables) is not
defined here, so `cfg` is a flat 95-bit vector.

## Clocks from the carrier

The Schmitt trigger's output follows the carrier, but its duty cycle is not 50%.
`clock_recovery` clocks a toggle flip-flop (D = not Q) on its rising edges. The
result, `clk_1m32`, is 1.32 MHz and exactly 50% duty. A 2-bit counter clocked
by `clk_1m32` divides it by four, and its top bit is `clk_330k`. That is the
330 kHz clock for the ADC and for all the data-recovery logic here. The division
is set by the parameter `SLOW_DIV` (a power of two).

## Top module `pcdr_top`

| port | dir | width | meaning |
|---|---|---|---|
| `carrier_sq` | in | 1 | Schmitt-trigger output, 2.64 MHz |
| `rst_n` | in | 1 | asynchronous active-low reset of every flip-flop |
| `demod_data` | in | 1 | AM demodulator comparator output (asynchronous) |
| `clk_1m32` | out | 1 | carrier / 2, 50% duty |
| `clk_330k` | out | 1 | carrier / 8, 50% duty |
| `armed` | out | 1 | a pulse edge was seen and Δt is being counted |
| `sample` | out | 1 | one-clock Δt sample pulse |
| `rx_bit` | out | 1 | synchronized data; the recovered bit while `sample` is high |
| `shift` | out | 1 | sample pulse inside a frame |
| `update` | out | 1 | one-clock end-of-frame pulse |
| `header_found` | out | 1 | frame in progress |
| `cfg` | out | `CFG_BITS` (95) | working configuration registers, 0 after reset |
| `cfg_sout` | out | 1 | shift stage of the last cell |

All outputs except the two clocks are synchronous to `clk_330k`. The constants
live in `rtl/pcdr_pkg.sv`:

| constant | value | meaning |
|---|---|---|
| `SLOW_DIV` | 4 | 1.32 MHz → 330 kHz |
| `DT_BITS` | 5 | Δt = 2^(DT_BITS−1) = 16 clocks |
| `HDR_LEN` | 4 | ones in the header |
| `BC_BITS` | 8 | frame = 2^(BC_BITS−1) = 128 bits |
| `CFG_BITS` | 95 | configuration cells |

The logic is small: 217 flip-flops in all, 190 of them in the configuration
chain.

## Where this RTL departs from the original circuit, and why

The block structure and every number above (the 2.64 MHz link, the toggle
divider, 330 kHz, a 5-flip-flop Δt counter of 16 clocks, a 4-ones header, an
8-flip-flop bit counter of 128, two flip-flops per configuration bit, the
delays in the feedback paths) follow the published circuit. The following
are this implementation's own choices.

* **One clock, no asynchronous tricks.** In the original, the data line (gated
  by the flip-flop's Q-bar) clocks the edge flip-flop directly. Δt clears the
  flip-flop asynchronously through a delay stage. The header register and bit
  counter use gated clocks. Here everything runs on `clk_330k` with clock
  enables and synchronous clears. The delay stages become single flip-flops (two
  for the header-found path).
* **Input synchronizer.** Two flip-flops on `demod_data` were added. They delay
  the sample by up to two clocks relative to a data-clocked edge detector; the
  timing table above includes this.
* **Update pulse.** `update` is shaped into exactly one clock, so that a
  synchronous load works.
* **Reset.** A power-on reset is not described. Here one asynchronous `rst_n`
  clears everything, including the working registers.
* **Chain length and order.** The chip is said to have "about 95" cells. Exactly
  95 are used, with the bit order given above.
* **The trailing-edge re-trigger** is kept, as explained above.

## Not in the RTL

The rectifier, bandgap reference, pFET regulator, Schmitt trigger and AM
demodulator (pre-filter, envelope detector, averaging filter, comparator) are
analog circuits. So are the off-chip coil and capacitors and the external class-E
transmitter. None of them is in the RTL. `tb_pcdr_top` plays the part of the
Schmitt trigger and the demodulator by driving the two digital inputs directly.

For a test from the coil voltage upwards, `tb/` also has rough behavioural
models of two of them. They are simulation-only and use their own constants,
not measured ones.

* `tb_rf_schmitt` is a hysteresis comparator with thresholds at 1.5 V and 0.5 V.
* `tb_rf_am_demod` has four stages: an attenuator, a peak-following envelope
  detector, a slow averaging filter, and a comparator of the envelope against
  its average.

## Verification

Each module has a self-checking testbench in `tb/`. It computes the expected
values from the stimulus and not from the RTL. It prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_clock_recovery` | 150 ns / 229 ns carrier; output levels after every edge; high and low times equal (50% duty); /2 and /8 rates; outputs low in reset |
| `tb_edge_dt_counter` | random short and long pulses, the 16/17-clock boundary, leading-edge glitches (must be ignored) and trailing-edge glitches (must resample), against a cycle-exact reference of the rule in the table above |
| `tb_header_bitcount` | sample pulses 17–40 clocks apart; near-headers (1110) rejected; `shift` every clock; `update` in exactly the right clock; four complete frames |
| `tb_shift_load_chain` | 128-bit frames into 95 cells; `cfg` frozen while shifting; `cfg[i]` after load; serial out delayed by 95 shifts |
| `tb_pcdr_top` | full size, real time: three frames, at about 10 kbit/s and at 6.5 kbit/s; leading and trailing glitches; clock duty and periods; sample latency of 17–18 clocks; every recovered bit; 128 shifts and one update per frame; `cfg` after each update and unchanged in between; counts each mechanism and fails if one never occurred |
| `tb_pcdr_rf` | the coil waveform itself: a 2.64 MHz sine switching between 8.0 V and 5.7 V peak (29% modulation depth), through the two behavioural models into `pcdr_top`; two frames; every sampled bit, one update per frame, `cfg` after each update |

Every testbench runs at the default parameters. The end-to-end run simulates
53 ms of real time in well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/pcdr_pkg.sv tb/tb_pcdr_top.sv --top-module tb_pcdr_top
./obj_dir/Vtb_pcdr_top
```

Replace `tb_pcdr_top` with any other testbench name to run it; `tb_pcdr_rf`
also needs `-Itb -y tb` for the front-end models. The testbenches
use `timescale 1ns/1ps` and only `$urandom` for random stimulus.

To change the code, edit the constants in `pcdr_pkg.sv`, or override the module
parameters (`DT_BITS`, `HDR_LEN`, `BC_BITS`, `N`/`CFG_BITS`, `SLOW_DIV`). Note
that Δt and the frame length are tied to counter widths, so both are powers of
two. The data-path testbenches take Δt, the header length, the frame length
and the chain length from the package. The clock checks assume `SLOW_DIV` = 4.
