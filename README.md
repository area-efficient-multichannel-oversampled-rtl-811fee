# Four-channel oversampled PCM voice-band coder: decimation filter RTL

A first-order sigma-delta A/D converter for telephone channels makes a 1-bit code at
4.096 MHz. The density of ones in that code follows the analog input. Most of a
coder's silicon goes into the digital decimation filter, which turns the code into
8 kHz PCM words. This design lets four channels share that filter. The work that
must run at the full 4.096 MHz rate is kept as small as possible: one adder per
channel, with the coefficients from one shared counter. Everything after the first
decimation runs at low rates on one small microprogrammed processor, which serves
all four channels in turn.

This RTL implements the digital part of the coder described in B. H. Leung, R. Neff,
P. R. Gray and R. W. Brodersen, "Area-Efficient Multichannel Oversampled PCM
Voice-Band Coder". The analog front ends are not RTL. These are the switched-capacitor
integrators, op amps and comparators. The testbenches model them behaviourally.

```
 x[c]  1 bit, 4.096 MHz
   |
   v
 FIR1   triangle window, 256 taps, decimate by 128      custom, one adder per channel
   |    14-bit unsigned, 32 kHz
   v
 FIR2   5 taps (1 4 6 4 1)/16, decimate by 2             microprogrammed,
   |    20-bit signed, 16 kHz                            time-shared by the
   v                                                     four channels
 IIR    4th-order elliptic (two biquads), keep every 2nd
   |
   v
 pcm_out[c]  20-bit signed, 8 kHz
```

| quantity | value | origin |
|---|---|---|
| channels | 4 | published design |
| input rate / code | 4.096 MHz, 1 bit | published ("4 MHz") |
| FIR1 | triangle, L = 256, D = 128, 14-bit output, 32 kHz | published |
| FIR2 | L = 5, 32 to 16 kHz | published; the coefficients are this design's |
| IIR | 4th-order elliptic, 16 to 8 kHz, 20-bit | published; the coefficients are this design's |
| processor | 4.096 MHz, ROM 50 x 26 bit, RAM 40 x 20 bit, 20-bit data path, shift-and-add | published |
| instruction set, microprogram | 26-bit format, 29-word program | this design |

## FIR1: one adder, two overlapping windows

A triangle window of length 2D with decimation D means that two output sums overlap
at any moment. One sum is in the rising half of its window (weights 0,1,...,127).
The other is in its falling half (weights 127,...,1,0). The two weight sequences
are bitwise complements of each other. Each channel therefore needs two
accumulators but only one adder. The adder works twice per input sample and serves
the two accumulators in alternate clocks.

`fir1_counter` is a 9-bit up-counter, PC, clocked at 8.192 MHz (two clocks per
sample):

* PC_0 picks the accumulator that is in the adder.
* PC_1..PC_7 count the 128 samples of a decimation period.
* PC_8 marks the odd periods.

The coefficient is PC_7..PC_1, inverted when PC_0 xor PC_8 is 1. Over one period,
accumulator A (PC_0 = 0) therefore sees 0..127 and accumulator B sees 127..0. In the
next period the two swap, because PC_8 turns the up-count into a down-count. A
window is complete when its accumulator is about to start a new rising half (count 0,
not inverted). In that clock `latch` is high. The finished sum goes into a two-word
output FIFO and the accumulator restarts from zero. This happens once every 128
samples, at clock 0 for A and at clock 257 for B of every 512.

`fir1_channel` holds the channel's four registers:

* two state registers, which form a two-clock loop through the adder, so the two
  accumulators alternate through it naturally;
* two output registers, the FIFO `out_new` and `out_old`.

The code bit gates the coefficient. A 1 adds the coefficient and a 0 adds nothing.
The window sum runs from 0 to 128·127 = 16256, which fits the 14-bit output exactly.
With no input (density 1/2) the sum sits at mid-scale, 8128.

`fir1_filter` puts one counter and four channels together. It exposes the eight FIFO
words on one 14-bit bus, addressed by channel (`rd_ch`) and slot (`rd_slot`).

## The microprogrammed FIR2/IIR processor

`mp_filter` is built from these parts:

* a program counter, `mp_pc`;
* a program ROM, `mp_rom` (50 x 26);
* a state RAM, `mp_ram` (40 x 20);
* an arithmetic/I-O unit, `mp_auio`;
* a channel address unit, `mp_addr`. It replaces a general address unit. The RAM
  address is variable offset x 4 + channel.

The processor runs at 4.096 MHz. One 16 kHz frame is 256 instruction cycles, in four
64-cycle slots, one per channel. In its slot, a channel runs the same straight-line
program. The program reads the channel's two FIFO words from FIR1, computes one FIR2
output and pushes it through both biquads. The frame parity `odd` decimates to
8 kHz: the result is written to the channel's output register on even frames only.
The outputs therefore switch at 8 kHz.

The processor is a three-stage pipeline. An instruction is fetched from the ROM in
one cycle, reads its operand (RAM or FIR1 word) in the next, and executes in the
third. No instruction reads a variable written by the instruction just before it,
so no forwarding is needed.

There is no multiplier. Each instruction adds or subtracts one arithmetically
right-shifted operand to a 20-bit two's-complement accumulator, so a coefficient with
k signed power-of-two (CSD) digits takes k instructions. In the same cycle an
instruction may also write the RAM. It can write the accumulator as it stood before
the cycle, or the operand itself. Writing the operand shifts a delay line at no
extra cost.

Instruction word (`coder_pkg::instr_t`, MSB first):

| field | bits | meaning |
|---|---|---|
| acc_en | 1 | update the accumulator |
| clr | 1 | start a new sum: acc = term |
| neg | 1 | subtract instead of add |
| src | 2 | operand: RAM, newest FIR1 word, previous FIR1 word, zero |
| shift | 5 | operand >>> shift |
| raddr | 4 | variable read |
| we, wsrc | 1, 1 | write RAM; 0 = accumulator, 1 = operand |
| waddr | 4 | variable written |
| out | 1 | copy accumulator to the output register (even frames) |
| spare | 5 | zero |

Each FIR1 word w is first converted to signed: (w − 8128)·16. A full-scale input
becomes ±130048, which leaves 12 dB of headroom in 20 bits.

The program (`coder_pkg::prog`, 29 words, fetched in cycles 0–28 of each slot):

```
u = (x[n] + 4x[n-1] + 6x[n-2] + 4x[n-3] + x[n-4]) / 16                     cycles 0-5
v = k1(u + u[-2]) + b1 u[-1] + m1 v[-1] + m2 v[-2]                          cycles 6-16
y = k2(v + v[-2]) + c1 v[-1] + n1 y[-1] + n2 y[-2]                          cycles 17-27
store y, output on even frames                                             cycle 28

k1 = 2^-1 + 2^-6       b1 = 2^-2 + 2^-4      m1 = 2^-2 + 2^-4     m2 = -(2^-1 + 2^-3 + 2^-4)
k2 = 2^-2 - 2^-5       c1 = 2^-1 - 2^-3      n1 = 2^-2 + 2^-3 - 2^-5   n2 = -(2^-3 + 2^-4)
```

There are ten RAM variables per channel:

* FIR2 delay line: x[n−2..n−4];
* u[−1], u[−2], v[−1], v[−2], y[−1], y[−2];
* one scratch word.

Ten variables for four channels fill the 40 words exactly. Fetch cycles 29–63 of each slot
are idle. The 21 unused ROM words hold no-operations.

The IIR coefficients were chosen for this design. The original gives only the filter
type and its targets:

* passband ripple below 0.25 dB, including the droop of FIR1 and FIR2;
* at least 33 dB of suppression from 4.6 kHz up.

A 4th-order elliptic starting point was optimised with the FIR1/FIR2 droop included,
then quantised to 2–3 CSD digits per coefficient. The resulting chain has these
properties:

| property | value |
|---|---|
| DC gain | 0.941 (−0.53 dB) |
| ripple, 300–3000 Hz | 0.11 dB |
| stopband zeros | 4.78 and 6.62 kHz |
| suppression, 4.6 kHz and up | ≥ 35.8 dB |

Its simulated attenuation of out-of-band tones aliasing into the band:

| tone | attenuation |
|---|---|
| 13 kHz | 46 dB |
| 29 kHz | 39 dB |

FIR2's binomial taps put four zeros at 16 kHz. They cost six shift-and-add
instructions.

## Clocking, interface and timing (`pcm_coder4`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | 8.192 MHz, two clocks per input sample |
| rst_n | in | 1 | asynchronous, active low; clears all registers and the RAM |
| x | in | 4 | comparator outputs of the four front ends |
| fs_tick | out | 1 | high in the second clock of each sample; front ends present a new bit after this edge |
| pcm_out | out | 4 x 20 | signed output word per channel, changes once per 8 kHz period |
| pcm_valid | out | 4 | one-clock strobe when `pcm_out[c]` changes |

The processor is enabled on clocks with `fs_tick` high. FIR1 pushes its FIFOs at
clocks 0 and 257 of every 512. The processor reads channel c's words at clock
128c + 11 and 128c + 13. Both counters start at reset, so a push never falls between
the two reads. An assertion in `pcm_coder4` checks this. After each read:

* channels 0 and 1 see the words pushed at clocks −255 and 0;
* channels 2 and 3 see the words pushed at clocks 0 and 257.

Channel c's output register is written at clock 128c + 61 of every even frame. The output spacing
is exactly 1024 clocks.

## Departures from the original and choices made here

* **Single clock.** One rising-edge 8.192 MHz clock replaces the original two-phase
  clock and its ANDed latch/reset controls. The processor uses a clock enable.
* **Processor pipeline.** The original processor is heavily pipelined, but the
  stages are not described. This one uses three stages (fetch, operand read,
  execute) and completes one instruction per cycle; 29 of the 64 cycles are used.
* **Instruction set, program, RAM map, address rule.** All four are this design's
  own. The original compiled an assembler program into hardware and does not publish
  them.
* **Coefficients.** The FIR2 and IIR coefficients are this design's own (see above).
* **Code and arithmetic.**
  * The 1-bit code is read as unipolar (0/1), with the coefficient gated by the bit.
  * The mid-scale 8128 is removed before FIR2.
  * The accumulator wraps and does not saturate.
* **Exact rates.** The rates are exact powers of two (4.096 MHz, 32/16/8 kHz). The
  original quotes "4 MHz".
* **Front end.** The front end is outside the RTL. The testbenches model it as an
  ideal first-order loop with an op-amp gain of 1000 (a leaky integrator). There is
  no thermal noise and no charge injection in the model.

## Files

| file | content |
|---|---|
| `rtl/coder_pkg.sv` | constants, instruction type, microprogram |
| `rtl/fir1_counter.sv`, `rtl/fir1_channel.sv`, `rtl/fir1_filter.sv` | FIR1 |
| `rtl/mp_pc.sv`, `rtl/mp_rom.sv`, `rtl/mp_ram.sv`, `rtl/mp_addr.sv`, `rtl/mp_auio.sv`, `rtl/mp_filter.sv` | processor |
| `rtl/pcm_coder4.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_freq_response.sv`, `tb/tb_snr_gain.sv`, `tb/tb_idle_noise.sv` | measurement-style workloads |
| `tb/sd_frontend_model.sv` | behavioural sigma-delta front end |
| `tb/coder_ref.svh` | reference model of a channel (direct convolution and filter equations) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pcm_coder4 \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/coder_pkg.sv tb/tb_pcm_coder4.sv
./obj_dir/Vtb_pcm_coder4
```

Replace the module name to run another testbench. All of them run at the default
sizes in a few seconds.

## How far it has been checked

The block testbenches compare each block with models written independently of the
RTL:

* FIR1 against a direct 256-tap convolution of the code history.
* The ROM by decoding it and summing the CSD terms into coefficients. The same test
  checks that no word reads the variable written by the word before it, which the
  pipeline relies on.
* The arithmetic unit against a model of its two pipeline stages.
* The processor against the filter equations evaluated bit-exactly.
* The top with four behavioural front ends, every output word bit-exact against the
  reference model. The top test also checks:
  * 1 kHz and 2 kHz sine amplitudes within 0.1 % of the predicted gain;
  * an idle channel next to active ones;
  * a DC step;
  * that every mechanism occurred: pushes from both accumulators, up/down switches,
    and frames with and without output.

Workload results, at the default sizes:

| measurement | result |
|---|---|
| response, 320–3008 Hz | within 0.01 dB of the predicted transfer function |
| ripple, 320–3008 Hz | 0.10 dB |
| suppression vs 1024 Hz: 4608 Hz | 36.2 dB |
| suppression vs 1024 Hz: 12992 Hz | 46.2 dB |
| suppression vs 1024 Hz: 28992 Hz | 38.8 dB |
| S/(N+D), 1.024 kHz at −3 dB (±0.01 dithered model) | 66 dB |
| gain tracking, −3 to −50 dB | within 0.05 dB |
| idle noise, dc offsets ±100 mV in 5 mV steps (2.5 V reference assumed), 304–3400 Hz, unweighted | −70.9 to −69.4 dB below a full-scale sine; spread 1.6 dB |

Every testbench was also run against a deliberately broken copy of its module, and
each one reported failures.

Not checked:

* timing closure or area, since no synthesis to a cell library was done;
* the original's analog measurements (PSRR, C-message weighted idle noise), which
  depend on the real front end. The idle-noise workload uses an ideal first-order
  loop. At an offset of exactly zero, that loop produces only a tone at half the
  sampling rate, which FIR1 removes completely, so that point is far quieter than
  the rest.
