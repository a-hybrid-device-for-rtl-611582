# Hybrid electrical-tomography acquisition device: FPGA logic

This design is the digital part of a 32-electrode electrical impedance
tomography (EIT) instrument. Its intended use is measuring the moisture in
walls. A controlled sine current is forced through one pair of electrodes. The
voltage on every other electrode is measured: its RMS amplitude, and its phase
against the current. Then the current moves to the next pair. One full series
of pairs is a frame, and the reconstruction software works on frames.

Older instruments of this kind measured the channels one after another. This
one gives every channel its own hardware: its own sample memory, RMS unit and
phase meter. One window of samples (one period of the 1 kHz excitation, 1 ms)
therefore measures all 32 electrodes at once. Three kinds of FPGA share one
parallel bus:

* eight **measuring cards** (`meas_card`), each with four electrodes;
* the **motherboard current source** (`current_source`), which makes the
  excitation current, holds it at its set point, and selects the electrode pair;
* the **data controller** (`data_controller`) in the SoC's FPGA fabric. It is the
  only bus master. It runs the sequence and hands finished frames to the
  processor.

`hybrid_top` wires these three kinds of blocks into one design. Everything
analog stays outside as ports: converters, DACs, amplifiers, comparators and
switches.

## The shared bus

The bus has an 8-bit address, 16-bit data, and one-clock `rd` and `wr` strobes,
all on one clock. Together the cards look like one 128-word RAM:

| address | meaning |
|---|---|
| `0ccc_nnnn` | card `ccc` (0..7), cell `nnnn` (0..15) |
| `1000_0xxx` | current source registers |
| `1111_1111` | broadcast write: every card starts a measurement |

Read timing is the central rule. The master drives the address with `rd` for one
clock (cycle k). On the next edge the addressed slave selects the cell into a
holding register. On the edge after that it puts the word on the data lines and
raises its output enable. The word is valid in cycle k+2, the second clock
after the address, and the master samples it at the end of that cycle. On the
boards the data lines are tri-state, and a slave leaves high impedance only in
its answering clock. Inside one design, `hybrid_top` builds the lines as an OR
of the slaves' outputs, each gated by its output enable. An assertion checks
that at most one slave drives at a time. A write is a single clock with `wr`,
address and data, and it takes effect at the next edge.

Card cells (`tomo_pkg`):

| cell | read | write |
|---|---|---|
| 0..3 | RMS of channel 0..3 (ADC codes) | PGA gain code of channel 0..3 (3 bits) |
| 4..7 | phase delay of channel 0..3 (clock ticks) | - |
| 8 | status: bit 0 done, bit 1 busy | - |
| 9 | excitation period (clock ticks) | - |
| 12 | sample read-out channel | sample read-out channel |
| 13 | sample read-out address | sample read-out address |
| 14 | stored sample at the read-out address, then address + 1 | - |

Current source registers: `0x80` pair index (write), `0x81` current set point
in ADC codes (write), `0x82` status (bit 0: current correct), `0x83` last
current RMS, `0x84` amplitude DAC code, `0x85` excitation shape (0 sine,
1 triangle, 2 square). Writing the pair, the set point or the shape restarts
the correctness check.

A status read that comes right after a start already reports "busy, not done".
A current-status read right after a pair write already reports "not correct".
So a master cannot pick up a stale result, even in the clock before the slave's
own flags change.

## One measurement, step by step

A frame starts with the configuration. The data controller writes the
processor's gain code for each of the 32 electrodes (`gain_cfg_i`) into the
cards' gain cells, then the excitation shape (`shape_i`) into the current
source. That takes 33 one-clock writes. Then, for every pair p = 0..31, it
does the following:

1. It writes p, then the set point, to the current source. The multiplexer
   selects source electrode p and sink electrode (p + 1) mod 32 (the adjacent
   pattern), and the current source clears its "current correct" flag.
2. It polls `0x82` until the flag is set. Meanwhile the amplitude loop
   measures the current's RMS once per excitation period. It moves the
   amplitude DAC by half the error, and it sets the flag after two periods in
   a row within ±16 codes.
3. It writes the broadcast start. Every card opens a window on its next
   filtered sample set and collects 500 samples per channel. The samples go
   into the channel's RAM, and the RMS units accumulate at the same time. Two
   clocks after the last sample, the RMS values, the phase delays and the
   period are in the card's cells, and the done bit is set.
4. It goes card by card: it polls the status cell until done, then reads the
   four RMS cells and the four phase cells. Each word goes into the frame
   memory. The two electrodes that carry the current are stored as 0.

After pair 31, the bank just filled is handed to the processor. `data_ready_o`
rises and stays high until `hps_ack_i`, and `frame_count_o` advances. While
`run_i` stays high, the next frame is collected into the other bank.

Frame memory word address (processor port `hps_addr_i`, data one clock later):
`{pair[4:0], electrode[4:0], kind}`. Kind 0 is RMS and kind 1 is the phase delay.

## Measuring card signal chain

`ads8588_ctrl` runs the card's ADS8588-class converter on its parallel
interface. It pulses CONVST every `SAMPLE_DIV` clocks (500 kSPS at 50 MHz) and
waits for BUSY to rise and fall. Then it reads the four channels with one RD#
pulse each. Each channel then passes through the following blocks:

* `fir2`: a 3-tap [1 2 1]/4 smoothing filter, with one clock of latency;
* `data_control`: the acquisition window. Strobes mark the first and last sample;
* `sample_ram`: 32768 x 16 bits per channel. It can be read back over the bus;
* `rms_calc`: floor(sqrt(sum(x²) / N)). The first of its two clocks stores the
  mean square, the second its square root;
* `phase_meter`: counts clocks from a rising zero crossing of the current
  reference to the next rising zero crossing of the channel's voltage. It
  also measures the reference period. Both square waves come from analog
  comparators, and each passes an equal two-flop synchroniser. The phase in
  degrees is 360 · delay / period, left to software.

The current's zero-crossing square wave comes from the motherboard, and every
card gets it as its phase reference.

## Current source

`dds_synth` produces the excitation waveform for the signal DAC from a 32-bit
phase accumulator; the 1 kHz tuning word is 85899 at 50 MHz. The sine comes
from a 256-entry table computed at elaboration. The triangle and the square
are computed from the phase bits. All three have the same peak and rise
through zero at phase 0, so the current's zero crossings do not move. The
regulator works on RMS, so it holds the set point with any shape. The
end-to-end testbenches use the sine.

A second DAC (`dac_amp_o`) scales the waveform. `current_regulator` drives it
from the RMS of the measured current (an integrating loop). The current is
read by a second `ads8588_ctrl` (one channel).

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `NCARDS` | 8 | measuring cards |
| `NCH` | 4 | electrodes per card |
| `N_SAMPLES` | 500 | samples per window (one 1 kHz period at 500 kSPS) |
| `RAM_DEPTH` | 32768 | words per channel sample RAM |
| `SAMPLE_DIV` | 100 | clocks per conversion (50 MHz / 500 kSPS) |
| `DAC_W` | 12 | DAC code width |

The regulator has a tolerance of 16, two confirming periods and a gain of 1/2.
The FIR taps and the gain code width (3 bits) are parameters of the blocks or
constants in `tomo_pkg`.

## What is taken from the device description and what is not

Taken from the description:

* eight cards of four inputs on a 16-bit data / 8-bit address bus;
* the 4-bit cell and 3-bit card address split, with bit 7 not used by the cards;
* tri-state data lines and a read answer in the second clock;
* per-channel 32768 x 16 sample memories, parallel RMS units, and RMS results
  two clocks after the last sample;
* FIR filtering, and phase measurement from zero-crossing comparators, with the
  current's zero crossing as the reference;
* two DACs (signal and amplitude) with the amplitude loop in the FPGA, and a
  choice of excitation shapes;
* configuration written by the data controller to the cards;
* the current checked before each measurement, one excitation period (1 kHz) per
  electrode configuration, and a ready flag to the processor after each series.

This design's own choices:

* the clock frequency (50 MHz);
* the converter protocol timing;
* the FIR taps;
* the RMS arithmetic;
* the phase as a delay in ticks;
* the three shapes, and the gain code width;
* the cell map, and the use of address bit 7 for the current source and the
  broadcast start;
* the adjacent electrode pattern;
* the regulator's control law and tolerances;
* the double-buffered frame memory and its layout;
* the sample read-out cells;
* storing zeros for the current-carrying electrodes. All channels are sampled;
  the description says only the other channels are measured.

The description's card diagram also shows a DAC and current sensing on the
card, but its text puts the current generation on the motherboard. The text
was followed: only the current source makes and senses the current.

The description draws eight result words per card, but its text gives a 4-bit
cell address. The text was followed: cells 0–7 hold the eight result words, and
the remaining cells are status and read-out.

Not included:

* the analog front end (amplifiers, third-order filter, comparators, current
  sensing);
* the DAC and ADC chips, the electrode multiplexer switches and the power supply;
* the processor and its peripherals (Ethernet, RS-232, USB, display), and the PLL;
* the capacitance (ECT) measurement mode and the electrode-contact check. Both
  are named in the description, but their hardware is not described.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/tomo_pkg.sv tb/tb_hybrid_top.sv \
  --top-module tb_hybrid_top -Mdir obj && obj/Vtb_hybrid_top
```

Use the same command for any `tb/tb_<block>.sv`. The `tb/` folder has
behavioural models of the analog side:

* `ads8588_model`: the converter;
* `card_frontend_model`: electrode voltages with a chosen amplitude and phase,
  and their zero crossings;
* `current_path_model`: the current as amplitude code times load, and its
  zero crossing.

The end-to-end testbenches:

* `tb_hybrid_top` runs two full frames of a reduced device: 2 cards,
  8 electrodes, 50-sample windows. It checks every RMS and phase value in the
  frame memory against the model, and the excluded electrodes. It also checks
  that every start happened with the current correct and the multiplexer on
  the right pair. It counts each mechanism: amplitude adjustments, polls that
  found the current not yet correct, polls that found a card not yet done,
  bank hand-over and acknowledge.
* `tb_hybrid_top_full` runs one frame of the full device with all defaults:
  32 electrodes, 32 pairs, 1 ms windows. That is about 8.9 M clocks, and it
  takes about 20 s.
* `tb_workload_4ch` runs the four-channel configuration as one series: one
  card, 4 pairs, 1 ms windows at full rate. The series is ready after 1.4 M
  clocks (28 ms). That is 4 ms of windows; the rest is the current settling
  from its reset amplitude.
* Each block also has its own testbench with values computed independently
  in the testbench. Where a latency or rate is specified, the testbench checks
  it: the two-clock RMS result, the second-clock bus answer, and one
  conversion per `SAMPLE_DIV` clocks.

The RTL has not been run on hardware, and no timing closure has been done.
