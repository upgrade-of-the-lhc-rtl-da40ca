# RF distribution over White Rabbit: Beam-Control source and WR2RF receiver

The LHC's low-level RF system has to hand the accelerating frequency (about 400 MHz) to equipment
spread over kilometres: cavity controllers, crab cavities, experiment triggers and beam instrumentation.
This design does not send the RF itself over a fibre. It sends **numbers** over a White Rabbit (WR) Ethernet network:

- frequency tuning words (FTWs),
- reference phases,
- a few control flags.

Every receiver then rebuilds the RF with its own numerically controlled oscillator (NCO).

WR gives every node a 125 MHz clock that is phase-aligned with every other node's, and TAI time.
The hard part is making the rebuilt RF come out with the *same phase* everywhere. That has to hold:

- whenever a receiver was switched on,
- however far away it is,
- during a frequency ramp,
- without ever resetting an RF clock that is in use.

Most of this README is about how that is done.

The RTL covers the digital part of both ends:

- **`beam_control`**: the source (Beam-Control FPGA). For each of the two rings it has:
  - a function generator that plays the frequency program, plus an orbit-feedback correction;
  - a *program* NCO;
  - a digital PLL that follows the master oscillator (VCXO) and gives the *master* frequency and phase.

  Once per revolution it packs both rings into one 50-byte frame and sends it.
- **`wr2rf_fpga`**: a receiver (WR2RF board FPGA). It:
  - decodes the frame;
  - runs the RF NCO with phase comparison, delay compensation and glitch-free re-synchronisation;
  - makes the IF for the DAC;
  - produces a TAI-derived restart pulse for the LO;
  - produces a revolution pulse with sub-nanosecond placement;
  - produces a bunch clock aligned to it.
- **`llrf_wr_top`**: one source and one receiver. The network between them is left as ports, so the
  fixed network latency is supplied from outside. So are the analog parts (ADC, VCXO, DAC, DDS, mixer)
  and the fine delay line.

## Number formats

All frequencies are 48-bit FTWs of a **harmonic-1 (revolution-frequency) NCO** clocked at 125 MHz:

    f_rev = FTW * 125 MHz / 2**48          f_RF = H_RF * f_rev

- `H_RF` is the RF harmonic number. It is an input, 35640 for the LHC.
- All phases are 48-bit accumulator values of such an NCO: a full revolution is 2**48.
- One FTW step is 0.44 µHz at the revolution frequency, or 15.8 µHz at the RF. This is the
  resolution the function generator can set.
- The RF phase is `H_RF × H1 phase` (mod 1 turn). It is never stored: the receiver computes it on
  the fly when it forms the IF.

Carrying the revolution frequency, not the RF, has two benefits:

- the same numbers also give the revolution pulse and bunch-clock phase;
- an H1 phase that agrees between nodes makes the RF phase agree too.

### The RF frame (`llrf_pkg`)

The 50-byte payload is two 25-byte records, beam 1 first. The bytes are big-endian, and the fields
are in this order:

| field          | bytes | meaning                                                   |
|----------------|-------|-----------------------------------------------------------|
| `ftw_prog`     | 6     | program frequency (function generator + orbit correction) |
| `ftw_master`   | 6     | master frequency (program + correction of the DPLL)       |
| `ctrl`         | 1     | bit 0 `nco_reset`, bit 1 `nco_resync`, bit 2 `dds_resync` |
| `phase_prog`   | 6     | program NCO phase in the cycle the frame was built        |
| `phase_master` | 6     | master NCO phase in the same cycle                        |

A receiver can therefore produce either ring's program RF or master RF, chosen by `beam_sel` and `rf_sel`.

The frame travels as a byte stream (`valid`, `sof`, `eof`, `data`) to and from a WR core. The core
and its RF-over-Ethernet encapsulation are not part of this RTL.

The field widths, the three flags and the 50-byte total are those of the reference system. The
following are this design's own choices:

- the field order inside a record,
- the byte order,
- the positions of the flag bits.

## How the phase is kept the same everywhere

Five mechanisms work together. Most of them sit in `rfnco`; the rest are in `tai_to_fc`,
`frev_upsampler` and `bunch_divider`.

### 1. Common clock, fixed latency

Source and receivers run on WR-recovered 125 MHz clocks, which are phase-aligned. The network
delivers each frame after a fixed, known latency. The reference system uses:

- 10 µs on the critical path to the cavities;
- 128 µs through the general timing network.

The receiver's `load` strobe comes exactly one clock after the last byte. From the next clock on, the
new FTW is added to the H1 accumulator. Two receivers that are both running therefore apply every FTW
change on the same cycle, offset only by their (fixed) latency difference. Their relative phase is
kept from then on.

### 2. Reference phase compare with delay compensation (`rfnco`)

Fixed latency alone would not fix the phase of a receiver that starts late. So every frame also carries
the source's NCO phase, taken in the cycle the frame was built.

At `load` the receiver latches its own H1 phase and forms a reference:

    reference = phase_master + FTW_master * delay_cyc       (mod 2**48)

Here `phase_master` and `FTW_master` are the `rfnco` inputs. They carry whichever record the receiver
selected, program or master.

- `delay_cyc` is the latency from frame build to `load`, in clock cycles with 8 fractional bits (Q24.8).
- It can also include the beam's time of flight to this receiver's position in the ring.
- The product advances the reference by the phase the source NCO gained in the meantime.
- The instantaneous FTW of the frame is used, so the comparison stays correct during a ramp. There, a
  fixed phase offset would be wrong.

`phase_error = reference − local` (signed) appears two clocks after `load`.

### 3. Glitch-free re-synchronisation (`nco_resync`)

The RF must never jump. So the error is not written into the accumulator. Instead:

- if the frame's `nco_resync` flag is set, `nco_resync` adds a frequency offset of at most `MAX_STEP`
  (2**24 H1 units per clock) to the FTW;
- it keeps doing so until the whole error is absorbed, with an exact last step;
- the error is read as signed, so the NCO always takes the shorter way round;
- while a ramp runs, `resync_busy` is high and new errors are ignored.

With `H_RF` = 35640 the largest step is an offset of about 265 kHz at the RF. Any error is gone within
2**23 clocks (67 ms).

`nco_reset` is the hard alternative, used when starting from scratch:

- it clears the H1 accumulator in the `load` cycle;
- the comparison of that frame then uses the cleared phase, so the same frame also computes the error
  that `nco_resync` removes.

### 4. LO restart on the TAI-derived f_c pulse (`tai_to_fc`, `lo_nco`)

The receiver makes RF as `IF × LO`. The LO is:

- an external 32-bit, 1 GHz DDS (analog LO, about 413 MHz);
- plus a digital LO (`lo_nco`) in the IF computation: `IF = LO − H_RF × H1`.

Both must have a phase that every node agrees on. They get it from a pulse that every node produces
at the same instant:

- `tai_to_fc` pulses in every clock whose TAI time, counted in 125 MHz cycles since the epoch, is a
  multiple of `fc_val`.
- To find that phase once, it divides the captured TAI time by `fc_val` with a bit-serial 72-bit
  divider (72 clocks, already accounted for in the dividend).
- A free-running modulo counter keeps the phase from then on.
- It restarts when TAI becomes valid again or when `fc_val` changes.

The pulse resets `lo_nco` and, through `dds_reset`, the DDS.

LO frequencies are chosen so that their phase repeats after `fc_val` cycles, so the reset causes no
phase step. They are integer multiples of the least common multiple of the DDS step (1 GHz / 2**32 =
0.233 Hz) and the NCO step. That gives `fc_val` about 4.3 s; coarser frequency steps shorten it.

Some LO frequencies cannot be hit exactly with the 48-bit NCO. For those, `lo_nco` has a second
(*fractional*) accumulator that adds its word on every 5th clock, which gives 5 times finer
resolution. Both accumulators are cleared by the f_c pulse and by `nco_reset`.

### 5. Revolution pulse and bunch clock with sub-ns placement (`frev_upsampler`, `bunch_divider`)

The H1 accumulator's carry (`frev`) says in which 8 ns cycle a revolution began. The accumulator
value says *where* in that cycle:

- with step `d` and the value `r` just after the wrap, the wrap happened `(d − r)/d` of a period
  after the previous sample;
- `frev_upsampler` computes this fraction with a 16-bit serial divider;
- it then scales the fraction to 78.125 ps taps (102.4 taps per clock);
- it outputs a pulse `frev_fine` with the tap count, always 17 clocks after `frev`.

An external delay line (an FPGA output delay, for example) delays the pulse by that many taps and
returns it on `frev_sync_in`. `bunch_divider` runs on the RF clock. It divides the RF by 10 (25 ns
bunch spacing), resynchronises the pulse and reloads its counter on each pulse:

- because the pulse sits to well under an RF period, the same RF edge catches it after any restart;
- a divider already in phase is left alone;
- otherwise it jumps once and flags `realign`.

## The source side (`beam_control`)

- **`fgen`**: function generator. Its table holds up to 4096 vectors of (interval in clocks, slope)
  per ring:
  - the slope has 32 fraction bits below the FTW LSB, so very slow ramps stay smooth;
  - the frequency rises linearly by the slope every clock for the interval;
  - an interval of 0 ends the program;
  - the next vector is prefetched, so intervals before the end marker must be at least 2 clocks;
  - the orbit-feedback correction (`orbit_corr`, a signed FTW offset written by the host) is added
    to the output at all times.

  A 30-minute ramp is 2.25·10^11 clocks, well inside 4096 × 2^32.
- **Program NCO**: accumulates `ftw_prog` and gives `phase_prog`.
- **`dpll`**: locks a master NCO to the VCXO, sampled at 125 MS/s.
  - The VCXO at about 400 MHz is undersampled. The NCO phase is multiplied by `H_RF`, so its sine
    aliases in the same way.
  - The ADC sample, delayed to match the CORDIC, is multiplied by that sine and summed over 1024
    samples. The sum removes the sum-frequency term.
  - The sum drives a PI filter (shifts 21 and 26) whose output `corr` sets `ftw_master = ftw_prog + corr`.
  - `locked` needs 16 consecutive small errors.
- **`rf_frame_tx`**: once per revolution (`rev_tick`, the carry of the beam-1 program NCO), both rings'
  fields are captured and streamed out. The first byte leaves one clock later. A frame takes 50 clocks,
  against about 11 100 clocks per LHC revolution.

The frame built at `rev_tick` reaches the receiver's `load` `51 + network latency` clocks later.
That number, times 256, is the receiver's `delay_cyc` (plus time of flight).

## The receiver datapath (`wr2rf_fpga`)

    net_rx --> rf_frame_rx --load/payload--> beam/RF select --> rfnco --cos/sin(IF)--> iq_modulator --> dac
    TAI ----> tai_to_fc --fc_reset--> rfnco (LO restart), dds_reset
    rfnco --frev, phase_h1--> frev_upsampler --frev_fine/tap--> [delay line] --frev_sync_in--> bunch_divider (rf_clk)

`iq_modulator` rotates the IQ set-point by the IF: `dac = sat((I·cos − Q·sin) >> 15)`. The IF comes from
a pipelined 16-stage CORDIC (18-bit phase, 16-bit outputs within ±4 LSB).

The frame flags act as follows:

- `dds_resync` goes out as a one-clock pulse on `load`. What the DDS does with it is up to the DDS
  control.
- `nco_reset` and `nco_resync` act inside `rfnco` as described above.

## Where this design departs from, or adds to, the reference system

What follows the reference system:

- the FTW/phase frame content;
- the 48-bit NCO at 125 MHz;
- the H1 accumulator with latch/compare/re-sync and the wrap detect;
- the integer and fractional LO accumulators with the divide-by-5;
- IF = LO − H_RF·H1 with a CORDIC;
- the TAI-derived f_c pulse;
- delay compensation from latency and instantaneous frequency;
- ~78 ps revolution pulses re-aligning a divider;
- a 4096-vector interval/slope function generator;
- orbit correction added in firmware;
- a DPLL on a 125 MS/s ADC giving the master FTW.

This design's own choices, where the reference system gives only the function:

- frame field order, byte order and flag bit positions;
- the byte-stream interface;
- the linear ramp with clamped step for re-synchronisation;
- the `delay_cyc` format;
- NCO-reset semantics;
- the TAI divider method;
- the interpolation method of the up-sampler, with the delay line kept external;
- the bunch divide ratio of 10;
- the whole DPLL: phase detector, averaging, gains and lock detect;
- how the source makes its reference phases, and which NCO paces the frames;
- the function-generator vector format and end marker;
- orbit correction as an additive FTW offset.

The CORDIC and the modulator are named in the reference system; their insides are this design's own.

Not in the RTL (the 32-bit DDS tuning word, for instance, goes straight from configuration to the DDS):

- the WR core and RF-over-Ethernet framing;
- the WR switches;
- the DDS chip, DAC, mixer, VCXO, ADC and the fine delay line;
- the existing analog beam loops and synchro loop;
- the front-end computer that loads tables and streams orbit corrections.

Their signals are ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against values worked out
independently, for example:

- expected bytes;
- a reference accumulator model;
- `$cos`/`$sin`;
- a TAI model;
- exact fraction arithmetic for the up-sampler.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

`tb_llrf_wr_top` runs the whole chain with every parameter at its default. Its setup:

- a network model with 100 clocks of latency;
- a TAI source;
- a VCXO model sampled by the ADC;
- a fine delay line model;
- a free-running 400 MHz RF clock. Because it is not locked to the NCO, the bunch divider re-aligns
  on most revolutions here; `tb_bunch_sync` below uses a locked RF clock.

It checks two things:

- **Program RF**: after NCO reset, phase ramps and a played frequency ramp with orbit correction, the
  receiver's H1 phase equals the source's program phase **exactly**, clock by clock.
- **Master RF**: after switching the receiver to the master RF with the DPLL locked, the receiver's RF
  phase follows the master within 1/100 turn.

It also counts each mechanism and fails if one never happened: frame loads, NCO resets, phase ramps,
f_c pulses at TAI multiples, DDS resync, fine pulses, bunch re-alignments, PLL lock and the mode switch.
It runs in about 10 s.

`tb_phase_recovery` tests phase recovery with two receivers. No frame carries an NCO reset.

- One receiver is at 10 µs latency, the other at 128 µs.
- The second starts 1.2 M clocks late and is later held in reset and restarted, as a power cycle would.
- Both must reach the source's program phase exactly, clock by clock: after start-up, after a frequency
  ramp and after the power cycle.
- The first receiver must not move while the second recovers.
- In every clock, each receiver's phase step may differ from its FTW by at most one re-sync step, so the
  phase never jumps.

It runs in about 40 s.

`tb_bunch_sync` tests the bunch clock.

- Its RF clock is not a free oscillator. It is generated from the receiver's own NCO phase, with each
  RF edge placed where `H_RF` × H1 phase crosses a half turn, plus a fixed analog delay. It therefore
  follows the NCO to within femtoseconds, as the real DAC and mixer output would.
- Once the receiver has reached the source phase, the divider must never re-align over 30 revolutions.
- Every bunch-clock edge must sit at the same time, to within 5 ps, modulo the bunch period after the
  true revolution start.
- After a power cycle of the receiver at an arbitrary time, that offset must come back the same.

It runs in about 10 s.

### Simulating with Verilator

The package must come first; `-Irtl` lets Verilator find the other modules by name. For example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/llrf_pkg.sv tb/tb_llrf_wr_top.sv \
              --top-module tb_llrf_wr_top -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Replace `tb_llrf_wr_top` with any other testbench name. `+verilator+rand+reset+2` starts all state
at random values. Every register the design reads is reset, so results do not depend on it.

## Parameters worth knowing

| module           | parameter          | default | note                                      |
|------------------|--------------------|---------|-------------------------------------------|
| `fgen`           | `DEPTH`            | 4096    | vectors per ring                          |
| `fgen`           | `FRAC`             | 32      | slope fraction bits                       |
| `rfnco`          | `RESYNC_MAX_STEP`  | 2**24   | phase-ramp speed                          |
| `rfnco`/`lo_nco` | `LO_DIV`/`DIV`     | 5       | fractional LO enable                      |
| `rfnco`          | `IF_PHASE_W`, `IQ_W`, `CORDIC_ITER` | 18, 16, 16 | IF resolution            |
| `frev_upsampler` | `TAP_PS_X8`, `Q`   | 625, 16 | tap 78.125 ps; fraction bits              |
| `bunch_divider`  | `DIV`              | 10      | RF periods per bunch clock                |
| `dpll`           | `AVG_LOG2`, `KP_SH`, `KI_SH` | 10, 21, 26 | loop bandwidth                   |
| `tai_to_fc`      | `CLK_PER_SEC`      | 125e6   | cycles per TAI second                     |

The `fc_val`, `delay_cyc`, `h_rf`, `ftw_lo_*` and IQ set-point inputs are run-time settings, normally
written by software.
