# Digital core of a 512-channel self-calibrating retinal stimulator

An epiretinal implant has to drive hundreds of electrodes with biphasic
current pulses whose anodic and cathodic halves carry the same charge. If
they do not, the leftover charge causes electrolysis at the electrode. This
design is the digital half of such an implant chip. It has 512 independent
channels, and their amplitudes are streamed over a wireless link at 20 Mb/s.
Each channel's pulse shape is free: a new 4-bit amplitude is applied every
109.2 µs. Every group of four channels has a small local controller that
calibrates its current sources after power-up, so that the pmos (anodic) and
nmos (cathodic) currents match without a DC-blocking capacitor.

The RTL covers the following parts:
- the frame receiver (global logic)
- the 8 scan chains that carry the amplitudes
- the 128 four-channel local controllers, each made of:
  - a serial interface
  - an arbiter
  - four channel state machines
  - a calibration state machine
  - the calibration registers
- the master/slave data selection

These parts are analog and are **not** included. The RTL connects to them through ports:
- rectifier, DC-DC converters, LDOs and bandgaps
- the PSK demodulator, its PLL and the data slicers
- the current drivers with their 5 V output stages
- the calibration sense resistors and comparator

## Structure

```
epi_prosthesis_top
 ├─ global_logic            frame receiver, CRC, demultiplexer, time-step tick
 └─ stim_array              8 blocks
     └─ stim_block  x8      one 256-bit scan chain = 16 stimulators c15 .. c0
         └─ local_logic x16 one 4-channel stimulator
             ├─ scan_reg        16-bit chain stage + input register
             ├─ ll_arbiter      calibrate / stimulate
             ├─ channel_fsm x4  phase of each channel
             └─ cal_fsm         serial two-step, five-point calibration
```

`epi_pkg` holds the shared constants, the channel state enum, the two control
structs and small functions:
- `cal_region`
- `point_din`
- `crc8_step`, one serial CRC step

Everything runs on a single 20 MHz clock, which is the clock recovered by the data link.
The local controllers have no slow clock of their own. They advance only on `tick`,
a clock enable that fires once per 109.2 µs time step (about 9.2 kHz). This plays the role of the
roughly 10 kHz low-power clock of the local logic.

## The frame and the scan chains

One frame carries one time step for all 512 channels:

```
Header(8) | D0(128) CRC8 | D1(128) CRC8 | ... | D15(128) CRC8      = 2184 bits
```

A column word `Dx` holds the 32 channels of the stimulators in column `cx`,
one in each of the 8 blocks. Bits are sent MSB first. The first 16 bits of `Dx` belong to
block 0, the next 16 to block 1, and so on. Within a stimulator's 16 bits, channel `c`
uses bits `[4c+3:4c]`. At 20 Mb/s a frame lasts exactly 2184 × 50 ns =
109.2 µs, one time step. So the link is fully used, and `TICK_DIV`
defaults to 2184.

The receiver (`global_logic`) works like this:
1. **Hunt.** It slides an 8-bit window over the stream until it matches `HEADER` (`8'hA5`).
2. **Data.** It takes the 128 bits of a column word into a holding register and updates
   the CRC on the fly. The CRC polynomial is x⁸+x²+x+1 (`0x07`), with initial value 0.
3. **CRC.** It compares the 8 received CRC bits.
   - If they match, the word goes to a dispatch register. That register shifts the 8 block
     slices out in parallel, 16 cycles on the 8 `sdata` lines with `shift_en` high.
   - If they do not match, `chain_clr` clears every scan stage, `crc_err` pulses, and a
     `load` follows, so every channel gets amplitude 0. The receiver then goes back to
     hunting. The rest of the bad frame is skipped; a header pattern inside it could start a
     false frame, but that frame's CRCs then reject it.
4. After the 16th good word has been shifted, `load` makes every stimulator copy its
   16-bit stage into its input register, and `frame_ok` pulses.

The 16-cycle shifts always finish before the next word's CRC arrives, so one dispatch
register is enough. The first column sent, D0, travels furthest. After 16 words it sits in
the stimulator at the far end of the chain (`c0`). D15 stays in `c15`, next to the global
logic. `chain_out` is the far end of each chain. It is not needed on the chip but is useful for test.

`tick` follows each `load` by one cycle and then repeats every `TICK_DIV` cycles.
So when no frame arrives, the stimulators keep running on the last data they received:
- a channel in a phase keeps its amplitude;
- a channel at rest stays at rest.

When frames arrive, the tick locks to them.

## Channel phases

Each channel's amplitude sequence is read as a biphasic pulse. Going from one state to the next:

| state | entered on | driver |
|---|---|---|
| rest / discharge | zero after the second phase (or reset) | sources off, electrode shorted to ground |
| phase 1 (anodic) | first non-zero amplitude | pmos source on at `din`, electrode connected |
| interphase | first zero after phase 1 | sources off, electrode floating, protection charge removed |
| phase 2 (cathodic) | first non-zero amplitude after the interphase | nmos source on at `din`, electrode connected |

For example, the sequence
`0, 9, D, E, F, F, 0, F, F, F, 7, 7, 7, 0` plays as follows:
1. an anodic pulse shaped 9-D-E-F-F;
2. one step of interphase;
3. a cathodic pulse shaped F-F-F-7-7-7;
4. the discharge.

Both phases may have any shape and length. Asymmetric pulses, piecewise-constant pulses and
pseudo-exponential pulses therefore all come from the data alone. The
amplitude is registered at the tick, so the driver runs one time step behind
the frame that carried it. Which phase is anodic is fixed in this design: the first one.

`chan_ctrl_t` groups all the signals one analog current driver needs:
- DAC code and source enables
- both calibration codes
- electrode, short and calibration switches
- HV-switch bias and output-stage bias selection
- a protection-charge clear

These signals are an abstraction of the driver. A real driver may need them decoded further.

## Calibration

The four channels of a stimulator share one calibration circuit:
- a high sense resistor RH = 75 kΩ;
- a low sense resistor RL = 15 kΩ;
- a comparator against Vref.

`cal_ctrl_t` selects the resistor and Vref, and the comparator decision comes back on `cmp`.
Each channel has two 5-bit trim DACs with a 1 µA step:
- `caln` is subtracted from the nmos current;
- `calp` is offset-binary, with 16 meaning no correction, and is added to the pmos current.

After reset the arbiter (`ll_arbiter`) starts `cal_fsm`. The calibration FSM takes the channels one after
another, 0 to 3. For each channel it runs two steps.

1. **nmos offset.** Input code 0, nmos source on, RH connected, Vref = −35 mV.
   `caln` sweeps upward from 0, one code per tick. The first code at which
   the comparator reports Vout > Vref is stored. If none does, 31 is stored.
2. **pmos match at five points.** Both sources on, RL connected, Vref = 0. The 15
   non-zero amplitudes form five regions of three codes (1–3, 4–6, … 13–15). Each region is
   calibrated at its middle code (2, 5, 8, 11, 14). `calp` sweeps upward until
   Ipmos − Inmos turns positive, and that code is stored for the region.

While calibrating, the controller does three things:
- it connects the channel under test to the calibration circuit;
- it shorts all electrodes of that stimulator to ground;
- it ignores the stream.

The worst case is 4 × 6 × 32 = 768 ticks, about 84 ms. With typical mismatch a run takes about
370 ticks. All 128 stimulators calibrate in parallel. During stimulation a
channel uses `caln` together with the `calp` of the region its present amplitude falls in.

The `cal_req` input sends all controllers back to calibration at their next tick. The
first calibration after power-up needs no request.

## Master / slave

Two chips can share one link to drive 1024 channels. The demodulator of the master
produces two 20 Mb/s streams:
- the master uses `data1` itself;
- it passes `data2` to `data_to_slave`.

A chip with `slave_mode` high takes its stream from `data_ext` instead. The top does no
other switching. In a slave, the data link and power circuits are off, so its `data1`
and `data2` are unused.

## Choices made here

The following points are not fixed by the source design and were chosen here:
- header value and width;
- CRC polynomial, initial value and bit order;
- the order of blocks within a column word and of channels within a stimulator word;
- that D0 lands in `c0`;
- the dispatch timing;
- the one-step output latency;
- the anodic-first polarity;
- the linear upward calibration sweep and "first code that switches" rule;
- the region bounds and the calibration points;
- the offset-binary `calp`;
- the exact switch settings in each state;
- the `cal_req` input.

The time step is made from the 20 MHz clock: 2184 cycles, or 9.16 kHz. The slow clock is not a
separate 10 kHz source, so the whole design has one clock domain.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog. The
testbenches that involve calibration use `tb/stim_analog_model.sv`. This is a behavioural
model of four current drivers and the shared comparator, with random gain and offset
mismatch. The expected calibration codes are computed from the model's own formulas.

Build and run with plain Verilator 5. For example, for the full chip:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/epi_pkg.sv tb/epi_prosthesis_top_tb.sv --top-module epi_prosthesis_top_tb
./obj_dir/Vepi_prosthesis_top_tb
```

`epi_prosthesis_top_tb` runs the whole chip at its real size with no parameters overridden:
8 × 16 stimulators, 512 channels and 2184-bit frames. It drives 128 analog models. The build takes
about two minutes and the run about 25 s. The test covers:
- the power-up calibration of every stimulator;
- 30 good frames of random pulses;
- a frame corrupted in its last column;
- a gap with no frames;
- nine more frames;
- 16 frames in slave mode;
- a requested re-calibration.

It counts every mechanism and fails if one never happens: frame loads, CRC errors, re-synchronisation,
free-running ticks, slave-mode frames, each phase, each calibration region and both
calibrations. It also checks that the anodic and cathodic currents of every channel stay within
2.5 µA of each other after calibration.

Other testbenches:
- `global_logic_tb` runs the receiver at full size against an independent chain model and CRC.
  It checks the placement of every word, the 2184-cycle frame period, the tick, error handling and
  resynchronisation.
- `stim_block_tb` covers one block of 16 stimulators.
- `stim_array_tb` covers a reduced array of 3 × 4.
- `local_logic_tb`, `cal_fsm_tb`, `channel_fsm_tb`, `scan_reg_tb` and `ll_arbiter_tb` cover the
  pieces of one controller.

## Limits

- The analog behaviour is modelled only as far as the testbenches need it. Matching quality in
  silicon depends on the comparator and the trim-DAC step, which this RTL does not set.
- Frame alignment relies only on the header and the CRCs. A header pattern in idle data can
  start a false frame, which the CRCs must then reject; a false frame that passes all 16 CRCs
  would be loaded.
- The controller has no retention of calibration values across power cycles. The calibration
  is simply run again at power-up.
