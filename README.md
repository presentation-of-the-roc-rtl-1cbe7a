# ROC chips readout: power-pulsed daisy-chain readout and autonomous selective readout

Calorimeters planned for the ILC put tens of thousands of front-end chips
inside the detector, where every cable and every microwatt counts. The
accelerator delivers a 1 ms bunch train every 200 ms, so the chips can
acquire during the train, digitise and send their data in the gap, and spend
the rest of the cycle with their digital part switched off. Two ideas make
that possible and are the core of this RTL:

* **Daisy-chained readout on two shared lines.** All chips of a chain share
  one `Data` line and one `TransmitOn` line to the DAQ. A token runs along
  the chain: a chip that has sent its data gives an `EndReadout` pulse, which
  is the `StartReadout` of the next chip. At any time only one chip talks.
* **Power On Digital (POD).** A small module in each chip starts and stops
  the chip's clocks and switches the bias of its LVDS clock receivers, so
  that a chip is powered during the common acquisition and conversion
  phases (under DAQ control) and, during readout, only while it holds the
  token. The target is about 8 ms of power-on in each 200 ms cycle (4 %).

Beside the ILC chips the RTL contains a third design, an autonomous chip for
neutrino experiments (PARISROC-style) that never stops acquiring: each
channel stores its own hits, and an on-chip state machine converts and sends
only the channels that were hit, tagging every frame with its channel number.

## The ILC cycle

| Phase       | Budget | Who powers the chip            | What the RTL does |
|-------------|--------|--------------------------------|-------------------|
| Acquisition | 1 ms   | DAQ (`pwr_on`)                 | BCID counter runs; every clock with a discriminator hit is stored |
| Conversion  | 3 ms   | DAQ (`pwr_on`)                 | analog chips only: each stored SCA column is converted by 64 ADCs in parallel, 32 columns worst case |
| Readout     | 4 ms   | the readout token              | chips send their frames one after the other at 5 MHz |

The DAQ sequence for one chain is:

1. raise `pwr_on` while holding `rst_n` low; the receivers are biased at
   once; keep reset for longer than the receiver wake-up (a 300 ns reset is
   used in the benches, the receiver model wakes in 150 ns);
2. release `rst_n`, hold `acq_on` for the bunch train;
3. drop `acq_on`; an analog chip starts converting and raises `conv_done`
   when finished (a digital chip has nothing to convert);
4. drop `pwr_on`; every chip stops its acquisition clock and unbiases its
   receivers within three clock ticks;
5. pulse `start_ro` into the first chip and wait for `end_ro` from the last.

## Power On Digital (`pod`)

This is the part that needs the most care, because it controls the very
clocks it runs on. It has three parts and eight flip-flops.

**DAQ part (`pod_daq`).** `pwr_on` asynchronously sets a two-stage
synchronizer. Its output biases the receivers immediately, and as soon as
the receiver delivers a clock the gate (`clock_gate`) lets it through. When
`pwr_on` falls, zeros are shifted in *by the clock itself*: the enable falls
two rising edges later and the gate closes at the next falling edge. The
receivers lose their bias at the same moment.

**Readout part (`pod_readout`).** The `StartReadout` pulse asynchronously
sets a request flip-flop (the chip's clock is off at that time, so nothing
else could catch it). The flip-flop has a single asynchronous load, active
on reset or on the token, that loads `rst_n`, so reset wins. The request biases the receivers; once the 5 MHz
clock arrives, a synchronizer carries the request into the clock domain,
opens the readout clock gate and, through an edge detector, makes a
one-cycle internal `StartReadout` that the first gated clock edge sees. At
the end of readout the chip's own `EndReadout` clears the request
synchronously and the gate closes two to three ticks later.

**LVDS management.** The receivers' bias enable is the OR of the two
requests.

```
            ___________________________________
pwr_on  ___|                                   |______________________
lvds_en ___|                                   ......|_________________   (released 2 ticks after pwr_on)
clk     ___ (wake-up) |‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_|______________________
gclk    ______________|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|__________________________   (idle low)
```

The gate samples its enable on the falling edge and ANDs it with the clock,
so a gated clock can only start or stop while the clock is low: no
shortened pulse ever reaches the chip logic, and the gated clock rests at 0.

Two points to keep in mind when changing it:

* the asynchronous reset of the readout request and of the logic is
  edge-triggered in simulation; drive `rst_n` high then low at start-up;
* `end_ro` is used both as the next chip's asynchronous set and as this
  chip's synchronous clear; it is a registered one-cycle pulse so it cannot
  glitch.

## Daisy-chained readout (`readout_ctrl`, `roc_chain`)

Woken by the internal `StartReadout`, a chip reads its RAM frame by frame
and sends each one most significant bit first, one bit per readout clock,
with `TransmitOn` high while it drives `Data`. The DAQ samples on the
falling edge of the readout clock. A frame is

```
ILC digital chip :  chip_id[7:0] | BCID[15:0] | hits[63:0]                       (88 bits)
ILC analog chip  :  chip_id[7:0] | BCID[15:0] | hits[63:0] | code[ch63..ch0][11:0] (856 bits)
```

with channel *ch*'s code at bits `[ch*12 +: 12]` of the code field.
`TransmitOn` drops for three clocks between frames (end of frame and the
two-cycle RAM read). A chip with no data passes the token on at once. Each
frame costs `frame bits + 3` readout clocks. The shared lines are
open-collector in silicon; `roc_chain` models them as a wired OR and asserts
that at most one chip drives `TransmitOn`.

## Analog and digital ILC chips (`roc_chip`)

One parameterised chip covers both kinds, selected by `ANALOG`:

* **Digital (`ANALOG=0`, HARDROC-like)**: each event goes straight into RAM
  as BCID plus hit pattern.
* **Analog (`ANALOG=1`, SKIROC/SPIROC-like)**: each event also starts the
  track and hold of the next column of the switched capacitor array (`sca`).
  The cells follow the shaped signal and keep its peak; the column is held
  `HOLD_DELAY` (4) clocks after the trigger, and triggers in between are
  ignored. After the train, `conv_ctrl` selects each column, starts one ADC
  per channel and writes the codes into a second RAM at the column's
  address.

In both kinds the memory holds 32 events; further events in the same train
are dropped.

## Autonomous selective readout (`parisroc`)

Each channel (`prc_channel`) has two SCA cells of its own. A rising edge on
its discriminator output, when a cell is free and no hold is in progress,
stores the coarse time stamp and tracks and holds the signal in the next
cell; otherwise the hit is counted in `n_lost`. The sequencer
(`prc_sequencer`) picks channels with a held cell in round-robin order,
routes the cell to the single ADC, converts it, sends
`channel[3:0] | time stamp[23:0] | code[9:0]` on `Data` with `TransmitOn`,
frees the cell and looks again. Acquisition never pauses: hits that come
during a conversion or a readout are stacked in the cells.

## Module map

```
roc_top
├── roc_chain (digital, ANALOG=0) ─┐
├── roc_chain (analog,  ANALOG=1) ─┴── roc_chip × N_CHIPS
│                                        ├── lvds_rx × 2   (40 MHz, 5 MHz receivers, model)
│                                        ├── pod ── pod_daq, pod_readout ── clock_gate
│                                        ├── acq_ctrl
│                                        ├── ram (header: BCID + hits)
│                                        ├── sca, adc × N_CH, conv_ctrl, ram (codes)   [analog only]
│                                        └── readout_ctrl
└── parisroc ── prc_channel × N_CH (+ sca each), adc, prc_sequencer
roc_pkg: shared constants, phase and readout-state enums
```

## Parameters

| Parameter | Default | Origin |
|-----------|---------|--------|
| channels per ILC chip `N_CH` | 64 | published ("up to 64") |
| events per train `DEPTH` | 32 | published worst case of 32 conversions |
| acquisition clock | 40 MHz | published maximum POD frequency |
| readout clock | 5 MHz | published |
| POD release | 2–3 ticks | published |
| POD flip-flops | 8 | published |
| ADC conversion `CONV_CYCLES` | 3744 cycles | chosen so 32 conversions take 3.000 ms |
| ADC resolution | 12 bits over 2048 mV | own choice |
| BCID width | 16 bits | own choice (40,000 clocks per 1 ms train) |
| chip identifier | 8 bits | own choice |
| chips per chain `N_CHIPS` | 4 | own choice |
| receiver wake-up | 150 ns | own choice, below the 200 ns reset |
| hold delay | 4 clocks | own choice |
| autonomous chip | 16 channels, 2 cells each, 24-bit time stamp, 10-bit ADC of 1024 cycles | own choice |

## Synthesizable logic and models

`lvds_rx`, `sca` and `adc` are behavioural models of analog or mixed-signal
parts (delays, peak tracking, an ideal quantiser); they exist so the digital
logic can be simulated end to end and are to be replaced by the real
macros. Everything else is synthesizable. The analog front end
(preamplifier, shaper, discriminator) is not modelled: its outputs are the
`trig` and `vin` ports. Fine time measurement, which some chips offer, is
not described in enough detail to build and is absent.

## Where the design is open or departs

* **Analog readout time.** With every channel's 12-bit code in every frame,
  a full analog chip needs 32 × 859 clocks = 5.5 ms at 5 MHz, more than
  the 4 ms readout budget (23 full frames fit). A digital chip needs
  0.58 ms. A sparser analog frame (only hit channels) would fix this; the
  frame format is this design's choice, not a published one.
* **Power budget.** Whether a chip stays within 8 ms per cycle depends on how
  long the DAQ holds `pwr_on`; the digital chip needs about 1.6 ms, an
  analog chip with a full memory about 9.5 ms with the frame format above.
* Frame formats, event definition (any hit in a clock), the BCID counter,
  dropping events when the memory is full, the round-robin ADC sharing of
  the autonomous chip and all widths not listed as published are choices
  made here.
* The end of conversion is reported on `conv_done`; how the DAQ learns it in
  the real chips is not specified.
* `acq_on` is taken as synchronous to the acquisition clock.
* Lint reports `SYNCASYNCNET` on `end_ro_out` (asynchronous set in the next
  chip, synchronous clear in this one, by design) and `BLKSEQ` in the SCA
  model; both are intended.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/roc_pkg.sv \
          tb/tb_roc_top.sv tb/roc_top_bench.sv --top-module tb_roc_top -o sim
./obj_dir/sim
```

Replace `tb_roc_top` by any other `tb_<block>` (only the top benches need
`tb/roc_top_bench.sv`). The benches:

* `tb_roc_top`: whole design at reduced size (3 chips per chain,
  8 channels, 4-frame memories); checks every frame bit-exactly, the
  conversion time (columns × (ADC cycles + 6)) and the chain readout time
  (frames × (frame bits + 3) readout clocks plus under 2 us of wake-up per
  chip); counts power-up, power-down, memory full,
  empty chip passing the token, token handover, conversion, track and hold,
  stacking and loss in the autonomous chip, and fails if any never happened;
* `tb_roc_top_full`: the same full cycle with every default (4 chips,
  64 channels, 32 frames, 3744-cycle conversions), about 11 ms of
  simulated time, which Verilator builds and runs in under a minute. It
  measures the conversion of 32 columns at 3000.0 us (budget 3 ms), the
  digital chain's readout of 40 frames at 0.73 ms (budget 4 ms) and the
  analog chain's at 6.9 ms;
* block benches for `pod`, `clock_gate`, `lvds_rx`, `sca`, `adc`, `ram`,
  `acq_ctrl`, `conv_ctrl`, `readout_ctrl`, `roc_chip`, `roc_chain` and
  `parisroc`, each with reference models written independently of the RTL
  (bit-exact frames, BCIDs, codes, cycle counts of conversion and readout,
  POD release in 1–3 ticks).
