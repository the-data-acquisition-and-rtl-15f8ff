# CIP2000 z-vertex trigger: trigger, readout and control logic in SystemVerilog

The CIP2000 trigger decides, within one bunch crossing of the HERA collider
(96 ns), whether an event came from the interaction region or from beam
background. It does this by finding where along the beam axis (z) the
charged tracks of the event come from. Each straight track that crosses the
five cylindrical layers of a pad chamber points back to a z position. Every
candidate track is entered into a 15-bin histogram of that z position (the
z-vertex histogram). A peak in the central bins means a real collision. A
flat histogram, or one piled up at one end, means background.

The chamber has 16 sectors in φ. Each layer of a sector has 120 pads along z,
so one bunch crossing gives 16 × 5 × 120 = 9600 bits. The geometry is
projective: pad size grows with radius. Because of that, a track from a given
z bin hits the same *relative* pad numbers in the five layers wherever it
starts along z. Track finding therefore reduces to sliding one small table of
bit patterns along each sector, which is a perfect fit for wide parallel FPGA
logic.

This repository contains the synthesizable RTL for the digital parts of the
system:

- the trigger path, from the multiplexed chamber lines to the main histogram;
- the pipelines and readout registers that keep the chamber data for the readout CPUs;
- the VME slave controllers of the cards;
- the control cards;
- the three cards of the Subsystem Trigger Controller (STC), which drive the H1 trigger sequence;
- the two lossless data-reduction encoders planned for the readout.

Everything runs on one 41.6 MHz clock, four times the bunch-crossing rate.

## 1. Track finding and the histogram

### Local environment and track patterns (`track_finder`)

The five layers are numbered 0 to 4 from the inside out. Layer 2, the middle
one, holds the *central pads*. For every central pad `c` and every z bin `b`
(0 to 14), the finder asks one question: does the track from bin `b` through
pad `c` have a hit in every layer? A track from bin `b` crosses layer `l` at
pad

    c + OFFSET(l, b),   OFFSET(l, b) = ((l - 2) * (b - 7)) / 2   (integer division toward zero)

So bin 7 is a track perpendicular to the beam, with the same pad number in all
layers. The outer bins lean by up to ±7 pads in layers 0 and 4, which is why
the local environment is 15 pads wide. The finder's answers form the *hit
list*: 60 central pads × 15 bins = 900 bits per FPGA. Pads that would lie
beyond the end of the chamber count as empty. By default all five layers must
match (`MIN_LAYERS = 5`). Lowering that parameter gives a majority
coincidence.

The patterns are generated by a formula inside `generate` loops. Nothing is
stored in a table, and each hit bit is a 5-input AND of fixed pattern bits.

### Summing (`local_histogram`, `trigger_card`, `presum_card`, `mainsum_card`)

| stage | where | numbers | width |
|---|---|---|---|
| local histogram | each FPGA, 60 central pads | 15 × 0..60 | 6 bit |
| sector histogram | FPGA 0 adds FPGA 1's local histogram | 15 × 0..120 | 7 bit |
| half-chamber histogram | pre-sum card, 8 sectors | 15 × 0..960 | 10 bit |
| main histogram | main-sum card, 2 halves | 15 × 0..1920 | 11 bit |

Each trigger card sends its sector histogram of 105 bits over a 32-bit link.
The link is four times multiplexed: frame word `k = frame[32k +: 32]` goes in
phase `k` of the bunch crossing after the histogram was captured. The
pre-sum card demultiplexes its eight links and adds them. The main-sum card
adds the two 150-bit results.

### Timing

A 2-bit phase counter runs through 0..3 once per bunch crossing and is shared
by all cards. The chamber pads arrive four times multiplexed: line
`15*chip + j` carries pad `4j + phase` of CIPiX chip `chip = 2*layer + half`.
Counted from the phase-3 sample of a crossing:

- the 600-bit sector pattern is registered after 1 cycle;
- the hit list after 2 cycles;
- the local histogram after 3 cycles;
- the sector histogram is then captured into the link at the next phase 3;
- the main histogram is valid (`main_valid_o`) in phase 2 of the third bunch crossing after the one whose pads it counts.

The whole pipeline accepts a new crossing every 96 ns. Nothing stalls.

## 2. Pipelines and readout (`event_pipeline`, `trigger_fpga`)

H1's first-level trigger decides 2.3 µs after a crossing, which is 24 bunch
crossings (`LATENCY = 24`). Until then every subsystem must keep its data. Each
trigger FPGA writes its 300 pad bits (5 chips × 60 pads) into a 32-deep
circular buffer every crossing while *Pipeline Enable* (PEn) is high.

- **Falling PEn = L1 Keep.** Writing stops. The triggered crossing is the
  entry `LATENCY` places behind the next write slot. A window of 1 to 5
  crossings centred on it (default 5) is copied, one crossing per clock, into
  a separate readout register. The pipeline can therefore restart while the
  CPU still reads.
- **Rising PEn** restarts writing. If the CPU has not yet released the readout
  register, the FPGA goes to the REJECT state. In that state the mode register
  tells the CPU that the event was rejected by the second-level trigger.

The FPGA's states are IDLE (pipeline disabled), RUN, COPY, VALID and REJECT.
Writing the *release* bit of the remote register returns VALID or REJECT to
RUN.

Readout layout: every crossing is 10 D32 words. Words `2c` and `2c+1` hold
chip (layer) `c`: pads 0–29 and 30–59 are in bits 29:0. Bit 30 is even parity
over those 30 bits, and bit 31 is 0. One event of a crate is therefore 8 FPGAs
× 10 words = 320 bytes.

### VME map of a trigger card (A24, D32)

| address | contents |
|---|---|
| `A23..A16` | card base (rotary switches); in the top: `0x20 + k` for trigger card k of a crate, `0x30 + j` for control card j |
| `A15=1`, word 0 | card control register (read/write, `ctrl_o`) |
| `A15=1`, word 1 | status: FPGA 0 state [2:0], FPGA 1 state [6:4] |
| `A15=0, A14=f, A13=0`, word w | readout register word `w = 10*event + word` of FPGA f |
| `A15=0, A14=f, A13=1`, word 0 | mode register: state [2:0], events held [6:4], windows copied [31:16] |
| `A15=0, A14=f, A13=1`, word 1 | remote register: run [0], release [1] (write 1), window size [6:4] |

Block transfers (AM `0x3B`/`0x3F`) keep AS\* low and advance the address by 4
for every data strobe, so one event is a 10-word block. The slave
(`vme_slave`) synchronises the strobes with two flip-flops. It answers a
strobe a few clocks after seeing it and releases DTACK\* when the strobe goes
high.

## 3. Control cards (`control_card`)

There are two per crate, and each serves two sectors. A control card:

- samples PEn from the STC at phase 0, delays it by 0–15 clocks, and drives it to its trigger cards;
- passes Global Reset;
- drives the HERA clock (high in phases 0–1) to each of the five chamber layers with its own 0–15 cycle delay;
- records in a phase register (`{seen, phase}` per layer, corrected for the synchroniser) the phase in which each layer's returned clock rose;
- raises `cosmic_o` for a sector when every layer reports at least one active pad.

Registers, at `A4..A2`:

| register | contents |
|---|---|
| 0–4 | layer clock delays |
| 5 | PEn delay |
| 6 | phase register, read only, layer l in bits `[4l +: 3]` |

## 4. Subsystem Trigger Controller

### Fast card (`stc_fast_card`): the trigger sequence

The fast card takes the central trigger's signals:

- PEn
- L1 Active
- L1 Keep
- L2 Keep
- Fast Clear
- First Bunch
- Filled Bunch
- Run

In **mode 0/1** it passes them on. In **modes 2–4** it makes the sequence
itself:

1. **L1 Keep** comes from the central trigger in mode 2. In modes 3 and 4 it
   comes from three local flip-flops: detector trigger 0, detector trigger 1
   (scaled down) and a test trigger. These can set only while L1 Active and
   Run are high, and, if selected, during a Filled Bunch. L1 Keep drops PEn
   and L1 Active.
2. A programmable number of crossings later, default 10, the card samples the
   L2 decider input or a forced decision.
3. **L2 Reject** leads straight to the restart.
4. **L2 Keep** raises L2 Keep and drops Front End Ready (FER). FER comes back
   from the card's own timer (16-bit delay), or from an external level: the
   inward AND of the fanout cards.
5. **Restart.** Fast Clear is sent for one crossing. It clears L1 Keep and
   L2 Keep. PEn rises 1 crossing after Fast Clear, and L1 Active rises 145
   crossings after Fast Clear (`L1ATV_DELAY`).

Each false→true change of FER gives a one-crossing pulse, which clears the
local L1 flip-flops. Mode 4 also selects the card's own oscillator
(`clk_local_o`). Scalers:

- an 8-bit bunch number;
- a 32-bit revolution count;
- a 40-bit count of all crossings;
- a 40-bit count of crossings with L1 Active.

### Slow card (`stc_slow_card`)

The slow card has eight interrupt flip-flops. Each is set by the central
trigger or by a register write. A ninth input is the fast card's L2 Keep. All
nine are masked and routed by a parameter `ROUTE`, which stands for the
card's wire-wrap field, to three 8-input priority encoders on VME IRQ levels
3, 4 and 5. In the acknowledge cycle the card places the vector
`{base[4:0], input}` and clears that flip-flop. The card also has two gated
32-bit scalers (L1 Keep, L2 Keep) and four information bits.

### Fanout card (`stc_fanout_card`)

Six outward signals are each enabled and delayed by 0–15 cycles, then fanned
out to five ports and NIM outputs. PEn gets two extra features:

- **afterrun:** a programmable extra number of clocks before PEn's
  true→false edge;
- **artificial PEn:** a pulse lasting a programmable number of crossings,
  started by NIM or by a register write, and aligned to the crossing.

The card also has these outputs:

- **gated clock:** the HERA clock AND PEn;
- **inward AND:** a masked AND of the ten inward signals, chained through
  `and_i` over several cards.

In the top, the inward AND is the subsystem's FER.

## 5. Data reduction (`rle_encoder`, `zero_suppress_encoder`)

The pad data read out for 3 or 5 crossings is 3.5 or 5.9 kbyte, and the
readout aims at 1–2 kbyte. Two lossless codes are provided:

- **Run length**, `rle_encoder`. The output alternates a W0-bit count of 0s
  and a W1-bit count of 1s, starting with 0s. A run longer than its field is
  split by a zero count of the other value. The default (W0, W1) = (6, 2)
  suits sparse patterns, and (8, 8) and (5, 3) are the other variants. The
  input is one bit per cycle with valid/ready. `bits_o` gives the encoded
  size.
- **Zero suppression**, `zero_suppress_encoder`. For a block of 2^N bits
  (default N = 8) it gives the N-bit position of every 1, one per cycle, and
  the count. Encoded size = (N+1) + N·count.

Where these encoders sit in the readout path is not fixed. In the top they
stand beside the rest, with their own ports.

## 6. The top (`cip2000_system`)

The top contains:

- 16 trigger cards in four crates, each crate with one VME bus brought out as ports;
- 8 control cards;
- 2 pre-sum cards and the main-sum card;
- the STC fast, slow and two fanout cards;
- the two encoders.

The STC registers sit on a simple register bus (`stc_sel_i`: 0 fast, 1 slow,
2/3 fanout 0/1). The CPU boards, the crate interconnect, the central trigger
and the chamber front end are outside, and their signals are ports.

## 7. Where this design makes its own choices

The design description gives the structure, the counts, the widths and the
timing figures: 41.6 MHz, 145 crossings, 3–5 event windows, 10-word events,
and the 6/7/10/11-bit histograms. The following are choices made here. Check
them before relying on the design.

- **Track patterns:** the `OFFSET` formula and the five-of-five coincidence.
  The real patterns depend on the chamber's pad geometry.
- **Chamber lines:** the assignment of pads to lines and multiplex phases.
- **Histogram link:** the word order of the link frame.
- **Pipeline:** a depth of 32, and 24 crossings of latency.
- **Register layouts:** all register bit layouts and VME sub-addresses, and the trigger FPGA's states.
- **Readout parity:** the parity bit in the readout words.
- **Fast card timing:** the L2 sense delay (default 10 crossings), and FER dropping one crossing after L2 Keep.
- **L1 Active timing:** counted from Fast Clear. A second statement counts it from PEn, which comes one crossing later.
- **Slow card:** the interrupt vector format, and release on acknowledge.
- **Fanout card:** fanout "clock phases" are taken as 41.6 MHz cycles.

Not built:

- the 16-bit trigger elements made from the main histogram, whose definition was left open;
- the fanout card's connection test;
- the block-transfer daisy chain across cards, and BERR\*;
- the VME registers of the sum cards;
- the analog and link parts: the CIPiX front end, optical links, LVDS drivers, EEPROM/JTAG, and the I²C controller.

## 8. Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_trigger_card \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cip_pkg.sv tb/tb_trigger_card.sv
    obj_dir/Vtb_trigger_card

| testbench | what it checks |
|---|---|
| `tb_chamber_demux` | pad/line/phase mapping, one-cycle latency |
| `tb_track_finder` | hit list against a software pattern model, random and single tracks |
| `tb_local_histogram` | bin counts of random hit lists, one-cycle latency |
| `tb_hist_link` | transmitter and receiver, frame order and latency |
| `tb_event_pipeline` | window position and sizes 1/3/5, word layout and parity, copy time, no writes while PEn is low or disabled |
| `tb_trigger_fpga` | histogram path, states, mode/remote registers, REJECT |
| `tb_trigger_card` | histogram sum, link, VME single and block reads of events |
| `tb_presum_card`, `tb_mainsum_card` | sums over random histograms, widths |
| `tb_vme_slave` | decode, modifiers, D32, DTACK handshake, block mode |
| `tb_control_card` | PEn synchronisation and delay, layer clock delays, phase register, cosmic |
| `tb_stc_fast_card` | pass-through (modes 0, 1), the L2 reject and keep sequences with their crossing counts (modes 2, 3), internal and external FER, down-scaler, test trigger, oscillator select (mode 4), scalers |
| `tb_stc_slow_card` | interrupts, priority, vector, release, scalers |
| `tb_stc_fanout_card` | delays, afterrun length, artificial PEn, gated clock, inward AND |
| `tb_rle_encoder` | worked example, random patterns decoded back, overflow splitting |
| `tb_zero_suppress_encoder` | worked example, random blocks: positions in order, count, size, one clock per position |
| `tb_cip2000_system` | whole system at default size (see below) |

`tb_cip2000_system` runs the full-size top with all parameters at their
defaults for about 1900 bunch crossings. It takes about a minute including the
build. It checks the following against a software model:

- every main histogram;
- L1 Keep / L2 Reject / L2 Keep cycles driven by the fast card in modes 0 and 2;
- PEn and L1 Active timing after Fast Clear;
- VME block reads of the triggered window;
- the REJECT state and its release;
- FER restart and interrupts;
- cosmic flags;
- artificial PEn and gated clock;
- layer clock delays and the phase register;
- encoder overflow;
- scalers.

It counts how often each of these 21 mechanisms happened and fails if any
never did.

## 9. How far to trust it

All blocks pass their testbenches. Each testbench has also been shown to fail
on a deliberately broken copy of its module. The histogram path is
bit-exact against an independent model, and so are the readout and the STC
sequence counts. No part has been compared with the real hardware, though.
The track patterns and everything listed in section 7 are stand-ins. Yosys
synthesises a single trigger FPGA to about 7,300 generic cells, most of them
in the track finder. The full top holds 32 such FPGAs and needs much longer;
it has been elaborated by Verilator and slang but not yet taken through
synthesis.
