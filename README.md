# WIC strip readout chain and cosmic-ray trigger

The Warm Iron Calorimeter (WIC) of the SLD detector is a stack of iron plates
interleaved with limited-streamer tubes. About 10^5 pick-up strips are read
out digitally: a strip is either hit or not. This RTL models the digital side
of that system as one synchronous design:

* a **front end** in which every strip has a discriminator, a one-shot and
  one bit of a shift register. The shift registers of a whole detector plane
  are daisy-chained, so a plane leaves the detector as one serial line;
* **splitter boards**, each of which serves up to ten planes. A splitter
  board sets their thresholds, issues the load command and joins their
  chains onto one serial link. It also forms a local trigger from the
  planes' fast OR ("Digor") signals;
* **readout modules (WICDRM)**, each of which clocks up to eight splitter
  links in parallel, 32 bits at a time, into buffers that a processor reads;
* the **Cosmic Logic Unit (CLU)**, which combines the 42 splitter triggers
  into a cosmic-ray trigger through programmable lookup tables. Cosmic rays
  can then be recorded between beam crossings for monitoring and
  calibration.

The main idea is economy of wires. The detector needs few cables because
everything is serial and daisy-chained. The readout still runs at 4 Mbit/s
per link, fast enough to read the whole detector twice per beam crossing at
the 180 Hz maximum rate.

## An event, end to end

1. A particle crosses some planes. The discriminators fire (`disc`). Each
   hit strip's one-shot holds its state for `ONESHOT_CYCLES` clocks. In the
   same clock cycle, the OR of the plane's discriminators (the plane Digor)
   reaches its splitter board.
2. The splitter board's trigger logic decides, combinationally, whether
   enough planes were hit (`spl_trig`).
3. The CLU folds the 42 splitter triggers into 32 detector-unit signals,
   then into pre-triggers (octants, endcap sections, top/bottom sums). These
   address eight 4Kx4 lookup RAMs. One clock after the splitter triggers
   change, `cosmic_trig`, the 16 cosmic Level 1 bits and the 16 physics
   Level 1 bits are valid.
4. The Timing and Control Module (TCM, outside this design) sends a LOAD
   command. Every splitter board addressed pulses `fe_load` for one clock.
   Each one-shot's state is copied into its shift-register bit. This must
   happen while the one-shots still hold the hit. With the default 32-clock
   one-shot and a 24-bit command sent one bit per clock, there are about 3
   clocks to spare (see "Timing margins").
5. Each readout module's processor starts a 32-bit cycle. The module sends 32
   shift strobes, one every 4 clocks (4 Mbit/s at the assumed 16 MHz
   clock), to all of its splitter boards. It shifts the returning bits into
   eight 32-bit buffers and raises `flag`. The processor writes once to
   latch the eight words and start the next cycle, then reads the words
   while the next 32 bits shift in.

## The serial chain and its bit order

This is the part to understand before using the data.

* Inside a D779 chip (4 channels) channel 0 is nearest the output. A hybrid
  chains two chips (channels 0-3, then 4-7). A board chains four hybrids.
  A plane chains `BOARDS` boards, with board 0 nearest the splitter board.
  After a load, shift *k* therefore delivers strip *k* of the plane.
* The splitter board joins its planes in series. Plane 0 drives the link,
  and plane *p*'s far end is fed by plane *p+1*. The readout module's test
  pattern enters the far end of the last plane. A splitter's stream is
  therefore plane 0 strips 0..319, then plane 1, and so on. At the default
  size that is 3200 bits, 100 words.
* In the readout module, the first bit of a 32-bit cycle ends in bit 0 of
  the word. So word *w* of splitter *s* holds bits *32w .. 32w+31* of that
  stream. With 320-strip planes, each plane fills exactly 10 words.
* The test pattern is a 32-bit word sent one bit per shift (bit `bit_idx`
  of the word). A full-length readout refills every chain with it. The chain
  length is a multiple of 32, so the next readout without a load returns the
  pattern word in every word of every chain. A stuck or broken chain shows
  up as a plain mismatch.

## Splitter board control (TCM link)

Each splitter board has two identical sets of four lines to the TCM, kept
for redundancy. Three lines come in: `strobe`, `frame` and `data`. One goes
back: `reply`. The strap `link_sel` picks the set the board listens to; the
reply is driven on both sets. While `frame` is high, each clock with
`strobe` high shifts in one bit, MSB first. A frame of exactly 24 bits is a
command. Frames of any other length are dropped. The command executes two
clocks after `frame` falls.

| bits | field | meaning |
|---|---|---|
| 23:20 | addr | board address (0-7 within a translator group); 15 = all boards |
| 19:16 | op | see below |
| 15:12 | sel | plane number |
| 11:0 | value | argument |

| op | name | action |
|---|---|---|
| 0 | NOP | none (used to clock a reply out) |
| 1 | SET_DAC | threshold DAC code of plane `sel` = `value` (12 bits) |
| 2 | SET_EXCL | planes in `value[9:0]` are left out of the hit count |
| 3 | SET_REQ | planes in `value[9:0]` must be hit |
| 4 | SET_MAJ | minimum number of hit planes = `value[3:0]` (0 acts as 1) |
| 5 | LOAD | one-clock `fe_load` to every plane of the board |
| 6 | ADC_SEL | threshold ADC multiplexer to plane `sel` |
| 7 | ADC_READ | capture `adc_value`. It is sent MSB first on `reply`, one bit per strobe, during the first 12 strobes of the next frame |

After reset the DAC codes are 0, no plane is excluded or required, and the
majority is 1. The trigger is
`count(digor & ~excl) >= max(majority,1) && (digor & req) == req`. It is
purely combinational, so it follows the Digors in the same cycle. This
matches the original board's trigger delay of under 50 ns.

## Readout module registers

| addr | access | content |
|---|---|---|
| 0 | write | bit0: latch the input buffers into the holding words; bit1: start a 32-bit cycle. Both are ignored while a cycle runs. |
| 0 | read | bit0 busy, bit1 flag (buffers full), bit2 test-pattern enable |
| 1 | read/write | test pattern word |
| 2 | read/write | bit0 test-pattern enable (otherwise zeros are injected) |
| 8+i | read | holding word of input i |

A readout of *W* words is: write 2; then *W* times: wait for flag, write 3
(or 1 for the last word, so that no extra bits are shifted), read the eight
words. Starting at the clock edge that samples the write, the *k*-th shift
strobe is acted on at edge *4k*, and `flag` is high from edge 128. Because
the processor paces the cycles, a late processor only delays the readout;
no data are lost.

## Cosmic Logic Unit

**Recombination** (`clu_recombiner`, 42 to 32). Boards 0-15 are the 16
barrel coffins. Boards 16-26 form the north endcap and boards 27-37 the
south endcap: board pairs feed sections 0-4 and the eleventh board feeds
section 5. Boards 38-41 are the four 45-degree chambers. Bus signals 0-15
are the coffins (2k inner and 2k+1 outer of octant k), 16-21 the north
sections, 22-27 the south sections and 28-31 the 45-degree chambers. The
whole map is the function `wic_pkg::recomb_row`; change it there.

**Pre-triggers** (`clu_pretrigger`, type `pretrig_t`):
* octant k = inner | outer coffin;
* each endcap has 5 signals, with the middle sections 2 and 3 merged;
* one 45-degree sum per side;
* `btop` = octants 1|2|3 and `bbot` = octants 5|6|7.

**Lookup** (`clu_l1_lookup`). Set 0 (RAMs 0-3) gives the cosmic Level 1
bits and set 1 (RAMs 4-7) the physics bits. RAM r of either set supplies
bits 4r..4r+3 of its set and is addressed, LSB first, by:

| RAM | address bits |
|---|---|
| 0 | outer coffins[7:0], btop, bbot, 45-degree north, south (tight barrel) |
| 1 | octants[7:0], btop, bbot, 45-degree north, south (loose barrel) |
| 2 | north endcap[4:0], south endcap[4:0], btop, bbot |
| 3 | inner coffins[7:0], btop, bbot, 45-degree north, south |

Tables are loaded one word per clock through `dl_we/dl_ram/dl_addr/dl_data`
(`dl_ram` = set*4 + r). They are not reset, just like the static RAMs they
model. `cosmic_trig` is the OR of the cosmic bits enabled in a 16-bit mask,
written through `mask_we` (all enabled after reset). All CLU outputs are
registered.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| strips per D779 / hybrid / board | 4 / 8 / 32 | fixed |
| `BOARDS` (boards per plane) | 10 | `wic_top`, `fe_plane_chain` |
| `N_PLANES` (planes per splitter) | 10 | `wic_top`, `splitter_*` |
| `N_SPLITTERS_USED` | 42 | `wic_top` |
| splitters per readout module | 8 (so 6 modules) | `wic_pkg::SPL_PER_DRM` |
| `SR_DIV` (clocks per shift) | 4 (16 MHz / 4 Mbit/s) | `wic_top`, `wicdrm` |
| `ONESHOT_CYCLES` | 32 (2 µs at 16 MHz) | `wic_top`, `d779` |
| DAC width | 12 bits | `wic_pkg::DAC_BITS` |
| lookup RAMs | 2 sets x 4 of 4096 x 4 | `wic_pkg` |

At the defaults the design has 134,400 channels (42 x 10 x 10 x 32). A
complete readout is 100 words per splitter board. That is 12,800 clocks of
shifting, 800 µs, plus a few clocks of processor handshake per word. This is
well under half of the 5.56 ms between crossings at 180 Hz, so two readouts
per crossing fit.

## Timing margins

The load must arrive while the one-shots are still set. In the testbenches
the CLU trigger is valid one clock after the hit, and a 24-bit LOAD command
at one bit per clock is executed about 28 clocks after the hit. The default
one-shot of 32 clocks leaves little slack. With a slower TCM bit clock,
raise `ONESHOT_CYCLES`. The original chip's one-shot is an analog
monostable, and its width is not specified here.

## What follows the original system, and what is this design's own

Taken from the original system:
* the D779 structure (four discriminators with one-shots, a 4-bit loadable
  shift register with daisy chaining, Digor);
* the packaging: 8-channel hybrids, 32-channel boards, about 10 boards per
  plane, ten planes per splitter board, up to eight splitter boards per
  readout module, 42 splitter boards and six modules;
* per-plane 12-bit thresholds with ADC read-back, unique board addresses,
  and duplicated four-line TCM links;
* exclude / require / minimum-plane trigger logic;
* 4 Mbit/s shifting into eight 32-bit buffers with a full flag and a
  latch-and-restart step;
* far-end test-pattern injection;
* the CLU: recombination of 42 triggers onto 32 signals, the kinds of
  pre-trigger, two sets of 4Kx4 RAMs addressed by 12 pre-triggers, and
  separate cosmic and physics outputs.

Chosen here, because the original leaves them open:
* the TCM protocol, command format and opcodes, and the broadcast address;
* the synchronous one-shot and its width;
* one 16 MHz clock for everything, with the shift clock and the TCM bit
  clock as clock enables;
* the chain order and the concatenation of the planes inside the splitter
  board;
* the readout-module register map;
* the repeated 32-bit test pattern;
* which splitter boards are merged in the CLU, the octant numbering, the
  middle endcap sections, and "sum" read as OR;
* the 12-signal address groups of the four RAMs;
* the registered CLU outputs and the cosmic enable mask;
* the assignment of splitter boards to readout modules and translator
  groups (board i goes to module i/8, group i/8, address i%8). The replies
  of a group are OR-ed.

The installed detector has about 90,000 channels, and a splitter board
typically serves about 3,000. The per-plane and per-board maxima used as defaults give 134,400
channels and 3,200 per board. Splitter boards that serve fewer planes or
boards can be built by lowering `N_PLANES` and `BOARDS`.

## Not modelled

These parts have no logic function, or are designed elsewhere. Their
signals are ports of `wic_top`:
* the preamplifiers and discriminators (`disc` is their digital output);
* the passive threshold divider, the DACs (`dac_code`) and the ADCs
  (`adc_sel`, `adc_value`);
* the 500 mV Digor receivers;
* the fibre-optic translators and the readout module's I/O card;
* the TCM (`tcm_a/tcm_b/reply_*`);
* the MC68020 processor and its data-reduction software (zero suppression,
  mismapping correction, clustering, histogramming), which reach the design
  through `cpu_*` and `drm_flag`;
* the Fastbus interfaces, seen here as the plain download port `dl_*` and
  `mask_*`.

## Files

`rtl/wic_pkg.sv` holds the shared constants, the TCM command type and the
pre-trigger type. The hierarchy is:

```
wic_top
├── fe_plane_chain  (x splitters x planes)
│   └── fe_board ── fe_hybrid ── d779
├── splitter_board  (x splitters)
│   ├── splitter_tcm_rx
│   ├── splitter_config
│   └── splitter_trigger
├── wicdrm          (x 6)
│   ├── drm_shift_ctrl
│   ├── drm_input_buffers
│   └── drm_test_pattern
└── clu
    ├── clu_recombiner
    ├── clu_pretrigger
    └── clu_l1_lookup ── clu_lut_ram (x 8)
```

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.

* `wic_top_tb` runs the whole chain with 2 planes of 1 board per splitter
  board and all 42 boards and 6 modules. It covers configuration,
  threshold read-back over the backup link, table download, six events
  with trigger checks, load, a processor-paced readout checked bit for bit
  (with one late processor per event), and test-pattern integrity runs. It
  counts each mechanism and fails if one never occurred.
* `wic_top_full_tb` runs one event and one complete readout at the default
  size (134,400 channels). It also checks that two readouts fit in a 180 Hz
  interval: one readout measures 13,010 clocks (813 µs at 16 MHz).

To run any of them with Verilator, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --top-module wic_top_tb \
    rtl/wic_pkg.sv $(ls rtl/*.sv | grep -v wic_pkg) tb/wic_top_tb.sv -o sim
./obj_dir/sim
```

The reduced top-level test builds in about a minute and runs in seconds.
The full-size model is large: Verilator needs about 6 minutes on four
cores to build it, and the simulation runs for about one minute.
