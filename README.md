# CMX: merger module for the ATLAS Level-1 calorimeter trigger

The CMX sits in one of the processor crates of the calorimeter trigger and
takes the place of the Common Merger Module (CMM). In each bunch crossing (BC,
25 ns) up to 16 processor modules send it their results over the crate
backplane. The CMX merges these into hit multiplicities for the Central
Trigger Processor (CTP), as the CMM did. It can also send the full backplane
data, or a zero-suppressed list of Regions of Interest (RoIs), over optical
links to a future Topological Processor (TP). On every Level-1 Accept (L1A) it
reads out its inputs and results on two readout links.

This repository has synthesizable SystemVerilog for the logic of the CMX
processing FPGA. The top module is `cmx_top`. It merges hit multiplicities
and, in the upgrade modes, decodes the RoI formats of both the e/tau cluster
processor modules (CPM) and the jet/energy modules (JEM). Transceivers, clock managers, input delays,
optics and the TTC decoder are outside the FPGA logic, so their signals are
ports of the top.

The top has four clock groups:

| clock | frequency | use |
|---|---|---|
| `clk40` | 40.08 MHz | the bunch clock, for everything except reception and readout links |
| `clk80` | twice `clk40`, edge-aligned with it | the CTP output |
| `clk80_rec[i]` | 80 MHz | recovered from processor *i*'s clock line, for its 160 Mb/s receiver |
| `clk_gl` and `clk120` | 40.00 MHz and three times that | the readout links |

## Operating modes

A VME-- control register selects one of four modes (`cmx_mode_e` in
`cmx_pkg`):

| mode | backplane | multiplicities for the CTP | optical links |
|---|---|---|---|
| CMM emulation | 40 Mb/s, 24 bits + odd parity | the 24 received bits | off |
| test | 160 Mb/s DDR, 96 bits per BC | first 24 of the 96 bits | 12 links of raw data |
| upgrade | 160 Mb/s DDR, CPM or JEM RoI format | counted from the RoI threshold bits | raw (12 links) or RoI list (6 links) |
| standalone | as upgrade | as upgrade | as upgrade |

In every mode the module can merge at two levels. A *crate* module drives its
crate sum onto LVDS cable port 1. A *system* module adds its own crate sum to
the sums arriving on up to three cables and drives the CTP. Ports 1 and 2 can
be inputs or outputs; port 3 is input only. The standalone mode would differ
from the upgrade mode only in the topological algorithms. No algorithm is
specified, so none is built.

## Backplane reception

This is the most delicate part of the design.

**40 Mb/s (`bp_rx40`).** Each module sends 25 lines per BC: 24 data bits and
an odd-parity bit. The receiver registers them on the BC clock and flags
parity errors. It counts the errors in a saturating 16-bit counter. Data with
a parity error are still passed on.

**160 Mb/s (`clk_parity_dec`, `bp_rx160`).** The same 24 data lines carry
double data rate (DDR) data on an 80 MHz clock, so each BC delivers four
24-bit words (96 bits). The 25th line carries the forwarded 80 MHz clock. It
rises once per BC at the BC start, and its duty cycle encodes the parity of
the BC's 96 bits:

- For parity 1 the line stays high past the middle of the BC.
- For parity 0 it falls before the middle of the BC.

Each processor's line feeds a clock manager outside this logic. Inside,
`clk_parity_dec` samples the line on the rising edges of the recovered 80 MHz
clock:

- At the BC-start edge the line must be high.
- At the mid-BC edge, its level is the parity bit.

If the decoder finds the line low at what it takes for a BC start, its phase
is wrong. It then shifts by one 80 MHz cycle and reports a realignment. The
BC that is being assembled during that shift is lost, and is counted.

`bp_rx160` captures the DDR lines on both edges of the recovered clock. The
falling-edge capture goes into a separate register, and everything is moved
onto rising edges at once. The word order is:

| bits | captured at |
|---|---|
| 95:72 | the rising edge that opens the BC |
| 71:48 | the falling edge after it |
| 47:24 | the mid-BC rising edge |
| 23:0 | the falling edge after that |

The word of BC n, with its parity check, is ready at the start of BC n+1.

**Crossing into the BC clock.** `cmx_top` takes each assembled word into the
40 MHz domain with a plain register. This assumes that every recovered clock
has been brought into phase with the BC clock by the input delay adjustment,
which is a software delay scan on the real module. If your clocks are not
related in this way, put a small FIFO there.

## Multiplicity merging (`hit_sum`, `lvds_cable_port`)

The 24 bits are read as eight thresholds with a 3-bit multiplicity each.
`hit_sum` adds them per threshold over its inputs and saturates at 7. It
flags each threshold that saturated. One instance adds the 16 modules into
the crate sum. A second instance adds the crate sum and the three cable
inputs into the system sum. Masked modules and cables that drive are left
out of the sums.

Each `lvds_cable_port` sends or receives 24 bits plus odd parity at 40 MHz,
and counts received parity errors. The parameter `CAN_DRIVE = 0` builds
input-only port 3.

In the upgrade modes, `cpm_roi_decoder` unpacks each module's 96-bit word:

- 16 presence bits, one per half-position P1L..P8R;
- for up to five RoIs, an 8-bit threshold field and an energy field.

The energy field is 8 bits of ET, or 6 bits of ET plus 2 bits of fine
position, as the `cpm_fmt` register bit selects. RoI k belongs to the k-th
set presence bit, counted from P1L. More than five set bits are flagged as an
error. `roi_multiplicity` counts, per threshold, the RoIs that passed it.
This gives at most 5 per module, not 7, so these multiplicities can differ
from those of the 40 Mb/s mode.

A control bit switches to the jet format, decoded by `jem_roi_decoder`:

- 8 presence bits P1..P8;
- four 2-bit fine positions;
- for up to four RoIs, an 8-bit threshold field and a 12-bit jet ET.

The four ET fields, 48 bits in all, fill the upper 16 bits of the second,
third and fourth 24-bit words, in RoI order. The jet RoIs take the first four
of the five RoI positions in the paths after the decoders.

## Data to the Topological Processor

**RoI list (`roi_list_builder`).** The list builder scans the 16 modules in
order, and for each module its five RoIs in order. It keeps every RoI that
passed at least one threshold, as one 32-bit word:

| bits | field |
|---|---|
| 31 | error / overflow |
| 30 | 0 |
| 29:26 | module |
| 25:22 | position |
| 21:20 | fine position |
| 19:12 | threshold bits |
| 11:0 | ET (8 bits for e/tau, 12 for jets) |

The list has 24 slots, which fill six links with four words each. RoIs beyond
24 are dropped, and bit 31 of the last word is set. The error bit of a
module's words is set on a parity error or an excess of presence bits.

**Link mapping (`tp_link_mapper`).** Raw mode cuts the 16 × 96 = 1536 bits of
a BC into 12 payloads of 128 bits. Module 0 is in the low bits of link 0.
Processed mode puts the RoI list on links 0 to 5 and zeros on links 6 to 11.
Each of the 66 transmitters has a 4-bit source register:

- 0 to 11 copies that logical link;
- 15 switches the transmitter off.

Replication to more destinations is therefore just register setup.

At 128 bits per BC, a link carries 5.12 Gb/s of payload. That is 6.4 Gb/s
after 8b/10b coding, the transmitter rate the design is sized for. Serialising
and coding happen in the transceivers.

## CTP output (`ctp_out`)

There are two cables of 33 lines, each with 32 data bits and odd parity.

- Cable 0 carries the 24-bit sum.
- Cable 1 carries the eight saturation flags.

The sum comes from the system merger on a system module, and from the crate
merger otherwise. In 80 MHz mode a second word follows in the second half of
each BC. Its cable 1 then also holds the RoI count (bits 15:8) and the list
overflow flag (bit 16).

## Readout (`readout_ctrl`, `async_fifo`, `glink_encoder`, `glink_mux`, `bc_counter`)

There are two readout paths: DAQ and RoI. Each has a latency pipeline of 128
BCs. Each BC it stores the path's payload and the BC number from
`bc_counter`, a 0..3563 counter reset by BCR. An L1A reads the slice that was
written *latency* BCs earlier. The latency is a VME-- register. The slice
goes into an 8-event derandomiser. L1As that find the derandomiser full are
dropped and counted.

Events leave as 20-bit words with a data-valid flag:

1. a header `{BCID[11:0], event number[7:0]}`;
2. the payload, least significant 20 bits first.

The payloads are:

- **DAQ:** the 16 received words, the crate sum and the per-module parity
  flags. This is 79 words after the header.
- **RoI:** the RoI list, the system sum and the flags. This is 41 words
  after the header.

The header of an event leaves `readout_ctrl` 2 BCs after the L1A is sampled.

**Crossing to the link clock.** The trigger runs on the 40.08 MHz LHC bunch
clock. The readout links keep the exact 40.00 MHz of the original G-links, so
that existing receivers still accept them. The two clocks are unrelated. Each
link therefore has an `async_fifo`, a 16-word dual-clock FIFO with
Gray-coded pointers and two-flop synchronisers. Only data words are written
into it. On the link side, a word is sent whenever the FIFO is not empty, and
an idle frame otherwise.

The writer is 0.2 % faster than the reader, so the FIFO gains about one word
every 500. It empties again in every gap between events, and a 16-word FIFO
never fills in practice. If it ever does, words are dropped and a sticky
status flag is set. The crossing adds about three link clocks of latency.
The link side has its own reset synchroniser.

`glink_encoder` puts each 20-bit word into a 24-bit frame with a 4-bit
control field:

| control field | frame |
|---|---|
| `1100` | data |
| `0011` | inverted data |
| `1010` | idle, with the fixed fill `1010_1111111111_0000000000` |

The encoder inverts a data frame when that brings its running disparity back
towards zero. `glink_mux` sends each frame as three bytes, most significant
first, on `clk120`, which is three times the link clock. This feeds a
transceiver running at 960 Mb/s.

The framing keeps the DC balance and the 40 MHz frame rate of the original
G-link chips. **Its codes are not those chips' codes**, so a real G-link
receiver will not decode it. Replace `glink_encoder` if you need that
compatibility.

## VME-- access (`vme_regs`)

The module answers in the address range of the CMM it replaces:

- 0x700000–0x77FFFE in slot 3;
- 0x780000–0x7FFFFE in slot 20.

The map, in byte offsets:

| offset | content |
|---|---|
| 0x000 | control: mode, RoI processing, CTP 80 MHz, CPM format, system role, cable port 2 direction, JEM format |
| 0x002 | module mask |
| 0x004 | DAQ latency |
| 0x006 | RoI latency |
| 0x008 | command (bit 0 clears the error counters) |
| 0x00A | window base |
| 0x040 + 2i | source of transmitter i |
| 0x200 + 2i | status words |
| 0x40000 and up | moveable window |

The status words are:

| words | content |
|---|---|
| 0–15 | per-module parity error counts |
| 16–18 | cable error counts |
| 19–20 | lost events |
| 21–22 | event counts |
| 23 | RoI list overflows |
| 24 | BCID |
| 25 | orbit error, RoI count |
| 26 | readout busy flags |
| 27 | saturation flags |
| 28 | realignment flags |
| 29 | cable parity |
| 30 | words lost in the crossing to the link clock (sticky flags) |

A window access reaches internal word address `{base[14:0], offset[17:1]}`
through the `win_*` ports, which expect a synchronous-read memory one clock
behind. `vme_ds` is a one-clock strobe of an already synchronised cycle.
`vme_dtack` answers after 1 clock for a register and after 3 clocks for the
window. An assertion checks that no new strobe arrives while a window access
is still pending.

## Timing summary

| path | latency |
|---|---|
| 40 Mb/s backplane → CTP (system module, BC n) | CTP changes at the start of BC n+3 |
| 40 Mb/s backplane → crate cable (crate module) | cable lines change at the start of BC n+2 |
| 160 Mb/s backplane BC n → raw TP payload | registered at the start of BC n+3 |
| 160 Mb/s backplane BC n → RoI list payload | BC n+4 |
| 160 Mb/s backplane BC n → CTP | BC n+5 |
| L1A → first readout word | 2 BCs, plus about 3 link clocks for the clock crossing |

The first line is well within the 8-BC budget of the CMM. For the TP paths,
reformatting takes 2 BCs for raw data and 3 BCs for the RoI list after the
BC's data have fully arrived.

## Where this design departs from, or goes beyond, the specification

- The split of the 24 bits into 8 × 3-bit multiplicities is assumed.
- The parity conventions on the cables, the CTP lines and the DDR clock line
  are assumed.
- The CTP word content is this design's choice.
- The RoI word layout, the readout formats and the register map are this
  design's choices.
- The G-link frame codes are not the original chip's.
- Both upgrade RoI formats are decoded. The packing of the jet ET fields is
  this design's reading of the format. The energy-sum merging of the energy
  merger flavour is not built.
- One image serves both flavours through a control bit. The original system
  instead loads a different firmware image for each crate position.
- Standalone mode has no topological algorithms and no optical receive path,
  because neither is specified.
- Clock recovery, delay adjustment, transceivers, the configuration chipset,
  the TTC decoder and the CANbus monitor are outside this logic.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal --top-module tb_cmx_top \
        -y rtl -y tb rtl/cmx_pkg.sv tb/tb_cmx_top.sv
    ./obj_dir/Vtb_cmx_top

`tb_cmx_top` runs the whole design at its default size: 16 modules and 66
transmitters. It goes through these phases:

1. CMM emulation as a system module, with parity errors and five L1As.
2. CMM emulation as a crate module.
3. Test mode, with 160 Mb/s parity errors and clock realignment.
4. Upgrade mode with raw links.
5. RoI processing at low and high occupancy, with list overflow, a module
   reporting too many RoIs, replication and the 80 MHz CTP.
6. Standalone mode with the 6-bit ET + fine position format, then with the
   jet format.
7. An L1A burst that overflows the derandomiser.
8. A window access.

Its model checks the CTP, cable and link outputs BC by BC at the latencies
above. It also decodes the readout byte streams. Each of these mechanisms is
counted, and one that never happens is a failure.
