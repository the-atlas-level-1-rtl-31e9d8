# MUCTPI: muon-to-central-trigger interface in SystemVerilog

In the ATLAS first-level trigger, 208 muon trigger sectors each report up to two muon
candidates every bunch crossing (BC, 40.08 MHz): 64 barrel, 96 end-cap and 48 forward
sectors. Each candidate carries a region-of-interest (RoI) address, the highest of six
transverse-momentum (pT) thresholds it passed, and a charge sign. The central trigger
processor (CTP) does not need the candidates themselves. It needs to know **how many
muons passed each threshold**. That is six 3-bit numbers, 18 bits, delivered with a
fixed latency every BC.

The difficulty is that one muon can cross two sectors where they overlap. It then shows
up as two candidates, and a plain count would be one too high. Most of this design deals
with finding those duplicates and removing them at full rate. It also has to keep the
data of every sector long enough that, when the CTP accepts an event (a Level-1 Accept,
L1A), the candidates can be read out:
- to the DAQ system in full;
- to the Level-2 trigger as a list sorted by pT.

This RTL models the whole crate as one synchronous design clocked at the BC rate. The
crate holds:

| Module | Count | Role |
|---|---|---|
| `mioct` | 16 | Octant modules, 13 sectors each (4 barrel, 6 end-cap, 3 forward) |
| `mibak` | 1 | Active backplane: multiplicity adder tree and shared readout bus |
| `mictp` | 1 | CTP interface: timing in, total multiplicity out |
| `mirod` | 1 | Readout driver: DAQ and Level-2 outputs |

`muctpi_top` wires them together.

## Trigger path: sector words to CTP in 4 clocks

```
sec_in[o][s] ─► sector_sync_align ─► overlap_handling ─► multiplicity_summing ─► mult_out[o]
   (32 bit)        clock 1               clock 2               clock 3          (18 bit)
                                                                                    │
mult_ctp ◄── mictp latch (clock 4) ◄── mibak_adder_tree (combinational, 16 → 1) ◄───┘
```

**Alignment (`sector_sync_align`).** Each sector word is registered once. It is then
delayed by 0 to 7 clocks, set per sector, so that the words of one bunch crossing leave
together. Cable and detector latencies differ from sector to sector, so this delay has to
be programmable.

Every sector word carries the low 3 bits of its BCID (bunch-crossing number) in bits
29:27. The stage compares them with the local bunch counter plus a programmable offset.
A mismatch sets a sticky error flag for that sector.

**Overlap handling (`overlap_handling`, `overlap_pair`).** Sector pairs that can overlap
each get one look-up unit. There are 33 pairs per octant (no overlaps cross octants):

| Pairs | Count |
|---|---|
| BA31–BA32 and BA01–BA02 (barrel–barrel) | 2 |
| Every barrel sector with every end-cap sector | 24 |
| Neighbouring end-cap sectors | 5 |
| Neighbouring forward sectors | 2 |

Each pair unit looks at the 4 combinations of the two candidates of sector A and the two
of sector B:
- The **RoI table**, addressed by {RoI A, RoI B}, says whether the two positions overlap.
- For barrel–end-cap pairs, a second **pT table**, addressed by {pT A, pT B, sign A,
  sign B}, must also say yes.
- If both agree and both candidates exist, the one with the lower pT is flagged as
  suppressed. On equal pT, the candidate of sector B is flagged.

The flags of all pairs are ORed per candidate.

The tables are RAMs written one bit at a time over the register bus. The overlap policy
is therefore entirely in the loaded contents, which come from simulation of the detector
geometry and are not part of this RTL. After reset, a sweep of 2^`CLR_W` clocks clears
them. The `busy` status bit is set during the sweep.

The RoI address widths per sector type are parameters: `BA_W=5`, `EC_W=8`, `FW_W=6`. The
largest table, end-cap × end-cap, has 64K entries.

**Multiplicity (`multiplicity_summing`).** A candidate with pT code p (1..6) counts
toward every threshold t ≤ p, unless it is suppressed. Each of the six counts saturates
at 7.

**Backplane sum (`mibak_adder_tree`).** This is a 4-level tree of saturating 3-bit
adders per threshold. It has no register: in the real crate it is fast CPLD logic on the
backplane.

**CTP output (`mictp`).** The MICTP latches the sum and drives it to the CTP.

Total latency: a sector word presented before clock edge k appears on `mult_ctp` after
edge k+3. That is 3 clocks inside the MIOCT plus 1 in the MICTP, with the sector delays
set to 0.

## Readout: L1A, pipelines, token bus

**Timing signals.** The MICTP receives the L1A, orbit and event-counter-reset signals as
levels. It synchronises them with two flip-flops and turns each rising edge into a
one-clock pulse (`l1a`, `bcr`, `ecr`) for every module. Each module keeps its own BCID
counter (0..3563, reset by `bcr`) and L1ID counter (reset by `ecr`) in `ttc_counters`.

**MIOCT (`mioct_readout`).**
- The aligned sector words enter a circular pipeline memory of `PIPE_DEPTH` = 128
  entries. Each entry also stores the BCID.
- On an L1A, the slices from `latency − pre` to `latency + post` BCs back are copied,
  one per clock, into a derandomizer FIFO. `pre` and `post` are each 0..2, giving a
  window of up to ±2 BCs.
- A formatter builds the fragment, dropping every sector word with no candidate (zero
  suppression). The fragment is a header with module number and L1ID, then for each
  slice a slice header with the signed offset and BCID followed by the non-empty sector
  words, then a trailer with the word count.
- The fragment goes to the readout FIFO. When monitoring is enabled, a copy also goes to
  a monitoring FIFO read through the register bus.

**MICTP.** The MICTP has its own pipeline of latched multiplicities. On an L1A it sends a
3-word fragment: header, multiplicity, trailer.

Because the MICTP sees a bunch crossing 3 clocks after the MIOCTs, set its latency 3
lower than theirs. Both then read out the same crossing.

**Backplane bus (`mibak`, `readout_bus_node`).** All 17 senders share one 36-bit bus.
Bits 35:32 of each word are a tag:

| Tag | Meaning |
|---|---|
| 0..12 | Sector word of that sector |
| D | Fragment header |
| E | Slice header; with bit 31 set, the multiplicity word |
| F | Trailer |

Arbitration is by a token, a one-clock pulse:
1. For each event, the MIROD launches a token.
2. The token goes MIOCT 0 → … → MIOCT 15 → MICTP → back to the MIROD.
3. A node that holds the token and has a complete fragment sends the whole fragment,
   then passes the token on one clock after its last word.
4. A node with nothing to send passes the token on at once.

While the MIROD's input FIFO is nearly full it raises `bus_hold`, and senders pause. The
bus is a wired-OR, and an assertion checks that at most one node drives it.

**MIROD (`mirod`).** For each L1A, the MIROD writes a start marker carrying the L1ID into
its input FIFO and launches the token. When the token returns, it writes an end marker.
Header words with module numbers 30 and 31 serve as the markers.

A converter then produces two S-LINK streams. Words marked (ctrl) are sent with the
control flag set.

| Stream | Words, in order |
|---|---|
| DAQ | BOF (ctrl); L1ID; BCID; one candidate word per candidate of every slice; the multiplicity word; the count of data words; EOF (ctrl) |
| Level-2 | BOF (ctrl); L1ID; the candidates of the triggered BC by decreasing pT, at most `L2_MAX`=16; their number; EOF (ctrl) |

The candidate word is `{0, offset[2:0], module[4:0], sector[3:0], index, pT[2:0], sign,
6'b0, RoI[7:0]}`, defined by `muctpi_pkg::cand_word`. The multiplicity word is `{4'h8,
10'b0, mult[17:0]}`.

The Level-2 list is sorted by insertion as candidates stream past:
- A new candidate goes behind every entry with equal or higher pT.
- Candidates beyond the sixteenth are dropped.

Both links stall while their `lff` (link full) input is high.

## Snapshot and test memories

Each MIOCT drives an external memory, 128K lines deep. One line per BC holds:
- the 416 aligned sector bits;
- the 18-bit multiplicity;
- the 26 suppression flags;
- a 32-bit clock count;
- zero padding up to 576 bits.

The MICTP and MIROD each drive a 1M × 36 memory:
- the MICTP stores the multiplicity, BCID and timing pulses;
- the MIROD stores bus words.

`snapshot_mem_if` controls each memory. It has three modes:

| Mode | Name | What it does |
|---|---|---|
| 0 | Host | Lines are moved between the memory and 32-bit staging registers by fetch and commit commands. A fetched line is in the staging registers 3 clocks after the command. |
| 1 | Snapshot | *Arm* restarts writing at line 0, one line per clock, wrapping. *Freeze* stops it. The status register gives the line pointer and whether it wrapped. |
| 2 | Playback | Lines 0..`play_len`−1 are read in a loop. They replace the sector inputs (MIOCT), the multiplicity to the CTP (MICTP) or the bus words (MIROD). |

The memory port is line-wide with a 1-clock read latency. The QDR SRAM devices and their
double-data-rate interface are outside the RTL. A real board would need a PHY that
spreads each 576-bit line over several 72-bit accesses per BC.

## Register bus

The VMEbus slave is replaced by a simple synchronous bus, `cfg_req_t {we, re, addr[23:0],
wdata[31:0]}`. Read data comes on `cfg_rdata` one clock after `re`.

Address fields:
- `addr[23:19]` selects the module: 0–15 MIOCT, 16 MICTP, 17 MIROD.
- `addr[18:16]` selects a region.
- `addr[7:0]` selects a register in region 0.

**MIOCT**

| Region | Address | Dir | Meaning |
|---|---|---|---|
| 0 | 0x00–0x0C | W | Delay of sector 0..12 (0..7) |
| 0 | 0x10 | W | BCID check offset |
| 0 | 0x11 | W | L1 latency (reset value 100) |
| 0 | 0x12 | W | `{post[3:2], pre[1:0]}` readout window |
| 0 | 0x13 | W | Snapshot mode (0 host, 1 snapshot, 2 playback) |
| 0 | 0x14 | W | Monitoring copy enable |
| 0 | 0x15 | W | Playback length |
| 0 | 0x16 | W | Host line address |
| 0 | 0x20 | W | Command bits: 4 fetch, 3 commit, 2 freeze, 1 arm, 0 clear alignment errors |
| 0 | 0x30 | R | Alignment error flags |
| 0 | 0x31 | R | Status: 31 monitoring overflow, 30 tables busy, 29 frozen, 28 wrapped, pointer |
| 0 | 0x32 | R | Monitoring word [31:0] |
| 0 | 0x33 | R | `{empty, tag}`; the read pops the monitoring FIFO |
| 0 | 0x34 | R | Current multiplicity |
| 1 | `addr[15:0]` = table address | W | RoI table bit `wdata[0]` of pair `wdata[21:16]` |
| 2 | `addr[15:0]` = table address | W | pT/sign table bit, same layout |
| 3 | `addr[5:0]` = word index | W/R | Snapshot staging words |

**MICTP**

| Address | Dir | Meaning |
|---|---|---|
| 0x11 | W | L1 latency |
| 0x13, 0x15, 0x16, 0x20 | W | As for the MIOCT; command bit 0 clears the accumulators |
| 0x31 | R | Status |
| 0x34 | R | Multiplicity |
| 0x40–0x45 | R | 32-bit per-threshold accumulators of the multiplicity, for monitoring rates |

**MIROD**

| Address | Dir | Meaning |
|---|---|---|
| 0x13, 0x15, 0x16, 0x20 | W | Snapshot control, as for the MIOCT |
| 0x31 | R | Status |
| 0x35 | R | Events sent |

## What is taken from the system description and what is not

Taken from the published description of the system:
- the crate organisation and module roles;
- 208 sectors in 16 octants of 13;
- two candidates per sector;
- six thresholds with 3-bit counts (18 bits);
- 32-bit sector words and a 36-bit readout bus;
- a 3-BC trigger path in the octant module;
- LUT-based overlap handling using position and, for barrel–end-cap, pT and sign, with
  the lower-pT candidate suppressed;
- a binary adder tree on the backplane;
- pipelines, a programmable ±2-BC window, derandomizers and zero suppression;
- token-passing readout;
- DAQ and pT-ordered Level-2 outputs;
- snapshot/playback memories of 128K BC (octant) and 1M × 36 (CTP interface and readout
  driver);
- timing-signal distribution by the CTP interface.

This design's own choices:
- **One clock.** The original logic runs at 4× the bunch clock (about 160 MHz) inside a
  3-BC budget. Here every stage is one BC clock, so the 3-BC latency is exact but the
  internal sub-BC pipelining is not modelled.
- **Formats.** The sector-word bit layout, the readout tags, the fragment, DAQ and
  Level-2 formats, and the register map are all invented here. Replace them before
  connecting to real sector logic or S-LINK receivers.
- **Counting and overflow rules.** Counting is inclusive (a candidate counts toward every
  threshold it passed). Saturation is at 7. Ties are broken toward sector A.
- **Overlap pairs.** The list of 33 pairs follows the overlap regions between barrel,
  end-cap and forward sectors within one octant. The exact pairing in the real system
  is set by its tables, and any pair not listed here cannot be handled without changing
  `muctpi_pkg`.
- **Unspecified sizes.** `PIPE_DEPTH=128`, FIFO depths, the 0..7 sector delays, the
  Level-2 limit of 16 and the RoI table widths are assumptions.
- **Not modelled.** The LVDS/BLVDS receivers, the VME protocol, the QDR memories, the
  S-LINK cards, the clock-delay chip and the phase-monitoring TDC of the CTP interface are
  outside this RTL. Their logic-level signals are ports of the top.
- **MIROD monitoring.** The readout driver of the original can also hand selected candidate
  data to the control bus for monitoring. Here it offers only an event count and the
  snapshot memory of bus words. The octant modules' monitoring FIFOs are built.

## Files

| File | Contents |
|---|---|
| `rtl/muctpi_pkg.sv` | Sizes, sector-word struct, overlap pair list, tags, word formats |
| `rtl/muctpi_top.sv` | Crate top level |
| `rtl/mioct.sv` | Octant module. Uses `sector_sync_align`, `overlap_handling` (`overlap_pair`), `multiplicity_summing`, `mioct_readout`, `readout_bus_node`, `snapshot_mem_if`, `ttc_counters`, `sync_fifo` |
| `rtl/mibak.sv` | Backplane. Uses `mibak_adder_tree` |
| `rtl/mictp.sv` | CTP interface |
| `rtl/mirod.sv` | Readout driver |
| `tb/tb_<block>.sv` | Self-checking testbench per block. Each ends by printing `TB_RESULT checks=… failures=…` |
| `tb/line_memory.sv` | Behavioural synchronous memory standing in for the SRAMs |

`tb_muctpi_top` runs the complete crate at its default sizes. It runs 4000 bunch
crossings of random candidates, including overlapping pairs and dense bursts, with 31
L1As. It checks:
- the CTP multiplicity every clock;
- every DAQ and Level-2 word;
- a snapshot line;
- the monitoring FIFO;
- playback.

It also fails unless overlap suppression, adder saturation, zero suppression,
multi-slice windows, S-LINK stalls and Level-2 truncation each occurred.

## Simulating

With Verilator 5 (2-state; every register read is reset or initialised):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_muctpi_top \
    rtl/muctpi_pkg.sv $(ls rtl/*.sv | grep -v muctpi_pkg) tb/line_memory.sv tb/tb_muctpi_top.sv
./obj_dir/Vtb_muctpi_top
```

The package must come first. Any other block testbench works the same way with its own
`--top-module`.

The full crate takes about one and a half minutes. The 16 octant memory models need
about 150 MB. The clear sweep of the 64K-entry overlap tables takes 65536 clocks after
reset. The unit testbenches override table and memory sizes to run in seconds.
