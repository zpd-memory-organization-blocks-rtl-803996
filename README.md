# ZPD trigger crate — memory organisation and data path in SystemVerilog

The ZPD crate is a track trigger built from fourteen boards. They share one
backplane and one host bus. Track segments enter a board called **Sergio**,
which sends them over the **Megabus** to six **Finders**. Each Finder finds two
seed tracks per event and passes them to its **Fitter**. The six Fitters send
their fitted tracks (curvature `rho`, `z0`, `dip`, `z0err` and a superlayer
hit mask) over 12-bit links to the **Decision Module**. The Decision Module
turns every event into eight decision bits.

Every board is also a memory-mapped device. The host addresses a board by its
bit in a 16-bit block field. It can read back, event by event, what each board
received and produced. It loads the look-up tables and selection windows, and
it collects the DAQ readout.

This RTL implements that memory organisation in full:

- block selection, including group broadcast;
- every diagnostic memory, with its exact address formula and word layout;
- the Megabus framing and its superlayer:sector mapping;
- the Fitter→Decision Module links;
- the decision windows and the decision itself;
- the DAQ circular buffers;
- all look-up table RAMs.

The seed-finding and track-fitting algorithms are not included. Their inputs
and outputs are ports of the top level, so they can be attached from outside.

## Data flow and timing

```
 TSF segments ─► Sergio ──Megabus (5×14 bit per tick)──► Finder 0..5 ─► [seed finding] ─┐
                  │                                         │                           │
             TSF memory, DAQ                 Megabus memory, deframer,                  ▼
                                             Finder Results, tables          [track fitting]
                                                                                        │
   Decision Module ◄──── 6 × 12-bit link ◄──── Fitter 0..5 (Fitter Results, tables) ◄───┘
   (windows → 8 decision bits, Output memory, DAQ)
```

- An event occupies **32 clk120 ticks**. Each tick carries **5 segments**. All
  logic runs on one clock, one tick per cycle.
- Sergio numbers the input beats itself. The tick counts 0..31, and the event
  number counts 0..63 and then wraps. Both travel with every Megabus beat.
- Every diagnostic memory keeps the **last 64 events**, indexed by event number.
- Finders and Fitters 0–2 handle **A10** tracks (10 superlayers). Finders and
  Fitters 3–5 handle **A7** tracks. The group identifiers follow this split.

Latencies, in clock cycles:

| path | latency |
|---|---|
| TSF input → Megabus beat (Sergio) | 1 |
| Megabus tick 31 → rebuilt event at a Finder (`fnd_ev_valid`) | 1 |
| Fitter seed-1 write → first link word | 1; the 8 words then follow on consecutive cycles |
| last word of the last Fitter link → `dec_valid` | 2 |
| `accept` → DAQ buffer filled (`*_daq_done`) | BUF_LEN + 1 (75 on Sergio, 201 on the Decision Module) |
| host request → `host_rsp` | 1 |

## Host bus and block addressing

`host_req_t` holds a 16-bit `blk` mask, a 16-bit word address, 32-bit write
data, `we` and `re`. The response `host_rsp_t` carries `valid` and `rdata`,
registered and returned one cycle after the request. This request/response
protocol is this design's own choice. The block identifiers and all addresses
are the crate's.

| block | id | | block | id |
|---|---|---|---|---|
| Sergio | 0x0001 | | Finder n | 0x0002 << 2n (0x2, 0x8, … 0x800) |
| Decision Module | 0x8000 | | Fitter n | 0x0004 << 2n (0x4, 0x10, … 0x1000) |
| SL10 Finders / Fitters | 0x002a / 0x0054 | | SL7 Finders / Fitters | 0x0a80 / 0x1500 |
| all Finders / Fitters | 0x0aaa / 0x1554 | | clock manager reset | 0x4000 (not decoded) |

A board takes part in a request when `blk & ID != 0`. A group identifier is
therefore a broadcast: one write loads a table into all six Fitters. Reads must
name exactly one board, and an assertion in `zpd_system` checks this.

Every board has the same registers at 0x0–0xF:

| address | register | access |
|---|---|---|
| 0 | Version | read only |
| 1 | Control | 16-bit scratch register; the crate gives it no function |
| 2 | Status | read only |
| 3–F | reserved | read 0 |

## The Megabus and its superlayer:sector map

This is the least obvious part of the design. The Megabus does not carry
segments in superlayer order.

- The 30 used ticks form ten **groups of three** (group g = ticks 3g..3g+2).
- In a group, each of the five Megabus segment positions carries the three
  segments of one superlayer:sector, in consecutive ticks. The slot is
  `tick mod 3`.
- Ticks 30 and 31 are empty.

| ticks | seg 4 | seg 3 | seg 2 | seg 1 | seg 0 |
|---|---|---|---|---|---|
| 0–2   | 1:1 | 1:3 | 1:5 | 10:1 | 10:3 |
| 3–5   | 1:2 | 1:4 | 1:0 | 10:2 | 10:4 |
| 6–8   | 2:1 | 2:3 | 2:5 | 7:1 | 7:3 |
| 9–B   | 2:2 | 2:4 | 2:0 | 7:2 | 7:4 |
| C–E   | 3:1 | 3:3 | 3:5 | 5:1 | 5:3 |
| F–11  | 3:2 | 3:4 | 5:0 | 5:2 | 5:4 |
| 12–14 | 9:1 | 9:3 | 9:5 | 4:1 | 4:3 |
| 15–17 | 9:2 | 9:4 | —   | 4:2 | 4:4 |
| 18–1A | 6:1 | 6:3 | 6:5 | 8:1 | 8:3 |
| 1B–1D | 6:2 | 6:4 | —   | 8:2 | 8:4 |

The table fills 48 superlayer:sector entries, sectors 0..5 of 2π/16 each.

- `zpd_pkg::mb_map` holds this table as a function.
- `zpd_mb_deframer` uses it to rebuild each event as
  `ev_seg[sl-1][sector][slot]`, and `ev_present` marks the 48 filled entries.
- The F–11 row is taken as shown: segment 2 carries SL5:0 there. As a result
  SL3 covers sectors 1–5 and SL5 covers sectors 0–4.

A segment word is `{2'b0, M, cell[3:0], phi[5:0], dphi[2:0]}`, where M is the
mask bit. Memories are 16 bits wide, but only bits 13:0 travel on the Megabus.

## Memory map per board

| board | address | content |
|---|---|---|
| Sergio | 0x4000 + 0x100·event + 0x20·seg + tick | TSF segment input, 16 bit |
| Finder | same formula | Megabus copy, 14 bit; equals Sergio's memory in bits 13:0 |
| both | XXA0–XXFF of each event page | reserved, read **0xBADD** |
| Finder | 0x1000 + 0x20·event + 0x10·seed + word | Finder Results: w0 hitmask[9:0], w1 {dipbin[5:0], rhobin[5:0]}, w2..w11 segphi SL1..10, w12..15 read 0 |
| Fitter | 0x4000 + 8·event + 4·seed + word | Fitter Results: w0 hitmask[9:0], w1 {rho[7:0], z0err[3:0]}, w2 z0[7:0], w3 dip[7:0] |
| Decision Module | 0x4000 + 0x200·fitter + 8·event + word | copy of all six Fitters' results, as received over the links |
| Decision Module | 0x3000 + event | Output: bit x-1 = decision bit x |
| Decision Module | x·0x100 + y·0x10 + k | windows of decision bit x = 1..8, track type y (0 = A10, 1 = A7), k = 0..6: rho min/max, tandip min/max, z0 min/max, z0err max |
| Decision Module | 0x0F0 | 4-bit mask register |
| Finder | 0x8000–0xA7FF, 0xC000–0xE7FF | seed phi SL conversion (16 bit), expected phi position (32 bit) |
| Fitter | 0x100–0x36FF | 23 tables: phiconv, twistzero, curvcorr, wr2, wr2dpdr, sumr2, sumr2dpdr, sumrd2pdr2, denomrp, dphidrho, fitok, hitax, useax, rh5, rh3, rstero, sigma2z, dsigma2z, sums2, sumds2, sumd2s2 (32 bit), denomzt, z0err |
| Sergio / DM | 0x2000 + 0x100·k + i | DAQ output buffer k = 0..3: 74 × 16-bit words on Sergio, 200 × 32-bit on the Decision Module; read only |
| Sergio / DM | 0x2400 + i | DAQ circular buffer: 640 × 16-bit on Sergio, 832 × 32-bit on the Decision Module; read only |
| Sergio / DM | 0x2A00 | DAQ offset, read/write |

Diagnostic memories accept host writes as well. When the data path writes the
same word in the same cycle, the data path wins.

## Fitter links and the decision

When a Fitter writes its seed-1 track, `zpd_fitter_results_mem` sends the
event's eight words on the link, one per cycle, in this order:

1. seed 0, words 0..3;
2. seed 1, words 0..3.

Each word is 12 bits and is tagged with its event and word number.

`zpd_dm_fitter_results` stores the words and gathers them into tracks. It hands
the event on once all six Fitters have delivered it. The Fitters are assumed to
run in step, and an assertion checks this.

`zpd_decision` then sets decision bit x if at least one track meets all of
these:

- its hitmask is non-zero;
- it lies inside every window of bit x for its track type;
- comparisons are unsigned, and the limits are inclusive.

The 4-bit mask register is stored and brought out on `dec_mask`, but it does
not enter the decision. Its role is not defined.

## DAQ readout

`zpd_daq_buffer` writes one word per cycle of its stream into the circular
buffer. On `accept` it copies BUF_LEN words into the next output buffer, in
the order 0, 1, 2, 3, 0, and so on. The copy starts OFFSET words behind the
write pointer, so the offset register covers the trigger latency. An accept
that arrives while a copy is running is dropped. It is counted in bits 15:8 of
the board's Status register.

Each board writes its own stream:

- **Sergio** writes one word per tick: `{event[5:0], tick[4:0], M bits of segments 4..0}`.
- **The Decision Module** writes one word per event: `{18'b0, event[5:0], decision[7:0]}`.

Both word layouts are this design's choice.

## Where this RTL departs from, or goes beyond, the crate description

- **Not built:**
  - the seed-finding and track-fitting algorithms; their tables exist as RAMs
    with a read port each (`fnd_lut_*`, `fit_lut_*`);
  - the clock manager reset block (0x4000);
  - the track segment finder that feeds Sergio.
- **Own choices:**
  - the host bus protocol and the Megabus framing fields;
  - free-running event numbering;
  - the link serialisation;
  - the decision's compare rules;
  - the DAQ copy engine and its word layouts;
  - the width of Control (16 bits) and Status contents:
    - Sergio: `{dropped, busy, 0, event}`;
    - Finder: last rebuilt event;
    - Fitter: last written event;
    - Decision Module: `{dropped, busy, 0, last decided event}`.
- **Fitter 1's address range:** the Decision Module gives each Fitter a full
  0x200-word page (Fitter 1 at 0x4200–0x43FF). This matches the 0x4000–0x4BFF
  range for six Fitters.
- **Segment phi:** the segphi words of the Finder Results are stored with all
  16 bits, because their width is not fixed.
- **Formats may change:** the Output, DAQ and table formats were still open in
  the crate description. The Fitter result format is marked as likely to
  change. Track records are `typedef`s in `zpd_pkg`, and the pack/unpack
  functions are the only place their layout appears.

## Files

| file | content |
|---|---|
| `rtl/zpd_pkg.sv` | types, block ids, record layouts, Megabus map |
| `rtl/zpd_system.sv` | top: Sergio, 6 Finders, 6 Fitters, Decision Module |
| `rtl/zpd_sergio.sv`, `zpd_finder_board.sv`, `zpd_fitter_board.sv`, `zpd_decision_module.sv` | the four board types |
| `rtl/zpd_host_port.sv` | block select and common registers |
| `rtl/zpd_segment_mem.sv`, `zpd_mb_deframer.sv` | segment memory, Megabus deframer |
| `rtl/zpd_finder_results_mem.sv`, `zpd_fitter_results_mem.sv`, `zpd_dm_fitter_results.sv` | result memories and links |
| `rtl/zpd_decision.sv`, `zpd_daq_buffer.sv`, `zpd_lut_bank.sv` | decision, DAQ, tables |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_zpd_system` runs the full-size crate end to end. It sends 70 events, so
the 64-event memories and event numbers wrap. It drives simple stand-ins for
the two algorithms and compares every decision with a reference model. It
counts each mechanism: broadcast writes, event rebuilds, reserved-word reads,
link transfers, A10 and A7 selections, empty tracks, both DAQ readouts and a
dropped accept.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/zpd_pkg.sv tb/tb_zpd_system.sv --top-module tb_zpd_system
./obj_dir/Vtb_zpd_system
```

To run another testbench, replace `tb_zpd_system` with its name. The full-size
system test builds and runs in about a minute.

Parameters:

- `zpd_daq_buffer`: `W`, `CIRC_DEPTH`, `BUF_LEN`;
- `zpd_lut_bank`: `N`, `BASE`, `LAST`, `WIDE`;
- `zpd_segment_mem`: `MASK_W`;
- boards: `ID` and `VERSION`.

Crate-wide sizes (numbers of boards, events, ticks, superlayers) are constants
in `zpd_pkg`.
