# RNA trigger — Revised Neural Atomic trigger electronics in SystemVerilog

The RNA trigger is a first-level trigger for a pionic-atom experiment. It has a
few hundred nanoseconds to decide whether an event holds a close pair of pions.
It locates the pair twice. In front of the spectrometer magnet it uses the 240
columns of a vertical scintillating-fibre plane (SciFi). Behind the magnet it
uses the 18 slabs of each of two vertical hodoscopes, left (VL) and right (VR).

The electronics turn these three hit-maps into four short binary patterns. Each
pattern holds the two SciFi positions and one VL and one VR position. Four
external neural-network cards (NN-CARDs) judge one pattern each. Their answers
are then combined with empty, overflow and "spread" flags into one decision,
RNA_DEC.

This repository holds the whole digital part of that electronics. That is four
Fanout/Delay/Register cards, four Concentrator cards, the Master card and the
backplane that joins them. It also has testbenches, including an end-to-end
test of the complete trigger at its default sizes.

## Contents

| File | What it is |
|---|---|
| `rtl/rna_pkg.sv` | sizes, LUT word layouts, mode and bus types, NN-pattern packing |
| `rtl/fdr_card.sv` | Fanout / Delay / Register card (64 SciFi columns) |
| `rtl/c_card.sv` | Concentrator card: closest pair, hit count, positions |
| `rtl/lut_sram.sv` | fast SRAM used as a look-up table |
| `rtl/timing_unit.sv` | M-CARD Timing-Unit: the trigger sequence |
| `rtl/pattern_unit.sv` | M-CARD Pattern-Unit: hodoscope hit-maps to positions |
| `rtl/ccards_unit.sv` | M-CARD C-CARDs-Unit: card selection and SciFi flags |
| `rtl/decision_unit.sv` | M-CARD Decision-Unit: the final decision |
| `rtl/vme_interface.sv` | A16/D16 VMEbus slave, mode register, safety and reset logic |
| `rtl/m_card.sv` | the Master card (the five units above) |
| `rtl/rna_backplane.sv` | card-to-card wiring, position bus, NN-pattern assembly |
| `rtl/rna_trigger.sv` | top: 4 FDR-CARDs, 4 C-CARDs, M-CARD, backplane |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_rna_ref_pkg.sv` | reference functions: LUT contents, NN stand-in rule |
| `tb/nn_card_model.sv` | behavioural stand-in for an NN-CARD (simulation only) |

## One event, start to finish

All logic runs on one clock. Its period, 0.5 ns, is the resolution of the
programmable delays, so every delay below is a whole number of clock cycles
("ticks"). On the original boards the fast path was asynchronous ECL logic with
delay lines. The single clock is this model's way of expressing that timing.

1. **Before the trigger.** The SciFi signals arrive before the lowest-level
   trigger (START, also called T0_START). Each FDR-CARD therefore pushes its 64
   columns through a delay pipeline. The pipeline advances every 5 ns and its
   length (0–99 steps) is set by two BCD switches. The card also fans the raw
   inputs out unchanged for other users.
2. **START.** A rising edge of START is accepted when the Master card is in WORK
   mode, VETO is low and no event is running. BUSY then rises. Further STARTs
   are ignored until the sequence ends.
3. **SciFi gate.** SciFi_DELAY after BUSY rises, SciFi_GATE opens for
   SciFi_GATE PW. Each FDR-CARD clears its register when the gate opens. While
   the gate is open it ORs the delayed columns into the register. After the gate
   closes the hit-map is held.
4. **Concentrators.** The four C-CARDs work on the held maps without a clock
   (see the next section). Each one reports a minimum distance and a hit count.
   The Master card's C-CARDs-Unit picks one card with SEL1..4. That card drives
   the two 8-bit SciFi positions onto the shared position bus.
5. **Hodoscopes.** V_DELAY after BUSY rises, V_CLK registers VL1..18 and
   VR1..18. Their signals last only about 20 ns. A 256k × 16 table per arm turns
   each 18-bit hit-map into two 5-bit positions and four flags.
6. **NN_CLK.** NN_DELAY after the later of V_CLK and the end of the gate,
   NN_CLK tells the four NN-CARDs to take their patterns.
7. **STRB.** STRB_DELAY after NN_CLK rises, the Decision-Unit samples the four
   NN answers together with the flags. It raises a 20 ns STRB and updates
   RNA_DEC. RNA_DEC stays valid until the next event's STRB. BUSY falls at the
   end of STRB.

| Delay | Setting | Range | In ticks |
|---|---|---|---|
| V_DELAY | TU register 1, 8 bits | 12.5–140 ns, 0.5 ns steps | 25 + value |
| SciFi_DELAY | TU register 2, 8 bits | 12.5–140 ns, 0.5 ns steps | 25 + value |
| SciFi_GATE PW | TU register 3, 8 bits (reset: 40 ns) | 12.5–140 ns, 0.5 ns steps | 25 + value |
| NN_DELAY | `nn_delay_sel` (board jumper) 0..19 | 6–120 ns, 6 ns steps | 12 × (value+1) |
| STRB_DELAY | `strb_delay_sel` (hex switch) 0..255 | 30–285 ns, 1 ns steps | 2 × (30+value) |
| STRB width | fixed | 20 ns | 40 |
| NN_CLK width | fixed (`NN_CLK_W`) | 20 ns | 40 |
| FDR delay | BCD switches per FDR-CARD | 0–495 ns, 5 ns steps | 10 × steps |

Take a 40 ns gate at the minimum SciFi_DELAY, NN_DELAY 18 ns and STRB_DELAY
50 ns. START to STRB is then about 120 ns, well inside the 300 ns decision
budget. The end-to-end test uses these settings, measures at most 121.5 ns and
checks every event against the budget. With every delay at its maximum it would be 685 ns, so the budget holds
only when the delays are chosen for it.

**Single shot.** In SINGLE_SHOT mode the sequence stops after STRB with READY
set. BUSY stays high, so the trigger control sees the trigger as occupied. The
registers can then be read over the VMEbus. Writing bit 0 of TU register 4
(NEXT) releases it.

**Watchdog.** If BUSY has been high for 10 ms (`WDOG_TICKS` = 20,000,000), the
sequence is ended as if NEXT had been written.

## Finding the closest SciFi pair

This is the least obvious part of the design, and the part where the three card
types have to agree.

**Windows with overlap.** The 240 columns are split over four 64-input
FDR-CARDs. Card 4 uses only 48 of its inputs; the rest are held low. A close
pair can straddle two FDR-CARDs. So C-CARD *k* sees an 80-column window: its own
FDR-CARD's 64 columns plus the lowest 16 columns of FDR-CARD *k*+1. Every
FDR-CARD drives its lowest 16 outputs twice, once for each C-CARD that needs
them. C-CARD 4 has no right neighbour; its upper 16 window bits are zero. The
windows start at columns 1, 65, 129 and 193.

**What a C-CARD reports.** Each C-CARD reports three things:

- **MIN_DIST** (4 bits) is the smallest column difference between two hits in
  the window. Adjacent hits give 1. Values 1..14 are exact. 15 means "15 or
  more", and also "no hit". A window with exactly one hit reports **0**.
- **HITS** (4 bits) counts hits in the lower 64 columns only, so that no hit is
  counted twice. It saturates at 15.
- **POS1/POS2** (8 bits each) are the absolute positions of the closest pair,
  lower first. A single hit gives the same position twice. Positions are
  1-based (column *c* of card *k* is 64·*k* + *c* + 1). They are driven onto the
  shared bus only while the card's SEL line is high.

The search is combinational. Every hit is compared with its next hit up to 14
columns away. If several pairs share the minimum distance, the lowest pair
wins. If more than one hit is present but no pair is closer than 15, the
positions are 0.

**Choosing a card.** The M-CARD's C-CARDs-Unit addresses a 64k × 4 table, the
MIND-LUT, with the four distances. The table is loaded so that:

1. the smallest distance in 1..14 wins;
2. failing that, a card reporting 0 (a single hit) wins;
3. failing that (all 15), card 1 is chosen;
4. ties go to the lowest card number.

A 2-to-4 decoder turns the table's card index into SEL1..4. So exactly one card
can drive the bus, and the bus never has two drivers. The same table word gives
**MIN_DIST15** (all four distances are 15). It also gives **LL_SINGLE_HIT**
("looks like a single hit": every distance is 0 or 15, and at least one is 0).

**Counting hits.** A second 64k × 4 table, the HITS-LUT, is addressed by the
four hit counts. It gives SciFi_EMPTY (total 0), SINGLE_HIT (total 1) and
SciFi_OVR (total more than 5).

**Why SHOM exists.** A single hit in an overlap zone is seen by two C-CARDs.
Both report distance 0, but the total count is 1, because only one of them
counts it. That is a genuine single hit, and its position is sent twice to the
NN. If instead two cards each report distance 0 and the total count is 2 or
more, the event has single hits on multiple cards (SHOM). The pions are then
far apart and the event is rejected. In the same way, **DEB15** (MIN_DIST15 and
not SciFi_EMPTY) rejects events whose closest pair is 15 or more columns apart.

## Hodoscope positions

Each arm's registered 18-bit hit-map addresses its own 256k × 16 table (layout
`vlut_word_t`):

| Bits | Field |
|---|---|
| 4:0 | 1P, the lower slab number (1..18), 0 if not valid |
| 9:5 | 2P, the higher slab number, 0 if not valid |
| 10 | EMPTY (no hit) |
| 11 | OVR (more than two hits) |
| 12 | 1P_AVA |
| 13 | 2P_AVA |

Almost all 2^18 patterns are overflows; only 172 per arm are not. A loading
command therefore first fills both tables with the overflow word, using a
hardware fill sequencer that takes 2^18 cycles. Software then writes only the
remaining entries. The testbenches load one hit as 1P only (2P = 0, 2P_AVA =
0). The tables are plain RAM, so a different convention, such as repeating the
position, is just a different table.

## NN-PATTERNs

Each of the four patterns is 26 bits: SciFi_POS1 (8), SciFi_POS2 (8), one VL
position (5) and one VR position (5). The four cards get these pairings:

| NN-CARD | VL | VR |
|---|---|---|
| 1 | VL_1P | VR_1P |
| 2 | VL_1P | VR_2P |
| 3 | VL_2P | VR_1P |
| 4 | VL_2P | VR_2P |

The NN-CARD inputs are numbered MSB first. Pattern bit 0 is the MSB of
SciFi_POS1, bits 7..0 hold POS1 reversed, and so on for POS2 (15..8), VL
(20..16) and VR (25..21). See `rna_pkg::nn_pattern`.

## The decision

```
EMPTY   = VL_EMPTY or VR_EMPTY or SciFi_EMPTY
OVR     = VL_OVR   or VR_OVR   or SciFi_OVR
NN_VALk = NN_DECk and the two AVAILABLE flags of the positions card k received
NN_OR   = NN_VAL1 or NN_VAL2 or NN_VAL3 or NN_VAL4
DEB15   = MIN_DIST15 and not SciFi_EMPTY
SHOM    = LL_SINGLE_HIT and not SINGLE_HIT

overflow condition disabled (reset):  RNA_DEC = OVR or (NN_OR and not (EMPTY or DEB15 or SHOM))
overflow condition enabled:           RNA_DEC = NN_OR and not (EMPTY or DEB15 or SHOM or OVR)
```

The AVAILABLE check keeps an NN answer from counting when it was computed from
a position that does not exist. One example is NN-CARD 4 when an arm has only
one hit. DU register 0, bit 0, selects between the two forms. The reset value
accepts overflow events, because events with too many hits are kept for
offline analysis rather than judged by the network.

## Control over the VMEbus

The M-CARD is an A16/D16 slave. It answers only address modifiers 29h and 2Dh.
A15..A10 must be 0 and A9..A6 must equal the hex-switch card number. Double-byte
accesses get DTACK. Single-, triple- and quad-byte accesses get BERR. A5..A4
pick a unit, A3..A1 one of its 16-bit registers. The bus is treated as
synchronous to the clock.

| Address (A5..A1) | Register |
|---|---|
| 0 | M-Mode (write) / M-Status (read) |
| TU 1–3 | V_DELAY, SciFi_DELAY, SciFi_GATE PW |
| TU 4 | write: bit0 NEXT, bit1 test START, bit2 test NN_CLK; read: {BUSY, READY, T_NN_CLK, T_START} |
| PU 0,1 | LUT address (bits 15..0; bits 17..16 and table select, VL=0 / VR=1, in bit 2) |
| PU 2 | LUT data (write stores in LOAD_SRAM; read returns the addressed word) |
| PU 3 | write: start overflow fill; read bit 0: fill running |
| PU 4,5,6 | test hit-maps VL / high bits / VR (in TEST_NN: {2P,1P} of VL and VR) |
| DU 0 | bit 0: overflow condition enabled |
| DU 1 | test NN decisions (TEST_OVRALL) |
| DU 2,3 | TEST_DU logic inputs, RNA_DEC and STRB pin values |
| DU 4 | read: {RNA logic, SHOM, DEB15, NN_OR, OVR, EMPTY} |
| CU 0,1,2 | LUT address, table select (MIND=0 / HITS=1), LUT data |
| CU 3 | write: start HITS-LUT overflow fill; read bit 0: fill running |
| CU 4,5 | test distances and hit counts (TEST_OVRALL) |

Units are numbered A5..A4 = 0 TU, 1 PU, 2 DU, 3 CU. The TU's address 0 is taken
by the M-Mode register.

**M-Mode bits.** 0 LOADED, 1 WORK, 2 SINGLE_SHOT, 3 LOAD_SRAM, 4 TEST_OVRALL,
5 TEST_TU, 6 TEST_PU, 7 TEST_CU, 8 TEST_NN, 9 TEST_DU, 15 RESET.

**M-Status bits.** 9..0 the mode, 10 any test mode, 11 SYSFAIL, 12 READY, 13
BUSY.

**Safety rules.**

- LOADED cannot be set together with a TEST or LOAD mode.
- WORK needs LOADED.
- While LOADED, every register write is dropped except the TU's NEXT register
  and the M-Mode register itself. TEST and LOAD bits are ignored in that state.
- SYSFAIL (active low) is asserted while the M-CARD or any NN-CARD is not
  LOADED.

**Reset.** A board reset clears every register, and with it LOADED. It comes
from the supply monitor (`vcc_ok`), VMEbus SYSRESET, or writing the RESET bit;
the RESET bit gives a 16-tick pulse.

**Test modes.** In each mode the unit takes its inputs from test registers
instead of the detectors:

- TEST_OVRALL feeds test hit-maps, distances, counts and NN answers through the
  whole chain.
- TEST_PU and TEST_CU read the tables back.
- TEST_NN drives test positions to the NN-CARDs.
- TEST_DU stimulates and observes the decision logic and its output pins.
- TEST_TU starts sequences and pulses NN_CLK from a register.

**Loading sequence** (as used by `tb_rna_trigger`):

1. Write M-Mode = LOAD_SRAM.
2. Start the PU fill and poll until it finishes.
3. Write the 2 × 172 non-overflow hodoscope entries.
4. Write all 65536 MIND-LUT entries.
5. Start the HITS-LUT fill, then write the 126 entries whose total is at most 5.
6. Clear M-Mode, set the TU registers, then write M-Mode = LOADED | WORK.

## What is not in the RTL

- **NN-CARDs.** These are existing cards with their own trained weights, and
  their insides are not described here. The trigger only sends them patterns
  and NN_CLK and reads back NN_DEC1..4. `tb/nn_card_model.sv` is a behavioural
  stand-in used in simulation. It accepts when the SciFi positions are at most
  8 apart and the hodoscope slabs at most 6 apart. That is an arbitrary rule,
  not the real network.
- **Analog parts.** Differential-ECL receivers and drivers, terminations and
  the supply monitor are not modelled. Signals are plain logic levels, and the
  monitor is the `vcc_ok` input.
- **Crate side.** The crate, power supplies and the VMEbus CPU are not
  modelled. The testbenches act as the CPU.
- **C-CARD VMEbus readout.** The C-CARDs' own VMEbus readout is not modelled.
  A C-CARD learns its card number from a 2-bit input rather than from its VME
  address.

## Departures and own choices

These points are not fixed by the original board descriptions, or they are
resolved one way here:

- One 0.5 ns clock replaces the asynchronous ECL timing chain. Delays are exact
  to within a tick or two of logic latency. The FDR pipeline is exact to one
  5 ns step.
- The FDR-CARD collects (ORs) hits for the whole time the gate is open,
  clearing when the gate opens, and holds them afterwards.
- The register map, the M-Mode bit order, the LUT word layouts, the reset
  values and the hardware fill sequencers are this design's own.
- Position arithmetic is 8 bits wide. Only columns 1..240 exist, so C-CARD 4's
  window above its 48 wired columns always reads empty.
- In single-shot mode BUSY stays high while READY waits for NEXT.
- The three-state position bus is modelled as an AND-OR of enabled drivers; it
  reads 0 when no card is selected.

## Simulating

Everything is plain SystemVerilog-2017 and runs with Verilator 5 (two-state,
`--timing`). For example, the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rna_pkg.sv tb/tb_rna_ref_pkg.sv \
    tb/tb_rna_trigger.sv --top-module tb_rna_trigger -Mdir obj_top
obj_top/Vtb_rna_trigger
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
also has a watchdog that counts a failure if the test hangs.

| Testbench | What it shows |
|---|---|
| `tb_rna_trigger` | The full trigger at default parameters. It loads all tables over the VMEbus, then plays about 440 events built from hit lists. Each event is checked against a reference worked out from the hits alone: card selection, the four NN-PATTERNs, the NN answers, RNA_DEC, one STRB per event and the START-to-STRB time. It counts every mechanism: EMPTY, SciFi and hodoscope overflow, DEB15, SHOM, a single hit sent twice, a pair across FDR-CARDs, distance ties, VETO, START while busy, single shot, and both overflow settings. About 5 s of run time. |
| `tb_m_card` | The Master card alone with driven C-CARD and NN values. Includes the START-to-STRB latency. |
| `tb_c_card`, `tb_fdr_card` | The card algorithms against reference models. This covers corner cases: distance 14/15, a hit in the overlap only, saturation, gate edges, and delay settings 0 to 99. |
| `tb_timing_unit` | Every delay and width for several settings, VETO, single shot, the watchdog (shortened) and TEST_TU. |
| `tb_pattern_unit`, `tb_ccards_unit` | Table loading with pre-fill, WORK and all test modes. |
| `tb_decision_unit`, `tb_vme_interface`, `tb_rna_backplane`, `tb_lut_sram` | Equations, bus protocol and safety rules, wiring, and memory. |

For a feel of the size: after coarse synthesis the top is about 36,500
word-level cells and 24,600 flip-flop bits. Most of the flip-flops are the four
99-step FDR delay pipelines. The four look-up tables add 8.9 Mbit of memory.
