# IPP: Input Port Processor for a gigabit ATM switch

The Input Port Processor (IPP) is the chip at the entrance of one switch port. It
takes ATM cells from two sources. One is the incoming link, 16 or 32 bits wide and
running on the link's own strobes. The other is the recycling path from the port's
Output Port Processor (OPP), which has its own clock. The IPP translates each cell's
VPI/VCI and passes the cell to the switch fabric through four 8-bit bit-sliced Switch
Element (SE) ports.

The main idea is that **a cell is written once and never moves**. Each arriving cell
goes straight into a 64-cell store. From then on, only a 35-bit descriptor travels
through the chip: a pointer into the store, the cell's VPI/VCI, and a few flag bits.
The descriptor passes through the queues, the arbiter and the translator. When the
cell is finally sent, the payload is read back from the store word by word, timed to
the switch's cell clock. The slot is freed only after the SE has accepted the cell.
If the SE refuses it, the cell is simply sent again in the next cell time.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for every part of
the chip whose function is known. Each part has a self-checking testbench, and an
end-to-end testbench drives the whole chip at its real sizes.

```
link ──► rfrm_dskw ─► dual-clock FIFO ─► rfrm ──┐
 (STRB_L/STRB_H domain)                         ▼
                                       cstr (cell store, 64 × 16 words) ◄──────────────┐
OPP ──► mreg_dskw ─► mreg ──────────────────────┤                                      │ read
 (CLK_OPP domain)    │                          ▼                                      │
                     └──► cycb (16 data + 2 control)     rcb (32 descriptors)          │
                              └────► arbiter ◄───────────────┘                         │
                                        ▼                                              │
                                       rcv ─► vxt (translation, holding area) ─► rfmt_sgen ─► 4 × SE slice
                                                                       ▲                      │
                                                                       └────── GRANT_SE ◄─────┘
```

## Cell time and phase

All core logic runs on CLK. A cell is 16 words of 32 bits, one word per CLK, so a
cell time is 16 CLK periods. CELL_CLK is high for one CLK in every 16.
`core_sync` counts a phase `ph` (0..15). `ph` is 0 in the cycle after the edge that
samples CELL_CLK high. Every block schedules its work on `ph`:

| ph | what happens |
|----|--------------|
| 7 → 8 edge | GRANT_SE is sampled, answering the cell currently on the SE ports |
| 9 | the arbiter picks the next descriptor for the translator (`CC_DEC_PH`) |
| 10–12 | translation-table lookups |
| 13 | RESET and CLR_ERR pins sampled (two edges before the CELL_CLK edge) |
| 15 → 0 edge | status flags and test pins update; sampled reset takes effect |

RESET and CLR_ERR act only at cell boundaries, so every block is in or out of reset
for whole cell times.

**C_CLK_TAP** moves the outgoing cell within the cell time. With tap 0, word 0 is on
the SE pins in the cycle after the CELL_CLK edge. Each tap step delays it by one CLK.
Word k is loaded at the edge that ends `ph == (tap + k) mod 16`. The store read for
that word is issued one cycle earlier. The cell waiting in the translator is taken
when word 0's read is issued (`tx_start`). That cycle moves with the tap.

## Link receive path (`rfrm_dskw`, `rfrm`)

In 32-bit mode the link's two 16-bit halves have separate strobes and separate SOC
(start-of-cell) bits. Their skew is unknown. `rfrm_dskw` captures the upper half on
its own strobe and re-registers it on the lower strobe. It then passes the upper half
through a delay line of `DSKW_DEPTH` (4) stages. With D_SKEW_LINK set, the stage
selection *hunts*: every lower SOC that has no upper SOC beside it steps the delay
by one stage. This continues until the two SOCs line up. Lock is reported when SOCs
arrive every 16 words and, in 32-bit mode, coincide. In 16-bit mode
(WIDTH_LINK = 0), the lower half carries everything. Two half-words make a word, the
upper half first.

The word stream crosses into CLK through a Gray-pointer dual-clock FIFO. `rfrm` then
frames cells and writes each word directly into the slot that the cell store has
reserved. After the last word it checks the cell and either commits the slot or
leaves it for reuse:

- **HEC**: word 1 bits 31:24 must be the CRC-8 of the header (x⁸+x²+x+1, XOR 0x55).
  A failure raises BADHEC.
- **Unassigned** cells (VPI 0, VCI 0) are link idle fill. They are dropped silently.
- **Control cells** (VPI 0, VCI 32) are dropped and counted as BADCELL when CTRL_EN
  is low.
- All cells are dropped while the hardware link enable (HLE) or the software link
  enable (SLE) is low. HLE rises once the link has been up for HRENT cell times.
  SLETIMEOUT pulses if HLE rises after more than SCLT cell times down.

The cell layout is 16 words with the ATM UNI header in word 0: GFC 31:28, VPI 27:20,
VCI 19:4, PTI 3:1, CLP 0. The HEC sits in word 1's top byte.

## Recycling path (`mreg_dskw`, `mreg`)

The OPP sends one 32-bit word per CLK_OPP with SOC_OPP and an odd parity bit
PARI_OPP. These are captured on the **falling** edge of CLK_OPP. They are moved into
CLK through a 16-entry dual-clock FIFO, which starts reading once it is a quarter
full. The FIFO absorbs the phase difference and small frequency offsets.
`mreg_dskw` flags words with bad parity. `mreg` writes recycled cells into the
store's second reserved slot. It sends the descriptor to the recycling buffer's
control queue or data queue. A recycled cell is discarded if any of these hold:
- one of its words had a parity error;
- it is an idle cell (VPI 0, VCI 0);
- its target queue is full;
- for data cells only, the recycling link enable RLE is off.

SOC_MREG marks the last word of every recycled cell. REQ_MREG marks the kept ones.

## Cell store and pointers (`cstr`)

One RAM holds 64 cells × 16 words, addressed by {pointer, word}. The free list is a
64-bit bitmap. The link side always holds one reserved slot, taken from the lowest
free pointer. The recycling side holds one taken from the highest free pointer. A
writer fills its slot and commits it with a one-cycle request. It then reserves the
next slot. A cell that is dropped is never committed, so its slot is reused. Pointers
return to the bitmap in two cases:
- the RCB discards a descriptor;
- the translator releases a cell that was sent and granted, or that it dropped.

PTRAVAIL_M_T goes low if a writer ever finds the list empty. It stays low until
RESET or CLR_ERR. When the chip is idle, 62 pointers are free: 64 minus the two
reserved slots.

The descriptor (`ipp_pkg::desc_t`) is `{valid, ccd[3:0], vxi[23:0], ptr[5:0]}`.
`ccd` is {control-cell flag, PTI}, and `vxi` is {VPI, VCI}.

## Queues and arbitration (`rcb`, `cycb`, `rcv`)

**RCB** queues link-cell descriptors, 32 deep. The depth follows from the chip's cell
budget: 64 cells = 16 + 2 recycled + 32 link + slots in transit. The queue applies
two discard rules:
- a CLP=1 cell is dropped while the queue holds more than RCBDISTHR cells (OVF1);
- any cell is dropped when the queue is full (OVF0 for CLP=0).

CONG is high for each cell time in which the queue was over the threshold.

**CYCB** holds recycled descriptors: 16 data and 2 control. Once per cell time, at
`ph == 9`, it decides what the translator receives, if the translator's holding
area is empty. Control cells go first, then recycled data, then the RCB's head.
**RCV** is the registered multiplexer that hands the chosen descriptor to the
translator.

## Translation and the holding area (`vxt`)

The translation table has 1024 32-bit entries, each `{CS[1:0], VPT, route[4:0],
VXI_out[23:0]}`. The first VPCOUNT entries are indexed by VPI (virtual-path entries).
The rest are indexed by VPCOUNT + VCI (virtual-circuit entries). A data cell is
handled as follows:

- If VPI ≥ VPCOUNT, the cell is dropped and VXIOR is raised.
- If the VP entry has VPT set, the VC entry is used. The new VPI and VCI both come
  from the VC entry. If VCI ≥ 1024 − VPCOUNT, the cell is dropped with VXIOR.
- If VPT is clear, only the VPI is replaced, and the VCI passes through.
- If the entry's CS field is 0 and the RCB was congested within the
  last RCBDISHD cell times, the cell is dropped and CS0_DISC is raised.

Control cells bypass the table.

The outgoing header keeps the cell's PTI and puts the 5-bit route in the GFC
position: `{route, PTI, VXI_out}`. A kept cell waits in the holding area until it has
been sent and GRANT_SE said yes. Then its pointer is released. Without a grant it is
sent again in the next cell time. While the area is full, the arbiter passes nothing,
so the queues absorb the backpressure.

## Toward the switch elements (`rfmt_sgen`)

Each cell time, one cell goes out: either the held cell or an idle cell of zeros.
Word 0 is the translated header. Words 1–15 are read from the store. The 32-bit word
is cut into four bytes, slice i = bits 8i+7..8i. Each slice carries a copy of the
same four control bits, `{last word, control cell, first word, busy}`. It also
carries an odd parity bit over its 8 data and 4 control bits. ALL0, ALL1 and
ALL0BUT1 watch the store's read bus, which helps with RAM testing.

## Reset request and clear error (`resetreq_clrerr`)

RESET_REQ and CLR_ERR are open-drain pins. The ports `*_pd` mean "pull the pad low".
A RESET_REQ command holds the pin until the RESET pin falls, which releases it at
once, without waiting for a clock. A CLR_ERR command holds the pin for 255 cell
times. The chip also reads the CLR_ERR pad back as an input (through `core_sync`),
so any chip on the shared line clears errors in all of them. Both
commands work only with CTRL_EN high.

## Test pins

TEST_IPP<49:0> brings internal signals out in the chip's pin order:
- 0–2: deskew SOCs and lock;
- 3–10: link receiver;
- 11–18: cell store;
- 19–23: RCB;
- 24–30: recycling path;
- 31–33: CYCB;
- 34–44: translator.

Pins 45–49 are tied low. The exact assignment is listed in `rtl/ipp_top.sv`.

## What is not here

- **Maintenance register.** The chip has a register block that decodes control
  cells into register writes, counters and commands. Its layout and command format
  are not specified. So the top level takes its outputs as inputs: SLE, RLE, HRENT,
  SCLT, RCBDISTHR, VPCOUNT, RCBDISHD, the table write port
  (`tbl_we/tbl_addr/tbl_wdata`), and the RESET_REQ/CLR_ERR commands.
- **BADSIGCELL** needs a cell-type table that is not specified. It stays low.
- **BIST.** BIST_CLK, BIST_TEST and QUIK_TEST are accepted and ignored, and
  BIST_RES is 0. TYPE_LINK is ignored.
- **Clock trees, pads, power and the package** have no logic function here.
- **Timestamps.** Timestamp inputs of the recycling path are not used.

## Design choices and departures

The chip's signal description gives pins, internal signal names, test-pin meanings,
sizes (64 cells, 16/2 recycled descriptors, 4 slices, 255-cell CLR_ERR) and the
sampling edges. It says what most blocks do, not how. The following are this
design's own choices:

- The ATM header placement and HEC. The HEC is the standard ATM CRC-8.
- The 16-bit half-word order.
- The RCB depth of 32 (derived from the cell budget).
- The deskew delay-line depth of 4 and its lock rule.
- The free-list bitmap and slot reservation.
- The control-before-recycled-before-link priority and the decision at `ph 9`.
- The translation entry layout and VC indexing (VPCOUNT + VCI).
- The meaning of the four SE control bits. Idle SE cells are all zeros.
- Dropping cells while the link is disabled.
- Dropping recycled cells with bad parity and recycled idle cells.
- The OPP FIFO depth and start level.
- The link status pins (REQ_RFRM etc.) are in the CLK domain, behind the link FIFO,
  not in the link-strobe domain.
- CLR_ERR is held for 255 cell times. This also satisfies the "at least 32" wording
  elsewhere in the description.

Each RTL file's opening comment says which parts of that block follow the
description and which are choices.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb \
          rtl/ipp_pkg.sv tb/ipp_top_tb.sv --top-module ipp_top_tb -Mdir obj_top
./obj_top/Vipp_top_tb
```

Replace `ipp_top_tb` with any `<block>_tb` to test one block.

`ipp_top_tb` runs the whole chip at its default sizes for about 1,900 cell times,
with CLK at its top rate of 120 MHz. It takes a few seconds. The link runs at
40 MHz and 32 bits, with the upper half three strobes ahead, so the deskew must
hunt. The OPP path runs at the core rate
with an unrelated phase. The testbench sends:
- tagged cells;
- cells with a bad HEC;
- control cells;
- cells out of VPI/VCI range;
- cells with CS 0;
- recycled data and control cells, some with parity errors;
- idle cells.

The SE model rebuilds each cell from the four slices. It checks parity, the copies
of the control bits, the first-word position against CC_TAP, the translated header
(against its own model of the table) and every payload word. It refuses grants at
random. It also runs a long stretch with no grants, which forces:
- congestion;
- both RCB overflow kinds;
- CS 0 discards;
- full recycling queues.

It then switches CTRL_EN, SLE and RLE off in turn and takes the link down for a
while. Cells sent during those windows must not come out, and BADCELL and
SLETIMEOUT must pulse.

The run then checks:
- every cell sent in a quiet period came out exactly once;
- refused cells were sent again;
- all 62 free pointers came back after the traffic drained;
- the RESET_REQ and CLR_ERR commands behave correctly.

It ends with a second reset into 16-bit link mode with CC_TAP = 3. Each tracked
mechanism must have happened at least once.

## Files

| file | contents |
|------|----------|
| `rtl/ipp_pkg.sv` | sizes, descriptor type, header field helpers, HEC function |
| `rtl/ipp_top.sv` | the chip |
| `rtl/core_sync.sv` | cell phase, RESET/CLR_ERR sampling |
| `rtl/rfrm_dskw.sv`, `rtl/rfrm.sv` | link input, deskew, framing, checks |
| `rtl/mreg_dskw.sv`, `rtl/mreg.sv` | recycling-path input and cell handling |
| `rtl/cstr.sv` | cell store and free list |
| `rtl/rcb.sv`, `rtl/cycb.sv`, `rtl/rcv.sv` | descriptor queues and arbitration |
| `rtl/vxt.sv` | translation table and holding area |
| `rtl/rfmt_sgen.sv` | SE output slicing, timing, grant sampling |
| `rtl/resetreq_clrerr.sv` | open-drain RESET_REQ / CLR_ERR control |
| `rtl/async_fifo.sv`, `rtl/sync_fifo.sv`, `rtl/sync2.sv` | generic FIFOs and synchroniser |
| `tb/*_tb.sv` | one testbench per block, plus `ipp_top_tb.sv` end to end |
