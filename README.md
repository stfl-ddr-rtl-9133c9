# STFL signalling for a DRAM channel and last-level-cache buses

Low-power wires (unterminated, low-swing) are cheap in energy but slow to
*change* level: a wire that flips in every bit slot needs the slow clock of an
LPDDR3-class interface. STFL — *slow transition, fast level* — keeps the fast
bit clock anyway and simply never asks a wire to flip twice in a row:

* a data bit 1 is sent as a **flip** of the wire level, a 0 as **no flip**;
* every 1 is followed by a **dummy 0** slot, so flips are at least two slots
  apart (half the bit rate, which the slow wire can follow);
* an encoder makes sure no byte carries more than **four 1s**, so a byte always
  fits in 8 + 4 = **12 bit slots**.

At a 1600 MHz double-data-rate reference, 12 slots are 6 clock cycles: 8 bits
per 6 cycles is about the bandwidth of a 1066 MHz DDR4 interface, while the
data wires have the energy of LPDDR3 wires and no termination current.
Encoding further lowers the number of 1s, and every 1 saved is a flip saved.

This repository holds synthesizable SystemVerilog for two applications of the
idea, both inside one top module `stfl_top`:

* **STFL-DDR**: the data interface between a memory controller and an 8-chip
  DIMM. Each chip has eight low-power data wires and one high-performance
  *mode* wire.
* **STFL-LLC**: the data buses between a last-level cache controller and its
  mats. Every 4 bytes share one low-power mode wire.

## One byte on one wire

`stfl_tx_lane` / `stfl_rx_lane`, shared by both applications.

```
 codeword (MSB first)   0   0   1   1
 slot stream            0   0   1   D   1   D   0   0   0   0   0   0   (12 slots)
 wire level          ___________/‾‾‾‾‾‾‾\___________________________
```

Transmitter: the codeword sits in a parallel-in/serial-out shift register. A
*delay injector* flip-flop holds the bit sent in the last slot; when that bit
was a 1 the shift is held and a 0 is sent. A *transition generator* (level
flip-flop and XOR) flips the wire for every 1. Slots left after the last data
bit are padded with 0s, so every burst is exactly 12 slots.

Receiver: a *transition detector* (previous-level flip-flop and XOR) turns each
flip into a 1. The detected bit feeds a serial-in/parallel-out shift register
and also pauses that register for the next slot, which drops the dummy. After
eight data bits the register stops, ignoring the padding. A flip inside a
dummy slot sets the sticky `dummy_err`.

A codeword can never end in a 1 in slot 12 (with at most four 1s, the last
data bit lands in slot 11 at the latest), so bursts can follow each other with
no gap and no risk of two adjacent flips across the boundary.

## STFL-DDR: coding an 8×8 array

Per burst, a chip moves 64 bits, seen as an 8×8 array: **row r = byte r =
data wire r**, column c = bit c of every byte. Coding has two phases:

1. **Columns** (`stfl_ddr_encoder`). The columns form four pairs (7,6), (5,4),
   (3,2), (1,0). For each pair, the two columns are XORed row by row; if the
   result has more than four 1s, the *left* column of the pair (the odd, higher
   bit) is inverted in all rows and the pair's **vertical** mode bit is set.
   This makes neighbouring columns alike, so rows tend to become mostly 0s or
   mostly 1s.
2. **Rows** (inside each `stfl_ddr_tx`). A population counter weighs the byte;
   above four 1s it is inverted and its **horizontal** mode bit is set. This
   step is what guarantees at most four 1s per wire.

The 12 mode bits `{horizontal[7:0], vertical[3:0]}` are sent MSB first on the
mode wire in the same 12 slots, as plain levels (the mode wire is a
DDR4-style pseudo-open-drain wire, not an STFL wire). The receiving side
(`stfl_ddr_rx`, `stfl_ddr_decoder`) undoes the row inversions with the
horizontal bits and then the column inversions with the vertical bits.

`stfl_ddr_endpoint` is one chip's end of the link: encoder, 8 transmitters,
8 receivers, mode-wire transmitter and receiver, decoder. The same endpoint is
used on the controller side and in the DRAM chip.

### Shared wires and turnaround

The data and mode wires carry writes and reads. Each transmitter raises `oe`
from its start edge until one cycle after its last slot; `stfl_top` lets the
end with `oe` high drive the wire. While idle, a transmitter's level register
copies the wire level, so when it starts it continues from whatever level the
other end left behind: no spurious flip appears when the direction changes,
and write and read bursts can alternate with no gap.

### Controller and DIMM sequencer

`stfl_ddr_ctrl` (controller side) takes one 64-byte line request at a time
(valid/ready). Chip k carries bytes 8k..8k+7. A request accepted at edge E:

| edge | controller side | DIMM side (`stfl_ddr_dimm_seq`) |
|------|-----------------|---------------------------------|
| E    | command registered (`cmd_valid/we/addr`) | |
| E+1  | `tx_start` (write) or `rx_start` (read) registered | sees command; for a read, reads the DRAM core (`mem_rd_*`, combinational answer) |
| E+2  | first slot on the wires, both ends start | |
| E+13 | last slot | |
| E+14 | receivers done | write: line and address to the DRAM core (`mem_wr_*`) |
| E+15 | read data on `resp_rdata` | |

A new request is taken every 12 cycles. A read that follows a write is held 3
extra cycles (`WTR_GAP`) so that the written line has reached the core before
the read looks it up; the stall cycles are counted in `n_wtr_stalls`.
`n_writes`, `n_reads` and `n_turnarounds` count bursts and direction changes.

`stfl_clk_div` divides the interface clock by 2 (the 800 MHz reference of the
low-power data wires) and is brought out as `data_ref_clk` / `data_ref_tick`.

## STFL-LLC: coding a cache block

A 64-byte block is cut into 16 groups of 4 bytes. Each byte has its own data
wire; each group has one low-power mode wire (80 wires per direction).

`stfl_llc_byte_encoder` picks one of three codewords for a byte α, with β its
right-hand neighbour in the group (`stfl_llc_group_encoder`; for the rightmost
byte, β is the constant `01010101`):

| condition (Φ = number of 1s)        | codeword | mode |
|-------------------------------------|----------|------|
| Φ(α) ≤ 4 and Φ(α⊕β) < Φ(α)           | α⊕β      | 1D0  |
| Φ(α) ≤ 4 otherwise                   | α        | 000  |
| Φ(α) > 4 and Φ(α⊕β) ≥ Φ(¬α)          | ¬α       | 01D  |
| Φ(α) > 4 otherwise                   | α⊕β      | 1D0  |

Every codeword has at most four 1s. The three-bit mode patterns already
separate their 1s, so the group's 12 mode bits (byte 0's mode first) go out on
the mode wire with transition signalling and **no** dummy insertion
(`stfl_mode_tx` with `TRANSITION = 1`). `stfl_llc_group_decoder` decodes from
the rightmost byte leftwards, each XOR-mode byte against its already decoded
neighbour; the XOR chain is at most four bytes long.

`stfl_llc_link` is one direction of the bus: transmission buffer, 16 group
encoders, 64 data-wire and 16 mode-wire transmitters and receivers, 16 group
decoders, reception buffer. A block accepted at edge E starts at E+1 and is on
`out_data` after edge E+14; one block is taken every 12 cycles. `stfl_top` has
two links, controller-to-mats (`llc_wr_*`) and mats-to-controller (`llc_rd_*`).

## Module map

```
stfl_top
├── stfl_ddr_ctrl                  controller-side sequencer
├── stfl_ddr_dimm_seq              DIMM-side sequencer, DRAM core handshake
├── stfl_ddr_endpoint ×8 (controller side) and ×8 (DIMM side)
│   ├── stfl_ddr_encoder           column phase
│   ├── stfl_ddr_tx ×8             row inversion + stfl_tx_lane
│   ├── stfl_ddr_rx ×8             stfl_rx_lane + row de-inversion
│   ├── stfl_mode_tx / stfl_mode_rx (level signalling)
│   └── stfl_ddr_decoder           column de-inversion
├── stfl_clk_div                   divide-by-2 reference
└── stfl_llc_link ×2
    ├── stfl_llc_group_encoder ×16 (stfl_llc_byte_encoder ×4)
    ├── stfl_tx_lane / stfl_rx_lane ×64
    ├── stfl_mode_tx / stfl_mode_rx ×16 (transition signalling)
    └── stfl_llc_group_decoder ×16
stfl_pkg                           slot count, LLC modes, popcount
```

Parameters of `stfl_top`: `NCHIPS` (8), `ADDR_W` (32), `BLOCK_BYTES` (64),
`GROUP_BYTES` (4). The burst length (12 slots) and the four-1s limit are
package constants; they are tied to the 8-bit codeword.

## Timing model

One clock cycle of this RTL is one **bit slot**. A 1600 MHz double-data-rate
interface has two slots per clock, so 12 RTL cycles equal the 6 DDR cycles of
one burst. Capturing on both edges belongs to the I/O circuits, which are not
part of this RTL. All logic is on one clock with an active-low asynchronous
reset; after reset every wire is at level 0.

## What is not here

These parts have no digital description to build from and are outside the
RTL: the analog I/O (unterminated data-wire drivers, pseudo-open-drain mode
drivers, on-die termination), the full-swing/low-swing level converters of the
cache wires, the H-tree signal re-generators, PLL/DLL clock recovery, the DRAM
arrays and their bank timing (tRCD, tCL, …), the cache arrays and the
processor cores. Wires are ideal: a level written in one cycle is seen by the
far end in the next.

## Choices made here

The coding rules, the burst length, the wire counts and the block structure
follow the published STFL-DDR/STFL-LLC scheme. The following are choices of
this implementation:

* MSB-first bit order on every wire; one RTL cycle per slot.
* The level-holding element of each transition generator is an edge-triggered
  flip-flop (a latch in the usual description), so the whole design is on one
  clock edge.
* Receivers learn where a burst starts from a `start` strobe on the same edge
  as the far-end transmitter's start (both ends share one reference clock).
* In the DDR column phase the "left" column of a pair is the higher bit;
  pairs are disjoint; the mode word is `{horizontal, vertical}`.
* The DDR mode wire uses level signalling.
* The STFL-LLC table as usually stated sends a byte with more than four 1s
  unchanged when α⊕β is lighter than ¬α; that would break the four-1s limit,
  so here such a byte is sent as α⊕β (last row of the table above).
* The controller's handshake, the command timing, the 3-cycle write-to-read
  hold and the DIMM-side sequencer are this design's own; the source names a
  controller but does not describe it.
* The DDR decoder (not described in the source) is the direct inverse of the
  encoder.
* `dummy_err` and the LLC `mode_err` / `err` flags are additions for checking.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that compares
against reference models written independently in `tb/tb_stfl_ref_pkg.sv`
(slot stream of a codeword, both DDR coding phases, LLC mode choice) and
prints `TB_RESULT checks=N failures=M`. Highlights:

* lanes: every slot of ≈300 random bursts, back to back and with gaps; the
  12-cycle burst and receive latency; a flip in a dummy slot is flagged;
* DDR endpoint: two endpoints on shared wires, random directions: flips per
  wire equal the 1s of the reference coding, mode levels per slot;
* LLC byte encoder: all 65 536 (α, β) pairs;
* `tb_stfl_top`: the full-size design (no parameter overrides) with a
  behavioural DRAM core; 120 mixed line reads/writes back to back plus 60
  blocks on each LLC bus. It checks data, latencies, that no data wire ever
  flips in two consecutive cycles and that wire flips equal transmitted 1s,
  and it requires each mechanism to occur: column inversion, row inversion,
  dummy slots, back-to-back bursts, turnarounds, write-to-read holds, all
  three LLC modes, both LLC buses and the divided clock.

Two workload testbenches measure the wire activity against a binary bus that
sends one 1 per set bit. Only the data wires are counted; the mode wires are
extra. They check the flip counts against the reference
coding, not against figures from the source:

| data (synthetic)              | binary 1s/byte | STFL-DDR flips/byte | STFL-LLC flips/byte |
|-------------------------------|---------------:|--------------------:|--------------------:|
| random                        | 4.00           | 2.75                | 2.67                |
| sparse (small ints, 1/3 zero) | 1.44           | 1.49                | 1.26                |
| 64-bit floats, similar size   | 3.50           | 2.66                | 2.48                |

(`tb_stfl_ddr_traffic`, 2000 64-byte lines per profile, and
`tb_stfl_llc_traffic`, 300 blocks per profile, which also counts the modes
chosen.) On sparse data STFL-DDR costs slightly more than binary. The column
phase inverts a column pair by its XOR, not by its own weight, so a few
light lines get an extra 1 or two. The row phase can only make rows lighter.
STFL-LLC never costs more than binary: each mode it picks is at most as heavy
as the original byte.

To run one with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/stfl_pkg.sv tb/tb_stfl_ref_pkg.sv \
  tb/tb_stfl_top.sv --top-module tb_stfl_top -o sim
./obj_dir/sim
```

`tb_stfl_top` builds in under a minute and runs in a few seconds; the unit
testbenches are faster still. Lint: `verilator --lint-only -Wall -y rtl
rtl/stfl_pkg.sv rtl/stfl_top.sv`. The remaining lint warnings are unused
status outputs of the lanes inside `stfl_llc_link` and the assertion's use of
the reset.
