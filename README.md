# RISC-based ATM network interface

An ATM network interface that does its AAL5 segmentation and reassembly (SAR)
in software, on two small embedded RISC cores, instead of in a fixed-function
SAR engine. Each direction has its own core with its own local bus:

* the **reassembly unit** takes 53-byte cells from the line, finds the
  connection of each cell in a content-addressable memory (CAM), and links the
  48-byte payloads of a PDU into a list of cell slots in a Cell Reassembly
  Buffer (CRB) that the host can read;
* the **segmentation unit** takes PDUs that the host has written into a Cell
  Segmentation Buffer (CSB) and sends them to the line as cells.

In both units a DMA moves the 48-byte payloads, so the core only handles
headers, pointers and bookkeeping. The host and the cores talk through five
FIFOs, and through one interrupt line that fires only when the CRB is nearly
full. The host is never interrupted per cell.

Everything is SystemVerilog in `rtl/`. The protocol programs the cores run
are in `tb/`. They are built by a small assembler written as a SystemVerilog
class, so the test benches produce the programs and need no data files.

## Block diagram

```
             reassembly unit (REP core, 28 registers, core clock = clk/2)
 line  ┌─────┐      32-bit local bus                               host
 ────► │ RBI ├──┬──────────┬─────────┬────────┬──────────┐
 cells └─────┘  │          │         │        │          │
             ┌──┴──┐   ┌───┴───┐  ┌──┴──┐  ┌──┴───┐  ┌───┴────┐
             │ DMA │   │  CRB  │  │ CB  │  │FIFO1 ├──► signalling notices
             └─────┘   │(dual- │  │free │  │FIFO2 ├──► PDU notices
   ┌──────────┐        │ port) ├──┤slot │  │FIFO3 ◄─── new connections
   │ REP core ├─ CAM   └───────┘  │ring │  │FIFO4 ◄─── freed slots
   │ + IMEM   │                   └─────┘  │irq   ├──► host_irq
   └──────────┘                            └──────┘

             segmentation unit (SEP core, 20 registers, core clock = clk/3)
 line  ┌─────┐      32-bit local bus
 ◄──── │ SBI ├──┬──────────┬──────────┐
 cells └─────┘  │          │          │
             ┌──┴──┐   ┌───┴───┐  ┌───┴───┐
             │ DMA │   │  CSB  ◄──┤ FIFO5 ◄─── segmentation requests
             └─────┘   │(dual- │  └───────┘    (the host writes PDUs into the CSB)
   ┌──────────┐        │ port) │
   │ SEP core │        └───────┘
   │ + IMEM   │
   └──────────┘
```

`atm_ni_top` puts the two units side by side. They share only `clk` and
`rst_n`. The framer on the line side and the host on the other side are
outside the design, so their signals are ports of the top.

## How a cell is reassembled

The cell format on the line side is 13 words per cell. Word 0 is the header
`{GFC[31:28], VPI[27:20], VCI[19:4], PT[3:1], CLP[0]}`, with the HEC already
checked and removed by the framer. Words 1 to 12 are the payload. `rx_sop`
marks word 0.

1. **RBI.** The RBI holds two cells. One buffer fills from the line while the
   core works on the other. A cell that arrives while both buffers are held is
   dropped and counted in `rbi_drop_count`. The core polls the RBI status word.
2. **Connection look-up.** The key is the header with PT and CLP cleared, so
   it is the VPI/VCI. An `lcam` instruction compares the key with all CAM
   entries in one cycle. A miss returns all ones, and the cell is discarded.
3. **Free slot.** The CRB is split into slots of 13 words: 12 payload words
   and a next pointer. Slot *i* starts at word 13·(*i*+1), and a pointer of 0
   means NULL. The Circulation Buffer (CB) is a ring of free slot addresses.
   The core keeps its head and tail in registers, takes the slot at the head,
   and starts the DMA from the RBI payload to that slot.
4. **Linking.** Each CAM entry holds a Start address (first slot of the PDU
   being built) and an End address (the pointer word of its last slot). Bit 1
   of PT marks the last cell of a PDU:
   * PT end bit clear, Start = 0: **BOM**. Start := slot, End := slot+12.
   * PT end bit clear, Start ≠ 0: **COM**. The old End word is set to point at
     the slot, then End := slot+12.
   * PT end bit set, Start ≠ 0: **EOM**. The cell is linked, Start is cleared,
     and the key and Start address are pushed into FIFO2.
   * PT end bit set, Start = 0: **SSM** (a single-cell PDU). The key and the
     slot are pushed into FIFO2.

   The slot's own pointer word is always set to NULL.
5. **Signalling cells.** A cell with VCI 0 to 5 goes to FIFO1, with its key
   and slot.
6. **Host service, on every cell.** Before it starts the DMA, the core pops
   one word from FIFO3 and one from FIFO4. While the payload moves, it
   inserts the new connection into the CAM. After the transfer it appends
   the freed slot to the CB tail. It sets `host_irq` while 10% or fewer of the
   slots are free, and clears it otherwise.

The host reads a PDU by popping its key and Start address from FIFO2, then
walking the list in the CRB through its own port. It returns each slot
through FIFO4.

## How a PDU is segmented

The host writes the PDU payload into the CSB and pushes three words into
FIFO5:

1. a header template (VPI/VCI, PT = 0);
2. the CSB word address;
3. the number of cells.

For each cell, the SEP writes the DMA source and destination registers. The
payload then moves from the CSB to the SBI. The SEP then writes the header
word into the SBI, which completes the cell. The last cell's header has the
PT end bit set. The SBI holds two cells and sends one while the other fills.
A write that finds both buffers full waits on the bus.

## The RISC core

`risc_core` is a three-stage pipeline: fetch, decode/execute, write-back. It
has eleven instructions:

| op-code | instruction | operation |
|---|---|---|
| 01111 | `add d, a, b` | d = a + b |
| 00100 | `sub d, a, b` | d = a − b |
| 01110 | `addi d, a, imm16` | d = a + sign-extended imm |
| 00010 | `and d, a, imm16` | d = a & zero-extended imm |
| 00001 | `lw rt, off(base)` | rt = bus[base + off] |
| 00101 | `sw rt, off(base)` | bus[base + off] = rt |
| 00110 / 01000 / 00011 | `beq / bge / ble a, b-or-imm8, label` | signed compare, branch to a 12-bit absolute label |
| 01100 | `lcam d, key` (S bit: Start or End) | d = address from the matching entry, or all ones on a miss |
| 00111 | `stcam key, data` (S, L bits) | insert key, write Start, or write End |

The bit layout of each format is listed in `rtl/atm_ni_pkg.sv`. Points that
matter when writing programs:

* **Forwarding is chosen by the program, not detected by the hardware.** ALU
  and branch instructions carry an F bit (bit 26). When F = 1, a source
  register equal to the destination of the instruction in write-back takes
  the new value. When F = 0, the register file's old value is read: there is
  no write-through. Loads, stores and CAM instructions have no F bit. A
  source written by the instruction just before one of them is a hazard, so
  the program must place another instruction in between. The assembler
  (`tb/ni_asm_pkg.sv`) sets F automatically and counts unforwardable hazards.
  The test benches require that count to be zero.
* **One branch-delay slot.** The instruction after a branch always executes.
* **Bus waits.** Loads and stores wait while the DMA owns the bus, or while
  the SBI cannot take a write. Instructions that do not use the bus continue
  during a DMA transfer, so the program can do its CAM and pointer work while
  the payload moves.
* **Register 0** reads zero. The reassembly core has 28 registers and the
  segmentation core has 20.

### Clocking

There is one clock, `clk`, at the DMA rate. Each unit divides it into a core
clock enable: by `CLK_RATIO` = 2 for reassembly and 3 for segmentation. This
matches a DMA at two or three times the core clock, for example 170 MHz with
an 85 MHz REP, or 210 MHz with a 70 MHz SEP.

The DMA moves one word every two clocks: a read cycle, then a write cycle. A
12-word payload therefore takes 24 clocks, which is 12 REP cycles or 8 SEP
cycles. Bus read data arrive one clock after the request, and the core holds
them until its next enabled cycle.

### Local bus map

Word addresses are 20 bits. The region is in bits 19:16.

| region | reassembly unit | segmentation unit |
|---|---|---|
| 0 | CRB | CSB |
| 1 | RBI: words 0-12 cell, 15 status (read 1 = cell held; write = release) | SBI: words 1-12 payload, 0 header (completes the cell), 15 status (1 = buffer free) |
| 2 | CB | – |
| 3 | 0 FIFO1 push, 1 FIFO2 push, 2 FIFO3 pop, 3 FIFO4 pop, 5 host interrupt (bit 0) | 4 FIFO5 pop |
| 4 | DMA: 0 source, 1 destination (a write starts the transfer), 2 length (resets to 12) | same |

A pop from an empty FIFO reads 0. The programs use 0 to mean "nothing there".

## Performance against the reference figures

The reference design quotes an 85 MHz reassembly core with a DMA at twice its
clock for 1.2 Gb/s, and a 68-70 MHz segmentation core with a DMA at three
times its clock for 2.4 Gb/s. The cell times are:

* 353 ns at 1.2 Gb/s, which is 30 REP cycles at 85 MHz;
* 177 ns at 2.4 Gb/s, which is 12 SEP cycles at 68 MHz.

Measured in simulation with the programs in `tb/ni_fw_pkg.sv`:

* **Segmentation: 12 core cycles per cell.** That is 7 instructions plus the
  wait for the DMA. It just meets 2.4 Gb/s at 68 MHz, with 3% margin at
  70 MHz.
* **Reassembly: 40 core cycles per single-cell PDU**, measured with cells
  waiting in the RBI. The program does its CAM and register work while the
  DMA moves the payload. That covers 622 Mb/s at 85 MHz (58 cycles available)
  but not 1.2 Gb/s. The reference counts about 26 instructions per cell.
  This program is longer for two reasons:
  * it serves FIFO3, FIFO4 and the interrupt threshold unconditionally on
    every cell;
  * it writes each slot's NULL pointer after the DMA has finished.

  The hardware does not set this limit. A tighter program, for example one
  that polls FIFO3/FIFO4 only every few cells, would run on the same RTL.

Buffer sizes at the defaults:

* CRB: 65536 words (256 KB), which gives 5040 slots.
* CSB: 49152 words, enough for three 64 KB PDUs.
* CB: 8192 entries.
* CAM: 64 connections.
* FIFOs: 16 words each.

Four 64 KB PDUs do not fit in the CRB at once: they need 5462 slots of 13
words.

## Simulating

The test benches need only Verilator 5 (`--binary --timing`). Files are
found by module name, so one command pattern works for every bench:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/atm_ni_pkg.sv tb/ni_asm_pkg.sv tb/ni_fw_pkg.sv tb/tb_atm_ni_top.sv \
    --top-module tb_atm_ni_top --Mdir obj_top -o sim
./obj_top/sim +verilator+rand+reset+2
```

Each bench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The `+verilator+rand+reset+2` option starts uninitialised state at
random values. Reset and program initialisation must cover everything that
is read, and the benches pass under this option.

| bench | what it does |
|---|---|
| `tb_atm_ni_top` | Whole interface at the default sizes. Loads both programs and opens three connections through FIFO3. Runs signalling cells, cells of an unknown connection, two interleaved multi-cell PDUs, an SSM, a burst that overruns the RBI, a 4600-cell PDU that drives the free-slot count below the interrupt threshold, and the host returning slots until the interrupt clears. A last phase leaves FIFO2 unread until it fills, so the REP stalls on the full FIFO. At the same time it segments PDUs of 1, 3 and 10 cells into a line with random back-pressure. Checks every payload word and every notice. Counts each mechanism (BOM, COM, EOM, SSM, lost cell, signalling, RBI drop, forwarding, bus stall, taken branch, DMA, interrupt set and cleared, slot returned) and fails if any never happened. Runs in about a second. |
| `tb_reassembly_unit` | Reassembly unit with a smaller CRB and CB. Checks the linked lists, the CB head, the CAM contents, a 24-clock DMA transfer, and the REP's cycles per cell with a saturated RBI. |
| `tb_segmentation_unit` | Segmentation unit at the default sizes. Checks line cells against the PDUs and the SEP's cycles per cell. |
| `tb_risc_core` | Core alone with a random clock enable and a random bus ready. Runs every instruction, forwarded and stale operands, the delay slot, loops, signed compares, a load forwarded into the next instruction, and CAM instructions including a miss. |
| `tb_cam`, `tb_dma`, `tb_rbi`, `tb_sbi`, `tb_sync_fifo`, `tb_dp_ram`, `tb_regfile`, `tb_inst_mem` | Leaf blocks against reference models. |

To write your own program, create an `ni_asm`, call its methods (`add`,
`addi`, `lw`, `beq`, `lcam_start`, `cam_wr_end`, `label`, ...) inside the
two-pass loop shown in `ni_fw_pkg`, and write `code[]` into the instruction
memory through `rep_prog_we` / `sep_prog_we` while `rst_n` is low.

## Where this implementation makes its own choices

The three-stage pipeline, the eleven op-codes, the F-bit forwarding and
delay-slot scheduling, the CAM with a Start and an End address per
connection, the circulation buffer of free slots, the five FIFOs and their
roles, the two-cell RBI and SBI, the 13-word slot, the two-clock DMA word
transfer, and the 256 KB / 3 × 64 KB buffer sizes all follow the reference
design. The following are this implementation's own choices:

* the bit layout of the branch instruction (8-bit immediate, M bit, 12-bit
  label);
* signed compares, sign-extended `addi` and zero-extended `and`;
* all ones returned by `lcam` on a miss;
* the S/L bit encoding of the CAM instructions;
* the local-bus map and all status and release words;
* the 13-word line interface in place of a serial one;
* the FIFO5 request format;
* the single clock with clock enables in place of separate core and DMA
  clocks;
* the CAM size (64), FIFO depth (16), CB size (8192) and instruction memory
  size (4096);
* which VCIs count as signalling (0 to 5);
* the protocol programs themselves.

The segmentation unit has no CAM: the segmentation program needs no
connection look-up. The interface does not remove connections from the CAM,
because the reference design does not do so either.

Only AAL5 is built. The reference design also runs AAL3/4, where each cell
carries a 2-byte SAR header (segment type, sequence number, 10-bit message
ID) and a 2-byte trailer around a 44-byte body, and a slot is 12 words (11
payload words and the pointer). The reference loads the ATM header, the AAL
header and the AAL trailer as three separate words and moves an 11-word body
by DMA (22 DMA cycles). That word layout does not fit the 13-word line
buffers here, and the AAL3/4 programs (26-bit VCI-MID key, trailer length
field) are not written. The DMA length register already accepts 11 words.

## Files

* `rtl/atm_ni_pkg.sv`: op-codes, CAM commands, bus type, address map.
* `rtl/atm_ni_top.sv`: the two units side by side.
* `rtl/reassembly_unit.sv`, `rtl/segmentation_unit.sv`: core, DMA, memories,
  line buffer and FIFOs on each local bus.
* `rtl/risc_core.sv`, `rtl/regfile.sv`, `rtl/inst_mem.sv`: the processor.
* `rtl/cam.sv`, `rtl/dma.sv`, `rtl/rbi.sv`, `rtl/sbi.sv`, `rtl/sync_fifo.sv`,
  `rtl/dp_ram.sv`: the other blocks. `dp_ram` serves as the CRB, CSB and CB.
* `tb/ni_asm_pkg.sv`: the assembler. `tb/ni_fw_pkg.sv`: the AAL5 programs.
  `tb/tb_*.sv`: the test benches.
