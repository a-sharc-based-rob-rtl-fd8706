# CRUSH ROBIn buffer logic

A read-out buffer input (ROBIn) has one job in a trigger/DAQ chain: accept every
event fragment that arrives over its read-out link, keep it until the trigger has
decided about the event, and then either send it on or throw it away. The CRUSH
("Compact ROBIn Using a SHARC") board splits that job between hardware and a SHARC
DSP. Hardware in an FPGA writes the fragment data, word after word, into a large
ring buffer at link speed. The processor never touches that bulk data on the way
in. For each fragment the FPGA hands it only a short **event summary**: a few
selected words of the fragment plus the address where the fragment starts in the
buffer. The software keeps its bookkeeping from these summaries. It reads a
fragment out of the buffer only when a region-of-interest request or an accept
asks for it.

This repository holds synthesizable SystemVerilog for the hardware side of that
board:

- the S-link input FIFO;
- the FPGA logic:
  - summary extraction;
  - write-address generation;
  - the paged summary FIFO;
  - control/status/interrupt registers;
  - the buffer-memory multiplexing;
  - the SHARC bus slave;
- a model of the ZBT buffer memory.

The SHARC, its software and the rest of the test system are not part of the RTL.
They appear only as ports and, in the testbenches, as a bus-master model.

## Data flow

```
 S-link ──► slink_fifo ──► crush_fpga ───────────────────────────────────────► zbt_ram
 (36 bit)   1k x 36        │ slot 0: pop word ─► addr_gen (waddr)    ┐          256 k x 32
   ▲ slink_lff = full      │                  └► summary_extract     ├─► buf_arbiter ─┘
   ▲ rol_xoff (CTRL bit1)  │                       │ 8-word page     │   (address/data muxes)
                           │                       ▼                 │
                           │                    paged_fifo ──► dma_req/dma_ack/dma_data ─► SHARC DMA
                           │ slot 1: SHARC ◄─► sharc_bus_if ─────────┘
                           │                     │ register window
                           │                     ▼
                           └──────────────── ctrl_regs ──► cfg, clr, irq, rol_xoff
```

`crush_top` is the board: FIFO, FPGA (`crush_fpga`) and buffer memory (`zbt_ram`).
All logic runs on one clock, the 80 MHz buffer-memory clock.

## Sharing the buffer memory: slots and pipelines

This part takes the most care to follow.

The buffer is a ZBT ("zero bus turnaround") SRAM. It can take a read right after a
write, and the reverse, with no idle cycle between them. In `zbt_ram` every command
has the same fixed data offset:

| edge | read command        | write command                 |
|------|---------------------|-------------------------------|
| E    | address sampled     | address sampled               |
| E+2  | data driven out     | data sampled from `wdata`     |

A read issued one cycle after a write to the same address gets the new value
through a forwarding register. This timing is that of a common pipelined ZBT
part. The original description gives no ZBT timing.

`buf_arbiter` divides the 80 MHz cycles into two fixed, alternating slots:

- **slot 0** belongs to the S-link FIFO. When a word is waiting, it is popped,
  written at `waddr`, and `addr_gen` advances. One 32-bit word every 25 ns gives
  the 160 MByte/s that the link can deliver.
- **slot 1** belongs to the SHARC. A pending SHARC request is granted at once.

The command goes to the memory in the grant cycle. Write data follows two cycles
later from a two-stage delay line. SHARC read data comes back three cycles after
the grant, when `sh_rvalid` is high.

On the SHARC side, `sharc_bus_if` makes every access last exactly **8 cycles at
80 MHz**. That is four 40 MHz SHARC cycles. It holds for register and memory
accesses, reads and writes. It covers the worst case: waiting for slot 1, then
the three-cycle read return. The SHARC therefore moves at most 4 bytes per 100 ns
= 40 MByte/s out of the buffer. That is the same bandwidth as one SHARC link.
The original board has this same limit.

## Event summaries

`summary_extract` watches each word as it is written to the buffer, together with
its address:

- **Begin-Of-Fragment (BOF):** `(data & BOF_MASK) == (BOF_PAT & BOF_MASK)`.
- **End-Of-Fragment (EOF):** the same test with the EOF pattern and mask.
- **`CTRL.match_ctrl`:** when set, BOF and EOF words must also carry the S-link
  control flag. A data word that happens to look like a marker is then ignored.

From each BOF the block counts words. BOF is word 0. The word at count
`COPY_OFS[i]` (1…255; 0 = off) becomes copied word *i*. On EOF, the page is pushed
into the paged FIFO one cycle later:

| word | content                                                          |
|------|------------------------------------------------------------------|
| 0    | BOF word                                                         |
| 1    | buffer word address of the BOF word                              |
| 2–5  | copied words 0–3 (0 if the fragment was shorter)                 |
| 6    | fragment length in words, BOF and EOF included; bit 31 = no EOF  |
| 7    | EOF word (0 if none)                                             |

Two error cases are handled:

- **A BOF arrives while a fragment is still open.** The open fragment is closed
  with bit 31 of the length set. A sticky status bit is set.
- **Words arrive outside any fragment.** They are still stored in the buffer, but
  produce no summary. They set another sticky bit.

The original design fixes that a summary has 8 words, holds the start position,
and holds words picked by a programmable count after a programmable BOF. Everything
else is this design's own choice:

- the word layout above;
- EOF matching;
- four copied words;
- the two error rules.

## Paged FIFO, stalls and back-pressure

`paged_fifo` stores whole pages; by default there are 32 of them. The SHARC drains
them with its DMA handshake:

- `dma_req` is high while at least one complete page is stored.
- Each cycle with `dma_ack` takes the word on `dma_data`, word 0 first.
- The page is freed after word 7.

Back-pressure works in a chain, so that no summary is ever lost:

1. When the paged FIFO has no free page, the FPGA stops popping the S-link FIFO.
2. The S-link FIFO then fills.
3. Its full flag (`slink_lff`) stops the link.

The software also has its own brake: `CTRL.xoff` drives `rol_xoff` to the link.
The SHARC sets it when the ring buffer holds too much data that it has not yet
released.

The FPGA does not protect buffer data. The write pointer simply rolls over at the
end of the buffer. Keeping unreleased fragments from being overwritten is the job
of the software, as on the original board.

## SHARC address map

The SHARC word address `s_addr` has `log2(BUF_WORDS)+2` bits:

| `s_addr` MSB | next bit | low bits        | target                           |
|--------------|----------|-----------------|----------------------------------|
| 0            | –        | `[3:0]`         | registers (below)                |
| 1            | ignored  | `[AW-1:0]`      | buffer word (window mapped twice)|

The buffer window is twice the size of the buffer, and both halves reach the same
words. A fragment that wraps around the end of the ring can therefore be read by
one linear DMA run: `start + i` simply continues into the second copy. The double
mapping is a feature of the original board. The address bits that select it are
this design's choice.

The register map (`crush_pkg::reg_addr_e`) is this design's own:

| #   | name      | access | content |
|-----|-----------|--------|---------|
| 0   | CTRL      | R/W    | [0] enable, [1] xoff, [2] irq_en, [3] match_ctrl, [4] clear (write-only pulse: restarts write pointer, summary builder, paged FIFO, fragment counter) |
| 1–4 | BOF_PAT, BOF_MASK, EOF_PAT, EOF_MASK | R/W | marker patterns; after reset: pattern 0, mask all ones |
| 5   | COPY_OFS  | R/W    | four 8-bit word counts, copy *i* in bits [8i+7:8i] |
| 6   | STATUS    | R / W1C| [0] FIFO overflow, [1] paged FIFO overflow, [2] fragment without EOF, [3] stray word (sticky, write 1 to clear); [4] FIFO full, [5] paged FIFO full, [6] in fragment, [15:8] pages waiting, [31:16] buffer roll-overs |
| 7   | WPTR      | R      | current write address |
| 8   | FRAGS     | R      | summaries built since clear |

`irq` is `irq_en` AND (a page is waiting OR a sticky bit is set). The original
software polls and does not use interrupts, but the block scheme has an interrupt
output.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `crush_top`, `crush_fpga`, `addr_gen` | `BUF_WORDS` | 262144 | ring buffer in 32-bit words (1 MByte); must be a power of two for the double mapping |
| `crush_top`, `slink_fifo` | `FIFO_DEPTH` / `DEPTH` | 1024 | S-link FIFO words (36 bits each) |
| `crush_top`, `crush_fpga`, `paged_fifo` | `PF_PAGES` / `PAGES` | 32 | summaries the paged FIFO holds (own choice) |
| `crush_top`, `crush_fpga`, `sharc_bus_if` | `ACC_CYCLES` | 8 | 80 MHz cycles per SHARC access (≥ 7) |

The 1 MByte buffer, the 1k x 36 FIFO and the four-cycle SHARC access are the
original board's numbers. The paged-FIFO depth is not known and was chosen here.

## Where this RTL departs from the original board

- **One clock.** On the original board one clock generator feeds the FPGA with
  both 40 MHz (the SHARC clock) and 80 MHz (the memory clock). How the FPGA
  crosses between the two is not published. Here everything runs at 80 MHz, and
  a SHARC bus cycle is two memory cycles. The real SHARC bus pins and the SHARC DMA
  handshake timing are replaced by the simple `s_req`/`s_ack` and
  `dma_req`/`dma_ack` handshakes.
- **Own choices for what the original does not specify:**
  - the summary layout;
  - the register map and reset values;
  - EOF matching and the missing-EOF and stray-word rules;
  - the paged-FIFO depth and the stall rule;
  - the fixed slot order;
  - the meaning of the 4 extra FIFO bits (bit 32 is the S-link control flag;
    bits 35:33 are carried but unused).
- **Not included:**
  - the SHARC DSP and its six links;
  - the ROBIn software: the event-info list, request and decision handling,
    fragment building, and free-space management;
  - the clock source;
  - the S-link receiver card.

  Also left out is the companion ShaSLINK module (SHARC + PLX 9054 PCI bridge +
  S-link source FPGA) that fans requests out to several ROBIns and merges their
  fragments. Most of its function is software, and its S-link output logic is
  described only by name.

## What the performance figures mean for this hardware

The measured ROBIn event rates are set by the SHARC software and the SHARC link
bandwidth, not by this logic. The hardware side has ample margin:

- **Event rate.** The highest measured rate, about 187 kHz with 256-byte
  fragments, needs about 48 MByte/s into the buffer. The S-link slot provides
  160 MByte/s.
- **Summaries.** 187 kHz needs 1.5 M summary words/s, far below what the paged
  FIFO can deliver.
- **Buffer size.** The largest fragment measured, 4096 bytes, is 1024 words.
  256 such fragments fit in the buffer at once.
- **Read-out to the SHARC.** It is 40 MByte/s here, as on the board. This is the
  limit behind the size-dependent part of the measured rates.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_slink_fifo` | random push/pop against a queue model; full at exactly 1024 words, overflow pulse |
| `tb_addr_gen` | roll-over at a non-power-of-two size, roll-over count, clear |
| `tb_summary_extract` | 400 random fragments; every page word against a model; missing EOF, stray words, control-flag qualifier, clear |
| `tb_paged_fifo` | page-wise write, word-wise DMA read, full/overflow, clear |
| `tb_ctrl_regs` | register read-back, configuration outputs, sticky bits and write-1-to-clear, clear pulse, interrupt |
| `tb_buf_arbiter` | slot order, memory pins, write data 2 cycles after its command, read return 3 cycles after its grant, S-link rate of one word per 2 cycles |
| `tb_sharc_bus_if` | 8-cycle access for every kind of access, register and memory data, both buffer mappings reach the same word |
| `tb_zbt_ram` | back-to-back random reads and writes against a reference, forwarding of a read that follows a write |
| `tb_crush_fpga`, `tb_crush_top` | end to end, see below |
| `tb_crush_top_full` | end to end with every parameter at its default |

The end-to-end tests share `tb/crush_e2e_body.svh`, which has two parts.

The **S-link source** sends fragments:

- BOF/EOF are control words, and the event number is the first payload word.
- Some fragments lack the EOF.
- Some are followed by stray words.
- Some contain a data word that looks like a BOF.
- The source obeys `slink_lff` and `rol_xoff`.

The **SHARC model** polls like the ROBIn software:

1. It programs the registers.
2. It fetches each summary by DMA and compares it word for word with the
   expected summary.
3. For a set fraction of events it reads the fragment back from the buffer,
   through the second mapping when the fragment wraps.
4. It releases the fragment and drives XOFF from the buffer occupancy.
5. At the end it checks the counters, the roll-over count, the sticky bits and
   the clear command.

Every access must take 8 cycles. A monitor measures the input rate. In every
200-cycle window where the S-link FIFO holds data and the paged FIFO has room,
exactly 100 words must reach the buffer. That is 160 MByte/s, and it must hold
even while the SHARC is using the memory. The reduced-size tests (`tb_crush_top`: 1 k word
buffer, 64-word FIFO, 4 pages) count, and require at least once, each of these:

- a paged-FIFO stall;
- S-link back-pressure;
- XOFF;
- an interrupt;
- a buffer roll-over;
- a full-rate input window with SHARC memory traffic;
- a read through the second mapping;
- a SHARC read directly after an S-link write;
- each fragment error case.

The full-size test sends 700 fragments of 256–4096 bytes (about 283 k words), so
the 256 k word buffer rolls over once, and reads back 10 % of them.

Run a test with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/crush_pkg.sv tb/tb_crush_top.sv --top-module tb_crush_top -o sim
./obj_dir/sim
```

Replace `tb_crush_top` by any testbench name. Each test finishes within seconds.

**Limits of what has been verified:**

- Everything has been checked in RTL simulation only.
- There is no timing analysis against a real 80 MHz FPGA.
- No real SHARC bus waveform has been checked.
- The ZBT model is functional. It has no setup, hold or output-enable timing.
