# BSP — a bitstream processor for the lossless half of a video codec

A video codec splits into a lossy part and a lossless part. The lossy part is
prediction, transform and quantisation, all regular arithmetic on pixels. The
lossless part is the zigzag scan, run-level coding and entropy coding. It is
serial, bit-oriented and different in every standard. The BSP (Bit Stream
Processor) takes over only the lossless part and leaves the signal processing
to an external microprocessor. It divides that part between two engines that
run side by side:

* **RLE (Run-Level Engine)**: a hardwired unit for the regular, pixel-rate
  work. It reads blocks of transform coefficients in a programmable zigzag
  order and turns them into (run, level, last) entries. When decoding, it
  expands entries back into coefficients. It handles one coefficient per
  clock.
* **STP (Syntax Processor)**: a small two-stage RISC core for the irregular,
  symbol-rate work. Besides ordinary instructions it has instructions that
  keep a bit position into a 32-bit bitstream window, look up variable-length
  codes in tables, and append codes to an output stream. The entropy coder of
  each standard is an STP program.

The two engines never call each other. They exchange data through **dual
(ping-pong) buffers** and wait on flags, so the STP can code one buffer turn
while the RLE fills the other.

```
             host bus (external microprocessor)                     DMA port
                 |                                                      |
          +------+------+                                               |
          | cmd_dec     |--- sys_ctrl (command/status, JUMP)            |
          |             |--- int_ctrl (irq, Int_Ack)                    |
          +--+-------+--+                                               |
             |       |  imem/dmem loading, pBuf                         |
     iBuf (2 halves) |                                                  |
        |   ^        |                                                  |
        v   |        |                                                  |
    +-----------+   oBuf (2 halves, 2 x 16-bit SRAM each, NZR regs)   +-+----+
    |   RLE     |<---------------------------------------------------->|  STP | <-> sBuf <-> DMA
    | zigzag    |                                                      |      | <-  SPS/PPS <- DMA
    | tables,   |<-------- control register, zigzag table writes ------|      | <-  pBuf
    | counters  |                                                      +------+
    +-----------+                                                    imem, dmem (VLC tables)
```

## Files

| file | contents |
|---|---|
| `rtl/bsp_pkg.sv` | sizes, oBuf entry format, RLE control register, STP opcodes, both address maps |
| `rtl/bsp_top.sv` | the whole BSP: all blocks, address decode of the STP data port, register file of the STP map |
| `rtl/rle.sv` | RLE: `rle_ctrl` + `rle_addr_cnt` + `zigzag_tbl` + `rle_zero_cnt` |
| `rtl/rle_ctrl.sv` | RLE control register and turn FSM (encode / decode / busy) |
| `rtl/rle_addr_cnt.sv` | scan-position and block-base counter |
| `rtl/rle_zero_cnt.sv` | zero-run counter: pairs when encoding, run expansion when decoding |
| `rtl/zigzag_tbl.sv` | four programmable 64-entry scan-order tables |
| `rtl/ibuf.sv` | coefficient ping-pong buffer with full flags |
| `rtl/obuf.sv` | run/level ping-pong buffer, two 16-bit SRAMs per half, NZR registers |
| `rtl/stp.sv` | STP core |
| `rtl/bs_unit.sv` | STP bitstream unit (TLD, TLE, LZS, LOS, REM, LBS, LBC, STS, STC) |
| `rtl/bsp_ram.sv` | two-port synchronous RAM: imem, dmem, sBuf, pBuf, SPS/PPS |
| `rtl/sys_ctrl.sv`, `rtl/int_ctrl.sv`, `rtl/cmd_dec.sv` | host-facing control |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/bsp_e2e.sv` | end-to-end test body: host, DMA and an STP program that encodes and decodes |
| `tb/tb_bsp_top.sv` | end-to-end run: 3 turns of 8 blocks (short) |
| `tb/tb_bsp_top_full.sv` | end-to-end run of one full 64-macroblock turn at default sizes |
| `tb/tb_bsp_qcif.sv` | one QCIF frame (99 macroblocks, 2 turns) with a bitstream larger than sBuf, streamed by the DMA |

## Buffer turns and the hand-over protocol

This is the core of the design. The rest is easier once it is clear.

Data moves in **turns**. A turn is what one buffer half holds: 64 macroblocks.
At 384 coefficients per 4:2:0 macroblock, that is 24 576 coefficients
(`IBUF_WORDS`). Each of iBuf and oBuf has two halves. Each side of a buffer
(host or RLE on iBuf, RLE or STP on oBuf) keeps **its own half pointer**. A
side moves its pointer when it hands a half over. Because both sides follow
the same alternation, they never need to agree on a pointer; they only need
to agree on the flags.

**iBuf full flags** (one per half):

* encoding: the host writes a turn and sets *iBuf_Full*. The RLE consumes the
  half and clears the flag.
* decoding: the RLE fills a half and sets the flag. The host reads the half
  and clears it with *MB_done*.

**oBuf NZR registers** (one per half) each hold a completion flag and an
entry count:

* encoding: when the RLE has coded a whole turn into its half, it writes
  {flag = 1, count} and moves to the other half. The STP polls the flag of
  *its* half, codes `count` entries, then clears the flag and switches.
* decoding: the STP writes entries into its half, sets {flag = 1, count} and
  switches. The RLE waits for the flag, expands the entries into iBuf, then
  clears the flag and moves on.

The STP reads both its own flag (`cur`) and the other half's flag (`nxt_NZR`)
in one register. That is enough for the waits in both directions.

**Busy.** The RLE may have work waiting (an iBuf half full) while the half it
must write is still held by the other side (its oBuf half's NZR still set).
In that case it stalls and drives `busy` to the host. When encoding, this
happens when the host runs two turns ahead of the STP. The end-to-end test
provokes it on purpose.

## RLE

Each clock in an encoding turn:

1. `rle_addr_cnt` gives the scan position `pos` and the block base.
2. `zigzag_tbl` gives the raster offset of `pos` in the selected table.
3. iBuf is read at `base + offset`; the coefficient returns one clock later.
4. `rle_zero_cnt` counts zeros. On a non-zero coefficient it forms an entry.

One pair is always held back, so the last pair of a block can still get its
`last` flag when the block ends in zeros. A block with no non-zero
coefficient produces one marker entry {last = 1, run = 0, level = 0}. The
same entries serve 2-D (run, level) and 3-D (run, level, last) coding.

**Timing.** An encoding turn takes `NBLK*BLK_LEN + 4` clocks:

* 1 initialisation clock;
* one clock per coefficient;
* 2 drain clocks;
* 1 buffer-change clock, which writes NZR, releases iBuf and moves the pointers.

Decoding writes one coefficient per clock too. Entries are prefetched from
oBuf. A run expands into that many zeros, then the level. After a `last`
entry the rest of the block is zero-filled.

**Control register** (`rle_ctrl_t`, written by the STP):

| bits | field | meaning |
|---|---|---|
| 0 | `enable` | |
| 1 | `dec` | 0 = encode, 1 = decode |
| 3:2 | `prog` | which of the four zigzag tables |
| 5 | `order` | which SRAM holds run and which holds level |
| 6 | `stp_wide` | STP access width to oBuf |
| 13:8 | `blk_len_m1` | coefficients per block, minus 1 (16 for 4x4 blocks, 64 for 8x8) |
| 31:16 | `nblk` | blocks per turn |

Reset loads every zigzag table with the identity order. The STP must write
the real scan order before the first turn.

**oBuf entry.** This is a logical 32-bit word {upper SRAM, lower SRAM}:

* with `order = 0`: upper = {last, run[14:0]} and lower = level[15:0];
* with `order = 1`: the two words are swapped.

The STP can read oBuf in two ways:

* **wide**: one access returns both SRAMs, which suits MPEG-1/2-style coders.
* **narrow**: one 16-bit SRAM per access, which suits H.264-style coders.
  Address bit 0 picks the SRAM (0 = upper), and the value returns
  zero-extended.

## STP and its bitstream unit

**Pipeline.** There are two stages: fetch, then decode/execute/write-back.

* The register file has 16 registers of 32 bits, and `r0` reads as zero.
* A branch resolves in stage 2 and steers the next fetch directly, so it
  costs no bubble.
* Every read (LD, TLD, TLE, LBS, LBC) takes two clocks, because the
  synchronous memories return data one clock later. All other instructions
  take one clock.

**Instruction word.**

* Fields: `[31:26]` opcode, `[25:22]` rd, `[21:18]` rs, `[17:14]` rt,
  `[13:0]` imm.
* The immediate is sign-extended, except for ANDI/ORI/XORI, where it is
  zero-extended.
* `LUI` loads `imm << 16`.
* Branch targets are `pc + imm`; `J` is absolute.
* The opcodes are listed in `bsp_pkg::opcode_e`.

**Bitstream state** (`bs_unit`):

* two words `cur`, `nxt`;
* a 5-bit remainder `rem`, the bit position inside `cur`;
* a carry `rc`, which means `cur` is used up (decoding) or complete (encoding).

The window `BS` is the 32 bits that start `rem` bits into {cur, nxt}.

| instr | effect |
|---|---|
| `TLD rd, rs, imm` | read `dmem[rs + index]`. `rd` = code field; `{rc,rem} += length` field |
| `TLE rs, rt` | read `dmem[rs + rt]`. Append the code at bit `rem`; `{rc,rem} += length` |
| `LZS rd` / `LOS rd` | `rd` = number of leading zeros / ones of BS; `{rc,rem}` advances by that number |
| `REM rs` | `{rc,rem} += rs[5:0]` |
| `LBS rs, imm` | `cur = nxt`, `nxt = mem[rs]`, `rc = 0`; `rs += imm` |
| `LBC rs, imm` | as LBS, only when `rc` is set |
| `STC rs, imm` | only when `rc` is set: `mem[rs] = cur`, `cur = nxt`, `nxt = 0`; `rs += imm` |
| `STS rs, imm` | `mem[rs] = cur`; `rs += imm`; then empty the state (ends a stream) |

Table entries are `[31:26]` length and `[25:0]` code, right-aligned.

**Decode loop.** Use `TLD` then `LBC`, and prime the stream with two `LBS`.

**Encode loop.** Use `TLE` then `STC`, and finish with one `STS`.

**The TLD index is the subtle part.** Long variable-length code tables are
mostly leading zeros. Indexing a table directly by the next *n* bits would
need 2^n entries. Instead the unit compresses the prefix:

* It ORs each of the first three nibbles of BS into one bit. This gives a
  3-bit **class**. For example, `0000_0001_0001…` gives class `011`.
* The **field** is the `imm2 + 3` bits that start at the first non-zero
  nibble. For class `000` it starts at bit 12.
* The index is `{imm1, class, field}`, where `imm1` is `imm[5:4]` and `imm2`
  is `imm[3:0]`.

So a 7-bit field (`imm2 = 4`) covers codes up to 11 bits with 1024 entries.
`imm1` selects a separate table page for the rare codes with very long zero
prefixes. The program builds each table for a given `imm2`. Each entry holds
the length and the decoded value of the code that fills that slot.
`tb/bsp_e2e.sv` builds an Exp-Golomb table this way; its loop is the formula.

### STP address map (word addresses, region in bits 19:16)

| region | target |
|---|---|
| 0 | data memory (4096 words) |
| 1 | sBuf (1024 words; addresses wrap inside it) |
| 2 | pBuf |
| 3 | SPS/PPS |
| 4 | oBuf, STP's current half (wide or narrow per `stp_wide`) |
| 5 | zigzag tables: table in bits 7:6, position in bits 5:0 |
| 6 | registers, listed below |

The registers of region 6:

| offset | register | behaviour |
|---|---|---|
| 0 | RLE control | |
| 1 | OBUF_CMD | write: bit 0 switches the half, bit 1 clears NZR, bit 2 sets NZR with the count in bits 31:16. Read: `{cur_flag, nxt_flag, sel, 13'b0, cur_count}` |
| 2 | NXT_CNT | count of the other half |
| 3 | system command | write 1 to clear a bit |
| 4 | status | read by the host |
| 5 | INT | write: raise interrupt causes. Read: Int_Ack |
| 6 | IBUF_ST | `{busy, active, full[1:0]}` |

### Host map (region in bits 19:16)

| region | target |
|---|---|
| 0 | instruction memory |
| 1 | iBuf, host's current half |
| 2 | pBuf |
| 3 | registers, listed below |
| 4 | data memory (for loading VLC tables) |

The registers of region 3:

| offset | register | behaviour |
|---|---|---|
| 0 | system command | write sets bits |
| 1 | iBuf | bit 0 iBuf_Full, bit 1 MB_done |
| 2 | JUMP | starts the STP at `wdata` |
| 3 | Int_Ack | write acknowledges the causes in `wdata` |
| 4 | status | read |
| 5 | pending interrupts | read |
| 6 | IBUF_ST | `{halted, running, busy, full[1:0], host_sel}` |

Host reads return one clock after `h_re`.

**DMA port.** `dma_sel` = 0 selects sBuf and 1 selects SPS/PPS. It has its own
read and write strobes, and reads return one clock later.

## Sizes

| parameter | default | origin |
|---|---|---|
| buffer turn | 64 macroblocks | design |
| iBuf half `IBUF_WORDS` | 24 576 x 16 bit | 64 x 384 coefficients (4:2:0) |
| oBuf half `OBUF_WORDS` | 26 112 x (16+16) bit | worst case: every coefficient non-zero, plus one marker per 16-coefficient block |
| sBuf | 1024 x 32 bit | design |
| zigzag tables | 4 x 64 x 6 bit | design gives four tables |
| imem / dmem / pBuf / SPS/PPS | 1024 / 4096 / 1024 / 256 x 32 bit | chosen |

The memory totals about 2.7 Mbit, mostly iBuf and oBuf.

## What follows the design and what was chosen here

These follow the design:

* the STP / RLE split;
* the four buffers, plus SPS/PPS;
* dual iBuf/oBuf;
* oBuf as two 16-bit SRAMs, with single-SRAM and both-SRAM access;
* a programmable run/level order;
* four programmable zigzag tables chosen by the program field;
* the NZR completion flag and busy;
* iBuf_Full / MB_done;
* the system command register, JUMP and Int_Ack;
* the two-stage STP;
* the bitstream instruction list with the class-number TLD index;
* the 64-macroblock turn and the 1024-word sBuf;
* the RLE turn time, split into initialisation, one clock per coefficient, and
  a buffer change.

Chosen here, because the design leaves them open:

* the whole STP instruction encoding and general instruction set;
* both address maps and all register layouts;
* the oBuf entry format and the empty-block marker;
* the TLD field width `imm2 + 3`;
* the two-word BS window;
* STS emptying the stream state;
* per-side half pointers instead of a "switch iBuf" command;
* the pBuf written by the host (not the DMA);
* one clock domain for everything.

LOS advances the bit position by the number of *leading ones*.
STC is the encoding counterpart of LBC.

**Not included:** the external microprocessor and the DMA. They are ports of
`bsp_top`, and the testbenches play both. No codec program for the STP
(H.264 CAVLC, MPEG-2 VLC) is supplied; the end-to-end test runs a small
Exp-Golomb run-level coder instead. So the cycles-per-pixel of a real codec
are not measured here.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.
The package must come first on the command line:

```
verilator --binary --timing --assert rtl/bsp_pkg.sv tb/tb_bsp_top.sv \
    -y rtl -y tb --top-module tb_bsp_top -o sim && ./obj_dir/sim
```

The end-to-end body `bsp_e2e` does the following:

* It loads an Exp-Golomb encode table and a class-indexed decode table into
  dmem, a 4x4 zigzag order into pBuf, block and turn counts into SPS/PPS
  (through the DMA port), and the STP program into imem.
* It issues JUMP.
* Phase A: the STP copies the scan order into zigzag table 1 and starts the
  RLE. The RLE puts the level in the upper SRAM, and the STP reads oBuf
  16 bits at a time. For each turn the STP codes every (run, level, last)
  entry with TLE/STC.
  The host feeds turns as iBuf halves free up. Three turns make the RLE go
  busy.
* The STP flushes, reports the word count in its status register and raises
  an interrupt.
* The testbench reads the bitstream over the DMA and parses it with its own
  Exp-Golomb reader. It compares every entry with a reference run-level coder
  and checks each RLE turn's length (`N + 4` clocks).
* It writes the bitstream back, acknowledges, and sets a system command bit.
* Phase B: the STP decodes with TLD/LBC and writes whole 32-bit entries
  into oBuf, with the run in the upper SRAM. It then sets NZR and switches
  halves. The RLE expands the entries into iBuf, and the host checks every
  coefficient against the original before issuing MB_done.
* It counts, and requires, the following events:
  * encoding and decoding turns;
  * busy;
  * oBuf switches;
  * narrow and wide oBuf accesses;
  * NZR set and clear;
  * both interrupts and Int_Ack;
  * TLD, TLE, LBC and STC;
  * DMA reads and writes;
  * SPS/PPS reads;
  * zigzag-table writes;
  * JUMP;
  * iBuf hand-overs.

`tb_bsp_top_full` runs the same flow with the top at its default sizes for
one full turn: 1536 blocks of 16 coefficients, which fills a whole iBuf half.
The data is sparse (2 % non-zero) so that the bitstream of the turn fits in
sBuf. It simulates in a few seconds.

`tb_bsp_qcif` runs one QCIF frame: 99 macroblocks, or 2376 blocks in two
turns of 1188. About 18 % of its coefficients are non-zero, roughly 6900
run/level symbols, as in fast motion. The bitstream comes to about 2460
words, more than twice sBuf, so the testbench's DMA streams it:

* While encoding, the DMA reads out each word the STP stores.
* While decoding, the DMA refills sBuf, using it as a ring. It stays at most
  1000 words ahead of the STP's reads.

## Limits worth knowing

* A bitstream longer than sBuf must be drained or refilled by the DMA while
  the STP works. sBuf addresses wrap, so it acts as a ring, and
  `tb_bsp_qcif` shows this working. But nothing in the hardware throttles
  the STP against the DMA. If the DMA can fall behind, the program has to
  pace itself through the status and command registers.
* The RLE counts a turn in blocks. A turn shorter than a full buffer is fine
  (set `nblk`), but every block in a turn has the same length.
* Blocks longer than 64 coefficients need bigger zigzag tables (`DEPTH`).
