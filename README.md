# Accelerated AXI DMA controller with hardware descriptor splitting

A DMA controller normally leaves it to software to turn a transfer request into a
list of scatter-gather entries: one per block of data, a separate one where the
source crosses a page boundary, one more for each block's metadata. This design
does that cutting in hardware. Software (or a hardware device) writes a short
descriptor into the controller's local memory and submits its address on one of
eight channels. A state machine reads the descriptor and splits the transfer into
entries. A fixed-priority arbiter picks among the channels with work. The data is
moved with AXI4 bursts, and a CRC16-CCITT is computed over it on the way. The
CPU then reads a completion record.

Everything is SystemVerilog 1800-2017 and synthesizable, except the testbench
models in `tb/`.

## Structure

```
            CPU register port                     hw_req[0]   hw_req[1]
                   |                                  |           |
              +----------+                            v           v
              | dma_regs |---- enable, LM writes, submissions, completions
              +----------+          |                              |
                    +---------------+------------------+-----------+
                    v                                  v
   option 0 (write option): dma_engine     option 1 (read option): dma_engine
                    |  AXI4 master                      |  AXI4 master

dma_engine:
  request FIFO -> desc_splitter -> local_memory (descriptors, entries, rings)
                                        |
           ch_monitor (shadow write ptrs, read ptrs, pending bitmap)
                                        |
           fixed_prio_arb -> cmd_parser --+--> read_data_mover --AR/R--> memory
                                          |          |
                                          |          v
                                          |      crc_parser
                                          |          |
                                          |          v
                                          +--> write_data_mover --AW/W/B--> memory
                                               (front end: wdm_entry_fetch)
                                                     |
                                                     v
                                                 dma_status -> completion queue, irq

  (both data movers read their entries from local memory themselves)
```

The two options are identical engines. Each has its own local memory, eight
channels and its own AXI4 master. The only difference is the register option
bit used to reach them. Software decides which kind of command it gives to
which option.

| File | Contents |
|---|---|
| `rtl/dma_pkg.sv` | widths, descriptor/entry/command/completion structs, AXI payload structs, `crc16_beat` |
| `rtl/dma_top.sv` | register block plus two engines |
| `rtl/dma_engine.sv` | one option: the chain above |
| `rtl/desc_splitter.sv` | request FIFO and the descriptor-cutting state machine |
| `rtl/local_memory.sv` | 128-bit single-port RAM shared by fixed-priority ports (five per engine) |
| `rtl/ch_monitor.sv` | per-channel shadow write pointer, read pointer, pending bitmap |
| `rtl/fixed_prio_arb.sv` | fixed-priority arbiter, lowest index wins |
| `rtl/cmd_parser.sv` | fetches the granted channel's next command record |
| `rtl/read_data_mover.sv` | entry fetch, AXI read bursts, 64-beat data buffer |
| `rtl/crc_parser.sv` | CRC16-CCITT per command, compare with expected value |
| `rtl/wdm_entry_fetch.sv` | write side's command buffer and entry fetch |
| `rtl/write_data_mover.sv` | egress state machine, AXI write bursts, completion |
| `rtl/dma_status.sv` | completion FIFO and interrupt |
| `rtl/dma_regs.sv` | CPU register map |
| `rtl/sync_fifo.sv` | generic first-word-fall-through FIFO |

## Units and alignment

Lengths are counted in 32-bit dwords. A data beat is 128 bits, which is four
dwords. Every length (`total_dw`, `lba_dw`, `meta_dw`) must be a multiple of 4.
Every host address must be 16-byte aligned. The design does not support byte
enables inside a beat, so it writes full beats only. Assertions in the movers
flag a stream that does not line up with its entries.

## The descriptor

A descriptor is two 128-bit local-memory words at `desc_addr` and
`desc_addr+1`. The field layout is given by `desc_w0_t` and `desc_w1_t` in
`dma_pkg.sv`. Fields are listed from the most significant down.

Word 0:

| Field | Bits | Meaning |
|---|---|---|
| `host0` | 32 | first source address |
| `host1` | 32 | source address where the data continues after the first page |
| `dst` | 32 | destination of the data |
| `total_dw` | 16 | length of the transfer |
| `lba_dw` | 16 | size of one block (LBA) |

Word 1:

| Field | Bits | Meaning |
|---|---|---|
| `meta_src`, `meta_dst` | 32 + 32 | where the first block's metadata comes from and goes to |
| `sba_list_addr` | 16 | local-memory address where the entries are written |
| `next_addr` | 16 | next descriptor, when `link` is set |
| `crc_exp` | 16 | expected CRC |
| `tag` | 8 | software tag, returned in the completion |
| `crc_chk`, `meta_vld`, `link` | 1 each | check the CRC; cut a metadata entry after each block; follow `next_addr` |
| `meta_dw` | 5 | metadata dwords per block |

## How a descriptor is cut

This is the heart of the design. The splitter's state machine walks the
descriptor in two parts:

* **Part 0** runs from `host0` up to the next `PAGE_DW`-dword boundary (4 KiB by
  default), or to the end of the transfer if that comes first.
* **Part 1** is the rest, read from `host1`. Data that is contiguous for the
  destination may therefore sit on two separate source pages.

`remain_len` tracks what is left of the current part:

1. While `remain_len >= lba_dw`, the splitter cuts one SGL entry of a whole
   block and advances source and destination. If `meta_vld` is set, a META entry
   follows: `meta_dw` dwords from `meta_src` to `meta_dst`, which then advance by
   `meta_dw`.
2. If part 0 ends with a tail shorter than a block (`0 < remain_len < lba_dw`),
   a partial SGL entry covers it. `remain_len` then goes negative. Its magnitude
   is the number of dwords of that block still missing.
3. With `remain_len < 0`, the rest of the split block is cut from the start of
   `host1`, then the block's META entry. Part 1 continues after it.
4. With `remain_len = 0`, part 1 starts on a block boundary.
5. Part 1 is cut in whole blocks. If it ends with a tail shorter than a block,
   that tail is cut as it is.

Each entry is one local-memory word (`entry_t`), written from `sba_list_addr`
upward. It holds `src`, `dst`, `dw_len` and three flags:

* `eochunk` marks the last data entry of a block;
* `eobulk` marks the last entry of the command;
* `is_meta` marks a metadata entry.

When the cutting is done, the splitter writes a command record (`cmd_rec_t`:
entry address, entry count, tag and CRC fields) to the channel's ring. It then
advances the channel's write pointer. If `link` is set, it fetches the
descriptor at `next_addr` for the same channel, and each linked descriptor
becomes a command of its own. A descriptor with `total_dw = 0` queues nothing.
Clearing the engine's enable bit returns the state machine to idle from any
state. The descriptor being cut is then abandoned, but commands already queued
still run.

The state names (`CUT_IDEAL`, `REMAIN_LEN_CHK0`, `CUT1_SGL_0`,
`CUT2_SGL_INIT`, ...) are kept, so the machine can be followed against a state
diagram. Each entry costs about three cycles: cut, write and update.

## Channels, rings and arbitration

Each channel owns a ring of `CH_DEPTH` command records. Channel *i* uses
local-memory words `i*CH_DEPTH` to `i*CH_DEPTH + CH_DEPTH - 1`. Pointers are
one bit wider than the slot index so that a full ring can be told from an empty
one. The splitter waits while the target ring is full.

`ch_monitor` keeps a registered shadow copy of each write pointer next to the
local read pointer, and compares all eight pairs in parallel. A channel whose
pointers differ has work; its bit in the pending bitmap `bmp` is set.
`fixed_prio_arb` grants the lowest-numbered pending channel. `cmd_parser` reads
that channel's record at its read pointer, pulses `fsm_start` so that the
monitor advances the read pointer, and hands the record on. Because the
priority is fixed, a busy low channel can starve higher-numbered ones. This is
intended.

`cmd_parser` gives each record to both data movers in the same cycle. It waits
until both can take it.

Local memory is one 128-bit RAM with five requesters in fixed priority:

1. CPU window;
2. splitter;
3. command parser;
4. read data mover;
5. write data mover.

A grant comes in the request cycle, and read data the cycle after.

## Data path

**Read data mover.** It buffers commands, reads each command's entries one
at a time, and issues AXI4 INCR read bursts:

* 128-bit beats;
* at most 16 beats per burst;
* never crossing a 4 KiB boundary;
* one ID.

A burst is issued only when the 64-beat data buffer has room for every beat in
flight, so the read data channel never stalls for space. Only data and
end-of-entry / end-of-command flags leave the read side.

**CRC parser.** It registers each beat once. It folds the 128 data bits into
a CRC16-CCITT:

* generator x^16 + x^12 + x^5 + 1;
* initial value 0xFFFF;
* byte 0 (bits 7:0) first, each byte MSB first.

On a command's last beat it outputs the CRC. If `crc_chk` is set, it also
flags a mismatch with `crc_exp`. The CRC covers every entry of the command,
metadata included. To get a reference value in software, run the same serial
CRC over the bytes in address order.

**Write data mover.** The write side keeps its own copy of each command
(`wdm_entry_fetch`). It reads the command's entries from local memory and
queues each entry's destination, length and flags. Each entry's length decides
how many checked beats belong to it. The egress state machine then runs:

* `EGRESS_IDLE` waits for data;
* `EGRESS_INI` issues a write burst (same burst rules as reads);
* `EGRESS_DATA` sends it, counting dwords in steps of 4;
* `EGRESS_NEXT_SGL` looks at the entry's flags and goes to `EGRESS_CHUNKEND` on
  `eochunk` or `EGRESS_BULKEND` on `eobulk`.

At bulk end it waits for every write response. It then emits a completion: the
channel, the tag, the CRC, the CRC error, a response error and the number of
blocks written. The response error is set by any non-OKAY write response, or
by any read response that was not OKAY. The read mover flags such a beat with
`rerr`, and the flag travels with the data through the CRC parser. The data of
a failed read is still written.

**Throughput.** Measured on one engine with a memory that never stalls, a
2048-dword copy streams at about 0.93 beats per cycle. At 500 MHz that is
about 59 Gbit/s, comfortably above a 40 Gbit/s target.

## Register map

All registers are 32-bit. The map is at byte addresses on an 8-bit address bus,
with a write strobe and a combinational read.

| Addr | Name | Meaning |
|---|---|---|
| 0x00 | CTRL | [0] enable option 0, [1] enable option 1 |
| 0x04 | LM_ADDR | [15:0] local-memory word address, [31] option |
| 0x08–0x14 | LM_WDATA0..3 | 128-bit word to write, WDATA0 = bits 31:0 |
| 0x18 | LM_GO | write: store the word; read [0]: still pending |
| 0x1C | SUBMIT | write: [15:0] descriptor address, [18:16] channel, [31] option; read [0]: pending |
| 0x20 | CPL0_LO | read: [31:16] CRC, [15:8] tag, [7:5] channel, [2] CRC error, [1] response error, [0] valid; write: pop |
| 0x24 | CPL0_HI | [15:0] blocks written |
| 0x28, 0x2C | CPL1_LO/HI | the same for option 1 |
| 0x30 | STATUS | [7:0] / [15:8] pending channels of option 0 / 1; [16], [17] splitter busy |

A local-memory write or submission stays pending until the engine accepts it.
Another one written while it is pending is dropped, so poll LM_GO / SUBMIT
first. `irq[i]` is high while option *i* holds an unread completion.

A typical sequence:

1. Write the two descriptor words through LM_ADDR, LM_WDATA and LM_GO.
2. Write SUBMIT.
3. Wait for `irq`.
4. Read CPL_LO and CPL_HI.
5. Write CPL_LO to pop the record.

A hardware device can bypass the register block and submit
`{channel, descriptor address}` on `hw_req_*`. CPU requests go ahead of
hardware requests in the request FIFO.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NCH` | 8 | `dma_pkg` | channels per engine |
| `LM_DEPTH` | 1024 | top, engine | local-memory words |
| `CH_DEPTH` | 16 | top, engine, splitter | command slots per channel ring |
| `PAGE_DW` | 1024 | top, engine, splitter | part-0 page size in dwords |
| `BUF_DEPTH` | 64 | top, engine, read mover | data buffer beats |
| `MAX_BURST` | 16 | `dma_pkg` | AXI burst length limit |
| `AXI_AW`, `AXI_DW` | 32, 128 | `dma_pkg` | AXI address and data width |

The rings occupy the first `NCH*CH_DEPTH` words of local memory (128 by default).
Put descriptors and entry lists above them.

## Where this design departs from, or fills in, its source

The eight channels, the fixed-priority arbitration, the shadow-pointer channel
monitor, the splitter state names and cutting steps, the read-mover buffers, the
CRC16-CCITT generator and the egress state names follow the published
architecture. The following are this design's own:

* **Local memory.** Each option has its own local memory and monitor; the
  original structure shows one of each, shared.
* **Formats.** The descriptor, entry, command-record and completion layouts,
  and the register map.
* **Cutting rules.** The two-part page reading of `host0`/`host1`, and the
  handling of a part-1 tail shorter than a block.
* **CRC conventions.** The CRC initial value and byte order. The CRC is only
  compared with an expected value; it is not used to locate errors.
* **Channel state.** Channel read pointers stay in registers of the monitor;
  they are not written back into local memory. All channels share one ring
  depth, `CH_DEPTH`, set when the design is built rather than by software.
* **Write path width.** Writes use full 128-bit beats. A 64-bit split write
  path (high and low halves) is not built.
* **Flow control.** Buffer-availability counters in the egress machine are
  replaced by valid/ready handshakes.
* **Alignment.** Lengths must be multiples of 4 dwords and addresses 16-byte
  aligned. There is no byte-level alignment or narrow-transfer support.
* **Errors and timing.** There is no error recovery beyond reporting
  `resp_err` and `crc_err`. The 500 MHz clock and low-power figures of the
  original implementation are process results, not checked here.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/axi_mem_model.sv` is a behavioural AXI4
slave memory with optional random stalls, random ready and an address window
that answers SLVERR. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dma_pkg.sv tb/tb_dma_top.sv --top-module tb_dma_top --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_dma_top` with any other testbench, for example `tb_desc_splitter`,
`tb_read_data_mover` or `tb_crc_parser`.

`tb_dma_top` runs the whole controller at its default parameters. It makes each
mechanism happen at least once, and counts it:

* a partial block at a page boundary, and its completion from `host1`;
* metadata entries;
* a linked descriptor;
* a full ring;
* arbitration between channels;
* bursts split at 4 KiB;
* CRC mismatch, and AXI error responses on both reads and writes;
* hardware-port submissions;
* an abort by clearing the enable;
* memory back-pressure.

It checks every destination word and every completion against a reference
model written in the testbench. `tb_dma_engine` also checks that the throughput
is at least 0.625 beats per cycle.
