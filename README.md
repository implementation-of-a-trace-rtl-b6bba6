# E-trace instruction trace encoder for a NOEL-V hart

A processor that runs in space cannot be stopped and stepped through with a
debugger. To see what it executed, you need a continuous record of its program
counter, and that record has to be small enough for a serial link. This encoder
produces that record. It watches what one hart retires each clock cycle and sends
packets in the RISC-V E-trace branch-trace format. A packet is sent only when the
control flow cannot be inferred from the program image. Packets are
sign-compressed, given a one-byte header, and packed back to back into 512-bit
words for a high-speed link. A decoder with a copy of the program rebuilds every
executed address from those words.

The design has two parts:

* **cnt_reg** (`te_cnt_reg`) is an APB slave with the three trace-control
  registers.
* **Pkg_format** (`te_pkg_format`) does the packaging. It is a chain of three
  blocks:
  * `te_pkt_gen` decides which packet to send.
  * `te_compress` removes the sign bytes and adds the header.
  * `te_buffer` holds the two 512-bit output buffers.

`te_encoder` is the top. `etrace_pkg` holds the shared types and widths.

```
 hart-to-encoder ──► te_pkt_gen ──raw packet──► te_compress ──bytes──► te_buffer ──512b + valid──► link
 (one block/cycle)   next/current/previous      sign strip +           2 x 512 bit,
                     + branch map, resync        1-byte header          pad or split
        ▲                       ▲                                           │
        │                cfg (tracing, full_addr, syncmode, syncmax)        │ empty
  APB ──┴──────────────► te_cnt_reg ◄───────────────────────────────────────┘
                         (trTeActive=0 holds Pkg_format in reset)
```

## What the encoder sees

Each cycle the hart presents at most one *retirement block* (`hart_if_t`). The
fields are:

* `iaddr`: address of the first instruction.
* `iretire`: number of halfwords retired.
* `ilastsize`: size of the last instruction.
* `itype`: what the last instruction was. The encoding follows the E-trace
  table, for example 4 = exception, 5 = interrupt, 6 = exception return,
  8..15 = the kinds of jump, 2/3 = not taken and taken branch.
* `cause`, `tval`, `priv`.

A cycle with `iretire = 0` and no exception or interrupt is idle, and the encoder
ignores it. An exception or interrupt block with `iretire = 0` is a trap taken
before anything retired.

The interface has no context, time, ctype or sijump inputs. Without them the
optional E-trace features that need them (timestamps, context changes, implicit
returns) are not available. The one optional feature built is full address mode.

## Choosing packets: the three-stage pipeline

This is the core of the design and the part that most needs explaining.

Blocks move through three registers: **next → current → previous**. A packet is
decided for the block that is leaving *current*. At that point its successor is
in *next* and its predecessor in *previous*. Both neighbours are needed:

* Whether the current block must report its first instruction depends on how
  the previous block ended.
* Whether it must report its last instruction depends on what the next block is.

Every packet reports one instruction R. The branch map in a packet holds the
outcomes of all branches not yet reported, up to and including R. Outcomes are
stored oldest in bit 0, with 1 meaning *not taken*. The rules, in priority order:

| situation | packet | R |
|---|---|---|
| first block after tracing starts | 3.0 sync (full address, priv) | first instruction of current |
| previous block trapped | 3.1 trap (cause, interrupt, tval, full address) | first instruction of current (the handler) |
| previous block ended in an uninferable jump (return, indirect call/jump, co-routine swap, exception return) | 1 if branches are pending, else 2 | first instruction of current (the jump target) |
| current traps, the next block traps without retiring, or current is the last block before tracing stops | 1/2 with the stop bit set | last instruction of current |
| resync due and the branch map is empty | 3.0 | last instruction of current |
| 31 branches pending | 1 with `branches = 0`: a full 31-bit map, no address | - |

Exceptions and interrupts are handled the same way.

**Two reports for one block.** A block can need both a report of its first
instruction and a stop report of its last. This happens when a block starts at a
jump target and the block after it traps. Only one packet is made per cycle, so
the stop address is held and sent with the next packet that can carry it:

* in a trap packet, where `thaddr = 0` adds a stop-address field after `tval`;
* in the empty slot of a block that trapped without retiring;
* in the final report when tracing ends.

**Ending a trace.** When `trTeInstTracing` is cleared, the pipeline drains with
empty slots. The last block gets a stop report. Then a 3.3 support packet is sent
with `qual_status = 1`, meaning the trace has ended. Finally the partly filled
buffer is flushed. `trTeEmpty` is set when the generator, the compressor and the
buffer all hold nothing. In simulation this takes fewer than ten cycles after
tracing stops.

**Resync.** With `syncmode = 1` the encoder counts packets. With `syncmode = 2`
it counts clock cycles. After 2^(syncmax+4) of them (2^4 … 2^19) a 3.0 packet is
sent at the next block whose branch map is empty. `syncmode` 0 turns resync off,
and so does 3 (instruction halfwords, not implemented).

**Addresses.** Every address field holds the byte address shifted right by one.

* Delta mode (the reset default): formats 1 and 2 carry the difference from the
  last reported address. For example, going from 0x8000_0004 back to 0x8000_0000
  is sent as −2, a field of all ones that compresses to one byte.
* Full address mode: set with bit 0 of `trTeInstFeatures`.

Format 3 always carries the full address. The stop bit sits just above the
address and is sent XORed with the address sign. A clear stop bit therefore costs
nothing after compression.

### Packet layouts

Fields are listed LSB first. Every raw packet is sign-extended from its top
field.

```
format 1    fmt=1(2) branches(5) map(1/3/7/15/31 by count) address(63) stop(1)
            branches=0: map(31) only
format 2    fmt=2(2) address(63) stop(1)
format 3.0  fmt=3(2) sub=0(2) branch(1) priv(3) address(63)
format 3.1  fmt=3(2) sub=1(2) branch(1) priv(3) ecause(6) interrupt(1) thaddr(1)
            address(63) tval(64) [stop address(63) when thaddr=0]
format 3.3  fmt=3(2) sub=3(2) ienable(1) encoder_mode(1) qual_status(2)=1 full_addr(1)
```

The largest packet is a trap packet with a stop address: 206 bits, which is 26
bytes before compression.

## Sign compression and the header

Redundant high bytes are stripped: the payload keeps the fewest bytes `n`
(1..31) such that the top kept bit equals every bit above it. A receiver restores
the packet by sign-extending that bit. `n` is found by a five-step binary search
over the byte count, which keeps the logic shallow. The test "fits in n bytes" is
monotonic in n, so the search is exact.

A header byte is placed below the payload:

* bits 4:0 hold `n`;
* bit 5 is the timestamp flag (always 0);
* bits 7:6 are zero.

The stage is registered: one packet in and one out per cycle.

## The two 512-bit buffers

Each compressed packet enters the active buffer at its MSB end while the
contents shift down by the packet's length. Packets therefore sit back to back,
with the oldest nearest bit 0. When a buffer holds exactly 64 bytes, it goes to
the link with a one-cycle `sink_valid`, and the other buffer takes over. One
packet can be accepted every cycle. There is no back-pressure.

When a packet does not fit in the space left, the `SPLIT` parameter decides what
happens:

* `SPLIT = 1` (default): the packet's low bytes fill the buffer exactly, and
  its high bytes start the other buffer. Seen as a byte stream starting at bit 0
  of each word, the packets are contiguous across words.
* `SPLIT = 0`: the buffer is sent as it is, with zero bytes in its unused low
  part. The whole packet then starts the other buffer. A reader skips zero
  bytes where it expects a header, since a real header is never zero.

When tracing ends, the last partly filled buffer is sent anyway.

* With `SPLIT = 1` its contents are first shifted down to bit 0. A packet split
  over the previous word then continues directly, and the zeros are at the top.
* With `SPLIT = 0` the zeros stay at the bottom, as with ordinary padding.

`buf_padded` marks words that were closed before they were full.

## Control registers

| offset | register | fields |
|---|---|---|
| 0x000 | trTeControl | 0 trTeActive, 1 trTeEnable, 2 trTeInstTracing, 3 trTeEmpty (read only, from Pkg_format), 6:4 trTeInstMode = 3 (read only), 17:16 trTeInstSyncMode, 23:20 trTeInstSyncMax |
| 0x004 | trTeImpl | read only, 0x0000_0001 |
| 0x008 | trTeInstFeatures | 0 trTeInstNoAddrDiff (full address mode) |

The bit positions follow the RISC-V trace control interface.

* The APB slave never inserts wait states. `pready` is always 1 and `pslverr`
  always 0.
* While trTeActive is 0, every other field is held at its reset value, and the
  packaging logic is held in reset. Clearing trTeActive therefore drops a trace
  in progress.
* trTeInstTracing takes effect only together with trTeEnable.

The expected bring-up is:

1. Write trTeActive = 1.
2. Read it back.
3. Write the sync fields and features.
4. Write trTeEnable = 1.
5. Read it back.
6. Write trTeInstTracing = 1.

All resets are synchronous and active low.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BUF_W` (te_encoder, te_pkg_format, te_buffer) | 512 | width of each output buffer and of `sink_data` |
| `SPLIT` | 1 | 1 = split packets over two buffers, 0 = zero padding |
| `XLEN`, `BMAP_W`, `PKT_W` (etrace_pkg) | 64, 31, 248 | address width, largest branch map, raw packet width |

At the defaults, yosys coarse synthesis of the whole encoder gives about 8,100
cells, 1,089 flip-flop bits and 1,024 memory bits (the two buffers). Most of the
area is in the compressor's byte selection and in the packet generator.

## Where this design departs from, or goes beyond, the description it follows

* **The exact packet rules and bit layouts are this design's reading of E-trace.**
  The description behind this design says only that packets are chosen by nested
  conditions on the three pipeline stages. It does not give field layouts. The
  following are all choices made here: the stop-address field in trap packets,
  carrying a held stop address, the XORed stop bit, and the header bit positions.
  An off-the-shelf E-trace decoder will need the layout above.
* **Both buffer policies are built.** The description treats zero padding as
  the implemented scheme and splitting as an improvement. Splitting is the
  default here because it gives the lower bit rate.
* **Shifting the final buffer when splitting** is this design's own choice. It
  keeps split packets readable.
* **Timestamps, context, data trace and the optional compression features** are
  not implemented. The timestamp flag in the header is always 0.
* **trTeImpl's value** (1) and the fact that the APB slave has no wait states
  are this design's own choices.
* **One encoder traces one hart.** The trace funnel needed to merge several
  encoders onto one link is not part of the design. Neither is the serial link.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_te_cnt_reg` | APB reads and outputs against a register model: reset values, read-only fields, the active/enable rules, two-cycle transfers, 300 random operations |
| `tb_te_compress` | against a linear-scan reference: length, header, kept bytes, zeros above them, and that sign extension restores the packet; every length 1..31 occurs |
| `tb_te_buffer` | both policies against a byte-level model: word contents, padding strobe and exact output cycle, with splits, pads and flushes |
| `tb_te_pkt_gen` | raw packets decoded back into the executed addresses; the end-of-trace sequence; resync intervals; every packet kind occurs |
| `tb_te_pkg_format` | zero-padding configuration end to end: stream parsing, no packet crossing a word, decoding, trTeEmpty |
| `tb_te_encoder` | the whole encoder at its defaults through APB bring-up; five traces (delta/full, resync by packets/cycles, no uninferable jumps, addresses near 2^64) plus an aborted one |
| `tb_te_workloads` | a padding and a split encoder side by side on one benchmark-like trace: full against delta address mode, and the resync interval swept over 2^4, 2^5, 2^6, 2^7, 2^8, 2^11, 2^14, 2^19 |

The end-to-end tests do not compare packets with expected packets. Instead, a
hart model in `te_tb_pkg` runs a random program:

* 400 instructions of 2 and 4 bytes;
* conditional branches, inferable and uninferable jumps;
* exceptions and interrupts, including ones that retire nothing;
* idle cycles.

It emits up to two instructions per block. A decoder written separately from the
RTL then rebuilds the executed address list from the 512-bit words and the
program alone. That list must equal what the hart retired.

`tb_te_encoder` also counts every mechanism and fails if one never occurs:

* split packets and final flushes;
* traps without retirement and interrupts;
* resyncs and full branch maps;
* trap packets, including ones with a stop address;
* jump-target and stop reports;
* support packets;
* the aborted trace.

Measured compression on these synthetic programs:

| run | mode | bits per instruction |
|---|---|---|
| 1 | delta, resync every 16 packets | 6.1 |
| 2 | full address, resync every 16 packets | 8.9 |
| 3 | delta, resync every 64 cycles | 5.1 |
| 4 | delta, no uninferable jumps, no traps, no resync | 0.6 |
| 5 | full address, addresses near 2^64, resync every 128 packets | 6.6 |

The random programs have an uninferable jump or a trap every few instructions,
far more often than real code. Their bit rate is therefore much higher than
the at most about 2.5 bits per instruction expected on ordinary benchmarks. Run 4
is closer to real code.

`tb_te_workloads` uses a program with fewer uninferable jumps and rare traps,
which is more like compiled code. It runs 26,888 instructions per trace:

| configuration | zero padding | split |
|---|---|---|
| full address, resync every 16 packets | 3.94 | 3.73 |
| delta address, resync every 16 packets | 2.44 | 2.34 |

With delta addresses and splitting, sweeping the resync interval gives these
bit rates:

* 2^4 packets: 2.34 bits per instruction (88 resyncs);
* 2^5: 2.25;
* 2^6: 2.21;
* 2^7 and above: 2.19.

From 2^7 upward only a handful of resyncs remain (5 at 2^7, none from 2^11), so
the rate stops falling. The test checks the following:

* splitting never needs more words than padding;
* delta mode beats full address mode;
* the resync count stays within the interval;
* the rate does not rise as the interval grows.

Each block's testbench was also run against a copy of the block
with a deliberate bug, and it caught the bug every time.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/etrace_pkg.sv tb/te_tb_pkg.sv rtl/*.sv tb/tb_te_encoder.sv \
  --top-module tb_te_encoder
./obj_dir/Vtb_te_encoder
```

Replace the last testbench file and the top module name to run any other test.
The testbenches for `te_cnt_reg`, `te_compress` and `te_buffer` do not need
`te_tb_pkg.sv`. The whole end-to-end test runs in well under a minute.
