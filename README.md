# FLASHRAD flash cube controller: synthesizable data path

FLASHRAD is a radiation-tolerant storage module for spacecraft. It stacks 24
commercial 32 Gbit NAND flash dies side by side, like slices of a loaf of bread,
into one cube of 768 Gbit. Every die's pads are routed to the bottom edge of
the stack, so one controller can reach each die on its own 8-bit channel. The
host sees one plain, sector-addressed memory. The controller hides everything
flash needs: logical-to-physical mapping, error correction, replacing blocks
that fail, wear leveling and garbage collection.

This repository holds SystemVerilog for the hardware half of that controller:

* 24 independent die channels, each with a BCH encoder/decoder and an ONFI
  command sequencer;
* the logical block table lookup (flash translation layer);
* the free-block table used for wear leveling;
* the management logic that relocates a failed write in hardware and queues
  suspect and stale blocks for the processor;
* a background patrol that reads the flash for weak blocks while the host
  is idle;
* a scrub decision unit and the majority voter used when several cubes run in
  triple-modular redundancy.

The serial link (Serial RapidIO with its SerDes), the management processor
and its firmware, the RAM controller and cache, and the pads are not part of
this RTL. Their signals are ports of the top module `flashrad_top`.

## How a sector moves through the controller

```
 request port ──> ftl_lbt ──(block number: die | block)──> flash_channel[die] ──> NAND die
   (link side)      │  ▲                                     │ BCH enc/dec
                    │  └── free_block_table <── mgmt_unit <──┘ events (write fail,
                    ▼                               │              read errors, erase fail)
           table RAM port (MRAM)          bad-block queue ─> processor interrupt
                                          GC queue       ─> processor
```

**Program (write).** The host sends a program request with a logical sector
address (28 bits; 512-byte sectors). The translation layer reads the table
entry of that address's 16-sector group. If the entry is unmapped, it takes a
block from the free-block table and writes the new mapping back. The upper
bits of the 32-bit physical block number select the die, so the mapping also
decides which channel does the work. Once the dispatcher has handed the
request to that channel, the host streams 512 bytes. The channel stores them
in its write buffer and runs them through the BCH encoder at the same time. It
appends the 4 parity bytes and 3 bytes of metadata (see below). It then
programs the page and reads the die's status.
The dispatcher is free again as soon as the data is in the buffer, so the next
request can go to another die. Up to 24 dies program, read or erase at once.

**Read.** The translation works the same way, without allocation. An unmapped
address is answered at once with `disp_unmapped`. The channel reads
519 bytes from the die. The first 516 go into its decoder, which streams out
the corrected 512 bytes. All channels share one read-data port. A round-robin arbiter hands it
to one channel for a whole sector; `rd_ch` tells which.

**Erase and reset** name a physical block directly. These are the
processor's tools for garbage collection and for testing suspect blocks.

## Address translation

The logical block table has one 4-byte entry per 16 sectors (8 KiB). It is
indexed directly by logical sector address bits [27:4]. Bits [3:0] give the
sector's place inside the physical block: sectors lie there in order and need
no further translation. For example, with entries 976, 26, 4, 1384 for
logical groups 0, 16, 32, 48, logical sector 35 lives in physical block 4 as
its fourth sector (32 → 0, 33 → 1, …). An all-ones entry means unmapped.

A physical block number is `{8'b0, die[4:0], block[18:0]}`: 2^19 blocks of
8 KiB make up the 32 Gbit of a die. Inside a die, a block is the row address
(three ONFI row cycles). Sector *s* of the block sits at column `s × 519`:
512 data bytes, their 4 parity bytes, then 3 metadata bytes. A block
therefore needs a page of at least 8,304 bytes.

The metadata bytes hold the 24-bit logical block index (`lsa[27:4]`) the
sector was written for. Every read compares them with the index of the
table lookup that sent it there. A mismatch means the wrong block was
addressed, for example through an upset in the table or in the control
logic. The read then ends with `ch_fail` and `ch_addr_err` for that
channel. The data still streams out, so the host must discard it. This is
not reported as a bad block, because the block itself is fine. The
metadata is not covered by the BCH code, so an upset in those three bytes
also shows up as an address error. The same field is what a processor would
use to rebuild a lost table.

The table itself is kept in a RAM of the stack (MRAM in the cube), outside
this RTL. Port `lbt_ram_*` expects read data one clock after a read. The full
768 Gbit address space needs 12,582,912 entries (48 MiB). The controller
writes the table only on a first write and on a relocation. Storing
checkpoints of the table in flash is processor work.

## The BCH code

Each 512-byte sector carries a binary BCH code over GF(2^13) that corrects
any two bit errors.

* Field polynomial: p(x) = x^13 + x^4 + x^3 + x + 1.
* Generator: g(x) = m1(x)·m3(x) = `27'h4D5154B`, of degree 26. The two factors
  are the minimal polynomials of α (0x201B) and of α^3 (0x26B1).
* Codeword: the 4096 data bits are the high-order part, byte 0 first and
  MSB first. The 26-bit remainder follows, stored as 4 bytes with the top 6
  bits zero. The code is a shortened (4122, 4096) code.

`bch_enc` divides by g(x) eight bits per clock, the usual LFSR unrolled eight
times.

`bch_dec` is harder to follow. It works in four steps:

1. **Syndromes.** While the codeword streams in, it accumulates S1 = r(α) and
   S3 = r(α^3) by Horner's rule, 8 bits per clock. The first parity byte
   contributes only its two low bits, because the zero padding is not part of
   the polynomial. The data bytes go into a local buffer.
2. **Error locator.** For a two-error code the locator has a closed form:
   σ(x) = 1 + S1·x + (S1^2 + S3/S1)·x^2. The only slow step is 1/S1. It is
   computed as S1^(2^13−2) in 13 square-and-multiply clocks.
   - S1 = S3 = 0 means no error.
   - S1 = 0 with S3 ≠ 0 is uncorrectable.
   - σ2 = 0 means a single error.
3. **Chien search while streaming out.** Bit position *j* is wrong when
   α^2j + σ1·α^j + σ2 = 0. Two registers hold σ1·α^D and α^2D for the lowest
   bit degree D of the current byte. The eight bits of the byte are tested in
   parallel and flipped as the byte leaves. The registers then step by α^−8
   and α^−16 (α^−2 and α^−4 at the data/parity boundary).
4. **Check.** The parity bytes are searched too. If the number of roots found
   differs from the degree of σ, the word had more than two errors and
   `uncorrectable` is set.

Timing: 516 clocks in, 2 to 16 clocks to solve, then 512 output clocks plus
4 parity-search clocks (stalls only when `out_ready` is low).

## When flash fails

Handling failures is the point of the design, so most of the hardware below is
about it.

* **Failed program.** The channel still holds the sector in its buffer. It
  raises a relocation event, and `mgmt_unit` then:
  1. takes a free block on the same die from the free-block table;
  2. rewrites the table entry of the logical group;
  3. queues the failing block in the bad-block queue, marked *write failure*;
  4. queues the same block in the garbage-collection queue;
  5. grants the channel the new block.

  The channel programs the buffer again. It gives up after `MAX_RETRY` (2)
  relocations. It takes no new data until the write has succeeded or failed
  for good.
* **Read with many corrections.** If a read needed at least
  `cfg_rd_err_thresh` corrections (0 switches this off), or could not be
  corrected, the block is queued marked *read errors*. The threshold is
  meant to be conservative. The processor decides later whether to re-read,
  scrub or retire the block.
* **Failed erase.** The block is queued marked *erase failure*.
* **Bad-block queue.** It raises `bb_irq` while it holds entries. The
  processor pops them and tests the blocks in the background. It erases a
  block, writes a pattern and checks the status, then either returns the
  block to the free list or retires it.
* **Free-block table.** This is a small "write-addressable FIFO". The
  processor writes the blocks with the lowest program/erase counts into any
  slot, by index. Allocation takes the first valid slot from the head. A
  relocation needs a block on its own die, so it takes the first valid slot
  of that die and leaves the head where it is. When the table runs dry, the
  allocator falls back to a round-robin walk over all blocks, with dies
  interleaved and starting from a position the processor loads. This walk
  does not check that the block is really free. The processor is expected to
  keep the table filled, or to throttle writes.
* **Background patrol.** When `scrub_period` is nonzero, the dispatcher
  makes one patrol read due every `scrub_period` clocks.
  - A patrol read is issued only when no host request is waiting.
  - It walks the logical sectors in order; `scrub_pos` shows the next one.
  - Its data is drained inside the controller and never reaches the host
    ports. `ch_patrol` marks its completion.
  - It goes through the same read-error test as a host read. A sector with
    too many corrections reaches the bad-block queue as *read errors*.

  The patrol finds blocks that are getting weak before the host reads them.
  A sector that was never programmed reads back as all ones. The channel
  reports it with `ch_erased` and raises no error, so the patrol passes
  over empty space quietly. A full walk of 2^28 sectors is slow, so choose
  the period to suit the mission's upset rate.
* **Scrub decision.** `scrub_policy` applies the baseline rule:
  - fewer errors than the threshold: do nothing;
  - otherwise, re-write the block in place while its program/erase count is
    below the wear threshold;
  - above the wear threshold: relocate it.

  The processor supplies the counts and moves the data.

## Triple-modular redundancy across cubes

Cubes can be daisy-chained on the serial link. The cube nearest the host (the
"edge" module) can copy every write to two more cubes and vote on reads, so
the host sees one device. `nmr_voter` is that vote: a bitwise two-of-three
majority, with a flag naming each copy that disagreed. It is registered, with
one clock of latency. Aligning the three read streams is the job of the link
layer, which is not part of this RTL. The voter's ports come straight out of
the top.

## The NAND channel sequencer

`nand_ctrl` drives the asynchronous ONFI pins of one die:

| operation | sequence |
|---|---|
| read (`cmd=000`) | 00h, 5 address cycles, 30h, wait R/B#, 519 data reads |
| program (`001`) | 80h, 5 address cycles, 519 data writes, 10h, wait, 70h, status read |
| erase (`010`) | 60h, 3 row cycles, D0h, wait, 70h, status read |
| reset (`011`) | FFh, wait |

`111` is idle. The address cycles are column low, column high, then three row
bytes. Status bit 0 is the pass/fail bit. The strobe widths are parameters in
clock cycles. The defaults (7 clocks low and 7 high, 67 clocks before
sampling R/B#) give about 10 ns pulses and tWB = 100 ns at the 1.5 ns
(666.67 MHz) clock the controller was laid out for. R/B# is synchronised
through two flops. One program of a sector takes (1+5+519+1+1)×14 clocks of
strobes plus the die's busy time. The pad is split into `io_out`, `io_oe` and
`io_in`. WP# is held high.

## What follows the original design, and what is chosen here

These points come from the FLASHRAD design:

* 24 dies of 32 Gbit with their own 8-bit channels, used concurrently;
* BCH in the spare area;
* a 4-byte logical block table on 16-sector (8 KiB) groups, indexed by the
  upper sector-address bits, with sectors in order inside a block;
* the logical block address stored in each page's metadata and checked by
  the controller;
* hardware rewrite of a failed program into the next free block, from a
  write buffer that takes no new data meanwhile;
* a small bad-block FIFO with cause markers and a processor interrupt;
* a garbage-collection FIFO of relocated blocks;
* a write-addressable free-block FIFO with a round-robin fallback;
* the scrub rule, and scrubbing as a background task with a programmable
  rate;
* TMR voting at the edge module;
* the program-page command code `001` and the pin names of the NAND port.

These are this implementation's own choices:

* the code parameters (t = 2, GF(2^13), 512-byte sectors, 4 parity bytes);
* the decoder algorithm;
* the ONFI command bytes and strobe timing;
* the sector-to-column layout and the 3-byte metadata format;
* the patrol's timer and its sequential walk;
* erased-slot detection;
* the block-number format and the all-ones unmapped marker;
* every handshake, and the dispatcher;
* restricting a relocation to the same die;
* the retry limit;
* the depths of the queues and tables;
* reporting erase failures;
* level interrupts;
* the reset values of the thresholds;
* asynchronous active-low reset everywhere.

Not built, although the original design describes it:

* the Serial RapidIO interface, its SerDes and the daisy-chain forwarding;
* the processor subsystem and all firmware tasks (bad-block testing, table
  checkpoints, garbage-collection scans, building the free list);
* the RAM controller, ECC and cache manager;
* program/erase-count metadata in the first page of each block;
* data scrambling.

A synthesized version of the original controller had 851 flip-flops. That
version covered a NAND controller and ECC. This RTL has a 519-byte write
buffer and a 512-byte decoder buffer in each of its 24 channels, so it is far
larger.

## Files

* `rtl/flash_pkg.sv`: geometry, operation codes, ONFI bytes, BCH constants
  and GF(2^13) helper functions.
* `rtl/flashrad_top.sv`: the top module.
* `rtl/flash_channel.sv`, `rtl/nand_ctrl.sv`, `rtl/bch_enc.sv`,
  `rtl/bch_dec.sv`: the per-die channel.
* `rtl/ftl_lbt.sv`, `rtl/free_block_table.sv`, `rtl/mgmt_unit.sv`,
  `rtl/bad_block_fifo.sv`, `rtl/sync_fifo.sv`, `rtl/scrub_policy.sv`,
  `rtl/nmr_voter.sv`: translation and management.
* `tb/<module>_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/nand_die_model.sv`: a behavioural ONFI die with failure and bit-flip
  injection.
* `tb/lbt_ram_model.sv`: the table RAM.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/flash_pkg.sv tb/flashrad_top_tb.sv --top-module flashrad_top_tb
./obj_dir/Vflashrad_top_tb
```

Swap in any other testbench name the same way. `flashrad_top_tb` runs the
whole controller at its default parameters (24 channels, full address
widths, default strobe timing). It builds in about half a minute and runs in
a few seconds. The run:

1. resets all dies;
2. writes 14 sectors, using both the free table and the round-robin fallback;
3. forces a program failure and its relocation;
4. reads every sector back while channels compete for the read port;
5. corrects a two-bit upset, and catches a read that a corrupted table
   entry sends to another logical block's page;
6. drains the queues and erases the collected block;
7. checks the scrub decision and a TMR vote;
8. runs the background patrol, which finds the sector that still holds its
   two upsets, reads unwritten sectors as erased and shows nothing on the
   host ports.

It prints how often each mechanism happened and counts a failure for any
that never did.

## How far to trust it

Every module has a self-checking testbench, and all of them pass. Each
testbench was also run against a copy of its module with one deliberate bug,
and each one caught its bug.

The tests use references written independently of the RTL:

* The BCH tests compute the parity with their own polynomial division, or
  check both syndromes with their own field arithmetic. They inject 0, 1, 2
  and 3 random errors in data and parity.
* The NAND tests check the bytes that reach the die model, not only the
  controller's own view.

The die model is behavioural. It is written to the ONFI command set and has
not been checked against a vendor model or silicon, so real-part timing
(tWHR, tADL, tRR and the busy times) is not covered. Those waits are either
missing or folded into the strobe widths. Check them against the data sheet
of the die you use before building hardware.
