# Bit Movement Engine

A bit movement engine copies a field of bits from one place in memory to
another when the field may start at any bit, be of any length, and land at any
bit. The memory is only word-addressable (32-bit words on an AHB bus), so the
field has to be realigned on the fly and the destination words at both ends
have to be merged with the bits around the field that must not change. This RTL
builds such an engine around a funnel shifter. It adds an AHB bridge and a
small AHB fabric. The fabric loads the engine from linked descriptors in
memory, one move after another.

```
             ptr_wr / ptr_wdata           memory (AHB slave, outside this RTL)
                     |                          ^
                     v                          | mem_hsel / mem_ahb / mem_rsp
            +------------------+                |
            |    ahb_fabric    |----------------+
            | descriptor seq.  |
            +------------------+
               ^ master m0   | slave s1 (registers)
               |             v
            +------------------+
            |    ahb_bridge    |
            +------------------+
   mREQ mRW mADDR mWDATA ^  | sSEL sRW sADDR sWDATA
        mRDATA mHOLD     |  v sRDATA
            +------------------+
            | bit_move_engine  |--> DONE (also to the fabric)
            |  regs, FIFO,     |
            |  funnel, masks   |
            +------------------+
```

`bme_soc` is the top and holds exactly this. The memory is not part of the
design. Its AHB slave port is a top-level port, and `tb/ahb_mem_slave.sv` is a
behavioural model of it for simulation.

## Addresses and bit order

* A **bit address** has 37 bits. Bit *b* is bit `b mod 32` of the word at word
  address `b / 32`. Bit 0 of a word is its least significant bit.
* The engine's master port carries a 30-bit **word address**, `mADDR`. That is
  bits [34:5] of a bit address. The bridge turns it into the byte address
  `HADDR = {mADDR, 2'b00}`. Bits [36:35] of a bit address are decoded but
  select nothing.
* The **block length** is given in bits: 27 bits, 1 to 134,217,727. The source
  and destination fields must not overlap, and the engine does not check this.
  They may share a word, because only the field's own bits are written.

## Registers (engine slave port, `bme_regs`)

| index | contents |
|---|---|
| 0 | source bit address [31:0] |
| 1 | [31:27] source bit address [36:32], [26:0] block length |
| 2 | destination bit address [31:0] |
| 3 | [31:27] destination bit address [36:32], [26:0] unused, reads 0 |
| 4 | [2] error, [1] busy, [0] START (write 1; reads 0) |

Registers 0–3 ignore writes while the engine is busy. A START write has three
possible outcomes:

* Idle, with a non-zero length: the move starts in the same cycle and error is
  cleared.
* Busy: error is set and nothing else changes.
* Length zero: error is set, no move starts, and DONE pulses in the next cycle,
  so that a controller waiting for DONE is released.

On the bus the five registers sit at `REG_BASE + 4*index`. The default
`REG_BASE` is `0xFFFF_FF00`, and any address with the same bits [31:8] reaches
the registers.

## How a move is computed

Let `soff` and `doff` be the bit offsets inside a word of the first source bit
and the first destination bit. Let `M` be the number of destination words the
field touches, and `eoff` the offset of its last bit. Destination word *k*
(0 ≤ *k* < M) is always **one funnel-shifter output**:

```
word_k = ( {V[k+1], V[k]} >> sh )[31:0]        sh = (soff - doff) mod 32
```

`V` is the stream of source words:

* It starts with the word that holds the first source bit.
* A **zero word is put in front** when `soff < doff`. The field then has to
  move up inside the word, so its first bits come from the upper half of the
  concatenation.
* Once the real source words are used up, the stream continues with zeros.
  Those bits only fall outside the field.

Each real source word is read once. After word *k* is formed, `V[k+1]`
becomes the lower input for word *k+1*. This is what makes the move stream:
one new source word in, one destination word out.

The first and last destination words are merged with their old contents
through three masks from `bme_mask_gen`:

* `keep_lo`: old bits below `doff`. Used only in the first word.
* `field`: the new bits.
* `keep_hi`: old bits above `eoff`. Used only in the last word.

The merge is `(word & field) | (old & (keep_lo | keep_hi))`. The old contents
of these two words come from two extra reads made at the start. A read is
skipped when the field covers its word completely. When the whole field fits in
one destination word (the *corner case*), a single word is formed and both
masks apply to it.

## Controller and bus stage (`bit_move_engine`)

The controller has ten states:

1. **ADDRESS DECODE**: idle. The registers can be written. The controller waits for START.
2. **ADDRESS COMPUTATION**: computes the first words, the word counts, the offsets, the need for the leading zero word, and which edge reads are needed.
3. **READ DATA TO FIFO**: issues the edge reads, then the first `min(4, source words)` source reads into the four-word FIFO.
4. **COMPARE OFFSET**: registers `sh` and decides whether the field fits in one destination word.
5. **COMPUTE FOR CORNER CASES**: forms and masks the single word, then goes to WRITE LAST DATA.
6. **COMPUTE FOR NORMAL CASES**: forms and masks the first destination word.
7. **WRITE FIRST DATA**: writes the first word to the bus while forming the next one.
8. **WRITE INTERMEDIATE DATA**: whole words 1 to M-2, unmasked.
9. **WRITE LAST DATA**: the last word, merged, then waits until its write has been accepted.
10. **DONE**: DONE is high for one cycle, once the last write's data phase has ended. Then back to ADDRESS DECODE.

The controller does not run the bus. A **bus stage** runs beside it from READ
DATA TO FIFO on. Each cycle it picks one request, in this order:

1. a pending edge read;
2. a source read, if the FIFO plus the read in flight has room;
3. the buffered write word.

A write that `mHOLD` holds is presented again unchanged. The compute stage
forms at most one destination word per cycle into a one-word write buffer. It
takes the lower input from a register and the upper input from the FIFO head,
or a zero. The first source word, or the leading zero, enters that register as
soon as it arrives. So reads and writes interleave, one bus transfer per cycle.

### Cycle budget

Moving *L* bits needs about *L*/32 reads and *L*/32 writes, so the engine runs
at close to two cycles per 32 bits. The target budget is **L/16 + 10 cycles**,
counted from the cycle of the START write to the cycle DONE is high. With a
zero-wait memory it is met for every move the testbenches try. Worst measured
cycles over five offset pairs:

| length (bits) | budget | worst measured |
|---|---|---|
| 128 | 18 | 16 |
| 143 | 18 | 17 |
| 176 | 21 | 19 |
| 191 | 21 | 20 |
| 336 | 31 | 29 |
| 351 | 31 | 30 |

A sweep over all 32 × 32 source/destination offset pairs at lengths 1, 15,
16, 17, 33, 34, 1026 and 1039 also stays within the budget. Its smallest slack
is 0 cycles, for a 15-bit move. The budget is tightest for short moves, where
the start-up states take a large share of the cycles. Wait states add to the count
one for one, and the budget is not claimed for them.

## Native master protocol and the bridge (`ahb_bridge`)

The engine's master port follows AHB pipelining:

* A request (`mREQ`, `mRW` = 1 for write, `mADDR`, and `mWDATA` for a write) is
  accepted in a cycle where `mHOLD` is low.
* Its data phase is the following cycle or cycles. It ends at the first cycle
  where `mHOLD` is low, and read data is taken from `mRDATA` in that cycle.

The bridge makes each request one AHB NONSEQ transfer. It registers the write
data for the data phase. It raises `mHOLD` in two cases: the data phase is
waiting (HREADY low), or a request is waiting for HGRANT. One hold signal
covers both, so a read data phase can end on AHB while the engine still sees
`mHOLD` high. The bridge then keeps that read word and passes it on when
`mHOLD` falls.

On the slave side, the bridge registers the address phase and, in the data
phase, drives `sSEL`, `sRW`, `sADDR = HADDR[4:2]` and `sWDATA = HWDATA`. It
returns `sRDATA` with no wait states.

Only single NONSEQ transfers are used, with no bursts and no HSIZE.
`HWRITE = 1` means write, as in AMBA.

## Fabric and descriptor chains (`ahb_fabric`)

Writing a byte address on `ptr_wr`/`ptr_wdata` starts a chain. A descriptor is
five words:

| offset | word |
|---|---|
| +0 | register 0 |
| +4 | register 1 |
| +8 | register 2 |
| +12 | register 3 |
| +16 | byte address of the next descriptor, 0 = last |

For each descriptor the sequencer:

1. reads the five words, one transfer at a time;
2. writes registers 0–3, then START;
3. grants the bus to the engine (HGRANT) until DONE;
4. follows the link.

`chain_done` pulses once the last descriptor has finished.

There is no arbiter: the sequencer and the engine never want the bus at the
same time, and the grant changes hands only while no data phase is in flight.
The HBUSREQ input therefore does not affect the grant. It is left unused on
purpose, and the linter reports it.

## What follows the original description and what does not

The following come from the original description:

* the ten states and their order;
* the register map and field widths;
* the signal names of the native interfaces;
* the 30-bit word address, 37-bit bit address and 27-bit length;
* the four-word FIFO, the funnel shifter and the three masks;
* the NONSEQ-only AHB bridge;
* a fabric that fetches register sets and next-pointers from memory;
* the L/16 + 10 cycle budget.

The following are this design's own choices:

* the 32-bit word;
* little-endian bit order;
* where the bit fields sit inside registers 1, 3 and 4;
* the error rules and the zero-length reject;
* write protection while busy;
* the bus stage with overlapped reads and writes;
* reading and skipping the destination edge words;
* the native handshake details and the bridge's held read data;
* the descriptor layout, address map, pointer port and grant scheme;
* synchronous active-low reset everywhere;
* HWRITE polarity. The original's table states the opposite polarity; this
  design follows AMBA.

The 30-bit word address and the 37-bit bit address do not agree. The top two
address bits are therefore ignored.

## Files

| file | what it is |
|---|---|
| `rtl/bme_pkg.sv` | widths, register indices, state enum, AHB types and structs |
| `rtl/funnel_shifter.sv` | `({hi,lo} >> sh)[W-1:0]` |
| `rtl/bme_mask_gen.sv` | the three merge masks |
| `rtl/bme_fifo.sv` | four-word source FIFO |
| `rtl/bme_regs.sv` | register file and START/error logic |
| `rtl/bit_move_engine.sv` | controller, bus stage, compute stage |
| `rtl/ahb_bridge.sv` | native ↔ AHB, master and slave side |
| `rtl/ahb_fabric.sv` | interconnect and descriptor sequencer |
| `rtl/bme_soc.sv` | top level |
| `tb/ahb_mem_slave.sv` | behavioural AHB memory with random wait states |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the end-to-end test at the top's default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bme_pkg.sv tb/tb_bme_soc.sv --top-module tb_bme_soc -Mdir obj -o sim
./obj/sim
```

Run the other testbenches by swapping in their names. What the testbenches
cover:

* `tb_bme_soc` runs two descriptor chains through the whole design and compares
  all 64 KiB of memory with a reference that moves the same bits one at a time.
  * The first chain has 20 moves on a zero-wait memory, each checked against
    the cycle budget.
  * The second chain has 15 moves with random wait states, one of them of zero
    length.
  * It counts how often each mechanism occurs, and fails if one never does: corner case,
    two-word move, intermediate words, negative, positive and zero shift,
    skipped edge read, master hold, memory wait states, chaining, and reject.
* `tb_bit_move_engine` drives the engine directly with a native-protocol
  memory. It runs directed edge cases, every offset pair at eight lengths, about 100
  random moves of up to 3000
  bits (with and without random holds), the budget table above, the
  high-address bits, and the busy and zero-length error paths.
* The other testbenches check each block alone: every shift amount, every mask
  pair, FIFO against a queue model, register fields and rules, bridge master
  and slave sides under random waits and lost grants, and fabric register
  writes, link following and grant handover.

The simulator has two states, so every register read after reset is reset.
Testbenches initialise memory before use.

## Limits

* Overlapping source and destination fields give undefined results.
* The cycle budget holds only for a zero-wait memory. Each wait state adds a
  cycle.
* The FIFO depth is a parameter (`FIFO_DEPTH`, default 4). A depth of 1 still
  moves data correctly but misses the budget.
* No bursts: each word is a separate NONSEQ transfer.
