# Variable-to-fixed code decompression for VLIW fetch packets

Embedded processors keep their programs in scarce memory, so the program is
stored compressed and a small hardware unit between program memory and the
instruction cache restores the instructions on the fly. This RTL implements
the decompression side of a scheme that compresses code with a
**variable-to-fixed (V2F)** code derived from arithmetic coding: runs of
program bits of varying length are each replaced by one codeword of fixed
length N (N = 4 here). Because every codeword has the same length, the
decoder always knows where the next codeword starts. That makes decoding
either fully parallel (static model) or a single table lookup per codeword
with no comparisons (Markov model).

The unit of random access is the 256-bit fetch packet of a TMS320C6x-class
VLIW processor. Every packet is compressed on its own into a byte-aligned
block, and a line address table (LAT) says where each block starts, so a
branch can land on any packet.

Two decoders are provided, side by side in the top level `v2fcc_top`:

| path | model | how it decodes | rate |
|---|---|---|---|
| `iid_parallel_decoder` | one fixed probability, Prob(0) = 0.75, for all programs | all codewords of a block at once | one 256-bit packet per cycle |
| `block_fetch` + `markov_v2f_decoder` | 32x4 Markov model (128 states), profiled per program | one table lookup per codeword | one codeword per cycle |

The Markov model compresses better (the scheme reports about 72 % of the
original size against about 82.5 % for the static model), but each codeword
can only be decoded once the previous one is known.

## How the codes are built

The decoders only make sense with the code construction in mind; the
testbench package `tb/v2f_ref_pkg.sv` contains a complete software model of
it.

Start from the integer interval [0, 2^N). An interval that is not a unit
interval [w, w+1) is split in two integer parts: the left part stands for an
input bit 0, the right part for a 1, and the sizes follow the probability of
the bit. Split again until only unit intervals are left. The path of bits
from the root to unit interval [w, w+1) is the run that codeword w stands
for. Since there are exactly 2^N unit intervals, each run gets its own N-bit
codeword.

The split rule used throughout this design is

    left = size * P0 rounded to the nearest integer, halves rounded down,
           then clamped to 1 .. size-1;                 right = size - left

with P0 = Prob(0) held in 1/256 units (in integers:
`left = (size * P0_Q8 + 127) / 256`). The scheme does not spell out its
rounding. This rule was chosen because it reproduces all of the scheme's
published codebook statistics. For P0 = 0.75 and N = 2 to 8, the expected
run length per codeword comes out at exactly the published 2.312, 3.488,
4.752, 5.973, 7.216, 8.442 and 9.681 bits. Plain rounding misses at N = 3
(3.538) and truncation misses at N = 4 (4.724). For N = 2 and P0 = 0.75:
[0,4) splits into [0,3) and [3,4), [0,3) into [0,2) and [2,3), [0,2) into
[0,1) and [1,2), so codewords 00, 01, 10, 11 stand for the runs 000, 001, 01,
1, and the byte `01 001 000` compresses to `10 01 00`.

With a Markov model the probability depends on the state, and the state
moves with every bit. Each state therefore gets its own codebook, built by
the same splitting but with each split using the probability of the state
reached so far. Every codebook entry also records the state at which its run
ends; decoding the next codeword uses that state's codebook. A block always
starts in state 0.

Two kinds of padding appear at a block's end:

* **Run padding.** When the 256 packet bits run out in the middle of a run,
  the encoder appends bits until a unit interval is reached. The decoder
  decodes them and throws away everything past bit 256.
* **Byte alignment.** Blocks start on byte boundaries. With 4-bit codewords
  an odd codeword count leaves one unused nibble, which the decoder skips.

Which codeword is given to which unit interval does not change the
compression at all. A compressor may permute the codewords of each codebook
to cut toggling on the instruction bus, and the decoder table simply stores
the entries in the permuted order. The testbenches use random permutations.

## Markov decoder (`markov_v2f_decoder`, `decoder_table`)

The decoder table holds 128 codebooks of 16 entries. Each entry is 24 bits
(`v2fcc_pkg::dec_entry_t`):

| bits | field | meaning |
|---|---|---|
| 23:20 | `len` | length of the decoded run, 1..13 |
| 19:7 | `bits` | the run, first bit in bit 19, unused low bits zero |
| 6:0 | `next_state` | state, and so codebook, for the next codeword |

That makes 2048 x 24 bits = 6 KB. The entry address is `{state, codeword}`:
the 7-bit state shifted left by four bits, with the codeword in the low
bits. For example, in state `0010011` the codeword `0100` reads entry
`00100110100`.

The loop is as follows. The table is a synchronous-read RAM. The word read
at one clock edge goes through a multiplexer to supply the state half of the
next address in the same cycle, so one codeword is decoded per clock cycle
with exactly one read in flight. The decoded run is shifted into a 256-bit
accumulator (`{acc, run} << take`, where `take` is the run length cut to the
room left). When the accumulator is full:

* the packet is copied to the output register,
* the state returns to 0,
* the rest of the current byte is dropped.

The output register lets decoding of the next block go on while the packet
waits for `pkt_ready`. A lookup is only issued when the output register will
be free for its result.

Interfaces, all valid/ready:

* `in_*`: one compressed byte per transfer. The high nibble is decoded first.
* `pkt_*`: 256-bit packets, with the first decoded bit in bit 255.
* `restart`: abandons the block in progress.
* `blk_done`: pulses with each completed packet.
* `tbl_*`: loads the table. The table is program specific, so it must be
  written before decoding.

Timing, with bytes always available:

* A block of K codewords completes K cycles after the previous block.
* Add one cycle if the previous block ended with an alignment nibble.
* Through the fetch front end, a packet is on `mk_pkt_*` K + 3 clock edges
  after the edge that accepted the request.

At the reported 72 % ratio a codeword covers about 4 / 0.72 = 5.6 bits, so
the core delivers about 5.6 bits per cycle.

Two assertions guard the core:

* a table word in use must have a nonzero length;
* a packet must stay unchanged until it is taken.

## Static-iid parallel decoder (`iid_parallel_decoder`)

The static codebook is the same for every program. It is computed while the
design elaborates from the parameter `P0_Q8_P` (default 192, that is 0.75)
by `v2fcc_pkg::iid_run`, so it needs no loading. A block needs at most
`MAX_CHUNKS` codewords, which the design computes as 256 divided by the
shortest run. For the defaults the shortest run is `11`, 2 bits long, which
gives 128 codewords. The block therefore arrives on a 512-bit bus, first
codeword in the top bits. Bits past the block's end are ignored.

Decoding takes the following steps, all in one cycle:

1. Each of the 128 lanes looks its codeword up.
2. A prefix sum of the run lengths gives each lane's offset in the packet.
3. Each run is shifted to its offset and ORed into a (256 + RUN_BITS)-bit word.
4. The word's top 256 bits are the packet.
5. The first lane whose run reaches bit 256 marks the block's end.
   `pkt_bytes` reports the block's byte-aligned size, which tells the
   surroundings where the next block starts.

Outputs are registered, so a block presented at one edge appears after it,
one block per cycle. `pkt_short` flags a block whose codewords give fewer
than 256 bits; that cannot happen at the defaults.

`CW_BITS_P` accepts other codeword lengths. The run width `RUN_BITS`
follows the codebook's longest run, which is 3, 5, 8, 10, 12, 15 and 17 bits
for N = 2 to 8. The scheme's trade-off study found N = 4 best. The code
rate N / (mean run) improves only from 0.842 to 0.826 between N = 4 and
N = 8, while the codebook grows from 16 to 256 entries.

## Fetch front end (`block_fetch`, `line_address_table`)

A request carries an uncompressed packet index. `block_fetch` serves it in
these steps:

1. It reads the LAT, which holds one byte address per packet (1024 entries,
   16-bit addresses), and pulses the decoder's `restart`.
2. It issues the first program-memory read.
3. It offers one byte per cycle while the decoder takes them. Each following
   read is issued in the cycle the current byte is taken.
4. It stops at the decoder's `blk_done`. The decoder finds the block's end
   itself, so the LAT needs no block lengths.

The memory port assumes a synchronous-read memory whose output holds until
the next read. One request is served at a time; `req_ready` is high only
when the unit is idle.

## Top level (`v2fcc_top`)

`v2fcc_top` wires `block_fetch` to `markov_v2f_decoder` and places
`iid_parallel_decoder` beside them with its own ports. The program-memory
read port, the table and LAT load ports and both packet outputs are brought
out. Parameters are `LAT_IDX_BITS` (10), `MEM_ADDR_BITS` (16) and
`IID_CHUNKS` (128). The fixed format constants (256-bit packet, 4-bit
codewords, 7-bit state, 13-bit runs) live in `rtl/v2fcc_pkg.sv`.

Storage at the defaults:

* decoder table: 49 152 bits of RAM;
* LAT: 16 384 bits;
* flip-flops: about 825, most of them the 256-bit accumulator, the output
  packet and the iid output register.

The iid decoder's 128-lane shifter network is the largest block of logic.

## Loading a program

To run a compressed program on this unit:

1. Build the Markov model from the program and split intervals as above.
   Every (state, codeword) pair gets the run it ends with, the run's length
   and the state it reaches.
2. Write each entry at address `{state, codeword}` through `tbl_*`.
3. Compress each 256-bit packet from state 0 into a byte-aligned block, with
   the first codeword in the high nibble of the first byte.
4. Store the blocks in program memory.
5. Write each block's start address into the LAT at the packet's index.

Runs must not exceed 13 bits. With the rounding rule above, a probability
kept within 30/256..226/256 (about 0.12..0.88) guarantees this; at 26/256
or below, a 14-bit run becomes possible along a worst-case path. The test models
draw from 26/256..230/256 and the reference encoder stops with an error if
any run exceeds 13 bits, which has not happened with the fixed seeds.

Rounding differences between compressor and decoder do not matter on the
Markov path: the table stores whatever runs the compressor chose. Only the
static codebook is fixed in hardware.

## Departures and open points

* **Markov decoding rate.** The reported figure for the 32x4 Markov core is
  23.8 bits per cycle. The mechanism behind that number is not known, and
  this core gives about 5.6 bits per cycle: one lookup per cycle, where
  each lookup depends on the one before.
* **Design choices beyond the source scheme.** These were chosen here:
  * the exact interval rounding rule, chosen because it reproduces the
    scheme's published numbers. A static-model compressor must use the same
    rule;
  * the bit and nibble order;
  * all handshakes, the restart and `blk_done` signals and reset values;
  * the synchronous-read RAMs;
  * the LAT size and entry format;
  * the fetch sequencing;
  * the iid block bus width.
* **Static-iid input.** The iid decoder expects its whole block on one bus.
  No fetch unit gathers it from memory.
* **Not part of the RTL:**
  * the compressor and the building of the Markov model and codebooks
    (offline software, modelled in `tb/v2f_ref_pkg.sv`);
  * the bus-toggle-minimising codeword assignment, an offline step whose
    result is only the order of the table entries;
  * program memory;
  * the processor and cache.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_v2fcc_top` tests the whole unit at its default size, end to end.
  * Markov path: it loads all 2048 table entries from a random 32x4 model
    with shuffled codeword assignment, and compresses 64 packets drawn from
    that model. It then requests 150 packets in sequential runs and random
    jumps, with random back-pressure. It checks every packet and the exact
    K + 3 latency.
  * Static-iid path: it decodes 64 packets back to back.
  * It counts run padding, alignment nibbles, output stalls and jumps, and
    fails if any of them never occurred.
* `tb_markov_v2f_decoder` covers the Markov core.
  * It streams packets with gaps and back-pressure, then without gaps, and
    checks the per-packet cycle count.
  * It checks a restart in mid-block.
  * It replays the lookup example above (state `0010011`, codeword `0100`,
    run `001001`, next state `0100101`).
* `tb_iid_parallel_decoder` covers the static decoder.
  * It checks the N = 2 example codebook on a small instance, including the
    padding case.
  * It checks 60 full-size blocks back to back, plus all-zero and all-one
    blocks.
* `tb_table1_codebooks` builds the static decoder for N = 2 to 8. For each
  N it:
  * checks the codebook's mean run length against the published values;
  * decodes every codeword;
  * round-trips 40 random packets.

  It prints the measured compressed size, about 85 to 89 % of the original
  for random data with Prob(0) = 0.75.
* `tb_block_fetch`, `tb_decoder_table` and `tb_line_address_table` check the
  fetch sequencing and the RAM timing.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/v2fcc_pkg.sv tb/v2f_ref_pkg.sv rtl/v2fcc_top.sv tb/tb_v2fcc_top.sv \
        --top-module tb_v2fcc_top -o sim
    ./obj_dir/sim

For the other testbenches, replace the last two files with the block's
module and testbench. `tb/v2f_ref_pkg.sv` is needed by the decoder and top
testbenches. Every testbench finishes in well under a second.
