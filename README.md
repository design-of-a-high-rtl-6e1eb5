# LZ4-style match search unit, 8 bytes per clock

Every LZ77-family compressor spends most of its effort in one place: finding,
for the bytes at the current position, an earlier position where the same
bytes already occurred. This unit does that search for an LZ4-style
compressor at a fixed rate of eight input bytes per clock, whatever the data,
so that a 64-bit 10G Ethernet datapath (8 bytes at 156.25 MHz) can be
compressed in line.

Software LZ4 walks the input one byte at a time. It reads the 4 bytes at the
current position, hashes them, looks up the hash table to get the last
position that had the same hash, stores the current position in its place,
reads the 4 bytes at that old position, and compares. This design changes
that loop in two ways:

* **Eight positions per clock.** One aligned 128-bit read of the input buffer
  holds the eleven bytes needed for the eight overlapping 4-byte sequences
  that start at `IBA+0 … IBA+7`. The master pointer `IBA` steps by 8 each
  clock, and each lane's address is found by adding its lane number.
* **The hash table stores the data too.** Each entry holds the position *and*
  the 4 bytes found there (14 + 32 = 46 bits). The comparison then needs no
  second read of the input buffer. The hash table becomes the only memory
  that has to serve all eight lanes at once. It is built as an 8-write,
  8-read memory with a live value table (LVT).

Collisions are not resolved: a newer sequence simply overwrites an older one
with the same hash. The unit gives up some compression for a throughput that
never drops.

## Data flow and timing

```
             +--------------+ 128 b  +---------------+  8 x {valid, IBA+k, 4 bytes}
 64-bit  --> | input_buffer | -----> | iba_generator | ---------------------------+
 writes      |   16 kB      | <----- |  IBA += 8     |                            |
             +--------------+ rd_word+---------------+                            v
                                                              +------------------------------+
                                                              | msu_core                     |
     lane k (x8):  data ----> fib_hash (6 clk) --> HTA ----+  |                              |
                   data ----> delay_pipe (6) ---+          |  |                              |
                   IBA  ----> delay_pipe (6) ---+-> merge -+->| lvt_hash_table 256 x 46 b    |
                                                |  {IBA,data}  |  8 write + 8 read, 1 clk     |
                                                +-> delay_pipe (1) -> current {IBA, data}    |
                         record read back (candidate) -> split -> = compare -> match[k]      |
                                                              |  match_select: lowest lane   |
                                                              +------------------------------+
                                                                 match_found, match_cur, match_prev
```

Clock by clock, for one 8-byte step:

| clock after the read is issued | what happens |
|---|---|
| 0 | `iba_generator` presents word address `IBA/8`; the buffer registers 128 bits |
| 1 | eight sequences enter the lanes (hash stage 1: partial products) |
| 2 … 6 | hash stage 2 (sum, top 8 bits), then 4 register stages; data and address wait in delay pipelines |
| 7 | all lanes write their records and read the same addresses in the hash table |
| 8 | candidate records are out; compare, priority-select, outputs valid |

Inside `msu_core` the latency is 7 clocks (6 for the hash, 1 for the table).
From `start` at the top to the first result it is 9: one clock for the start
register and one for the buffer read. After that, one result comes out per
clock with no gaps, for as long as the packet lasts.

## The multiport dictionary (`lvt_hash_table`)

This is the part that makes eight lanes possible. In every clock each lane
writes one record and reads one record, at addresses that are effectively
random. Block RAMs have two ports. The table is therefore built from
8 × 8 = 64 simple dual-port banks of 256 × 46 bits (`ht_bank`):

* Write port `w` writes its record into all eight banks of row `w`, one per
  read port.
* Read port `r` reads its address from all eight banks of column `r`. One of
  these eight words is the newest.
* The **live value table** (`live_value_table`) is a small register array,
  3 bits per entry. It records which write port wrote each address last. Read
  port `r` looks its address up there and steers its 8:1 multiplexer to that
  port's bank.

The LVT also keeps one "written since clear" bit per entry. That lets the
whole dictionary be emptied in one clock at the start of a packet. The 46-bit
records in the RAM banks are never reset.

Rules that follow from this organisation, chosen here and checked by the
testbenches:

* **Read-first.** A lane that reads an address written in the same clock gets
  the record from before that clock. A record written one clock earlier is
  seen. So a repeat *within* one 8-byte step is not found, but a repeat from
  any earlier step is.
* **Highest port wins.** When several lanes write the same entry in one clock
  (the same 4 bytes, or a hash collision), the highest lane keeps it. The
  highest lane holds the newest position.
* **Clear.** The clear empties the table, and reads in the clear's own clock
  already see it empty. Writes given in that clock still land.

## A lane (`msu_lane`) and the match rule

A lane keeps its address and data in step with the hash through two 6-stage
`delay_pipe`s. It merges them into the record `{IBA[13:0], data[31:0]}` and
uses the hash as both the write address and the read address. It then holds
the current address and data for one more clock (the one-stage pipeline)
while the table answers. It splits the returned candidate record into
previous address and previous data. Lane `k` reports a match when all of the
following hold:

* the lane carries a valid sequence;
* the candidate entry was written since the last clear;
* previous data == current data (all 4 bytes);
* previous address < current address.

The last condition is the "within offset" test. With a 16 kB buffer every
earlier position is well inside LZ4's 64 kB offset limit.

`match_select` then picks the lane with the lowest address (lane 0 first). It
uses that lane to drive the two 1:8 multiplexers that give the
**match address pair**, `match_cur` and `match_prev`. All eight per-lane flags
also come out on `match_vec`. An encoder would use them to extend a match.

## Hash (`fib_hash`)

Fibonacci hashing, as LZ4 does it:

    hta = ((data * 2654435761) mod 2^32) >> (32 - HTA_W)

Here `data` is the 4 bytes read little-endian, the byte at the lowest address
in bits [7:0]. The constant is the LZ4 one, a prime close to 2^32/φ. The
multiplier is pipelined the way a DSP block would do it:

* Stage 1 registers three 16×16 partial products. The high×high product
  lies entirely above bit 31, so it is not needed.
* Stage 2 adds them and keeps the top 8 bits.
* `LATENCY-2` plain register stages follow, to reach the 6 clocks of the
  reference multiplier.

`LATENCY` can be set as low as 2. The lanes' delay pipelines follow it
automatically.

## Input side (`input_buffer`, `iba_generator`)

The buffer holds 16384 bytes: 2048 words of 64 bits, written one word per
clock. A read returns `{word[a+1], word[a]}`, 128 bits. To read two
consecutive words in one clock from two-port RAMs, the buffer is split into
an even-word bank and an odd-word bank. The halves are swapped back when the
address is odd. The last word's upper half wraps to word 0.

`iba_generator` takes `start` and `pkt_len`:

* It issues one read per clock for `ceil(pkt_len/8)` clocks (`busy`).
* One clock after each read, it cuts the returned bytes 0…10 into the eight
  sequences.
* A lane is valid only if all four of its bytes lie inside the packet, so the
  last word of a packet may carry fewer than eight valid lanes.
* It raises `first` with the first word. `first` is the dictionary clear.

`msu_core` delays the clear by the hash latency, so it reaches the table in
the same clock as the packet's first records. The previous packet's last
records, still in the pipeline, are written before that clock, so they are
cleared. Packets may therefore follow each other without a gap.

An assertion flags a `pkt_len` larger than the buffer.

## Top-level interface (`lz4_msu_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | single clock; synchronous active-low reset |
| `wr_en`, `wr_word`, `wr_data` | in | 1, 11, 64 | write a 64-bit word; byte `i` is at byte address `8*wr_word+i` |
| `start`, `pkt_len` | in | 1, 15 | process `pkt_len` (1…16384) bytes from address 0 |
| `busy` | out | 1 | buffer reads for the packet still being issued |
| `res_valid` | out | 1 | this clock carries the result of one 8-byte step |
| `match_vec` | out | 8 | per-lane match flags |
| `match_found` | out | 1 | at least one lane matched |
| `match_lane` | out | 3 | chosen lane (lowest address) |
| `match_cur`, `match_prev` | out | 14, 14 | current and previous address of the chosen match |

Parameters: `HT_DEPTH` (256, a power of two) and `HASH_LAT` (6). The buffer
size, the widths and the hash constant are in `rtl/msu_pkg.sv`. `msu_core`
also has a `LANES` parameter (8). The top fixes it at 8 because a 64-bit
word supplies eight new bytes.

The shared types are in `msu_pkg`: `seq_t` (valid, address, data) and
`ht_rec_t` (address, data).

## What is taken from the source architecture, and what is not

Taken from it:

* eight lanes of 4-byte sequences per 128-bit read, with the master pointer
  stepping by 8;
* a 16 kB buffer with a 64-bit write port and a 128-bit read port;
* a Fibonacci hash of latency 6 giving an 8-bit address;
* 6-stage data and address pipelines, a merge into a 46-bit record, a split,
  and a 1-stage current-data pipeline;
* a 256-entry table with 8 write ports and 8 read ports, built with an LVT,
  with latency 1;
* an equality compare, a priority encoder with the lowest address first, and
  two 1:8 address multiplexers;
* a total latency of 7.

This design's own choices:

* the hash constant and byte order;
* the partial-product split of the multiplier;
* bank replication as the way to reach 8 × 8 ports (no multipumping);
* the read-first and highest-port-wins rules;
* the valid bits and per-packet clear;
* the "previous address < current address" reading of the offset test;
* the packet interface (`start`/`pkt_len`/`busy`);
* the even/odd buffer banks;
* the result valid flag.

Departures and limits:

* **One clock.** The source architecture suggests running the hash
  multipliers on a faster clock to shorten their pipeline. Here everything
  runs on one clock with the 6-stage hash, which gives the stated total of 7.
* **No stall on a match.** The pointer keeps moving at 8 bytes per clock. What
  to do with a match (extend it, skip ahead, encode it) is left to the
  downstream LZ4 sequence encoder. That encoder and the output buffer are not
  part of this unit.
* **History per packet.** The dictionary is cleared for every packet, so
  matches never reach into an earlier packet.
* **No repeats within one step.** Repeats between two positions of the same
  8-byte step are not found (see read-first above).
* **No timing or area figures.** No FPGA timing or resource results are
  claimed for this RTL. The source reports about 250 MHz, which would make
  16 Gbps.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench compares
against values computed independently and ends with a
`TB_RESULT checks=… failures=…` line.

* `msu_ref_pkg` is a cycle-level reference model of the whole search. It uses
  a plain array as the dictionary, a one-line multiply for the hash, and the
  read-first and highest-lane-wins rules applied per clock.
* `tb_lz4_msu_top` runs the full-size top with no parameters changed. It
  loads and processes these packets:
  * a 9000-byte jumbo packet;
  * the same data again back to back at three other lengths;
  * packets of 64, 13, 777, 4, 16384 and 2048 bytes.

  It checks every result against the model. It checks that the first result
  comes 9 clocks after `start` and that results then follow one per clock. It
  counts each mechanism and fails if any of them never occurs:
  * matches;
  * clocks with several matches (priority encoder);
  * two lanes writing one entry;
  * hash collisions;
  * entries hidden by the clear;
  * partial last words.
* `tb_msu_core` streams random packets from small alphabets through the core
  and compares every clock. It also checks the 7-clock latency with one
  planted repeat.
* `tb_ht_size_sweep` runs the same generated text through cores with 64, 256,
  1024 and 4096 entries and prints how many sequences match at each size.
  More entries find more of the repeats (e.g. 0.4 : 1 : 1.6 : 1.9 for 64, 256,
  1024 and 4096 entries in one run). Two more 256-entry cores use hash
  pipelines of 3 and 2 clocks. They must find exactly the same matches, only
  earlier, and each is checked at its own latency.
* The other testbenches check one module each against array models. Among
  the cases: LVT write collisions and clears, read-first banks, the full
  16 kB buffer including the wrap, and generator packet lengths from 4 to
  16384.

Simulate any of them with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/msu_pkg.sv tb/msu_ref_pkg.sv tb/tb_lz4_msu_top.sv --top-module tb_lz4_msu_top
./obj_dir/Vtb_lz4_msu_top
```

Uninitialised state should not matter. Everything that is read before it is
written is reset or covered by a valid bit. All testbenches finish in
seconds.
