# ROACH BLASTN accelerator

This is an FPGA accelerator for the first two stages of nucleotide BLAST. Stage one finds
exact word matches ("seeds") between a query and a database. Stage two extends each seed
without gaps. The query is held in a systolic array, one letter per element. The database
streams through the array at one letter per clock. Seeds are extended at the same time by
a pool of extension units. Each alignment that passes the score cut-off is sent back to the
host over 10 Gigabit Ethernet.

The design targets a ROACH board (Virtex-5 SX95T) and has two clocks:

- a 100 MHz network clock;
- a 60 MHz clock for the BLAST core.

It supports queries of up to 383 letters and an 8-bit word size (the benchmarks use 4 to 31). It handles any
number of database letters; the host resets the position counter every 2^31 letters.

## Block structure

```
10GbE rx ─> net_rx_ctrl ─(32 kB dual-clock buffer)─> blast_core ─(dual-clock FIFO)─> net_tx_ctrl ─> 10GbE tx
                                                        │
   blast_decoder ──> ext_controller ──> memories in every extension unit
        │
        └──> detection_region 0 (query elements 0..127)
        └──> detection_region 1 (128..255, plus 7 overlap elements)
        └──> detection_region 2 (256..383, plus 7 overlap elements)
                 local_controller -> seed_detection_array -> arbitrator -> 8 x extension_unit -> aggregator
        global aggregator <── the three local aggregators
```

| File | Role |
|---|---|
| `rtl/blast_pkg.sv` | symbol codes, run parameters, seed and alignment records, letter-match rule |
| `rtl/roach_blast_top.sv` | top level: network control, clock crossing, reset synchronisers, core |
| `rtl/net_rx_ctrl.sv` | input buffer writes, next-packet requests (pull mode) |
| `rtl/net_tx_ctrl.sv` | output packing into two 64-bit lines, packet ends, end-of-work detection |
| `rtl/blast_core.sv` | decoder, extension controller, three regions, global aggregator |
| `rtl/blast_decoder.sv` | 64-bit words to 4-bit symbols, core reset, parameter loading |
| `rtl/ext_controller.sv` | writes query and database into the extension memories, 31-bit letter count |
| `rtl/detection_region.sv` | one 128-letter slice of the query with its own extension pool |
| `rtl/local_controller.sv` | per-region symbol buffer, backoff, query loading, subject starts |
| `rtl/seed_detection_array.sv` | systolic exact-match detector with reference elements |
| `rtl/arbitrator.sv` | seed selection, position decoding, subject table, work allocation |
| `rtl/extension_unit.sv` | two-direction ungapped X-drop extension |
| `rtl/aggregator.sv` | collects alignment records; the local variant marks the end of a region |
| `rtl/sync_fifo.sv`, `rtl/async_fifo.sv`, `rtl/ext_bram.sv` | building blocks |

## Host protocol

The host sends 4-bit symbols packed into 64-bit words, least significant nibble first:

| Code | Meaning |
|---|---|
| 0000 | database subject separator |
| 0001-0100 | A, C, G, T |
| 0101 / 0110 | query mask / database mask; these never match |
| 1000 | reset the database position counter |
| 1001 | notify when done |
| 1011 x3 | core reset; parameters return to their defaults |
| 1100 + 10 symbols | load parameters, each 8 bits low nibble first, in this order: word size, S, X, mismatch penalty, match reward |
| 1101 / 1110 | start query / stop query |
| 1111 | query terminator |

A run looks like this:

1. Load parameters (optional). The defaults are word 11, S 20, X 20, mismatch 3, reward 1.
2. Send start query, the query terminator, the query letters and stop query.
3. Send the database as subjects divided by separators.
4. Send at least 136 separators (128 + 7 + 1), then notify when done.

The trailing separators are needed. A seed near the end of the database is only found once
letters behind it have pushed it all the way through the array, including the overlap
elements.

The host works in pull mode. It sends one UDP packet, then waits for a next-packet request
before sending the next one. A request is sent for each received end of frame.

Every output record is two 64-bit lines:

```
line 1: [63:32] database position of the first aligned letter   [31:0] position of the subject's first letter
line 2: [57] end of work  [56] next packet  [47:32] raw score  [27:16] query letter index  [11:0] length
```

- Data records fill a packet; it ends after 512 records.
- A control record (next packet or end of work) is sent before waiting data. It always ends its packet, so the host sees it at once.
- Positions count database letters since the last counter reset. Separators are counted too.

## Seed detection array (the core of the design)

Each element holds one query letter. Database letters enter at the top and move down one
element each time the array advances. So at any moment the elements compare the query with
one diagonal of the query/database dot plot.

**Counting a run.** A match count runs down the array as combinational logic:

- A matching element passes on its input count plus one.
- A mismatching element passes on zero.
- If a mismatching element's input count is at least the word size, it has found a seed.
  The seed starts at the element above it and has that length.

Seeds are taken only on a clock where the array moves, so each diagonal is judged once.

**Reference elements.** A 128-element carry chain is too long for one clock at 60 MHz. So
every 8th element is a reference element, which cuts the chain:

- On the first clock of a new diagonal, a reference element outputs zero.
- A second count runs upward. With both counts and its own match, the reference element
  knows the full length of any run through it.
- If that length reaches the word size, or the run continues past its 8-element segment,
  it stalls the array.
- On each following clock it outputs its held input plus one. So the true count crosses one
  more reference element per clock.

A long run through several segments therefore costs a few stall clocks. Short runs cost
none.

**Seed buffers.** Each possible seed start position has a buffer for one seed, plus a
7-bit delay counter. The counter counts how far the database has moved since the seed was
found; the arbitrator needs this to work out the database position. The array stalls in
three cases:

- A reference element is still propagating.
- A new seed lands on a full buffer.
- Any buffered seed has waited 127 moves. Past that its position could no longer be
  recovered.

**Region boundaries.** The query is cut into three regions of 128 elements. A run can
cross a cut, so the regions must agree on who reports it:

- **Top of a region.** Each region has a termination element above its top. It holds the
  first letter of the next region. If that letter also matches, the run belongs to the
  next region, and a flag track tells the elements below to ignore it.
- **Overlap.** Regions 1 and 2 also keep 7 overlap elements below their first element. These
  hold the previous region's last 7 query letters and the database letters that just left.
  A run that starts in the overlap and enters the region is reported by the region. The
  reported length counts only letters inside the region. The word-size test uses the full
  length.
- **Long runs.** A run that covers the whole overlap is reported whatever its length. The
  previous region cannot see its start.
- **Region 0.** Element 0 holds the query terminator, which never matches. So a run that
  reaches the first query letter ends there.

## Arbitrator: from buffer to absolute position

Four priority encoders watch the seed buffers:

- lowest stalling buffer;
- highest stalling buffer;
- lowest full buffer;
- highest full buffer.

A second-level choice takes the first of these four, in that order, that was not serviced
on the previous clock. The acknowledge to the array is registered, so the buffer taken last
clock still looks full for one clock. Searching from both ends keeps one seed per clock
flowing.

On the next clock the seed is decoded into absolute positions:

```
query element  = region offset + position
database start = letters placed on the array - delay - 128 - 2 + position
```

- The letter in the top element is the newest one.
- A seed enters its buffer on the move after it was found.
- The delay counts moves after that.

The subject start is found in a small table. The table records the position of every
separator entering the array. A separator that comes straight after another one overwrites
the last entry, because the subject between them is empty. Without this, the trailing
padding separators would push the real subject starts out of the table before the last
seeds were decoded.

Decoded seeds wait in a FIFO. The lowest free extension unit receives the next seed, one
per clock.

## Extension units

Each unit has its own copy of the query and the database window (8192 letters). There are
two copies of each, one for each direction, so forward and backward extension run at the
same time, one letter pair per direction per clock.

- A match adds the reward; a mismatch subtracts the penalty.
- The edge of the alignment moves only when the score rises above its best, not when it
  equals it.
- A direction stops at any of these:
  - its score has dropped X below its best;
  - a query terminator;
  - a separator;
  - the start of the database;
  - (backward only) a letter older than the window can still hold.
- Forward reads wait until the letter has been written.
- The raw score is seed length × reward + forward best + backward best. Alignments below S
  are dropped.

## Flow control and end of work

- **Local controllers.** Each region has a buffer of 512 symbols. It asks the decoder to
  back off when nearly full, so a stalled region pauses the whole stream.
- **Input buffer.** The 32 kB input buffer fills from the network and drains into the
  decoder.
- **Region done.** After "notify when done", each region's local aggregator sends one
  zero-length record. It does this once its array, arbitrator and extension units are all
  idle.
- **End of work.** The transmit side counts these records. After three, it sends an
  end-of-work record and raises `work_done`.

## Verification

Each block has a self-checking testbench in `tb/`. `tb/blast_ref_pkg.sv` is a software
model of seed finding and extension, including the region, overlap and padding rules.
The block and top-level testbenches compare the hardware's alignment records with it
one for one.

`tb/tb_roach_blast_top.sv` runs the full-size design at its default parameters. It sends
two runs through the network interfaces, in 256-word packets, in pull mode:

- **Run 1:** a 384-element query, 80,000 database letters, default parameters.
- **Run 2:** core reset, then a low-complexity two-letter database with word size 8.

Every record must match the model. The bench also checks that these all happened:

- each kind of stall;
- overlap seeds;
- a full input buffer;
- full 512-record packets;
- next-packet requests;
- end of work.

Run 1 takes 81,677 core clocks for 80,598 symbols, about 1.3% stall overhead.

## Limits

- The query is at most 383 letters. Longer queries would need more regions than this FPGA
  holds.
- The subject table holds the last 15 non-empty subjects. Subjects shorter than a seed's
  wait could push an entry out early; then the subject position of that seed would be
  wrong.
- The 10GbE core, the clock manager, the board's PowerPC and the host software are outside
  the design. They connect at the top-level ports.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and
stops. To build one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb --top-module tb_roach_blast_top \
    rtl/blast_pkg.sv tb/blast_ref_pkg.sv tb/tb_roach_blast_top.sv
./obj_dir/Vtb_roach_blast_top
```

The two packages are named first; `-y` finds the other modules by file name.
Block testbenches override parameters to stay small; for example, the region and core
benches use 32-element regions with 4 extension units. The top-level bench uses the full
default sizes and finishes in well under a minute.
