# L2 cache with parity for clean lines and shared ECC for dirty lines

A conventional L2 cache stores a SECDED code next to every 64-bit word: 8 extra
bits per 64, a 12.5% storage overhead (128KB in a 1MB cache). Most of that
overhead is unnecessary. A clean line has an intact copy in main memory, so
detecting an error is enough: it can be fetched again. Only dirty lines hold
data that exist nowhere else and need a correcting code.

This RTL implements a 1MB, 4-way, 64-byte-line write-back L2 cache built on that
observation:

* Every line, clean or dirty, has **one parity bit per 64-bit word**, kept in a
  parity array beside each way.
* **One ECC array is shared by all four ways.** It has one 8-byte entry per set,
  holding the eight SECDED check bytes of the set's single dirty line. That is
  32KB instead of 128KB.
* For that to work, **a set may hold at most one dirty line**. The cache enforces
  this. It also keeps the number of dirty lines low by **cleaning**: it
  periodically writes back lines that were modified once and then left alone.

With the tag and status parity and the written bits (below), the protection
costs 54KB against 132KB for the conventional scheme:

| item | size |
|---|---|
| data parity (16K lines x 8 bits) | 16KB |
| written bits (16K) | 2KB |
| tag parity (16K) | 2KB |
| status parity (16K) | 2KB |
| ECC array (4K x 8B) | 32KB |

## The one-dirty-line rule

The ECC entry does not record which way it belongs to. Its owner is simply the
line of the set whose dirty bit is set. Every write keeps that unambiguous:

| write hits... | action |
|---|---|
| the set's dirty line | Merge the data into the (ECC-corrected) line. Re-encode all 8 check bytes. Set the line's **written** bit: it has now been modified more than once. |
| a clean line, no other line dirty | Merge and encode the line into the set's ECC entry. Mark it dirty with written = 0. |
| a clean line, another line dirty | **ECC-entry eviction.** The other line loses its protection, so it is corrected through the ECC and written back to memory. It becomes clean, and the written line takes over the entry. |
| nothing (miss) | If the victim is dirty, write it back. Fill the line from memory into the victim way (clean, written = 0), then replay the request as a hit. |

Before a clean line is re-encoded on a write, its parity is checked. A failing
clean line is refetched first.

A line can therefore leave the dirty state in three ways. The `events` output
reports each one as a separate pulse:

* `ecc_wb`: eviction from the ECC array
* `clean_wb`: cleaning
* `repl_wb`: replacement on a miss

Every write-back passes the line through the eight SECDED decoders, so a
single-bit error in a dirty line is corrected before it reaches memory.

## Cleaning

Lines tend to be written soon after they are brought in and are then left
untouched until they are evicted. A dirty line that has not been written again
for a while is probably finished, and writing it back early costs little extra
memory traffic.

`cleaning_logic` holds a cycle counter and a latch with the next set number. It
visits one set every `CLEAN_INTERVAL / SETS` cycles, so the whole cache is
swept about once per `CLEAN_INTERVAL`. The default is 2^20 cycles, which
gives 256 cycles per set. The counter restarts only after a visit is finished,
so each visit adds the few cycles the check itself takes. On a visit:

* a line with **dirty = 1 and written = 0** is written back and made clean;
* every **written** bit of the set is cleared.

A line that keeps being written therefore survives one visit: its written bit
is cleared and it is checked again on the next sweep. Cleaning competes with the
L1 caches for the array port. `l2_arbiter` always lets the L1 request go first,
and the cleaning request (with its counter) waits (`events.clean_deferred`).

## Reading and error handling

* **Read of a clean line:** the word's parity is checked. On a mismatch
  (`events.parity_refetch`) the line is fetched again from memory and the read
  replayed. Parity detects any odd number of flipped bits but not an even
  number.
* **Read of the dirty line:** the word goes through SECDED.
  * A single-bit error is corrected (`events.ecc_corrected`).
  * A double-bit error raises `resp_error` and `events.uncorrectable`.
* **Tags and status bits** carry one parity bit each (tag; valid/dirty/written).
  A mismatch is only reported (`events.tag_perr`). The design takes no recovery
  action for it.

The SECDED code is an extended Hamming (72,64) code:

* data bits fill the codeword positions 3..71 that are not powers of two, in
  order;
* check bit k (k = 0..6) is the XOR of the data bits whose position has bit k
  set;
* check bit 7 is the parity of the whole 71-bit Hamming codeword.

The decoder's syndrome gives the flipped position. A non-zero syndrome with
correct overall parity means a double error.

## Structure

```
l2_ecc_cache            top and controller FSM
 ├─ l2_arbiter          L1-first multiplexer of the set index
 ├─ cleaning_logic      counter, next-set latch, clean/write-back decision
 ├─ l2_data_way  x4     64B x SETS data array + 8 parity bits per line
 ├─ l2_tag_array        tag, valid, dirty, written, tag parity, status parity (all ways)
 ├─ ecc_array           8 bytes x SETS, shared by the ways
 ├─ secded_dec  x8      correct the set's dirty line, one decoder per word
 ├─ secded_enc  x8      check bytes of the line being written
 └─ data_buffer         one-line buffer to the 8-byte memory bus
l2ecc_pkg               widths, line_status_t, l2_events_t, parity and SECDED functions
```

All arrays are single-port with a registered read and whole-line (or whole-set)
access. The controller states are:

* `INIT`: sweep all sets invalid after reset; takes SETS cycles
* `IDLE`: arbitrate and read the arrays
* `LOOK`: decide and write
* `CLEAN`: act on a cleaning visit
* `FILL_REQ` / `FILL_WAIT`: fetch a line through the data buffer
* `REPLAY`: re-read the set after a fill

An assertion checks the one-dirty-line rule on every lookup.

## Interfaces and timing

**Request port** (from the write-through L1 caches or their write buffer):

* `req_valid` / `req_ready`: handshake. `req_ready` is high whenever the
  controller is idle.
* `req_write`, `req_addr` (byte address of a 64-bit word), `req_wdata`,
  `req_wstrb` (byte enables).

Each request gets exactly one `resp_valid` pulse, with `resp_rdata` and
`resp_error` for reads.

* A hit (read or write) answers **2 cycles after the accepting clock edge**.
  The next request can be accepted in the cycle the response appears.
* A write that needs an ECC-entry eviction waits only if the data buffer is
  still busy with an earlier write-back.
* A miss costs the fill time of the memory, plus a write-back if the victim was
  dirty.

**Memory bus** (`mem_*`, 64 bits wide):

* A request handshake (`mem_req_valid` / `mem_req_ready`) with `mem_req_write`
  and a line address.
* A write-back then sends 8 beats (`mem_wvalid` / `mem_wready`), word 0 first.
* A fill receives 8 beats on `mem_rvalid` / `mem_rdata`.
* `data_buffer` handles one job at a time. A write-back is therefore always in
  memory before a later fill is requested.

**`events`**: a packed struct of one-cycle pulses, registered, one cycle after
the action. Fields: `ecc_wb`, `clean_wb`, `repl_wb`, `clean_check`,
`clean_deferred`, `written_set`, `ecc_corrected`, `uncorrectable`,
`parity_refetch`, `tag_perr`, `miss`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SETS` | 4096 | sets (1MB with 4 ways of 64B lines) |
| `WAYS` | 4 | associativity (2 or more) |
| `ADDR_W` | 32 | byte-address width; tag = `ADDR_W - log2(SETS) - 6` bits |
| `CLEAN_INTERVAL` | 1048576 | cycles for one cleaning sweep of all sets |

The line size (64B) and word size (64 bits) are fixed in `l2ecc_pkg`.

## Where this design makes its own choices

The protection scheme, the written-bit rule, the cleaning procedure, L1
priority, the sizes and the one-entry-per-set ECC array are the scheme's own. The
following were chosen for this implementation:

* **Cleaning period.** The interval is read as the time for one full sweep:
  each line is checked once per interval. The per-set period is therefore
  `CLEAN_INTERVAL/SETS`. A fixed per-set period (for example 1000 cycles) is
  the other possible reading; set `CLEAN_INTERVAL = 1000 * SETS` to get it.
* **Requests** are single 64-bit words with byte enables, and writes allocate.
* **Replacement:** first invalid way, else a round-robin pointer.
* **Hit latency** is 2 cycles. The cycle-level simulation the scheme was
  evaluated with assumed a 10-cycle L2. Nothing here pads to that.
* **Recovery.** A parity error in a clean line triggers a refetch. Write-backs
  are corrected through the ECC. Tag and status parity errors are only
  reported.
* **Reset:** an initialisation sweep of SETS cycles.
* **Code and buffer:** the SECDED construction, the bus protocol and the
  one-line depth of the data buffer.

Not included: the processor, its write-through L1 caches and their write buffer,
and the main memory. A behavioural memory model for simulation is in
`tb/mem_model.sv`: 8-byte wide, 100-cycle latency for the first beat of a read.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The package must come first on the command line; the other files are found
through `-I`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/l2ecc_pkg.sv \
    tb/tb_l2_ecc_cache.sv --top-module tb_l2_ecc_cache
./obj_dir/Vtb_l2_ecc_cache
```

The memory arrays are not reset. Run with `+verilator+rand+reset+2` to start
them at random values, as real SRAM would.

* `tb_l2_ecc_cache`: end-to-end at 16 sets and a 256-cycle sweep. It keeps a
  word-level reference model of memory and drives each mechanism on purpose:
  * the write-allocate miss;
  * a 2-cycle hit;
  * the written bit and ECC-entry eviction;
  * single-bit correction and double-bit detection (bits flipped inside the
    data array);
  * the parity refetch and the tag-parity report;
  * two idle sweeps that must leave no dirty line.

  It then runs 3000 random requests over 8 tags per set. It fails if any event
  class never occurs, if a set ever holds two dirty lines, or if any word
  reads back wrong.
* `tb_l2_ecc_cache_full`: the same test at the default size (1MB, 2^20-cycle
  sweep), about 2.3M cycles.
* `tb_cleaning_intervals`: the cleaning-interval sweep on a synthetic
  generational workload. Five 64-set caches run the same stream: a window of
  24 lines drifting through 1.5x the cache capacity, about 30% writes. Four
  caches clean with per-set periods of 16, 64, 256 and 1024 cycles. These are
  the 64K, 256K, 1M and 4M-cycle sweeps of the full-size cache. The fifth never
  cleans. A typical result:

  | per-set period | dirty lines | write-backs per 100 accesses |
  |---|---|---|
  | 16 | 8.7% | 2.56 |
  | 64 | 10.7% | 0.60 |
  | 256 | 15.6% | 0.51 |
  | 1024 | 23.1% | 0.41 |
  | never | 23.2% | 0.40 |

  The test checks that reads are correct and that the dirty share does not
  grow as the period shrinks. These numbers come from the synthetic stream, not
  from real programs.
* One testbench per block: `tb_secded_enc`, `tb_secded_dec`, `tb_l2_arbiter`,
  `tb_ecc_array`, `tb_l2_data_way`, `tb_l2_tag_array`, `tb_cleaning_logic`,
  `tb_data_buffer`.

The testbenches inject errors by writing into the arrays through hierarchical
references (for example `dut.g_way[1].u_way.data_mem[set][bit]`). Renaming
those instances means updating the testbenches.
