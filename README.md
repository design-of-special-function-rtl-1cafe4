# Special function units: a hardware hash table and a programmable arithmetic unit

A general-purpose core spends many cycles on two things it has no hardware for:
hash-table look-ups, which walk pointers through the cache hierarchy, and long
chains of multiply/add arithmetic (filters, transforms, decoders), which run one
instruction at a time. This RTL gives three special function units that take those
jobs off the core:

1. **Hash unit (HU)** is a small content-addressable (key, value) store placed
   next to the pipeline. A lookup takes one cycle. An insert or delete takes two
   cycles: a lookup, then a write. Its power stays low because a hash of the key
   selects just one small bin of the CAM, and only that bin does any work.
2. **Hash coprocessor core** is the same idea sized for 128-bit MD5 virus
   signatures. A host streams bursts of requests through FIFOs into a pipelined
   table kept in block-RAM-style memories, one memory per entry column.
3. **Programmable arithmetic unit (PAU)** is a set of arithmetic tiles (multipliers,
   adders, subtractors, comparators) and a programmable controller. They exchange
   operands and results over a ring network-on-chip. Loading a different program
   maps a different kernel (FIR filter, DCT, Viterbi butterfly) onto the same tiles.

The three units do not share any logic. `sfu_top` places them side by side, each with
its own port group (`hu_*`, `cp_*`, `pau_*`). They share one clock `clk` and one
synchronous, active-low reset `rst_n`.

## 1. Hash unit (`hash_unit`)

```
 key ──► h3_hash ──► bin_idx ──► bin_selector ──► bin_en[NBINS]
                                                      │
 W[1:0], EN ──► csu ──► C[1:0] ───────────────► hash_table (NBINS × ht_bin)
                  ▲                                   │
                  └──────────── exist_n ◄─────────────┤
                                                      └──► value_out, bin_full
```

Default size: 1024 bins × 16 entries, with 32-bit keys and 32-bit values. That is 16384
entries, or 64 kB of key and value storage.

### Hash function (`h3_hash`)
This is an H3 hash. A Q matrix has one 10-bit row per key bit. The bin index is the
XOR of the rows whose key bit is 1, so the hash is one level of AND gates feeding an
XOR tree. It is combinational, so the bin index is ready in the same cycle as the key.

The rows sit in registers. The host can rewrite them one at a time through
`q_we/q_row/q_data`. After reset, row *i* holds the top 10 bits of
`(i+1) × 0x9E3779B1`. That is a fixed, well-mixed default chosen by this design;
load your own rows if you need a particular hash.

### Control signals unit (`csu`)
The processor drives a 2-bit op-code W: 00 no-op, 01 lookup, 10 delete, 11 insert.
The table understands only three atomic steps, on C with the same encoding. The CSU
turns each operation into a sequence of those steps:

| Operation | Cycle 1 (C) | Cycle 2 (C)                          |
|-----------|-------------|--------------------------------------|
| lookup    | 01 lookup   | —                                    |
| insert    | 01 lookup   | 11 insert, only if the key was absent |
| delete    | 01 lookup   | 10 delete, only if the key was present |

In the first cycle the CSU registers which operation is pending and samples
`exist_n`. In the second cycle it issues the write step, or nothing. The processor
must drive W = 00 in that second cycle. An assertion checks this. Key and value must
stay stable for both cycles.

### Bins (`ht_bin`, `hash_table`, `bin_selector`)
A bin holds M rows of {valid, key, value}. A lookup step does the following:
- It compares the key with every valid row in parallel. These are the match lines.
- It drives out the value of the matching row, or zero when no row matches.
- It latches the match lines.

The second step of the operation then uses what was latched:
- A **delete** step clears the valid bit of the latched row. It does not compare
  again.
- An **insert** step writes the first invalid row, chosen by a priority encoder. If
  the bin is full it writes nothing.

`bin_full` tells the processor that an insert had no room. Where overflowing entries
go next, such as a DRAM-backed chain, is left to the system around the unit.

Only the bin picked by the one-hot `bin_selector` is enabled. `exist_n` is the NOR of
all hit lines.

## 2. Hash coprocessor core (`fpga_hu`)

```
 req (opcode, key) ─► RD FIFO ─► h3_hash ─► bram_ht ─► WR FIFO ─► rsp (opcode, exist, full)
```

Default size: 1024 bins × 32 entries of 128-bit keys (512 kB). The FIFOs are 256 deep,
enough for the longest burst.

The op-codes are: 000 no-op, 001 lookup, 010 delete, 011 insert, 100 replace.
- **Replace** empties the bin and keeps the key carried by the request. The host then
  sends the other keys it wants in that bin as ordinary inserts.
- Every result reports `exist` and `full` for the addressed bin. A host can continue
  a miss in an overflow structure of its own.

`bram_ht` keeps one memory per column, so that all M keys of a bin are read at once
and compared in parallel. The valid bits are registers, so that replace can clear a
whole bin in one cycle.

**Bursts.** A one-cycle `start` pulse loads `no_entries`, the number of operations in
the burst. `done` rises once that many operations have been executed and written
into the WR FIFO. It stays high until the next `start`.

**Ordering and throughput.** The execute stage completes one operation per cycle. It
stops when the WR FIFO is full, so results never overtake one another or get lost.
Both streams use a valid/ready handshake.

The memory read is modelled as asynchronous, so each operation takes one cycle in
the execute stage. With registered block-RAM outputs you would add one pipeline
stage here.

## 3. Programmable arithmetic unit (`pau`)

### Network
Endpoint 0 is the controller (`pau_fc`). Endpoints 1 to NTILES are the tiles. They are
laid out NCOLS to a row. The default has 13 endpoints on a 4 × 4 grid.

Each row is a unidirectional ring made of:
- one insertion/extraction station (`ring_ies`) per endpoint;
- one junction station (`ring_js`).

The junction stations of all rows are joined by a vertical ring. It has NRPT
repeaters (`ring_rpt`) between neighbouring junctions.

Each station holds one flit and takes one cycle per hop. A flit is
{valid, dst row/col, src endpoint, tag, is_b, data}.

Routing:
- **ring_ies** takes a flit addressed to it into its Din FIFO, if there is room. It
  places a flit from its endpoint's out FIFO into any slot that is empty, or that it
  has just emptied.
- **ring_js** moves a flit for another row onto the vertical ring. It moves a flit
  arriving on the vertical ring for its own row onto the horizontal ring. Each move
  goes through a small FIFO and waits for a free slot.
- A flit whose destination FIFO is full stays on the ring and comes round again. The
  `recirculate` output flags this. So a busy endpoint can delay traffic, but it
  cannot block other traffic.

### Tiles (`pau_tile`)
A tile collects an A operand and a B operand (`is_b` tells them apart), computes one
cycle later, and sends the result to the endpoint that sent A. The result keeps A's
tag.

Kinds:
- ADD and SUB work modulo 2^32.
- MUL keeps the low 32 bits.
- CMP returns 1 when a < b (signed), else 0.

The default is 5 multipliers and 7 adders.

### Controller (`pau_fc`)
The controller holds a 256 × 32 register file and a 256-entry program. The host
writes both. An instruction is {tile, src_a, src_b, dst}, meaning
`regs[dst] = tile(regs[src_a], regs[src_b])`.

Instructions issue in order, one every two cycles (A flit, then B flit). An
instruction waits (`stall`) in two cases:
- its tile still has an operation in flight;
- one of its registers is waiting for a result.

A scoreboard of ready bits tracks the registers. Tiles run in parallel, and results
may return out of order. `done` rises when the whole program has issued and every
result is back.

A typical FIR program has these steps:
1. Write the coefficients and samples into registers.
2. Spread the tap products over the multipliers.
3. Sum the products through the adders in a tree.

The end-to-end test does exactly this for an 8-tap filter.

### Timing
With the default 4 × 4 grid, each issued operation has a fixed round trip, set by
how far away its tile is. In the tests, an isolated operation took:
- 16 cycles for tiles on the controller's own row;
- 30 to 33 cycles for tiles on other rows.

Network and tile throughput overlap with issue, so a long program is bound by issue
(two cycles per instruction) and by data dependences.

## Where this design departs from the architecture it implements

- **One clock.** The original ring runs about 20× faster than the tiles and
  controller, from its own resonant clock, with asynchronous FIFOs at each station.
  Here everything uses `clk`, and the station FIFOs are synchronous (`sync_fifo`). In
  tile cycles the network is therefore slower than intended. The protocol is the
  same.
- **One vertical ring** joins all row junctions.
- **Station FIFOs.** Each station has one FIFO of whole flits instead of separate
  address and data FIFOs, and an output register instead of input latches.
- **The PAU controller** is an instruction memory plus scoreboard, not a block of LUT
  fabric configured from a high-level-synthesis schedule.
- **PAU issue rate.** The controller starts one operation every two cycles. The
  original controller may start an operation on every tile in the same cycle. Here
  parallelism comes from tiles overlapping their long network round trips.
- **Storage cells.** The HU's CAM and SRAM cells, match-line latches and Q-matrix
  latches are flip-flops with parallel comparators. The transistor-level precharge
  and sense timing is not modelled. The one-cycle lookup is kept.
- **Not built: the HU's architecture-level extensions.** These are per-process IDs,
  dirty bits, bin and next pointers, overflow of full bins into a DRAM-resident chain,
  and replacement between the table and DRAM. `bin_full` is the hook for them.
- **Not built: the coprocessor's PCIe link and host software.**
- **`bin_full` and the fixed Q-matrix default** are additions of this design.
- **Flit fields.** The sender, tag and operand-select fields in the flit are this
  design's own.

## Sizes you can change

| Module      | Parameter                        | Default           |
|-------------|----------------------------------|-------------------|
| `hash_unit` | `NBINS`, `M`, `KEY_W`, `VAL_W`   | 1024, 16, 32, 32  |
| `fpga_hu`   | `FIFO_DEPTH`                     | 256               |
| `bram_ht`   | `NBINS`, `M`, `KEY_W`            | 1024, 32, 128     |
| `pau`       | `NMUL`, `NADD`, `NSUB`, `NCMP`   | 5, 7, 0, 0        |
| `pau`       | `NROWS`, `NCOLS`, `NRPT`         | 4, 4, 1           |
| `pau`       | `PROG_DEPTH`, `NREGS`            | 256, 256          |
| `pau`       | `FIFO_DEPTH`                     | 4                 |

Other configurations the units were evaluated with can be reached through these
parameters:
- HU tables of 8 to 96 kB: 128 to 2048 bins of 12 or 16 entries.
- A coprocessor table of up to 1520 kB: `M = 95`.
- DCT and Viterbi kernels: set `NSUB` and `NCMP` above 0.

The PAU endpoint count `1 + NMUL + NADD + NSUB + NCMP` must fit in `NROWS × NCOLS`.

## Simulating

All modules are plain SystemVerilog. Read the packages first. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hu_pkg.sv rtl/fpga_hu_pkg.sv rtl/pau_pkg.sv \
          tb/tb_sfu_top.sv --top-module tb_sfu_top && ./obj_dir/Vtb_sfu_top
```

Every unit has a self-checking testbench `tb/tb_<module>.sv`. Each one:
- compares the unit against an independent model;
- ends by printing `TB_RESULT checks=N failures=M`;
- has a watchdog.

The block testbenches shrink the tables to keep runs short. Exceptions are
`tb_sfu_top`, which runs everything at default size, and `tb_pau`, which uses the
default tile mix with one-entry station FIFOs so that the congestion paths are
exercised.

`tb_sfu_top` drives the following, and fails if any mechanism never happened:
- the hash unit with random lookups, inserts and deletes against a reference model;
- a coprocessor burst with a full-bin case and a replace;
- an 8-tap FIR program on the PAU.

It counts hits, misses, inserts, deletes, full bins, stalls, junction crossings and
recirculations. Recirculation needs heavier congestion than the default FIFOs see in
that program, so it is only reported there; `tb_pau` requires it.

`tb_pau_fir64` runs a 64-tap filter with 16-bit samples on the default PAU. It
produces two outputs, using 254 of the 256 program entries, and finishes in about
4400 cycles.

Building the full-size top takes a few minutes in Verilator, mostly for the
16384-entry hash table. The simulation itself takes about a second.
