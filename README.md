# Breadth-first search on an FPGA with a Hybrid Memory Cube

This is the RTL of a breadth-first-search (BFS) engine for an FPGA attached
to a Hybrid Memory Cube (HMC). BFS on a large, sparse graph does mostly
small, scattered memory accesses. DDR memory serves such accesses badly. An
HMC does better: it takes packets with 16 to 128 bytes of payload, spreads
them over many independent vaults and banks, and can do atomic bit updates
inside the cube. The engine is built around three ideas that use these
properties:

* **Map/reduce split.** A *mapper* fetches the neighbour list of a frontier
  vertex. A *reducer* decides which neighbours are new and marks them. The
  two never talk directly. The mapper issues the neighbour-list reads, and
  the cube returns the data to the reducer. Several mapper/reducer pairs
  work side by side.
* **Bitmaps updated in the cube.** The visited set and the frontiers are
  bitmaps held in the cube, one bit per vertex. They are set with the cube's
  atomic bit-write command, so two kernels can set different bits of the
  same word at the same time without read-modify-write on the FPGA.
* **Two-level frontier bitmap.** The full frontier bitmap (level 2, "L2") is
  too large for on-chip RAM. A small on-chip bitmap (level 1, "L1") keeps
  one bit per chunk of G vertices. Only the L2 chunks whose L1 bit is set are
  read. In a sparse graph most chunks of a level's frontier are empty, so
  most of the scan traffic goes away.

Responses from the cube come back out of order. A *command buffer* on each
memory port tags every request, keeps its context, and steers each response
to the unit that needs it.

## How one search runs

The host writes the graph into the cube in compressed sparse row (CSR)
form. It clears the visited bitmap, both L2 frontier banks and the
per-vertex records. Then it pulses `start` with a `root`. The engine runs a
level-synchronous BFS: all vertices at distance *d* from the root are
expanded before any vertex at distance *d+1*.

1. **Seed.** `bfs_controller` passes the root to kernel 0's reducer. The
   reducer claims the root like any other vertex, with level 1 and parent
   "none" (all ones). This puts the root in the *next* frontier.
2. **Level loop.** The controller waits until the whole engine has drained:
   the scanner, the dispatcher, every kernel, and every memory request still
   in flight. This is the synchronisation point at the end of a level. If
   nothing was put in the next frontier, the search is over and `done`
   pulses. Otherwise the controller does three things: it swaps the two
   frontier banks (on chip and in the cube), raises the level by one, and
   starts a scan.
3. **Scan** (`bitmap_scanner`). The scanner walks the current L1 bank one
   64-bit word at a time. For each set bit it reads the matching G-bit L2
   chunk, in G/512 reads of one 64-byte block each (one read at the default
   G = 512). Each set bit in the returned blocks is a frontier vertex, and
   the scanner streams these out.
4. **Dispatch** (`vertex_dispatch`). Hands each vertex to the next ready
   kernel pair, in round-robin order.
5. **Map** (`bfs_mapper`). Reads `offsets[v]` and `offsets[v+1]` (one
   16-byte flit, or two when they straddle a flit). Then it reads the
   neighbour list in 64-byte-aligned blocks of 16 ids. Each read starts at
   the flit holding the first id it needs and ends at the flit holding the
   last one, so it is 1 to 4 flits long. Each read carries the context
   {parent v, first lane, last lane}.
6. **Reduce** (`bfs_reducer`). For every neighbour *n* in a returned block,
   the reducer reads the single visited-bitmap flit that holds bit *n*. If the bit
   is 0, *n* is new. The reducer then issues three atomic bit writes: set
   `visited[n]`, set *n*'s bit in the next L2 frontier, and write *n*'s
   64-bit record {level, parent}. Finally it sets L1 bit *n*/G of the next
   frontier on chip.

When `done` pulses, the record array holds every reachable vertex's level
(root = 1) and its BFS-tree parent. Unreachable vertices keep the record the
host cleared (level 0). The visited bitmap holds exactly the reachable
vertices. Both frontier banks are all zero again.

### Why the frontier banks come back clean

Nothing in the engine clears a bitmap in bulk. When the scanner reads an L1
word, it clears that word in the same cycle. When a non-zero L2 block comes
back, the scanner writes zeros over it, from its first to its last non-zero
flit. The zero write is issued only after
the read data has arrived, so the cube can never apply the write before the
read. When a level ends, the bank it scanned is therefore all zero, and the
swap makes it the next frontier of the following level. The only cost is
one short write per non-empty block, and a full clear of a large bitmap would cost
far more.

### Claims that race

Between a reducer reading `visited[n]` and its bit write landing, another
kernel (or the same one, for a repeated neighbour) can also find *n*
unvisited. Both then claim *n*. This is harmless, for three reasons:

* Both claims happen in the same level, so both write the same level value.
* Each writes a parent that is a real neighbour one level closer to the
  root.
* Setting a bitmap bit twice has the same effect as setting it once.

A vertex visited in an earlier level is never claimed again. All writes of
that level completed before the level ended. The `vertices_found` counter
therefore counts claims, which can be slightly more than the number of
vertices reached.

## The two-level bitmap in numbers

With *V* vertices, the L2 frontier bitmap is *V* bits in the cube. The L1
bitmap has *V*/G bits per bank, in two banks (current and next), on chip.
The defaults are *V* = 2^26 and G = 512. Each L1 bit then stands for 64
bytes of L2, and the L1 banks hold 2 × 131072 bits, a small fraction of the
FPGA's block RAM. Let *M* be the number of set L1 bits in a level. Without
the L1 bitmap, a level reads all *V*/512 64-byte L2 blocks. With it, a
level reads *M* · G/512 blocks, plus a sweep of the *V*/(64·G) L1 words on chip.

The choice of G is a trade-off:

* A smaller G skips more empty space, but needs a larger L1 bitmap.
* A larger G saves on-chip memory, but reads more zero bits per marked
  chunk.

The gain is largest for large, sparse graphs and for levels with small
frontiers. The `scan_reads` output counts the L2 reads of a run, so the
effect can be measured directly.

A simple latency model helps pick the sizes. Take *n* reads of *g* bytes
each, with a packet header and tail of *H* bytes each, a link bandwidth
*B*, an internal bandwidth *b* and a fixed processing time *t_c*. The
latency is then about

```
n·g/b + n·(g+2H)/B + t_c
```

Reads prefer large packets, because the header is paid once per packet.
Bit writes prefer small ones. The engine follows this rule: neighbour lists
and L2 chunks are read in blocks of up to 64 bytes, while random
visited-bitmap reads and all bit writes use one 16-byte flit.

## Memory layout in the cube

All regions start at 16-byte-aligned byte addresses given in `map`
(`mem_map_t`). All addresses are 32 bits wide, enough for a 4 GB cube.

| region      | contents                                   | address of the flit for vertex/index x |
|-------------|--------------------------------------------|----------------------------------------|
| `offsets`   | V+1 × 32-bit CSR offsets                   | `offsets + (x/4)·16`, lane x mod 4     |
| `edges`     | neighbour ids, 32 bits each                | `edges + (x/4)·16`, lane x mod 4       |
| `visited`   | 1 bit per vertex                           | `visited + (x/128)·16`, bit x mod 128  |
| `frontier0` | L2 frontier bank 0, 1 bit per vertex       | as `visited`                           |
| `frontier1` | L2 frontier bank 1                         | as `visited`                           |
| `record`    | 64 bits per vertex: `{level[31:0], parent[31:0]}` | `record + (x/2)·16`, half x mod 2 |

The L2 chunk behind L1 bit *j* starts at `frontier + j·G/8`. An undirected
graph must be stored with each edge in both directions.

## Memory ports and the command buffer

The engine has `NUM_PE + 1` HMC user ports. Port *p* < `NUM_PE` belongs to
kernel pair *p*, and port `NUM_PE` belongs to the scanner. Each port has two
channels:

* **Request channel**, valid/ready. `hmc_req_t` = {cmd, tag, addr, data,
  flits, data, mask}. `flits` is the length, 1 to 4 flits of 16 bytes, and
  a request never crosses a 64-byte boundary.
  * `HMC_RD` reads `flits` flits.
  * `HMC_WR` writes `flits` flits.
  * `HMC_BWR` is the atomic bit write, `mem = (mem & ~mask) | (data & mask)`.
* **Response channel**, valid only (never back-pressured). `hmc_rsp_t` =
  {tag, data}, with up to 64 bytes of data, flit 0 in the low bits. Every
  request gets exactly one response, writes included,
  and responses may come in any order.

`cmd_buffer` sits between the units of a port and the port itself. It
works as follows:

* **Tag pools.** It splits the tag space into one pool of `TAGS` slots per
  client (tag = {client, slot}). A kernel pair has four clients: offset
  reads, neighbour-list reads, visited reads and bit writes. The scanner
  has two: chunk reads and zero writes.
* **Context.** With each request the client stores 64 bits of context.
  The response data goes into the request's slot, and the slot number goes
  onto the client's completion FIFO. The client pops {data, context} in
  arrival order, and the slot is freed on the pop.
* **Request arbitration.** Round robin among the clients that have a
  request and a free slot. The request reaches the port in the same cycle.

Because every response already owns a slot and a FIFO entry, the response
channel never has to stall. Because each client has its own pool, no client
can use up the tags another one needs. Together these rule out deadlock. An
example of what the split prevents: the reducer's claim stage may wait for
a write tag while its visited reads are still in flight. With a shared
pool, those reads could hold every tag and the write would never get one.
Neighbour-list reads are issued by the mapper but answered to the reducer:
that client's responses are wired to the reducer.

## Module map

| module            | role |
|-------------------|------|
| `bfs_pkg`         | widths, request/response structs, memory map, client numbers |
| `bfs_top`         | the engine: L1 bitmap, scanner and its command buffer, dispatcher, `NUM_PE` kernel pairs, controller, run counters |
| `bfs_controller`  | seeding, level loop, bank swap, `done`, level and cycle counters |
| `bitmap_scanner`  | L1 walk, L2 chunk reads, zero write-back, vertex stream |
| `l1_bitmap`       | two on-chip banks of 64-bit words; scan read-and-clear port, `NUM_PE` set ports (one set per cycle, round robin), clear after reset |
| `vertex_dispatch` | one-register round-robin fan-out to the kernels |
| `bfs_pe`          | one mapper + reducer + command buffer on one port |
| `bfs_mapper`      | CSR offset reads, neighbour-list reads |
| `bfs_reducer`     | visited check, claim by bit writes, L1 mark, root seeding |
| `cmd_buffer`      | tag pools, context, response steering |

## Top-level interface (`bfs_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `root` | in | start a search from `root` (one-cycle pulse, accepted when not `running`) |
| `num_vertices` | in | vertices in the graph (≤ `MAX_VERTICES`); limits the L1 sweep |
| `map` | in | region addresses (`mem_map_t`) |
| `running`, `done` | out | busy flag; one-cycle pulse at the end |
| `levels`, `cycles` | out | non-empty levels, clock cycles of the run |
| `scan_reads`, `edges_seen`, `vertices_found` | out | L2 bitmap reads, neighbours examined (traversed edges), claims |
| `hmc_req_valid/ready`, `hmc_req[]`, `hmc_rsp_valid`, `hmc_rsp[]` | out/in | the `NUM_PE+1` HMC user ports |

After reset, the L1 bitmap clears itself, one word per cycle (2048 cycles at
the default size). A `start` during that time waits for the clear to
finish. To get a traversal rate, divide `edges_seen` by the run time,
`cycles` × clock period.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MAX_VERTICES` | 2^26 | largest graph (scale 26, the largest graph the design was evaluated on) |
| `G` | 512 | vertices per L1 bit (a power of two, multiple of 512) |
| `NUM_PE` | 4 | mapper/reducer pairs |
| `TAGS` | 8 | outstanding requests per client per port (a power of two) |

The flit width (128 bits), the largest read (`RD_FLITS` = 4 flits, 64
bytes), the id width and the address width (32 bits) are
package constants.

## Departures and choices of this implementation

These follow the original design:

* the level-synchronous algorithm, with level 1 for the root and no parent;
* the map/reduce split, with neighbour data reaching the reducer through
  the memory;
* the command buffer against out-of-order returns;
* bitmaps marked with atomic bit writes;
* the two-level frontier bitmap;
* graph scale 26 and a 4 GB cube.

These are this implementation's own choices:

* **Access size.** Streamed data (neighbour lists, L2 chunks) is read in
  blocks of up to 64 bytes. Random reads and all bit writes are one
  16-byte flit. The scanner's zero write-back covers only the non-zero
  flits of a block. This follows the rule that reads should be large and writes small.
  The block size itself is a choice: 64 bytes makes one L1 bit at G = 512
  exactly one read. The cube would also allow 128 bytes.
* **Sizes.** G = 512, four kernel pairs, eight tags per client, and one
  memory port per kernel pair plus one for the scanner. No values are
  given for these.
* **Memory format.** The CSR layout and the 64-bit {level, parent} record.
  The bit write is modelled as a masked write over one flit. The real HMC
  bit-write command covers 8 bytes; adapting to it only changes
  `bfs_reducer`.
* **Clearing the frontier.** The scanner's clear-on-read of both bitmap
  levels, with zero write-back.
* **Mapper throughput.** The mapper handles one vertex at a time: it waits
  for the offsets before reading the list. Throughput comes from the
  parallel kernels and from the pipelined neighbour-list reads.
* **Claims.** The visited check is a read followed by a bit write, not one
  atomic test-and-set. Claims can therefore race, harmlessly (see above).
* **Not included.** The host interface and the HMC controller/serial links.
  The engine's ports are the controller's user ports.

## Capacity

The default build holds graphs of up to 2^26 vertices. What limits larger
graphs is the 4 GB cube, with 32-bit byte addresses. A Graph500 graph of
scale *s* and edge factor *e* needs about

```
4·(V+1) + 4·2·e·V + 3·V/8 + 8·V  bytes,   V = 2^s
```

(edges stored in both directions). So:

* Scales 23 and 24 fit with edge factors 2 to 16.
* Scale 25 fits with edge factors up to 8.
* Scale 25 with edge factor 16, and scale 26 with edge factor 16, need 4.7
  and 9.4 GB. They do not fit in this memory layout.

## Simulation

The testbenches are in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M` and ends with `$finish`. `tb/hmc_model.sv`
is a behavioural model of the cube behind its controller. It has a sparse
memory, a random latency per request, responses in random order, and
random back-pressure. It applies RD, WR and the masked bit write.

| testbench | what it checks |
|-----------|----------------|
| `tb_bfs_top` | Full engine at default parameters. Random 20 000-vertex graph with isolated vertices, three searches: two roots and an isolated root. Checks levels, parents, the visited bitmap, clean frontiers, the level count and the edge count against a reference BFS. Requires that L1 skipping, bit writes, out-of-order returns, back-pressure and work on every kernel all happened. |
| `tb_bfs_graph500` | Full engine on Graph500-style (R-MAT) graphs of scale 14, edge factors 2, 4, 8 and 16. Reports the L2 scan reads against a scan without the L1 level. |
| `tb_bfs_controller` | Level loop against a scripted engine: no seeding before the clear, no decision while busy, a swap and a level increase before every scan. |
| `tb_bitmap_scanner` | Emits every frontier vertex exactly once, reads exactly G/512 blocks per marked chunk, and leaves both levels clear. |
| `tb_l1_bitmap` | Sets through competing ports against a shadow copy, read-and-clear, `next_any`, the reset clear. |
| `tb_vertex_dispatch` | Order, exactly-once delivery, one vertex per cycle at full rate. |
| `tb_bfs_mapper` | Neighbour lists of all lane alignments, including straddling offsets, and the degrees. |
| `tb_bfs_reducer` | Seeding, claims, records, untouched pre-visited vertices, L1 marks. |
| `tb_cmd_buffer` | Response steering, data, per-client tag limits, out-of-order returns. |

To run one with plain Verilator (5.x), from the directory above `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bfs_pkg.sv tb/tb_bfs_top.sv \
          --top-module tb_bfs_top -o sim
./obj_dir/sim
```

`tb_bfs_top` finishes in about a second.

## Limits of trust

* The engine has been checked in simulation only, against the behavioural
  cube model.
* The port handshake of a real HMC controller (flit framing, responses
  spread over several cycles, posted writes, error responses) is not modelled.
* No timing closure or resource figures exist for an FPGA.
* `l1_bitmap` reads its banks combinationally. At the default size this
  maps to distributed RAM or registers, not block RAM. A block-RAM version
  needs a one-cycle read in the scanner.
