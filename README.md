# LRU-MRU replacement for a shared multicore cache hierarchy

A set-associative cache has to pick a victim on every miss and decide where
a block goes in the set's recency order. Pure LRU keeps recently touched
blocks and evicts old ones. Pure MRU does the opposite and protects old
blocks from being flushed out by a stream of new ones. The LRU-MRU policy
picks between the two **on every access**. The only input is whether the
block being accessed has the same tag as the block accessed just before it.

This repository holds synthesizable SystemVerilog for the policy and for a
three-core cache hierarchy that uses the policy in every cache:

```
 core 0 ─┬─ instr ─┐                    ┌── L2 bank 0 (0x0000_0000-0x7FFF_FFFF) ──┐
         └─ data ──┤ L1 0 ──┐           │                                         │
 core 1 ─┬─ instr ─┐        │  network  │                                network  ├── main memory
         └─ data ──┤ L1 1 ──┼── l1-l2 ──┤                                 l2-mm   │   (external)
 core 2 ─┬─ instr ─┐        │           │                                         │
         └─ data ──┤ L1 2 ──┘           └── L2 bank 1 (0x8000_0000-0xFFFF_FFFF) ──┘
```

| level   | sets | ways | line     | hit latency | ports | size per instance |
|---------|------|------|----------|-------------|-------|-------------------|
| L1 (x3) | 128  | 2    | 256 bits | 2 cycles    | 2     | 8 KB              |
| L2 (x2) | 512  | 4    | 256 bits | 20 cycles   | 4     | 64 KB             |

Networks: every buffer holds 1024 bits (four line messages), and every link
carries one 256-bit line per cycle. Main memory answers after 200 cycles.
The cores and the memory are not part of the RTL. The top level brings
their ports out.

## The policy

### The recency stack

Each set keeps a *stack* of its ways, from top to bottom. Blocks never move
between ways. Only the way numbers in the stack are reordered, so one stack
entry is `log2(WAYS)` bits. Every access moves exactly one way, either to
the top or to the bottom. Entries in between shift by one place to close
the gap:

```
             before        N = 1 (to top)      N = 0 (to bottom)
  hit on c:  a b c d ...   c a b d e f g h     a b d e f g h c
  miss (x):  a b ... g h   x a b c d e f g     a b c d e f g x     (h evicted)
```

A miss always evicts the **bottom** entry (`h` above). The new block takes
the evicted block's way, so placing it is the same move applied to that way.
With N = 1 every access goes to the top, which is plain LRU. With N = 0 a
missing block lands at the bottom and is the next victim, and a hit block
also goes to the bottom. That is MRU in its stack form.

### Choosing N

```
N = (tag of this access != tag of the previous access)
```

- **N = 1, tags differ.** The program has moved to a different region, so
  the policy behaves as LRU.
- **N = 0, tags equal.** The program keeps touching the same tag (for
  example, walking through consecutive sets of one region), so the policy
  behaves as MRU. Such a block is not expected to be reused soon after the
  sweep, and placing it at the bottom keeps the older contents of the set.

The previous tag is a **single register per cache**, not one per set. It
compares tags only, not set indices. It resets to 0, so a first access with
tag 0 sees N = 0. Hits and misses both update it.

### Cold sets

The policy is defined for full sets. In this RTL, while a set still has
invalid ways, a miss fills the lowest-numbered invalid way instead of
evicting the bottom entry. That way is then moved to the top or bottom like
any victim. Without this rule, an N = 0 miss stream would keep reusing one
way of an otherwise empty set.

## Modules

| file | what it is |
|------|------------|
| `rtl/lru_mru_pkg.sv` | address and line widths, line request/response structs |
| `rtl/tag_history.sv` | previous-tag register and the N comparator |
| `rtl/stack_reorder.sv` | combinational move of one way to the top or bottom of a stack |
| `rtl/lru_mru_policy.sv` | per-set stacks, victim choice, tag history: the replacement unit of one cache |
| `rtl/set_assoc_cache.sv` | the cache: tags, data, valid and dirty bits, port arbiter, miss handling |
| `rtl/sync_fifo.sv` | the buffer used in the networks |
| `rtl/mem_network.sv` | buffered network with address-range routing |
| `rtl/lru_mru_system.sv` | the top level shown above |

### `set_assoc_cache`

It is write-back and write-allocate, and it handles one access at a time.

1. **Accept.** A round-robin arbiter accepts one request from the ports.
2. **Lookup.** In the next cycle the cache compares the tags of the set.
   The policy computes N, names the victim, and updates the set's stack.
3. **Hit.** A read returns the word. A write merges the word into the line
   and sets the dirty bit. The response appears exactly `LATENCY` cycles
   after the request was accepted (2 for L1, 20 for L2).
4. **Miss.** A dirty victim is first written to the lower level, and the
   cache waits for the acknowledgement. Then the missing line is read,
   merged with the write data if any, installed, and answered.

`UP_BITS` sets the width of an access from above: 32 for an L1 facing a
core, 256 (a whole line) for an L2 facing an L1.

A lower-level request is `line_req_t {write, addr, data}`, and every
request, read or write, receives exactly one `line_resp_t`.

The event outputs (`ev_hit`, `ev_miss`, `ev_place_top`, `ev_place_bottom`,
`ev_writeback`) pulse for one cycle. They are there for counting hit rates
and policy decisions.

The ports are request channels into a single lookup. They do not add
throughput. In the system, L1 port 0 carries instruction fetches and port 1
carries data. L2 port *c* serves L1 cache *c*, and the fourth L2 port is
idle.

### `mem_network`

Requests are routed by the top address bits. With two destinations, bit 31
selects the L2 bank. Each destination sees one lane per source and chooses
between the lanes itself; an L2 bank does this with its ports.

Buffers, each four messages deep:

- **Requests:** the source's input buffer, then the lane's output buffer.
- **Responses:** the lane's input buffer, then a round-robin merge, then the
  source's output buffer.

A message needs two clock edges to cross the network in either direction.
Order is preserved per lane.

## Interfaces and timing

Every channel uses a valid/ready handshake. A transfer happens on a rising
edge where both signals are high. Reset is asynchronous and active low.

Reset clears:

- valid and dirty bits
- stack orders (way 0 on top)
- the tag history
- FIFO pointers

Tag and data arrays are not reset.

Core side of `lru_mru_system`:

- `core_req_*[c][p]` and `core_resp_*[c][p]`, with p = 0 for instructions
  and p = 1 for data.
- `core_resp_rdata[c]` is shared by the two ports of core *c*. It belongs
  to whichever port has `core_resp_valid` high.

Memory side: one lane per L2 bank. The memory must answer each request in
order, and must also answer writes.

## Where this design departs from, or adds to, the policy description

- **Line size.** The geometry gives a block size of 256. The cache-size
  arithmetic it comes with (512 x 4 x 256 → 64 KB, 128 x 2 x 256 → 8 KB)
  only works if 256 counts bits, so lines are 256 bits. If the 256 meant
  bytes, lines would be 2048 bits and each cache eight times larger. To
  change this, edit `LINE_BITS` in `lru_mru_pkg`.
- **Buffer size and bandwidth** (1024 and 256) are also read in bits.
- **Own choices, not specified:**
  - write-back, write-allocate
  - blocking misses
  - ports sharing one lookup
  - handshakes and message formats
  - the cold-set fill rule
  - acknowledged writes
  - reset values other than the previous tag
- **No coherence** between the three private L1 caches. Cores that write
  the same lines see stale data. The testbenches give each core its own
  region.
- **Baselines not built.** The comparison policies are LRU, MRU, FIFO and
  random. The stack logic contains LRU (N forced to 1) and MRU (N forced
  to 0) as its two moves, but no switch selects them.
- The evaluation ran x86 benchmarks (radix sort, Cholesky, JPEG and EPIC
  decoders) on simulated cores, and compared instructions per cycle. Cores
  are not part of this RTL, so those numbers cannot be reproduced with it
  directly.

## Verification

Each block has a self-checking testbench in `tb/` (the network's buffer,
`sync_fifo`, is tested inside `tb_mem_network`). Each one ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_tag_history` | N against a reference previous-tag model, including the reset value |
| `tb_stack_reorder` | every entry against a queue model for random stacks, plus the four move pictures above |
| `tb_lru_mru_policy` | N, the victim and the whole stack after each of 4000 random accesses to a 4-set, 4-way model |
| `tb_set_assoc_cache` | L1 geometry: read data, hit/miss of every lookup, address and data of every write-back, hit latency of exactly 2 |
| `tb_l2_cache` | the same checks in L2 geometry: four ports, 256-bit accesses, hit latency of exactly 20 |
| `tb_mem_network` | buffer capacity (4 + 4 messages), routing by bit 31, per-lane order of requests and responses |
| `tb_lru_mru_system` | the full hierarchy at its default size with a 200-cycle memory model (`tb/main_memory_model.sv`) |
| `tb_radix_sweep` | a radix sort computed through the cache at nine geometries; checks the sorted result |

`tb_lru_mru_system` drives random instruction and data traffic from three
cores and checks:

- all read data
- L1 hit latency of 2 cycles and L2 hit latency of 20 cycles
- that each mechanism occurs at least once: hits and misses, N = 1 and
  N = 0 placements, and write-backs at both levels, plus use of both banks,
  port contention at the L2 and both L1 ports requesting together

It runs in about a second.

### Radix-sort sweep

The policy was evaluated by sweeping cache geometry while running a radix
sort. `tb_radix_sweep` reproduces the memory side of that experiment:

- It sorts 2048 random 32-bit keys with 8-bit digits in four passes:
  histogram clear, count, prefix sum, scatter.
- Every load and store goes through one `set_assoc_cache` per geometry,
  each backed by memory with a 200-cycle latency.
- The sort computes with the data the cache returns, so the sorted output
  checks the cache end to end.

This access stream is a model of the kernel, not the original benchmark
binary. One run gives:

| sets | ways | hit rate | write-backs | cycles    |
|------|------|----------|-------------|-----------|
| 512  | 1    | 0.916    | 3840        | 2 114 888 |
| 512  | 2    | 0.988    | 237         | 466 889   |
| 512  | 4    | 0.992    | 0           | 367 394   |
| 512  | 8    | 0.992    | 0           | 367 394   |
| 16   | 4    | 0.744    | 14286       | 6 451 262 |
| 64   | 4    | 0.923    | 3318        | 1 928 360 |
| 1024 | 4    | 0.992    | 0           | 367 394   |
| 16   | 2    | 0.695    | 17384       | 7 710 728 |
| 128  | 2    | 0.922    | 3395        | 1 947 857 |

In each run, about 15 300 of the 64 512 accesses repeat the previous tag
and are therefore placed with N = 0. The key array, the output array and the
1 KB histogram start at multiples of 64 KB, so in a 512-set cache they
compete for the same sets. From 4 ways at 512 sets everything fits and only
compulsory misses remain, which is why the curve flattens there. The
instructions-per-cycle curves of the original evaluation also flatten from
associativity 4 on.

## Simulating

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/lru_mru_pkg.sv rtl/sync_fifo.sv rtl/tag_history.sv rtl/stack_reorder.sv \
  rtl/lru_mru_policy.sv rtl/set_assoc_cache.sv rtl/mem_network.sv rtl/lru_mru_system.sv \
  tb/tb_util_pkg.sv tb/main_memory_model.sv tb/tb_lru_mru_system.sv \
  --top-module tb_lru_mru_system -Mdir obj && ./obj/Vtb_lru_mru_system
```

For another testbench, replace the last file and the top module. The
package files must come first.

The geometry is set by parameters. The cache accepts any power-of-two
`SETS` and `WAYS`, and any `LATENCY` of at least 2.
