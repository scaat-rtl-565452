# SCAAT — a secure cache with an alternative address table

Cache timing side channels work because an attacker can predict which cache
set a victim's data lands in, and so which of its own lines will be evicted
and which accesses will hit or miss. SCAAT (Secure Cache Alternative Address
Table) breaks that prediction only where it matters. An external attack
monitor flags the accesses it considers suspicious. For each block under
attack, a small unit in front of the cache picks a random cache set and sends
the block there from then on. Accesses that were never attacked keep their
normal mapping, so the cache behaves like an ordinary cache until an attack
is seen. The cache itself is not modified. The unit only rewrites the index
bits of the address on the cache's CPU port.

This repository holds synthesizable SystemVerilog for the SCAAT unit, its
three parts, a parameterised set-associative cache to fit it to, and
self-checking testbenches for all of them.

```
            attk (from an attack monitor, external)
              |
 cpu_addr  +--v-------------------------------+  scaat_out   +-----------------+   mem_*
 --------->|  scaat_unit                      |------------->|  scaat_cache    |<------> main memory
           |   scaat_ctrl  scaat_lfsr  scaat_mem|            |  (DM or k-way)  |
           +----------------------------------+  cpu_req,... +-----------------+
                                                    -------->        |---> cpu_rdata, cpu_rstb
```

## Address fields

The CPU sends a word address, split from the top as `{tag, index, offset}`:

| field | width | default (16-bit address, 4-way, 256 lines, 128-bit lines, 32-bit words) |
|---|---|---|
| offset | log2(MEM_DATA_BITS / CPU_DATA_BITS) | 2 |
| index  | log2(CACHE_LINES / ASSOCIATIVITY)    | 6 (64 sets) |
| tag    | CPU_ADDR_BITS − index − offset       | 8 |

SCAAT changes only the index. Tag and offset always pass through unchanged.

## The SCAAT unit (`scaat_unit`)

The unit has four inputs: `clk`, `rst`, the monitor's `attk` and `cpu_addr`.
Its one real output is `scaat_out`, which drives the cache address. Inside
are three parts.

* **SCAAT memory (`scaat_mem`)**: one entry per cache set, so
  2^INDEX_BITS entries of TAG_BITS each. The default is 64 × 8 bits, i.e.
  64 bytes. An entry at location *L* that holds tag *T* means "blocks with tag
  *T* live in set *L*". The memory has one write port and one search port.
  The search compares the current tag with all valid entries in parallel. It
  returns `{found, L}`, with the found bit as MSB.
* **LFSR (`scaat_lfsr`)**: an INDEX_BITS-wide maximal-length LFSR. Its
  current value is the set the next newly attacked tag will get. It steps
  only when enabled, at the end of that cycle. It never holds zero, so set 0
  is never chosen as a new location.
* **Control (`scaat_ctrl`)**: makes a combinational decision every cycle.

| `found` | `attk` | mode | index sent to the cache | `en` (LFSR step + memory write) |
|---|---|---|---|---|
| 0 | 0 | `SCAAT_PASS` | original index | 0 |
| 0 | 1 | `SCAAT_REMAP_NEW` | current LFSR value | 1 |
| 1 | x | `SCAAT_REMAP_STORED` | stored location | 0 |

A new remap needs no extra cycle. In the attack cycle the LFSR value goes to
the cache straight away, while the tag is written at that same location on
the clock edge. From the next cycle on, the search finds the tag at that
location. The address therefore stays the same while a multi-cycle access is
held. A repeated attack on a tag that is already stored does not step the
LFSR, so a remapped block is not moved again.

Cycle by cycle, for four accesses to one block with tag 111 at index 010
(3-bit tag and index, LFSR at 101):

| access | `attk` | `found` | `en` | index out | after the cycle |
|---|---|---|---|---|---|
| 1, write | 0 | 0 | 0 | 010 | — |
| 2, write, first cycle | 1 | 0 | 1 | 101 (LFSR) | 111 stored at 101, LFSR steps |
| 2, remaining cycles | – | 1 | 0 | 101 | — |
| 3, write | 0 | 1 | 0 | 101 | — |
| 4, read | 1 | 1 | 0 | 101 | LFSR unchanged |

`tb_scaat_unit` checks exactly this sequence.

### What remapping does to the cache

Remapping moves a block into a set where the attacker did not expect it.
That changes both the hits and misses of the remapped block and those of the
blocks already in the target set. Take a direct-mapped cache with tag 111 in
set 010 and tag 100 in set 101. Three reads follow: 111, 111, 100. Without
an attack all three are hits. With an attack on the second read, tag 111
moves to set 101 and misses, evicting tag 100. The third read then misses as
well. `tb_scaat_fig3b` runs both cases.

### Properties to be aware of

These follow from the mechanism as specified and are kept deliberately:

* **The remapped address also goes to main memory.** The cache is unaware of
  SCAAT, so on a miss it fetches line `{tag, new index}`, and a write-through
  writes there too. Data written before a tag was remapped stays at the old
  memory line and is not seen afterwards.
* **Aliasing.** The table is keyed by the tag only. All blocks that share a
  tag (differing only in index) map to the same remapped line once that tag
  is remapped.
  The effect is strong. A block that hits on a remapped line may belong to a
  different original address with the same tag. In `tb_scaat_configs`, the
  hot region sits under only a few tags, and remapping one of them raises
  the measured hit rate from about 0.3 to about 0.85. That rise comes from
  aliasing, not from better caching. A variant that keeps the original index
  would have to store `{tag, index}` per entry, a wider table than the one
  described here.
* **Collisions.** When the LFSR returns to a location that is already in
  use, the new tag overwrites the entry. The old tag silently goes back to
  its normal mapping.
* The unit has no request-valid input. An attack flag raised in a cycle with
  no access still remaps whatever tag is on `cpu_addr`.

## The cache (`scaat_cache`)

This is a generic cache with the usual parameters: CACHE_LINES,
ASSOCIATIVITY, CPU_ADDR_BITS, CPU_DATA_BITS and MEM_DATA_BITS. The
associativity can be 1 (direct-mapped) or any power of two. The cache model
the SCAAT concept was evaluated with is an existing open-source core. This
one is an independent, simple implementation. Its policies are this design's
choices:

* Write-through, no write-allocate. A read miss allocates the line.
* LRU replacement inside a set, with invalid ways filled first. Tag, valid
  and data arrays are read combinationally.
* CPU handshake: a request is taken in a cycle with `cpu_req && cpu_rdy`.
  `cpu_rdy` is high only while the cache is idle.
  * A read hit returns `cpu_rstb`/`cpu_rdata` one cycle later, so the access
    takes 2 cycles.
  * A write updates the line on a hit. It then issues a write to memory with
    a one-hot word mask, and `cpu_rdy` returns 2 cycles after acceptance when
    memory is ready. The access takes 3 cycles.
  * A read miss takes 2 cycles plus the memory read delay.
* Memory handshake: `mem_req` is held until `mem_rdy`. Read data comes back
  with `mem_rstb`, at least one cycle after acceptance.
* `cache_hit`/`cache_miss` pulse in the acceptance cycle of each access. This
  is what an attack monitor would observe.

## Top level (`scaat_top`)

`scaat_top` connects `scaat_unit` to the address port of `scaat_cache`.
Everything else on the CPU side (`cpu_req`, `cpu_write`, `cpu_wdata`) goes
straight to the cache. The attack monitor, CPU and main memory are not part
of the RTL. `attk` is an input and the cache's CPU and memory ports are
brought out. For observation, the top also brings out `scaat_out`,
`found_in_scaat`, `scaat_en` (a new remap this cycle), `scaat_mode` and the
cache hit/miss pulses. Counting `scaat_en` gives the number of tags stored.
Counting accesses with `scaat_mode != SCAAT_PASS` gives the number of SCAAT
activations.

The default parameters are a 16-bit word address, 4-way associativity,
256 lines of 128 bits (4 KB), 32-bit words and a 64-byte SCAAT memory.

| configuration | CACHE_LINES | ASSOCIATIVITY | cache | SCAAT memory |
|---|---|---|---|---|
| direct-mapped | 64 / 128 / 256 | 1 | 1 / 2 / 4 KB | 64×8 / 128×7 / 256×6 bits (64 / 112 / 192 B) |
| 4-way | 256 / 512 / 1024 | 4 | 4 / 8 / 16 KB | 64×8 / 128×7 / 256×6 bits |

All of these configurations come from parameter changes alone (16-bit
address, 128-bit lines). A 32-bit system sets `CPU_ADDR_BITS = 32`. The
SCAAT memory grows with the number of sets, not the number of lines, so its
relative cost falls as associativity rises.

Timing: the path from `cpu_addr` to the cache address is combinational. It
runs through the tag search and a 3-way multiplexer, and is the critical
path the unit adds. The design has one clock and a synchronous, active-high
reset. Reset clears the SCAAT memory's valid bits and the cache's valid bits,
and loads the LFSR seed (`LFSR_SEED`, all ones by default).

## Files

| file | contents |
|---|---|
| `rtl/scaat_pkg.sv` | `scaat_mode_e`, LFSR tap table |
| `rtl/scaat_lfsr.sv`, `rtl/scaat_mem.sv`, `rtl/scaat_ctrl.sv` | parts of the unit |
| `rtl/scaat_unit.sv` | the SCAAT unit |
| `rtl/scaat_cache.sv` | set-associative cache |
| `rtl/scaat_top.sv` | unit + cache |
| `tb/tb_*.sv` | self-checking testbenches; `tb_cache_harness.sv` and `tb_top_harness.sv` are helpers used by `tb_scaat_cache` and `tb_scaat_configs` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/scaat_pkg.sv \
          tb/tb_scaat_top.sv --top-module tb_scaat_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_scaat_lfsr` | seed, hold, shift structure, full period for widths 6 and 3 |
| `tb_scaat_mem` | empty after reset, write-then-find timing, overwrite, random traffic vs. a reference array |
| `tb_scaat_ctrl` | the decision table for random inputs, two address layouts |
| `tb_scaat_unit` | the four-access sequence above, then random addresses/attacks vs. a reference remap table |
| `tb_scaat_cache` | direct-mapped and 4-way: hit/miss vs. a reference LRU model, read data, latencies, memory stalls |
| `tb_scaat_top` | the whole system at default size: remapped address, enable, hit/miss, memory line address, data and latency on every access. It requires each mechanism to occur (pass, new remap, stored remap with and without attack, table overwrite, hit, miss, eviction, write-through, memory stall) and prints attack/activation/stored-tag counts and the hit rate |
| `tb_scaat_fig3b` | the three-read example: all hits without attack, misses on reads 2 and 3 with one |
| `tb_scaat_configs` | the six cache configurations listed above, each with SCAAT driven by random attacks and without any attack, on the same access stream; checks remapping and read data (against memory at the address actually used) and prints the hit rates side by side |

Run with `--assert`, the RTL also checks itself. The SCAAT memory never
holds a tag twice and never gets a matching tag written again. The cache's
memory requests are held unchanged until accepted, and read data arrives only
while a read is outstanding.

The testbenches model the CPU, the attack monitor (a random or scripted
`attk`) and main memory. No attack-detection logic is included.

## What is not here

* The attack monitor. SCAAT relies on an external detector, and this
  repository contains no detection rule. `attk` must come from elsewhere.
* Benchmark-driven evaluation: no program traces are included. The
  testbenches use synthetic random access streams.
* Area and delay figures depend on the synthesis library and are not
  reproduced here.
