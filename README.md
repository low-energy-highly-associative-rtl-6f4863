# Last-use predicted CAM-tag data cache

Highly associative caches in embedded processors often keep their tags in a
CAM: every tag of a set is compared with the address in parallel, and the
matching CAM row directly drives the wordline of the data RAM. That is fast,
but expensive in energy. Each CAM match line is precharged and then
discharged on a mismatch, so a 32-way lookup pays for 31 useless compares.

This design keeps the CAM organisation and adds a **last-use (LU)
predictor** to it. Each set remembers the line it used last. The next access
to that set first precharges and compares only that line. Because of
locality, this one compare usually hits. In that case the other 31 match
lines never switch, which removes up to about 31/32 of the compare energy
(roughly half of the CAM lookup energy). If the prediction is wrong, the
access takes one extra cycle for a full CAM search. The same LU information
can also keep every other line in a low-leakage *drowsy* state.

The RTL is a complete, synthesizable 32 KB, 32-way data cache with 32-byte
lines, built this way, plus a refill/write-back path to main memory. It is an
independent implementation of the scheme published by A. Veidenbaum and
D. Nicolaescu ("Low Energy, Highly-Associative Cache Design for Embedded
Processors"). The organisation, sizes, LU mechanism, latencies and drowsy
policy follow that scheme. The write policy, replacement, port handshakes
and reset behaviour are this design's own, listed under "Misses, write
policy and replacement" below.

## Organisation

```
 cpu_addr[31:10]  tag (22 bits)        -> CAM search key
 cpu_addr[9:5]    sub-cache index      -> decoder, one of M = 32
 cpu_addr[4:2]    word in line         -> RAM column multiplexer
 cpu_addr[1:0]    byte (ignored: word accesses only)
```

M = cache size / (associativity x line size) = 32768 / (32 x 32) = 32. Each
set is its own *sub-cache*, a small fully associative cache:

* `cam_tag_store`: 32 entries of 22-bit tag plus a valid bit. It produces
  one match line per entry. `search_en[i]` stands for the precharge of match
  line i. A line that is not precharged never matches and costs no compare
  energy.
* `line_ram`: 32 lines of 256 bits. There is no row decoder: the match
  lines *are* the wordlines. A column multiplexer picks one 32-bit word.
* `lu_predictor`: the LU latches. It produces a mask of the line(s) to
  precharge first.
* `lu_miss_detect`: the OR of all match lines. With the latch after it, this
  logic detects a misprediction, starts the full search, stalls the
  pipeline, and flags a true miss.
* `drowsy_ctrl` (only with `DROWSY_EN=1`): tracks which lines are in
  normal mode and which are drowsy.

`lu_subcache` puts these together. `lu_cam_dcache` (the top) holds the
address decoder `subcache_decoder`, 32 sub-caches, the processor-side
transfer register and `cache_miss_ctrl`, which refills lines from main
memory.

## One access, cycle by cycle

Cycle 1 is the cycle in which the processor presents `cpu_req` while
`cpu_ready` is high.

| case | cycle 1 | cycle 2 | cycle 3 | cycle 4 | `cpu_resp_valid` after edge |
|---|---|---|---|---|---|
| LU hit | LU-only compare, RAM word access | transfer to CPU | | | 2 |
| LU misprediction | LU compare fails, Miss0 latched | full precharge + full search, RAM access, LU updated | transfer | | 3 |
| misprediction, line drowsy (`DROWSY_EN=1`) | LU compare fails | full search, line woken | RAM access | transfer | 4 |
| true miss | LU compare fails | full search fails | refill (write-back first if the victim is dirty) | ... | 80 + 4 clean, 2 x 80 + 4 dirty (80-cycle memory) |

Details that are easy to miss:

* **The RAM is only accessed after the prediction is confirmed.** The RAM
  wordline comes from the match line, and on an LU miss no match line rises.
  So a misprediction never reads or writes the wrong line. A speculative
  variant (start the RAM together with the tag compare and repeat it on a
  misprediction) saves latency but is not built.
* **Miss0 is the OR of the match lines during the LU-only compare.** Since
  only one line was compared, "no match" cannot tell a misprediction from a
  real miss. Miss0 is latched. The latched value (`full_q`/`stall`) both
  starts the full search in the next cycle and stalls the processor
  (`cpu_stall`, `cpu_ready` low). Only if the full search also finds nothing
  is a true miss raised.
* **The LU latches follow every access.** After an LU hit the LU line stays
  the same. After a full-search hit the hit line becomes the LU line. After
  a refill the refilled line becomes the LU line. After reset no line is
  marked, so the first access to each set always mispredicts.
* **LU state is per sub-cache.** Each of the 32 sub-caches predicts
  independently. With `DROWSY_EN=1` this leaves exactly one normal-mode line
  per sub-cache, and 31/32 of all lines drowsy.

## Generalised LU_n prediction (`LU_N`)

`LU_N = 1` (the default) is the last-use predictor. With `LU_N = n > 1`, the
predictor keeps the last n *distinct* lines in most-recently-used order. A
reused line moves to the front; a new line enters at the front and pushes
the oldest out. The first compare then precharges n lines. This costs n
compares instead of one, but it mispredicts less often, especially for
programs that alternate between a few lines of a set. With drowsy lines, all
n lines stay in normal mode. The list ordering is this design's own choice.
The only requirement is that the last n lines used are tracked.

## Drowsy lines (`DROWSY_EN`)

Every line outside the LU set is drowsy (low leakage). The line the LU
predictor points at stays in normal mode. Waking a drowsy line costs one
clock cycle. This only matters when a full search hits a non-LU line, which
is why the mispredicted latency grows from 3 to 4. A refilled line is woken
as it is written. A line that leaves the LU set goes drowsy one cycle later.
An assertion in `lu_subcache` checks that the RAM is never accessed on a
drowsy line. The full CAM search still compares the tags of drowsy lines.
Only the data access of the hit line waits for the wake-up. The RTL models
only the mode of each line. The drowsy SRAM cell (a reduced cell supply) is
a circuit and is outside this RTL.

## Misses, write policy and replacement

None of the following is fixed by the LU scheme itself. These are this
design's own choices:

* **Write-back, write-allocate.** Writes are 32-bit word writes and set the
  line's dirty bit. On a write miss the refilled line is merged with the
  write data.
* **Round-robin replacement** in each sub-cache, with one victim pointer
  per sub-cache.
* **Main memory port.** It is line-wide (256 bits) with a request/acknowledge
  handshake. `mem_req`, `mem_we`, `mem_addr` and `mem_wdata` stay stable
  until `mem_ack`, which is a one-cycle pulse. On a read, `mem_rdata` is
  valid with `mem_ack`. A dirty victim is written back before the missing
  line is read. The testbenches use an 80-cycle memory and no L2 cache.
* **Processor port.** One outstanding access at a time, as for a
  single-issue in-order pipeline. A new access can start in the cycle the
  previous one is being transferred.

## Ports of `lu_cam_dcache`

| port | dir | width | meaning |
|---|---|---|---|
| `cpu_req`, `cpu_we`, `cpu_addr`, `cpu_wdata` | in | 1,1,32,32 | access request, taken when `cpu_ready` is high |
| `cpu_ready` | out | 1 | no access is stalled in a sub-cache |
| `cpu_stall` | out | 1 | a sub-cache is in its full search, wake-up or miss |
| `cpu_resp_valid`, `cpu_rdata` | out | 1,32 | completion pulse (reads and writes) and read data |
| `mem_req`, `mem_we`, `mem_addr`, `mem_wdata` | out | 1,1,32,256 | line request to main memory |
| `mem_ack`, `mem_rdata` | in | 1,256 | acknowledge and read line |
| `ev_lu_hit`, `ev_lu_miss`, `ev_true_miss`, `ev_wake`, `ev_writeback` | out | 1 each | one-cycle event pulses for energy and performance accounting |

`ev_lu_miss` counts every failed LU compare, including those that turn out
to be true misses. Mispredictions = `ev_lu_miss - ev_true_miss`. Counting
these events gives the inputs of an energy model. For example, an LU hit
costs 1 tag compare and every other access costs 1 + 32.

## Parameters

| parameter | default | notes |
|---|---|---|
| `CACHE_BYTES` | 32768 | |
| `WAYS` | 32 | lines per sub-cache, CAM entries |
| `LINE_BYTES` | 32 | line is `LINE_BYTES*8` bits |
| `LU_N` | 1 | order of the LU predictor |
| `DROWSY_EN` | 0 | drowsy lines, adds one cycle to a mispredicted access |

The address is 32 bits and the data word is 32 bits (`lu_cache_pkg`). The
tag width follows from these: 32 - log2(M) - log2(LINE_BYTES) = 22.
`CACHE_BYTES / (WAYS * LINE_BYTES)` must be a power of two.

## How far it is verified

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values computed independently in the testbench and ends with
a `TB_RESULT checks=N failures=M` line.

* `tb_lu_subcache` runs 1500 random accesses on a default sub-cache and 1500
  on a drowsy one. A reference model of the tags, data, dirty bits, LU line
  and victim pointer checks the LU outcome, the latency, the read data and
  the offered victim of every access.
* `tb_lu_cam_dcache` runs three caches side by side, each for 3000
  accesses: the full-size cache with drowsy lines, a 2 KB, 8-way cache fed
  with back-to-back requests (LU hits complete at one per cycle), and the
  full-size cache with an LU_4 predictor and drowsy lines. It checks
  read data against a flat golden memory, the LU outcome and exact latency
  of every access, written-back data, and the event counts. It also fails
  unless LU hits, mispredictions, true misses, write-backs, stalls and (with
  drowsy lines) wake-ups all occurred.
* `tb_dcache_full_size` runs the same checks for 4000 accesses on the
  cache with every parameter at its default. It finishes in seconds.

What is *not* verified: the energy savings themselves. The RTL has no
energy model. The events above are what such a model would count. The
driver prints one proxy for it: the number of tag compares, against 32 per
access without prediction. Real
program traces are also not run, only synthetic traffic with locality. On
that traffic the LU_1 hit rate is about 60%. Traffic with more reuse would
give a higher rate.

## Simulating

The package must come first; the other files are found through the include
path. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lu_cache_pkg.sv tb/tb_dcache_pkg.sv tb/tb_lu_cam_dcache.sv \
  --top-module tb_lu_cam_dcache -o sim
./obj_dir/sim
```

The unit testbenches need only `rtl/lu_cache_pkg.sv` and their own file.
`tb/main_memory_model.sv`, `tb/dcache_driver.sv` and `tb/tb_dcache_pkg.sv`
are testbench-only helpers: an 80-cycle main memory, the traffic generator
with its reference model, and the memory's initial contents.

## Departures and open points

* The CAM precharge, match-line discharge and wordline drivers are circuit
  techniques. Here they appear as enables and one-hot vectors, and the
  "latches" are edge-triggered flip-flops. The cycle-level behaviour is
  modelled, not the circuit.
* The full precharge and full search after a misprediction fit in one clock
  cycle. This matches the 3-cycle mispredicted latency, but a real circuit
  has to meet that timing.
* Byte and halfword stores, TLBs and the processor itself are outside this
  RTL.
* The same cache serves as an instruction cache without change: tie
  `cpu_we` low. Dirty lines then never occur.
