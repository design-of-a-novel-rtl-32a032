# Hybrid SRAM/DRAM statistics counters with randomised start values

A network line card may have to keep a million or more counters. Each one
can be incremented at line rate, for example once every 10 ns, in any order.
Some counters grow very large, so each needs about 64 bits. A million 64-bit
counters in fast SRAM is expensive, and DRAM is too slow to take one
read-modify-write per increment.

This design splits every counter into two parts:

* **A[i]**: a small SRAM counter of `L` bits (4 by default). It takes every
  increment.
* **B[i]**: a full 64-bit counter in an external DRAM. It is updated only
  when A[i] wraps.

When A[i] goes from 2^L−1 back to 0, the index `i` is put in a small FIFO.
A flush controller takes indices from that FIFO at the DRAM's pace and adds
2^L to B[i]. The value of counter i is therefore

    B[i] + A[i] + 2^L × (number of copies of i still in the FIFO)

which is simply B[i] + A[i] once the FIFO is empty.

## Why the FIFO stays short: random start values

On average, counters wrap once every 2^L increments. With L = 4 that is an
arrival rate of 1/16 into the FIFO. A DRAM that is 12 times slower than the
SRAM drains one entry every 12 cycles, so on average the FIFO keeps up. The
danger is a burst. If every counter started at 0, an adversary could
increment all N counters up to 15 and then touch each one once more. N wraps
would then arrive back to back, and any FIFO of realistic size would
overflow.

The fix is the initialisation:

* each A[i] starts at an independent random value, uniform in 0..2^L−1;
* each B[i] starts at −A[i], so every counter still reads 0.

Someone who knows the scheme but not the random values cannot line the
wraps up. Whatever the increment pattern, the wraps of a given counter are
spread like those of a random phase. The queue then behaves much like a
Geom/D/1 queue. For the main configuration (2^20 counters, L = 4, a DRAM 12×
slower, 300 FIFO slots) the architecture's analysis bounds the overflow
probability after 10^12 increments below 10^-14. Measured traces stay far
below the limit: their largest occupancies are about 20 entries.

Counter memory for the default size:

| part | size |
|---|---|
| SRAM counters | 2^20 × 4 bit = 4 Mbit (512 KB) |
| FIFO | 300 × 20 bit ≈ 6 Kbit |
| DRAM counters (external) | 2^20 × 64 bit |

With `L = 5` and `K = 500`, which suits a DRAM 30× slower, the SRAM is
5 Mbit and the FIFO 10 Kbit.

## Block structure

```
             inc_valid/inc_index                      dram_* channel
                    │                                       ▲
                    ▼                                       │
 random_init ─► counter_update ◄─► sram_counter_array       │
     │ (A[i] writes)   │ wrap: push i                       │
     │                 ▼                                    │
     │            flush_fifo ──► flush_controller ──────────┤
     └──────────────────── B[i] := −A[i] writes ────────────┘
```

| module | role |
|---|---|
| `sc_pkg` | default sizes, flush controller state type |
| `random_init` | after reset, writes A[i] = random and B[i] = −A[i] for every i |
| `sram_counter_array` | N × L-bit SRAM, one synchronous read port and one write port |
| `counter_update` | two-stage increment pipeline: +1 or wrap, and push the index on a wrap |
| `flush_fifo` | K-entry circular FIFO of indices, with occupancy and high-water mark |
| `flush_controller` | B[i] += 2^L by DRAM read-modify-write, at most one flush per `SD_RATIO` cycles |
| `stat_counter_top` | wires the above together; the DRAM is outside, on the `dram_*` ports |

### The increment pipeline (`counter_update`)

One request can be accepted every cycle:

* **Stage 0.** The request is accepted (`inc_valid && inc_ready`) and the
  SRAM read of A[i] is issued.
* **Stage 1.** The old value comes back. `A[i]+1` is written, wrapping to 0.
  If the old value was 2^L−1, `i` is pushed into the FIFO in the same cycle.

The SRAM returns the old data when a read and a write hit the same address
at the same edge. So a request for the same counter as the request just
ahead of it would read a stale value. A one-entry bypass register keeps the
last write, and stage 1 uses it when the indices match. That one entry is
enough: a write two requests back is already in the array by the time of
the read.

### Holding requests when the FIFO is nearly full

`inc_ready` drops when the FIFO holds K−1 or more entries. One request may
already be in stage 1 and may still push, so this threshold guarantees that
a push never finds the FIFO full. No flush is ever lost. `ev_stall` pulses
for every cycle a request is held, and the sticky `fifo_overflow` output
records that the limit was reached. This is the event whose probability the
randomisation makes negligible. A system that cannot hold its increments
should treat `fifo_overflow` as an error.

`inc_ready` is also low until `init_done`.

### Flushing (`flush_controller`)

Each flush does the following:

1. Pops the FIFO head `i`.
2. Sends a read of B[i].
3. Waits for the read data.
4. Sends a write of B[i] + 2^L.

A gap counter makes successive flushes start at least `SD_RATIO` cycles
apart. That gives the FIFO its departure rate of 1/`SD_RATIO`. If the DRAM
is slower still, the valid/ready handshake stretches the gap. Only one flush
is in flight at a time, so two flushes of the same counter cannot race.

### Initialisation (`random_init`)

After reset the block walks i = 0..N−1. For each i it writes the low `L`
bits of a 32-bit xorshift generator into A[i], and their negation, 64 bits
wide, into B[i]. These writes are paced like flushes, one per `SD_RATIO`
cycles. At the default size initialisation therefore takes 2^20 × 12 ≈
12.6 M cycles.

The generator is seeded from the `seed` port while reset is asserted; seed
0 selects a fixed constant. The guarantee rests on the start values being
unknown to whoever generates the traffic. A product should feed `seed`
from a true random source, or replace the xorshift generator with one.

## Interfaces (`stat_counter_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset, which starts initialisation |
| `seed` | in | 32 | generator seed, sampled during reset |
| `inc_valid`, `inc_ready`, `inc_index` | in/out/in | 1/1/log2 N | increment request channel |
| `dram_req_valid`, `dram_req_ready` | out/in | 1 | DRAM request handshake; a request is held, unchanged, until it is accepted |
| `dram_req_write`, `dram_req_addr`, `dram_req_wdata` | out | 1/log2 N/DW | request: write or read, counter index, data |
| `dram_rvalid`, `dram_rdata` | in | 1/DW | read data, returned in order, any latency |
| `init_done` | out | 1 | initialisation finished |
| `fifo_count`, `fifo_max_count` | out | log2(K+1) | FIFO occupancy and high-water mark |
| `fifo_overflow` | out | 1 | sticky: the FIFO limit was reached |
| `ev_wrap`, `ev_flush`, `ev_bypass`, `ev_stall` | out | 1 | one-cycle event pulses |

Until `init_done`, the DRAM channel carries the initialiser's writes. After
that, it carries the flush controller's reads and writes.

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| `N` | 2^20 | number of counters |
| `L` | 4 | SRAM counter width |
| `DW` | 64 | DRAM counter width |
| `K` | 300 | FIFO slots |
| `SD_RATIO` | 12 | SRAM/DRAM speed ratio, the minimum cycles between flushes |

`K` must be at least 2. For a stable queue, 2^L should be larger than
`SD_RATIO`.

## What is specified and what is chosen here

These parts follow the architecture:

* the split into small SRAM counters and large DRAM counters;
* the rule "+1, or wrap to 0 and queue the index";
* a FIFO of a few hundred indices;
* the random start A[i] := uniform, B[i] := −A[i];
* the default sizes: 2^20 counters, 4-bit SRAM counters, 64-bit DRAM
  counters, 300 slots, and a 12× speed ratio.

These are this implementation's own choices:

* the 1R1W SRAM with synchronous read, and the two-stage pipeline with its
  bypass;
* holding requests when the FIFO is nearly full, where dropping them would
  lose counts;
* the DRAM valid/ready channel, and the flush as a read-modify-write;
* pacing flushes and initialisation writes with a counter;
* the xorshift generator and its seed port;
* the status outputs.

Limits:

* There is no port for reading a counter. Reading one means adding B[i]
  and A[i], and adding 2^L for each copy of i still queued. The testbenches
  read both arrays directly. A query path would have to share the SRAM read
  port with increments and the DRAM channel with flushes.
* Decrements are not supported. The scheme does not handle them: traffic
  that alternates around 0 would make one counter wrap back and forth.
* The DRAM is not part of the RTL. `tb/dram_model.sv` is a behavioural
  stand-in with a configurable read latency and random back-pressure.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|---|---|
| `tb_sram_counter_array` | random reads and writes against a reference array; read-before-write on the same address |
| `tb_counter_update` | random increments with runs on one counter and random FIFO back-pressure; pushed indices and final SRAM contents against a model; the bypass and the hold both occur |
| `tb_flush_fifo` | random push and pop against a queue model; full, nearly-full, overflow, high-water mark |
| `tb_flush_controller` | every flush adds exactly 2^L to its word; starts ≥ 12 cycles apart, exactly 12 when backlogged; with a fast DRAM and with a randomly stalling DRAM |
| `tb_random_init` | A[i] against an independent xorshift model; B[i] = −A[i]; all 16 values occur; pacing, and waiting on DRAM back-pressure |
| `tb_stat_counter_top` | 256 counters, 16 FIFO slots, end to end (below) |
| `tb_stat_counter_full` | default size: initialises all 2^20 counters, runs 10^6 increments at one per cycle, drains, checks every counter and the wrap rate |
| `tb_workload_queue` | 2 M-increment traces over 4096 counters at L=4/SD=12/K=300 and at L=5/SD=30/K=500; FIFO maximum and mean occupancy |

`tb_stat_counter_top` runs uniform traffic and then runs on one counter.
It then plays the adversary that the randomisation defends against.
Because the testbench knows the start values, it brings every counter to 15
and increments all 256 back to back. The FIFO fills, requests are held, and
flushes leave at exactly one per 12 cycles. After a drain, every counter
must equal its number of increments. The test counts the wraps, flushes,
bypasses, stalls and paced flushes, and fails if any of them never
happened.

Results at the default size:

* Initialisation takes 12.58 M cycles.
* 10^6 mixed random increments produce about 62 000 flushes (1/16).
* The FIFO high-water mark is 18 of 300.

In `tb_workload_queue`:

* L=4/SD=12 reached a maximum of 17 and a mean of 0.95.
* L=5/SD=30 reached a maximum of 40 and a mean of 3.96.

Both are in line with published trace measurements for these operating
points (maximum 21–23 and mean 1.6–1.7 for 4 bits; maximum 61–72 for 5
bits). Those traces are not included; the test traffic is synthetic.

Simulating with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/sc_pkg.sv tb/tb_stat_counter_full.sv --top-module tb_stat_counter_full -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` file for the other tests. The
full-size run takes about ten seconds and needs about 20 MB.
