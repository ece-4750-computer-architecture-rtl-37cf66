# Quad-core TinyRV2 system with a shared, banked data cache

Four small RISC-V cores run the threads of one program. Each core fetches
through its own instruction cache. All four share one data cache, split into
four banks, so every address has exactly one home. The cores need no
coherence protocol: a word can only be cached in one bank, and every core
reaches that bank.

The whole system is assembled from a few reusable parts, joined by
latency-insensitive `val`/`rdy`/`msg` interfaces. A transfer happens in any
cycle where `val` and `rdy` are both high:

* a TinyRV2 processor (`proc`);
* a blocking cache (`cache`), used both as instruction cache and as data bank;
* a four-terminal network (`net_bus`);
* two message adapters that turn memory messages into network messages and
  back (`upstream_adapter`, `downstream_adapter`).

The organisation follows Cornell ECE 4750 (Fall 2016) Lab 5, "Multicore
Processor". The insides of the processor, cache and network were left open
there. Here they are simple designs of this repository's own, and the
section "Departures and limits" lists them.

## System organisation

```
           main memory port 0 (imemreq/imemresp, 128-bit lines)
                          |
                     +---------+
                     | MemNet  |  I-cache refill network
                     +---------+
                   |    |    |    |
                 I$0  I$1  I$2  I$3      private, unbanked, 16 x 16 B
                   |    |    |    |
                  P0   P1   P2   P3      core_id 0..3, NUM_CORES = 4
                   |    |    |    |
              +--------------------------+
              | McoreDataCache           |
              |   CacheNet               |  routes by address bits [5:4]
              |   D$0  D$1  D$2  D$3     |  four banks, 16 x 16 B each
              |   MemNet                 |  refill / write-back network
              +--------------------------+
                          |
           main memory port 1 (dmemreq/dmemresp, 128-bit lines)
```

| Module             | Role |
|--------------------|------|
| `multicore`        | Top level: 4 × (`proc` + I-`cache`), one `mem_net` for I-cache refills, one `mcore_data_cache` |
| `mcore_data_cache` | `cache_net` + 4 × `cache` (banked) + `mem_net` |
| `cache_net`        | Request and response `net_bus` pair, with 4 upstream and 4 downstream adapters |
| `mem_net`          | The same structure, carrying cache lines, with every request sent to terminal 0 |
| `net_bus`          | Four-terminal bus network (uses `vr_queue` and `rr_arbiter`) |
| `cache`            | Direct-mapped, write-back, write-allocate FSM cache |
| `proc`             | Five-stage pipelined TinyRV2 core |
| `mcore_pkg`        | Message structs, CSR numbers, reset address |

Main memory is not part of the RTL. Its two ports come out of `multicore`.
Processor↔cache messages carry 32-bit data. Cache↔memory messages carry a
whole 128-bit line.

## Messages

Each message is a packed struct from `mcore_pkg`:

| Message            | Fields (MSB first) | Bits |
|--------------------|--------------------|------|
| `mem_req_4B_t`     | type 3, opaque 8, addr 32, len 2, data 32 | 77 |
| `mem_resp_4B_t`    | type 3, opaque 8, test 2, len 2, data 32 | 47 |
| `mem_req_16B_t`    | type 3, opaque 8, addr 32, len 4, data 128 | 175 |
| `mem_resp_16B_t`   | type 3, opaque 8, test 2, len 4, data 128 | 145 |
| `net_*_t`          | src 2, dest 2, opaque 8, then one of the above as payload | +12 |

The type field is `MEM_READ` = 0, `MEM_WRITE` = 1 or `MEM_INIT` = 2. `INIT`
writes a word into a cache without reading memory; it is meant for loading
caches in tests. A cache sets response `test[0]` on a hit and clears it on a
miss. The `len` field is carried but ignored, because every access is a full
word or a full line.

## How a load finds its bank and comes back

This is the least obvious part of the design. It is what makes a shared
cache out of four independent caches and two networks.

Data-cache addresses are split like this:

```
 31                10 9     6 5   4 3      0
+--------------------+-------+-----+--------+
|        tag         | index | bank| offset |
+--------------------+-------+-----+--------+
```

Consecutive 16-byte lines therefore go to banks 0, 1, 2, 3, 0, …

1. **Processor → upstream adapter.** The adapter (id = core number) wraps the
   word request in a network message:
   * `src` = its id;
   * `dest` = address bits [5:4];
   * the payload is the request, with the adapter id copied into the two high
     bits of the payload's `opaque` field.
2. **Request bus.** The message waits in the input queue, crosses the bus and
   lands in the output queue of terminal `dest`.
3. **Downstream adapter → bank.** The adapter drops the header and hands the
   payload to the bank. Banks are `cache` instances with `NUM_BANKS=4`. They
   take the index from bits [9:6], so all 16 lines of each bank are usable.
4. **Bank → downstream adapter.** The bank returns the `opaque` field
   unchanged. The adapter reads the requester id from `opaque[7:6]` and uses
   it as `dest`. It clears those two bits, restoring the requester's own
   opaque value, and sends the response into the response bus.
5. **Upstream adapter → processor.** The adapter drops the header.

The adapters are purely combinational and add no cycles. Requesters must keep
their own opaque values below 64, because the top two bits are borrowed for
the id.

Refills use the same adapters in their other mode (`DEST_FROM_BANK=0`): every
request goes to terminal 0, where main memory sits. The id-in-opaque trick
brings each line back to the cache that asked for it. Banks and instruction
caches make their memory requests with opaque 0, so the two levels of
adapters never nest.

## The bus network (`net_bus`)

```
in[i] -> [input queue i] --\
                            >-- round-robin arbiter, one message/cycle --> [output queue dest] -> out[dest]
```

* Each terminal has a 2-entry input queue and a 2-entry output queue.
* An input queue's head may request the bus only when its destination output
  queue has room. This keeps every `val` independent of `rdy`, with no
  combinational path through the network.
* The arbiter grants one head per cycle, round-robin.
* An assertion checks that at most one message crosses the bus per cycle.
* Latency on an idle bus is two cycles. Throughput is one message per cycle
  for the whole network.
* Messages from one source to one destination stay in order. Responses from
  different banks can overtake each other.

`net_bus` has a type parameter `msg_t`: any packed struct with a `dest`
field. The same module carries all four message kinds.

## The cache (`cache`)

* Direct-mapped, `NUM_LINES` = 16 lines of 16 bytes (256 B per cache).
* Write-back and write-allocate.
* Blocking: it holds one request at a time.

State machine:

| State | Action |
|-------|--------|
| `IDLE` | Accept a request |
| `TAG_CHECK` | On a hit, read or write the word and go to `RESP`. On a miss, go to `EVICT_*` if the victim is dirty, else to `REFILL_*` |
| `EVICT_REQ`/`EVICT_WAIT` | Write the victim line to memory |
| `REFILL_REQ`/`REFILL_WAIT` | Read the line, install it, return to `TAG_CHECK` (which now hits) |
| `RESP` | Hold the response until it is taken |

Timing:

* A hit answers two cycles after its request handshake.
* A miss answers after the memory round trips, plus the network cycles when
  it goes through `mem_net`.
* `test[0]` records whether the first tag check hit.

The tag store keeps the address bits [31:4] with the index field zeroed, so
it also holds the bank bits. They are constant within a bank, but storing
them lets a bank rebuild the full address of a dirty victim without knowing
its own bank number. `NUM_BANKS=0` gives the unbanked instruction-cache
layout, index bits [7:4].

## The processor (`proc`)

TinyRV2 is the RV32IM subset used for teaching. This core executes:

* `add sub and or xor slt sltu sll srl sra mul`;
* the immediate forms of those ALU operations;
* `lui auipc lw sw jal jalr`;
* all six branches;
* `csrr`/`csrw`.

Any other opcode acts as a no-op. Loads and stores are full words only.

Control/status registers:

| CSR | Number | Meaning |
|-----|--------|---------|
| `mngr2proc` | 0xFC0 | `csrr` blocks until a word arrives on the manager input stream |
| `proc2mngr` | 0x7C0 | `csrw` blocks until the manager output stream accepts the word |
| `coreid`    | 0xF14 | value of the `core_id` input (0–3 in `multicore`) |
| `numcores`  | 0xFC1 | `NUM_CORES` parameter (4 in `multicore`) |
| `stats_en`  | 0x7C1 | bit 0 drives the `stats_en` output, marking the region a program wants measured |

Multi-threaded software uses `coreid` and `numcores` to split work, for
example a block of an array per core.

### Pipeline

The core is a classic five-stage in-order pipeline, F, D, X, M and W. Its
memory ports are latency-insensitive, so it tolerates cache misses and
network queueing.

* **F** has one instruction request in flight at a time and always predicts
  the fall-through address. The response to a fetch that was squashed while
  in flight is thrown away when it arrives, and the next request waits for
  it.
* **D** decodes and reads the register file. Operands come from bypasses out
  of X, M and W whenever a newer value is in flight, so ALU results never
  stall. A load followed directly by a consumer of its result costs one
  bubble (the load-use interlock). A `jal` is redirected here, which discards
  only the fetch in flight.
* **X** does the ALU work, `mul` included, and resolves branches and `jalr`.
  A taken branch or a `jalr` squashes the instruction in D and the fetch in
  flight: two wrong-path slots, so loops pay that on every backward branch.
  Loads and stores send their data request here. `csrr`/`csrw` to the
  manager streams wait in X until the stream is ready.
* **M** waits for the data response of a load or store. A slow data cache
  stalls the whole pipeline behind it.
* **W** writes the register file. `commit_inst` pulses once for each
  instruction leaving W.

A stage keeps its instruction while any later stage is stalled. No `val`
output depends on the `rdy` of its own interface. With single-cycle memory
and no hazards, one instruction commits per cycle; with the two-cycle cache
hit, fetch limits the core to about one instruction every three cycles.
Execution starts at 0x200 after reset.

## Statistics hooks

`multicore` brings out one bit per core, cache or bank, each high for one
cycle per event:

* `commit_inst`;
* `icache_access` = I-cache response handshake;
* `icache_miss` = that handshake with `test[0]` = 0;
* `dcache_access` and `dcache_miss`, the same per data bank.

Accumulate them while `stats_en` is high to get cycle counts, CPI and miss
rates per core and per bank.

## Parameters

| Parameter | Default | Where |
|-----------|---------|-------|
| `NUM_CORES` | 4 | `multicore` (`proc` defaults to 1, a single core) |
| `NUM_LINES` | 16 | `multicore`, `mcore_data_cache`, `cache` |
| `NUM_BANKS` | 0 | `cache` (4 inside `mcore_data_cache`) |
| `NPORTS` | 4 | networks; the 2-bit `src`/`dest` fields limit it to 4 |
| `QDEPTH` | 2 | `net_bus` queue depth |
| `ID`, `DEST_FROM_BANK`, `BANK_LSB` | 0, 1, 4 | adapters |

The bank-bit position, line size and network width are tied to four
terminals and 16-byte lines. Changing the core count beyond 4 needs wider
header fields.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it shows |
|-----------|---------------|
| `net_bus_tb` | Random traffic from 4 sources with output back-pressure. Exactly-once, in-order delivery per source/destination pair; 2-cycle idle latency; never more than one message per cycle on the bus |
| `upstream_adapter_tb`, `downstream_adapter_tb` | Header fields, destination in both modes, id-in-opaque encoding and restoration, `val`/`rdy` pass-through |
| `cache_tb` | 1500 random reads and writes over 1 KB against a reference memory and a reference tag store. Read data, hit/miss bit, 2-cycle hit latency, dirty write-backs |
| `cache_net_tb` | 4 sources to a 4-port memory. Requests land on the bank named by bits [5:4]; responses return to the sender with its opaque value; requests compete for the bus |
| `mem_net_tb` | 4 sources of line requests. All reach port 0 and return correctly, under contention |
| `mcore_data_cache_tb` | 4 sources over 4 KB (four times capacity). Data correct; per-bank access hooks equal the requests sent to each bank; misses and write-backs occur |
| `proc_tb` | A program that exercises the instruction subset and CSRs, with a fast instruction memory and a slow data memory. Checks results on the manager stream and the committed-instruction count. Requires branch squashes, `jal` redirects and load-use stalls to occur |
| `proc_random_tb` | Six random programs of about 500 instructions: all ALU operations, loads and stores, and forward branches, `jal` and `jalr`. Register pool is small, so dependences are dense. Every register, every data word and the commit count are compared against an instruction-level model in the testbench |
| `multicore_tb` | Full-size system with default parameters (see below) |
| `mcore_sort_tb` | Full-size system running a parallel sort (see below) |

`multicore_tb` runs a 4-core vector add: 24 elements per core, with source
and destination arrays that collide in the same cache sets. Each core then
sums its results through a subroutine and reports them. The testbench checks
the sums and requires each of these to happen at least once:

* I-cache hits and misses in every core;
* D-cache hits and misses in every bank;
* dirty write-backs;
* several cores' requests queued in CacheNet at the same time;
* several I-caches competing for the refill bus in one cycle;
* manager-stream traffic;
* in the cores: branch and `jalr` squashes, `jal` redirects, load-use stalls
  and bypassed operands.

It takes about 2700 cycles.

`mcore_sort_tb` runs the workload the system was built for: a parallel sort
of 128 random 32-bit integers. Each core insertion-sorts its own 32-element
block in place, then sets a flag word. Core 0 spins on the flags, merges the
blocks pairwise and streams the sorted array out. The flags work without a
coherence protocol because each word lives in exactly one data bank. The
testbench checks the output against its own sort and prints the
statistics-hook totals. The run takes about 21,000 cycles. A second run
resets the system and sorts all 128 elements on core 0 alone, with the other
cores parked. It takes about 112,000 cycles, so the parallel version is about
5.3 times faster. That is more than four times because insertion sort's work
grows with the square of the block length.

`tb/test_mem.sv` is a behavioural multi-port
memory with configurable latency and random stalls. `tb/rv_asm_pkg.sv`
encodes instructions for the test programs.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert rtl/mcore_pkg.sv tb/rv_asm_pkg.sv \
    -y rtl -y tb tb/multicore_tb.sv --top-module multicore_tb -o sim
./obj_dir/sim
```

Replace `multicore_tb` with any other testbench name. Lint warnings about
unused message fields are expected: the processor ignores response type and
test bits, and the adapters ignore header fields that they drop.

## Departures and limits

These parts are this design's own choices, not taken from the original lab
system:

* **Processor.** The original specifies a pipelined TinyRV2 core but not its
  insides. The stage split, the bypass paths, the single fetch in flight and
  the placement of `jal` in D and branches in X are this design's choices.
  There is no branch target buffer, so backward loop branches always cost
  two squashed slots.
* **Cache.** The organisation was unspecified apart from 16-byte lines, four
  index bits and the bank field. A direct-mapped, write-back design with a
  two-cycle hit was chosen. The single-cycle-hit cache of the lab's extension
  ideas is not built.
* **Network.** The lab allowed a bus or a ring. This design uses a bus for all
  four networks, with small queues.
* **Message widths, type encodings, and the CSR numbers of `mngr2proc` and
  `proc2mngr`** were chosen here to follow common TinyRV2 practice.
* **Scope.** The single-core baseline (one processor, one I-cache and one
  D-cache, no networks) is not included. It can be built from `proc` and two
  `cache` instances.
* **No compiled programs.** Nothing here has run a compiled C benchmark.
  Only hand-assembled test programs have been simulated.
