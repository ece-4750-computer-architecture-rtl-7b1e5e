# Small write-through caches: FSM, pipelined, and their helpers

A cache serves each memory access as a short series of steps: check the
tag, on a read miss pick a victim and refill the line, on a write send the
word on to memory (write-through), and finally read or write the data array.
This library gives synthesizable SystemVerilog for two ways of scheduling
those steps on the same small cache (four 16-byte lines, 4-byte requests):

* **FSM cache** (`fsm_cache`): two-way set-associative with LRU replacement.
  A finite-state controller runs one step per cycle, so every access takes
  at least two cycles.
* **Pipelined cache** (`pipe_cache`): direct-mapped. Tag check and data
  access sit in two pipeline stages (M0, M1), so hits stream at one per
  cycle; a read miss stalls the front stage while a small FSM refills the
  line. A parameter moves the data read into M0 next to the tag check
  ("parallel read, pipelined write"), which brings read latency down to one
  cycle and creates a read-after-write hazard that is either stalled or
  bypassed.

Two memory-side helpers come with them: a next-line **prefetch buffer** and
a **write buffer** with read bypass. `cache_top` puts all of them side by
side.

All caches are write-through and no-write-allocate, work on physical
addresses (no TLB), and expect an idealised **combinational main memory**:
a line read is answered in the cycle it is asked for. That assumption is
what makes the cycle counts below exact, and it is the first thing to
change for a real system (see "Limits").

## Interfaces shared by all blocks

Types live in `rtl/cache_pkg.sv`.

| Channel | Signals | Contents |
|---|---|---|
| request | `cachereq_val`, `cachereq_rdy`, `cachereq` (`cache_req_t`) | `rtype` (read/write), 32-bit byte `addr`, 32-bit `data` |
| response | `cacheresp_val`, `cacheresp_rdy`, `cacheresp` (`cache_resp_t`) | `rtype`, 32-bit read `data` (0 for a write acknowledgement) |
| memory request | `memreq_val`, `memreq` (`mem_req_t`) | `rtype`, `addr`, 128-bit `data` |
| memory response | `memresp_data` | 128-bit line, valid in the same cycle as `memreq_val` |

Both processor-side channels are valid/ready: a transfer happens at a rising
edge where both are high. Every access is one aligned 32-bit word (the low two
address bits are ignored). Responses come back in request order.

A memory request is one of two kinds:

* **line read** (`rtype = REQ_READ`): `addr` has its low four bits cleared
  (the "z4b" unit); memory returns the 16-byte line on `memresp_data` in the
  same cycle;
* **word write** (`rtype = REQ_WRITE`): `addr` is the word address and
  `data` is the word zero-extended to 128 bits ("zext"); memory stores
  `data[31:0]`.

There is no memory ready signal: the memory is assumed to act in the cycle
`memreq_val` is high.

Address fields (bit 31 on the left):

| Cache | tag | index | word offset | byte offset |
|---|---|---|---|---|
| FSM cache, 2 sets x 2 ways | [31:5] 27 b | [4] 1 b | [3:2] | [1:0] = 00 |
| pipelined cache, 4 lines direct-mapped | [31:6] 26 b | [5:4] 2 b | [3:2] | [1:0] = 00 |

Reset (`rst`) is synchronous and active high. It clears controller state,
valid bits and replacement bits; the tag and data arrays are not reset, since
the valid bits gate them.

## FSM cache

`fsm_cache` = `fsm_cache_ctrl` (control unit) + `fsm_cache_dpath`
(datapath), with `tag_array` (one per way) and `data_array` inside the
datapath.

### States

| State | Work done in the cycle |
|---|---|
| MT  | check tag: both ways' tags are read and compared; waits here while no request is held |
| R0  | send the line read to memory, capture the returned line in a register |
| R1  | write the line into the data array (all four words) and the tag into the victim way; set valid, mark the way used |
| MRD | read the data array at {way, index}, return the word picked by the offset |
| MWD | send the word to memory; on a hit also write it into the data array (one word enabled, the word copied into all four slots by the replication unit); return the acknowledgement |

Paths: read hit MT -> MRD; read miss MT -> R0 -> R1 -> MRD; any write
MT -> MWD (a write miss allocates nothing). MRD and MWD return to MT once
the response is taken.

The request sits in a register in front of the tag arrays. It is loaded
when MT is idle, and also in the cycle a response is taken, so requests can
follow each other without a gap. Counting from the edge where a request is
accepted to the edge where its response is taken, with `cacheresp_rdy`
held high:

| Access | Cycles |
|---|---|
| read hit | 2 |
| read miss | 4 |
| write (hit or miss) | 2 |

A write whose acknowledgement is held up by `cacheresp_rdy` still sends its
memory write and data-array write only once.

### Replacement

The control unit keeps one valid bit per line and one use bit per set. The
use bit names the way touched last. It is updated on every hit (read or
write) and on every refill. The victim is an invalid way if the set has one,
and otherwise the way not touched last. With two ways this is exact LRU.

### Datapath

The control unit drives the datapath through one struct, `fsm_ctrl_t`. Its
fields are: tag-array write enables, data-array write enable, write-data
select (refill line or replicated word), word-enable select (all words or
the offset's word), way, refill-register enable and the z4b select. The
datapath sends back `fsm_status_t`: one tag-match bit per way and the
request type. Hit/miss is decided in the control unit, since it owns the
valid bits.

## Pipelined cache

`pipe_cache` holds the whole pipeline in one module, with one `tag_array`
and one `data_array`.

```
             M0                                   M1
 req reg -> tag check (tag array, valid bit)  ->  M0/M1 reg -> data array
             M0 FSM: pipe / R0 / R1                (read word | write word |
             memory: line read (R0),                write refill line)
                     write-through word
```

### The miss path: a small FSM in M0

The hit path is a pipeline. A read miss is handled by an FSM that holds
the request in M0:

1. **pipe**: M0 checks the tag. A read miss moves the FSM to R0, but only
   once M1 is not stalled. That way M1 is empty in R0.
2. **R0**: the line read goes to memory. The returned line goes into the
   M0/M1 register as a *refill* operation.
3. **R1**: M1 writes the whole line into the data array. At the same
   time M0 writes the tag and sets the valid bit.
4. Back in **pipe**, the request checks its tag again. It now hits and
   moves on as usual.

A read miss therefore costs 3 extra cycles in a stream of requests.

Writes go to memory from M0 in the cycle they leave M0. A write miss sends
its memory write and nothing else. A write hit also writes its word into the
data array in M1.

### Two ways to use the data array (`PARALLEL_READ`)

**`PARALLEL_READ = 0`: two-cycle hits.** M1 does all data-array work. A
read hit reads the line in M1 and answers from there. A write hit writes its
word in M1. Every response, including write acknowledgements, comes from M1.
Reads and writes of the array happen in order in one stage, so there is no
data hazard. Latency is 2 cycles for a hit or write and 5 for a read miss,
with one access per cycle on hits.

**`PARALLEL_READ = 1` (default): parallel read, pipelined write.** M0
reads the data array in the same cycle as the tag check and answers at
once. Write acknowledgements also leave from M0. M1 only writes: the word
of a write hit, or a refill line. M0 reads and M1 writes in the same cycle,
so `data_array` has a separate read address and write address. This is the
duplicated-port answer to the structural hazard. Latency is 1 cycle for a
read hit or any write and 4 for a read miss.

The new problem is a **read-after-write hazard**. Suppose a write hit is in
M1 and, in the same cycle, a read in M0 reads the word that M1 is about to
write. The read sees the old value. The hazard is detected when:

* M0 holds a read that hits,
* M1 holds a write hit, and
* both have the same word address.

A read of another word of the same line is not a hazard, because only the
enabled word changes. `RAW_BYPASS` picks the fix:

* `RAW_BYPASS = 0` (default): the read waits one cycle and reads the
  array after the write.
* `RAW_BYPASS = 1`: the read answers at once with the write data taken from
  the M0/M1 register (a bypass path into the response mux).

**`DUAL_PORT = 0`: single-ported array, structural stall.** The data array
keeps one address. M1 uses it when it holds a write hit or a refill;
otherwise M0 uses it for its parallel read. A read hit in M0 behind a write
hit in M1 therefore waits one cycle, whichever word it reads. This stall
also covers the same-word case, so `RAW_BYPASS` has no effect in this mode,
and the event is reported on `struct_stall_event` instead of the RAW
events. The default, `DUAL_PORT = 1`, duplicates the port as described
above.

The defaults (parallel read, duplicated ports, stall on RAW) are the
combination used for the cycle estimates below.

### Back-pressure

If `cacheresp_rdy` is low, the stage that holds the response waits, and the
stages behind it wait too. The response stays valid until it is taken. An
assertion checks this, and a second one checks that M1 is free when a
refill line enters it.

## Prefetch buffer

`prefetch_buffer` sits between a cache and memory and uses the same
combinational interface on both sides. The cache therefore sees no change
in timing. It has four entries, each holding a line address and a line.

* The line reads it sees are the cache's misses. After each one it
  predicts that the next sequential line will be wanted. A newer prediction
  replaces an older one.
* In the first cycle the memory port is idle, it reads the predicted line
  into the next entry, round-robin. It skips this if the line is already
  buffered.
* A line read that finds its line in the buffer is answered from the buffer
  without touching memory, and the entry is freed. Otherwise the read goes to
  memory.
* Word writes pass to memory and also update a buffered copy of their line.

In `cache_top` it sits behind the FSM cache. A sequential stream then has
almost all of its refills served from the buffer.

## Write buffer

`write_buffer` is a FIFO for write-through words. It lets line reads go to
memory ahead of buffered writes.

* A cache write is queued and never waits.
* The memory port does one request per cycle. A cache line read goes first.
  In any other cycle the oldest buffered write drains.
* A line read checks every entry's address. Each word of the line that is
  still buffered is replaced by its youngest buffered copy, so reads are
  never stale.

Behind a combinational memory, the caches here leave the port free in the
cycle of every write. The buffer then drains at once and holds at most one
word. For that reason `cache_top` brings it out on its own `wb_*` ports
instead of chaining it behind a cache. It becomes useful with a slower
memory; see "Limits".

## Measured cycles

The cycle counts below come from the end-to-end test at default
parameters. They count cycles from the first request accepted to the last
response taken, for 64 four-byte elements:

| Sequence | FSM cache | pipelined, two-cycle | parallel read + RAW stall | parallel read + RAW bypass | parallel read, single port |
|---|---|---|---|---|---|
| copy: `rd 0x1000+4i; wr 0x2000+4i` | 288 | 177 | 176 | 176 | 176 |
| increment: `rd 0x1000+4i; wr 0x1000+4i` | 288 | 177 | 176 | 176 | 224 |

For the FSM cache: 16 read misses x 4 + 48 read hits x 2 + 64 writes x 2 =
288, or 2.25 cycles per access.

For the pipelined caches: one access per cycle, plus 3 cycles for each of
the 16 read misses, plus the pipeline depth. That gives about 1.38 cycles
per access.

Neither sequence has a read-after-write hazard on the same word. With a
single-ported array, copy still runs at full rate: its writes miss
(no write allocate), so M1 never writes the array. In increment, each write
hits, and the next read, if it hits, waits one cycle. That happens 48 times
(64 reads less 16 line misses), giving 176 + 48 = 224 cycles.

## Top level: `cache_top`

| Port group | Contents |
|---|---|
| `fsm_*` | FSM cache, processor side and memory side (behind the prefetch buffer); events `fsm_hit_event`, `fsm_miss_event`, `fsm_pf_hit_event`, `fsm_pf_prefetch_event` |
| `pipe_*[0]` | pipelined cache, `PARALLEL_READ=0` |
| `pipe_*[1]` | pipelined cache, `PARALLEL_READ=1`, `RAW_BYPASS=0` |
| `pipe_*[2]` | pipelined cache, `PARALLEL_READ=1`, `RAW_BYPASS=1` |
| `pipe_*[3]` | pipelined cache, `PARALLEL_READ=1`, `DUAL_PORT=0`; the only one whose `pipe_struct_stall_event` pulses |
| `wb_*` | write buffer, cache side (`wb_creq*`, `wb_cresp_data`) and memory side (`wb_mreq*`, `wb_mresp_data`), `wb_empty`, `wb_bypass_event` |

Each `*_memreq`/`*_memresp_data` pair must be connected to a memory that
answers in the same cycle. The `*_event` outputs pulse once per event and
exist for performance counters.

## Simulating

Each testbench is self-checking. It prints one line
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/cache_pkg.sv tb/cache_top_tb.sv --top-module cache_top_tb -o sim
./obj_dir/sim
```

Replace `cache_top_tb` with any other testbench. The testbenches are:

| Testbench | What it checks |
|---|---|
| `tag_array_tb`, `data_array_tb` | storage against a reference copy, including word enables and read-during-write |
| `fsm_cache_ctrl_tb` | state sequences, victim choice (invalid way first, then LRU), write sent once under back-pressure |
| `fsm_cache_dpath_tb` | tag match, refill capture and write, word writes, response word, z4b/zext |
| `fsm_cache_tb` | whole FSM cache against a reference cache model: data, hit/miss, exact latency 2/4/2 plus stalls, memory traffic |
| `pipe_cache_tb` | four pipelined configurations (through `pipe_cache_tester`): exact latencies, one hit per cycle, RAW stall/bypass cost, structural-stall cost with a single port, random traffic with back-pressure |
| `prefetch_buffer_tb`, `write_buffer_tb` | data always current, prefetch hit count on a stream, bypass of buffered words, drain |
| `cache_top_tb` | everything at default parameters: the copy and increment sequences with exact cycle totals, RAW pairs, an LRU pattern, random traffic; fails if a refill, write-through, prefetch hit, write-buffer bypass, RAW stall, RAW bypass, structural stall or back-pressure never happened |

`tb/magic_mem.sv` is the memory model the testbenches use: 16 KB, combinational
reads, each word preset to `(word_address * 0x9E3779B1) ^ 0x5A5A0000`, so
expected values are computed rather than loaded. `tb/stream_driver.sv` feeds
a cache back-to-back requests and checks the responses in order.

## Design choices and limits

Choices made here where the underlying description is silent:

* Valid/ready handshakes and the exact encoding of the request structs.
* The register that holds the refill line between R0 and R1 in the FSM
  cache.
* Data-array addressing `{way, index}`.
* The use-bit update rule: on every hit and refill, and not on a write
  miss.
* The RAW hazard condition: same word address, write hit in M1.
* The structural-stall condition with one array port: read hit in M0, write
  hit in M1.
* The rule that a refill starts only when M1 can take it.
* The prefetcher's next-line rule, its four entries and round-robin
  replacement, and updating buffered lines on writes.
* The write buffer's depth of four, and its youngest-entry-wins bypass.
* Reset behaviour.

Not provided:

* **Address translation.** There is no MMU or TLB, and the caches are
  physically addressed. A virtually indexed, physically tagged arrangement
  would need a TLB in parallel with M0. It would also need the index and
  offset bits to fit within the page offset, which holds here: the caches
  use 6 of the 12 bits of a 4 KB page.
* **Write-back with write allocate.** Only write-through, no-write-allocate
  is built. There is no eviction of dirty lines.
* **Software structural-hazard fix.** Leaving the conflict to software with
  a nop is not modelled. Port duplication and hardware stalling are built.
* **Set-associative pipelined cache and multi-level hierarchy.** The
  pipelined cache is direct-mapped only.
* **The write buffer's drain-before-read policy.** It would need a memory
  interface that can make the cache wait.
* **A slow memory.** With a multi-cycle memory, both the caches' refill
  states and the buffers need a memory ready/valid handshake. The R0 state
  and the write buffer's drain are the places to add it.
* **Cycle time.** Only cycle counts are modelled, not gate delays.
