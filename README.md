# Coherent streaming memory path for an FPGA accelerator

A hardware accelerator on an FPGA and a processor exchange data through
*windowed FIFOs* (WFIFOs). A WFIFO is a ring of fixed-size tokens in shared
external memory. The accelerator reaches that memory through a cache, so the
hard part is keeping its view coherent with the processor's. The design below
does this without any hardware coherence protocol. It splits the problem in two:

* **Synchronisation** goes through a small controller, the FIFO Interface
  Module (FIM). The FIM reads and updates the FIFO's control structures in
  un-cached memory on the accelerator's behalf.
* **Data** (the contents of the tokens) goes through an accelerator cache. Loads
  and stores are kept in separate caches. The accelerator makes the cache
  coherent at token boundaries: it writes back the token it produced and
  invalidates the token it consumed before it hands either one back. This is
  release consistency, and the token is the unit of sharing.

All RTL is synthesizable SystemVerilog in `rtl/`. The self-checking testbenches
and a behavioural memory model are in `tb/`.

## The windowed FIFO

A channel is a struct in memory with five 32-bit words:

| offset | field | meaning |
|---|---|---|
| 0 | base | address of the first token |
| 4 | limit | first address after the last token |
| 8 | token_size | bytes per token |
| 12 | head | oldest token that has not been released by the reader |
| 16 | tail | next token the writer will release |

A port is a struct with two words: a pointer to its channel (offset 0) and the
port's own cursor (offset 4). For a write port the cursor is the next room to
acquire; for a read port it is the next data token to acquire. Software creates
the channel and its ports and sets head, tail and both cursors to base. The
word offsets are in `vfc_pkg`.

The FIFO rules:

* The FIFO is empty when `head == tail`.
* The token just before `head` is never used. This keeps a full FIFO
  distinguishable from an empty one, so an N-token buffer carries at most N-1
  tokens.
* A room is available when `next(room cursor) != head`. Data is available when
  `data cursor != tail`. `next()` adds token_size and wraps from limit to base.
* A port can hold several tokens at once. A release always frees the oldest
  one: releasing on the write port advances tail, and releasing on the read
  port advances head. To skip a token, acquire it and release it straight away.

Tokens can be much larger than the cache. The cache never needs to hold a whole
token.

## FIM: FIFO Interface Module (`fim.sv`)

The accelerator works on ports. It never sees the channel structs.

**Configuration.** The accelerator puts a port struct address on `port_addr`,
sets `rnw` to 1 for a read port or 0 for a write port, and raises
`port_valid`. It holds all three until `busy_ack` is high for one clock. In the
meantime the FIM reads the port struct and the channel struct and keeps base,
limit, token size and the cursor in registers. It holds one read port and one
write port, which may belong to different channels. A port can be reprogrammed
whenever the FIM is idle.

**Requests.** `request` is encoded as 00 none, 01 acquire, 10 release and
11 availability. `rnw` selects the port. Both are held until `busy_ack` rises.
`busy_ack` stays high while the FIM works, and its fall marks the result:

* **acquire**: `token_addr` and `token_length` describe the token. They stay
  valid until the next request. An acquire blocks: the FIM polls `tail` (for
  data) or `head` (for room) until a token is free. Holding `stop` high aborts
  the acquire, and the FIM returns with no token.
* **release**: the FIM reads `tail` or `head` fresh from memory, advances it by
  one token and writes it back. It does not use a cached copy, because the
  other side may have moved its own pointer in the meantime.
* **availability**: bit 0 of `token_length` is 1 when a token is free now.

The FIM's memory port must map the un-cached area. It reads the pointer the
other side owns on every poll, and it writes only the pointer this side owns.
As a result, the processor and the accelerator never write the same word.
Corner cases:

* A release with no token held completes at once.
* An acquire on an unconfigured port stays busy until `stop`.
* An availability request on an unconfigured port returns 0.

## Accelerator cache (`vf_cache.sv`)

The accelerator's ld/st port looks the same with or without the cache. The
cache sits between the accelerator and the bus master port and is built from
three parts.

**Read cache (`read_cache.sv`).** It is set-associative: 8 KB, 64-byte blocks
and 2 ways, so 64 sets. An address splits into tag, index and block offset.
Tag comparison and data selection are combinational, so a hit is answered in
the cycle after the request. A run of hits therefore streams one word per
clock. A miss fetches the whole block, word by word, into the victim way.

Replacement is LRU with one counter per way (`lru_update.sv`):

* On a hit, the way goes to 0. Valid ways whose counters were below it are
  incremented.
* On a fill, the new way goes to 0 and every other valid way is incremented.
* In a full set, the victim is the way whose counter is all ones.
* Invalid ways hold 0.
* Invalidating a way decrements the valid ways above it, so the counters stay a
  permutation.

**Write cache (`write_cache.sv`).** It has 8 fully associative entries of 8
bytes each. Each entry keeps a byte-valid mask, so a write-back writes only the
bytes the accelerator stored, using per-byte enables. Data the processor wrote
next to those bytes is never overwritten with stale values. If a store finds
no matching entry and no free one, the entry chosen round-robin is written back
first.

**Main controller (`cache_main_ctrl.sv`).**

* Load hit: answered in the next cycle.
* Load miss: if the write cache holds bytes of the missing block, those entries
  are written back first. Then the read cache replaces the block, and the load
  is looked up again and answered.
* Store: goes to the write cache. If the block is also in the read cache, it is
  written there too, so a later load sees it.
* Cache control interface: `cc_op`, `cc_addr` and `cc_len` with `cc_valid`,
  completed by a one-cycle `cc_done`.
  * FLUSH writes back and frees write-cache entries in the range, then
    invalidates read-cache lines in it.
  * INVALIDATE drops both without writing back.

The read cache and the write cache each have their own memory port.

Accelerator-side handshake: `vf_busy` low means the request presented in that
cycle is taken. `vf_ack[1]` pulses with read data and `vf_ack[0]` pulses when a
store is done.

## Coherence sequence in the system (`wfifo_accel_system.sv`)

The top module connects `fim`, `vf_cache` and `wfifo_test_accel`. The test
accelerator copies tokens from an input channel to an output channel. For each
token it:

1. acquires a data token on the read port and a room token on the write port;
2. copies min(data length, room length) bytes through the cache;
3. FLUSHes the room's range, so the output reaches memory;
4. INVALIDATEs the data token's range, so the next pass through the ring
   re-reads memory;
5. releases the data token, then the room.

The order of steps 3–5 is what makes the scheme correct. A token is visible to
the other side only after its bytes are in memory. A token is reused by this
side only after its cached copy is gone.

The processor, system bus, memory controller and DRAM are not part of the RTL.
The top brings out three memory master ports (read cache, write cache, FIM) as
`ldst_req_t` / `mem_rsp_t` structs. On each port the master holds a request
until a one-cycle `ack`. One request is outstanding per port, and each port
completes its requests in order.

## Where this RTL follows its source and where it does not

Taken from the published description:

* the WFIFO pointer rules;
* the FIM handshake and request encoding;
* the split into read and write caches;
* the cache sizes (read cache 8 KB, 64-byte blocks, 2-way; write cache 8 × 8
  bytes);
* the LRU rules;
* the miss → replace → reload order;
* the flush/invalidate-before-release sequence.

The published description gives what the caches and the main controller do,
not how they are built inside. These parts are this design's own:

* the fully associative write cache with byte masks;
* the write-back of pending bytes on a read miss;
* updating the read cache on stores;
* the range scan used for invalidation;
* all cycle timings except one-hit-per-clock.

Other choices of this design:

* The layout of the control structs.
* The 32-bit word-wide ld/st interface.
* The test accelerator.
* LRU counters are clog2(ways) bits wide: 1 bit for 2 ways, 2 bits for 4 ways.
  The published description gives a 2-bit counter for 2 ways, yet picks the
  victim as the way whose counter has every bit set. Only a clog2-wide counter
  makes that rule pick exactly one way.

Other organisations:

* A 4-way organisation of the same size is `NUM_WAYS = 4, NUM_SETS = 32`.
  `tb_vf_cache` runs the cache in both organisations.
* Invalidation scans every line of the read cache (NUM_SETS × NUM_WAYS cycles)
  whatever the range. This is simple, but slow for small tokens.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog. The shared behavioural memory `tb/mem_model.sv` gives every port a
random latency.

| testbench | what it checks |
|---|---|
| `tb_lru_update` | 2- and 4-way counters against a recency-list model, at random |
| `tb_read_cache` | hits and misses, LRU victim choice, byte updates, range invalidation, against a reference memory |
| `tb_write_cache` | byte merging, full/refuse, evict, range write-back, drop, at byte level |
| `tb_vf_cache` | random loads, stores, flushes and invalidates against a byte-level model; 8 hits served in 8 cycles; read-miss write-back. Runs the 2-way × 64-set and 4-way × 32-set organisations side by side, using `tb/vf_cache_env.sv` |
| `tb_fim` | configuration, acquire, release, availability, full/empty, wrap-around and `stop` on two channels, then 600 random requests on both ports of a third channel against a pointer model |
| `tb_wfifo_accel_system` | the whole system at default sizes (see below) |

`tb_wfifo_accel_system` plays the processor and runs two transfers at the
default sizes. Producer and consumer pause at random in both.

1. A 4-token input channel and a 3-token output channel, both with 256-byte
   tokens, carry 12 tokens.
2. A 5-token input channel of 96-byte tokens feeds a 3-token output channel of
   160-byte tokens, for 10 tokens. The accelerator copies 96 bytes per token.
   The test checks that the rest of each output token is left untouched.

The test counts every mechanism and fails if one never happens: read misses
and hits, write-cache evictions, flushes, invalidates, acquires blocked on
empty input and on full output, wrap-around of both rings, and partly filled
rooms. Both rings wrap several times, so a missing flush or invalidate shows up
as wrong data.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_wfifo_accel_system rtl/vfc_pkg.sv tb/tb_wfifo_accel_system.sv
./obj_dir/Vtb_wfifo_accel_system
```

Replace the top module and file name to run another testbench. The package
file must come first. To build the whole system with the 4-way organisation,
set `NUM_WAYS = 4` and `NUM_SETS = 32` on `wfifo_accel_system`.
