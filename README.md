# Elbow cache: a 2-way skewed-associative data cache that relocates instead of evicting

A conventional set-associative cache fights conflict misses by adding ways, and every
extra way costs another set of bit-lines and sense amplifiers switching on every read.
A *skewed* cache keeps the associativity at two but indexes each of its two way-banks
with a different hash of the address. Blocks that collide in one bank are then unlikely
to collide in the other, so a 2-way skewed cache behaves roughly like a 4-way
set-associative cache while each lookup reads only two tags and two blocks.

The *elbow cache* takes this further. Every resident block has two possible homes, one
per bank. On a miss, the new block X can go to slot A (bank 0) or slot B (bank 1). But
A and B could themselves move to their alternate slots C and D in the other bank. The
elbow cache therefore looks at four candidates. If the oldest one is C or D, it moves
A (or B) there and puts X in the freed slot, so X "uses its elbows" instead of evicting
a young block. Age comes from coarse 5-bit timestamps that count cache allocations, not
cycles.

This repository holds synthesizable SystemVerilog for that cache. It follows the
organization described in *Skewed Caches from a Low-Power Perspective* (32 KB, 64-byte
blocks, XOR skewing, CAT timestamps, elbow relocation with its two restrictions). Its
interfaces, timing and several corner-case rules are this implementation's own choices,
listed in [Where this design chooses for itself](#where-this-design-chooses-for-itself).

## Organization at a glance

| Item | Value |
|---|---|
| Capacity | 32 KB: 2 way-banks x 256 blocks x 64 bytes |
| Address | 32-bit physical byte address, 8 KB pages |
| Index per bank | 8 bits, from an XOR skewing function (different per bank) |
| Tag | address bits 31..13 (19 bits), plus valid and dirty |
| Replacement | oldest CAT timestamp among 2 primary + 2 secondary candidates |
| Timestamp | 5 bits per block, top bits of an 11-bit allocation counter |
| Relocation limits | moved block must have distance <= 3; at most 16 relocations in any 64 misses |
| Ports | one request at a time, single-ported arrays, write-back / write-allocate |

```
            cpu_req ──►┌──────────────────────── elbow_ctrl ─────────────────────────┐
                       │ skew_index ─► idx0, idx1                                   │
                       │ alt_location x4 (alternate slots, victim addresses)        │
                       │ cat_counter ─► current timestamp                           │
                       │ cat_distance x4 ─► victim_select ◄── reloc_limiter         │
                       └──┬───────────────┬───────────────┬───────────────┬─────────┘
                          │ bank 0        │ bank 0 ts     │ bank 1        │ bank 1 ts
                       way_bank    timestamp_array     way_bank    timestamp_array
                                 l2_fill_* / l2_wb_*  ──►  next level (not included)
```

## Address mapping and the skewing functions

Write the byte address as `{a_18 .. a_0, b_12 .. b_0}`. The `b` bits are the 8 KB page
offset and need no translation. The `a` bits come from the translation. `b_5..b_0`
select the byte in the block.

The two banks are indexed by

```
idx0 = { a_0,  (a_7..a_1)        XOR (b_12..b_6) }      f1(A) = A1 ^ A2
idx1 = { a_0,  sigma(a_7..a_1)   XOR (b_12..b_6) }      f2(A) = sigma(A1) ^ A2
```

where `sigma` is a one-bit left rotation of the 7-bit field. Only 7 of the 8 index bits
are hashed. The most significant bit is `a_0` passed straight through. This restricted
form keeps one input of every XOR on an untranslated page-offset bit, which arrives
early. In silicon, that allows a fast pass-transistor XOR whose delay adds very little
to the access time. In this RTL it is ordinary logic (`rtl/skew_index.sv`).

Both indices share the MSB `a_0`. This keeps both ways of an address in the same half of
the array, which a bit-line-wise sub-array split needs.

## Finding where else a block could live

The secondary candidates and the relocation target need the alternate slot of a block
that is already resident. The tag stores every translated bit `a_18..a_0`, so
`a_7..a_1` is known. The page-offset field follows from undoing the bank's XOR:

```
bank 0:  b_12..b_6 = idx[6:0] ^ a_7..a_1
bank 1:  b_12..b_6 = idx[6:0] ^ sigma(a_7..a_1)
```

`rtl/alt_location.sv` rebuilds the block address this way and skews it again for the
other bank. The controller uses four instances:

- two for the alternate slots of A and B;
- two for the block addresses of C and D, which a writeback needs.

## CAT timestamps and block age

`rtl/cat_counter.sv` is an 11-bit counter. Its width is log2(512 blocks) + 2. It counts
*allocations*, one per fill, and nothing else. Its top 5 bits are the current timestamp.
So the timestamp advances once every 64 fills. Under random replacement, the chance that
a block survives depends on how many allocations have happened since it was last
touched. It does not depend on elapsed cycles, so this clock measures the right thing
with very few bits.

Every hit and every fill overwrites the block's timestamp with the current one. There
is no read-modify-write. Timestamps live in a separate small array per bank
(`rtl/timestamp_array.sv`), about 2% of the data array.

The age of a block is the modular distance

```
d = T_curr - T_st               if T_curr >= T_st
d = T_curr + 2^5 - T_st         otherwise
```

computed by `rtl/cat_distance.sv`. The bigger `d` is, the older the block.

## Choosing the victim (the heart of the design)

On a miss the four candidates are:

| Candidate | Where | Role |
|---|---|---|
| A | bank 0, `idx0(X)` | primary: X may go here |
| B | bank 1, `idx1(X)` | primary: X may go here |
| C | bank 1, alternate slot of A | secondary: A could move here |
| D | bank 0, alternate slot of B | secondary: B could move here |

`rtl/victim_select.sv` decides as follows:

1. If A is empty, X goes to A. Otherwise, if B is empty, X goes to B.
2. Otherwise the candidate with the largest distance is the victim. An empty secondary
   slot counts as older than any valid block.
3. If the victim is a primary, it is evicted and X takes its slot. No block moves.
4. If the victim is a secondary, say C, then A would have to move into C's slot and X
   would take A's old slot. This *relocation* happens only if both of these hold:
   - A is young: its distance is at most 3. An old block is not worth a block-sized
     read and write.
   - The relocation budget allows it (next section).

   If either fails, the older of A and B is evicted instead. The refusal is reported as
   `reloc_by_age` or `reloc_by_window`.

Ties go to A over B, primaries over secondaries, and C over D.

Example: A and B are 2 and 6 periods old, C is 20 and D is 1. C is the oldest, and A is
young enough, so A moves to C's slot (bank 1) and X is written to A's slot (bank 0). If
A had been 4 periods old, B (age 6) would simply have been evicted.

The fill and the relocation always write different banks. Bank 0 is written for X and
bank 1 for A, or the other way round for D. So both writes happen in the same cycle. The
moved block's data was already read during the lookup, so relocation costs no extra read
cycle. The moved block keeps its tag, dirty bit and timestamp. A relocated dirty block
stays dirty; only an evicted dirty victim is written back.

## The relocation budget

`rtl/reloc_limiter.sv` limits relocations to 16 in any 64 consecutive misses. On
average that is one relocation per four misses, which keeps relocation energy bounded
when the miss rate is high. It uses these parts:

- a 63-bit shift register recording, for each of the last 63 misses, whether it
  relocated;
- a running count of the ones in that register.

`allow` is high while the count is below 16. So even if this miss relocates, the 64-miss
window that includes it holds at most 16 relocations.

## Access sequence and timing

The controller (`rtl/elbow_ctrl.sv`) is blocking. `cpu_req_ready` is high only when it is
idle.

| Cycle | State | Action |
|---|---|---|
| 0 | IDLE | request taken; both banks and both timestamp arrays read at `idx0`, `idx1` |
| 1 | LOOKUP | tag compare. **Hit:** `cpu_rsp_valid`; write the current timestamp to the hit line (a store also writes its bytes and sets dirty). **Miss:** compute A's and B's alternate slots and read C (bank 1) and D (bank 0) |
| 2 | SECOND | distances, victim choice, budget update; capture the victim for writeback |
| 3 | WB | only for a dirty victim: `l2_wb_valid` until `l2_wb_ready` |
| next | FILL_REQ | `l2_fill_req_valid` with the block address until `l2_fill_req_ready` |
| next | FILL_WAIT | on `l2_fill_rsp_valid`: write X (and the relocated block) into the banks and timestamps, advance the allocation counter, `cpu_rsp_valid` |

So a hit answers one cycle after the request is taken. A miss answers after
3 + (1 if a writeback) + the next level's fill latency, plus any handshake stalls.

Each request reads both banks in parallel, and a miss adds one more read of both banks.
Writes happen only on a store hit, on a timestamp update and at the fill.

## Interfaces

All of the top-level ports (`rtl/elbow_cache.sv`) are plain signals or packed structs from
`rtl/elbow_pkg.sv`.

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (empties the cache, clears the counter and the window) |
| `cpu_req_valid` / `cpu_req_ready` | in / out | request handshake |
| `cpu_req` (`cpu_req_t`) | in | `we`, 32-bit `addr`, 64-bit `wdata`, 8-bit `wstrb` |
| `cpu_rsp_valid`, `cpu_rsp` (`cpu_rsp_t`) | out | one-cycle response: `hit` and the word (for a store, the updated word); no back-pressure |
| `l2_fill_req_valid` / `_ready`, `l2_fill_addr` | out / in / out | block fetch request |
| `l2_fill_rsp_valid`, `l2_fill_data` | in | the 64-byte block, in one beat |
| `l2_wb_valid` / `_ready`, `l2_wb_addr`, `l2_wb_data` | out / in / out | dirty victim writeback |
| `events` (`cache_events_t`) | out | one-cycle pulses: `hit`, `miss`, `fill_invalid`, `relocation`, `reloc_by_age`, `reloc_by_window`, `writeback` |
| `cat_count` | out | the allocation counter |

Top parameters: `WINDOW` (64), `MAX_RELOC` (16), `MAX_DIST` (3). Setting `MAX_RELOC = 0`
turns the cache into a plain 2-way skewed cache with timestamp replacement. Sizes live in
`elbow_pkg`. The index width is tied to the page size through the skewing functions
(7 hashed bits = page bits 12..6), so the capacity is not a free parameter.

The controller includes assertions:

- a block never hits in both banks;
- the fill and writeback requests stay asserted, with a stable address, until accepted.

## Storage

- `rtl/way_bank.sv`: one logical bank, with its own index port (its own decoder).
  - Tags and 512-bit blocks are in single-port synchronous-read arrays.
  - Valid and dirty bits are in flip-flops so that reset clears them.
- `rtl/timestamp_array.sv`: 256 x 5-bit single-port array per bank. It has no reset,
  because a timestamp is only used for a valid line.

For power and aspect ratio, the published design interleaves the bit-lines of the two
logical banks into one physical array. Each of the two decoders drives the word-lines of
half the cells. That is a layout matter and is not expressed in RTL. Logically the two
banks are simply two instances.

## Where this design chooses for itself

The organization, sizes, skewing functions, timestamp scheme, four-candidate victim
choice, distance-3 rule and 16-in-64 window follow the published elbow cache. These
points are choices made here:

- **Address and word widths:** 32-bit physical address and 64-bit processor word with
  byte strobes.
- **Skew field widths.** The exact translated bits paired with `b_12..b_6` are chosen
  here: `a_7..a_1` (7 bits), with `a_0` as the MSB. This gives exactly 256 blocks per
  bank.
- **Rotated operand.** `sigma` rotates the translated field `a_7..a_1` one bit to the
  left.
- **Distance-3 rule.** It is applied to the block that would be *moved*. The rule says
  "the selected primary victim must have distance 3 or less", and its purpose is to
  relocate only recently used blocks.
- **Budget.** Relocation is limited by the sliding window (16 in 64). The looser "one
  per four misses" is its average.
- **Tie breaks and empty slots:** as described in [Choosing the victim](#choosing-the-victim-the-heart-of-the-design).
- **No cancelled relocations.** The published scheme lets port arbitration cancel a
  relocation when no spare cycle is found. This controller is blocking, so a spare cycle
  always exists and relocations are never cancelled.
- **Write policy.** Stores are write-back and write-allocate. The published evaluation
  considers loads only.
- **Timing and interfaces:** the cycle sequence above and all handshakes. The published
  access times are in nanoseconds for a full-custom array, not cycles.

Not included:

- the pass-transistor XOR circuit;
- the physical interleaving;
- the next cache level (the testbench has a behavioural model);
- the 16 KB and 64 KB variants;
- the set-associative and NRUE-replacement baselines the scheme is compared against.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_skew_index` | both functions bit by bit from the named address bits; directed single-bit cases |
| `tb_alt_location` | address recovery and alternate index for random blocks in either bank |
| `tb_cat_counter` | count and timestamp bits over more than one wrap |
| `tb_cat_distance` | all 1024 timestamp pairs |
| `tb_victim_select` | every rule by a directed case, plus 20 000 random cases against a sort-based reference |
| `tb_reloc_limiter` | `allow` and the count against a queue of the last 63 misses, with phases that exhaust the budget |
| `tb_way_bank`, `tb_timestamp_array` | reset state, random writes and reads against a copy |
| `tb_elbow_cache` | the whole cache at full size (see below) |
| `tb_elbow_scenarios` | directed: three blocks sharing a bank-0 index all stay resident; a constructed A/B/C/D/X situation where A must move to C's slot (and, with A made old, where A is evicted instead) |
| `tb_shared_mix` | a synthetic four-thread shared-cache workload run through the elbow cache and through the same cache without relocation (see below) |

`tb_elbow_cache` runs 29 000 loads and stores at the default size. It checks them
against two independent references:

- A flat word memory. Every answer must carry the latest data, through fills,
  relocations and writebacks.
- A model of the replacement policy. Every access must hit or miss, fill an empty slot,
  relocate, be refused a relocation (by age or by the window) or write back exactly as
  predicted.

It also checks that a relocation writes the other bank in the same cycle as the fill,
and it checks the hit latency (1 cycle). While the next level does not stall, it checks
the miss latency (3 + writeback + fill latency). The phases use different address sets:

- a small working set;
- a set near capacity with stores;
- a conflict-heavy set;
- a large set that makes the allocation counter wrap;
- a phase with a randomly stalling next level.

Each mechanism is counted and must occur at least once. A typical run shows about 18 000
hits, 11 000 misses, 2 000 relocations, 1 000 refusals by age, 200 by the window,
3 700 writebacks and 3 counter wraps. `tb/l2_model.sv` is the behavioural next level: a
configurable fill latency and random ready stalls.

`tb_shared_mix` interleaves four synthetic threads. Each has its own page-aligned region
and 160 blocks, so 640 blocks compete for 512 frames. 80% of the accesses go to a hot
quarter of the blocks, and a quarter of the accesses are stores. The same stream runs
through two instances:

- the default cache;
- the cache with `MAX_RELOC = 0`, which is a CAT-timestamp skewed cache without
  relocation.

Both must return correct data. The elbow cache may never exceed 16 relocations in any 64
consecutive misses. On this stream the elbow cache misses on about 7.5% of accesses and
the plain skewed cache on 7.9%. About one miss in five relocates.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/elbow_pkg.sv tb/tb_elbow_cache.sv --top-module tb_elbow_cache -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. The full-size cache test finishes in well
under a second.

## Files

| File | Contents |
|---|---|
| `rtl/elbow_pkg.sv` | sizes, request/response/event structs, candidate enum |
| `rtl/elbow_cache.sv` | top level: controller, two way-banks, two timestamp arrays |
| `rtl/elbow_ctrl.sv` | access sequencing, miss handling, relocation, next-level handshakes |
| `rtl/skew_index.sv` | the two skewing functions |
| `rtl/alt_location.sv` | block address and alternate slot of a resident block |
| `rtl/cat_counter.sv`, `rtl/cat_distance.sv` | allocation clock and block age |
| `rtl/victim_select.sv` | four-candidate victim choice |
| `rtl/reloc_limiter.sv` | 16-in-64 relocation budget |
| `rtl/way_bank.sv`, `rtl/timestamp_array.sv` | storage |
| `tb/*.sv` | testbenches and the next-level model |
