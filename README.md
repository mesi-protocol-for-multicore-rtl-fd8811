# Dual-processor MESI cache coherence

Two processors (called MIPS1 and MIPS2 here) each have a small private
direct-mapped cache and share one main memory. When both caches may hold the
same memory line, a store by one processor must not leave a stale copy in the
other. This RTL keeps the caches coherent with the **MESI** protocol. Each
cached line is Modified, Exclusive, Shared or Invalid. A single on-chip
**cache coherency controller** sees every load and store. It has two parts:

* a **coherency tag** that holds its own copy of every cache line's tag and
  MESI state, for both caches;
* an **FSM** (`coherence_controller`) that serves one request at a time and
  updates the caches, the coherency tag and the memory.

A **bus controller** (`bus_controller`) decides which processor is served
when both ask at the same time.

The processors themselves are not part of this RTL. Their load/store signals
are ports of the top module `mesi_dual_core`, and the testbenches drive them
with processor models.

## Sizes and address split

| item | value |
|---|---|
| address | 32-bit byte address, word accesses only |
| cache | direct mapped, 4 sets, 1 line per set, 4 × 32-bit words per line |
| tag | 26 bits = `addr[31:6]`; index `addr[5:4]`; word `addr[3:2]` |
| per line in the cache | data, tag, valid bit, dirty bit |
| per line in the coherency tag | 7-bit MESI code and 26-bit tag, for each cache |
| main memory | 32 × 32-bit words = 8 lines; line number `addr[6:4]` |

The memory decodes only `addr[6:2]`, so addresses at or above 128 bytes wrap
around. The tag still compares all 26 upper bits. Software should therefore
keep to the first 128 bytes, or accept the aliasing.

The four sets per cache (eight over both caches) and the 26-bit tag fit
together exactly: 26 + 2 + 2 + 2 = 32. `SETS_P`, `LINE_WORDS_P` and
`MEM_WORDS_P` are parameters. The tag width follows from them. The protocol
logic is written for exactly two processors.

## The 7-bit coherency code

The coherency tag does not store a 2-bit MESI state per line. Instead it
stores a 7-bit code made of four fields. Each field says *which* processor it
concerns:

```
 bit  6..5   4..3   2    1..0
      M      E      S    I
 M: 00 not modified   01 modified in MIPS1    10 modified in MIPS2
 E: 00 not exclusive  01 exclusive in MIPS1   10 exclusive in MIPS2
 S: 0  not shared     1  shared
 I: 00 valid          01 not valid in MIPS1   10 not valid in MIPS2
```

Each cache has its own array of codes (MESI1 and MESI2, one entry per set).
A cache's state is written into its code as follows
(`mesi_pkg::encode_code`):

| state | code for a MIPS1 line | code for a MIPS2 line |
|---|---|---|
| M | `01 00 0 00` | `10 00 0 00` |
| E | `00 01 0 00` | `00 10 0 00` |
| S | `00 00 1 00` | `00 00 1 00` |
| I | `00 00 0 01` | `00 00 0 10` |

Reading a code back (`decode_code`) checks the I field first, then M, then
E, then S. A code with no field set counts as invalid. Two examples:

* A MIPS1 line held Exclusive shows `0001000` on `outmesi[0]`. A load hit
  ("direct read") leaves it unchanged.
* A store hit on that line ("direct write") makes the code `0100000`: M=01,
  E=00.

The field layout and values are fixed by the protocol description. The choice
of which fields are written for each state is this design's own.

## Protocol

`mesi_next_state` is the per-line transition function. The controller uses
three copies of it:

* the requester's line, for processor load and store;
* the line being replaced, for eviction;
* the other cache's line, which snoops the request as BusRd (load) or BusRdX
  (store).

| state | load | store | eviction | snooped read | snooped write |
|---|---|---|---|---|---|
| M | hit | hit | write back, → I | send data, write back, → S | send data, → I |
| E | hit | → M, no bus message | silent, → I | send data, → S | send data, → I |
| S | hit | → M, invalidate other copy | silent, → I | none | → I |
| I | miss: → E, or → S if the other cache has the line | → M (BusRdX) | none | none | none |

Two choices in this table are worth knowing:

* On a snooped write, a Modified line is handed to the requester, which
  takes it in M. Memory is **not** updated then.
* An Exclusive line is clean, so on a snooped read it only sends data and
  does no write-back.

## How a request is served

The controller handles one request from start to finish before it accepts the
next. Its copy of both caches' tags means that "snooping" is simply a lookup
in the coherency tag. States of `coherence_controller`:

| state | what happens |
|---|---|
| IDLE | Wait for a grant, then latch the processor, address, load/store and data. |
| LOOKUP | **Load hit**: answer. **Store hit in M or E**: write the word, set M. **Store hit in S**: write the word, set M, invalidate the other cache's copy. **Miss**: go to WB if the line in that set is Modified, otherwise to SNOOP. A clean line there is simply overwritten. |
| WB | Write the modified victim line to memory. |
| SNOOP | Apply BusRd or BusRdX to the other cache. From M or E it supplies the line (cache to cache). From M on a read it also writes the line back and clears its dirty bit. It goes to S (read) or I (write). |
| MEMRD | Read the line from memory. This state is skipped if the other cache supplied the line. |
| FILL | Write the line into the requester's cache. For a store, the new word is merged in and the line is dirty. Set the new state: E, or S if the other cache has a copy, or M for a store. Answer the processor. |

Latency, in clock edges after the edge that accepts the request:

| case | cycles |
|---|---|
| load or store hit (including the S → M upgrade) | 1 |
| miss, line supplied by the other cache | 3 |
| miss, line read from memory | 4 |
| extra, when a Modified victim must be written back | +1 |

Waiting for the bus comes on top of these numbers.

### The S → M conflict

Suppose both caches hold a line in S and both processors store to it in the
same cycle. Only one gets the bus. The winner upgrades its copy to M and
invalidates the loser's copy. The loser's store was issued against an S line
but finds the line Invalid when it is granted. It then completes as a store
miss (I → M): it fetches the winner's modified line cache to cache and merges
its own word. This is the "conflict" edge of the transient-state view of
MESI. The controller detects it by remembering, per processor, that a waiting
store saw its line in S (`events.conflict`).

## Blocks and files

| file | block |
|---|---|
| `rtl/mesi_pkg.sv` | sizes, `mesi_state_e`, `mesi_event_e`, `mesi_code_t`, `ctrl_events_t`, encode/decode |
| `rtl/mesi_next_state.sv` | MESI transition function (combinational) |
| `rtl/cache_mem.sv` | one private cache: data, tag, valid, dirty; combinational lookup; word write, fill, invalidate, clean |
| `rtl/coherency_tag.sv` | MESI1/MESI2 codes and TAG1/TAG2 tags, lookups for both processors, hit signals |
| `rtl/bus_controller.sv` | round-robin arbiter with the bus locked until `done` |
| `rtl/main_memory.sv` | 32-word shared memory with a line-wide port and 1-cycle read latency |
| `rtl/coherence_controller.sv` | the FSM described above |
| `rtl/mesi_dual_core.sv` | top: wires everything together |

## Top-level interface (`mesi_dual_core`)

Index 0 is MIPS1 and index 1 is MIPS2.

* **Requests.** `p_rd[p]` or `p_wr[p]` is the request; `p_addr[p]` and
  `p_wdata[p]` go with it. Hold all of them until `p_ack[p]` is seen high at
  a rising edge. `rdata` is valid in that cycle. Drop the request after the
  ack, or keep it up to issue the next one.
* **Observation.** `mphit[p][c]` is 1 when processor p's address is present
  in cache c (mp1hit1, mp1hit2, mp2hit1, mp2hit2). `outmesi[c]` is cache c's
  7-bit code at its own processor's address.
* **Events.** `events` carries one pulse per mechanism: direct read, direct
  write, upgrade, fill in E, fill in S, store miss, write-back, silent
  eviction, flush, cache-to-cache transfer, invalidation and conflict. `busy`
  is high while a request is being served.
* **Reset.** `rst` is synchronous and active high. It invalidates every line
  and clears the memory.
* **Assertions.** The top asserts that no line is ever M or E in one cache
  while it is valid in the other. The bus controller asserts that its grant
  is one-hot.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mesi_pkg.sv \
    tb/tb_mesi_dual_core.sv --top-module tb_mesi_dual_core
./obj_dir/Vtb_mesi_dual_core
```

| testbench | what it checks |
|---|---|
| `tb_mesi_next_state` | every (state, event, shared) combination against a written-out table; the code values |
| `tb_cache_mem`, `tb_coherency_tag`, `tb_main_memory` | random traffic against reference models |
| `tb_bus_controller` | immediate grant, lock until done, round robin, one-hot grant |
| `tb_coherence_controller` | directed sequence through every transition, with data, both codes, events and exact latency. It includes the direct-read and direct-write cases and a store collision. |
| `tb_mesi_paper_cases` | through the top's ports: direct read of an Exclusive MIPS1 line, with the hit signals and codes; then direct write (E → M); neither touches memory |
| `tb_mesi_dual_core` | default sizes, 2 × 4000 random loads and stores against a sequentially consistent reference memory. Checks cache bits against the coherency codes in every set, and hit/miss latency. Counts each mechanism and fails if one never occurred. Runs in well under a second. |

## Limits and departures

* **Cache size.** The prose describes each cache as having eight sets. The
  coherency-tag layout shows indices 00–11 per cache, and the 26-bit tag only
  fits four sets. This RTL uses four sets per cache. Set `SETS_P = 8` for
  eight; the tag then becomes 25 bits.
* **Serialised requests.** Requests are handled one at a time in grant order,
  so a hit also waits for a miss in progress on the other processor.
* **State encoding.** The 7-bit code is stored alongside each cache's own
  valid/dirty bits, and the controller keeps the two consistent. The
  end-to-end testbench checks that they agree.
* **Address range.** Addresses wrap above 128 bytes, as described above.
* **Not included.** The processors are absent, and so are any FPGA-specific
  parts.
