# User-level DMA initiation without kernel changes

A DMA engine normally takes physical addresses, and only the operating system
may hand it physical addresses. Going through a system call costs thousands of
processor cycles, which on a fast network can exceed the transfer itself. The
engines here let an unprivileged process start a DMA with a few ordinary loads
and stores, under two conditions:

* **Protection.** A process can only name memory it is allowed to touch.
* **Atomicity.** If the scheduler preempts a process halfway through passing
  its arguments, another process must not be able to mix its own arguments
  with them.

No change to the operating system's context-switch code is needed for either.

All three engines rely on *shadow addressing*. When the operating system
allocates memory, it also maps a shadow copy of each page: virtual page
`shadow(v)` maps to physical page `shadow(p)`. In this RTL, `shadow(p)` is `p`
with the top address bit set. A load or store to a shadow address is never
performed as a memory access. It reaches the engine, which strips the shadow
bit and receives `p` as an argument. The MMU already checked the process's
right to touch `v`, so protection comes free. What remains is atomicity, and
each engine solves it in its own way:

| engine | module | how arguments of different processes are kept apart | accesses per DMA |
|---|---|---|---|
| repeated passing of arguments | `rpa_tc_slave` | each address is passed two or three times in a fixed pattern; an interleaved sequence does not match the pattern | 5 |
| key-based contexts | `key_dma_engine` | one register context per process, written only with the context's secret key | 4 |
| extended shadow addressing | `ext_shadow_dma` | the operating system puts a context id into the shadow physical address | 2 |

`uldma_top` places the three side by side. They share only clock and reset.

The repeated-passing engine is the most detailed part of the design. It is
written down to the register level: a TurboChannel slave with 12-bit address
registers, running at the 12.5 MHz bus clock. The other two engines are
specified by their behaviour only, so their internals here are this design's
own.

## Repeated passing of arguments

### The access sequence

A process that wants to copy from `src` to `dst` executes:

```
1: STORE size   TO   shadow(dst)
2: LOAD  status FROM shadow(src)   -- expect OK1, else go to 1
3: STORE size   TO   shadow(dst)
4: LOAD  status FROM shadow(src)   -- expect OK2, else go to 1
5: LOAD  status FROM shadow(dst)   -- expect OK3, else go to 1
```

A memory barrier is needed between the accesses, so that a write buffer
cannot merge or reorder them. The compiler must also be stopped from replacing
access 5 by a register copy. Between them, the five accesses pass the
destination three times and the source twice.

The engine starts a DMA only when it sees exactly STORE, LOAD, STORE, LOAD,
LOAD. Accesses 1, 3 and 5 must carry the same address, and accesses 2 and 4
must carry the same address. Any other access returns the engine to its idle
state.

The shorter patterns do not protect enough:

* **Three accesses (LOAD, STORE, LOAD).** A malicious process can complete a
  sequence that began with a victim's access, and copy its own data into the
  victim's destination.
* **Four accesses (STORE, LOAD, STORE, LOAD).** A process that can only read
  the source can finish the victim's sequence. The victim's own last load then
  reports failure for a DMA that did start.

The fifth access, a load from the destination, closes both holes. A process
that only reads the source cannot finish a sequence with it. A process that
does complete a sequence has passed both addresses itself.

Preemption still costs something. A preempted process sees a failed
initiation and retries, and sometimes it fails twice. The sequence below
shows why:

* Another process issues access 1 of its own sequence and is then preempted.
* The first process resumes with its access 5. The engine takes it as access
  2 of the other process's sequence and answers OK1, not OK3.
* The first process retries. Its STORE does not match DEST, so the engine
  returns to idle.
* The next LOAD then gets FAIL, and the first process retries once more.

The design accepts this, because no DMA ever starts with mixed arguments. In
`tb/rpa_roundrobin_tb.sv`, 2 to 4 processes are preempted round-robin. That
run gives about 1.1 failed initiations and 1.0 FAIL replies per context
switch.

Processes must not share the addresses they use for DMA. If they share data
and may both start DMAs on it, they must synchronize before starting.

### FSM (`rpa_fsm`)

The FSM has five states, S0 to S4. S0 is the reset state. It moves only when
a TurboChannel transaction arrives (`firstsel`) and holds its state between
transactions. Replies to loads are 12-bit values: FAIL = 000h, OK1 = 001h,
OK2 = 002h, OK3 = 003h.

| state | access | next | reply to a load | side effect |
|---|---|---|---|---|
| S0 | store | S1 | – | DEST ← address |
| S0 | load | S0 | FAIL | |
| S1 | load | S2 | OK1 | SOURCE ← address |
| S1 | store | S0 | – | |
| S2 | store, address = DEST | S3 | – | |
| S2 | anything else | S0 | FAIL if load | |
| S3 | load, address = SOURCE | S4 | OK2 | |
| S3 | anything else | S0 | FAIL if load | |
| S4 | load, address = DEST | S0 | OK3 | `dma_start` pulse |
| S4 | anything else | S0 | FAIL if load | |

A store in S1 returns to S0 and does not reload DEST. The next store then
begins a new sequence.

The FSM also drives `ds_sel`, which picks the operand that the *next*
transaction's address is compared with. It is 1 (SOURCE) only in S3, before
access 4, and 0 (DEST) otherwise.

### Datapath (`rpa_datapath`)

The datapath has these parts:

* An input register on the 12 address lines.
* An address register, loaded in the `fsel` cycle. It captures the address
  present when SEL_ was first seen low.
* SOURCE and DEST registers, loaded from the address register by `src_ld` and
  `dst_ld`.
* A 2:1 multiplexer (input 1 = SOURCE, input 0 = DEST) and a 12-bit equality
  comparator. The comparator output `equal` goes to the FSM.

Only address lines AD[22:11] are used. The engine therefore recognises shadow
addresses, and checks them against each other, at 2 KB granularity. Two
addresses that differ only below bit 11 count as equal.

### Bus timing (`tc_txn_timing`, `rpa_tc_slave`)

The host holds SEL_ low, together with RW_ (1 = load) and the address, until
the slave pulses RDY_ low for one cycle. The host then raises SEL_. Cycle
numbers are counted from the first clock edge that samples SEL_ low (edge 0):

| after edge | what happens |
|---|---|
| 0 | address sampled into the input register; `fsel` = 1 (SEL_ was high before this edge, low at it) |
| 1 | address register holds the transaction's address; `equal` settles |
| 2 | `firstsel` = 1 (two registers after `fsel`) |
| 3 | FSM has stepped; RDY_ = 0; for a load, `ad_oe` = 1 and STATUS on AD[22:11]; `src_ld`/`dst_ld`/`dma_start` pulse |

An access therefore takes 5 bus cycles once the host releases SEL_, and the
five-access sequence takes 25 cycles, or 2.0 µs at 12.5 MHz. Processor time
and memory barriers come on top of that: on the original DEC Alpha 3000/300
host, a whole initiation took about 4.6 µs. A kernel-level initiation took
about 25 µs.

The RTL models the bidirectional AD bus as three ports: `ad_in`, `ad_out` and
the drive enable `ad_oe`. At the board level, `ad_oe` controls the tri-state
buffer on AD[22:11].

On OK3, `dma_start` pulses while `dma_src` and `dma_dst` hold the 12-bit
SOURCE and DEST. The engine performs no data transfer itself. A data mover
would connect to these signals.

## Key-based contexts (`key_dma_engine`)

The engine has `NCTX` = 4 register contexts, each with source, destination and
size. The operating system gives each DMA-capable process one context, mapped
in a page of its own, together with a secret key. The key is 62 bits wide at
the defaults: a 64-bit data word minus 2 bits of context id. A process starts
a DMA with:

```
STORE key#ctx TO shadow(src)     -- first accepted shadow store: source
STORE key#ctx TO shadow(dst)     -- second: destination
STORE size    TO context page
LOAD  status  FROM context page  -- starts the DMA
```

A shadow store is accepted only if its key matches the key stored for
context `ctx`; a store with a wrong key is ignored. A load from the context
page returns one of three things:

* the size, when the load starts the DMA;
* the bytes still to move, while the transfer runs;
* 0 when the transfer is complete, or −1 (all ones) when an address is
  missing or the size is zero.

The engine sees three address regions:

| address | region | meaning |
|---|---|---|
| bit 63 = 1 | shadow | physical address = address with bit 63 cleared; data = {key, ctx} |
| bit 63 = 0, bit 62 = 1 | key pages | mapped only by the operating system. A store sets the key of context `addr[14:13]`. Keys cannot be read back (a load returns 0). |
| otherwise | context pages | context `addr[14:13]` (8 KB pages) |

A started context becomes *pending*. Fixed priority (lowest context first)
hands pending contexts to an external data mover over a valid/ready request.
The mover reports progress as `(ctx, bytes)` on `mv_done_*`, and the context
counts those bytes down to completion.

Security depends on the key: a process that guesses it can fill another
process's context. At 62 bits, guessing is impractical.

Because the arguments travel in stores, a process needs write access to its
source buffer.

## Extended shadow addressing (`ext_shadow_dma`)

The operating system reserves `CID_W` high bits of every shadow physical
address for the process's context id. With the default `CID_W` = 1, the
layout is:

```
bit 63       shadow bit
bit 62       context id
bits 61..0   physical address
```

Two accesses start a DMA:

```
STORE size   TO   shadow(dst)   -- destination and size into context cid
LOAD  status FROM shadow(src)   -- source into context cid, start, OK (1) / FAIL (0)
```

The engine files every argument under the context id carried in its address.
Arguments of different processes therefore never mix, whatever the
interleaving. A load returns FAIL in three cases:

* no destination was passed since that context's last start;
* the context's previous request has not yet been accepted by the data mover;
* the access has no shadow bit.

With `CID_W` = 1, two processes can use this engine at a time; any others
must go through the kernel. Set `CID_W` = 2 for four processes.

A store to a context whose DMA still waits for the data mover is ignored, so
a queued request cannot be altered.

Setting `CONTEXTS` = 0 gives the variant without register contexts. It keeps a
single register set and treats the accesses as STORE/LOAD pairs: a load
starts the DMA only if it carries the same context id as the store just
before it, and any load ends the pair. If another process's store falls
between the two, the load returns FAIL and the process retries.

## Top level (`uldma_top`)

The top-level ports fall into three groups:

* `tc_*`: the TurboChannel slave.
* `key_*`: bus, data-mover request and progress of the key-based engine.
* `xs_*`: bus and data-mover request of the extended-shadow engine.

Both context engines use the same bus handshake:

* `req_valid` marks an access, with `req_write`, `req_addr` and `req_wdata`.
  One access per cycle is allowed.
* A load is answered in the next cycle by `rsp_valid` and `rsp_rdata`.

Shared constants and enums are in `rtl/uldma_pkg.sv`. All registers use a
synchronous, active-low reset (`rst_n`).

## Where this RTL goes beyond the published design

The following are this design's own choices:

* The reset input. The original design only states that the FSM starts in S0.
* The split of the AD bus into `ad_in`, `ad_out` and `ad_oe`, and the choice
  to return STATUS on the same lines AD[22:11] that carry the address.
* The gate polarities of the edge detector and of the RDY_/STAT_SEL logic.
  The register chain follows the original schematic: a SEL_ delay register,
  FSEL, two registers to FIRSTSEL, then RDY_ and STAT_SEL. The schematic's
  description can also be read as FIRSTSEL one cycle after FSEL; with that
  reading an access would take 4 bus cycles instead of 5.
* Everything inside `key_dma_engine` and `ext_shadow_dma` beyond the access
  sequences and replies described above. This covers the bus handshake, the
  address map of the key and context pages, the order in which the two
  addresses are taken, ignoring stores with a wrong key, the status codes of
  the extended-shadow engine, the data-mover interface and the priority
  among contexts.

The following are not included:

* The data mover that moves the bytes.
* The operating-system side: shadow mappings, key handout and the assignment
  of context ids.

## Testbenches

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| testbench | what it checks |
|---|---|
| `tc_txn_timing_tb` | RDY_ four edges after SEL_ is driven low; FSEL and RDY_ each last one cycle; FIRSTSEL two cycles after FSEL; STAT_SEL only on loads |
| `rpa_datapath_tb` | address capture at FSEL; SOURCE/DEST loading; EQUAL against a recorded SOURCE/DEST |
| `rpa_fsm_tb` | every transition in the table above; 3,000 random transactions against a position-counting reference |
| `rpa_tc_slave_tb` | bus-level sequences: the legitimate one, a reader-only attacker, the two-process preemption trace (OK1/FAIL where predicted), 1,000 initiations |
| `rpa_roundrobin_tb` | 2, 3 and 4 processes preempted round-robin: every start matches an OK3 of its own process; failures per switch |
| `key_dma_engine_tb` | keys, wrong keys, −1/size/bytes-left/0 replies, interleaved processes, data-mover requests; 100 random rounds of four interleaved processes plus wrong-key stores from an attacker |
| `ext_shadow_dma_tb` | OK/FAIL replies; 200 random interleavings of two contexts; the `CONTEXTS` = 0 variant with matching and mixed pairs |
| `uldma_top_tb` | all three engines at default sizes, 1,000 initiations each; counts that every mechanism (OK1, OK2, OK3, FAIL, sequence break, mismatch, key accept/reject, −1, bytes left, done, busy mover, extended-shadow OK/FAIL/interleave) happened |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module uldma_top_tb \
    -Irtl -y rtl -y tb +libext+.sv rtl/uldma_pkg.sv tb/uldma_top_tb.sv
./obj_dir/Vuldma_top_tb
```

Replace `uldma_top_tb` with any other testbench name. Every testbench runs in
well under a second.

To lint a module:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/uldma_pkg.sv rtl/<module>.sv
```
