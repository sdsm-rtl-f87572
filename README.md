# SDSM: secure directory-based shared memory in SystemVerilog

Many secure cores share memory through an untrusted interconnect. Every cache
block that leaves a core must be encrypted, and every block that arrives must be
decrypted. With counter-mode encryption, the slow part is computing the
keystream block (KB): several AES runs, tens of cycles. If that runs after the
block has been requested, the latency adds to every coherence miss.

This design keeps the KB work off the miss path. It combines three ideas:

* **Senders pre-compute.** The KBs a sender will use are computed before
  anyone asks for a block. This works because a KB does not depend on the block
  address: it depends only on a *seed* and the process key.
* **The directory hands out the seeds.** A trusted coherence manager (TCM) is a
  directory with extra duties. It gives every sender a small stock of unique
  seeds and remembers which seeds each sender holds.
* **The seed beats the data.** When a miss reaches the TCM, it sends the
  owner's oldest seed straight to the requestor and forwards the request to the
  owner. The seed arrives one network latency before the data, so the
  requestor's KB is ready when the ciphertext lands.

Each core holds a fixed amount of state: 10 outstanding KBs and one incoming
KB, whatever the number of cores.

## Keystream blocks and seeds

A 64-byte block is XORed with a 512-bit KB:

```
P   = {1'b0, 64'(VA)}   if S == 0   (initial image, address-based)
      {1'b1, S}         otherwise   (address-independent)
P_i = {59'b0, P, 4'(i)}              i = 0..3, one 128-bit AES input each
KB  = AES_k(P_0) || AES_k(P_1) || AES_k(P_2) || AES_k(P_3)   (R_0 in bits 511:384)
```

`k` is the key of the secure process that owns the data. Seed 0 is reserved for
the image as first loaded. That image is encrypted per address, so it needs no
seed bookkeeping. Every later encryption uses a seed from a TCM counter, and the
counter never hands out the same value twice for a process. So no (key, seed)
pair is ever used on two different plaintexts. The end-to-end testbench
checks this on every data message it sees on the interconnect.

Seeds are 64 bits. The top 8 bits hold the issuing TCM's id, so TCMs never
collide and a core can tell which TCM issued a seed. Each per-process counter
starts at 1 and stops rather than wrap (`exhausted`).

`sdsm_kb_gen` runs the four AES blocks one after another on one iterative
AES-128 core (`sdsm_aes128`: one round per cycle, round keys made on the fly,
11 cycles per block). A KB therefore takes 49 cycles from `start` to `done`.
The budget the design assumes is 80 cycles, against a 100-cycle network.

## What happens on a miss

Cores are endpoints `0..N_CORES-1` and TCMs are endpoints `N_CORES+t`. Block `a`
has TCM `a % N_TCM` as its home. Initially, core `a % N_CORES` owns it with
write permission.

1. **Requestor → TCM: `REQ_RD` / `REQ_WR`.** The requestor's cache missed. It
   holds one incoming-KB entry.
2. **TCM.** It pops the owner's oldest outstanding seed for that process and
   sends it to the requestor (`SEED_TO_REQ`). It forwards the request to the
   owner with the same seed (`FWD`). For a write, it then invalidates every
   other sharer (`INV`) and makes the requestor the owner. For a read, the
   requestor becomes a sharer and the owner is downgraded. A write by a core
   that already shares the block and is the owner gets `UPG_ACK` and moves no
   data.
3. **Requestor.** On `SEED_TO_REQ` it starts its incoming KB generator.
4. **Owner (sender).** It finds the pre-computed KB with the forwarded seed
   in its outstanding-KB cache. If the block is in its cache, it XORs and
   sends at once. If not, it loads the block from its encrypted private memory
   and decrypts it with that block's stored seed, using its second KB
   generator. It then re-encrypts with the pre-computed KB and sends `DATA`.
5. **Requestor.** `DATA` arrives carrying the seed. If it matches the seed
   announced in step 3, the KB is normally ready already (counted as
   `kb_hidden`; `kb_late` if it was still computing). The block is decrypted,
   stored in the cache, and stored in private memory still encrypted, together
   with its seed. The memory stays inclusive, so a later forward can be served
   from memory.

With a 100-cycle network, the test at 4 cores measures read-miss latencies of
about 313 cycles when the owner has the block cached and 363 when it reads it
from memory. Neither path waits for a KB computation at the requestor.

**Empty seed stock.** A sender may hold no outstanding seed for the process. The
TCM then takes a fresh seed from its counter and marks the forward with
`flag`. The owner computes the KB on demand, and that miss costs one KB time
more (about 412 cycles in the test).

## Keeping the seed stock full

Each node has a *process monitor*. It keeps a saturating score per secure
process. The score rises each time the core serves a request for that
process, and all scores halve every `DECAY_PERIOD` cycles. When the KB cache
has room, the node asks for a seed (`SEED_REQ`) for the enabled process with
the largest `(score+1)/(held+1)`. Here `held` counts the KBs the process has
or has asked for. Seed requests go to the TCMs in turn. The TCM records the
seed in that sender's queue (10 deep per process) and answers `SEED_GRANT`.
The node's outstanding-KB generator then fills the entry. Processes a core
does not run get nothing.

## Dirty evictions

A modified block leaving the cache is written to private memory. It is
re-encrypted with an outstanding KB of its process, taken from the cache.
That seed is also still in the TCM's queue for this sender, so the TCM could
hand it to a requestor, and the same KB would then encrypt two blocks. To
prevent this, the node first sends `SEED_USED` to the TCM that issued the seed.
The TCM removes the seed from the queue and answers `USED_ACK`. Only then does
the node write the block back. If the TCM has just given that seed away (ack
refused), the node serves the forward and retries with another KB. If no KB is
held for the process, the node first asks for one.

## Three virtual networks

Messages travel on three separate in-order channels. Each is an
`sdsm_network` instance with the same latency:

* **A, requests:** core to TCM. Carries `REQ_RD`, `REQ_WR`, `SEED_REQ` and
  `SEED_USED`.
* **B, control:** TCM to core. Carries `SEED_GRANT`, `USED_ACK`, `FWD`, `INV`
  and `UPG_ACK`.
* **D, data:** core to core `DATA`, plus the TCM's `SEED_TO_REQ`.

With a single shared channel, the system deadlocks under load. The channel
fills with seed requests bound for the TCM. The TCM then cannot send its
grants, so it stops taking requests, and nothing moves.

With the split, every dependency points one way. A node always takes `DATA`
and `SEED_TO_REQ`. It takes a control message only when its DATA queue has
room, since a `FWD` produces one `DATA`. It starts a core operation only when
its request queue has room. So D always drains, which lets B drain, which
lets A drain.

`SEED_TO_REQ` goes on D because D is in order. The TCM injects it before it
sends the forward, so it always reaches the requestor ahead of the `DATA`
answering the same miss.

## Blocks

| module | role |
|---|---|
| `sdsm_pkg` | types, message format, cipher-input layout, AES helper functions (S-box computed at elaboration) |
| `sdsm_aes128` | iterative AES-128, 11 cycles per block |
| `sdsm_kb_gen` | one 512-bit KB from seed/address and key, 49 cycles |
| `sdsm_kb_cache` | outstanding-KB cache: seed, process, state, reservation per entry |
| `sdsm_proc_monitor` | chooses the process for the next pre-computed KB |
| `sdsm_seed_counter` | per-process seed counters of one TCM |
| `sdsm_seed_store` | per-(core, process) FIFO of outstanding seeds, with removal by value |
| `sdsm_fifo` | small FIFO used for message queues |
| `sdsm_tcm` | directory, seed management and forwarding |
| `sdsm_node` | trusted area of one core: keys, cache, encrypted memory, both KB generators, protocol engine |
| `sdsm_network` | untrusted interconnect channel: one shared in-order pipeline, `LATENCY` stages, round-robin admission |
| `sdsm_top` | `N_CORES` nodes, `N_TCM` TCMs, three network instances |

The top's ports are the setup buses (keys, process enables, initial image)
and one request port per core (`cpu_valid/ready/op/pid/addr/wdata`,
`cpu_done/rdata`). The cores themselves are not part of the design: each
port takes whole-block reads, writes and evictions, one at a time.
Per-core and per-TCM event pulses are brought out for measurement.

## Parameters (`sdsm_top`)

| parameter | default | meaning |
|---|---|---|
| `N_CORES` | 256 | secure cores |
| `N_TCM` | 1 | TCMs; blocks are interleaved over them |
| `N_PROC` | 4 | secure processes (keys) per core |
| `BLOCKS` | 32 | 64-byte blocks of shared memory |
| `KB_ENTRIES` | 10 | outstanding KBs per core |
| `SEED_DEPTH` | 10 | outstanding seeds kept per (core, process) at the TCM |
| `NET_LATENCY` | 100 | interconnect latency in cycles |

The 100-cycle latency, 10 outstanding KBs and 8-byte seeds are the published
operating point. 256 cores is one of the evaluated sizes. The process count,
memory size and block size are this design's choices.

## Where this design departs from, or goes beyond, the scheme

* **No integrity protection.** The scheme protects messages with a delayed
  timestamped MAC (a keyed hash), and data with GHASH as in GCM. Neither is
  built here, because their formats are not defined well enough. Encryption is
  plain counter mode. An active attacker who modifies messages is therefore not
  detected.
* **Directory simplifications.** There are no transient states. The design
  assumes one transaction per block at a time. Invalidations are not
  acknowledged, and an `INV` (control network) is not ordered against a
  `DATA` (data network). Core operations touching the same block must
  therefore not overlap. The system testbenches issue core operations one at
  a time; only the seed refill traffic runs concurrently with them. A read is always forwarded to the owner,
  which is the last writer and always keeps a copy. Real MESI with E and
  clean/dirty distinctions is reduced to I/S/M.
* **Seed withdrawal** (`SEED_USED`/`USED_ACK`) on dirty eviction is this
  design's own mechanism. It ensures that an outstanding KB spent on an
  eviction is never also given to a requestor.
* **Storage sizes** are flip-flop arrays. The TCM seed store is
  `N_CORES*N_PROC*SEED_DEPTH` 64-bit entries, not a shared cache.
* **The interconnect** is a model of "some untrusted medium with 100-cycle
  latency", not a network design. The split into three virtual networks is
  this design's own choice, made to avoid deadlock.
* **Memory latency** is not modelled. Reading private memory costs one KB
  computation, to decrypt.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_sdsm_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/sdsm_pkg.sv tb/sdsm_ref_pkg.sv tb/tb_sdsm_top.sv
obj_dir/Vtb_sdsm_top
```

* `tb/sdsm_ref_pkg.sv` is an independent byte-wise AES and KB model. All
  expected values come from it.
* `tb_sdsm_<block>` test the blocks one by one. Their cycle checks include
  11 cycles per AES block and 49 per KB.
* `tb_sdsm_top` runs 4 cores, 2 TCMs and 16 blocks at 100-cycle latency.
  It performs a directed sequence that triggers every path: sender cache hit
  and miss, invalidation, upgrade, dirty eviction, on-demand KB. It follows
  with random traffic and a final read-back against a reference memory. A
  monitor on the interconnect checks seed uniqueness and that no plaintext
  block ever appears on it. Each mechanism's event count must be non-zero.
  A refused seed withdrawal and a late or mismatched incoming KB do not occur
  at this latency. `tb_sdsm_node` drives those paths directly.
* `tb_sdsm_top32` runs the same body with 32 cores and every other
  parameter at its default (1 TCM, 32 blocks, 100-cycle latency). This is
  the largest system simulated. Its measured miss latencies are the same as
  at 4 cores, with no late KB, while 375 seed requests go to one TCM.
  The 256-core default builds very slowly in Verilator: each core is a
  distinct module, because its `NODE_ID` parameter differs, so the generated
  C++ grows with the core count.
