# I²SEMS security fabric in SystemVerilog

Shared-memory multiprocessors send cache blocks over an interconnect and to
memory. Anyone who can probe those wires can read or change the data. This RTL
encrypts and authenticates every data block that leaves a processor. It works
on any interconnect (bus, switched network, out-of-order delivery) and with
any cache-coherence protocol, and it adds almost no latency.

The scheme is AES in counter mode with a GCM tag (Galois/Counter Mode). The
AES work is done before the data exists, so encrypting or decrypting a block
is a single XOR. To make that work:

* **Each message carries its own counter.** A receiver never has to guess
  another processor's counter. It reads the counter from the message.
* **One Global Counter Controller (GCC) hands out all counters**, in blocks
  of `CR` consecutive counters. This makes counters unique across the
  system. They also stay nearly contiguous, which makes them easy to predict.
* **Each processor precomputes keystreams in three stores:**
  * The **keystream queue** holds fresh counters for encryption.
  * The **keystream cache** remembers counters it may reuse.
  * The **keystream pool** holds keystreams it expects to need for
    decryption.

The design follows the I²SEMS architecture as published. This README marks
the choices that are this implementation's own.

## What a keystream is, and what travels on the wire

A cache block is 32 bytes, and counters are 64 bits. For a counter `c` the
unit runs AES-128 with the shared secret key `K` on three 128-bit inputs:

| AES input (64-bit prefix ‖ counter) | use |
|---|---|
| `0…00 ‖ c` | MAC pad, XORed onto the final GHASH value |
| `0…01 ‖ c` | pad for data bytes 0–15 (`data[127:0]`) |
| `0…11 ‖ c` | pad for data bytes 16–31 (`data[255:128]`) |

These three 128-bit pads make up one **keystream** (`keystream_t`, 384
bits). The hash key is `H = AES_K(0^128)`. The GCC starts counting at 1, so
no message counter can reproduce the input that gives `H`.

A message is `{dest, addr, ciphertext, tag, cnt}` (`msg_t`). The counter is
sent in clear. Knowing it does not help an attacker who lacks `K`. The tag is
the GCM chain over the address and the two ciphertext halves:

```
X1 = H·A      X2 = H·(X1 ⊕ C1)      X3 = H·(X2 ⊕ C2)      tag = X3 ⊕ AES_K(0…00‖c)
```

Here `·` is multiplication in GF(2^128) with GCM bit order (`gf128_mul`).
The address is zero-extended to 128 bits. `gcm_tag` registers each multiply
and each XOR, so a tag takes **six cycles**. The XORs that turn plaintext into
ciphertext happen at the same time as the first multiply.

## Where keystreams come from

### Encryption: keystream queue and keystream cache

The system cache offers a block together with its coherence state
(`tx_req_t`).

* **Modified or Exclusive:** the data may be new, so the unit pops a fresh
  `{counter, keystream}` from the **keystream queue**. It also writes that
  pair into the **keystream cache** under the block's address.
* **Owned:** the data has not changed since this processor last sent it. The
  keystream cache is searched by address. On a hit, the same counter and
  keystream are used again. This is safe because the plaintext is the same,
  and it saves counters. On a miss, the unit pops a fresh counter.
* **Shared and Invalid** blocks are also given fresh counters. This is the
  safe choice (own choice).

The queue tracks how many counters it *owns*: keystreams already stored,
plus counters assigned but not yet generated. When that number drops below
the **counter reserve** `CR`, it asks the GCC for a block of `CR` counters.
It never has more than one request outstanding. A refill arrives only when
fewer than `CR` counters are owned, so the queue never holds more than
`2·CR` entries.

`CR` is chosen so that a refill arrives before the queue runs dry. With
link bandwidth `B`, block size `M`, GCC round trip `R` and AES latency `O`,
the condition is `CR ≥ B/M·(R+O)`. The reference numbers are `B` = 3.2 GB/s,
`M` = 32 B and `O` = 80 ns, and they give `CR` = 32. If the queue is empty
anyway, the encryption path stalls until the refill's first keystream is
ready.

### Decryption: keystream pool, broadcast and prediction

When a message arrives, two things start in the same cycle:

1. The **keystream pool** is looked up with the message's counter. The pool
   is set-associative, indexed by the low counter bits, and gives its result
   one cycle later.
2. The pool-side keystream generator starts a **prediction** job for the counters
   `c, c+1, …, c+p−1`, where `p = PRED_DEPTH = 5`.

On a pool hit (a *keystream hit*) the block is decrypted right away. On a
miss, the unit waits for the generator to deliver the keystream of `c`
itself, which takes about one AES latency. The other `p−1` keystreams go into
the pool, where later messages from the same sender are likely to find them.

The pool is also filled by **broadcast**. Each time the GCC assigns a block
of counters to one processor, it sends that block's first counter to every
other processor. They precompute those keystreams, because messages carrying
those counters will soon arrive. A broadcast may arrive late on an
out-of-order network. A unit drops any broadcast whose first counter is not
above the newest broadcast it has accepted, so an old assignment cannot be
replayed into it.

The plaintext is released as soon as the XOR is done. The tag is checked six
cycles later, and `auth_fail` is raised if it does not match. The alert is
deliberately late, to keep authentication off the load path.

## The keystream generators (the part to understand first)

Each processor has two keystream generators (`keystream_gen`), each built
around its own fully pipelined AES-128 engine (`aes128_pipe`). One fills the
keystream queue with this processor's own counters. The other serves
decryption and fills the pool. For each engine:

* The engine does one round per stage. A delay line brings its latency to
  80 cycles, which is the reference 80 ns at 1 GHz.
* Blocks are issued one every `AES_II` = 5 cycles, which models the
  reference AES throughput of 3.2 GB/s (16 bytes per 5 ns).
* One counter needs three AES blocks, so a keystream comes out every 15
  cycles. The three results of one counter are put back together by a tag
  that travels with each block.

A generator serves three kinds of job, each a run of consecutive counters:

| job | source | counters | destination |
|---|---|---|---|
| rx | arriving message | `c … c+p−1` | the first to the waiting decryption, the rest to the pool |
| q | GCC reply | `base … base+CR−1` | keystream queue |
| bc | GCC broadcast | `base … base+CR−1` | keystream pool |

The queue-side generator gets only q jobs. The pool-side generator gets rx
and bc jobs. Whenever a generator is about to issue a counter, it takes it
from the highest-priority job that has work left, in the order rx, q, bc. A
waiting decryption therefore never sits behind a 32-counter broadcast. A new
broadcast replaces the unfinished rest of the previous one. Both of these
are this implementation's choices. The first thing each generator does
after reset is compute `H`. The encryption and decryption paths accept
nothing until both generators know it.

**Throughput caveat.** With the MAC pad counted, a keystream is 48 bytes of
AES output. At 3.2 GB/s of AES throughput that is one keystream per 15 ns.
The interconnect delivers one 32-byte block per 10 ns. A processor that
sends fresh-counter blocks back to back at full link rate therefore drains
its queue and stalls once the reserve is used up. On the receive side, the
prediction and broadcast jobs share the pool-side engine. A faster engine
(smaller `AES_II`) removes this limit. The reference timing does not say how
the MAC pad fits into the AES budget.

## Timing summary (cycles at 1 GHz)

| operation | cycles |
|---|---|
| AES block, input to output | 80 (`AES_LATENCY`) |
| keystream generation rate | 1 per `3·AES_II` = 15 |
| tag (GF multiplies and XORs) | 6 |
| encryption, block accepted → keystream chosen | 1 (more while the queue is empty) |
| encryption, keystream chosen → tag ready, message offered | 6 |
| decryption, pool hit | plaintext the cycle after the 1-cycle pool lookup |
| decryption, pool miss | when the generator delivers `c` (≥ 80 + 2·`AES_II`) |
| plaintext → `auth_valid` | 6 |
| GCC request granted → reply and broadcast | 1 |

Each unit encrypts one block at a time and decrypts one message at a time.
Either path takes a new block once the previous one has finished.

## Module map

```
i2sems_top                     N_PROC units + one GCC
├── gcc                        counter blocks, reply + broadcast, round-robin grant
└── i2sems_node  (×N_PROC)     one processor's security unit, broadcast filter
    ├── keystream_gen ×2       queue side / pool side: job scheduling, H, assembly
    │   └── aes128_pipe        pipelined AES-128, latency LATENCY
    ├── keystream_queue        2·CR FIFO, GCC request logic
    ├── keystream_cache        32-entry fully associative {addr, cnt, keystream}
    ├── keystream_pool         512 KB, 4-way, indexed by counter
    ├── msg_encrypt            state-based keystream selection, XOR, tag
    │   └── gcm_tag → gf128_mul ×3
    └── msg_decrypt            pool lookup + prediction, XOR, lazy tag check
        └── gcm_tag → gf128_mul ×3
```

Shared types are in `i2sems_pkg` (counter, block, message, keystream,
cache-state enum, event struct). `aes_pkg` holds the AES round functions.
It builds the S-box at elaboration time from GF(2^8) arithmetic, so there
is no stored table.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_PROC` | 16 | processors (the largest system evaluated) |
| `CR` | 32 | counters per GCC assignment, and the reserve |
| `PRED_DEPTH` | 5 | counters generated per arriving message |
| `AES_LATENCY` | 80 | AES latency in cycles |
| `AES_II` | 5 | cycles between AES blocks (3.2 GB/s) |
| `KC_ENTRIES` | 32 | keystream cache entries |
| `POOL_BYTES` | 524288 | keystream pool capacity, counted as 32 B of data pad per entry (16384 entries) |
| `POOL_WAYS` | 4 | pool associativity (1, 2 and 4 are the evaluated values) |

Fixed widths are in `i2sems_pkg`:

* 64-bit counter and 32-byte block.
* 31-bit byte address, enough for 2 GB of memory.
* 8-bit destination ID.

The address and destination widths are this implementation's choices.

## Interface of the top

All the top's ports are unpacked arrays with one element per processor.

* **Clock, reset and key:** `clk`, a synchronous active-low `rst_n`, and the
  128-bit `key`, which must be stable once out of reset.
* **From the system cache:** `tx_valid/tx_ready/tx_req`. The request is
  `{dest, addr, data, state}`.
* **To the system cache:** `rx_valid/rx_addr/rx_data`, then
  `auth_valid/auth_fail`.
* **To and from the interconnect:** `net_tx_valid/net_tx_ready/net_tx_msg`
  and `net_rx_valid/net_rx_ready/net_rx_msg`.
* **Events:** `ev` gives one-cycle pulses for counting: counter request,
  fresh counter, queue stall, keystream-cache reuse, pool hit, pool miss,
  broadcast accepted or discarded, and authentication failure.

The GCC is wired to the units inside the top. In a real system its requests
and replies cross the same interconnect.

## Simulating

Every file is plain SystemVerilog-2017. With Verilator 5, run this from the
folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/i2sems_pkg.sv rtl/aes_pkg.sv tb/gf128_ref_pkg.sv tb/aes_ref_pkg.sv \
  tb/tb_i2sems_top.sv --top-module tb_i2sems_top
./obj_dir/Vtb_i2sems_top
```

Swap in any other `tb/tb_<module>.sv` the same way. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself. Each also has a watchdog
that counts a failure if the run hangs.

The testbenches compare against models written separately from the RTL:

* `aes_ref_pkg` is a behavioural AES. It finds S-box entries by searching
  for GF(2^8) inverses, and it is itself checked against FIPS-197 vectors.
* `gf128_ref_pkg` gives a GF(2^128) product by bit reversal, carry-less
  multiplication and reduction.

`aes128_pipe` is checked against the FIPS-197 and GCM published vectors.

`tb_i2sems_top` runs the whole fabric at its default sizes:

* 16 processors each send 24 blocks from small working sets to random peers.
* The interconnect model delays messages at random, delivers them out of
  order, and corrupts about one in twenty.
* It checks every plaintext and every authentication result, and that a
  counter repeats only for the same sender and block.
* It checks that each mechanism happened at least once: counter refills,
  queue stalls, keystream-cache reuse, pool hits and misses, broadcast
  precomputation, detected tampering and out-of-order delivery.

`tb_keystream_pool` runs three pool shapes side by side: 512 KB 4-way,
64 KB direct-mapped and 128 KB 2-way. It checks hits, misses and way
replacement in each.

Stale-broadcast discarding cannot happen in the top, because the GCC is
wired directly, so `tb_i2sems_node` covers it.

## What is not here

* The processors, the L1 and L2 (system) caches, the coherence protocol,
  the interconnect, the memory and I/O. The units need only the block state
  from the cache, so any protocol that keeps states right will work.
* Replay detection on data messages comes from the coherence protocol
  noticing impossible states. It is therefore not in this RTL.
* **Authenticated counter distribution.** The GCC's replies and broadcasts
  should themselves be authenticated, using a counter shared between the GCC
  and each queue and one shared with all pools. No message format or check
  for this is defined, so the GCC messages here are unauthenticated.
* Timing of the storage arrays:
  * The pool answers in one cycle rather than 3 ns. Its access is meant to
    hide behind the L2 decode anyway.
  * The keystream cache lookup is combinational rather than 2 ns.
* The memory controller's own encryption path. The memory stores blocks in
  their encrypted form, with tag and counter.

## How far to trust it

Every module has a self-checking testbench. Each testbench has also been
shown to fail when its module is broken in a way that matters. Examples:

* a wrong GF reduction constant;
* a swapped AES prefix;
* no victim rotation in the keystream cache;
* broadcasts not filtered.

The AES and GHASH datapaths match published vectors. The end-to-end run
exercises all the mechanisms at full size. What has not been done:

* timing closure;
* formal proof;
* a check of the architectural hit-rate numbers. Those depend on real
  workloads and a real coherence protocol.
