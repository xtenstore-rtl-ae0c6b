# A shielded key-value store engine for an x86 + FPGA server

This RTL is the FPGA half of a key-value store (KVS) that keeps its data
confidential and fresh even against the cloud provider's own software. It
follows the XtenStore design for hybrid x86-FPGA systems. The host CPU runs an
SGX enclave that attests to clients and hands out keys. The FPGA holds
everything that must stay secret. The bulk of the data lives in ordinary,
untrusted host memory, and it only ever appears there encrypted and
authenticated.

The central idea is a **two-tier table with a fresh secret per key**:

* **Tier 1, on chip (trusted).** This tier holds one entry per key: the key, a
  pointer to its record in host memory, the secret drawn at the key's last
  PUT, and the value length. A 16-byte value is stored right in the entry.
* **Tier 2, in host memory (untrusted).** Each record holds
  `[IV][MAC][ciphertext...]`. The value is encrypted with AES-CTR. The MAC is a
  hash over the secret, the IV and the ciphertext.

Every PUT draws a new secret, so a MAC made under an old secret no longer
verifies. Replaying an old record fails, and so does forging or editing one,
because the secret never leaves the chip. Software-only stores get this
freshness from a Merkle tree, which costs extra memory reads and hashes on
every access. Here, checking a value costs one read of its record plus one
hash. The table lookup and the cryptography do not depend on each other's
results. A PUT therefore starts both in the same clock cycle, and they run in
parallel.

```
 network port ──► req FIFO ─┐                         ┌─► rsp FIFO ──► network port
                            ├─► port_arbiter ◄────────┤
 PCIe port (enclave) ─► req FIFO ─┘    │      ▲        └─► rsp FIFO ──► PCIe port
                                       ▼      │
 key_load (enclave) ──► storage key ─► kvs_controller ◄──► hash_table_core (tier 1)
                                       │   │   │
                           secret_gen ◄┘   │   └──► host_mem_if ◄──► host memory (tier 2)
                                           ▼
                                    ctr_mac_engine
                                  (aes128_core + sha256_core)
```

## Files

| file | what it is |
|---|---|
| `rtl/xts_pkg.sv` | sizes, request/response beat formats, table entry, status codes |
| `rtl/aes_pkg.sv` | AES round functions; the S-box is computed at elaboration |
| `rtl/xtenstore_top.sv` | top level: FIFOs, arbiter, key register, all engines |
| `rtl/kvs_controller.sv` | PUT/GET sequencing |
| `rtl/hash_table_core.sv` | tier-1 table, chained hashing |
| `rtl/ctr_mac_engine.sv` | AES-CTR + SHA-256 MAC for one value |
| `rtl/aes128_core.sv`, `rtl/sha256_core.sv` | iterative cipher and hash cores |
| `rtl/secret_gen.sv` | per-PUT secret source |
| `rtl/host_mem_if.sv` | burst DMA front end to host memory |
| `rtl/port_arbiter.sv` | merges the two request ports and steers responses back |
| `rtl/sync_fifo.sv` | FIFO used for all streams |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two top-level tests |
| `tb/host_mem_model.sv` | behavioural host memory, with hooks to tamper with it |

## Interfaces

All streams use valid/ready handshakes. Words are 16 bytes, and so are keys.
A value is 1 to 64 words (16 B to 1024 B). Everything runs on one clock with
an active-low asynchronous reset.

**Requests** (`req_beat_t`): every beat carries `{op, nwords, last, data}`.

* The first beat holds the key in `data`, plus `op` (`OP_GET`/`OP_PUT`) and
  `nwords`.
* A PUT follows with `nwords` value beats, and the final one has `last=1`.
* A GET is that one beat alone, with `last=1`.

**Responses** (`rsp_beat_t`): the first beat echoes the key and carries
`status` and `nwords`. Only a successful GET sends `nwords` value beats after
it. Status codes:

| status | meaning |
|---|---|
| `ST_OK` | done; for a GET the value follows |
| `ST_NOT_FOUND` | GET of a key that was never stored |
| `ST_MAC_FAIL` | the host record was altered, forged or replayed; no data is returned |
| `ST_FULL` | no table entry or no host space left for a new key; nothing was changed |

**Host memory port** (`mem_req_*`, `mem_rsp_*`): each request moves one word at
a 16-byte-aligned 36-bit byte address, which covers 64 GB. Read data return in
request order and cannot be stalled. The interface never has more reads in
flight than its read buffer holds (`HM_OUTSTANDING`).

**Key provisioning**:

* A pulse on `key_load_valid` loads the 128-bit storage key, which the enclave
  sends over PCIe once it has set up the session. No request is accepted
  before that.
* `secret_reseed`/`secret_seed` reload the secret generator's state, for
  example from an entropy source.

**Monitoring**:

* `table_used` is the number of table entries in use.
* The `stat_*` counters count PUTs, GETs, inline PUTs, MAC failures and host
  slots reused in place. `stat_overlap` counts the cycles in which a PUT's
  lookup and its encryption were both running.

## How a request is executed

**PUT.** The controller takes the header beat only when the table, the crypto
engine and the host interface are all idle. In that cycle it:

1. issues the table lookup of the key;
2. takes the current secret and advances the generator;
3. forms `IV = {nonce, 64'b0}`, where the nonce counts PUTs;
4. for a value longer than one word, starts the crypto engine.

The value beats then stream from the request FIFO straight into the engine,
and the ciphertext collects in a 64-word buffer. Meanwhile the lookup walks
its chain. Once both are finished, the entry is committed: `HT_UPDATE` on a
hit, `HT_INSERT` on a miss. The record is then written to host memory. Where
the record goes:

* **16-byte values** are kept in the entry and never touch host memory, which
  is the fast path for small values.
* **Updates** reuse the key's old host slot if it is large enough.
* **New or grown values** take a new slot from a bump allocator. There is no
  free list and no DELETE, since the store defines only PUT and GET.

**GET.** The lookup comes first:

* A miss answers `ST_NOT_FOUND`.
* An inline entry answers at once.
* Otherwise, the record is read from host memory. The IV and MAC words come
  first. The ciphertext then streams through the engine, which decrypts it
  with the entry's secret and recomputes the MAC. The value is released only
  if the two MACs match. The IV read back from host memory is not trusted on
  its own: the MAC covers it.

Measured by the workload test: host memory answers in 20 cycles, and the
count runs from a request's first beat to its response header. The workload
is uniform random keys, one request at a time, with read shares of 50–100%.

| value size | GET (cycles) | PUT (cycles) |
|---|---|---|
| 16 B (inline) | 6–7 | 9–10 |
| 512 B | 653–656 | 664–672 |
| 1024 B | 1181–1183 | 1228–1239 |

Latency barely depends on the read share, because requests are served one at a
time. The clock of the published implementation is not stated. At an assumed
200 MHz, a 1024-byte PUT takes about 6.1 µs. That is the order of the 4.9–6.6 µs
the published system reports end to end for 1 KB values, PCIe included.

The SHA-256 core sets these numbers: 66 cycles per 64-byte block of MAC input.
The AES keystream (10 cycles per word) and the table lookup (2 cycles plus one
per entry compared) hide underneath it.

## The crypto engine in detail

`ctr_mac_engine` processes one value of n words. All blocks are big-endian:
byte 0 is the most significant byte of a word.

* Keystream word i is `AES-128_key(IV + i)`, using 128-bit addition. The output
  word is the input XOR keystream, in both directions.
* `MAC = SHA-256(secret || IV || C_0 || ... || C_{n-1})[255:128]`, where C is
  the ciphertext. The standard SHA-256 padding is appended: a 0x80 byte,
  zeros, then the 64-bit message length in bits, which is 128·(n+2).
* Message words are packed four at a time into a 512-bit block. The hash core
  copies the block when it starts, so packing the next block overlaps the
  compression.
* One AES core computes the next keystream block while the current one waits
  to be used.

`aes128_core` applies one round per clock, expanding the round key on the fly.
A result appears 10 cycles after start. The S-box is not a stored table: a
constant function builds it from its definition (the GF(2^8) inverse followed
by the affine map). `sha256_core` computes one round per clock from a 16-word
rolling message schedule. Its digest is ready 65 cycles after start.

## The tier-1 table

`hash_table_core` keeps a pool of `NUM_ENTRIES` entries and `NUM_BUCKETS`
chain heads. Each entry is 437 bits: key, inline flag, length, slot capacity,
host pointer, secret and inline value. The bucket index is the top bits of
`(k[127:96]^k[95:64]^k[63:32]^k[31:0]) * 0x9E3779B1`. A new key is linked at
the head of its chain, so a bucket holds any number of keys. A lookup compares
one entry per cycle. After reset, the heads are cleared at one per cycle, so
the table accepts its first command `NUM_BUCKETS` cycles after reset.

The defaults are 16384 entries and 4096 buckets, about 7.2 Mbit. That stays
within the block RAM the published implementation spends on its hash table
cores (327.5 RAMB36, about 11.8 Mbit).

## Parameters of `xtenstore_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_BUCKETS` | 4096 | chain heads (a power of two) |
| `NUM_ENTRIES` | 16384 | table entries, so at most this many keys |
| `REQ_FIFO_DEPTH`, `RSP_FIFO_DEPTH` | 128 | per-port stream buffers (beats) |
| `HM_OUTSTANDING` | 16 | host reads in flight / read buffer depth |
| `HOST_BYTES` | 2^36 (64 GB) | host space handed out to records |
| `SECRET_SEED` | fixed constant | reset state of the secret generator |

## How far this follows the published design, and where it does not

These points follow the published design:

* the two-tier split, with key, pointer and secret on chip and encrypted
  values in host memory;
* 16-byte values kept on chip;
* a fresh secret on every PUT, mixed into the MAC with the IV and ciphertext;
* AES-CTR for confidentiality;
* chained hashing;
* lookup and cryptography started together for a PUT;
* two request paths, from the network and from the enclave over PCIe;
* 16-byte keys and values up to 1024 B;
* a 64 GB host memory.

These are this implementation's own choices, because the design description
leaves them open:

* AES-128 as the cipher.
* SHA-256, truncated to 128 bits, as the "hash MAC".
* The IV format and the record layout.
* The request/response formats.
* The hash function and the table sizes.
* The bump allocator.
* Round-robin arbitration between the ports.
* A single AES core and a single SHA-256 core. The published implementation
  replicates its crypto cores widely, but the count is not given.
* xorshift128 for the secrets. The real system needs a true random source,
  which is not described. Replace `secret_gen`, or reseed it from one, before
  relying on secrecy.

Known differences and gaps:

* **The table location.** The published system keeps tier 1 in the FPGA
  board's 4 GB DRAM. Here it is an on-chip array with asynchronous reads, so
  at the defaults it holds 16384 keys, not the millions of pairs of the
  4–32 GB workloads the published design was measured with. Scaling up means
  putting the table behind a DRAM controller. That adds read latency per
  chain step, which the controller's handshake already tolerates.
* **GET overlap.** A GET does not overlap the lookup with decryption. The
  decryption needs the secret found by the lookup.
* **One request at a time.** Requests are processed one after another. The
  published throughput (up to about 9 M operations/s) would need several
  engines working on independent requests.
* **Not included:**
  * the client-to-FPGA session protection with the session key (its format is
    not specified);
  * the network, DMA and PCIe IP cores;
  * the enclave software.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv rtl/xts_pkg.sv tb/tb_xtenstore_top.sv --top-module tb_xtenstore_top
./obj_dir/Vtb_xtenstore_top
```

Substitute any other `tb/tb_*.sv` to run it.

| testbench | what it shows |
|---|---|
| `tb_xtenstore_top` | small table (4 buckets, 128 entries, 64 KB host). See the list below. |
| `tb_xtenstore_workload` | uniform random workload at 16/512/1024 B values and 50/90/95/100 % reads over both ports: every value checked, latency per size and mix printed and bounded |
| `tb_xtenstore_full` | all defaults: a 1024 B and a 16 B value stored and read back, plus a miss |
| `tb_kvs_controller` | random PUT/GET mix on 12 keys. Every host-stored PUT starts its lookup and its encryption in the same cycle. IV words in host memory are checked. An altered IV is caught. |
| `tb_ctr_mac_engine` | ciphertext and MAC match an independent AES/SHA-256 computation for 1–5 and 64 words, covering all padding cases. Decryption restores the plaintext. Timing is checked too. |
| `tb_aes128_core`, `tb_sha256_core` | standard test vectors, and latency |
| `tb_hash_table_core` | chains, updates, a full pool, lookup latency |
| `tb_host_mem_if`, `tb_port_arbiter`, `tb_sync_fifo`, `tb_secret_gen` | each against a reference model |

`tb_xtenstore_top` covers:

* waiting for the key;
* inline and host-stored values;
* slot reuse and reallocation;
* a tampered ciphertext word, and a replayed old record (both must answer
  `ST_MAC_FAIL`);
* random traffic on both ports at once;
* host space running out, then the table running out.

To change a size, override the top's parameters. `NUM_BUCKETS` must be a
power of two.
