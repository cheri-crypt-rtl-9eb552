# CHERI-Crypt transparent memory encryption engine

CHERI capabilities can seal a code/data pair so that only a `CInvoke` can enter
it. Sealing protects the pair from other software on the same machine. It does
not protect the memory behind it from someone who reads or changes the RAM
directly. This engine adds that protection.

When a capability is sealed with the encryption permission set, its memory is
encrypted and authenticated in place with AES-GCM, under a key that never
leaves the engine. When the enclave is later invoked, two small caches sit
between the pipeline and memory. They decrypt and check that memory a batch at
a time while the enclave runs, and re-encrypt what it writes. The enclave's
software never sees any of this.

The engine adds two instructions, both started from the pipeline's memory stage
while the pipeline stalls:

- **`CSealEncrypt`** is `CSeal` plus encryption. It gets a key for the object
  type (otype), encrypts the capability's memory batch by batch, and returns
  the sealed capability with its length shrunk to the encrypted data.
- **`CInvokeEncrypt`** is `CInvoke` plus decryption. It checks the pair, fetches
  the otype's key and next IV counter, and hands them to the caches together
  with the code and data bounds. From then until the program counter capability
  (PCC) leaves the code section, all in-section accesses go through the caches.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable, apart from the
testbenches.

## Block structure

```
 pipeline ibus ──► IbusCntrlSelector ──────────────────────────────► memory ibus
                        │  ▲                                        ▲
                        ▼  │                                        │
                   Instruction cache ── AES core: decrypt #0 ───────┘
                        (bounds checker)
 pipeline dbus ──► DbusCntrlSelector ──────────────────────────────► memory dbus
                     │  ▲       ▲                                   ▲
                     ▼  │       │                                   │
                   Data cache ──┼── AES core: decrypt #1, ──────────┘
                     (bounds)   │   shared encrypt (via AESCntrlSelector)
                                │             ▲
                      CSealEncrypt read/write ┘
 memory stage ──► seal_ctrl ─┬─► key table ◄── invoke_ctrl ◄── memory stage
                             │   (key generator)     │
                             └──► seal_rw            └──► both caches
```

| Module | Role |
|---|---|
| `cheri_crypt_top` | Wires everything together. Its ports are the pipeline's two buses, the memory's two buses, the instruction start/result signals, `stall`, `tag_error` and `enclave_active`. |
| `bus_cntrl_selector` | One per bus. Selects between pass-through, routing through the cache, or (data bus only) handing memory to the seal read/write unit. |
| `enc_cache` | The instruction cache (`IS_DCACHE=0`) or the data cache (`IS_DCACHE=1`), together with its controller. |
| `bounds_checker` | Tests whether the PCC is inside the code section and the bus address is inside the cache's section. |
| `aes_core` | Holds one GCM encryption function and two GCM decryption functions. |
| `aes_gcm` | One AES-GCM function: batch in, batch out, plus the tag. |
| `aes128_cipher` | Iterative AES-128, one round per clock. |
| `gf128_mul` | The GHASH multiplier, 8 bits per clock. |
| `aes_cntrl_selector` | Gives the shared encryption function to the seal unit or to the data cache. |
| `key_table` | Per-otype keys and IV counters, with the key generator inside. |
| `drbg_keygen` | A CTR_DRBG-style key generator built on AES-128. |
| `seal_ctrl` | The `CSealEncrypt` control: checks, key request, batch iteration, resized length. |
| `seal_rw` | Reads, encrypts and writes back one batch. |
| `invoke_ctrl` | The `CInvokeEncrypt` control: checks, key fetch, hand-over to the caches. |
| `cc_pkg` | Shared types and functions: capability, bus, GCM and key-table ports, the AES round, GF arithmetic and the tag address. |

## Encrypted memory layout

This is the part everything else depends on. The unit of encryption is a
**batch** of `LB` bytes (default 32, two AES blocks). One batch is one cache
line. Each batch is encrypted under its own IV and has its own 128-bit
authentication tag. Tag and IV are stored in memory next to the data, taking
`LTIV` = 32 bytes per batch:

- the 16-byte tag;
- then the 96-bit IV padded to 16 bytes as `{32'h0, FIXED_IV, count[63:0]}`.

The IV is built the deterministic way: a fixed 32-bit field (`FIXED_IV`, one
value per hardware instance) above a 64-bit invocation counter. No two batches
encrypted under one key share a counter value.

Software hands `CSealEncrypt` a capability whose length `L_C` covers the data
and the tag/IV records: `L_C = n·LB + n·LTIV` for `n` batches. The base must be
aligned to `LB`. Data fills the region upwards from the base, and the records
fill it downwards from the top:

```
base                                                        base + L_C
 | batch 1 | batch 2 | ... | batch n | rec n | ... | rec 2 | rec 1 |
   DataAddr_k = base + (k-1)·LB          TagAddr_k = base + L_C - k·LTIV
```

Sealing walks both pointers towards each other. Before each batch,
`TagAddr < DataAddr + LB` means the region cannot hold the data and its
records, and this raises an **encryption length error** (an exception). The
walk ends after the batch for which `TagAddr == DataAddr + LB`.

The sealed capability's length then becomes the data length, `L_d = n·LB`.
Inside the enclave, only `[base, base + L_d)` is addressable data. The records
lie just above it.

To decrypt the line at `BatchAddr`, a cache finds the record with shifts only
(`S_b = log2 LB`, `S_t = log2 LTIV`):

```
BN      = L_d >> S_b                               number of batches
b_n     = ((BatchAddr - base) >> S_b) + 1          batch number, from 1
TagAddr = base + L_d + ((BN - b_n) << S_t)
```

This is `cc_pkg::tag_addr_of`. Memory words are big-endian within a block: the
word at the lowest address is bits 127:96 of the AES block.

## AES-GCM functions and their timing

`aes_gcm` processes one batch with a 96-bit IV and no additional
authenticated data. It runs on a fixed schedule of slots:

- **One setup slot** encrypts the counter block `Y0 = {IV, 32'd1}`. That result
  is saved for the tag.
- **One slot per 16-byte block.** Each slot encrypts the next counter value and
  XORs it with the data. At the same time, the multiplier folds the previous
  ciphertext block into the GHASH accumulator. For decryption the input is
  hashed instead of the output.
- **A final phase** hashes the length block and produces
  `tag = E(K, Y0) ^ GHASH`.

A slot is `CLKS_DATA` = 16 clocks. The AES takes 11 clocks and the multiplier
16. The final phase is padded to `CLKS_AT` = 22 clocks. The latency of a batch,
counted from `start` to the tag, is therefore

```
Lat_batch = (N_blks + 1) · CLKS_DATA + CLKS_AT      = 70 clocks for a 32-byte batch
```

This matches the original design's figure exactly. The hash subkey
`H = E(K, 0^128)` is computed once per key load, outside this count.

The port (`gcm_req_t`/`gcm_rsp_t`) works as follows:

- `key_load` is a pulse.
- `idle` means the key is ready.
- `start` is a pulse with the IV.
- Input blocks use `in_valid`/`in_ready`/`in_last`.
- Output blocks use `out_valid`/`out_ready`.
- `tag_valid` stays high until the next start.

`aes_core` holds one encryption function and two decryption functions, one per
cache. Both the seal unit and the data cache's write-backs need to encrypt.
They never do so at the same time, so they share the one encryption function
through `aes_cntrl_selector`.

## Key table and key generator

The table has `ENCLAVES` entries (default 3). Each entry holds the otype, the
key, a valid bit, `NextIVCount` and a use counter. It serves three commands,
each on its own requester port (seal control, invoke control, data cache):

- **genKey** (seal):
  - If the otype's key has been used once, it is returned with its
    `NextIVCount` and its use counter goes to 2.
  - Otherwise a new key is generated, stored with `NextIVCount = 0` and use
    count 1, and returned.
  - So one key covers exactly one code/data pair, sealed by two separate
    instructions. A third seal with the same otype gets a fresh key.
- **getKey** (invoke): returns the key and `NextIVCount`, or a miss (then
  `CInvokeEncrypt` raises an exception).
- **storeNextIVCount**: written at the end of a seal and when the data cache
  leaves an enclave. Later write-backs therefore never reuse an IV.

When the table is full, it replaces the first entry whose pair is complete;
otherwise it replaces entries in turn.

**A tag error anywhere flushes the whole table.** Data that has been tampered
with cannot be decrypted again.

`drbg_keygen` follows the structure of a block-cipher DRBG:

1. The seed is `ENTROPY ^ PERS ^ nonce`. The nonce is the otype extended by a
   request counter, so the same otype never yields the same key twice.
2. An update step starts from `K = V = 0`:
   - `K = AES_0(1) ^ seed_hi`
   - `V = AES_0(2) ^ seed_lo`
3. The key is `AES_K(V + 1)`.
4. The working state is cleared after each key.

`ENTROPY` and `PERS` are parameters. The entropy is a fixed
proof-of-concept value. A real entropy source would replace it.

## CSealEncrypt

`seal_ctrl` receives the capability to seal and the sealing capability. The
otype is the sealing capability's address (`base + offset`, low 12 bits).

- **No encryption permission:** an ordinary seal, answered one clock after
  `start`.
- **Encryption permission set:**
  1. `seal_ctrl` checks tag, unsealed state, alignment and minimum length.
  2. It issues genKey.
  3. It waits until no pass-through access is outstanding on the data bus, then
     takes the bus.
  4. For each batch it starts `seal_rw`, which does the following in order:
     - loads the key (first batch only);
     - reads the batch;
     - streams it through the encryption function;
     - writes the ciphertext back;
     - writes the tag and the padded IV record.

     Batch `k` uses counter `NextIVCount + k − 1`.
  5. It stores the next counter value.
  6. It returns the capability sealed and resized.

The encryption permission is software permission bit 0 of the capability. The
capability is modelled as an uncompressed struct, `cc_pkg::cap_t`: tag,
permissions, otype, offset, length and base.

## CInvokeEncrypt

`invoke_ctrl` checks the following:

- both capabilities are tagged;
- both are sealed with the same otype;
- both have the same encryption permission.

A mismatch raises an exception. Without encryption it completes two clocks
after `start`. With encryption it fetches the key and counter and presents
them, with both sets of bounds, until each cache has acknowledged. It then
clears its own copy of the key.

## The encryption caches

Each cache is direct mapped, with `LINES` lines (default 4) of one batch each.
The data cache is write-back. The controller's states:

| State | What happens |
|---|---|
| `waitInvoke` | Idle, with the buses passing straight through. It takes key, counter, otype and bounds from `CInvokeEncrypt`, and starts the key load in its decryption function (and, for the data cache, in the encryption function). |
| `waitRspStart` | Pipeline commands now go to the cache. It waits for responses to earlier pass-through commands to drain before taking the response path too. |
| `startInvoke` | Serves one pipeline command at a time (see below). |
| `readCacheline` | Fetches tag and IV, then streams the batch from memory through the decryption function into the line as blocks come out. The computed tag must equal the stored one. |
| `repeatReadWrite` | Replays the command that missed, which is now a hit. |
| `writebackCacheline` | Encrypts the line under a new counter value and writes ciphertext, tag and IV record. |
| `flush` | Clears the line memory one 32-bit word per clock (`LINES·LB/4` = 32 clocks at the defaults) and erases the key. |
| `waitRspFinish` | Waits for the cache's own memory traffic to finish, then releases the buses. The instruction cache also waits here for the data cache. |

In `startInvoke`, each command is handled as follows:

- **PCC outside the code section:** exit. The data cache first writes back
  every dirty line and stores `NextIVCount`. Both caches then flush.
- **Address outside the section:** bypass, unencrypted, to memory. This is how
  the enclave reaches shared memory. It also covers the instruction cache's
  prefetches past the end of the code.
- **Hit:** answered the next clock. A write updates the line and marks it
  dirty.
- **Miss:** if the victim line is dirty (data cache only), it is written back
  first. Then the new line is read.

On a tag mismatch the cache pulses `tag_error` and flushes. The pipeline's
command gets no response; the pipeline takes an exception instead. The key
table is emptied.

## Bus protocol and stalls

Both buses use the same command/response protocol:

- A command, `bus_cmd_t {valid, we, addr, wdata, wmask}`, is transferred when
  `valid` and `ready` are both high.
- Every command gets exactly one response, `bus_rsp_t {valid, rdata}`. Writes
  get one too. Responses come back in order.
- `pt_pending` in the bus selector counts pass-through commands still waiting
  for a response. The seal unit and the caches take the bus only after it
  reaches zero.
- `stall` is high while either instruction control is busy. The pipeline must
  hold its memory stage during that time.

Assertions check the following rules:

- The seal unit and a cache never own a bus together.
- The seal unit takes the bus only once it has drained.
- The slot timing constants are legal.
- The data cache's key is erased whenever it is idle.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `LB` | 32 | top, caches, seal | Batch length in bytes. A power of two and a multiple of 16. |
| `LTIV` | 32 | top, caches, seal | Tag plus IV record per batch, in bytes. Must not exceed `LB`. |
| `LINES` | 4 | top, caches | Lines per cache. |
| `ENCLAVES` | 3 | top (`key_table.ENTRIES`) | Keys held at once. |
| `FIXED_IV` | `32'hC4E1_0001` | top, caches, seal | The fixed IV field. It must be identical everywhere. |
| `CLKS_DATA`, `CLKS_AT` | 16, 22 | `aes_gcm` | Slot lengths. |
| `ENTROPY`, `PERS` | constants | `drbg_keygen` | DRBG inputs. |

## Departures and limits

- **CSealEncrypt latency.** It is 143 clocks for a one-batch code section and
  188 for a two-batch data section, against 109 and 184 in the original
  design. There are two causes:
  - Key generation uses three sequential AES operations, about 36 clocks
    against 19.
  - The read/write unit moves one 32-bit word per bus command.

  The AES-GCM part of the latency matches exactly.

  With 64-byte batches the same two seals take 175 and 252 clocks.
- **Ambiguous tag-address formula.** The batch tag-address formula is
  implemented as a left shift, `(BN − b_n) << S_t`. This is the only reading
  consistent with the multiplication by `LTIV` it stands for.
- **Choices where the original description is silent.** These are the design's
  own:
  - the bus protocol;
  - the capability encoding;
  - the position of the IV padding;
  - how the otype is derived;
  - the replacement policy of the key table;
  - the exception checks of `CSealEncrypt`.
- **One command at a time.** Each cache serves one pipeline command at a time.
  Writes that reach the instruction cache inside its own section are
  acknowledged and dropped.
- **Outside parts.** The CHERI pipeline, the memory tag controller and the AXI
  interconnect/RAM are not part of this RTL. Their signals are the top's ports.
  The testbenches use a behavioural memory instead.
- **Simulated sizes.** The default sizes were simulated (32-byte batches,
  4 lines, 3 keys), plus the whole engine with 64-byte batches. Other
  power-of-two batch sizes are allowed by the parameters but untested.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench also has a watchdog.
`tb/gcm_ref_pkg.sv` is an independent reference written in plain procedural
code: a bit-serial GF(2^128) multiply, an S-box found by search rather than by
formula, and AES-128 and AES-GCM built on them. The testbenches use it to
compute expected ciphertexts and tags.

| Testbench | What it establishes |
|---|---|
| `tb_aes128_cipher` | FIPS-197 vectors, random inputs against the reference, 11-clock latency. |
| `tb_gf128_mul` | Products from the GCM test vectors, random products, 16 clocks. |
| `tb_aes_gcm` | Standard GCM test cases, random batches in both directions, latency `(N+1)·16+22`. |
| `tb_aes_core` | All three functions running at once on different keys. |
| `tb_drbg_keygen`, `tb_key_table` | Keys against a model; genKey/getKey/store, one key per pair, replacement, flush. |
| `tb_seal_rw`, `tb_seal_ctrl` | Memory after sealing against the reference; same key and continued counter for the second capability of a pair; bus not taken while accesses are pending; plain seal in one clock; every exception case. |
| `tb_invoke_ctrl`, `tb_bounds_checker`, `tb_*_selector` | Checks, hand-over, range edges, routing of commands and responses. |
| `tb_enc_cache` | Misses, hits, byte writes, dirty eviction and re-read, bypass, 300 random accesses against a model, exit with memory re-authenticated and distinct IVs, a tampered batch raising a tag error. |
| `tb_cheri_crypt_top` | The whole engine at its default parameters with a dual-port memory. It seals a code and a data section with one otype, runs the enclave three times (including the exit), does a plain seal, then tampers with memory and expects a tag error. It counts every mechanism (line reads, hits, bypasses, write-backs, flushes, key generation, tag error) and fails if any did not occur. |
| `tb_cheri_crypt_top_b64` | The same program with `LB = 64`: four blocks per batch and per line, a one-batch code section and a two-batch data section. |

To run one testbench with Verilator, name the two packages and the testbench;
the search paths find every module used:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_enc_cache \
    rtl/cc_pkg.sv tb/gcm_ref_pkg.sv tb/tb_enc_cache.sv
./obj_dir/Vtb_enc_cache
```

The same works for every `tb_*` file, the top-level test included. That test
runs in well under a minute.
