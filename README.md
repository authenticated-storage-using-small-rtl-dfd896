# Authenticated block storage with a small trusted P chip

A storage server holds blocks for many clients and cannot be trusted. It could
return stale data, forge a block, or replay an old write. This design stops
that with a small trusted part next to the untrusted server, made of two chips:

* The **S chip** is a tiny secure chip with non-volatile memory. It keeps one
  160-bit value, the root hash of a Merkle tree over every block on the disk.
* The **P chip** is a fast processing chip, for example an FPGA. It has no
  non-volatile storage. It checks the Merkle tree, keeps a cache of tree nodes
  it has already checked, authenticates every answer the server sends to a
  client, and enforces who may write a block.

The server does all the bulk work: it stores the data and the whole tree, and
it decides which tree nodes to load into the P chip. The P chip only trusts
what it has hashed itself. A client trusts only answers that carry an HMAC made
with its session key, and only the P chip can make those.

This repository holds the RTL of the P chip. The top module is `pchip_top`.
The S chip, the RSA engine that unwraps session keys and the boot engine are
not in the RTL. Their values enter as ports, and the testbenches model them.

## The tree

Nodes are numbered as a heap. The root is node 1. The children of node `i` are
`2i` and `2i+1`. With `LEAF_BITS = 20` there are 2^20 leaves, enough for a
1 TB disk of 1 MB blocks. Block `b` has leaf `2^20 + b`.

* An inner node is `SHA1(left || right)`.
* A leaf is `SHA1(leaf_arg)`, where
  `leaf_arg = H(data) || Vid || H(Wkey)`.
  * `H(data)` is the SHA-1 digest of the block contents.
  * `Vid` is a 32-bit revision number.
  * `H(Wkey)` is the digest of the block's 96-bit write key.

So a leaf binds a block's contents, how often it has been written, and who may
write it. The server knows all three, but it cannot change any of them without
changing the root.

Every tree hash input fits in one 64-byte SHA-1 block (40 or 44 bytes), so each
tree hash is a single compression.

## Tree cache and the server-driven commands

The P chip never walks the tree by itself. The server sends tree commands:

| command | effect |
|---|---|
| `OP_LOAD idx, hash` | put a node in the cache, marked unverified (the root cannot be loaded) |
| `OP_VERIFY idx` | hash the two cached children of `idx`, compare with `idx`, which must already be verified; on a match both children become verified |
| `OP_READ` / `OP_WRITE` | use a verified leaf (see below); a write rewrites the leaf-to-root path |

A node is trusted only once it is verified. The root becomes verified when it
is installed at boot. Trust then spreads down one `VERIFY` at a time. A wrong
hash anywhere stops the command and raises `integrity_err`.

The most delicate part is **where a node may live in the cache**
(`tree_cache`). The cache has 2^14 entries. The server chooses which nodes to
load, but each node has exactly one possible slot:

* levels 0-9 of the tree are stored whole (slot = node index);
* each deeper level has its own bank of 2^10 slots, indexed by the low 10 bits
  of the node index.

Because a node has only one slot, a tree update always overwrites the only
cached copy of each node on its path. An old copy can never stay marked
verified. Also, a parent, its children and a whole leaf-to-root path never
collide, so one path always fits. The tag stored with each entry is the full
node index, so a hit is exact.

An update (`merkle_engine`, `M_UPDATE`) works in two phases:

1. It checks that the leaf and every sibling on the path are cached and
   verified. If any is missing, the command fails and changes nothing.
2. It then rehashes the path up to the root.

Every rewritten node leaves on `node_valid/node_idx/node_hash`, so the server
can keep its copy of the tree current.

## Client protocol and message formats

A client opens a session, and its 128-bit session key `Skey` is loaded with
`OP_SESSION` (session ID `sid`, 256 sessions). Every request carries a nonce
`n` and an HMAC-SHA1 under `Skey`. Every answer carries an HMAC under the same
key.

Message layouts are one type byte followed by big-endian fields:

| message | bytes | contents |
|---|---|---|
| read request | 13 | `0x10 Bid n` |
| read response | 37 | `0x20 Bid n H(data) Vid` |
| write request | 53 | `0x11 Bid n H(data*) H(Wkey*)` |
| write accepted | 33 | `0x21 Bid n H(data*)` |
| write refused (bad revision) | 17 | `0x22 Bid n Vid` |
| root to S chip | 29 | `0x31 s n` (key SK) |
| S-chip acknowledgment | 29 | `0x41 s n` (key SK) |

**Read (`OP_READ`).** The P chip checks the request HMAC. It then checks that
`SHA1(leaf_arg)` equals the verified leaf of `Bid` (certification). Finally it
answers with the HMAC of the read response. The client compares `H(data)` in
that answer with the hash of the data the server sent it. The hashing of bulk
data is done by the data hash engine (below) or by the client.

**Write (`OP_WRITE`).** The request carries the new `H(data*)` and
`H(Wkey*)`, plus a token `{Wkey || Vid'}` encrypted with AES-128 under `Skey`.
The P chip takes these steps:

1. Check the request HMAC.
2. Decrypt the token with `aes128_dec`.
3. Certify the current `leaf_arg`.
4. Check `SHA1(Wkey)` against the leaf's `H(Wkey)`. On a mismatch the writer is
   not authorised: `integrity_err`, and no answer.
5. If `Vid' = Vid + 1`, update the leaf to `H(data*) || Vid' || H(Wkey*)` and
   answer "write accepted". Otherwise change nothing and answer "write refused"
   with the current `Vid`, so the client can retry.

A replayed or reordered write always has the wrong revision number. A new
`Wkey*` hands write rights to someone else.

## Freshness of the root: the response buffer

The P chip forgets everything on power loss, so the root must reach the S chip
before any client may rely on a write. The process runs as follows:

1. `OP_STORE` brings a fresh nonce `n` from the S chip. The P chip emits the
   root `s` and `HMAC_SK(0x31 s n)` on `root_out*`. It also *seals* the
   response buffer at that point.
2. The S chip stores `s` and answers `HMAC_SK(0x41 s n)`. The server passes it
   on with `OP_ACK`.
3. If the acknowledgment is correct, every sealed response is released to the
   clients. A wrong one raises `integrity_err` and releases nothing.

Which answers are held (`resp_buffer`):

* Every "write accepted" answer.
* Every read answer (and bad-revision answer) for a block that still has a
  held write. Otherwise a client could observe a write that might be rolled
  back.
* Other reads go straight to the client, even while older answers are held.
  The only exception is answers that are already released and still
  draining: these leave first.

The buffer holds `RESP_DEPTH = 102` entries (2 KB of 20-byte HMACs). It is a
FIFO with a content lookup on block IDs, and it uses running counters for
write, read, seal and release positions. Only one store may be outstanding. A
read or write that arrives while the buffer is full is refused with `ERR_FULL`
and changes nothing. The server must then complete a store and acknowledgment
first. This keeps the single command port from ever blocking the
acknowledgment that would free the buffer.

## Data hash engine

`data_hash_engine` hashes data blocks streamed in 64-byte words and compares
each result with the client's `H(data)`. Blocks are whole numbers of 64-byte
words, so the final padding block depends only on the length.

The words of one block form a chain of compressions: each needs the previous
result. So one block alone keeps only one of the four pipeline stages busy.
The engine therefore hashes up to four blocks at once, one per *stream*.

* The server tags each word with `dh_stream`.
* Each stream has its own chaining value, word count and expected hash.
* A stream accepts its next word once its previous word has left the pipeline.
* Padding blocks go ahead of new data.
* A result carries its stream number (`dh_res_stream`).

Four 6-word blocks hashed together take 760 cycles; one takes 700. That gives
about 290 MB/s at 125 MHz with all streams busy.

## Hash and cipher units

* `sha1_pipe` is a SHA-1 compression pipeline in 4 stages of 20 rounds. The
  stages advance in lock step. A new block enters every 20 cycles, and a result
  appears 80 cycles after its block entered. Up to four independent blocks are
  in flight, each with a tag.
* `sha1_short` pads a message of up to 55 bytes into one block and hashes it.
  The Merkle engine uses it.
* `hmac_sha1` implements HMAC-SHA1 (RFC 2104) with 128-bit keys. It also has a
  `plain` mode that returns a single-block SHA-1, used for `H(Wkey)`. An HMAC
  over a message of up to 55 bytes takes four compressions.
* `aes128_dec` does AES-128 decryption. It runs one round per cycle and expands
  the key on the fly, so a token takes 21 cycles. The S-box is computed as the
  multiplicative inverse in GF(2^8) followed by the affine map, not stored as a
  table.

## Interface of `pchip_top`

* Commands (`cmd_valid/cmd_ready`, `pchip_cmd_t cmd`) are taken one at a time.
  `cmd_ready` is high while the controller is idle.
* `cmd_done` pulses with `cmd_err` (0 = success). `integrity_err` pulses with
  it when a check on untrusted data failed.
* Responses leave on `resp_valid/resp_ready` as `resp_t` (kind, sid, Bid, Vid,
  HMAC).
* `root_out_valid/root_out/root_out_mac` carry the root message to the S chip.
  `store_pending` and `held_count` show the state of the buffer.
* `sk` is the key shared with the S chip.
* `dh_*` is the data hash engine's word port and result.
* Reset is asynchronous and active low. Reset empties the tree cache, the
  sessions and the buffer. The root must then be installed again with
  `OP_BOOT`, which is accepted once per reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LEAF_BITS` | 20 | log2 of the number of blocks (1 TB / 1 MB) |
| `CACHE_BITS` | 14 | log2 of the tree-cache entries |
| `BANK_BITS` | 10 | log2 of the slots per deep tree level (own choice) |
| `RESP_DEPTH` | 102 | held responses (2 KB / 20 B) |

At the defaults, the tree-cache memory is 2^14 x 181 bits, about 2.9 Mbit,
which is FPGA block RAM. Synthesis of `pchip_top` gives about 25k cells and 53k
flip-flop bits besides the memory. `BANK_BITS` must satisfy
`CACHE_BITS >= log2(LEAF_BITS - BANK_BITS + 2) + BANK_BITS`.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds independent
reference models: SHA-1, HMAC and AES encryption. `tb/abs_env.sv` models the
clients, the server (its copy of the tree) and the S chip.

* `tb_pchip_top` runs the whole design at the default sizes.
* `tb_pchip_ctrl` runs the same scenario on a small tree.

The scenario checks refused re-boots, path verification, certified reads,
forged requests, held and passed reads, bad revisions, bad write keys, stale
leaves, root store, forged acknowledgments, release, and a full buffer. It
counts each of these and fails if one never happened.

`tb_workload_micro` runs the same scenario at full size and then a workload
modelled on micro-benchmarks. Two clients make 48 writes, random and then
sequential, over a 2048-block working set, and the root is stored after every
8 writes. Then come 48 certified reads. Only the hashes of the data enter the
tree, so the blocks' contents are not simulated.

Example:

```
verilator --binary --timing -Wno-fatal --top-module tb_pchip_top \
  rtl/abs_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v abs_pkg) \
  tb/abs_env.sv tb/tb_pchip_top.sv
./obj_dir/Vtb_pchip_top
```

Building takes under a minute; the full-size simulation then finishes in about a second.

## Departures and limits

* **The tree engine runs one hash at a time.** The original design can overlap
  updates on different paths and can merge the hashes of sibling nodes. Both
  are left out here. Updates are correct but slower.
* **One data hash engine.** It interleaves four blocks, which reaches roughly
  the rate of one pipelined hash engine. A high-throughput configuration with
  eight engines side by side is not built.
* **Missing units.** The RSA engine (session-key unwrap), the boot engine
  (root recovery from the S chip), the S chip and the network interface are
  not in the RTL.
* **Own choices.** The following are design choices, not given by the
  protocol:
  * field widths, message type codes and byte order;
  * the cache placement rule;
  * the one-outstanding-store rule;
  * `ERR_FULL`;
  * holding bad-revision answers like reads;
  * raising the integrity signal on a wrong write key.
* **Command ordering is up to the server.** The P chip processes one command at
  a time and does not reorder. A server that sends tree commands in a bad order
  only gets errors; it cannot make the P chip accept a wrong value.
