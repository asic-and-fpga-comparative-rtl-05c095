# Lightweight authenticated-encryption cores for IoT nodes

This RTL is a small hardware security module for battery-powered IoT devices.
It holds several authenticated ciphers from the CAESAR competition, each of
which encrypts a message and, in the same pass, computes a 128-bit tag over
the message and its associated data (AD, such as a packet header that is
authenticated but sent in clear). The receiver recomputes the tag and throws
the message away if the tags differ. The cores are meant to run at a low
clock, nominally 10 MHz, where power matters more than speed. They trade area
against throughput in different ways:

| core | block per clock step | what it is | throughput in the message phase at 10 MHz |
|------|---------------------|------------|-----------------------------|
| `ascon_core` | 64 bits, 7 cycles | ASCON-128 sponge, one permutation round per clock | 91 Mbit/s |
| `acorn_core` | 8 bits, 1 cycle | ACORN v2 stream cipher, 8 state steps per clock | 80 Mbit/s |
| `morus_core` | 256 bits, 1 cycle | MORUS-1280-128, one full state update per clock | 2.56 Gbit/s |
| `aes128_enc` | 128 bits, 11 cycles | AES-128 encryption, one round per clock | 116 Mbit/s (block cipher only) |

Those throughput figures count only the message phase. They follow the usual
estimate: block size / (cycles per block) × clock. Each operation also has a
fixed cost. ASCON spends 12 cycles before and after the data, and ACORN about
350 cycles in all. MORUS spends 26 cycles, and AES 1 load cycle per block.

ASCON, MORUS and ACORN are each wrapped in a complete AEAD core. These cores
speak a 32-bit word protocol in the style of the CAESAR hardware API. The top,
`caesar_hsm_top`, has three sets of word ports:

- `pdi`/`sdi`/`do` for ASCON;
- `morus_pdi`/`morus_sdi`/`morus_do` for MORUS (module `morus_aead`);
- `acorn_pdi`/`acorn_sdi`/`acorn_do` for ACORN (module `acorn_aead`).

The AES engine's block interface is brought out directly. The same pre- and
post-processor serve all three wrapped cores; only their block width
parameter `BLK` differs: 64 for ASCON, 256 for MORUS and 32 for ACORN.

The word interface sets its own speed limits. Behind it, MORUS moves at most
one 32-bit word per clock (320 Mbit/s at 10 MHz). Its 2.56 Gbit/s is reached
only by feeding blocks to `morus_core` directly. ACORN behind the word
interface takes 5 clocks per 4 bytes (64 Mbit/s).

## The AEAD core: how a message flows (ASCON shown; MORUS and ACORN follow the same pattern)

```
 sdi (key) ──┐
             ├─> preprocessor ──bdi blocks──> ascon_core ──bdo blocks──> postprocessor ──> do
 pdi (data) ─┘        │                          │ tag                     ^   ^
                      └──── bypass FIFO 4 x 24 ──┼─────────────────────────┘   │
                                                 └──> (tag compare) <── aux FIFO 32 x 64
```

**Pre-processor** (`preprocessor.sv`). It reads 32-bit valid/ready words,
parses the headers and packs words into 64-bit blocks (serial in, parallel
out). It clears the bytes of a partial last word and tells the core how many
bytes of each block are valid. The cipher core adds the algorithm's own
padding bit. This keeps the pre-processor generic.

**Bypass FIFO** (`fwft_fifo`, 4 entries × 24 bits, first word falls through).
It carries to the post-processor what the cipher core does not provide:

- the message header {type, flags with bit 0 = decrypt, length};
- for decryption, the expected tag.

The FIFO is only 24 bits wide, so the tag crosses as eight 16-bit halves,
each tagged with the TAG type. The message has already gone into the core by
then, so stalling on the small FIFO costs nothing.

**Post-processor** (`postprocessor.sv`). It turns output blocks back into
words (parallel in, serial out). It zeroes the bytes past the end of the
message and writes the output segments.

- **Encryption:** ciphertext words go straight out, then the tag.
- **Decryption:** the plaintext words go into the **auxiliary FIFO** first.
  When the core's tag is ready, the post-processor compares it with the
  expected tag. On a match it replays the FIFO to `do`. On a mismatch it
  flushes the FIFO and sends only a failure status word, so unauthenticated
  plaintext never leaves the chip.

The start of an operation is gated by `op_ready`. It requires the core and
post-processor to be idle and the bypass FIFO to be empty, so operations never
overlap.

### Word formats

Every instruction or segment header is one 32-bit word. Bits [31:28] hold the
opcode or segment type and bits [15:0] the length in bytes. Data bytes are
packed big-endian: the first byte of a segment is bits [31:24] of its first
word.

| code in [31:28] | meaning |
|------|---------|
| 2 / 3 / 4 (instruction) | encrypt / decrypt / load key |
| 1 | associated data |
| 4 / 5 | plaintext / ciphertext |
| 8 | tag (16 bytes) |
| C | key (16 bytes, on sdi) |
| D | nonce (16 bytes) |

The inputs arrive in this order:

- **sdi:** `LDKEY`, `KEY` header, 4 key words.
- **pdi, encryption:** `ENC`, `NPUB` header, 4 nonce words, `AD` header and words, `PT` header and words.
- **pdi, decryption:** the same with `DEC` and a `CT` header, then a `TAG` header and 4 tag words.

An AD segment of length 0 may be sent. The AD header may also be left out: any header other than AD is taken as the message. The testbenches always send an AD header.

The outputs on `do` are:

- **encryption:** `CT` header, ciphertext words, `TAG` header, 4 tag words, `0xE0000000`;
- **authentic decryption:** `PT` header, plaintext words, `0xE0000000`;
- **forged decryption:** only `0xF0000000`.

The auxiliary FIFO holds `AUX_DEPTH` (default 64) words. So with the default
top, one decrypted message may be at most 256 bytes, and a longer one would
stall. Encryption has no length limit beyond the 16-bit length field. Raise
`AUX_DEPTH` for longer packets.

### MORUS and ACORN behind the same wrapper

`morus_aead` is the same chain with `BLK = 256`: eight words fill a block. The
word interface is big-endian: the first byte sits in the top bits. MORUS
counts its bytes from the bottom of a block. So the wrapper reverses the byte
order of the key, the nonce, every data block and the tag between the
processors and the core. Byte n of a segment on `morus_pdi` is thus byte n of
the MORUS block, and the tag comes out in the same byte order as the
ciphertext.

`acorn_aead` runs the processors with `BLK = 32`: one word per block. ACORN
takes one byte per clock, so a small width converter sits on each side of the
core:

- **Input converter.** It holds a 32-bit block and hands it to the core byte
  by byte, first byte first. The last byte carries `bdi_last`. A size-0 block
  (empty message) goes through as one size-0 beat.
- **Output converter.** It gathers output bytes back into a 32-bit block. The
  block is released after four bytes, or after the last message byte. The
  converter finds the last byte by counting the bytes fed in against the
  bytes returned.

Key, nonce and tag bytes are reversed as for MORUS.

## The cipher cores

All cores share one block interface:

- `start` (with `key`, `npub`, `decrypt`) begins an operation while `busy` is low;
- blocks go in on `bdi`/`bdi_valid`/`bdi_ready`, with `bdi_type` (0 AD, 1 message), `bdi_last` and `bdi_size` (valid bytes);
- output blocks come out on `bdo`/`bdo_valid`/`bdo_ready` with `bdo_size`;
- `tag`/`tag_valid` ends the operation.

If the first block after start is a message block, the AD is empty. An empty
message is sent as one last block of size 0. Reset is synchronous and active
low.

**ASCON-128** (`ascon_core.sv`, `ascon_round.sv`). It keeps a 320-bit state
as five 64-bit words. `ascon_round` is one round of the permutation, purely
combinational. The core applies it once per clock: 12 rounds at
initialization and finalization, 6 after each 64-bit block. The IV is
0x80400c0600000000. After the AD, a 1 is XORed into the last state bit to
separate the AD from the message. A message that ends exactly on a block
boundary gets an extra padding-only block, as the ASCON padding rule requires.
The core checks neither tags nor lengths; the post-processor does.

**ACORN v2** (`acorn_core.sv`). This is a stream cipher with a 293-bit state:
six LFSRs plus a few extra bits. Each step shifts in one input bit and
produces one key-stream bit. The core chains 8 steps per clock, so it handles
one byte per cycle. Encryption and decryption share the datapath. For
decryption the bit fed back is the recovered plaintext. The fixed phases are:

- initialization, 1792 steps (224 cycles);
- 256 padding steps after the AD and after the message (32 cycles each);
- finalization, 768 steps (96 cycles), whose last 128 key-stream bits form the tag.

Bits are taken least significant first. Byte n of the key is `key[8n+7:8n]`.
`bdo_size` is always 1.

**MORUS-1280-128** (`morus_core.sv`). The state is five 256-bit words. One
state update is five rounds of AND, XOR and rotations: within each 64-bit
lane by 13, 46, 38, 7 and 4, and of the whole word by 64, 128, 192, 128 and
64. The core does one update per clock and so takes a 32-byte block per cycle.
Initialization runs 16 updates, and finalization runs 8 with the bit lengths
of AD and message as input. Bytes are little-endian within the 256-bit block:
byte i is `bdi[8i+7:8i]`. This core has the largest block and so the highest
throughput. It also needs about 1900 flip-flops, far more than the others.

**AES-128** (`aes128_enc.sv`). This is the block cipher under the AES-based
modes (CLOC, SILC). It does one round per clock and expands the key on the
fly. Its latency is 11 cycles: 1 load and 10 rounds. The S-box is computed in
logic, as the GF(2^8) inverse followed by the affine map. No table is stored.
Only encryption is built, because these modes use the forward cipher for both
directions.

### Latency through the word interface

The top-level test measures the delay from the message header on `pdi` to
the first ciphertext word on `do`. The output is held back at random a
quarter of the time. The mean delays were:

- ASCON: about 11 cycles;
- MORUS: about 13 cycles;
- ACORN: about 84 cycles.

ACORN is much slower because it must finish its 256 padding steps after the
AD, and at times the end of its initialization, before the first message byte
goes through. ASCON has the shortest delay and ACORN the longest.

## What is not here

The comparison this design follows covers eight ciphers. Four of them exist
here only in part or not at all:

- **CLOC and SILC:** only their AES-128 engine is built, not the modes around it. The modes' tweak functions, padding and length encoding are not given by the source this design follows.
- **JOLTIK, PRIMATEs (GIBBON) and SCREAM:** not built. Their S-boxes, diffusion matrices, tweak schedules and round constants are defined in their own specifications, which this design did not have.

The AES engine has no word-level wrapper, since the modes that would use it
are not built.

## Where this departs from the source description, and why

- **AES ShiftRows.** The source describes ShiftRows as a right rotation of the rows. Standard AES rotates left, and that is what is built, so results match FIPS-197.
- **MORUS finalization.** It uses 8 state updates, as the source states, and the reference model in `tb/` does the same. The published MORUS specification is believed to run 10 here. The count is the `FINAL_STEPS` parameter. Tags will match other MORUS implementations only if the two agree, so check this before interoperating.
- **Bypass FIFO.** It carries headers and tag halves only. AD is absorbed by the core and is not copied to the output.
- **Sizes without a source.** The 32-bit word width, the word formats above and the auxiliary FIFO depth are this design's choices.
- **ACORN.** It runs 8 steps per clock, the parallel form the source uses for its results.

## How far it can be trusted

- **ASCON and AES.** ASCON reproduces a published ASCON-128 known-answer tag, so its permutation, padding and domain separation are right. AES passes the FIPS-197 example vectors and 40 random blocks checked against a separate byte-level model.
- **ACORN and MORUS.** No official test vectors were available for them. Both are checked only against bit-level and lane-level reference models written separately in `tb/`, from the algorithm specifications. Both model and RTL could therefore share a misreading of the specification. Check them against the official known-answer files before relying on them.
- **Block widths of the processors.** The pre- and post-processor are unit-tested at `BLK = 64`. The 32- and 256-bit settings used for ACORN and MORUS are exercised only through the top-level test.
- **Cycle counts.** Each core's testbench checks the exact cycle count from `start` to `tag_valid` against the schedule above.
- **Protocol.** The wrapper is tested for all segment combinations, including:
  - empty AD or message;
  - partial and exact final blocks;
  - authentic and forged decryption;
  - stalls on `do`, `pdi` and the bypass FIFO.

  It is not hardened against malformed headers. An unexpected entry in the tag path makes the decryption fail, but other header errors are not detected.
- **No side-channel protection.** Nothing here is protected against side channels. Tag comparison is a plain equality check.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung run.
The reference-model packages in `tb/` must come before the testbench on the
command line. For example:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_caesar_hsm_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/aead_pkg.sv tb/acorn_ref_pkg.sv tb/aes_ref_pkg.sv tb/ascon_ref_pkg.sv tb/morus_ref_pkg.sv \
  tb/tb_caesar_hsm_top.sv
./obj_dir/Vtb_caesar_hsm_top
```

Swap in the other testbenches by name:

| testbench | what it checks |
|-----------|----------------|
| `tb_ascon_round`, `tb_ascon_core` | ASCON permutation and mode, known-answer tag, random lengths, cycle count |
| `tb_acorn_core`, `tb_morus_core` | random operations against the reference models, cycle count, decrypt round trip |
| `tb_aes128_enc` | FIPS-197 vectors, random blocks against the model, latency |
| `tb_fwft_fifo` | FIFO order, full/empty, flush, random traffic |
| `tb_preprocessor`, `tb_postprocessor` | the wrapper halves alone, against expected block and word streams |
| `tb_caesar_hsm_top` | the whole module at its default parameters |

`tb_caesar_hsm_top` runs key loads, encryptions, and authentic and forged
decryptions through the word interface, with random stalls. It also runs the
AES port. It also runs encryptions and authentic and forged decryptions
through the MORUS and ACORN word ports, each checked against its reference
model. It counts each mechanism and fails if one never occurred. The mechanisms are:

- key load, encryption, authentic and forged decryption;
- empty AD, empty message, partial and exact last blocks;
- tag transfer through the bypass FIFO;
- output back-pressure;
- each side core.

## Files

- `rtl/aead_pkg.sv`: opcodes, segment types, status words, bypass entry type.
- `rtl/caesar_hsm_top.sv`: the top: the three AEAD cores and the AES engine.
- `rtl/morus_aead.sv`: MORUS behind the pre/post-processor, with the byte-order mapping.
- `rtl/acorn_aead.sv`: ACORN behind the pre/post-processor, with the byte-width converters.
- `rtl/preprocessor.sv`, `rtl/postprocessor.sv`, `rtl/fwft_fifo.sv`: the wrapper.
- `rtl/ascon_core.sv`, `rtl/ascon_round.sv`, `rtl/acorn_core.sv`, `rtl/morus_core.sv`, `rtl/aes128_enc.sv`: the cipher cores.
- `tb/*_ref_pkg.sv`: reference models of ASCON, ACORN, MORUS and AES-128.
- `tb/tb_*.sv`: the testbenches.
