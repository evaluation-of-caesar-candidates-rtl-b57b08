# Trivia-ck, Ketje and MORUS ciphercores

Authenticated encryption with associated data (AEAD) takes a key, a nonce, some
associated data (AD) that is authenticated but sent in the clear, and a message.
It returns the ciphertext and a tag. The receiver runs the same computation on
the ciphertext. It accepts the recovered plaintext only if the recomputed tag
equals the one it received.

This repository holds synthesizable SystemVerilog for three AEAD designs,
each in its throughput-oriented hardware form:

| core | primitive | block per step | key / nonce / tag (bits) |
|---|---|---|---|
| Trivia-ck (first version) | Trivium-like stream cipher with a 385-bit state, plus a polynomial hash over GF(2^32) | 64 bits | 128 / 128 / 128 |
| Ketje (KetjeSr by default, KetjeJr as an option) | KECCAK-p permutation on 400 (or 200) bits in a duplex mode | 32 (or 16) bits | 128/128/128 (Jr: 96/80/96) |
| MORUS (MORUS-640 by default, MORUS-1280-128 as an option) | five-block state with a shift/AND/XOR update | 128 (or 256) bits | 128 / 128 / 128 |

The three cores are independent. `caesar_top` puts them side by side and brings
out each core's full port set, with the prefixes `tv_`, `kj_` and `mr_`. Nothing
is shared but clock and reset.

## The ciphercore interface

All three cores speak the same block interface. In a complete system it is fed
by a pre-processor and drained by a post-processor. The pre-processor parses the
input stream, stores the key and cuts data into blocks. The post-processor
formats the output. Those two units are not part of this repository. Their side
of each core is the port list below.

* **Start.** The source holds `key` and `npub` stable and raises `key_ready`
  and `npub_ready`. The core takes both in one cycle and pulses `key_updated`
  and `npub_read`.
* **Blocks.** A block is presented on `bdi` with `bdi_ready`. It is taken in
  the cycle `bdi_read` is high.
  * `bdi_size` gives the number of valid bytes.
  * `bdi_eot` marks the last block of the AD and, later, the last block of the
    message.
  * All AD blocks come first, then all message blocks.
  * An empty AD or empty message is sent as one block with `bdi_size = 0` and
    `bdi_eot = 1`.
  * `bdi_decrypt` selects decryption and must stay the same for the whole
    operation.
  * MORUS also needs `bdi_seglen`, the byte length of the current AD or message.
    It is used in the tag.
* **Byte order.** Data is little-endian: byte *k* of a block sits at bits
  `[8k+7:8k]`. Keys and nonces are laid out the same way.
* **Output.** Each message block gives one output block on `bdo`, with
  `bdo_size` valid bytes, in the cycle `bdo_write` is high.
  * A core takes a message block only while `bdo_ready` is high. That is the
    back-pressure path.
  * Bytes above `bdo_size` are zero.
* **Tag.** After an encryption, `tag` is valid with `tag_write`, which waits
  for `tag_ready`. After a decryption, the core compares its tag with `exp_tag`.
  It reports the result on `msg_auth_valid` together with `msg_auth_done`.
  * The plaintext has already been sent out on `bdo` by then.
  * Holding it back until authentication is the post-processor's job.
* **Reset.** `rst` is synchronous and active high.

## Trivia-ck

Trivia-ck is the most involved of the three. It is built from three parts: a
stream-cipher state, two universal hashes, and a sequencer that interleaves
them.

**The stream state (`trivia_sc`).** The state is three nonlinear feedback shift
registers: A (132 bits), B (105 bits) and C (147 bits). They are extended
versions of Trivium's registers. Any state bit is read at least 64 iterations
after it was written. That makes 64 iterations per clock possible with plain
duplicated AND/XOR logic, and the core does exactly that. Operations:
* **Load.** Key into A (padded with ones), IV into C (padded with ones), B all
  ones.
* **Update64.** 64 iterations.
* **KeyExt64.** The 64 keystream bits the next 64 iterations would output.
* **StExt64.** 64 state bits used as a hash key.
* **Insert.** XOR a 160-bit value into A and the low 28 bits of B.

**The hash (`trivia_vpvhash`).** Each hash instance keeps a checksum and a tag.
* **Checksum.** A VHorner64 block keeps the checksum: D words of 64 bits, with
  word j updated as `y_j <= alpha^j * y_j ^ x` in GF(2^64). That is Horner's
  rule for the rows of a Vandermonde matrix, i.e. an error-correcting-code
  extension of the input.
* **Tag path.** Each 64-bit input block is XORed with StExt64. Its upper
  32 bits times its lower 32 bits in GF(2^32) gives one product. A VHorner32
  block folds the products into a 160-bit (VPVHash5) or 128-bit (VPVHash4) tag.
* **Checksum fed back.** After the last data block, the checksum words go
  through the same multiplexer and multiplier. That way the checksum is
  authenticated too.

**The multiplier (`trivia_fieldmult`).** A GF(2^32) product by Horner's rule
over the bits of B, most significant first.
* **Stages.** There are 32 "FM" stages, one per bit of B. Each XORs A into the
  running result when its bit is one, then multiplies by alpha. The last stage
  skips the multiply.
* **Pipeline.** A register sits between stages. One product can start every
  cycle and comes out 31 cycles later.
* **Operands.** A and B ride along the pipeline with their partial result.
* **Fields.** Reduction polynomials are x^32 + x^22 + x^2 + x + 1 and, for the
  64-bit checksum, x^64 + x^4 + x^3 + x + 1.

**The sequence (`trivia_ck_core`).** Steps and cycle counts:

| step | cycles | what happens |
|---|---|---|
| load, init | 1 + 18 | load key/IV, 18 × Update64 (1152 iterations) |
| loop1 | 2 per AD block | absorb block into VPVHash5 with StExt64, Update64 |
| loop1end | 4 | the four checksum words into the multiplier; KeyExt64 of the first three cycles kept as a 160-bit mask |
| update T | 32 | drain the multiplier pipeline |
| midstate | 1 | intermediate tag = hash tag ^ mask, inserted into the state |
| init | 18 | 18 × Update64 |
| loop2 | 2 per message block | C = M ^ KeyExt64, plaintext into VPVHash4, Update64 |
| loop2end | 3 | three checksum words; KeyExt64 of the first and last cycle kept as a 128-bit mask |
| update Tag | 32 | drain |
| final | 1 | tag = hash tag ^ mask; output or compare |

* **Padding.** The last AD or message block is padded 10*: a one at bit
  8·size, zeros above. An empty AD or message is the single block 1 0^63.
* **Decryption.** The plaintext is recovered first, then padded and hashed.
* **Timing.** With inputs always ready, the tag appears 110 + 2·(AD blocks +
  message blocks) cycles after the nonce is taken.
* **Counter.** The state machine counts with a one-hot shift register (36 bits),
  so every "count reached" test is one bit.
* **Variant.** The core implements ck = 0: no tags are released mid-message.

## Ketje

Ketje wraps the KECCAK-p permutation in a duplex ("MonkeyWrap") mode.
KetjeSr uses 16-bit lanes (a 400-bit state, 32-bit blocks). KetjeJr uses 8-bit
lanes (200 bits, 16-bit blocks). The lane width is the parameter `W` of
`ketje_core` and `ketje_keccak_round`.

* **One round per clock (`ketje_keccak_round`).** Theta, rho, pi, chi and iota
  are one combinational block.
  * The rho offsets are computed from the KECCAK rule: lane t of the pi
    walk rotates by (t+1)(t+2)/2 mod W. They are not a typed table.
  * The round constants are the low W bits of the KECCAK round constants,
    taken from the last twelve rounds of KECCAK-f. They are stored in
    `ketje_pkg`.
* **Start.** The state is loaded with the keypack and the nonce, padded 10*1 to
  the full state width, then 12 rounds.
  * The keypack is a length byte, the key, then 0x01.
* **Each block.** The block and two frame bits are XORed into the first r = 2W
  + 4 state bits, padded 10*1, then one round. Frame bits:
  * `00` for AD;
  * `01` for the last AD block;
  * `11` for message;
  * `10` for the last message block, which is followed by 6 rounds instead of
    one.
  * The ciphertext is the message XOR the first 2W state bits before
    absorbing.
* **Tag.** The first 2W state bits give one piece of the tag. Each further
  piece absorbs a padded single zero bit and runs one round. KetjeSr takes 4
  pieces (128 bits), KetjeJr 6 (96 bits).
* **State machine.** Wrapping AD, the last AD block, message and the last
  message block all use one *wrap* state and one *step* state. Only the frame
  bits differ between them. A block takes 3 cycles (wait, wrap, step).
* **Timing.** From taking the nonce to the tag: 3 per block plus 26 cycles
  (KetjeSr) or 30 (KetjeJr).

## MORUS

MORUS keeps five N-bit state blocks: N = 128 for MORUS-640, 256 for
MORUS-1280. The parameter is `N` on `morus_core` and `morus_state_update`.

* **State update (`morus_state_update`).** Five rounds run in one clock, with
  no pipeline. Each round:
  * XORs an AND of two blocks and (from round 2 on) the input block into a
    third block;
  * rotates each of that block's four words left by a per-round amount;
  * rotates another block as a whole by a multiple of N/4.
* **Initialisation.** The blocks are loaded as follows, then 16 updates with
  zero input, then s1 ^= key:
  * s0 = nonce;
  * s1 = key (key‖key for MORUS-1280);
  * s2 = all ones;
  * s3 and s4 = a constant whose byte i is Fibonacci(i) mod 256. MORUS-640
    splits it over s3/s4; MORUS-1280 has s3 = 0 and the whole constant in s4.
* **AD.** One update per zero-padded block.
* **Message.** The keystream is s0 ^ (s1 rotated by 3N/4) ^ (s2 & s3). Then
  one update with the plaintext.
  * When decrypting, the update input is the recovered plaintext, with the
    bytes beyond the block size cut to zero. This costs one extra cycle per
    message block.
* **Tag.** s4 ^= s0, then 8 updates with input {message bits, AD bits} (two
  64-bit lengths). The tag is the low 128 bits of s1 ^ s2 ^ s3 ^ s4.
* **Timing.** 3 cycles per block and 29 fixed cycles. An empty AD or message
  costs no update.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. Each testbench is shown to
fail when its module is deliberately broken.

* **Reference models.** The checks compare against models written separately in
  the testbench packages:
  * a bit-serial Trivia-SC (one iteration at a time) with schoolbook field
    multiplication;
  * a KECCAK-p round with the standard rho table and LFSR round constants;
  * a word-level MORUS update.
* **The driver checks.** Drivers (`*_drv.sv`) push random keys, nonces, AD and
  messages through each core. They:
  * encrypt;
  * decrypt with the correct tag and with a corrupted one;
  * compare every output byte and tag;
  * check the cycles per block and the fixed latency above.
* **Stalls.** Every other test starves the core of input, drops `bdo_ready` at
  random, and holds `tag_ready` low on a finished tag.
* **End-to-end test.** `caesar_top_tb` runs all three cores at the default sizes
  at the same time. It counts each of these events and fails if any never
  happens:
  * encrypt;
  * decrypt accepted;
  * forged tag rejected;
  * empty AD;
  * empty message;
  * partial block;
  * multi-block message;
  * input stall;
  * output back-pressure;
  * tag stall.

* **Long messages.** `caesar_top_long_tb` encrypts and decrypts 1 KiB
  messages on all three cores with the inputs always ready. The per-block rate
  is checked on every block.

**Limitation:** the models and the RTL were written from the same description
of the algorithms. No official known-answer test vectors were available, so a
shared misreading of a specification detail would not be caught. Candidates are:
* bit and byte order;
* which keystream words form the Trivia-ck masks;
* the MORUS length block.

Check against the designers' reference code before relying on
interoperability.

## Differences from the reference hardware description

* **Trivia-ck.**
  * **Fixed latency.** 110 cycles against the quoted 109. The difference is
    the block handshake.
  * **Mask words.** The reference text names "the first and third", and
    elsewhere "the first and last", keystream words for the 160-bit mask.
    Two 64-bit words cannot cover 160 bits. This core uses the first three.
  * **State count.** The state machine has 14 states, not 20. The
    AEAD-interaction states are folded into the handshake.
  * **Register duplication.** The duplicated registers for timing closure
    were not reproduced.
  * **Multiplier operands.** A and B are registered along the multiplier
    pipeline instead of shared.
* **Ketje.**
  * **KetjeSr fixed latency.** 26 cycles against the quoted 27. KetjeJr
    matches at 30.
  * **KetjeJr tag length.** 96 bits (six pieces). One passage says 90 bits.
* **MORUS.**
  * **Rotation.** The description says "shift" in one place and "rotate" in
    another. Rotation is used.
  * **Fixed latency.** 29 fixed cycles against the quoted 28.
  * **Empty segments.** An empty AD or message causes no state update.
* **All cores.**
  * **No byte reversal.** The reference code reverses byte order at the state
    boundary to match C code. Here the state is simply little-endian.
  * **Padding inside the core.** Padding is done in the core from `bdi_size`.
* **Not included.**
  * **Other variants.** The area-optimised variants (a 1-bit Trivia-SC
    update, a rolled-up multiplier, a Ketje state kept in memory) and the
    Trivia-ck version 2 prototype are not included.
  * **Trivia-ck intermediate tags.** These (ck = 128) are not included.
  * **MORUS-1280-256.** Not included.
  * **API processors.** The pre- and post-processor of the AEAD hardware API
    are not included.

## Files

| file | contents |
|---|---|
| `rtl/caesar_top.sv` | the three cores side by side (`KETJE_W` = 16 or 8, `MORUS_N` = 128 or 256) |
| `rtl/trivia_ck_core.sv`, `trivia_sc.sv`, `trivia_vpvhash.sv`, `trivia_vhorner.sv`, `trivia_fieldmult.sv`, `trivia_pkg.sv` | Trivia-ck |
| `rtl/ketje_core.sv`, `ketje_keccak_round.sv`, `ketje_pkg.sv` | Ketje |
| `rtl/morus_core.sv`, `morus_state_update.sv` | MORUS |
| `tb/*_ref_pkg.sv` | reference models |
| `tb/*_drv.sv` | per-core stimulus, checking and mechanism counters |
| `tb/<module>_tb.sv` | one testbench per module; `caesar_top_tb` is end to end, `caesar_top_long_tb` the long-message rate check |

## Simulating

With Verilator 5, from the repository root (packages first):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/ketje_pkg.sv rtl/trivia_pkg.sv \
  tb/ketje_ref_pkg.sv tb/morus_ref_pkg.sv tb/trivia_ref_pkg.sv \
  tb/caesar_top_tb.sv --top-module caesar_top_tb
./obj_dir/Vcaesar_top_tb
```

Replace `caesar_top_tb` with any other testbench name to run a single module's
test. Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.
It also has a watchdog that counts a failure if the run hangs. The end-to-end
test runs at the default parameters in well under a minute.
