# YASIR: authenticating legacy serial SCADA frames without holding them back

Legacy SCADA links are slow serial lines: at 9600 baud one octet takes about a
millisecond. Modbus and DNP3 carry no cryptography. A *bump-in-the-wire* (BITW) module
can add it without touching the devices. One module sits next to each device and
protects the frames in transit.

The usual way to add integrity is to append a MAC. The receiving module then has to
**hold back** the whole frame until the MAC has been checked, so the added latency
grows with the frame length. YASIR avoids this. The receiving module relays the frame
to its device as it arrives, only **10 octets late**. The 10 octets are the length of
the truncated HMAC tag. When the last content octet leaves, the whole tag has arrived
and been checked. If the tag is wrong, the module does not close the frame normally.
It appends two octets that break the device's own CRC or length check, so the device
drops the frame itself. The extra latency is 10 octet-times plus the time needed to
recognise the end symbol, whatever the frame length.

This repository holds synthesizable SystemVerilog for one YASIR module (Transmitter
and Receiver roles sharing one AES-128 core and one SHA-1 core), along with
self-checking testbenches.

## The protected frame

A legacy frame is `S || H || P || E`, where S and E are the protocol's start and end
symbols, H is the header and P the payload. The Transmitter sends:

```
S || CTXT || E || mac || seq || E
      |            |      |
      |            |      +-- 4 octets, the frame's sequence number, MSB first
      |            +--------- 10 octets, first 80 bits of HMAC-SHA-1_HK(seq || SHA-1(CTXT))
      +---------------------- AES-128-CTR_SK(H || P), same length as H || P
```

* **Keystream.** Keystream block *i* of a frame is `AES_SK(seq || i || 0^64)`, with
  32-bit big-endian `seq` and `i`. Octet *k* of the content is XORed with octet
  `k mod 16` of block `k / 16`.
* **Tag.** `mac = HMAC-SHA-1(HK, seq || digest)[159:80]`, where `digest = SHA-1(CTXT)`
  and `seq` comes first as 4 octets. HK is 160 bits, zero-padded to the 64-octet
  block as RFC 2104 requires.
* **Why hash first.** The HMAC input is always 24 octets, so the tag takes the same
  time for any frame length. The Receiver can also re-run the HMAC with another
  sequence number without hashing the frame again.
* **Integrity only.** With `encrypt_en = 0`, CTXT is the cleartext H || P. Use this
  for broadcast or audited links. Everything else stays the same.

## Transmitter (`yasir_tx`)

The Transmitter adds **no delay** to the content:

* S, every content octet and the middle E leave on the same clock they arrive.
* Each content octet is XORed with a precomputed keystream octet.
* The AES core computes the next keystream block in the background: at S for block 0,
  and after every 16th octet for the next block.
* Each ciphertext octet also goes into the running SHA-1.

At E, the Transmitter finishes the hash, computes the tag, and sends
`mac || seq || E` as a burst of 15 tokens. From E to the first tag octet takes at most
about 330 clocks: up to 165 to finish the hash and 165 for the HMAC. The first frame
after a key change needs 164 more, because the key blocks must be compressed once. So
at 115200 baud, the tag is ready within one byte-time (69.4 µs) for any clock above
about 4.8 MHz, or 7.2 MHz for a key's first frame.

`SEQ_T` is assigned to a frame at its S and then incremented, so a sequence number is
never reused under one key. A device token that arrives while the tail is pending is
dropped and `overrun` pulses.

## Receiver (`yasir_rx`): the 10-octet delay line

This is the core of the scheme.

**Relaying the content.** The Receiver keeps a circular buffer of 10 octets. Each
ciphertext octet from the link is handled as follows:

1. It is decrypted with the keystream for the *predicted* sequence number `SEQ_R`.
2. The plaintext goes into buffer slot `ctr mod 10`.
3. The plaintext that was in that slot, which arrived 10 octets earlier, goes to the
   device.
4. The ciphertext octet goes into the running SHA-1.

**Checking the tag.** At the middle E, the Receiver finishes the hash and starts
computing `mac'' = HMAC(SEQ_R || digest)`. The next 10 link octets are the received
tag `mac'`. Each one pushes one more plaintext octet out of the buffer and takes its
slot. After the tenth:

* all of H || P has been relayed;
* the buffer holds `mac'`, rotated by the write position: tag octet *i* is in slot
  `(ctr + i) mod 10`.

The comparison reads the slots in that rotated order, so no buffer rotation is needed.
If the HMAC has not finished yet, the decision waits for it. The sequence-number
octets that arrive meanwhile are still collected.

**Case I (`mac' = mac''`).** The Receiver sends E. The device receives
`S || H || P || E` exactly as sent, and `SEQ_R` advances. The trailing seq octets are
ignored.

**Case II (tag mismatch, or an E before all 10 tag octets).** The Receiver sends
`err0, err1, E` on consecutive clocks. `err` is the bitwise complement of the CRC of
everything already relayed (`yasir_err_gen`, CRC-16/MODBUS by default):

* For a protocol whose last two octets are a CRC over the preceding content, `err`
  can never equal the CRC the device computes.
* For a protocol that checks the frame length against its header, two extra octets
  break that check.

Either way, the device discards the frame. Some plaintext of a forged frame does reach
the device, but the device never accepts it as a frame.

**Re-synchronisation.** Frames lost or corrupted on the link leave `SEQ_R` behind
`SEQ_T`. After Case II, the Receiver collects the 4 seq octets. If `seq' > SEQ_R`, it
runs the HMAC again on the saved digest with `seq'`. If that matches the received tag,
it sets `SEQ_R = seq' + 1` (`resync` pulses). Replayed frames carry an older sequence
number, so they are never accepted and never move `SEQ_R` back.

A start symbol at any point abandons the frame in progress and starts a new one, in
both roles.

## End-to-end delay

The delay between the two devices, measured at line pacing (one octet per byte-time),
is as follows:

* the first n − 10 content octets arrive exactly 10 byte-times late;
* the last 10 content octets arrive 11 byte-times late, because the middle E takes one
  slot on the link before the tag octets that push them out;
* the closing E arrives 10 byte-times late.

Symbol recognition outside the module adds its own time at each end. A receiver that
holds the frame back would instead add the frame length plus the tag: 30 byte-times
for a 20-octet frame, 266 for a 256-octet frame.

## Crypto engines

* `aes128_core`: FIPS-197 encryption only (CTR mode needs no decryption).
  * One round per clock, with the round key expanded on the fly.
  * `done` is high 11 clocks after the edge that samples `start`.
  * The S-box is computed, not stored: GF(2^8) inverse as x^254, then the affine map.
* `sha1_core`: one 512-bit compression.
  * One round per clock, with the message schedule in a 16-word shift register.
  * 81 clocks from start to done.
  * It copies the block at start, so the caller can refill its buffer at once.
* `yasir_auth`: the hash/HMAC sequencer around a single `sha1_core`.
  * `init` starts a hash. `upd_valid` writes one octet into the 64-octet message
    buffer, and a full buffer is compressed in the background.
  * `fin` pads the last block (one or two compressions) and latches the digest.
  * `mac_start` runs the HMAC. The compressions of the key blocks K^ipad and K^opad
    depend only on the key. Their results are kept in a two-entry cache tagged with the
    key, with least-recently-used replacement. There are two entries because a module
    has one HMAC key per direction.
  * With the key cached, the HMAC is two compressions (inner data, outer data) and
    takes 165 clocks. With a new key, the two key blocks are compressed first and
    cached, for 329 clocks. Neither time depends on the frame length.
  * A `fin` or `mac_start` that arrives while the unit is busy waits its turn.
  * An assertion flags a second block filling before the first is compressed. That
    would need octets less than about 1.3 clocks apart, far from serial-line rates.

## One module, two roles (`yasir_bitw`)

Serial SCADA is poll/response, so a module never transmits and receives protected
frames at the same time. `yasir_bitw` therefore shares one AES core and one
`yasir_auth` between `yasir_tx` and `yasir_rx`:

* A role owns the cores from its start symbol until its controller is idle again.
* The other side's tokens are dropped during that time, and `collision` pulses.
* If both start symbols arrive on the same clock, the Transmitter wins.

The controllers talk to the cores through the request/response structs in `yasir_pkg`
(`aes_req_t`, `aes_rsp_t`, `auth_req_t`, `auth_rsp_t`), which the top multiplexes.

Each direction has its own key inputs: `tx_sk`/`tx_hk` for device→link and
`rx_sk`/`rx_hk` for link→device. At the far module they are swapped. `rekey` resets
both sequence numbers to zero and should be pulsed whenever new keys are loaded.

Size after generic synthesis (Yosys, word-level cells): about 8.9k cells and 4.7k
flip-flop bits for the whole module. Most of the logic is AES. Most of the flip-flops
are the hash and HMAC state: the message buffer, the chaining values and the key cache
(about 960 bits).

## Interfaces and timing

All four streams use `yasir_pkg::token_t`: a 2-bit kind (`TOK_DATA`, `TOK_START`,
`TOK_END`) and an octet, with a one-clock valid strobe and no back-pressure.

| top port | direction | carries |
|---|---|---|
| `dev_in_valid/dev_in_tok` | in | frames from the local SCADA device |
| `link_out_valid/link_out_tok` | out | protected frames to the link |
| `link_in_valid/link_in_tok` | in | protected frames from the link |
| `dev_out_valid/dev_out_tok` | out | relayed frames to the local device |
| `tx_sk, tx_hk, rx_sk, rx_hk` | in | 128-bit AES and 160-bit HMAC keys per direction |
| `encrypt_en`, `rekey` | in | confidentiality on/off; sequence-number reset |
| `tx_seq`, `rx_seq` | out | `SEQ_T`, `SEQ_R` |
| `tx_frame_done`, `rx_mac_ok`, `rx_mac_bad`, `rx_resync`, `tx_overrun`, `collision` | out | one-clock event pulses |

The design assumes the following about its environment:

* **Symbol recognition.** Finding S and E on the wire is protocol specific (e.g. a
  start character, or a silence of 3.5 octet-times in Modbus/RTU). A recogniser in
  front of the module must do it.
* **Line pacing.** A UART or line driver must pace the outputs. Most of the time there
  is at most one output token per input token, but two bursts are emitted one token
  per clock: the Transmitter tail (15 tokens) and the Receiver's `err0, err1, E`. A
  small FIFO in the line driver absorbs them.
* **Token spacing.** Tokens of a frame must be at least 12 clocks apart, so that the
  next keystream block is ready. Assertions in both controllers check this. On a real
  line tokens are thousands of clocks apart.
* **Reset.** `rst_n` is an asynchronous, active-low reset. Sequence numbers reset to
  zero.

## Choices made where the source description is silent or inconsistent

* **Sequence-number timing.** The prose says a frame uses `SEQ_T` and then increments
  it. The state-machine listing increments first. This design follows the prose, so
  both ends start at 0 after a rekey.
* **What is hashed.** The Transmitter listing stores the plaintext into the hash
  buffer, while the prose and the Receiver hash the ciphertext. This design hashes the
  ciphertext at both ends.
* **Tag input.** The prose writes the tag input three slightly different ways. This
  design follows the state-machine form `HMAC(seq || Hash(CTXT))`, which keeps the
  digest independent of the sequence number.
* **Delay buffer location.** One cost remark puts the 10-octet buffer in the
  Transmitter. The algorithm and the latency analysis put it in the Receiver, which is
  where it is here.
* **Unspecified details.** The original description fixes none of these:
  * the keystream block layout and all octet orders;
  * the CRC used for `err` (parameters `CRC_POLY`/`CRC_INIT` on `yasir_rx`);
  * the token interface;
  * the handling of an early E in the tag;
  * the role arbitration;
  * per-direction keys.
* **HMAC cost.** The original analysis counts about two SHA-1 compressions for the
  tag. That assumes the K^ipad/K^opad states are precomputed per key. Here they are
  computed on a key's first use and then cached. The cache is this design's own
  mechanism.

Not part of this RTL: the S/E symbol recogniser, the serial transceivers, and key
negotiation. The original description leaves all three to the protocol or treats
them as out of scope.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog, and all
of them use a shared reference model (`tb/yasir_ref_pkg.sv`). The reference is plain
sequential SHA-1, HMAC, AES (its S-box is built by the log/antilog walk, not the RTL's
circuit), CRC-16 and the two YASIR frame transforms. The testbenches first check the
reference against FIPS-197, FIPS 180 and RFC 2202 vectors.

| testbench | what it covers |
|---|---|
| `tb_aes128_core` | FIPS-197 vectors, 40 random pairs, 11-clock latency |
| `tb_sha1_core` | empty/"abc"/random messages, chained blocks, 81-clock latency |
| `tb_yasir_auth` | 0–200-octet frames across padding and block boundaries; tags; HMAC time with new and cached keys; second tag on kept digest; key-cache hits and replacement |
| `tb_yasir_err_gen` | CRC-16/MODBUS check value, random strings, err never equals the CRC |
| `tb_yasir_tx` | protected frames token for token; zero added latency; seq counting, rekey, cleartext mode, abandoned frame, overrun |
| `tb_yasir_rx` | Case I relay with exact 10-octet delay; Case II for corrupted ciphertext/tag, replay, forged seq, truncated tag; re-sync after losses; cleartext mode; rekey |
| `tb_yasir_bitw` | two modules on a link with an adversary: polls and answers (including 20- and 256-octet frames), tampering, dropped frames and re-sync, role switching, cleartext mode, rekey, collision. Runs the top at its default configuration. |
| `tb_yasir_line` | two modules at 9600 and 115200 baud pacing with a 10 MHz clock; 20- and 256-octet frames both ways; zero Transmitter delay, tag one byte-time after E, per-octet Receiver delay, worst delay in byte-times |

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/yasir_pkg.sv tb/yasir_ref_pkg.sv tb/tb_yasir_bitw.sv --top-module tb_yasir_bitw
./obj_dir/Vtb_yasir_bitw
```

Each run takes a few seconds, except `tb_yasir_line`, which simulates about five
million clocks and takes about half a minute. To test another block, substitute its
testbench name.

## Files

`rtl/yasir_pkg.sv` holds the shared types and constants. The modules are
`aes128_core`, `sha1_core`, `yasir_auth`, `yasir_err_gen`, `yasir_tx`, `yasir_rx` and
the top `yasir_bitw`. Each file opens with a description of the module's behaviour,
interface and timing.
