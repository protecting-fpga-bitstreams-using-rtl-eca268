# Authenticated FPGA configuration with a compact AES-CCM core

An FPGA that only decrypts its bitstream protects the design from copying,
but it will still load anything an attacker manages to send it. This RTL
adds authentication. The configuration frame is protected with AES-CCM
(counter mode with CBC-MAC). The static configuration logic stores the frame,
decrypts it and computes its MAC. It releases the bitstream only when that
MAC equals the MAC the frame carries. Otherwise it erases what it loaded and
reports an abort.

The main idea is that CCM needs only the forward AES cipher, for both halves
of the job:

* **CBC-MAC** gives authentication: `Y = E(...E(E(B0) ^ M1)... ^ Mm)`.
* **CTR** gives confidentiality: `S_i = E(CTR_i)` and `C_i = M_i ^ S_i`.
* The tag combines the two: `Tag = Y ^ S_0`.

One small AES core can therefore do both, one after the other. That core
has a 32-bit data path and computes a quarter of a round per clock. It has
four S-boxes held as ROM and one MixColumns unit. The key schedule borrows
the same four S-boxes. Each 128-bit block costs two AES operations of 55
cycles, 110 cycles in all. At the 350 MHz quoted for a 90 nm implementation
of this architecture, that is 128 x 350 / 110 = 407 Mbit/s. This is enough
for a configuration port of about 400 Mbit/s, such as that of the Spartan-3.

```
 frame: | MAC | C1 | C2 | ... | Cm |
          |     \____________________ bitstream_mem (in place) ___ user logic
          |                                 ^   |                  (ul_rd_*, only
          v                                 |   v                   after a match)
     mac_compare  <-- computed MAC ----  ccm_core (aes32_core + ccm_counter)
          |                                   ^
          v                                   |  key (pre-loaded)
      cfg_ctrl  -> cfg_startup / cfg_abort (+ clear memory)
```

## One configuration, step by step

`secure_config_top` is the unit. `cfg_ctrl` sequences each configuration:

1. **Start.** `cfg_start` samples `nonce` (96 bits) and `nblocks`, the
   bitstream length in 128-bit words. If `nblocks` is larger than the memory,
   the unit aborts at once.
2. **Load.** The frame arrives on `bs_valid`/`bs_ready`/`bs_data`. Its first
   word is the MAC, which is kept in a register. The `nblocks` words that
   follow are written to addresses `0..nblocks-1` of `bitstream_mem`. The
   sender may drop `bs_valid` at any time to pause.
3. **Decrypt and authenticate.** `ccm_core` is started in decrypt mode and
   takes over both memory ports. Its CTR pass turns the ciphertext into
   plaintext in place. Its CBC pass then computes the MAC of that plaintext.
4. **Compare.** `mac_compare` checks all 128 bits of the computed MAC
   against the received one.
5. **Match: startup.** `cfg_startup` goes high and stays high. The
   user-logic read port `ul_rd_en/ul_rd_addr -> ul_rd_data` (one cycle of
   latency) now returns the decrypted bitstream.
6. **Mismatch: abort.** Every loaded word is overwritten with zero, one word
   per cycle. Then `cfg_abort` goes high and stays high.

`cfg_busy` is high from step 1 to step 6. Until a configuration has been
authenticated, `ul_rd_data` reads as zero, so unauthenticated plaintext never
reaches the fabric. A new `cfg_start` is accepted in the idle, startup and
abort states.

Timing: loading takes one cycle per word when the stream does not pause.
Decryption with authentication takes `110*(nblocks+1) + 5` cycles from the
last frame word to the drop of `cfg_busy`. The extra 110 cycles are the two
CCM-only operations on `B0` and `CTR_0`.

## The 32-bit AES core (`aes32_core`)

This is the part that needs the most care. The state lives in two 128-bit
registers:

* The **input register** `st_q` holds the state at the start of a round.
  ShiftRows is just wiring on its output.
* The **output register** `ob_q` has four 32-bit slots, and the round
  result is written into it one column per cycle.

Each column cycle takes one column of `ShiftRows(st_q)` and passes it
through the four S-boxes and the MixColumns unit. MixColumns is skipped in
round 10. The cycle then XORs in one word of the round key and writes
`ob_q[col]`. The round must read the whole old state while its result builds
up, which is why the output register is separate from the input register.

The key schedule (`aes_key_sched`) keeps the current round key in a 128-bit
register and computes the next one on the fly. The next key needs
`SubWord(RotWord(w3))`, and the key schedule has no S-boxes of its own. Each
round therefore begins with a **key cycle**. In that cycle the S-boxes
process `RotWord(w3)` and the round-key register steps. The same cycle
copies `ob_q` back into `st_q` over the 128-bit feedback path.

| cycle(s) | phase | S-boxes used by | writes |
|---|---|---|---|
| 1 | load (`start`) | - | `st_q <= din`, round key <= key |
| 2-5 | initial AddRoundKey | - (bypassed) | `ob_q[c] <= col(st_q) ^ rk0[c]` |
| 6, 11, ..., 51 | key cycle of rounds 1-10 | key schedule | next round key, `st_q <= ob_q` |
| 7-10, ..., 52-55 | columns 0-3 of rounds 1-10 | data | `ob_q[c] <= MC(SB(SR(st_q)))[c] ^ rk[c]` |

That makes 1 + 4 + 10 x 5 = **55 cycles**. `done` is high in cycle 55,
counting the cycle that sampled `start` as the first, and `dout` (which is
`ob_q`) holds the ciphertext. A new `start` is accepted in the same cycle as
`done`, so operations follow each other every 55 cycles. The core only
encrypts, because CCM never uses the inverse cipher. The key is AES-128.
Each block reloads the cipher key and expands it again, so no round-key
storage is needed.

The S-box ROM (`aes_sbox4`) is a 256-entry constant table computed during
elaboration by `aes_pkg::gen_sbox()`. That function walks `p = 3^k` and
`q = 3^-k` through GF(2^8)* and stores `S(p) = affine(q)`. No data file is
involved. Synthesis sees a ROM, not a composite-field inverter.

## Sharing the AES between CBC and CTR (`ccm_core`)

The core's data path has a 2:1 multiplexer in front of the AES. One input
is the memory word XORed with the previous AES result, for CBC chaining. The
other is the counter block from `ccm_counter`, for CTR. A 128-bit tag
register sits beside it. A run over `m` blocks is two passes of `m+1` AES
operations each:

| pass | op 0 | op i (1..m) |
|---|---|---|
| CBC | `E(B0)` | `E(M_i ^ previous)`; after op m the result is `Y` |
| CTR | `S_0 = E(CTR_0)` | `S_i = E(CTR_i)`; writes `M_i ^ S_i` back to address i-1 |

* **Encryption** (`decrypt=0`) runs CBC first over the plaintext, then CTR,
  which replaces the plaintext with the ciphertext.
* **Decryption** (`decrypt=1`) runs CTR first, which recovers the plaintext
  in place, then CBC over that plaintext, as CCM requires.

The pass order is the only difference between the two modes. The first
pass's contribution (`Y` or `S_0`) goes into the tag register, and the second
pass XORs its own contribution in. Either way `tag = Y ^ S_0` at the end. A
receiver compares that value with the transmitted tag.

The memory has a one-cycle read latency and holds `rd_data` between reads.
The word that an operation will need is fetched while the previous operation
is still running. A new operation therefore starts in the very cycle the last
one finishes. For the write-back, the CTR pass writes one address in the same
cycle as it reads the next one, which is why the memory is simple dual-port.
A full run takes `110*(m+1) + 3` cycles, from the cycle that samples `start`
through the cycle with `done` high.

### CCM formatting

The formatting follows NIST SP 800-38C, with these parameters fixed in
`ccm_pkg`:

* 12-byte nonce and 3-byte length field (q = 3), so payloads of up to
  2^20 - 1 blocks (16 MiB) are allowed;
* 128-bit tag;
* no associated data;
* whole 16-byte blocks only, since a bitstream is a whole number of words.

This gives `B0 = 3A | nonce | (16*nblocks)[23:0]` and
`CTR_i = 02 | nonce | i[23:0]`. To use a different nonce length or tag
length, edit the package. The flag bytes are derived there from
`NONCE_BYTES` and `TAG_BYTES`, but only the 128-bit tag is tested.

## Interface of `secure_config_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (control state only) |
| `key` | in | 128 | pre-loaded device key |
| `cfg_start` | in | 1 | begin a configuration, samples `nonce`, `nblocks` |
| `nonce` | in | 96 | CCM nonce of this frame |
| `nblocks` | in | 20 | bitstream length in 128-bit words (MAC not counted) |
| `bs_valid`, `bs_data`, `bs_ready` | in, in, out | 1, 128, 1 | frame stream: MAC, then the encrypted words |
| `cfg_busy`, `cfg_startup`, `cfg_abort` | out | 1 | status |
| `ul_rd_en`, `ul_rd_addr`, `ul_rd_data` | in, in, out | 1, 17, 128 | user-logic read port, open only after a match |

Parameter: `DEPTH` (default 131072 words, that is 16 Mibit, `ul_rd_addr` is
`$clog2(DEPTH)` bits wide). The default holds a Spartan-3 XC3S5000 bitstream
of 13,271,936 bits (103,687 words).

## What is taken from the architecture and what is added

The following comes from the architecture itself:

* a single 32-bit AES-128 core with four ROM S-boxes shared with the key
  schedule, one MixColumns unit and a 55-cycle block time;
* CCM built on that one core, with CBC authentication and CTR encryption
  over data stored in memory, so two AES operations (110 cycles) per block;
* in the FPGA, the frame carrying a MAC in front of the encrypted bitstream,
  decryption by CCM, comparison of the computed MAC with the received one,
  then startup on a match and abort with clearing on a mismatch.

The following are choices of this implementation:

* The schedule of the 55 cycles, and the bypass path used for the initial
  AddRoundKey.
* The 32-bit result register of the quarter-round is merged with the
  four-word output register.
* Decryption runs the CTR pass before the CBC pass. The published order,
  CBC first, is kept for encryption.
* The separate tag register that carries the first pass's result.
* The CCM parameters listed above: nonce length, tag length, no associated
  data, whole blocks.
* The memory size, the simple dual-port memory and the in-place processing.
* The frame format: the MAC is the first stream word, and the nonce and
  length come in on ports.
* The valid/ready handshake; the abort on a frame that does not fit.
* Clearing only the loaded words.
* Closing the user-logic port until authentication. In the published block
  diagram the decrypted bitstream also flows directly toward the user logic.

The following is not here. The user logic (the FPGA fabric), the storage
for the pre-loaded key and the vendor's startup sequence lie outside this
unit. `cfg_startup`, `key` and the `ul_rd_*` port are where they connect.
The AES core supports only 128-bit keys.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. The reference models in
`tb/ccm_ref_pkg.sv` are written independently of the RTL. They use a
byte-wise AES with a full key expansion, and an S-box built by square-and-multiply
inversion in GF(2^8). The CCM reference follows SP 800-38C.

* The AES core reproduces the FIPS-197 vectors: Appendix B, and C.1
  (`69c4e0d86a7b0430d8cdb78070b4c55a`). It also matches 20 random
  key/plaintext pairs. Its latency is exactly 55 cycles, including
  back-to-back starts.
* The key schedule matches FIPS-197 A.1, including the round-10 key
  `d014f9a8c9ee2589e13f0cc8b6630ca6`. The S-boxes match on all 256 inputs.
  MixColumns matches the standard test columns.
* `ccm_core` was tested on payloads of 0, 1, 2, 5 and 12 blocks. Encryption
  produced the reference ciphertext and tag. Decryption restored the
  plaintext and produced the same tag. A flipped ciphertext bit changed the
  tag. Run times were exactly `110*(m+1)+3` cycles.
* `secure_config_top_tb` covers, with a 64-word memory:
  * paused streams;
  * acceptance of a genuine frame, with the plaintext read back;
  * rejection of a wrong MAC and of a tampered bitstream, with the memory
    cleared afterwards;
  * an oversized frame;
  * an empty bitstream;
  * a frame that fills the whole memory;
  * a read attempt while the unit is busy.

  It counts each of these and fails if one never happened.
* `secure_config_full_tb` runs the default-size unit on a 103,687-word
  frame, the size of a Spartan-3 XC3S5000 bitstream. Decryption with
  authentication takes 11,405,685 cycles, which is 407.3 Mbit/s at 350 MHz.

What has not been checked: the clock frequency and the area. Those figures
(about 350 MHz and 0.045 mm^2 in 90 nm) belong to the original ASIC
implementation, and nothing here measures them. The 128-bit-wide,
131,072-word memory is written as a plain array. On a real device it would
map to a RAM macro.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and then ends. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_pkg.sv rtl/ccm_pkg.sv tb/ccm_ref_pkg.sv tb/secure_config_top_tb.sv \
  --top-module secure_config_top_tb -Mdir obj && ./obj/Vsecure_config_top_tb
```

Substitute any other `tb/*_tb.sv` and its module name. The other modules
are found through `-Irtl`/`-Itb`. The full-size run
(`secure_config_full_tb`) takes a few seconds. Testbenches reach into the
memory array (`u_mem.mem`) to check its contents directly.

## Files

The packages:

* `rtl/aes_pkg.sv`: AES types, `xtime`, the S-box generator and the column
  helpers.
* `rtl/ccm_pkg.sv`: the CCM formatting constants, `make_b0` and `make_ctr`.

The modules, from the bottom up:

* `aes_sbox4`: the four S-boxes.
* `aes_mixcolumn`: MixColumns on one column.
* `aes_key_sched`: the on-the-fly key schedule.
* `aes32_core`: the 32-bit AES.
* `ccm_counter`: the counter blocks.
* `ccm_core`: CBC and CTR on the one AES.
* `bitstream_mem`: the memory.
* `mac_compare`: the MAC check.
* `cfg_ctrl`: the sequencer.
* `secure_config_top`: the unit.

`tb/` holds one `<module>_tb.sv` per module, `secure_config_full_tb.sv`
and the reference package `ccm_ref_pkg.sv`.
