# IDEA NXT64 with concurrent and offline error detection

A block cipher in hardware has to be checked in two ways. Faults that appear while it
runs, such as a particle upset, a glitch or a deliberately injected fault, must be
caught before a wrong ciphertext leaves the chip. Manufacturing defects must be found
when the chip is taken out of service and tested. This RTL wraps an iterative IDEA
NXT64 core (64-bit block, 128-bit key, 16 rounds by default) with both kinds of checker:

* **Concurrent (online) detection.** Every 64-bit value on the data path carries
  parity bits: 1, 2 or 4 parity bits per 32-bit word. The parity is *predicted*
  through each unit of the round function and of the key schedule, and checked
  against the actual data at the input of the next unit. Any mismatch raises
  `ced_err` while the cipher keeps running.
* **Offline self-test (BIST).** A test controller takes the core out of service. It
  drives it with patterns from an 8-bit generator: a counter, an LFSR or a cellular
  automaton. Alternatively, it feeds each ciphertext back as the next plaintext (the
  *feedback-loop* test). The responses are compacted into a 24-bit signature and
  compared with a golden value. The test can observe only the ciphertexts
  (algorithm level) or also every intermediate round output (round level).
* **BILBO variant.** A second copy of the core has BILBO registers (Built-In Logic
  Block Observers). In self-test its round register acts as the pattern generator and
  its output register acts as the signature register, so no separate generator or
  analyser is needed.

Both cores read one loadable 256×8 substitution table, which must be written before use.

## The cipher as built

IDEA NXT64 (also known as FOX64) is a Lai–Massey cipher. One round of its round
function, `nxt64_round`, takes the 64-bit state `(xl, xr)` and a 64-bit round key
`(rk0, rk1)`, and computes:

```
t       = f32(xl ^ xr)                 f32(a) = sigma4( mu4( sigma4(a ^ rk0) ) ^ rk1 ) ^ rk0
lmor64:  (or(xl ^ t), xr ^ t)          rounds 1 .. r-1 of encryption
lmid64:  (   xl ^ t , xr ^ t)          last round
lmio64:  (io(xl ^ t), xr ^ t)          rounds r .. 2 of decryption
or(al, ar) = (ar, al ^ ar)             io(al, ar) = (al ^ ar, al)   (16-bit halves)
```

* `sigma4` is four table look-ups, one per byte.
* `mu4` multiplies the four bytes by a 4×4 matrix over GF(2^8), with rows
  `(1 1 1 a) (1 c a 1) (c a 1 1) (a 1 c 1)`. The field polynomial is
  x^8+x^7+x^6+x^5+x^4+x^3+1 (0x1F9), `a` is x and `c` = x^7+x^6+x^5+x^4+x^3+x^2+1 (0xFD).
* Decryption runs the same data path. It uses `io` in place of `or` and takes the
  round keys in reverse order.

**Key schedule (`nxt64_keysched`).** For a 128-bit key, padding and mixing are both
the identity, so the key register holds the key as it is. Round `i` uses
`rk_i = NL64(DKEY_i)`. Here `DKEY_i` is the key XORed with 128 bits of diversification
stream: five 24-bit LFSR words and the top byte of a sixth.

* The diversification LFSR runs on x^24+x^4+x^3+x+1 (feedback constant 0x1B).
* Its seed is `0x6A || r || ~r`, where `r` is the round count.
* LFSR words are numbered `6(i-1)+j`, so each round key uses six new LFSR states.

A straightforward design would step one LFSR six times per round key. Instead,
`ks_lfsr6` holds the six consecutive words in six registers. Every register advances
by x^6 in one clock, which is a fixed XOR network. So a new round key is available
every clock. For decryption the same registers step by x^-6.

`NL64` (`nl64`) runs these stages in order:
1. `sigma4` on each 32-bit word.
2. `mu4` on each word.
3. `mix64`: each word is XORed with the XOR of all four.
4. A second `sigma4`.
5. Fold to 64 bits: upper half XOR lower half.
6. One `lmor64` round keyed by the upper half of DKEY, then one `lmid64` round keyed
   by the lower half.

**Iterative core (`nxt64_core`).** An input multiplexer, a 64-bit data register, one
round instance, the key scheduler, the control unit (`nxt64_ctrl`) and an output
register. One round is computed per clock, and the round key for that round comes
from the scheduler in the same clock.

| operation | clocks from `start` to `done` |
|---|---|
| encryption, r rounds | r + 1 (load, then one per round) |
| decryption, r rounds | 2r: load, then r−1 clocks to run the key LFSRs to the last key, then r rounds |

`rounds` is 8 bits wide. 0 behaves as 1, and 16 is the standard value.

## How the parity travels (concurrent detection)

This is the least obvious part of the design. The parameter `PG` sets how many data
bits one parity bit covers: 32, 16 or 8, which gives 1, 2 or 4 parity bits per 32-bit
word. Every unit receives its data with its parity, emits predicted output parity, and
checks its input with a `parity_verifier`, an XOR tree compared against the carried
bits.

| unit | how the output parity is predicted |
|---|---|
| XOR with a key or another word | parity of a XOR is the XOR of the parities |
| `sigma4` (table look-up) | a second 256×1 table holds the parity of every table entry, written together with it; byte parities are folded into groups of `PG` bits |
| `mu4` (linear over GF(2)) | the parity of each output byte is a fixed XOR of input bits. The masks are computed at elaboration from the multiplication functions, so no constant is typed in |
| `or` / `io` | a permutation of halves plus an XOR. The output parity is the parity of the correct half. With one parity bit per word this prediction needs the input word's own parity, so a verifier is added there; with 2 or 4 bits the halves' parity bits are simply rearranged and no verifier is needed |
| key LFSRs | each LFSR word carries one parity bit per byte. The parity after the x^6 (or x^-6) step is predicted with masks derived from the step's matrix |
| registers | parity is stored with the data. Verifiers on the data register and the output register catch upsets of a stored value |

`ced_err_now` is the OR of every verifier in the current clock. `ced_err` holds it
from the next clock until the next `start`. Because parity is recomputed only at unit
boundaries, a fault that flips an even number of bits inside one parity group goes
undetected. That is the price of fewer parity bits. With `PG = 8` every byte has its
own bit.

## Offline self-test

`bist_tcu` passes functional requests straight through to the core. On `test_start`
it takes the core over and runs `n_runs` encryptions, each with the all-zero key and
`TEST_ROUNDS` rounds.

* `test_mode = 0`, BIST: each plaintext is the current 8-bit pattern repeated in all
  eight bytes. The pattern generator advances once per run.
* `test_mode = 1`, feedback loop: the first plaintext is a pattern, and each later one
  is the previous ciphertext.
* `test_decrypt = 1` runs the same test through the decryption direction of the core.
  The round keys then come in reverse order, and the rounds are `lmio64`.
* `test_level = 0`, algorithm level: only ciphertexts go into the signature.
  `test_level = 1`, round level: every intermediate round output goes in as well.
* `tpg_sel` selects the generator:
  * 0: counter from 0.
  * 1: LFSR on x^8+x^4+x^3+x^2+1 from 1, period 255.
  * 2: cellular automaton. Eight cells with null boundaries. Cells 1 and 2 use rule
    150 and the rest rule 90; the seed is 1 and the period 255.

The response analyser `bist_ora` folds each 64-bit response to 24 bits
(`d[23:0] ^ d[47:24] ^ d[63:48]`). It feeds the result into a 24-bit MISR on
x^24+x^4+x^3+x+1, the same polynomial as the key LFSR. After the last run it compares
the MISR with the `golden` input. `test_pass` or `test_fail` then holds the verdict,
`signature` shows the MISR and `test_done` pulses.

A whole test takes `n_runs·(TEST_ROUNDS+2)+2` clocks, or `n_runs·(2·TEST_ROUNDS+1)+2`
in the decryption direction. The golden signature depends on
the loaded substitution table, so it is an input port rather than a constant. The
testbench reference model (`ref_bist_sig` in `tb/nxt_ref_pkg.sv`) shows how to compute
it.

## BILBO core

`nxt64_bilbo` is a second, encryption-only core. It has the same control unit, key
scheduler and round function, but no parity channel. Its data register and output
register are `bilbo_reg` instances: 64-bit registers with LOAD, SHIFT, PRPG and MISR
modes on x^64+x^4+x^3+x+1.

* **Functional mode:** both registers load in parallel, and an encryption takes r+1
  clocks.
* **Scan mode (`scan_en`):** the two registers form one 128-bit chain,
  `scan_in → data register → output register → scan_out`.
* **Self-test (`bt_start`):** the data register free-runs as a PRPG. It presents a new
  64-bit state to the round function every clock. The output register runs as a MISR
  and compacts every round output (`lmor64` for rounds 1..r−1, `lmid64` for round r).
  After `n_runs` runs the 64-bit MISR content is compared with `bt_golden`.

## Top level (`nxt64_secure_top`)

Parameters are `PG = 32` and `TEST_ROUNDS = 16`. The port groups are:

* Table load: `tab_we`, `tab_waddr`, `tab_wdata`. This takes 256 writes, one per clock.
* Main core: `start`, `decrypt`, `pt`, `key`, `rounds` → `busy`, `done`, `ct`, `ced_err`,
  `ced_err_now`.
* Self-test: `test_start`, `test_mode`, `test_level`, `test_decrypt`, `tpg_sel`, `n_runs`, `golden` →
  `test_busy`, `test_done`, `test_pass`, `test_fail`, `signature`.
* BILBO core: `b_start`, `b_pt`, `b_key`, `b_rounds` → `b_busy`, `b_done`, `b_ct`;
  `b_scan_en`, `b_scan_in`, `b_scan_out`; `bt_start`, `bt_n_runs`, `bt_golden` →
  `bt_busy`, `bt_done`, `bt_pass`, `bt_fail`.

Every handshake is a single-clock `start` pulse while `busy` is low, answered by a
single-clock `done`. Reset is asynchronous and active low. It clears every register
except the substitution table.

## Files

| file | contents |
|---|---|
| `rtl/nxt_pkg.sv` | table types, GF(2^8) multiplications, `mu4`, orthomorphism, LFSR steps |
| `rtl/bilbo_pkg.sv` | BILBO mode enum |
| `rtl/sbox_table.sv` | loadable substitution table and its parity table |
| `rtl/parity_gen.sv`, `parity_fold.sv`, `parity_verifier.sv` | parity generation, byte-to-group folding, checking |
| `rtl/sigma4.sv`, `mu4_chk.sv`, `ortho_chk.sv` | round-function units with parity prediction |
| `rtl/nxt64_round.sv` | one round (lmor64 / lmid64 / lmio64) |
| `rtl/ks_lfsr6.sv`, `nl64.sv`, `nxt64_keysched.sv` | key schedule |
| `rtl/nxt64_ctrl.sv`, `nxt64_core.sv` | control unit and iterative core |
| `rtl/tpg_counter.sv`, `tpg_lfsr.sv`, `tpg_ca.sv` | 8-bit pattern generators |
| `rtl/misr24.sv`, `bist_ora.sv`, `bist_tcu.sv` | signature register, response analyser, test controller |
| `rtl/bilbo_reg.sv`, `nxt64_bilbo.sv` | BILBO register and BILBO core |
| `rtl/nxt64_secure_top.sv` | top level |
| `tb/nxt_ref_pkg.sv` | independent reference model: cipher, key schedule, parities, signatures |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog. For example, the end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  --top-module tb_nxt64_secure_top \
  rtl/nxt_pkg.sv rtl/bilbo_pkg.sv tb/nxt_ref_pkg.sv tb/tb_nxt64_secure_top.sv \
  --Mdir obj -o sim && obj/sim
```

Substitute any other `tb_<module>`. `tb_ks_lfsr6` and `tb_nxt64_core` force register
contents to inject faults. Verilator reports this as a second driver, so add
`-Wno-MULTIDRIVEN` for those two.

`tb_nxt64_secure_top` runs the top at its default parameters and does the following:

1. Loads a random substitution table.
2. Encrypts and decrypts with 16, 1, 255 and random round counts, and checks latency.
3. Injects faults with `force`/`release`: transient single-bit flips after the first
   table look-up, and stuck-at bits in the `mu4` output. The concurrent flag must
   accompany every wrong ciphertext.
4. Runs all twelve self-test combinations (two modes, two levels, three generators)
   against reference signatures. It then runs four in the decryption direction, and
   one with a stuck-at fault, which must fail.
5. Exercises the BILBO core's encryption, scan, passing self-test and failing
   self-test.

It counts each of these mechanisms and fails if any of them never happened.

`tb_fault_campaign` measures detection rates. It holds k = 1, 2, 4, 8 and 16 random
bits of the `mu4` output at 0, then repeats with each stuck bit at a randomly chosen
0 or 1. It runs the three parity levels side by side, plus the
top's LFSR BIST and feedback-loop tests, and prints per k how many wrong ciphertexts
each scheme flagged. With 16 rounds per block, every fault set that corrupted a
ciphertext was caught by every scheme, because the flag is sticky and some round
always shows an odd error count in a parity group.

`tb_nxt64_core` runs the three parity levels side by side. It also checks that a
flipped bit in a stored table entry is flagged on every ciphertext it corrupts.

## What to trust and where this design chooses for itself

No official test vectors were available, and the substitution table itself is not
fixed here. The cipher was therefore checked only against the reference model in
`tb/`. That model was written from the algorithm's description independently of the
RTL's structure: it steps the LFSR one state at a time and computes matrix products
directly. Matching it shows that the hardware implements the algorithm as described
above. It does not show that the bit ordering matches other implementations of IDEA
NXT. The most significant byte or word is taken as index 0 everywhere.

The following are choices of this design rather than fixed by the architecture it
implements:

* The substitution table is loadable and has no built-in contents. The golden
  signatures are inputs for the same reason.
* The `mu4` matrix is the one from the FOX cipher specification.
* `mix64` is `m_i = s_i ^ (s_0^s_1^s_2^s_3)`. No complementation step is applied in
  `NL64`.
* The test LFSR polynomial x^8+x^4+x^3+x^2+1 was chosen because the field polynomial
  0x1F9 is not primitive: its period is only 85. The rule-150 cells of the cellular
  automaton, the 24-bit fold in the response analyser and the BILBO polynomial are
  also this design's own choices.
* Test patterns are the 8-bit generator output repeated over 8 bytes. The test key is
  all zeros.
* Decryption first runs the key LFSRs forward r−1 clocks, then steps them backward.
* One round unit computes all three round forms, selected by the control unit.
  The alternative would be separate `lmor64` and `lmid64` blocks; the forms differ
  only in the orthomorphism.
* The offline test and the parity checker share one core here. Originally they were
  presented as separate architectures around the same core. The parity channel does
  not affect the cipher data, so the combination changes no function.
* Parity verifiers on the data and output registers are an addition.

* The BILBO core is encryption-only and has no parity channel.

Not built:
* Key padding and mixing for keys shorter than 128 bits. These steps were not
  specified in enough detail to build them.
* The 128-bit-block member of the family, NXT128.

The default top checks with one parity bit per 32 bits. Building it with `PG = 16` or
`PG = 8` gives the two- and four-bit variants, which `tb_nxt64_core` simulates.
