# Self-checking GOST 28147-89 cipher unit

This is a hardware GOST 28147-89 block cipher that checks its own work while it runs.
An error in a store or in an arithmetic unit is found in the cycle where it happens.
It does not wait for the end of the 32 rounds, and no second cipher unit is needed to compare against.
Two cheap mechanisms do the checking:

* **Every store carries check bits.** The key store X, the substitution tables K and the registers N1..N6 each have a small extra store beside them.
  * When a word is written, an encoder computes the word's check bits in the same cycle.
  * When a word is read, a decoder corrects a single flipped bit on the fly and flags a double error.
* **Every arithmetic and logic unit has a residue check.** A "control code" is the residue of a 32-bit word modulo p = 2^s − 1: the sum of its s-bit digits with end-around carry.
  * From the operands' residues, each check unit predicts the residue the result must have and compares it with the residue of the actual result.
  * This covers the adder Cm1, the XOR Cm2, the 11-bit rotation in register R, the counter adders Cm3 and Cm4, and the output XOR Cm5.
  * On a mismatch the unit flags an error and the controller repeats the step.

The residue logic is far smaller than a duplicated cipher, and a fault is caught within the step that caused it.

## Datapath

```
           X[k] (X0..X7 + check bits, decoder)
             |
 N1 --DC--> Cm1 (+ mod 2^32) --> K1..K8 (4-bit tables + check bits) --> R (rol 11)
  |          |check                                                    |check
  |                                                                    v
  |                                            N2 --DC--> Cm2 (xor) --> new N1
  +-------------------------------------------------------------------> new N2
```

One cipher round takes two clock cycles:

| cycle | work | checked by |
|---|---|---|
| A | `t = N1 + X[k]` in Cm1; `y = K(t)`, eight 4-bit table lookups; `R <= rol11(y)` | Cm1 check; decoders of N1, X, K |
| B | `g = R xor N2` in Cm2; then `N1 <= g, N2 <= N1` (rounds 1..31), or `N2 <= g` with N1 unchanged (round 32) | R shift check; Cm2 check; decoder of N2 |

In cycle A the R register also stores the residue of the unshifted value.
In cycle B, when R is read, the shift check compares that stored residue with the residue of R's contents.
So the check covers an error in the shifter and an upset in R itself.

Key order follows GOST 28147-89:
* encryption: X0..X7 three times, then X7..X0;
* decryption: X0..X7 once, then X7..X0 three times.

A 64-bit block maps onto the registers as bits [31:0] = N1 and bits [63:32] = N2.

The gamma (counter) modes add registers and units around this core:

* N5 holds C2 = 0x01010101 and N6 holds C1 = 0x01010104. Both are rewritten at every start.
* Cm3 computes `N3 + C2 mod 2^32`.
* Cm4 computes `N4 + C1 mod 2^32 − 1`, adding the carry back in at bit 0.
* Cm5 XORs the 64-bit gamma (N2:N1) with the data block. It is built as two 32-bit checked halves.

## Residue checks: why each prediction holds

Write `r(W)` for the residue of word W modulo p = 2^s − 1 (s = 8 here, so p = 255).
The digit width s divides 32, so p divides 2^32 − 1, and therefore 2^32 ≡ 1 (mod p).
Every check below relies on this.

* **Addition modulo 2^32 (Cm1, Cm3).**
  * The true sum is A + B − α·2^32, where α is the carry out.
  * So `r(C) = r(A) + r(B) − α`, and α is taken from the adder's carry.
* **Addition modulo 2^32 − 1 (Cm4).**
  * The end-around carry removes a multiple of 2^32 − 1, which is ≡ 0 (mod p).
  * So `r(C) = r(A) + r(B)`.
* **XOR (Cm2, Cm5).**
  * E + F = (E xor F) + 2·(E and F), so `r(G) = r(E) + r(F) − 2·r(E and F)`.
  * Doubling a residue modulo 2^s − 1 is a one-bit rotation of the residue.
  * Negating it is the ones complement.
  * So the check unit forms `r(E) + r(F) + ~rol1(r(E and F))`.
* **Rotation by 11 (R).**
  * Rotating a word left by one bit multiplies it by 2 modulo 2^32 − 1.
  * So the residue rotates left by one bit (s bits wide).
  * The check unit rotates the stored r(D) eleven times and compares the result with r(R).

Residues are normalised to 0..p−1, because all ones is a second spelling of zero.

Any single-bit error in a result changes its residue by ±2^i mod p, which is never 0, so it is always detected.
An error pattern whose value is a multiple of 255 goes unseen.
The testbenches check exactly this boundary.

The helpers `res_of`, `res_add`, `res_neg` and `res_rol1` are in `rtl/gost_pkg.sv`.
To change s, set `RES_S` there. Any divisor of 32 from 2 up works; a larger s catches more multi-bit errors.

## Store protection

The check bits are a systematic extended Hamming code (SEC-DED), held in a separate "additional store" next to the data:

| store | data bits | check bits |
|---|---|---|
| X (8 key words), N1..N6 | 32 | 7, a (39,32) code |
| K (8 tables × 16 entries) | 4 per entry | 4, an (8,4) code |

K gets its check bits per entry because the eight lookups of one substitution read eight different table rows in parallel.

How the code works:
* Data bit i sits at Hamming position 3, 5, 6, 7, 9, … (positions that are not powers of two).
* Check bit j is the XOR of the data bits whose position has bit j set.
* The top check bit is the overall parity.

What the decoder (`secded_dec`) reports:

| overall parity | syndrome | result |
|---|---|---|
| good | 0 | clean word |
| bad | any | single error, corrected. A data bit named by the syndrome is flipped back; an error in a check bit needs no change. |
| good | not 0 | double error, flagged uncorrectable |

Reads do not write the corrected word back.
A corrupted key word therefore stays corrupted and is corrected on every read until the key is reloaded.
The N registers are rewritten every round, which cleans them naturally.

## Error policy and the controller

The controller lives in `gost_top` and has these states: IDLE, WAIT for a block, CNT (the gamma counter step), RA, RB, COPY and OUT.

* **Check-unit mismatch** (`chk_err_o`): nothing is written in that cycle and the step runs again, with `retry_o` high.
  * An R-check error in cycle B sends the round back to cycle A, so R is reloaded.
  * Once the same step has failed `MAX_RETRY` times (default 4), the operation is aborted.
* **Uncorrectable store error** (`ecc_uncorr_o`): the operation is aborted at once.
* **Abort:** `abort_o` pulses for one cycle, the unit returns to IDLE, and `fatal_o` stays set until the next start.
* **Corrected store error:** only reported, on `ecc_corr_o`.

The event outputs only report reads and checks that the current step actually uses.

## Modes and interface

`start_i` samples `mode_i` and `iv_i` (the synchro). Blocks then arrive on a valid/ready handshake (`in_valid_i`, `in_ready_o`, `in_data_i`).
`in_last_i`, sent with a block, ends the operation after that block.
Each result appears on `out_data_o` during a one-cycle `out_valid_o` pulse. There is no back-pressure.

| `mode_i` | operation |
|---|---|
| `MODE_ECB_ENC`, `MODE_ECB_DEC` | simple replacement: each block is enciphered or deciphered on its own |
| `MODE_GAMMA` | gamma mode. At start the synchro is enciphered and copied into N3/N4. For each block: counter step in Cm3/Cm4, encipher, XOR the gamma with the block in Cm5. The same operation decrypts. |
| `MODE_GFB_ENC`, `MODE_GFB_DEC` | gamma with feedback: the gamma for block i is the encipherment of ciphertext block i−1 (of the synchro for block 1) |

Load the key and the tables before starting:
* key words: `key_we_i`, `key_addr_i`, `key_data_i`;
* table entries: `sbox_we_i`, `sbox_tab_i` (0..7 selects K1..K8), `sbox_addr_i`, `sbox_data_i`.

Digit i of the Cm1 result (bits 4i+3..4i) addresses table K(i+1).
GOST does not fix the table contents; they are part of the key material.

Latency without errors, counted from the clock edge that accepts a block to the output pulse:
* 65 cycles: 32 rounds × 2 cycles, plus one cycle for the output;
* 66 cycles in gamma mode, because of the counter step.

Each retry adds one cycle, or two for an R-check retry.

Test ports (tie them to 0 in use):
* `fi_arm_i`, `fi_unit_i`, `fi_mask_i`: arm a one-shot transient fault. The mask is XORed into the chosen unit's result the next time that unit works.
* `mi_valid_i`, `mi_store_i`, `mi_addr_i`, `mi_mask_i`: flip bits of one stored codeword {check, data}. For K the address is {table, entry}.

## Files

| file | content |
|---|---|
| `rtl/gost_pkg.sv` | residue helpers, code sizing, constants C1/C2, mode/unit/store enums |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | check-bit encoder and correcting decoder |
| `rtl/ecc_store.sv` | a store with its check-bit store, encoder and decoder |
| `rtl/sbox_unit.sv` | tables K1..K8 with per-entry check bits |
| `rtl/add_chk.sv` | Cm1/Cm3 (END_AROUND=0) or Cm4 (END_AROUND=1) with residue check |
| `rtl/xor_chk.sv` | Cm2/Cm5 with residue check |
| `rtl/r_reg.sv` | R register, rotate by 11, shift check |
| `rtl/gost_top.sv` | stores, units and controller |
| `tb/gost_ref_pkg.sv` | behavioural cipher, counter, residue and Hamming reference models |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the random fault campaign `tb_gost_stress` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build and run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gost_pkg.sv tb/gost_ref_pkg.sv rtl/*.sv tb/tb_gost_top.sv \
  --top-module tb_gost_top -o sim
./obj_dir/sim
```

What `tb_gost_top` covers, at the top's default parameters:
* It runs every mode on multi-block messages and compares each block with the reference cipher.
* It checks decryption round trips and the 65/66-cycle latency.
* It injects a transient fault into each of the six check units and a single-bit upset into each of the eight stores. The result must still be correct.
* It forces a double error in the key store and a permanent Cm1 fault. Both must abort.
* It enciphers and deciphers a published known-answer vector, with the test key ffeeddcc…fcfdfeff and block fedcba9876543210. The expected ciphertext is 4ee901e5c2d8ca3d, with bits [31:0] of each block in N1.
* It counts each of these mechanisms and fails if any one never happened.

`tb_gost_stress` runs a random fault campaign over two 60-block messages, one in gamma mode and one in gamma-with-feedback mode:
* single-bit transients are armed in Cm1, R and Cm2 at random moments;
* bits of N1 and N2 are flipped at random moments.

Every block must still be correct, every armed fault must be detected, and nothing may abort.

The unit testbenches check:
* the encoder against check bits from an explicit position table;
* the decoder for every single-bit and random double-bit error;
* the stores and tables with injected upsets;
* the three checked unit types against 64-bit arithmetic and a residue computed by plain division.

## How far to trust it, and what is this design's own

Taken from GOST 28147-89 itself:
* the round function;
* the key order and the last-round rule;
* the constants and which register each one goes in;
* the modulo 2^32 − 1 counter adder;
* the three modes.

Own choices of this design, none fixed by the method it implements:
* s = 8, and 2^s − 1 out of the family of moduli the method allows;
* the SEC-DED code, and per-entry check bits for K;
* the two-cycle round with R as a real register;
* the residue of D stored beside R;
* the retry limit and abort policy;
* the handshake and the block bit order;
* the fault-injection ports.

Limits:
* The cipher core has been checked against one published known-answer vector and against an independent behavioural model. The gamma modes have been checked only against that model.
* The residue checks miss result errors whose value is a multiple of 255.
* The decoders catch every double error but not every triple error.
* Control logic (the state machine, the round counter, key-index selection and the write-enable muxes) is not protected.
* The `tin` block register and the residue register beside R have no check bits.
