# RAMBAM AES-128: masking by redundant representation

This is synthesizable SystemVerilog for AES-128 encryption protected by
RAMBAM (Redundancy AES Masking Basis for Attack Mitigation). RAMBAM does not
split data into shares. It hides each state byte by writing it as one of many
equivalent, larger values. Every AES byte becomes an (8+D)-bit element of a
ring, chosen at random among the 2^D elements that stand for the same byte.
All ten rounds run on these redundant values, and the representation is
randomized again after every step of the Sbox. The real byte values appear
only when data enters and when it leaves.

There are two engines built from the same arithmetic blocks:

| engine | Sboxes | timing per block | top ports |
|---|---|---|---|
| `rambam_aes_compact` | 1 protected Sbox, shared with the key schedule | 233 cycles; a new block can start after 217 | `c_*` |
| `rambam_aes_fast` | 16 protected Sboxes, plus 4 plain key Sboxes | 1 round per cycle; 11 cycles from input to output | `f_*` |

The default configuration is redundancy D = 8, P = 0x169, Q = 0x17b. This
is the configuration whose leakage was measured for the scheme.

## The redundant ring

Let P be an irreducible polynomial of degree 8. GF(2)[x]/(P) is then a copy
of the AES field GF(2^8), written in another basis. Let Q be a polynomial of
degree D. The design computes in

    R = GF(2)[x]/(Z),   Z = P*Q   (degree 8+D)

The map H(y) = y mod P takes R onto the field and respects addition and
multiplication. A byte value X therefore has 2^D representations X + C*P,
one for each polynomial C of degree below D. Any of them can replace another
at any time: adding r*P for a random r changes the representation and leaves
the value alone. This re-randomization is the whole masking mechanism.

For the default pair, Z = 0x10003 = x^16 + x + 1. It has Hamming weight 3,
the smallest possible, so each modular doubling costs two XOR gates.

**Basis change L.** A standard AES byte b is interpreted in the field
GF(2)[x]/(x^8+x^4+x^3+x+1). L sends it to the P basis. L^-1 is defined by
x^i -> t^i, where t is a root of P in the AES field. P has eight roots, and
any of them gives a correct cipher. This design uses the numerically smallest
one, which is t = 0x12 for P = 0x169. L is the inverse of that 8x8 bit
matrix. Both matrices are computed at elaboration, in `rambam_pkg`.

**Entry and exit.** `redundant_encode` computes x = L(b) + r*P.
`redundant_decode` computes b = L^-1(x mod P). Both are constant XOR
networks.

**Multiplication.** `ring_mul` is a schoolbook multiplier. The multiplicand
is doubled modulo Z once per multiplier bit (shift left, then add Z when bit
8+D falls out), and the doubled values are accumulated wherever the
multiplier bit is 1. All 8+D steps are unrolled into one combinational block.

**Powers 2^K.** Squaring is linear in characteristic 2. `ring_pow`
therefore raises to the power 2^K with a constant bit matrix: column j holds
(x^j)^(2^K) mod Z.

**Affine map.** The AES affine step needs some map RAff on R for which
(RAff(x) mod P) equals Aff(x mod P). Many maps qualify. `ring_raff` splits
x = h + c*P, with h = x mod P and c = x div P, and returns
A_P(h) + c*P + L(0x63), where A_P = L∘A∘L^-1 is the AES matrix in the P
basis. The random part c passes through unchanged. This particular choice
belongs to this design.

**MixColumns.** The constants 2 and 3 become L(2) = 0x22 and L(3) = 0x23.
Multiplying by a constant modulo Z is a fixed matrix
(`protected_mixcolumn`). Because the map is linear on R, multiples of P
stay multiples of P.

## The protected Sbox

`protected_sbox` computes x^254, the field inverse with 0 mapped to 0, using
four multiplications. Four is the minimum for GF(2^8). Seven fresh
multiples of P are added along the way:

    t2   = x^2         + r0*P
    t3   = x  * t2     + r1*P
    t12  = t3^4        + r2*P
    t14  = t2 * t12    + r3*P      t15 = t3 * t12 + r4*P   (parallel)
    t240 = t15^16      + r5*P
    t254 = t14 * t240  + r6*P
    y    = RAff(t254)

Without these addends, each multiplier would only see 2^D distinct operand
pairs for a given byte value. With them it can see 2^(2D) pairs. For D = 8 the
Sbox consumes 7 x 8 = 56 random bits. The block is combinational: three
multipliers deep, plus the linear maps.

Setting `FAST_CHAIN = 1` selects a second addition chain. It trades area
for a shorter critical path: it has one more power, and it needs 8 random
values instead of 7. The chain is t3 as above, then t12 = t3^4, t48 = t3^16
and t192 = t3^64, then t14 = t2*t12 and t240 = t48*t192, and finally
t254 = t14*t240. Each step adds its own r*P. With this option the `rnd`
ports of the engines grow to 24 x D bits.

## Randomness and its reuse

Each block takes 23 random values of D bits on the `rnd` port. Value r_k sits
in bits `k*D +: D`.

* r0 to r15 mask the 16 input bytes: byte i enters as L(b_i) + r_i*P.
* r16 to r22 are the seven Sbox addends (r16 to r23 with `FAST_CHAIN`).
  The same values serve every Sbox of every round. The set rotates by one position on every Sbox cycle,
  so that the same gates never add the same value on two consecutive cycles.

In the fast engine, Sbox i takes the set rotated by i positions, which is
the order a serial engine would use it in. The whole set then rotates by one
position per round.

The key is not masked: it enters as L(key) with a zero redundant part. The
compact engine's key bytes become randomized once they pass through the
protected Sbox. The fast engine keeps its key as plain 8-bit bytes in the P
basis.

## Compact engine: cycle schedule

The compact engine holds the state and the round key as two rings of sixteen
(8+D)-bit registers. One Sbox serves both.

| cycles | phase | what happens |
|---|---|---|
| 0-15 | load | byte i of `din`/`kin` is accepted; `st[15] <= L(din)+r_i*P`, `ky[15] <= L(kin)`, both rings shift down; `rnd` is sampled with byte 0 |
| per round, cycle 0-15 | SubBytes | `Sbox(st[0]^ky[0])` enters `st[15]`; both rings rotate by one, so after 16 cycles they are back in place |
| per round, cycle 16 | linear layer | ShiftRows, then (rounds 0-8) MixColumns, on all 16 bytes at once; the Sbox computes `S(ky[13])` |
| per round, cycles 17-18 | key Sboxes | `S(ky[14])`, `S(ky[15])` |
| per round, cycle 19 | key update | `S(ky[12])`; the whole next round key is formed from the four Sbox results and `L(rcon)` |
| 216 | final | last AddRoundKey, reduction mod P and L^-1 for all 16 bytes into a separate output buffer |
| 217-232 | output | one ciphertext byte per cycle on `dout`, with `out_valid` high |

The total is 16 + 10 x 20 + 1 + 16 = 233 cycles. The output buffer is
separate from the state, so the next block loads while the previous block is
read out. In steady state the engine finishes one block every 217 cycles.
The order of these steps inside the 20-cycle round is this design's own
reading of a 16 + 4 budget.

Interface (`rambam_aes_compact`):

* `in_valid`/`in_ready` handshake, with one `din` (plaintext) byte and one
  `kin` (key) byte per beat. Byte 0, the first AES byte, comes first.
* `in_ready` is high whenever the engine is not computing. It stays low
  during the 201 round and final cycles.
* `out_valid`/`dout` streams 16 bytes on consecutive cycles. There is no
  back-pressure.
* `busy` is high from the first accepted byte until the final cycle.
* Reset is synchronous and active low.

An assertion checks that the output buffer is never overwritten while it
streams. This cannot happen, because a load takes as long as the output.

## Fast engine: one round per cycle

`rambam_aes_fast` applies AddRoundKey, ShiftRows, SubBytes (16 protected
Sboxes) and MixColumns (skipped in round 9) to the whole state in each
cycle. Its timing:

* The input edge loads the encoded state and the key.
* The next 10 edges run the 10 rounds.
* The 11th edge performs the last AddRoundKey and the decoding into `ct`.
  `out_valid` is high for that one cycle.

The engine accepts a new block on the cycle after `out_valid`.

The round key is expanded one round per cycle by four `key_sbox` instances.
These are unprotected, in the P basis. They play the role of the compact
tower-field Sboxes usually used for key expansion. Here each one is simply
x^254 in GF(2)[x]/(P) followed by the affine map. The function is the same,
but the gate count is not tuned.

Interface: `pt`, `key` and `ct` are 128-bit vectors with byte 0 in bits
127:120 (FIPS-197 order). `in_valid` is taken when `in_ready` is high.

## Parameters

All modules take `D`, `P` and `Q`, which default to 8, 9'h169 and 32'h17b.
The engines, the top and `protected_sbox` also take `FAST_CHAIN` (default 0)
and `RERAND` (default 1). `RERAND = 0` removes all Sbox addends, so each
Sbox keeps the representation it receives, and the Sbox part of `rnd` is
ignored. The input bytes are still masked. This build is not protected. It
exists as the reference for leakage measurements: without re-randomization
the leakage depends strongly on the choice of P and Q.

Requirements:

* P must be irreducible of degree 8.
* Q must have degree D and must not be divisible by P. An irreducible Q gives
  the most uniform products.
* 8 + D must not exceed 31, because the elaboration-time functions work on
  32-bit words.

`tb_rambam_variants` runs both engines with six pairs: (3, 0x1dd, 0xd),
(4, 0x163, 0x1f), (5, 0x1a9, 0x3b), (6, 0x13f, 0x43), (7, 0x11b, 0x89) and
(8, 0x169, 0x17b). It runs the default pair a second time with
`FAST_CHAIN = 1`. `tb_rambam_norerand` runs the compact engine with
`RERAND = 0` at eleven more pairs, the worst and the best ones for leakage
without re-randomization: (3, 0x1dd, 0xd), (4, 0x163, 0x1f), (5, 0x1dd,
0x33), (6, 0x1f9, 0x45), (7, 0x1f5, 0xff), (3, 0x169, 0x9), (4, 0x163, 0x17),
(5, 0x1a9, 0x3b), (6, 0x11b, 0x47), (7, 0x187, 0xfb) and (8, 0x169, 0x17b).
Every matrix the hardware uses is recomputed from P and Q
when the design elaborates, so changing them needs no table edits.

## How far to trust it

* Functional correctness is checked by simulation against an independent
  FIPS-197 model. That model has its own field arithmetic by long division
  and its own Sbox by inverse search. The checks cover the FIPS-197
  Appendix B and C.1 vectors, random blocks with random masks, all
  (D, P, Q) pairs listed above, and the cycle counts above.
* Side-channel security is not, and cannot be, shown by these testbenches.
  The protection depends on the physical implementation. In particular,
  synthesis must not merge the re-randomization XORs into the multipliers,
  and must not simplify across the linear maps in ways that expose H(x).
  Nothing in this RTL prevents a tool from doing so.
* Design choices that are not fixed by the scheme itself:
  * the root t that defines L;
  * the particular RAff;
  * the split of the compact round into cycles;
  * the use of the protected Sbox for the compact key schedule;
  * the load and output cycles of the fast engine;
  * the handshake;
  * the synchronous reset.
* Not included:
  * a measurement build that skips input encoding and output decoding
    (203 cycles per block);
  * AES decryption and the 192/256-bit key sizes.

## Files

`rtl/`:

* `rambam_pkg.sv`: types, and elaboration-time functions that build all
  constant matrices.
* `ring_mul.sv`, `ring_pow.sv`, `ring_raff.sv`: ring arithmetic.
* `redundant_encode.sv`, `redundant_decode.sv`: entry into and exit from
  the redundant form.
* `protected_sbox.sv`, `protected_mixcolumn.sv`, `key_sbox.sv`: round
  functions.
* `rambam_aes_compact.sv`, `rambam_aes_fast.sv`: the engines.
* `rambam_aes.sv`: top level, with both engines side by side.

`tb/`:

* `aes_ref_pkg.sv`: the reference model.
* One self-checking `tb_<block>.sv` per block.
* `tb_rambam_aes.sv`: both engines at default parameters. It also counts
  overlapped load/output, masked blocks, and mask-dependent internal state.
* `tb_rambam_variants.sv`: all six parameter sets, plus `FAST_CHAIN = 1`.
* `tb_rambam_norerand.sv`: the compact engine with `RERAND = 0`.

Each testbench prints `TB_RESULT checks=N failures=M`. To simulate one with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rambam_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_rambam_aes.sv \
        --top-module tb_rambam_aes -Mdir obj_tb
    ./obj_tb/Vtb_rambam_aes

Every testbench runs in a few seconds or less. The two variant
testbenches hold many engine copies, so they take one to two minutes to
compile.
