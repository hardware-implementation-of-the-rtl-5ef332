# Compact Rijndael Sbox on composite-field arithmetic

The Rijndael (AES) Sbox maps a byte to its multiplicative inverse in GF(2^8)
and then applies a fixed affine transformation. Written as a 256-entry table
it is the largest part of an AES round: a round that substitutes all sixteen
State bytes in one clock needs sixteen copies. This design computes the
inverse arithmetically instead. The byte is moved into the isomorphic
composite field GF((2^4)^2). There an 8-bit inversion reduces to one 4-bit
inversion plus a handful of 4-bit multipliers, squarers and XORs. The result
is then moved back. Each move is only a fixed 8x8 matrix over GF(2), which is
an XOR network. The affine transformation is folded into the backward matrix,
so it costs no extra stage.

The RTL contains:

* the Sbox (`sbox_composite`);
* the inverse Sbox, which reuses the same inverter (`inv_sbox_composite`);
* all their GF(2^4) building blocks;
* round logic that applies a full AES round to a 128-bit State every clock
  cycle with sixteen of these Sboxes (`aes_round`);
* a top level, `sbox_case_top`, that combines the round logic and a
  standalone inverse Sbox.

All of it is synthesizable SystemVerilog.

## The fields

**Ground field GF(2^4).** Its polynomial is `y^4 + y + 1` (0x13). The
generator is `w = y` (0x2). The constant `w^14` equals 0x9, which is
`y^3 + 1`.

**Extension field GF((2^4)^2).** Its polynomial is `x^2 + x + w^14`. An
element `a1*x + a0` is held in one byte:

* `a1` is in bits 7:4;
* `a0` is in bits 3:0.

The root `x` of the extension polynomial, called alpha, is therefore the byte
0x10. Alpha has order 255, so it generates the whole field.

The constant term `w^14` was chosen because multiplying by it is almost free.
With `a*(y^3+1)` reduced by `y^4 = y + 1`:

```
b3 = a0   b2 = a3   b1 = a2   b0 = a0 ^ a1      (one XOR gate)
```

**Inversion.** In this field the inverse of `A = a1*x + a0` is

```
A^-1 = (a1*x + (a1 + a0)) / d,     d = a0*(a1 + a0) + a1^2 * w^14
```

This follows from multiplying `A` by `a1*x + (a1+a0)` and using
`x^2 = x + w^14`. The product is the element `d` of GF(2^4), so only `d` needs
inverting. `gf24_inverse` builds this equation from these parts:

```
t  = a1 + a0          adder
p  = a0 · t           multiplier
r  = a1^2 · w^14      squarer, then constant multiplier
d  = p + r            adder
di = d^-1             GF(2^4) inverter
b1 = a1 · di          multiplier
b0 = t  · di          multiplier
```

* one GF(2^4) inverter;
* three general multipliers;
* two adders;
* one squarer;
* one constant multiplier.

The longest path runs adder, multiplier, adder, inverter, multiplier. When
`A = 0`, `d = 0` and the inverter returns 0, so zero maps to zero as the AES
definition requires.

Each operator's gate count follows from its equations:

| block | function | gates |
|---|---|---|
| `gf4_mul` | Mastrovito multiplier: `c = M(a)·b`. For this polynomial `M(a)` needs only the three sums `a0^a3`, `a3^a2`, `a2^a1`. | 16 AND, 15 XOR |
| `gf4_squarer` | `b = {a3, a1^a3, a2, a0^a2}` | 2 XOR |
| `gf4_const_mul` | multiply by `w^14` | 1 XOR |
| `gf4_adder` | bitwise XOR | 4 XOR |
| `gf4_inv` | 16-entry table of `a^14`, left to synthesis | – |

## The mapping matrices: the subtle part

The isomorphism sends the Rijndael generator `z` (the byte 0x02 in
GF(2^8) modulo `z^8+z^4+z^3+z+1`) to a root `beta` of that polynomial inside
GF((2^4)^2). Eight such roots exist. They are `beta = alpha^k` for

```
k = 5, 10, 20, 40, 80, 160, 65, 130
```

These are the conjugates `beta, beta^2, beta^4, …`. Each gives a different
mapping matrix and therefore a slightly different circuit. The parameter
`ISO_POWER` selects `k`. It defaults to 5, the choice with the smallest area.

The direct matrix `T` has column `i` equal to `beta^i`. Applying it to a byte
XORs together the columns of its set bits. For `k = 5` the matrix is shown
below. Rows are output bits 7 down to 0 and columns are input bits 7 down to
0:

```
1 0 1 0 0 0 0 0
1 1 0 1 0 0 1 0
0 0 0 0 1 1 0 0
1 0 1 0 0 0 1 0
0 0 0 1 0 1 1 0
0 1 1 1 0 1 0 0
0 1 0 0 1 0 0 0
0 1 1 1 1 0 1 1
```

The bit order matters. The MSB-first reading above is the one under which
this matrix is the field isomorphism. `direct_map_tb` checks every row of it.

The backward side uses these matrices:

* **Forward Sbox, output stage.** The output of the inverter goes through
  `M = A·T^-1`, where `A` is the linear part of the affine transformation
  `b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7)`. The result is then
  XORed with 0x63, which costs four inverters (`inv_map_affine`).
* **Inverse Sbox, input stage.** The inverse affine step comes first:
  `b = A^-1(s ^ 0x63)`. It is merged with `T` into `T·A^-1·s ^ T·A^-1·0x63`
  (`inv_affine_direct_map`).
* **Inverse Sbox, output stage.** `T^-1` alone (`inv_map`).

So the inverse Sbox costs about the same as the forward one.

None of these matrices is typed in. `sbox_pkg` computes all of them at
elaboration with constant functions:

* composite-field powers for `T`;
* an exhaustive search for each column of an inverse;
* a GF(2) matrix product.

The modules apply them with `mat_apply`. Synthesis folds the constants, so
what remains is an XOR network of about 15 cells per matrix. An `ISO_POWER`
that is not one of the eight roots stops elaboration with `$error`.

## Round logic

`aes_round` holds the 128-bit State. State byte `i` is row `i mod 4` and
column `i div 4`, and byte 0 is the most significant byte of the vector. On
each rising edge the block does one of the following:

| load | step | last | next State |
|---|---|---|---|
| 1 | – | – | `din ^ round_key` (initial key addition) |
| 0 | 1 | 0 | `MixColumns(ShiftRows(SubBytes(State))) ^ round_key` |
| 0 | 1 | 1 | `ShiftRows(SubBytes(State)) ^ round_key` (final round) |
| 0 | 0 | – | hold |

The steps of a round are built as follows:

* **SubBytes** is sixteen `sbox_composite` instances (`sub_bytes`).
* **ShiftRows** is wiring only: row `r` rotates left by `r` bytes.
* **MixColumns** (`mix_columns`) multiplies each column by the polynomial
  `{03}x^3 + {01}x^2 + {01}x + {02}` modulo `x^4 + 1`. It uses only xtime and
  XORs.
* **AddRoundKey** is 128 XOR gates.

`rst_n` is asynchronous and active low, and clears the State.

There is no key schedule and no round counter. The user presents round key
`r` on `round_key` in the cycle of the `r`-th step. So the same logic runs 10,
12 or 14 rounds, for 128-, 192- or 256-bit keys. An encryption takes `Nr + 1`
clock edges from the load edge. The ciphertext is on `state` right after the
last one.

The round logic is one long combinational path: sixteen parallel Sboxes,
MixColumns and the key XOR, all in one cycle. The composite Sbox is smaller
than a table-based one but has more gate levels, so this design trades clock
frequency for area.

## Top level

`sbox_case_top` has these ports:

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset |
| `load` | in | 1 | see table above |
| `step` | in | 1 | see table above |
| `last` | in | 1 | see table above |
| `din` | in | 128 | input block |
| `round_key` | in | 128 | round key for this cycle |
| `state` | out | 128 | State register |
| `inv_in` | in | 8 | byte for the inverse Sbox |
| `inv_out` | out | 8 | inverse Sbox of `inv_in`, combinational |

The inverse Sbox is not connected to the round logic. It is included to
exercise the inverse path, which a decryption round would use. Decryption
rounds are not part of this design.

## Where the design makes its own choices

These points follow the AES standard (FIPS-197) or are free choices. They are
not derived from the composite-field construction:

* The round order is SubBytes, ShiftRows, MixColumns, AddRoundKey, with a
  final round without MixColumns. The MixColumns polynomial and the byte
  order of the State come from the standard.
* The load/step/last interface, the priority of `load`, and the asynchronous
  reset are this design's own.
* The GF(2^4) inverter maps 0 to 0.
* The Sbox is purely combinational. Pipeline registers could be inserted for
  throughput, but none are.

These are not included:

* a key schedule, which is left to the user;
* decryption rounds;
* a table-based (behavioural) Sbox for comparison.

## Files

The `rtl/` folder:

| file | contents |
|---|---|
| `sbox_pkg.sv` | types (`nibble_t`, `byte_t`, `state_t`); field and matrix constant functions |
| `gf4_mul.sv` | GF(2^4) multiplier |
| `gf4_inv.sv` | GF(2^4) inverter |
| `gf4_squarer.sv` | GF(2^4) squarer |
| `gf4_const_mul.sv` | multiply by `w^14` |
| `gf4_adder.sv` | GF(2^4) adder |
| `gf24_inverse.sv` | composite-field inverter |
| `direct_map.sv` | `T` |
| `inv_map_affine.sv` | `A·T^-1` plus 0x63 |
| `inv_affine_direct_map.sv` | `T·A^-1` plus its constant |
| `inv_map.sv` | `T^-1` |
| `sbox_composite.sv` | forward Sbox |
| `inv_sbox_composite.sv` | inverse Sbox |
| `sub_bytes.sv` | 16 Sboxes |
| `mix_columns.sv` | MixColumns |
| `aes_round.sv` | round logic |
| `sbox_case_top.sv` | top level |

In `tb/`, there is one self-checking testbench `<module>_tb.sv` per module.
There is also `sbox_random_stream_tb.sv`. All of them use `sbox_ref_pkg.sv`,
which has reference models computed the direct way:

* GF(2^8) products by shift-and-add;
* inverses by search;
* the affine transformation bit by bit;
* composite-field products from the field definition;
* FIPS-197 key expansion and encryption.

None of these share code with the RTL.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog. What each one checks:

* **Leaf operators:** exhaustive over all their inputs.
* **Mapping blocks and both Sboxes:** exhaustive over 256 inputs, for all
  eight isomorphisms at once. The default `T` is also checked against the
  matrix above, and against the rule `T(a·b) = T(a)·T(b)`.
* **`mix_columns`:** the FIPS-197 Appendix B round-1 column data, plus random
  States.
* **`aes_round`:**
  * FIPS-197 Appendix B round 1, from a known State;
  * a full AES-128 encryption (Appendix C.1), checked after every round, with
    the ciphertext required exactly 11 edges after load;
  * hold, load priority, reset, and random rounds.
* **`sbox_case_top_tb`** (default parameters, end to end):
  * FIPS-197 C.1, C.2 and C.3 (128-, 192- and 256-bit keys) and Appendix B;
  * 60 random key/plaintext pairs, across all three key lengths;
  * the inverse Sbox over all 256 bytes.

  It counts loads, normal rounds, final rounds, idle cycles, each key length
  and inverse-Sbox uses, and fails if any count is zero.
* **`sbox_random_stream_tb`:** 250,000 random bytes through the Sbox and back
  through the inverse Sbox, one per clock.

To run a testbench with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module sbox_case_top_tb \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sbox_pkg.sv tb/sbox_ref_pkg.sv tb/sbox_case_top_tb.sv
./obj_dir/Vsbox_case_top_tb
```

Replace the top module and the last file to run another testbench. Each one
runs in seconds.

To try another isomorphism, set `ISO_POWER` on any Sbox-level module or on
the top. All eight should give the same function at slightly different cost.
