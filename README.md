# Small RSA engine on an inexact Dadda / 5:2-compressor multiplier

This is a toy-sized RSA engine with 8-bit operands. Every multiplication in it, for key
generation and for both modular exponentiations, goes through an *approximate* 8x8 multiplier.
That multiplier is a column-compression (Dadda-style) tree built from 5:2 compressors. Each
compressor merges two internal carries with one OR gate, which saves logic but sometimes loses a
carry. The idea is to trade a little arithmetic accuracy for area and power in cryptographic
hardware meant for IoT-class devices.

The engine takes two primes `p`, `q` and a message `M`, and runs three stages in order:

1. **Key generation**: `n = p*q`, `phi = (p-1)(q-1)`, the public exponent `e` and the private
   exponent `d = e^-1 mod phi`.
2. **Encryption**: `C = M^e mod n`.
3. **Decryption**: `M' = C^d mod n`.

Because the multiplier is inexact, `C` and `M'` are not always the exact RSA values. How often
they are is measured below (see "How accurate the engine is"). Read that section before using this
design for anything.

## The approximate 5:2 compressor (`compressor_5_2`)

A 5:2 compressor takes five bits of one column (`a..e`) and two carry-ins (`cin1`, `cin2`) from
the column to its right. It returns a sum bit (weight 1) and carries of weight 2: `carry`,
`cout1` and `cout2`. This one is made of three full adders and one OR gate:

```
  fa1:  a + b + c        -> s1, c1
  fa2:  d + e + cin1     -> s2, c2
  fa3:  s1 + s2 + cin2   -> sum, carry
  cout1 = cout2 = c1 | c2          <- the approximation
```

An exact compressor would pass `c1` and `c2` on separately, with a total weight-2 carry count of
`c1 + c2`. Here they are merged into one carry, `c1 | c2`. The count is therefore 1 too low, worth
2 in the column, exactly when `c1` and `c2` are both 1. That happens for 32 of the 128 input
patterns. The other 96 patterns are exact, and the result is never too high. Both outputs carry
the same net. The multiplier uses only `cout1`.

## The inexact multiplier (`dadda_multiplier_8x8`)

The 64 partial-product bits `a[i] & b[j]` form eight rows. Row `j` is shifted left by `j`, and the
tallest column holds 8 bits. The reduction has two layers of compressors, one compressor per
column in each layer:

| layer | inputs a, b, c, d, e of column k | output rows |
|---|---|---|
| 1 | partial-product rows 0, 1, 2, 3, 4 | S1 (weight k), C1 (weight k+1) |
| 2 | S1, C1, partial-product rows 5, 6, 7 | S2, C2 |

The tallest column thus shrinks 8 -> 5 -> 2, which is the Dadda height sequence for a 5:2
compressor. Within a layer, `cout1` of column k drives `cin1` of column k+1, and `cin2` is 0
(every column already has its five inputs). A 16-bit ripple adder then adds S2 and C2. The adder
has a half adder at bit 0 and full adders above it. The multiplier is purely combinational.

Accuracy, over all 65,536 operand pairs:

* 48,267 products (73.7%) are exact.
* The mean relative error is 1.8%.
* A product is never above `a*b`.
* Small products are exact, for example 5*11, 7*13, 6*12, 10*3, 15*5 and 11*3.

`tb_ref_pkg::approx_mul` is an arithmetic model of the same scheme. The multiplier's testbench
compares the RTL against it for all operand pairs.

## Modular exponentiation (`mod_exp`, `mod_reduce`)

`mod_exp` computes `base^exponent mod n` by right-to-left square-and-multiply. Two multipliers
work side by side:

```
  r = 1, b = base
  for each exponent bit i = 0..7 (one clock cycle each):
      if bit i: r = (r * b) mod n        // multiplier 1 + mod_reduce
      b = (b * b) mod n                  // multiplier 2 + mod_reduce
```

`mod_reduce` is a combinational restoring remainder of a 16-bit product by the 8-bit modulus. All
8 exponent bits are always processed. A 'start' is taken in one cycle, and `done` pulses 8
cycles later, whatever the key. The engine uses two instances of `mod_exp`: the encryption block
(`M`, `e`) and the decryption block (`C`, `d`).

The approximation compounds in this unit. Every product is reduced mod n and fed back, so a
single lost carry changes all later steps. A larger exponent means more products and more
chances to go wrong. That is why decryption, with its usually large `d`, suffers more than
encryption, with its small `e`.

## Key generation (`key_generation`, `mod_inverse`)

* Two inexact multipliers form `n = p*q` and `phi = (p-1)*(q-1)` in one cycle. `p-1` and `q-1`
  are also outputs.
* The public exponent is the smallest odd `e >= 3` with `gcd(e, phi) = 1`. Candidates 3, 5, 7, ...
  are each run through `mod_inverse`. The first candidate whose gcd is 1 gives `d`.
  Examples: `phi = 40` gives `e = 3, d = 27`, and `phi = 72` gives `e = 5, d = 29`, after 3 is
  rejected.
* `mod_inverse` is a subtractive extended Euclid. It keeps two pairs `(r, t)` with
  `r = t*a (mod m)`. Each cycle it subtracts the smaller `r` from the larger, and the matching
  `t` modulo `m`. It needs no multiplier or divider and takes at most about `a + m` cycles.
* `error` is raised if `p` or `q` is below 2, or if no odd `e` below `phi` is coprime to it, for
  example `p = 2, q = 3`. The primes are inputs and are **not** tested for primality.

Keys are 16 bits wide (`n`, `phi`, `e`, `d`), so the generator accepts any 8-bit `p`, `q`.

## The engine (`rsa_top`) and its interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (rising edge); synchronous reset, active low |
| `start` | in | 1 | one-cycle pulse while idle: latch `p`, `q`, `msg` and run all three stages |
| `p`, `q`, `msg` | in | 8 | primes and plaintext |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse; all outputs valid and held until the next start |
| `key_error` | out | 1 | key generation failed, or `n > 255` (does not fit the 8-bit datapath) |
| `msg_error` | out | 1 | `msg >= n`; exponentiation skipped |
| `n`, `phi`, `p_minus_1`, `q_minus_1`, `e`, `d` | out | 16 | the key |
| `cipher`, `plain` | out | 8 | `C = M^e mod n`, `M' = C^d mod n` |

Timing: suppose key generation takes K cycles, which depends on `phi` and on how many `e` are
tried. Then `done` comes K + 22 cycles after the edge that takes `start`. That is two 8-cycle
exponentiations plus 6 cycles of hand-over between the stages.

The sequential modules (`rsa_top`, `key_generation`, `mod_inverse`, `mod_exp`) work on `clk`
with a synchronous active-low reset and a start / busy / done handshake; the arithmetic cells are
combinational. A `start` while busy is ignored. Each sequential module holds an assertion that
`done` never coincides with `busy`. Shared widths (`DATA_W = 8`, `PROD_W = 16`, `KEY_W = 16`)
and the types `data_t`, `prod_t` and `key_t` live in `rsa_pkg`.

## How accurate the engine is

Measured by `tb_rsa_top`, over every pair of primes `p < q` with `p*q < 256`, using six messages
per pair:

* 324 of 450 ciphertexts (72%) equal exact RSA.
* 180 of 450 round trips (40%) return the original message.
* For `n = 55` (`e = 3`, `d = 27`), 22 of the 55 messages round-trip.

This design does not reach "encryption unaffected, decryption nearly exact". A wrong result is also
not confined to the low-order bits: once a reduced product is off, the rest of the exponentiation
works on a different number and the output is effectively unrelated. A chained
exponentiation multiplies the single-product error rate many times over. Applications that need
correct RSA must use an exact multiplier. Swapping one in only means replacing
`dadda_multiplier_8x8`.

The small examples the engine was specified with mostly come out exact. Key generation for (5, 11), (3, 5)
and (7, 13) gives exact `n` and `phi`. The exponentiations `10^3 mod 55`, `4^1 mod 6`,
`5^1 mod 15`, `30^37 mod 39`, `11^3 mod 15` and `75^29 mod 91` are exact. `15^5 mod 91` comes out
11 instead of 71. `tb_example_vectors` runs these examples.

## Where this RTL departs from, or adds to, its source description

* **Exponentiation versus single product.** The design is specified as `C = M^e mod n` and
  `M = C^d mod n`, and that is what is built. The reference simulation values in the source are
  not exponentiations, though. They equal a single product reduced mod n (`M*e mod n` and
  `C*d mod n`); for example `M = 10, e = 3, n = 55` is listed with `C = 30`. This RTL does not
  reproduce those values.
* **The original multiplier's wiring is not known.** The source lists two inexact products,
  30*37 -> 1062 and 75*29 -> 2047. This multiplier gives 1110 and 2175 for them, which are exact.
  The tree layout and the choice to use only `cout1` are this design's. They were picked so that
  every product shown as exact in the source examples is exact here. If `cout2` also fed `cin2`,
  7*13 would give 275.
* **Modular inverse.** Finding `d` is described as involving the inexact multiplier. This
  implementation's inverse uses no multiplication at all, so `d` is always the exact inverse of
  `e` modulo the computed `phi`.
* **Choice of e**, the **handshakes**, the **reset**, the **error flags**, the **8-bit limit on
  n** and **running decryption right after encryption** are this design's choices. Key generation
  is described as producing primes; here the primes are inputs.
* **Not modelled:** the reported FPGA power (about 27% lower, ~0.027 W) and the LUT / slice
  savings. These are implementation results, not logic.

## Files

| file | content |
|---|---|
| `rtl/rsa_pkg.sv` | widths and types |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | adder cells |
| `rtl/compressor_5_2.sv` | approximate 5:2 compressor |
| `rtl/dadda_multiplier_8x8.sv` | inexact 8x8 multiplier |
| `rtl/mod_reduce.sv` | combinational `x mod n` |
| `rtl/mod_exp.sv` | modular exponentiation (encryption / decryption block) |
| `rtl/mod_inverse.sv` | extended Euclid |
| `rtl/key_generation.sv` | key generation unit |
| `rtl/rsa_top.sv` | the engine |
| `tb/tb_ref_pkg.sv` | reference models: approximate multiplier, modexp, gcd |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_example_vectors.sv` | the small example keys and exponentiations |

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each has a watchdog.
`tb_rsa_top` runs the engine at its default sizes and counts how often each mechanism occurs:
rejected `e` candidates, key errors, message errors, exact and changed round trips. It fails if
any of them never happens.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rsa_pkg.sv tb/tb_ref_pkg.sv tb/tb_rsa_top.sv --top-module tb_rsa_top
./obj_dir/Vtb_rsa_top
```

For another testbench, replace `tb_rsa_top` with its name. Each one runs in well under a minute.
To try a different multiplier, change `dadda_multiplier_8x8` and keep its ports (`a`, `b` 8 bits;
`p` 16 bits). To try a different approximation, change the two `cout` assignments in
`compressor_5_2`. The testbenches check the RTL against `tb_ref_pkg`, so update the model there
to match.
