# Pre-encoded NR4SD multipliers for fixed coefficients

Many signal-processing kernels multiply data by coefficients that never
change: filter taps, or the sine/cosine twiddle factors of an FFT. A radix-4
Modified Booth (MB) multiplier halves the number of partial products. But it
has to Booth-encode the coefficient on every multiplication. If the
coefficients are Booth-encoded ahead of time and stored that way, the encoder
leaves the datapath. The cost is memory: an MB digit needs three bits
(sign, one, two), so an n-bit coefficient needs 3n/2 bits of ROM.

This design stores the coefficients in a **non-redundant radix-4 signed-digit
(NR4SD)** form instead. Every digit except the most significant one takes
only **four** values, so it fits in **two** bits:

| form   | lower digits     | top digit            | stored bits for n-bit B |
|--------|------------------|----------------------|-------------------------|
| NR4SD- | {-2, -1, 0, +1}  | MB, {-2 .. +2}       | 2(k-1) + 3 = n + 1      |
| NR4SD+ | {-1, 0, +1, +2}  | MB, {-2 .. +2}       | n + 1                   |

(k = n/2 digits.) The ROM is only one bit wider than the plain two's
complement table. Because each digit has only one negative magnitude (NR4SD+)
or only one way to be ±2 (NR4SD-), the partial product generators are simpler
than MB ones. The top digit stays MB encoded so the word can hold the whole
two's complement range, -2^(n-1) included.

Both forms are built. `nr4sd_premult_top` holds one multiplier of each kind.
They share the operand and the coefficient index, so their products must
agree.

## How a coefficient becomes NR4SD digits

The encoding is a carry chain over B's bits, two cells per digit, starting
with carry c0 = 0.

**NR4SD-** (`nr4sd_minus_encoder`), for digit j:

- A half adder on (b[2j], c[2j]) gives a positive sum bit n+ = b ^ c and a
  carry c[2j+1] = b & c.
- A "half adder*" on (b[2j+1], c[2j+1]) has a negatively weighted sum. It
  satisfies 2·c[2j+2] − n− = b[2j+1] + c[2j+1], so n− = b ^ c and
  c[2j+2] = b | c.
- Digit j = −2·n− + n+.

**NR4SD+** (`nr4sd_plus_encoder`) swaps the roles:

- The half adder* comes first, on (b[2j], c[2j]): n− = b ^ c and
  c[2j+1] = b | c.
- The ordinary half adder follows, on (b[2j+1], c[2j+1]).
- Digit j = 2·n+ − n−.

After k−1 digits, the last digit is MB encoded from (b[n−1], b[n−2],
c[n−2]) by `mb_encoder`. The chain's carry takes the place of the bit below.

Examples with n = 8 (digits listed most significant first):

| value | NR4SD-          | NR4SD+          |
|-------|-----------------|-----------------|
| −128  | −2  0  0  0     | −2  0  0  0     |
| −102  | −1 −2 −1 −2     | −2 +1 +2 +2     |
| +89   | +2 −2 −2 +1     | +1 +1 +2 +1     |
| +127  | +2  0  0 −1     | +2  0  0 −1     |

The lower digits of each form cover exactly 4^(k−1) consecutive values, so
for a given top digit the representation is unique. The testbenches use this
to check the encoders against plain integer division.

**The sign of a zero top digit.** In plain MB, the bit pattern 111 encodes
zero with s = 1. The stored sign of that case is forced to 0:
s = b_hi & ~(b_hi & b_mid & b_lo). A zero top digit then never complements
the multiplicand or injects a carry. This case occurs for small negative
coefficients, e.g. −3212 in the 16-bit NR4SD+ table.

## Word layout in the ROM

An (n+1)-bit word, defined in `nr4sd_pkg`:

```
 bit  n    n-1   n-2  | 2j+1        2j        ...  1  0
      s    one   two  | n_{2j+1}    n_{2j}    (digit j, j < k-1)
```

For NR4SD-, bit 2j+1 is n− and bit 2j is n+. For NR4SD+, bit 2j+1 is n+ and
bit 2j is n−. The bit order is a choice of this implementation.

## Datapath (`nr4sd_mult_core`)

```
enc_b ─┬─ digit j<k-1: nr4sd_sig_gen ─ ppg_nr4sd ─┐ pp_j, cin_j
       └─ top digit {s,one,two} ───── ppg_mb ────┤
A ─────────────────────────────────────────────────┘
        rows: pp_j<<2j (sign bit inverted), cin row, COR ─ csa_tree ─ cla_adder ─ p
```

**Digit decode.** `nr4sd_sig_gen` turns the two stored bits into one-hot
selects:

- NR4SD-: one+ = ~n−·n+, one− = n−·n+, two− = n−·~n+.
- NR4SD+: one+ = n+·n−, one− = ~n+·n−, two+ = n+·~n−.

These are the only gates that pre-encoding leaves on the datapath.

**Partial products.**

- `ppg_nr4sd` selects A (sign-extended to n+1 bits) or 2A.
- It XORs all bits with the "negative" flag. The flag is one−|two− for
  NR4SD- and one− for NR4SD+.
- It outputs the flag as the carry-in cin_j that completes the negation.
- `ppg_mb` does the same for the top digit, with s as the flag.
- In every case pp_j + cin_j = digit_j · A.

**Sign extension by a correction term.** The design does not sign-extend
each partial product to 2n bits. Instead:

- The sign bit of each (n+1)-bit pp_j is inverted. This adds 2^n to that
  row's value.
- One constant row, COR = −2^n·Σ_j 4^j mod 2^2n, removes all those 2^n
  additions at once.
- The k carries cin_j go in one extra row, with cin_j at bit 2j. Those
  positions are free because row j starts at bit 2j.

That gives k+2 rows: 10 rows for n = 16, 18 rows for n = 32.

**Reduction and final add.**

- `csa_tree` reduces the rows Wallace-style. It uses levels of word-wide
  3:2 carry-save adders and passes leftover rows to the next level.
- `cla_adder` adds the final sum and carry. It is a Kogge–Stone
  parallel-prefix carry-lookahead adder, log2(2n) levels deep.
- The product is exact modulo 2^2n, because |A·B| ≤ 2^(2n−2).

## Pipeline and interface (`nr4sd_premult`, `nr4sd_premult_top`)

| port        | dir | width       | meaning                                    |
|-------------|-----|-------------|--------------------------------------------|
| `clk`       | in  | 1           | clock, rising edge                         |
| `rst_n`     | in  | 1           | synchronous, active low; clears the valid bits only |
| `in_valid`  | in  | 1           | take `a` and `coef_addr` this edge         |
| `a`         | in  | N           | multiplicand, two's complement             |
| `coef_addr` | in  | clog2(DEPTH)| coefficient index                          |
| `out_valid` | out | 1           | products valid                             |
| `p_minus`, `p_plus` (top) / `p` | out | 2N | A·B, two's complement          |

Each multiplier accepts one operation per clock and uses two register
stages:

1. The edge that takes a request registers A and performs the synchronous
   ROM read of the encoded coefficient.
2. The next edge registers the product and `out_valid`.

A driver on the same clock therefore sees the result two clocks after it
raised `in_valid`. There is no back-pressure.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | operand width; must be even and at least 4. N = 32 gives the 32-bit multiplier. |
| `DEPTH` | 64 | number of coefficients. |
| `SCHEME` | — | `NR4SD_MINUS` or `NR4SD_PLUS`, on `nr4sd_premult` and below. |

**Coefficient table.** `coef_rom` holds
B[i] = round((2^(N−1)−1)·sin(2πi/DEPTH)): one period of a sine, as a 64-point
FFT twiddle table would use. The function is `nr4sd_pkg::coef_value`. Each
entry is encoded at elaboration by an encoder instance working on a constant,
so synthesis keeps only the encoded bits. To use other coefficients, change
`coef_value` (or replace it with a parameter array). The encoders work for
any N-bit value.

## Where this implementation makes its own choices

The encoding rules, the digit sets, the n+1-bit storage, the PPG negation and
carry rules, the modified MB sign, and the CSA-tree-plus-fast-adder structure
follow the NR4SD scheme. The following are choices of this implementation:

- **The correction-term form.** The sign-bit inversion and the COR constant
  above are one standard way to handle the partial products' signs. The COR
  value is derived for exactly this form.
- **The tree and adder types.** The scheme only asks for "a CSA tree" and
  "a fast CLA".
- **The word bit order and the coefficient set** (sine table, 64 entries).
- **The two-stage pipeline and reset.** Published FPGA results for this kind
  of multiplier report only 6–13 flip-flops, which suggests the multiplier
  itself was not pipelined there. This design registers the operand, the ROM
  output and the product: 82 flip-flop bits in the top.
- **Both forms in one top.** NR4SD- and NR4SD+ are alternatives; a user
  normally keeps one `nr4sd_premult`.
- **What is not included.** The conventional and pre-encoded MB multipliers
  that such designs are compared against. No area or power figures are
  reproduced; those depend on the FPGA or cell library used.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Shared reference arithmetic lives in
`tb/tb_nr4sd_ref_pkg.sv`. It finds digits by integer division, which is
independent of the carry-chain encoders.

- **Encoders:** all 256 8-bit values, the four examples above, and 20 000
  random 16-bit and 32-bit values.
- **`nr4sd_mult_core`:** all 65 536 8-bit operand pairs for both forms, the
  range limits, and random 16-bit and 32-bit pairs.
- **`csa_tree` / `cla_adder`:** random operands and carry-chain extremes at
  several sizes.
- **`tb_nr4sd_premult_top`:** the end-to-end test at the default size.
  - It sends every coefficient times −2^15, 2^15−1, −1, 0 and +1, then
    20 000 random operations with random idle cycles.
  - It checks both products and the exact two-cycle `out_valid` timing.
  - It fails if any of these never happened: a digit value of either form,
    a top-digit value, the zero top digit with suppressed sign, a negative
    operand, back-to-back issue, or an idle gap.
- **`tb_nr4sd_premult_top_n32`:** the same test at N = 32.

Run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/nr4sd_pkg.sv tb/tb_nr4sd_ref_pkg.sv tb/tb_nr4sd_premult_top.sv \
  --top-module tb_nr4sd_premult_top -o sim && ./obj_dir/sim
```

Each test runs in seconds. All RTL lints clean under `verilator --lint-only
-Wall`.
