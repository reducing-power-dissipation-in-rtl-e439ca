# A complex FIR filter in the Quadratic Residue Number System

A complex multiplication in two's complement costs four real multiplications
and two additions. This design avoids that with the Quadratic Residue Number
System (QRNS). In QRNS each complex number becomes a set of small, independent
integer residues. A complex product then takes two small modular
multiplications per modulus, and no carries pass between them. The filter is a
programmable 64-tap complex FIR filter, one sample per clock:

    y(n) = sum_{k=0}^{63} a_k * x(n-k)        x, a, y complex

Samples and coefficients are 10-bit two's complement in each of the real and
imaginary parts. The output is 21-bit signed in each part. The moduli set, the
sizes, the structure and the way multiplication is done follow a published
low-power QRNS filter design. Where that design leaves something open, the
choice made here is stated in the file's header comment and in
[Departures and open points](#departures-and-open-points).

## The number system

The filter computes modulo five primes, `{5, 13, 17, 29, 41}`. Their product
`M = 1 313 845` sets the dynamic range, about 20.3 bits. Every one of these
primes has the form 4k+1. So each ring Z_m has a `q` with `q*q = -1 (mod m)`,
and it plays the role of `j`. Modulo m, a complex value `x_R + j*x_I` is
carried as the pair

    X    = <x_R + q*x_I>_m
    Xhat = <x_R - q*x_I>_m

A complex product maps to `(<X*Y>_m, <Xhat*Yhat>_m)`: two independent real
products. The filter therefore splits into two real filters, the X side and
the Xhat side. Each side is five small filters, one per modulus, so ten
modular filters run in lock step. The way back is

    z_R = <2^-1 * (Z + Zhat)>_m
    z_I = <2^-1 * q^-1 * (Z - Zhat)>_m

followed by the Chinese Remainder Theorem over the five moduli.

Constants used here. For each modulus, q is its smallest root of -1 and r is
its smallest primitive root:

| m  | q  | r (primitive radix) | 2^-1 | q^-1 | residue/code bits |
|----|----|---------------------|------|------|-------------------|
| 5  | 2  | 2                   | 3    | 3    | 3                 |
| 13 | 5  | 2                   | 7    | 8    | 4                 |
| 17 | 4  | 3                   | 9    | 13   | 5                 |
| 29 | 12 | 2                   | 15   | 17   | 5                 |
| 41 | 9  | 6                   | 21   | 32   | 6                 |

These are computed at elaboration by the functions in `rtl/qrns_pkg.sv`. Nothing
in the RTL is a pasted table.

## Multiplication by isomorphism, and the zero pattern

This is the least obvious part of the design, and it shapes the coefficient
interface.

For a prime m with primitive root r, every nonzero residue n is `r**w mod m`
for exactly one index `w` in `[0, m-2]`. Multiplication then becomes addition
of indices:

    <a1 * a2>_m = r ** (<w1 + w2>_(m-1))  mod m

Every tap of a direct-form filter multiplies the same input stream, only
delayed. So the input is turned into indices once, in the input converter, and
the delay line holds indices. Coefficients are written into the filter already
in index form. Each tap multiplier (`iso_mult`) is then just:

1. an adder modulo m-1 (`mod_add`, instantiated with M = m-1);
2. a look-up of `r**w mod m` (`iso_exp_table`, built at elaboration and
   synthesized as logic).

Zero has no index. It is carried as the **zero pattern `m-1`**, a value that no
real index takes. The code field has `ceil(log2 m)` bits, the same width as a
residue. When either operand is the zero pattern, the multiplier bypasses the
adder and outputs 0.

The modulo adder (`mod_add`) computes `a+b` and `a+b-M` side by side. It keeps
`a+b` when the three-term sum is negative, and the three-term sum otherwise.

### Writing a coefficient

For tap k with coefficient `a_R + j*a_I`, write one code per modulus on each
side:

    A    = <a_R + q*a_I>_m      coef_code[i]     = index of A    (or m-1 if A = 0)
    Ahat = <a_R - q*a_I>_m      coef_code_hat[i] = index of Ahat (or m-1 if Ahat = 0)

Example: `a = 2 + 2j`.

| m  | A  | Ahat | coef_code | coef_code_hat |
|----|----|------|-----------|---------------|
| 5  | 1  | 3    | 0         | 3             |
| 13 | 12 | 5    | 6         | 9             |
| 17 | 10 | 11   | 3         | 7             |
| 29 | 26 | 7    | 19        | 12            |
| 41 | 20 | 25   | 34        | 4             |

Each code sits in the low bits of its 6-bit field. Raise `coef_we` with
`coef_tap = k` and the ten codes, for one clock. Write coefficients while no
samples are in flight. A write affects every product formed after that clock
edge. After reset every coefficient is zero.

## Datapath and timing

    in_re/in_im ─► bin_to_qrns ×5 ──X──► rns_fir_channel ×5 ─┐
                   (2 clk)       └Xhat─► rns_fir_channel ×5 ─┴► qrns_to_rns ×5 ─► crt_converter ×2 ─► out_re/out_im
                                         (1 + 3 + 1 clk)          (1 clk)           (3 clk)

| stage | block | what happens |
|-------|-------|--------------|
| 1 | `bin_to_qrns` | signed parts reduced mod m; `<q*x_I>_m` |
| 2 | `bin_to_qrns` | X, Xhat by two modulo adders; index look-up (zero → m-1) |
| 3 | `rns_fir_channel` | 64 `iso_mult` products registered |
| 4–6 | `sum_tree` | 6 levels of binary adders, a register every 2 levels |
| 7 | `mod_reduce` | tree sum reduced modulo m |
| 8 | `qrns_to_rns` | (Y, Yhat) → real and imaginary residues |
| 9 | `crt_converter` | weighted CRT terms `Mbar_i * <Mbar_i^-1 * z_i>_{m_i}` |
| 10 | `crt_converter` | sum of terms, subtract the largest k*M that fits (k ≤ 4) |
| 11 | `crt_converter` | signed mapping: values above (M-1)/2 become negative |

The latency is **11 clock edges**. That is from the edge that takes in a sample
to the output that first contains it. The sample then affects the next 63
outputs as well, so the full response spans 11+64 cycles. The filter takes in
one sample per clock.

The delay line in each modular filter moves only on `in_valid`. A cycle with
`in_valid` low is a bubble. It consumes nothing and gives a cycle with
`out_valid` low, 11 edges later. Tap 0 uses the incoming sample directly, and 63
registers hold x(n-1) … x(n-63), as in a textbook direct form. The tree sums in
plain binary at full width (WIN + 6 bits), so one reduction after the tree is
exact.

## Top-level interface (`qrns_fir`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `in_valid` | in | 1 | a sample is present |
| `in_re`, `in_im` | in | 10 signed | sample |
| `coef_we` | in | 1 | write one tap's coefficient |
| `coef_tap` | in | 6 | tap index 0..63 |
| `coef_code`, `coef_code_hat` | in | 5 × 6 | index codes per modulus (see above) |
| `out_valid` | out | 1 | result present |
| `out_re`, `out_im` | out | 21 signed | result |

Reset clears the valid pipeline. It sets the delay lines to zero samples and
the coefficients to zero. It does not clear the datapath registers.

The one parameter is `TAPS` (default 64). The adder tree adapts to it, and the
latency becomes `2 + 1 + ceil(log2(TAPS)/2) + 1 + 1 + 3`.

## Dynamic range

Results are exact when the true output lies within ±656 922, that is
±(M-1)/2. Outside that range they wrap around modulo M, like two's
complement overflow but modulo 1 313 845. The range is about 20 bits, the
figure the design was sized for. A pathological full-scale input could need
26 bits: 64 taps × 2 × 512 × 512. So either the signal statistics must keep
the outputs within range, or the coefficients must be scaled. The testbench
checks both regimes. One runs at full scale, where many outputs wrap. The
other uses small coefficients, where most outputs are exact.

## Files

`rtl/` holds one unit per file:

- `qrns_pkg.sv`: the moduli, widths, types, and the elaboration-time number
  theory (roots, primitive roots, inverses, discrete logs).
- `mod_add.sv`: the adder modulo M.
- `iso_log_table.sv`: residue → index code.
- `iso_exp_table.sv`: index → residue.
- `iso_mult.sv`: the tap multiplier.
- `bin_to_qrns.sv`: the input converter.
- `rns_fir_channel.sv`: one modular filter, holding the delay line,
  coefficients, taps, tree and reduction.
- `sum_tree.sv`: the adder tree.
- `mod_reduce.sv`: the final modulo reduction.
- `qrns_to_rns.sv`: the inverse QRNS map.
- `crt_converter.sv`: the CRT converter to signed binary.
- `qrns_fir.sv`: the top.

`tb/` holds one self-checking testbench per block, `tb_<block>.sv`. Each one
computes its expected values independently. It finds roots, primitive roots and
discrete logs by brute force and does the filtering in ordinary integer
arithmetic. It checks the exact output cycle and ends with a
`TB_RESULT checks=… failures=…` line. `tb_qrns_fir` runs the whole filter at its
default size. It covers random full-scale data with wrap-around, a coefficient
reload with exact results, an impulse response, and the single product
(3 + j)(2 + 2j) = 4 + 8j. It also checks that
bubbles, zero-operand bypasses, reloads, negative results and wrap-around all
occurred.

To simulate with Verilator, for example the full filter:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_qrns_fir rtl/qrns_pkg.sv tb/tb_qrns_fir.sv
    ./obj_dir/Vtb_qrns_fir

Substitute another `tb_<block>` to test one block. To lint the RTL:
`verilator --lint-only -Wall -Irtl -y rtl rtl/qrns_pkg.sv rtl/qrns_fir.sv`.

## Departures and open points

These follow the source design:

- the moduli {5, 13, 17, 29, 41};
- the QRNS forward and inverse maps;
- the two-sided structure with one filter per modulus;
- the 64-tap direct form;
- isomorphic multiplication with coefficients stored as indices;
- a special zero pattern with the adder bypassed;
- the modulo adder built from two parallel additions;
- CRT output conversion;
- one sample per clock with 11 cycles of pipeline latency.

These are this design's own choices:

- **The constants q and r.** The smallest root and the smallest primitive root
  of each modulus. For m = 13 this gives q = 5, and for m = 5 it gives r = 2,
  the values of the published worked examples.
- **The zero pattern value** `m-1`.
- **The input conversion.** Residues of the signed inputs are formed by adding
  a multiple of m and taking a constant remainder. The source relies on a
  published fast binary-to-residue converter that it does not describe.
- **The reduction after the tree** (`mod_reduce`). A constant remainder, in
  place of an unspecified published technique.
- **The CRT converter internals and the signed mapping** of the result.
- **The pipeline split** of the 11 stages and the adder-tree shape. The
  original tree structure is not specified.
- **The interfaces.** The valid-flag handshake without back-pressure, the
  reset behaviour, and the coefficient write port.

These are not covered:

- **The timing target.** The target was a 6 ns clock (166 MHz) in a 0.35 µm
  standard-cell library. The register placement here is plausible for it but
  has not been timed.
- **The conventional two's complement filter** that served as the comparison
  baseline. It is not part of this design.
