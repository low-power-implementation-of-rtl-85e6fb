# Mitchell approximate logarithmic multiplier

This is an unsigned N x N -> 2N-bit multiplier built for low power. It does not form
partial products. Instead it uses Mitchell's approximation of the binary logarithm. Write
an operand as `a = 2^k * (1 + x)` with `0 <= x < 1`. Then `log2(a) ~= k + x`: `k` is the
position of the leading one, and `x` is the bits below it read as a fraction. The two
logarithms are added, and the sum is turned back into a number by placing `1.x` at bit
position `k`. The whole multiplier is one leading-one detector, one encoder and one shifter
per operand, followed by one adder and one shifter.

The result is always slightly too small. It is never above `a*b` and never below `8/9 * a*b`.
The worst case is 11.1 %, reached when both mantissas are 0.5. For uniformly random
operands the mean error is about 3.8 %. The target use is CNN inference, where the many
multiply-accumulates tolerate this error. Zero operands, which are common after ReLU, get
exact handling.

The default width is 32 bits (`N = 32`). This matches the 32-bit fixed-point data, with
10 integer and 22 fractional bits, for which the method was evaluated on CNNs. Any power
of two from 2 upward is accepted. The 8- and 16-bit widths, the other widths it was characterised at, are simulated as well.

## Datapath

```
 a ──► log_converter ──k1,x1──┐
                              ├─► log_adder ──c,f──► mitchell_decoder ──┐
 b ──► log_converter ──k2,x2──┘                                         ├─► p
 a,b ─► zero_detect ───────────────────────────── zero ─── forces p=0 ──┘
```

`log_converter` = `lod` → `or_tree_encoder` → `norm_shifter`.

Every block is combinational. There are no registers, clock or reset. The design was
characterised as a single-cycle unit at 250 MHz. Any pipelining is up to the user.

### Leading-one detector (`lod`)

This is the part that most sets the delay, and it is the least obvious. A ripple priority
chain would need N levels. Here a Kogge-Stone style prefix OR scans down from the MSB in
log2(N) levels instead:

```
m[0][j] = z[j]
m[i][j] = m[i-1][j]                          if N-1-j <  2^(i-1)   (near the top: pass)
m[i][j] = m[i-1][j] | m[i-1][j + 2^(i-1)]    otherwise
```

After level `i`, `m[i][j]` is the OR of bits `j .. j+2^i-1` (clipped at the MSB). So the
last level `m[L][j]`, with `L = log2 N`, tells whether any bit at or above `j` is set. The
one-hot output is

```
h[N-1] = z[N-1]
h[j]   = z[j] & ~m[L][j+1]       (bit j is set and nothing above it is)
```

For a zero operand, `h` is all zeros.

### Encoder and normalising shift (`or_tree_encoder`, `norm_shifter`)

`h` has at most one bit set, so its index needs no priority logic: bit `b` of `k` is the OR
of every `h[j]` whose index `j` has bit `b` set. To normalise, the operand is shifted left
by `N-1-k` so that its leading one lands on the MSB. Because N is a power of two,
`N-1-k == ~k`, so the shift amount is just the inverted encoder output. The leading one is
then dropped, which leaves the N-1-bit mantissa `x * 2^(N-1)`.

### Log-domain addition (`log_adder`)

The words `{k1, x1}` and `{k2, x2}` go through one binary adder. Mitchell's method has two
cases:

* `x1 + x2 < 1`: the product is `2^(k1+k2) * (1 + x1 + x2)`.
* `x1 + x2 >= 1`: the product is `2^(k1+k2+1) * (x1 + x2)`.

Both come out of the same adder. In the second case the mantissa carry adds one to the
characteristic and leaves `x1 + x2 - 1` as the mantissa, and `1 + (x1+x2-1) = x1 + x2`.
The summed characteristic `c` has log2(N)+1 bits.

### Antilogarithm (`mitchell_decoder`)

The normalised value `{1, f}` has its binary point after the MSB. It must move to weight
`2^c`, which means shifting by `c - (N-1)`. There are two cases:

* **large characteristic** (`c >= N-1`): shift left by `c-(N-1)`, from 0 to N places. Only
  this case can set the upper N product bits.
* **small characteristic** (`c < N-1`): shift right by `(N-1)-c`. This case gives only
  lower bits.

So the upper N output bits are the left-shift result ANDed with the `large` flag, with no
multiplexer. Only the lower N bits choose between the two shifters. The right shift drops
bits, but for any real operand pair the dropped bits are zero: `x1` has only `k1`
significant fraction bits, so `2^c * f` is always an integer. The output therefore equals
Mitchell's formula exactly:

```
p = 2^(k1+k2) + r1*2^k2 + r2*2^k1        if r1*2^k2 + r2*2^k1 < 2^(k1+k2)
p = 2 * (r1*2^k2 + r2*2^k1)              otherwise,     with r = a - 2^k
```

### Zero detection (`zero_detect`)

The converter treats a zero operand like 1 (`k = 0`, `x = 0`). Without a correction,
`0 * b` would give about `b`. The zero detector is a NOR over each operand followed by an
OR, and its output forces the product to 0. For CNN accuracy this correction matters more
than the 11 % worst-case error.

## Accuracy

Measured by `tb_mitchell_error`:

| width | operands | mean rel. error | worst rel. error | reference figure (mean / worst) |
|---|---|---|---|---|
| 8 bit | all 255 x 255 non-zero pairs | 3.79 % | 11.11 % | 3.77 % / 11.11 % |
| 16 bit | 200 000 uniform random | 3.85 % | 11.11 % | 3.83 % / 11.11 % |
| 32 bit | 200 000 uniform random | 3.86 % | 11.11 % | 3.87 % / 11.11 % |

The testbench accepts a mean within 0.1 percentage point of the reference figure.

## What is this design's own choice

These points are not fixed by the method's description and were chosen here:

* **Unsigned only.** CNN data are signed fixed point. Sign handling (XOR of the signs,
  magnitudes into this core) and scaling the 2N-bit product back to 10.22 format are left
  to the surrounding MAC datapath.
* **No registers.** There is no pipelining and no handshake. The unit is a pure function of
  `a` and `b`.
* **Structures left to synthesis.** The shifters are plain `<<`/`>>` barrel shifts. The
  log-domain adder is a single `+`. The encoder's OR trees are OR reductions. Only the LOD
  is written gate by gate, following the prefix recurrence above.
* **Shift direction and dropped leading one** in the normaliser follow from
  `a = 2^k(1+x)`. The only given detail is the shift amount `not(k)`.

## Files

| file | content |
|---|---|
| `rtl/mitchell_pkg.sv` | `DEFAULT_N` (32) shared by all blocks |
| `rtl/lod.sv` | parallel prefix-OR leading-one detector |
| `rtl/or_tree_encoder.sv` | one-hot to binary encoder |
| `rtl/norm_shifter.sv` | shift by `~k`, mantissa extraction |
| `rtl/log_converter.sv` | LOD + encoder + shifter for one operand |
| `rtl/log_adder.sv` | log-domain addition |
| `rtl/mitchell_decoder.sv` | antilogarithm with large/small characteristic cases |
| `rtl/zero_detect.sv` | zero-operand detection |
| `rtl/mitchell_mult.sv` | top: `a`, `b` (N bits) → `p` (2N bits) |

Every block has a self-checking testbench `tb/tb_<block>.sv`. The reference models in the
testbenches are written independently of the RTL: scans for the leading one, wide-integer
arithmetic, and the closed-form product above. `tb/tb_mitchell_mult.sv` runs the top at its
default width. It uses corner cases and 100 000 random operand pairs of random magnitude.
It checks each product bit-exactly against the closed form and checks the 8/9 error bound.
It also counts zero operands, mantissa carries, and small- and large-characteristic decodes,
and fails if any of them never happened. `tb/tb_mitchell_error.sv` is the accuracy workload
above.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -y rtl rtl/mitchell_pkg.sv tb/tb_mitchell_mult.sv --top-module tb_mitchell_mult
./obj_dir/Vtb_mitchell_mult
```

Use any other `tb/tb_*.sv` the same way. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run as a failure.
Lint with `verilator --lint-only -Wall -y rtl rtl/mitchell_pkg.sv rtl/mitchell_mult.sv`.

To change the width, set `N` on `mitchell_mult` (or `DEFAULT_N` in the package). It must be
a power of two; `lod` asserts this at elaboration.
