# Masked 4×4 S-boxes without fresh randomness (MS-LW-TI)

A 4-bit S-box is the only nonlinear part of lightweight block ciphers such as
GIFT, PRESENT and PICCOLO. It is also where a masked (secret-shared) hardware
implementation gets expensive. This RTL implements first-order *threshold
implementations* (TI) of these three S-boxes, with two shares and with three
shares, following the MS-LW-TI scheme. The scheme rests on three ideas:

1. **Start from a minimal gate network.** Each S-box is first written as the
   smallest network of AND, OR and XOR gates a SAT solver could find. OR is
   rewritten as AND with complements, so only 4 nonlinear gates remain per
   S-box.
2. **Share every gate with one of two primitives.** Linear gates become the
   shared `t = x ^ y`. Each AND becomes the shared `t = x&y ^ z`, where `z` is
   an S-box input bit or an earlier intermediate. Adding `z` makes the gate
   invertible, so its output sharing can stay uniform **without any fresh
   random bits**.
3. **Register only the nonlinear gates.** A register after each shared AND
   stops glitches from combining shares across gates. The linear gates stay
   combinational.

The result has 16 flip-flops (two shares) or 12 flip-flops (three shares) per
S-box. Its latency is 3 clock cycles for GIFT and PRESENT and 2 for PICCOLO.

## Shares and bit order

A sensitive bit `v` is carried as `NS` shares whose XOR is `v`. A shared nibble
has the type `nib2_t` or `nib3_t` (package `ms_lw_ti_pkg`). It is indexed
`x[i][j]`, meaning share `j` of bit `x_i`.

The bit indices are those of the gate equations below, and **`x_0` is the most
significant bit** of the cipher's nibble. To look up the cipher's published
table, form `{x_0, x_1, x_2, x_3}`. The result is `{y_0, y_1, y_2, y_3}`. The
equations agree with the GIFT, PRESENT and PICCOLO tables only under this
ordering. The testbench package's `to_bits()` performs the conversion.

To mask a value `v`, draw `NS-1` random shares per bit. The last share is the
bit XOR the random ones. Unmasking is the XOR of the shares of each bit.

## The two shared primitives

### Linear gate: `ti_xor2`, `ti_xor3`

`t = x ^ y` is shared share by share. Each output share comes from one share
domain only. The published sharing rotates the domains: with two shares
`t[0] = x[1]^y[1]` and `t[1] = x[0]^y[0]`. With three shares, output share `k`
comes from domain `k+1 mod 3`. The complemented form `t = x ^ y ^ 1`
(`INV = 1`) adds the constant to share 0.

`ti_xor3` has an extra parameter `ROT`, which selects the domain `k+ROT`.
`ROT = 1` (the default) gives the published rotation. `ROT = 0` keeps every
share in its own domain (see the PRESENT section below).

### Nonlinear gate, two shares: `ti_andxor2`

`x&y` expands into the four cross products `x_a & y_b`. Each product goes into
its own register. The two shares of `z` re-mask the two "diagonal" registers:

```
r0 = x0&y0 ^ z0 [^ x0 ^ y0] [^ 1]     r1 = x0&y1
r2 = x1&y0                            r3 = x1&y1 ^ z1 [^ x1 ^ y1]
t0 = r0 ^ r1        t1 = r2 ^ r3      (compression, after the registers)
```

No register sees both shares of the same variable. This is
*non-completeness*, which is what keeps a glitch or a probe from revealing
anything. The XOR that folds four registers back into two shares is the
*compression layer*. It is combinational and sits after the registers, so
only register outputs meet in it.

### Nonlinear gate, three shares: `ti_andxor3`

This is the classic three-share TI of an AND. Output share `k` is computed only
from domains `k+1` and `k+2`, and `z` re-masks it from domain `k+1`:

```
t0 = x1&y1 ^ x1&y2 ^ x2&y1 ^ z1 [^ x1 ^ y1] [^ 1]
t1 = x2&y2 ^ x2&y0 ^ x0&y2 ^ z2 [^ x2 ^ y2]
t2 = x0&y0 ^ x0&y1 ^ x1&y0 ^ z0 [^ x0 ^ y0]
```

The gate needs three registers, one per output share, and no compression.

### Extensions

Both nonlinear modules take two parameters. `LIN = 1` adds `x ^ y`, which is
how an OR with complemented inputs appears: `x | y = x&y ^ x ^ y`. `INV = 1`
adds the constant 1. This gives the four gate types every S-box is built from:

- `x^y`
- `x&y^z`
- `x&y^x^y^z`
- `x&y^x^y^z^1`

The linear gate also has the form `x^y^1`.

## The three S-box networks

Stage *n* means the value is registered on the *n*-th clock edge after the
inputs become stable. Lines without a stage are combinational.

**GIFT** (`gift_ti2`, `gift_ti3`):

| gate | function | stage |
|---|---|---|
| t2 | `x2&x3 ^ x2 ^ x3 ^ x1` | 1 |
| t3 | `x1&x3 ^ x2` | 1 |
| y3 | `x0 ^ t2 ^ 1` | – |
| y2 | `y3 ^ t3 ^ 1` | – |
| y0 | `x0&t3 ^ x3` | 2 |
| y1 | `y0&y2 ^ t2` | 3 |

**PRESENT** (`present_ti2`, `present_ti3`):

| gate | function | stage |
|---|---|---|
| t1 | `x2 ^ x1` | – |
| t3 | `x1&t1 ^ x0` | 1 |
| y3 | `x3 ^ t3` | – |
| t6 | `t1&t3 ^ x1` | 2 |
| t5 | `t1 ^ y3` | – |
| t8 | `t6 ^ x3 ^ 1` | – |
| y2 | `x3&t6 ^ x3 ^ t6 ^ t5` | 3 |
| y0 | `y2 ^ t8` | – |
| y1 | `t8&t5 ^ t8 ^ t5 ^ t3` | 3 |

**PICCOLO** (`piccolo_ti2`, `piccolo_ti3`):

| gate | function | stage |
|---|---|---|
| y0 | `x0&x1 ^ x0 ^ x1 ^ x3 ^ 1` | 1 |
| y1 | `x1&x2 ^ x1 ^ x2 ^ x0 ^ 1` | 1 |
| y2 | `y0&x2 ^ y0 ^ x2 ^ x1` | 2 |
| y3 | `y0&y1 ^ y0 ^ y1 ^ x2 ^ 1` | 2 |

## Timing and interface

Each S-box module has the ports `clk`, `x` and `y`. There is no valid,
handshake or reset. The registers are rewritten on every clock edge, so their
start-up value does not matter.

**The caller must hold `x` stable for the latency.** Later stages read the
S-box inputs directly, for example `x0` and `x3` in GIFT's `y0` gate, and no
input register is provided. Once the latency has passed, `y` stays valid for
as long as `x` is held. The latencies are 3 edges for GIFT and PRESENT and 2
for PICCOLO (`ms_lw_ti_pkg::*_LATENCY`). Some output bits are ready earlier:
GIFT's `y3` and `y2` after one edge, for example.

The S-box cannot accept a new input on every cycle. Its throughput is one
nibble per latency. A cipher datapath would put its state register in front
of the S-box, or add an input register and pipeline the direct input paths.

`ms_lw_ti_top` puts all six S-boxes side by side on one clock. Each has its
own ports: `gift_x2`/`gift_y2`, `gift_x3`/`gift_y3`, `present_*`, `piccolo_*`.
They are independent of one another.

## How far the masking can be trusted

What the testbenches establish:

- **Correctness.** Every S-box is simulated with every input value under every
  possible sharing: 256 vectors for two shares, 4096 for three. The unmasked
  result matches the cipher's published table.
- **Latency.** The outputs are correct after the stated number of edges. For
  some inputs they are still wrong one edge earlier.
- **Uniform output sharing.** For each input value and output bit, the testbench
  counts how often each valid sharing of the output occurs. These counts are
  exactly equal for all two-share S-boxes, and for three-share PRESENT and
  PICCOLO.
- **Simulated leakage test.** `ms_lw_ti_tvla_tb` runs a fixed-versus-random
  Welch t-test with 5,000,000 traces. Its power model is the Hamming weight of
  every S-box's output shares on each edge. All six masked S-boxes stay well
  inside |t| < 4.5. An unprotected S-box reaches |t| ≈ 1500 in the same run.
  This model has no glitches and no noise, so it only tests first-order
  balance of register values; it is no replacement for a measurement.

Known limits of the scheme as implemented:

- **Three-share GIFT, output `y1`.** Its output sharing is *not* exactly
  uniform. For 8 of the 16 input values the four valid sharings occur, for
  example, 63/59/63/71 times instead of 64 each. The cause is that `y1`
  re-masks with `t2`, which depends on the same inputs as `y0` and `y2`. The
  shares of `y0`, `y2` and `y3` are uniform, and the simulated t-test shows no
  first-order leakage. Uniformity matters when the S-box output feeds further
  shared nonlinear logic, for example the next round. A related effect: the
  sharings of `t2` and `t3` are uniform one by one (each pattern 512 times
  over all 4096 input sharings), but their joint sharing is not. Its patterns
  occur between 56 and 88 times instead of 64.
- **Two-share PRESENT.** The first gate, `t3 = x1&(x2^x1) ^ x0`, multiplies
  `x1` by a function of `x1`. With two shares, whatever the share indexing,
  one of its registers then holds terms of both shares of `x1`. The same holds
  for `t6` (with `x1`) and `y1` (with `x3`). Per-register non-completeness
  therefore does not hold for this S-box. The simulated first-order t-test
  does not detect this, but a glitch-aware evaluation might.
- **Three-share PRESENT.** Here this RTL departs from a literal application of
  the rotating linear sharing. With the rotation, `t1` mixes domains, so the
  `t3`, `t6`, `y2` and `y1` registers each see all three shares of `x1` or
  `x3`. `present_ti3` therefore builds its linear gates with `ROT = 0`. With
  that, no register of that S-box sees more than two share domains of any
  input. GIFT and PICCOLO are non-complete with the published rotation and
  keep it.

## Cost

Flip-flops: 16 for every two-share S-box, 12 for every three-share one. AND
gates: 16 and 36 respectively. Both counts match the published gate and
register counts.

Reported FPGA results (Spartan-6) list fewer flip-flops for some three-share
versions, for example 9 for GIFT. That is an effect of FPGA mapping. This RTL
keeps one register per share of every nonlinear gate.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The packages come first on the command line:

```
verilator --binary --timing -Irtl -Itb rtl/ms_lw_ti_pkg.sv tb/ms_lw_ti_ref_pkg.sv \
          tb/gift_ti3_tb.sv --top-module gift_ti3_tb -o sim
./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `ti_xor2_tb`, `ti_xor3_tb` | linear gate, all share assignments, every parameter setting |
| `ti_andxor2_tb`, `ti_andxor3_tb` | nonlinear gate in its four forms, all share assignments; checks every output share equation and that the output only moves on a clock edge |
| `<cipher>_ti<n>_tb` | S-box: exhaustive correctness, latency and uniformity of the output sharing |
| `ms_lw_ti_top_tb` | all six S-boxes together: 2000 random operations, fresh random shares, output checked at the latency and again while the input is held |
| `ms_lw_ti_tvla_tb` | simulated fixed-versus-random t-test, 5,000,000 traces, about 20 s |

`tb/ms_lw_ti_ref_pkg.sv` holds the three ciphers' published S-box tables, which
serve as the reference.

## Changing the design

- **A different 4×4 S-box.** Write its minimal gate network in the four gate
  forms above. Instantiate one `ti_andxor*` per nonlinear gate and one
  `ti_xor*` per linear gate, choosing as `z` a variable that the gate's `x`
  and `y` do not depend on. Then run the uniformity and latency checks of an
  S-box testbench on it.
- **Input timing.** To use the S-box in a pipeline that changes its input
  every cycle, delay the signals that later stages read directly (`x0` and
  `x3` for GIFT) through registers of matching depth.
