# SIMD dynamic fixed-point processing engine (MAC + CORDIC activations)

A processing engine (PE) for convolution layers of neural-network
accelerators that runs **either four 8-bit or one 16-bit** multiply per
cycle, and then applies **ReLU, sigmoid or tanh** to the result, on one
shared set of 8-bit arithmetic. Precision, the number of fraction bits and
the activation function are chosen at run time, item by item.

The central idea is that a 16-bit operation can be assembled from 8-bit
pieces, so the same hardware serves both precisions instead of carrying a
separate 8-bit and 16-bit unit:

* the multiplier array is four 8x8 multipliers; in 16-bit mode they compute
  the four partial products of one 16x16 product;
* every adder in the activation datapath is a pair of 8-bit adders; in
  16-bit mode the carry of the low adder is passed into the high one, in
  8-bit mode it is cut so the two halves are independent lanes;
* sigmoid and tanh are both computed with CORDIC (only shifts and adds):
  a hyperbolic CORDIC gives cosh and sinh, and a linear CORDIC divides.

## Number format and modes

Data are signed fixed point `sfixed<N,f>`: N bits in two's complement, of
which f are fraction bits (value = integer / 2^f). f is an input
(`frac_in`, 0..15) and may differ for every dot product, so each layer can
use the split between range and precision that suits it.

Every word in the engine is 16 bits and is read according to the precision
mode `P_mode` (`pmode_t` in `pe_pkg`):

| mode | name      | word holds                                      | engine acts as |
|------|-----------|-------------------------------------------------|----------------|
| 0    | `MODE_8`  | two `sfixed<8,f>` lanes: H = [15:8], L = [7:0]  | two 8-bit PEs  |
| 1    | `MODE_16` | one `sfixed<16,f>` value                        | one 16-bit PE  |

## Block structure

```
             +-------------------- simd_pe --------------------------------------+
 in_data --->| simd_mac                         simd_af                          |
 wt_data --->|  regs -> 4 x mult -> 2 x shift&add |  cordic_hyperbolic (5 st.)   |
 bias    --->|        -> acc1/acc2 -> trunc/sat --+->  cosh, sinh                 |--> pe_out
 mode,f  --->|                       (macc)       |  e^-x = cosh - sinh          |
 af_sel  --->|                                    |  1 + e^-x, operand muxes     |
             |                                    |  cordic_divider (5 st.)      |
             |                                    |  ReLU beside the pipeline    |
             +--------------------------------------------------------------------+
```

### MAC unit (`simd_mac`)

Four 9x9 signed multipliers take their operands from the registered
32-bit `in_data` and `wt_data` buses.

*8-bit mode.* Each bus holds four 8-bit values. The upper two products
(lanes [31:24] and [23:16]) are added and accumulated in `acc1`, the lower
two ([15:8], [7:0]) in `acc2`. The engine thus computes two independent dot
products, two terms each per cycle:

```
acc1 = C1 + sum(in[31:24]*wt[31:24] + in[23:16]*wt[23:16])   -> macc[15:8]
acc2 = C2 + sum(in[15:8] *wt[15:8]  + in[7:0]  *wt[7:0])     -> macc[7:0]
```

*16-bit mode.* Only `in_data[15:0]` and `wt_data[15:0]` are used. With
`x = xH*2^8 + xL` (xH signed, xL unsigned) the multipliers form
`xL*wL`, `xH*wL`, `xL*wH` and `xH*wH`; the two shift-and-add units weight
them by 1, 2^8, 2^8 and 2^16, and their sum is accumulated in `acc1`. Each
multiplier operand is extended to 9 bits by sign or by zero depending on
whether it is a signed value or the unsigned low half of a 16-bit value;
that is the only difference between the modes in the multiplier array.

*Bias and quantisation.* The bias is loaded together with the first term:
`bias[15:8]` = C1 and `bias[7:0]` = C2 in 8-bit mode, `bias[15:0]` in 16-bit
mode, each shifted left by f to line up with the 2f fraction bits of a
product. The result keeps f fraction bits: the accumulator is shifted right
by f (dropping bits, i.e. rounding toward minus infinity) and saturated to
the 8- or 16-bit range. The accumulators are `32 + ACC_GUARD` bits
(48 by default), so 2^16 terms can be summed without internal overflow.

### Activation unit (`simd_af`)

```
af_in -> hyperbolic CORDIC -> X = cosh(x), Y = sinh(x)
         e^-x     = cosh(x) - sinh(x)
         1 + e^-x
         tanh:    divide sinh / cosh
         sigmoid: divide 1.0 / (1 + e^-x)
      -> linear CORDIC division -> result
```

**Hyperbolic CORDIC (`cordic_hyperbolic`), rotation mode.** Start with
`X = 1.20749` (the inverse of the CORDIC gain), `Y = 0`, `Z = x`. Stage i,
for i = 1..5, with `d = +1` if `Z >= 0` else `-1`:

```
X <- X + d * (Y >>> i)
Y <- Y + d * (X >>> i)
Z <- Z - d * atanh(2^-i)
```

After five stages X is close to cosh(x), Y to sinh(x) and Z to 0.

**Division CORDIC (`cordic_divider`), linear vectoring mode.** Start with
`X = divisor`, `Y = dividend`, `Z = 0`. Stage i, for i = 1..5, with
`D = +1` if X and Y have the same sign (XNOR of the sign bits), else `-1`:

```
Y <- Y - D * (X >>> i)
Z <- Z + D * 2^-i
```

Y is driven to 0 and Z ends as Y/X. Quotients are limited to
|q| < 1 - 2^-5, which covers tanh and sigmoid.

**How one stage serves both precisions.** Inside the CORDIC stages every
lane carries one guard bit, so a stage word is 18 bits, `{H[8:0], L[8:0]}`:

| mode | H lane | L lane |
|------|--------|--------|
| 8-bit  | 9-bit value (8-bit lane, sign-extended) | 9-bit value |
| 16-bit | bits [16:8] of a 17-bit value | bits [7:0]; bit 8 unused |

Each add, subtract and shift is built by `pe_pkg` helpers from two lane
operations:

* `g_addsub`: two lane adders. In 16-bit mode the carry out of the 8-bit L
  adder (the overflow bit between the halves) is the carry into the H adder.
  In 8-bit mode each lane gets its own carry-in, so each lane can add or
  subtract independently.
* `g_sra`: in 16-bit mode a 17-bit arithmetic shift, so bits leave the H
  lane and enter the L lane; in 8-bit mode each lane shifts in its own sign.
* `g_sign`: the rotation direction comes from the word's sign in 16-bit
  mode and from each lane's sign in 8-bit mode. Two 8-bit lanes can
  therefore rotate in opposite directions in the same stage.
* Constants (`1.20749`, `atanh(2^-i)`, `2^-i`) are held with 14 fraction
  bits and shifted to f bits at run time, rounded to the nearest step. In
  8-bit mode the same constant is placed in both lanes.

The guard bit lets intermediate values briefly exceed the N-bit range; the
CORDIC outputs are truncated back to N bits per lane. The subtractor and
adder between the two CORDICs (`simd_addsub`) are plain N-bit lane adders.

**Stage count at run time.** `af_stages` (1..5) sets how many stages of
each CORDIC rotate for a given dot product; the remaining stages pass the
vector on unchanged, so the latency is the same. Fewer stages give a
coarser approximation, which can be matched to the fraction width in use.

**ReLU** (`max(0,x)` per lane) needs no CORDIC. It is computed at the input
and carried beside the pipeline in a side tag, so all three functions have
the same latency and results leave in order.

## Interface and timing

`simd_pe` ports (all synchronous to `clk`, asynchronous active-low
`rst_n`):

| port | width | meaning |
|------|-------|---------|
| `valid_in`, `first_in`, `last_in` | 1 | a term is present; first/last term of a dot product |
| `mode_in` | 1 | 0 = four 8-bit, 1 = one 16-bit |
| `frac_in` | 4 | fraction bits f |
| `af_sel`  | 2 | 0 ReLU, 1 sigmoid, 2 tanh (3 reserved, gives ReLU and trips an assertion) |
| `af_stages` | 3 | active CORDIC stages for sigmoid/tanh, 1..5 |
| `in_data`, `wt_data` | 32 | features and weights (four 8-bit lanes, or [15:0]) |
| `bias` | 16 | {C1, C2} or one 16-bit bias |
| `macc_valid`, `macc` | 1, 16 | quantised MAC result |
| `valid_out`, `mode_out`, `pe_out` | 1, 1, 16 | activation result: {PE1, PE2} or one value |

A dot product is a burst of terms, one per cycle, with `first_in` on the
first and `last_in` on the last (both on a one-term product). Bursts may
follow each other without a gap. `mode_in` and `frac_in` must be constant
within a burst; `af_sel` and `af_stages` are taken from the last term. All
of them may change freely between bursts.

Latencies, counted from the cycle of the last term:

| output | cycles |
|--------|--------|
| `macc` (`simd_mac`) | 2 |
| `pe_out` (`simd_pe`) | 2 + 2*AF_STAGES + 1 = 13 |
| `simd_af` alone | 2*STAGES + 1 = 11 |
| each CORDIC alone | STAGES = 5 |

Throughput is one term per cycle: four 8-bit or one 16-bit product per
cycle in the MAC, and two 8-bit or one 16-bit activation per cycle.

## Accuracy and operating range

* Five CORDIC stages is the point past which more stages barely reduce the
  error of sigmoid and tanh. The testbenches accept 0.05 + 2*2^-min(f,5) + a few
  LSB against the real functions and all results meet it.
* No argument-range reduction is done. sigmoid and tanh are accurate for
  |x| up to about 1.02 (the sum of atanh(2^-i), i = 1..5); beyond it the
  result is roughly that of x = +-1.02.
* In 8-bit mode the start value 1.20749 must fit an 8-bit lane once the
  output is truncated: f <= 6. For sigmoid,
  1 + e^-x must fit in the lane (3.72 at x = -1, so f <= 5 in 8-bit mode).
* The quotient resolution is 2^-min(f,5).

## Where the design makes its own choices

These points are not fixed by the published description of this engine
and were decided here:

* Two's-complement operands throughout, with sign-filled shifts in each
  lane. The multipliers are 9x9 signed so that the 16-bit partial products
  come out right.
* Separate biases C1 and C2 for the two 8-bit dot products.
* Quantisation drops fraction bits (floor) and saturates on overflow.
* `ACC_GUARD = 16` accumulator guard bits.
* The first/last burst framing, the 2-cycle MAC latency and the `macc`
  output port.
* No repeated iterations in the hyperbolic CORDIC (stages i = 1..5). The
  start value is 1.20749; the exact gain correction for these five stages
  would be 1.2049, a 0.2 % difference.
* ReLU carried beside the CORDIC pipeline; one register between the two
  CORDICs; the `af_sel` encoding.
* The run-time stage count is realised by letting unused stages pass their
  input through, which keeps the latency fixed.
* CORDIC constants are kept with 14 fraction bits and rounded to the
  nearest step when scaled to f.

## Scope

The RTL is one processing engine: the MAC, the activation unit and their
glue. An accelerator would place many of these side by side and add the
feature and weight memories, the data movement and the control that
sequence layers through them; none of that is part of this design, and the
engine's ports are the interface such a system would drive. Single-
precision (8-bit only or 16-bit only) variants, useful as area baselines,
are not included either.

## Files

| file | contents |
|------|----------|
| `rtl/pe_pkg.sv` | mode and select types, constants, lane add/shift/sign helpers |
| `rtl/simd_mac.sv` | multi-precision MAC |
| `rtl/cordic_hyperbolic.sv` | SIMD hyperbolic CORDIC (cosh, sinh) |
| `rtl/cordic_divider.sv` | SIMD linear CORDIC divider |
| `rtl/simd_af.sv` | activation unit |
| `rtl/simd_pe.sv` | processing engine (top) |
| `tb/af_ref_pkg.sv` | integer lane models of the CORDIC units for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking: it prints
`TB_RESULT checks=<n> failures=<m>` and stops. Expected values come from
plain integer models in the testbench (64-bit dot products; CORDIC
equations per lane in `af_ref_pkg`) and from the real functions
(`$cosh`, `$tanh`, ...) with a tolerance; latencies are checked too.
`tb_simd_pe` runs the whole engine at its default parameters through 500
random bursts, mixing both modes, all three functions, saturating results
and back-to-back bursts, and fails if any of these never occurred.

```
verilator --binary --timing -Irtl -Itb \
    rtl/pe_pkg.sv tb/af_ref_pkg.sv rtl/simd_mac.sv rtl/cordic_hyperbolic.sv \
    rtl/cordic_divider.sv rtl/simd_af.sv rtl/simd_pe.sv tb/tb_simd_pe.sv \
    --top-module tb_simd_pe -o tb_simd_pe
./obj_dir/tb_simd_pe
```

Replace the testbench and top name to run another one
(`tb_simd_mac`, `tb_cordic_hyperbolic`, `tb_cordic_divider`, `tb_simd_af`,
`tb_pe_workloads`).

`tb_pe_workloads` runs layer-sized dot products (400, 4096 and 4608 terms,
the largest layers of LeNet-5, a CIFAR-10 AlexNet and VGG16) in the seven
number formats `sfixed<8,5..2>` and `sfixed<16,12..10>`, with each
activation, and checks the one-term-per-cycle throughput.

## Changing the design

* `AF_STAGES` / `STAGES`: CORDIC stages. The hyperbolic constant table in
  `pe_pkg::hyp_e_q14` holds entries up to i = 8; extend it for more.
  Latencies change with it (see above).
* `ACC_GUARD`: accumulator guard bits; 2^ACC_GUARD terms per dot product.
* Constants are stored with `CONST_FRAC = 14` fraction bits; f above 14
  uses them unshifted.
