# 8-point floating point FFT / IFFT engine in SystemVerilog

This is a small radix-2 FFT engine that works entirely in IEEE-754 single
precision. It is built on a minimal floating point library of three pipelined
units: an adder/subtractor, a multiplier and a divider. The idea is to trade
parallelism for area. A register file holds the eight complex samples. A
counter feeds butterflies one per clock through one shared, pipelined
butterfly datapath and writes the results back in place. There is one such
datapath for each direction:

- the forward transform uses decimation in time;
- the inverse transform uses decimation in frequency, with a halving and a
  division by the phase factor at every stage.

The structure follows the design published as "FPGA Implementation of FFT
Algorithms Using Floating Point Numbers". Where that description stops
(handshakes, port layout, rounding, special values, how the inverse shares
the engine), the choices are this design's own. They are listed in
[Departures and own choices](#departures-and-own-choices).

## The floating point library

All units use one word format, `fp_pkg::fp32_t`: a sign bit, an 8-bit
exponent biased by 127, and 23 fraction bits with a hidden leading one. The
library is deliberately small:

- an exponent field of 0 means the value zero (there are no denormals);
- NaN and infinity are not recognised as inputs;
- overflow saturates to the infinity pattern and underflow flushes to +0;
- results are **truncated**, not rounded. Expect up to one unit in the last
  place of error per operation, always towards zero.

Every unit has the same interface: `in_valid`, the operands `a` and `b`,
`out_valid` and the result `y`. Each accepts one operation per clock and has
a fixed latency.

| unit     | latency | what each stage does |
|----------|---------|----------------------|
| `fp_add` | 3 | 1: swap the operands so that \|a\| ≥ \|b\|, take e1−e2, add the hidden ones. 2: shift the smaller significand right by e1−e2 (3 guard bits are kept), then add it, or subtract it when the signs differ. The result takes the sign of the larger operand. 3: count leading zeros, shift left (or right by one after a carry) and adjust the exponent. |
| `fp_mul` | 2 | 1: e1+e2, add the hidden ones, register both signs. 2: 24×24 multiply, keep the 23 bits below the leading one of the 48-bit product, remove the bias, XOR the signs. |
| `fp_div` | 3 | 1: e1−e2+127, add the hidden ones. 2: restoring division: 26 trial subtractions of the divisor from the partial remainder, unrolled into one combinational stage; exponent adjust by the size of the quotient. 3: at most one normalizing left shift, XOR the signs. |

`fp_add` has a `sub` input: subtraction is an addition with the sign of `b`
inverted. `fp_div` returns +0 for a zero dividend. For a zero divisor it
returns infinity, with the sign of the quotient.

The latencies are package constants: `ADD_LAT`, `MUL_LAT` and `DIV_LAT`. The
butterfly latencies are derived from them. The controller uses only the
butterflies' `out_valid` and tags, so changing a latency needs no other edit.
The exception is the cycle count that `tb_fft` expects, which it also
computes from the same constants.

`cmul` builds the complex product from four `fp_mul` and two `fp_add`:
`re = xr·wr − xi·wi` and `im = xr·wi + xi·wr`. Its latency is
`CMUL_LAT = 5`.

## Butterflies

`dit_bfly` is the forward (decimation in time) butterfly. It computes
`y0 = a + W·b` and `y1 = a − W·b`, which are X[k] = Xt[k] + W^k·Xc[k] and
X[k+N/2] = Xt[k] − W^k·Xc[k]. The product W·b comes from `cmul`. While it is
being formed, `a` waits in a delay line. Four adders then produce the sums and
differences. With `bypass = 1`, `b` is used in place of W·b. That is how the
first stage computes its 2-point DFTs with the adders alone. Latency:
`DIT_LAT = 8`.

`dif_bfly` is the inverse (decimation in frequency) butterfly. It computes
`y0 = (a + b)/2` and `y1 = (a − b)/(2·W)`. The sum and difference are formed
first. Four `fp_div` units then divide them by 2.0. Finally the difference is
multiplied by conj(W), which equals dividing by W because |W| = 1. The caller
passes W itself. Latency: `DIF_LAT = 11`.

Both butterflies carry a `tag` from input to output. The engine uses it to
know which two registers to write back.

## The engine (`fft`)

```
 entry_re/entry_im ──► register file mem[N] ──► dit_bfly (mode 0) ──┐
        (start)            ▲     │           └► dif_bfly (mode 1) ──┤
                           │     └──► out_data (serial, 2N words)    │
                           └──────── write-back by tag ◄─────────────┘
```

Sequence of one transform:

1. **Load** (on `start` while `busy` is low). The N samples are latched and
   `mode` is captured.
   - FFT: samples go to bit-reversed addresses. This is the even/odd split of
     decimation in time.
   - IFFT: samples are stored in natural order.
2. **Stages**. There are log2(N) stages. Each issues its N/2 butterflies on
   consecutive clocks.
   - Butterfly `j` of stage `s` reads `mem[top]` and `mem[top+h]`.
     - The forward span `h` is 1, 2, 4, ….
     - The inverse span is N/2, N/4, …, 1.
     - `top = (j / h)·2h + (j mod h)`.
   - The phase factor is W_N^((j mod h)·N/(2h)).
   - Butterflies within a stage are independent, so they stream back to back.
   - The controller then waits until its in-flight counter is zero, so the
     next stage reads finished values.
   - The first forward stage uses `bypass`.
3. **Output**. Results are read out on the 32-bit `out_data`, one word per
   clock. The order is re(X0), im(X0), re(X1), …, with `out_valid` set and the
   word number on `out_index`.
   - FFT results are in natural order.
   - IFFT results are read from bit-reversed addresses.

   `done` pulses one clock after the last word, and `busy` then drops.

The inverse applies /2 at each of the log2(N) stages, so it includes the 1/N
scale. IFFT(FFT(x)) returns x up to truncation error.

**Timing.** Count from the clock after `start` is accepted to `done`:
`log2(N)·(N/2 + L + 1) + 2N + 2` cycles, where L is the butterfly latency.

- N = 8 forward transform: 57 cycles.
- N = 8 inverse transform: 66 cycles.

The published design quotes 600 ns and 720 ns for its FFT and IFFT. It gives
no clock for that board, so no cycle target can be derived from it.

**Phase factors.** `fp_pkg::twiddle8` holds W8^k = cos(2πk/8) − j·sin(2πk/8)
for k = 0..3, rounded to single precision:

- 1
- 0.70710677 − 0.70710677j
- −j
- −0.70710677 − 0.70710677j

A 4-point engine uses W4^k = W8^(2k). `N` may therefore be 2, 4 or 8; other
values stop elaboration with an error.

**Ports of `fft`**

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (rising edge), asynchronous active-low reset |
| `start` | in | 1 | start a transform; ignored while `busy` |
| `mode` | in | 1 | 0 = FFT, 1 = IFFT (sampled with `start`) |
| `entry_re[N]`, `entry_im[N]` | in | 32 each | input samples; sampled with `start` |
| `busy` | out | 1 | transform in progress |
| `done` | out | 1 | one-cycle pulse at the end |
| `out_valid` | out | 1 | `out_data` holds a result word |
| `out_index` | out | log2(2N) | word number: 2k real part, 2k+1 imaginary part of bin k |
| `out_data` | out | 32 | result word |

## Departures and own choices

Taken from the published design:

- the three-stage adder, two-stage multiplier and three-stage subtractive
  divider, and what each stage does;
- single precision throughout, and truncation of the multiplier product;
- eight 32-bit inputs held in registers, and a 32-bit output;
- bit-reversed grouping of the samples;
- the first stage computing 2-point DFTs with the adders only;
- a counter that sends the data serially through the multiplier and adders;
- the inverse transform equations, with a halving and a division by 2W^k at
  every stage.

This design's own choices:

- **Interface.** The `start`/`busy`/`done` handshake, the valid bits on the
  arithmetic units, the separate real and imaginary input arrays, and the
  word order of the serial output are this design's own.
- **Inputs as ports.** The published FFT kept its inputs and phase factors as
  constants loaded into internal registers. Its implementation used very few
  I/O pins. Here the inputs are ports.
- **One engine for both directions.** FFT and IFFT share the register file
  and the controller, and a `mode` input selects between them. Each direction
  has its own butterfly datapath, so there are two complex multipliers, which
  is eight 24×24 multipliers. The published FFT used sixteen 18×18 hardware
  multipliers, which is enough for a single complex multiplier.
- **Division by W^k** is done as multiplication by its conjugate. The halving
  uses the divider, with divisor 2.0.
- **The divider's iterative subtraction** is unrolled into one pipeline stage.
- **Rounding and special values**, as described above.
- **Adder operand.** The description of the adder is inconsistent about which
  significand is shifted. This design shifts the smaller one, as the
  step-by-step flow intends.
- **Divider method.** One description of the divider's middle step reads like
  the adder's. This design follows the trial-subtraction structure.
- **Speed and size.** The published speed (600 ns / 720 ns) and FPGA resource
  figures are not reproduced or checked. They belong to a particular FPGA
  implementation.

## Verification

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Reference values are
computed in double precision from the decoded operands (`tb/fp_ref_pkg.sv`),
independently of the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_add` | ~3000 back-to-back random additions and subtractions, including equal exponents, cancellation, zeros and far-apart exponents; exact latency of 3 |
| `tb_fp_mul`, `tb_fp_div` | exact results for fixed cases (zero operand, division by zero, ½, −1), ~3000 random operations, exact latency |
| `tb_cmul` | random products and the three non-trivial phase factors; latency 5 |
| `tb_dit_bfly` | random butterflies with and without bypass; latency 8 and that each tag comes back with its butterfly |
| `tb_dif_bfly` | random butterflies with W8^0..3; latency 11 and that each tag comes back with its butterfly |
| `tb_fft` | runs at the default N = 8; see below |
| `tb_fft_example` | the textbook 4-point example at N = 4; see below |

`tb_fft` runs forward and inverse transforms of fixed and random data, and a
round trip. It checks each bin against a reference DFT and the exact cycle
count. It also counts that every mechanism was exercised: both modes, a mode
switch, the first-stage bypass, drain waits and serial output words.

`tb_fft_example` transforms x = [1 3 0 2] at N = 4. It checks the 2-point
DFTs after the first stage, [1 1] and [5 1], and the result
[6, 1−j, −4, 1+j], both bit-exact. It then checks that the inverse restores
x exactly.

Tolerances are relative, from 2^-22 for single operations to 2^-18 for a
whole transform or round trip, because results are truncated.

To run one testbench with Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fft.sv --top-module tb_fft
./obj_dir/Vtb_fft
```

Replace `tb_fft` by any other testbench name. To lint a module, run
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/fp_pkg.sv rtl/fft.sv --top-module fft`.

## Files

- `rtl/fp_pkg.sv`: word and complex types, latencies, constants, phase factor
  table
- `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`: the floating point units
- `rtl/cmul.sv`: complex multiplier
- `rtl/dit_bfly.sv`, `rtl/dif_bfly.sv`: forward and inverse butterflies
- `rtl/delay_line.sv`: register chain for aligning operands and tags
- `rtl/fft.sv`: the engine (top level)
- `tb/fp_ref_pkg.sv`: reference conversions and comparisons
- `tb/tb_*.sv`: testbenches

Remaining lint warnings are intentional:

- Unused low product and shifter bits are discarded by truncation.
- `DIT_LAT` is used only by a testbench.
- The reset is used both as an asynchronous register reset and to disable
  the assertions.
