# DECOR FIR filter: a low-power FIR core with differential coefficients

An N-tap FIR filter computes

    Y_j = sum_{k=0}^{N-1} C_k * X_{j-k}

and spends most of its power in the multiplier. The decorrelating (DECOR)
transformation multiplies and divides the transfer function by
`(1 - z^-1)^m`. The frequency response does not change, but the multiplier now
sees *differences* of neighbouring coefficients. In a smooth impulse response
these differences are much smaller than the coefficients themselves, so fewer
multiplier bits toggle. For first-order differences (m = 1) the filter becomes

    Y_j = C_0 X_j + sum_{k=1}^{N-1} (C_k - C_{k-1}) X_{j-k} - C_{N-1} X_{j-N} + Y_{j-1}

The cost is one extra product per output (`-C_{N-1} X_{j-N}`), one extra stored
sample and one addition of the previous output.

This repository holds synthesizable SystemVerilog for a 20th-order (21
coefficient) filter of this kind. It takes 8-bit signed samples, uses 8-bit
signed coefficients and gives a 16-bit output. One multiply-accumulate unit is
shared by all products. Its multiplier is an 8x8 Wallace tree, organised as a
hierarchy of four-row blocks, and its adders are carry lookahead adders.
Parameters give the 16-bit version (16x16 multiplier, 32-bit output), other
filter orders, and second- or third-order coefficient differences.

## Block structure

```
 x_in ──► X_RAM ──► INPUT_MEM ──┐
          (22x8, circular)      ├─► MAC ───────────► DECOR ──► OUT_STORE ──► y_out
 COEFF_ROM ──► CODIFF_MEM ──────┘  (delay reg,       (+Y_{j-1})  (16 bit)
 (21x8)        (C_k - C_{k-1})      Wallace 8x8,
                                    CLA, accumulator)
           CONTROL: addresses, loads, clear, accumulate, store
```

| Block | Module | What it does |
|---|---|---|
| CONTROL | `decor_control` | FSM that sequences everything (see below) |
| X_RAM | `x_ram` | 22 x 8-bit sample store, used as a circular buffer; write is synchronous, read is asynchronous |
| COEFF_ROM | `coeff_rom` | the 21 coefficients `C_k`; addresses past the table read 0 |
| INPUT_MEM | `input_mem` | 8-bit register: the sample `X_{j-k}` for the MAC |
| CODIFF_MEM | `codiff_mem` | forms `D_k = C_k - C_{k-1}` from the ROM stream and registers it (8 bits) |
| MAC | `mac_unit` | delay register, 8x8 multiplier, CLA adder, 16-bit accumulator |
| DECOR block | `decor_block` | keeps the previous output(s) and adds them back: `Y_j = S_j + Y_{j-1}` |
| OUT_STORE | `out_store` | 16-bit output register with a one-cycle `valid` pulse |
| multiplier | `wallace_mult` | unsigned W x W modified Wallace tree, W = 8 by default (helpers `wt_reduce4`, `wt_column`, `compressor_4_2`, `full_adder`, `half_adder`; package `wallace_pkg`) |
| adder | `cla_adder` | two-level carry lookahead adder |
| top | `decor_fir` | wires the blocks together |

`decor_fir_pkg` holds the default sizes, the default coefficient set and a
binomial-coefficient function. `wallace_pkg` holds the elaboration-time
functions that lay out the multiplier tree.

## The schedule

With `TAPS = 21` and `M = 1`, every output needs `NPROD = TAPS + M = 22`
products, for `k = 0 .. 21`:

    D_0 = C_0,   D_k = C_k - C_{k-1} (1 <= k <= 20),   D_21 = -C_20

The controller runs the products one per clock:

| cycle | state | what happens |
|---|---|---|
| 0 | IDLE | `in_valid && in_ready`: the sample is written to the next X_RAM word (`cur` advances) |
| 1 .. 22 | RUN, k = 0..21 | X_RAM is read at `cur - k` (mod 22), giving `X_{j-k}`. COEFF_ROM is read at `k`. INPUT_MEM and CODIFF_MEM load at the end of the cycle. `first` marks k = 0 |
| 2 .. 23 | (overlapped) | MAC: `acc <= (first ? 0 : acc) + x*d`, one cycle behind the loads |
| 23 | WAIT | the last product is accumulated |
| 24 | DONE | DECOR forms `Y_j = acc + Y_{j-1}`. OUT_STORE loads it and the output history shifts |
| 25 | IDLE | `out_valid` is high for one cycle and `in_ready` is high again |

So a sample accepted in cycle 0 produces its output in cycle 25, and the
filter takes one sample every 25 cycles (`TAPS + M + 3`). While it is busy,
`in_ready` is low and an offered sample waits. After reset, the controller
spends 22 cycles writing zero into every X_RAM word before `in_ready` first
rises. The RAM itself has no reset. Clearing it makes the input history zero,
which matches the zero reset of the DECOR block's `Y_{j-1}`. The recursion is
only correct when both start from zero.

The ROM reads zero past its last coefficient. That is how `D_21 = 0 - C_20`
arises without special logic. CODIFF_MEM keeps the previous coefficient in a
register, and `first` clears it at k = 0.

## The Wallace tree multiplier

`wallace_mult` multiplies two unsigned W-bit numbers. The filter uses W = 8,
which is described here.

1. **Partial products.** Row `r` is `a & {8{b[r]}}`, weighted by `2^r`. All
   eight rows are formed at once by AND gates.
2. **Stage A.** Rows 0-3 and rows 4-7 form two groups. In each group every
   column is reduced to one sum bit and one carry bit. The cell is picked by
   how many bits the column holds: 1 passes through, 2 goes to a half adder,
   3 to a full adder, and 4, or 3 plus an incoming carry, to a 4:2
   compressor. A 4:2 compressor passes a horizontal carry (`cout`) to the next
   column's `cin`. That carry does not depend on its own `cin`, so there is no
   ripple, and the low and high column halves of each group work in parallel.
   These are the four parallel blocks of the hierarchy. Each group gives a sum
   vector and a carry vector.
3. **Stage B.** The four stage A vectors are reduced in the same way, column by
   column, to one sum vector and one carry vector.
4. **Stage C.** A 16-bit carry lookahead adder adds the two vectors.

The choice of cell per column is made at elaboration. `wallace_pkg` tracks a
"live" mask for each partial-sum vector: the bits that can ever be nonzero.
From these masks each column's height is known, and `wt_column` instantiates
the matching cell. No column needs more than four bits plus one carry-in, so
5:2 compressors never appear.

For W = 16 there are four row groups. Stage B then takes two levels: pairs
of groups are merged, and then the two results. Stage C is a 32-bit CLA.
In general W must be 4 times a power of two.

The filter data are signed, so `mac_unit` wraps the unsigned tree in sign and
magnitude. It multiplies `|x| * |d|` (128 still fits in 8 unsigned bits) and
negates the product when the signs differ.

## Number formats and their limits

- Samples, coefficients and coefficient differences are 8-bit two's
  complement. The accumulator, the DECOR adder and OUT_STORE are 16-bit.
- All sums wrap modulo 2^16. The intermediate values of the differenced form
  can exceed the range even when the output does not. Because the arithmetic is
  modular, `y_out` equals the direct-form result exactly whenever that result
  fits in 16 signed bits.
- Each difference `D_k` must fit in 8 signed bits. An assertion in `codiff_mem`
  checks this. A coefficient set with large jumps between neighbours must be
  scaled down, or run in the 16-bit configuration.
- The default coefficients are a 21-tap Hamming-windowed sinc low-pass with
  cut-off 10.8 kHz at 48 kHz sampling. That cut-off lies midway between a
  9.6 kHz pass-band edge and a 12 kHz stop-band edge. The coefficients are
  quantised to Q1.7:
  `C[k] = round(128 * 0.45 * sinc(0.45*(k-10)) * (0.54 - 0.46*cos(2*pi*k/20)))`.
  They are `0 0 -1 -1 2 3 -4 -10 6 39 58 39 6 -10 -4 3 2 -1 -1 0 0`. The
  largest difference is 33, and `sum|C_k| * 128 = 24320` fits in 16 bits.
  These coefficients are a stand-in for an equiripple (Parks-McClellan) design
  with those band edges. To use another set, override `COEFS`.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `TAPS` | 21 | number of coefficients (filter order + 1) |
| `M` | 1 | order of the coefficient difference. 2 and 3 are supported: CODIFF_MEM forms the m-th difference and DECOR adds `2Y_{j-1} - Y_{j-2}` or `3Y_{j-1} - 3Y_{j-2} + Y_{j-3}` |
| `ALPHA`, `BETA` | -1, 1 | the transform polynomial `T(z) = (1 + ALPHA z^-BETA)^M`. `ALPHA = +1` suits high-pass sets, whose neighbouring coefficients alternate in sign. `BETA > 1` pairs coefficients `BETA` apart. Each output then takes `TAPS + M*BETA` products |
| `DATA_W` | 8 | sample width, and the multiplier width (8 or 16) |
| `COEF_W` | `DATA_W` | coefficient-difference width; must equal `DATA_W` (square multiplier) |
| `ACC_W` | 16 | accumulator and output width (a multiple of 4, at least 2*DATA_W) |
| `COEFS` | package set | the coefficient table as integers, `TAPS` entries |

The 16-bit filter is `DATA_W = 16, ACC_W = 32` with a 16-bit coefficient
table. The 35th-order one adds `TAPS = 36`. With M = 2 or 3 the higher-order
differences are larger, so the coefficient set must be chosen for them to
still fit `COEF_W` bits. The default set does (largest second difference
38, largest third difference 31).

## Where this design makes its own choices

The filter equation, the block partition, the register widths (8-bit
INPUT_MEM and CODIFF_MEM, 16-bit OUT_STORE), the MAC's make-up and the
multiplier's grouping into four-row blocks with HA/FA/4:2 cells and a final
CLA all come from the source design. These details are this implementation's
own:

- the handshake (`in_valid`/`in_ready`, `out_valid` pulse), the asynchronous
  active-low reset and the clearing of X_RAM after reset;
- the controller's states and the exact cycle schedule. Only the controller's
  role is specified;
- memory organisation: a 22-word circular buffer with asynchronous read, and a
  constant ROM;
- forming the coefficient difference on the fly in CODIFF_MEM, rather than
  storing differences in the ROM;
- the MAC's delay register, taken to delay the valid/first control by one
  cycle to meet the registered operands, and the sign-magnitude wrapper
  around the unsigned multiplier;
- the exact cell placement in the Wallace tree and the CLA's group size;
- the coefficient values (see above).

Choices for the 16-bit configuration: the 16x16 tree layout, the 32-bit
output width and the test coefficient tables.

Only the low-pass form (`ALPHA = -1`, `BETA = 1`) of the transform comes
with a hardware description. The `ALPHA = +1` and `BETA > 1` forms extend the
same blocks in the obvious way and are this design's own generalisation.

Not built: the conventional (non-DECOR) filter and the conventional Wallace
multiplier, which serve only as baselines.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and stops itself with a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_decor_fir` | whole filter at default parameters against a direct-form convolution: impulse response, full-scale +127/-128 inputs, 300 random samples with random gaps and held-off samples. It also checks the 25-cycle latency, the 22-cycle clear, and that the clear, input stall, buffer wrap, negative operands and DECOR feedback all occur |
| `tb_decor_fir_configs` | six more filters end to end against direct convolution: 16-bit order 20, 16-bit order 35, M = 2, M = 3, `ALPHA = +1` on a high-pass set, and `BETA = 2` |
| `tb_wallace_mult` | all 65,536 8x8 operand pairs, and 200,000 random 16x16 pairs |
| `tb_cla_adder` | carry-chain corners and 100,000 random additions |
| `tb_mac_unit` | 20,000 cycles of random accumulate/clear against a model |
| `tb_codiff_mem` | transformed coefficients for M = 1, M = 2, and `ALPHA = +1, BETA = 2`, over full and truncated coefficient streams |
| `tb_decor_block` | the M = 1, 2, 3 recursions and `ALPHA = +1, BETA = 2` |
| `tb_decor_control` | the clear sweep and the whole per-sample schedule, cycle by cycle |
| `tb_x_ram`, `tb_coeff_rom`, `tb_input_mem`, `tb_out_store` | storage behaviour |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/decor_fir_pkg.sv rtl/wallace_pkg.sv tb/tb_decor_fir.sv --top-module tb_decor_fir
./obj_dir/Vtb_decor_fir
```

The two packages must be listed first. Verilator finds the other modules
through `-y rtl -y tb`. The full filter test runs in well under a second.
