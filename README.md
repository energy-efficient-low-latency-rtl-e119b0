# Exact signed radix-4 Booth multiplier for LUT-based FPGA logic

Small signed multipliers (4 to 16 bits) are common in FPGA accelerators for
image processing and neural-network inference. Synthesis tools usually build
them from lookup tables rather than DSP blocks. This design is an exact
two's-complement N x M multiplier shaped for that fabric. Each bit of a
radix-4 Booth partial product is one LUT. The LUT drives the propagate input
of the fast carry chain. The carry chain then negates the row and makes it
ready to add, at no extra LUT cost. Sign extension is replaced by a few
constant bits, so the rows stay short.

There are two versions of the multiplier. Both compute the same exact
product:

* **area-optimized** (`PPG_AREA`): one LUT per row bit, with one long carry
  chain per row;
* **delay-optimized** (`PPG_DELAY`): the three lowest bits of each row and
  the carry into bit 3 come from dedicated LUTs. Each row's carry chain is
  therefore three columns shorter, and the critical path is shorter too.

The top, `booth_multiplier_top`, builds both versions side by side on the
same operands. By default they are 8x8.

All of the logic is combinational. There is no clock and no reset. A product
is valid one propagation delay after the operands change. To pipeline the
multiplier, register `a`, `b` and the product outside it.

## Booth digits

The multiplier `b` is read as M/2 overlapping triplets
`{b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`. Each triplet is one digit
`d = -2*b[2i+1] + b[2i] + b[2i-1]`, which lies in -2..+2. Then
`b = sum d_i * 4^i`, so the product is M/2 partial products `d_i * a`, each
shifted left by 2i bits. `booth_encoder` turns a triplet into three control
signals:

| triplet | digit | s (magnitude 2) | c (negative) | z (zero) |
|---------|-------|-----------------|--------------|----------|
| 000, 111 | 0    | 0 | 0 | 1 |
| 001, 010 | +1   | 0 | 0 | 0 |
| 011      | +2   | 1 | 0 | 0 |
| 100      | -2   | 1 | 1 | 0 |
| 101, 110 | -1   | 0 | 1 | 0 |

Every partial-product LUT sees the same three multiplier bits. On an FPGA,
the encoder is therefore folded into each LUT rather than built once. The RTL
instantiates `booth_encoder` inside each cell so that the table is written in
one place only.

## A partial-product row

Row i has N+3 bits. Bit n of the one's complement partial product is

    x_n = z ? 0 : (s ? a[n-1] : a[n]) ^ c        (a[-1] = 0, a[N] = a[N-1])

Multiplying by 2 is a mux that picks `a[n-1]`. Negating is an inversion
followed by +1, and the +1 is the row's carry-in `c` on the carry chain. The
carry chain implements, per column, `sum = P ^ carry_in` and
`carry_out = P ? carry_in : G` (see `carry_chain`).

| column | cell | P (propagate) | G (generate) |
|--------|------|---------------|--------------|
| 0 .. N-1 | type A (`lut_type_a`) | `x_n` | 0 |
| N        | type B (`lut_type_b`) | `~SE ^ pin` | `pin` |
| N+1      | type C (constant)     | 1 | 0 |
| N+2      | carry out of the chain | | |

The chain's carry-in is `c`. The rightmost type-A cell delivers it as a
second LUT output. Because G is 0 on the type-A columns, the chain adds
exactly `c` to `x`. The result is the row's two's complement value.

### Sign handling without sign extension (the subtle part)

A row's value `v_i = d_i * a` lies in `-2^N .. +2^N`, so its sign bit sits at
column N. That sign bit is

    SE = 0 if d = 0,  a[N-1] if d > 0,  ~a[N-1] if d < 0

Adding the rows with full sign extension would need a sign bit repeated up to
column N+M-1 in every row. Instead, the design uses
`-SE*2^N = ~SE*2^N - 2^N`. Each row carries the positive bit `~SE` at column
N. The missing `-2^N` terms of all the rows add up to the constant

    -(2^N + 2^(N+2) + ... + 2^(N+M-2))  ≡  2^N + sum_i 2^(N+2i+1)   (mod 2^(N+M))

The right-hand side is a 1 at column N+1 of every row, which is the type-C
column, plus one more 1 at column N of the first row. That extra 1 is the
`pin` input of type B, which is 1 on row 0 and 0 elsewhere. Type B puts both
bits of column N, `~SE` and `pin`, on the chain: P is their xor, and G is
`pin`, which equals both bits whenever P = 0.

As an unsigned N+3-bit number, each row is therefore

    row_i = d_i*a + 3*2^N + (i == 0)*2^N        (always 0 .. 5*2^N)

It is zero-extended and shifted by 2i. The constants cancel in the final sum
modulo `2^(N+M)`. For the 8x8 default, the constants add to `0xAB00` and the
corrections add to `0x5500`.

## Delay-optimized row

In the area row, the carry chain starts at column 0, and the carry-in `c`
may ripple through all N+3 columns. `pp_row_delay` takes the bottom of that
ripple out of the chain:

* `lut_a1` is one dual-output LUT with five inputs: the triplet and
  `a[1:0]`. It gives bits 1:0 of `x + c`.
* `lut_a2_cg` is a six-input function of the triplet and `a[2:0]`. It gives
  bit 2 of `x + c` (`pp2`) and the carry into column 3 (`cgout`). A six-input
  LUT has only one output, so the row uses two copies of the cell. Copy A2
  uses only `pp2`, and copy CG uses only `cgout`.
* The chain starts at column 3 with `cgout` as its carry-in. It covers
  columns 3..N+1 and the carry-out column: N columns instead of N+3.

The row value is bit-for-bit the same as that of the area row. This variant
needs N >= 4.

## Summing the rows

`pp_summation` adds the M/2 aligned rows modulo `2^(N+M)`. While more than
two rows remain, each level splits the rows into groups of four and reduces
each group to two rows with a row of 4:2 compressors (`compressor_4_2`). The
last group is padded with zero rows. When two rows remain, a carry-chain
adder (`carry_chain_adder`) adds them. The resulting trees are:

* 4 rows (8x8): 4 -> 2 -> adder;
* 8 rows (16x16): 8 -> 4 -> 2 -> adder;
* 2 rows (4x4): the adder only.

The 4:2 compressor cell is the standard cell. In LUT-and-carry-logic form,
one LUT computes `cout = maj(x1,x2,x3)` and `P = x1^x2^x3^x4`. The carry
logic's xor and mux then give `sum = P ^ cin` and `carry = P ? cin : x4`. The
horizontal carry `cout` goes to the next column's `cin`. It does not depend
on `cin`, so nothing ripples along a compressor row.

## Modules

| module | role |
|--------|------|
| `booth_pkg` | `booth_ctrl_t` {s, c, z}, `ppg_variant_e` {`PPG_AREA`, `PPG_DELAY`} |
| `booth_encoder` | triplet -> s, c, z |
| `lut_type_a` | one partial-product bit; also the row carry-in |
| `lut_type_b` | sign column: `~SE ^ pin`, generate `pin` |
| `lut_a1`, `lut_a2_cg` | low bits and chain carry of the delay-optimized row |
| `carry_chain` | generic mux/xor carry chain |
| `pp_row_area`, `pp_row_delay` | one partial-product row, N+3 bits |
| `compressor_4_2` | a W-bit row of 4:2 compressor cells |
| `carry_chain_adder` | final two-operand adder |
| `pp_summation` | compressor tree plus final adder |
| `signed_booth_multiplier` | one multiplier: `N`, `M`, `VARIANT` |
| `booth_multiplier_top` | both versions side by side: `N = 8`, `M = 8` |

The ports of `booth_multiplier_top` are `a[N-1:0]`, `b[M-1:0]` (two's
complement inputs), `p_area[N+M-1:0]` and `p_delay[N+M-1:0]` (two's
complement products).

## Where this differs from a vendor-mapped implementation

* The RTL is written as plain logic, not as LUT6_2 and CARRY4 primitives.
  The cell boundaries follow the LUT structure, but a synthesis tool is free
  to remap them. LUT counts and delays are therefore not claimed here. Hand-mapped
  implementations of this architecture have been reported at 12 LUTs / 5.8 ns (4x4),
  about 56 LUTs / 6.9 to 7.7 ns (8x8) and 240 to 245 LUTs / 7.6 to 10.8 ns
  (16x16), on a Xilinx device.
* The following are choices of this design, made to obtain an exact
  product:
  * the exact encoding of the sign column (`~SE ^ pin`);
  * the type-C cell as a constant 1;
  * the 4:2 compressor cell;
  * the shape of the reduction tree.
* Carry-chain lengths are N+3 (area row) and N (delay row), counting the
  carry-out column.
* The final adder is a ripple carry-chain adder, the natural adder on an
  FPGA carry chain. A carry-lookahead adder would compute the same sum.
* M must be even.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module with integer arithmetic, worked out independently in the testbench.

* `tb_booth_multiplier_top` runs the default 8x8 top on all 65,536 operand
  pairs, in both versions. It also counts that each Booth digit (-2..+2)
  occurs and that the full carry ripple occurs (digit -1 times a = 0). It
  checks the `2^N` corner too: digit -2 times -128, which gives +256 in a
  single row.
* `tb_signed_booth_multiplier` covers 4x4, 8x6 and 8x8 exhaustively. It
  covers 16x16 with 20,000 random pairs plus the extreme values.
* `tb_ann_dot_product` uses the multiplier as a neural-network layer: 784
  inputs, 10 neurons and int8 weights and activations. It checks every
  accumulated neuron output and the winning class.
* The unit testbenches cover the cells exhaustively and the chains, the
  compressor and the tree (2, 3, 4 and 8 rows) with random data.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops after a
fixed simulated time if it hangs. To run one with Verilator:

    verilator --binary --timing --assert -Irtl rtl/booth_pkg.sv \
        tb/tb_booth_multiplier_top.sv --top-module tb_booth_multiplier_top \
        -Mdir obj -o sim && obj/sim

Replace the testbench name to run another. Verilator finds the modules
in `rtl/` through `-I rtl`. To change the
size, set `N` and `M` on `booth_multiplier_top` or on
`signed_booth_multiplier`. M must be even and N at least 4.
