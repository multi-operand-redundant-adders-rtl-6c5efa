# Carry-save linear array compressor for FPGAs

Adding many operands at once (a multiplier's partial products, or the taps of an FIR
filter) is usually done in an ASIC with a tree of carry-save adders (CSAs): each 3:2
CSA turns three words into two in constant time, with no carry propagation. On FPGAs
that approach has a bad reputation. A CSA there costs about as many LUTs as a
carry-propagate adder (CPA), and the CPA gets the device's dedicated fast carry chain
for free. So designers tend to build plain trees of CPAs instead.

This design gets the best of both. It is a **linear array of 3:2 CSAs in which the
carry word of each CSA is passed to the next one through the fast carry chain**. The sum
words go to later stages. Written that way, the array is nothing but a set of short
binary CPAs. Any synthesis tool, for any FPGA vendor, puts them on the carry chain. The
result is a NOP:2 compressor whose critical path does not grow with the word width,
for about the LUT count of a CPA tree.

The output is in carry-save form: a carry word and a sum word. One final CPA outside
this block (or a later stage that accepts carry-save input) gives the binary total.

## The array

The array has NOP operands `I0 .. I(NOP-1)` of N bits and K = NOP-2 CSAs, `CSA0 .. CSA(K-1)`.
Each CSA has two regular inputs A and B, a carry input Ci, a sum word S and a carry word Co.
The example below has nine operands (the default):

```
  CSA   B     A     Ci            out
  0     I1    I2    I0            S0, Co0
  1     I3    I4    Co0 << 1      S1, Co1
  2     I5    I6    Co1 << 1      S2, Co2
  3     I7    I8    Co2 << 1      S3, Co3
  4     S0    S1    Co3 << 1      S4, Co4
  5     S2    S3    Co4 << 1      S5, Co5
  6     S4    S5    Co5 << 1      Sf = S6,  Cf = Co6 << 1
```

The rules, for any NOP:

- Operand 0 enters as the carry input of the first CSA.
- Every CSA after the first takes the previous CSA's carry word, shifted up one bit, as
  its Ci. Only carry words travel from CSA to CSA.
- The A and B inputs consume, in order, the remaining operands `I1 .. I(NOP-1)`, and then
  the partial sum words `S0, S1, ...`, oldest first. CSA k takes entry 2k of that list
  on B and entry 2k+1 on A. A sum word is always consumed after it has been made.
- The last CSA's sum word is the result's sum word Sf. Its carry word, shifted, is Cf.

Each CSA is a row of full adders: `S = A ^ B ^ Ci`, `Co = majority(A, B, Ci)`.

## Why the array is a set of CPAs

This is the part that makes the structure fast on an FPGA, and the part of the RTL that
needs most explanation.

Take the full adder of CSA k at bit j. Its carry out goes to bit j+1 of CSA k+1. That
adder's carry goes to bit j+2 of CSA k+2, and so on. Following the carries therefore
traces a **diagonal** of the array:

```
  (k, j) -> (k+1, j+1) -> (k+2, j+2) -> ... -> last CSA, or bit N-1
```

Along a diagonal, the full adders form an ordinary ripple-carry adder. Its two operands
are the A and B bits of the cells on the diagonal. Its sum bits are the S bits of those
cells. So the whole array is one binary CPA per diagonal, N + K - 1 CPAs in all:

- A diagonal is at most K = NOP-2 bits long. Diagonals that start at bit 0 of a
  later CSA, or that run into bit N-1, are shorter. With 4 or 5 operands every CPA has
  only 2 or 3 bits.
- A diagonal that starts in CSA 0 takes its carry-in from the matching bit of operand 0.
  One that starts at bit 0 of a later CSA has carry-in 0, the empty bit of the shifted
  carry word.
- The carry-out of a diagonal that ends in the last CSA at bit j-1 is bit j of Cf. A
  diagonal that runs into bit N-1 loses its carry-out: results are modulo 2^N.
- A diagonal's CPA reads S bits only from diagonals further up and to the left. Those
  belong to earlier CSAs at the same bit. Hence there is no combinational loop, even
  though the same CSA's sum bits are spread over many CPAs.

The critical path runs down one carry chain, of at most NOP-2 bits, plus a few LUT levels
between chains. It does not grow with N. When N is small compared to NOP, the chains
near the top bit are cut short, which bounds the delay further.

## RTL

| File | What it is |
|---|---|
| `rtl/mora_pkg.sv` | Default sizes (NOP = 9, N = 16) and the rule that picks each CSA's A/B source |
| `rtl/cpa.sv` | W-bit binary CPA, `{cout, sum} = x + y + cin`, left to synthesis to map on the carry chain |
| `rtl/csa_linear_array.sv` | The compressor, the top module |

`csa_linear_array #(NOP, N)`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `op_i` | in | `[N-1:0]` x `[NOP]` | operands; `op_i[0]` is the first CSA's carry input |
| `sum_o` | out | N | Sf |
| `carry_o` | out | N | Cf, already shifted; bit 0 is always 0 |

`sum_o + carry_o` equals the sum of all operands modulo 2^N. The block is purely
combinational, with no clock, reset or latency. Register the inputs and outputs yourself
if you want to time it.

Inside, `row[k].col[j]` is the cell of CSA k at bit j: wires `a`, `b`, `s`. `diag[g]`
is the CPA of diagonal `D = g - (K-1)`, holding cells `(k, k+D)`. The cell reads its
sum bit from position `min(k, j)` of CPA `diag[j-k+K-1]`.

Things to know when changing it:

- **Overflow.** Inputs and outputs share the width N. Sign- or zero-extend the operands
  by enough guard bits (up to ceil(log2 NOP)) so that the total fits. Otherwise the
  result wraps.
- **Size limits.** NOP must be at least 3. Any N of at least 1 works. Configurations of
  4 to 128 operands at 16, 64 and 96 bits are tested.
- **Unused carries.** The carry-outs of the diagonals that end at bit N-1 are left
  unconnected on purpose. A lint tool reports them as unused.

## Where this RTL stops

- **Only the binary-CPA form is built.** The same array can also be put together from
  ternary (three-input) adders on FPGAs that support them, but that mapping is not
  specified well enough here to write.
- **Baselines are not included.** A classic tree of CPAs and a tree of 4:2 compressors
  are the usual alternatives; they are not part of this design.
- **Own choices.** The default width of 16 bits, the port names, the A/B order within a
  CSA, the modulo-2^N behaviour and the purely combinational interface. The operand
  order and the carry chaining follow the published structure.
- **Not verified by simulation.** LUT counts and delays on real devices. The structure
  is meant to give a delay that does not depend on the width, at about the area of a
  CPA tree. The speedup over a CPA tree is expected to grow with N: about 12 to 50
  percent at 16 bits and 44 to 104 percent at 64 bits (4 and 5 operands, whose CPAs
  are very short, gain more).

## Testbenches

All are self-checking and print `TB_RESULT checks=<n> failures=<n>`.

- `tb/tb_cpa.sv` checks the 7-bit CPA exhaustively against integer addition.
- `tb/tb_csa_linear_array.sv` tests the default 9 x 16-bit array. It checks each vector
  against two references: the plain modular sum of the operands, and a word-level model
  of the chained CSAs (`tb/mora_ref_pkg.sv`). The model is written independently of the
  diagonal-CPA RTL. Vectors include directed cases (all zero, all ones, each operand
  alone) and 20 000 random ones. The bench also counts four events and fails if any
  never happens: a carry word passed on between CSAs, a partial sum word fed back,
  a carry dropped at bit N-1 inside the array, and a wrapped total.
- `tb/tb_mora_sweep.sv` runs 18 configurations through `tb/sweep_cfg.sv`, 200 vectors
  each: NOP = 4, 5, 8, 9, 16, 17, 32, 64, 128 at N = 16; NOP = 4, 5, 9, 16, 33, 64, 128
  at N = 64; NOP = 16 and 128 at N = 96.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/mora_pkg.sv tb/mora_ref_pkg.sv rtl/cpa.sv rtl/csa_linear_array.sv \
  tb/tb_csa_linear_array.sv --top-module tb_csa_linear_array
./obj_dir/Vtb_csa_linear_array
```

For the sweep, add `tb/sweep_cfg.sv` and `tb/tb_mora_sweep.sv` and use
`--top-module tb_mora_sweep`. It takes about a minute and a half to build.
