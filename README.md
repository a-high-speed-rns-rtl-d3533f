# One-hot residue number system processor with self-checking output

This is a multiply-accumulate processor built on a residue number system (RNS).
It stores no tables and uses no adders or multipliers in the usual sense.
Each residue is carried on a bundle of wires with exactly one wire high, the wire whose index is the residue's value.
This one-hot form is the "1-out-of-n code".
In this form:

* adding two residues is a rotation (a barrel shifter, one AND-OR level);
* multiplying two residues is a rotation of their discrete logarithms (index calculus);
* converting in and out of the residue domain is decoders, OR wiring and rotations;
* every intermediate value is still a 1-out-of-n word.
  A fault that leaves no wire high, or several, stays visible to the end of the datapath.
  A checker there catches it without any redundant modulus.

All arithmetic paths have the same depth whatever the operand values.
Every channel completes an add, a multiply or a multiply-accumulate in one clock.
A 32-term multiply-accumulate therefore takes 32 clocks.

## Number system

The moduli are chosen in `rns_pkg`: m = {5, 7, 11, 13, 17, 19, 23}.

* All of them are prime, which the index-calculus multiplier needs.
* They are pairwise coprime, so a number X in [0, M) is fixed by its residues x_i = X mod m_i.
* M = 37,182,145, about 2^25.1.
* A 32-term sum of products of 8-bit unsigned operands (at most 2,080,800) never wraps.
* The set is deliberately unbalanced: a wider channel is no slower, because delay does not grow with word length.

A channel's one-hot word has m_i wires.
At block boundaries all channels are packed into `ohr_vec_t`: R channels of MMAX = 23 wires each.
The wires above m_i are held at zero.

## Datapath

```
x_bin, y_bin (8-bit binary)
   |  fwd_conv: one bin2ohr per operand and channel
   v
x_i, y_i (one-hot)     coef_dec (coefficient address -> one-hot residues)
   |                       |
   +---- coef_sel mux -----+
   v
rns_proc  x7 channels: registered one-hot accumulator z_i
   |
   v
rev_conv: mrc_conv (one-hot mixed-radix digits) -> ohr_enc (binary digits) -> mr2bin
   |                                     |
   v                                     v
z_bin (26-bit binary), mr_dig      tsc_checker -> chk (1-out-of-2), err
```

`rns_top` contains no register outside the seven processor channels (95 flip-flop bits).
The whole path from the binary inputs to the accumulator is combinational.
So is the path from the accumulator to `z_bin`, `mr_dig`, `chk` and `err`.

### Forward conversion (`bin2ohr`, `ohr_field_dec`, `ohr_add`)

For modulus m the binary input is cut into fields of l = ceil(log2 m) bits.
A field f at bit position s stands for f * 2^s.
`ohr_field_dec` decodes the field to 2^l wires.
It ORs each wire v onto residue wire (v * 2^s) mod m, which is pure wiring.
A balanced tree of one-hot adder cells (`ohr_add`) sums the partial residues.
The tree is laid out in heap order: node n has children 2n+1 and 2n+2.
For 8-bit operands the tree has two or three leaves.

`ohr_add` is the basic cell: z[k] = OR_j ( x[j] AND y[(k - j) mod N] ).
A code-word input gives a code word.
No wire high gives no wire high.
Two wires high give two wires high.

### Multiplication by index calculus (`ohr_mul`)

Modulo a prime m, every nonzero residue is g^e for a primitive root g.
`rns_pkg::prim_root` picks the smallest primitive root.
Renaming residue wire g^e as index wire e costs nothing.
The product of two nonzero residues is g^(ex + ey), so one `ohr_add` modulo m-1 on the index wires does the multiplication.
Its result is wired back from index e to residue g^e.
Zero has no logarithm, so product wire 0 is `x[0] | y[0]`.
The multiplier is therefore one rotation plus one OR gate: the same depth as the adder.

### Processor channel (`rns_proc`)

Each channel keeps a one-hot accumulator z and applies `op` every clock:

| op       | code | next z           |
|----------|------|------------------|
| `OP_NOP` | 0    | z                |
| `OP_CLR` | 1    | 0                |
| `OP_ADD` | 2    | x + y            |
| `OP_MUL` | 3    | x * y            |
| `OP_MAC` | 4    | z + x * y        |

All results are modulo m_i.
The MAC path is `ohr_mul` followed by one `ohr_add`.
An N-term dot product is one `OP_MUL` followed by N-1 `OP_MAC`s, N clocks in all.
Reset is synchronous and active low.
It loads the code word for 0, so the register never holds a non-code word unless a fault puts one there.
An assertion requires the operands of ADD, MUL and MAC to be one-hot.

### Coefficient decoder (`coef_dec`)

A filter would normally read its coefficients from a ROM.
Here the coefficient address is decoded to 32 wires.
Residue wire (i, v) is the OR of the address wires whose coefficient is congruent to v modulo m_i.
The coefficients are therefore produced directly as one-hot residues.
The table is the parameter `COEF`.
Its default is a 32-tap triangular window, c_k = 8 * (min(k, 31-k) + 1) - 1, giving 7, 15, ..., 127, 127, ..., 7.
With `coef_sel = 1`, operand Y comes from the decoder instead of `y_bin`.

### Reverse conversion by mixed radix (`mrc_conv`, `mrc_cell`, `ohr_enc`, `mr2bin`)

The result is rebuilt in mixed-radix form:

X = A_1 + A_2 m_1 + A_3 m_1 m_2 + ... + A_7 m_1 ... m_6,  with 0 <= A_i < m_i.

`mrc_conv` is a triangle of 21 cells.
A_1 = x_1.
Stage s removes digit A_s from every later channel j:

x_j <- | (x_j - A_s) * m_s^-1 |_(m_j)

After stage s, channel s+1 holds A_(s+1).

Each `mrc_cell` computes z = |(x - y) K|_m entirely in one-hot form:

* y is reduced modulo m by OR wiring;
* y is negated by renaming wire v as wire m - v;
* one `ohr_add` subtracts;
* multiplying by the constant K is a fixed permutation of the wires.

The converter is 6 cells deep.

`ohr_enc` turns each one-hot digit into binary.
Bit k is the OR of the wires whose index has bit k set.
`mr2bin` forms the binary result with the constant weights 1, 5, 35, 385, 5005, 85085 and 1616615.

### Totally self-checking checker (`tsc_checker`, `ohr2mofn`, `mofn_chk`, `trc_cell`)

The checker reads the one-hot mixed-radix digits, the last one-hot signals before encoding.
Every arithmetic step maps non-code words to non-code words, so checking once, here, is enough.
Each channel goes through three steps:

1. **`ohr2mofn`** maps the 1-out-of-m word to a K-out-of-2K word using OR gates.
   K is the smallest value with C(2K, K) >= m: K = 2 for m = 5, K = 3 for m = 7 to 19, K = 4 for m = 23.
   Wire v is given the v-th word of weight K, in numeric order.
   No wire high gives weight 0.
   Several wires high give the union of distinct weight-K words, which has weight above K.
2. **`mofn_chk`** reduces the K-out-of-2K word to a two-rail pair (f, g).
   It splits the word into halves A and B.
   T_i(.) is the threshold function "at least i ones".
   f = OR over odd i of T_i(A) T_(K-i)(B), and g is the same over even i.
   If the word has weight K and a ones fall in A, only i = a satisfies both thresholds, so exactly one of f, g is high.
   A heavier word raises both; a lighter word raises neither.
3. **`trc_cell`** combines two pairs into one.
   A chain of six cells merges the seven channel pairs into `chk`.
   `chk` is 01 or 10 when every digit is a code word, and 00 or 11 otherwise.
   `err = ~(chk[1] ^ chk[0])`.

The checker is 371 of the top's 18,273 word-level cells after coarse synthesis.

## Interface and timing of `rns_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | synchronous reset, active low; accumulators := 0 |
| `op`        | in  | 3     | `rns_pkg::op_e`, applied to all channels this clock |
| `x_bin`     | in  | W = 8 | operand X, unsigned |
| `y_bin`     | in  | W = 8 | operand Y, unsigned |
| `coef_sel`  | in  | 1     | 1: Y = coefficient `coef_addr` |
| `coef_addr` | in  | 5     | coefficient index |
| `z_bin`     | out | 26    | accumulator in binary, in [0, M) |
| `mr_dig`    | out | 7 x 5 | mixed-radix digits A_1..A_7 (digit i < m_i, so the top bits of narrow digits are 0) |
| `chk`       | out | 2     | checker output, 01 / 10 = no error |
| `err`       | out | 1     | 1 = a non-code word reached the checker |

* Apply `op` and the operands before a rising edge.
* The outputs show the result after that edge: a latency of one clock and a throughput of one operation per clock.
* Arithmetic is modulo M.
  Results of M or more wrap.
  Operands are unsigned.

## Files

* `rtl/rns_pkg.sv`: moduli, widths, `op_e`, channel types, and the elaboration-time functions.
  Those functions compute the wiring: `pow_mod`, `inv_mod`, `prim_root`, `mr_weight`, `mofn_k`, `mofn_mask` and `default_coefs`.
* `rtl/<module>.sv`: one module per file, as named above.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
  Each prints `TB_RESULT checks=N failures=F`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rns_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/rns_pkg.sv tb/tb_rns_top.sv -o sim
obj_dir/sim
```

Replace `tb_rns_top` with any other testbench name.
`tb_rns_top` takes about 30 s to build and a moment to run.
It runs the default size and checks every output after every clock against an integer model.
It covers:

* 400 random operations mixing binary and coefficient operands;
* a 32-tap dot product with the coefficient decoder, which must be ready exactly 32 clocks after its first term;
* a 600-term MAC that wraps past M;
* forced zero-hot and two-hot words in one accumulator, both of which must raise `err`.

`tb_fir_filter` runs the decoder's 32 coefficients as an FIR filter over a stream of samples.
The unit testbenches are exhaustive where the input space is small: the adder, multiplier, field decoder, encoder and checker parts.
Elsewhere they are random.

## Changing the design

* **Moduli.**
  Edit `R`, `MODULI`, `MMAX`, `DW` and `OW` in `rns_pkg`.
  Each modulus must be prime.
  `DW` = clog2(MMAX) and `OW` = clog2(product).
  All wiring follows from the functions in the package.
  The testbenches hold their own copy of the moduli and of M for their reference models.
* **Operand width.** This is the `W` parameter of `rns_top`.
  The forward converters grow by one field per l bits.
  Keep M above the largest result you need.
* **Coefficients.** Override `COEF` on `coef_dec`, or change `default_coefs`.
  The address width `AW` and table size `NCOEF` are in the package.

## Design choices and limits

The overall structure, the one-hot coding and the way each block works come from the architecture this design implements.
These are the main points that are its own choices:

* The moduli set, the 8-bit operand width, and the unsigned number range.
* The operation set, its encoding, and reset to the zero code word.
* The binary weighting stage `mr2bin`.
  The architecture ends at mixed-radix digits; here they are also summed into a binary output.
* The assignment of K-out-of-2K words to wires.
* The threshold construction inside `mofn_chk`.
* The linear two-rail chain that combines the channels.
* The default coefficient table.
* There is no pipelining.
  The forward path runs from the binary input to the register.
  It is a field decoder, up to two adder-tree levels, the Y mux, and two rotations for a MAC (multiply, then accumulate).
  The reverse path runs from the register to the outputs.
  It is six rotation levels, followed by the encoders and either the binary weighting adders or the checker.
  Registers could be added at either boundary without changing the arithmetic.
* Only the mixed-radix digits are checked.
  A fault that turns one code word into another code word, such as a wire stuck high together with its neighbour stuck low, is not detected.
  This is inherent to checking the code rather than the arithmetic.
* Signed numbers, scaling and overflow detection are not provided.
  Results wrap modulo M.
